// tb_input_port: test of one router input port with simple stand-ins for
// the VC allocator (grants every request; set k hands out downstream VC
// 3-k) and the switch allocator (grants the lowest requesting VC, or only
// the bypass VC when the port's stage-1 arbiter is broken). The port sits at
// (3,3). Each test sends packets and checks the flits that leave (order,
// contents, output port, downstream VC written into the flit), the credits
// returned upstream (count and VC number as upstream knows it) and that the
// expected fault-tolerance mechanism fired:
//   1 plain packet           2 broken main RC unit (spare used)
//   3 broken regular path    (SP/FSP: competes for the secondary multiplexer)
//   4 broken VA arbiter set  (request lodged in and granted by another set)
//   5 broken SA arbiter      (packet moved into the bypass VC; credits still
//                             returned under the upstream VC number)
//   6 a second move, with the logical/physical map already swapped
//   7 two head flits in VA with one broken set: the lender serves its own
//     VC first and the borrower one cycle later.
module tb_input_port;
  import pftr_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid;
  flit_t                    in_flit;
  logic                     credit_out_valid;
  logic [VC_W-1:0]          credit_out_vc;
  logic                     rc_fault, sa1_fault;
  logic [P-1:0]             path_fault;
  logic [V-1:0]             va_set_fault;
  logic [VC_W-1:0]          bypass_vc;
  logic [V-1:0]             va_req, va_gnt;
  logic [V-1:0][PORT_W-1:0] va_req_port;
  logic [V-1:0][VC_W-1:0]   va_gnt_vc;
  logic [P-1:0][V-1:0]      credit_ok;
  logic [V-1:0]             sa_req;
  logic [V-1:0][PORT_W-1:0] sa_req_mux, sa_req_out;
  logic                     sa_gnt_valid;
  logic [VC_W-1:0]          sa_gnt_vc;
  logic                     rd_valid, rd_tail;
  flit_t                    rd_flit;
  logic [PORT_W-1:0]        rd_out_port;
  logic [VC_W-1:0]          rd_ovc;
  logic                     ev_spare_rc, ev_secondary, ev_lodge, ev_borrow_gnt, ev_transfer;

  input_port dut (.*, .cur_x(3'd3), .cur_y(3'd3));

  int checks = 0, failures = 0;
  bit va_enable, sa_enable;

  // allocator stand-ins
  always_comb begin
    for (int k = 0; k < V; k++) begin
      va_gnt[k]    = va_req[k] && va_enable;
      va_gnt_vc[k] = VC_W'(3 - k);
    end
    sa_gnt_valid = 1'b0;
    sa_gnt_vc    = '0;
    if (sa_enable) begin
      if (sa1_fault) begin
        sa_gnt_valid = sa_req[bypass_vc];
        sa_gnt_vc    = bypass_vc;
      end else begin
        for (int v = V - 1; v >= 0; v--)
          if (sa_req[v]) begin
            sa_gnt_valid = 1'b1;
            sa_gnt_vc    = VC_W'(v);
          end
      end
    end
  end

  // observation
  flit_t rx [$];
  int    rx_port [$];
  int    rx_ovc [$];
  int    cred [V];
  int    n_spare, n_sec, n_lodge, n_borrow, n_xfer, n_mux_sec;
  always @(posedge clk) if (rst_n) begin
    if (rd_valid) begin
      rx.push_back(rd_flit);
      rx_port.push_back(rd_out_port);
      rx_ovc.push_back(rd_ovc);
    end
    if (credit_out_valid) cred[credit_out_vc]++;
    n_spare  += ev_spare_rc;
    n_sec    += ev_secondary;
    n_lodge  += ev_lodge;
    n_borrow += ev_borrow_gnt;
    n_xfer   += ev_transfer;
    for (int v = 0; v < V; v++) if (sa_req[v] && sa_req_mux[v] != sa_req_out[v]) n_mux_sec++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  function automatic flit_t mk(int vc, int idx, int len, int dx, int dy, int tag);
    flit_t f;
    f.ftype   = (len == 1) ? FLIT_HEADTAIL : (idx == 0) ? FLIT_HEAD :
                (idx == len - 1) ? FLIT_TAIL : FLIT_BODY;
    f.vc      = VC_W'(vc);
    f.dst_x   = COORD_W'(dx);
    f.dst_y   = COORD_W'(dy);
    f.payload = PAYLOAD_W'(tag * 256 + idx);
    return f;
  endfunction

  // send a packet and check what leaves the port
  task automatic packet(string name, int vc, int len, int dx, int dy, int exp_port,
                        int exp_ovc, int tag);
    for (int v = 0; v < V; v++) cred[v] = 0;
    rx.delete(); rx_port.delete(); rx_ovc.delete();
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_flit  = mk(vc, n, len, dx, dy, tag);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (rx.size() != len) begin
      fail($sformatf("%s: %0d flits left, expected %0d", name, rx.size(), len));
    end else begin
      for (int n = 0; n < len; n++) begin
        flit_t e;
        e = mk(vc, n, len, dx, dy, tag);
        e.vc = VC_W'(exp_ovc);
        checks++;
        if (rx[n] != e || rx_port[n] != exp_port || rx_ovc[n] != exp_ovc)
          fail($sformatf("%s: flit %0d wrong (port %0d vc %0d)", name, n, rx_port[n], rx[n].vc));
      end
    end
    checks++;
    if (cred[vc] != len) fail($sformatf("%s: %0d credits on VC %0d", name, cred[vc], vc));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; rc_fault = 0; sa1_fault = 0; path_fault = '0;
    va_set_fault = '0; bypass_vc = 2'd1; credit_ok = '1; va_enable = 1; sa_enable = 1;
    n_spare = 0; n_sec = 0; n_lodge = 0; n_borrow = 0; n_xfer = 0; n_mux_sec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    packet("plain", 0, 5, 6, 3, 2, 3, 1);                 // east, set 0 gives VC 3
    packet("plain north", 2, 5, 3, 7, 1, 1, 2);           // north, set 2 gives VC 1

    rc_fault = 1;
    packet("spare RC", 1, 5, 0, 5, 4, 2, 3);              // west
    checks++;
    if (n_spare != 1) fail("spare RC unit not used");
    rc_fault = 0;

    path_fault[2] = 1;
    packet("secondary path", 0, 5, 7, 0, 2, 3, 4);
    checks++;
    if (n_sec != 1 || n_mux_sec == 0) fail("secondary path not requested");
    path_fault = '0;

    va_set_fault[1] = 1;
    packet("borrowed VA set", 1, 5, 3, 0, 3, 3, 5);       // south; lender set 0 gives VC 3
    checks++;
    if (n_lodge != 1 || n_borrow != 1) fail("VA request not lodged / granted");
    va_set_fault = '0;

    sa1_fault = 1;
    packet("moved to bypass VC", 3, 5, 3, 3, 0, 0, 6);    // local; set 3 gives VC 0
    checks++;
    if (n_xfer != 1) fail($sformatf("%0d transfers, expected 1", n_xfer));
    packet("second move", 1, 5, 5, 3, 2, 0, 7);           // logical VC1 now physical 3
    checks++;
    if (n_xfer != 2) fail($sformatf("%0d transfers, expected 2", n_xfer));
    packet("bypass VC itself", 1, 5, 3, 6, 1, 2, 8);      // map is back to identity
    checks++;
    if (n_xfer != 2) fail("bypass VC traffic should need no move");
    sa1_fault = 0;

    // scenario 2: VC0 and VC1 wait in VA, VC1's set is broken
    va_set_fault[1] = 1;
    va_enable = 0;
    sa_enable = 0;
    @(negedge clk);
    in_valid = 1; in_flit = mk(0, 0, 1, 6, 3, 9);
    @(negedge clk);
    in_flit = mk(1, 0, 1, 0, 3, 10);
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    va_enable = 1;
    begin
      int t0, t1, t;
      t0 = -1; t1 = -1;
      for (t = 0; t < 6; t++) begin
        @(posedge clk);
        #1;
        if (t0 < 0 && dut.G[dut.l2p[0]] == VC_ACTIVE) t0 = t;
        if (t1 < 0 && dut.G[dut.l2p[1]] == VC_ACTIVE) t1 = t;
      end
      checks++;
      if (t0 != 0 || t1 != 1)
        fail($sformatf("lender VC active at %0d, borrower at %0d; expected 0 and 1", t0, t1));
    end
    sa_enable = 1;
    repeat (10) @(negedge clk);
    va_set_fault = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
