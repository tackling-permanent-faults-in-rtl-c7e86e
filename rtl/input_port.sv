// input_port: one input port of the fault-tolerant router: V virtual-channel
// buffers, their state fields, the port's routing computation (RC) unit and
// its spare, and the logic that lets a VC work around faults in its own
// VC-allocation arbiters or in the port's switch-allocation arbiter.
//
// State per VC (indexed by physical buffer):
//   G   global state (idle / routing / VC allocation / active)
//   R   output port from RC              O   downstream VC from VA
//   P   read/write pointers and count    SP  multiplexer to compete for in SA
//   FSP use the secondary crossbar path  (SP/FSP set by RC)
//   R2, ID, VF  a request lodged in this VC's arbiter set by another VC
// The credit count 'C' of a packet's downstream VC is kept by the router,
// per output VC, and read through R and O (credit_ok).
//
// Routing: one RC unit per port serves one VC in 'routing' state per cycle
// (round-robin). A spare RC unit computes in parallel; rc_fault selects it.
// If the output port's regular path is reported broken (path_fault), RC also
// writes SP = secondary multiplexer and sets FSP.
//
// VA arbiter borrowing: a VC whose arbiter set is faulty (va_set_fault)
// writes its route into R2, its number into ID and sets VF of a healthy VC
// whose set is not already lent. It does so in the cycle its RC completes, or
// in a later cycle when no set was free. A healthy set serves its own VC
// first and the lodged request otherwise; on a grant for the lodged request
// it fills O of VC ID and clears R2/ID/VF.
//
// SA bypass and transfer: with sa1_fault the switch allocator always offers
// VC 'bypass_vc'. While that VC is idle and empty, the packet of another
// active VC is moved into it in one cycle (flits, pointers and state fields
// together). Upstream routers keep using the old VC number; a logical-to-
// physical map, swapped at each move, steers incoming flits and returned
// credits so the move is invisible outside the port.
//
// Timing: a flit written in cycle t is seen by RC in t+1; RC, VA and SA take
// one cycle each when uncontended; the SA read is combinational on sa_gnt_*
// and the router registers it. Arbitration policy, the map, the one-packet-
// per-buffer rule (the router frees a downstream VC only once all its credits
// are back) and the buffer depth are this implementation's choices.
module input_port
  import pftr_pkg::*;
#(
  parameter int unsigned P     = NUM_PORTS,
  parameter int unsigned V     = NUM_VCS,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [COORD_W-1:0]        cur_x,
  input  logic [COORD_W-1:0]        cur_y,
  // link from upstream
  input  logic                      in_valid,
  input  flit_t                     in_flit,
  output logic                      credit_out_valid,
  output logic [VC_W-1:0]           credit_out_vc,
  // fault status
  input  logic                      rc_fault,
  input  logic [P-1:0]              path_fault,
  input  logic [V-1:0]              va_set_fault,
  input  logic                      sa1_fault,
  input  logic [VC_W-1:0]           bypass_vc,
  // VC allocation, one request per arbiter set
  output logic [V-1:0]              va_req,
  output logic [V-1:0][PORT_W-1:0]  va_req_port,
  input  logic [V-1:0]              va_gnt,
  input  logic [V-1:0][VC_W-1:0]    va_gnt_vc,
  // switch allocation
  input  logic [P-1:0][V-1:0]       credit_ok,
  output logic [V-1:0]              sa_req,
  output logic [V-1:0][PORT_W-1:0]  sa_req_mux,
  output logic [V-1:0][PORT_W-1:0]  sa_req_out,
  input  logic                      sa_gnt_valid,
  input  logic [VC_W-1:0]           sa_gnt_vc,
  // flit leaving the buffer towards the crossbar
  output logic                      rd_valid,
  output flit_t                     rd_flit,
  output logic [PORT_W-1:0]         rd_out_port,
  output logic [VC_W-1:0]           rd_ovc,
  output logic                      rd_tail,
  // mechanism events (one-cycle pulses)
  output logic                      ev_spare_rc,
  output logic                      ev_secondary,
  output logic                      ev_lodge,
  output logic                      ev_borrow_gnt,
  output logic                      ev_transfer
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  // ---------------------------------------------------------------- state
  vc_state_e [V-1:0]             G, n_G;
  logic [V-1:0][PORT_W-1:0]      R, n_R, SP, n_SP, R2, n_R2;
  logic [V-1:0][VC_W-1:0]        O, n_O, ID, n_ID;
  logic [V-1:0]                  FSP, n_FSP, VF, n_VF;
  logic [V-1:0][PW-1:0]          rd_ptr, n_rd_ptr, wr_ptr, n_wr_ptr;
  logic [V-1:0][CW-1:0]          cnt, n_cnt;
  flit_t                         mem   [V][DEPTH];
  flit_t                         n_mem [V][DEPTH];
  logic [V-1:0][VC_W-1:0]        l2p, n_l2p;   // logical (upstream) -> physical
  logic [V-1:0][VC_W-1:0]        p2l;

  always_comb begin
    p2l = '0;
    for (int l = 0; l < V; l++) p2l[l2p[l]] = VC_W'(l);
  end

  // ------------------------------------------------------------------- RC
  logic [V-1:0]      rc_req;
  logic [V-1:0]      rc_gnt_oh;
  logic [VC_W-1:0]   rc_vc;
  logic              rc_go;
  flit_t             rc_head;
  logic [PORT_W-1:0] rc_out_main, rc_out_spare, rc_out;

  always_comb
    for (int v = 0; v < V; v++) rc_req[v] = (G[v] == VC_ROUTING);

  rr_arbiter #(.N(V)) u_rc_arb (
    .clk (clk), .rst_n (rst_n), .req (rc_req), .advance (1'b1),
    .gnt (rc_gnt_oh), .gnt_idx (rc_vc), .gnt_valid (rc_go)
  );

  assign rc_head = mem[rc_vc][rd_ptr[rc_vc]];

  rc_unit u_rc_main (
    .cur_x (cur_x), .cur_y (cur_y), .dst_x (rc_head.dst_x), .dst_y (rc_head.dst_y),
    .out_port (rc_out_main)
  );
  rc_unit u_rc_spare (
    .cur_x (cur_x), .cur_y (cur_y), .dst_x (rc_head.dst_x), .dst_y (rc_head.dst_y),
    .out_port (rc_out_spare)
  );
  assign rc_out = rc_fault ? rc_out_spare : rc_out_main;

  // ------------------------------------------------- VA arbiter borrowing
  logic [V-1:0]      lodged;       // VC has a request sitting in another set
  logic              lodge_go;
  logic [VC_W-1:0]   lodge_vc, lender;
  logic [PORT_W-1:0] lodge_port;
  logic              lender_ok;

  always_comb begin
    lodged = '0;
    for (int k = 0; k < V; k++)
      if (VF[k]) lodged[ID[k]] = 1'b1;

    lender_ok = 1'b0;
    lender    = '0;
    for (int k = 0; k < V; k++)
      if (!lender_ok && !va_set_fault[k] && !VF[k]) begin
        lender_ok = 1'b1;
        lender    = VC_W'(k);
      end

    lodge_go   = 1'b0;
    lodge_vc   = '0;
    lodge_port = '0;
    if (rc_go && va_set_fault[rc_vc]) begin
      lodge_go   = 1'b1;
      lodge_vc   = rc_vc;
      lodge_port = rc_out;
    end else begin
      for (int v = 0; v < V; v++)
        if (!lodge_go && G[v] == VC_VALLOC && va_set_fault[v] && !lodged[v]) begin
          lodge_go   = 1'b1;
          lodge_vc   = VC_W'(v);
          lodge_port = R[v];
        end
    end
    lodge_go = lodge_go && lender_ok;
  end

  // requests presented to the VC allocator, one per arbiter set
  logic [V-1:0]           own_req;
  logic [V-1:0][VC_W-1:0] served;

  always_comb begin
    for (int k = 0; k < V; k++) begin
      own_req[k] = (G[k] == VC_VALLOC) && !va_set_fault[k];
      va_req[k]  = !va_set_fault[k] && (own_req[k] || VF[k]);
      if (own_req[k]) begin
        va_req_port[k] = R[k];
        served[k]      = VC_W'(k);
      end else begin
        va_req_port[k] = R2[k];
        served[k]      = ID[k];
      end
    end
  end

  // ------------------------------------------------------------------- SA
  always_comb begin
    for (int v = 0; v < V; v++) begin
      sa_req[v]     = (G[v] == VC_ACTIVE) && (cnt[v] != '0) && credit_ok[R[v]][O[v]];
      sa_req_mux[v] = FSP[v] ? SP[v] : R[v];
      sa_req_out[v] = R[v];
    end
  end

  always_comb begin
    rd_valid    = sa_gnt_valid;
    rd_flit     = mem[sa_gnt_vc][rd_ptr[sa_gnt_vc]];
    rd_flit.vc  = O[sa_gnt_vc];
    rd_out_port = R[sa_gnt_vc];
    rd_ovc      = O[sa_gnt_vc];
    rd_tail     = is_tail(rd_flit.ftype);
  end

  // ------------------------------------------------------------- transfer
  logic            xfer_go;
  logic [VC_W-1:0] xfer_src;
  logic [VC_W-1:0] in_phys;

  assign in_phys = l2p[in_flit.vc];

  always_comb begin
    xfer_go  = 1'b0;
    xfer_src = '0;
    if (sa1_fault && G[bypass_vc] == VC_IDLE && cnt[bypass_vc] == '0 &&
        !(in_valid && in_phys == bypass_vc)) begin
      for (int v = 0; v < V; v++)
        if (!xfer_go && VC_W'(v) != bypass_vc && G[v] == VC_ACTIVE) begin
          xfer_go  = 1'b1;
          xfer_src = VC_W'(v);
        end
    end
  end

  // ----------------------------------------------------------- next state
  always_comb begin
    logic [V-1:0] inc, dec;
    n_G = G;  n_R = R;  n_O = O;  n_SP = SP;  n_FSP = FSP;
    n_R2 = R2;  n_ID = ID;  n_VF = VF;
    n_rd_ptr = rd_ptr;  n_wr_ptr = wr_ptr;  n_cnt = cnt;  n_l2p = l2p;
    n_mem = mem;
    inc = '0;
    dec = '0;

    // flit arrival
    if (in_valid) begin
      n_mem[in_phys][wr_ptr[in_phys]] = in_flit;
      n_wr_ptr[in_phys] = (int'(wr_ptr[in_phys]) == DEPTH - 1) ? '0 : wr_ptr[in_phys] + 1'b1;
      inc[in_phys] = 1'b1;
      if (G[in_phys] == VC_IDLE && is_head(in_flit.ftype)) n_G[in_phys] = VC_ROUTING;
    end

    // routing computation
    if (rc_go) begin
      n_R[rc_vc]   = rc_out;
      n_FSP[rc_vc] = path_fault[rc_out];
      n_SP[rc_vc]  = path_fault[rc_out] ? secondary_mux(rc_out) : rc_out;
      n_G[rc_vc]   = VC_VALLOC;
    end

    // lodge a request in a healthy arbiter set
    if (lodge_go) begin
      n_R2[lender] = lodge_port;
      n_ID[lender] = lodge_vc;
      n_VF[lender] = 1'b1;
    end

    // VC allocation grants
    for (int k = 0; k < V; k++) begin
      if (va_gnt[k]) begin
        n_O[served[k]] = va_gnt_vc[k];
        n_G[served[k]] = VC_ACTIVE;
        if (!own_req[k]) begin
          n_VF[k] = 1'b0;
          n_R2[k] = '0;
          n_ID[k] = '0;
        end
      end
    end

    // switch traversal read
    if (sa_gnt_valid) begin
      n_rd_ptr[sa_gnt_vc] = (int'(rd_ptr[sa_gnt_vc]) == DEPTH - 1) ? '0 : rd_ptr[sa_gnt_vc] + 1'b1;
      dec[sa_gnt_vc] = 1'b1;
      if (rd_tail) n_G[sa_gnt_vc] = VC_IDLE;
    end

    for (int v = 0; v < V; v++)
      n_cnt[v] = cnt[v] + CW'(inc[v]) - CW'(dec[v]);

    // move the packet of xfer_src into the bypass VC
    if (xfer_go) begin
      n_G[bypass_vc]      = G[xfer_src];
      n_R[bypass_vc]      = R[xfer_src];
      n_O[bypass_vc]      = O[xfer_src];
      n_SP[bypass_vc]     = SP[xfer_src];
      n_FSP[bypass_vc]    = FSP[xfer_src];
      n_rd_ptr[bypass_vc] = rd_ptr[xfer_src];
      n_wr_ptr[bypass_vc] = n_wr_ptr[xfer_src];
      n_cnt[bypass_vc]    = n_cnt[xfer_src];
      for (int d = 0; d < DEPTH; d++) n_mem[bypass_vc][d] = n_mem[xfer_src][d];
      n_G[xfer_src]      = VC_IDLE;
      n_rd_ptr[xfer_src] = '0;
      n_wr_ptr[xfer_src] = '0;
      n_cnt[xfer_src]    = '0;
      n_l2p[p2l[xfer_src]]  = bypass_vc;
      n_l2p[p2l[bypass_vc]] = xfer_src;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < V; v++) G[v] <= VC_IDLE;
      R <= '0;  O <= '0;  SP <= '0;  FSP <= '0;
      R2 <= '0;  ID <= '0;  VF <= '0;
      rd_ptr <= '0;  wr_ptr <= '0;  cnt <= '0;
      for (int l = 0; l < V; l++) l2p[l] <= VC_W'(l);
    end else begin
      G <= n_G;  R <= n_R;  O <= n_O;  SP <= n_SP;  FSP <= n_FSP;
      R2 <= n_R2;  ID <= n_ID;  VF <= n_VF;
      rd_ptr <= n_rd_ptr;  wr_ptr <= n_wr_ptr;  cnt <= n_cnt;  l2p <= n_l2p;
    end
  end

  // buffer storage (no reset: a slot is read only after it was written)
  always_ff @(posedge clk) mem <= n_mem;

  // credit back to upstream, in upstream's numbering
  always_comb begin
    credit_out_valid = sa_gnt_valid;
    credit_out_vc    = p2l[sa_gnt_vc];
  end

  assign ev_spare_rc   = rc_go && rc_fault;
  assign ev_secondary  = rc_go && path_fault[rc_out];
  assign ev_lodge      = lodge_go;
  assign ev_borrow_gnt = |(va_gnt & ~own_req);
  assign ev_transfer   = xfer_go;

  // A flit must find room, and a buffer is read only when it holds a flit.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (in_valid)
        assert (cnt[in_phys] != CW'(DEPTH) || (sa_gnt_valid && sa_gnt_vc == in_phys))
          else $error("input_port: buffer overflow on VC %0d", in_phys);
      if (sa_gnt_valid)
        assert (cnt[sa_gnt_vc] != '0) else $error("input_port: read of empty VC %0d", sa_gnt_vc);
    end
  end
endmodule
