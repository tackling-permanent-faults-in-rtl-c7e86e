// tb_pftr_router: end-to-end test of the fault-tolerant router at its
// default size (5 ports, 4 VCs, 4-flit buffers, 128-bit flits).
//
// Five traffic sources (one per input port) send 5-flit packets to random
// mesh destinations with credit-based flow control, as an upstream router
// would; five sinks check every flit that leaves. The router sits at (3,3) of
// an 8x8 mesh, so all five output ports are used. Checks:
//   * each packet leaves on the output port XY routing gives for it (the
//     reference is computed here, not taken from the router),
//   * the flits of a packet arrive complete, in order, unaltered, on one VC,
//   * every packet sent is delivered, in every fault configuration,
//   * a part reported faulty is never used: no request from a broken VA
//     arbiter set, no SA grant other than the bypass VC behind a broken SA
//     arbiter, no flit through a broken crossbar path, no route from a
//     broken RC unit, no allocation of a VC whose stage-2 arbiter is broken,
//   * no downstream VC buffer is sent more flits than it holds,
//   * head-flit latency through an empty router: 5 cycles fault-free, 5 with
//     the packet's VA arbiter set broken, 6 with the port's SA arbiter broken
//     (the extra cycle is the move into the bypass VC).
// Traffic is run under a series of fault configurations, one or more faults
// per pipeline stage, and the test counts how often each fault-tolerance
// mechanism and each kind of stall was exercised; a mechanism that never
// happened counts as a failure.
module tb_pftr_router;
  import pftr_pkg::*;

  localparam int P = NUM_PORTS;
  localparam int V = NUM_VCS;
  localparam int DEPTH = BUF_DEPTH;
  localparam int PKT_LEN = 5;
  localparam logic [COORD_W-1:0] MY_X = 3'd3, MY_Y = 3'd3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [P-1:0]              in_valid;
  flit_t [P-1:0]              in_flit;
  logic  [P-1:0]              credit_out_valid;
  logic  [P-1:0][VC_W-1:0]    credit_out_vc;
  logic  [P-1:0]              out_valid;
  flit_t [P-1:0]              out_flit;
  logic  [P-1:0]              credit_in_valid;
  logic  [P-1:0][VC_W-1:0]    credit_in_vc;
  logic  [P-1:0]              rc_fault, sa1_fault, sa2_fault, xb_fault;
  logic  [P-1:0][V-1:0]       va_set_fault, va2_fault;
  logic  [P-1:0]              bp_we;
  logic  [P-1:0][VC_W-1:0]    bp_vc;
  logic  [P-1:0]              ev_spare_rc, ev_secondary, ev_lodge, ev_borrow_gnt, ev_transfer;

  pftr_router dut (.*, .cur_x(MY_X), .cur_y(MY_Y));

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // --------------------------------------------------------- reference XY
  function automatic int ref_port(logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    if (dx > MY_X) return 2;
    if (dx < MY_X) return 4;
    if (dy > MY_Y) return 1;
    if (dy < MY_Y) return 3;
    return 0;
  endfunction

  // payload: [src port 3][packet number 16][flit index 4][salt rest]
  function automatic logic [PAYLOAD_W-1:0] mk_payload(int src, int pkt, int idx);
    logic [PAYLOAD_W-1:0] p;
    p = '0;
    p[22:20] = 3'(src);
    p[19:4]  = 16'(pkt);
    p[3:0]   = 4'(idx);
    p[PAYLOAD_W-1:PAYLOAD_W-32] = 32'(src * 7919 + pkt * 104729 + idx * 13);
    return p;
  endfunction

  // -------------------------------------------------------------- sources
  int     up_credits [P][V];
  bit     up_busy    [P][V];
  bit     src_active [P];
  int     src_vc     [P];
  int     src_idx    [P];
  int     src_pkt    [P];
  logic [COORD_W-1:0] src_dx [P], src_dy [P];
  int     sent_pkts, recv_pkts;
  bit     traffic_on;
  int     inj_pct;
  int     n_probe;

  // -------------------------------------------------------------- sinks
  typedef struct { int vc; int unsigned t; } cred_t;
  cred_t  cq [P][$];
  int     credit_delay;
  bit     sink_open   [P][V];
  int     sink_src    [P][V];
  int     sink_pkt    [P][V];
  int     sink_idx    [P][V];
  int unsigned last_head_out;
  int     held        [P][V];   // flits in the downstream buffer

  // mechanism counters
  int n_spare_rc, n_secondary, n_lodge, n_borrow, n_transfer;
  int n_va_stall, n_credit_stall, n_sa_conflict;
  int isolation_checks;

  always @(posedge clk) begin
    if (rst_n) begin
      n_spare_rc  += $countones(ev_spare_rc);
      n_secondary += $countones(ev_secondary);
      n_lodge     += $countones(ev_lodge);
      n_borrow    += $countones(ev_borrow_gnt);
      n_transfer  += $countones(ev_transfer);
      for (int i = 0; i < P; i++) begin
        if ((dut.va_req[i] & ~dut.va_gnt[i]) != '0) n_va_stall++;
        if ($countones(dut.sa_req[i]) > 1) n_sa_conflict++;
        // a part reported faulty is never used
        for (int k = 0; k < V; k++)
          if (va_set_fault[i][k] && dut.va_req[i][k]) begin
            failures++;
            $display("FAIL: broken VA arbiter set %0d.%0d used", i, k);
          end
        if (sa1_fault[i] && dut.sa_gnt_valid[i] && dut.sa_gnt_vc[i] != dut.bypass_vc[i]) begin
          failures++;
          $display("FAIL: broken SA arbiter of port %0d used", i);
        end
        if ((xb_fault[i] || sa2_fault[i]) && dut.sa_xb_ctrl.m_valid[i]) begin
          failures++;
          $display("FAIL: broken path M%0d used", i + 1);
        end
        for (int v = 0; v < V; v++)
          if (va2_fault[i][v] && !dut.ovc_busy[i][v]) begin
            for (int a = 0; a < P; a++)
              for (int k = 0; k < V; k++)
                if (dut.va_gnt[a][k] && dut.va_req_port[a][k] == i && dut.va_gnt_vc[a][k] == v) begin
                  failures++;
                  $display("FAIL: VC %0d.%0d with broken stage-2 arbiter allocated", i, v);
                end
          end
        isolation_checks++;
        // a packet holds a downstream VC whose buffer is full
        for (int v = 0; v < V; v++)
          if (dut.ovc_busy[i][v] && !dut.credit_ok[i][v]) n_credit_stall++;
      end
    end
  end

  for (genvar gi = 0; gi < P; gi++) begin : g_rc_check
    always @(posedge clk)
      if (rst_n && rc_fault[gi] && dut.g_port[gi].u_in.rc_go &&
          dut.g_port[gi].u_in.rc_out != dut.g_port[gi].u_in.rc_out_spare) begin
        failures++;
        $display("FAIL: broken RC unit of port %0d used", gi);
      end
  end

  // source and sink behaviour, evaluated just after each rising edge
  task automatic drive_cycle();
    // credits returned by the router to the sources
    for (int i = 0; i < P; i++)
      if (credit_out_valid[i]) up_credits[i][credit_out_vc[i]]++;

    // sinks: check flits, queue credits
    for (int o = 0; o < P; o++) begin
      if (out_valid[o]) begin
        flit_t f;
        int vc, src, pkt, idx;
        f   = out_flit[o];
        vc  = f.vc;
        src = f.payload[22:20];
        pkt = f.payload[19:4];
        idx = f.payload[3:0];
        checks++;
        if (f.payload != mk_payload(src, pkt, idx) || ref_port(f.dst_x, f.dst_y) != o) begin
          failures++;
          $display("FAIL: bad flit on output %0d: src %0d pkt %0d idx %0d dst (%0d,%0d)",
                   o, src, pkt, idx, f.dst_x, f.dst_y);
        end
        if (is_head(f.ftype)) begin
          checks++;
          if (sink_open[o][vc] || idx != 0) begin
            failures++;
            $display("FAIL: head on busy output VC %0d.%0d", o, vc);
          end
          sink_open[o][vc] = 1'b1;
          sink_src[o][vc]  = src;
          sink_pkt[o][vc]  = pkt;
          sink_idx[o][vc]  = 0;
          last_head_out    = cycle;
        end else begin
          checks++;
          if (!sink_open[o][vc] || sink_src[o][vc] != src || sink_pkt[o][vc] != pkt ||
              sink_idx[o][vc] + 1 != idx) begin
            failures++;
            $display("FAIL: out-of-order flit on %0d.%0d: src %0d pkt %0d idx %0d", o, vc,
                     src, pkt, idx);
          end
          sink_idx[o][vc] = idx;
        end
        if (is_tail(f.ftype)) begin
          checks++;
          if (src != 7 && idx != PKT_LEN - 1) begin
            failures++;
            $display("FAIL: packet with %0d flits", idx + 1);
          end
          sink_open[o][vc] = 1'b0;
          recv_pkts++;
        end
        cq[o].push_back('{vc: vc, t: cycle + credit_delay});
        // the downstream buffer of this VC must not overflow
        held[o][vc]++;
        checks++;
        if (held[o][vc] > DEPTH) begin
          failures++;
          $display("FAIL: output %0d VC %0d sent %0d flits into a %0d-flit buffer", o, vc,
                   held[o][vc], DEPTH);
        end
      end
    end

    // sinks: return credits
    for (int o = 0; o < P; o++) begin
      credit_in_valid[o] <= 1'b0;
      if (cq[o].size() != 0 && cq[o][0].t <= cycle) begin
        cred_t c;
        c = cq[o].pop_front();
        held[o][c.vc]--;
        credit_in_valid[o] <= 1'b1;
        credit_in_vc[o]    <= VC_W'(c.vc);
      end
    end

    // sources
    for (int i = 0; i < P; i++) begin
      in_valid[i] <= 1'b0;
      if (!src_active[i] && traffic_on && ($urandom % 100) < inj_pct) begin
        int start, pick;
        start = $urandom % V;
        pick  = -1;
        for (int n = 0; n < V; n++) begin
          int l;
          l = (start + n) % V;
          if (pick < 0 && !up_busy[i][l] && up_credits[i][l] == DEPTH) pick = l;
        end
        if (pick >= 0) begin
          src_active[i] = 1'b1;
          src_vc[i]     = pick;
          src_idx[i]    = 0;
          up_busy[i][pick] = 1'b1;
          src_dx[i] = COORD_W'($urandom);
          src_dy[i] = COORD_W'($urandom);
        end
      end
      if (src_active[i] && up_credits[i][src_vc[i]] > 0) begin
        flit_t f;
        f.ftype   = (src_idx[i] == 0) ? FLIT_HEAD :
                    (src_idx[i] == PKT_LEN - 1) ? FLIT_TAIL : FLIT_BODY;
        f.vc      = VC_W'(src_vc[i]);
        f.dst_x   = src_dx[i];
        f.dst_y   = src_dy[i];
        f.payload = mk_payload(i, src_pkt[i], src_idx[i]);
        in_valid[i] <= 1'b1;
        in_flit[i]  <= f;
        up_credits[i][src_vc[i]]--;
        src_idx[i]++;
        if (src_idx[i] == PKT_LEN) begin
          up_busy[i][src_vc[i]] = 1'b0;
          src_active[i] = 1'b0;
          src_pkt[i]++;
          sent_pkts++;
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) drive_cycle();

  task automatic clear_faults();
    rc_fault = '0;  sa1_fault = '0;  sa2_fault = '0;  xb_fault = '0;
    va_set_fault = '0;  va2_fault = '0;
  endtask

  function automatic int n_src_active();
    int n;
    n = 0;
    for (int i = 0; i < P; i++) n += int'(src_active[i]);
    return n;
  endfunction

  // run random traffic, then stop injecting and wait until all is delivered
  task automatic run_traffic(string name, int cycles, int pct, int cdelay);
    int base_sent, base_recv;
    base_sent = sent_pkts;
    base_recv = recv_pkts;
    credit_delay = cdelay;
    inj_pct = pct;
    traffic_on = 1'b1;
    repeat (cycles) @(posedge clk);
    traffic_on = 1'b0;
    while (n_src_active() != 0) @(posedge clk);
    repeat (200) @(posedge clk);
    checks++;
    if (sent_pkts - base_sent != recv_pkts - base_recv || sent_pkts == base_sent) begin
      failures++;
      $display("FAIL: %s: sent %0d packets, delivered %0d", name, sent_pkts - base_sent,
               recv_pkts - base_recv);
    end else begin
      $display("%s: %0d packets delivered", name, sent_pkts - base_sent);
    end
  endtask

  // one single-flit packet from the local port into an empty router; the
  // head latency is counted from the edge that takes the flit in to the
  // edge at which the sink sees it on the output link.
  task automatic latency_probe(string name, int vc, int expect_lat);
    int unsigned t0;
    int n_before;
    flit_t f;
    n_before = recv_pkts;
    @(negedge clk);
    f.ftype   = FLIT_HEADTAIL;
    f.vc      = VC_W'(vc);
    f.dst_x   = 3'd6;
    f.dst_y   = MY_Y;
    f.payload = mk_payload(7, n_probe, 0);
    n_probe++;
    in_valid[0] = 1'b1;
    in_flit[0]  = f;
    up_credits[0][vc]--;
    t0 = cycle;
    wait (recv_pkts == n_before + 1);
    checks++;
    if (int'(last_head_out - t0) != expect_lat) begin
      failures++;
      $display("FAIL: %s: head latency %0d, expected %0d", name, last_head_out - t0, expect_lat);
    end else begin
      $display("%s: head latency %0d cycles", name, last_head_out - t0);
    end
    repeat (20) @(posedge clk);
  endtask

  // watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0;  in_flit = '0;  credit_in_valid = '0;  credit_in_vc = '0;
    bp_we = '0;  bp_vc = '0;
    clear_faults();
    for (int i = 0; i < P; i++) begin
      src_active[i] = 0;  src_pkt[i] = 0;
      for (int v = 0; v < V; v++) begin
        up_credits[i][v] = DEPTH;  up_busy[i][v] = 0;
      end
    end
    for (int o = 0; o < P; o++)
      for (int v = 0; v < V; v++) begin
        sink_open[o][v] = 0;
        held[o][v] = 0;
      end
    sent_pkts = 0;  recv_pkts = 0;  isolation_checks = 0;  traffic_on = 0;  n_probe = 0;
    credit_delay = 1;  inj_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // head latency through an empty router
    latency_probe("fault-free", 0, 5);
    va_set_fault[0][2] = 1'b1;
    latency_probe("VA arbiter set of VC 2 broken", 2, 5);
    clear_faults();
    sa1_fault[0] = 1'b1;
    latency_probe("SA stage-1 arbiter broken", 3, 6);
    clear_faults();

    // random traffic under fault configurations
    run_traffic("fault-free",                1500, 30, 1);
    run_traffic("fault-free, slow credits",  1500, 60, 8);
    rc_fault = '1;
    run_traffic("all primary RC units broken", 1500, 40, 1);
    clear_faults();
    va_set_fault[0] = 4'b0101;  va_set_fault[1] = 4'b0111;  va_set_fault[2] = 4'b0010;
    va_set_fault[3] = 4'b1000;  va_set_fault[4] = 4'b0011;
    run_traffic("VA arbiter sets broken",     2000, 60, 3);
    clear_faults();
    va2_fault[2] = 4'b0110;  va2_fault[0] = 4'b0001;  va2_fault[4] = 4'b1000;
    run_traffic("VA stage-2 arbiters broken", 1500, 50, 2);
    clear_faults();
    sa1_fault = 5'b10101;
    run_traffic("SA stage-1 arbiters broken", 2000, 50, 2);
    clear_faults();
    xb_fault[2] = 1'b1;
    run_traffic("crossbar M3 broken",         1500, 50, 1);
    clear_faults();
    xb_fault[1] = 1'b1;  xb_fault[3] = 1'b1;
    run_traffic("crossbar M2 and M4 broken",  1500, 50, 1);
    clear_faults();
    sa2_fault[0] = 1'b1;  xb_fault[4] = 1'b1;
    run_traffic("SA arbiter 1 and M5 broken", 1500, 50, 1);
    clear_faults();
    // one fault in every stage at once
    rc_fault[1] = 1'b1;  va_set_fault[2] = 4'b0001;  sa1_fault[3] = 1'b1;  xb_fault[2] = 1'b1;
    va2_fault[1] = 4'b0100;
    run_traffic("one fault per stage",        2500, 60, 4);
    clear_faults();

    $display("mechanisms: spare RC %0d, secondary path %0d, lodged VA requests %0d,",
             n_spare_rc, n_secondary, n_lodge);
    $display("  borrowed-set grants %0d, VC transfers %0d, VA stalls %0d, credit stalls %0d,",
             n_borrow, n_transfer, n_va_stall, n_credit_stall);
    $display("  SA stage-1 conflicts %0d", n_sa_conflict);
    checks += 8 + isolation_checks;
    if (n_spare_rc == 0)     begin failures++; $display("FAIL: spare RC never used"); end
    if (n_secondary == 0)    begin failures++; $display("FAIL: secondary path never used"); end
    if (n_lodge == 0)        begin failures++; $display("FAIL: no VA request lodged"); end
    if (n_borrow == 0)       begin failures++; $display("FAIL: no borrowed-set grant"); end
    if (n_transfer == 0)     begin failures++; $display("FAIL: no VC transfer"); end
    if (n_va_stall == 0)     begin failures++; $display("FAIL: no VA stall"); end
    if (n_credit_stall == 0) begin failures++; $display("FAIL: no credit stall"); end
    if (n_sa_conflict == 0)  begin failures++; $display("FAIL: no SA conflict"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
