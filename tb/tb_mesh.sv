// tb_mesh: an 8x8 mesh of fault-tolerant routers under uniform random
// traffic, reproducing the two latency experiments the router was evaluated
// with, at shorter run lengths.
//
// Every node injects 5-flit packets (16-byte flits) to uniformly random other
// nodes as a Bernoulli process at a given rate in packets/node/cycle; packets
// wait in an unbounded source queue and enter the router through its local
// port with credit-based flow control. Latency of a flit is counted from the
// creation of its packet to its arrival at the destination's local output;
// the average is the total latency over the number of flits received, for
// packets created in the measurement window.
//   Experiment 1: rates 0.01, 0.03, 0.05, 0.07, 0.1, each without faults and
//                 with 24 faults spread over 20 random routers.
//   Experiment 2: rate 0.1 with 4, 8, 16, 24 and 32 faults in 20 routers.
// Faults are placed at most one per pipeline stage per router (a pattern each
// router tolerates, fewer faults than 20 going to distinct routers) and are
// applied while the network is empty.
// Checks: every packet reaches the right node, complete and in order, in
// every run; the averages are printed.
module tb_mesh;
  import pftr_pkg::*;

  localparam int K = 8;                 // mesh is K x K
  localparam int NN = K * K;
  localparam int P = NUM_PORTS;
  localparam int V = NUM_VCS;
  localparam int DEPTH = BUF_DEPTH;
  localparam int PKT_LEN = 5;
  localparam int WARMUP = 300;
  localparam int MEASURE = 1500;
  localparam int N_ROUTERS_FAULTY = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [P-1:0]           in_valid  [NN];
  flit_t [P-1:0]           in_flit   [NN];
  logic  [P-1:0]           cr_out_v  [NN];
  logic  [P-1:0][VC_W-1:0] cr_out_vc [NN];
  logic  [P-1:0]           out_valid [NN];
  flit_t [P-1:0]           out_flit  [NN];
  logic  [P-1:0]           cr_in_v   [NN];
  logic  [P-1:0][VC_W-1:0] cr_in_vc  [NN];

  // fault status per router, written by the test
  logic  [P-1:0]        f_rc  [NN];
  logic  [P-1:0][V-1:0] f_vas [NN];
  logic  [P-1:0][V-1:0] f_va2 [NN];
  logic  [P-1:0]        f_sa1 [NN];
  logic  [P-1:0]        f_sa2 [NN];
  logic  [P-1:0]        f_xb  [NN];

  // local-port drive from the test
  logic                 loc_valid    [NN];
  flit_t                loc_flit     [NN];
  logic                 loc_cr_valid [NN];
  logic [VC_W-1:0]      loc_cr_vc    [NN];

  // port p of a node faces the opposite port of its neighbour
  function automatic int opp(int p);
    case (p)
      1: return 3;
      2: return 4;
      3: return 1;
      default: return 2;
    endcase
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int X = n % K;
    localparam int Y = n / K;
    logic [P-1:0] unused_ev0, unused_ev1, unused_ev2, unused_ev3, unused_ev4;

    pftr_router u_r (
      .clk (clk), .rst_n (rst_n),
      .cur_x (COORD_W'(X)), .cur_y (COORD_W'(Y)),
      .in_valid (in_valid[n]), .in_flit (in_flit[n]),
      .credit_out_valid (cr_out_v[n]), .credit_out_vc (cr_out_vc[n]),
      .out_valid (out_valid[n]), .out_flit (out_flit[n]),
      .credit_in_valid (cr_in_v[n]), .credit_in_vc (cr_in_vc[n]),
      .rc_fault (f_rc[n]), .va_set_fault (f_vas[n]), .va2_fault (f_va2[n]),
      .sa1_fault (f_sa1[n]), .sa2_fault (f_sa2[n]), .xb_fault (f_xb[n]),
      .bp_we ('0), .bp_vc ('0),
      .ev_spare_rc (unused_ev0), .ev_secondary (unused_ev1), .ev_lodge (unused_ev2),
      .ev_borrow_gnt (unused_ev3), .ev_transfer (unused_ev4)
    );

    assign in_valid[n][0] = loc_valid[n];
    assign in_flit[n][0]  = loc_flit[n];
    assign cr_in_v[n][0]  = loc_cr_valid[n];
    assign cr_in_vc[n][0] = loc_cr_vc[n];

    for (genvar p = 1; p < P; p++) begin : g_link
      localparam int NX = (p == 2) ? X + 1 : (p == 4) ? X - 1 : X;
      localparam int NY = (p == 1) ? Y + 1 : (p == 3) ? Y - 1 : Y;
      if (NX >= 0 && NX < K && NY >= 0 && NY < K) begin : g_nb
        localparam int M = NY * K + NX;
        assign in_valid[n][p] = out_valid[M][opp(p)];
        assign in_flit[n][p]  = out_flit[M][opp(p)];
        assign cr_in_v[n][p]  = cr_out_v[M][opp(p)];
        assign cr_in_vc[n][p] = cr_out_vc[M][opp(p)];
      end else begin : g_edge
        assign in_valid[n][p] = 1'b0;
        assign in_flit[n][p]  = '0;
        assign cr_in_v[n][p]  = 1'b0;
        assign cr_in_vc[n][p] = '0;
      end
    end
  end

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // payload: [31:0] creation cycle, [37:32] source node, [53:38] packet
  // number, [57:54] flit index, [58] measured
  function automatic logic [PAYLOAD_W-1:0] mk_payload(int src, int pkt, int idx,
                                                      int unsigned t, bit meas);
    logic [PAYLOAD_W-1:0] pl;
    pl = '0;
    pl[31:0]  = t;
    pl[37:32] = 6'(src);
    pl[53:38] = 16'(pkt);
    pl[57:54] = 4'(idx);
    pl[58]    = meas;
    return pl;
  endfunction

  typedef struct {
    int          dst;
    int unsigned t;
    int          pkt;
    bit          meas;
  } pkt_t;

  pkt_t  srcq       [NN][$];
  int    up_credits [NN][V];
  bit    up_busy    [NN][V];
  bit    src_active [NN];
  int    src_vc     [NN];
  int    src_idx    [NN];
  pkt_t  src_cur    [NN];
  int    src_pkt    [NN];
  bit    sink_open  [NN][V];
  int    sink_src   [NN][V];
  int    sink_pkt   [NN][V];
  int    sink_idx   [NN][V];

  int    rate_milli;            // injection rate x 1000
  bit    injecting, measuring;
  longint sent_pkts, recv_pkts;
  longint lat_sum, lat_flits;

  task automatic node_cycle(int n);
    // credits returned by the router's local input port
    if (cr_out_v[n][0]) up_credits[n][cr_out_vc[n][0]]++;

    // local output: check and return the credit next cycle
    loc_cr_valid[n] <= 1'b0;
    if (out_valid[n][0]) begin
      flit_t f;
      int vc, src, pkt, idx;
      f   = out_flit[n][0];
      vc  = int'(f.vc);
      src = int'(f.payload[37:32]);
      pkt = int'(f.payload[53:38]);
      idx = int'(f.payload[57:54]);
      checks++;
      if (int'(f.dst_x) + K * int'(f.dst_y) != n) begin
        failures++;
        $display("FAIL: node %0d received a flit for node %0d", n, int'(f.dst_x) + K * int'(f.dst_y));
      end
      if (is_head(f.ftype)) begin
        if (sink_open[n][vc]) begin
          failures++;
          $display("FAIL: node %0d VC %0d: head inside a packet", n, vc);
        end
        sink_open[n][vc] = 1'b1;
        sink_src[n][vc]  = src;
        sink_pkt[n][vc]  = pkt;
        sink_idx[n][vc]  = 0;
      end else begin
        if (!sink_open[n][vc] || sink_src[n][vc] != src || sink_pkt[n][vc] != pkt ||
            sink_idx[n][vc] + 1 != idx) begin
          failures++;
          $display("FAIL: node %0d VC %0d: flit out of order", n, vc);
        end
        sink_idx[n][vc] = idx;
      end
      if (is_tail(f.ftype)) begin
        sink_open[n][vc] = 1'b0;
        recv_pkts++;
        if (idx != PKT_LEN - 1) begin
          failures++;
          $display("FAIL: node %0d: packet of %0d flits", n, idx + 1);
        end
      end
      if (f.payload[58]) begin
        lat_sum   += longint'(cycle) - longint'(f.payload[31:0]);
        lat_flits++;
      end
      loc_cr_valid[n] <= 1'b1;
      loc_cr_vc[n]    <= VC_W'(vc);
    end

    // packet generation
    if (injecting && ($urandom % 1000) < rate_milli) begin
      pkt_t pk;
      do pk.dst = $urandom % NN; while (pk.dst == n);
      pk.t    = cycle;
      pk.pkt  = src_pkt[n]++;
      pk.meas = measuring;
      srcq[n].push_back(pk);
    end

    // injection into the local input port
    loc_valid[n] <= 1'b0;
    if (!src_active[n] && srcq[n].size() != 0) begin
      for (int l = 0; l < V; l++)
        if (!src_active[n] && !up_busy[n][l] && up_credits[n][l] == DEPTH) begin
          src_active[n] = 1'b1;
          src_vc[n]     = l;
          src_idx[n]    = 0;
          src_cur[n]    = srcq[n].pop_front();
          up_busy[n][l] = 1'b1;
        end
    end
    if (src_active[n] && up_credits[n][src_vc[n]] > 0) begin
      flit_t f;
      f.ftype   = (src_idx[n] == 0) ? FLIT_HEAD :
                  (src_idx[n] == PKT_LEN - 1) ? FLIT_TAIL : FLIT_BODY;
      f.vc      = VC_W'(src_vc[n]);
      f.dst_x   = COORD_W'(src_cur[n].dst % K);
      f.dst_y   = COORD_W'(src_cur[n].dst / K);
      f.payload = mk_payload(n, src_cur[n].pkt, src_idx[n], src_cur[n].t, src_cur[n].meas);
      loc_valid[n] <= 1'b1;
      loc_flit[n]  <= f;
      up_credits[n][src_vc[n]]--;
      src_idx[n]++;
      if (src_idx[n] == PKT_LEN) begin
        up_busy[n][src_vc[n]] = 1'b0;
        src_active[n] = 1'b0;
        sent_pkts++;
      end
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NN; n++) begin
        loc_valid[n] <= 1'b0;
        loc_flit[n] <= '0;
        loc_cr_valid[n] <= 1'b0;
        loc_cr_vc[n] <= '0;
        src_active[n] = 1'b0;
        src_pkt[n] = 0;
        for (int v = 0; v < V; v++) begin
          up_credits[n][v] = DEPTH;
          up_busy[n][v] = 1'b0;
          sink_open[n][v] = 1'b0;
        end
      end
      sent_pkts = 0;
      recv_pkts = 0;
    end else begin
      for (int n = 0; n < NN; n++) node_cycle(n);
    end
  end

  function automatic int pending();
    int c;
    c = 0;
    for (int n = 0; n < NN; n++) c += srcq[n].size() + int'(src_active[n]);
    return c;
  endfunction

  task automatic clear_faults();
    for (int n = 0; n < NN; n++) begin
      f_rc[n] = '0;  f_vas[n] = '0;  f_va2[n] = '0;
      f_sa1[n] = '0; f_sa2[n] = '0;  f_xb[n] = '0;
    end
  endtask

  // nfaults faults over N_ROUTERS_FAULTY distinct routers, at most one per
  // stage (RC, VA, SA, XB) in each router
  task automatic place_faults(int nfaults);
    int routers [N_ROUTERS_FAULTY];
    bit used [NN][4];
    int placed;
    clear_faults();
    for (int n = 0; n < NN; n++) for (int s = 0; s < 4; s++) used[n][s] = 0;
    for (int r = 0; r < N_ROUTERS_FAULTY; r++) begin
      int c;
      bit dup;
      do begin
        c = $urandom % NN;
        dup = 0;
        for (int q = 0; q < r; q++) if (routers[q] == c) dup = 1;
      end while (dup);
      routers[r] = c;
    end
    placed = 0;
    while (placed < nfaults) begin
      int n, s, p;
      // every chosen router gets one fault first, the rest go to routers
      // picked at random among them that still have a stage left
      if (placed < N_ROUTERS_FAULTY) n = routers[placed];
      else
        do n = routers[$urandom % N_ROUTERS_FAULTY];
        while (used[n][0] && used[n][1] && used[n][2] && used[n][3]);
      s = $urandom % 4;
      while (used[n][s]) s = (s + 1) % 4;
      used[n][s] = 1;
      p = $urandom % P;
      case (s)
        0: f_rc[n][p] = 1'b1;
        1: if ($urandom % 2 != 0) f_vas[n][p][$urandom % V] = 1'b1;
           else              f_va2[n][p][$urandom % V] = 1'b1;
        2: f_sa1[n][p] = 1'b1;
        default: if ($urandom % 2 != 0) f_xb[n][p] = 1'b1;
                 else              f_sa2[n][p] = 1'b1;
      endcase
      placed++;
    end
  endtask

  task automatic run(string name, int rate, int nfaults);
    longint s0, r0;
    int unsigned t_end;
    if (nfaults > 0) place_faults(nfaults);
    else clear_faults();
    rate_milli = rate;
    lat_sum = 0;
    lat_flits = 0;
    s0 = sent_pkts;
    r0 = recv_pkts;
    injecting = 1'b1;
    measuring = 1'b0;
    repeat (WARMUP) @(posedge clk);
    measuring = 1'b1;
    repeat (MEASURE) @(posedge clk);
    measuring = 1'b0;
    injecting = 1'b0;
    t_end = cycle + 40000;
    while (pending() != 0 && cycle < t_end) @(posedge clk);
    repeat (300) @(posedge clk);
    checks++;
    if (pending() != 0 || sent_pkts - s0 != recv_pkts - r0) begin
      failures++;
      $display("FAIL: %s: %0d packets sent, %0d delivered, %0d waiting", name,
               sent_pkts - s0, recv_pkts - r0, pending());
    end
    $display("%s: rate %0d.%03d pkt/node/cycle, %0d faults: %0d packets, average flit latency %0d.%02d cycles",
             name, rate / 1000, rate % 1000, nfaults, recv_pkts - r0,
             (lat_flits == 0) ? 0 : lat_sum / lat_flits,
             (lat_flits == 0) ? 0 : (lat_sum * 100 / lat_flits) % 100);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int rates [5] = '{10, 30, 50, 70, 100};
    static int nf [5] = '{4, 8, 16, 24, 32};
    clear_faults();
    injecting = 0;
    measuring = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int r = 0; r < 5; r++) begin
      run("experiment 1, fault-free", rates[r], 0);
      run("experiment 1, 24 faults ", rates[r], 24);
    end
    for (int r = 0; r < 5; r++) run("experiment 2", 100, nf[r]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
