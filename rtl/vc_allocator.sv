// vc_allocator: two-stage separable virtual-channel allocator.
//
// Every input VC owns a set of P arbiters of size V:1, one per output port
// (an "arbiter set"). Stage 1: a set that has a request (an output port from
// routing computation) uses the arbiter of that output port to pick one free
// VC of the downstream router behind it. Stage 2: one arbiter of size
// (P*V):1 per downstream VC resolves sets that picked the same downstream VC;
// the winner is granted it.
//
// Fault handling that lives here: a stage-2 arbiter reported faulty
// (va2_fault) is never picked in stage 1, so its downstream VC is simply not
// handed out and the packet gets another VC of the same output port. Faulty
// arbiter sets are handled by the input port, which routes the request of a
// VC with a faulty set through the set of another VC of the same port; this
// module just serves whichever request is presented at set [i][k].
//
// Timing: grant in the same cycle as the request; arbiter pointers advance on
// the clock edge of a successful grant. ovc_free must already exclude
// downstream VCs that are taken. Round-robin arbitration is this
// implementation's choice.
module vc_allocator
  import pftr_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = NUM_VCS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [P-1:0][V-1:0]             req,       // [in port][arbiter set]
  input  logic [P-1:0][V-1:0][PORT_W-1:0] req_port,  // requested output port
  input  logic [P-1:0][V-1:0]             ovc_free,  // [out port][downstream VC]
  input  logic [P-1:0][V-1:0]             va2_fault, // stage-2 arbiter faulty
  output logic [P-1:0][V-1:0]             gnt,
  output logic [P-1:0][V-1:0][VC_W-1:0]   gnt_vc
);
  localparam int unsigned N2  = P * V;
  localparam int unsigned N2W = $clog2(N2);

  logic [P-1:0][V-1:0]             avail;
  // stage 1: [in port][set][output port]
  logic [P-1:0][V-1:0][P-1:0][V-1:0]      s1_req;
  logic [P-1:0][V-1:0][P-1:0][V-1:0]      s1_gnt;
  logic [P-1:0][V-1:0][P-1:0][VC_W-1:0]   s1_idx;
  logic [P-1:0][V-1:0][P-1:0]             s1_valid;
  logic [P-1:0][V-1:0][VC_W-1:0]          pick_vc;
  logic [P-1:0][V-1:0]                    pick_valid;
  // stage 2: [out port][downstream VC][requesting set i*V+k]
  logic [P-1:0][V-1:0][N2-1:0]            s2_req;
  logic [P-1:0][V-1:0][N2-1:0]            s2_gnt;
  logic [P-1:0][V-1:0][N2W-1:0]           s2_idx;
  logic [P-1:0][V-1:0]                    s2_valid;

  assign avail = ovc_free & ~va2_fault;

  for (genvar i = 0; i < P; i++) begin : g_in
    for (genvar k = 0; k < V; k++) begin : g_set
      for (genvar o = 0; o < P; o++) begin : g_arb
        assign s1_req[i][k][o] = (req[i][k] && int'(req_port[i][k]) == o) ? avail[o] : '0;
        rr_arbiter #(.N(V)) u_arb (
          .clk       (clk),
          .rst_n     (rst_n),
          .req       (s1_req[i][k][o]),
          .advance   (gnt[i][k]),
          .gnt       (s1_gnt[i][k][o]),
          .gnt_idx   (s1_idx[i][k][o]),
          .gnt_valid (s1_valid[i][k][o])
        );
      end
      assign pick_vc[i][k]    = s1_idx[i][k][req_port[i][k]];
      assign pick_valid[i][k] = req[i][k] && (int'(req_port[i][k]) < P) &&
                                s1_valid[i][k][req_port[i][k]];
    end
  end

  always_comb begin
    for (int o = 0; o < P; o++)
      for (int v = 0; v < V; v++)
        for (int i = 0; i < P; i++)
          for (int k = 0; k < V; k++)
            s2_req[o][v][i*V+k] = pick_valid[i][k] && int'(req_port[i][k]) == o &&
                                  int'(pick_vc[i][k]) == v;
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    for (genvar v = 0; v < V; v++) begin : g_ovc
      rr_arbiter #(.N(N2)) u_arb (
        .clk       (clk),
        .rst_n     (rst_n),
        .req       (s2_req[o][v]),
        .advance   (1'b1),
        .gnt       (s2_gnt[o][v]),
        .gnt_idx   (s2_idx[o][v]),
        .gnt_valid (s2_valid[o][v])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      for (int k = 0; k < V; k++) begin
        gnt[i][k]    = pick_valid[i][k] && (int'(req_port[i][k]) < P) &&
                       s2_gnt[req_port[i][k]][pick_vc[i][k]][i*V+k];
        gnt_vc[i][k] = pick_vc[i][k];
      end
    end
  end
endmodule
