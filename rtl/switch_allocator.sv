// switch_allocator: two-stage separable switch allocator with a bypass path
// around each first-stage arbiter, and the control of the protected crossbar.
//
// Stage 1: one V:1 arbiter per input port picks one of the port's requesting
// VCs. A 2:1 multiplexer after each arbiter can replace its choice by a VC
// number held in a register (the bypass path). When the arbiter is reported
// faulty (sa1_fault), the multiplexer always selects the register, so that
// one VC is the port's permanent candidate; the input port moves packets of
// other VCs into it (see input_port).
// Stage 2: one P:1 arbiter per crossbar multiplexer M1..M5. A VC names the
// multiplexer it competes for (req_mux: its regular output, or the secondary
// one when its route is flagged to use the secondary path) and the output
// port it really goes to (req_out). From each stage-2 winner the allocator
// sets the M select and the D/P selects of the protected crossbar.
//
// Timing: requests and grants are combinational in the same cycle; the
// arbiter pointers and the bypass registers update on the clock edge.
// A stage-1 arbiter's pointer moves only when its port wins stage 2.
// The bypass register resets to BYPASS_VC and can be rewritten (bp_we).
// Round-robin arbitration, the reset value and the rewrite port are this
// implementation's choices; the stage structure, bypass register and mux
// follow the design.
module switch_allocator
  import pftr_pkg::*;
#(
  parameter int unsigned P         = NUM_PORTS,
  parameter int unsigned V         = NUM_VCS,
  parameter int unsigned BYPASS_VC = 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [P-1:0][V-1:0]             req,
  input  logic [P-1:0][V-1:0][PORT_W-1:0] req_mux,
  input  logic [P-1:0][V-1:0][PORT_W-1:0] req_out,
  input  logic [P-1:0]                    sa1_fault,
  input  logic [P-1:0]                    bp_we,
  input  logic [P-1:0][VC_W-1:0]          bp_vc,
  output logic [P-1:0][VC_W-1:0]          bypass_vc,
  output logic [P-1:0]                    gnt_valid,
  output logic [P-1:0][VC_W-1:0]          gnt_vc,
  output xb_ctrl_t                        xb_ctrl
);
  logic [P-1:0][V-1:0]    s1_gnt;
  logic [P-1:0][VC_W-1:0] s1_arb_idx;
  logic [P-1:0]           s1_arb_valid;
  logic [P-1:0][VC_W-1:0] s1_vc;
  logic [P-1:0]           s1_valid;
  logic [P-1:0][PORT_W-1:0] s1_mux;
  logic [P-1:0][PORT_W-1:0] s1_out;

  logic [P-1:0][P-1:0]      s2_req;   // [mux][input]
  logic [P-1:0][P-1:0]      s2_gnt;
  logic [P-1:0][PORT_W-1:0] s2_idx;
  logic [P-1:0]             s2_valid;
  logic [P-1:0]             port_won;

  // Bypass registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++) bypass_vc[i] <= VC_W'(BYPASS_VC);
    end else begin
      for (int i = 0; i < P; i++) if (bp_we[i]) bypass_vc[i] <= bp_vc[i];
    end
  end

  // Stage 1
  for (genvar i = 0; i < P; i++) begin : g_s1
    rr_arbiter #(.N(V)) u_arb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (req[i]),
      .advance   (port_won[i] && !sa1_fault[i]),
      .gnt       (s1_gnt[i]),
      .gnt_idx   (s1_arb_idx[i]),
      .gnt_valid (s1_arb_valid[i])
    );

    // bypass 2:1 multiplexer
    always_comb begin
      if (sa1_fault[i]) begin
        s1_vc[i]    = bypass_vc[i];
        s1_valid[i] = req[i][bypass_vc[i]];
      end else begin
        s1_vc[i]    = s1_arb_idx[i];
        s1_valid[i] = s1_arb_valid[i];
      end
      s1_mux[i] = req_mux[i][s1_vc[i]];
      s1_out[i] = req_out[i][s1_vc[i]];
    end
  end

  // Stage 2
  always_comb begin
    for (int j = 0; j < P; j++)
      for (int i = 0; i < P; i++)
        s2_req[j][i] = s1_valid[i] && (int'(s1_mux[i]) == j);
  end

  for (genvar j = 0; j < P; j++) begin : g_s2
    rr_arbiter #(.N(P)) u_arb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (s2_req[j]),
      .advance   (1'b1),
      .gnt       (s2_gnt[j]),
      .gnt_idx   (s2_idx[j]),
      .gnt_valid (s2_valid[j])
    );
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      port_won[i] = 1'b0;
      for (int j = 0; j < P; j++) port_won[i] |= s2_gnt[j][i];
      gnt_valid[i] = port_won[i];
      gnt_vc[i]    = s1_vc[i];
    end
  end

  // Crossbar control: M selects from the stage-2 winners, D/P selects from
  // the output port each winner is headed to.
  always_comb begin
    logic [PORT_W-1:0] o;
    xb_ctrl = '0;
    for (int j = 0; j < P; j++) begin
      xb_ctrl.m_valid[j] = s2_valid[j];
      xb_ctrl.m_sel[j]   = s2_idx[j];
      o = s1_out[s2_idx[j]];
      if (s2_valid[j]) begin
        case (j)
          0: xb_ctrl.p_sel[0] = 1'b0;
          1: begin
               xb_ctrl.d1_sel = o[1:0];
               xb_ctrl.p_sel[o] = (o != 3'd1);
             end
          2: begin
               xb_ctrl.d2_sel = (o == 3'd2);
               xb_ctrl.p_sel[o] = (o == 3'd1);
             end
          3: begin
               xb_ctrl.d3_sel = (o == 3'd4);
               xb_ctrl.p_sel[o] = (o == 3'd4);
             end
          default: begin
               xb_ctrl.d4_sel = (o == 3'd4);
               xb_ctrl.p_sel[o] = (o == 3'd3);
             end
        endcase
      end
    end
  end

  // Every multiplexer may only be asked for an output it can reach.
  always_ff @(posedge clk) begin
    for (int j = 0; j < P; j++) begin
      if (rst_n && s2_valid[j]) begin
        assert ((s1_out[s2_idx[j]] == PORT_W'(j)) ||
                (secondary_mux(s1_out[s2_idx[j]]) == PORT_W'(j)))
          else $error("switch_allocator: M%0d cannot reach output %0d", j + 1,
                      s1_out[s2_idx[j]] + 1);
      end
    end
  end
endmodule
