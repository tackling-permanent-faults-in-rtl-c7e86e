// pftr_crossbar: 5x5 crossbar with a second path to every output port.
//
// The regular crossbar has one 5:1 multiplexer per output (M1..M5); a fault
// in Mj would cut output j off. Here the outputs of M2..M5 pass through small
// demultiplexers (D1 is 1:3, D2..D4 are 1:2) and every output port is driven
// by a 2:1 multiplexer (P1..P5) choosing between two of them:
//
//   output | regular path | secondary path
//   out1   | M1 -> P1     | M2 -> D1 -> P1
//   out2   | M2 -> D1->P2 | M3 -> D2 -> P2
//   out3   | M3 -> D2->P3 | M2 -> D1 -> P3
//   out4   | M4 -> D3->P4 | M5 -> D4 -> P4
//   out5   | M5 -> D4->P5 | M4 -> D3 -> P5
//
// With no fault it behaves as the plain crossbar. All selects (M, D and P)
// come from the switch allocator in one xb_ctrl_t; a valid bit travels with
// each flit through the same multiplexers, so an output is valid only when
// a granted input is actually steered to it. Purely combinational; the
// router registers the outputs. The component counts, their names and the
// out3-through-M2 path follow the design; which demultiplexer output feeds
// which 2:1 multiplexer for the other ports is read off the drawing and the
// regular/secondary input order of each Pk is this implementation's choice.
module pftr_crossbar
  import pftr_pkg::*;
(
  input  flit_t    [NUM_PORTS-1:0] in_flit,
  input  xb_ctrl_t                 ctrl,
  output flit_t    [NUM_PORTS-1:0] out_flit,
  output logic     [NUM_PORTS-1:0] out_valid
);
  // Flit plus valid bit, carried through every multiplexer together.
  typedef struct packed {
    logic  v;
    flit_t f;
  } lane_t;

  lane_t [NUM_PORTS-1:0] m_out;     // M1..M5
  lane_t [2:0]           d1_out;    // D1 -> P1, P2, P3
  lane_t [1:0]           d2_out;    // D2 -> P2, P3
  lane_t [1:0]           d3_out;    // D3 -> P4, P5
  lane_t [1:0]           d4_out;    // D4 -> P4, P5
  lane_t [NUM_PORTS-1:0] p_out;     // P1..P5

  // Five P:1 multiplexers
  always_comb begin
    for (int j = 0; j < NUM_PORTS; j++) begin
      m_out[j].v = ctrl.m_valid[j];
      m_out[j].f = in_flit[ctrl.m_sel[j]];
    end
  end

  // Demultiplexers: unselected outputs carry an invalid, all-zero lane.
  always_comb begin
    d1_out = '0;
    d2_out = '0;
    d3_out = '0;
    d4_out = '0;
    if (ctrl.d1_sel <= 2'd2) d1_out[ctrl.d1_sel] = m_out[1];
    d2_out[ctrl.d2_sel] = m_out[2];
    d3_out[ctrl.d3_sel] = m_out[3];
    d4_out[ctrl.d4_sel] = m_out[4];
  end

  // 2:1 output multiplexers: select 0 = regular path, 1 = secondary path.
  always_comb begin
    p_out[0] = ctrl.p_sel[0] ? d1_out[0] : m_out[0];
    p_out[1] = ctrl.p_sel[1] ? d2_out[0] : d1_out[1];
    p_out[2] = ctrl.p_sel[2] ? d1_out[2] : d2_out[1];
    p_out[3] = ctrl.p_sel[3] ? d4_out[0] : d3_out[0];
    p_out[4] = ctrl.p_sel[4] ? d3_out[1] : d4_out[1];
  end

  always_comb begin
    for (int k = 0; k < NUM_PORTS; k++) begin
      out_flit[k]  = p_out[k].f;
      out_valid[k] = p_out[k].v;
    end
  end
endmodule
