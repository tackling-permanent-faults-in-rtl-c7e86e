// pftr_router: a 5-port, 4-VC wormhole router whose pipeline keeps working
// with up to one permanent fault in each of its stages.
//
// Pipeline (one flit per input port per cycle):
//   buffer write -> RC (routing computation) -> VA (VC allocation, head flits)
//   -> SA (switch allocation) -> XB (crossbar traversal) -> output register
// An uncontended head flit appears on the output link 5 cycles after it is
// presented on the input link; the following flits of the packet stream one
// per cycle behind it.
//
// Fault tolerance, with the fault status supplied from outside (an on-line
// fault detector is assumed and not part of this design):
//   RC  rc_fault[i]        port i uses its spare RC unit.
//   VA  va_set_fault[i][k] VC k of port i has a broken stage-1 arbiter set;
//                          its request runs on another VC's set.
//       va2_fault[o][v]    the stage-2 arbiter of downstream VC v of output o
//                          is broken; that VC is no longer handed out.
//   SA  sa1_fault[i]       port i's stage-1 arbiter is broken; the bypass
//                          register names the only VC offered, and packets
//                          are moved into that VC.
//       sa2_fault[j]       stage-2 arbiter j is broken;  } both make output j
//   XB  xb_fault[j]        crossbar multiplexer Mj is broken } use its
//                          secondary path through another multiplexer.
//
// Flow control is credit based per VC. The router keeps, per output port and
// downstream VC, a busy flag and a credit counter (initially BUF_DEPTH); a
// downstream VC is handed out again only when it is idle and all its credits
// have returned, so each VC buffer holds at most one packet. The local port
// (index 0) works the same way towards the attached core.
module pftr_router
  import pftr_pkg::*;
#(
  parameter int unsigned P     = NUM_PORTS,
  parameter int unsigned V     = NUM_VCS,
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [COORD_W-1:0]         cur_x,
  input  logic [COORD_W-1:0]         cur_y,
  // input links
  input  logic  [P-1:0]              in_valid,
  input  flit_t [P-1:0]              in_flit,
  output logic  [P-1:0]              credit_out_valid,
  output logic  [P-1:0][VC_W-1:0]    credit_out_vc,
  // output links
  output logic  [P-1:0]              out_valid,
  output flit_t [P-1:0]              out_flit,
  input  logic  [P-1:0]              credit_in_valid,
  input  logic  [P-1:0][VC_W-1:0]    credit_in_vc,
  // fault status
  input  logic  [P-1:0]              rc_fault,
  input  logic  [P-1:0][V-1:0]       va_set_fault,
  input  logic  [P-1:0][V-1:0]       va2_fault,
  input  logic  [P-1:0]              sa1_fault,
  input  logic  [P-1:0]              sa2_fault,
  input  logic  [P-1:0]              xb_fault,
  // bypass register write port
  input  logic  [P-1:0]              bp_we,
  input  logic  [P-1:0][VC_W-1:0]    bp_vc,
  // mechanism events, one bit per input port, one-cycle pulses
  output logic  [P-1:0]              ev_spare_rc,
  output logic  [P-1:0]              ev_secondary,
  output logic  [P-1:0]              ev_lodge,
  output logic  [P-1:0]              ev_borrow_gnt,
  output logic  [P-1:0]              ev_transfer
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [P-1:0]                  path_fault;
  logic [P-1:0][VC_W-1:0]        bypass_vc;

  logic [P-1:0][V-1:0]           va_req, va_gnt;
  logic [P-1:0][V-1:0][PORT_W-1:0] va_req_port;
  logic [P-1:0][V-1:0][VC_W-1:0] va_gnt_vc;

  logic [P-1:0][V-1:0]           sa_req;
  logic [P-1:0][V-1:0][PORT_W-1:0] sa_req_mux, sa_req_out;
  logic [P-1:0]                  sa_gnt_valid;
  logic [P-1:0][VC_W-1:0]        sa_gnt_vc;
  xb_ctrl_t                      sa_xb_ctrl;

  logic  [P-1:0]                 rd_valid, rd_tail;
  flit_t [P-1:0]                 rd_flit;
  logic  [P-1:0][PORT_W-1:0]     rd_out_port;
  logic  [P-1:0][VC_W-1:0]       rd_ovc;

  // output VC state
  logic [P-1:0][V-1:0]           ovc_busy;
  logic [P-1:0][V-1:0][CW-1:0]   ovc_credits;
  logic [P-1:0][V-1:0]           ovc_free, credit_ok;

  // SA -> XB pipeline register
  flit_t [P-1:0]                 st_flit;
  xb_ctrl_t                      st_ctrl;

  flit_t [P-1:0]                 xb_out_flit;
  logic  [P-1:0]                 xb_out_valid;

  assign path_fault = sa2_fault | xb_fault;

  always_comb begin
    for (int o = 0; o < P; o++)
      for (int v = 0; v < V; v++) begin
        ovc_free[o][v]  = !ovc_busy[o][v] && (ovc_credits[o][v] == CW'(DEPTH));
        credit_ok[o][v] = (ovc_credits[o][v] != '0);
      end
  end

  for (genvar i = 0; i < P; i++) begin : g_port
    input_port #(.P(P), .V(V), .DEPTH(DEPTH)) u_in (
      .clk              (clk),
      .rst_n            (rst_n),
      .cur_x            (cur_x),
      .cur_y            (cur_y),
      .in_valid         (in_valid[i]),
      .in_flit          (in_flit[i]),
      .credit_out_valid (credit_out_valid[i]),
      .credit_out_vc    (credit_out_vc[i]),
      .rc_fault         (rc_fault[i]),
      .path_fault       (path_fault),
      .va_set_fault     (va_set_fault[i]),
      .sa1_fault        (sa1_fault[i]),
      .bypass_vc        (bypass_vc[i]),
      .va_req           (va_req[i]),
      .va_req_port      (va_req_port[i]),
      .va_gnt           (va_gnt[i]),
      .va_gnt_vc        (va_gnt_vc[i]),
      .credit_ok        (credit_ok),
      .sa_req           (sa_req[i]),
      .sa_req_mux       (sa_req_mux[i]),
      .sa_req_out       (sa_req_out[i]),
      .sa_gnt_valid     (sa_gnt_valid[i]),
      .sa_gnt_vc        (sa_gnt_vc[i]),
      .rd_valid         (rd_valid[i]),
      .rd_flit          (rd_flit[i]),
      .rd_out_port      (rd_out_port[i]),
      .rd_ovc           (rd_ovc[i]),
      .rd_tail          (rd_tail[i]),
      .ev_spare_rc      (ev_spare_rc[i]),
      .ev_secondary     (ev_secondary[i]),
      .ev_lodge         (ev_lodge[i]),
      .ev_borrow_gnt    (ev_borrow_gnt[i]),
      .ev_transfer      (ev_transfer[i])
    );
  end

  vc_allocator #(.P(P), .V(V)) u_va (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (va_req),
    .req_port  (va_req_port),
    .ovc_free  (ovc_free),
    .va2_fault (va2_fault),
    .gnt       (va_gnt),
    .gnt_vc    (va_gnt_vc)
  );

  switch_allocator #(.P(P), .V(V)) u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (sa_req),
    .req_mux   (sa_req_mux),
    .req_out   (sa_req_out),
    .sa1_fault (sa1_fault),
    .bp_we     (bp_we),
    .bp_vc     (bp_vc),
    .bypass_vc (bypass_vc),
    .gnt_valid (sa_gnt_valid),
    .gnt_vc    (sa_gnt_vc),
    .xb_ctrl   (sa_xb_ctrl)
  );

  // output VC bookkeeping: allocation, departures, returning credits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovc_busy <= '0;
      for (int o = 0; o < P; o++)
        for (int v = 0; v < V; v++) ovc_credits[o][v] <= CW'(DEPTH);
    end else begin
      for (int o = 0; o < P; o++) begin
        for (int v = 0; v < V; v++) begin
          logic taken, freed, spent, back;
          taken = 1'b0;
          freed = 1'b0;
          spent = 1'b0;
          for (int i = 0; i < P; i++) begin
            for (int k = 0; k < V; k++)
              if (va_gnt[i][k] && int'(va_req_port[i][k]) == o && int'(va_gnt_vc[i][k]) == v)
                taken = 1'b1;
            if (rd_valid[i] && int'(rd_out_port[i]) == o && int'(rd_ovc[i]) == v) begin
              spent = 1'b1;
              freed = rd_tail[i];
            end
          end
          back = credit_in_valid[o] && int'(credit_in_vc[o]) == v;
          if (taken)      ovc_busy[o][v] <= 1'b1;
          else if (freed) ovc_busy[o][v] <= 1'b0;
          ovc_credits[o][v] <= ovc_credits[o][v] - CW'(spent) + CW'(back);
        end
      end
    end
  end

  // SA -> XB register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_ctrl <= '0;
    end else begin
      st_ctrl <= sa_xb_ctrl;
    end
  end
  always_ff @(posedge clk) st_flit <= rd_flit;

  pftr_crossbar u_xb (
    .in_flit   (st_flit),
    .ctrl      (st_ctrl),
    .out_flit  (xb_out_flit),
    .out_valid (xb_out_valid)
  );

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
    end else begin
      out_valid <= xb_out_valid;
    end
  end
  always_ff @(posedge clk) out_flit <= xb_out_flit;

  // A downstream VC never receives more flits than it has room for.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int o = 0; o < P; o++)
        for (int v = 0; v < V; v++)
          assert (ovc_credits[o][v] <= CW'(DEPTH))
            else $error("pftr_router: credit overflow on output %0d VC %0d", o, v);
  end
endmodule
