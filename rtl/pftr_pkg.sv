// pftr_pkg: types and constants shared by the permanent-fault-tolerant router.
//
// The router is a 5-port, 4-virtual-channel wormhole router with a four-stage
// pipeline (routing computation, VC allocation, switch allocation, crossbar).
// Port count, VC count and the 16-byte flit come from the design description;
// the port numbering, the flit header layout, the 3-bit mesh coordinates (an
// 8x8 mesh) and the buffer depth are this implementation's own choices.
package pftr_pkg;

  localparam int unsigned NUM_PORTS = 5;   // 5x5 router
  localparam int unsigned NUM_VCS   = 4;   // VCs per input port
  localparam int unsigned FLIT_W    = 128; // 16-byte flit
  localparam int unsigned BUF_DEPTH = 4;   // flits per VC buffer (own choice)
  localparam int unsigned COORD_W   = 3;   // 8x8 mesh coordinates
  localparam int unsigned PORT_W    = 3;   // $clog2(NUM_PORTS)
  localparam int unsigned VC_W      = 2;   // $clog2(NUM_VCS)

  // Port numbering (own choice). Crossbar input/output k+1 of the protected
  // crossbar drawing corresponds to port index k.
  localparam logic [PORT_W-1:0] PORT_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] PORT_NORTH = 3'd1;  // +y
  localparam logic [PORT_W-1:0] PORT_EAST  = 3'd2;  // +x
  localparam logic [PORT_W-1:0] PORT_SOUTH = 3'd3;  // -y
  localparam logic [PORT_W-1:0] PORT_WEST  = 3'd4;  // -x

  typedef enum logic [1:0] {
    FLIT_BODY     = 2'd0,
    FLIT_HEAD     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3   // single-flit packet
  } flit_type_e;

  localparam int unsigned PAYLOAD_W = FLIT_W - 2 - VC_W - 2 * COORD_W;

  typedef struct packed {
    flit_type_e            ftype;
    logic [VC_W-1:0]       vc;      // VC at the receiving router
    logic [COORD_W-1:0]    dst_x;
    logic [COORD_W-1:0]    dst_y;
    logic [PAYLOAD_W-1:0]  payload;
  } flit_t;

  // 'G' field: global state of an input VC.
  typedef enum logic [1:0] {
    VC_IDLE    = 2'd0,
    VC_ROUTING = 2'd1,   // waiting for the port's RC unit
    VC_VALLOC  = 2'd2,   // waiting for a downstream VC
    VC_ACTIVE  = 2'd3    // holds a downstream VC, flits go through SA/XB
  } vc_state_e;

  // Crossbar control produced by the switch allocator: selects for the five
  // P:1 multiplexers M1..M5, the four demultiplexers D1..D4 and the five 2:1
  // multiplexers P1..P5 of the protected crossbar.
  typedef struct packed {
    logic [NUM_PORTS-1:0]             m_valid;
    logic [NUM_PORTS-1:0][PORT_W-1:0] m_sel;    // input feeding Mj
    logic [1:0]                       d1_sel;   // D1 (after M2): 0->P1 1->P2 2->P3
    logic                             d2_sel;   // D2 (after M3): 0->P2 1->P3
    logic                             d3_sel;   // D3 (after M4): 0->P4 1->P5
    logic                             d4_sel;   // D4 (after M5): 0->P4 1->P5
    logic [NUM_PORTS-1:0]             p_sel;    // Pk: 0 primary source, 1 secondary source
  } xb_ctrl_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_HEADTAIL);
  endfunction

  // Multiplexer that carries output port o on its regular path (Mo).
  function automatic logic [PORT_W-1:0] primary_mux(logic [PORT_W-1:0] o);
    return o;
  endfunction

  // Multiplexer that reaches output port o over the secondary path:
  // out1 via M2/D1, out2 via M3/D2, out3 via M2/D1, out4 via M5/D4,
  // out5 via M4/D3 (port indices are one less).
  function automatic logic [PORT_W-1:0] secondary_mux(logic [PORT_W-1:0] o);
    case (o)
      3'd0:    return 3'd1;
      3'd1:    return 3'd2;
      3'd2:    return 3'd1;
      3'd3:    return 3'd4;
      default: return 3'd3;
    endcase
  endfunction

endpackage
