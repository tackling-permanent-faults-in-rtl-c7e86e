// rc_unit: routing computation for dimension-order (XY) routing.
//
// A head flit is first routed along X until its column matches, then along Y,
// then ejected on the local port. XY routing needs no table, only two
// comparisons, which is what makes duplicating the unit cheap: every input
// port of the router holds two copies (see input_port).
// Purely combinational; the result is registered by the input port.
// XY routing is the design's; the port numbering (local, north = +y,
// east = +x, south = -y, west = -x) is this implementation's choice.
module rc_unit
  import pftr_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic [PORT_W-1:0]  out_port
);
  always_comb begin
    if (dst_x > cur_x)      out_port = PORT_EAST;
    else if (dst_x < cur_x) out_port = PORT_WEST;
    else if (dst_y > cur_y) out_port = PORT_NORTH;
    else if (dst_y < cur_y) out_port = PORT_SOUTH;
    else                    out_port = PORT_LOCAL;
  end
endmodule
