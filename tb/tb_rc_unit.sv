// tb_rc_unit: exhaustive test of the XY routing unit. Every router position
// and every destination of an 8x8 mesh is applied, and the output port is
// compared with a reference written here from the XY rule: correct the
// column first (east for a larger x, west for a smaller one), then the row
// (north for a larger y, south for a smaller one), then eject locally.
module tb_rc_unit;
  import pftr_pkg::*;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  logic [PORT_W-1:0]  out_port;
  int checks = 0, failures = 0;

  rc_unit dut (.*);

  function automatic int expected(int cx, int cy, int dx, int dy);
    if (dx != cx) return (dx > cx) ? 2 : 4;
    if (dy != cy) return (dy > cy) ? 1 : 3;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            cur_x = COORD_W'(cx);  cur_y = COORD_W'(cy);
            dst_x = COORD_W'(dx);  dst_y = COORD_W'(dy);
            #1;
            checks++;
            if (int'(out_port) != expected(cx, cy, dx, dy)) begin
              failures++;
              if (failures < 10)
                $display("FAIL: at (%0d,%0d) to (%0d,%0d): port %0d, expected %0d",
                         cx, cy, dx, dy, out_port, expected(cx, cy, dx, dy));
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
