// tb_pftr_crossbar: test of the 5x5 crossbar with secondary paths.
// For every output port, both of its paths (regular and secondary) and every
// input port, the test sets the multiplexer, demultiplexer and 2:1 selects
// from its own path table, applies five distinct random flits and checks that
// exactly that output is valid and carries the chosen input's flit. It then
// checks full permutations over the regular paths (the fault-free crossbar)
// and, with M2 and M4 out of use, the sharing of M3 and M5 by two outputs
// each on successive cycles.
module tb_pftr_crossbar;
  import pftr_pkg::*;

  flit_t    [NUM_PORTS-1:0] in_flit;
  xb_ctrl_t                 ctrl;
  flit_t    [NUM_PORTS-1:0] out_flit;
  logic     [NUM_PORTS-1:0] out_valid;
  int checks = 0, failures = 0;

  pftr_crossbar dut (.*);

  // Select settings that route multiplexer j to output o; 0 if impossible.
  function automatic bit route(int j, int i, int o, ref xb_ctrl_t c);
    c.m_valid[j] = 1'b1;
    c.m_sel[j]   = PORT_W'(i);
    case (j)
      0: if (o == 0) begin c.p_sel[0] = 0; return 1; end
      1: if (o <= 2) begin c.d1_sel = 2'(o); c.p_sel[o] = (o != 1); return 1; end
      2: if (o == 1 || o == 2) begin c.d2_sel = (o == 2); c.p_sel[o] = (o == 1); return 1; end
      3: if (o == 3 || o == 4) begin c.d3_sel = (o == 4); c.p_sel[o] = (o == 4); return 1; end
      4: if (o == 3 || o == 4) begin c.d4_sel = (o == 4); c.p_sel[o] = (o == 3); return 1; end
      default: ;
    endcase
    return 0;
  endfunction

  // regular and secondary multiplexer of each output (own table)
  int reg_mux [NUM_PORTS] = '{0, 1, 2, 3, 4};
  int sec_mux [NUM_PORTS] = '{1, 2, 1, 4, 3};

  task automatic randomize_inputs();
    for (int i = 0; i < NUM_PORTS; i++)
      for (int w = 0; w < FLIT_W / 32; w++) in_flit[i][w*32 +: 32] = $urandom;
  endtask

  task automatic check_out(int o, int i, string what);
    checks++;
    if (!out_valid[o] || out_flit[o] != in_flit[i]) begin
      failures++;
      $display("FAIL: %s: output %0d does not carry input %0d", what, o, i);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xb_ctrl_t c;
    // single connections over both paths
    for (int o = 0; o < NUM_PORTS; o++)
      for (int path = 0; path < 2; path++)
        for (int i = 0; i < NUM_PORTS; i++) begin
          randomize_inputs();
          c = '0;
          void'(route(path ? sec_mux[o] : reg_mux[o], i, o, c));
          ctrl = c;
          #1;
          check_out(o, i, path ? "secondary path" : "regular path");
          checks++;
          if (out_valid != NUM_PORTS'(1 << o)) begin
            failures++;
            $display("FAIL: outputs %b valid, expected only %0d", out_valid, o);
          end
        end
    // permutations on the regular paths
    for (int n = 0; n < 50; n++) begin
      int perm [NUM_PORTS];
      for (int k = 0; k < NUM_PORTS; k++) perm[k] = k;
      for (int k = NUM_PORTS - 1; k > 0; k--) begin
        int r, t;
        r = $urandom % (k + 1);
        t = perm[k]; perm[k] = perm[r]; perm[r] = t;
      end
      randomize_inputs();
      c = '0;
      for (int o = 0; o < NUM_PORTS; o++) void'(route(o, perm[o], o, c));
      ctrl = c;
      #1;
      for (int o = 0; o < NUM_PORTS; o++) check_out(o, perm[o], "permutation");
    end
    // M2 and M4 unused: out1 via M1, out2/out3 share M3, out4/out5 share M5
    for (int cyc = 0; cyc < 2; cyc++) begin
      randomize_inputs();
      c = '0;
      void'(route(0, 4, 0, c));
      void'(route(2, 1, cyc ? 2 : 1, c));
      void'(route(4, 3, cyc ? 3 : 4, c));
      ctrl = c;
      #1;
      check_out(0, 4, "M2+M4 unused");
      check_out(cyc ? 2 : 1, 1, "M2+M4 unused");
      check_out(cyc ? 3 : 4, 3, "M2+M4 unused");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
