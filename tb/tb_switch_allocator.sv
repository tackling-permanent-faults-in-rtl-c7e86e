// tb_switch_allocator: test of the two-stage switch allocator with bypass.
// Random requests (an output port per VC and the multiplexer the VC competes
// for: the output's own one or, for outputs picked at random for a while,
// its secondary one, as routing computation would set it) are applied
// for many cycles, with random stage-1 arbiter faults. Checks each cycle:
//   * a granted port's VC is requesting, and with a faulty stage-1 arbiter
//     it is the VC named by the bypass register,
//   * each multiplexer serves one port, whose chosen VC asked for it,
//   * the D and P selects match a path table kept here for the granted output,
//   * a port is granted whenever it is the only port asking for a multiplexer,
//   * no port is granted when its bypass VC has no request.
// Directed parts check round-robin alternation between two ports competing
// for one multiplexer and the rewrite of a bypass register.
module tb_switch_allocator;
  import pftr_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0][V-1:0]             req;
  logic [P-1:0][V-1:0][PORT_W-1:0] req_mux, req_out;
  logic [P-1:0]                    sa1_fault, bp_we;
  logic [P-1:0][VC_W-1:0]          bp_vc, bypass_vc, gnt_vc;
  logic [P-1:0]                    gnt_valid;
  xb_ctrl_t                        xb_ctrl;
  int checks = 0, failures = 0;

  switch_allocator dut (.*);

  int sec_tab [P] = '{1, 2, 1, 4, 3};
  logic [P-1:0] use_sec;   // outputs reached over their secondary path

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic check_cycle();
    int users [P];
    for (int j = 0; j < P; j++) users[j] = 0;
    for (int i = 0; i < P; i++) begin
      if (gnt_valid[i]) begin
        int v, j, o;
        v = gnt_vc[i];
        j = req_mux[i][v];
        o = req_out[i][v];
        checks++;
        if (!req[i][v]) fail($sformatf("port %0d granted idle VC %0d", i, v));
        if (sa1_fault[i] && v != bypass_vc[i]) fail($sformatf("port %0d bypass ignored", i));
        checks++;
        if (!xb_ctrl.m_valid[j] || int'(xb_ctrl.m_sel[j]) != i)
          fail($sformatf("M%0d not set for port %0d", j + 1, i));
        users[j]++;
        // path table
        checks++;
        case (j)
          0: if (xb_ctrl.p_sel[0] != 0) fail("P1 select");
          1: if (int'(xb_ctrl.d1_sel) != o || xb_ctrl.p_sel[o] != (o != 1)) fail("D1 path");
          2: if (xb_ctrl.d2_sel != (o == 2) || xb_ctrl.p_sel[o] != (o == 1)) fail("D2 path");
          3: if (xb_ctrl.d3_sel != (o == 4) || xb_ctrl.p_sel[o] != (o == 4)) fail("D3 path");
          default: if (xb_ctrl.d4_sel != (o == 4) || xb_ctrl.p_sel[o] != (o == 3)) fail("D4 path");
        endcase
      end else if (sa1_fault[i]) begin
        checks++;
        if (req[i][bypass_vc[i]]) begin
          // may lose only to another port on the same multiplexer
          if (!xb_ctrl.m_valid[req_mux[i][bypass_vc[i]]]) fail("bypass VC request dropped");
        end
      end
    end
    for (int j = 0; j < P; j++) begin
      checks++;
      if (users[j] > 1 || (xb_ctrl.m_valid[j] && users[j] == 0))
        fail($sformatf("M%0d has %0d users", j + 1, users[j]));
    end
    // a lone requester for a multiplexer (counting every VC) must win
    for (int j = 0; j < P; j++) begin
      int askers, who;
      askers = 0; who = -1;
      for (int i = 0; i < P; i++) begin
        bit asks;
        asks = 0;
        for (int v = 0; v < V; v++)
          if (req[i][v] && (!sa1_fault[i] || v == bypass_vc[i])) asks = 1;
        if (asks) begin
          bit only_j;
          only_j = 1;
          for (int v = 0; v < V; v++)
            if (req[i][v] && (!sa1_fault[i] || v == bypass_vc[i]) && req_mux[i][v] != j) only_j = 0;
          if (only_j) begin askers++; who = i; end
          else askers += 100;
        end
      end
      if (askers == 1) begin
        checks++;
        if (!gnt_valid[who]) fail($sformatf("lone port %0d not granted M%0d", who, j + 1));
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_mux = '0; req_out = '0; sa1_fault = '0; bp_we = '0; bp_vc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // bypass registers reset to VC 1
    checks++;
    for (int i = 0; i < P; i++) if (bypass_vc[i] != 1) fail("bypass reset value");

    // random phase
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) begin
        sa1_fault = P'($urandom);
        use_sec   = P'($urandom & $urandom);
      end
      for (int i = 0; i < P; i++)
        for (int v = 0; v < V; v++) begin
          int o;
          o = $urandom % P;
          req[i][v]     = ($urandom % 100) < 40;
          req_out[i][v] = PORT_W'(o);
          req_mux[i][v] = PORT_W'(use_sec[o] ? sec_tab[o] : o);
        end
      #1;
      check_cycle();
    end

    // round-robin: ports 1 and 3 both want M3 every cycle
    begin
      int wins1 = 0, wins3 = 0, last = -1, alternations = 0;
      sa1_fault = '0;
      req = '0;
      req[1][0] = 1; req_out[1][0] = 2; req_mux[1][0] = 2;
      req[3][2] = 1; req_out[3][2] = 2; req_mux[3][2] = 2;
      for (int n = 0; n < 10; n++) begin
        @(negedge clk);
        #1;
        check_cycle();
        if (gnt_valid[1]) begin wins1++; if (last == 3) alternations++; last = 1; end
        if (gnt_valid[3]) begin wins3++; if (last == 1) alternations++; last = 3; end
      end
      checks++;
      if (wins1 != 5 || wins3 != 5 || alternations != 9)
        fail($sformatf("round robin: %0d/%0d wins, %0d alternations", wins1, wins3, alternations));
    end

    // rewrite the bypass register of port 2 to VC 3
    @(negedge clk);
    bp_we[2] = 1; bp_vc[2] = 2'd3;
    @(negedge clk);
    bp_we = '0;
    sa1_fault = 5'b00100;
    req = '0;
    req[2][1] = 1; req_out[2][1] = 0; req_mux[2][1] = 0;
    #1;
    checks++;
    if (gnt_valid[2]) fail("granted a VC other than the rewritten bypass VC");
    req[2][3] = 1; req_out[2][3] = 4; req_mux[2][3] = 4;
    #1;
    checks++;
    if (!gnt_valid[2] || gnt_vc[2] != 3) fail("rewritten bypass VC not granted");
    check_cycle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
