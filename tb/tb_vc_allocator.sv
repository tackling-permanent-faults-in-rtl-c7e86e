// tb_vc_allocator: test of the two-stage separable VC allocator.
// Random requests (one output port per arbiter set) are applied against a
// random set of free downstream VCs and of broken stage-2 arbiters. Checks
// each cycle:
//   * a granted downstream VC is free and its stage-2 arbiter is not broken,
//   * no downstream VC is granted twice,
//   * a set that is the only one asking for an output port that has an
//     available VC is granted.
// A directed part checks that two sets competing for the one free VC of a
// port are served in turn, and that a port whose only free VCs have broken
// stage-2 arbiters grants nothing.
module tb_vc_allocator;
  import pftr_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0][V-1:0]             req, ovc_free, va2_fault, gnt;
  logic [P-1:0][V-1:0][PORT_W-1:0] req_port;
  logic [P-1:0][V-1:0][VC_W-1:0]   gnt_vc;
  int checks = 0, failures = 0;

  vc_allocator dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic check_cycle();
    int taken [P][V];
    int askers [P];
    for (int o = 0; o < P; o++) begin
      askers[o] = 0;
      for (int v = 0; v < V; v++) taken[o][v] = 0;
    end
    for (int i = 0; i < P; i++)
      for (int k = 0; k < V; k++) begin
        if (req[i][k]) askers[req_port[i][k]]++;
        if (gnt[i][k]) begin
          int o, v;
          o = req_port[i][k];
          v = gnt_vc[i][k];
          checks++;
          if (!req[i][k] || !ovc_free[o][v] || va2_fault[o][v])
            fail($sformatf("set %0d.%0d granted unavailable VC %0d.%0d", i, k, o, v));
          taken[o][v]++;
        end
      end
    for (int o = 0; o < P; o++)
      for (int v = 0; v < V; v++) begin
        checks++;
        if (taken[o][v] > 1) fail($sformatf("VC %0d.%0d granted %0d times", o, v, taken[o][v]));
      end
    for (int i = 0; i < P; i++)
      for (int k = 0; k < V; k++)
        if (req[i][k] && askers[req_port[i][k]] == 1 &&
            (ovc_free[req_port[i][k]] & ~va2_fault[req_port[i][k]]) != '0) begin
          checks++;
          if (!gnt[i][k]) fail($sformatf("lone set %0d.%0d not granted", i, k));
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
    req = '0; req_port = '0; ovc_free = '0; va2_fault = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 300 == 0) va2_fault = '0;
      if (n % 300 == 150) for (int o = 0; o < P; o++) va2_fault[o] = V'($urandom & $urandom);
      for (int i = 0; i < P; i++)
        for (int k = 0; k < V; k++) begin
          req[i][k]      = ($urandom % 100) < 15;
          req_port[i][k] = PORT_W'($urandom % P);
        end
      for (int o = 0; o < P; o++) ovc_free[o] = V'($urandom);
      #1;
      check_cycle();
    end

    // two sets compete for the single free VC 2 of output 3
    begin
      int w_a = 0, w_b = 0;
      va2_fault = '0;
      req = '0;
      ovc_free = '0;
      ovc_free[3] = 4'b0100;
      req[0][1] = 1; req_port[0][1] = 3;
      req[4][2] = 1; req_port[4][2] = 3;
      for (int n = 0; n < 8; n++) begin
        @(negedge clk);
        #1;
        check_cycle();
        if (gnt[0][1]) w_a++;
        if (gnt[4][2]) w_b++;
        checks++;
        if ((gnt[0][1] ^ gnt[4][2]) != 1'b1 || gnt_vc[0][1] != 2 || gnt_vc[4][2] != 2)
          fail("single free VC not granted to exactly one set");
      end
      checks++;
      if (w_a != 4 || w_b != 4) fail($sformatf("unfair: %0d/%0d", w_a, w_b));
    end

    // the only free VCs of output 1 have broken stage-2 arbiters
    @(negedge clk);
    req = '0;
    req[2][0] = 1; req_port[2][0] = 1;
    ovc_free[1] = 4'b1001;
    va2_fault[1] = 4'b1001;
    #1;
    checks++;
    if (gnt[2][0]) fail("granted a VC whose stage-2 arbiter is broken");
    va2_fault[1] = 4'b0001;
    #1;
    checks++;
    if (!gnt[2][0] || gnt_vc[2][0] != 3) fail("healthy VC 3 not granted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
