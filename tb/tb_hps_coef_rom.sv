// tb_hps_coef_rom: reads every interval of the coefficient ROM for n = 4
// (default) and n = 5 and compares p, m and k with coefficients derived
// independently by the reference model. Also checks the mirror relations the
// half-size p/k tables rely on (p and k of interval i equal those of interval
// I-1-i, m_{I-1-i} = -(1 + m_i) within one unit of rounding) and the
// one-clock synchronous read latency.
module tb_hps_coef_rom;
  import hps_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] idx4;  logic [9:0] p4;  logic signed [14:0] m4;  logic [16:0] k4;
  logic [4:0] idx5;  logic [9:0] p5;  logic signed [14:0] m5;  logic [16:0] k5;

  hps_coef_rom dut4 (.clk(clk), .idx(idx4), .p(p4), .m(m4), .k(k4));
  hps_coef_rom #(.N(5)) dut5 (.clk(clk), .idx(idx5), .p(p5), .m(m5), .k(k5));

  longint pr4[16], mr4[16], kr4[16], pr5[32], mr5[32], kr5[32];

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      if (i < 16) ref_coef(4, i, pr4[i], mr4[i], kr4[i]);
      ref_coef(5, i, pr5[i], mr5[i], kr5[i]);
    end
    idx4 = 0; idx5 = 0;
    @(posedge clk);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      idx4 = 4'(i); idx5 = 5'(i);
      // before the clock edge the outputs still hold the previous entry
      if (i > 0 && i < 16) check(m4, mr4[i-1], "read latency m4");
      @(posedge clk); #1;
      if (i < 16) begin
        check(p4, pr4[i], $sformatf("p4[%0d]", i));
        check(m4, mr4[i], $sformatf("m4[%0d]", i));
        check(k4, kr4[i], $sformatf("k4[%0d]", i));
      end
      check(p5, pr5[i], $sformatf("p5[%0d]", i));
      check(m5, mr5[i], $sformatf("m5[%0d]", i));
      check(k5, kr5[i], $sformatf("k5[%0d]", i));
    end
    // symmetry of the help function seen in the tables
    for (int i = 0; i < 8; i++) begin
      longint s;
      check(pr4[i], pr4[15-i], "p mirror");
      check(kr4[i], kr4[15-i], "k mirror");
      s = mr4[i] + mr4[15-i] + 2048;
      checks++;
      if (s < -1 || s > 1) begin
        failures++;
        $display("FAIL m mirror %0d: %0d", i, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
