// tb_hps_squarer: checks the squaring macro in the two configurations the
// datapath uses (first sub-function: 17 bits in, >> 16, 16 out; second
// sub-function: 15 bits in, >> 10, 18 out) and a plain one, against 64-bit
// integer squares, on edge values and random operands.
module tb_hps_squarer;

  int checks = 0, failures = 0;

  logic [16:0] a1;  logic [15:0] q1;
  logic [14:0] a2;  logic [17:0] q2;
  logic [7:0]  a3;  logic [15:0] q3;

  hps_squarer #(.IN_W(17), .OUT_W(16), .SHIFT(16)) dut1 (.a(a1), .sq(q1));
  hps_squarer #(.IN_W(15), .OUT_W(18), .SHIFT(4))  dut2 (.a(a2), .sq(q2));
  hps_squarer #(.IN_W(8),  .OUT_W(16), .SHIFT(0))  dut3 (.a(a3), .sq(q3));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(input longint v1, input longint v2, input longint v3);
    a1 = 17'(v1); a2 = 15'(v2); a3 = 8'(v3);
    #1;
    check(q1, ((v1 * v1) >> 16) & 'hFFFF, "17->16");
    check(q2, ((v2 * v2) >> 4) & 'h3FFFF, "15->18");
    check(q3, v3 * v3, "8->16");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_one(0, 0, 0);
    run_one(49152, 11747, 255);   // 3/2 in 1.15; largest m magnitude; max byte
    run_one(16385, 2047, 1);
    run_one(65535, 9699, 128);
    for (int i = 0; i < 2000; i++)
      run_one($urandom_range(16385, 49152), $urandom_range(0, 11747), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
