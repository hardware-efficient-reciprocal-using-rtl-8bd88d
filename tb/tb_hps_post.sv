// tb_hps_post: checks the after-processing z = (y + 1)/2 for every y in
// (0, 1], one per clock, including the saturation of z = 1, its flag, the
// one-clock latency of out_valid and its reset.
module tb_hps_post;

  int checks = 0, failures = 0, sat_seen = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid, out_valid, saturated;
  logic [15:0] y, z;

  hps_post dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y(y),
                .out_valid(out_valid), .saturated(saturated), .z(z));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b1; y = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid in reset"); end
    rst_n = 1'b1;
    for (int v = 1; v <= 32768; v++) begin
      int exp_z;
      y = 16'(v);
      in_valid = v[0];
      @(posedge clk); #1;
      // z as a real is (y/2^15 + 1)/2, kept with 16 fractional bits
      exp_z = int'((real'(v) / 32768.0 + 1.0) / 2.0 * 65536.0);
      if (exp_z > 65535) exp_z = 65535;
      checks += 3;
      if (int'(z) != exp_z) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d z=%0d expected %0d", v, z, exp_z);
      end
      if (saturated != (v == 32768)) begin failures++; $display("FAIL saturated flag y=%0d", v); end
      if (out_valid != v[0]) begin failures++; $display("FAIL out_valid y=%0d", v); end
      if (saturated) sat_seen++;
    end
    checks++;
    if (sat_seen != 1) begin failures++; $display("FAIL saturation seen %0d times", sat_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
