// tb_hps_intervals: runs the reciprocal unit with 16, 32 and 64 interpolation
// intervals (N = 4, 5, 6) side by side over every operand v = 1 + i*2^-15.
// Each z is compared bit for bit with the reference model for its N, and the
// mean and maximum error against 1/v are reported per N, both over all
// operands and over R = 100 evenly spaced operands. The checks bound the
// mean error at 2e-5 for every N.
module tb_hps_intervals;
  import hps_ref_pkg::*;

  localparam int LAT = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid;
  logic [15:0] v;
  logic        ov[3], re[3], zs[3];
  logic [15:0] z[3];

  hps_reciprocal #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v),
                                .out_valid(ov[0]), .z(z[0]), .range_err(re[0]), .z_saturated(zs[0]));
  hps_reciprocal #(.N(5)) dut5 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v),
                                .out_valid(ov[1]), .z(z[1]), .range_err(re[1]), .z_saturated(zs[1]));
  hps_reciprocal #(.N(6)) dut6 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v),
                                .out_valid(ov[2]), .z(z[2]), .range_err(re[2]), .z_saturated(zs[2]));

  longint vq[$];
  real    sum_err[3], max_err[3], sum100[3];
  int     n_out = 0;

  always @(negedge clk) if (rst_n && ov[0]) begin
    longint vi;
    vi = vq.pop_front();
    for (int k = 0; k < 3; k++) begin
      longint ez; real err;
      ez = ref_z_from_y(ref_y(4 + k, vi - 32768));
      checks++;
      if (!ov[k] || longint'(z[k]) != ez) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d v=%0d z=%0d expected %0d", 4 + k, vi, z[k], ez);
      end
      err = real'(z[k]) / 65536.0 - 32768.0 / real'(vi);
      if (err < 0) err = -err;
      sum_err[k] += err;
      if (err > max_err[k]) max_err[k] = err;
    end
    n_out++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin sum_err[k] = 0.0; max_err[k] = 0.0; sum100[k] = 0.0; end
    rst_n = 1'b0; in_valid = 1'b0; v = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 32768; i++) begin
      in_valid = 1'b1;
      v = 16'(32768 + i);
      vq.push_back(32768 + i);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != 32768) begin failures++; $display("FAIL %0d results", n_out); end
    // R = 100 points, computed from the reference model
    for (int k = 0; k < 3; k++) begin
      for (int r = 1; r <= 100; r++) begin
        longint c; real e;
        c = longint'($rtoi(real'(r) / 100.0 * 32768.0 + 0.5));
        if (c > 32767) c = 32767;
        e = real'(ref_z_from_y(ref_y(4 + k, c))) / 65536.0 - 32768.0 / real'(32768 + c);
        sum100[k] += (e < 0) ? -e : e;
      end
      $display("intervals %0d: mean |z error| %g (all operands), %g (R = 100), max %g",
               1 << (4 + k), sum_err[k] / 32768.0, sum100[k] / 100.0, max_err[k]);
      checks++;
      if (sum_err[k] / 32768.0 > 2.0e-5) begin failures++; $display("FAIL mean error N=%0d", 4 + k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
