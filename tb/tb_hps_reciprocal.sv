// tb_hps_reciprocal: end-to-end test of the reciprocal unit at its default
// parameters (16 intervals). Every operand v = 1 + i*2^-15, i = 0..32767, is
// applied once, mostly back to back with random idle clocks, and interleaved
// with operands below 1 that must raise range_err. Each z is compared bit for
// bit with the reference model and with 1/v; the test reports the mean and
// maximum error and checks the 7-clock latency and the one-result-per-clock
// throughput. It counts every mechanism of the design and fails if one never
// occurs: use of each of the 16 intervals, the mirrored p/k read for the upper
// half, saturation of s1 and of z at v = 1, range errors, idle clocks and
// back-to-back results.
module tb_hps_reciprocal;
  import hps_ref_pkg::*;

  localparam int LAT = 7;
  int checks = 0, failures = 0;
  int n_out = 0, s1_sat = 0, back_to_back = 0, bubbles = 0, range_errs = 0, sat_z = 0, mirrored = 0;
  int interval_hits[16];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid, out_valid, range_err, z_saturated;
  logic [15:0] v, z;
  longint      vq[$];
  int          tq[$];
  int          cyc = 0;
  logic        prev_out_valid = 1'b0;
  real         sum_err = 0.0, max_err = 0.0;

  hps_reciprocal dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .v(v),
                      .out_valid(out_valid), .z(z), .range_err(range_err),
                      .z_saturated(z_saturated));

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      longint vi, ez; int t0; real err;
      checks++;
      if (vq.size() == 0) fail("result without operand");
      else begin
        vi = vq.pop_front(); t0 = tq.pop_front();
        checks++;
        if (cyc - t0 != LAT) fail($sformatf("latency %0d", cyc - t0));
        checks++;
        if (range_err != (vi < 32768)) fail($sformatf("range_err for v=%0d", vi));
        if (vi >= 32768) begin
          ez = ref_z_from_y(ref_y(4, vi - 32768));
          checks++;
          if (longint'(z) != ez) fail($sformatf("v=%0d z=%0d expected %0d", vi, z, ez));
          err = real'(z) / 65536.0 - 32768.0 / real'(vi);
          if (err < 0) err = -err;
          sum_err += err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > 5.0e-5) fail($sformatf("accuracy v=%0d err=%g", vi, err));
          checks++;
          if (z_saturated != (vi == 32768)) fail("z_saturated flag");
          if (z_saturated) sat_z++;
          n_out++;
        end else range_errs++;
        if (prev_out_valid) back_to_back++;
      end
    end
    prev_out_valid = out_valid;
  end

  // watch the inside of the pipeline for the mirrored table reads
  always @(posedge clk) begin
    if (dut.u_core.in_valid && dut.u_core.x[14]) mirrored++;
    if (rst_n && dut.u_core.u_s1.s1 == 15'h7fff) s1_sat++;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input longint val);
    in_valid = 1'b1;
    v = 16'(val);
    vq.push_back(val);
    tq.push_back(cyc);
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; v = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 32768; i++) begin
      if ($urandom_range(0, 15) == 0) begin
        in_valid = 1'b0;
        bubbles++;
        @(negedge clk);
      end
      if ($urandom_range(0, 255) == 0) send($urandom_range(0, 32767));
      send(32768 + i);
      interval_hits[i >> 11]++;
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != 32768) fail($sformatf("%0d results for 32768 operands", n_out));
    checks++;
    if (vq.size() != 0) fail("operands without result");
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (interval_hits[i] == 0) fail($sformatf("interval %0d never used", i));
    end
    checks++; if (s1_sat == 0)       fail("s1 saturation never seen");
    checks++; if (mirrored == 0)     fail("mirrored p/k read never seen");
    checks++; if (sat_z != 1)        fail($sformatf("z saturation seen %0d times", sat_z));
    checks++; if (range_errs == 0)   fail("range error never seen");
    checks++; if (bubbles == 0)      fail("idle clock never seen");
    checks++; if (back_to_back == 0) fail("back-to-back results never seen");
    checks++;
    if (sum_err / real'(n_out) > 2.0e-5) fail("mean error above 2e-5");
    $display("mean |z error| = %g, max = %g over %0d operands", sum_err / real'(n_out), max_err, n_out);
    $display("mirrored reads %0d, range errors %0d, z saturations %0d, idle clocks %0d, back-to-back %0d",
             mirrored, range_errs, sat_z, bubbles, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
