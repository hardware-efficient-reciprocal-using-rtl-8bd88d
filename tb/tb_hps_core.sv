// tb_hps_core: drives every 15-bit x into the normalised reciprocal core with
// random idle clocks in between, and compares each y flagged by out_valid
// with the reference model and with the exact 2/(1+x) - 1. Checks that the
// latency is 6 clocks, that a result follows every accepted input, that
// back-to-back inputs give back-to-back results and that reset clears the
// valid pipeline.
module tb_hps_core;
  import hps_ref_pkg::*;

  localparam int LAT = 6;
  int checks = 0, failures = 0, back_to_back = 0, bubbles = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid, out_valid;
  logic [14:0] x;
  logic [15:0] y;
  longint      xq[$];
  int          tq[$];
  int          cyc = 0;
  int          n_out = 0;
  logic        prev_out_valid = 1'b0;
  real         sum_err = 0.0;

  hps_core dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                .out_valid(out_valid), .y(y));

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // output monitor
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      longint xi; int t0; real xr, err;
      checks++;
      if (xq.size() == 0) fail("result without input");
      else begin
        xi = xq.pop_front(); t0 = tq.pop_front();
        checks++;
        if (cyc - t0 != LAT) fail($sformatf("latency %0d", cyc - t0));
        checks++;
        if (longint'(y) != ref_y(4, xi))
          fail($sformatf("x=%0d y=%0d expected %0d", xi, y, ref_y(4, xi)));
        xr  = real'(xi) / 32768.0;
        err = real'(y) / 32768.0 - (2.0 / (1.0 + xr) - 1.0);
        if (err < 0) err = -err;
        sum_err += err;
        checks++;
        if (err > 1.0e-4) fail($sformatf("accuracy x=%0d err=%g", xi, err));
        if (prev_out_valid) back_to_back++;
        n_out++;
      end
    end
    prev_out_valid = out_valid;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    // reset must hold the valid pipeline empty even with in_valid high
    @(negedge clk); in_valid = 1'b1;
    repeat (LAT + 2) begin
      @(negedge clk);
      checks++;
      if (out_valid) fail("out_valid during reset");
    end
    in_valid = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 32768; c++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        bubbles++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      x = 15'(c);
      xq.push_back(longint'(c));
      tq.push_back(cyc);
      @(posedge clk);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out != 32768) fail($sformatf("%0d results for 32768 inputs", n_out));
    checks++;
    if (back_to_back == 0 || bubbles == 0) fail("stream pattern not exercised");
    $display("mean |y error| = %g over %0d inputs", sum_err / real'(n_out), n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
