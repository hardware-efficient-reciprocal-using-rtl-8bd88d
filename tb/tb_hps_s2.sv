// tb_hps_s2: streams every 15-bit x through the second sub-function, one per
// clock, and compares s2 five clocks later with the reference model. Each
// result is also held against the first help function f1(x) = 2/((1+x)(2-x))
// that s2 interpolates (error below 2^-14), and the test counts results taken
// from the mirrored upper half of the p/k tables.
module tb_hps_s2;
  import hps_ref_pkg::*;

  localparam int LAT = 5;
  int checks = 0, failures = 0, mirrored = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] x;
  logic [16:0] s2;
  longint hist[$];

  hps_s2 dut (.clk(clk), .x(x), .s2(s2));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32768 + LAT; c++) begin
      @(negedge clk);
      if (hist.size() == LAT) begin
        longint xi, ex;
        real xr, err;
        xi = hist.pop_front();
        ex = ref_s2(4, xi);
        checks++;
        if (longint'(s2) != ex) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d s2=%0d expected %0d", xi, s2, ex);
        end
        xr  = real'(xi) / 32768.0;
        err = real'(s2) / 65536.0 - 2.0 / ((1.0 + xr) * (2.0 - xr));
        if (err < 0) err = -err;
        checks++;
        if (err > 1.0e-4) begin
          failures++;
          if (failures < 10) $display("FAIL accuracy x=%0d err=%g", xi, err);
        end
        if (xi >= 16384) mirrored++;
      end
      x = 15'(c);
      hist.push_back(longint'(c & 32767));
      @(posedge clk);
    end
    checks++;
    if (mirrored == 0) begin failures++; $display("FAIL mirrored half never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
