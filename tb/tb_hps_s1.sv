// tb_hps_s1: streams every 15-bit x through the first sub-function, one per
// clock, and compares s1 three clocks later with the reference model. Each
// result is also held against the exact s1(x) = 1 - x(3-x)/2 (error below
// 2^-14), and the saturation at x = 0 is counted.
module tb_hps_s1;
  import hps_ref_pkg::*;

  localparam int LAT = 3;
  int checks = 0, failures = 0, sat_seen = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [14:0] x;
  logic [14:0] s1;
  longint hist[$];

  hps_s1 dut (.clk(clk), .x(x), .s1(s1));

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
        longint xi;
        real xr, ex, err;
        xi = hist.pop_front();
        checks++;
        if (longint'(s1) != ref_s1(xi)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d s1=%0d expected %0d", xi, s1, ref_s1(xi));
        end
        xr  = real'(xi) / 32768.0;
        ex  = 1.0 - 0.5 * xr * (3.0 - xr);
        err = real'(s1) / 32768.0 - ex;
        if (err < 0) err = -err;
        checks++;
        if (err > 1.0 / 16384.0) begin
          failures++;
          if (failures < 10) $display("FAIL accuracy x=%0d err=%g", xi, err);
        end
        if (s1 == 15'h7fff) sat_seen++;
      end
      x = 15'(c);
      hist.push_back(longint'(c & 32767));
      @(posedge clk);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
