// hps_post: after-processing z = (y + 1) / 2 of the normalised result.
//
// y has 15 fractional bits and lies in (0, 1]; z lies in (1/2, 1] and is
// given with 16 fractional bits, so the halving is only a change of binary
// point and the operation is the addition of 1/2 = 2^15. z = 1 (v = 1) does
// not fit in 16 fractional bits and saturates to 1 - 2^-16. One register
// stage; in_valid is carried to out_valid. Valid is reset synchronously,
// active low.
module hps_post
  import hps_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [Y_W-1:0] y,
  output logic           out_valid,
  output logic           saturated,   // z was clipped to 1 - 2^-16
  output logic [Z_W-1:0] z
);

  logic [Z_W:0] sum;

  assign sum = {1'b0, y} + (Z_W + 1)'(1 << (Z_W - 1));

  always_ff @(posedge clk) begin
    z         <= sum[Z_W] ? {Z_W{1'b1}} : sum[Z_W-1:0];
    saturated <= sum[Z_W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
