// hps_s1: second order first sub-function s1(x) = 0.5*(x - 1.5)^2 - 0.125.
//
// This is 1 - x(3-x)/2 rewritten in squaring shrunk form, so it needs two
// additions and one squarer and no table. Three pipeline stages:
//   1. u = 3/2 - x, the magnitude of x - 3/2 (17 bits, 15 fractional)
//   2. u^2 / 2, truncated to 16 bits with 15 fractional bits (the halving is
//      folded into the squarer's output alignment)
//   3. u^2/2 - 1/8, 15 fractional bits
// s1 lies in [0, 1]; it equals 1 only at x = 0, where the 15-bit result
// saturates to 1 - 2^-15. Output is valid 3 clocks after x.
// The widths follow the published architecture (17, 17, 16, 15 bits); the
// fractional scaling of each signal and the saturation are this design's.
module hps_s1
  import hps_pkg::*;
(
  input  logic            clk,
  input  logic [X_W-1:0]  x,    // 15 fractional bits
  output logic [S1_W-1:0] s1    // 15 fractional bits
);

  localparam logic [U_W-1:0] THREE_HALVES = U_W'(3 << (X_W - 1));
  localparam logic [H_W-1:0] ONE_EIGHTH   = H_W'(1 << (X_W - 3));

  logic [U_W-1:0]   u_q;
  logic [H_W-1:0]   half_sq, half_sq_q, diff;

  hps_squarer #(.IN_W(U_W), .OUT_W(H_W), .SHIFT(X_W + 1)) u_sqr (
    .a  (u_q),
    .sq (half_sq)
  );

  assign diff = half_sq_q - ONE_EIGHTH;

  always_ff @(posedge clk) begin
    u_q  <= THREE_HALVES - U_W'(x);
    half_sq_q <= half_sq;
    s1   <= diff[H_W-1] ? {S1_W{1'b1}} : diff[S1_W-1:0];
  end

endmodule
