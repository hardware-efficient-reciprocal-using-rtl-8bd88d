// hps_reciprocal: pipelined reciprocal z = 1/v for 1 <= v < 2.
//
// v is a 16-bit unsigned number with one integer and 15 fractional bits, as
// the mantissa of a floating-point number. Pre-processing maps it to
// x = v - 1, which for a valid operand is its 15 fractional bits. hps_core
// computes y = 2/(1+x) - 1 as the product of the two parabolic synthesis
// sub-functions, and hps_post returns z = (y + 1)/2 as 16 fractional bits.
// A new operand is accepted every clock; z appears LATENCY = 7 clocks after v
// with out_valid high. range_err flags, with the same latency, an operand
// whose integer bit is 0 (v < 1); its z is not meaningful. Synchronous
// active-low reset clears the valid pipeline only.
module hps_reciprocal
  import hps_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT   // interval index bits, I = 2^N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [V_W-1:0] v,          // 1.15 unsigned
  output logic           out_valid,
  output logic [Z_W-1:0] z,          // 0.16 unsigned
  output logic           range_err,
  output logic           z_saturated  // z = 1 was clipped to 1 - 2^-16
);

  localparam int unsigned LATENCY = 7;

  logic [X_W-1:0] x;
  logic           y_valid;
  logic [Y_W-1:0] y;
  logic [LATENCY-1:0] err_sr;

  // Pre-processing: x = v - 1.
  assign x = v[X_W-1:0];

  hps_core #(.N(N)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x         (x),
    .out_valid (y_valid),
    .y         (y)
  );

  hps_post u_post (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (y_valid),
    .y         (y),
    .out_valid (out_valid),
    .saturated (z_saturated),
    .z         (z)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) err_sr <= '0;
    else        err_sr <= {err_sr[LATENCY-2:0], in_valid && !v[V_W-1]};
  end

  assign range_err = err_sr[LATENCY-1];

endmodule
