// hps_core: normalised reciprocal y = 2/(1+x) - 1 by harmonized parabolic
// synthesis with a second order first sub-function and the squaring shrunk
// method, y = s1(x) * s2(x).
//
// s1 (hps_s1, 3 stages) and s2 (hps_s2, 5 stages) run in parallel on the same
// x; s1 is delayed two clocks to meet s2, and a single multiplier forms the
// product, truncated to 16 bits with 15 fractional bits. The pipeline accepts
// a new x on every clock and has no stall; in_valid travels with the data so
// that out_valid marks the matching y. Latency is LATENCY = 6 clocks.
// Only the valid bits are reset (synchronous, active low); data registers
// carry whatever was last clocked in and are qualified by out_valid.
module hps_core
  import hps_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [X_W-1:0] x,         // 15 fractional bits, 0 <= x < 1
  output logic           out_valid,
  output logic [Y_W-1:0] y          // 15 fractional bits, 0 < y <= 1
);

  localparam int unsigned LATENCY = 6;
  // fractional bits: s1 15, s2 16, y 15
  localparam int unsigned PROD_SHIFT = S1_W + (S2_W - 1) - (Y_W - 1);

  logic [S1_W-1:0]         s1, s1_d1, s1_d2;
  logic [S2_W-1:0]         s2;
  logic [S1_W+S2_W-1:0]    prod;
  logic [LATENCY-1:0]      valid_sr;

  hps_s1 u_s1 (
    .clk (clk),
    .x   (x),
    .s1  (s1)
  );

  hps_s2 #(.N(N)) u_s2 (
    .clk (clk),
    .x   (x),
    .s2  (s2)
  );

  // s1: 15 fractional bits, s2: 16, product: 31; y keeps 15.
  assign prod = {{S2_W{1'b0}}, s1_d2} * {{S1_W{1'b0}}, s2};

  always_ff @(posedge clk) begin
    s1_d1 <= s1;
    s1_d2 <= s1_d1;
    y     <= Y_W'(prod >> PROD_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_sr <= '0;
    else        valid_sr <= {valid_sr[LATENCY-2:0], in_valid};
  end

  assign out_valid = valid_sr[LATENCY-1];

endmodule
