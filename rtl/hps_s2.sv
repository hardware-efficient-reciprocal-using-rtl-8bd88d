// hps_s2: second sub-function in squaring shrunk form,
// s2 = p_i*(x_w + m_i)^2 + k_i.
//
// The interval index i is the top N bits of x and x_w the remaining 15-N bits,
// read as a fraction in [0,1). The quadratic non-linear interpolation
// l + j*x_w - c*x_w^2 of the first help function is evaluated by completing
// the square, which trades its two multipliers for one squarer; one
// multiplier (by p) remains. Five pipeline stages:
//   1. table read of p, m, k (hps_coef_rom); x_w delayed alongside
//   2. t = x_w + m, 15-bit two's complement with 15-N fractional bits
//   3. t^2, kept as its 18 most significant possible bits
//   4. p * t^2, aligned to 19 fractional bits (16 bits)
//   5. s2 = k + p*t^2, 17 bits with 16 fractional bits
// Output is valid 5 clocks after x. Widths follow the published architecture
// (p 10, m 15, k 17, x_w + m 15, square 18, product 16, s2 17); the binary
// point positions are this design's choice.
module hps_s2
  import hps_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic            clk,
  input  logic [X_W-1:0]  x,    // 15 fractional bits
  output logic [S2_W-1:0] s2    // 16 fractional bits
);

  localparam int unsigned XW_W = X_W - N;          // bits of x_w
  localparam int unsigned T2_SHIFT = 2 * XW_W - (T2_W - 2 * (N - 1));

  logic [P_W-1:0]         p_r;
  logic signed [M_W-1:0]  m_r;
  logic [K_W-1:0]         k_r;
  logic [XW_W-1:0]        xw_q;

  logic signed [M_W-1:0]  t_q;
  logic [M_W-1:0]         t_abs;
  logic [T2_W-1:0]        t2, t2_q;
  logic [P_W-1:0]         p_q2, p_q3;
  logic [K_W-1:0]         k_q2, k_q3, k_q4;
  logic [PR_W-1:0]        prod_q;
  logic [T2_W+P_W-1:0]    prod_full;

  hps_coef_rom #(.N(N)) u_rom (
    .clk (clk),
    .idx (x[X_W-1 -: N]),
    .p   (p_r),
    .m   (m_r),
    .k   (k_r)
  );

  hps_squarer #(.IN_W(M_W), .OUT_W(T2_W), .SHIFT(T2_SHIFT)) u_sqr (
    .a  (t_abs),
    .sq (t2)
  );

  always_comb begin
    t_abs     = t_q[M_W-1] ? M_W'(-t_q) : M_W'(t_q);
    prod_full = {{P_W{1'b0}}, t2_q} * {{T2_W{1'b0}}, p_q3};
  end

  always_ff @(posedge clk) begin
    // stage 1: table read happens inside u_rom
    xw_q   <= x[XW_W-1:0];
    // stage 2
    t_q    <= m_r + $signed(M_W'(xw_q));
    p_q2   <= p_r;
    k_q2   <= k_r;
    // stage 3
    t2_q   <= t2;
    p_q3   <= p_q2;
    k_q3   <= k_q2;
    // stage 4: t2 has 18-2(N-1) fractional bits, p has 2N+10, product 30
    prod_q <= PR_W'(prod_full >> 11);
    k_q4   <= k_q3;
    // stage 5: k has 17 fractional bits, the product 19
    s2     <= S2_W'(({2'b00, k_q4, 2'b00} + (K_W + 4)'(prod_q)) >> 3);
  end

endmodule
