// hps_coef_rom: coefficient tables of the squaring shrunk second sub-function.
//
// Holds, for I = 2^N intervals of x, the coefficients of
// s2 = p_i*(x_w + m_i)^2 + k_i. Because the first help function is symmetric
// about x = 0.5, interval I-1-i is the mirror image of interval i: p and k are
// the same for both and only I/2 entries are stored, while the offset m
// differs (m_{I-1-i} = -(1 + m_i)) and is stored for all I intervals. For the
// upper half of the intervals the p/k address is the one's complement of the
// lower index bits, which is the mirror interval.
//
// The table contents are computed at elaboration from the interpolation
// formulas in hps_pkg (real arithmetic, rounded to nearest), so N can be
// changed without editing any constant. Widths are 10 bits for p, 15 for m
// and 17 for k. The read is synchronous, like an FPGA block memory: the
// coefficients of idx appear one clock after it.
module hps_coef_rom
  import hps_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic                   clk,
  input  logic [N-1:0]           idx,    // interval index, top N bits of x
  output logic [P_W-1:0]         p,      // scale, value P * 2^-(2N+10)
  output logic signed [M_W-1:0]  m,      // offset, 15-N fractional bits
  output logic [K_W-1:0]         k       // constant, 17 fractional bits
);

  localparam int unsigned I    = 2 ** N;
  localparam int unsigned HALF = I / 2;

  typedef logic [HALF-1:0][P_W-1:0] p_tab_t;
  typedef logic [I-1:0][M_W-1:0]    m_tab_t;
  typedef logic [HALF-1:0][K_W-1:0] k_tab_t;

  function automatic p_tab_t build_p();
    p_tab_t t;
    for (int unsigned i = 0; i < HALF; i++) t[i] = P_W'(table_p(N, i));
    return t;
  endfunction

  function automatic m_tab_t build_m();
    m_tab_t t;
    for (int unsigned i = 0; i < I; i++) t[i] = M_W'(table_m(N, i));
    return t;
  endfunction

  function automatic k_tab_t build_k();
    k_tab_t t;
    for (int unsigned i = 0; i < HALF; i++) t[i] = K_W'(table_k(N, i));
    return t;
  endfunction

  localparam p_tab_t P_TAB = build_p();
  localparam m_tab_t M_TAB = build_m();
  localparam k_tab_t K_TAB = build_k();

  // Mirror address for the symmetric p and k tables.
  logic [N-2:0] half_addr;
  assign half_addr = idx[N-1] ? ~idx[N-2:0] : idx[N-2:0];

  always_ff @(posedge clk) begin
    p <= P_TAB[half_addr];
    m <= M_TAB[idx];
    k <= K_TAB[half_addr];
  end

endmodule
