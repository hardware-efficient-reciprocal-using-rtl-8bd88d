// hps_squarer: unsigned squaring macro.
//
// Computes out = (a * a) >> SHIFT, keeping the low OUT_W bits of the shifted
// square. The datapath uses squarers in place of general multipliers wherever
// an operand is multiplied by itself, which is the point of the squaring
// shrunk method: a squarer needs roughly half the partial products of a
// multiplier of the same width. It is purely combinational; the caller
// registers the result. The caller chooses SHIFT and OUT_W so that the bits
// dropped at the top are always zero for its operand range.
module hps_squarer #(
  parameter int unsigned IN_W  = 17,
  parameter int unsigned OUT_W = 17,
  parameter int unsigned SHIFT = 15
) (
  input  logic [IN_W-1:0]  a,
  output logic [OUT_W-1:0] sq
);

  logic [2*IN_W-1:0] full;

  always_comb begin
    full = {{IN_W{1'b0}}, a} * {{IN_W{1'b0}}, a};
    sq   = OUT_W'(full >> SHIFT);
  end

endmodule
