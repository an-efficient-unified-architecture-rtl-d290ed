// mult_precompute: all products of one large coefficient with the small range.
//
// Because the a(x) operand has small coefficients k in [-KMAX, KMAX], every
// MAC unit can replace its multiplier by a multiplexer, provided the possible
// products k * b_i are available. This block forms those 2*KMAX+1 products
// once per large coefficient b_i; the results are broadcast to all MAC units.
// Sharing the products (rather than negating b_i in every lane) is the
// architecture's own arrangement. Forming the positive multiples by shifts
// and adds and taking the negatives by subtraction from zero is this design's
// choice; any constant-multiplier implementation would do.
//
// Interface: b is an unsigned Q_W-bit coefficient. prod[i] is the signed
// product (i - KMAX) * b. Purely combinational, no latency.
module mult_precompute
  import xnet_pkg::*;
(
  input  logic [Q_W-1:0]                     b,
  output logic signed [2*KMAX:0][PROD_W-1:0] prod
);

  logic signed [PROD_W-1:0] pos [KMAX+1];

  always_comb begin
    pos[0] = '0;
    for (int k = 1; k <= KMAX; k++)
      pos[k] = pos[k-1] + PROD_W'(b);
    for (int k = 0; k <= KMAX; k++) begin
      prod[KMAX + k] = pos[k];
      prod[KMAX - k] = PROD_W'(0) - pos[k];
    end
  end

endmodule
