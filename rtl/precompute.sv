// Pre-computation stage of the Toeplitz matrix multiplier (PRECOMPUTE).
//
// The Montgomery product A*B*x^-k mod G is the product of an m x m Toeplitz
// matrix W_Mk with the digit vector of A. A Toeplitz matrix is fixed by its
// first row and first column. For G = x^m + x^k + 1 these are the first row
// and column of the binomial matrix W (cyclic arrangement of B) plus those of
// the correction matrix W_k. This stage adds the two, one L-bit digit per
// cycle: row = V0 ^ V1, col = H0 ^ H1. In binomial mode (G = x^m + 1, the
// ring used for all-one polynomials) the correction inputs are forced to
// zero, as the architecture prescribes.
//
// Purely combinational; one digit of each stream per cycle. The digit
// arrangement of B into V0/V1/H0/H1 is done by the supplier of the operand.
module precompute #(
  parameter int unsigned L = 32
) (
  input  logic         binomial, // 1: G = x^m + 1, ignore the correction
  input  logic [L-1:0] v0,       // digit of the first row of W
  input  logic [L-1:0] v1,       // digit of the first row of W_k
  input  logic [L-1:0] h0,       // digit of the first column of W
  input  logic [L-1:0] h1,       // digit of the first column of W_k
  output logic [L-1:0] w_row,    // digit of the first row of W_Mk
  output logic [L-1:0] w_col     // digit of the first column of W_Mk
);

  always_comb begin
    w_row = v0 ^ (binomial ? '0 : v1);
    w_col = h0 ^ (binomial ? '0 : h1);
  end

endmodule
