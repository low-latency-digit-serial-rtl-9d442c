// One processing element (PE) of the digit-serial Toeplitz matrix multiplier.
//
// Each cycle the PE multiplies one L x L Toeplitz block of W_Mk by an L-bit
// digit of the multiplier A over GF(2) and adds (XOR) the result to the
// partial product digit arriving from the previous PE:
//   p_out[r] = p_in[r] ^ XOR_c ( T[r][c] & a[c] ),
//   T[r][c]  = col[r-c] for r >= c, row[c-r] for r < c,
// so the block is given by its first column (col) and first row (row;
// row[0] is the corner, equal to col[0], and is not used).
// The A digit stays in the PE for a whole pass: it is taken from a_bus on
// the first row of the pass (first_in) and held in a_reg for the rest.
// The PE also keeps its last two blocks (blk_d1 = previous cycle, blk_d2 =
// the one before); the next PE builds its own blocks from them.
//
// Timing: one register stage. Inputs of cycle t appear on p_out, vld_out and
// first_out in cycle t+1. Critical path: an L-input AND/XOR tree, O(log2 L).
// The PE's function and its place in a pipelined chain follow the
// architecture; the plain AND/XOR array, the A register and the block
// history registers are this implementation's own realisation.
module tmm_pe #(
  parameter int unsigned L = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         vld_in,
  input  logic         first_in,
  input  logic [L-1:0] col,
  input  logic [L-1:0] row,
  input  logic [L-1:0] a_bus,
  input  logic [L-1:0] p_in,
  output logic         vld_out,
  output logic         first_out,
  output logic [L-1:0] p_out,
  output logic [L-1:0] col_d1,
  output logic [L-1:0] row_d1,
  output logic [L-1:0] col_d2,
  output logic [L-1:0] row_d2
);

  logic [L-1:0] a_reg;
  logic [L-1:0] a_eff;
  logic [L-1:0] y;

  assign a_eff = first_in ? a_bus : a_reg;

  always_comb begin
    for (int r = 0; r < int'(L); r++) begin
      y[r] = 1'b0;
      for (int c = 0; c < int'(L); c++) begin
        if (r >= c) y[r] = y[r] ^ (col[r-c] & a_eff[c]);
        else        y[r] = y[r] ^ (row[c-r] & a_eff[c]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_out   <= 1'b0;
      first_out <= 1'b0;
    end else begin
      vld_out   <= vld_in;
      first_out <= first_in;
    end
  end

  always_ff @(posedge clk) begin
    if (first_in) a_reg <= a_bus;
    p_out  <= p_in ^ y;
    col_d1 <= col;
    row_d1 <= row;
    col_d2 <= col_d1;
    row_d2 <= row_d1;
  end

endmodule
