// Digit-serial Toeplitz matrix multiplier core, TMM(N_PE, L).
//
// N_PE processing elements (tmm_pe) form a systolic chain. In pass c, PE j
// holds digit A(c*N_PE + j) and, for rows i = 0..N-1 in consecutive cycles,
// adds W(i, c*N_PE + j) x A(c*N_PE + j) to the partial product of row i, so
// the last PE delivers sum_j W(i, c*N_PE + j) A(c*N_PE + j) for one pass.
// Row i reaches PE j j cycles after PE 0.
//
// Block supply. The blocks of W_Mk are block-Toeplitz: W(i, j+1) = W(i-1, j).
//  * PE 0 gets the first column of its block on h. On the first row of a
//    pass (cntin = 0) its first row is the V digit; otherwise it is the
//    previous block's first column, bit-reversed (row[c] = col_prev[L-c]).
//    The corner col[0] is v[0] on the first row of a pass.
//  * PE j > 0 on rows i >= 1 takes the block PE j-1 used two cycles before
//    (W(i-1, j-1)). On its first row it takes the row from the V bus and
//    builds the column as {rev(row of PE j-1 one cycle before), v[0]}.
// The V and A digits are broadcast on v / a_bus; the control places digit
// c*N_PE + j on them in the cycle PE j sees the first row of pass c.
//
// Timing: the product digit of the row entering PE 0 in cycle t leaves on p
// with p_vld in cycle t + N_PE. The chain structure and the bit-reversed
// derivation follow the architecture; the two-deep block history in each PE
// is this implementation's way of realising the derivation.
module tmm_core #(
  parameter int unsigned L   = 32,
  parameter int unsigned NPE = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         vld,    // a row enters PE 0 this cycle
  input  logic         cntin,  // 0: first row of a pass
  input  logic [L-1:0] h,      // first column of PE 0's block
  input  logic [L-1:0] v,      // V digit (first row of the first block)
  input  logic [L-1:0] a,      // A digit broadcast
  output logic [L-1:0] p,      // pass contribution to product digit
  output logic         p_vld
);

  logic         vld_o   [NPE];
  logic         first_o [NPE];
  logic [L-1:0] p_o     [NPE];
  logic [L-1:0] col_d1  [NPE];
  logic [L-1:0] row_d1  [NPE];
  logic [L-1:0] col_d2  [NPE];
  logic [L-1:0] row_d2  [NPE];

  logic         vld_i   [NPE];
  logic         first_i [NPE];
  logic [L-1:0] col_i   [NPE];
  logic [L-1:0] row_i   [NPE];
  logic [L-1:0] p_i     [NPE];

  // Bit reversal of positions 1..L-1 (position 0 is replaced separately).
  function automatic logic [L-1:0] rev_tail(input logic [L-1:0] x, input logic b0);
    logic [L-1:0] r;
    r[0] = b0;
    for (int k = 1; k < int'(L); k++) r[k] = x[int'(L) - k];
    return r;
  endfunction

  always_comb begin
    // PE 0
    vld_i[0]   = vld;
    first_i[0] = vld & ~cntin;
    p_i[0]     = '0;
    col_i[0]   = h;
    if (first_i[0]) begin
      col_i[0][0] = v[0];
      row_i[0]    = v;
    end else begin
      row_i[0]    = rev_tail(col_d1[0], h[0]);
    end
    // PE 1 .. NPE-1
    for (int j = 1; j < int'(NPE); j++) begin
      vld_i[j]   = vld_o[j-1];
      first_i[j] = first_o[j-1];
      p_i[j]     = p_o[j-1];
      if (first_o[j-1]) begin
        col_i[j] = rev_tail(row_d1[j-1], v[0]);
        row_i[j] = v;
      end else begin
        col_i[j] = col_d2[j-1];
        row_i[j] = row_d2[j-1];
      end
    end
  end

  for (genvar j = 0; j < int'(NPE); j++) begin : g_pe
    tmm_pe #(.L(L)) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .vld_in   (vld_i[j]),
      .first_in (first_i[j]),
      .col      (col_i[j]),
      .row      (row_i[j]),
      .a_bus    (a),
      .p_in     (p_i[j]),
      .vld_out  (vld_o[j]),
      .first_out(first_o[j]),
      .p_out    (p_o[j]),
      .col_d1   (col_d1[j]),
      .row_d1   (row_d1[j]),
      .col_d2   (col_d2[j]),
      .row_d2   (row_d2[j])
    );
  end

  assign p     = p_o[NPE-1];
  assign p_vld = vld_o[NPE-1];

endmodule
