// In-circuit configurable Montgomery multiplier (ICMM) over GF(2^m).
//
// Computes P = A * B * x^-k mod G(x) (+ C), with G = x^m + x^k + 1 (any
// trinomial) or G = x^m + 1 (the ring in which all-one-polynomial fields are
// embedded). m and k are not parameters of the hardware: the operand B
// enters as the first row and first column of the Toeplitz matrix W_Mk,
// split into the binomial part (v0, h0) and the trinomial correction
// (v1, h1), so any m up to S*L and any k can be used without changing the
// circuit. The product is built by a chain of N_PE processing elements that
// each multiply an L x L Toeplitz block by one L-bit digit of A.
//
// Datapath (after the architecture's integration diagram):
//   precompute -> M_H (first-column digits), M_V (first-row digits)
//   dia        -> M_A (digits of A)
//   dip / sum  -> M_P (product accumulator, preload 0 or C)
//   PE 0 column: c2/c3 select M_H or {registered M_V port-2 bit 0,
//   bit-reversed (BR) M_V port-2 digit}; V = M_V port 1; A = M_A.
//   p = M_P output XOR core output, written back into M_P.
//
// Use: pulse load_start; then for N cycles hold load_valid with one digit
// of each stream (digit 0 first). Pulse exec_start with n_dig = N. Product
// digits appear on p with p_valid and p_idx in the last pass; done pulses
// after the last one. Digit i of the product holds the coefficients
// p_{(k + i*L + r) mod m}, r = 0..L-1 (bit r), valid while i*L + r < m;
// C must be preloaded in the same order. A digit u holds a_{u*L + r}.
// Latency: N load cycles, then N*N_c + N_PE + 2 cycles from exec_start to
// the last product digit (N_c = ceil(N / N_PE)), plus N_c - 1 idle cycles
// when N is odd. Clock period: an L-input AND-XOR tree.
// The block structure and wiring follow the architecture's integration
// diagram; the corner-bit register h0_q, the zero forcing of the A bus and
// the p_valid/p_idx/busy/done outputs are this implementation's additions.
module icmm_top
  import icmm_pkg::*;
#(
  parameter int unsigned L   = 32,
  parameter int unsigned S   = 8,
  parameter int unsigned NPE = 3,
  localparam int unsigned NW = $clog2(S + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          binomial,
  input  logic          load_start,
  input  logic          load_valid,
  input  logic [L-1:0]  v0,
  input  logic [L-1:0]  v1,
  input  logic [L-1:0]  h0,
  input  logic [L-1:0]  h1,
  input  logic [L-1:0]  dia,
  input  logic [L-1:0]  dip,
  input  logic          exec_start,
  input  logic [NW-1:0] n_dig,
  output logic [L-1:0]  p,
  output logic          p_valid,
  output logic [NW-1:0] p_idx,
  output logic          busy,
  output logic          done
);

  ctrl_t        ctrl;
  logic         core_vld, a_vld;
  logic [L-1:0] w_row, w_col;
  logic [L-1:0] mh_do, ma_do, mv_do1, mv_do2, mp_do, mp_di;
  logic [L-1:1] br;
  logic [L-1:0] h_core, a_bus, core_p, p_sum;
  logic         h0_q;
  logic         core_pv;

  icmm_ctrl #(.S(S), .NPE(NPE)) u_ctrl (
    .clk, .rst_n, .load_start, .load_valid, .exec_start, .n_dig,
    .ctrl, .core_vld, .a_vld,
    .out_valid(p_valid), .out_idx(p_idx), .busy, .done
  );

  precompute #(.L(L)) u_pre (
    .binomial, .v0, .v1, .h0, .h1, .w_row, .w_col
  );

  mem_ha #(.L(L), .S(S)) u_mh (
    .clk, .value('0), .reload(ctrl.c7), .ld(ctrl.c4), .di(w_col),
    .rd(ctrl.c6), .dout(mh_do)
  );

  mem_v #(.L(L), .S(S)) u_mv (
    .clk, .cnt_rst(ctrl.c8), .ld(ctrl.c4), .di(w_row),
    .rd1(ctrl.c5), .ld2(ctrl.c9), .rd2(ctrl.c3n), .do1(mv_do1), .do2(mv_do2)
  );

  mem_ha #(.L(L), .S(S)) u_ma (
    .clk, .value('0), .reload(ctrl.c8), .ld(ctrl.c4), .di(dia),
    .rd(ctrl.c5), .dout(ma_do)
  );

  // BR: bit reversal of positions 1..L-1 of the M_V port 2 digit.
  always_comb begin
    for (int r = 1; r < int'(L); r++) br[r] = mv_do2[int'(L) - r];
  end

  // Corner element t_D of a block above the diagonal: bit 0 of the digit
  // port 2 delivered one row earlier.
  always_ff @(posedge clk) h0_q <= mv_do2[0];

  always_comb begin
    h_core[0]     = ctrl.c2 ? mh_do[0]     : h0_q;
    h_core[L-1:1] = ctrl.c3 ? mh_do[L-1:1] : br[L-1:1];
    a_bus         = a_vld ? ma_do : '0;
  end

  tmm_core #(.L(L), .NPE(NPE)) u_core (
    .clk, .rst_n, .vld(core_vld), .cntin(ctrl.c1), .h(h_core), .v(mv_do1),
    .a(a_bus), .p(core_p), .p_vld(core_pv)
  );

  assign p_sum = mp_do ^ core_p;
  assign mp_di = ctrl.c61 ? p_sum : dip;
  assign p     = p_sum;

  // Every write-back of the accumulator must meet a valid core output.
  logic wb_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_q <= 1'b0;
    else        wb_q <= ctrl.mp_rd;
  end
  assert property (@(posedge clk) wb_q |-> core_pv)
    else $error("icmm_top: write-back without a core result");

  mem_p #(.L(L), .S(S)) u_mp (
    .clk, .rst_n, .cnt_rst(ctrl.c8 | ctrl.c81), .ld(ctrl.c4), .rd(ctrl.mp_rd),
    .di(mp_di), .dout(mp_do)
  );

endmodule
