// Testbench helper: one icmm_top instance with its own parameters and a
// driver that runs REPS random multiplications for each (m, k) in a list,
// trinomial mode, every second one with a preloaded addend C, and for every
// BIN_EVERY-th one in binomial mode. Each product coefficient is compared
// with a bit-serial Montgomery reference (A*B, then k times: add G if bit 0
// is set, shift right), and the latency exec_start -> last product digit
// with rows + N_PE + 2 (rows = N*N_c, plus N_c - 1 idle cycles for odd N).
// Reports its counts on checks/failures and raises finished at the end.
module icmm_runner #(
  parameter int unsigned L    = 16,
  parameter int unsigned S    = 16,
  parameter int unsigned NPE  = 3,
  parameter int          M0   = 159,
  parameter int          K0   = 31,
  parameter int          M1   = 0,     // second field size, 0 = none
  parameter int          K1   = 0,
  parameter int          REPS = 2
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned NW   = $clog2(S + 1);
  localparam int unsigned MAXB = 2 * S * L + 2;

  logic rst_n;
  logic binomial, load_start, load_valid, exec_start;
  logic [L-1:0] v0, v1, h0, h1, dia, dip, p;
  logic [NW-1:0] n_dig, p_idx;
  logic p_valid, busy, done;

  icmm_top #(.L(L), .S(S), .NPE(NPE)) dut (.*);

  typedef logic [MAXB-1:0] poly_t;

  function automatic poly_t mont_ref(poly_t a, poly_t b, poly_t c, int m, int k, bit bin);
    poly_t t, g;
    t = '0; g = '0;
    for (int j = 0; j < m; j++) if (b[j]) t ^= (a << j);
    g[m] = 1'b1; g[0] = 1'b1;
    if (!bin) g[k] = 1'b1;
    if (bin)
      for (int j = 2 * m - 1; j >= m; j--) if (t[j]) begin t[j] = 1'b0; t[j-m] ^= 1'b1; end
    for (int s = 0; s < k; s++) begin
      if (t[0]) t ^= g;
      t = t >> 1;
    end
    for (int j = 2 * m - 1; j >= m; j--) if (t[j]) t ^= (g << (j - m));
    return t ^ c;
  endfunction

  task automatic run(int m, int k, bit bin, bit addc);
    poly_t a, b, c, ref_p;
    automatic int n = (m + L - 1) / L;
    automatic int nc = (n + NPE - 1) / NPE;
    automatic int rows = n * nc + ((n % 2 == 1) ? nc - 1 : 0);
    int t0, tlast, cyc;
    logic [L-1:0] res [S];
    a = '0; b = '0; c = '0;
    for (int j = 0; j < m; j++) begin
      a[j] = 1'($urandom); b[j] = 1'($urandom);
      if (addc) c[j] = 1'($urandom);
    end
    ref_p = mont_ref(a, b, c, m, k, bin);
    @(negedge clk); binomial = bin; load_start = 1;
    @(negedge clk); load_start = 0;
    for (int u = 0; u < n; u++) begin
      load_valid = 1;
      for (int r = 0; r < int'(L); r++) begin
        automatic int j = u * int'(L) + r;
        v0[r]  = (j < m) ? b[((2 * k - j) % m + m) % m] : 1'b0;
        v1[r]  = (j < m && j >= k + 1) ? b[m + k - j] : 1'b0;
        h0[r]  = (j < m) ? b[(2 * k + j) % m] : 1'b0;
        h1[r]  = (j < m && j >= m - k) ? b[j - m + k] : 1'b0;
        dia[r] = (j < m) ? a[j] : 1'b0;
        dip[r] = (j < m) ? c[(k + j) % m] : 1'b0;
      end
      @(negedge clk);
    end
    load_valid = 0;
    exec_start = 1; n_dig = NW'(n);
    @(negedge clk); exec_start = 0;
    cyc = 1; tlast = 0; t0 = 0;
    while (!done && cyc < 100000) begin
      if (p_valid) begin res[int'(p_idx)] = p; tlast = cyc; t0++; end
      @(negedge clk); cyc++;
    end
    checks += 2;
    if (t0 != n) begin failures++; $display("L=%0d NPE=%0d m=%0d: %0d digits", L, NPE, m, t0); end
    if (tlast != rows + int'(NPE) + 2) begin
      failures++;
      $display("L=%0d NPE=%0d m=%0d: latency %0d, expected %0d", L, NPE, m, tlast, rows + NPE + 2);
    end
    for (int i = 0; i < n; i++)
      for (int r = 0; r < int'(L); r++)
        if (i * int'(L) + r < m) begin
          checks++;
          if (res[i][r] !== ref_p[(k + i * int'(L) + r) % m]) failures++;
        end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0; rst_n = 1;
    #1 rst_n = 0;
    binomial = 0; load_start = 0; load_valid = 0; exec_start = 0; n_dig = '0;
    v0 = '0; v1 = '0; h0 = '0; h1 = '0; dia = '0; dip = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < REPS; rep++) begin
      run(M0, K0, 0, rep[0]);
      if (M1 > 0) run(M1, K1, rep[1], rep[0]);
    end
    finished = 1;
  end
endmodule
