// Full-size testbench of icmm_top with every parameter at its default
// (L = 32, S = 8, N_PE = 3). It multiplies random operands in GF(2^159)
// generated by the trinomial x^159 + x^31 + 1 (N = 5 digits, two passes),
// once with a preloaded addend C, and also runs the 9-bit worked example
// field x^9 + x^4 + 1, the largest field the memories hold (m = S*L = 256)
// and the binomial ring x^160 + 1. Each product coefficient is compared with
// a bit-serial Montgomery reference, and the latency is checked.
module tb_icmm_full;
  localparam int unsigned L    = 32;
  localparam int unsigned S    = 8;
  localparam int unsigned NPE  = 3;
  localparam int unsigned NW   = $clog2(S + 1);
  localparam int unsigned MAXB = 2 * S * L + 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge resets every flop before the first clock
  logic binomial, load_start, load_valid, exec_start;
  logic [L-1:0] v0, v1, h0, h1, dia, dip, p;
  logic [NW-1:0] n_dig, p_idx;
  logic p_valid, busy, done;

  icmm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_multipass = 0, n_above_diag = 0, n_zero_a = 0, n_gap = 0;
  int n_single_short = 0, n_binomial = 0, n_trinomial = 0, n_addc = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters from inside the design.
  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl.c3n) n_above_diag++;
    if (dut.u_ctrl.gap) n_gap++;
    if (dut.u_ctrl.rrow && dut.u_ctrl.i < NPE &&
        dut.u_ctrl.base + dut.u_ctrl.i >= dut.u_ctrl.n) n_zero_a++;
  end

  typedef logic [MAXB-1:0] poly_t;

  function automatic poly_t mont_ref(poly_t a, poly_t b, poly_t c, int m, int k, bit bin);
    poly_t t = '0, g = '0;
    for (int j = 0; j < m; j++) if (b[j]) t ^= (a << j);
    g[m] = 1'b1; g[0] = 1'b1;
    if (!bin) g[k] = 1'b1;
    if (bin) begin  // reduce modulo x^m + 1 first (cyclic fold)
      for (int j = 2 * m - 1; j >= m; j--) if (t[j]) begin t[j] = 0; t[j-m] ^= 1'b1; end
    end
    for (int s = 0; s < k; s++) begin
      if (t[0]) t ^= g;
      t = t >> 1;
    end
    // final reduction to degree < m (trinomial case)
    for (int j = 2 * m - 1; j >= m; j--) if (t[j]) t ^= (g << (j - m));
    return t ^ c;
  endfunction

  function automatic bit bitat(poly_t x, int idx); return x[idx]; endfunction

  task automatic run(int m, int k, bit bin, bit addc);
    poly_t a = '0, b = '0, c = '0, ref_p;
    int n = (m + L - 1) / L;
    int t0, tlast, got;
    logic [L-1:0] res [S];
    bit seen [S];
    for (int j = 0; j < m; j++) begin a[j] = $urandom_range(0,1); b[j] = $urandom_range(0,1);
                                       if (addc) c[j] = $urandom_range(0,1); end
    ref_p = mont_ref(a, b, c, m, k, bin);
    // load phase
    @(negedge clk); binomial = bin; load_start = 1;
    @(negedge clk); load_start = 0;
    for (int u = 0; u < n; u++) begin
      load_valid = 1;
      for (int r = 0; r < int'(L); r++) begin
        int j = u * L + r;
        v0[r] = (j < m) ? b[((2 * k - j) % m + m) % m] : 1'b0;
        v1[r] = (j < m && j >= k + 1) ? b[m + k - j] : 1'b0;
        h0[r] = (j < m) ? b[(2 * k + j) % m] : 1'b0;
        h1[r] = (j < m && j >= m - k) ? b[j - m + k] : 1'b0;
        dia[r] = (j < m) ? a[j] : 1'b0;
        dip[r] = (j < m) ? c[(k + j) % m] : 1'b0;
      end
      @(negedge clk);
    end
    load_valid = 0; v0 = '0; v1 = '0; h0 = '0; h1 = '0; dia = '0; dip = '0;
    // execution
    exec_start = 1; n_dig = NW'(n); t0 = $time / 10;
    @(negedge clk); exec_start = 0;
    foreach (seen[q]) seen[q] = 0;
    got = 0; tlast = t0;
    while (!done) begin
      if (p_valid) begin res[p_idx] = p; seen[p_idx] = 1; got++; tlast = $time / 10; end
      @(negedge clk);
    end
    // latency: exec_start cycle to last product digit
    begin
      int nc = (n + NPE - 1) / NPE;
      int rows = n * nc + ((n % 2 == 1) ? nc - 1 : 0);
      checks++;
      if (tlast - t0 != rows + NPE + 2) begin
        failures++;
        $display("latency m=%0d: got %0d expected %0d", m, tlast - t0, rows + NPE + 2);
      end
      if (nc > 1) n_multipass++;
      if (n < NPE) n_single_short++;
    end
    checks++;
    if (got != n) begin failures++; $display("m=%0d k=%0d: %0d digits, expected %0d", m, k, got, n); end
    for (int i = 0; i < n; i++) for (int r = 0; r < int'(L); r++) if (i * L + r < m) begin
      checks++;
      if (!seen[i] || res[i][r] !== bitat(ref_p, (k + i * L + r) % m)) begin
        failures++;
        if (failures < 400) $display("mismatch m=%0d k=%0d bin=%0d digit %0d bit %0d", m, k, bin, i, r);
      end
    end
    if (bin) n_binomial++; else n_trinomial++;
    if (addc) n_addc++;
  endtask

  initial begin
    binomial = 0; load_start = 0; load_valid = 0; exec_start = 0; n_dig = '0;
    v0 = '0; v1 = '0; h0 = '0; h1 = '0; dia = '0; dip = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(159, 31, 0, 0);
    run(159, 31, 0, 1);
    run(159, 31, 0, 0);
    run(9, 4, 0, 0);
    run(256, 37, 0, 1);
    run(160, 31, 1, 0);
    run(33, 2, 0, 0);
    checks += 8;
    if (n_multipass == 0)    begin failures++; $display("multi-pass never exercised"); end
    if (n_above_diag == 0)   begin failures++; $display("M_V port 2 path never exercised"); end
    if (n_zero_a == 0)       begin failures++; $display("zero A padding never exercised"); end
    if (n_gap == 0)          begin failures++; $display("idle cycle never exercised"); end
    if (n_single_short == 0) begin failures++; $display("N < N_PE never exercised"); end
    if (n_binomial == 0)     begin failures++; $display("binomial mode never exercised"); end
    if (n_trinomial == 0)    begin failures++; $display("trinomial mode never exercised"); end
    if (n_addc == 0)         begin failures++; $display("C addend never exercised"); end
    $display("mechanisms: multipass=%0d above_diag=%0d zero_a=%0d gap=%0d short=%0d bin=%0d tri=%0d addc=%0d",
             n_multipass, n_above_diag, n_zero_a, n_gap, n_single_short, n_binomial, n_trinomial, n_addc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
