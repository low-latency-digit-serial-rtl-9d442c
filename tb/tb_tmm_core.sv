// Self-checking testbench of tmm_core (L = 3, N_PE = 3). A random m x m
// Toeplitz matrix W (entries t[d]) and a random A are drawn, with N digits.
// For each pass c the testbench plays the part of the memories: it feeds
// PE 0 the first column of block (i, c*N_PE) on h for rows i = 0..N-1 and
// puts the V digit (first row of block (0, c*N_PE + j)) and the A digit
// c*N_PE + j on the broadcast buses in the cycle PE j starts the pass. The
// core output of row i must equal sum_j W(i, c*N_PE + j) A(c*N_PE + j),
// computed here from the full matrix, N_PE cycles after the row entered.
module tb_tmm_core;
  localparam int unsigned L   = 3;
  localparam int unsigned NPE = 3;
  localparam int unsigned N   = 5;
  localparam int unsigned M   = N * L;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge resets every flop before the first clock
  logic vld, cntin, p_vld;
  logic [L-1:0] h, v, a, p;
  int checks = 0, failures = 0;

  tmm_core #(.L(L), .NPE(NPE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit tt [2*M-1];          // t[d] stored at d + M - 1
  bit av [N*L + NPE*L];     // A, zero padded
  function automatic bit t_at(int d); return tt[d + M - 1]; endfunction

  logic [L-1:0] expq [$];

  // Expected output of row i in pass c.
  function automatic logic [L-1:0] expect_row(int i, int c);
    logic [L-1:0] y;
    y = '0;
    for (int j = 0; j < int'(NPE); j++) begin
      automatic int col_blk = c * NPE + j;
      if (col_blk < int'(N))
        for (int r = 0; r < int'(L); r++)
          for (int q = 0; q < int'(L); q++)
            y[r] ^= t_at((i - col_blk) * L + r - q) & av[col_blk * L + q];
    end
    return y;
  endfunction

  // Output monitor.
  logic [L-1:0] e;
  always @(negedge clk) if (rst_n && p_vld) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (p !== e) begin failures++; $display("core mismatch %b vs %b", p, e); end
    end
  end

  initial begin
    vld = 0; cntin = 0; h = '0; v = '0; a = '0;
    for (int rep = 0; rep < 20; rep++) begin
      foreach (tt[q]) tt[q] = 1'($urandom);
      foreach (av[q]) av[q] = (q < int'(N*L)) ? 1'($urandom) : 1'b0;
      @(negedge clk); rst_n = 1;
      for (int c = 0; c * int'(NPE) < int'(N); c++) begin
        for (int cyc = 0; cyc < int'(N); cyc++) begin
          automatic int d  = (cyc - c * NPE) * L;    // diagonal offset of PE 0's block
          automatic int jb = c * NPE + cyc;          // column block of PE cyc's first row
          vld   = 1;
          cntin = (cyc != 0);
          for (int r = 0; r < int'(L); r++) h[r] = t_at(d + r);
          v = '0; a = '0;
          if (cyc < int'(NPE)) begin
            for (int q = 0; q < int'(L); q++) begin
              v[q] = t_at(-jb * L - q);
              a[q] = (jb < int'(N)) ? av[jb * L + q] : 1'b0;
            end
          end
          expq.push_back(expect_row(cyc, c));
          @(negedge clk);
        end
        // PEs still starting after the last row of a short pass
        vld = 0;
      end
      vld = 0; v = '0; a = '0;
      repeat (NPE + 2) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
