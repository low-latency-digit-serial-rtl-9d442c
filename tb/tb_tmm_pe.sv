// Self-checking testbench of tmm_pe (L = 5). Each cycle a random Toeplitz
// block t[d], d = -(L-1)..L-1, is given by its first column and first row;
// the expected p_out (one cycle later) is p_in plus the explicit
// matrix-vector product sum_c t[r-c] a[c]. The A digit is taken on the
// first row of a pass and must be held for the following rows; the block
// history outputs must show the blocks of one and two cycles before.
module tb_tmm_pe;
  localparam int unsigned L = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge resets every flop before the first clock
  logic vld_in, first_in, vld_out, first_out;
  logic [L-1:0] col, row, a_bus, p_in, p_out, col_d1, row_d1, col_d2, row_d2;
  int checks = 0, failures = 0;

  tmm_pe #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L-1:0] a_held, exp_p, col_q, row_q, col_qq;
  logic         exp_first;

  initial begin
    vld_in = 0; first_in = 0; col = '0; row = '0; a_bus = '0; p_in = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      bit t [2*L-1];
      foreach (t[q]) t[q] = 1'($urandom);
      for (int r = 0; r < int'(L); r++) begin
        col[r] = t[L-1+r];
        row[r] = t[L-1-r];
      end
      vld_in   = 1;
      first_in = (n % 4 == 0);
      a_bus    = $urandom;
      p_in     = $urandom;
      if (first_in) a_held = a_bus;
      exp_p = p_in;
      for (int r = 0; r < int'(L); r++)
        for (int c = 0; c < int'(L); c++)
          exp_p[r] = exp_p[r] ^ (t[L-1+r-c] & a_held[c]);
      exp_first = first_in;
      col_qq = col_q; col_q = col; row_q = row;
      @(negedge clk);
      checks += 3;
      if (p_out !== exp_p)        begin failures++; $display("p mismatch at %0d", n); end
      if (first_out !== exp_first || !vld_out) failures++;
      if (col_d1 !== col_q || row_d1 !== row_q) failures++;
      if (n > 0) begin
        checks++;
        if (col_d2 !== col_qq) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
