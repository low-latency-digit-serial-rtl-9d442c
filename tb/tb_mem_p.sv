// Self-checking testbench of mem_p (L = 8, S = 8). Preloads N words, then
// runs several accumulation passes like the execution phase: one read per
// cycle (rd), and in the next cycle the write-back of dout XOR a random
// addend (the write strobe and address come from the memory itself). The
// address is cleared with the last read of each pass. A final pass checks
// every word against a model of the accumulated values.
module tb_mem_p;
  localparam int unsigned L = 8;
  localparam int unsigned S = 8;
  localparam int unsigned N = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge resets every flop before the first clock
  logic cnt_rst, ld, rd;
  logic [L-1:0] di, dout;
  logic [L-1:0] model [S];
  int checks = 0, failures = 0;

  mem_p #(.L(L), .S(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [L-1:0] addend;

  logic [L-1:0] di_load;
  // Write-back data: what was read, plus the addend of that word.
  always_comb di = ld ? di_load : (dout ^ addend);

  initial begin
    cnt_rst = 0; ld = 0; rd = 0; di_load = '0; addend = '0;
    @(negedge clk); rst_n = 1;
    cnt_rst = 1; @(negedge clk); cnt_rst = 0;
    for (int k = 0; k < int'(N); k++) begin
      model[k] = $urandom; di_load = model[k]; ld = 1; @(negedge clk);
    end
    ld = 0;
    cnt_rst = 1; @(negedge clk); cnt_rst = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int k = 0; k <= int'(N); k++) begin
        // cycle k: read word k (if k < N), write back word k-1
        rd = (k < int'(N));
        cnt_rst = (k == int'(N) - 1);
        if (k > 0) begin
          checks++;
          if (dout !== model[k-1]) begin failures++; $display("pass %0d word %0d", pass, k-1); end
          addend = $urandom;
          model[k-1] = model[k-1] ^ addend;
        end
        @(negedge clk);
      end
      rd = 0; cnt_rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
