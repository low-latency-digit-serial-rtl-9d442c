// Self-checking testbench of mem_v (L = 8, S = 16). Loads S random words
// through port 1, then for several start points b plays the execution
// pattern: port 1 reads upward from b while port 2, whose down-counter was
// loaded from the up-counter, reads downward from b - 1, both in the same
// cycles. Both outputs are compared with the stored words one cycle after
// each read.
module tb_mem_v;
  localparam int unsigned L = 8;
  localparam int unsigned S = 16;
  logic clk = 0;
  logic cnt_rst, ld, rd1, ld2, rd2;
  logic [L-1:0] di, do1, do2;
  logic [L-1:0] mem [S];
  int checks = 0, failures = 0;

  mem_v #(.L(L), .S(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt_rst = 0; ld = 0; rd1 = 0; ld2 = 0; rd2 = 0; di = '0;
    @(negedge clk); cnt_rst = 1; @(negedge clk); cnt_rst = 0;
    for (int k = 0; k < int'(S); k++) begin
      mem[k] = $urandom; di = mem[k]; ld = 1; @(negedge clk);
    end
    ld = 0;
    for (int b = 1; b < int'(S); b += 3) begin
      // bring the up-counter to b: reset, then b single reads on port 1
      cnt_rst = 1; @(negedge clk); cnt_rst = 0;
      for (int k = 0; k < b; k++) begin rd1 = 1; @(negedge clk); end
      rd1 = 0;
      // load the down-counter with up - 1 = b - 1
      ld2 = 1; @(negedge clk); ld2 = 0;
      for (int k = 0; k < b && b + k < int'(S); k++) begin
        rd1 = 1; rd2 = 1; @(negedge clk);
        checks += 2;
        if (do1 !== mem[b + k])     begin failures++; $display("do1 b=%0d k=%0d", b, k); end
        if (do2 !== mem[b - 1 - k]) begin failures++; $display("do2 b=%0d k=%0d", b, k); end
      end
      rd1 = 0; rd2 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
