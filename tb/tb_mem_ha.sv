// Self-checking testbench of mem_ha (L = 8, S = 8). Loads S random words
// after a reload to 0, reads them back in order (data one cycle after the
// read strobe), then reloads to a middle address and checks that reading
// continues from there and wraps at S; dout must hold between reads.
module tb_mem_ha;
  localparam int unsigned L = 8;
  localparam int unsigned S = 8;
  localparam int unsigned D = $clog2(S);
  logic clk = 0;
  logic [D-1:0] value;
  logic reload, ld, rd;
  logic [L-1:0] di, dout;
  logic [L-1:0] mem [S];
  int checks = 0, failures = 0;

  mem_ha #(.L(L), .S(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int addr);
    rd = 1; @(negedge clk); rd = 0;
    checks++;
    if (dout !== mem[addr]) begin failures++; $display("addr %0d: %h vs %h", addr, dout, mem[addr]); end
  endtask

  initial begin
    value = '0; reload = 0; ld = 0; rd = 0; di = '0;
    @(negedge clk); reload = 1; @(negedge clk); reload = 0;
    for (int k = 0; k < int'(S); k++) begin
      mem[k] = $urandom; di = mem[k]; ld = 1; @(negedge clk);
    end
    ld = 0;
    reload = 1; @(negedge clk); reload = 0;
    for (int k = 0; k < int'(S); k++) read_check(k);
    // hold: no read, output unchanged
    repeat (2) @(negedge clk);
    checks++; if (dout !== mem[S-1]) failures++;
    value = D'(5); reload = 1; @(negedge clk); reload = 0;
    for (int k = 0; k < 6; k++) read_check((5 + k) % S);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
