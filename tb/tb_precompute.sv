// Self-checking testbench of precompute: random digit streams, both modes.
// Expected values: row = v0 ^ v1, col = h0 ^ h1 for trinomials; the
// correction streams are ignored in binomial mode.
module tb_precompute;
  localparam int unsigned L = 32;
  logic binomial;
  logic [L-1:0] v0, v1, h0, h1, w_row, w_col;
  int checks = 0, failures = 0;

  precompute #(.L(L)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      binomial = n[0];
      v0 = $urandom; v1 = $urandom; h0 = $urandom; h1 = $urandom;
      #1;
      checks += 2;
      if (w_row !== (binomial ? v0 : (v0 ^ v1))) failures++;
      if (w_col !== (binomial ? h0 : (h0 ^ h1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
