// Self-checking testbench of icmm_ctrl (S = 16, N_PE = 3). For every digit
// count N = 1..S it runs one execution and counts the strobes, comparing
// with values worked out from the schedule:
//   rows entering the core = N*N_c, first rows (c1 = 0) = N_c,
//   M_H reads (c6) = sum_c (N - c*N_PE), M_V port-2 reads (c3n) = sum_c c*N_PE,
//   A/V reads (c5) = N, down-counter loads (c9) = N_c - 1,
//   M_P reads = N*N_c, M_P address clears (c81) = N_c,
//   product digits (out_valid) = N, in order 0..N-1,
//   latency exec_start -> last out_valid = rows + N_PE + 2,
//   idle cycles between passes = N_c - 1 for odd N, else 0.
// It also checks the loading strobes (c8/c7 on load_start, c4 = load_valid).
module tb_icmm_ctrl;
  import icmm_pkg::*;
  localparam int unsigned S   = 16;
  localparam int unsigned NPE = 3;
  localparam int unsigned NW  = $clog2(S + 1);

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge resets every flop before the first clock
  logic load_start, load_valid, exec_start;
  logic [NW-1:0] n_dig, out_idx;
  ctrl_t ctrl;
  logic core_vld, a_vld, out_valid, busy, done;
  int checks = 0, failures = 0;

  icmm_ctrl #(.S(S), .NPE(NPE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int n);
    checks++;
    if (got != exp) begin failures++; $display("N=%0d %s: %0d, expected %0d", n, what, got, exp); end
  endtask

  initial begin
    load_start = 0; load_valid = 0; exec_start = 0; n_dig = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // loading strobes
    load_start = 1; #1;
    checks++; if (!(ctrl.c8 && ctrl.c7 && !ctrl.c4)) failures++;
    @(negedge clk); load_start = 0; load_valid = 1; #1;
    checks++; if (!(ctrl.c4 && !ctrl.c8 && !ctrl.c61)) failures++;
    @(negedge clk); load_valid = 0;
    for (int n = 1; n <= int'(S); n++) begin
      automatic int nc = (n + NPE - 1) / NPE;
      automatic int rows = n * nc + ((n % 2 == 1) ? nc - 1 : 0);
      automatic int e_c6 = 0, e_c3n = 0;
      automatic int vld = 0, firsts = 0, c6 = 0, c3n = 0, c5 = 0, c9 = 0, mprd = 0, c81 = 0;
      automatic int outs = 0, gaps = 0, cyc = 0, t_last = 0;
      automatic bit order_ok = 1;
      for (int c = 0; c < nc; c++) begin e_c6 += n - c * NPE; e_c3n += c * NPE; end
      exec_start = 1; n_dig = NW'(n);
      @(negedge clk); exec_start = 0; cyc = 1;
      while (!done && cyc < 1000) begin
        if (core_vld) vld++;
        if (core_vld && !ctrl.c1) firsts++;
        if (ctrl.c6) c6++;
        if (ctrl.c3n) c3n++;
        if (ctrl.c5) c5++;
        if (ctrl.c9) c9++;
        if (ctrl.mp_rd) mprd++;
        if (ctrl.c81) c81++;
        if (dut.gap) gaps++;
        if (out_valid) begin
          if (int'(out_idx) != outs) order_ok = 0;
          outs++; t_last = cyc;
        end
        @(negedge clk); cyc++;
      end
      expect_eq("rows", vld, n * nc, n);
      expect_eq("first rows", firsts, nc, n);
      expect_eq("c6", c6, e_c6, n);
      expect_eq("c3n", c3n, e_c3n, n);
      expect_eq("c5", c5, n, n);
      expect_eq("c9", c9, nc - 1, n);
      expect_eq("mp_rd", mprd, n * nc, n);
      expect_eq("c81", c81, nc, n);
      expect_eq("outputs", outs, n, n);
      expect_eq("order", int'(order_ok), 1, n);
      expect_eq("latency", t_last, rows + NPE + 2, n);
      expect_eq("gaps", gaps, (n % 2 == 1) ? nc - 1 : 0, n);
      @(negedge clk);
      expect_eq("idle after done", int'(busy), 0, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
