// Workload testbench: multiplication in GF(2^159), trinomial
// x^159 + x^31 + 1, on the synthesis configurations that can hold a
// 159-bit operand (N = ceil(159/L) <= S):
//   L=32, S=8,  N_PE = 3, 9, 27   (N = 5)
//   L=16, S=16, N_PE = 3          (N = 10)
//   L=16, S=32, N_PE = 3          (N = 10)
//   L=8,  S=32, N_PE = 3          (N = 20)
// and, since no table memory depth holds 40 four-bit digits, one build
// with deeper memories for the 4-bit column:
//   L=4,  S=64, N_PE = 3          (N = 40, 14 passes)
// Each configuration runs random products, with and without an addend C,
// checked bit by bit against a Montgomery reference (see icmm_runner).
module tb_icmm_m159;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NR = 7;
  int   ck [NR];
  int   fl [NR];
  logic fin [NR];

  icmm_runner #(.L(32), .S(8),  .NPE(3),  .REPS(3)) r0 (.clk, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  icmm_runner #(.L(32), .S(8),  .NPE(9),  .REPS(3)) r1 (.clk, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  icmm_runner #(.L(32), .S(8),  .NPE(27), .REPS(3)) r2 (.clk, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  icmm_runner #(.L(16), .S(16), .NPE(3),  .REPS(3)) r3 (.clk, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  icmm_runner #(.L(16), .S(32), .NPE(3),  .REPS(3)) r4 (.clk, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  icmm_runner #(.L(8),  .S(32), .NPE(3),  .REPS(3)) r5 (.clk, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));
  icmm_runner #(.L(4),  .S(64), .NPE(3),  .REPS(2)) r6 (.clk, .checks(ck[6]), .failures(fl[6]), .finished(fin[6]));

  int checks, failures;
  task automatic report(bit timeout);
    checks = 0; failures = timeout ? 1 : 0;
    for (int q = 0; q < NR; q++) begin checks += ck[q]; failures += fl[q]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int q = 0; q < NR; q++) all &= fin[q];
    end while (!all);
    report(0);
    $finish;
  end
endmodule
