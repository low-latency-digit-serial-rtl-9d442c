// Sweep testbench over further builds of icmm_top: N_PE = 3 with 2-bit
// digits and 16-word memories (up to 6 passes), a single processing
// element (N_PE = 1, one pass per digit), and N_PE larger than the digit
// count. Several field sizes and middle terms per build, trinomial and
// binomial, with and without an addend C (see icmm_runner).
module tb_icmm_sweep;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NR = 4;
  int   ck [NR];
  int   fl [NR];
  logic fin [NR];

  icmm_runner #(.L(2), .S(16), .NPE(3), .M0(31), .K0(3),  .M1(22), .K1(11), .REPS(6))
    r0 (.clk, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  icmm_runner #(.L(4), .S(8),  .NPE(1), .M0(29), .K0(2),  .M1(17), .K1(3),  .REPS(6))
    r1 (.clk, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  icmm_runner #(.L(5), .S(4),  .NPE(7), .M0(17), .K0(5),  .M1(6),  .K1(1),  .REPS(6))
    r2 (.clk, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  icmm_runner #(.L(3), .S(8),  .NPE(4), .M0(23), .K0(9),  .M1(13), .K1(4),  .REPS(6))
    r3 (.clk, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));

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
