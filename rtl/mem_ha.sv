// Memory system M_H / M_A: S words of L bits with an internal address
// generator.
//
// A single-port RAM is addressed by a d-bit counter (d = clog2(S)). The
// counter is loaded with `value` when `reload` is 1; otherwise it advances by
// one after every access, i.e. when `ld` or `rd` is 1 (the OR of the two is
// the counter's increment enable). `ld` writes `di` at the current address,
// `rd` reads the current address; words sit in ascending order from address
// 0. M_H holds the first-column digits of W_Mk, M_A the digits of A.
//
// Timing: the read is synchronous; the word read in cycle t is on `dout`
// from cycle t+1 until the next read. A reload takes effect for the access
// of the next cycle (reload has priority over the increment). ld and rd are
// never both 1. The structure follows the architecture; S must be a power
// of two here so that the counter wraps at S.
module mem_ha #(
  parameter int unsigned L = 32,
  parameter int unsigned S = 8,
  localparam int unsigned D = (S > 1) ? $clog2(S) : 1
) (
  input  logic         clk,
  input  logic [D-1:0] value,
  input  logic         reload,
  input  logic         ld,
  input  logic [L-1:0] di,
  input  logic         rd,
  output logic [L-1:0] dout
);

  logic [L-1:0] ram [S];
  logic [D-1:0] addr;

  always_ff @(posedge clk) begin
    if (reload)        addr <= value;
    else if (ld || rd) addr <= addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ld) ram[addr] <= di;
    if (rd) dout <= ram[addr];
  end

  initial assert (S >= 2 && (S & (S - 1)) == 0)
    else $error("mem_ha: S must be a power of two");

  assert property (@(posedge clk) !(ld && rd))
    else $error("mem_ha: ld and rd in the same cycle");

endmodule
