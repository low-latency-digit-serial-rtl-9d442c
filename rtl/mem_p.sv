// Memory system M_P: accumulator for the product digits P_L(i).
//
// Digit i sits at address i. During execution digit i is read (port 1, rd)
// one cycle before the core delivers its pass contribution, and the sum is
// written back (port 2) in the next cycle, while digit i+1 is read. The
// read and the write in one cycle therefore hit neighbouring addresses, so
// the S words are kept in two RAMs of S/2 words interleaved by the address
// LSB, each with one port.
//
// Address generator: one up-counter gives the read address (rd_addr); it
// advances after every rd or ld and is cleared by cnt_rst (clearing has
// priority, the access of that cycle still uses the old address). The write
// strobe is wr = ld | (rd delayed by one cycle); the write address is the
// counter during loading (ld) and the delayed read address otherwise. The
// output multiplexer is steered by the registered LSB of the read address.
//
// Timing: dout holds the word read in the previous cycle. Structure after
// the architecture; S must be a power of two of at least 4.
module mem_p #(
  parameter int unsigned L = 32,
  parameter int unsigned S = 8,
  localparam int unsigned D = (S > 2) ? $clog2(S) : 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cnt_rst,
  input  logic         ld,
  input  logic         rd,
  input  logic [L-1:0] di,
  output logic [L-1:0] dout
);

  localparam int unsigned SP = S / 2;

  logic [L-1:0] bank0 [SP];
  logic [L-1:0] bank1 [SP];
  logic [L-1:0] q0, q1;
  logic [D-1:0] cnt, rd_addr_q, wr_addr;
  logic         rd_q, wr, sel;
  logic         wr0, wr1, rd0, rd1;
  logic [D-2:0] addr0, addr1;

  always_comb begin
    wr      = ld | rd_q;
    wr_addr = ld ? cnt : rd_addr_q;
    wr0     = wr & ~wr_addr[0];
    wr1     = wr &  wr_addr[0];
    rd0     = rd & ~cnt[0];
    rd1     = rd &  cnt[0];
    addr0   = wr0 ? wr_addr[D-1:1] : cnt[D-1:1];
    addr1   = wr1 ? wr_addr[D-1:1] : cnt[D-1:1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_q <= 1'b0;
    else        rd_q <= rd;
  end

  always_ff @(posedge clk) begin
    if (cnt_rst)        cnt <= '0;
    else if (rd || ld)  cnt <= cnt + 1'b1;
    if (rd) begin
      rd_addr_q <= cnt;
      sel       <= cnt[0];
    end
  end

  always_ff @(posedge clk) begin
    if (wr0)      bank0[addr0] <= di;
    else if (rd0) q0 <= bank0[addr0];
    if (wr1)      bank1[addr1] <= di;
    else if (rd1) q1 <= bank1[addr1];
  end

  assign dout = sel ? q1 : q0;

  initial assert (S >= 4 && (S & (S - 1)) == 0)
    else $error("mem_p: S must be a power of two of at least 4");

  // A read and a write-back must never meet in one bank.
  assert property (@(posedge clk) !(rd && wr && (cnt[0] == wr_addr[0])))
    else $error("mem_p: read and write-back address the same bank");

endmodule
