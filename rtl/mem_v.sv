// Memory system M_V: first-row digits of W_Mk, with two read ports.
//
// During execution the digits are read in two bursts at once: port 1 climbs
// from c*N_PE, port 2 descends from c*N_PE - 1. Two neighbouring or
// opposite-parity addresses never share the LSB, so the S words are kept in
// two RAMs of S/2 words each, interleaved by the address LSB (bank 0 holds
// even addresses, bank 1 odd ones). Each bank has one port.
//
// Address generator: an up-counter (rdwr_addr1) advances on every port-1
// access (rd1 or ld) and is cleared by cnt_rst; a down-counter (rd_addr2) is
// loaded by ld2 from the up-counter, one below its current value (the last
// address port 1 read), and steps down after every port-2 read (rd2). A bank serves port 2 when rd2 is 1 and the
// down-counter's LSB selects it, otherwise port 1. Reads are synchronous; the
// registered address LSBs (sel1, sel2) steer the bank outputs onto do1/do2
// one cycle after the read. ld writes di through port 1.
//
// The two-bank organisation, the counters and the output multiplexers
// follow the architecture; the exact priority of the signals is this
// implementation's. S must be an even power of two.
module mem_v #(
  parameter int unsigned L = 32,
  parameter int unsigned S = 8,
  localparam int unsigned D = (S > 2) ? $clog2(S) : 2
) (
  input  logic         clk,
  input  logic         cnt_rst,
  input  logic         ld,
  input  logic [L-1:0] di,
  input  logic         rd1,
  input  logic         ld2,
  input  logic         rd2,
  output logic [L-1:0] do1,
  output logic [L-1:0] do2
);

  localparam int unsigned SP = S / 2;

  logic [L-1:0] bank0 [SP];
  logic [L-1:0] bank1 [SP];
  logic [L-1:0] q0, q1;
  logic [D-1:0] up, dn;
  logic         sel1, sel2;

  logic         p2_b0, p2_b1;   // port 2 uses bank 0 / bank 1
  logic         en0, en1, we0, we1;
  logic [D-2:0] addr0, addr1;

  always_comb begin
    p2_b0 = rd2 & ~dn[0];
    p2_b1 = rd2 &  dn[0];
    en0   = p2_b0 | ((rd1 | ld) & ~up[0]);
    en1   = p2_b1 | ((rd1 | ld) &  up[0]);
    we0   = ld & ~up[0];
    we1   = ld &  up[0];
    addr0 = p2_b0 ? dn[D-1:1] : up[D-1:1];
    addr1 = p2_b1 ? dn[D-1:1] : up[D-1:1];
  end

  always_ff @(posedge clk) begin
    if (cnt_rst)        up <= '0;
    else if (rd1 || ld) up <= up + 1'b1;
    if (ld2)            dn <= up - 1'b1;
    else if (rd2)       dn <= dn - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we0)      bank0[addr0] <= di;
    else if (en0) q0 <= bank0[addr0];
    if (we1)      bank1[addr1] <= di;
    else if (en1) q1 <= bank1[addr1];
    if (rd1) sel1 <= up[0];
    if (rd2) sel2 <= dn[0];
  end

  assign do1 = sel1 ? q1 : q0;
  assign do2 = sel2 ? q1 : q0;

  initial assert (S >= 4 && (S & (S - 1)) == 0)
    else $error("mem_v: S must be a power of two of at least 4");

  // The two read ports must never ask for the same bank.
  assert property (@(posedge clk) !(rd1 && rd2 && (up[0] == dn[0])))
    else $error("mem_v: port 1 and port 2 address the same bank");
  assert property (@(posedge clk) !(ld2 && rd2))
    else $error("mem_v: down-counter load during a port 2 read");
  assert property (@(posedge clk) !(ld && rd2))
    else $error("mem_v: load during a port 2 read");

endmodule
