// Controller of the ICMM: produces the control strobes c1..c9, c3n, c61,
// c81 (see icmm_pkg::ctrl_t) for the loading and execution phases.
//
// Loading: load_start clears every address generator (c8, c7) for one
// cycle; afterwards each cycle with load_valid = 1 (c4) writes one digit into
// all four memory systems.
//
// Execution (exec_start, with the digit count N = n_dig, 1 <= N <= S): one
// cycle clears the address generators again, then the controller walks
// passes c = 0..N_c-1 (N_c = ceil(N / N_PE)) and in each pass rows
// i = 0..N-1, one row per cycle. For each row it issues, one cycle before
// the row enters the core (synchronous RAMs):
//   c6  (M_H read)         when i >= c*N_PE  (block on or below the diagonal)
//   c3n (M_V port 2 read)  when i <  c*N_PE  (column built from a row digit)
//   c5  (M_A and M_V port 1 read) when i < N_PE and c*N_PE + i < N: the
//        A and V digits of PE i for this pass; A digits beyond N are zero
//   c9  (M_V down-counter load) on the last row of every pass but the
//        last; port 1 has then read c*N_PE + N_PE - 1, where port 2 starts
//        in the next pass
//   c7  (M_H reload to 0)  on the last row of a pass
// and in the cycle the row enters the core: c1 = 0 on row 0, else 1, and
// c2 = c3 = c6 delayed by one cycle (H multiplexers). The M_P read (mp_rd)
// follows N_PE cycles after the issue, the write-back one cycle later; c81
// clears the M_P address with the last read of a pass. c61 selects the
// accumulate path of the M_P input multiplexer for the whole execution.
// When N is odd and another pass follows, one idle cycle separates the
// passes, because the write-back of row N-1 and the read of row 0 would
// otherwise meet in the same M_P bank.
//
// out_valid marks the cycle in which the final product digit out_idx is
// written back (last pass). done pulses in the cycle after the last one.
// Latency from exec_start to the last out_valid: rows + N_PE + 2 cycles,
// rows = N*N_c (+ N_c - 1 when N is odd). The roles of the signals follow
// the architecture's control algorithm; their exact cycle placement, the
// split of mp_rd from c61 and the idle cycle are this implementation's.
module icmm_ctrl
  import icmm_pkg::*;
#(
  parameter int unsigned S   = 8,
  parameter int unsigned NPE = 3,
  localparam int unsigned NW = $clog2(S + 1),           // width of N
  localparam int unsigned CW = $clog2(S + 2 * NPE) + 1   // width of row/base counters
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_start,
  input  logic          load_valid,
  input  logic          exec_start,
  input  logic [NW-1:0] n_dig,
  output ctrl_t         ctrl,
  output logic          core_vld,   // a row enters the core this cycle
  output logic          a_vld,      // the A/V bus holds a digit read last cycle
  output logic          out_valid,
  output logic [NW-1:0] out_idx,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {IDLE, INIT, RUN} state_t;
  state_t state;

  logic [CW-1:0] n, i, base;
  logic          gap;

  // Issue-stage decode.
  logic rrow, last_row, last_pass;
  logic r_c6, r_c3n, r_c5, r_c9, r_c7;

  always_comb begin
    rrow      = (state == RUN) && !gap;
    last_row  = (i == n - 1'b1);
    last_pass = (base + CW'(NPE) >= n);
    r_c6      = rrow && (i >= base);
    r_c3n     = rrow && (i < base);
    r_c5      = rrow && (i < CW'(NPE)) && (base + i < n);
    r_c9      = rrow && last_row && !last_pass;
    r_c7      = r_c6 && last_row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      i     <= '0;
      base  <= '0;
      gap   <= 1'b0;
      n     <= CW'(1);
    end else begin
      case (state)
        IDLE: if (exec_start) begin
          state <= INIT;
          n     <= CW'(n_dig);
        end
        INIT: begin
          state <= RUN;
          i     <= '0;
          base  <= '0;
          gap   <= 1'b0;
        end
        RUN: begin
          if (gap) gap <= 1'b0;
          else if (last_row) begin
            i <= '0;
            if (last_pass) state <= IDLE;
            else begin
              base <= base + CW'(NPE);
              gap  <= n[0];
            end
          end else i <= i + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Core stage: one cycle after issue.
  logic t_vld, t_first, t_c6, t_c5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_vld <= 1'b0; t_first <= 1'b0; t_c6 <= 1'b0; t_c5 <= 1'b0;
    end else begin
      t_vld   <= rrow;
      t_first <= rrow && (i == '0);
      t_c6    <= r_c6;
      t_c5    <= r_c5;
    end
  end

  // Delay line from issue to the M_P read (N_PE cycles) and write (+1).
  logic          dl_vld  [NPE+1];
  logic          dl_lrow [NPE+1];
  logic          dl_lpas [NPE+1];
  logic [NW-1:0] dl_idx  [NPE+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= int'(NPE); k++) begin
        dl_vld[k] <= 1'b0; dl_lrow[k] <= 1'b0; dl_lpas[k] <= 1'b0; dl_idx[k] <= '0;
      end
    end else begin
      dl_vld[0]  <= rrow;
      dl_lrow[0] <= rrow && last_row;
      dl_lpas[0] <= rrow && last_pass;
      dl_idx[0]  <= NW'(i);
      for (int k = 1; k <= int'(NPE); k++) begin
        dl_vld[k]  <= dl_vld[k-1];
        dl_lrow[k] <= dl_lrow[k-1];
        dl_lpas[k] <= dl_lpas[k-1];
        dl_idx[k]  <= dl_idx[k-1];
      end
    end
  end

  // dl_*[NPE-1] is the read cycle (issue + NPE), dl_*[NPE] the write cycle.
  logic exec_busy;
  always_comb begin
    exec_busy = (state != IDLE);
    for (int k = 0; k <= int'(NPE); k++) exec_busy = exec_busy | dl_vld[k];
  end

  always_comb begin
    ctrl       = '0;
    ctrl.c1    = t_vld && !t_first;
    ctrl.c2    = t_c6;
    ctrl.c3    = t_c6;
    ctrl.c3n   = r_c3n;
    ctrl.c4    = load_valid;
    ctrl.c5    = r_c5;
    ctrl.c6    = r_c6;
    ctrl.c7    = load_start || (state == INIT) || r_c7;
    ctrl.c8    = load_start || (state == INIT);
    ctrl.c9    = r_c9;
    ctrl.mp_rd = dl_vld[NPE-1];
    ctrl.c81   = dl_vld[NPE-1] && dl_lrow[NPE-1];
    ctrl.c61   = exec_busy;
  end

  assign core_vld  = t_vld;
  assign a_vld     = t_c5;
  assign out_valid = dl_vld[NPE] && dl_lpas[NPE];
  assign out_idx   = dl_idx[NPE];
  assign busy      = exec_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= dl_vld[NPE] && dl_lpas[NPE] && dl_lrow[NPE];
  end

  assert property (@(posedge clk)
                   (state == IDLE && exec_start) |-> (n_dig >= 1 && n_dig <= NW'(S)))
    else $error("icmm_ctrl: digit count out of range");

endmodule
