// Burst-mode CDR state machine: a successive-approximation search for the
// data edge on a "1010..." preamble.
//
// Three PIs are used as a small time-to-digital converter. PI_E sits at the
// current estimate of the data edge; PI_D and PI_A sit Delta LSB before and
// after it (32 LSB = 1 UI). With their complementary half-rate phases this
// gives six sampling points on the 2 UI phase circle, in the order
// D, E, A, D#, E#, A#. Each iteration:
//
//   1. sense: command the aggregator (cmt) and wait for the polarity and
//      saturation bits P, S of all six samplers (15 samples each);
//   2. decide: find the sector between two neighbouring points whose P goes
//      0 -> 1 (the rising edge of the preamble lies inside it). The new edge
//      estimate E* goes into that sector at its midpoint when the two S bits
//      are equal, or at 1/3 of it from the point whose S is 0 when they
//      differ. Delta moves down the table 11, 8, 6, 4, 3, 2 by as many rows
//      as there are S bits set (0, 1 or 2 rows);
//   3. actuate: send PI_E the increment E* - E and the new Delta (pi_upd),
//      then wait for the PIs to settle.
//
// The search stops when Delta reaches 2 LSB or after MAX_ITERS iterations;
// done then rises, bm_active falls and the bang-bang CDR takes the PIs over.
// The outer sectors A..D# and A#..D are 32 - 2*Delta wide rather than Delta.
// In them E* keeps the table's distance from the point the rule favours:
// Delta/3 after the left point when only the left S is 0, (Delta - 2Delta/3)
// before the right point when only the right S is 0, and the sector midpoint
// otherwise. In a Delta-wide sector these are exactly the table entries.
// This extension, the tie-break (the lowest-numbered 0->1 sector wins) and
// leaving everything unchanged when no 0->1 sector is seen are this design's
// choices.
//
// Timing in C8 cycles: cmt 1 cycle, aggregation until valid 6 cycles, update
// plus settling SETTLE_CYCLES (4): 11 cycles or 88 UI per iteration, so at
// most 1 + 5 x 11 = 56 cycles (17.9 ns at 25 Gb/s) from cal_done to done.
// bm_active rises as soon as the synchronised START is seen, so the PIs are
// reset to the Delta = 11 spread while the TIA is still being calibrated.
// Everything returns to idle when START falls.
module bm_cdr
  import bmrx_pkg::*;
#(
  parameter int unsigned MAX_ITERS     = 5,  // search timeout, iterations
  parameter int unsigned SETTLE_CYCLES = 4   // C8 cycles from update to next sense
) (
  input  logic               clk,        // C8
  input  logic               rst_n,
  input  logic               start_s,    // synchronised START
  input  logic               cal_done,   // I_DC calibration finished
  output logic               cmt,        // aggregator command
  input  logic               agg_valid,  // aggregator result ready
  input  logic [N_LATCH-1:0] p,          // polarity per sampler
  input  logic [N_LATCH-1:0] s,          // saturation per sampler
  output logic               bm_active,  // BM-CDR owns the PIs
  output logic               pi_upd,     // apply pi_e_inc and delta
  output pi_code_t           pi_e_inc,   // PI_E increment, modulo 64
  output delta_t             delta,      // D/E and E/A offset
  output logic               done,       // search finished, BB-CDR in control
  output logic               timeout     // search ended by MAX_ITERS
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_WAIT_CAL,
    S_CMD,
    S_SENSE,
    S_SETTLE,
    S_DONE
  } state_e;

  localparam int unsigned IW = $clog2(MAX_ITERS + 1);
  localparam int unsigned CW = $clog2(SETTLE_CYCLES + 1);

  state_e   state;
  drow_t    row;
  logic [IW-1:0] iter;
  logic [CW-1:0] cnt;

  // decision
  pi_code_t off [N_LATCH];
  logic     found;
  logic [2:0] sec, sec_n;
  logic     sl, sr;
  epos_e    pos;
  pi_code_t wide_w;
  pi_code_t step;
  pi_code_t inc_d;
  drow_t    row_d;
  logic [2:0] row_sum;

  always_comb begin
    off[L_D]  = -PI_BITS'(delta_of_row(row));
    off[L_E]  = '0;
    off[L_A]  = PI_BITS'(delta_of_row(row));
    off[L_DB] = PI_BITS'(UI_LSB) - PI_BITS'(delta_of_row(row));
    off[L_EB] = PI_BITS'(UI_LSB);
    off[L_AB] = PI_BITS'(UI_LSB) + PI_BITS'(delta_of_row(row));

    found = 1'b0;
    sec   = '0;
    for (int i = N_LATCH - 1; i >= 0; i--) begin
      if (!p[i] && p[(i + 1) % N_LATCH]) begin
        found = 1'b1;
        sec   = 3'(i);
      end
    end

    sec_n = (sec == 3'(N_LATCH - 1)) ? 3'd0 : sec + 3'd1;
    sl = s[sec];
    sr = s[sec_n];
    if (sl == sr)  pos = EPOS_HALF;
    else if (!sl)  pos = EPOS_THIRD;
    else           pos = EPOS_TWO_THIRD;

    wide_w = PI_BITS'(UI_LSB) - PI_BITS'(2 * delta_of_row(row));
    if (sec == 3'(L_A) || sec == 3'(L_AB)) begin
      // outer sector: same distance from the favoured point as in the table
      case (pos)
        EPOS_HALF:  step = wide_w >> 1;
        EPOS_THIRD: step = PI_BITS'(conv_step(row, pos));
        default:    step = wide_w - PI_BITS'(delta_of_row(row))
                           + PI_BITS'(conv_step(row, pos));
      endcase
    end else begin
      step = PI_BITS'(conv_step(row, pos));
    end

    row_sum = {2'b00, sl} + {2'b00, sr} + row;
    if (found) begin
      inc_d = off[sec] + step;
      row_d = (row_sum > DROW_LAST) ? DROW_LAST : row_sum;
    end else begin
      inc_d = '0;
      row_d = row;
    end
  end

  assign cmt   = (state == S_CMD);
  assign delta = delta_of_row(row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      row       <= '0;
      iter      <= '0;
      cnt       <= '0;
      bm_active <= 1'b0;
      pi_upd    <= 1'b0;
      pi_e_inc  <= '0;
      done      <= 1'b0;
      timeout   <= 1'b0;
    end else if (!start_s) begin
      state     <= S_IDLE;
      row       <= '0;
      iter      <= '0;
      cnt       <= '0;
      bm_active <= 1'b0;
      pi_upd    <= 1'b0;
      pi_e_inc  <= '0;
      done      <= 1'b0;
      timeout   <= 1'b0;
    end else begin
      pi_upd <= 1'b0;
      case (state)
        S_IDLE: begin
          state     <= S_WAIT_CAL;
          bm_active <= 1'b1;
          row       <= '0;
        end
        S_WAIT_CAL: if (cal_done) state <= S_CMD;
        S_CMD:      state <= S_SENSE;
        S_SENSE: if (agg_valid) begin
          pi_e_inc <= inc_d;
          row      <= row_d;
          pi_upd   <= 1'b1;
          iter     <= iter + 1'b1;
          cnt      <= CW'(1);
          state    <= S_SETTLE;
        end
        S_SETTLE: begin
          if (cnt == CW'(SETTLE_CYCLES)) begin
            if (row == DROW_LAST || iter == IW'(MAX_ITERS)) begin
              state     <= S_DONE;
              done      <= 1'b1;
              bm_active <= 1'b0;
              timeout   <= (row != DROW_LAST);
            end else begin
              state <= S_CMD;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
