// CDR logic and PI control: owner of the three 6-bit PI codes.
//
// pi_e, pi_d and pi_a select the phases of the edge, data and amplitude
// sampling clocks (64 codes = 2 UI, a larger code is a later clock).
//
// Burst mode (bm_active = 1): the block is a passive interface for the
// BM-CDR. pi_upd adds pi_e_inc to pi_e, and pi_d / pi_a are kept delta LSB
// before / after pi_e. When bm_active rises this resets the guard PIs to the
// BM-CDR's starting spread around the present pi_e.
//
// Tracking (bm_active = 0): a first-order bang-bang loop. Each C8 cycle the
// phase detector's votes move pi_e one LSB later when early votes win, one
// LSB earlier when late votes win, and not at all on a tie. pi_d is held
// EYE_OFFSET (16 LSB, half a UI) before pi_e, i.e. in the middle of the eye,
// and pi_a the same distance after it. When the BM-CDR ends this keeps pi_e
// where the search left it and moves pi_d to the eye centre.
//
// All three codes are registered and change one C8 cycle after their cause.
// The source gives the hand-off positions and the interface to the BM-CDR;
// the loop itself (proportional only, no integrator, one LSB per cycle) and
// the position of pi_a in tracking are this design's choices.
module bb_cdr
  import bmrx_pkg::*;
#(
  parameter int unsigned EYE_OFFSET = UI_LSB / 2,
  parameter int unsigned VW         = 4          // vote count width
) (
  input  logic          clk,        // C8
  input  logic          rst_n,
  input  logic          bm_active,  // BM-CDR in control
  input  logic          pi_upd,     // apply pi_e_inc (burst mode)
  input  pi_code_t      pi_e_inc,
  input  delta_t        delta,      // guard offset in burst mode
  input  logic [VW-1:0] n_early,    // phase detector votes
  input  logic [VW-1:0] n_late,
  output pi_code_t      pi_e,
  output pi_code_t      pi_d,
  output pi_code_t      pi_a
);

  pi_code_t e_next;
  pi_code_t off;

  always_comb begin
    e_next = pi_e;
    if (bm_active) begin
      if (pi_upd) e_next = pi_e + pi_e_inc;
    end else if (n_early > n_late) begin
      e_next = pi_e + 1'b1;
    end else if (n_late > n_early) begin
      e_next = pi_e - 1'b1;
    end
    off = bm_active ? PI_BITS'(delta) : PI_BITS'(EYE_OFFSET);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi_e <= '0;
      pi_d <= -PI_BITS'(EYE_OFFSET);
      pi_a <= PI_BITS'(EYE_OFFSET);
    end else begin
      pi_e <= e_next;
      pi_d <= e_next - off;
      pi_a <= e_next + off;
    end
  end

endmodule
