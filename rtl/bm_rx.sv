// Digital back end of a 25 Gb/s dc-coupled burst-mode optical receiver.
//
// A burst begins when START rises. The receiver then locks in three steps,
// all on a "1010..." preamble:
//   1. idc_cal cancels the photodiode dc current at the TIA input by
//      searching the I_DC gain and IDAC code (at most 39 C8 cycles, 12.5 ns
//      at 25 Gb/s) and raises cal_done;
//   2. bm_cdr, using the aggregator, moves the edge PI onto the data edge by
//      successive approximation (at most 56 C8 cycles) and raises done;
//   3. bb_cdr then tracks with a bang-bang loop, data clock in mid-eye.
// START falling ends the burst and returns every state machine to idle.
//
// Clocks: clk_hr is the half-rate sampling clock (12.5 GHz at 25 Gb/s). The
// six sampler outputs arrive on latch_q once per clk_hr cycle, indexed
// D, E, A, D#, E#, A# (true and complementary phases of the data, edge and
// amplitude PIs). clk_div4 derives C8 (bit rate / 8) from clk_hr; three 2:8
// deserialisers turn each phase pair into 8-bit words, bit 0 oldest, and all
// control logic runs on C8. The analog parts (photodiode, TIAs, VGA,
// summers, samplers, IDACs, current mirror, PIs) are outside this module:
// their digital controls and the calibration latch (cal_cmp, clocked on C8
// edges where cal_latch_en is high) are ports, as is the optional stored
// I_DC setting (idc_preset_*) that lets a burst skip the calibration search.
// rst_n is an asynchronous reset for both clock domains.
//
// The partition and the signal flow follow the receiver's block diagram;
// deriving C8 here from the sampling clock and the word formats are this
// design's choices.
module bm_rx
  import bmrx_pkg::*;
#(
  parameter int unsigned CAL_STEP_CYCLES = 4,   // C8 cycles per I_DC search step
  parameter int unsigned AGGR_SAMPLES    = 15,  // samples per aggregator count
  parameter int unsigned MAX_ITERS       = 5,   // BM-CDR timeout, iterations
  parameter int unsigned SETTLE_CYCLES   = 4    // BM-CDR update-to-sense cycles
) (
  input  logic                 clk_hr,        // half-rate sampling clock
  input  logic                 rst_n,
  input  logic                 start,         // burst start, asynchronous
  input  logic [N_LATCH-1:0]   latch_q,       // sampler outputs, one per clk_hr
  input  logic                 cal_cmp,       // calibration latch output
  input  logic                 idc_preset_en,   // reuse a stored I_DC setting
  input  logic [GAIN_BITS-1:0] idc_preset_gain,
  input  logic [IDAC_BITS-1:0] idc_preset_code,
  output logic                 c8,            // word clock
  output logic                 cal_latch_en,  // clock the calibration latch
  output logic [GAIN_BITS-1:0] idc_gain,      // VGCM gain (thermometer)
  output logic [IDAC_BITS-1:0] idc_code,      // I_DC IDAC code
  output logic                 cal_done,
  output pi_code_t             pi_e,          // edge PI code
  output pi_code_t             pi_d,          // data PI code
  output pi_code_t             pi_a,          // amplitude PI code
  output logic                 bm_active,     // BM-CDR owns the PIs
  output logic                 cmt,           // aggregator command
  output logic                 done,          // lock acquired
  output logic                 bm_timeout,    // search ended by timeout
  output logic [7:0]           data_word,     // recovered data, bit 0 first
  output logic [7:0]           edge_word,
  output logic [7:0]           amp_word
);

  logic [1:0] div_cnt;
  logic       start_s;

  // aggregator and BM-CDR
  logic                       agg_valid, agg_busy;
  logic [N_LATCH-1:0]         agg_p, agg_s;
  logic [N_LATCH-1:0][3:0]    agg_samp;
  logic                       pi_upd;
  pi_code_t                   pi_e_inc;
  delta_t                     delta;

  // phase detector votes
  logic [3:0] n_early, n_late;

  clk_div4 u_div (
    .clk_hr(clk_hr),
    .rst_n (rst_n),
    .cnt   (div_cnt),
    .c8    (c8)
  );

  deser_2to8 u_deser_d (
    .clk_hr(clk_hr), .rst_n(rst_n), .cnt(div_cnt),
    .x(latch_q[L_D]), .xb(latch_q[L_DB]), .word(data_word)
  );
  deser_2to8 u_deser_e (
    .clk_hr(clk_hr), .rst_n(rst_n), .cnt(div_cnt),
    .x(latch_q[L_E]), .xb(latch_q[L_EB]), .word(edge_word)
  );
  deser_2to8 u_deser_a (
    .clk_hr(clk_hr), .rst_n(rst_n), .cnt(div_cnt),
    .x(latch_q[L_A]), .xb(latch_q[L_AB]), .word(amp_word)
  );

  // per-sampler sample streams: even word bits are the true phase,
  // odd bits the complementary one
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      agg_samp[L_D][k]  = data_word[2*k];
      agg_samp[L_DB][k] = data_word[2*k+1];
      agg_samp[L_E][k]  = edge_word[2*k];
      agg_samp[L_EB][k] = edge_word[2*k+1];
      agg_samp[L_A][k]  = amp_word[2*k];
      agg_samp[L_AB][k] = amp_word[2*k+1];
    end
  end

  idc_cal #(.STEP_CYCLES(CAL_STEP_CYCLES)) u_cal (
    .clk         (c8),
    .rst_n       (rst_n),
    .start       (start),
    .cmp         (cal_cmp),
    .preset_en   (idc_preset_en),
    .preset_gain (idc_preset_gain),
    .preset_code (idc_preset_code),
    .start_s     (start_s),
    .cal_latch_en(cal_latch_en),
    .gain        (idc_gain),
    .idac        (idc_code),
    .cal_done    (cal_done)
  );

  aggr #(.W(4), .N(AGGR_SAMPLES)) u_aggr (
    .clk  (c8),
    .rst_n(rst_n),
    .cmt  (cmt),
    .samp (agg_samp),
    .busy (agg_busy),
    .valid(agg_valid),
    .p    (agg_p),
    .s    (agg_s)
  );

  bm_cdr #(.MAX_ITERS(MAX_ITERS), .SETTLE_CYCLES(SETTLE_CYCLES)) u_bmcdr (
    .clk      (c8),
    .rst_n    (rst_n),
    .start_s  (start_s),
    .cal_done (cal_done),
    .cmt      (cmt),
    .agg_valid(agg_valid),
    .p        (agg_p),
    .s        (agg_s),
    .bm_active(bm_active),
    .pi_upd   (pi_upd),
    .pi_e_inc (pi_e_inc),
    .delta    (delta),
    .done     (done),
    .timeout  (bm_timeout)
  );

  bbpd #(.W(8)) u_bbpd (
    .clk    (c8),
    .rst_n  (rst_n),
    .d      (data_word),
    .e      (edge_word),
    .n_early(n_early),
    .n_late (n_late)
  );

  bb_cdr #(.VW(4)) u_bbcdr (
    .clk      (c8),
    .rst_n    (rst_n),
    .bm_active(bm_active),
    .pi_upd   (pi_upd),
    .pi_e_inc (pi_e_inc),
    .delta    (delta),
    .n_early  (n_early),
    .n_late   (n_late),
    .pi_e     (pi_e),
    .pi_d     (pi_d),
    .pi_a     (pi_a)
  );

endmodule
