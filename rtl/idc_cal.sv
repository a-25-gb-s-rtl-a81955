// I_DC calibration engine of the burst-mode TIA.
//
// At the start of every burst the photodiode's dc current must be cancelled
// at the TIA input by a programmable current I_DC = IDAC code x LSB, where
// the LSB is set by a variable-gain current mirror (VGCM). The engine finds
// both settings by search, one comparison at a time, from a single latch that
// tells whether the low-pass filtered input is above (cmp = 1) or below
// (cmp = 0) the current I_DC:
//
//   * gain search: start at the highest gain 111 with the IDAC at 26 (41 % of
//     full scale). If the input is below that point, step the gain down
//     (111 -> 011 -> 001 -> 000) and compare again; stop as soon as the input
//     is not below, or when 000 is reached (at most three comparisons);
//   * IDAC search: a 6-step successive-approximation (binary) search from the
//     MSB down, keeping each trial bit when cmp = 1.
//
// Timing (clock C8 = bit rate / 8): START is first synchronised by three
// flip-flops. Every search step is STEP_CYCLES (4) C8 cycles: the calibration
// latch is clocked on the edge that starts step cycle 1 (cal_latch_en is high
// in the cycle before that edge), the new setting is registered at the end of
// cycle 1, and cycles 2 to 4 leave the analog loop time to settle. cal_done
// rises once the last setting has settled: 3 + 9 x 4 = 39 C8 cycles
// (12.5 ns at 25 Gb/s) after START when the full gain search is needed,
// 4 or 8 cycles earlier when the gain is found at 111 or 011. While START is
// low the engine is held with gain 111 and IDAC 26, so the first comparison
// can be made right after synchronisation; when START falls the result is
// dropped and the engine returns to that state.
//
// Because the result is digital it can be stored (read from gain / idac)
// and reused when the same transmitter and switch path return. With
// preset_en high, the stored preset_gain / preset_code are applied while
// START is low, so they have settled by the time START arrives, and
// cal_done rises one cycle after synchronisation (4 C8 cycles after START)
// without any search. preset_en and the preset values must be stable from
// before START until START falls.
//
// The algorithm, the settings, the 4-cycle step and the synchroniser follow
// the source, as does the idea of reusing a stored result. The early stop of
// the gain search, the idle values while START is low and the preset
// interface are this design's reading of it.
module idc_cal
  import bmrx_pkg::*;
#(
  parameter int unsigned          SYNC_STAGES = 3,
  parameter int unsigned          STEP_CYCLES = 4,
  parameter logic [IDAC_BITS-1:0] IDAC_INIT   = IDAC_41PC
) (
  input  logic                 clk,           // C8
  input  logic                 rst_n,
  input  logic                 start,         // asynchronous burst start
  input  logic                 cmp,           // calibration latch: input above I_DC
  input  logic                 preset_en,     // reuse a stored result, no search
  input  logic [GAIN_BITS-1:0] preset_gain,   // stored gain
  input  logic [IDAC_BITS-1:0] preset_code,   // stored IDAC code
  output logic                 start_s,       // synchronised START
  output logic                 cal_latch_en,  // calibration latch samples at next edge
  output logic [GAIN_BITS-1:0] gain,          // VGCM gain, thermometer code
  output logic [IDAC_BITS-1:0] idac,          // I_DC IDAC code
  output logic                 cal_done
);

  typedef enum logic [1:0] {
    S_GAIN,    // comparing against 41 % of the range at the current gain
    S_SAR,     // binary search of the IDAC code
    S_SETTLE,  // last setting settling
    S_DONE
  } state_e;

  state_e                         state;
  localparam int unsigned PW = $clog2(STEP_CYCLES);
  localparam logic [PW-1:0] PH_LAST = PW'(STEP_CYCLES - 1);

  logic [PW-1:0]                  ph;      // 0 = step cycle 1
  logic [$clog2(IDAC_BITS)-1:0]   bit_i;   // IDAC bit under trial
  logic                           decide;  // end of step cycle 1

  start_sync #(.STAGES(SYNC_STAGES)) u_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (start),
    .q    (start_s)
  );

  assign decide       = start_s && (ph == '0) && (state == S_GAIN || state == S_SAR);
  assign cal_latch_en = !start_s || (ph == PH_LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_GAIN;
      ph       <= '0;
      bit_i    <= '0;
      gain     <= GAIN_MAX;
      idac     <= IDAC_INIT;
      cal_done <= 1'b0;
    end else if (!start_s) begin
      state    <= S_GAIN;
      ph       <= '0;
      bit_i    <= '0;
      gain     <= preset_en ? preset_gain : GAIN_MAX;
      idac     <= preset_en ? preset_code : IDAC_INIT;
      cal_done <= 1'b0;
    end else begin
      if (state != S_DONE) ph <= (ph == PH_LAST) ? '0 : ph + 1'b1;

      case (state)
        S_GAIN: if (preset_en) begin
          // stored setting already applied and settled while idle
          state    <= S_DONE;
          cal_done <= 1'b1;
        end else if (decide) begin
          if (cmp || gain == 3'b001) begin
            // gain found, or lowest gain reached: start the binary search
            if (!cmp) gain <= GAIN_MIN;
            state <= S_SAR;
            bit_i <= 3'(IDAC_BITS - 1);
            idac  <= {1'b1, {(IDAC_BITS-1){1'b0}}};
          end else begin
            gain <= gain >> 1;
          end
        end
        S_SAR: if (decide) begin
          if (!cmp) idac[bit_i] <= 1'b0;
          if (bit_i == 0) begin
            state <= S_SETTLE;
          end else begin
            idac[bit_i - 1'b1] <= 1'b1;
            bit_i              <= bit_i - 1'b1;
          end
        end
        S_SETTLE: if (ph == PH_LAST) begin
          state    <= S_DONE;
          cal_done <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
