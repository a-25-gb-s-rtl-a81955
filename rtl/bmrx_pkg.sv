// Shared constants, types and the burst-mode CDR convergence table.
//
// Phase interpolator (PI) codes are 6 bits: 64 steps span one period of the
// half-rate clock, i.e. 2 UI, so 32 LSB make one UI. The six samplers are
// indexed in the order in which their clock phases lie around that 2 UI
// circle: D, E, A, then the complementary phases D#, E#, A# one UI later.
// Guard-band PIs D and A sit Delta LSB before and after the edge PI E.
//
// The Delta sequence 11, 8, 6, 4, 3, 2 and the new-edge offsets for each row
// (Delta/3, Delta/2, 2*Delta/3, rounded as tabulated) follow the
// convergence table of the design. The I_DC gain codes (thermometer 000, 001,
// 011, 111 for 1x, 2x, 4x, 8x) and the 41 % IDAC start value (26 of 63) are
// the calibration engine's. Nothing in this package is clocked.
package bmrx_pkg;

  localparam int unsigned PI_BITS    = 6;   // PI code width, 64 codes = 2 UI
  localparam int unsigned UI_LSB     = 32;  // PI steps per unit interval
  localparam int unsigned DELTA_BITS = 4;   // width of the D/E, E/A offset bus
  localparam int unsigned N_LATCH    = 6;   // D, E, A, D#, E#, A# samplers
  localparam int unsigned N_DROWS    = 6;   // rows of the convergence table
  localparam int unsigned IDAC_BITS  = 6;   // I_DC IDAC resolution
  localparam int unsigned GAIN_BITS  = 3;   // VGCM thermometer gain code

  typedef logic [PI_BITS-1:0]    pi_code_t;
  typedef logic [DELTA_BITS-1:0] delta_t;
  typedef logic [2:0]            drow_t;     // convergence-table row 0..5

  // Sampler index around the 2 UI phase circle.
  typedef enum logic [2:0] {
    L_D  = 3'd0,
    L_E  = 3'd1,
    L_A  = 3'd2,
    L_DB = 3'd3,
    L_EB = 3'd4,
    L_AB = 3'd5
  } latch_e;

  // Where the new edge phase E* goes inside the 0->1 sector.
  typedef enum logic [1:0] {
    EPOS_THIRD     = 2'd0,  // S = (0,1): 1:2, nearer the left (S = 0) point
    EPOS_HALF      = 2'd1,  // S = (0,0) or (1,1): midpoint
    EPOS_TWO_THIRD = 2'd2   // S = (1,0): 2:1, nearer the right (S = 0) point
  } epos_e;

  localparam logic [GAIN_BITS-1:0] GAIN_MAX  = 3'b111;  // 8x, I_DC LSB 16 uA
  localparam logic [GAIN_BITS-1:0] GAIN_MIN  = 3'b000;  // 1x, I_DC LSB 2 uA
  localparam logic [IDAC_BITS-1:0] IDAC_41PC = 6'd26;   // 41 % of 63

  localparam drow_t DROW_LAST = 3'd5;                    // Delta = 2 LSB

  // Delta value of a convergence-table row.
  function automatic delta_t delta_of_row(drow_t row);
    case (row)
      3'd0:    return 4'd11;
      3'd1:    return 4'd8;
      3'd2:    return 4'd6;
      3'd3:    return 4'd4;
      3'd4:    return 4'd3;
      default: return 4'd2;
    endcase
  endfunction

  // Offset of the new edge phase from the left point of a sector Delta wide.
  function automatic delta_t conv_step(drow_t row, epos_e pos);
    case (row)
      3'd0:    return (pos == EPOS_THIRD) ? 4'd3 : (pos == EPOS_HALF) ? 4'd5 : 4'd7;
      3'd1:    return (pos == EPOS_THIRD) ? 4'd2 : (pos == EPOS_HALF) ? 4'd4 : 4'd5;
      3'd2:    return (pos == EPOS_THIRD) ? 4'd2 : (pos == EPOS_HALF) ? 4'd3 : 4'd4;
      3'd3:    return (pos == EPOS_THIRD) ? 4'd1 : (pos == EPOS_HALF) ? 4'd2 : 4'd3;
      3'd4:    return (pos == EPOS_THIRD) ? 4'd1 : (pos == EPOS_HALF) ? 4'd1 : 4'd2;
      default: return 4'd1;
    endcase
  endfunction

endpackage
