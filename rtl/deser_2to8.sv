// 2:8 deserialiser for one sampling phase (D, E or A).
//
// Each phase has two samplers on complementary half-rate clocks, so every
// half-rate cycle delivers two bits one UI apart: x (the true phase) first,
// then xb (the complementary phase). The block shifts these pairs into a
// register and, on the half-rate edge where the divider count wraps
// (cnt == 3 before the edge), loads the last four pairs into the output
// word. Bit 0 of the word is the oldest sample, bit 7 the newest; even bits
// come from x, odd bits from xb. The word then stays constant for four
// half-rate cycles, and the C8 clock (divider MSB) rises two half-rate cycles
// after the load, so the C8 domain samples a settled word. The source gives
// only the block's name and ratio; the word order and load point are choices
// of this design.
module deser_2to8 #(
  parameter int unsigned W = 8      // output word width (bits per C8 cycle)
) (
  input  logic         clk_hr,
  input  logic         rst_n,
  input  logic [1:0]   cnt,         // from clk_div4
  input  logic         x,           // sample of the true phase
  input  logic         xb,          // sample of the complementary phase
  output logic [W-1:0] word         // deserialised word, bit 0 oldest
);

  logic [W-1:0] sh;
  logic [W-1:0] sh_next;

  assign sh_next = {xb, x, sh[W-1:2]};

  always_ff @(posedge clk_hr or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      word <= '0;
    end else begin
      sh <= sh_next;
      if (cnt == 2'd3) word <= sh_next;
    end
  end

endmodule
