// Divide-by-four of the half-rate sampling clock into the C8 clock.
//
// The samplers run on half-rate clocks (two bits per cycle), so four
// half-rate cycles carry eight bits: the deserialised word rate C8, one
// eighth of the bit rate (3.125 GHz at 25 Gb/s). A 2-bit counter counts
// half-rate cycles; its MSB is the C8 clock, which therefore rises on the
// edge where the count becomes 2. The count is exported so that the
// deserialisers can load their parallel word on the edge where it wraps to 0,
// two half-rate cycles before C8 rises. How C8 is derived is this design's
// own choice; the source only names the clock.
module clk_div4 (
  input  logic       clk_hr,
  input  logic       rst_n,
  output logic [1:0] cnt,     // half-rate cycle within the C8 period
  output logic       c8       // divided clock
);

  always_ff @(posedge clk_hr or negedge rst_n) begin
    if (!rst_n) cnt <= 2'd0;
    else        cnt <= cnt + 2'd1;
  end

  assign c8 = cnt[1];

endmodule
