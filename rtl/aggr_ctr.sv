// One counter of the aggregator: sums the samples of one latch.
//
// clr restarts the sum. While en is high, the n_take oldest samples of the
// W-sample word (bit 0 oldest) are added. When fin is high the finished sum
// is turned, on the next edge, into the polarity bit p (sum above N/2) and
// the saturation bit s (sum exactly 0 or N); this register stage is the
// block's synchroniser towards the state machine. The counter never exceeds
// N because the parent never enables more than N samples.
module aggr_ctr #(
  parameter int unsigned W = 4,    // samples per clock
  parameter int unsigned N = 15    // samples per measurement
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       en,
  input  logic [$clog2(W+1)-1:0]     n_take,
  input  logic [W-1:0]               samp,
  input  logic                       fin,
  output logic                       p,
  output logic                       s
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] sum;
  logic [CW-1:0] add;

  always_comb begin
    add = '0;
    for (int i = 0; i < W; i++)
      if (i < n_take) add = add + CW'(samp[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      p   <= 1'b0;
      s   <= 1'b0;
    end else begin
      if (clr)     sum <= '0;
      else if (en) sum <= sum + add;
      if (fin) begin
        p <= (sum > CW'(N / 2));
        s <= (sum == '0) || (sum == CW'(N));
      end
    end
  end

endmodule
