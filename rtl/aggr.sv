// Aggregator (AGGR): integrates N = 15 consecutive samples of each of the
// six samplers and reports, per sampler, a polarity bit P and a saturation
// bit S.
//
// P = 1 when more than 7 of the 15 samples are 1; S = 1 when all 15 agree
// (sum 0 or 15). S = 0 therefore marks a sampling phase that sits on a
// jittery data transition. A measurement starts with a one-cycle command
// (cmt, from the BM-CDR). The samplers arrive deserialised, W = 4 samples per
// sampler per C8 cycle, oldest in bit 0, so the 15 samples are the four
// words after the command minus the last sample of the fourth. valid pulses
// for one cycle when p and s are ready:
//
//   edge 0: cmt seen, counters cleared
//   edges 1..4: 4 + 4 + 4 + 3 samples added
//   edge 5: p, s registered, valid high in the following cycle
//
// so a measurement takes about 1.6 ns (5 C8 cycles) at 25 Gb/s. p and s hold
// until the next measurement. A command during a measurement restarts it.
// The 15-sample count and the P/S rules follow the source; feeding the
// counters from the deserialised words is this design's choice (the source
// shows separate 1:2 demultiplexers in front of the counters).
module aggr
  import bmrx_pkg::*;
#(
  parameter int unsigned N_L = N_LATCH,  // samplers
  parameter int unsigned W   = 4,        // samples per sampler per C8 cycle
  parameter int unsigned N   = 15        // samples per measurement
) (
  input  logic                  clk,     // C8
  input  logic                  rst_n,
  input  logic                  cmt,     // start a measurement
  input  logic [N_L-1:0][W-1:0] samp,    // per sampler, bit 0 oldest
  output logic                  busy,
  output logic                  valid,   // p, s updated (one cycle)
  output logic [N_L-1:0]        p,
  output logic [N_L-1:0]        s
);

  localparam int unsigned TW = $clog2(N + 1);

  logic [TW-1:0]          taken;
  logic [TW-1:0]          left;
  logic [$clog2(W+1)-1:0] n_take;
  logic                   last;
  logic                   fin;

  assign left   = TW'(N) - taken;
  assign n_take = (left >= TW'(W)) ? W[$clog2(W+1)-1:0] : left[$clog2(W+1)-1:0];
  assign last   = busy && !cmt && (left <= TW'(W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      taken <= '0;
      fin   <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= fin;
      fin   <= last;
      if (cmt) begin
        busy  <= 1'b1;
        taken <= '0;
      end else if (busy) begin
        taken <= taken + TW'(n_take);
        if (last) busy <= 1'b0;
      end
    end
  end

  for (genvar l = 0; l < N_L; l++) begin : g_ctr
    aggr_ctr #(.W(W), .N(N)) u_ctr (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (cmt),
      .en    (busy && !cmt),
      .n_take(n_take),
      .samp  (samp[l]),
      .fin   (fin),
      .p     (p[l]),
      .s     (s[l])
    );
  end

endmodule
