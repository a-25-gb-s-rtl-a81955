// Bang-bang (Alexander) phase detector on deserialised words.
//
// Input is one C8 cycle of data samples d and edge samples e, bit 0 oldest.
// In tracking, the edge clock sits half a UI after the data clock, so e[k]
// is taken between data bits d[k] and d[k+1]. For each pair of consecutive
// data bits that differ, the edge sample between them votes: equal to the
// earlier bit means the edge clock came before the transition (early, the
// clock must move later); equal to the later bit means late. The last data
// and edge bits of the previous word close the gap to bit 0 of the current
// one, so every one of the W bit boundaries is judged once. The two vote
// counts are registered, one C8 cycle of latency. The source names this
// block only; the Alexander rule is the standard choice for a bang-bang CDR.
module bbpd #(
  parameter int unsigned W = 8
) (
  input  logic                   clk,      // C8
  input  logic                   rst_n,
  input  logic [W-1:0]           d,        // data samples, bit 0 oldest
  input  logic [W-1:0]           e,        // edge samples, e[k] after d[k]
  output logic [$clog2(W+1)-1:0] n_early,  // clock early votes
  output logic [$clog2(W+1)-1:0] n_late    // clock late votes
);

  localparam int unsigned VW = $clog2(W + 1);

  logic          d_prev, e_prev;
  logic [W-1:0]  d_left, e_mid;
  logic [VW-1:0] early_c, late_c;

  // data bit before each d[k] and the edge sample between them
  assign d_left = {d[W-2:0], d_prev};
  assign e_mid  = {e[W-2:0], e_prev};

  always_comb begin
    early_c = '0;
    late_c  = '0;
    for (int k = 0; k < W; k++) begin
      if (d_left[k] != d[k]) begin
        if (e_mid[k] == d_left[k]) early_c = early_c + 1'b1;
        else                       late_c  = late_c + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_prev  <= 1'b0;
      e_prev  <= 1'b0;
      n_early <= '0;
      n_late  <= '0;
    end else begin
      d_prev  <= d[W-1];
      e_prev  <= e[W-1];
      n_early <= early_c;
      n_late  <= late_c;
    end
  end

endmodule
