// Synchroniser for the asynchronous START input.
//
// START comes from a central network controller with no timing relation to
// the receiver's C8 clock, so it passes through a chain of STAGES flip-flops
// (three by default, the "triple latching" of the calibration engine) before
// any state machine sees it. The output follows START STAGES clock edges
// later; the chain is cleared by the asynchronous reset.
module start_sync #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // asynchronous input
  output logic q       // synchronised copy, STAGES edges later
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

endmodule
