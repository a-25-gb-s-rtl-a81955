// Self-checking testbench for deser_2to8 together with clk_div4.
//
// Random sample pairs (x, xb) are driven once per half-rate cycle. The
// testbench keeps its own list of the samples in time order (x before xb)
// and, at every rising edge of the C8 clock, checks that the word holds the
// eight samples of the last four half-rate cycles before the load, bit 0
// oldest, and that the word changes only once per C8 period.
`timescale 1ps/1ps
module tb_deser_2to8;
  logic clk_hr = 1'b0, rst_n = 1'b0;
  logic x, xb;
  logic [1:0] cnt;
  logic c8;
  logic [7:0] word;
  logic [7:0] expq [$];
  logic [7:0] shadow;
  int checks = 0, failures = 0;
  int nsamp = 0;

  always #40 clk_hr = ~clk_hr;   // 12.5 GHz half-rate clock

  clk_div4   u_div (.clk_hr(clk_hr), .rst_n(rst_n), .cnt(cnt), .c8(c8));
  deser_2to8 dut   (.clk_hr(clk_hr), .rst_n(rst_n), .cnt(cnt), .x(x), .xb(xb), .word(word));

  // reference: collect pairs, complete a word whenever four pairs are in
  always @(posedge clk_hr) if (rst_n) begin
    shadow = {xb, x, shadow[7:2]};
    nsamp++;
    if (cnt == 2'd3) expq.push_back(shadow);
  end

  always @(negedge clk_hr) begin
    x  <= 1'($urandom);
    xb <= 1'($urandom);
  end

  always @(posedge c8) if (rst_n && expq.size() > 0) begin
    logic [7:0] w;
    w = expq.pop_front();
    checks++;
    if (word != w) begin
      failures++;
      $display("FAIL: word %h expected %h", word, w);
    end
  end

  initial begin
    x = 0; xb = 0; shadow = '0;
    repeat (3) @(posedge clk_hr);
    rst_n = 1'b1;
    repeat (4000) @(posedge clk_hr);
    checks++;
    if (checks < 900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
