// Self-checking testbench for idc_cal, the I_DC calibration engine.
//
// A behavioural model of the analog loop closes the search: the cancelling
// current is I_DC = code x LSB with LSB 2, 4, 8, 16 uA for gain 000, 001,
// 011, 111, and the calibration latch, clocked when cal_latch_en is high,
// reports whether the input dc current is above I_DC (settling is ideal).
// For each input current the expected gain is the first of 111, 011, 001
// whose 41 % point (code 26) lies below the input, else 000; the expected
// code is the largest one whose current is below the input. Both come from
// these closed forms, not from the search. The testbench also checks the
// number of C8 cycles from START to cal_done (3 + 4 x (gain compares + 6),
// 39 at most), that a falling START resets the engine, and that a stored
// result applied through the preset inputs skips the search (cal_done after
// 4 cycles with the stored values, even though the input has changed).
`timescale 1ps/1ps
module tb_idc_cal;
  import bmrx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cmp = 1'b0;
  logic preset_en = 1'b0;
  logic [2:0] preset_gain = '0;
  logic [5:0] preset_code = '0;
  int n_preset = 0;
  logic start_s, cal_latch_en, cal_done;
  logic [2:0] gain;
  logic [5:0] idac;
  int checks = 0, failures = 0;
  int i_in;                       // input dc current, uA
  int n_gain_hits [4];            // final gain 000, 001, 011, 111 seen

  always #160 clk = ~clk;         // C8 at 3.125 GHz

  idc_cal dut (
    .clk(clk), .rst_n(rst_n), .start(start), .cmp(cmp), .preset_en(preset_en),
    .preset_gain(preset_gain), .preset_code(preset_code), .start_s(start_s),
    .cal_latch_en(cal_latch_en), .gain(gain), .idac(idac), .cal_done(cal_done)
  );

  function automatic int lsb_of(logic [2:0] g);
    case (g)
      3'b000:  return 2;
      3'b001:  return 4;
      3'b011:  return 8;
      default: return 16;
    endcase
  endfunction

  // analog loop and calibration latch
  always_ff @(posedge clk)
    if (cal_latch_en) cmp <= (i_in > int'(idac) * lsb_of(gain));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (i_in=%0d gain=%b idac=%0d)", what, i_in, gain, idac);
    end
  endtask

  task automatic run_burst(input int cur);
    logic [2:0] g_exp;
    int lsb, c_exp, n_cmp, cyc;
    i_in = cur;
    // expected settings, closed form
    if      (cur > 26 * 16) begin g_exp = 3'b111; n_cmp = 1; end
    else if (cur > 26 * 8)  begin g_exp = 3'b011; n_cmp = 2; end
    else if (cur > 26 * 4)  begin g_exp = 3'b001; n_cmp = 3; end
    else                    begin g_exp = 3'b000; n_cmp = 3; end
    lsb   = lsb_of(g_exp);
    c_exp = (cur <= 0) ? 0 : (cur - 1) / lsb;
    if (c_exp > 63) c_exp = 63;

    @(negedge clk);
    start = 1'b1;
    cyc = 0;
    while (!cal_done && cyc < 100) begin
      @(posedge clk);
      cyc++;
      #1;
    end
    check(cal_done, "cal_done rises");
    check(cyc == 3 + 4 * (n_cmp + 6), $sformatf("latency %0d cycles, expected %0d", cyc, 3 + 4 * (n_cmp + 6)));
    check(cyc <= 39, "latency within 39 C8 cycles (12.5 ns)");
    check(gain == g_exp, $sformatf("gain expected %b", g_exp));
    check(int'(idac) == c_exp, $sformatf("code expected %0d", c_exp));
    n_gain_hits[g_exp == 3'b000 ? 0 : g_exp == 3'b001 ? 1 : g_exp == 3'b011 ? 2 : 3]++;
    // result held while START is high
    repeat (10) @(posedge clk);
    #1;
    check(cal_done && gain == g_exp && int'(idac) == c_exp, "result held");
    // end of burst
    @(negedge clk);
    start = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    check(!cal_done && gain == 3'b111 && idac == 6'd26, "reset by falling START");

    // same transmitter again: reuse the stored result, no search
    preset_gain = g_exp;
    preset_code = 6'(c_exp);
    preset_en   = 1'b1;
    i_in        = cur + 1000;      // a search would now find something else
    repeat (2) @(posedge clk);
    @(negedge clk);
    start = 1'b1;
    cyc = 0;
    while (!cal_done && cyc < 100) begin
      @(posedge clk);
      cyc++;
      #1;
    end
    check(cyc == 4, $sformatf("stored setting: cal_done after %0d cycles, expected 4", cyc));
    check(gain == g_exp && int'(idac) == c_exp, "stored setting applied unchanged");
    n_preset++;
    @(negedge clk);
    start = 1'b0;
    preset_en = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    i_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corners: range limits and the gain boundaries
    run_burst(0);    run_burst(1);    run_burst(2);    run_burst(3);
    run_burst(104);  run_burst(105);  run_burst(126);  run_burst(208);
    run_burst(209);  run_burst(416);  run_burst(417);  run_burst(500);
    run_burst(1008); run_burst(1009); run_burst(1200);
    repeat (60) run_burst(int'($urandom_range(0, 1100)));
    for (int g = 0; g < 4; g++) check(n_gain_hits[g] > 0, $sformatf("gain level %0d exercised", g));
    check(n_preset > 0, "stored-setting bursts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
