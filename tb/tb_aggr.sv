// Self-checking testbench for aggr, the 15-sample aggregator.
//
// Random 4-sample words are driven for the six samplers, each sampler with
// its own bias (always 0, always 1, random, mostly 1, mostly 0, one 0 only)
// so that every P/S combination occurs. After each one-cycle command the
// testbench sums, from its own record of the words, the first 15 samples
// that follow the command and derives P (sum > 7) and S (sum 0 or 15). It
// checks these against the block, and that valid comes in the fifth cycle
// after the command (15 samples at 4 per C8 cycle, plus the output stage).
`timescale 1ps/1ps
module tb_aggr;
  import bmrx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, cmt = 1'b0;
  logic [5:0][3:0] samp;
  logic busy, valid;
  logic [5:0] p, s;
  int checks = 0, failures = 0;
  int mode [6];
  int n_p1 = 0, n_s1 = 0, n_s0 = 0;

  always #160 clk = ~clk;

  aggr dut (.clk(clk), .rst_n(rst_n), .cmt(cmt), .samp(samp), .busy(busy),
            .valid(valid), .p(p), .s(s));

  function automatic logic [3:0] gen(int m, int slot);
    logic [3:0] w;
    for (int k = 0; k < 4; k++) begin
      case (m)
        0: w[k] = 1'b0;
        1: w[k] = 1'b1;
        2: w[k] = 1'($urandom);
        3: w[k] = ($urandom_range(0, 9) != 0);
        4: w[k] = ($urandom_range(0, 9) == 0);
        default: w[k] = !(slot == 1 && k == 2);   // exactly one 0 among 15
      endcase
    end
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sum [6];
    int cyc;
    logic [5:0] p_exp, s_exp;
    samp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int l = 0; l < 6; l++) mode[l] = int'($urandom_range(0, 5));
      @(negedge clk);
      cmt = 1'b1;
      for (int l = 0; l < 6; l++) samp[l] = gen(mode[l], 9);
      @(negedge clk);
      cmt = 1'b0;
      for (int l = 0; l < 6; l++) sum[l] = 0;
      // words seen at edges 1..4 after the command
      for (int slot = 0; slot < 4; slot++) begin
        for (int l = 0; l < 6; l++) begin
          samp[l] = gen(mode[l], slot);
          for (int k = 0; k < 4; k++)
            if (slot * 4 + k < 15) sum[l] += int'(samp[l][k]);
        end
        @(negedge clk);
        check(!valid, "no early valid");
      end
      for (int l = 0; l < 6; l++) samp[l] = gen(2, 9);  // must not count
      cyc = 0;
      while (!valid && cyc < 10) begin
        @(negedge clk);
        cyc++;
      end
      check(valid && cyc == 1, $sformatf("valid 5 cycles after command (%0d)", cyc));
      for (int l = 0; l < 6; l++) begin
        p_exp[l] = (sum[l] > 7);
        s_exp[l] = (sum[l] == 0 || sum[l] == 15);
        n_p1 += int'(p_exp[l]);
        n_s1 += int'(s_exp[l]);
        n_s0 += int'(!s_exp[l]);
      end
      check(p == p_exp, $sformatf("P %b expected %b", p, p_exp));
      check(s == s_exp, $sformatf("S %b expected %b", s, s_exp));
      @(negedge clk);
      check(!valid && p == p_exp && s == s_exp, "valid is one cycle, result held");
    end
    check(n_p1 > 0 && n_s1 > 0 && n_s0 > 0, "P and S values exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
