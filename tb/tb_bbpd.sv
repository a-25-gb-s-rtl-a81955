// Self-checking testbench for bbpd, the bang-bang phase detector.
//
// Random data and edge words are driven. The reference builds the serial
// stream d(-1) e(-1) d(0) e(0) ... from the previous word's last bits and the
// current word, and counts, for every data transition, an early vote when
// the edge sample equals the earlier data bit and a late vote otherwise. The
// counts must appear one C8 cycle later.
`timescale 1ps/1ps
module tb_bbpd;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] d, e;
  logic [3:0] n_early, n_late;
  int checks = 0, failures = 0;
  int tot_e = 0, tot_l = 0;

  always #160 clk = ~clk;

  bbpd dut (.clk(clk), .rst_n(rst_n), .d(d), .e(e), .n_early(n_early), .n_late(n_late));

  initial begin
    logic dp, ep;
    int ee, ll;
    d = '0; e = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    dp = 1'b0; ep = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // mix of random, alternating and constant data
      case (t % 4)
        0:       d = 8'($urandom);
        1:       d = 8'h55;
        2:       d = 8'hAA;
        default: d = (t % 8 == 3) ? 8'h00 : 8'($urandom);
      endcase
      e = 8'($urandom);
      ee = 0; ll = 0;
      for (int k = 0; k < 8; k++) begin
        logic a, b, x;
        a = (k == 0) ? dp : d[k-1];
        x = (k == 0) ? ep : e[k-1];
        b = d[k];
        if (a != b) begin
          if (x == a) ee++; else ll++;
        end
      end
      dp = d[7]; ep = e[7];
      @(posedge clk);
      #1;
      checks++;
      if (int'(n_early) != ee || int'(n_late) != ll) begin
        failures++;
        $display("FAIL: d=%h e=%h early %0d/%0d late %0d/%0d", d, e, n_early, ee, n_late, ll);
      end
      tot_e += ee; tot_l += ll;
    end
    checks++;
    if (tot_e == 0 || tot_l == 0) failures++;
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
