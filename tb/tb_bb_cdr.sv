// Self-checking testbench for bb_cdr, the PI control of the CDR.
//
// Random sequences alternate burst-mode phases (bm_active high, random
// pi_upd, increments and Delta values) with tracking phases (random early /
// late vote counts). A reference kept in the testbench predicts the three
// PI codes after every C8 edge: in burst mode E moves by the increment and
// D/A sit Delta before/after it; in tracking E moves one LSB later on more
// early votes, one earlier on more late votes, and D/A sit 16 LSB away. It
// also checks the hand-off itself: E unchanged, D moved to E - 16.
`timescale 1ps/1ps
module tb_bb_cdr;
  import bmrx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bm_active = 1'b0, pi_upd = 1'b0;
  pi_code_t pi_e_inc = '0;
  delta_t delta = 4'd11;
  logic [3:0] n_early = '0, n_late = '0;
  pi_code_t pi_e, pi_d, pi_a;
  int checks = 0, failures = 0;
  int e_ref = 0;
  int n_up = 0, n_dn = 0, n_hold = 0, n_handoff = 0, n_bmupd = 0;

  always #160 clk = ~clk;

  bb_cdr dut (
    .clk(clk), .rst_n(rst_n), .bm_active(bm_active), .pi_upd(pi_upd), .pi_e_inc(pi_e_inc),
    .delta(delta), .n_early(n_early), .n_late(n_late), .pi_e(pi_e), .pi_d(pi_d), .pi_a(pi_a)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (e=%0d d=%0d a=%0d ref %0d)", what, pi_e, pi_d, pi_a, e_ref); end
  endtask

  initial begin
    int off;
    bit was_bm;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    was_bm = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (t % 200 == 0)  bm_active = 1'b1;
      if (t % 200 == 60) bm_active = 1'b0;
      pi_upd   = bm_active && ($urandom_range(0, 3) == 0);
      pi_e_inc = 6'($urandom);
      if (pi_upd) delta = 4'($urandom_range(2, 11));
      n_early  = 4'($urandom_range(0, 4));
      n_late   = 4'($urandom_range(0, 4));
      // reference
      if (bm_active) begin
        if (pi_upd) begin e_ref = (e_ref + int'(pi_e_inc)) % 64; n_bmupd++; end
        off = int'(delta);
      end else begin
        if (n_early > n_late)      begin e_ref = (e_ref + 1) % 64;  n_up++; end
        else if (n_late > n_early) begin e_ref = (e_ref + 63) % 64; n_dn++; end
        else n_hold++;
        off = 16;
      end
      @(posedge clk);
      #1;
      check(int'(pi_e) == e_ref, "E code");
      check(int'(pi_d) == (e_ref + 64 - off) % 64, "D code");
      check(int'(pi_a) == (e_ref + off) % 64, "A code");
      if (was_bm && !bm_active) begin
        n_handoff++;
        check(int'(pi_d) == (int'(pi_e) + 48) % 64, "hand-off puts D half a UI before E");
      end
      was_bm = bm_active;
    end
    check(n_up > 0 && n_dn > 0 && n_hold > 0 && n_handoff > 0 && n_bmupd > 0, "all modes exercised");
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
