// Self-checking testbench for bm_cdr, the burst-mode CDR search.
//
// The testbench closes the loop with two small models: a phase model that
// keeps the edge PI position E by adding every pi_e_inc the block issues,
// and an aggregator model that answers each cmt five cycles later with P
// and S for the six sampling points E-D, E, E+D, E+32-D, E+32, E+32+D
// (D = delta). The data is a "1010" preamble whose rising edge is at phase r
// (falling edge at r+32); a point is P = 1 when it lies in the half period
// after r, S = 0 when it lies within J LSB of an edge, and inside that
// window P is random (jitter).
//
// Every update is compared with a reference of the convergence rules written
// from the rule table (first 0->1 sector, S pair to 1:1 / 1:2 / 2:1, Delta
// down by the number of set S bits; in the wide outer sectors the table
// distance is kept from the favoured point), and every burst must end with E within
// 4 LSB of a data edge unless it timed out. Also checked: the opening case of
// the source's example (P = 000111, all S = 1: E moves by 16, Delta to 6),
// 11 cycles per iteration, at most 56 cycles from cal_done to done, the
// timeout after 5 iterations on a signal that never saturates, and that each
// rule case happens.
`timescale 1ps/1ps
module tb_bm_cdr;
  import bmrx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start_s = 1'b0, cal_done = 1'b0;
  logic cmt, agg_valid = 1'b0, bm_active, pi_upd, done, timeout;
  logic [5:0] p = '0, s = '0;
  pi_code_t pi_e_inc;
  delta_t delta;
  int checks = 0, failures = 0;

  int e_pos;          // edge PI position seen by the models
  int r_edge;         // data rising-edge phase
  int jit;            // jitter half-width, LSB
  int dead;           // 1: no signal at all
  int cmt_at [$];     // cycles of commands
  int cyc = 0;
  int ref_row;
  int exp_inc, exp_row;
  // mechanism counters
  int n_half11 = 0, n_half00 = 0, n_third = 0, n_twothird = 0;
  int n_drop [3] = '{0, 0, 0};
  int n_wide = 0, n_narrow = 0, n_timeout = 0, n_conv = 0;

  localparam int T3 [6]  = '{3, 2, 2, 1, 1, 1};
  localparam int T2 [6]  = '{5, 4, 3, 2, 1, 1};
  localparam int T23 [6] = '{7, 5, 4, 3, 2, 1};
  localparam int DV [6]  = '{11, 8, 6, 4, 3, 2};

  always #160 clk = ~clk;
  always @(posedge clk) cyc++;

  bm_cdr dut (
    .clk(clk), .rst_n(rst_n), .start_s(start_s), .cal_done(cal_done), .cmt(cmt),
    .agg_valid(agg_valid), .p(p), .s(s), .bm_active(bm_active), .pi_upd(pi_upd),
    .pi_e_inc(pi_e_inc), .delta(delta), .done(done), .timeout(timeout)
  );

  function automatic int md(int v);
    return ((v % 64) + 64) % 64;
  endfunction

  function automatic int cdist(int a, int b);
    int d = md(a - b);
    return (d > 32) ? 64 - d : d;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // aggregator model
  always @(posedge clk) begin
    if (cmt) begin
      cmt_at.push_back(cyc);
      fork
        begin
          int dv;
          int pt [6];
          repeat (4) @(posedge clk);
          dv = int'(delta);
          pt = '{e_pos - dv, e_pos, e_pos + dv, e_pos + 32 - dv, e_pos + 32, e_pos + 32 + dv};
          @(posedge clk);
          for (int i = 0; i < 6; i++) begin
            bit near;
            near = (cdist(pt[i], r_edge) < jit) || (cdist(pt[i], r_edge + 32) < jit);
            p[i] <= dead ? 1'b0 : near ? 1'($urandom) : (md(pt[i] - r_edge) < 32);
            s[i] <= dead ? 1'b1 : !near;
          end
          agg_valid <= 1'b1;
          @(posedge clk);
          agg_valid <= 1'b0;
        end
      join_none
    end
  end

  // reference rules, evaluated when the block takes the aggregator result
  always @(posedge clk) begin
    if (agg_valid && start_s && bm_active) begin
      int dv, sec, w, step, sl, sr;
      int offs [6];
      dv = DV[ref_row];
      offs = '{-dv, 0, dv, 32 - dv, 32, 32 + dv};
      sec = -1;
      for (int i = 0; i < 6; i++)
        if (sec < 0 && !p[i] && p[(i + 1) % 6]) sec = i;
      if (sec < 0) begin
        exp_inc = 0;
        exp_row = ref_row;
      end else begin
        sl = int'(s[sec]);
        sr = int'(s[(sec + 1) % 6]);
        if (sec == 2 || sec == 5) begin
          w = 32 - 2 * dv;
          step = (sl == sr) ? w / 2 : (sl == 0) ? T3[ref_row] : w - (dv - T23[ref_row]);
          n_wide++;
        end else begin
          step = (sl == sr) ? T2[ref_row] : (sl == 0) ? T3[ref_row] : T23[ref_row];
          n_narrow++;
        end
        if (sl == sr && sl == 1) n_half11++;
        else if (sl == sr)       n_half00++;
        else if (sl == 0)        n_third++;
        else                     n_twothird++;
        n_drop[sl + sr]++;
        exp_inc = md(offs[sec] + step);
        exp_row = (ref_row + sl + sr > 5) ? 5 : ref_row + sl + sr;
      end
    end
  end

  always @(posedge clk) begin
    if (pi_upd) begin
      check(int'(pi_e_inc) == exp_inc, $sformatf("increment %0d expected %0d", pi_e_inc, exp_inc));
      ref_row = exp_row;
      e_pos = md(e_pos + int'(pi_e_inc));
    end
  end

  task automatic burst(input int e0, input int r, input int j, input int dd, input bit fig13);
    int t_cal, t_done;
    e_pos = e0; r_edge = r; jit = j; dead = dd; ref_row = 0;
    cmt_at.delete();
    @(negedge clk);
    start_s = 1'b1;
    repeat (2) @(negedge clk);
    check(bm_active && delta == 4'd11, "PI spread reset to 11 at START");
    repeat (8) @(negedge clk);
    cal_done = 1'b1;
    t_cal = cyc;
    if (fig13) begin
      @(posedge pi_upd);
      #1;
      check(pi_e_inc == 6'd16 && delta == 4'd6, "example: P=000111, S=111111 gives +16 and Delta 6");
    end
    while (!done && cyc - t_cal < 200) @(negedge clk);
    t_done = cyc;
    check(done && !bm_active, "done and hand-off");
    check(t_done - t_cal <= 56, $sformatf("cal_done to done %0d cycles", t_done - t_cal));
    for (int k = 1; k < cmt_at.size(); k++)
      check(cmt_at[k] - cmt_at[k-1] == 11, "11 C8 cycles per iteration");
    check(int'(delta) == DV[ref_row], "final Delta follows the rules");
    if (timeout) begin
      n_timeout++;
      check(cmt_at.size() == 5, "timeout after 5 iterations");
    end else begin
      n_conv++;
      check(delta == 4'd2, "converged to Delta 2");
      check(cdist(e_pos, r) <= 4 || cdist(e_pos, r + 32) <= 4,
            $sformatf("E %0d near edge %0d", e_pos, r));
    end
    repeat (5) @(negedge clk);
    start_s = 1'b0;
    cal_done = 1'b0;
    repeat (2) @(negedge clk);
    check(!done && !bm_active, "START low resets");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    burst(0, 16, 0, 0, 1'b1);                          // the worked example
    for (int t = 0; t < 300; t++)
      burst(int'($urandom_range(0, 63)), int'($urandom_range(0, 63)),
            int'($urandom_range(0, 2)), 0, 1'b0);
    burst(5, 30, 40, 0, 1'b0);                         // never saturates
    burst(9, 0, 0, 1, 1'b0);                           // no transitions
    check(n_half11 > 0 && n_half00 > 0 && n_third > 0 && n_twothird > 0, "all S-pair cases");
    check(n_drop[0] > 0 && n_drop[1] > 0 && n_drop[2] > 0, "Delta kept, down one, down two");
    check(n_wide > 0 && n_narrow > 0, "wide and narrow sectors");
    check(n_timeout >= 2 && n_conv > 0, "timeout and convergence");
    $display("cases: 11=%0d 00=%0d 01=%0d 10=%0d drops=%0d/%0d/%0d wide=%0d timeout=%0d",
             n_half11, n_half00, n_third, n_twothird, n_drop[0], n_drop[1], n_drop[2], n_wide, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
