// End-to-end testbench of bm_rx at its default parameters.
//
// Behavioural models stand in for the analog receiver:
//   * I_DC loop: the photodiode carries a dc current i_in (uA); the
//     cancelling current is IDAC code x LSB (2, 4, 8, 16 uA for gain 000,
//     001, 011, 111) and the calibration latch, clocked when cal_latch_en is
//     high, reports i_in > I_DC;
//   * samplers and PIs: one half-rate cycle spans 64 PI steps (1 step =
//     1.25 ps at 25 Gb/s). The edge sampler fires at 64k + E in cycle k,
//     where E is the edge PI code followed without wrap-around; the data and
//     amplitude samplers fire at the signed code difference from it; each
//     complementary sampler fires 32 steps later. Every sample gets uniform
//     jitter of +-jit steps. The transmitted stream is a "1010" preamble
//     followed, once the receiver reports lock, by a PRBS7 payload, with a
//     random start phase and an optional frequency offset (+-100 ppm).
//
// Each burst raises START at a random moment and checks: the I_DC settings
// against the closed-form result of the search and cal_done within 39 C8
// cycles (12.5 ns); done within 97 C8 cycles of START (31 ns); after lock,
// the edge clock within 5 steps (6.25 ps) of the data edge in every cycle and
// an error-free PRBS7 payload (self-synchronising check b[n] = b[n-6] ^
// b[n-7]); the bang-bang loop following a frequency offset; and a clean
// reset when START falls. A burst with no light must end in the BM-CDR
// timeout. One burst repeats the previous source and reuses its stored I_DC
// setting, which must bring cal_done 4 cycles after START. Each mechanism of the design is counted and must occur.
`timescale 1ps/1ps
module tb_bm_rx;
  import bmrx_pkg::*;

  logic clk_hr = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [5:0] latch_q = '0;
  logic cal_cmp = 1'b0;
  logic idc_preset_en = 1'b0;
  logic [2:0] idc_preset_gain = '0;
  logic [5:0] idc_preset_code = '0;
  logic c8, cal_latch_en, cal_done, bm_active, cmt, done, bm_timeout;
  logic [2:0] idc_gain;
  logic [5:0] idc_code;
  pi_code_t pi_e, pi_d, pi_a;
  logic [7:0] data_word, edge_word, amp_word;

  int checks = 0, failures = 0;

  always #40 clk_hr = ~clk_hr;   // 12.5 GHz half-rate clock

  bm_rx dut (
    .clk_hr(clk_hr), .rst_n(rst_n), .start(start), .latch_q(latch_q), .cal_cmp(cal_cmp),
    .idc_preset_en(idc_preset_en), .idc_preset_gain(idc_preset_gain), .idc_preset_code(idc_preset_code),
    .c8(c8), .cal_latch_en(cal_latch_en), .idc_gain(idc_gain), .idc_code(idc_code),
    .cal_done(cal_done), .pi_e(pi_e), .pi_d(pi_d), .pi_a(pi_a), .bm_active(bm_active),
    .cmt(cmt), .done(done), .bm_timeout(bm_timeout), .data_word(data_word),
    .edge_word(edge_word), .amp_word(amp_word)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- channel
  int    i_in = 0;         // photodiode dc current, uA
  int    jit = 0;          // jitter, PI steps
  bit    dark = 1'b1;      // no light
  real   t0 = 0.0;         // time of the first bit edge, PI steps
  real   ppm = 0.0;        // transmitter frequency offset
  longint k_hr = 0;        // half-rate cycle count
  longint e_unw = 0;       // edge PI position without wrap-around
  pi_code_t e_last = '0;
  longint pay_start = 64'h7fff_ffff_ffff; // first payload bit
  bit    prbs [];          // PRBS7 sequence, indexed by bit number
  real   bit_len = 32.0;   // transmitted bit length, PI steps

  function automatic int sdiff(pi_code_t a, pi_code_t b);
    int d = (int'(a) - int'(b) + 64) % 64;
    return (d >= 32) ? d - 64 : d;
  endfunction

  function automatic bit tx_bit(longint n);
    if (dark || n < 0) return 1'b0;
    if (n < pay_start) return n[0];
    return prbs[n % prbs.size()];
  endfunction

  function automatic bit sample_at(real t);
    real tj;
    tj = t + real'($urandom_range(0, 2 * jit)) - real'(jit);
    return tx_bit(longint'($floor((tj - t0) / bit_len)));
  endfunction

  // bit index and edge distance of the (jitter-free) edge sampling instant
  function automatic real edge_err();
    real x, f;
    x = (real'(64 * k_hr + e_unw) - t0) / bit_len;
    f = x - $floor(x);
    return ((f > 0.5) ? (1.0 - f) : f) * bit_len;
  endfunction

  always @(negedge clk_hr) begin
    real te;
    e_unw  += longint'(sdiff(pi_e, e_last));
    e_last  = pi_e;
    k_hr++;
    te = real'(64 * k_hr + e_unw);
    latch_q[L_E]  <= sample_at(te);
    latch_q[L_EB] <= sample_at(te + 32.0);
    latch_q[L_D]  <= sample_at(te + real'(sdiff(pi_d, pi_e)));
    latch_q[L_DB] <= sample_at(te + real'(sdiff(pi_d, pi_e)) + 32.0);
    latch_q[L_A]  <= sample_at(te + real'(sdiff(pi_a, pi_e)));
    latch_q[L_AB] <= sample_at(te + real'(sdiff(pi_a, pi_e)) + 32.0);
  end

  // I_DC loop and calibration latch
  function automatic int lsb_of(logic [2:0] g);
    case (g)
      3'b000:  return 2;
      3'b001:  return 4;
      3'b011:  return 8;
      default: return 16;
    endcase
  endfunction

  always @(posedge c8) if (cal_latch_en) cal_cmp <= (i_in > int'(idc_code) * lsb_of(idc_gain));

  // ------------------------------------------------------------ mechanisms
  int n_gain [4] = '{0, 0, 0, 0};
  int n_gain_step = 0, n_iter = 0, n_conv = 0, n_timeout = 0, n_handoff = 0;
  int n_spair [4] = '{0, 0, 0, 0};
  int n_drop [3] = '{0, 0, 0};
  int n_bb_up = 0, n_bb_dn = 0, n_reset = 0, n_track = 0, n_prbs_bits = 0, n_reuse = 0;
  logic [2:0] idc_gain_last = 3'b111;
  logic [5:0] idc_code_last = 6'd26;
  pi_code_t e_c8_prev = '0;

  always @(posedge c8) begin
    if (cmt) n_iter++;
    if (dut.u_bmcdr.state == dut.u_bmcdr.S_SENSE && dut.u_bmcdr.agg_valid && dut.u_bmcdr.found) begin
      n_spair[{dut.u_bmcdr.sl, dut.u_bmcdr.sr}]++;
      n_drop[int'(dut.u_bmcdr.sl) + int'(dut.u_bmcdr.sr)]++;
    end
    if (dut.u_cal.decide && dut.u_cal.state == dut.u_cal.S_GAIN && !dut.u_cal.cmp) n_gain_step++;
    if (done && !bm_active) begin
      if (pi_e == e_c8_prev + 6'd1) n_bb_up++;
      if (pi_e == e_c8_prev - 6'd1) n_bb_dn++;
    end
    e_c8_prev = pi_e;
  end

  // ------------------------------------------------------------ one burst
  task automatic burst(input int cur, input int jj, input real f_ppm, input bit no_light,
                       input int pay_cycles, input bit reuse = 1'b0);
    int cyc, c_cal, c_done, c_exp;
    logic [2:0] g_exp;
    longint e_start;
    bit hist [$];
    int perr_bad, bit_err;
    real emax;

    // idle gap, light appears with the new transmitter
    repeat (40) @(posedge c8);
    i_in = cur; jit = jj; ppm = f_ppm; dark = no_light;
    // reuse: apply the setting the previous burst found, skip the search
    idc_preset_en   = reuse;
    idc_preset_gain = idc_gain_last;
    idc_preset_code = idc_code_last;
    bit_len = 32.0 * (1.0 - ppm * 1e-6);
    t0 = real'(64 * k_hr) + real'($urandom_range(0, 63));
    pay_start = 64'h7fff_ffff_ffff;
    repeat (3) @(posedge c8);
    #($urandom_range(1, 319));
    start = 1'b1;

    // expected I_DC settings, closed form
    if      (cur > 26 * 16) g_exp = 3'b111;
    else if (cur > 26 * 8)  g_exp = 3'b011;
    else if (cur > 26 * 4)  g_exp = 3'b001;
    else                    g_exp = 3'b000;
    c_exp = (cur <= 0) ? 0 : (cur - 1) / lsb_of(g_exp);
    if (c_exp > 63) c_exp = 63;

    cyc = 0; c_cal = -1; c_done = -1;
    while (c_done < 0 && cyc < 200) begin
      @(posedge c8);
      cyc++;
      #1;
      if (cal_done && c_cal < 0) c_cal = cyc;
      if (done && c_done < 0) c_done = cyc;
    end
    $display("burst i_in=%0d jit=%0d ppm=%0.0f dark=%0d: cal_done %0d, done %0d C8 cycles, gain %b code %0d, timeout %0d",
             cur, jj, f_ppm, no_light, c_cal, c_done, idc_gain, idc_code, bm_timeout);
    if (reuse) begin
      check(c_cal == 4, "stored setting: cal_done 4 C8 cycles after START");
      n_reuse++;
    end
    check(c_cal > 0 && c_cal <= 39, "cal_done within 39 C8 cycles (12.5 ns)");
    idc_gain_last = idc_gain;
    idc_code_last = idc_code;
    check(idc_gain == g_exp, $sformatf("I_DC gain %b expected %b", idc_gain, g_exp));
    check(int'(idc_code) == c_exp, $sformatf("I_DC code %0d expected %0d", idc_code, c_exp));
    n_gain[g_exp == 3'b000 ? 0 : g_exp == 3'b001 ? 1 : g_exp == 3'b011 ? 2 : 3]++;
    check(c_done > 0 && c_done <= 97, "done within 97 C8 cycles (31 ns) of START");
    check(c_done - c_cal <= 58, "BM-CDR within 58 C8 cycles (18.5 ns)");
    check(!bm_active, "PIs handed to the bang-bang loop");
    @(posedge c8);
    #1;
    check(int'(pi_d) == (int'(pi_e) + 48) % 64, "data clock half a UI before the edge clock");
    n_handoff++;

    if (no_light) begin
      check(bm_timeout, "no light: search ends by timeout");
      n_timeout += int'(bm_timeout);
    end else begin
      // with +-3 steps of jitter the search may legitimately run to its timeout
      if (jj <= 2) check(!bm_timeout, "search converged");
      n_conv    += int'(!bm_timeout);
      n_timeout += int'(bm_timeout);
      // payload starts a few bits after lock
      pay_start = longint'($floor((real'(64 * k_hr + e_unw) - t0) / bit_len)) + 40;
      repeat (20) @(posedge c8);
      e_start = e_unw;
      perr_bad = 0; bit_err = 0; emax = 0.0;
      for (int c = 0; c < pay_cycles; c++) begin
        @(posedge c8);
        #1;
        if (edge_err() > emax) emax = edge_err();
        if (edge_err() > 5.0) perr_bad++;
        if (c >= 10) begin
          for (int b = 0; b < 8; b++) begin
            hist.push_back(data_word[b]);
            if (hist.size() > 7) begin
              if (hist[$] != (hist[$-6] ^ hist[$-7])) bit_err++;
              n_prbs_bits++;
              void'(hist.pop_front());
            end
          end
        end
      end
      $display("  payload: max edge error %0.2f steps, %0d PRBS errors, E moved %0d",
               emax, bit_err, e_unw - e_start);
      check(perr_bad == 0, "edge clock stays within 5 steps of the data edge");
      check(bit_err == 0, "PRBS7 payload received without errors");
      if (ppm != 0.0) begin
        // a 100 ppm offset moves the edge by 0.0064 steps per half-rate cycle
        check((ppm > 0.0) ? (e_unw - e_start < -2) : (e_unw - e_start > 2),
              "bang-bang loop follows the frequency offset");
        n_track++;
      end
    end

    @(negedge c8);
    start = 1'b0;
    idc_preset_en = 1'b0;
    dark = 1'b1;
    repeat (5) @(posedge c8);
    #1;
    check(!cal_done && !done && !bm_active && idc_gain == 3'b111 && idc_code == 6'd26,
          "falling START resets every state machine");
    n_reset++;
  endtask

  initial begin
    logic [6:0] lfsr;
    prbs = new[127];
    lfsr = 7'h7f;
    for (int n = 0; n < 127; n++) begin
      prbs[n] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
    repeat (5) @(posedge clk_hr);
    rst_n = 1'b1;
    burst(700, 1, 0.0,    1'b0, 300);
    burst(300, 2, 100.0,  1'b0, 800);
    burst(150, 1, -100.0, 1'b0, 800);
    burst(50,  0, 0.0,    1'b0, 300);
    burst(50,  1, 0.0,    1'b0, 300, 1'b1);          // same source again, stored I_DC
    burst(0,   1, 0.0,    1'b1, 0);
    burst(900, 3, 0.0,    1'b0, 300);
    for (int b = 0; b < 6; b++)
      burst(int'($urandom_range(10, 1000)), int'($urandom_range(0, 3)), 0.0, 1'b0, 300);
    $display("mechanisms: gain levels %0d/%0d/%0d/%0d, gain steps down %0d, iterations %0d",
             n_gain[0], n_gain[1], n_gain[2], n_gain[3], n_gain_step, n_iter);
    $display("  S pairs 00/01/10/11 %0d/%0d/%0d/%0d, Delta drops 0/1/2 %0d/%0d/%0d",
             n_spair[0], n_spair[1], n_spair[2], n_spair[3], n_drop[0], n_drop[1], n_drop[2]);
    $display("  converged %0d, timeouts %0d, hand-offs %0d, BB up/down %0d/%0d, ppm tracking %0d, resets %0d, PRBS bits %0d, reuses %0d",
             n_conv, n_timeout, n_handoff, n_bb_up, n_bb_dn, n_track, n_reset, n_prbs_bits, n_reuse);
    for (int g = 0; g < 4; g++) check(n_gain[g] > 0, "each I_DC gain level selected");
    check(n_gain_step > 0, "gain search stepped down");
    check(n_spair[0] > 0 && n_spair[1] > 0 && n_spair[2] > 0 && n_spair[3] > 0, "every S-pair rule used");
    check(n_drop[0] > 0 && n_drop[1] > 0 && n_drop[2] > 0, "Delta kept, down one row, down two rows");
    check(n_conv > 0 && n_timeout > 0 && n_handoff > 0, "convergence, timeout and hand-off");
    check(n_bb_up > 0 && n_bb_dn > 0 && n_track > 0, "bang-bang moves and offset tracking");
    check(n_reset > 0 && n_prbs_bits > 1000, "resets and payload");
    check(n_reuse > 0, "stored I_DC setting reused");
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
