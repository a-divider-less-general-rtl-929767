// tb_afc_top: end-to-end test of the AFC with every parameter at its
// default, closed around the behavioural SSPLL model.
//
// Clocks: f_ref has an 8 ns period and the AFC clock 41 ns, so
// f_clk = f_ref * 8/41 as the auxiliary PLL would make it, with the clock
// edges 1 ns after the reference edges they line up with. The run goes:
// start with V_cap above the allowed range (fast discharge); synchronise;
// self-calibrate at the lowest coarse setting (watchdog timeout, slow
// search with a reversal, lock, settle, decode of the phase offset); step
// from the centre word to true lock; then a disturbance of the oscillator
// unlocks the SSPLL and the AFC must relock, a dip of V_cap below the
// allowed range must be pulled back by fast charging, and a second drift
// makes the slow search turn at the upper bound and step the coarse word.
// Checks, worked out from the model and not from the design:
//   * f_sync period = 41 reference periods; PFD pulses stay short.
//   * the calibrated phase offset equals PHI in 1/16 periods;
//   * every decoded state equals the model's harmonic modulo 8 (signed),
//     and every coarse step equals -2 times that state;
//   * whenever true lock is reported the model sits at harmonic 64;
//   * each settle phase lasts at least 1023 clocks;
//   * fast charge is commanded whenever V_cap's code is 0 or 7;
//   * every mechanism listed at the end happened at least once.
`timescale 1ns/1ps
module tb_afc_top;
  import afc_pkg::*;

  logic ref_clk = 1'b1, clk = 1'b0, rst_n = 1'b1;
  logic [6:0] sample_therm, charge_therm;
  logic fsync, fb_div, pfd_up, pfd_dn;
  coarse_t coarse;
  charge_cmd_t charge_cmd;
  afc_state_e state;
  logic locked, true_lock, calibrating, dec_done, wd_timeout, reversal, slip;
  phase_t phase_off;
  hstate_t dec_state;
  logic [2:0] frame_idx;
  logic frame_equal, sync_seen, dec_busy, search_up;
  logic [7:0] dec_dist;
  logic model_locked;
  int   harmonic;

  afc_top dut (.*);

  sspll_model model (
    .clk, .fsync, .coarse, .charge_cmd(charge_cmd), .sample_therm, .charge_therm,
    .pll_locked(model_locked), .harmonic
  );

  always #4 ref_clk = ~ref_clk;
  initial begin
    #1;
    forever begin
      clk = 1'b1;
      #20.5 clk = 1'b0;
      #20.5;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_fast_up = 0, n_fast_down = 0, n_wd = 0, n_charge = 0, n_rev = 0;
  int n_settle = 0, n_cal = 0, n_step = 0, n_true = 0, n_unlock = 0, n_relock_step = 0;
  int n_slow_up = 0, n_slow_down = 0;
  afc_state_e prev_state = ST_SYNC;
  int settle_len = 0;
  int clk_cycles = 0;
  coarse_t coarse_before;
  bit was_cal;

  always @(posedge clk) if (rst_n) begin
    clk_cycles++;
    if (sync_seen) n_sync++;
    if (charge_cmd.up_fast) n_fast_up++;
    if (charge_cmd.down_fast) n_fast_down++;
    if (charge_cmd.up) n_slow_up++;
    if (charge_cmd.down) n_slow_down++;
    if (reversal) n_rev++;
    if (state == ST_SETTLE) settle_len++;
    if (state != prev_state) begin
      if ($test$plusargs("trace"))
        $display("%0t %s -> %s coarse=%b harm=%0d v=%f locked=%b", $time, prev_state.name(), state.name(), coarse, harmonic, model.v_cap, locked);
      if (state == ST_CHARGE) begin n_charge++; if (prev_state == ST_WAIT_LOCK) n_wd++; end
      if (state == ST_SETTLE) begin n_settle++; settle_len = 1; end
      if (prev_state == ST_SETTLE && state == ST_DECODE)
        check(settle_len >= 1023, $sformatf("settle lasted %0d cycles", settle_len));
      if (prev_state == ST_WAIT_UNLOCK && state == ST_WAIT_LOCK) begin
        if (locked) n_relock_step++; else n_unlock++;
      end
      if (state == ST_DECODE) begin
        if ($test$plusargs("trace")) begin
          $write("snap:");
          for (int i = 15; i >= 0; i--) $write(" %0d", dut.u_core.u_dec.snap[i]);
          $display("");
        end
        coarse_before = coarse;
        was_cal = calibrating;
      end
    end
    prev_state <= state;
  end

  // decode results against the model
  always @(posedge clk) if (rst_n && dec_done) begin
    int m;
    m = ((harmonic % 8) + 8) % 8;
    if (m > 4) m -= 8;
    if (was_cal) begin
      n_cal++;
      check(int'(dec_state) == -3, "calibration decoded at a state other than -3");
      check(model.harmonic % 8 == 5, $sformatf("calibration ran at harmonic %0d", harmonic));
    end else begin
      check(int'(dec_state) == m,
            $sformatf("decoded state %0d, model harmonic %0d (state %0d)", dec_state, harmonic, m));
      if (m == 0) n_true++; else n_step++;
    end
  end

  // coarse step rule, one cycle after the decoder finishes
  logic dec_done_q;
  hstate_t dec_state_q;
  always @(posedge clk) begin
    dec_done_q  <= dec_done;
    dec_state_q <= dec_state;
    if (rst_n && dec_done_q) begin
      if (was_cal) begin
        check(coarse == 4'b1000, "coarse word not back at the centre after calibration");
        check(phase_off == phase_t'(2), $sformatf("calibrated phase offset %0d, expected 2", phase_off));
      end else begin
        int exp_c;
        exp_c = int'(coarse_before) - 2 * int'(dec_state_q);
        if (exp_c < 0) exp_c = 0;
        if (exp_c > 15) exp_c = 15;
        check(int'(coarse) == exp_c, $sformatf("coarse %0d, expected %0d", coarse, exp_c));
      end
    end
  end

  // true lock means harmonic 64
  always @(posedge clk) if (rst_n && true_lock && state == ST_WAIT_UNLOCK && locked) begin
    if (clk_cycles % 64 == 0)
      check(harmonic == 64 && model_locked, $sformatf("true lock reported at harmonic %0d", harmonic));
  end

  // fast charging whenever the V_cap code is out of range (command is one clock late)
  logic [6:0] charge_therm_q;
  always @(posedge clk) begin
    charge_therm_q <= charge_therm;
    if (rst_n && clk_cycles > 2) begin
      if (charge_therm_q == 7'h00) check(charge_cmd.up_fast && !charge_cmd.down_fast, "no fast charge at code 0");
      if (charge_therm_q == 7'h7f) check(charge_cmd.down_fast && !charge_cmd.up_fast, "no fast discharge at code 7");
    end
  end

  // f_sync period and PFD pulse width
  realtime t_fall = 0, up_rise = 0, dn_rise = 0;
  int n_fsync = 0;
  always @(negedge fsync) if (rst_n) begin
    if (n_fsync > 0) check($realtime - t_fall == 328.0, $sformatf("f_sync period %0t", $realtime - t_fall));
    t_fall = $realtime;
    n_fsync++;
  end
  always @(posedge pfd_up) up_rise = $realtime;
  always @(negedge pfd_up) check($realtime - up_rise <= 2.0, $sformatf("long PFD up pulse %0t %0t", up_rise, $realtime));
  always @(posedge pfd_dn) dn_rise = $realtime;
  always @(negedge pfd_dn) check($realtime - dn_rise <= 2.0, "long PFD down pulse");

  // watchdog
  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired, state %s", state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_true_lock(input int max_cycles, input string phase_name);
    int n = 0;
    while (!(true_lock && state == ST_WAIT_UNLOCK) && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    check(true_lock, {"no true lock: ", phase_name});
    $display("%0t: true lock (%s) after %0d cycles, coarse %b, harmonic %0d, v_cap %f",
             $time, phase_name, n, coarse, harmonic, model.v_cap);
  endtask

  initial begin
    sample_therm = '0;
    charge_therm = 7'h7f;
    // assert reset (an edge, so that the asynchronous resets act), then
    // release it just after a reference edge that lines up with a clock edge
    #0.5 rst_n = 1'b0;
    #657 rst_n = 1'b1;
    wait_true_lock(40000, "start-up");
    repeat (3000) @(posedge clk);
    check(true_lock && harmonic == 64, "lost true lock while undisturbed");
    // disturbance: the oscillator drifts by 0.3 of a harmonic
    model.x_off = 0.3;
    repeat (200) @(posedge clk);
    wait_true_lock(60000, "after drift");
    // V_cap dip below the allowed range
    model.v_cap = 0.05;
    repeat (200) @(posedge clk);
    wait_true_lock(60000, "after V_cap dip");
    // drift the other way: the upward search now runs into the upper bound
    model.x_off = model.x_off - 0.5;
    repeat (200) @(posedge clk);
    wait_true_lock(80000, "after second drift");

    $display("mechanisms: sync=%0d fast_up=%0d fast_down=%0d wd_timeout=%0d charge=%0d slow_up=%0d slow_down=%0d reversal=%0d settle=%0d cal=%0d coarse_step=%0d true_lock=%0d unlock=%0d step_wait_exit=%0d",
             n_sync, n_fast_up, n_fast_down, n_wd, n_charge, n_slow_up, n_slow_down, n_rev, n_settle, n_cal, n_step, n_true, n_unlock, n_relock_step);
    check(n_sync > 0, "no f_sync");
    check(n_fast_up > 0, "no fast charge");
    check(n_fast_down > 0, "no fast discharge");
    check(n_wd > 0, "no watchdog timeout");
    check(n_charge > 0, "no lock-assist charge");
    check(n_slow_up > 0, "no slow charging");
    check(n_slow_down > 0, "no slow discharging");
    check(n_rev > 0, "no search reversal");
    check(n_settle > 0, "no settle");
    check(n_cal == 1, "self-calibration not run exactly once");
    check(n_step > 0, "no coarse step");
    check(n_true > 0, "no true lock");
    check(n_unlock > 0, "no unlock detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
