// tb_lock_sequence: reproduces the reference lock sequence of the AFC, with
// self-calibration switched off (CAL_EN = 0), on the digital core closed
// around the SSPLL model. The published state trace of this design is:
//   wait for lock, charge, settle, decode   (coarse word 1000)
//   wait for unlock, wait for lock, charge, settle, decode, wait for unlock
//                                            (coarse word 0110, true lock)
// with the capacitor voltage rising in the first charge phase, and rising
// then falling in the second, to settle lower than before.
//
// How the model is set up to give that trace: at word 1000 and V_cap = 0.5 V
// the oscillator sits at harmonic 64.7, outside the lock-in range. The
// watchdog times out, and the upward lock-assist sweep reaches harmonic 65
// at 0.65 V. That decodes as state +1, and one step of -2 bands (0.45
// harmonic each) moves it to 64.1, so the SSPLL unlocks. The second sweep
// goes up, turns at the upper voltage bound (code 6) and locks at harmonic
// 64 on the way down, at 0.6 V. The second decode gives state 0: true lock.
//
// Checks: the exact order of states from the first 'wait for lock' on, the
// coarse word in each half, a sweep reversal in the second charge phase,
// the final capacitor voltage below that of the first lock, that each
// decode waited SETTLE_CYCLES, and true lock at harmonic 64. Short timing
// constants (watchdog 200, settle and step wait 100) keep the run short.
`timescale 1ns/1ps
module tb_lock_sequence;
  import afc_pkg::*;
  localparam int SETTLE = 100;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b1;
  logic [6:0] sample_therm, charge_therm;
  sample_t sample_code, charge_code;
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
  int harmonic;
  int checks = 0, failures = 0;

  assign sample_code = sample_t'($countones(sample_therm));
  assign charge_code = sample_t'($countones(charge_therm));

  afc_core #(.WD_LIMIT(200), .SETTLE_CYCLES(SETTLE), .STEP_WAIT(100), .CAL_EN(1'b0)) dut (
    .clk, .rst_n, .sync, .sample_code, .charge_code, .coarse, .charge_cmd, .state,
    .locked, .true_lock, .calibrating, .phase_off, .dec_state, .dec_done, .wd_timeout,
    .reversal, .slip, .frame_idx, .frame_equal, .sync_seen, .dec_busy, .dec_dist, .search_up
  );

  sspll_model #(.X0(64.7), .BAND(0.45), .PHI(0.0625), .V0(0.5)) model (
    .clk, .fsync(sync), .coarse, .charge_cmd, .sample_therm, .charge_therm,
    .pll_locked(model_locked), .harmonic
  );

  always #20 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc % 8 == 7) #39 sync = 1'b0;
    if (cyc % 8 == 3) #39 sync = 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  // state trace from the first WAIT_LOCK on
  afc_state_e trace[$];
  afc_state_e prev = ST_SYNC;
  bit started = 1'b0;
  int settle_len = 0, n_rev_second = 0, n_dec = 0;
  real v_first_lock = 0.0;
  always @(posedge clk) if (rst_n) begin
    if (state != prev) begin
      if (state == ST_WAIT_LOCK) started = 1'b1;
      if (started || state == ST_WAIT_LOCK) trace.push_back(state);
      // coarse word while in each half of the sequence
      if (state == ST_SETTLE)
        check(coarse == (n_dec == 0 ? 4'b1000 : 4'b0110),
              $sformatf("coarse %b in settle after %0d decodes", coarse, n_dec));
      if (state == ST_SETTLE && n_dec == 0) v_first_lock = model.v_cap;
    end
    if (state == ST_SETTLE) settle_len++;
    if (state == ST_DECODE && prev == ST_SETTLE) begin
      check(settle_len >= SETTLE, $sformatf("settled only %0d clocks", settle_len));
      settle_len = 0;
    end
    if (dec_done) n_dec++;
    if (reversal && state == ST_CHARGE && n_dec == 1) n_rev_second++;
    prev <= state;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired, state %s", state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    afc_state_e expect_seq[$];
    expect_seq = '{ST_WAIT_LOCK, ST_CHARGE, ST_SETTLE, ST_DECODE,
                   ST_WAIT_UNLOCK, ST_WAIT_LOCK, ST_CHARGE, ST_SETTLE, ST_DECODE,
                   ST_WAIT_UNLOCK};
    #50 rst_n = 1'b1;
    while (!(true_lock && state == ST_WAIT_UNLOCK)) @(posedge clk);
    repeat (1000) @(posedge clk);
    check(trace.size() == expect_seq.size(),
          $sformatf("%0d state changes, expected %0d", trace.size(), expect_seq.size()));
    foreach (expect_seq[i])
      if (i < trace.size())
        check(trace[i] == expect_seq[i],
              $sformatf("state %0d is %s, expected %s", i, trace[i].name(), expect_seq[i].name()));
    check(n_dec == 2, $sformatf("%0d decodes, expected 2", n_dec));
    check(coarse == 4'b0110, $sformatf("final coarse %b", coarse));
    check(true_lock && state == ST_WAIT_UNLOCK, "not idle in true lock");
    check(harmonic == 64 && model_locked, $sformatf("locked at harmonic %0d", harmonic));
    check(n_rev_second > 0, "no sweep reversal in the second charge phase");
    check(model.v_cap < v_first_lock,
          $sformatf("V_cap %f not below its first lock value %f", model.v_cap, v_first_lock));
    check(!calibrating, "calibration ran with CAL_EN = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
