// tb_phase_sweep: self-calibration against every static sampling phase
// error. Sixteen copies of the digital core, each closed around its own
// SSPLL model, run side by side. Copy k has a phase error between the AFC
// sampler and the SSPLL's sampler of k/16 + 0.01 of a period: on the
// decoder's 1/16 grid, plus a little off it.
//
// Each copy goes through the whole start-up: synchronisation,
// self-calibration at coarse word 0000 (harmonic 61, state -3, reached by
// lock assist), the centre word 1000 (harmonic 65, state +1), one step to
// 0110 and true lock at harmonic 64. These values come from the model's
// numbers, not from the design.
//
// Checks, for every k:
//   * calibration stores phase offset k (the pattern of state -3 is
//     different at every phase);
//   * every decoded state matches the model's harmonic;
//   * the copy ends in true lock at harmonic 64 with coarse word 0110.
// The exceptions are k = 4 and 12, a quarter period either way. There the
// sampler sits on the peaks of the waveform, and the pattern of +m is the
// same as that of -m. For those two copies only the calibration is checked,
// and the testbench reports where they end up.
// Short timing constants (watchdog 200, settle and step wait 100 clocks).
`timescale 1ns/1ps
module tb_phase_sweep;
  import afc_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b1;
  int checks = 0, failures = 0;

  coarse_t    coarse     [N];
  afc_state_e state      [N];
  logic       true_lock  [N];
  logic       dec_done   [N];
  hstate_t    dec_state  [N];
  phase_t     phase_off  [N];
  logic       calibrating[N];
  logic       model_locked[N];
  int         harmonic   [N];

  always #20 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc % 8 == 7) #39 sync = 1'b0;
    if (cyc % 8 == 3) #39 sync = 1'b1;
  end

  for (genvar k = 0; k < N; k++) begin : g_copy
    logic [6:0] sample_therm, charge_therm;
    sample_t sample_code, charge_code;
    charge_cmd_t charge_cmd;
    logic locked, wd_timeout, reversal, slip, frame_equal, sync_seen, dec_busy, search_up;
    logic [2:0] frame_idx;
    logic [7:0] dec_dist;
    logic [3:0] cmd_bits;

    assign sample_code = sample_t'($countones(sample_therm));
    assign charge_code = sample_t'($countones(charge_therm));
    assign cmd_bits    = charge_cmd;

    afc_core #(.WD_LIMIT(200), .SETTLE_CYCLES(100), .STEP_WAIT(100)) dut (
      .clk, .rst_n, .sync, .sample_code, .charge_code, .coarse(coarse[k]), .charge_cmd,
      .state(state[k]), .locked, .true_lock(true_lock[k]), .calibrating(calibrating[k]),
      .phase_off(phase_off[k]), .dec_state(dec_state[k]), .dec_done(dec_done[k]), .wd_timeout,
      .reversal, .slip, .frame_idx, .frame_equal, .sync_seen, .dec_busy, .dec_dist, .search_up
    );

    sspll_model #(.PHI(real'(k) / 16.0 + 0.01), .V0(0.3)) model (
      .clk, .fsync(sync), .coarse(coarse[k]), .charge_cmd(cmd_bits), .sample_therm,
      .charge_therm, .pll_locked(model_locked[k]), .harmonic(harmonic[k])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  function automatic bit ambiguous(input int k);
    return k == 4 || k == 12;
  endfunction

  // decoded state against the model's harmonic; the first decode is calibration
  int n_dec[N];
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) if (dec_done[k]) begin
      int m;
      m = ((harmonic[k] % 8) + 8) % 8;
      if (m > 4) m -= 8;
      if (n_dec[k] == 0)
        // the offset itself is registered one clock later; checked at the end
        check(calibrating[k], $sformatf("copy %0d: first decode is not calibration", k));
      else if (!ambiguous(k))
        check(int'(dec_state[k]) == m,
              $sformatf("copy %0d decoded %0d at harmonic %0d", k, dec_state[k], harmonic[k]));
      n_dec[k]++;
    end
  end

  function automatic bit all_done();
    for (int k = 0; k < N; k++)
      if (!ambiguous(k) && !(true_lock[k] && state[k] == ST_WAIT_UNLOCK)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    repeat (2000) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      check(n_dec[k] >= 1 && phase_off[k] == phase_t'(k),
            $sformatf("copy %0d phase offset %0d", k, phase_off[k]));
      if (ambiguous(k))
        $display("copy %0d (sign-ambiguous phase): coarse %b, harmonic %0d, true lock %0d",
                 k, coarse[k], harmonic[k], true_lock[k]);
      else begin
        check(true_lock[k] && state[k] == ST_WAIT_UNLOCK,
              $sformatf("copy %0d not idle in true lock", k));
        check(harmonic[k] == 64 && model_locked[k],
              $sformatf("copy %0d locked at harmonic %0d", k, harmonic[k]));
        check(coarse[k] == 4'b0110, $sformatf("copy %0d coarse %b", k, coarse[k]));
        check(n_dec[k] == 3, $sformatf("copy %0d made %0d decodes", k, n_dec[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
