// tb_freq_decoder: checks the pattern decoder against patterns made here
// with $sin (not with the package's table).
// For every harmonic state m = -3..+3 and every static phase p = 0..15,
// two frames of ideal 3-bit samples sin(2*pi*(m*j/8 + p/16)) are built and
// up to three samples are corrupted by one code. In normal mode, with the
// phase correction set to p, the decoder must return m; in calibration
// mode with the known state m it must return p. (At p = 4 and 12 the
// pattern cannot tell +m from -m; only the magnitude is checked there.) The result must arrive 7
// clocks (normal) or 16 clocks (calibration) after start.
`timescale 1ns/1ps
module tb_freq_decoder;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cal_mode = 1'b0;
  sample_mem_t mem = '0;
  phase_t phase_off = '0;
  hstate_t cal_state = '0;
  logic busy, done;
  hstate_t state;
  phase_t phase;
  logic [7:0] match_dist;
  int checks = 0, failures = 0;

  freq_decoder dut (.clk, .rst_n, .start, .cal_mode, .mem, .phase_off, .cal_state,
                    .busy, .done, .state, .phase, .match_dist);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  function automatic sample_mem_t make_pattern(input int m, input int p, input int n_err);
    sample_mem_t r;
    for (int i = 0; i < 16; i++) begin
      int j, c;
      real s;
      j = 7 - (i % 8);                     // mem[0] is the last sample of the frame
      s = $sin(2.0 * 3.14159265358979 * (real'(m * j) / 8.0 + real'(p) / 16.0));
      c = int'($floor(4.0 + 3.92 * s));
      r[i] = sample_t'(c);
    end
    for (int e = 0; e < n_err; e++) begin
      int k;
      k = $urandom_range(0, 15);
      if (r[k] == 3'd7 || (r[k] != 3'd0 && $urandom_range(0, 1) == 1)) r[k] = r[k] - 1'b1;
      else r[k] = r[k] + 1'b1;
    end
    return r;
  endfunction

  task automatic run(input bit cal, input int exp_cycles);
    int n = 0;
    @(negedge clk);
    cal_mode = cal;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    mem = {$urandom, $urandom};           // memory moves on after start
    while (!done && n < 100) begin
      @(negedge clk);
      n++;
    end
    check(n == exp_cycles, $sformatf("latency %0d, expected %0d", n, exp_cycles));
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int m = -3; m <= 3; m++) begin
      for (int p = 0; p < 16; p++) begin
        // normal mode
        mem = make_pattern(m, p, p % 4);
        phase_off = phase_t'(p);
        run(1'b0, 7);
        // at a quarter-period offset the pattern is even in j, so +m and -m
        // give the same samples and only the magnitude can be checked
        if (p == 4 || p == 12)
          check(int'(state) == m || int'(state) == -m, $sformatf("m=%0d p=%0d decoded %0d", m, p, state));
        else
          check(int'(state) == m, $sformatf("m=%0d p=%0d decoded %0d", m, p, state));
        // calibration mode; state 0 gives a constant pattern, which cannot
        // tell p from 8-p, so it is no calibration state
        if (m == 0) continue;
        mem = make_pattern(m, p, (p + 1) % 3);
        cal_state = hstate_t'(m);
        run(1'b1, 16);
        check(int'(phase) == p, $sformatf("cal m=%0d p=%0d found phase %0d", m, p, phase));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
