// tb_lock_detector: drives the sample memory port directly.
// Frames repeat (a "locked" pattern) or change at random; the reference
// counts equal frames at each frame end and expects lock after 4 in a row,
// dropped at the first unequal one. Also checks that a one-code difference
// already counts as unequal with the default tolerance of 0.
`timescale 1ns/1ps
module tb_lock_detector;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, frame_end = 1'b0;
  sample_mem_t mem = '0;
  logic frame_equal, locked;
  int checks = 0, failures = 0;
  int run = 0;
  int n_lock = 0, n_drop = 0;
  logic locked_q = 1'b0;

  lock_detector dut (.clk, .rst_n, .frame_end, .mem, .frame_equal, .locked);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      bit eq;
      @(negedge clk);
      eq = (f % 40 < 30) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 1) == 0);
      for (int i = 0; i < 8; i++) begin
        mem[i+8] = sample_t'($urandom);
        mem[i]   = mem[i+8];
      end
      if (!eq) begin
        int k;
        k = $urandom_range(0, 7);
        mem[k] = mem[k] ^ sample_t'(1 << $urandom_range(0, 2));
      end
      frame_end = 1'b1;
      #1 check(frame_equal == eq, "frame_equal");
      @(posedge clk);
      run = eq ? (run < 4 ? run + 1 : 4) : 0;
      @(negedge clk);
      frame_end = 1'b0;
      // scramble the memory between frame ends: must be ignored
      mem = {$urandom, $urandom};
      @(posedge clk); #1;
      check(locked == (run == 4), $sformatf("frame %0d locked=%b run=%0d", f, locked, run));
      if (locked && !locked_q) n_lock++;
      if (!locked && locked_q) n_drop++;
      locked_q = locked;
    end
    check(n_lock > 0 && n_drop > 0, "lock never gained or lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
