// tb_watchdog: the watchdog must count only clocks whose newest sample
// differs from the one a frame earlier, time out after LIMIT of them (the
// default 1023), hold the timeout, and clear when disabled.
`timescale 1ns/1ps
module tb_watchdog;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_mem_t mem = '0;
  logic timeout;
  int checks = 0, failures = 0;
  int diff_cnt = 0;

  watchdog dut (.clk, .rst_n, .en, .mem, .timeout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk);
      en = 1'b0;
      @(negedge clk);
      #1 check(!timeout, "timeout not cleared by disable");
      en = 1'b1;
      diff_cnt = 0;
      for (int c = 0; c < 3000; c++) begin
        bit d;
        @(negedge clk);
        mem = {$urandom, $urandom};
        d = ($urandom_range(0, 2) == 0);
        mem[8] = d ? mem[0] + 3'd1 : mem[0];
        @(posedge clk);
        if (d && diff_cnt < 1023) diff_cnt++;
        #1 check(timeout == (diff_cnt == 1023),
                 $sformatf("timeout=%b after %0d differing samples", timeout, diff_cnt));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
