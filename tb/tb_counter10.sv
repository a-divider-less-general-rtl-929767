// tb_counter10: checks counting, enable, synchronous clear (priority over
// enable) and saturation at 1023 against a reference count kept here.
`timescale 1ns/1ps
module tb_counter10;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [9:0] count;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  counter10 dut (.clk, .rst_n, .clear, .en, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      clear = (c == 500) || (c == 2900) || (c < 200 && $urandom_range(0, 49) == 0);
      en    = (c < 200) ? ($urandom_range(0, 3) != 0) : (c < 2900);
      @(posedge clk);
      if (clear) ref_cnt = 0;
      else if (en && ref_cnt < 1023) ref_cnt++;
      #1;
      checks++;
      if (int'(count) != ref_cnt) begin
        failures++;
        $display("FAIL cycle %0d count %0d expected %0d", c, count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
