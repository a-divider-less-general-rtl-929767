// tb_sample_memory: shifts random samples in (with pauses) and checks all
// 16 entries against a queue of the samples written.
`timescale 1ns/1ps
module tb_sample_memory;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t din = '0;
  sample_mem_t mem;
  sample_t hist[$];
  int checks = 0, failures = 0;

  sample_memory dut (.clk, .rst_n, .en, .din, .mem);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) hist.push_front('0);
    #12;
    checks++;
    if (mem != '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 4) != 0);
      din = sample_t'($urandom);
      @(posedge clk);
      if (en) begin
        hist.push_front(din);
        void'(hist.pop_back());
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (mem[i] != hist[i]) begin
          failures++;
          $display("FAIL cycle %0d mem[%0d]=%0d expected %0d", c, i, mem[i], hist[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
