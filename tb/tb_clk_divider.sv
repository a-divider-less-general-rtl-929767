// tb_clk_divider: checks REFDIV (41) and FBDIV (8) division.
// For each divider the falling edges of the output must be exactly DIV
// input periods apart, the first one DIV input edges after reset, and the
// output must be low for (DIV+1)/2 and high for DIV/2 input periods.
`timescale 1ns/1ps
module tb_clk_divider;
  logic clk = 1'b0, rst_n = 1'b0;
  logic out41, out8;
  int checks = 0, failures = 0;

  clk_divider #(.DIV(41)) dut41 (.clk_in(clk), .rst_n, .clk_out(out41));
  clk_divider #(.DIV(8))  dut8  (.clk_in(clk), .rst_n, .clk_out(out8));

  always #5 clk = ~clk;

  int edges = 0;
  always @(posedge clk) if (rst_n) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  int last_fall41 = 0, last_rise41 = -1, n41 = 0;
  int last_fall8 = 0, last_rise8 = -1, n8 = 0;
  always @(negedge out41) begin
    check(edges - last_fall41 == 41, $sformatf("REFDIV period %0d", edges - last_fall41));
    if (last_rise41 >= 0) check(edges - last_rise41 == 20, "REFDIV high time");
    last_fall41 = edges; n41++;
  end
  always @(posedge out41) begin
    check(edges - last_fall41 == 21, "REFDIV low time");
    last_rise41 = edges;
  end
  always @(negedge out8) begin
    check(edges - last_fall8 == 8, $sformatf("FBDIV period %0d", edges - last_fall8));
    if (last_rise8 >= 0) check(edges - last_rise8 == 4, "FBDIV high time");
    last_fall8 = edges; n8++;
  end
  always @(posedge out8) begin
    check(edges - last_fall8 == 4, "FBDIV low time");
    last_rise8 = edges;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    repeat (41 * 10 + 3) @(posedge clk);
    check(n41 == 10, $sformatf("%0d REFDIV periods", n41));
    check(n8 == 51, $sformatf("%0d FBDIV periods", n8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
