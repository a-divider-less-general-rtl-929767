// tb_charge_control: closes the charger loop around a simple capacitor
// model (one code = 40 slow steps or 4 fast steps) and checks, one clock
// after each input:
//   * code 0 gives up_fast only, code 7 down_fast only, at any assist state;
//   * with assist off and the code in range, no switch is on;
//   * with assist on, exactly one slow switch is on, and the direction turns
//     only at the range edges: down at code 6 when going up, up at code 1
//     when going down, so the voltage sweeps back and forth over 1..6.
`timescale 1ns/1ps
module tb_charge_control;
  import afc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, assist_en = 1'b0;
  sample_t vcode;
  charge_cmd_t cmd;
  logic dir_up, reversal;
  int checks = 0, failures = 0;
  int v = 300;              // capacitor voltage in 1/40 code
  int n_rev = 0, n_fast_up = 0, n_fast_dn = 0;
  int vmin_seen = 1000, vmax_seen = -1;

  charge_control dut (.clk, .rst_n, .assist_en, .vcode, .cmd, .dir_up, .reversal);

  always #5 clk = ~clk;
  assign vcode = sample_t'(v / 40);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_dir = 1'b1;

  initial begin
    #12 rst_n = 1'b1;
    for (int c = 0; c < 12000; c++) begin
      int code;
      bit a;
      @(negedge clk);
      // phases: assist off, assist on, forced excursions out of range
      a = (c >= 1000);
      assist_en = a;
      if (c == 500)  v = 300 - 290;  // code 0
      if (c == 700)  v = 310;        // code 7
      if (c == 6000) v = 5;          // code 0 while assisting
      code = v / 40;
      @(posedge clk); #1;
      if (code < 1) begin
        check(cmd == charge_cmd_t'{up: 0, down: 0, up_fast: 1, down_fast: 0}, "no fast charge at code 0");
        exp_dir = 1'b1;
        n_fast_up++;
      end else if (code > 6) begin
        check(cmd == charge_cmd_t'{up: 0, down: 0, up_fast: 0, down_fast: 1}, "no fast discharge at code 7");
        exp_dir = 1'b0;
        n_fast_dn++;
      end else if (!a) begin
        check(cmd == '0, "switch on with assist off");
      end else begin
        if (exp_dir && code >= 6) exp_dir = 1'b0;
        else if (!exp_dir && code <= 1) exp_dir = 1'b1;
        check(cmd.up == exp_dir && cmd.down == !exp_dir && !cmd.up_fast && !cmd.down_fast,
              $sformatf("slow command %b at code %0d, expected up=%b", cmd, code, exp_dir));
        if (c > 7000) begin
          if (code < vmin_seen) vmin_seen = code;
          if (code > vmax_seen) vmax_seen = code;
        end
      end
      if (reversal) n_rev++;
      // capacitor
      if (cmd.up) v += 1;
      if (cmd.down) v -= 1;
      if (cmd.up_fast) v += 10;
      if (cmd.down_fast) v -= 10;
      if (v < 0) v = 0;
      if (v > 319) v = 319;
    end
    check(n_rev >= 4, $sformatf("%0d reversals", n_rev));
    check(n_fast_up > 0 && n_fast_dn > 0, "fast charging not seen");
    check(vmin_seen == 1 && vmax_seen == 6, $sformatf("sweep covered codes %0d..%0d", vmin_seen, vmax_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
