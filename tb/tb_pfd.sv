// tb_pfd: checks the phase-frequency detector.
// ref leading fb by D ns must give an up pulse of D ns and no down pulse;
// fb leading gives the mirror image; a faster ref gives mostly up pulses.
`timescale 1ns/1ps
module tb_pfd;
  logic ref_in = 1'b0, fb_in = 1'b0, rst_n = 1'b1;
  logic up, dn;
  int checks = 0, failures = 0;

  pfd dut (.ref_in, .fb_in, .rst_n, .up, .dn);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  realtime up_t = 0, dn_t = 0, up_len = 0, dn_len = 0;
  int up_n = 0, dn_n = 0;
  always @(posedge up) up_t = $realtime;
  always @(negedge up) begin up_len += $realtime - up_t; up_n++; end
  always @(posedge dn) dn_t = $realtime;
  always @(negedge dn) begin dn_len += $realtime - dn_t; dn_n++; end

  task automatic pulse_pair(input realtime d_ref, input realtime d_fb);
    fork
      begin #(d_ref) ref_in = 1'b1; #20 ref_in = 1'b0; end
      begin #(d_fb)  fb_in  = 1'b1; #20 fb_in  = 1'b0; end
    join
    #30;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;     // an edge, so that the asynchronous clears act
    #9 rst_n = 1'b1;
    #10;
    // reference leads by 7 ns
    up_len = 0; dn_len = 0;
    pulse_pair(0, 7);
    check(up_len == 7.0, $sformatf("up pulse %0t", up_len));
    check(dn_len == 0.0, "down pulse while ref leads");
    check(!up && !dn, "outputs not cleared");
    // feedback leads by 3 ns
    up_len = 0; dn_len = 0;
    pulse_pair(3, 0);
    check(dn_len == 3.0, $sformatf("down pulse %0t", dn_len));
    check(up_len == 0.0, "up pulse while fb leads");
    // aligned edges: no pulse longer than zero
    up_len = 0; dn_len = 0;
    pulse_pair(0, 0);
    check(up_len == 0.0 && dn_len == 0.0, "pulse with aligned edges");
    // frequency detection: two ref edges before one fb edge keeps up high
    ref_in = 1'b1; #5 ref_in = 1'b0; #5 ref_in = 1'b1; #5 ref_in = 1'b0; #5;
    check(up && !dn, "up not held over two ref edges");
    fb_in = 1'b1; #1;
    check(!up && !dn, "not cleared by fb");
    fb_in = 1'b0; #5;
    // reset holds outputs low
    rst_n = 1'b0; ref_in = 1'b1; #5;
    check(!up && !dn, "output during reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
