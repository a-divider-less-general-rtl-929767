// tb_frame_sync: checks frame alignment to f_sync.
// f_sync falls 1 ns before a clock edge E0 every 8 clocks. The sample taken
// at E0 is written at E1, so idx must be 0 right after E1 and count
// 1..7 after that; frame_end must be high exactly when idx is 7; synced
// must rise at the first falling edge. Then f_sync is moved by three clocks
// and idx must re-align (with one slip pulse).
`timescale 1ns/1ps
module tb_frame_sync;
  logic clk = 1'b0, rst_n = 1'b0, sync_in = 1'b1;
  logic [2:0] idx;
  logic frame_end, synced, sync_seen, slip;
  int checks = 0, failures = 0;

  frame_sync dut (.clk, .rst_n, .sync_in, .idx, .frame_end, .synced, .sync_seen, .slip);

  always #20 clk = ~clk;   // rising edges at 20, 60, 100, ...

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  int cyc = 0;          // rising edges since reset release
  int fall_cyc = -1;    // edge index E0 of the last f_sync fall
  int n_slip = 0;
  int offset = 0;       // f_sync falls before edges with (cyc % 8) == offset

  // f_sync generator: falls 1 ns before edge E0, rises 4 edges later
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (((cyc + 1) % 8) == offset) begin
      #39 sync_in = 1'b0;
    end else if (((cyc + 1) % 8) == ((offset + 4) % 8)) begin
      #39 sync_in = 1'b1;
    end
  end
  always @(negedge sync_in) fall_cyc = cyc + 1;

  always @(posedge clk) if (rst_n) begin
    #2;
    if (slip) n_slip++;
    if (fall_cyc >= 0 && cyc > fall_cyc) begin
      int exp_idx;
      exp_idx = (cyc - fall_cyc - 1) % 8;
      check(synced, "not synced");
      check(int'(idx) == exp_idx, $sformatf("idx %0d expected %0d", idx, exp_idx));
      check(frame_end == (exp_idx == 7), "frame_end");
    end else if (fall_cyc < 0) begin
      check(!synced, "synced before f_sync");
      check(!frame_end, "frame_end before f_sync");
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30 rst_n = 1'b1;
    repeat (100) @(posedge clk);
    check(n_slip == 0, "slip while aligned");
    offset = 3;
    repeat (100) @(posedge clk);
    check(n_slip == 1, $sformatf("%0d slips after moving f_sync", n_slip));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
