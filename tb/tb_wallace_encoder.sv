// tb_wallace_encoder: exhaustive test of the flash-ADC Wallace encoder.
// All 128 comparator patterns are applied; the expected code is the number
// of ones, computed with $countones. Valid thermometer codes (0..7 ones in
// order) are checked as a separate group.
`timescale 1ns/1ps
module tb_wallace_encoder;
  logic [6:0] therm;
  logic [2:0] code;
  int checks = 0, failures = 0;

  wallace_encoder dut (.therm, .code);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      therm = 7'(v);
      #1;
      checks++;
      if (int'(code) != $countones(therm)) begin
        failures++;
        $display("FAIL therm=%b code=%0d", therm, code);
      end
    end
    for (int n = 0; n <= 7; n++) begin
      therm = 7'((1 << n) - 1);
      #1;
      checks++;
      if (int'(code) != n) begin
        failures++;
        $display("FAIL thermometer %0d ones gave %0d", n, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
