// wallace_encoder: thermometer-to-binary encoder of the 3-bit flash ADC.
//
// The seven clocked comparators of the flash ADC deliver a thermometer code;
// this encoder turns it into the 3-bit output D_out. It is a Wallace tree of
// four full adders that counts the ones of the seven inputs, so a single
// bubble in the thermometer code (a comparator out of order through offset
// or metastability) costs at most one LSB instead of a large code error.
// That the ADC uses a Wallace encoder is from the ADC schematic of the
// design; the tree arrangement below is this design's own.
//
// Interface: therm[6:0] (bit i is the comparator with the i-th lowest
// threshold), code[2:0] = number of ones. Purely combinational.
module wallace_encoder (
  input  logic [6:0] therm,
  output logic [2:0] code
);

  function automatic logic [1:0] full_add(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};   // {carry, sum}
  endfunction

  logic [1:0] fa0, fa1, fa2, fa3;

  always_comb begin
    fa0 = full_add(therm[0], therm[1], therm[2]);     // weight 1 inputs
    fa1 = full_add(therm[3], therm[4], therm[5]);
    fa2 = full_add(fa0[0], fa1[0], therm[6]);         // weight 1 sums
    fa3 = full_add(fa0[1], fa1[1], fa2[1]);           // weight 2 carries
    code = {fa3[1], fa3[0], fa2[0]};
  end

endmodule
