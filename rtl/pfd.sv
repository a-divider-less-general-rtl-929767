// pfd: phase-frequency detector of the auxiliary charge-pump PLL.
//
// Compares the divided reference (f_sync, from REFDIV) with the divided AFC
// clock (from FBDIV) and drives the charge pump. Classic two-flop circuit:
// a rising edge of ref sets `up`, a rising edge of fb sets `dn`, and as soon
// as both are set an AND gate clears both through their asynchronous
// resets. The design names only the block; this is the textbook
// implementation. The reset path is asynchronous by nature: in silicon the
// AND gate's delay sets the minimum pulse width (dead-zone avoidance), in
// simulation the reset pulse has zero width. rst_n (active low) holds both
// outputs low. The loop from the flops through the AND gate back to their
// clears is that reset path and is intentional. In this design the PFD is
// fed with the inverted divider outputs, so it aligns the falling edges of
// f_sync and of the divided AFC clock (the falling edge of f_sync is the one
// that marks the start of a frame).
module pfd (
  input  logic ref_in,
  input  logic fb_in,
  input  logic rst_n,
  output logic up,
  output logic dn
);

  logic clr_n;

  assign clr_n = rst_n & ~(up & dn);

  always_ff @(posedge ref_in or negedge clr_n) begin
    if (!clr_n) up <= 1'b0;
    else        up <= 1'b1;
  end

  always_ff @(posedge fb_in or negedge clr_n) begin
    if (!clr_n) dn <= 1'b0;
    else        dn <= 1'b1;
  end

endmodule
