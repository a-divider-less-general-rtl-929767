// counter10: the 10-bit timing counter of the AFC state machine.
//
// The state machine clears it (the counter's Reset input) on every state
// change that starts a timed wait, and enables it while it waits for the
// loop filter to settle or for a coarse step to take effect. It counts up by
// one per enabled clock and stops at its maximum value, 2^WIDTH-1, so that a
// long wait cannot wrap round to a small count. Width from the design;
// saturation is this design's own choice.
//
// Interface: clk, async active-low rst_n, synchronous clear (wins over en),
// en, count. count is valid the cycle after the edge that updates it.
module counter10 #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (clear)             count <= '0;
    else if (en && count != '1) count <= count + 1'b1;
  end

endmodule
