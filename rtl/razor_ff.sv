// razor_ff: one Razor flip-flop, a timing-error detecting register bit.
//
// A main flip-flop samples d on the rising edge of clk.  A shadow latch, transparent while the
// delayed clock clk_del is high, keeps following d and closes on the falling edge of clk_del,
// so it holds the value d had settled to some time after the main edge.  An XOR comparator
// raises err when the two differ: d arrived after the clock edge and the main flip-flop holds
// a wrong value.  On the next rising edge of clk the input multiplexer then reloads the main
// flip-flop from the shadow latch instead of d, which restores the correct value one cycle late;
// the surrounding logic must treat q as invalid while err is high and re-execute the operation.
//
// Timing contract: d must be stable from the rising edge of clk until clk_del falls (a hold
// requirement), and err is valid from the falling edge of clk_del to the next rising edge of
// clk.  The flip-flop, comparator, multiplexer and shadow latch are those of the design's Razor
// description; the latch polarity and the asynchronous active-low reset are this design's.
// The shadow element is a level-sensitive latch on purpose, so a latch is inferred here.
module razor_ff (
  input  logic clk,
  input  logic clk_del,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic err
);

  logic shadow;

  always_latch begin
    if (clk_del) shadow = d;
  end

  assign err = q ^ shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= err ? shadow : d;
  end

endmodule
