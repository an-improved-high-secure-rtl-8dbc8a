// razor_reg: a WIDTH-bit register made of Razor flip-flops with one combined error output.
//
// Each bit is a razor_ff clocked by clk (main flip-flop) and clk_del (shadow latch).  The
// per-bit error flags are ORed into a single err, which tells the consumer that q is wrong in
// this cycle and will be restored from the shadow latches on the next rising edge of clk.
// The register loads every cycle; it has no enable, because a held main flip-flop would be
// compared against a shadow latch that follows a changed input.  Timing is that of razor_ff.
module razor_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             clk_del,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             err
);

  logic [WIDTH-1:0] bit_err;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    razor_ff u_ff (
      .clk    (clk),
      .clk_del(clk_del),
      .rst_n  (rst_n),
      .d      (d[i]),
      .q      (q[i]),
      .err    (bit_err[i])
    );
  end

  assign err = |bit_err;

endmodule
