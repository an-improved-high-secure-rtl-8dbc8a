// tb_razor_reg: a 16-bit Razor register.  Random words arrive on time or with a few bits
// late; the combined err must be raised exactly when some bit arrived late, and the whole
// word must be correct one cycle later.
`timescale 1ns/1ps
module tb_razor_reg;
  localparam int W = 16;
  logic clk = 0, clk_del = 0, rst_n = 0, err;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0, n_late = 0;

  always #5 clk = ~clk;
  always @(clk) clk_del <= #2 clk;

  razor_reg #(.WIDTH(W)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [W-1:0] got, logic [W-1:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, e);
    end
  endtask

  initial begin
    logic [W-1:0] v, late_mask, early;
    repeat (2) @(posedge clk);
    #8 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      v = W'($urandom);
      late_mask = (n % 2) ? W'(1) << ($urandom % W) : '0;
      early = (v & ~late_mask) | (q & late_mask);   // late bits still hold the old value
      d = early;
      @(posedge clk); #1 d = v;
      expect_eq(q, early, "captured word");
      #7 expect_eq(W'(err), W'(early != v), "combined error");
      if (err) begin
        n_late++;
        @(posedge clk); #1;
        expect_eq(q, v, "restored word");
        #7 expect_eq(W'(err), '0, "error cleared");
      end
      #0;
    end
    checks++;
    if (n_late == 0) failures++;
    $display("late words: %0d", n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
