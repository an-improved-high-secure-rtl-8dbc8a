// tb_razor_ff: timing behaviour of one Razor flip-flop.
// clk has a 10 ns period; clk_del follows it 2 ns later, so the shadow latch closes 7 ns
// after each rising edge of clk.  On-time data (changed 8 ns after an edge) must give
// err = 0 and q = d.  Late data (changed 1 ns after the edge) must leave the old value in q,
// raise err once clk_del falls, and be restored into q on the next rising edge, even when d
// has moved on by then.
`timescale 1ns/1ps
module tb_razor_ff;
  logic clk = 0, clk_del = 0, rst_n = 0, d = 0, q, err;
  int checks = 0, failures = 0;
  int n_late = 0, n_ontime = 0;

  always #5 clk = ~clk;
  always @(clk) clk_del <= #2 clk;

  razor_ff dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic got, logic e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, e);
    end
  endtask

  initial begin
    logic v, old;
    repeat (2) @(posedge clk);
    #8 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      v = 1'($urandom);
      old = q;
      if (n % 3 == 0 && v != old) begin
        // late arrival: d is still old at the edge and changes 1 ns after it
        @(posedge clk); #1 d = v;
        expect_eq(q, old, "main flip-flop holds the stale value");
        #7 expect_eq(err, 1'b1, "error raised after clk_del falls");
        #1 d = ~v;                       // d moves on: the restore must use the shadow value
        @(posedge clk); #1;
        expect_eq(q, v, "restored from shadow latch");
        #1 d = v;
        #6 expect_eq(err, 1'b0, "error cleared after restore");
        n_late++;
      end else begin
        #0 d = v;
        @(posedge clk); #1;
        expect_eq(q, v, "on-time capture");
        #7 expect_eq(err, 1'b0, "no error for on-time data");
        n_ontime++;
      end
      @(posedge clk); #8;
    end
    checks++;
    if (n_late == 0 || n_ontime == 0) failures++;
    $display("late arrivals: %0d, on-time: %0d", n_late, n_ontime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
