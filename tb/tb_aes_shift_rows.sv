// tb_aes_shift_rows: ShiftRows and InvShiftRows against the reference model, on a counting
// pattern and random states, plus the round trip inverse(forward(x)) == x.
`timescale 1ns/1ps
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] din = 0, dout, fwd;
  logic         inv = 0;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in=%h inv=%0d got=%h expected=%h", what, din, inv, got, exp);
    end
  endtask

  initial begin
    // Bytes 00..0f: ShiftRows gives 00 05 0a 0f 04 09 0e 03 08 0d 02 07 0c 01 06 0b
    din = 128'h000102030405060708090a0b0c0d0e0f; inv = 0; #1;
    expect_eq(dout, 128'h00050a0f04090e03080d02070c01060b, "fixed forward");
    inv = 1; #1;
    expect_eq(dout, 128'h000d0a0704010e0b0805020f0c090603, "fixed inverse");
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      inv = 0; #1;
      expect_eq(dout, from_bytes(shift(to_bytes(din), 0)), "forward");
      fwd = dout;
      inv = 1; #1;
      expect_eq(dout, from_bytes(shift(to_bytes(din), 1)), "inverse");
      din = fwd; #1;
      expect_eq(dout, from_bytes(shift(to_bytes(fwd), 1)), "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
