// tb_aes_mix_columns: MixColumns and InvMixColumns against the reference matrix product,
// the well-known test column db 13 53 45 -> 8e 4d a1 bc, and the round trip.
`timescale 1ns/1ps
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] din = 0, dout, fwd;
  logic         inv = 0;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.*);

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
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6; inv = 0; #1;
    expect_eq(dout, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, "known columns");
    inv = 1; din = 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6; #1;
    expect_eq(dout, 128'hdb135345_f20a225c_01010101_c6c6c6c6, "known columns inverse");
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      inv = 0; #1;
      expect_eq(dout, from_bytes(mix(to_bytes(din), 0)), "forward");
      fwd = dout;
      inv = 1; #1;
      expect_eq(dout, from_bytes(mix(to_bytes(din), 1)), "inverse");
      din = fwd; #1;
      expect_eq(dout, from_bytes(mix(to_bytes(fwd), 1)), "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
