// tb_aes_sbox: exhaustive test of the shared S-box / inverse S-box.
// All 256 inputs are applied in both modes and compared with the reference tables of
// aes_ref_pkg (brute-force inverse plus affine map), plus a few published FIPS-197 entries.
`timescale 1ns/1ps
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] din = 0, dout;
  logic       inv = 0;
  int checks = 0, failures = 0;

  aes_sbox dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in=%h inv=%0d got=%h expected=%h", what, din, inv, got, exp);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < 256; c++) begin
        inv = m[0];
        din = 8'(c);
        #1;
        expect_eq(dout, m ? inv_sbox(8'(c)) : sbox(8'(c)), "table");
      end
    // Published entries: S(00)=63, S(53)=ed, S(ff)=16, InvS(00)=52, InvS(63)=00
    inv = 0; din = 8'h00; #1 expect_eq(dout, 8'h63, "S(00)");
    din = 8'h53; #1 expect_eq(dout, 8'hed, "S(53)");
    din = 8'hff; #1 expect_eq(dout, 8'h16, "S(ff)");
    inv = 1; din = 8'h00; #1 expect_eq(dout, 8'h52, "InvS(00)");
    din = 8'h63; #1 expect_eq(dout, 8'h00, "InvS(63)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
