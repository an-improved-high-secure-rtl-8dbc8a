// tb_aes_round: one encryption and one decryption round, normal and last, against the
// reference model built from its separate SubBytes/ShiftRows/MixColumns functions, and the
// first round of the FIPS-197 Appendix B example (state after round 1 with its round key).
`timescale 1ns/1ps
module tb_aes_round;
  import aes_ref_pkg::*;

  logic [127:0] din = 0, round_key = 0, dout, exp;
  logic         dec = 0, last = 0;
  int checks = 0, failures = 0;

  aes_round dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: dec=%0d last=%0d got=%h expected=%h", what, dec, last, got, e);
    end
  endtask

  initial begin
    // FIPS-197 Appendix B: start of round 1 and round key 1 -> start of round 2
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    round_key = 128'ha0fafe1788542cb123a339392a6c7605;
    dec = 0; last = 0; #1;
    expect_eq(dout, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS round 1");
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      round_key = {$urandom, $urandom, $urandom, $urandom};
      dec = n[0]; last = n[1]; #1;
      if (!dec) begin
        bytes_t b;
        b = shift(sub(to_bytes(din), 0), 0);
        if (!last) b = mix(b, 0);
        exp = from_bytes(b) ^ round_key;
      end else begin
        exp = from_bytes(sub(shift(to_bytes(din), 1), 1)) ^ round_key;
        if (!last) exp = from_bytes(mix(to_bytes(exp), 1));
      end
      expect_eq(dout, exp, "random round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
