// tb_aes_key_schedule: on-the-fly round keys against the stored key expansion of the
// reference model, for 128/192/256-bit keys (FIPS-197 Appendix A keys and random keys).
// After a load it steps forward Nr times, checking round keys 0..Nr, then steps backward
// Nr times, checking Nr..0 again; every step must take exactly one clock.
`timescale 1ns/1ps
module tb_aes_key_schedule;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, load = 0, fwd_step = 0, bwd_step = 0;
  key_len_e     key_len = KEY128;
  logic [255:0] key = '0;
  logic [127:0] round_key;
  logic [6:0]   word_index;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_schedule dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [127:0] got, logic [127:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got=%h expected=%h", what, got, e);
    end
  endtask

  task automatic run_key(key_len_e kl, logic [255:0] k);
    int nk = int'(nk_of(kl));
    int nr = nk + 6;
    words_t w = expand(k, nk);
    @(negedge clk);
    load = 1; key_len = kl; key = k;
    @(negedge clk);
    load = 0;
    expect_eq(round_key, aes_ref_pkg::round_key(w, 0), "round key 0 after load");
    for (int r = 1; r <= nr; r++) begin
      fwd_step = 1;
      @(negedge clk);
      fwd_step = 0;
      expect_eq(round_key, aes_ref_pkg::round_key(w, r), $sformatf("forward nk=%0d round %0d", nk, r));
      checks++;
      if (word_index != 7'(4 * r)) begin
        failures++;
        $display("FAIL word index %0d", word_index);
      end
    end
    for (int r = nr - 1; r >= 0; r--) begin
      bwd_step = 1;
      @(negedge clk);
      bwd_step = 0;
      expect_eq(round_key, aes_ref_pkg::round_key(w, r), $sformatf("reverse nk=%0d round %0d", nk, r));
    end
  endtask

  initial begin
    logic [255:0] k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_key(KEY128, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
    run_key(KEY192, {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0});
    run_key(KEY256, 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    // FIPS-197 A.1: last round key of the 128-bit example
    checks++;
    if (aes_ref_pkg::round_key(expand({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 4), 10) !==
        128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("FAIL reference expansion");
    end
    for (int n = 0; n < 6; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      run_key(key_len_e'(n % 3), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
