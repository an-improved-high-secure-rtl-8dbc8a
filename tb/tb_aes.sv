// tb_aes: end-to-end test of the AES core at its default configuration.
//
// For each key length (128, 192, 256 bits) it encrypts the FIPS-197 Appendix C example and
// a set of random blocks and keys, decrypts every ciphertext again, and compares each result
// with the software model in aes_ref_pkg and, for the FIPS examples, with the published
// ciphertexts.  The cycle count from the capturing clock edge to out_valid is checked against
// Nr + 2 (encryption) and 2*Nr + 2 (decryption).  Some requests are delivered late, changing
// the inputs after the capturing clock edge but inside the Razor window, which must raise
// razor_error, cost exactly one extra cycle, and still give the right result.
// Mechanisms counted (each must occur): encryption and decryption for each key length, and
// Razor replay of a wholly late request and of a request whose block alone is late.
`timescale 1ns/1ps
module tb_aes;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int RANDOM_PER_KEYLEN = 8;

  logic         clk = 0, clk_del = 0, rst_n = 0;
  logic         in_valid = 0, in_decrypt = 0;
  key_len_e     in_key_len = KEY128;
  logic [255:0] in_key = '0;
  logic [127:0] in_data = '0;
  logic         busy, razor_error, out_valid;
  logic [127:0] out_data;

  int checks = 0, failures = 0;
  int n_enc [3] = '{0, 0, 0};
  int n_dec [3] = '{0, 0, 0};
  int n_replay [3] = '{0, 0, 0};

  always #5 clk = ~clk;
  always @(clk) clk_del <= #2 clk;     // delayed clock, 2 ns behind clk

  aes dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Issue one request and wait for its result.  Inputs change 8 ns after a rising edge (after
  // clk_del has fallen); with late = 1 the request is first presented with stale inputs and
  // switched to the real ones 1 ns after the capturing edge.
  // late = 0: on time; 1: the whole request is late; 2: in_valid is on time, the block is late.
  task automatic run(input bit dec, input key_len_e kl, input logic [255:0] key,
                     input logic [127:0] data, input int late, output logic [127:0] result);
    int     n = 0;
    int     nr = int'(nr_of(kl));
    int     expect_cycles = (dec ? 2 * nr : nr) + 2 + (late != 0 ? 1 : 0);
    bit     saw_err = 0;
    @(posedge clk); #8;
    in_decrypt = dec; in_key_len = kl; in_key = key;
    if (late) begin
      in_valid = (late == 2);
      in_data  = ~data;
      @(posedge clk); #1;
      in_valid = 1;
      in_data  = data;
    end else begin
      in_valid = 1;
      in_data  = data;
      @(posedge clk);
    end
    #7;   // after clk_del has fallen: razor_error is valid
    if (razor_error) begin
      saw_err = 1;
      @(posedge clk); n++; #8;   // hold the inputs one more cycle while the request is replayed
    end else #1;
    in_valid = 0;
    in_data  = $urandom;
    forever begin
      @(posedge clk); n++; #1;
      if (out_valid) break;
    end
    result = out_data;
    check(saw_err == (late != 0), $sformatf("razor_error %0d for late=%0d", saw_err, late));
    if (saw_err) n_replay[late]++;
    check(n == expect_cycles,
          $sformatf("latency %0d cycles, expected %0d (dec=%0d nk=%0d late=%0d)",
                    n, expect_cycles, dec, int'(nk_of(kl)), late));
    if (dec) n_dec[kl]++; else n_enc[kl]++;
  endtask

  initial begin
    logic [255:0] fips_key;
    logic [127:0] ct, pt, res;
    logic [127:0] fips_ct [3];
    fips_ct[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    fips_ct[1] = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
    fips_ct[2] = 128'h8ea2b7ca516745bfeafc49904b496089;
    fips_key   = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;

    repeat (3) @(posedge clk);
    #8 rst_n = 1;

    for (int kli = 0; kli < 3; kli++) begin
      key_len_e     kl;
      int           nk;
      logic [255:0] key;
      kl  = key_len_e'(kli);
      nk  = int'(nk_of(kl));
      key = fips_key & ~((256'h1 << (256 - 32 * nk)) - 1);
      pt = 128'h00112233445566778899aabbccddeeff;
      check(encrypt(pt, key, nk) == fips_ct[kli], "reference model against FIPS-197");
      run(0, kl, key, pt, 0, res);
      check(res == fips_ct[kli], $sformatf("FIPS encrypt nk=%0d got %h", nk, res));
      run(1, kl, key, fips_ct[kli], 0, res);
      check(res == pt, $sformatf("FIPS decrypt nk=%0d got %h", nk, res));

      for (int n = 0; n < RANDOM_PER_KEYLEN; n++) begin
        key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        key = key & ~((256'h1 << (256 - 32 * nk)) - 1);
        pt  = {$urandom, $urandom, $urandom, $urandom};
        run(0, kl, key, pt, (n % 4 == 1) ? 1 : (n % 4 == 3) ? 2 : 0, ct);
        check(ct == encrypt(pt, key, nk), $sformatf("encrypt nk=%0d pt=%h", nk, pt));
        run(1, kl, key, ct, (n % 4 == 2) ? 2 : 0, res);
        check(res == pt, $sformatf("decrypt nk=%0d ct=%h got %h", nk, ct, res));
        check(res == decrypt(ct, key, nk), "decrypt against model");
      end
    end

    for (int kli = 0; kli < 3; kli++) begin
      check(n_enc[kli] > 0, $sformatf("encryption with key length %0d happened", kli));
      check(n_dec[kli] > 0, $sformatf("decryption with key length %0d happened", kli));
      $display("key length %0d: %0d encryptions, %0d decryptions", 128 + 64 * kli,
               n_enc[kli], n_dec[kli]);
    end
    check(n_replay[1] > 0, "Razor replay of a late request happened");
    check(n_replay[2] > 0, "Razor replay of a late block happened");
    $display("Razor replays: %0d late requests, %0d late blocks", n_replay[1], n_replay[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
