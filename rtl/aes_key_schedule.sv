// aes_key_schedule: on-the-fly round key generator, forward and reverse, for 128/192/256-bit keys.
//
// Instead of storing the whole expanded key (up to 60 words), the block keeps a sliding window
// of Nk key words w[i] .. w[i+Nk-1] (Nk = 4, 6 or 8) and presents the first four of them,
// w[i] .. w[i+3], as the current round key.  One forward step computes the next four words of
// the AES key expansion,
//     w[j] = w[j-Nk] ^ g(w[j-1], j),
// and slides the window up by four words (i += 4): one round key per clock.  One reverse step
// runs the same recurrence backwards,
//     w[j] = w[j+Nk] ^ g(w[j+Nk-1], j+Nk),
// and slides the window down by four words (i -= 4), so the decryption rounds get their keys
// last-to-first without storage.  g() is RotWord+SubWord+Rcon when j mod Nk = 0, SubWord alone
// when Nk = 8 and j mod Nk = 4, and the identity otherwise.  The four chained steps of either
// direction share one set of four SubWord units (16 forward S-boxes).
//
// Interface: load (with key/key_len) puts the cipher key in the window and sets i = 0;
// fwd_step / bwd_step move it one round key up / down on the next rising clock edge.  load has
// priority, then fwd_step.  round_key is registered output, valid the cycle after the command.
// The window index i is kept as a 7-bit word index.  Forward and reverse generation follow the
// design description; the window organisation and four-words-per-step rate are this design's.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,
  input  key_len_e key_len,
  input  logic [255:0] key,        // key bytes from bit 255 down; 128/192-bit keys left-aligned
  input  logic     fwd_step,
  input  logic     bwd_step,
  output state_t   round_key,      // w[i], w[i+1], w[i+2], w[i+3]
  output logic [6:0] word_index    // i
);

  word_t    w [8];
  key_len_e kl;
  logic [6:0] idx;
  logic [3:0] nk;

  assign nk = nk_of(kl);

  // g() control for word index j: returns {apply_rot_and_rcon, apply_sub, rcon byte}
  function automatic logic [9:0] g_ctl(logic [6:0] j, logic [3:0] n);
    logic [6:0] q, r;
    case (n)
      4'd6:    begin q = j / 7'd6; r = j - q * 7'd6; end
      4'd8:    begin q = j >> 3;   r = j & 7'd7;     end
      default: begin q = j >> 2;   r = j & 7'd3;     end
    endcase
    if (r == 7'd0)                return {1'b1, 1'b1, rcon(q[3:0])};
    else if (n == 4'd8 && r == 7'd4) return {1'b0, 1'b1, 8'h00};
    else                          return {1'b0, 1'b0, 8'h00};
  endfunction

  // Per step k (0..3): the word fed to g(), its index j, and the word it is XORed with.
  // Forward, step k yields w[i+Nk+k]; reverse, it yields w[i-1-k].  Both are nw.
  logic rev;
  assign rev = bwd_step && !fwd_step;

  for (genvar k = 0; k < 4; k++) begin : g_step
    word_t      prev_nw;    // nw of step k-1 (forward chain input)
    word_t      first_nw;   // nw of step 0 (reverse chain input when Nk = 4)
    word_t      gin, grot, gsub, gout, xw, nw;
    logic [6:0] j;
    logic [9:0] ctl;

    if (k == 0) begin : g_first
      assign prev_nw  = '0;
      assign first_nw = '0;
    end else begin : g_next
      assign prev_nw  = g_step[k-1].nw;
      assign first_nw = g_step[0].nw;
    end

    always_comb begin
      if (rev) begin
        j  = idx + 7'(nk) - 7'd1 - 7'(k);
        xw = w[3'(nk - 4'd1 - 4'(k))];
        if (int'(nk) - 2 - k >= 0) gin = w[3'(nk - 4'd2 - 4'(k))];
        else                       gin = first_nw;
      end else begin
        j  = idx + 7'(nk) + 7'(k);
        xw = w[k];
        if (k == 0) gin = w[3'(nk - 4'd1)];
        else        gin = prev_nw;
      end
    end

    assign ctl  = g_ctl(j, nk);
    assign grot = ctl[9] ? {gin[23:0], gin[31:24]} : gin;

    for (genvar b = 0; b < 4; b++) begin : g_byte
      aes_sbox u_sbox (.din(grot[8*b +: 8]), .inv(1'b0), .dout(gsub[8*b +: 8]));
    end

    assign gout = ctl[8] ? (gsub ^ {ctl[7:0], 24'h0}) : gin;
    assign nw   = xw ^ gout;
  end

  word_t step_w [4];
  assign step_w[0] = g_step[0].nw;
  assign step_w[1] = g_step[1].nw;
  assign step_w[2] = g_step[2].nw;
  assign step_w[3] = g_step[3].nw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 8; m++) w[m] <= '0;
      kl  <= KEY128;
      idx <= '0;
    end else if (load) begin
      for (int m = 0; m < 8; m++) w[m] <= key[255-32*m -: 32];
      kl  <= key_len;
      idx <= '0;
    end else if (fwd_step) begin
      for (int m = 0; m < 8; m++)
        if (m + 4 < int'(nk))  w[m] <= w[m+4];
        else if (m < int'(nk)) w[m] <= step_w[m + 4 - int'(nk)];
      idx <= idx + 7'd4;
    end else if (bwd_step) begin
      for (int m = 0; m < 8; m++)
        if (m < 4)             w[m] <= step_w[3-m];
        else if (m < int'(nk)) w[m] <= w[m-4];
      idx <= idx - 7'd4;
    end
  end

  assign round_key  = {w[0], w[1], w[2], w[3]};
  assign word_index = idx;

endmodule
