// aes: AES-128/192/256 encryption and decryption core with Razor-protected request register.
//
// Operation.  A request (in_valid with mode, key length, key and block) is captured by a
// register of Razor flip-flops.  If that register reports a timing error the captured request
// is ignored for one cycle, the Razor bits restore the late-arriving values from their shadow
// latches, and the request is taken on the following cycle: a late request costs one extra
// cycle instead of a wrong result.  An accepted request then runs iteratively, one round per
// clock, through a single aes_round datapath whose S-boxes, shift-rows and mix-columns blocks
// serve both directions, while aes_key_schedule produces the round keys on the fly.
//
//   encryption: ACCEPT, ARK (initial AddRoundKey), Nr rounds           -> Nr + 2 cycles
//   decryption: ACCEPT, Nr forward key steps to reach the last round key,
//               ARK, Nr inverse rounds using reverse key steps          -> 2*Nr + 2 cycles
// counted from the clock edge that captures in_valid (one more per Razor replay).
// Nr is 10, 12 or 14 for key_len = 128, 192, 256 bits.
//
// Interface.  in_valid is a one-cycle request; a request arriving while busy is high is
// dropped.  Inputs must be held from the capturing rising edge of clk until clk_del falls
// (the Razor hold window); razor_error, valid after clk_del falls, shows a detected
// violation, and the producer then keeps its inputs for one more cycle while the request is
// replayed from the shadow latches.  out_valid
// pulses for one cycle with out_data; out_data holds until the next result.  Byte order is
// FIPS-197: the first byte of a block or key is in the most significant bits; 128- and
// 192-bit keys are left-aligned in in_key.
//
// The shared encrypt/decrypt datapath, on-the-fly forward and reverse key scheduling and the
// Razor flip-flop with re-execution follow the design description.  The round-per-cycle
// iterative structure, the placement of the Razor register at the request input and the
// request/response handshake are this design's own choices.
module aes
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         clk_del,      // delayed clock for the Razor shadow latches
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_decrypt,   // 0: encrypt, 1: decrypt
  input  key_len_e     in_key_len,
  input  logic [255:0] in_key,
  input  state_t       in_data,
  output logic         busy,
  output logic         razor_error,
  output logic         out_valid,
  output state_t       out_data
);

  typedef struct packed {
    logic         valid;
    logic         decrypt;
    key_len_e     key_len;
    logic [255:0] key;
    state_t       data;
  } request_t;

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_PREP  = 2'd1,   // decryption: walk the key schedule to the last round key
    S_ARK   = 2'd2,   // initial AddRoundKey
    S_ROUND = 2'd3
  } fsm_e;

  request_t req_d, req_q;
  logic     req_err;

  assign req_d = '{valid: in_valid, decrypt: in_decrypt, key_len: in_key_len,
                   key: in_key, data: in_data};

  razor_reg #(.WIDTH($bits(request_t))) u_req (
    .clk    (clk),
    .clk_del(clk_del),
    .rst_n  (rst_n),
    .d      (req_d),
    .q      (req_q),
    .err    (req_err)
  );

  fsm_e       fsm;
  state_t     state;
  logic       dec;
  logic [3:0] nr;
  logic [3:0] cnt;
  logic       accept;
  logic       ks_fwd, ks_bwd;
  state_t     round_key, round_out;
  logic [6:0] ks_index;     // key schedule position (first word of the round key)
  logic       last;

  assign accept = (fsm == S_IDLE) && req_q.valid && !req_err;

  aes_key_schedule u_ks (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (accept),
    .key_len   (req_q.key_len),
    .key       (req_q.key),
    .fwd_step  (ks_fwd),
    .bwd_step  (ks_bwd),
    .round_key (round_key),
    .word_index(ks_index)
  );

  assign last = (cnt == nr);

  aes_round u_round (
    .din      (state),
    .round_key(round_key),
    .dec      (dec),
    .last     (last),
    .dout     (round_out)
  );

  // Key schedule moves forward while preparing or encrypting, backward while decrypting.
  always_comb begin
    ks_fwd = 1'b0;
    ks_bwd = 1'b0;
    case (fsm)
      S_PREP:          ks_fwd = 1'b1;
      S_ARK, S_ROUND:  if (dec) ks_bwd = 1'b1; else ks_fwd = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm       <= S_IDLE;
      state     <= '0;
      dec       <= 1'b0;
      nr        <= 4'd10;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      case (fsm)
        S_IDLE: if (accept) begin
          state <= req_q.data;
          dec   <= req_q.decrypt;
          nr    <= nr_of(req_q.key_len);
          cnt   <= 4'd1;
          fsm   <= req_q.decrypt ? S_PREP : S_ARK;
        end
        S_PREP: begin
          cnt <= cnt + 4'd1;
          if (last) begin
            cnt <= 4'd1;
            fsm <= S_ARK;
          end
        end
        S_ARK: begin
          state <= state ^ round_key;
          cnt   <= 4'd1;
          fsm   <= S_ROUND;
        end
        S_ROUND: begin
          state <= round_out;
          cnt   <= cnt + 4'd1;
          if (last) begin
            out_valid <= 1'b1;
            out_data  <= round_out;
            fsm       <= S_IDLE;
          end
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

  // The initial AddRoundKey must see round key 0 (encryption) or round key Nr (decryption).
  always_ff @(posedge clk) begin
    if (fsm == S_ARK)
      assert (ks_index == (dec ? 7'({nr, 2'b00}) : 7'd0))
        else $error("key schedule at word %0d at the initial AddRoundKey", ks_index);
  end

  assign busy        = (fsm != S_IDLE);
  assign razor_error = req_err;

endmodule
