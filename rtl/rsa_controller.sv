// rsa_controller: top-level sequencer of the RSA cryptosystem.
//
// Watches bit 0 of the enable words En_RSA, En_Encryption and En_Decryption
// (memory words 3, 4, 5). A rising edge of a bit, the "toggle" that starts an
// operation, sets a pending request; requests are served one at a time when
// the controller is idle, key generation first:
//   - key generation: starts the key generator with Seed_P, Seed_Q, Seed_E
//     (low 16 bits of words 0 and 1, all of word 2) and waits for it;
//     `keys_valid` is set on success, cleared on a key error.
//   - encryption: for i = 0..9 reads plaintext word 6+i, runs the encryption
//     engine (base^E mod N) and writes the result to word 17+i.
//   - decryption: for i = 0..9 reads ciphertext word 17+i, runs the
//     decryption engine (base^D mod N) and writes the result to word 28+i.
// Encryption and decryption wait for valid keys; a request made while keys
// are missing stays pending until key generation succeeds. `done` rises when
// an operation ends with nothing pending and falls when the next one starts.
//
// The memory map and the meaning of the enable words follow the source; edge
// detection on bit 0, the request queueing and the `done` rule are this
// design's choices. The engine result is written one cycle after its `done`.
module rsa_controller
  import rsa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // control words from memory
  input  logic [WORD_W-1:0] ctrl_words [6],
  // internal memory port
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic [WORD_W-1:0] mem_rdata,
  // key generator
  output logic              kg_start,
  output logic [PRIME_W-1:0] kg_seed_p,
  output logic [PRIME_W-1:0] kg_seed_q,
  output logic [KEY_W-1:0]  kg_seed_e,
  input  logic              kg_done,
  input  logic              kg_error,
  // encryption engine
  output logic              enc_start,
  input  logic              enc_done,
  input  logic [KEY_W-1:0]  enc_result,
  // decryption engine
  output logic              dec_start,
  input  logic              dec_done,
  input  logic [KEY_W-1:0]  dec_result,
  // shared engine input: the word read from memory
  output logic [KEY_W-1:0]  engine_base,
  // status
  output logic              keys_valid,
  output logic              key_error,
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {
    S_IDLE, S_KEYGEN, S_ENC_START, S_ENC_WAIT, S_DEC_START, S_DEC_WAIT, S_WRITE
  } state_t;
  state_t state;

  logic       prev_rsa, prev_enc, prev_dec;
  logic       pend_rsa, pend_enc, pend_dec;
  logic       is_dec;
  logic [3:0] idx;
  logic [KEY_W-1:0] result_q;
  logic       rise_rsa, rise_enc, rise_dec;

  assign rise_rsa = ctrl_words[int'(ADDR_EN_RSA)][0] && !prev_rsa;
  assign rise_enc = ctrl_words[int'(ADDR_EN_ENC)][0] && !prev_enc;
  assign rise_dec = ctrl_words[int'(ADDR_EN_DEC)][0] && !prev_dec;

  assign kg_seed_p   = ctrl_words[int'(ADDR_SEED_P)][PRIME_W-1:0];
  assign kg_seed_q   = ctrl_words[int'(ADDR_SEED_Q)][PRIME_W-1:0];
  assign kg_seed_e   = ctrl_words[int'(ADDR_SEED_E)];
  assign kg_start    = (state == S_IDLE) && pend_rsa;
  assign enc_start   = (state == S_ENC_START);
  assign dec_start   = (state == S_DEC_START);
  assign engine_base = mem_rdata;
  assign busy        = (state != S_IDLE);

  always_comb begin
    mem_we    = (state == S_WRITE);
    mem_wdata = result_q;
    unique case (state)
      S_ENC_START, S_ENC_WAIT: mem_addr = ADDR_MSG + ADDR_W'(idx);
      S_DEC_START, S_DEC_WAIT: mem_addr = ADDR_CIPHER + ADDR_W'(idx);
      S_WRITE:  mem_addr = (is_dec ? ADDR_PLAIN : ADDR_CIPHER) + ADDR_W'(idx);
      default:  mem_addr = ADDR_MSG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      prev_rsa   <= 1'b0;
      prev_enc   <= 1'b0;
      prev_dec   <= 1'b0;
      pend_rsa   <= 1'b0;
      pend_enc   <= 1'b0;
      pend_dec   <= 1'b0;
      is_dec     <= 1'b0;
      idx        <= '0;
      result_q   <= '0;
      keys_valid <= 1'b0;
      key_error  <= 1'b0;
      done       <= 1'b0;
    end else begin
      prev_rsa <= ctrl_words[int'(ADDR_EN_RSA)][0];
      prev_enc <= ctrl_words[int'(ADDR_EN_ENC)][0];
      prev_dec <= ctrl_words[int'(ADDR_EN_DEC)][0];
      if (rise_rsa) pend_rsa <= 1'b1;
      if (rise_enc) pend_enc <= 1'b1;
      if (rise_dec) pend_dec <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (pend_rsa) begin
            pend_rsa   <= rise_rsa;
            keys_valid <= 1'b0;
            key_error  <= 1'b0;
            done       <= 1'b0;
            state      <= S_KEYGEN;
          end else if (pend_enc && keys_valid) begin
            pend_enc <= rise_enc;
            is_dec   <= 1'b0;
            idx      <= '0;
            done     <= 1'b0;
            state    <= S_ENC_START;
          end else if (pend_dec && keys_valid) begin
            pend_dec <= rise_dec;
            is_dec   <= 1'b1;
            idx      <= '0;
            done     <= 1'b0;
            state    <= S_DEC_START;
          end
        end
        S_KEYGEN: begin
          if (kg_done || kg_error) begin
            keys_valid <= kg_done;
            key_error  <= kg_error;
            done       <= !pend_rsa && !((pend_enc || pend_dec) && kg_done);
            state      <= S_IDLE;
          end
        end
        S_ENC_START: state <= S_ENC_WAIT;
        S_ENC_WAIT: if (enc_done) begin
          result_q <= enc_result;
          state    <= S_WRITE;
        end
        S_DEC_START: state <= S_DEC_WAIT;
        S_DEC_WAIT: if (dec_done) begin
          result_q <= dec_result;
          state    <= S_WRITE;
        end
        S_WRITE: begin
          if (idx == 4'(NUM_WORDS - 1)) begin
            done  <= !pend_rsa && !pend_enc && !pend_dec;
            state <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= is_dec ? S_DEC_START : S_ENC_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
