// rsa_top: 16-bit RSA cryptosystem for text messages.
//
// A host writes the seeds, the enable words and the message into the word
// memory (map in rsa_pkg) and then raises bit 0 of an enable word:
//   En_RSA (word 3)        generate P, Q, N, phi(N), E and D from the seeds;
//   En_Encryption (word 4) encrypt words 6..15 into words 17..26 with (E, N);
//   En_Decryption (word 5) decrypt words 17..26 into words 28..37 with (D, N).
// Each plaintext word carries two ASCII characters. The key material is also
// available on the `keys` output. `busy` is high while an operation runs,
// `done` rises when the last requested one is finished, `keys_valid` tells
// that a key pair exists and `key_error` that Seed_E led to no usable E.
//
// Structure: rsa_mem (memory), rsa_controller (sequencer), rsa_keygen (LFSR,
// prime detector, Booth multiplier, extended Euclid) and two mod_exp
// instances, the encryption engine and the decryption engine. Everything runs
// on one clock with an active-low asynchronous reset. The memory map, the
// three enable words and the split into key generation, encryption and
// decryption follow the published design; the 32-bit key width, the status
// outputs and the start of the decrypted area at word 28 (read from the
// published waveform) are choices of this design.
//
// Timing at the default sizes: key generation from the prime seeds 101 and
// 401 with E = 17 takes 2520 clocks; each message word takes at most
// 2 * 32 * 34 clocks in either engine, so a 10-word area about 22k clocks.
module rsa_top
  import rsa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host memory port
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [WORD_W-1:0] host_wdata,
  output logic [WORD_W-1:0] host_rdata,
  // key material and status
  output rsa_keys_t         keys,
  output logic              keys_valid,
  output logic              key_error,
  output logic              busy,
  output logic              done
);

  logic [WORD_W-1:0] ctrl_words [6];
  logic              mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [WORD_W-1:0] mem_wdata, mem_rdata;

  logic               kg_start, kg_busy, kg_done, kg_error, kg_cand_rej, kg_e_rej;
  logic [PRIME_W-1:0] kg_seed_p, kg_seed_q;
  logic [KEY_W-1:0]   kg_seed_e;

  logic             enc_start, enc_busy, enc_done;
  logic             dec_start, dec_busy, dec_done;
  logic [KEY_W-1:0] enc_result, dec_result, engine_base;

  rsa_mem u_mem (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .int_we    (mem_we),
    .int_addr  (mem_addr),
    .int_wdata (mem_wdata),
    .int_rdata (mem_rdata),
    .ctrl_words(ctrl_words)
  );

  rsa_keygen u_keygen (
    .clk, .rst_n,
    .start      (kg_start),
    .seed_p     (kg_seed_p),
    .seed_q     (kg_seed_q),
    .seed_e     (kg_seed_e),
    .busy       (kg_busy),
    .done       (kg_done),
    .error      (kg_error),
    .keys       (keys),
    .cand_reject(kg_cand_rej),
    .e_reject   (kg_e_rej)
  );

  mod_exp #(.W(KEY_W)) u_encrypt (
    .clk, .rst_n,
    .start (enc_start),
    .base  (engine_base),
    .exp   (keys.e),
    .n     (keys.n),
    .busy  (enc_busy),
    .done  (enc_done),
    .result(enc_result)
  );

  mod_exp #(.W(KEY_W)) u_decrypt (
    .clk, .rst_n,
    .start (dec_start),
    .base  (engine_base),
    .exp   (keys.d),
    .n     (keys.n),
    .busy  (dec_busy),
    .done  (dec_done),
    .result(dec_result)
  );

  rsa_controller u_ctrl (
    .clk, .rst_n,
    .ctrl_words,
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .kg_start, .kg_seed_p, .kg_seed_q, .kg_seed_e, .kg_done, .kg_error,
    .enc_start, .enc_done, .enc_result,
    .dec_start, .dec_done, .dec_result,
    .engine_base,
    .keys_valid, .key_error, .busy, .done
  );

endmodule
