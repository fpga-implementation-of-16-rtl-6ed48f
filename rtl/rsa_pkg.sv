// rsa_pkg: widths, memory map and key record shared by the RSA cryptosystem.
//
// The cryptosystem works on 16-bit primes P and Q, so the modulus N = P*Q and
// the totient phi(N) = (P-1)*(Q-1) need 32 bits; the exponents E and D are kept
// at the same width. Messages are 16-bit words holding two ASCII characters.
//
// Memory map (one word per address): 0 Seed_P, 1 Seed_Q, 2 Seed_E, 3 En_RSA,
// 4 En_Encryption, 5 En_Decryption, 6..15 plaintext words, 17..26 ciphertext
// words, 28..37 decrypted words. Addresses 0..15 and 17..26 are the published
// map; the decrypted area starts at 28 (same spacing of 11 as between the
// plaintext and ciphertext areas). The 64-word depth is this design's choice.
package rsa_pkg;

  localparam int unsigned PRIME_W = 16;           // width of P, Q and the seeds
  localparam int unsigned KEY_W   = 2 * PRIME_W;  // width of N, phi, E, D
  localparam int unsigned WORD_W  = KEY_W;        // memory word, holds a ciphertext

  localparam int unsigned MEM_DEPTH = 64;
  localparam int unsigned ADDR_W    = $clog2(MEM_DEPTH);

  localparam logic [ADDR_W-1:0] ADDR_SEED_P = 6'd0;
  localparam logic [ADDR_W-1:0] ADDR_SEED_Q = 6'd1;
  localparam logic [ADDR_W-1:0] ADDR_SEED_E = 6'd2;
  localparam logic [ADDR_W-1:0] ADDR_EN_RSA = 6'd3;
  localparam logic [ADDR_W-1:0] ADDR_EN_ENC = 6'd4;
  localparam logic [ADDR_W-1:0] ADDR_EN_DEC = 6'd5;
  localparam logic [ADDR_W-1:0] ADDR_MSG    = 6'd6;   // plaintext 6..15
  localparam logic [ADDR_W-1:0] ADDR_CIPHER = 6'd17;  // ciphertext 17..26
  localparam logic [ADDR_W-1:0] ADDR_PLAIN  = 6'd28;  // decrypted 28..37
  localparam int unsigned       NUM_WORDS   = 10;     // words per message area

  // Key material produced by the key generator.
  typedef struct packed {
    logic [PRIME_W-1:0] p;
    logic [PRIME_W-1:0] q;
    logic [KEY_W-1:0]   n;
    logic [KEY_W-1:0]   phi;
    logic [KEY_W-1:0]   e;
    logic [KEY_W-1:0]   d;
  } rsa_keys_t;

endpackage
