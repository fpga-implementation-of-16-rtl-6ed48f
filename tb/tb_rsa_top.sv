// tb_rsa_top: end-to-end test of the RSA cryptosystem at its default sizes.
//
// Run 1, the published example: Seed_P=101, Seed_Q=401, Seed_E=17 and the
// message "NAGARJUNA COLLEGE" packed two ASCII characters per word into words
// 6..14 (the odd last character alone in the low byte). En_Encryption is
// raised before En_RSA, so encryption must wait for the keys (a request made
// while older keys exist is served with those keys at once). Expected:
// P=101, Q=401, N=40501, E=17, D=2353 and ciphertext words 17..25 =
// 3103 2229 34520 34349 25848 17985 1373 3478 2463. Decryption must then put
// the message back into words 28..36.
// Run 2: composite seeds and Seed_E=2, so the LFSR must step to primes, E is
// rejected and the private exponent needs the negative-coefficient
// correction; ciphertexts are compared with a reference modular power and the
// decrypted words with the message.
// Run 3: Seed_E above phi(N) must end in a key error with no encryption.
// Every mechanism (queued request, candidate rejection, E rejection, negative
// coefficient, key error, encryption, decryption) is counted and must occur.
module tb_rsa_top
  import rsa_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic              host_we = 1'b0;
  logic [ADDR_W-1:0] host_addr = '0;
  logic [WORD_W-1:0] host_wdata = '0, host_rdata;
  rsa_keys_t         keys;
  logic              keys_valid, key_error, busy, done;
  int checks = 0, failures = 0;
  int n_queued = 0, n_cand_rej = 0, n_e_rej = 0, n_neg_d = 0, n_key_err = 0;
  int n_enc_words = 0, n_dec_words = 0;

  rsa_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string TEXT = "NAGARJUNA COLLEGE";
  localparam int unsigned PUB_CIPHER [9] = '{3103, 2229, 34520, 34349, 25848,
                                            17985, 1373, 3478, 2463};
  logic [15:0] msg [10];

  // ---- reference models ----
  function automatic bit is_prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic logic [15:0] ref_prime(logic [15:0] s);
    while (!is_prime(int'(s))) s = {~(s[0] ^ s[2] ^ s[3] ^ s[5]), s[15:1]};
    return s;
  endfunction

  function automatic longint unsigned ref_pow(longint unsigned b, longint unsigned e,
                                              longint unsigned m);
    longint unsigned r = 1 % m;
    b = b % m;
    while (e != 0) begin
      if (e[0]) r = (r * b) % m;
      b = (b * b) % m;
      e >>= 1;
    end
    return r;
  endfunction

  function automatic bit ref_y_negative(longint a, longint b);
    longint y = 1, ly = 0;
    while (b != 0) begin
      longint q = a / b, t = a % b, ty = ly - q * y;
      a = b; b = t; ly = y; y = ty;
    end
    return ly < 0;
  endfunction

  // ---- host access ----
  task automatic wr(input int addr, input logic [WORD_W-1:0] v);
    @(posedge clk); #1;
    host_we = 1'b1; host_addr = ADDR_W'(addr); host_wdata = v;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  task automatic rd(input int addr, output logic [WORD_W-1:0] v);
    #1 host_addr = ADDR_W'(addr);
    #1 v = host_rdata;
  endtask

  task automatic toggle(input int addr);
    wr(addr, 1);
    wr(addr, 0);
  endtask

  task automatic wait_idle_done();
    int guard = 0;
    while (!busy && guard < 100) begin @(posedge clk); #1; guard++; end
    guard = 0;
    while (!(done && !busy)) begin
      @(posedge clk); #1;
      if (++guard == 2000000) begin
        failures++;
        $display("FAIL operation did not finish");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // encrypt and decrypt the message with the current seeds, compare everything
  task automatic full_run(input logic [15:0] sp, sq, input logic [31:0] se, input bit published);
    logic [WORD_W-1:0] v;
    longint p, q, phi;
    string s;
    wr(ADDR_SEED_P, sp); wr(ADDR_SEED_Q, sq); wr(ADDR_SEED_E, se);
    for (int i = 0; i < 10; i++) wr(int'(ADDR_MSG) + i, msg[i]);
    if (!keys_valid) begin
      // encryption requested before any keys exist: it is queued
      toggle(ADDR_EN_ENC);
      toggle(ADDR_EN_RSA);
      wait_idle_done();
      n_queued++;
    end else begin
      // keys exist: a new key pair first, then encryption
      toggle(ADDR_EN_RSA);
      wait_idle_done();
      toggle(ADDR_EN_ENC);
      wait_idle_done();
    end
    p = longint'(ref_prime(sp));
    q = longint'(ref_prime(sq));
    phi = (p - 1) * (q - 1);
    if (p != sp || q != sq) n_cand_rej++;
    if (keys.e != se) n_e_rej++;
    if (ref_y_negative(phi, longint'(keys.e))) n_neg_d++;
    check("keys valid", keys_valid, 1);
    check("P", keys.p, p);
    check("Q", keys.q, q);
    check("N", keys.n, p * q);
    check("phi", keys.phi, phi);
    check("E*D mod phi", (longint'(keys.e) * longint'(keys.d)) % phi, 1);
    if (published) begin
      check("E", keys.e, 17);
      check("D", keys.d, 2353);
    end
    for (int i = 0; i < 10; i++) begin
      rd(int'(ADDR_CIPHER) + i, v);
      check("ciphertext", v, ref_pow(msg[i], keys.e, keys.n));
      if (published && i < 9) check("published ciphertext", v, PUB_CIPHER[i]);
      n_enc_words++;
    end
    toggle(ADDR_EN_DEC);
    wait_idle_done();
    s = "";
    for (int i = 0; i < 10; i++) begin
      rd(int'(ADDR_PLAIN) + i, v);
      check("decrypted", v, msg[i]);
      if (v[15:8] != 0) s = {s, string'(v[15:8])};
      if (v[7:0] != 0)  s = {s, string'(v[7:0])};
      n_dec_words++;
    end
    $display("keys P=%0d Q=%0d N=%0d phi=%0d E=%0d D=%0d, decrypted text \"%s\"",
             keys.p, keys.q, keys.n, keys.phi, keys.e, keys.d, s);
    if (published) check("decrypted text", longint'(s == TEXT), 1);
  endtask

  initial begin
    logic [WORD_W-1:0] v;
    // pack the text: two characters per word, a lone last character in the low byte
    for (int i = 0; i < 10; i++) msg[i] = '0;
    for (int i = 0; i < TEXT.len(); i += 2)
      msg[i/2] = (i + 1 < TEXT.len()) ? {TEXT[i], TEXT[i+1]} : {8'h00, TEXT[i]};
    check("packed word NA", msg[0], 16'h4E41);
    check("packed word E", msg[8], 16'h0045);

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    full_run(16'd101, 16'd401, 32'd17, 1);
    full_run(16'd100, 16'd2001, 32'd2, 0);

    // key error: no E below phi
    wr(ADDR_SEED_P, 101); wr(ADDR_SEED_Q, 401); wr(ADDR_SEED_E, 50000);
    wr(int'(ADDR_CIPHER), 32'h1234);
    toggle(ADDR_EN_RSA);
    wait_idle_done();
    toggle(ADDR_EN_ENC);
    repeat (200) @(posedge clk);
    #1;
    check("key error", key_error, 1);
    check("keys invalid", keys_valid, 0);
    rd(int'(ADDR_CIPHER), v);
    check("no encryption after key error", v, 32'h1234);
    if (key_error) n_key_err++;

    $display("mechanisms: queued %0d, candidate rejects %0d, E rejects %0d, negative D %0d, key errors %0d, words encrypted %0d, decrypted %0d",
             n_queued, n_cand_rej, n_e_rej, n_neg_d, n_key_err, n_enc_words, n_dec_words);
    check("queued request seen", longint'(n_queued > 0), 1);
    check("candidate reject seen", longint'(n_cand_rej > 0), 1);
    check("E reject seen", longint'(n_e_rej > 0), 1);
    check("negative D seen", longint'(n_neg_d > 0), 1);
    check("key error seen", longint'(n_key_err > 0), 1);
    check("encryption seen", longint'(n_enc_words > 0), 1);
    check("decryption seen", longint'(n_dec_words > 0), 1);
    $display("simulated %0d clock cycles", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
