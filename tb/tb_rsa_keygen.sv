// tb_rsa_keygen: checks key generation end to end.
//
// Case 1 is the published one: seeds 101, 401 and 17 give P=101, Q=401,
// N=40501, phi=40000, E=17, D=2353. Further cases use composite seeds (the
// LFSR must step to the next prime, predicted by a reference LFSR and a
// reference primality test), a Seed_E that has a common factor with phi or is
// below 2 (E must move to the first usable value and D must satisfy
// E*D = 1 mod phi, with the negative-coefficient correction), and a Seed_E
// above phi (error instead of done). Every prime from 2 to 256 is also tried
// as Seed_E (the range the public exponent is chosen from). Counts how often
// each mechanism occurred.
module tb_rsa_keygen
  import rsa_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [PRIME_W-1:0] seed_p = '0, seed_q = '0;
  logic [KEY_W-1:0]   seed_e = '0;
  logic busy, done, error, cand_reject, e_reject;
  rsa_keys_t keys;
  int checks = 0, failures = 0;
  int n_cand_reject = 0, n_e_reject = 0, n_neg_d = 0, n_error = 0;

  rsa_keygen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (cand_reject) n_cand_reject++;
    if (e_reject) n_e_reject++;
  end

  function automatic bit is_prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  // next value of x^16+x^14+x^13+x^11+1, XNOR form, tap of exponent k at bit 16-k
  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    return {~(s[0] ^ s[2] ^ s[3] ^ s[5]), s[15:1]};
  endfunction

  function automatic logic [15:0] ref_prime(logic [15:0] s);
    while (!is_prime(int'(s))) s = lfsr_next(s);
    return s;
  endfunction

  function automatic longint ref_gcd(longint x, longint y);
    while (y != 0) begin
      longint t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // sign of the Bezout coefficient of e in the extended Euclid run on (phi, e)
  function automatic bit ref_y_negative(longint a, longint b);
    longint y = 1, ly = 0;
    while (b != 0) begin
      longint q = a / b, t = a % b, ty = ly - q * y;
      a = b; b = t; ly = y; y = ty;
    end
    return ly < 0;
  endfunction

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input logic [15:0] sp, sq, input logic [31:0] se);
    @(posedge clk); #1;
    seed_p = sp; seed_q = sq; seed_e = se; start = 1'b1;
    do begin
      @(posedge clk); #1;
      start = 1'b0;
    end while (!(done || error));
  endtask

  task automatic check_keys(input logic [15:0] sp, sq, input logic [31:0] se);
    longint p, q, phi, e;
    run(sp, sq, se);
    p   = longint'(ref_prime(sp));
    q   = longint'(ref_prime(sq));
    phi = (p - 1) * (q - 1);
    e   = (se < 2) ? 2 : longint'(se);
    while (e < phi && ref_gcd(phi, e) != 1) e++;
    if (ref_y_negative(phi, e)) n_neg_d++;
    check("done", longint'(done), 1);
    check("P", longint'(keys.p), p);
    check("Q", longint'(keys.q), q);
    check("N", longint'(keys.n), p * q);
    check("phi", longint'(keys.phi), phi);
    check("E", longint'(keys.e), e);
    check("E*D mod phi", (longint'(keys.e) * longint'(keys.d)) % phi, 1);
    check("D < phi", longint'(keys.d < keys.phi), 1);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // published key set
    run(16'd101, 16'd401, 32'd17);
    check("P", keys.p, 101);
    check("Q", keys.q, 401);
    check("N", keys.n, 40501);
    check("phi", keys.phi, 40000);
    check("E", keys.e, 17);
    check("D", keys.d, 2353);
    // E rejected, negative last_y corrected
    check_keys(16'd101, 16'd401, 32'd0);
    check("D for E=3", keys.d, 26667);
    check_keys(16'd101, 16'd401, 32'd10);
    // composite seeds, LFSR stepping
    check_keys(16'd100, 16'd2001, 32'd65537);
    check_keys(16'd25679, 16'd1234, 32'd17);
    // every prime from 1 to 256 as Seed_E with the published primes
    for (int s = 2; s <= 256; s++) if (is_prime(s)) check_keys(16'd101, 16'd401, 32'(s));
    // Seed_E not below phi
    run(16'd101, 16'd401, 32'd50000);
    check("error", longint'(error), 1);
    if (error) n_error++;
    $display("mechanisms: candidate rejects %0d, E rejects %0d, negative D %0d, errors %0d",
             n_cand_reject, n_e_reject, n_neg_d, n_error);
    check("candidate reject seen", longint'(n_cand_reject > 0), 1);
    check("E reject seen", longint'(n_e_reject > 0), 1);
    check("negative D seen", longint'(n_neg_d > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
