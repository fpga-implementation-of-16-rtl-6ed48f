// rsa_keygen: RSA key generation from three seeds.
//
// Sequence (one shared LFSR, prime detector, Booth multiplier and extended
// Euclidean unit, used one after another):
//   1. P: the LFSR is loaded with Seed_P; its value is tested by the prime
//      detector; while it is not prime the LFSR steps once and the new value
//      is tested. The first prime becomes P.
//   2. Q: the same, starting from Seed_Q.
//   3. N = P*Q and phi = (P-1)*(Q-1) on the Booth multiplier, with the 16-bit
//      values zero-extended to its 32-bit operands.
//   4. E starts at Seed_E. The condition 1 < E < phi and gcd(E, phi) = 1 is
//      checked with the extended Euclidean unit run on a = phi, b = E. When it
//      holds, the same run's last_y is the inverse of E modulo phi; D is
//      last_y, plus phi when last_y is negative. When the gcd is not 1, E is
//      incremented and checked again; a Seed_E of 0 or 1 is raised to 2.
//      When E reaches phi no key exists and `error` is raised instead of `done`.
// The order of the steps and the units used follow the source; the handling
// of a rejected E, the raise to 2 and the error flag are this design's choice.
// P = Q is not rejected (not covered by the source).
//
// Interface: `start` (accepted when not busy) samples the seeds; `done` (or
// `error`) pulses for one cycle at the end; `keys` holds the result until the
// next start. `cand_reject` and `e_reject` pulse when a prime candidate or an
// E candidate is rejected. Latency is dominated by the prime tests: with prime
// seeds 101, 401 and E = 17 it is 2520 clocks.
module rsa_keygen
  import rsa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PRIME_W-1:0] seed_p,
  input  logic [PRIME_W-1:0] seed_q,
  input  logic [KEY_W-1:0]   seed_e,
  output logic               busy,
  output logic               done,
  output logic               error,
  output rsa_keys_t          keys,
  output logic               cand_reject,
  output logic               e_reject
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_PT_START, S_PT_WAIT, S_STEP,
    S_MUL_N, S_MUL_N_WAIT, S_MUL_PHI, S_MUL_PHI_WAIT,
    S_E_CHECK, S_E_WAIT
  } state_t;
  state_t state;

  logic               want_q;        // 0: searching P, 1: searching Q
  logic [PRIME_W-1:0] seed_q_q;
  logic [KEY_W-1:0]   seed_e_q;

  // LFSR
  logic               lfsr_load, lfsr_run;
  logic [PRIME_W-1:0] lfsr_out;
  // prime detector
  logic               pd_en, pd_busy, pd_yes, pd_no;
  logic [PRIME_W-1:0] pd_mem_c, pd_mod, pd_prime;
  // Booth multiplier
  logic               bm_start, bm_busy, bm_done;
  logic [KEY_W-1:0]   bm_mc, bm_mp;
  logic [2*KEY_W-1:0] bm_product;
  // extended Euclid
  logic               ee_en, ee_busy, ee_done;
  logic [KEY_W-1:0]   ee_gcd;
  logic signed [KEY_W:0] ee_x, ee_y, d_fix;

  lfsr16 u_lfsr (
    .clk, .rst_n,
    .load    (lfsr_load),
    .run     (lfsr_run),
    .seed    (want_q ? seed_q_q : seed_p),
    .lfsr_out(lfsr_out)
  );

  prime_detector u_prime (
    .clk, .rst_n,
    .en       (pd_en),
    .data_in  (lfsr_out),
    .busy     (pd_busy),
    .mem_c    (pd_mem_c),
    .mod      (pd_mod),
    .prime_out(pd_prime),
    .yes_prime(pd_yes),
    .no_prime (pd_no)
  );

  booth_multiplier #(.W(KEY_W)) u_booth (
    .clk, .rst_n,
    .start  (bm_start),
    .mc     (bm_mc),
    .mp     (bm_mp),
    .busy   (bm_busy),
    .done   (bm_done),
    .product(bm_product)
  );

  ext_euclid #(.W(KEY_W)) u_eea (
    .clk, .rst_n,
    .en    (ee_en),
    .a     (keys.phi),
    .b     (keys.e),
    .busy  (ee_busy),
    .done  (ee_done),
    .gcd   (ee_gcd),
    .last_x(ee_x),
    .last_y(ee_y)
  );

  assign lfsr_load = (state == S_LOAD);
  assign lfsr_run  = (state == S_STEP);
  assign pd_en     = (state == S_PT_START);
  assign bm_start  = (state == S_MUL_N) || (state == S_MUL_PHI);
  assign bm_mc     = (state == S_MUL_PHI) ? KEY_W'(keys.p - 1'b1) : KEY_W'(keys.p);
  assign bm_mp     = (state == S_MUL_PHI) ? KEY_W'(keys.q - 1'b1) : KEY_W'(keys.q);
  assign ee_en     = (state == S_E_CHECK) && (keys.e > KEY_W'(1)) && (keys.e < keys.phi);
  assign busy      = (state != S_IDLE);
  assign d_fix     = ee_y[KEY_W] ? ee_y + signed'({1'b0, keys.phi}) : ee_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      want_q      <= 1'b0;
      seed_q_q    <= '0;
      seed_e_q    <= '0;
      keys        <= '0;
      done        <= 1'b0;
      error       <= 1'b0;
      cand_reject <= 1'b0;
      e_reject    <= 1'b0;
    end else begin
      done        <= 1'b0;
      error       <= 1'b0;
      cand_reject <= 1'b0;
      e_reject    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          want_q   <= 1'b0;
          seed_q_q <= seed_q;
          seed_e_q <= seed_e;
          keys     <= '0;
          state    <= S_LOAD;
        end
        S_LOAD:     state <= S_PT_START;
        S_PT_START: state <= S_PT_WAIT;
        S_PT_WAIT: begin
          if (pd_yes) begin
            if (!want_q) begin
              keys.p <= pd_prime;
              want_q <= 1'b1;
              state  <= S_LOAD;
            end else begin
              keys.q <= pd_prime;
              state  <= S_MUL_N;
            end
          end else if (pd_no) begin
            cand_reject <= 1'b1;
            state       <= S_STEP;
          end
        end
        S_STEP:     state <= S_PT_START;
        S_MUL_N:    state <= S_MUL_N_WAIT;
        S_MUL_N_WAIT: if (bm_done) begin
          keys.n <= bm_product[KEY_W-1:0];
          state  <= S_MUL_PHI;
        end
        S_MUL_PHI:  state <= S_MUL_PHI_WAIT;
        S_MUL_PHI_WAIT: if (bm_done) begin
          keys.phi <= bm_product[KEY_W-1:0];
          keys.e   <= (seed_e_q < KEY_W'(2)) ? KEY_W'(2) : seed_e_q;
          state    <= S_E_CHECK;
        end
        S_E_CHECK: begin
          if (keys.e >= keys.phi) begin
            error <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_E_WAIT;
          end
        end
        S_E_WAIT: if (ee_done) begin
          if (ee_gcd == KEY_W'(1)) begin
            keys.d <= d_fix[KEY_W-1:0];
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            keys.e   <= keys.e + 1'b1;
            e_reject <= 1'b1;
            state    <= S_E_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
