// mod_exp: left-to-right binary modular exponentiation, result = base^exp mod n.
//
// This unit is both the encryption engine (C = M^E mod N, public key) and the
// decryption engine (M = C^D mod N, private key) of the cryptosystem; the two
// are separate instances. The exponent is scanned from its most significant
// bit down. For every bit the residue is squared; when the bit is one it is
// then multiplied by the base. Both operations use one mod_mult instance, so
// a W-bit exponent costs at most 2W modular multiplications of W+2 clocks
// each (at most about 2 * 32 * 34 = 2176 clocks at the default width; 1157
// clocks for the exponent 17, which has two one bits). Leading zero
// bits of the exponent are squarings of 1 and are not skipped.
//
// Requirements: base < n and n > 1 (RSA requires the message to be below the
// modulus). Interface: `start` (accepted when not busy) samples base, exp and
// n; `done` pulses for one cycle when `result` is valid; `result` holds until
// the next start. The left-to-right binary method is the source's; the
// multiplier and the schedule are this design's choice.
module mod_exp #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] base,
  input  logic [W-1:0] exp,
  input  logic [W-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result
);

  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [2:0] {S_IDLE, S_SQR, S_SQR_WAIT, S_MUL, S_MUL_WAIT} state_t;
  state_t state;

  logic [W-1:0]  base_q, exp_q, n_q;
  logic [CW-1:0] bits_left;
  logic          mm_start, mm_busy, mm_done;
  logic [W-1:0]  mm_b, mm_result;

  assign mm_start = (state == S_SQR) || (state == S_MUL);
  assign mm_b     = (state == S_MUL) ? base_q : result;
  assign busy     = (state != S_IDLE);

  mod_mult #(.W(W)) u_mm (
    .clk, .rst_n,
    .start (mm_start),
    .a     (result),
    .b     (mm_b),
    .n     (n_q),
    .busy  (mm_busy),
    .done  (mm_done),
    .result(mm_result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      base_q    <= '0;
      exp_q     <= '0;
      n_q       <= '0;
      bits_left <= '0;
      result    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base_q    <= base;
          exp_q     <= exp;
          n_q       <= n;
          result    <= W'(1);
          bits_left <= CW'(W);
          state     <= S_SQR;
        end
        S_SQR:      state <= S_SQR_WAIT;
        S_SQR_WAIT: if (mm_done) begin
          result <= mm_result;
          state  <= exp_q[W-1] ? S_MUL : S_SQR;
          if (!exp_q[W-1]) begin
            exp_q     <= {exp_q[W-2:0], 1'b0};
            bits_left <= bits_left - 1'b1;
            if (bits_left == CW'(1)) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end
        end
        S_MUL:      state <= S_MUL_WAIT;
        S_MUL_WAIT: if (mm_done) begin
          result    <= mm_result;
          exp_q     <= {exp_q[W-2:0], 1'b0};
          bits_left <= bits_left - 1'b1;
          if (bits_left == CW'(1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_SQR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
