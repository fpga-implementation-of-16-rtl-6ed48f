// prime_detector: decides whether a 16-bit number is prime by trial division.
//
// A one-cycle `en` (accepted when not busy) captures `data_in`. Numbers below
// 2 and even numbers other than 2 are answered at once. For an odd number the
// divisor counter `mem_c` runs over the odd values 3, 5, 7, ... and each one is
// divided into the number by a sequential divider; a zero remainder ends the
// test with "not prime". When `mem_c` passes the limit `mod` = data_in/2
// without finding a factor, the number is prime. This follows the published
// simulation of 13009, where the limit reads 6504 and the counter steps
// 6501, 6503, 6505 before the prime flag appears. (The source calls the method
// a sieve of Eratosthenes; what it shows is this odd trial division.)
//
// Result: `yes_prime` or `no_prime` pulses for one cycle, `prime_out` holds the
// tested number when it is prime (zero otherwise) until the next test. A test
// of an odd number n takes about (n/4) * (16 + 2) cycles in the worst case.
module prime_detector (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] data_in,
  output logic        busy,
  output logic [15:0] mem_c,
  output logic [15:0] mod,
  output logic [15:0] prime_out,
  output logic        yes_prime,
  output logic        no_prime
);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_DIV, S_WAIT} state_t;
  state_t state;

  logic [15:0] num_q;
  logic        div_start, div_busy, div_done;
  logic [15:0] div_quo, div_rem;
  logic [16:0] next_c;

  divmod_seq #(.W(16)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (num_q),
    .divisor  (mem_c),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_quo),
    .remainder(div_rem)
  );

  assign div_start = (state == S_DIV);
  assign busy      = (state != S_IDLE);
  assign next_c    = {1'b0, mem_c} + 17'd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      num_q     <= '0;
      mem_c     <= '0;
      mod       <= '0;
      prime_out <= '0;
      yes_prime <= 1'b0;
      no_prime  <= 1'b0;
    end else begin
      yes_prime <= 1'b0;
      no_prime  <= 1'b0;
      unique case (state)
        S_IDLE: if (en) begin
          num_q     <= data_in;
          mod       <= data_in >> 1;
          mem_c     <= 16'd3;
          prime_out <= '0;
          if (data_in < 16'd2 || (data_in[0] == 1'b0 && data_in != 16'd2)) begin
            no_prime <= 1'b1;
          end else if (data_in < 16'd6) begin
            // 2, 3 and 5: no odd divisor 3 <= n/2 exists
            prime_out <= data_in;
            yes_prime <= 1'b1;
          end else begin
            state <= S_DIV;
          end
        end
        S_CHECK: begin
          mem_c <= next_c[15:0];
          if (next_c > {1'b0, mod}) begin
            prime_out <= num_q;
            yes_prime <= 1'b1;
            state     <= S_IDLE;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV:  state <= S_WAIT;
        S_WAIT: if (div_done) begin
          if (div_rem == 16'd0) begin
            no_prime <= 1'b1;
            state    <= S_IDLE;
          end else begin
            state <= S_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
