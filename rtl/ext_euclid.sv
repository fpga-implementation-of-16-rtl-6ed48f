// ext_euclid: iterative extended Euclidean algorithm.
//
// For unsigned inputs a and b it finds g = gcd(a, b) and Bezout coefficients
// with a*last_x + b*last_y = g. Each round divides a_reg by b_reg (sequential
// divider, W cycles), then
//   (a_reg, b_reg) <- (b_reg, remainder)
//   (x, last_x)    <- (last_x - quotient*x, x)
//   (y, last_y)    <- (last_y - quotient*y, y)
// starting from x=0, y=1, last_x=1, last_y=0, until b_reg is zero; g is then
// a_reg. This is the round-by-round trace published for a=120, b=23 (quotients
// 5,4,1,1,2; result last_x=-9, last_y=47). With a = phi(N) and b = E, last_y
// is the inverse of E modulo phi(N), possibly negative.
//
// The coefficients are bounded by the inputs, so W+1 signed bits hold them;
// the products quotient*x are formed modulo 2^(W+1), which gives the exact
// difference. Interface: `en` (accepted when not busy) samples a and b; `done`
// pulses once when gcd/last_x/last_y are valid; they hold until the next start.
// A run takes (rounds) * (W + 3) + 2 cycles.
module ext_euclid #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  output logic                busy,
  output logic                done,
  output logic [W-1:0]        gcd,
  output logic signed [W:0]   last_x,
  output logic signed [W:0]   last_y
);

  typedef enum logic [1:0] {S_IDLE, S_TEST, S_DIV, S_WAIT} state_t;
  state_t state;

  logic [W-1:0]      a_reg, b_reg;
  logic signed [W:0] x, y;
  logic [W-1:0]      quotient, remainder;
  logic              div_busy, div_done;
  logic signed [W:0] q_s;

  divmod_seq #(.W(W)) u_div (
    .clk, .rst_n,
    .start    (state == S_DIV),
    .dividend (a_reg),
    .divisor  (b_reg),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient),
    .remainder(remainder)
  );

  assign q_s  = signed'({1'b0, quotient});
  assign busy = (state != S_IDLE);
  assign gcd  = a_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      a_reg  <= '0;
      b_reg  <= '0;
      x      <= '0;
      y      <= '0;
      last_x <= '0;
      last_y <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (en) begin
          a_reg  <= a;
          b_reg  <= b;
          x      <= '0;
          y      <= (W+1)'(1);
          last_x <= (W+1)'(1);
          last_y <= '0;
          state  <= S_TEST;
        end
        S_TEST: begin
          if (b_reg == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV:  state <= S_WAIT;
        S_WAIT: if (div_done) begin
          a_reg  <= b_reg;
          b_reg  <= remainder;
          x      <= last_x - q_s * x;
          last_x <= x;
          y      <= last_y - q_s * y;
          last_y <= y;
          state  <= S_TEST;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
