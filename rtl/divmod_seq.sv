// divmod_seq: sequential unsigned restoring divider, quotient and remainder.
//
// One quotient bit per clock, most significant first: the partial remainder is
// shifted left by one dividend bit and the divisor is subtracted when it fits.
// A one-cycle `start` (accepted when not busy) loads the operands; W cycles
// later `done` pulses for one cycle and `quotient`/`remainder` hold until the
// next start. Division by zero gives an all-ones quotient and the dividend as
// remainder. Used by the prime detector (trial division) and by the extended
// Euclidean unit (quotient of each step). The divider structure is this
// design's choice; the source only needs the quotient and the remainder.
module divmod_seq #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W:0]    rem_q;
  logic [W-1:0]  quo_q;
  logic [W-1:0]  div_q;
  logic [CW-1:0] cnt_q;
  logic [W:0]    shifted;
  logic          fits;

  assign shifted = {rem_q[W-1:0], quo_q[W-1]};
  assign fits    = shifted >= {1'b0, div_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0;
      quo_q <= '0;
      div_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem_q <= '0;
          quo_q <= dividend;
          div_q <= divisor;
          cnt_q <= CW'(W);
          busy  <= 1'b1;
        end
      end else begin
        rem_q <= fits ? shifted - {1'b0, div_q} : shifted;
        quo_q <= {quo_q[W-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q[W-1:0];

endmodule
