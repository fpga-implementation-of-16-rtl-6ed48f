// mod_mult: bit-serial interleaved modular multiplier, result = a*b mod n.
//
// The bits of `a` are taken most significant first; each clock doubles the
// running residue, adds `b` when the current bit of `a` is one, and brings the
// sum back below n by subtracting n or 2n (the sum is below 3n). After W
// clocks the residue is a*b mod n. No full-width product is ever formed, so
// the unit costs two adders and two comparators of W+2 bits.
//
// Operands must satisfy a < n and b < n (the exponentiation keeps its values
// reduced); n must be non-zero. Interface: `start` (accepted when not busy)
// samples a, b and n; `done` pulses for one cycle W+1 clocks later, and
// `result` holds until the next start. The source names modular
// multiplication without giving its structure; the interleaved shift-add
// method is this design's choice.
module mod_mult #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  a_q, b_q, n_q;
  logic [CW-1:0] cnt_q;
  logic [W+1:0]  sum, n1, n2, reduced;

  assign n1  = {2'b00, n_q};
  assign n2  = {1'b0, n_q, 1'b0};
  assign sum = {1'b0, result, 1'b0} + (a_q[W-1] ? {2'b00, b_q} : '0);

  always_comb begin
    if (sum >= n2)      reduced = sum - n2;
    else if (sum >= n1) reduced = sum - n1;
    else                reduced = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      b_q    <= '0;
      n_q    <= '0;
      cnt_q  <= '0;
      result <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q    <= a;
          b_q    <= b;
          n_q    <= n;
          result <= '0;
          cnt_q  <= CW'(W);
          busy   <= 1'b1;
        end
      end else begin
        result <= reduced[W-1:0];
        a_q    <= {a_q[W-2:0], 1'b0};
        // every step leaves the residue below the modulus
        a_residue_reduced: assert (reduced < n1);
        cnt_q  <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
