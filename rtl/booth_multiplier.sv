// booth_multiplier: sequential radix-2 Booth multiplier, signed W x W -> 2W.
//
// Registers: accumulator A (W+1 bits, one guard bit so that subtracting the
// most negative multiplicand cannot overflow), multiplier register Q and the
// Booth bit q_1. Each clock inspects {Q[0], q_1}: 01 adds the multiplicand to
// A, 10 subtracts it, 00/11 leave A; then {A, Q, q_1} shifts right
// arithmetically by one. After W steps {A, Q} holds the two's-complement
// product. Operands below 2^(W-1) behave as unsigned numbers, so the key
// generator feeds zero-extended 16-bit values into the 32-bit default.
//
// Interface: `start` (accepted when not busy) samples `mc` (multiplicand) and
// `mp` (multiplier); `busy` is high for W cycles; `done` pulses for one cycle
// when `product` is valid, and `product` holds until the next start. The
// 32-bit width, the names mc/mp/start/busy/product and the Booth method follow
// the source; the one-bit-per-clock schedule is this design's choice.
module booth_multiplier #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   mc,
  input  logic [W-1:0]   mp,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);

  localparam int unsigned CW = $clog2(W + 1);

  logic signed [W:0] acc_q;
  logic [W-1:0]      q_q;
  logic              q1_q;
  logic signed [W:0] m_q;
  logic [CW-1:0]     cnt_q;
  logic signed [W:0] acc_sum;

  always_comb begin
    unique case ({q_q[0], q1_q})
      2'b01:   acc_sum = acc_q + m_q;
      2'b10:   acc_sum = acc_q - m_q;
      default: acc_sum = acc_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      q_q   <= '0;
      q1_q  <= 1'b0;
      m_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          acc_q <= '0;
          q_q   <= mp;
          q1_q  <= 1'b0;
          m_q   <= {mc[W-1], mc};
          cnt_q <= CW'(W);
          busy  <= 1'b1;
        end
      end else begin
        acc_q <= acc_sum >>> 1;
        q_q   <= {acc_sum[0], q_q[W-1:1]};
        q1_q  <= q_q[0];
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign product = {acc_q[W-1:0], q_q};

endmodule
