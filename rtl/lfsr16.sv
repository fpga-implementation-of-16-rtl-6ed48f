// lfsr16: 16-bit Fibonacci LFSR, the random number source of key generation.
//
// Feedback polynomial x^16 + x^14 + x^13 + x^11 + 1 in Fibonacci form. The
// register shifts right by one place per enabled clock; the tap of exponent k
// is bit 16-k, so bits 0, 2, 3 and 5 are combined and enter at bit 15. The
// combination is an XNOR: with seed 25679 this gives 12839 and then 6419, the
// published example sequence (an XOR would give 45607 first). The sequence is
// maximal, period 65535.
//
// Interface: `load` copies `seed` into the register (the seed itself is the
// first value seen on `lfsr_out`, one clock later); otherwise `run` advances
// it by one step per clock. `load` wins over `run`. All ones is the lock-up
// state of an XNOR LFSR, so the seed must not be 65535. Active-low
// asynchronous reset clears the register.
module lfsr16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        run,
  input  logic [15:0] seed,
  output logic [15:0] lfsr_out
);

  logic feedback;

  assign feedback = ~(lfsr_out[0] ^ lfsr_out[2] ^ lfsr_out[3] ^ lfsr_out[5]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr_out <= '0;
    else if (load) lfsr_out <= seed;
    else if (run)  lfsr_out <= {feedback, lfsr_out[15:1]};
  end

endmodule
