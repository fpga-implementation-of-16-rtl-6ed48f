// rsa_mem: word memory shared by the host and the RSA controller.
//
// Holds the control words and the message areas of the cryptosystem (map in
// rsa_pkg): seeds at 0..2, the three enable words at 3..5, plaintext at 6..15,
// ciphertext at 17..26, decrypted text at 28..37. The first six words are
// also brought out in parallel so that the controller sees the seeds and the
// enables without a read cycle.
//
// Two ports, each with a combinational read and a write on the rising clock
// edge: the host port (`host_*`) and the internal port (`int_*`) used by the
// controller. When both write the same address in one cycle the host wins.
// Reset clears every word, so the enables start at zero. The placement of
// the control words and message areas follows the source; the port structure,
// depth, word width and reset are this design's choice.
module rsa_mem
  import rsa_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned DW    = WORD_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host port
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [DW-1:0]            host_wdata,
  output logic [DW-1:0]            host_rdata,
  // internal port
  input  logic                     int_we,
  input  logic [$clog2(DEPTH)-1:0] int_addr,
  input  logic [DW-1:0]            int_wdata,
  output logic [DW-1:0]            int_rdata,
  // control words 0..5
  output logic [DW-1:0]            ctrl_words [6]
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (int_we && !(host_we && host_addr == int_addr)) mem[int_addr] <= int_wdata;
      if (host_we) mem[host_addr] <= host_wdata;
    end
  end

  assign host_rdata = mem[host_addr];
  assign int_rdata  = mem[int_addr];

  always_comb begin
    for (int i = 0; i < 6; i++) ctrl_words[i] = mem[i];
  end

endmodule
