// tb_rsa_controller: checks the sequencer against simple models of its
// neighbours.
//
// The testbench holds the word memory as an array and models the key
// generator (done or error a few clocks after start) and the two engines
// (results base^32'h5A5A5A5A and base^32'h0F0F0F0F after a random delay).
// It checks: no operation starts without a rising edge of an enable bit and
// an enable held high starts only one; encryption requested before keys
// exist waits for key generation; encryption writes words 17..26 from 6..15
// and decryption writes 28..37 from 17..26; `done`, `keys_valid` and
// `key_error` follow each operation; after a key error encryption is not run.
module tb_rsa_controller
  import rsa_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [WORD_W-1:0] mem [MEM_DEPTH];
  logic [WORD_W-1:0] ctrl_words [6];
  logic              mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [WORD_W-1:0] mem_wdata, mem_rdata;
  logic              kg_start, kg_done = 1'b0, kg_error = 1'b0;
  logic [PRIME_W-1:0] kg_seed_p, kg_seed_q;
  logic [KEY_W-1:0]  kg_seed_e;
  logic              enc_start, enc_done = 1'b0, dec_start, dec_done = 1'b0;
  logic [KEY_W-1:0]  enc_result = '0, dec_result = '0, engine_base;
  logic              keys_valid, key_error, busy, done;
  int checks = 0, failures = 0;
  int n_kg = 0, n_enc = 0, n_dec = 0;

  rsa_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model
  assign mem_rdata = mem[mem_addr];
  always_comb for (int i = 0; i < 6; i++) ctrl_words[i] = mem[i];
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  // key generator model: error when Seed_E is 16'hDEAD
  always @(posedge clk) begin
    if (kg_start) begin
      n_kg++;
      fork begin
        logic err;
        err = (kg_seed_e == 32'hDEAD);
        repeat (5) @(posedge clk);
        kg_done  <= !err;
        kg_error <= err;
        @(posedge clk);
        kg_done  <= 1'b0;
        kg_error <= 1'b0;
      end join_none
    end
  end

  // engine models
  always @(posedge clk) begin
    if (enc_start) begin
      logic [KEY_W-1:0] b;
      n_enc++;
      b = engine_base;
      fork begin
        repeat ($urandom_range(1, 8)) @(posedge clk);
        enc_result <= b ^ 32'h5A5A5A5A;
        enc_done   <= 1'b1;
        @(posedge clk);
        enc_done   <= 1'b0;
      end join_none
    end
    if (dec_start) begin
      logic [KEY_W-1:0] b;
      n_dec++;
      b = engine_base;
      fork begin
        repeat ($urandom_range(1, 8)) @(posedge clk);
        dec_result <= b ^ 32'h0F0F0F0F;
        dec_done   <= 1'b1;
        @(posedge clk);
        dec_done   <= 1'b0;
      end join_none
    end
  end

  task automatic check(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic host_write(input int addr, input logic [WORD_W-1:0] v);
    @(posedge clk); #1;
    mem[addr] = v;
  endtask

  task automatic wait_done();
    int guard = 0;
    while (!busy && guard < 50) begin
      @(posedge clk); #1;
      guard++;
    end
    do begin
      @(posedge clk); #1;
      guard++;
    end while (!(done && !busy) && guard < 5000);
  endtask

  initial begin
    for (int i = 0; i < int'(MEM_DEPTH); i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    mem[0] = 32'd101; mem[1] = 32'd401; mem[2] = 32'd17;
    for (int i = 0; i < 10; i++) mem[6 + i] = $urandom;
    repeat (20) @(posedge clk);
    check("idle without a request", n_kg + n_enc + n_dec, 0);
    // encryption requested first: must wait for keys
    host_write(4, 1);
    repeat (10) @(posedge clk);
    check("encryption waits for keys", n_enc, 0);
    host_write(3, 1);
    wait_done();
    check("one key generation", n_kg, 1);
    check("keys valid", keys_valid, 1);
    check("ten encryptions", n_enc, 10);
    check("seed P", kg_seed_p, 101);
    check("seed E", kg_seed_e, 17);
    for (int i = 0; i < 10; i++) check("ciphertext word", mem[17 + i], mem[6 + i] ^ 32'h5A5A5A5A);
    // enables still high: nothing restarts
    repeat (50) @(posedge clk);
    check("no restart on held enable", n_kg + n_enc, 11);
    host_write(4, 0);
    host_write(5, 1);
    wait_done();
    check("ten decryptions", n_dec, 10);
    for (int i = 0; i < 10; i++) check("decrypted word", mem[28 + i], mem[17 + i] ^ 32'h0F0F0F0F);
    check("word 27 untouched", mem[27], 0);
    check("word 16 untouched", mem[16], 0);
    // key error
    host_write(5, 0);
    host_write(3, 0);
    host_write(2, 32'hDEAD);
    host_write(3, 1);
    host_write(4, 1);
    wait_done();
    repeat (20) @(posedge clk);
    check("key error", key_error, 1);
    check("keys invalid", keys_valid, 0);
    check("no encryption without keys", n_enc, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
