// tb_rsa_mem: checks the two-port word memory.
//
// After reset every word reads zero. Then 2000 cycles of random writes on
// both ports (sometimes to the same address, where the host must win) are
// compared on both read ports and on the six parallel control words against
// a reference array.
module tb_rsa_mem
  import rsa_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0, int_we = 1'b0;
  logic [ADDR_W-1:0] host_addr = '0, int_addr = '0;
  logic [WORD_W-1:0] host_wdata = '0, int_wdata = '0, host_rdata, int_rdata;
  logic [WORD_W-1:0] ctrl_words [6];
  logic [WORD_W-1:0] model [MEM_DEPTH];
  int checks = 0, failures = 0;

  rsa_mem dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [WORD_W-1:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < int'(MEM_DEPTH); i++) begin
      model[i] = '0;
      host_addr = ADDR_W'(i);
      #1 check("reset", host_rdata, '0);
    end
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk); #1;
      // previous cycle's writes have landed: compare
      for (int i = 0; i < 6; i++) check("ctrl word", ctrl_words[i], model[i]);
      host_addr = ADDR_W'($urandom);
      int_addr  = ($urandom_range(3) == 0) ? host_addr : ADDR_W'($urandom);
      #1;
      check("host read", host_rdata, model[host_addr]);
      check("int read", int_rdata, model[int_addr]);
      host_we   = $urandom_range(1);
      int_we    = $urandom_range(1);
      host_wdata = $urandom;
      int_wdata  = $urandom;
      if (int_we) model[int_addr] = int_wdata;
      if (host_we) model[host_addr] = host_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
