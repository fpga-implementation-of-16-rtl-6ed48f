// tb_mod_mult: checks the interleaved modular multiplier (W = 32).
//
// 300 random triples with a, b < n (small and full-width moduli, including
// n close to 2^32) against a 64-bit reference product reduced with %.
// Also checks the latency: `done` W+1 clocks after `start`.
module tb_mod_mult;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] a = '0, b = '0, n = 32'd1;
  logic busy, done;
  logic [W-1:0] result;
  int checks = 0, failures = 0;

  mod_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test(input logic [W-1:0] nv, av, bv);
    longint unsigned expv;
    int cycles;
    expv = ({32'd0, av} * {32'd0, bv}) % {32'd0, nv};
    @(posedge clk); #1;
    a = av; b = bv; n = nv; start = 1'b1;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      start = 1'b0;
      cycles++;
    end while (!done);
    checks += 2;
    if (longint'(result) != expv) begin
      failures++;
      $display("FAIL %0d*%0d mod %0d: got %0d expected %0d", av, bv, nv, result, expv);
    end
    if (cycles != W + 1) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    logic [W-1:0] nv;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    test(32'd40501, 32'd21838, 32'd21838);
    test(32'hFFFF_FFFB, 32'hFFFF_FFFA, 32'hFFFF_FFFA);
    for (int i = 0; i < 300; i++) begin
      nv = (i % 2 == 1) ? W'($urandom_range(2, 65535)) : ($urandom | 32'h8000_0000);
      test(nv, $urandom % nv, $urandom % nv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
