// tb_mod_exp: checks the left-to-right binary modular exponentiation (W = 32).
//
// Published cases with N = 40501: 21838^17 = 34349 (encryption) and
// 34349^2353 = 21838 (decryption). Then random cases against a reference
// right-to-left square-and-multiply on 64-bit integers, with small moduli and
// moduli near 2^32, and exponents 0 and 1. Latency bound: at most
// 2*W*(W+3) + 2 clocks per run.
module tb_mod_exp;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] base = '0, exp = '0, n = 32'd2;
  logic busy, done;
  logic [W-1:0] result;
  int checks = 0, failures = 0;

  mod_exp #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_pow(longint unsigned bs, longint unsigned e,
                                              longint unsigned m);
    longint unsigned r = 1 % m;
    bs = bs % m;
    while (e != 0) begin
      if (e[0]) r = (r * bs) % m;
      bs = (bs * bs) % m;
      e >>= 1;
    end
    return r;
  endfunction

  task automatic test(input logic [W-1:0] bv, ev, nv);
    longint unsigned expv;
    int cycles;
    expv = ref_pow({32'd0, bv}, {32'd0, ev}, {32'd0, nv});
    @(posedge clk); #1;
    base = bv; exp = ev; n = nv; start = 1'b1;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      start = 1'b0;
      cycles++;
    end while (!done);
    checks += 2;
    if (longint'(result) != expv) begin
      failures++;
      $display("FAIL %0d^%0d mod %0d: got %0d expected %0d", bv, ev, nv, result, expv);
    end
    if (cycles > 2 * W * (W + 3) + 2) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    logic [W-1:0] nv;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    test(32'd21838, 32'd17, 32'd40501);
    test(32'd34349, 32'd2353, 32'd40501);
    test(32'd12345, 32'd0, 32'd40501);
    test(32'd12345, 32'd1, 32'd40501);
    test(32'hFFFF_FFF0, 32'hFFFF_FFFF, 32'hFFFF_FFFB);
    for (int i = 0; i < 40; i++) begin
      nv = (i % 2 == 1) ? W'($urandom_range(3, 65535)) : ($urandom | 32'h8000_0000);
      test($urandom % nv, $urandom, nv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
