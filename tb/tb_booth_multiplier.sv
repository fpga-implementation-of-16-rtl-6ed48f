// tb_booth_multiplier: checks the sequential Booth multiplier (32 x 32 bits).
//
// The published case 234 * 23456 = 5488704, corner cases (zero, -1, the most
// negative value) and 200 random signed pairs against the simulator's own
// signed product. Also checks that `done` comes W = 32 clocks after `start`
// and that `busy` is high in between.
module tb_booth_multiplier;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] mc = '0, mp = '0;
  logic busy, done;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  booth_multiplier #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test(input logic [W-1:0] a, b);
    logic signed [2*W-1:0] expv;
    int cycles;
    expv = (2*W)'(signed'(a)) * (2*W)'(signed'(b));
    @(posedge clk); #1;
    mc = a; mp = b; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
      if (!done && !busy) begin
        failures++; checks++;
        $display("FAIL busy low before done");
      end
    end while (!done);
    checks += 2;
    if (product !== expv) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", signed'(a), signed'(b),
               signed'(product), expv);
    end
    if (cycles != W) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    test(32'd234, 32'd23456);
    test(32'd0, 32'd12345);
    test(32'hFFFF_FFFF, 32'd7);
    test(32'h8000_0000, 32'h8000_0000);
    test(32'h8000_0000, 32'h7FFF_FFFF);
    test(32'd101, 32'd401);
    test(32'd65521, 32'd65519);
    repeat (200) test($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
