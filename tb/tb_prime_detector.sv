// tb_prime_detector: checks the trial-division prime detector.
//
// Tests fixed values (0..9, 25, 49, 101, 401, 13009 and squares of primes)
// and 60 random 12-bit values against a reference primality function. For
// 13009 it also checks the published end state: limit `mod` = 6504 and divisor
// counter `mem_c` = 6505 when `yes_prime` pulses, with `prime_out` = 13009.
module tb_prime_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0;
  logic [15:0] data_in = '0;
  logic busy, yes_prime, no_prime;
  logic [15:0] mem_c, mod, prime_out;
  int checks = 0, failures = 0;

  prime_detector dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_prime(int n);
    if (n < 2) return 0;
    for (int d = 2; d * d <= n; d++) if (n % d == 0) return 0;
    return 1;
  endfunction

  task automatic test(input logic [15:0] n, input bit check_fig = 0);
    bit got;
    @(posedge clk); #1;
    data_in = n; en = 1'b1;
    do begin
      @(posedge clk); #1;
      en = 1'b0;
    end while (!(yes_prime || no_prime));
    got = yes_prime;
    checks++;
    if (got != is_prime(int'(n)) || (yes_prime && no_prime)) begin
      failures++;
      $display("FAIL %0d: detector says %0d", n, got);
    end
    if (got) begin
      checks++;
      if (prime_out != n) begin failures++; $display("FAIL prime_out %0d", prime_out); end
    end
    if (check_fig) begin
      checks += 2;
      if (mod != 16'd6504) begin failures++; $display("FAIL mod %0d", mod); end
      if (mem_c != 16'd6505) begin failures++; $display("FAIL mem_c %0d", mem_c); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 10; n++) test(16'(n));
    test(16'd25); test(16'd49); test(16'd101); test(16'd401);
    test(16'd121); test(16'd169); test(16'd961); test(16'd65535);
    test(16'd13009, 1);
    repeat (60) test(16'($urandom_range(4095)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
