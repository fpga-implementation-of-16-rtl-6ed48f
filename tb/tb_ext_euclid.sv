// tb_ext_euclid: checks the iterative extended Euclidean unit (W = 32).
//
// Published case a=120, b=23: gcd 1, last_x = -9, last_y = 47, and the
// key-generation case a=40000, b=17: last_y = 2353 (the private exponent).
// Then 100 random pairs, including pairs with a common factor, against a
// reference gcd and the Bezout identity a*last_x + b*last_y = gcd, and the
// b = 0 case.
module tb_ext_euclid;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic busy, done;
  logic [W-1:0] gcd;
  logic signed [W:0] last_x, last_y;
  int checks = 0, failures = 0;

  ext_euclid #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_gcd(longint x, longint y);
    while (y != 0) begin
      longint t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  task automatic run(input logic [W-1:0] av, bv);
    @(posedge clk); #1;
    a = av; b = bv; en = 1'b1;
    do begin
      @(posedge clk); #1;
      en = 1'b0;
    end while (!done);
  endtask

  task automatic check_generic(input logic [W-1:0] av, bv);
    longint g, lhs;
    run(av, bv);
    g   = ref_gcd(longint'(av), longint'(bv));
    lhs = longint'(av) * longint'(last_x) + longint'(bv) * longint'(last_y);
    checks += 2;
    if (longint'(gcd) != g) begin
      failures++;
      $display("FAIL gcd(%0d,%0d)=%0d expected %0d", av, bv, gcd, g);
    end
    if (lhs != g) begin
      failures++;
      $display("FAIL Bezout %0d,%0d: x=%0d y=%0d", av, bv, last_x, last_y);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run(32'd120, 32'd23);
    checks += 3;
    if (gcd != 1)        begin failures++; $display("FAIL gcd %0d", gcd); end
    if (last_x != -33'sd9) begin failures++; $display("FAIL last_x %0d", last_x); end
    if (last_y != 33'sd47) begin failures++; $display("FAIL last_y %0d", last_y); end
    run(32'd40000, 32'd17);
    checks++;
    if (last_y != 33'sd2353) begin failures++; $display("FAIL last_y %0d", last_y); end
    check_generic(32'd40000, 32'd3);
    check_generic(32'd1000, 32'd0);
    check_generic(32'hFFFF_FFFF, 32'hFFFF_FFFE);
    repeat (50) check_generic($urandom, $urandom);
    repeat (50) begin
      logic [W-1:0] k;
      k = W'($urandom_range(1, 1000));
      check_generic(k * W'($urandom_range(1, 100000)), k * W'($urandom_range(1, 100000)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
