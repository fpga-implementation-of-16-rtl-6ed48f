// tb_lfsr16: checks the 16-bit LFSR.
//
// Loads the published seed 25679 and expects 12839 and 6419 as the next two
// values. Then checks 2000 steps against a reference that evaluates the
// polynomial x^16+x^14+x^13+x^11+1 tap by tap, and that the sequence from the
// seed returns to it after exactly 65535 steps (maximal length) and not
// earlier. The reference uses XNOR feedback with the tap of exponent k at
// bit 16-k. Also checks that `load` wins over `run` and that run=0 holds.
module tb_lfsr16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, run = 1'b0;
  logic [15:0] seed = '0, lfsr_out;
  int checks = 0, failures = 0;

  lfsr16 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference: the tap of polynomial exponent k sits at bit (16-k), XNOR
  function automatic logic [15:0] ref_step(logic [15:0] s);
    int taps[4] = '{16, 14, 13, 11};
    logic fb = 1'b1;
    foreach (taps[i]) fb ^= s[16-taps[i]];
    return {fb, s[15:1]};
  endfunction

  logic [15:0] model;
  int period;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    seed <= 16'd25679; load <= 1'b1; run <= 1'b1;   // load wins
    @(posedge clk);
    load <= 1'b0;
    #1 check("seed loaded", lfsr_out, 16'd25679);
    @(posedge clk); #1 check("step 1", lfsr_out, 16'd12839);
    @(posedge clk); #1 check("step 2", lfsr_out, 16'd6419);
    run <= 1'b0;
    @(posedge clk); @(posedge clk); #1 check("hold", lfsr_out, 16'd6419);
    model = lfsr_out;
    run <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      model = ref_step(model);
      #1 check("sequence", lfsr_out, model);
    end
    // period from the seed
    run <= 1'b0;
    @(posedge clk);
    seed <= 16'hACE1; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0; run <= 1'b1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (lfsr_out != 16'hACE1 && period < 70000);
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period %0d", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
