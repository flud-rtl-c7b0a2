// tb_flud_recip: checks the sequential reciprocal unit.  Random divisors over
// a wide exponent range, powers of two and 0 are compared with the correctly
// rounded real reciprocal; the start-to-valid latency must be 29 cycles
// (capture, 27 quotient bits, round and pack) and busy must be high meanwhile.
module tb_flud_recip;
  import flud_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 29;

  logic  clk = 0, rst_n = 0, start = 0, busy, valid;
  fp32_t d, q;
  int    checks = 0, failures = 0;

  flud_recip dut (.clk(clk), .rst_n(rst_n), .start(start), .d(d), .busy(busy), .valid(valid), .q(q));

  always #5 clk = ~clk;

  task automatic run(input fp32_t dv, input fp32_t exp_v, input string what);
    int n;
    @(negedge clk);
    d = dv; start = 1;
    @(negedge clk);
    start = 0;
    n = 1;
    while (!valid) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while working"); end
      @(negedge clk);
      n++;
    end
    checks += 2;
    if (n != LAT) begin failures++; $display("FAIL latency %0d, expected %0d", n, LAT); end
    if (ulp_diff(q, exp_v) != 0) begin
      failures++;
      $display("FAIL %s d=%h q=%h exp=%h", what, dv, q, exp_v);
    end
  endtask

  initial begin
    fp32_t dv;
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      dv = rand_f(100);
      run(dv, r2f(1.0 / f2r(dv)), "rand");
    end
    run(32'h4000_0000, 32'h3f00_0000, "two");
    run(32'hbe80_0000, 32'hc080_0000, "m.25");
    run(32'h3f80_0000, 32'h3f80_0000, "one");
    run(32'h4040_0000, 32'h3eaa_aaab, "three");
    run(32'h0000_0000, 32'h7f80_0000, "zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
