// tb_flud_pe: checks one PE.  A MUL with buf_we stores its result in the
// buffer register (as the pivot column does); following MAC operations must
// use that buffered value: y = x - buf * m.  PASS must forward x and leave the
// buffer alone; a MAC without buf_we must not change the buffer.
module tb_flud_pe;
  import flud_pkg::*;
  import tb_fp_pkg::*;

  logic   clk = 0, rst_n = 0, we = 0;
  pe_op_e op = OP_PASS;
  fp32_t  x = '0, m = '0, y, bq;
  int     checks = 0, failures = 0;

  flud_pe dut (.clk(clk), .rst_n(rst_n), .op(op), .x(x), .m(m), .buf_we(we), .y(y), .buf_q(bq));

  always #5 clk = ~clk;

  task automatic expect_eq(input fp32_t got, input fp32_t exp_v, input int unsigned tol, input string what);
    checks++;
    if (ulp_diff(got, exp_v) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  initial begin
    fp32_t stored, p;
    repeat (2) @(negedge clk);
    expect_eq(bq, 32'h0, 0, "reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      // pivot column: scale and store
      @(negedge clk);
      op = OP_MUL; we = 1; x = rand_f(10); m = rand_f(10);
      #1 stored = r2f(f2r(x) * f2r(m));
      expect_eq(y, stored, 0, "mul");
      @(negedge clk);
      we = 0;
      expect_eq(bq, stored, 0, "buffered");
      // later columns: multiply-subtract with the buffered value
      repeat (4) begin
        op = OP_MAC; x = rand_f(10); m = rand_f(10);
        #1 p = r2f(f2r(stored) * f2r(m));
        expect_eq(y, r2f(f2r(x) - f2r(p)), 1, "mac");
        @(negedge clk);
        expect_eq(bq, stored, 0, "kept");
      end
      op = OP_PASS; x = rand_f(10);
      #1 expect_eq(y, x, 0, "pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
