// tb_flud_mac: checks the PE arithmetic unit against real-number references.
// MUL must be exact to the correctly rounded product; MAC (two roundings) must
// match the rounded product followed by a correctly rounded subtraction
// within one ulp.  Also exercises exact cancellation, zero operands and
// pass-through.
module tb_flud_mac;
  import flud_pkg::*;
  import tb_fp_pkg::*;

  pe_op_e op;
  fp32_t  x, b, m, y;
  int     checks = 0, failures = 0;

  flud_mac dut (.op(op), .x(x), .b(b), .m(m), .y(y));

  task automatic check(input fp32_t exp_v, input int unsigned tol, input string what);
    #1;
    checks++;
    if (ulp_diff(y, exp_v) > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s op=%0d x=%h b=%h m=%h y=%h exp=%h", what, op, x, b, m, y, exp_v);
    end
  endtask

  initial begin
    fp32_t p;
    for (int n = 0; n < 3000; n++) begin
      x = rand_f(20); b = rand_f(20); m = rand_f(20);
      op = OP_MUL;
      check(r2f(f2r(x) * f2r(m)), 0, "mul");
      op = OP_MAC;
      p = r2f(f2r(b) * f2r(m));
      check(r2f(f2r(x) - f2r(p)), 1, "mac");
      op = OP_PASS;
      check(x, 0, "pass");
    end
    // close magnitudes: heavy cancellation
    for (int n = 0; n < 2000; n++) begin
      b = rand_f(2); m = rand_f(2);
      p = r2f(f2r(b) * f2r(m));
      x = {p[31], p[30:0] + 31'($urandom_range(64, 0)) - 31'd32};
      op = OP_MAC;
      check(r2f(f2r(x) - f2r(p)), 1, "cancel");
    end
    // exact cancellation and zeros
    x = 32'h4040_0000; b = 32'h3fc0_0000; m = 32'h4000_0000; op = OP_MAC; check(32'h0, 0, "exact0");
    x = 32'h4040_0000; b = 32'h0;         m = 32'h4000_0000; op = OP_MAC; check(x, 0, "bzero");
    x = 32'h0;         b = 32'h3fc0_0000; m = 32'h4000_0000; op = OP_MAC; check(32'hc040_0000, 0, "xzero");
    x = 32'h3f80_0000; b = 32'h3f80_0000; m = 32'h3380_0000; op = OP_MAC; check(32'h3f7f_ffff, 0, "ulp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
