// flud_mac: the arithmetic unit of one processing element (PE).
//
// Every PE of the array holds one multiply-accumulate unit; subtraction is
// done by the adder with the product's sign inverted, so the unit computes
//   OP_MAC : y = x - b * m     (trailing-matrix update of Algorithm 1)
//   OP_MUL : y = x * m         (division below the pivot, done as a
//                               multiplication by the pivot's reciprocal)
//   OP_PASS: y = x             (PE idle for this column, data forwarded)
// Numbers are IEEE-754 binary32 (the default precision of FLUD).  The unit
// is combinational: its result is registered by the FIFO that follows the PE
// group.  Multiply and add round separately (no fused MAC), an assumption of
// this design.
module flud_mac
  import flud_pkg::*;
(
  input  pe_op_e op,
  input  fp32_t  x,   // the PE's own element of the streaming column
  input  fp32_t  b,   // buffered element (first column of the row of blocks)
  input  fp32_t  m,   // broadcast multiplier (pivot-row element, top input or reciprocal)
  output fp32_t  y
);
  always_comb begin
    unique case (op)
      OP_MAC:  y = fp_msub(x, b, m);
      OP_MUL:  y = fp_mul(x, m);
      default: y = x;
    endcase
  end
endmodule
