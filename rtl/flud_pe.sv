// flud_pe: one processing element of a PE group (PEG).
//
// A PE owns one row i of the columns that stream through its PEG.  It holds
// the MAC unit and one register of the PEG's column buffer: the element of the
// first block's column that this PEG works on (a column of L of the corner
// block, or of a lower-perimeter block).  That element is the multiplicand b
// of every later MAC in the same row of blocks.
//
// Interface: op, x and m come from the PEG's shared FSM in the cycle a column
// is consumed; y is combinational.  When buf_we is high (the cycle the PEG
// consumes its own pivot column) the result y is stored as the new buffered
// element.  The register resets to zero.
module flud_pe
  import flud_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pe_op_e op,
  input  fp32_t  x,
  input  fp32_t  m,
  input  logic   buf_we,
  output fp32_t  y,
  output fp32_t  buf_q
);
  fp32_t buf_r;

  flud_mac u_mac (.op(op), .x(x), .b(buf_r), .m(m), .y(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      buf_r <= '0;
    else if (buf_we) buf_r <= y;
  end

  assign buf_q = buf_r;
endmodule
