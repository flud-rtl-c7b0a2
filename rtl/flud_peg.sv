// flud_peg: PE group (PEG) number P of the grouped systolic array.
//
// A PEG is one column of B PEs that share one FSM.  PEG P performs iteration P
// of the block LUD on every column that flows through it, so a row of PEGs
// works on B iterations of the same block at once (iteration-level
// parallelism) while the B PEs of a PEG update the B elements of one column
// in parallel (column-level parallelism).  What a PEG does with column j of a
// block depends on the block's state, carried in the column tag:
//   corner : j <  P  forward
//            j == P  r = 1/C[P][P] (divider, PEG stalls), rows i > P are
//                    multiplied by r and buffered; r is kept for later rows
//            j >  P  rows i > P: C[i][j] -= C[i][P] * C[P][j]
//   upper  : rows i > P: U[i][j] -= C[i][P] * U[P][j]         (all j)
//   lower  : j <  P  forward
//            j == P  all rows multiplied by the kept reciprocal and buffered
//            j >  P  all rows: L[i][j] -= L[i][P] * C[P][j]   (C[P][j] from top)
//   trail  : all rows: T[i][j] -= L[i][P] * U[P][j]            (U[P][j] from top)
// Lower and trailing columns each consume one element from the top input, the
// element in row P of the matching column of the dependent block (the
// controller sends one for every column of those blocks; it is ignored for
// j <= P in the lower state).
//
// Interface: B-wide column stream in and out with valid/ready, plus the
// one-element top stream.  A column is consumed and its result offered in the
// same cycle (combinational datapath); the FIFO after the PEG registers it.
// The only stall besides back-pressure is the divider, LATENCY cycles plus
// two cycles of FSM, once per corner block.  The order of operations follows
// the published FLUD schedule; the tag and the handshake are this
// design's choice.
module flud_peg
  import flud_pkg::*;
#(
  parameter int unsigned B = 32,   // PEs per PEG (block size)
  parameter int unsigned P = 0     // index of this PEG, 0 .. B-1
) (
  input  logic               clk,
  input  logic               rst_n,
  // column stream from the previous PEG (left input port)
  input  logic               in_valid,
  output logic               in_ready,
  input  col_tag_t           in_tag,
  input  fp32_t [B-1:0]      in_data,
  // one element per column from the top input port
  input  logic               top_valid,
  output logic               top_ready,
  input  fp32_t              top_data,
  // column stream to the next PEG (right output port)
  output logic               out_valid,
  input  logic               out_ready,
  output col_tag_t           out_tag,
  output fp32_t [B-1:0]      out_data
);
  typedef enum logic [1:0] {F_RUN, F_DIV, F_PIVOT} fsm_e;
  fsm_e  fsm;
  fp32_t recip;

  logic  is_pivot_col, is_after, needs_top, corner_pivot, can_go, fire;
  logic  div_start, div_busy, div_valid;
  fp32_t div_q, m;

  assign is_pivot_col = (in_tag.j == COL_W'(P));
  assign is_after     = (in_tag.j >  COL_W'(P));
  assign needs_top    = (in_tag.st == ST_LOWER) || (in_tag.st == ST_TRAIL);
  assign corner_pivot = (in_tag.st == ST_CORNER) && is_pivot_col;

  // a corner pivot column waits in the input FIFO until its reciprocal is known
  assign can_go    = in_valid && (!needs_top || top_valid) && (!corner_pivot || fsm == F_PIVOT);
  assign fire      = can_go && out_ready;
  assign in_ready  = fire;
  assign top_ready = fire && needs_top;
  assign out_valid = can_go;
  assign out_tag   = in_tag;
  assign div_start = (fsm == F_RUN) && in_valid && corner_pivot;

  flud_recip u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .d(in_data[P]),
    .busy(div_busy), .valid(div_valid), .q(div_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm   <= F_RUN;
      recip <= '0;
    end else begin
      unique case (fsm)
        F_RUN:   if (div_start) fsm <= F_DIV;
        F_DIV:   if (div_valid) begin
                   recip <= div_q;
                   fsm   <= F_PIVOT;
                 end
        F_PIVOT: if (fire) fsm <= F_RUN;
        default: fsm <= F_RUN;
      endcase
    end
  end

  // multiplier broadcast to all PEs of the group
  always_comb begin
    unique case (in_tag.st)
      ST_CORNER: m = is_pivot_col ? recip : in_data[P];
      ST_UPPER:  m = in_data[P];
      ST_LOWER:  m = is_pivot_col ? recip : top_data;
      default:   m = top_data;
    endcase
  end

  for (genvar i = 0; i < B; i++) begin : g_pe
    pe_op_e op;
    logic   we;
    fp32_t  bq;
    always_comb begin
      op = OP_PASS;
      we = 1'b0;
      unique case (in_tag.st)
        ST_CORNER: if (i > P) begin
                     if (is_pivot_col) begin op = OP_MUL; we = fire; end
                     else if (is_after) op = OP_MAC;
                   end
        ST_UPPER:  if (i > P) op = OP_MAC;
        ST_LOWER:  if (is_pivot_col) begin op = OP_MUL; we = fire; end
                   else if (is_after) op = OP_MAC;
        default:   op = OP_MAC;
      endcase
    end
    flud_pe u_pe (
      .clk(clk), .rst_n(rst_n), .op(op), .x(in_data[i]), .m(m),
      .buf_we(we), .y(out_data[i]), .buf_q(bq)
    );
  end

  a_div_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
                                        div_start |-> !div_busy);
  a_top_only_when_used: assert property (@(posedge clk) disable iff (!rst_n)
                                         top_ready |-> top_valid);
endmodule
