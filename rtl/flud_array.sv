// flud_array: the grouped systolic array, B PE groups in a chain.
//
// Column j of a block enters PEG 0, then flows PEG 0 -> PEG 1 -> ... ->
// PEG B-1, each PEG applying one LUD iteration to it; the last PEG's output is
// the finished column.  Neighbouring PEGs are joined by a FIFO of LINK_DEPTH
// entries carrying a tagged B-element column (inside a PEG the PEs share
// registers and one FSM, between PEGs there are FIFOs, as in the published FLUD
// grouped array).  Each PEG also has a one-element top input FIFO of
// TOP_DEPTH entries: when the controller pushes a top column, element p goes to
// PEG p's FIFO, so a PEG finds its top element when the matching left column
// reaches it.
//
// Interface: in_* is the left input of PEG 0 (valid/ready), top_push/top_data
// push one top column (allowed only when top_room is high, which guarantees
// two free entries in every top FIFO), out_* is the right output of PEG B-1.
// Timing: once the pipeline is full, one column per cycle; a column needs
// B cycles (one FIFO per PEG) to cross an idle array, plus divider stalls in
// corner blocks.  FIFO depths are this design's choice.
module flud_array
  import flud_pkg::*;
#(
  parameter int unsigned B          = 32,
  parameter int unsigned LINK_DEPTH = 2,
  parameter int unsigned TOP_DEPTH  = B + 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  col_tag_t      in_tag,
  input  fp32_t [B-1:0] in_data,
  input  logic          top_push,
  input  fp32_t [B-1:0] top_data,
  output logic          top_room,
  output logic          out_valid,
  input  logic          out_ready,
  output col_tag_t      out_tag,
  output fp32_t [B-1:0] out_data
);
  localparam int unsigned CW = $bits(col_tag_t) + 32 * B;
  localparam int unsigned TCW = $clog2(TOP_DEPTH + 1);

  // stream at the input of PEG k (k = B is the array output)
  logic          s_valid [B+1];
  logic          s_ready [B+1];
  col_tag_t      s_tag   [B+1];
  fp32_t [B-1:0] s_data  [B+1];
  logic [B-1:0]  room;

  assign s_valid[0] = in_valid;
  assign in_ready   = s_ready[0];
  assign s_tag[0]   = in_tag;
  assign s_data[0]  = in_data;
  assign out_valid  = s_valid[B];
  assign s_ready[B] = out_ready;
  assign out_tag    = s_tag[B];
  assign out_data   = s_data[B];
  assign top_room   = &room;

  for (genvar k = 0; k < B; k++) begin : g_peg
    logic          f_full, f_empty, f_pop;
    logic [CW-1:0] f_dout;
    logic [$clog2(LINK_DEPTH+1)-1:0] f_count;
    logic          t_full, t_empty, t_pop;
    fp32_t         t_dout;
    logic [TCW-1:0] t_count;
    col_tag_t      p_tag;
    fp32_t [B-1:0] p_data;

    // left link: FIFO in front of PEG k
    flud_fifo #(.WIDTH(CW), .DEPTH(LINK_DEPTH)) u_link (
      .clk(clk), .rst_n(rst_n),
      .push(s_valid[k] && !f_full), .din({s_tag[k], s_data[k]}),
      .pop(f_pop), .dout(f_dout), .full(f_full), .empty(f_empty), .count(f_count)
    );
    assign s_ready[k] = !f_full;
    assign {p_tag, p_data} = f_dout;

    // top input FIFO of PEG k
    flud_fifo #(.WIDTH(32), .DEPTH(TOP_DEPTH)) u_top (
      .clk(clk), .rst_n(rst_n),
      .push(top_push), .din(top_data[k]),
      .pop(t_pop), .dout(t_dout), .full(t_full), .empty(t_empty), .count(t_count)
    );
    assign room[k] = (t_count <= TCW'(TOP_DEPTH - 2));

    flud_peg #(.B(B), .P(k)) u_peg (
      .clk(clk), .rst_n(rst_n),
      .in_valid(!f_empty), .in_ready(f_pop), .in_tag(p_tag), .in_data(p_data),
      .top_valid(!t_empty), .top_ready(t_pop), .top_data(t_dout),
      .out_valid(s_valid[k+1]), .out_ready(s_ready[k+1]),
      .out_tag(s_tag[k+1]), .out_data(s_data[k+1])
    );
  end

endmodule
