// flud_top: the FLUD block-LU decomposition kernel.
//
// Factors an N x N single-precision matrix in place into L (unit lower
// triangular, below the diagonal) and U (upper triangular, on and above it)
// without pivoting, N = nb * B for a run-time nb.  The data transfer
// controller streams the blocks of the matrix column by column from external
// memory through a grouped systolic array of B PE groups with B PEs each and
// writes the results back.  The memory itself is outside this module: its
// three ports (main read, top read, write; reads return data the next cycle)
// are brought out.
//
// Host interface: pulse start with nb (1 .. NB_MAX) applied; busy stays high
// until the last column is written; done pulses once at the end.
// Defaults follow the main published FLUD configuration: 32 x 32 PEs, float
// data, matrices up to 16384 x 16384 (512 blocks per side).
module flud_top
  import flud_pkg::*;
#(
  parameter int unsigned B         = 32,
  parameter int unsigned NB_MAX    = 512,
  parameter int unsigned TOP_DEPTH = B + 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(NB_MAX+1)-1:0] nb,
  output logic                        busy,
  output logic                        done,
  output logic                        rd_en,
  output logic [ADDR_W-1:0]           rd_addr,
  input  fp32_t [B-1:0]               rd_data,
  output logic                        trd_en,
  output logic [ADDR_W-1:0]           trd_addr,
  input  fp32_t [B-1:0]               trd_data,
  output logic                        wr_en,
  output logic [ADDR_W-1:0]           wr_addr,
  output fp32_t [B-1:0]               wr_data
);
  logic          a_valid, a_ready, t_push, t_room, o_valid, o_ready;
  col_tag_t      a_tag, o_tag;
  fp32_t [B-1:0] a_data, t_data, o_data;

  flud_controller #(.B(B), .NB_MAX(NB_MAX)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start), .nb(nb), .busy(busy), .done(done),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .trd_en(trd_en), .trd_addr(trd_addr), .trd_data(trd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .a_valid(a_valid), .a_ready(a_ready), .a_tag(a_tag), .a_data(a_data),
    .t_push(t_push), .t_data(t_data), .t_room(t_room),
    .r_valid(o_valid), .r_ready(o_ready), .r_tag(o_tag), .r_data(o_data)
  );

  flud_array #(.B(B), .TOP_DEPTH(TOP_DEPTH)) u_array (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_valid), .in_ready(a_ready), .in_tag(a_tag), .in_data(a_data),
    .top_push(t_push), .top_data(t_data), .top_room(t_room),
    .out_valid(o_valid), .out_ready(o_ready), .out_tag(o_tag), .out_data(o_data)
  );
endmodule
