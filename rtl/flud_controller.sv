// flud_controller: data transfer controller and global schedule of FLUD.
//
// The matrix (N x N, N = nb * B) lives column-major in external memory, read
// and written in column segments of B elements: segment (block row i, block
// column c, column j inside the block) has address (c*B + j) * nb + i.
// The controller runs the block-LUD schedule: for every round r the first row
// of blocks (i = r) is streamed as one corner block (c = r) followed by the
// upper-perimeter blocks (c > r); every later row (i > r) as one
// lower-perimeter block (c = r) followed by trailing blocks (c > r).  Blocks
// are streamed column by column, one column per cycle, into the left input of
// the array, each with a tag (state, j, write-back address).  For lower and
// trailing blocks the matching column of the dependent block in row r (the
// finished corner, resp. upper-perimeter block) is read at the same time and
// pushed into the PEGs' top inputs.  Finished columns leaving the array are
// written back in place.  Between two rows of blocks the controller waits
// until every column of the row has been written back, so the next row reads
// finished data and the PEG buffers are refilled in order.
//
// Interfaces: start/nb/busy/done towards the host (nb, the matrix size in
// blocks, is a run-time value); two read ports (main and top) that return
// data the cycle after rd_en; one write port.  The read data lands in an input
// FIFO of IN_DEPTH columns; a read is issued only when the FIFO and every top
// FIFO have room for it and the one still in flight.  Addressing, the drain
// between rows and the port protocol are this design's choices; the order of
// blocks and states follows the published FLUD schedule.
module flud_controller
  import flud_pkg::*;
#(
  parameter int unsigned B        = 32,
  parameter int unsigned NB_MAX   = 512,  // largest matrix, in blocks per side
  parameter int unsigned IN_DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host
  input  logic                       start,
  input  logic [$clog2(NB_MAX+1)-1:0] nb,
  output logic                       busy,
  output logic                       done,
  // external memory: main read, top read, write
  output logic                       rd_en,
  output logic [ADDR_W-1:0]          rd_addr,
  input  fp32_t [B-1:0]              rd_data,
  output logic                       trd_en,
  output logic [ADDR_W-1:0]          trd_addr,
  input  fp32_t [B-1:0]              trd_data,
  output logic                       wr_en,
  output logic [ADDR_W-1:0]          wr_addr,
  output fp32_t [B-1:0]              wr_data,
  // array left input
  output logic                       a_valid,
  input  logic                       a_ready,
  output col_tag_t                   a_tag,
  output fp32_t [B-1:0]              a_data,
  // array top inputs
  output logic                       t_push,
  output fp32_t [B-1:0]              t_data,
  input  logic                       t_room,
  // array right output
  input  logic                       r_valid,
  output logic                       r_ready,
  input  col_tag_t                   r_tag,
  input  fp32_t [B-1:0]              r_data
);
  localparam int unsigned NBW = $clog2(NB_MAX + 1);
  localparam int unsigned JW  = (B > 1) ? $clog2(B) : 1;
  localparam int unsigned CW  = $bits(col_tag_t) + 32 * B;
  localparam int unsigned FCW = $clog2(IN_DEPTH + 1);

  typedef enum logic [1:0] {C_IDLE, C_STREAM, C_DRAIN} ctrl_e;
  ctrl_e fsm;

  logic [NBW-1:0] r, i, c;
  logic [JW-1:0]  j;
  logic [ADDR_W-1:0] outstanding;

  lud_state_e st_now;
  logic       need_top, issue;
  logic [ADDR_W-1:0] col_base;

  logic       p_valid, p_top;
  col_tag_t   p_tag;

  logic       f_full, f_empty;
  logic [CW-1:0]  f_dout;
  logic [FCW-1:0] f_count;

  always_comb begin
    if (i == r) st_now = (c == r) ? ST_CORNER : ST_UPPER;
    else        st_now = (c == r) ? ST_LOWER  : ST_TRAIL;
  end
  assign need_top = (i != r);
  assign col_base = (ADDR_W'(c) * ADDR_W'(B) + ADDR_W'(j)) * ADDR_W'(nb);
  assign issue    = (fsm == C_STREAM) && (f_count <= FCW'(IN_DEPTH - 2)) && (!need_top || t_room);

  assign rd_en    = issue;
  assign rd_addr  = col_base + ADDR_W'(i);
  assign trd_en   = issue && need_top;
  assign trd_addr = col_base + ADDR_W'(r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm         <= C_IDLE;
      r           <= '0;
      i           <= '0;
      c           <= '0;
      j           <= '0;
      outstanding <= '0;
      p_valid     <= 1'b0;
      p_top       <= 1'b0;
      p_tag       <= '0;
      done        <= 1'b0;
    end else begin
      done        <= 1'b0;
      p_valid     <= issue;
      p_top       <= issue && need_top;
      outstanding <= outstanding + ADDR_W'(issue) - ADDR_W'(wr_en);
      if (issue) begin
        p_tag.st   <= st_now;
        p_tag.j    <= COL_W'(j);
        p_tag.addr <= rd_addr;
      end
      unique case (fsm)
        C_IDLE: if (start && nb != '0) begin
          r   <= '0;
          i   <= '0;
          c   <= '0;
          j   <= '0;
          fsm <= C_STREAM;
        end else if (start) begin
          done <= 1'b1;
        end
        C_STREAM: if (issue) begin
          if (j == JW'(B - 1)) begin
            j <= '0;
            if (c == nb - 1'b1) fsm <= C_DRAIN;
            else                c   <= c + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
        C_DRAIN: if (outstanding == '0 && !p_valid && f_empty) begin
          if (i == nb - 1'b1) begin
            if (r == nb - 1'b1) begin
              fsm  <= C_IDLE;
              done <= 1'b1;
            end else begin
              r   <= r + 1'b1;
              i   <= r + 1'b1;
              c   <= r + 1'b1;
              fsm <= C_STREAM;
            end
          end else begin
            i   <= i + 1'b1;
            c   <= r;
            fsm <= C_STREAM;
          end
        end
        default: fsm <= C_IDLE;
      endcase
    end
  end

  // read data of the previous cycle enters the input FIFO with its tag
  flud_fifo #(.WIDTH(CW), .DEPTH(IN_DEPTH)) u_in (
    .clk(clk), .rst_n(rst_n),
    .push(p_valid), .din({p_tag, rd_data}),
    .pop(a_valid && a_ready), .dout(f_dout), .full(f_full), .empty(f_empty), .count(f_count)
  );
  assign a_valid         = !f_empty;
  assign {a_tag, a_data} = f_dout;

  assign t_push = p_top;
  assign t_data = trd_data;

  assign r_ready = 1'b1;
  assign wr_en   = r_valid;
  assign wr_addr = r_tag.addr;
  assign wr_data = r_data;

  assign busy = (fsm != C_IDLE);

  a_in_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) p_valid |-> !f_full);
endmodule
