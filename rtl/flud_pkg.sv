// flud_pkg: types, constants and single-precision arithmetic shared by the
// FLUD block-LU systolic array.
//
// Column tag: every column that streams through the array carries the LUD
// state of the block it belongs to (corner, upper perimeter, lower perimeter
// or trailing), its column index j inside the block and the memory address it
// is written back to.  Carrying the tag with the data lets each PE group (PEG)
// decide per column what to do with one shared FSM.
//
// Arithmetic: IEEE-754 binary32 multiply and add with round-to-nearest-even.
// Subnormal inputs and results are flushed to zero, overflow goes to
// infinity and NaN is not produced or propagated specially.  The published
// FLUD design uses vendor floating-point cores; these functions are this design's own
// simple replacement and are purely combinational.
package flud_pkg;

  typedef logic [31:0] fp32_t;

  // LUD block states: the four kinds of block in a round of block LUD.
  typedef enum logic [1:0] {
    ST_CORNER = 2'd0,
    ST_UPPER  = 2'd1,
    ST_LOWER  = 2'd2,
    ST_TRAIL  = 2'd3
  } lud_state_e;

  // Operation of one PE for one column.
  typedef enum logic [1:0] {
    OP_PASS = 2'd0,   // y = x
    OP_MAC  = 2'd1,   // y = x - b * m
    OP_MUL  = 2'd2    // y = x * m
  } pe_op_e;

  localparam int unsigned COL_W  = 8;   // column index inside a block (B <= 256)
  localparam int unsigned ADDR_W = 24;  // column-segment address (N <= 16384 at B = 32)

  typedef struct packed {
    lud_state_e          st;
    logic [COL_W-1:0]    j;
    logic [ADDR_W-1:0]   addr;
  } col_tag_t;


  // Round a normalised 24-bit significand (hidden bit at [23]) with guard and
  // sticky bits, then pack.  e is the biased exponent before rounding.
  function automatic fp32_t fp_pack(input logic s, input logic signed [11:0] e,
                                    input logic [23:0] m, input logic g, input logic st);
    logic [24:0]        mr;
    logic signed [11:0] er;
    mr = {1'b0, m} + {24'd0, (g & (st | m[0]))};
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 12'sd1;
    end
    if (er >= 12'sd255)      return {s, 8'hff, 23'd0};
    else if (er <= 12'sd0)   return {s, 31'd0};
    else                     return {s, er[7:0], mr[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic               s;
    logic [47:0]        p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    if (p[47]) return fp_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else       return fp_pack(s, e,          p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t              x, y;
    logic [27:0]        mx, my, sum;
    logic [7:0]         d;
    logic signed [11:0] e;
    logic               sticky;
    int                 lz;
    if (b[30:23] == 8'd0) return (a[30:23] == 8'd0) ? {a[31] & b[31], 31'd0} : a;
    if (a[30:23] == 8'd0) return b;
    // x is the operand of larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = x[30:23] - y[30:23];
    mx = {1'b0, 1'b1, x[22:0], 3'b000};
    my = {1'b0, 1'b1, y[22:0], 3'b000};
    if (d >= 8'd27) begin
      my = 28'd1;
    end else begin
      sticky = |(my & ((28'd1 << d) - 28'd1));
      my = (my >> d) | {27'd0, sticky};
    end
    e = $signed({4'd0, x[30:23]});
    if (x[31] == y[31]) begin
      sum = mx + my;
      if (sum[27]) begin
        sum = (sum >> 1) | {27'd0, sum[0]};
        e   = e + 12'sd1;
      end
    end else begin
      sum = mx - my;
      if (sum == 28'd0) return 32'd0;
      // normalise with a 5-stage leading-zero shifter (16, 8, 4, 2, 1)
      lz = 0;
      if (sum[26:11] == 16'd0) begin sum = sum << 16; lz += 16; end
      if (sum[26:19] ==  8'd0) begin sum = sum << 8;  lz += 8;  end
      if (sum[26:23] ==  4'd0) begin sum = sum << 4;  lz += 4;  end
      if (sum[26:25] ==  2'd0) begin sum = sum << 2;  lz += 2;  end
      if (sum[26]    ==  1'b0) begin sum = sum << 1;  lz += 1;  end
      e   = e - 12'(lz);
    end
    return fp_pack(x[31], e, sum[26:3], sum[2], |sum[1:0]);
  endfunction

  // x - b * m, the multiply-subtract of every PE (two roundings).
  function automatic fp32_t fp_msub(input fp32_t x, input fp32_t b, input fp32_t m);
    fp32_t p;
    p = fp_mul(b, m);
    return fp_add(x, {~p[31], p[30:0]});
  endfunction

endpackage
