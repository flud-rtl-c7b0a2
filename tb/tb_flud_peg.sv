// tb_flud_peg: checks PE group P = 1 of a B = 4 array on a corner block, an
// upper-perimeter block, a lower-perimeter block and a trailing block, with
// random gaps on the left input, the top input and random back-pressure on
// the output.  Expected columns come from a real-number model of the group's
// schedule with binary32 rounding after every operation.  Also checks that
// the corner pivot column waits for the divider (>= 29 cycles) and that
// tags pass through unchanged.
module tb_flud_peg;
  import flud_pkg::*;
  import tb_fp_pkg::*;

  localparam int B = 4, P = 1;

  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0, in_ready, top_valid = 0, top_ready, out_valid, out_ready = 0;
  col_tag_t      in_tag, out_tag;
  fp32_t [B-1:0] in_data, out_data;
  fp32_t         top_data;
  int            checks = 0, failures = 0;

  flud_peg #(.B(B), .P(P)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_tag(in_tag), .in_data(in_data),
    .top_valid(top_valid), .top_ready(top_ready), .top_data(top_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_tag(out_tag), .out_data(out_data));

  always #5 clk = ~clk;

  // model state
  fp32_t mbuf[B];
  fp32_t mrecip;
  typedef struct { col_tag_t tag; fp32_t d[B]; } col_s;
  col_s  exp_q[$], in_q[$];
  fp32_t top_q[$];

  function automatic fp32_t msub(fp32_t x, fp32_t b, fp32_t m);
    return r2f(f2r(x) - f2r(r2f(f2r(b) * f2r(m))));
  endfunction

  task automatic add_col(lud_state_e st, int j, fp32_t t);
    col_s c, e;
    c.tag.st = st; c.tag.j = COL_W'(j); c.tag.addr = ADDR_W'($urandom);
    for (int i = 0; i < B; i++) c.d[i] = (i == j) ? r2f(4.0 + f2r(rand_f(1))) : rand_f(1);
    e = c;
    case (st)
      ST_CORNER: if (j == P) begin
                   mrecip = r2f(1.0 / f2r(c.d[P]));
                   for (int i = P + 1; i < B; i++) begin e.d[i] = r2f(f2r(c.d[i]) * f2r(mrecip)); mbuf[i] = e.d[i]; end
                 end else if (j > P) begin
                   for (int i = P + 1; i < B; i++) e.d[i] = msub(c.d[i], mbuf[i], c.d[P]);
                 end
      ST_UPPER:  for (int i = P + 1; i < B; i++) e.d[i] = msub(c.d[i], mbuf[i], c.d[P]);
      ST_LOWER:  if (j == P) begin
                   for (int i = 0; i < B; i++) begin e.d[i] = r2f(f2r(c.d[i]) * f2r(mrecip)); mbuf[i] = e.d[i]; end
                 end else if (j > P) begin
                   for (int i = 0; i < B; i++) e.d[i] = msub(c.d[i], mbuf[i], t);
                 end
      default:   for (int i = 0; i < B; i++) e.d[i] = msub(c.d[i], mbuf[i], t);
    endcase
    if (st == ST_LOWER || st == ST_TRAIL) top_q.push_back(t);
    in_q.push_back(c);
    exp_q.push_back(e);
  endtask

  int pivot_wait = 0, max_pivot_wait = 0, n_out = 0;

  // left input driver
  initial begin
    in_tag = '0; in_data = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (in_valid && in_ready_q) begin in_valid = 0; end
      if (!in_valid && in_q.size() > 0 && $urandom_range(3, 0) != 0) begin
        col_s c;
        c = in_q.pop_front();
        in_tag = c.tag;
        for (int i = 0; i < B; i++) in_data[i] = c.d[i];
        in_valid = 1;
      end
    end
  end
  logic in_ready_q = 0, top_ready_q = 0;
  always @(posedge clk) begin
    in_ready_q  <= in_valid && in_ready;
    top_ready_q <= top_valid && top_ready;
    if (in_valid && !in_ready && in_tag.st == ST_CORNER && in_tag.j == COL_W'(P)) pivot_wait++;
    if (in_valid && in_ready && in_tag.st == ST_CORNER && in_tag.j == COL_W'(P)) begin
      if (pivot_wait > max_pivot_wait) max_pivot_wait = pivot_wait;
      pivot_wait = 0;
    end
  end

  // top input driver
  initial begin
    top_data = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (top_valid && top_ready_q) top_valid = 0;
      if (!top_valid && top_q.size() > 0 && $urandom_range(2, 0) != 0) begin
        top_data = top_q.pop_front();
        top_valid = 1;
      end
    end
  end

  // output checker with random back-pressure
  always @(negedge clk) out_ready = ($urandom_range(4, 0) != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    col_s e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected column"); end
    else begin
      e = exp_q.pop_front();
      if (out_tag != e.tag) begin failures++; $display("FAIL tag %p vs %p", out_tag, e.tag); end
      for (int i = 0; i < B; i++) begin
        checks++;
        if (ulp_diff(out_data[i], e.d[i]) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL st=%0d j=%0d row %0d got %h exp %h", e.tag.st, e.tag.j, i, out_data[i], e.d[i]);
        end
      end
    end
    n_out++;
  end

  initial begin
    int total;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int j = 0; j < B; j++) add_col(ST_CORNER, j, '0);
      for (int blk = 0; blk < 2; blk++) for (int j = 0; j < B; j++) add_col(ST_UPPER, j, '0);
      for (int row = 0; row < 2; row++) begin
        for (int j = 0; j < B; j++) add_col(ST_LOWER, j, rand_f(1));
        for (int blk = 0; blk < 2; blk++) for (int j = 0; j < B; j++) add_col(ST_TRAIL, j, rand_f(1));
      end
    end
    total = exp_q.size();
    while (n_out < total) @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 3;
    if (max_pivot_wait < 29) begin failures++; $display("FAIL pivot column waited only %0d cycles", max_pivot_wait); end
    if (top_q.size() != 0) begin failures++; $display("FAIL top elements left over"); end
    if (out_valid) begin failures++; $display("FAIL spurious output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
