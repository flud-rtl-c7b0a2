// tb_flud_array: runs the first round of block LUD on an 8 x 8 matrix
// (2 x 2 blocks of B = 4) through the array, the testbench acting as the
// controller: corner block A00 and upper block A01 first, then (after they
// have left the array) lower block A10 and trailing block A11 with the
// finished A00 / A01 columns on the top inputs.  After that round the matrix
// must equal the first B iterations of non-pivoting LU computed in real
// arithmetic (relative tolerance 1e-4).  Random output back-pressure; also
// checks the fill latency of one column through an idle array (B cycles).
module tb_flud_array;
  import flud_pkg::*;
  import tb_fp_pkg::*;

  localparam int B = 4, NB = 2, N = B * NB;

  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0, in_ready, top_push, top_room, out_valid, out_ready = 1;
  logic          need_top = 0;
  col_tag_t      in_tag, out_tag;
  fp32_t [B-1:0] in_data, top_data, out_data;
  int            checks = 0, failures = 0;

  flud_array #(.B(B), .TOP_DEPTH(B)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_tag(in_tag), .in_data(in_data),
    .top_push(top_push), .top_data(top_data), .top_room(top_room),
    .out_valid(out_valid), .out_ready(out_ready), .out_tag(out_tag), .out_data(out_data));

  assign top_push = in_valid && in_ready && need_top;

  always #5 clk = ~clk;

  fp32_t mem [N][N];   // [row][col], the tb's memory
  real   ref_m [N][N];
  int    n_out = 0;
  bit    random_bp = 0;
  int    t_first = 0;

  always @(negedge clk) out_ready = random_bp ? ($urandom_range(3, 0) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    // addr encodes the global column index and block row: addr = col * NB + bi
    int col, bi;
    col = int'(out_tag.addr) / NB;
    bi  = int'(out_tag.addr) % NB;
    for (int i = 0; i < B; i++) mem[bi * B + i][col] = out_data[i];
    if (n_out == 0) t_first = $time;
    n_out++;
  end

  // stream block (bi, bc) in state st; for lower/trailing blocks column j of
  // block (0, bc) goes to the top inputs
  task automatic stream_block(int bi, int bc, lud_state_e st);
    for (int j = 0; j < B; j++) begin
      @(negedge clk);
      need_top = (st == ST_LOWER || st == ST_TRAIL);
      while (need_top && !top_room) @(negedge clk);
      in_tag.st = st; in_tag.j = COL_W'(j); in_tag.addr = ADDR_W'((bc * B + j) * NB + bi);
      for (int i = 0; i < B; i++) begin
        in_data[i]  = mem[bi * B + i][bc * B + j];
        top_data[i] = mem[i][bc * B + j];
      end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  task automatic wait_out(int n);
    while (n_out < n) @(posedge clk);
  endtask

  initial begin
    int t0, lat;
    in_tag = '0; in_data = '0; top_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill latency of one upper-perimeter column through the idle array
    @(negedge clk);
    in_tag = '{st: ST_UPPER, j: '0, addr: '0};  // memory is initialised afterwards
    in_data = '0;
    in_valid = 1;
    t0 = $time;
    @(negedge clk);
    in_valid = 0;
    wait_out(1);
    lat = (t_first - t0 - 5) / 10;   // from the accepting edge to the output edge
    checks++;
    if (lat != B) begin failures++; $display("FAIL fill latency %0d, expected %0d", lat, B); end
    repeat (2) @(negedge clk);
    n_out = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      mem[r][c] = (r == c) ? r2f(N + f2r(rand_f(1))) : rand_f(1);
      ref_m[r][c] = f2r(mem[r][c]);
    end
    // reference: first B iterations of Algorithm 1
    for (int k = 0; k < B; k++) begin
      for (int i = k + 1; i < N; i++) ref_m[i][k] = ref_m[i][k] / ref_m[k][k];
      for (int i = k + 1; i < N; i++) for (int j = k + 1; j < N; j++)
        ref_m[i][j] = ref_m[i][j] - ref_m[i][k] * ref_m[k][j];
    end
    random_bp = 1;
    stream_block(0, 0, ST_CORNER);
    stream_block(0, 1, ST_UPPER);
    wait_out(2 * B);
    stream_block(1, 0, ST_LOWER);
    stream_block(1, 1, ST_TRAIL);
    wait_out(4 * B);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      real got, err;
      got = f2r(mem[r][c]);
      err = got - ref_m[r][c];
      if (err < 0) err = -err;
      checks++;
      if (err > 1e-4 * (1.0 + (ref_m[r][c] < 0 ? -ref_m[r][c] : ref_m[r][c]))) begin
        failures++;
        if (failures < 10) $display("FAIL A[%0d][%0d] got %f exp %f", r, c, got, ref_m[r][c]);
      end
    end
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
