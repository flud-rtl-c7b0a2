// tb_flud_top: end-to-end test of the FLUD kernel at reduced size (B = 4,
// up to 8 blocks per side).  A behavioural external memory holds the matrix;
// matrices of 1, 2, 3 and 5 blocks per side (run-time size) are factored one
// after the other and compared with double-precision non-pivoting LU
// (relative tolerance 1e-4).  The cycle count of each run is checked against
// the latency model of the design (within 5 %), and the testbench counts
// every mechanism of the schedule (the four block states, divider runs,
// forwarding, controller stalls, drains, back-pressure) and fails if one
// never happened.
module tb_flud_top;
  localparam int B = 4, NBM = 8;
  localparam int MEM_WORDS = 5 * 5 * 4;
  localparam int SIZES[4] = '{1, 2, 3, 5};
  localparam int WATCHDOG = 200_000;

  import flud_pkg::*;
  import tb_fp_pkg::*;

  localparam int NBW = $clog2(NBM + 1);

  logic                 clk = 0, rst_n = 0, start = 0, busy, done;
  logic [NBW-1:0]       nb = '0;
  logic                 rd_en, trd_en, wr_en;
  logic [ADDR_W-1:0]    rd_addr, trd_addr, wr_addr;
  fp32_t [B-1:0]        rd_data, trd_data, wr_data;
  int                   checks = 0, failures = 0;

  flud_top #(.B(B), .NB_MAX(NBM), .TOP_DEPTH(B + 8)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .nb(nb), .busy(busy), .done(done),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .trd_en(trd_en), .trd_addr(trd_addr), .trd_data(trd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  // external memory model: B-element column segments, address = col * nb + block row,
  // reads return data one cycle after the request
  fp32_t [B-1:0] mem [MEM_WORDS];
  always @(posedge clk) begin
    if (rd_en)  rd_data  <= mem[rd_addr];
    if (trd_en) trd_data <= mem[trd_addr];
    if (wr_en)  mem[wr_addr] <= wr_data;
  end

  // ---- mechanism counters --------------------------------------------------
  int n_corner = 0, n_upper = 0, n_lower = 0, n_trail = 0;   // columns entering the array
  int n_div = 0;          // divider runs (corner pivots), all PEGs
  int n_fwd = 0;          // columns forwarded unchanged by PEG B-1 (j < P in corner/lower)
  int n_top_stall = 0;    // cycles the controller waited for room in the top FIFOs
  int n_in_stall = 0;     // cycles the controller waited for room in its input FIFO
  int n_drain = 0;        // cycles spent draining the array between rows of blocks
  int n_bp = 0;           // cycles a PEG held a column because its output FIFO was full

  always @(posedge clk) if (rst_n) begin
    if (dut.a_valid && dut.a_ready)
      case (dut.a_tag.st)
        ST_CORNER: n_corner++;
        ST_UPPER:  n_upper++;
        ST_LOWER:  n_lower++;
        default:   n_trail++;
      endcase
    if (dut.u_ctrl.fsm.name() == "C_STREAM" && !dut.u_ctrl.issue) begin
      if (dut.u_ctrl.need_top && !dut.t_room) n_top_stall++;
      else n_in_stall++;
    end
    if (dut.u_ctrl.fsm.name() == "C_DRAIN") n_drain++;
    if (dut.u_array.g_peg[B-1].u_peg.fire &&
        (dut.u_array.g_peg[B-1].u_peg.in_tag.st inside {ST_CORNER, ST_LOWER}) &&
        dut.u_array.g_peg[B-1].u_peg.in_tag.j < COL_W'(B - 1)) n_fwd++;
    if (dut.u_array.g_peg[0].u_peg.can_go && !dut.u_array.g_peg[0].u_peg.out_ready) n_bp++;
  end
  for (genvar k = 0; k < B; k++) begin : g_cnt
    always @(posedge clk) if (rst_n && dut.u_array.g_peg[k].u_peg.div_start) n_div++;
  end

  // ---- one LU decomposition of an (nbv*B)-square matrix ------------------
  real a_ref [];

  task automatic run_lud(int nbv);
    int  n, cyc, model;
    real maxerr;
    n = nbv * B;
    a_ref = new[n * n];
    // diagonally dominant random matrix (no pivoting needed)
    for (int c = 0; c < n; c++) for (int r = 0; r < n; r++) begin
      fp32_t v;
      v = (r == c) ? r2f(real'(n) + f2r(rand_f(1))) : rand_f(1);
      mem[c * nbv + r / B][r % B] = v;
      a_ref[r * n + c] = f2r(v);
    end
    // reference: Algorithm 1 (non-pivoting LU) in double precision
    for (int k = 0; k < n; k++) begin
      for (int i = k + 1; i < n; i++) a_ref[i * n + k] = a_ref[i * n + k] / a_ref[k * n + k];
      for (int i = k + 1; i < n; i++) for (int j = k + 1; j < n; j++)
        a_ref[i * n + j] -= a_ref[i * n + k] * a_ref[k * n + j];
    end
    @(negedge clk);
    nb = NBW'(nbv);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 50_000_000) break;
    end
    // latency model: every row of blocks streams its b*B columns back to back;
    // the first row of a round also waits for B divider chains (31 cycles per
    // PEG), every row pays the B-cycle pipeline fill and a few cycles of
    // read latency and drain detection
    model = 0;
    for (int r = 0; r < nbv; r++) begin
      int b;
      b = nbv - r;
      model += 31 * B + b * B + 4;
      model += (b - 1) * (B + b * B + 4);
    end
    checks++;
    if (cyc > model + model / 20 || cyc < model - model / 20) begin
      failures++;
      $display("FAIL nb=%0d: %0d cycles, model %0d", nbv, cyc, model);
    end
    $display("nb=%0d N=%0d: %0d cycles (model %0d), %0.1f flop/cycle", nbv, n, cyc, model,
             2.0 * n * n * n / 3.0 / cyc);
    maxerr = 0.0;
    for (int c = 0; c < n; c++) for (int r = 0; r < n; r++) begin
      real got, err, mag;
      got = f2r(mem[c * nbv + r / B][r % B]);
      err = got - a_ref[r * n + c];
      if (err < 0) err = -err;
      mag = a_ref[r * n + c] < 0 ? -a_ref[r * n + c] : a_ref[r * n + c];
      if (err / (1.0 + mag) > maxerr) maxerr = err / (1.0 + mag);
      checks++;
      if (err > 1e-4 * (1.0 + mag)) begin
        failures++;
        if (failures < 10) $display("FAIL nb=%0d A[%0d][%0d] got %f expected %f", nbv, r, c, got, a_ref[r * n + c]);
      end
    end
    $display("nb=%0d max relative error %e", nbv, maxerr);
  endtask

  task automatic expect_seen(int cnt, string what);
    checks++;
    $display("%s: %0d", what, cnt);
    if (cnt == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (SIZES[s]) run_lud(SIZES[s]);
    expect_seen(n_corner, "corner-state columns");
    expect_seen(n_upper, "upper-perimeter-state columns");
    expect_seen(n_lower, "lower-perimeter-state columns");
    expect_seen(n_trail, "trailing-state columns");
    expect_seen(n_div, "divider runs");
    expect_seen(n_fwd, "forwarded columns");
    expect_seen(n_top_stall + n_in_stall, "controller stall cycles");
    expect_seen(n_drain, "drain cycles");
    expect_seen(n_bp, "PEG back-pressure cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
