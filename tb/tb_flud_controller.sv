// tb_flud_controller: checks the data transfer controller on its own, with a
// behavioural memory and a behavioural array (a delay line with random
// acceptance that returns every column, bit-inverted, after ARRAY_LAT cycles;
// its top inputs randomly report no room).  For nb = 1, 3 and 4 it checks the
// order of all reads against the block-LUD schedule (round by round, corner
// and upper blocks first, then per row a lower block and trailing blocks),
// the tags, the top-input reads, the data delivered, the in-place write-back,
// that no row starts before the previous one is written back, and the done
// pulse.
module tb_flud_controller;
  import flud_pkg::*;

  localparam int B = 4, NBM = 8, ARRAY_LAT = 7;
  localparam int NBW = $clog2(NBM + 1);

  logic              clk = 0, rst_n = 0, start = 0, busy, done;
  logic [NBW-1:0]    nb = '0;
  logic              rd_en, trd_en, wr_en, a_valid, a_ready = 0, t_push, t_room = 1;
  logic              r_valid = 0, r_ready;
  logic [ADDR_W-1:0] rd_addr, trd_addr, wr_addr;
  fp32_t [B-1:0]     rd_data, trd_data, wr_data, a_data, t_data, r_data;
  col_tag_t          a_tag, r_tag;
  int                checks = 0, failures = 0;

  flud_controller #(.B(B), .NB_MAX(NBM)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .nb(nb), .busy(busy), .done(done),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .trd_en(trd_en), .trd_addr(trd_addr), .trd_data(trd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .a_valid(a_valid), .a_ready(a_ready), .a_tag(a_tag), .a_data(a_data),
    .t_push(t_push), .t_data(t_data), .t_room(t_room),
    .r_valid(r_valid), .r_ready(r_ready), .r_tag(r_tag), .r_data(r_data));

  always #5 clk = ~clk;

  fp32_t [B-1:0] mem [NBM * NBM * B];
  fp32_t [B-1:0] orig [NBM * NBM * B];

  typedef struct { lud_state_e st; int j; int addr; int taddr; int row_id; } exp_s;
  exp_s exp_q[$], sent_q[$];
  fp32_t [B-1:0] top_q[$];

  // behavioural array: delay line
  typedef struct { col_tag_t tag; fp32_t [B-1:0] d; int t; } fl_s;
  fl_s   pipe[$];
  int    cyc = 0, in_flight = 0, cur_row = -1, n_written = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_en)  rd_data  <= mem[rd_addr];
    if (trd_en) trd_data <= mem[trd_addr];
  end

  always @(negedge clk) begin
    a_ready = ($urandom_range(3, 0) != 0);
    t_room  = ($urandom_range(5, 0) != 0);
    r_valid = pipe.size() > 0 && (cyc - pipe[0].t) >= ARRAY_LAT;
    if (r_valid) begin
      r_tag  = pipe[0].tag;
      r_data = ~pipe[0].d;
    end
  end

  always @(posedge clk) if (rst_n) begin
    // issued reads follow the schedule
    if (rd_en) begin
      exp_s e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL read beyond schedule"); end
      else begin
        e = exp_q.pop_front();
        if (int'(rd_addr) != e.addr) begin failures++; $display("FAIL rd_addr %0d exp %0d", rd_addr, e.addr); end
        checks++;
        if (trd_en != (e.taddr >= 0) || (trd_en && int'(trd_addr) != e.taddr)) begin
          failures++; $display("FAIL top read %0d/%0d exp %0d", trd_en, trd_addr, e.taddr);
        end
        // a new row of blocks may only start once the previous one is written back
        if (e.row_id != cur_row) begin
          checks++;
          if (in_flight != 0) begin failures++; $display("FAIL row %0d started with %0d columns in flight", e.row_id, in_flight); end
          cur_row = e.row_id;
        end
        sent_q.push_back(e);
        if (e.taddr >= 0) top_q.push_back(mem[e.taddr]);
      end
    end
    // columns delivered to the array
    if (a_valid && a_ready) begin
      exp_s e;
      fl_s  f;
      e = sent_q.pop_front();
      checks += 3;
      if (a_tag.st != e.st || int'(a_tag.j) != e.j || int'(a_tag.addr) != e.addr) begin
        failures++; $display("FAIL tag %p exp st=%0d j=%0d addr=%0d", a_tag, e.st, e.j, e.addr);
      end
      if (a_data != mem[e.addr]) begin failures++; $display("FAIL data to array"); end
      f.tag = a_tag; f.d = a_data; f.t = cyc;
      pipe.push_back(f);
      in_flight++;
    end
    if (t_push) begin
      checks++;
      if (t_data != top_q.pop_front()) begin failures++; $display("FAIL top data"); end
    end
    if (r_valid && r_ready) begin
      void'(pipe.pop_front());
    end
    if (wr_en) begin
      checks += 2;
      if (wr_addr != r_tag.addr || wr_data != ~a_data_of(r_tag.addr)) begin
        failures++; $display("FAIL write-back at %0d", wr_addr);
      end
      if (!r_valid) begin failures++; $display("FAIL write without result"); end
      mem[wr_addr] <= wr_data;
      in_flight--;
      n_written++;
    end
  end

  function automatic fp32_t [B-1:0] a_data_of(logic [ADDR_W-1:0] addr);
    return mem[addr];
  endfunction

  task automatic run(int nbv);
    int row_id = 0, t;
    for (int a = 0; a < nbv * nbv * B; a++) begin
      for (int e = 0; e < B; e++) mem[a][e] = $urandom;
    end
    for (int r = 0; r < nbv; r++)
      for (int i = r; i < nbv; i++) begin
        for (int c = r; c < nbv; c++)
          for (int j = 0; j < B; j++) begin
            exp_s e;
            e.st = (i == r) ? ((c == r) ? ST_CORNER : ST_UPPER) : ((c == r) ? ST_LOWER : ST_TRAIL);
            e.j = j;
            e.addr = (c * B + j) * nbv + i;
            e.taddr = (i == r) ? -1 : (c * B + j) * nbv + r;
            e.row_id = row_id;
            exp_q.push_back(e);
          end
        row_id++;
      end
    cur_row = -1;
    n_written = 0;
    @(negedge clk);
    nb = NBW'(nbv); start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    while (!done && t < 100_000) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during run"); end
      @(negedge clk);
      t++;
    end
    @(negedge clk);
    checks += 4;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d reads missing", exp_q.size()); end
    if (in_flight != 0) begin failures++; $display("FAIL done with columns in flight"); end
    if (n_written != nbv * (nbv + 1) * (2 * nbv + 1) / 6 * B) begin
      failures++; $display("FAIL %0d writes", n_written);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1);
    run(3);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
