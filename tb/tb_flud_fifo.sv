// tb_flud_fifo: random push/pop traffic against a queue model; checks data
// order, full/empty flags and count, including simultaneous push and pop.
module tb_flud_fifo;
  localparam int W = 16, D = 5;
  logic          clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [W-1:0]  din = '0, dout;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0]  model[$];
  int            checks = 0, failures = 0, n_full = 0;

  flud_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .push(push), .din(din), .pop(pop),
    .dout(dout), .full(full), .empty(empty), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks += 3;
      if (count != model.size()) begin failures++; $display("FAIL count %0d vs %0d", count, model.size()); end
      if (full != (model.size() == D)) begin failures++; $display("FAIL full"); end
      if (empty != (model.size() == 0)) begin failures++; $display("FAIL empty"); end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("FAIL data %h vs %h", dout, model[0]); end
      end
      if (full) n_full++;
      // bias towards filling in the first half, draining in the second
      pop  = !empty && ($urandom_range(9, 0) < ((n % 1000) < 500 ? 3 : 8));
      push = (!full || pop) && ($urandom_range(9, 0) < ((n % 1000) < 500 ? 8 : 3));
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
