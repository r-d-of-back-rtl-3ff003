// tb_sync_fifo: random pushes and pops against a queue model; checks data order, the
// count and the empty/half/full flags every cycle.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr, rd, empty, full, half;
  logic [65:0] din, dout;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [65:0] q[$];
  sync_fifo #(.WIDTH(66), .DEPTH(16)) dut (.clk, .rst_n, .wr, .din, .rd, .dout, .empty,
    .full, .half, .count);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr = 0; rd = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (count != 5'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 16) ||
          half != (q.size() >= 8)) begin
        failures++; $display("FAIL flags size=%0d count=%0d", q.size(), count);
      end
      if (q.size() != 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data"); end
      end
      // phases: fill, drain, mix
      wr = (i % 400 < 150) ? ($urandom_range(0, 3) != 0) : (i % 400 < 300) ? ($urandom_range(0, 3) == 0) : $urandom_range(0, 1);
      rd = (i % 400 < 150) ? ($urandom_range(0, 3) == 0) : (i % 400 < 300) ? ($urandom_range(0, 3) != 0) : $urandom_range(0, 1);
      din = {$urandom, $urandom, 2'($urandom)};
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // model: a pop is accepted when not empty, a push when not full (before the edge)
  always @(posedge clk) if (rst_n) begin
    bit do_push;
    do_push = wr && !full;
    if (rd && q.size() != 0) void'(q.pop_front());
    if (do_push) q.push_back(din);
  end
endmodule
