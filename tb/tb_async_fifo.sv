// tb_async_fifo: writes 300 random words in one clock (10 ns) and reads them in another
// (13 ns) with random read stalls; every word read must match the written sequence.
// Also fills the FIFO without reading and checks that 'full' rises after 16 words.
module tb_async_fifo;
  localparam int W = 114;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;
  logic wr, rd, full, empty;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  bit rd_en;

  async_fifo #(.WIDTH(W), .AW(4)) dut (.wclk, .wrst_n(rst_n), .wr, .wdata, .full,
    .rclk, .rrst_n(rst_n), .rd, .rdata, .empty);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign rd = rd_en && !empty;
  int nread = 0;
  always @(posedge rclk) if (rst_n && rd) begin
    checks++;
    if (q.size() == 0 || rdata !== q[0]) begin
      failures++;
      $display("FAIL read %0d got %h", nread, rdata);
    end
    if (q.size() != 0) void'(q.pop_front());
    nread++;
  end

  initial begin
    wr = 0; wdata = '0; rd_en = 0;
    repeat (4) @(posedge wclk);
    rst_n = 1;
    // fill without reading
    for (int i = 0; i < 20; i++) begin
      @(negedge wclk);
      wr = !full; wdata = {$urandom, $urandom, $urandom, $urandom};
      if (!full) q.push_back(wdata);
      @(posedge wclk);
    end
    @(negedge wclk); wr = 0;
    checks++;
    if (!full || q.size() != 16) begin failures++; $display("FAIL full flag %0d", q.size()); end
    rd_en = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge wclk);
      wr = !full && ($urandom_range(0, 3) != 0);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (wr) q.push_back(wdata);
      rd_en = ($urandom_range(0, 4) != 0);
    end
    @(negedge wclk); wr = 0; rd_en = 1;
    repeat (60) @(posedge rclk);
    checks++;
    if (q.size() != 0 || !empty) begin failures++; $display("FAIL leftover %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
