// tb_bx_counter: checks that BC0 comes once every 3564 cycles, that bcn counts up from 0
// after it, that the orbit counter advances once per orbit and that resync restarts at 0.
module tb_bx_counter;
  logic clk = 0, rst_n = 0, resync = 0;
  always #5 clk = ~clk;
  logic [11:0] bcn;
  logic bc0;
  logic [31:0] orbit;
  int checks = 0, failures = 0;
  bx_counter dut (.clk, .rst_n, .resync, .bcn, .bc0, .orbit);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int last_bc0, n_bc0, expect_bcn;
    last_bc0 = -1; n_bc0 = 0; expect_bcn = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3 * 3564 + 10; c++) begin
      @(negedge clk);
      checks++;
      if (bcn != 12'(expect_bcn)) begin failures++; $display("FAIL bcn %0d exp %0d", bcn, expect_bcn); end
      if (bc0) begin
        if (last_bc0 >= 0) begin
          checks++;
          if (c - last_bc0 != 3564) begin failures++; $display("FAIL BC0 period %0d", c - last_bc0); end
        end
        last_bc0 = c; n_bc0++;
      end
      expect_bcn = (expect_bcn + 1) % 3564;
    end
    checks++;
    if (orbit != 32'(n_bc0)) begin failures++; $display("FAIL orbit %0d", orbit); end
    @(negedge clk); resync = 1; @(negedge clk); resync = 0;
    checks++;
    if (bcn != 0 || !bc0) begin failures++; $display("FAIL resync"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
