// tb_ber_checker: loops the generated pattern back (zero-extended to 112 bits) through a
// 3-cycle delay, as an FEB in loopback would; no errors may be counted and the word count
// must match. Then single bits are flipped in 5 frames: each flip breaks the increment
// rule twice (the bad frame and the one after it), so 10 wrong frames are expected.
module tb_ber_checker;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [79:0] tx;
  logic [111:0] rx, d1, d2, d3;
  logic rxv;
  logic [63:0] wc;
  logic [51:0] ec;
  int checks = 0, failures = 0, flip = 0;
  ber_checker dut (.clk, .rst_n, .en, .tx_word(tx), .rx_valid(rxv), .rx_word(rx), .word_cnt(wc), .err_cnt(ec));
  always @(posedge clk) begin
    d1 <= {32'h0, tx}; d2 <= d1; d3 <= d2;
  end
  assign rx = d3 ^ (flip != 0 ? (112'd1 << flip) : 112'd0);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rxv = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    repeat (4) @(negedge clk);
    rxv = 1;
    repeat (500) @(negedge clk);
    chk(wc == 64'd499, $sformatf("word count %0d", wc));
    chk(ec == 0, $sformatf("errors %0d", ec));
    for (int i = 0; i < 5; i++) begin
      flip = 1 + 7 * i; @(negedge clk); flip = 0;
      repeat (10) @(negedge clk);
    end
    chk(ec == 52'd10, $sformatf("errors after flips %0d", ec));
    en = 0; @(negedge clk);
    chk(wc == 0 && ec == 0, "clear on disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
