// tb_fee_sc: RBCP-side writes of 6 words and of 1 word must each be acknowledged byte by
// byte and, once act falls, leave as one request frame {wr=1, length, address, word0,
// word1} followed by payload frames of 4 words. A read must send a request frame
// {wr=0, length=1, address} and answer the high byte from the reply slot of the selected
// FPGA (other FPGAs' words ignored), then the low byte from the held word. A read with
// no reply must be answered with 8'hEE after TIMEOUT cycles and counted.
module tb_fee_sc;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic act = 0, we = 0, re = 0, bsel = 0, ack, scv;
  logic [15:0] addr = 0;
  logic [2:0] fpga = 0, scf;
  logic [7:0] wd = 0, rd;
  logic [63:0] scw;
  logic [5:0] rv = 0;
  logic [5:0][15:0] rdat = '0;
  logic [15:0] ntmo;
  int checks = 0, failures = 0;
  logic [63:0] frames[$];
  logic [2:0]  fsel[$];
  fee_sc #(.MAX_WORDS(256), .TIMEOUT(50)) dut (.clk, .rst_n, .reset_sc_path(1'b0), .act, .we,
    .re, .addr, .bsel, .fpga, .wd, .ack, .rd, .sc_valid(scv), .sc_word(scw), .sc_fpga(scf),
    .sc_ready(1'b1), .reply_wvalid(rv), .reply_data(rdat), .n_timeout(ntmo));
  always @(posedge clk) if (rst_n && scv) begin frames.push_back(scw); fsel.push_back(scf); end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic write_words(input logic [15:0] a, input logic [2:0] f, input logic [15:0] w[]);
    @(negedge clk); act = 1;
    for (int i = 0; i < w.size(); i++)
      for (int b = 0; b < 2; b++) begin
        @(negedge clk); we = 1; addr = a + 16'(i); bsel = b[0]; fpga = f; wd = b ? w[i][7:0] : w[i][15:8];
        @(negedge clk); we = 0;
        chk(ack, "write byte ack");
      end
    @(negedge clk); act = 0;
    repeat (6) @(negedge clk);
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] w6[], w1[];
    sc_request_t r;
    w6 = '{16'h1111, 16'h2222, 16'h3333, 16'h4444, 16'h5555, 16'h6666};
    w1 = '{16'hBEEF};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- 6-word write ----
    write_words(16'h0040, 3'b101, w6);
    chk(frames.size() == 2, $sformatf("frames for 6 words: %0d", frames.size()));
    if (frames.size() == 2) begin
      r = frames[0];
      chk(r.wr && r.length == 8'd6 && r.addr == 16'h0040 && r.wdata0 == 16'h1111 && r.wdata1 == 16'h2222, "request frame");
      chk(frames[1] == {16'h3333, 16'h4444, 16'h5555, 16'h6666}, "payload frame");
      chk(fsel[0] == 3'b101 && fsel[1] == 3'b101, "fpga select");
    end
    frames.delete(); fsel.delete();
    // ---- 1-word write ----
    write_words(16'h0007, 3'b001, w1);
    chk(frames.size() == 1, "frames for 1 word");
    if (frames.size() == 1) begin
      r = frames[0];
      chk(r.wr && r.length == 8'd1 && r.addr == 16'h0007 && r.wdata0 == 16'hBEEF && r.wdata1 == 0, "1-word request");
    end
    frames.delete(); fsel.delete();
    // ---- read from FPGA1 ----
    @(negedge clk); act = 1; re = 1; addr = 16'h0123; bsel = 0; fpga = 3'b010;
    @(negedge clk); re = 0;
    repeat (4) @(negedge clk);
    chk(!ack, "no ack before reply");
    chk(frames.size() == 1, "read request sent");
    if (frames.size() == 1) begin
      r = frames[0];
      chk(!r.wr && r.length == 8'd1 && r.addr == 16'h0123 && fsel[0] == 3'b010, "read request frame");
    end
    rv = 6'b101000; rdat[5] = 16'hDEAD; rdat[3] = 16'hCAFE;   // FPGA0 and FPGA1 words
    @(negedge clk); rv = 0;
    chk(ack && rd == 8'hCA, $sformatf("read high byte %h", rd));
    @(negedge clk); re = 1; bsel = 1;
    @(negedge clk); re = 0;
    chk(ack && rd == 8'hFE, "read low byte");
    @(negedge clk); act = 0;
    // ---- timeout ----
    @(negedge clk); act = 1; re = 1; addr = 16'h0200; bsel = 0; fpga = 3'b100;
    @(negedge clk); re = 0;
    begin
      int n;
      n = 0;
      while (!ack && n < 200) begin @(negedge clk); n++; end
      chk(ack && rd == 8'hEE && n >= 50, $sformatf("timeout answer after %0d", n));
    end
    chk(ntmo == 16'd1, "timeout counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
