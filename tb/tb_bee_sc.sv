// tb_bee_sc: byte-wise RBCP writes and reads of the BEB registers: reset values, write
// then read back of CTRL/LATENCY/WINDOW/TP_OFFSET/LINK_EN with the high byte at the even
// address, read-only ID and status words, the self-clearing fast-control pulses and the
// one-cycle acknowledge.
module tb_bee_sc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0, bsel = 0, ack;
  logic [15:0] addr = 0;
  logic [7:0] wd = 0, rd;
  logic [15:0] status [8];
  logic daq_en, zs_en, ttc_mode, ber_mode, mute, resync, rsp, fdp;
  logic [9:0] latency;
  logic [8:0] tp_offset;
  logic [7:0] window;
  logic [15:0] link_en;
  int checks = 0, failures = 0;
  int n_resync = 0, n_flush = 0;
  bee_sc #(.N_STATUS(8)) dut (.clk, .rst_n, .we, .re, .addr, .bsel, .wd, .ack, .rd, .status,
    .daq_en, .zs_en, .ttc_mode, .ber_mode, .mute_channels(mute), .resync, .reset_sc_path(rsp),
    .flush_data_path(fdp), .latency, .window, .tp_offset, .link_en);
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin
    if (rst_n && resync) n_resync <= n_resync + 1;
    if (rst_n && fdp) n_flush <= n_flush + 1;
  end
  task automatic wr16(input logic [15:0] a, input logic [15:0] d);
    for (int b = 0; b < 2; b++) begin
      @(negedge clk); we = 1; addr = a; bsel = b[0]; wd = b ? d[7:0] : d[15:8];
      @(negedge clk); we = 0;
      chk(ack, "write ack");
    end
  endtask
  task automatic rd16(input logic [15:0] a, output logic [15:0] d);
    for (int b = 0; b < 2; b++) begin
      @(negedge clk); re = 1; addr = a; bsel = b[0];
      @(negedge clk); re = 0;
      chk(ack, "read ack");
      if (b) d[7:0] = rd; else d[15:8] = rd;
    end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] v;
    for (int i = 0; i < 8; i++) status[i] = 16'(16'h1000 * i + 16'h0123);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rd16(16'h0000, v); chk(v == 16'h1BEB, "ID");
    rd16(16'h0003, v); chk(v == 16'd100, "latency reset");
    chk(daq_en && zs_en && !ttc_mode && window == 8'd4, "reset config");
    wr16(16'h0001, 16'h001C);
    chk(!daq_en && !zs_en && ttc_mode && ber_mode && mute, "CTRL decode");
    wr16(16'h0003, 16'h0123); wr16(16'h0004, 16'h0020); wr16(16'h0005, 16'h0011); wr16(16'h0006, 16'h00A5);
    chk(latency == 9'h123 && window == 8'h20 && tp_offset == 9'h11 && link_en == 16'h00A5, "config values");
    rd16(16'h0003, v); chk(v == 16'h0123, "latency readback");
    rd16(16'h0006, v); chk(v == 16'h00A5, "link_en readback");
    wr16(16'h0000, 16'hFFFF); rd16(16'h0000, v); chk(v == 16'h1BEB, "ID read only");
    for (int i = 0; i < 8; i++) begin
      rd16(16'h0010 + 16'(i), v); chk(v == status[i], $sformatf("status %0d", i));
    end
    wr16(16'h0002, 16'h0005);
    @(negedge clk);
    chk(n_resync == 1 && n_flush == 1, $sformatf("pulses %0d %0d", n_resync, n_flush));
    chk(!resync && !fdp, "pulses self-clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
