// tb_readout_module: places raw TDC data and TPs at known BXs, triggers 'latency' BX
// later and compares the event words with an expected event built from the event-format
// rules: Header, then for each link with data Input Header / Input Data / Output Header /
// Output Data, then Trailer with the word count. Also checks: zero suppression drops an
// empty event; without it an empty event lists every link with zero counts; Busy rises
// when triggers pile up; triggers beyond the trigger FIFO are counted as lost; the first
// word of an event leaves within a bounded number of cycles after the trigger.
module tb_readout_module;
  import irpc_pkg::*;
  localparam int NL = 8, MTP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tdc_hit_t [NL-1:0][2:0] raw;
  tp_t [NL-1:0][MTP-1:0] tps;
  logic l1a = 0, daq_en = 1, zs_en = 1, dv, dr = 1, dl, busy;
  logic [9:0] latency = 10'd50;
  logic [8:0] tp_offset = 9'd18;
  logic [7:0] window = 8'd4;
  logic [63:0] dd;
  logic [11:0] bcn = 0;
  logic [31:0] n_ev, n_zero, n_lost;
  int checks = 0, failures = 0, cyc = 0;
  logic [64:0] got[$];
  readout_module #(.N_LINKS(NL), .MAX_TP(MTP), .RB_DEPTH(512)) dut (
    .clk, .rst_n, .bcn, .raw_hits(raw), .tps, .l1a, .daq_en, .zs_en, .latency, .tp_offset,
    .window, .daq_valid(dv), .daq_ready(dr), .daq_data(dd), .daq_last(dl), .busy,
    .n_events(n_ev), .n_zero, .n_trig_lost(n_lost));
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bcn <= bcn + 1'b1;
    if (rst_n && dv && dr) got.push_back({dl, dd});
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    tdc_hit_t h2, h5;
    tp_t t2;
    logic [64:0] e[$];
    int c0, ttrig, tfirst;
    logic [11:0] tbcn;
    raw = '0; tps = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (520) @(negedge clk);   // let the ring buffers fill once with empty entries
    // ---- event 0: data on links 2 and 5 ----
    h2 = '{valid: 1, d: '{chan: 8'd17, bx: 12'd5, fine: 12'hABC}};
    h5 = '{valid: 1, d: '{chan: 8'd60, bx: 12'd7, fine: 12'h123}};
    t2 = '{valid: 1, strip: 6'd17, size: 3'd2, dt: 13'sd100, y: 12'sd61};
    c0 = cyc;
    raw[2][0] = h2; raw[2][1] = h2; raw[2][2] = h2;  @(negedge clk); raw = '0;
    repeat (1) @(negedge clk);
    raw[5][0] = h5;                       @(negedge clk); raw = '0;
    while (cyc < c0 + 18 + 1) @(negedge clk);
    for (int k = 0; k < MTP; k++) tps[2][k] = t2;  @(negedge clk); tps = '0;
    while (cyc < c0 + 50) @(negedge clk);
    l1a = 1; ttrig = cyc; tbcn = bcn;     @(negedge clk); l1a = 0;
    while (got.size() == 0 && cyc < ttrig + 100) @(negedge clk);
    tfirst = cyc;
    chk(tfirst - ttrig <= 8 + 4, $sformatf("first word %0d cycles after trigger", tfirst - ttrig));
    repeat (200) @(negedge clk);
    e = {};
    e.push_back({1'b0, W_HEADER, 24'd0, tbcn, 8'd4, 16'h0});
    e.push_back({1'b0, W_IN_HDR, 4'd2, 40'h0, 16'd3});
    repeat (3) e.push_back({1'b0, W_IN_DATA, 4'd2, 8'd0, 16'h0, h2.d});
    e.push_back({1'b0, W_OUT_HDR, 4'd2, 40'h0, 16'(MTP)});
    repeat (MTP) e.push_back({1'b0, W_OUT_DATA, 4'd2, 8'd1, 13'h0, t2});
    e.push_back({1'b0, W_IN_HDR, 4'd5, 40'h0, 16'd1});
    e.push_back({1'b0, W_IN_DATA, 4'd5, 8'd2, 16'h0, h5.d});
    e.push_back({1'b0, W_OUT_HDR, 4'd5, 40'h0, 16'd0});
    e.push_back({1'b1, W_TRAILER, 24'd0, 20'h0, 16'(9 + 2 + MTP - 1)});
    chk(got.size() == e.size(), $sformatf("event 0 size %0d", got.size()));
    for (int i = 0; i < e.size() && i < got.size(); i++)
      chk(got[i] == e[i], $sformatf("event 0 word %0d got %h exp %h", i, got[i], e[i]));
    got.delete();
    // ---- event 1: empty, zero-suppressed ----
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (100) @(negedge clk);
    chk(got.size() == 0 && n_zero == 1, "zero data suppressed");
    // ---- event 2: empty, zero suppression off ----
    zs_en = 0;
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (300) @(negedge clk);
    chk(got.size() == 2 + 2 * NL, $sformatf("empty event size %0d", got.size()));
    if (got.size() > 0) chk(got[0][59:36] == 24'd2, "event number counts zero events too");
    if (got.size() == 2 + 2 * NL) chk(got[got.size()-1] == {1'b1, W_TRAILER, 24'd2, 20'h0, 16'(2 + 2 * NL)}, "empty trailer");
    got.delete();
    // ---- busy and lost triggers: DAQ link stalled, 24 back-to-back triggers ----
    dr = 0;
    begin
      bit seen_busy;
      seen_busy = 0;
      for (int i = 0; i < 24; i++) begin
        @(negedge clk); l1a = 1; if (busy) seen_busy = 1;
      end
      @(negedge clk); l1a = 0;
      chk(seen_busy, "busy raised");
      chk(n_lost > 0, $sformatf("lost triggers %0d", n_lost));
    end
    dr = 1;
    repeat (8000) @(negedge clk);
    chk(!busy, "busy released");
    chk(n_ev == 32'(1 + 1 + 24 - n_lost), $sformatf("events %0d lost %0d", n_ev, n_lost));
    chk(got.size() == (24 - n_lost) * (2 + 2 * NL), $sformatf("words after drain %0d", got.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
