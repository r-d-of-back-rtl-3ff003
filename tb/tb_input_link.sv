// tb_input_link: one FEB link end to end. A behavioural FEB side sends uplink frames in
// its own clock (same 25 ns period, shifted phase): a muon hit on strips 20-21 (both ends
// of each, channel-sorted, spread over two frames and a few BX late), then an SC reply.
// Checks: the raw TDC data reach the readout output; one TP with centre strip 20, size 2
// and dt = tA - tB comes out at the fixed DeMux + clusterizer latency after the hits' BX;
// a 2-word FEE SC write leaves as a request frame on the downlink with BC0 still marked
// on its BX; an SC read is answered from the reply frame; a disabled link passes no TDC
// data; in BER mode a looped-back downlink gives words and, once the frames in flight at
// the mode change have passed, no errors.
module tb_input_link;
  import irpc_pkg::*;
  logic clk = 0, rx_clk = 0, tx_clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  initial begin #4; forever #12.5 rx_clk = ~rx_clk; end
  initial begin #9; forever #12.5 tx_clk = ~tx_clk; end
  logic [11:0] bcn = 0;
  logic bc0;
  assign bc0 = (bcn == 0);
  always @(posedge clk) if (rst_n) bcn <= (bcn == 12'd3563) ? 12'd0 : bcn + 1'b1;
  logic link_en = 1, ber_mode = 0, ul_valid = 0, dl_valid;
  logic [111:0] ul_user = '0;
  logic [79:0] dl_user;
  logic sc_act = 0, sc_we = 0, sc_re = 0, sc_bsel = 0, sc_ack;
  logic [15:0] sc_addr = 0;
  logic [2:0] sc_fpga = 0;
  logic [7:0] sc_wd = 0, sc_rd;
  tdc_hit_t [2:0] raw_hits;
  tp_t [3:0] tps;
  logic [11:0] tp_bx;
  logic [15:0] n_late, n_full, n_over, n_tmo;
  logic [63:0] ber_words;
  logic [51:0] ber_errors;
  logic [8:0] fe_status;
  int checks = 0, failures = 0, cyc = 0;
  int n_raw = 0, n_tp = 0, tp_cyc = -1;
  tp_t tp_seen;
  logic [11:0] tp_seen_bx;
  logic [79:0] dl_q[$];

  input_link dut (.clk, .rst_n, .bcn, .bc0, .link_en, .ber_mode, .mute_channels(1'b0),
    .resync(1'b0), .reset_sc_path(1'b0), .flush_data_path(1'b0), .rx_clk, .ul_valid, .ul_user,
    .tx_clk, .dl_valid, .dl_user, .sc_act, .sc_we, .sc_re, .sc_addr, .sc_bsel, .sc_fpga,
    .sc_wd, .sc_ack, .sc_rd, .raw_hits, .tps, .tp_bx, .n_late, .n_full, .n_oversize(n_over),
    .n_sc_timeout(n_tmo), .ber_words, .ber_errors, .fe_status);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_raw <= n_raw + int'(raw_hits[0].valid) + int'(raw_hits[1].valid) + int'(raw_hits[2].valid);
      if (tps[0].valid) begin n_tp <= n_tp + 1; tp_seen <= tps[0]; tp_seen_bx <= tp_bx; tp_cyc <= cyc; end
    end
  end
  always @(posedge tx_clk) if (rst_n && dl_valid && dl_user[66:64] != 0) dl_q.push_back(dl_user);

  function automatic logic [31:0] tdc(input int ch, input logic [11:0] bx, input int fine);
    return {8'(ch), bx, 12'(fine)};
  endfunction
  task automatic send(input logic [111:0] w);
    @(negedge rx_clk); ul_valid = 1; ul_user = w;
    @(negedge rx_clk); ul_valid = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [11:0] hb;
    int t_hits;
    sc_request_t r;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(negedge clk);
    // ---- muon: strips 20,21, ends A (ch 20,21) and B (ch 68,69) ----
    hb = bcn; t_hits = cyc;
    repeat (2) @(negedge clk);
    send({3'd0, 3'd0, 3'd0, 1'b0, 3'd0, 3'b111, tdc(20, hb, 1000), tdc(21, hb, 1100), tdc(68, hb, 1400)});
    send({3'd0, 3'd0, 3'd0, 1'b0, 3'd0, 3'b100, tdc(69, hb, 900), 32'h0, 32'h0});
    repeat (40) @(negedge clk);
    chk(n_raw == 4, $sformatf("raw hits %0d", n_raw));
    chk(n_tp == 1, $sformatf("TPs %0d", n_tp));
    chk(tp_seen.strip == 6'd20 && tp_seen.size == 3'd2 && tp_seen.dt == -13'sd400, "TP content");
    chk(tp_seen_bx == hb, "TP bx");
    // hits made at cycle t_hits: DeMux row leaves DEPTH cycles later, +2 clusterizer, +1 register
    chk(tp_cyc - t_hits == 16 + 3, $sformatf("TP latency %0d", tp_cyc - t_hits));
    // ---- FEE SC write of two words ----
    @(negedge clk); sc_act = 1;
    for (int b = 0; b < 4; b++) begin
      @(negedge clk); sc_we = 1; sc_addr = 16'h0030 + 16'(b / 2); sc_bsel = b[0]; sc_fpga = 3'b001;
      sc_wd = 8'(8'h10 * b + 1);
      @(negedge clk); sc_we = 0;
      chk(sc_ack, "write ack");
    end
    @(negedge clk); sc_act = 0;
    repeat (12) @(negedge clk);
    chk(dl_q.size() == 1, $sformatf("downlink SC frames %0d", dl_q.size()));
    if (dl_q.size() >= 1) begin
      r = dl_q[0][63:0];
      chk(r.wr && r.length == 8'd2 && r.addr == 16'h0030 && r.wdata0 == 16'h0111 && r.wdata1 == 16'h2131, "SC request on downlink");
    end
    dl_q.delete();
    // ---- FEE SC read, answered by FPGA0 ----
    @(negedge clk); sc_act = 1; sc_re = 1; sc_addr = 16'h0044; sc_bsel = 0; sc_fpga = 3'b001;
    @(negedge clk); sc_re = 0;
    repeat (10) @(negedge clk);
    chk(dl_q.size() == 1 && dl_q[0][56] == 1'b0 && dl_q[0][47:32] == 16'h0044, "read request on downlink");
    send({3'd1, 3'd0, 3'd0, 1'b1, 6'b100000, 16'h5AA5, 80'h0});
    begin
      int n;
      n = 0;
      while (!sc_ack && n < 20) begin @(negedge clk); n++; end
      chk(sc_ack && sc_rd == 8'h5A, "read data");
    end
    sc_act = 0;
    chk(fe_status == 9'b001_000_000, "front-end status");
    // ---- disabled link ----
    link_en = 0;
    send({3'd0, 3'd0, 3'd0, 1'b0, 3'd0, 3'b111, tdc(1, bcn, 1), tdc(2, bcn, 1), tdc(3, bcn, 1)});
    repeat (30) @(negedge clk);
    chk(n_raw == 4 && n_tp == 1, "disabled link passes nothing");
    link_en = 1;
    // ---- BER loopback ----
    ber_mode = 1;
    fork
      begin : loop
        forever begin
          @(negedge rx_clk); ul_valid = dl_valid; ul_user = {32'h0, dl_user};
        end
      end
    join_none
    // frames already in flight when the mode changed may break the rule; then none may
    repeat (50) @(negedge clk);
    begin
      logic [51:0] e0;
      logic [63:0] w0;
      e0 = ber_errors; w0 = ber_words;
      repeat (300) @(negedge clk);
      chk(ber_words - w0 > 250 && ber_errors == e0, $sformatf("BER words %0d errors %0d", ber_words - w0, ber_errors - e0));
    end
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
