// tb_irpc_beb_top: the whole back-end board at its default size (8 links), end to end.
//
// A behavioural model of the 8 FEBs sends muon clusters: for each event a random set of
// links gets a cluster of 1-3 neighbouring strips, hit at both ends in one BX; the hits
// are sorted by channel, packed three per uplink frame and queued behind a random number
// of idle frames, so they arrive late and spread out as the real front-end's output
// does. Each event is followed 40 BX later by a trigger
// (events are 200 BX apart), first from the external input,
// later from the Trigger Module port. The DAQ stream is parsed and every event must hold
// each link's hits and one TP with the expected central strip and size.
// The run also makes each mechanism happen and counts it: DeMux re-alignment of late
// data, zero suppression of empty triggers, Busy with trigger suppression while the DAQ
// link is stalled, the trigger-source switch, BC0 on the downlink, FEE SC write and read
// (answered by the FEB model), a GBT SC access through its port, TPs on the trigger
// output and the BER loopback test. A mechanism that never happened is a failure.
module tb_irpc_beb_top;
  import irpc_pkg::*;
  localparam int NL = 8;
  logic clk = 0, rst_n = 0;
  logic [NL-1:0] rx_clk, tx_clk;
  always #12.5 clk = ~clk;
  initial begin rx_clk = '0; #3; forever #12.5 rx_clk = ~rx_clk; end
  initial begin tx_clk = '0; #7; forever #12.5 tx_clk = ~tx_clk; end
  logic [NL-1:0] ul_valid = '0, dl_valid;
  logic [NL-1:0][111:0] ul_user = '0;
  logic [NL-1:0][79:0] dl_user;
  logic ext_trg = 0, tm_l1a = 0, busy;
  logic [1:0][7:0][3+$bits(tp_t):0] tp_frame;
  logic [11:0] tp_frame_bx, bcn;
  logic daq_valid, daq_ready = 1, daq_last;
  logic [63:0] daq_data;
  logic rbcp_act = 0, rbcp_we = 0, rbcp_re = 0, rbcp_ack;
  logic [31:0] rbcp_addr = 0;
  logic [7:0] rbcp_wd = 0, rbcp_rd;
  logic gbt_we, gbt_re, gbt_ack = 0;
  logic [15:0] gbt_addr;
  logic [7:0] gbt_wd, gbt_rd = 8'h3C;

  irpc_beb_top dut (.clk, .rst_n, .rx_clk, .ul_valid, .ul_user, .tx_clk, .dl_valid, .dl_user,
    .ext_trg, .tm_l1a, .busy, .tp_frame, .tp_frame_bx, .daq_valid, .daq_ready, .daq_data,
    .daq_last, .rbcp_act, .rbcp_addr, .rbcp_we, .rbcp_re, .rbcp_wd, .rbcp_ack, .rbcp_rd,
    .gbt_sc_we(gbt_we), .gbt_sc_re(gbt_re), .gbt_sc_addr(gbt_addr), .gbt_sc_wd(gbt_wd),
    .gbt_sc_ack(gbt_ack), .gbt_sc_rd(gbt_rd), .bcn);

  int checks = 0, failures = 0, cyc = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int m_late = 0, m_zero = 0, m_busy = 0, m_supp = 0, m_switch = 0, m_bc0 = 0, m_scw = 0,
      m_scr = 0, m_gbt = 0, m_tpout = 0, m_ber = 0, m_ext = 0, m_tm = 0;

  // ---------------- FEB model ----------------
  logic [111:0] fq [NL][$];     // uplink frames waiting per link
  bit loopback = 0;
  for (genvar l = 0; l < NL; l++) begin : g_feb
    always @(negedge rx_clk[l]) begin
      if (!rst_n) ul_valid[l] <= 1'b0;
      else if (loopback) begin
        ul_valid[l] <= dl_valid[l];
        ul_user[l]  <= {32'h0, dl_user[l]};
      end else begin
        ul_valid[l] <= 1'b1;
        ul_user[l]  <= (fq[l].size() != 0) ? fq[l].pop_front() : 112'h0;  // idle frame
      end
    end
    // downlink: BC0 and SC requests; a read request is answered 3 frames later
    always @(posedge tx_clk[l]) if (rst_n && dl_valid[l] && !loopback) begin
      if (l == 0 && dl_user[l][78]) m_bc0++;
      if (dl_user[l][66:64] != 0) begin
        if (dl_user[l][56]) m_scw++;
        else if (dl_user[l][55:48] != 0) begin
          fq[l].push_back(112'h0); fq[l].push_back(112'h0);
          fq[l].push_back({9'h0, 1'b1, 6'b100000, dl_user[l][47:32] ^ 16'h1234, 80'h0});
        end
      end
    end
  end

  // ---------------- GBT SC port model ----------------
  always @(posedge clk) begin
    gbt_ack <= gbt_we || gbt_re;
    if (gbt_we || gbt_re) m_gbt++;
  end

  // ---------------- trigger output monitor ----------------
  always @(posedge clk) if (rst_n && tp_frame[0][0][$bits(tp_t)-1]) m_tpout++;

  // ---------------- DAQ stream parser ----------------
  typedef struct { int nin[NL]; int nout[NL]; int tp_strip[NL]; int tp_size[NL]; } ev_t;
  ev_t got[$];
  ev_t cur;
  int cur_link;
  always @(posedge clk) if (rst_n && daq_valid && daq_ready) begin
    case (daq_data[63:60])
      W_HEADER:   begin foreach (cur.nin[i]) begin cur.nin[i] = 0; cur.nout[i] = 0; cur.tp_strip[i] = -1; cur.tp_size[i] = 0; end end
      W_IN_HDR, W_OUT_HDR: cur_link = int'(daq_data[59:56]);
      W_IN_DATA:  cur.nin[daq_data[59:56]]++;
      W_OUT_DATA: begin
        tp_t t;
        t = daq_data[$bits(tp_t)-1:0];
        cur.nout[daq_data[59:56]]++;
        cur.tp_strip[daq_data[59:56]] = int'(t.strip);
        cur.tp_size[daq_data[59:56]]  = int'(t.size);
      end
      W_TRAILER:  got.push_back(cur);
      default: ;
    endcase
  end

  // ---------------- RBCP master ----------------
  task automatic rbcp_write(input logic [31:0] a, input logic [7:0] d);
    @(negedge clk); rbcp_act = 1; rbcp_we = 1; rbcp_addr = a; rbcp_wd = d;
    @(negedge clk); rbcp_we = 0;
    while (!rbcp_ack) @(negedge clk);
  endtask
  task automatic rbcp_read(input logic [31:0] a, output logic [7:0] d);
    int n;
    @(negedge clk); rbcp_act = 1; rbcp_re = 1; rbcp_addr = a;
    @(negedge clk); rbcp_re = 0;
    n = 0;
    while (!rbcp_ack && n < 2000) begin @(negedge clk); n++; end
    d = rbcp_rd;
  endtask
  task automatic bee_write(input logic [15:0] r, input logic [15:0] v);
    rbcp_write({4'd0, 11'd0, r, 1'b0}, v[15:8]);
    rbcp_write({4'd0, 11'd0, r, 1'b1}, v[7:0]);
    @(negedge clk); rbcp_act = 0;
  endtask
  task automatic bee_read(input logic [15:0] r, output logic [15:0] v);
    rbcp_read({4'd0, 11'd0, r, 1'b0}, v[15:8]);
    rbcp_read({4'd0, 11'd0, r, 1'b1}, v[7:0]);
    @(negedge clk); rbcp_act = 0;
  endtask

  // ---------------- events ----------------
  ev_t exp_ev[$];
  function automatic logic [111:0] frame3(input logic [31:0] a, b, c, input logic [2:0] v);
    return {3'd0, 3'd0, 3'd0, 1'b0, 3'd0, v, a, b, c};
  endfunction

  task automatic make_event(input bit empty, input bit use_tm);
    ev_t e;
    logic [11:0] g;
    g = bcn;
    foreach (e.nin[i]) begin e.nin[i] = 0; e.nout[i] = 0; e.tp_strip[i] = -1; e.tp_size[i] = 0; end
    if (!empty)
      for (int l = 0; l < NL; l++) if ($urandom_range(0, 2) != 0 || l == 0) begin
        int s, k, d, nch;
        logic [31:0] h[$];
        k = $urandom_range(1, 3); s = $urandom_range(0, 47 - k);
        for (int j = 0; j < k; j++) h.push_back({8'(s + j), g, 12'(1500 + 37 * j + l)});
        for (int j = 0; j < k; j++) h.push_back({8'(s + j + 48), g, 12'(1200 + 11 * j)});
        d = $urandom_range(0, 4);
        if (d > 0 || h.size() > 3) m_late++;
        repeat (d) fq[l].push_back(112'h0);
        while (h.size() != 0) begin
          logic [31:0] a, b, c;
          logic [2:0] v;
          a = h.pop_front(); v = 3'b100; b = 0; c = 0;
          if (h.size() != 0) begin b = h.pop_front(); v[1] = 1; end
          if (h.size() != 0) begin c = h.pop_front(); v[0] = 1; end
          fq[l].push_back(frame3(a, b, c, v));
        end
        e.nin[l] = 2 * k; e.nout[l] = 1; e.tp_strip[l] = s + (k - 1) / 2; e.tp_size[l] = k;
      end
    if (empty) m_zero++; else exp_ev.push_back(e);
    repeat (40) @(negedge clk);
    if (use_tm) begin tm_l1a = 1; @(negedge clk); tm_l1a = 0; m_tm++; end
    else begin ext_trg = 1; @(negedge clk); @(negedge clk); ext_trg = 0; m_ext++; end
    repeat (160) @(negedge clk);
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] v;
    logic [7:0] b;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (600) @(negedge clk);    // ring buffers cycle once
    // ---- configuration through the BEB registers ----
    bee_read(16'h0000, v); chk(v == 16'h1BEB, "board ID");
    bee_write(16'h0003, 16'd42);   // latency
    bee_write(16'h0004, 16'd16);   // window
    bee_write(16'h0005, 16'd12);   // TP offset
    bee_read(16'h0004, v); chk(v == 16'd16, "window readback");
    // ---- events with the external trigger, then the Trigger Module ----
    for (int i = 0; i < 12; i++) make_event(i % 4 == 3, 1'b0);
    bee_write(16'h0001, 16'h0007); m_switch++;   // daq_en, zs_en, ttc_mode = Trigger Module
    for (int i = 0; i < 12; i++) make_event(i % 4 == 3, 1'b1);
    repeat (400) @(negedge clk);
    chk(got.size() == exp_ev.size(), $sformatf("events read %0d expected %0d", got.size(), exp_ev.size()));
    for (int i = 0; i < exp_ev.size() && i < got.size(); i++)
      for (int l = 0; l < NL; l++) begin
        chk(got[i].nin[l] == exp_ev[i].nin[l], $sformatf("ev %0d link %0d raw %0d exp %0d", i, l, got[i].nin[l], exp_ev[i].nin[l]));
        chk(got[i].nout[l] == exp_ev[i].nout[l] && got[i].tp_strip[l] == exp_ev[i].tp_strip[l] &&
            got[i].tp_size[l] == exp_ev[i].tp_size[l],
            $sformatf("ev %0d link %0d TP %0d/%0d/%0d exp %0d/%0d/%0d", i, l, got[i].nout[l], got[i].tp_strip[l],
                      got[i].tp_size[l], exp_ev[i].nout[l], exp_ev[i].tp_strip[l], exp_ev[i].tp_size[l]));
      end
    bee_read(16'h0011, v); chk(v == 16'(m_zero), $sformatf("zero-suppressed events %0d exp %0d", v, m_zero));
    bee_read(16'h0010, v); chk(v == 16'(exp_ev.size()), "events counter");
    // ---- Busy: stall the DAQ link and send triggers back to back ----
    daq_ready = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk); tm_l1a = (i % 2 == 0);
      if (busy) m_busy++;
    end
    tm_l1a = 0;
    daq_ready = 1;
    repeat (20000) @(negedge clk);
    chk(!busy, "Busy released after drain");
    bee_read(16'h0015, v); m_supp = int'(v);
    chk(m_busy > 0 && m_supp > 0, $sformatf("busy cycles %0d suppressed %0d", m_busy, m_supp));
    begin
      logic [15:0] ne, nz, nl, na;
      bee_read(16'h0010, ne); bee_read(16'h0011, nz); bee_read(16'h0012, nl); bee_read(16'h0014, na);
      chk(na == ne + nz + nl, $sformatf("every trigger accounted: l1a %0d events %0d zero %0d lost %0d", na, ne, nz, nl));
      chk(got.size() == int'(ne), "every counted event was read out");
    end
    // ---- FEE SC write (2 words) and read on link 3, GBT SC access ----
    rbcp_write({4'd1, 4'd3, 1'b0, 3'b001, 3'b0, 16'h0050, 1'b0}, 8'hAB);
    rbcp_write({4'd1, 4'd3, 1'b0, 3'b001, 3'b0, 16'h0050, 1'b1}, 8'hCD);
    rbcp_write({4'd1, 4'd3, 1'b0, 3'b001, 3'b0, 16'h0051, 1'b0}, 8'h12);
    rbcp_write({4'd1, 4'd3, 1'b0, 3'b001, 3'b0, 16'h0051, 1'b1}, 8'h34);
    @(negedge clk); rbcp_act = 0;
    repeat (20) @(negedge clk);
    chk(m_scw == 1, $sformatf("FEE SC write frames %0d", m_scw));
    rbcp_read({4'd1, 4'd3, 1'b0, 3'b001, 3'b0, 16'h0077, 1'b0}, b);
    chk(b == 8'((16'h0077 ^ 16'h1234) >> 8), $sformatf("FEE read high %h", b));
    rbcp_read({4'd1, 4'd3, 1'b0, 3'b001, 3'b0, 16'h0077, 1'b1}, b);
    chk(b == 8'(16'h0077 ^ 16'h1234), $sformatf("FEE read low %h", b));
    if (b == 8'(16'h0077 ^ 16'h1234)) m_scr++;
    @(negedge clk); rbcp_act = 0;
    rbcp_read({4'd2, 4'd0, 24'h000100}, b);
    chk(b == 8'h3C, "GBT SC port read");
    @(negedge clk); rbcp_act = 0;
    // ---- BER loopback ----
    bee_write(16'h0001, 16'h0008);
    loopback = 1;
    repeat (100) @(negedge clk);
    begin
      logic [51:0] e0;
      logic [63:0] w0;
      e0 = dut.g_link[0].u_link.ber_errors; w0 = dut.g_link[0].u_link.ber_words;
      repeat (1000) @(negedge clk);
      m_ber = int'(dut.g_link[0].u_link.ber_words - w0);
      chk(dut.g_link[0].u_link.ber_errors == e0, "BER: no errors in loopback");
    end
    // ---- every mechanism happened ----
    chk(m_late > 0, "DeMux of late/multi-frame data");
    chk(m_zero > 0, "zero suppression");
    chk(m_busy > 0, "Busy");
    chk(m_supp > 0, "trigger suppression");
    chk(m_switch > 0 && m_ext > 0 && m_tm > 0, "trigger source switch");
    chk(m_bc0 > 0, "BC0 on the downlink");
    chk(m_scw > 0 && m_scr > 0, "FEE SC write and read");
    chk(m_gbt > 0, "GBT SC port");
    chk(m_tpout > 0, "TPs on the trigger output");
    chk(m_ber > 500, "BER loopback words");
    $display("mechanisms: late=%0d zero=%0d busy=%0d supp=%0d ext=%0d tm=%0d bc0=%0d scw=%0d scr=%0d gbt=%0d tpout=%0d ber=%0d",
             m_late, m_zero, m_busy, m_supp, m_ext, m_tm, m_bc0, m_scw, m_scr, m_gbt, m_tpout, m_ber);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
