// input_link: everything the BEB does for one FEB link ("Input Link").
//
// Uplink: frames from the GBT receiver (rx_clk) pass the RX FIFO into the BX clock;
// uplink_sel splits each word into TDC data or an SC reply. TDC data go (a) to the
// readout as raw data in their arrival BX and (b) through the DeMux, which restores the
// BX of generation, into the clusterizer, which gives up to MAX_TP trigger primitives
// per BX. SC replies go to the FEE SC converter.
// Downlink: the downlink builder merges fast control (BC0, Resync, ...) with FEE SC
// request/payload frames, or the BER pattern in BER mode, and the TX FIFO carries the
// words into the transmit clock (tx_clk), one per cycle while it holds data.
// A disabled link (link_en low) passes no TDC data. flush_data_path clears the DeMux.
// Timing: TPs leave DEMUX_DEPTH-1+2 BX after the BX stamped in the hits, plus the one
// cycle of the TP register here.
// The block partition follows the board's block diagram; widths and depths are choices
// of this design where the document gives none.
module input_link
  import irpc_pkg::*;
#(
  parameter int unsigned DEMUX_DEPTH = 16,
  parameter int unsigned SLOTS       = 8,
  parameter int unsigned MAX_SIZE    = 4,
  parameter int unsigned MAX_TP      = 4,
  parameter int unsigned TIME_WIN    = 328,
  parameter int unsigned ORBIT_LEN   = 3564
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [11:0]       bcn,
  input  logic              bc0,
  // configuration and fast control
  input  logic              link_en,
  input  logic              ber_mode,
  input  logic              mute_channels,
  input  logic              resync,
  input  logic              reset_sc_path,
  input  logic              flush_data_path,
  // GBT uplink (user data of wide-bus frames) in the receive clock
  input  logic              rx_clk,
  input  logic              ul_valid,
  input  logic [UL_W-1:0]   ul_user,
  // GBT downlink (user data of GBT frames) in the transmit clock
  input  logic              tx_clk,
  output logic              dl_valid,
  output logic [DL_W-1:0]   dl_user,
  // FEE SC from the RBCP router
  input  logic              sc_act,
  input  logic              sc_we,
  input  logic              sc_re,
  input  logic [15:0]       sc_addr,
  input  logic              sc_bsel,
  input  logic [2:0]        sc_fpga,
  input  logic [7:0]        sc_wd,
  output logic              sc_ack,
  output logic [7:0]        sc_rd,
  // to the readout and the concentrator
  output tdc_hit_t [2:0]    raw_hits,
  output tp_t [MAX_TP-1:0]  tps,
  output logic [11:0]       tp_bx,
  // status
  output logic [15:0]       n_late,
  output logic [15:0]       n_full,
  output logic [15:0]       n_oversize,
  output logic [15:0]       n_sc_timeout,
  output logic [63:0]       ber_words,
  output logic [51:0]       ber_errors,
  output logic [8:0]        fe_status      // {MiscStatus, SCFifoFull, DataFifoFull}
);
  // ---------------- uplink ----------------
  logic            rxq_empty;
  logic [UL_W-1:0] ul_word;
  async_fifo #(.WIDTH(UL_W), .AW(4)) u_rx_fifo (
    .wclk(rx_clk), .wrst_n(rst_n), .wr(ul_valid), .wdata(ul_user), .full(),
    .rclk(clk), .rrst_n(rst_n), .rd(!rxq_empty), .rdata(ul_word), .empty(rxq_empty));

  tdc_hit_t [2:0]   hits;
  logic [5:0]       rep_v;
  logic [5:0][15:0] rep_d;
  logic [2:0]       misc, scff, dff;
  uplink_sel u_sel (
    .valid(!rxq_empty && !ber_mode), .ul_user(ul_word), .hits, .reply_valid(),
    .reply_wvalid(rep_v), .reply_data(rep_d), .misc_status(misc), .sc_fifo_full(scff),
    .data_fifo_full(dff));

  tdc_hit_t [2:0] hits_en;
  always_comb
    for (int i = 0; i < 3; i++) begin
      hits_en[i]       = hits[i];
      hits_en[i].valid = hits[i].valid && link_en;
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      raw_hits  <= '0;
      fe_status <= '0;
    end else begin
      raw_hits <= hits_en;
      if (!rxq_empty && !ber_mode) fe_status <= {misc, scff, dff};
    end
  end

  tdc_hit_t [SLOTS-1:0] row;
  logic [11:0]          row_bx;
  tdc_demux #(.DEPTH(DEMUX_DEPTH), .SLOTS(SLOTS), .ORBIT_LEN(ORBIT_LEN)) u_demux (
    .clk, .rst_n, .flush(flush_data_path), .bcn, .hits_in(hits_en), .row_out(row),
    .row_bx, .n_late, .n_full);

  tp_t [MAX_TP-1:0] tp_c;
  logic [11:0]      tp_c_bx;
  clusterizer #(.SLOTS(SLOTS), .MAX_SIZE(MAX_SIZE), .MAX_TP(MAX_TP), .TIME_WIN(TIME_WIN)) u_clus (
    .clk, .rst_n, .row_in(row), .row_bx, .tp(tp_c), .tp_bx(tp_c_bx), .n_oversize);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tps   <= '0;
      tp_bx <= '0;
    end else begin
      tps   <= tp_c;
      tp_bx <= tp_c_bx;
    end
  end

  // ---------------- BER test ----------------
  logic [DL_W-1:0] ber_word;
  ber_checker u_ber (
    .clk, .rst_n, .en(ber_mode), .tx_word(ber_word), .rx_valid(!rxq_empty),
    .rx_word(ul_word), .word_cnt(ber_words), .err_cnt(ber_errors));

  // ---------------- FEE slow control ----------------
  logic        scd_valid, scd_ready;
  logic [63:0] scd_word;
  logic [2:0]  scd_fpga;
  fee_sc u_fee_sc (
    .clk, .rst_n, .reset_sc_path, .act(sc_act), .we(sc_we), .re(sc_re), .addr(sc_addr),
    .bsel(sc_bsel), .fpga(sc_fpga), .wd(sc_wd), .ack(sc_ack), .rd(sc_rd),
    .sc_valid(scd_valid), .sc_word(scd_word), .sc_fpga(scd_fpga), .sc_ready(scd_ready),
    .reply_wvalid(rep_v), .reply_data(rep_d), .n_timeout(n_sc_timeout));

  // ---------------- downlink ----------------
  logic [DL_W-1:0] dl_word;
  logic            dl_started;
  downlink_builder u_dl (
    .clk, .rst_n, .resync, .bc0, .reset_sc_path, .flush_data_path, .mute_channels,
    .sc_valid(scd_valid), .sc_word(scd_word), .sc_fpga(scd_fpga), .sc_ready(scd_ready),
    .ber_mode, .ber_word, .dl_user(dl_word));

  always_ff @(posedge clk)
    if (!rst_n) dl_started <= 1'b0; else dl_started <= 1'b1;

  logic txq_empty;
  async_fifo #(.WIDTH(DL_W), .AW(4)) u_tx_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr(dl_started), .wdata(dl_word), .full(),
    .rclk(tx_clk), .rrst_n(rst_n), .rd(!txq_empty), .rdata(dl_user), .empty(txq_empty));
  assign dl_valid = !txq_empty;
endmodule
