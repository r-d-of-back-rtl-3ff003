// irpc_beb_top: firmware of the iRPC back-end board (BEB) for N_LINKS front-end boards.
//
// Each FEB link (input_link) receives the FEB's multiplexed TDC data over the GBT uplink,
// restores the BX of each hit (DeMux), clusters fired strips into trigger primitives and
// handles FEE slow control and the BER test; its downlink carries BC0, the other fast
// control bits and SC frames. The TPs of all links are concentrated and fanned out to the
// trigger links. The trigger selector picks the external or Trigger-Module trigger and
// holds it while the readout is Busy; the readout reads the raw data and TPs of every
// link in a latency/window around each L1A and packs them into one event for the 10-GbE
// DAQ link. An RBCP slow-control bus (GbE) reaches the board registers, the FEE SC of
// every link and, through ports, the GBT SC.
// Clocks: clk is the 40 MHz BX clock of all processing; rx_clk[l] / tx_clk[l] are the
// GBT receive and transmit clocks of each link (40 MHz frame rate). Reset: rst_n,
// synchronous, active low, in all domains. Parts outside this RTL (GBT-FPGA link cores,
// SiTCP, the 10-GbE MAC, the Trigger Module, the GBT SC/SCA master) connect at ports.
// The split into input links, concentration/fan-out, trigger selection with Busy, readout
// and SC routing follows the document's block diagram and text. The single BX clock, the
// status counters shown in the BEB registers and all sizes other than the 8 links are this
// design's choices.
module irpc_beb_top
  import irpc_pkg::*;
#(
  parameter int unsigned N_LINKS     = 8,
  parameter int unsigned DEMUX_DEPTH = 16,
  parameter int unsigned SLOTS       = 8,
  parameter int unsigned MAX_TP      = 4,
  parameter int unsigned RB_DEPTH    = 1024,
  parameter int unsigned N_OUT_TP    = 8,
  parameter int unsigned ORBIT_LEN   = 3564
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // GBT links
  input  logic [N_LINKS-1:0]          rx_clk,
  input  logic [N_LINKS-1:0]          ul_valid,
  input  logic [N_LINKS-1:0][UL_W-1:0] ul_user,
  input  logic [N_LINKS-1:0]          tx_clk,
  output logic [N_LINKS-1:0]          dl_valid,
  output logic [N_LINKS-1:0][DL_W-1:0] dl_user,
  // trigger
  input  logic                        ext_trg,
  input  logic                        tm_l1a,
  output logic                        busy,
  output logic [1:0][N_OUT_TP-1:0][3+$bits(tp_t):0] tp_frame,
  output logic [11:0]                 tp_frame_bx,
  // DAQ event stream (10-GbE)
  output logic                        daq_valid,
  input  logic                        daq_ready,
  output logic [63:0]                 daq_data,
  output logic                        daq_last,
  // RBCP slow-control bus (SiTCP)
  input  logic                        rbcp_act,
  input  logic [31:0]                 rbcp_addr,
  input  logic                        rbcp_we,
  input  logic                        rbcp_re,
  input  logic [7:0]                  rbcp_wd,
  output logic                        rbcp_ack,
  output logic [7:0]                  rbcp_rd,
  // GBT SC (SCA) master, outside this RTL
  output logic                        gbt_sc_we,
  output logic                        gbt_sc_re,
  output logic [15:0]                 gbt_sc_addr,
  output logic [7:0]                  gbt_sc_wd,
  input  logic                        gbt_sc_ack,
  input  logic [7:0]                  gbt_sc_rd,
  // timing
  output logic [11:0]                 bcn
);
  // ---------------- BX counter ----------------
  logic bc0, resync;
  bx_counter #(.ORBIT_LEN(ORBIT_LEN)) u_bx (
    .clk, .rst_n, .resync, .bcn, .bc0, .orbit());

  // ---------------- slow control ----------------
  logic [15:0] t_addr;
  logic        t_bsel;
  logic [2:0]  t_fpga;
  logic [7:0]  t_wd;
  logic        bee_we, bee_re, bee_ack;
  logic [7:0]  bee_rd;
  logic [N_LINKS-1:0] fee_we, fee_re, fee_ack;
  logic [7:0]  fee_rd [N_LINKS];
  sc_sel #(.N_LINKS(N_LINKS)) u_sc_sel (
    .clk, .rst_n, .rbcp_addr, .rbcp_we, .rbcp_re, .rbcp_wd, .rbcp_ack, .rbcp_rd,
    .t_addr, .t_bsel, .t_fpga, .t_wd, .bee_we, .bee_re, .bee_ack, .bee_rd,
    .fee_we, .fee_re, .fee_ack, .fee_rd, .gbt_we(gbt_sc_we), .gbt_re(gbt_sc_re),
    .gbt_ack(gbt_sc_ack), .gbt_rd(gbt_sc_rd));
  assign gbt_sc_addr = t_addr;
  assign gbt_sc_wd   = t_wd;

  logic        daq_en, zs_en, ttc_mode, ber_mode, mute, reset_sc_path, flush_data_path;
  logic [9:0]  latency;
  logic [8:0]  tp_offset;
  logic [7:0]  window;
  logic [15:0] link_en;
  logic [15:0] status [8];
  bee_sc #(.N_STATUS(8), .TPOFF_RESET(9'(DEMUX_DEPTH + 2))) u_bee_sc (
    .clk, .rst_n, .we(bee_we), .re(bee_re), .addr(t_addr), .bsel(t_bsel), .wd(t_wd),
    .ack(bee_ack), .rd(bee_rd), .status, .daq_en, .zs_en, .ttc_mode, .ber_mode,
    .mute_channels(mute), .resync, .reset_sc_path, .flush_data_path, .latency, .window,
    .tp_offset, .link_en);

  // ---------------- input links ----------------
  tdc_hit_t [N_LINKS-1:0][2:0]      raw_hits;
  tp_t [N_LINKS-1:0][MAX_TP-1:0]    tps;
  logic [11:0]                      tp_bx [N_LINKS];

  logic [51:0]                      ber_err [N_LINKS];
  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    input_link #(.DEMUX_DEPTH(DEMUX_DEPTH), .SLOTS(SLOTS), .MAX_TP(MAX_TP),
                 .ORBIT_LEN(ORBIT_LEN)) u_link (
      .clk, .rst_n, .bcn, .bc0, .link_en(link_en[l]), .ber_mode, .mute_channels(mute),
      .resync, .reset_sc_path, .flush_data_path,
      .rx_clk(rx_clk[l]), .ul_valid(ul_valid[l]), .ul_user(ul_user[l]),
      .tx_clk(tx_clk[l]), .dl_valid(dl_valid[l]), .dl_user(dl_user[l]),
      .sc_act(rbcp_act), .sc_we(fee_we[l]), .sc_re(fee_re[l]), .sc_addr(t_addr),
      .sc_bsel(t_bsel), .sc_fpga(t_fpga), .sc_wd(t_wd), .sc_ack(fee_ack[l]),
      .sc_rd(fee_rd[l]), .raw_hits(raw_hits[l]), .tps(tps[l]), .tp_bx(tp_bx[l]),
      .n_late(), .n_full(), .n_oversize(), .n_sc_timeout(), .ber_words(),
      .ber_errors(ber_err[l]), .fe_status());
  end

  // ---------------- trigger primitives out ----------------
  logic [31:0] n_tp_dropped;
  tp_concentrator #(.N_LINKS(N_LINKS), .MAX_TP(MAX_TP), .N_OUT_TP(N_OUT_TP), .N_FANOUT(2)) u_conc (
    .clk, .rst_n, .tps, .bx(tp_bx[0]), .frame(tp_frame), .frame_bx(tp_frame_bx),
    .n_dropped(n_tp_dropped));

  // ---------------- trigger and readout ----------------
  logic        l1a;
  logic [31:0] n_l1a, n_supp, n_events, n_zero, n_lost;
  trigger_sel u_trig (
    .clk, .rst_n, .ttc_mode, .ext_trg, .tm_l1a, .busy, .l1a, .n_l1a, .n_suppressed(n_supp));

  readout_module #(.N_LINKS(N_LINKS), .MAX_TP(MAX_TP), .RB_DEPTH(RB_DEPTH)) u_ro (
    .clk, .rst_n, .bcn, .raw_hits, .tps, .l1a, .daq_en, .zs_en, .latency, .tp_offset,
    .window, .daq_valid, .daq_ready, .daq_data, .daq_last, .busy, .n_events, .n_zero,
    .n_trig_lost(n_lost));

  assign status[0] = n_events[15:0];
  assign status[1] = n_zero[15:0];
  assign status[2] = n_lost[15:0];
  assign status[3] = {15'h0, busy};
  assign status[4] = n_l1a[15:0];
  assign status[5] = n_supp[15:0];
  assign status[6] = ber_err[0][15:0];
  assign status[7] = n_tp_dropped[15:0];
endmodule
