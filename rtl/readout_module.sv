// readout_module: trigger-driven data acquisition of the BEB.
//
// Every BX the raw TDC data received from each link (up to 3 per uplink frame) and the
// TPs produced for each link are written into per-link ring buffers at the address of a
// free-running BX pointer. Because the pipeline is fixed, the calibrated latency between
// a trigger and the data becomes an address offset: for a trigger at pointer t the raw
// window starts at t - latency and the TP window at t - latency + tp_offset; both are
// 'window' BX long.
// Triggers are buffered in a FIFO because the multi-link packing state machine needs
// several cycles per event. Busy is the OR of the half-full flags of the trigger FIFO and
// the event output FIFO, so a whole event still fits when Busy begins to hold triggers,
// and of an age rule: the ring buffers overwrite a BX RB_DEPTH cycles after writing it,
// so Busy is also raised when the oldest waiting trigger comes within 2*READ_MARGIN
// cycles of that point. A trigger that has come within READ_MARGIN cycles of it when the
// packer takes it is dropped and counted in n_trig_lost instead of being read out with
// overwritten data; an event therefore has READ_MARGIN cycles to be packed safely.
// Zero suppression: the state machine first scans the window of every link and counts
// raw hits and TPs; with zs_en an event with nothing in it is dropped, and a link with
// nothing in it is left out of the event.
// Event layout (64-bit words, type in [63:60]): Header {evt[23:0], bcn, window}; per link
// Input Header {link, count}, one Input Data word per TDC data {link, BX offset, tdc},
// Output Header {link, count}, one Output Data word per TP {link, BX offset, tp};
// Trailer {evt, word count}; daq_last marks the trailer.
// Throughput: one word per cycle plus about 4 cycles per non-empty BX and 3 per link with
// data; 8 links each with one BX of data take about 130 cycles per event.
// Interface: daq_valid/daq_ready/daq_data/daq_last towards the 10-GbE MAC (a word moves
// when valid and ready are high). One clock = one BX.
// The ring buffers addressed by latency, window readout, trigger buffering, the Busy rule,
// zero suppression and the Header/Input/Output/Trailer event structure follow the
// document; word formats, FIFO depths and the scan pass are this design's own.
module readout_module
  import irpc_pkg::*;
#(
  parameter int unsigned N_LINKS    = 8,
  parameter int unsigned MAX_TP     = 4,
  parameter int unsigned RB_DEPTH   = 1024,
  parameter int unsigned TRIG_DEPTH = 16,
  parameter int unsigned OUT_DEPTH  = 1024,
  parameter int unsigned MAX_WIN    = 32,
  parameter int unsigned READ_MARGIN = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [11:0]                  bcn,
  input  tdc_hit_t [N_LINKS-1:0][2:0]  raw_hits,
  input  tp_t [N_LINKS-1:0][MAX_TP-1:0] tps,
  input  logic                         l1a,
  // configuration
  input  logic                         daq_en,
  input  logic                         zs_en,
  input  logic [9:0]                   latency,
  input  logic [8:0]                   tp_offset,
  input  logic [7:0]                   window,    // BX, 1..MAX_WIN (larger is clipped)
  // event output
  output logic                         daq_valid,
  input  logic                         daq_ready,
  output logic [63:0]                  daq_data,
  output logic                         daq_last,
  output logic                         busy,
  output logic [31:0]                  n_events,    // events sent
  output logic [31:0]                  n_zero,      // events dropped as zero data
  output logic [31:0]                  n_trig_lost  // triggers lost: FIFO full or too old
);
  localparam int unsigned AW  = $clog2(RB_DEPTH);
  localparam int unsigned RW  = 3*$bits(tdc_hit_t);
  localparam int unsigned TW  = MAX_TP*$bits(tp_t);

  logic [31:0]   ts;       // free-running BX count; its low bits address the ring buffers
  logic [AW-1:0] wptr;
  always_ff @(posedge clk)
    if (!rst_n) ts <= '0; else ts <= ts + 1'b1;
  assign wptr = ts[AW-1:0];

  // ---------------- ring buffers ----------------
  logic [AW-1:0] raddr_raw, raddr_tp;
  logic [RW-1:0] rd_raw [N_LINKS];
  logic [TW-1:0] rd_tp  [N_LINKS];
  for (genvar l = 0; l < N_LINKS; l++) begin : g_rb
    ring_buffer #(.WIDTH(RW), .DEPTH(RB_DEPTH)) u_raw (
      .clk, .we(1'b1), .waddr(wptr), .wdata(raw_hits[l]), .raddr(raddr_raw), .rdata(rd_raw[l]));
    ring_buffer #(.WIDTH(TW), .DEPTH(RB_DEPTH)) u_tp (
      .clk, .we(1'b1), .waddr(wptr), .wdata(tps[l]), .raddr(raddr_tp), .rdata(rd_tp[l]));
  end

  // ---------------- trigger FIFO ----------------
  localparam int unsigned QW = 32 + 24 + 12;
  logic [23:0]   evt_cnt;
  logic          tq_empty, tq_full, tq_half, tq_rd;
  logic [QW-1:0] tq_dout;
  sync_fifo #(.WIDTH(QW), .DEPTH(TRIG_DEPTH)) u_trig_q (
    .clk, .rst_n, .wr(l1a), .din({ts, evt_cnt, bcn}), .rd(tq_rd), .dout(tq_dout),
    .empty(tq_empty), .full(tq_full), .half(tq_half), .count());

  // age rule: how far the oldest waiting trigger's window reaches back into the ring
  logic [31:0] q_age, q_reach;
  logic        q_old, q_expired;
  assign q_age     = ts - tq_dout[QW-1 -: 32];
  assign q_reach   = q_age + 32'(latency) + 32'(tp_offset) + 32'(MAX_WIN);
  assign q_old     = !tq_empty && (q_reach + 2*READ_MARGIN >= RB_DEPTH);
  assign q_expired = q_reach + READ_MARGIN >= RB_DEPTH;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      evt_cnt     <= '0;
      n_trig_lost <= '0;
    end else begin
      if (l1a && !tq_full) evt_cnt <= evt_cnt + 1'b1;
      n_trig_lost <= n_trig_lost + 32'(l1a && tq_full) + 32'(tq_rd && q_expired);
    end
  end

  // ---------------- event output FIFO ----------------
  logic        of_wr, of_full, of_half, of_empty;
  logic [64:0] of_din, of_dout;
  sync_fifo #(.WIDTH(65), .DEPTH(OUT_DEPTH)) u_out_q (
    .clk, .rst_n, .wr(of_wr), .din(of_din), .rd(daq_valid && daq_ready), .dout(of_dout),
    .empty(of_empty), .full(of_full), .half(of_half), .count());
  assign daq_valid = !of_empty;
  assign daq_data  = of_dout[63:0];
  assign daq_last  = of_dout[64];
  assign busy      = tq_half || of_half || q_old;

  // ---------------- packing state machine ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_SCAN, S_DECIDE, S_HDR, S_LINK, S_IN_HDR, S_IN_RD, S_IN_WAIT, S_IN_EMIT,
    S_OUT_HDR, S_OUT_RD, S_OUT_WAIT, S_OUT_EMIT, S_TRAILER
  } state_e;
  state_e state;

  logic [AW-1:0] t_ptr, raw_start, tp_start;
  logic [23:0]   t_evt;
  logic [11:0]   t_bcn;
  logic [8:0]    w;          // BX inside the window
  logic          scan_v1, scan_vld;  // scan read issued 1 / 2 cycles ago
  logic [15:0]   raw_cnt [N_LINKS];
  logic [15:0]   tp_cnt  [N_LINKS];
  logic [$clog2(N_LINKS+1)-1:0] lk;
  logic [15:0]   nwords;
  tdc_hit_t [2:0]        raw_e;  // ring entry being unpacked (read port output)
  tp_t [MAX_TP-1:0]      tp_e;
  logic [MAX_WIN-1:0]    raw_nz [N_LINKS];  // BX of the window with raw data, per link
  logic [MAX_WIN-1:0]    tp_nz  [N_LINKS];  // BX of the window with TPs, per link
  logic [7:0]            win;    // window clipped to MAX_WIN
  logic [2:0]            rem_r;  // raw slots of the held entry still to send
  logic [MAX_TP-1:0]     rem_t;  // TP slots of the held entry still to send
  logic                  ld;     // held entry just arrived: load the slot masks
  logic [1:0]            hi;     // raw slot being sent
  logic [$clog2(MAX_TP)-1:0] ti; // TP slot being sent
  logic                  nxt_raw_ok, nxt_tp_ok;
  logic [8:0]            nxt_raw, nxt_tp;
  logic [7:0]            w_e;    // BX offset of the held entry
  logic [3:0]            lk4;

  assign tq_rd     = (state == S_IDLE) && !tq_empty && daq_en;
  assign raw_start = t_ptr - AW'(latency);
  assign tp_start  = raw_start + AW'(tp_offset);
  assign lk4       = 4'(lk);
  assign raw_e     = rd_raw[lk];
  assign tp_e      = rd_tp[lk];
  assign win       = (32'(window) > MAX_WIN) ? 8'(MAX_WIN) : window;

  // next BX at or after w that holds data for link lk, and the lowest slot left to send
  always_comb begin
    nxt_raw_ok = 1'b0; nxt_raw = '0;
    nxt_tp_ok  = 1'b0; nxt_tp  = '0;
    for (int i = MAX_WIN-1; i >= 0; i--) begin
      if (9'(i) >= w && raw_nz[lk][i]) begin nxt_raw_ok = 1'b1; nxt_raw = 9'(i); end
      if (9'(i) >= w && tp_nz[lk][i])  begin nxt_tp_ok  = 1'b1; nxt_tp  = 9'(i); end
    end
    hi = 2'd0;
    for (int i = 2; i >= 0; i--) if (rem_r[i]) hi = 2'(i);
    ti = '0;
    for (int i = MAX_TP-1; i >= 0; i--) if (rem_t[i]) ti = ($clog2(MAX_TP))'(i);
  end

  function automatic logic [15:0] popc_raw(input logic [RW-1:0] e);
    tdc_hit_t [2:0] h;
    h = e;
    return 16'(h[0].valid) + 16'(h[1].valid) + 16'(h[2].valid);
  endfunction
  function automatic logic [15:0] popc_tp(input logic [TW-1:0] e);
    tp_t [MAX_TP-1:0] t;
    logic [15:0] n;
    t = e;
    n = '0;
    for (int i = 0; i < MAX_TP; i++) n += 16'(t[i].valid);
    return n;
  endfunction

  logic link_has_data;
  assign link_has_data = (raw_cnt[lk[$clog2(N_LINKS+1)-1:0]] != 0) || (tp_cnt[lk] != 0);
  logic total_zero;
  always_comb begin
    total_zero = 1'b1;
    for (int l = 0; l < N_LINKS; l++)
      if (raw_cnt[l] != 0 || tp_cnt[l] != 0) total_zero = 1'b0;
  end

  // word to emit in this state
  always_comb begin
    of_wr  = 1'b0;
    of_din = '0;
    case (state)
      S_HDR: begin
        of_wr  = 1'b1;
        of_din = {1'b0, W_HEADER, t_evt, t_bcn, window, 16'h0};
      end
      S_IN_HDR: begin
        of_wr  = 1'b1;
        of_din = {1'b0, W_IN_HDR, lk4, 40'h0, raw_cnt[lk]};
      end
      S_IN_EMIT: if (!ld && rem_r != '0) begin
        of_wr  = 1'b1;
        of_din = {1'b0, W_IN_DATA, lk4, w_e, 16'h0, raw_e[hi].d};
      end
      S_OUT_HDR: begin
        of_wr  = 1'b1;
        of_din = {1'b0, W_OUT_HDR, lk4, 40'h0, tp_cnt[lk]};
      end
      S_OUT_EMIT: if (!ld && rem_t != '0) begin
        of_wr  = 1'b1;
        of_din = {1'b0, W_OUT_DATA, lk4, w_e, 13'h0, tp_e[ti]};
      end
      S_TRAILER: begin
        of_wr  = 1'b1;
        of_din = {1'b1, W_TRAILER, t_evt, 20'h0, nwords + 16'd1};
      end
      default: ;
    endcase
    if (of_full) of_wr = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      t_ptr    <= '0;
      t_evt    <= '0;
      t_bcn    <= '0;
      w        <= '0;
      scan_vld <= 1'b0;
      scan_v1  <= 1'b0;
      lk       <= '0;
      nwords   <= '0;
      rem_r    <= '0;
      rem_t    <= '0;
      ld       <= 1'b0;
      w_e      <= '0;
      raddr_raw <= '0;
      raddr_tp  <= '0;
      n_events <= '0;
      n_zero   <= '0;
      for (int l = 0; l < N_LINKS; l++) begin
        raw_cnt[l] <= '0; tp_cnt[l] <= '0; raw_nz[l] <= '0; tp_nz[l] <= '0;
      end
    end else begin
      if (of_wr) nwords <= nwords + 1'b1;
      case (state)
        S_IDLE: if (tq_rd && !q_expired) begin
          t_ptr <= tq_dout[QW-1-32+AW -: AW];   // hold the trigger being packed
          t_evt <= tq_dout[35:12];
          t_bcn <= tq_dout[11:0];
          state <= S_SCAN;
          w     <= '0;
          nwords <= '0;
          for (int l = 0; l < N_LINKS; l++) begin
            raw_cnt[l] <= '0; tp_cnt[l] <= '0; raw_nz[l] <= '0; tp_nz[l] <= '0;
          end
        end
        S_SCAN: begin
          // issue the reads of BX w; count the entries issued two cycles earlier
          raddr_raw <= raw_start + AW'(w);
          raddr_tp  <= tp_start + AW'(w);
          scan_v1   <= (w < 9'(win));
          scan_vld  <= scan_v1;
          if (scan_vld)
            for (int l = 0; l < N_LINKS; l++) begin
              raw_cnt[l] <= raw_cnt[l] + popc_raw(rd_raw[l]);
              tp_cnt[l]  <= tp_cnt[l] + popc_tp(rd_tp[l]);
              raw_nz[l][($clog2(MAX_WIN))'(w - 9'd2)] <= (popc_raw(rd_raw[l]) != 0);
              tp_nz[l][($clog2(MAX_WIN))'(w - 9'd2)]  <= (popc_tp(rd_tp[l]) != 0);
            end
          if (w == 9'(win) + 9'd1) state <= S_DECIDE;
          else                        w <= w + 1'b1;
        end
        S_DECIDE: begin
          scan_vld <= 1'b0;
          scan_v1  <= 1'b0;
          if (zs_en && total_zero) begin
            n_zero <= n_zero + 1'b1;
            state  <= S_IDLE;
          end else
            state <= S_HDR;
        end
        S_HDR: if (of_wr) begin
          lk    <= '0;
          state <= S_LINK;
        end
        S_LINK: begin
          if (lk == N_LINKS) state <= S_TRAILER;
          else if (zs_en && !link_has_data) lk <= lk + 1'b1;
          else state <= S_IN_HDR;
        end
        S_IN_HDR: if (of_wr) begin
          w     <= '0;
          state <= S_IN_RD;
        end
        S_IN_RD: begin     // go to the next BX of the window that holds raw data
          if (!nxt_raw_ok) state <= S_OUT_HDR;
          else begin
            w         <= nxt_raw;
            raddr_raw <= raw_start + AW'(nxt_raw);
            state     <= S_IN_WAIT;
          end
        end
        S_IN_WAIT: begin   // ring buffer read latency
          state <= S_IN_EMIT;
          ld    <= 1'b1;
          w_e   <= w[7:0];
        end
        S_IN_EMIT: begin   // one word per valid slot
          ld <= 1'b0;
          if (ld) rem_r <= {raw_e[2].valid, raw_e[1].valid, raw_e[0].valid};
          else if (rem_r == '0) begin
            w     <= w + 1'b1;
            state <= S_IN_RD;
          end else if (of_wr) rem_r[hi] <= 1'b0;
        end
        S_OUT_HDR: if (of_wr) begin
          w     <= '0;
          state <= S_OUT_RD;
        end
        S_OUT_RD: begin
          if (!nxt_tp_ok) begin
            lk    <= lk + 1'b1;
            state <= S_LINK;
          end else begin
            w        <= nxt_tp;
            raddr_tp <= tp_start + AW'(nxt_tp);
            state    <= S_OUT_WAIT;
          end
        end
        S_OUT_WAIT: begin
          state <= S_OUT_EMIT;
          ld    <= 1'b1;
          w_e   <= w[7:0];
        end
        S_OUT_EMIT: begin
          ld <= 1'b0;
          if (ld) begin
            for (int i = 0; i < MAX_TP; i++) rem_t[i] <= tp_e[i].valid;
          end else if (rem_t == '0) begin
            w     <= w + 1'b1;
            state <= S_OUT_RD;
          end else if (of_wr) rem_t[ti] <= 1'b0;
        end
        S_TRAILER: if (of_wr) begin
          n_events <= n_events + 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // words are only pushed into the output FIFO when it has room
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) of_wr |-> !of_full);
endmodule
