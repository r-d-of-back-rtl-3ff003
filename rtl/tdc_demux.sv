// tdc_demux: the DeMux of an input link. The front-end sends the TDC data of one BX
// sorted by channel and spread over several uplink frames, so the arrival order no
// longer reflects the BX in which a hit was made. This block restores that order.
//
// How it works: the delay of a hit is (current BCN - BX stamped in the hit), modulo the
// orbit. A two-dimensional buffer holds DEPTH rows (one per delay value, i.e. one per BX
// of generation) of SLOTS hits each. Rows are addressed through a free-running row
// pointer: the hit goes to row (ptr - delay). Every BX the oldest row, the one of BX
// (bcn - (DEPTH-1)), is output and cleared. So every BX one row leaves, holding all hits
// generated in one BX, with a fixed latency of DEPTH-1 BX after generation.
// A hit whose delay is DEPTH-1 or more (its row already left) or whose row is full is
// discarded and counted. Up to three hits are accepted per cycle (one uplink frame).
// The two-dimensional buffer, the delay computation and the discard rule follow the
// document; DEPTH and SLOTS were chosen by simulation there and are assumed here.
// Interface: hits_in in, row_out/row_bx/row_strobe out (row_strobe every cycle after
// reset: one cycle = one BX). flush clears the buffer.
module tdc_demux
  import irpc_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned SLOTS    = 8,
  parameter int unsigned ORBIT_LEN = 3564
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  logic [11:0]         bcn,
  input  tdc_hit_t [2:0]      hits_in,
  output tdc_hit_t [SLOTS-1:0] row_out,
  output logic [11:0]         row_bx,
  output logic [15:0]         n_late,     // hits discarded: delay out of range
  output logic [15:0]         n_full      // hits discarded: row full
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(SLOTS+1);
  localparam int unsigned SW = $clog2(SLOTS);

  tdc_t            buf_d [DEPTH][SLOTS];
  logic [SLOTS-1:0] buf_v [DEPTH];
  logic [CW-1:0]    cnt   [DEPTH];
  logic [PW-1:0]    ptr;          // row of the current BX
  logic [PW-1:0]    out_row;
  assign out_row = ptr + PW'(1);  // == ptr - (DEPTH-1)

  // per hit: delay, row, slot
  logic [2:0]        acc, late, rfull;
  logic [PW-1:0]     row   [3];
  logic [CW-1:0]     slot  [3];
  always_comb begin
    acc = '0;
    for (int i = 0; i < 3; i++) begin
      int d;
      int s;
      d = int'(bcn) - int'(hits_in[i].d.bx);
      if (d < 0) d += ORBIT_LEN;
      row[i]  = ptr - PW'(d);
      late[i] = hits_in[i].valid && (d >= DEPTH-1);
      s = int'(cnt[row[i]]);
      for (int j = 0; j < i; j++)
        if (acc[j] && row[j] == row[i]) s++;
      slot[i]  = CW'(s);
      rfull[i] = hits_in[i].valid && !late[i] && (s >= SLOTS);
      acc[i]   = hits_in[i].valid && !late[i] && (s < SLOTS);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      ptr <= '0;
      for (int r = 0; r < DEPTH; r++) begin
        buf_v[r] <= '0;
        cnt[r]   <= '0;
      end
      row_out <= '0;
      row_bx  <= '0;
      if (!rst_n) begin
        n_late <= '0;
        n_full <= '0;
      end
    end else begin
      ptr <= ptr + 1'b1;
      // release the oldest row
      for (int k = 0; k < SLOTS; k++) begin
        row_out[k].valid <= buf_v[out_row][k];
        row_out[k].d     <= buf_d[out_row][k];
      end
      row_bx <= (bcn >= 12'(DEPTH-1)) ? bcn - 12'(DEPTH-1) : bcn + 12'(ORBIT_LEN - (DEPTH-1));
      buf_v[out_row] <= '0;
      cnt[out_row]   <= '0;
      // store accepted hits
      for (int i = 0; i < 3; i++) begin
        if (acc[i]) begin
          buf_v[row[i]][slot[i][SW-1:0]] <= 1'b1;
          buf_d[row[i]][slot[i][SW-1:0]] <= hits_in[i].d;
        end
      end
      for (int r = 0; r < DEPTH; r++) begin
        int n;
        n = 0;
        for (int i = 0; i < 3; i++) if (acc[i] && row[i] == PW'(r)) n++;
        if (PW'(r) != out_row) cnt[r] <= cnt[r] + CW'(n);
      end
      n_late <= n_late + 16'(late[0]) + 16'(late[1]) + 16'(late[2]);
      n_full <= n_full + 16'(rfull[0]) + 16'(rfull[1]) + 16'(rfull[2]);
    end
  end
endmodule
