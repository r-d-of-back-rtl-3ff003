// clusterizer: trigger-primitive generation of one input link, per BX.
//
// Stage 1 (strip map) turns the TDC data of one BX (one DeMux row) into fired strips:
// channels 0..47 are end A of strips 0..47, channels 48..95 end B. A strip is fired when
// both of its ends have a hit in that BX; the first hit per end (lowest slot) is used.
// Stage 2 (clustering) links two neighbouring fired strips when their end-A times differ
// by at most TIME_WIN fine-time LSBs. MAX_SIZE parallel processes then slide a window
// of k = 1..MAX_SIZE strips over the 48 strips; process k marks a window of k linked
// strips that is not linked to either neighbour, so each cluster is found by exactly the
// process of its size. Wider clusters are counted and not reported. The first MAX_TP
// clusters (lowest strip first) become TPs: central strip s + (k-1)/2, the time
// difference dt = tA - tB of that strip and the position along the strip
// y = v*dt/2 with v = 0.67 c (157/256 mm per fine LSB).
// Timing: tp/tp_bx are registered, 2 cycles after row_in/row_bx.
// The time and space constraints, the sliding-window processes, the central strip and the
// position from the end-to-end time difference follow the document; the channel map, the
// time window, both-ends firing, MAX_SIZE and MAX_TP are this design's choices. The
// document's final lookup table to global coordinates is not reproduced (no table given).
module clusterizer
  import irpc_pkg::*;
#(
  parameter int unsigned SLOTS    = 8,
  parameter int unsigned MAX_SIZE = 4,
  parameter int unsigned MAX_TP   = 4,
  parameter int unsigned TIME_WIN = 328
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tdc_hit_t [SLOTS-1:0] row_in,
  input  logic [11:0]          row_bx,
  output tp_t [MAX_TP-1:0]     tp,
  output logic [11:0]          tp_bx,
  output logic [15:0]          n_oversize
);
  localparam int NS = N_STRIPS;

  // ---------------- stage 1: strip map ----------------
  logic [NS-1:0] fa, fb;
  logic [11:0]   ta [NS];
  logic [11:0]   tb [NS];
  logic [NS-1:0] fired_q;
  logic [11:0]   ta_q [NS];
  logic [11:0]   tb_q [NS];
  logic [11:0]   bx_q;

  always_comb begin
    fa = '0; fb = '0;
    for (int s = 0; s < NS; s++) begin ta[s] = '0; tb[s] = '0; end
    for (int k = SLOTS-1; k >= 0; k--) begin   // lowest slot wins
      if (row_in[k].valid) begin
        if (row_in[k].d.chan < 8'(NS)) begin
          fa[row_in[k].d.chan[5:0]] = 1'b1;
          ta[row_in[k].d.chan[5:0]] = row_in[k].d.fine;
        end else if (row_in[k].d.chan < 8'(2*NS)) begin
          fb[6'(row_in[k].d.chan - 8'(NS))] = 1'b1;
          tb[6'(row_in[k].d.chan - 8'(NS))] = row_in[k].d.fine;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fired_q <= '0;
      bx_q    <= '0;
    end else begin
      fired_q <= fa & fb;
      bx_q    <= row_bx;
    end
    for (int s = 0; s < NS; s++) begin
      ta_q[s] <= ta[s];
      tb_q[s] <= tb[s];
    end
  end

  // ---------------- stage 2: clustering ----------------
  logic [NS-2:0] link;
  always_comb begin
    for (int s = 0; s < NS-1; s++) begin
      int d;
      d = int'(ta_q[s]) - int'(ta_q[s+1]);
      if (d < 0) d = -d;
      link[s] = fired_q[s] && fired_q[s+1] && (d <= int'(TIME_WIN));
    end
  end

  // found[k-1][s]: a cluster of exactly k strips starts at strip s
  logic [NS-1:0] found [MAX_SIZE];
  logic [NS-1:0] start;
  always_comb begin
    for (int k = 1; k <= MAX_SIZE; k++) begin
      for (int s = 0; s < NS; s++) begin
        logic ok;
        ok = fired_q[s] && (s + k <= NS);
        if (s > 0 && link[s-1]) ok = 1'b0;
        for (int j = 0; j < k-1; j++)
          if (s + j < NS-1) ok = ok && link[s+j]; else ok = 1'b0;
        if (s + k - 1 < NS-1 && link[s+k-1]) ok = 1'b0;
        found[k-1][s] = ok;
      end
    end
    // a cluster start that no process claims is wider than MAX_SIZE
    for (int s = 0; s < NS; s++)
      start[s] = fired_q[s] && !(s > 0 && link[s-1]);
  end

  tp_t [MAX_TP-1:0] tp_d;
  int n_over;
  always_comb begin
    int n;
    logic signed [12:0] dt;
    logic signed [22:0] prod;
    n = 0;
    dt = '0;
    prod = '0;
    n_over = 0;
    tp_d = '0;
    for (int s = 0; s < NS; s++) begin
      logic hit;
      int   c;
      hit = 1'b0;
      c   = 0;
      for (int k = 1; k <= MAX_SIZE; k++) begin
        if (found[k-1][s]) begin
          hit = 1'b1;
          c   = s + (k-1)/2;
          if (n < MAX_TP) begin
            dt   = $signed({1'b0, ta_q[c]}) - $signed({1'b0, tb_q[c]});
            prod = 23'(dt) * 23'(Y_MUL);
            tp_d[n].valid = 1'b1;
            tp_d[n].strip = 6'(c);
            tp_d[n].size  = 3'(k);
            tp_d[n].dt    = dt;
            tp_d[n].y     = 12'(prod >>> Y_SHIFT);
          end
        end
      end
      if (hit) n++;
      if (start[s] && !hit) n_over++;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tp         <= '0;
      tp_bx      <= '0;
      n_oversize <= '0;
    end else begin
      tp         <= tp_d;
      tp_bx      <= bx_q;
      n_oversize <= n_oversize + 16'(n_over);
    end
  end
endmodule
