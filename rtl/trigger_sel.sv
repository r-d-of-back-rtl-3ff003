// trigger_sel: the L1A selector of the BEB. It takes either the external trigger input
// (e.g. a scintillator coincidence through the board's trigger adapter) or the trigger
// from the Trigger Module, as chosen by the TTC mode, and releases it as a one-cycle L1A
// unless Busy is high; a trigger held back by Busy is counted. The external input is
// synchronised with two flip-flops and its rising edge is used, so a 25 ns wide pulse
// gives one L1A. Selection and Busy suppression follow the board's block diagram and
// readout description; the edge detection and the counters are this design's choices.
// Timing: L1A from tm_l1a is registered (1 cycle); from ext_trg it follows 3 cycles later.
module trigger_sel (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ttc_mode,   // 1: Trigger Module, 0: external trigger
  input  logic        ext_trg,
  input  logic        tm_l1a,
  input  logic        busy,
  output logic        l1a,
  output logic [31:0] n_l1a,
  output logic [31:0] n_suppressed
);
  logic [2:0] ext_s;
  logic       trg;
  assign trg = ttc_mode ? tm_l1a : (ext_s[1] && !ext_s[2]);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext_s        <= '0;
      l1a          <= 1'b0;
      n_l1a        <= '0;
      n_suppressed <= '0;
    end else begin
      ext_s <= {ext_s[1:0], ext_trg};
      l1a   <= trg && !busy;
      if (trg && !busy) n_l1a <= n_l1a + 1'b1;
      if (trg && busy)  n_suppressed <= n_suppressed + 1'b1;
    end
  end
endmodule
