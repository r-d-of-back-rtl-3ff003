// tp_concentrator: "Concentration & Fan-out" of the BEB. Each BX it gathers the TPs
// produced by all input links into one trigger-output frame of N_OUT_TP slots, each TP
// tagged with its link number, lowest link and lowest slot first, and drives the same
// frame to N_FANOUT output links (the 10 Gbps trigger links). TPs beyond N_OUT_TP in one
// BX are dropped and counted. The document only names this block; the packing order,
// the frame size and the fan-out count are this design's choices.
// Timing: frame registered, one cycle after the TPs.
module tp_concentrator
  import irpc_pkg::*;
#(
  parameter int unsigned N_LINKS  = 8,
  parameter int unsigned MAX_TP   = 4,
  parameter int unsigned N_OUT_TP = 8,
  parameter int unsigned N_FANOUT = 2
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  tp_t [N_LINKS-1:0][MAX_TP-1:0]  tps,
  input  logic [11:0]                    bx,
  output logic [N_FANOUT-1:0][N_OUT_TP-1:0][3+$bits(tp_t):0] frame, // {link[3:0], tp}
  output logic [11:0]                    frame_bx,
  output logic [31:0]                    n_dropped
);
  localparam int unsigned EW = 4 + $bits(tp_t);
  logic [N_OUT_TP-1:0][EW-1:0] f;
  int n, drop;
  always_comb begin
    f = '0;
    n = 0;
    drop = 0;
    for (int l = 0; l < N_LINKS; l++)
      for (int k = 0; k < MAX_TP; k++)
        if (tps[l][k].valid) begin
          if (n < N_OUT_TP) f[n] = {4'(l), tps[l][k]};
          else drop++;
          n++;
        end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame     <= '0;
      frame_bx  <= '0;
      n_dropped <= '0;
    end else begin
      for (int o = 0; o < N_FANOUT; o++) frame[o] <= f;
      frame_bx  <= bx;
      n_dropped <= n_dropped + 32'(drop);
    end
  end
endmodule
