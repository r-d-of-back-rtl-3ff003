// ring_buffer: pipeline buffer of the readout. Every BX one entry is written at the
// address of a free-running BX counter, so the entry of a past BX sits at
// (current address - age). The readout turns the calibrated trigger latency into such an
// address offset and reads the window of interest directly, as the board description
// puts it. Write: we/waddr/wdata. Read: raddr in, rdata one clock later (a registered,
// block-RAM-style read). Depth and width are this design's choices.
module ring_buffer #(
  parameter int unsigned WIDTH = 99,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
