// sync_fifo: single-clock FIFO with a half-full flag, used for the trigger buffer and the
// event output buffer of the readout module.
//
// The readout raises Busy from the half-full flags of its buffers, so that a complete
// event still fits after Busy starts holding back triggers; that use of the half-full
// flag follows the board description, the FIFO structure is this design's own.
// First-word-fall-through: dout shows the oldest entry whenever empty is low; rd pops.
// Writes when full are dropped. count, full, empty and half are registered-state
// functions, valid in the same cycle. Reset is synchronous, active low.
module sync_fifo #(
  parameter int unsigned WIDTH = 66,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             half,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH);
  assign half  = (count >= DEPTH/2);
  assign dout  = mem[rp];
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (do_wr ? 1'b1 : 1'b0) - (do_rd ? 1'b1 : 1'b0);
    end
  end
  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= din;
endmodule
