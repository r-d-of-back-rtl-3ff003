// async_fifo: dual-clock FIFO used as the GBT RX and TX frame buffers of an input link.
//
// Uplink frames arrive in the recovered link clock and downlink frames leave in the
// transmit clock, while the processing runs in the BX clock; this FIFO carries frames
// across. Read and write pointers are (AW+1)-bit binary counters whose Gray-coded copies
// cross to the other side through two flip-flops. The FIFO is first-word-fall-through:
// rdata shows the oldest word whenever empty is low, and rd pops it.
// Interface: wr/wdata/full in wclk, rd/rdata/empty in rclk, one reset per side
// (active low, synchronous). Writes to a full FIFO and reads of an empty one are ignored.
// Timing: a written word becomes visible to the reader 2-3 rclk cycles later.
// The buffering itself comes from the board's block diagram; the Gray-pointer design and
// the depth are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 114,
  parameter int unsigned AW    = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] wgray_r1, wgray_r2, rgray_w1, rgray_w2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wclk)
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;

  // read side
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
endmodule
