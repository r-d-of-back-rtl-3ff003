// bx_counter: bunch crossing number (BCN) counter of the BEB. It counts BX clock cycles
// from 0 to ORBIT_LEN-1 and raises bc0 for the cycle in which bcn is 0; bc0 is sent to the
// front-end in the downlink so that front-end and back-end share one time reference.
// A resync (synchronous) restarts the orbit at BCN 0. The orbit length of 3564 BX is the
// LHC value; the document names BC0 and the BCN but gives no counter details.
// Also counts complete orbits in a free-running 32-bit counter.
module bx_counter #(
  parameter int unsigned ORBIT_LEN = 3564
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        resync,
  output logic [11:0] bcn,
  output logic        bc0,
  output logic [31:0] orbit
);
  assign bc0 = (bcn == 12'd0);
  always_ff @(posedge clk) begin
    if (!rst_n || resync) begin
      bcn <= '0;
      if (!rst_n) orbit <= '0;
    end else if (bcn == 12'(ORBIT_LEN-1)) begin
      bcn   <= '0;
      orbit <= orbit + 1'b1;
    end else begin
      bcn <= bcn + 1'b1;
    end
  end
endmodule
