// ber_checker: bit-error-rate test of the GBT link pair with the FEB in loopback.
// The generator sends a cyclic incrementing 80-bit count on the downlink, one per BX.
// The checker watches the 112-bit uplink words: each valid word must equal the previous
// valid word plus one (modulo 2^112), otherwise the frame counts as wrong. The first
// word after enable only seeds the check. word_cnt (64 bits) counts checked frames and
// err_cnt (52 bits) wrong frames; the BER bound is 1 / (word_cnt * 112).
// The incrementing pattern and the two counters with these widths follow the document;
// the self-seeding comparison is this design's choice. Counters clear when en is low.
module ber_checker
  import irpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [DL_W-1:0] tx_word,
  input  logic            rx_valid,
  input  logic [UL_W-1:0] rx_word,
  output logic [63:0]     word_cnt,
  output logic [51:0]     err_cnt
);
  logic [UL_W-1:0] last;
  logic            seeded;
  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      tx_word  <= '0;
      last     <= '0;
      seeded   <= 1'b0;
      word_cnt <= '0;
      err_cnt  <= '0;
    end else begin
      tx_word <= tx_word + 1'b1;
      if (rx_valid) begin
        last   <= rx_word;
        seeded <= 1'b1;
        if (seeded) begin
          word_cnt <= word_cnt + 1'b1;
          if (rx_word != last + 1'b1) err_cnt <= err_cnt + 1'b1;
        end
      end
    end
  end
endmodule
