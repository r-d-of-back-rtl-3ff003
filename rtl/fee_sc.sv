// fee_sc: protocol converter between the RBCP slow-control bus (byte accesses) and the
// FEE slow-control protocol carried in the GBT link (16-bit address, 16-bit words).
//
// Writes: the bytes of one RBCP packet are collected into 16-bit words (high byte first)
// and each byte is acknowledged at once, because the FEE sends no answer to a write and
// the BEB must produce the RBCP reply itself. When the RBCP packet ends (act falls) the
// words go out as one transaction: a request frame {wr=1, length, address, word0,
// word1}, then payload frames of four words each, one frame per BX.
// Reads: an access to the high byte sends a request frame {wr=0, length=1, address} and
// waits for the SC reply frame; the word is taken from the reply slots of the selected
// FEB FPGA and the high byte is acknowledged; the low byte of the same word is then
// answered from the held word. A reply that does not come within TIMEOUT cycles is
// answered with 8'hEE and counted.
// The frame fields, the request-then-payload order and the write/read reply rules follow
// the document; collecting a whole packet for writes, one-word reads and the timeout are
// this design's choices. sc_fpga = 0 marks a downlink frame without SC content.
module fee_sc
  import irpc_pkg::*;
#(
  parameter int unsigned MAX_WORDS = 256,
  parameter int unsigned TIMEOUT   = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reset_sc_path,
  // RBCP side
  input  logic              act,
  input  logic              we,
  input  logic              re,
  input  logic [15:0]       addr,
  input  logic              bsel,
  input  logic [2:0]        fpga,
  input  logic [7:0]        wd,
  output logic              ack,
  output logic [7:0]        rd,
  // downlink side: one 64-bit SC field per frame
  output logic              sc_valid,
  output logic [63:0]       sc_word,
  output logic [2:0]        sc_fpga,
  input  logic              sc_ready,
  // uplink side: reply slots
  input  logic [5:0]        reply_wvalid,
  input  logic [5:0][15:0]  reply_data,
  output logic [15:0]       n_timeout
);
  localparam int unsigned WA = $clog2(MAX_WORDS);

  typedef enum logic [2:0] {S_IDLE, S_WREQ, S_WPAY, S_RREQ, S_RWAIT} state_e;
  state_e state;

  logic [15:0]   wbuf [MAX_WORDS];
  logic [WA:0]   nw;            // words collected
  logic [WA:0]   sent;          // words already sent
  logic [7:0]    hi_byte;
  logic [15:0]   start_addr;
  logic [2:0]    t_fpga;
  logic [15:0]   rword, raddr;
  logic          rword_ok;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;

  // reply word of the selected FPGA (fpga bit f = FPGA f): slots [5:4] FPGA0,
  // [3:2] FPGA1, [1:0] FPGA2; the lowest selected FPGA with a valid word wins
  logic        rep_hit;
  logic [15:0] rep_word;
  always_comb begin
    rep_hit  = 1'b0;
    rep_word = '0;
    for (int f = 0; f < 3; f++)
      if (t_fpga[f] && !rep_hit) begin
        if (reply_wvalid[5-2*f]) begin rep_hit = 1'b1; rep_word = reply_data[5-2*f]; end
        else if (reply_wvalid[4-2*f]) begin rep_hit = 1'b1; rep_word = reply_data[4-2*f]; end
      end
  end

  function automatic logic [15:0] wb(input logic [WA:0] i, input logic [WA:0] n);
    return (i < n) ? wbuf[i[WA-1:0]] : 16'h0;
  endfunction

  sc_request_t req;
  always_comb begin
    req        = '0;
    sc_valid   = 1'b0;
    sc_fpga    = t_fpga;
    sc_word    = '0;
    case (state)
      S_WREQ: begin
        req.wr     = 1'b1;
        req.length = 8'(nw);
        req.addr   = start_addr;
        req.wdata0 = wb('0, nw);
        req.wdata1 = wb((WA+1)'(1), nw);
        sc_word    = req;
        sc_valid   = 1'b1;
      end
      S_WPAY: begin
        sc_word  = {wb(sent, nw), wb(sent + 1'b1, nw), wb(sent + 2'd2, nw), wb(sent + 2'd3, nw)};
        sc_valid = 1'b1;
      end
      S_RREQ: begin
        req.wr     = 1'b0;
        req.length = 8'd1;
        req.addr   = raddr;
        sc_word    = req;
        sc_valid   = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || reset_sc_path) begin
      state    <= S_IDLE;
      nw       <= '0;
      sent     <= '0;
      ack      <= 1'b0;
      rd       <= '0;
      rword_ok <= 1'b0;
      rword    <= '0;
      raddr    <= '0;
      hi_byte  <= '0;
      start_addr <= '0;
      t_fpga   <= '0;
      tmo      <= '0;
      if (!rst_n) n_timeout <= '0;
    end else begin
      ack <= 1'b0;
      case (state)
        S_IDLE: begin
          if (we) begin
            ack <= 1'b1;
            if (!bsel) hi_byte <= wd;
            else if (nw < (WA+1)'(MAX_WORDS-1)) begin  // length field is 8 bits
              wbuf[nw[WA-1:0]] <= {hi_byte, wd};
              if (nw == 0) begin
                start_addr <= addr;
                t_fpga     <= fpga;
              end
              nw <= nw + 1'b1;
            end
          end else if (re) begin
            if (bsel && rword_ok && raddr == addr) begin
              ack <= 1'b1;
              rd  <= rword[7:0];
            end else begin
              raddr    <= addr;
              t_fpga   <= fpga;
              rword_ok <= 1'b0;
              state    <= S_RREQ;
            end
          end else if (!act && nw != 0) begin
            sent  <= '0;
            state <= S_WREQ;
          end
        end
        S_WREQ: if (sc_ready) begin
          sent  <= (WA+1)'(2);
          state <= (nw > 2) ? S_WPAY : S_IDLE;
          if (nw <= 2) nw <= '0;
        end
        S_WPAY: if (sc_ready) begin
          sent <= sent + 3'd4;
          if (sent + 3'd4 >= nw) begin
            nw    <= '0;
            state <= S_IDLE;
          end
        end
        S_RREQ: if (sc_ready) begin
          tmo   <= '0;
          state <= S_RWAIT;
        end
        S_RWAIT: begin
          tmo <= tmo + 1'b1;
          if (rep_hit) begin
            rword    <= rep_word;
            rword_ok <= 1'b1;
            ack      <= 1'b1;
            rd       <= bsel ? rep_word[7:0] : rep_word[15:8];
            state    <= S_IDLE;
          end else if (tmo == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
            ack       <= 1'b1;
            rd        <= 8'hEE;
            n_timeout <= n_timeout + 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
