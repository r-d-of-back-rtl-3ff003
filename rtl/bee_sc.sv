// bee_sc: the BEB's own slow-control registers (16-bit address, 16-bit data), reached
// from the RBCP bus of the GbE slow-control link byte by byte: an even byte address is
// the high byte of a register, an odd one the low byte. Each write or read strobe is
// acknowledged one cycle later with ack (and rd for reads).
// Register map (this design's choice; the document gives only the address/data widths):
//   0x0000 ID          read only, 16'h1BEB
//   0x0001 CTRL        [0] daq_en [1] zs_en [2] ttc_mode [3] ber_mode [4] mute_channels
//   0x0002 FC_CMD      write 1 to pulse: [0] resync [1] reset_sc_path [2] flush_data_path
//   0x0003 LATENCY     trigger latency in BX (10 bits)
//   0x0004 WINDOW      readout window in BX (8 bits)
//   0x0005 TP_OFFSET   offset of the TP window after the raw-data window, BX (9 bits)
//   0x0006 LINK_EN     one bit per input link
//   0x0010+i STATUS[i] read only, status words from the design
module bee_sc #(
  parameter int unsigned N_STATUS      = 8,
  parameter logic [15:0] CTRL_RESET    = 16'h0003,
  parameter logic [9:0]  LATENCY_RESET = 10'd100,
  parameter logic [7:0]  WINDOW_RESET  = 8'd4,
  parameter logic [8:0]  TPOFF_RESET   = 9'd18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic        re,
  input  logic [15:0] addr,      // register address
  input  logic        bsel,      // 0: high byte, 1: low byte
  input  logic [7:0]  wd,
  output logic        ack,
  output logic [7:0]  rd,
  input  logic [15:0] status [N_STATUS],
  output logic        daq_en,
  output logic        zs_en,
  output logic        ttc_mode,
  output logic        ber_mode,
  output logic        mute_channels,
  output logic        resync,
  output logic        reset_sc_path,
  output logic        flush_data_path,
  output logic [9:0]  latency,
  output logic [7:0]  window,
  output logic [8:0]  tp_offset,
  output logic [15:0] link_en
);
  logic [15:0] ctrl;
  logic [2:0]  fc;
  assign {mute_channels, ber_mode, ttc_mode, zs_en, daq_en} = ctrl[4:0];
  assign {flush_data_path, reset_sc_path, resync} = fc;

  function automatic logic [15:0] put(input logic [15:0] old, input logic b, input logic [7:0] d);
    return b ? {old[15:8], d} : {d, old[7:0]};
  endfunction

  logic [15:0] rword;
  always_comb begin
    rword = 16'h0;
    case (addr)
      16'h0000: rword = 16'h1BEB;
      16'h0001: rword = ctrl;
      16'h0003: rword = 16'(latency);
      16'h0004: rword = 16'(window);
      16'h0005: rword = 16'(tp_offset);
      16'h0006: rword = link_en;
      default:
        for (int i = 0; i < N_STATUS; i++)
          if (addr == 16'h0010 + 16'(i)) rword = status[i];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl      <= CTRL_RESET;
      fc        <= '0;
      latency   <= LATENCY_RESET;
      window    <= WINDOW_RESET;
      tp_offset <= TPOFF_RESET;
      link_en   <= '1;
      ack       <= 1'b0;
      rd        <= '0;
    end else begin
      fc  <= '0;
      ack <= we || re;
      if (re) rd <= bsel ? rword[7:0] : rword[15:8];
      if (we) begin
        case (addr)
          16'h0001: ctrl      <= put(ctrl, bsel, wd);
          16'h0002: fc        <= bsel ? wd[2:0] : 3'b000;
          16'h0003: latency   <= 10'(put(16'(latency), bsel, wd));
          16'h0004: window    <= 8'(put(16'(window), bsel, wd));
          16'h0005: tp_offset <= 9'(put(16'(tp_offset), bsel, wd));
          16'h0006: link_en   <= put(link_en, bsel, wd);
          default: ;
        endcase
      end
    end
  end
endmodule
