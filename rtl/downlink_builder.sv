// downlink_builder: assembles the 80-bit downlink user word sent to the FEB every BX.
// The top 16 bits are fast control: Resync, BC0, Reset SC path, Flush data path, Mute
// channels, 8 reserved bits and the 3-bit FPGA select; the lower 64 bits carry an FEE SC
// request or payload frame when one is pending (FPGA select is then non-zero, otherwise
// zero and the SC field is zero). In BER test mode the whole word is the test pattern
// instead and SC frames wait. Field order and widths follow the downlink format; using a
// zero FPGA select to mark "no SC content" and the BER-mode override are this design's
// choices. Output registered: dl_user appears one cycle after its inputs.
module downlink_builder
  import irpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              resync,
  input  logic              bc0,
  input  logic              reset_sc_path,
  input  logic              flush_data_path,
  input  logic              mute_channels,
  input  logic              sc_valid,
  input  logic [63:0]       sc_word,
  input  logic [2:0]        sc_fpga,
  output logic              sc_ready,
  input  logic              ber_mode,
  input  logic [DL_W-1:0]   ber_word,
  output logic [DL_W-1:0]   dl_user
);
  dl_frame_t f;
  assign sc_ready = !ber_mode;
  always_comb begin
    f                    = '0;
    f.fc.resync          = resync;
    f.fc.bc0             = bc0;
    f.fc.reset_sc_path   = reset_sc_path;
    f.fc.flush_data_path = flush_data_path;
    f.fc.mute_channels   = mute_channels;
    if (sc_valid) begin
      f.fc.fpga_sel = sc_fpga;
      f.sc          = sc_word;
    end
  end
  always_ff @(posedge clk)
    if (!rst_n) dl_user <= '0;
    else        dl_user <= ber_mode ? ber_word : DL_W'(f);
endmodule
