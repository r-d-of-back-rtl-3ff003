// uplink_sel: the "Sel" of an input link. It splits one 112-bit uplink user word into
// the fast-control status and either up to three TDC data (detector data frame) or up
// to six 16-bit SC reply words (SC reply frame). The SCFrame bit tells the two apart
// (1 = reply frame, a choice of this design since the polarity is not printed); the
// field order and widths are those of the uplink format: MiscStatus(3) SCFifoFull(3)
// DataFifoFull(3) SCFrame(1), then RSVD(3) DataValid(3) and 3 x (channel 8 + time 24),
// or DataValid(6) and 6 x 16-bit read data (two per FEB FPGA).
// Purely combinational; 'valid' qualifies the input word.
module uplink_sel
  import irpc_pkg::*;
(
  input  logic              valid,
  input  logic [UL_W-1:0]   ul_user,
  output tdc_hit_t [2:0]    hits,       // [2] is the first TDC data of the frame
  output logic              reply_valid,
  output logic [5:0]        reply_wvalid,
  output logic [5:0][15:0]  reply_data,
  output logic [2:0]        misc_status,
  output logic [2:0]        sc_fifo_full,
  output logic [2:0]        data_fifo_full
);
  ul_data_frame_t  df;
  ul_reply_frame_t rf;
  assign df = ul_data_frame_t'(ul_user);
  assign rf = ul_reply_frame_t'(ul_user);

  assign misc_status    = df.misc_status;
  assign sc_fifo_full   = df.sc_fifo_full;
  assign data_fifo_full = df.data_fifo_full;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      hits[i].valid = valid && !df.sc_frame && df.data_valid[i];
      hits[i].d     = df.tdc[i];
    end
  end
  assign reply_valid  = valid && rf.sc_frame && (rf.data_valid != '0);
  assign reply_wvalid = (valid && rf.sc_frame) ? rf.data_valid : '0;
  assign reply_data   = rf.rd;
endmodule
