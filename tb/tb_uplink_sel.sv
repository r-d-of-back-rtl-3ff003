// tb_uplink_sel: builds data frames and SC reply frames bit by bit from random field
// values (MSB-first field order of the uplink format) and checks the decoded TDC data,
// their valid bits, the reply words and the status fields.
module tb_uplink_sel;
  import irpc_pkg::*;
  logic valid;
  logic [111:0] w;
  tdc_hit_t [2:0] hits;
  logic reply_valid;
  logic [5:0] rwv;
  logic [5:0][15:0] rdat;
  logic [2:0] misc, scff, dff;
  int checks = 0, failures = 0;
  uplink_sel dut (.valid, .ul_user(w), .hits, .reply_valid, .reply_wvalid(rwv),
    .reply_data(rdat), .misc_status(misc), .sc_fifo_full(scff), .data_fifo_full(dff));
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [2:0] m, s, d, dv;
      logic [7:0] ch [3];
      logic [23:0] t [3];
      logic [15:0] r [6];
      logic [5:0] rv;
      m = 3'($urandom); s = 3'($urandom); d = 3'($urandom); dv = 3'($urandom);
      for (int i = 0; i < 3; i++) begin ch[i] = 8'($urandom); t[i] = 24'($urandom); end
      valid = 1;
      // data frame
      w = {m, s, d, 1'b0, 3'b101, dv, ch[0], t[0], ch[1], t[1], ch[2], t[2]};
      #1;
      chk(misc == m && scff == s && dff == d, "status");
      chk(!reply_valid && rwv == 0, "no reply on data frame");
      for (int i = 0; i < 3; i++) begin
        chk(hits[2-i].valid == dv[2-i], "hit valid");
        chk(hits[2-i].d.chan == ch[i] && {hits[2-i].d.bx, hits[2-i].d.fine} == t[i], "hit fields");
      end
      // reply frame
      rv = 6'($urandom) | 6'b1;
      for (int i = 0; i < 6; i++) r[i] = 16'($urandom);
      w = {m, s, d, 1'b1, rv, r[0], r[1], r[2], r[3], r[4], r[5]};
      #1;
      chk(reply_valid && rwv == rv, "reply valid");
      for (int i = 0; i < 6; i++) chk(rdat[5-i] == r[i], "reply word");
      chk(hits[0].valid == 0 && hits[1].valid == 0 && hits[2].valid == 0, "no hits in reply");
      valid = 0; #1;
      chk(!reply_valid && hits[2].valid == 0, "invalid input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
