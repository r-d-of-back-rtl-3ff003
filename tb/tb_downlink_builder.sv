// tb_downlink_builder: checks the bit positions of the fast-control fields (Resync at
// bit 79 down to Mute at bit 75, FPGA select at 66:64), that SC content appears only with
// sc_valid, and that BER mode sends the pattern and holds SC frames (sc_ready low).
module tb_downlink_builder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic resync, bc0, rsp, fdp, mute, scv, scr, ber;
  logic [63:0] scw;
  logic [2:0] scf;
  logic [79:0] berw, dl;
  int checks = 0, failures = 0;
  downlink_builder dut (.clk, .rst_n, .resync, .bc0, .reset_sc_path(rsp), .flush_data_path(fdp),
    .mute_channels(mute), .sc_valid(scv), .sc_word(scw), .sc_fpga(scf), .sc_ready(scr),
    .ber_mode(ber), .ber_word(berw), .dl_user(dl));
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    {resync, bc0, rsp, fdp, mute, scv, ber} = '0; scw = '0; scf = '0; berw = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [79:0] e;
      {resync, bc0, rsp, fdp, mute, scv} = 6'($urandom);
      ber = ($urandom_range(0, 4) == 0);
      scw = {$urandom, $urandom}; scf = 3'($urandom_range(1, 7)); berw = {16'($urandom), $urandom, $urandom};
      e = {resync, bc0, rsp, fdp, mute, 8'h00, scv ? scf : 3'b000, scv ? scw : 64'h0};
      if (ber) e = berw;
      #1 chk(scr == !ber, "sc_ready");
      @(negedge clk);
      chk(dl == e, $sformatf("frame %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
