// tb_sc_sel: RBCP accesses to each target (BEE, FEE of every link, GBT, unmapped) must
// raise exactly the strobe of that target with the decoded address, byte and FPGA
// fields, and the target's ack and read byte must come back on the RBCP side; an
// unmapped target is acknowledged by the router itself.
module tb_sc_sel;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] a;
  logic we, re, ack, bee_we, bee_re, bee_ack, gbt_we, gbt_re, gbt_ack, bsel;
  logic [7:0] wd, rd, t_wd, bee_rd, gbt_rd;
  logic [15:0] t_addr;
  logic [2:0] t_fpga;
  logic [3:0] fee_we, fee_re, fee_ack;
  logic [7:0] fee_rd [4];
  int checks = 0, failures = 0;
  sc_sel #(.N_LINKS(4)) dut (.clk, .rst_n, .rbcp_addr(a), .rbcp_we(we), .rbcp_re(re),
    .rbcp_wd(wd), .rbcp_ack(ack), .rbcp_rd(rd), .t_addr, .t_bsel(bsel), .t_fpga, .t_wd,
    .bee_we, .bee_re, .bee_ack, .bee_rd, .fee_we, .fee_re, .fee_ack, .fee_rd, .gbt_we,
    .gbt_re, .gbt_ack, .gbt_rd);
  // simple targets: ack one cycle after a strobe with a byte naming the target
  always @(posedge clk) begin
    bee_ack <= bee_we || bee_re; bee_rd <= 8'hB0;
    gbt_ack <= gbt_we || gbt_re; gbt_rd <= 8'hC0;
    for (int l = 0; l < 4; l++) begin fee_ack[l] <= fee_we[l] || fee_re[l]; fee_rd[l] <= 8'hF0 + 8'(l); end
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; re = 0; a = 0; wd = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int tgt, lk;
      logic [15:0] ra;
      logic [2:0] f;
      logic b, w;
      tgt = $urandom_range(0, 3); lk = $urandom_range(0, 5);
      ra = 16'($urandom); f = 3'($urandom); b = 1'($urandom); w = 1'($urandom);
      a = {4'(tgt), 4'(lk), 1'b0, f, 3'b000, ra, b};
      wd = 8'($urandom);
      @(negedge clk);
      we = w; re = !w;
      #1;
      chk(t_addr == ra && bsel == b && t_fpga == f && t_wd == wd, "fields");
      chk(bee_we == (w && tgt == 0) && bee_re == (!w && tgt == 0), "bee strobe");
      chk(gbt_we == (w && tgt == 2) && gbt_re == (!w && tgt == 2), "gbt strobe");
      for (int l = 0; l < 4; l++)
        chk(fee_we[l] == (w && tgt == 1 && lk == l) && fee_re[l] == (!w && tgt == 1 && lk == l), "fee strobe");
      @(negedge clk); we = 0; re = 0;
      chk(ack, "ack");
      if (tgt == 0) chk(rd == 8'hB0, "bee rd");
      else if (tgt == 2) chk(rd == 8'hC0, "gbt rd");
      else if (tgt == 1 && lk < 4) chk(rd == 8'hF0 + 8'(lk), "fee rd");
      else chk(rd == 8'h00, "unmapped rd");
      @(negedge clk);
      chk(!ack, "single ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
