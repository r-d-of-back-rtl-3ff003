// tb_tp_concentrator: random TP patterns over 8 links x 4 slots; the output frame must
// list the valid TPs in link/slot order, tagged with their link, on every fan-out copy,
// one cycle later; TPs beyond 8 per BX must be counted as dropped.
module tb_tp_concentrator;
  import irpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tp_t [7:0][3:0] tps;
  logic [11:0] bx, fbx;
  logic [1:0][7:0][3+$bits(tp_t):0] frame;
  logic [31:0] n_drop;
  int checks = 0, failures = 0, exp_drop = 0;
  tp_concentrator #(.N_LINKS(8), .MAX_TP(4), .N_OUT_TP(8), .N_FANOUT(2)) dut (
    .clk, .rst_n, .tps, .bx, .frame, .frame_bx(fbx), .n_dropped(n_drop));
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [3+$bits(tp_t):0] expq[$];
    tps = '0; bx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      expq.delete();
      for (int l = 0; l < 8; l++)
        for (int k = 0; k < 4; k++) begin
          tps[l][k] = tp_t'({$urandom, $urandom});
          tps[l][k].valid = ($urandom_range(0, 9) < ((n % 3) + 1));
          if (tps[l][k].valid) begin
            if (expq.size() < 8) expq.push_back({4'(l), tps[l][k]});
            else exp_drop++;
          end
        end
      bx = 12'(n);
      @(negedge clk);
      chk(fbx == 12'(n), "frame bx");
      for (int o = 0; o < 2; o++)
        for (int i = 0; i < 8; i++)
          chk(i < expq.size() ? frame[o][i] == expq[i] : frame[o][i] == '0,
              $sformatf("slot %0d copy %0d", i, o));
    end
    chk(n_drop == 32'(exp_drop), $sformatf("dropped %0d exp %0d", n_drop, exp_drop));
    chk(exp_drop > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
