// tb_trigger_sel: in external mode a 3-cycle-wide trigger pulse must give exactly one
// L1A, 4 cycles after its rising edge (2-FF synchroniser, edge detector, output register);
// in Trigger-Module mode tm_l1a gives an L1A one cycle later and ext_trg is ignored;
// with Busy high triggers are held back and counted.
module tb_trigger_sel;
  logic clk = 0, rst_n = 0, ttc_mode = 0, ext_trg = 0, tm_l1a = 0, busy = 0, l1a;
  logic [31:0] n_l1a, n_supp;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, n_seen = 0, last_l1a = -1;
  trigger_sel dut (.clk, .rst_n, .ttc_mode, .ext_trg, .tm_l1a, .busy, .l1a, .n_l1a,
    .n_suppressed(n_supp));
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && l1a) begin n_seen <= n_seen + 1; last_l1a <= cyc; end
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // external trigger, 3 cycles wide
    @(negedge clk); ext_trg = 1; t0 = cyc;
    repeat (3) @(negedge clk); ext_trg = 0;
    repeat (6) @(negedge clk);
    chk(n_seen == 1, $sformatf("one L1A per pulse, got %0d", n_seen));
    chk(last_l1a - t0 == 3, $sformatf("ext latency %0d", last_l1a - t0));
    // trigger module ignored in ext mode
    tm_l1a = 1; @(negedge clk); tm_l1a = 0; repeat (3) @(negedge clk);
    chk(n_seen == 1, "tm ignored in ext mode");
    // TTC mode
    ttc_mode = 1;
    @(negedge clk); tm_l1a = 1; t0 = cyc; @(negedge clk); tm_l1a = 0;
    repeat (2) @(negedge clk);
    chk(n_seen == 2 && last_l1a - t0 == 1, $sformatf("tm latency %0d n %0d", last_l1a - t0, n_seen));
    ext_trg = 1; repeat (3) @(negedge clk); ext_trg = 0; repeat (4) @(negedge clk);
    chk(n_seen == 2, $sformatf("ext ignored in TTC mode %0d", n_seen));
    // Busy
    busy = 1;
    for (int i = 0; i < 5; i++) begin tm_l1a = 1; @(negedge clk); tm_l1a = 0; @(negedge clk); end
    busy = 0; repeat (2) @(negedge clk);
    chk(n_seen == 2, "busy suppresses");
    chk(n_supp == 5 && n_l1a == 2, $sformatf("counters %0d %0d", n_supp, n_l1a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
