// tb_clusterizer: feeds rows of TDC data that describe known strip patterns and checks
// the TPs: central strip, cluster size, end-to-end time difference and the position
// along the strip y = dt * 157 / 256 (floor), the 2-cycle latency, the split of two
// neighbours whose times are too far apart, clusters wider than MAX_SIZE (counted, not
// reported), strips with one end only (not fired) and the MAX_TP limit.
module tb_clusterizer;
  import irpc_pkg::*;
  localparam int SLOTS = 32, MAXTP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tdc_hit_t [SLOTS-1:0] row;
  logic [11:0] row_bx;
  tp_t [MAXTP-1:0] tp;
  logic [11:0] tp_bx;
  logic [15:0] n_over;
  int checks = 0, failures = 0;
  int ns;

  clusterizer #(.SLOTS(SLOTS), .MAX_SIZE(4), .MAX_TP(MAXTP), .TIME_WIN(328)) dut (
    .clk, .rst_n, .row_in(row), .row_bx, .tp, .tp_bx, .n_oversize(n_over));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // fire strip s with end-A time ta and end-B time tb
  task automatic fire(input int s, input int ta, input int tb);
    row[ns].valid = 1; row[ns].d.chan = 8'(s); row[ns].d.fine = 12'(ta); row[ns].d.bx = row_bx; ns++;
    row[ns].valid = 1; row[ns].d.chan = 8'(s + 48); row[ns].d.fine = 12'(tb); row[ns].d.bx = row_bx; ns++;
  endtask
  task automatic expect_tp(input int i, input int strip, input int size, input int dt);
    int y;
    y = (dt * 157);
    y = (y >= 0) ? y / 256 : -((-y + 255) / 256);   // floor division
    chk(tp[i].valid, $sformatf("tp%0d valid", i));
    chk(tp[i].strip == 6'(strip), $sformatf("tp%0d strip %0d exp %0d", i, tp[i].strip, strip));
    chk(tp[i].size == 3'(size), $sformatf("tp%0d size %0d exp %0d", i, tp[i].size, size));
    chk(tp[i].dt == 13'(dt), $sformatf("tp%0d dt %0d exp %0d", i, tp[i].dt, dt));
    chk(tp[i].y == 12'(y), $sformatf("tp%0d y %0d exp %0d", i, tp[i].y, y));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    row = '0; row_bx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // pattern 1: cluster 10-12 (size 3, centre 11), single strip 30, strip 20 and 21
    // too far apart in time (two clusters of size 1), strip 5 with end A only.
    row = '0; ns = 0; row_bx = 12'd77;
    fire(10, 1000, 900); fire(11, 1100, 1300); fire(12, 1200, 1000);
    fire(20, 500, 700);  fire(21, 2000, 1000);
    fire(30, 3000, 100);
    row[ns].valid = 1; row[ns].d.chan = 8'd5; ns++;
    @(negedge clk);
    row = '0; row_bx = 12'd78;
    @(negedge clk);   // latency 2: results visible now
    chk(tp_bx == 12'd77, "tp_bx");
    expect_tp(0, 11, 3, 1100 - 1300);
    expect_tp(1, 20, 1, 500 - 700);
    expect_tp(2, 21, 1, 2000 - 1000);
    expect_tp(3, 30, 1, 3000 - 100);
    @(negedge clk);
    chk(tp[0].valid == 0, "empty row gives no TP");
    // pattern 2: cluster of 5 (too wide), cluster of 4 (centre s+1), cluster of 2 at the
    // top edge (centre 46), and 3 more singles beyond MAX_TP
    row = '0; ns = 0; row_bx = 12'd90;
    for (int s = 0; s < 5; s++) fire(s, 100 + s, 50);
    for (int s = 8; s < 12; s++) fire(s, 400, 400 - s);
    fire(46, 10, 4000); fire(47, 12, 0);
    @(negedge clk);
    row = '0;
    @(negedge clk);
    expect_tp(0, 9, 4, 400 - (400 - 9));
    expect_tp(1, 46, 2, 10 - 4000);
    chk(!tp[2].valid, "only two reported");
    chk(n_over == 16'd1, $sformatf("oversize %0d", n_over));
    // pattern 3: six separate singles, only MAX_TP reported
    row = '0; ns = 0;
    for (int s = 0; s < 6; s++) fire(2 + 4 * s, 0, 0);
    @(negedge clk); row = '0; @(negedge clk);
    for (int i = 0; i < MAXTP; i++) expect_tp(i, 2 + 4 * i, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
