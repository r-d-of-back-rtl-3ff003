// tb_tdc_demux: drives up to three TDC data per BX whose BX stamps lie 0..DEPTH+4 BX in
// the past, as the FEB's channel-sorted output would. A queue model predicts, for each
// output row, the hits generated in that BX: every hit with delay <= DEPTH-2 must come
// out exactly once, in the row of its own BX, DEPTH cycles after a zero-delay arrival
// (fixed latency); later hits must be counted as late. A burst of 12 hits of one BX
// checks that a row keeps SLOTS=8 and counts the other 4 as overflow.
module tb_tdc_demux;
  import irpc_pkg::*;
  localparam int DEPTH = 16, SLOTS = 8;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic [11:0] bcn = 0;
  tdc_hit_t [2:0] hin;
  tdc_hit_t [SLOTS-1:0] row;
  logic [11:0] row_bx;
  logic [15:0] n_late, n_full;
  int checks = 0, failures = 0;
  int exp_late = 0, exp_full = 0;
  int pending [int];   // key: bx*256 + chan -> count of expected outputs
  int n_in = 0, n_out = 0;

  tdc_demux #(.DEPTH(DEPTH), .SLOTS(SLOTS)) dut (.clk, .rst_n, .flush, .bcn, .hits_in(hin),
    .row_out(row), .row_bx, .n_late, .n_full);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @bcn %0d", what, bcn); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // output monitor: every valid slot must be an expected hit of BX row_bx
  bit mon_on = 0;
  always @(negedge clk) if (mon_on) begin
    for (int k = 0; k < SLOTS; k++) if (row[k].valid) begin
      int key;
      key = int'(row[k].d.bx) * 256 + int'(row[k].d.chan);
      chk(row[k].d.bx == row_bx, "hit in wrong row");
      chk(pending.exists(key) && pending[key] > 0, "unexpected hit");
      if (pending.exists(key)) pending[key]--;
      n_out++;
    end
  end

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    bcn <= (bcn == 12'd3563) ? 12'd0 : bcn + 1'b1;
    cyc <= cyc + 1;
  end

  int lat_t0 = -1, lat_seen = -1;
  initial begin
    hin = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    mon_on = 1;
    // random traffic; BX stamps wrap around the orbit boundary as well
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      hin = '0;
      for (int i = 0; i < 3; i++) if ($urandom_range(0, 2) == 0) begin
        int d, b;
        d = $urandom_range(0, DEPTH + 4);
        b = int'(bcn) - d; if (b < 0) b += 3564;
        hin[i].valid  = 1;
        hin[i].d.bx   = 12'(b);
        hin[i].d.chan = 8'(cyc * 3 + i);     // unique per (bx, chan) inside a window
        hin[i].d.fine = 12'($urandom);
        if (d <= DEPTH - 2) begin
          int key;
          key = b * 256 + int'(hin[i].d.chan);
          if (pending.exists(key)) pending[key]++; else pending[key] = 1;
          n_in++;
        end else exp_late++;
      end
    end
    @(negedge clk) hin = '0;
    repeat (DEPTH + 2) @(negedge clk);
    chk(n_in == n_out, $sformatf("count in %0d out %0d", n_in, n_out));
    chk(n_late == 16'(exp_late), "late counter");
    chk(n_full == 0, "no overflow under light load");
    // latency: one zero-delay hit
    @(negedge clk);
    hin = '0; hin[2].valid = 1; hin[2].d.bx = bcn; hin[2].d.chan = 8'd200;
    pending[int'(bcn) * 256 + 200] = 1; n_in++;
    lat_t0 = cyc;
    @(negedge clk) hin = '0;
    while (!(row[0].valid && row[0].d.chan == 8'd200)) @(negedge clk);
    lat_seen = cyc;
    chk(lat_seen - lat_t0 == DEPTH, $sformatf("latency %0d", lat_seen - lat_t0));
    // overflow: 12 hits of the same BX
    @(negedge clk);
    begin
      int b;
      b = int'(bcn) - 2; if (b < 0) b += 3564;
      for (int f = 0; f < 4; f++) begin
        for (int i = 0; i < 3; i++) begin
          hin[i].valid = 1; hin[i].d.bx = 12'(b); hin[i].d.chan = 8'(f * 3 + i);
          if (f * 3 + i < SLOTS) pending[b * 256 + f * 3 + i] = 1;
        end
        @(negedge clk);
      end
    end
    hin = '0;
    repeat (DEPTH + 2) @(negedge clk);
    chk(n_full == 16'd4, $sformatf("overflow counter %0d", n_full));
    foreach (pending[k]) chk(pending[k] == 0, $sformatf("hit never output %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
