// tb_ring_buffer: writes a known function of the BX counter every cycle and reads back at
// random ages (address offsets); the value one cycle later must be the one written
// 'age' cycles before the read was issued.
module tb_ring_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int D = 512;
  logic [8:0] waddr = '0, raddr = '0;
  logic [98:0] wdata, rdata;
  int checks = 0, failures = 0;
  int cyc = 0;
  ring_buffer #(.WIDTH(99), .DEPTH(D)) dut (.clk, .we(1'b1), .waddr, .wdata, .raddr, .rdata);
  function automatic logic [98:0] pat(input int t);
    return {3'(t), 32'(t * 7 + 1), 32'(t ^ 32'h5a5a), 32'(t)};
  endfunction
  assign wdata = pat(cyc);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // a read issued at edge k is registered at edge k+1 and checked at edge k+2
  int exp_t, exp_t2;
  bit pend = 0, pend2 = 0;
  always @(posedge clk) begin
    if (pend2) begin
      checks++;
      if (rdata !== pat(exp_t2)) begin failures++; $display("FAIL age read t=%0d", exp_t2); end
    end
    pend2 = pend; exp_t2 = exp_t;
    pend = 0;
    if (cyc > D) begin
      int age;
      age = $urandom_range(1, D - 1);
      raddr <= 9'(cyc - age);
      exp_t = cyc - age;
      pend = 1;
    end
    waddr <= waddr + 1'b1;
    cyc <= cyc + 1;
    if (cyc == 3 * D) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
