// sc_sel: "SC Sel" of the BEB. It decodes the 32-bit address of each RBCP access (the
// SiTCP remote bus, one byte per access) and routes it to the BEB's own registers
// (BEE SC), to the FEE SC converter of one link, or to the GBT SC port, and returns that
// target's acknowledge and read byte. Address map (this design's choice):
//   [31:28] target: 0 BEE, 1 FEE, 2 GBT; other values are acknowledged with read data 0
//   [27:24] link    [22:20] FEB FPGA select (one bit per FPGA)    [16:1] 16-bit address
//   [0]     byte in the 16-bit word (0 = high byte)
// A target answers with a one-cycle ack; the RBCP master waits for it before the next
// access. Routing by address follows the document; the bit map is assumed.
module sc_sel #(
  parameter int unsigned N_LINKS = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        rbcp_addr,
  input  logic               rbcp_we,
  input  logic               rbcp_re,
  input  logic [7:0]         rbcp_wd,
  output logic               rbcp_ack,
  output logic [7:0]         rbcp_rd,
  // common fields to all targets
  output logic [15:0]        t_addr,
  output logic               t_bsel,
  output logic [2:0]         t_fpga,
  output logic [7:0]         t_wd,
  // BEE SC
  output logic               bee_we, bee_re,
  input  logic               bee_ack,
  input  logic [7:0]         bee_rd,
  // FEE SC, one per link
  output logic [N_LINKS-1:0] fee_we, fee_re,
  input  logic [N_LINKS-1:0] fee_ack,
  input  logic [7:0]         fee_rd [N_LINKS],
  // GBT SC
  output logic               gbt_we, gbt_re,
  input  logic               gbt_ack,
  input  logic [7:0]         gbt_rd
);
  logic [3:0] tgt, link;
  logic       other_ack;
  assign tgt    = rbcp_addr[31:28];
  assign link   = rbcp_addr[27:24];
  assign t_fpga = rbcp_addr[22:20];
  assign t_addr = rbcp_addr[16:1];
  assign t_bsel = rbcp_addr[0];
  assign t_wd   = rbcp_wd;

  assign bee_we = rbcp_we && tgt == 4'd0;
  assign bee_re = rbcp_re && tgt == 4'd0;
  assign gbt_we = rbcp_we && tgt == 4'd2;
  assign gbt_re = rbcp_re && tgt == 4'd2;
  always_comb
    for (int l = 0; l < N_LINKS; l++) begin
      fee_we[l] = rbcp_we && tgt == 4'd1 && link == 4'(l);
      fee_re[l] = rbcp_re && tgt == 4'd1 && link == 4'(l);
    end

  always_ff @(posedge clk)
    if (!rst_n) other_ack <= 1'b0;
    else other_ack <= (rbcp_we || rbcp_re) &&
                      !(tgt == 4'd0 || tgt == 4'd2 || (tgt == 4'd1 && 32'(link) < N_LINKS));

  always_comb begin
    rbcp_ack = bee_ack || gbt_ack || other_ack;
    rbcp_rd  = bee_ack ? bee_rd : gbt_ack ? gbt_rd : 8'h00;
    for (int l = 0; l < N_LINKS; l++) begin
      rbcp_ack = rbcp_ack || fee_ack[l];
      if (fee_ack[l]) rbcp_rd = fee_rd[l];
    end
  end
endmodule
