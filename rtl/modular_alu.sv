// Modular ALU: the arithmetic half of the processor.
//
// Groups the ALU controller, the word-serial datapath ("16-bit ALU"), the data
// memory controller and the two dual-port data memories DM A and DM B as in the
// published block diagram.  The main controller hands it one instruction at a time
// (start, opcode, three register addresses with their memory selects, an auxiliary
// byte and a data word); ready returns high when the instruction has finished, flag
// holds the outcome of the last CHKB or comparison, and rd_valid/rd_data return the
// word fetched by READ.  The datapath's second operand is OP B, the prime p or zero,
// chosen by the controller; that multiplexer sits here.
module modular_alu
  import microecc_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter int unsigned NBITS   = 256,
  parameter int unsigned DM_WORDS = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  opcode_e          op,
  input  logic             sel_a,
  input  logic [REG_W-1:0] reg_a,
  input  logic             sel_b,
  input  logic [REG_W-1:0] reg_b,
  input  logic             sel_r,
  input  logic [REG_W-1:0] reg_r,
  input  logic [7:0]       aux,
  input  logic [W-1:0]     mc_wdata,
  output logic             ready,
  output logic             flag,
  output logic             rd_valid,
  output logic [W-1:0]     rd_data,
  output logic [15:0]      n_corr_sub,
  output logic [15:0]      n_corr_add,
  output logic [15:0]      n_stall
);
  logic [3:0]       ch_en, ch_sel;
  logic [DM_AW-1:0] ch_addr [4];
  logic             wr_from_mc;
  logic [W-1:0]     op_a, op_b, op_p, dp_b;
  dp_cmd_t          dp_cmd;
  logic [1:0]       dp_bsrc;
  logic             dp_valid, dp_cout;
  logic [W-1:0]     dp_result;

  logic             mem_en    [2][2];
  logic             mem_we    [2][2];
  logic [DM_AW-1:0] mem_addr  [2][2];
  logic [W-1:0]     mem_wdata [2][2];
  logic [W-1:0]     mem_rdata [2][2];

  alu_ctrl #(.W(W), .NBITS(NBITS)) u_alu_ctrl (
    .clk, .rst_n, .start, .op, .sel_a, .reg_a, .sel_b, .reg_b, .sel_r, .reg_r, .aux,
    .mc_wdata, .ready, .flag, .rd_valid, .rd_data,
    .ch_en, .ch_sel, .ch_addr, .wr_from_mc, .dm_op_a(op_a), .dm_op_b(op_b),
    .dp_cmd, .dp_bsrc, .dp_valid, .dp_result, .dp_cout,
    .n_corr_sub, .n_corr_add, .n_stall);

  always_comb begin
    unique case (dp_bsrc)
      2'd0:    dp_b = op_b;
      2'd1:    dp_b = op_p;
      default: dp_b = '0;
    endcase
  end

  alu_datapath #(.W(W)) u_alu (
    .clk, .rst_n, .cmd(dp_cmd), .op_a, .op_b(dp_b),
    .res_valid(dp_valid), .result(dp_result), .cout(dp_cout), .acc_zero());

  dm_ctrl #(.W(W), .AW(DM_AW)) u_dm_ctrl (
    .clk, .rst_n, .ch_en, .ch_sel, .ch_addr, .wr_from_mc,
    .alu_result(dp_result), .mc_wdata, .op_a, .op_b, .op_p,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  for (genvar m = 0; m < 2; m++) begin : g_dm
    data_memory #(.W(W), .DEPTH(DM_WORDS), .AW(DM_AW)) u_dm (
      .clk,
      .en_a(mem_en[m][0]), .we_a(mem_we[m][0]), .addr_a(mem_addr[m][0]),
      .wdata_a(mem_wdata[m][0]), .rdata_a(mem_rdata[m][0]),
      .en_b(mem_en[m][1]), .we_b(mem_we[m][1]), .addr_b(mem_addr[m][1]),
      .wdata_b(mem_wdata[m][1]), .rdata_b(mem_rdata[m][1]));
  end
endmodule
