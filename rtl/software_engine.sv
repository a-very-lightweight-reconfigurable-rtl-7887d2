// Software engine: the main controller and its program memory.
//
// Executes the embedded program (512 words of 32 bits) or host words arriving from
// the TX FIFO, and drives the modular ALU one instruction at a time; see
// main_controller for the instruction handling.  The split into main controller and
// program memory, the 9-bit write and read addresses and the 32-bit program word
// follow the published block diagram.
module software_engine
  import microecc_pkg::*;
#(
  parameter int unsigned W        = 16,
  parameter int unsigned PM_WORDS = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [INSTR_W-1:0] tx_rdata,
  input  logic               tx_empty,
  output logic               tx_pop,
  output logic [INSTR_W-1:0] rx_wdata,
  output logic               rx_push,
  input  logic               rx_full,
  output logic               alu_start,
  output opcode_e            alu_op,
  output logic               alu_sel_a,
  output logic [REG_W-1:0]   alu_reg_a,
  output logic               alu_sel_b,
  output logic [REG_W-1:0]   alu_reg_b,
  output logic               alu_sel_r,
  output logic [REG_W-1:0]   alu_reg_r,
  output logic [7:0]         alu_aux,
  output logic [W-1:0]       alu_wdata,
  input  logic               alu_ready,
  input  logic               alu_flag,
  input  logic               alu_rd_valid,
  input  logic [W-1:0]       alu_rd_data,
  output logic               idle,
  output logic               prog_mode,
  output logic [1:0]         stack_ptr
);
  logic               pm_we;
  logic [PC_W-1:0]    pm_waddr, pm_raddr;
  logic [INSTR_W-1:0] pm_wdata, pm_rdata;

  main_controller #(.W(W)) u_mc (
    .clk, .rst_n, .tx_rdata, .tx_empty, .tx_pop, .rx_wdata, .rx_push, .rx_full,
    .pm_we, .pm_waddr, .pm_wdata, .pm_raddr, .pm_rdata,
    .alu_start, .alu_op, .alu_sel_a, .alu_reg_a, .alu_sel_b, .alu_reg_b,
    .alu_sel_r, .alu_reg_r, .alu_aux, .alu_wdata, .alu_ready, .alu_flag,
    .alu_rd_valid, .alu_rd_data, .idle, .prog_mode, .stack_ptr);

  program_memory #(.W(INSTR_W), .DEPTH(PM_WORDS), .AW(PC_W)) u_pm (
    .clk, .we(pm_we), .wr_addr(pm_waddr), .wr_data(pm_wdata),
    .rd_addr(pm_raddr), .rd_data(pm_rdata));
endmodule
