// MicroECC: a small reconfigurable elliptic-curve crypto-processor (top level).
//
// The host talks to the processor through two 32-bit FIFOs: it pushes instruction
// words (and the program words that follow WRPGM) into the TX FIFO and pops the words
// produced by READ and RDPGM from the RX FIFO.  Inside, the software engine (main
// controller and program memory) runs the instructions and hands every arithmetic
// one to the modular ALU, which works on 256-bit field elements stored as 16-bit
// words in two dual-port data memories.  The curve is chosen entirely by what the
// host loads into the data memories (the prime, the reduction term table and its
// compensation constant), so the same hardware serves any NIST prime whose fast
// reduction fits the table.
//
// busy is high while a host word is queued or being executed (it covers a whole
// routine started by EXERTN).  Ports are plain signals.  The counters n_* count internal events (corrections,
// write-back stalls) for tests; prog_mode and stack_ptr show the main controller's
// state.  Structure and widths follow the published block diagram; FIFO depth is
// this design's choice.
module microecc_top
  import microecc_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter int unsigned NBITS      = 256,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned PM_WORDS   = 512,
  parameter int unsigned DM_WORDS   = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side of the TX FIFO
  input  logic               tx_push,
  input  logic [INSTR_W-1:0] tx_wdata,
  output logic               tx_full,
  // host side of the RX FIFO
  input  logic               rx_pop,
  output logic [INSTR_W-1:0] rx_rdata,
  output logic               rx_empty,
  // status
  output logic               busy,
  output logic               prog_mode,
  output logic [1:0]         stack_ptr,
  output logic               flag,
  output logic [15:0]        n_corr_sub,
  output logic [15:0]        n_corr_add,
  output logic [15:0]        n_stall
);

  logic [INSTR_W-1:0] tx_rdata, rx_wdata;
  logic               tx_empty, tx_pop, rx_push, rx_full;

  logic               alu_start, alu_sel_a, alu_sel_b, alu_sel_r;
  opcode_e            alu_op;
  logic [REG_W-1:0]   alu_reg_a, alu_reg_b, alu_reg_r;
  logic [7:0]         alu_aux;
  logic [W-1:0]       alu_wdata, alu_rd_data;
  logic               alu_ready, alu_rd_valid, se_idle;

  sync_fifo #(.W(INSTR_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .push(tx_push), .wdata(tx_wdata), .full(tx_full),
    .pop(tx_pop), .rdata(tx_rdata), .empty(tx_empty), .count());

  sync_fifo #(.W(INSTR_W), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .push(rx_push), .wdata(rx_wdata), .full(rx_full),
    .pop(rx_pop), .rdata(rx_rdata), .empty(rx_empty), .count());

  software_engine #(.W(W), .PM_WORDS(PM_WORDS)) u_se (
    .clk, .rst_n, .tx_rdata, .tx_empty, .tx_pop, .rx_wdata, .rx_push, .rx_full,
    .alu_start, .alu_op, .alu_sel_a, .alu_reg_a, .alu_sel_b, .alu_reg_b,
    .alu_sel_r, .alu_reg_r, .alu_aux, .alu_wdata, .alu_ready, .alu_flag(flag),
    .alu_rd_valid, .alu_rd_data, .idle(se_idle), .prog_mode, .stack_ptr);

  modular_alu #(.W(W), .NBITS(NBITS), .DM_WORDS(DM_WORDS)) u_malu (
    .clk, .rst_n, .start(alu_start), .op(alu_op),
    .sel_a(alu_sel_a), .reg_a(alu_reg_a), .sel_b(alu_sel_b), .reg_b(alu_reg_b),
    .sel_r(alu_sel_r), .reg_r(alu_reg_r), .aux(alu_aux), .mc_wdata(alu_wdata),
    .ready(alu_ready), .flag, .rd_valid(alu_rd_valid), .rd_data(alu_rd_data),
    .n_corr_sub, .n_corr_add, .n_stall);

  assign busy = !tx_empty || !se_idle;
endmodule
