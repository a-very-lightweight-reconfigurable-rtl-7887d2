// Main controller (MC) of the software engine.
//
// Runs instructions from one of two sources.  In host mode it takes each 32-bit word
// from the TX FIFO and executes it at once; EXERTN switches to program mode, in which
// it fetches words from program memory at the 9-bit program counter until a RET at
// stack level 0 returns to host mode.  Flow instructions (JMP, JMPFT, JMPFF, CALL,
// RET) are executed here; CALL pushes the return address on a 3-level, 9-bit
// hardware stack with a 2-bit stack pointer, and a fourth nested CALL is refused (it
// falls through and an assertion fires).  WRPGM writes the next TX word into program
// memory, RDPGM sends a program word to the RX FIFO.  Every arithmetic instruction is
// handed to the ALU controller (start, opcode, addresses, auxiliary byte, data) and
// the controller waits for its ready; the word fetched by READ is sent, zero
// extended, to the RX FIFO.  WRITE carries 16 data bits, zero extended on a wider
// datapath.  JMPFT / JMPFF test the flag left by the last CHKB or
// comparison.
//
// Timing: a program word is fetched in two cycles (address, then data); host words
// are taken from the FIFO without wait.  The stack sizes, counter widths and
// instruction names follow the published architecture; the fetch timing, the host
// mode and the overflow rule are this design's own.
module main_controller
  import microecc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // TX FIFO (host -> processor)
  input  logic [INSTR_W-1:0] tx_rdata,
  input  logic               tx_empty,
  output logic               tx_pop,
  // RX FIFO (processor -> host)
  output logic [INSTR_W-1:0] rx_wdata,
  output logic               rx_push,
  input  logic               rx_full,
  // program memory
  output logic               pm_we,
  output logic [PC_W-1:0]    pm_waddr,
  output logic [INSTR_W-1:0] pm_wdata,
  output logic [PC_W-1:0]    pm_raddr,
  input  logic [INSTR_W-1:0] pm_rdata,
  // modular ALU
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
  // status
  output logic               idle,        // waiting for a host word
  output logic               prog_mode,
  output logic [1:0]         stack_ptr
);
  typedef enum logic [3:0] {
    M_HOST, M_FETCH, M_FETCHW, M_EXEC, M_WRPGM, M_RDPGM, M_RDPGMW,
    M_ALU, M_ALUW, M_PUSH, M_NEXT
  } mstate_e;

  mstate_e              state;
  instr_t               ir;
  logic [PC_W-1:0]      pc;
  logic [PC_W-1:0]      stack [STACK_DEP];
  logic [1:0]           sp;
  logic [INSTR_W-1:0]   out_word;
  logic                 call_refused;
  logic                 pm_mode_q;      // running from program memory

  assign idle      = (state == M_HOST);
  assign prog_mode = pm_mode_q;
  assign stack_ptr = sp;

  // ALU instruction fields
  assign alu_op    = ir.op;
  assign alu_sel_a = ir.sel_a;
  assign alu_reg_a = ir.reg_a;
  assign alu_sel_b = ir.sel_b;
  assign alu_reg_b = ir.reg_b;
  assign alu_sel_r = ir.sel_r;
  assign alu_reg_r = ir.reg_r;
  assign alu_aux   = (ir.op == OP_CHKB) ? ir[7:0] : {4'b0000, ir[19:16]};
  assign alu_wdata = W'(ir[15:0]);
  assign alu_start = (state == M_ALU);

  assign tx_pop   = (state == M_HOST && !tx_empty) || (state == M_WRPGM && !tx_empty);
  assign pm_we    = (state == M_WRPGM) && !tx_empty;
  assign pm_waddr = ir[PC_W-1:0];
  assign pm_wdata = tx_rdata;
  assign pm_raddr = (state == M_RDPGM) ? ir[PC_W-1:0] : pc;
  assign rx_push  = (state == M_PUSH) && !rx_full;
  assign rx_wdata = out_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= M_HOST;
      ir           <= '0;
      pc           <= '0;
      sp           <= '0;
      pm_mode_q    <= 1'b0;
      out_word     <= '0;
      call_refused <= 1'b0;
      for (int i = 0; i < STACK_DEP; i++) stack[i] <= '0;
    end else begin
      call_refused <= 1'b0;
      unique case (state)
        M_HOST: if (!tx_empty) begin
          ir        <= instr_t'(tx_rdata);
          pm_mode_q <= 1'b0;
          state     <= M_EXEC;
        end
        M_FETCH:  state <= M_FETCHW;
        M_FETCHW: begin
          ir    <= instr_t'(pm_rdata);
          state <= M_EXEC;
        end
        M_EXEC: begin
          unique case (ir.op)
            OP_WRPGM: state <= M_WRPGM;
            OP_RDPGM: state <= M_RDPGM;
            OP_EXERTN: begin
              pc        <= ir[PC_W-1:0];
              sp        <= '0;
              pm_mode_q <= 1'b1;
              state     <= M_FETCH;
            end
            OP_JMP, OP_JMPFT, OP_JMPFF: begin
              if (ir.op == OP_JMP || (ir.op == OP_JMPFT) == alu_flag) begin
                pc    <= ir[PC_W-1:0];
                state <= pm_mode_q ? M_FETCH : M_HOST;
              end else begin
                state <= M_NEXT;
              end
            end
            OP_CALL: begin
              if (sp < 2'(STACK_DEP)) begin
                stack[sp] <= pc + 1'b1;
                sp        <= sp + 1'b1;
                pc        <= ir[PC_W-1:0];
                state     <= pm_mode_q ? M_FETCH : M_HOST;
              end else begin
                call_refused <= 1'b1;
                state        <= M_NEXT;
              end
            end
            OP_RET: begin
              if (sp == '0) begin
                pm_mode_q <= 1'b0;
                state     <= M_HOST;
              end else begin
                pc    <= stack[sp - 1'b1];
                sp    <= sp - 1'b1;
                state <= pm_mode_q ? M_FETCH : M_HOST;
              end
            end
            default: state <= is_alu_op(ir.op) ? M_ALU : M_NEXT;
          endcase
        end
        M_WRPGM: if (!tx_empty) state <= M_NEXT;
        M_RDPGM: state <= M_RDPGMW;
        M_RDPGMW: begin
          out_word <= pm_rdata;
          state    <= M_PUSH;
        end
        M_ALU: state <= M_ALUW;
        M_ALUW: begin
          if (alu_rd_valid) out_word <= INSTR_W'(alu_rd_data);
          if (alu_ready) state <= (ir.op == OP_READ) ? M_PUSH : M_NEXT;
        end
        M_PUSH: if (!rx_full) state <= M_NEXT;
        M_NEXT: begin
          if (pm_mode_q) begin
            pc    <= pc + 1'b1;
            state <= M_FETCH;
          end else begin
            state <= M_HOST;
          end
        end
        default: state <= M_HOST;
      endcase
    end
  end

  a_call_depth: assert property (@(posedge clk) disable iff (!rst_n) !call_refused);
endmodule
