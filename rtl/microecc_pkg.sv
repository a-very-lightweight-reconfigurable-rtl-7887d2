// MicroECC shared definitions.
//
// Holds the instruction set of the processor, the instruction word layout and the
// fixed data-memory locations that the arithmetic controller uses for the curve
// constants.  The instruction names (WRPGM ... CMPLO), the 9-bit program counter, the
// 32-bit host and program word, the 6-bit register address sent from the main
// controller, the 10-bit data-memory address and the 16-bit datapath follow the
// published architecture.  The numeric opcode values, the bit layout of an
// instruction word and the register numbers of the constants are this design's own.
//
// Addressing: a data-memory word address is {reg[5:0], word[3:0]}.  A register holds
// one 256-bit field element as 16 words of 16 bits, least significant word at word 0.
// Every operand also carries a one-bit memory select (0 = DM A, 1 = DM B).
package microecc_pkg;

  localparam int unsigned PC_W      = 9;   // program counter / program memory address
  localparam int unsigned INSTR_W   = 32;  // host word and program word
  localparam int unsigned REG_W     = 6;   // register address from the main controller
  localparam int unsigned DM_AW     = 10;  // data-memory word address
  localparam int unsigned STACK_DEP = 3;   // hardware call stack depth

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    // program flow, handled by the main controller
    OP_WRPGM  = 5'd1,   // next host word is written to program memory [8:0]
    OP_RDPGM  = 5'd2,   // program memory [8:0] is sent to the host
    OP_EXERTN = 5'd3,   // execute the routine starting at [8:0]
    OP_JMPFT  = 5'd4,   // jump to [8:0] if flag set
    OP_JMPFF  = 5'd5,   // jump to [8:0] if flag clear
    OP_JMP    = 5'd6,   // jump to [8:0]
    OP_CALL   = 5'd7,   // call [8:0], 3-level stack
    OP_RET    = 5'd8,   // return; at stack level 0 the routine ends
    // arithmetic and logic unit, handled by the ALU controller
    OP_CHKB   = 5'd16,  // flag = bit [7:0] of register A
    OP_WRITE  = 5'd17,  // register R word [19:16] = [15:0]
    OP_READ   = 5'd18,  // register R word [19:16] is sent to the host
    OP_MOVE   = 5'd19,  // R = A
    OP_MADD   = 5'd20,  // R = A + B mod p
    OP_MSUB   = 5'd21,  // R = A - B mod p
    OP_MMUL   = 5'd22,  // R = A * B mod p (NIST fast reduction)
    OP_CMPGR  = 5'd23,  // flag = A > B
    OP_CMPEQ  = 5'd24,  // flag = A == B
    OP_CMPLO  = 5'd25   // flag = A < B
  } opcode_e;

  // Three-operand instruction word:
  //   [31:27] opcode  [26] selR [25:20] regR  [19] selA [18:13] regA
  //   [12] selB [11:6] regB  [5:0] unused
  // Flow instructions: [8:0] program address.
  // WRITE / READ:      [26] sel [25:20] reg [19:16] word [15:0] data (WRITE only)
  // CHKB:              [19] selA [18:13] regA [7:0] bit index
  typedef struct packed {
    opcode_e    op;
    logic       sel_r;
    logic [5:0] reg_r;
    logic       sel_a;
    logic [5:0] reg_a;
    logic       sel_b;
    logic [5:0] reg_b;
    logic [5:0] unused;
  } instr_t;

  // Fixed locations of the curve constants in the data memories (select, register).
  // P_REG:    the prime p.
  // COMP_REG: the reduction compensation constant, see alu_ctrl.
  // TBL_REG:  first of eight registers holding the fast-reduction term table.
  // CFG_REG:  word 0 holds the operand length in words (16 for P-256, 14 for P-224).
  // SCR_REG:  first of two scratch registers receiving the double-size product.
  localparam logic       P_SEL    = 1'b0;
  localparam logic [5:0] P_REG    = 6'd0;
  localparam logic       COMP_SEL = 1'b1;
  localparam logic [5:0] COMP_REG = 6'd0;
  localparam logic       TBL_SEL  = 1'b0;
  localparam logic [5:0] TBL_REG  = 6'd56;
  localparam logic       CFG_SEL  = 1'b0;
  localparam logic [5:0] CFG_REG  = 6'd55;
  localparam logic       SCR_SEL  = 1'b1;
  localparam logic [5:0] SCR_REG  = 6'd62;

  // Datapath command, issued by the ALU controller one per cycle (see alu_datapath).
  typedef enum logic [2:0] {
    DP_NOP  = 3'd0,
    DP_CLR  = 3'd1,   // clear the carry-save accumulator
    DP_MAC  = 3'd2,   // accumulator += A * B
    DP_ACCW = 3'd3,   // accumulator += A, or += 2^W - A when sub is set
    DP_EMIT = 3'd4,   // result = low word of accumulator (+ carry), accumulator >>= W
    DP_ADD  = 3'd5    // result = A + B + carry, or A - B - borrow when sub is set
  } dp_op_e;

  typedef struct packed {
    dp_op_e op;
    logic   sub;     // ADD/SUB line of the datapath
    logic   first;   // first word of a chain: carry in is 0
  } dp_cmd_t;

  function automatic logic is_alu_op(opcode_e op);
    return op >= OP_CHKB;
  endfunction

endpackage
