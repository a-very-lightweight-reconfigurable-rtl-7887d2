// ALU controller (ALU CTRL): the state machines that carry out each arithmetic
// instruction word by word.
//
// An instruction arrives from the main controller with start, its opcode, the
// register addresses and memory selects of OP A, OP B and the result, and an
// auxiliary byte (word index of WRITE/READ, bit index of CHKB).  ready is high while
// the controller is idle; flag holds the outcome of the last CHKB or comparison.
//
// Every cycle the controller may issue one "step": up to three data-memory reads
// (channels OP A, OP B, p), a datapath command that is applied one cycle later when
// the read data arrive, and a tag that travels with the step and, three cycles after
// issue, writes the datapath result back (channel "result") and records its carry,
// whether it was zero, or the final carry of a reduction.  A write-back takes one
// port of its memory, so a step that would read that memory twice in the same cycle
// is held back one cycle ("stall"); this keeps every memory within its two ports.
// Between phases that read what the previous phase wrote, the pipeline is drained.
//
// Operands are n words long.  n is NBITS / W after reset (16 for 256 bits on the
// 16-bit datapath) and is replaced by the value of any WRITE to the configuration
// word (CFG_SEL, CFG_REG, word 0), which also stores it in memory.  Together with the
// prime, table and constant in memory this switches the curve (14 words for P-224)
// by software alone.
//
// Instructions:
//  * MOVE, MADD, MSUB, CMPxx: one pass over the n words through the carry-select
//    adder (MOVE adds zero; compares do not write and look at borrow and zero).
//  * MMUL: product scanning (for each column k, all a[i]*b[k-i] are accumulated,
//    then one result word is emitted into two scratch registers), followed by the
//    NIST fast reduction driven by a term table in DM: for each output word j the
//    controller adds word j of the compensation constant, then every table entry of
//    that column (a word index into the product and an add/subtract bit), and emits
//    result word j.  Table entries are read on the OP B channel one step ahead of
//    their use, so one term is added per cycle.  A subtracted term x is added as 2^W - x, which keeps all
//    sums non-negative; the table's author folds the resulting fixed excess into the
//    compensation constant (-sum_j nsub_j * 2^(W(j+1))) mod p.  The leftover top
//    carry ("hi") is then removed by correction.
//  * Correction (MADD, MSUB, MMUL): while hi > 0 subtract p, while hi < 0 add p;
//    when hi = 0 a trial subtraction without write-back decides whether one more
//    subtraction of p is needed.  The result is fully reduced, 0 <= r < p.
// Table entry format: [15] last term of the column, [14] subtract, [5:0] word index.
//
// Reading the reduction recipe, the constants and the table from the data memories
// follows the published text ("data memories store constants, variables and
// instructions for the fast reduction algorithm"); the table format, the
// compensation constant, the issue and stall rules, and the correction loop are this
// design's own.
module alu_ctrl
  import microecc_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned NBITS = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  // main controller
  input  logic               start,
  input  opcode_e            op,
  input  logic               sel_a,
  input  logic [REG_W-1:0]   reg_a,
  input  logic               sel_b,
  input  logic [REG_W-1:0]   reg_b,
  input  logic               sel_r,
  input  logic [REG_W-1:0]   reg_r,
  input  logic [7:0]         aux,
  input  logic [W-1:0]       mc_wdata,
  output logic               ready,
  output logic               flag,
  output logic               rd_valid,
  output logic [W-1:0]       rd_data,
  // data memory controller
  output logic [3:0]         ch_en,
  output logic [3:0]         ch_sel,
  output logic [DM_AW-1:0]   ch_addr [4],
  output logic               wr_from_mc,
  input  logic [W-1:0]       dm_op_a,
  input  logic [W-1:0]       dm_op_b,     // reduction table entries arrive here
  // datapath
  output dp_cmd_t            dp_cmd,
  output logic [1:0]         dp_bsrc,     // 0 = OP B, 1 = p, 2 = zero
  input  logic               dp_valid,
  input  logic [W-1:0]       dp_result,
  input  logic               dp_cout,
  // activity counters for tests
  output logic [15:0]        n_corr_sub,  // correction subtractions of p
  output logic [15:0]        n_corr_add,  // correction additions of p
  output logic [15:0]        n_stall      // issue cycles lost to write-back
);
  localparam int unsigned NW = NBITS / W;
  localparam int unsigned IW = $clog2(2 * NW) + 1;
  localparam int unsigned LW = $clog2(W);   // CHKB: bit index = {word, bit in word}

  // operand length in words; set by a WRITE to the configuration word
  logic [IW-1:0] nw_q, nw_m1;
  assign nw_m1 = nw_q - 1'b1;

  typedef enum logic [4:0] {
    S_IDLE, S_WRITE, S_READ, S_READW, S_CHKB, S_CHKBW,
    S_PASS, S_PASSW, S_POST,
    S_MUL_CLR, S_MUL, S_MUL_EMIT, S_MUL_LAST, S_MUL_W,
    S_RED_CLR, S_RED_COMP, S_RED_TERM, S_RED_EMIT, S_RED_HI, S_RED_W,
    S_CORR, S_DONE
  } state_e;

  typedef enum logic [2:0] {
    PH_MOVE, PH_ADDSUB, PH_CMP, PH_CORR_SUB, PH_CORR_ADD, PH_TRIAL, PH_TRIAL_SUB
  } phase_e;

  typedef struct packed {
    logic              v;      // step in flight
    logic              we;     // write result back
    logic              sel;
    logic [DM_AW-1:0]  addr;
    logic              last;   // record carry
    logic              obs;    // record nonzero
    logic              hi;     // record reduction top carry
  } tag_t;

  typedef struct packed {
    dp_cmd_t    cmd;
    logic [1:0] bsrc;
  } dstep_t;

  function automatic logic [DM_AW-1:0] wa(logic [REG_W-1:0] r, logic [IW-1:0] i);
    return {r, 4'b0000} + DM_AW'(i);
  endfunction

  state_e              state;
  phase_e              phase;
  opcode_e             op_q;
  logic                sa, sb, sr;
  logic [REG_W-1:0]    ra, rb, rr;
  logic [7:0]          aux_q;
  logic [IW-1:0]       i_cnt, k_cnt, j_cnt;
  logic [7:0]          t_cnt;       // table pointer
  logic [W-1:0]        entry;       // current table entry, when not live
  logic                ent_live;    // the entry read last cycle is on dm_op_b now
  logic [W-1:0]        cur_entry;
  logic signed [7:0]   hi;
  logic                pass_cout, pass_nz;
  // pass description
  logic                p_xsel, p_dsel, p_sub, p_we;
  logic [REG_W-1:0]    p_xreg, p_dreg;
  logic [1:0]          p_bsrc;

  tag_t   tq1, tq2, tq3;
  dstep_t dq1;
  logic   stall, pend;
  logic [1:0] nrd;

  // issue bundle
  logic   iss;
  dp_cmd_t icmd;
  logic [1:0] ibsrc;
  tag_t   itag;
  logic [2:0]        ird_en, ird_sel;
  logic [DM_AW-1:0]  ird_addr [3];

  assign cur_entry = ent_live ? dm_op_b : entry;
  assign pend  = tq1.v || tq2.v || tq3.v;
  assign ready = (state == S_IDLE);

  // last row index of product column k
  logic [IW-1:0] i_hi;
  assign i_hi = (k_cnt >= nw_m1) ? nw_m1 : k_cnt;

  // ------------------------------------------------------------------ issue logic
  always_comb begin
    iss      = 1'b0;
    icmd     = '{op: DP_NOP, sub: 1'b0, first: 1'b0};
    ibsrc    = 2'd0;
    itag     = '0;
    ird_en   = '0;
    ird_sel  = '0;
    for (int c = 0; c < 3; c++) ird_addr[c] = '0;
    begin
      unique case (state)
        S_READ, S_CHKB: begin
          ird_en[0]   = 1'b1;
          ird_sel[0]  = (state == S_READ) ? sr : sa;
          ird_addr[0] = (state == S_READ) ? wa(rr, IW'(aux_q[3:0])) : wa(ra, IW'(aux_q >> LW));
        end
        S_PASS: begin
          iss         = 1'b1;
          ird_en[0]   = 1'b1;
          ird_sel[0]  = p_xsel;
          ird_addr[0] = wa(p_xreg, i_cnt);
          if (p_bsrc == 2'd0) begin
            ird_en[1] = 1'b1; ird_sel[1] = sb; ird_addr[1] = wa(rb, i_cnt);
          end else if (p_bsrc == 2'd1) begin
            ird_en[2] = 1'b1; ird_sel[2] = P_SEL; ird_addr[2] = wa(P_REG, i_cnt);
          end
          icmd  = '{op: DP_ADD, sub: p_sub, first: (i_cnt == '0)};
          ibsrc = p_bsrc;
          itag  = '{v: 1'b1, we: p_we, sel: p_dsel, addr: wa(p_dreg, i_cnt),
                    last: (i_cnt == nw_m1), obs: 1'b1, hi: 1'b0};
        end
        S_MUL_CLR, S_RED_CLR: begin
          iss  = 1'b1;
          icmd = '{op: DP_CLR, sub: 1'b0, first: 1'b0};
          itag = '{v: 1'b1, default: '0};
        end
        S_MUL: begin
          iss         = 1'b1;
          ird_en[0]   = 1'b1; ird_sel[0] = sa; ird_addr[0] = wa(ra, i_cnt);
          ird_en[1]   = 1'b1; ird_sel[1] = sb; ird_addr[1] = wa(rb, k_cnt - i_cnt);
          icmd        = '{op: DP_MAC, sub: 1'b0, first: 1'b0};
          itag        = '{v: 1'b1, default: '0};
        end
        S_MUL_EMIT, S_MUL_LAST: begin
          iss  = 1'b1;
          icmd = '{op: DP_EMIT, sub: 1'b0, first: (k_cnt == '0)};
          itag = '{v: 1'b1, we: 1'b1, sel: SCR_SEL, addr: wa(SCR_REG, k_cnt),
                   last: 1'b0, obs: 1'b0, hi: 1'b0};
        end
        S_RED_COMP: begin
          iss         = 1'b1;
          ird_en[0]   = 1'b1; ird_sel[0] = COMP_SEL; ird_addr[0] = wa(COMP_REG, j_cnt);
          ird_en[1]   = 1'b1; ird_sel[1] = TBL_SEL;  ird_addr[1] = {TBL_REG, 4'b0000} + DM_AW'(t_cnt);
          icmd        = '{op: DP_ACCW, sub: 1'b0, first: 1'b0};
          itag        = '{v: 1'b1, default: '0};
        end
        S_RED_TERM: begin
          iss         = 1'b1;
          ird_en[0]   = 1'b1; ird_sel[0] = SCR_SEL;
          ird_addr[0] = wa(SCR_REG, IW'(cur_entry[5:0]));
          icmd        = '{op: DP_ACCW, sub: cur_entry[14], first: 1'b0};
          itag        = '{v: 1'b1, default: '0};
          if (!cur_entry[15]) begin           // prefetch the next entry
            ird_en[1] = 1'b1; ird_sel[1] = TBL_SEL; ird_addr[1] = {TBL_REG, 4'b0000} + DM_AW'(t_cnt);
          end
        end
        S_RED_EMIT: begin
          iss  = 1'b1;
          icmd = '{op: DP_EMIT, sub: 1'b0, first: (j_cnt == '0)};
          itag = '{v: 1'b1, we: 1'b1, sel: sr, addr: wa(rr, j_cnt),
                   last: 1'b0, obs: 1'b0, hi: 1'b0};
        end
        S_RED_HI: begin
          iss  = 1'b1;
          icmd = '{op: DP_EMIT, sub: 1'b0, first: 1'b0};
          itag = '{v: 1'b1, we: 1'b0, sel: 1'b0, addr: '0, last: 1'b0, obs: 1'b0, hi: 1'b1};
        end
        default: ;
      endcase
    end
    // A write-back landing now takes one port of its memory: hold the step if it
    // would read that memory twice as well.
    nrd = '0;
    for (int c = 0; c < 3; c++) nrd += 2'(ird_en[c] && ird_sel[c] == tq3.sel);
    stall = tq3.v && tq3.we && nrd >= 2'd2;
    if (stall) begin
      iss    = 1'b0;
      ird_en = '0;
    end
  end

  // channel outputs: reads now, write from the tag that lands now
  always_comb begin
    ch_en      = {tq3.v && tq3.we, ird_en};
    ch_sel     = {tq3.sel, ird_sel};
    ch_addr[0] = ird_addr[0];
    ch_addr[1] = ird_addr[1];
    ch_addr[2] = ird_addr[2];
    ch_addr[3] = tq3.addr;
    wr_from_mc = 1'b0;
    if (state == S_WRITE) begin
      ch_en[3]   = 1'b1;
      ch_sel[3]  = sr;
      ch_addr[3] = wa(rr, IW'(aux_q[3:0]));
      wr_from_mc = 1'b1;
    end
  end

  assign dp_cmd  = dq1.cmd;
  assign dp_bsrc = dq1.bsrc;

  // ------------------------------------------------------------------ step pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq1 <= '0; tq2 <= '0; tq3 <= '0;
      dq1 <= '{cmd: '{op: DP_NOP, sub: 1'b0, first: 1'b0}, bsrc: 2'd0};
    end else begin
      dq1 <= iss ? '{cmd: icmd, bsrc: ibsrc}
                 : '{cmd: '{op: DP_NOP, sub: 1'b0, first: 1'b0}, bsrc: 2'd0};
      tq1 <= iss ? itag : '0;
      tq2 <= tq1;
      tq3 <= tq2;
    end
  end

  // ------------------------------------------------------------------ control
  task automatic start_pass(input phase_e ph, input logic xs, input logic [REG_W-1:0] xr,
                            input logic [1:0] bs, input logic ds, input logic [REG_W-1:0] dr,
                            input logic sub, input logic we);
    phase     <= ph;
    p_xsel    <= xs;
    p_xreg    <= xr;
    p_bsrc    <= bs;
    p_dsel    <= ds;
    p_dreg    <= dr;
    p_sub     <= sub;
    p_we      <= we;
    i_cnt     <= '0;
    pass_nz   <= 1'b0;
    state     <= S_PASS;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; phase <= PH_MOVE; op_q <= OP_NOP;
      sa <= 1'b0; sb <= 1'b0; sr <= 1'b0; ra <= '0; rb <= '0; rr <= '0; aux_q <= '0;
      i_cnt <= '0; k_cnt <= '0; j_cnt <= '0; t_cnt <= '0; entry <= '0; ent_live <= 1'b0; hi <= '0;
      pass_cout <= 1'b0; pass_nz <= 1'b0;
      p_xsel <= 1'b0; p_dsel <= 1'b0; p_sub <= 1'b0; p_we <= 1'b0;
      p_xreg <= '0; p_dreg <= '0; p_bsrc <= '0;
      flag <= 1'b0; rd_valid <= 1'b0; rd_data <= '0;
      n_corr_sub <= '0; n_corr_add <= '0; n_stall <= '0;
      nw_q <= IW'(NW);
    end else begin
      rd_valid <= 1'b0;
      if (stall && state != S_IDLE) n_stall <= n_stall + 1'b1;
      // results landing
      if (tq3.v && dp_valid) begin
        if (tq3.obs && dp_result != '0) pass_nz <= 1'b1;
        if (tq3.last) pass_cout <= dp_cout;
        if (tq3.hi)   hi <= 8'(signed'({1'b0, dp_result[6:0]}));
      end
      unique case (state)
        S_IDLE: if (start) begin
          op_q <= op; sa <= sel_a; sb <= sel_b; sr <= sel_r;
          ra <= reg_a; rb <= reg_b; rr <= reg_r; aux_q <= aux;
          unique case (op)
            OP_WRITE: begin
              if (sel_r == CFG_SEL && reg_r == CFG_REG && aux[3:0] == 4'd0)
                nw_q <= IW'(mc_wdata);
              state <= S_WRITE;
            end
            OP_READ:  state <= S_READ;
            OP_CHKB:  state <= S_CHKB;
            OP_MOVE:  start_pass(PH_MOVE, sel_a, reg_a, 2'd2, sel_r, reg_r, 1'b0, 1'b1);
            OP_MADD:  start_pass(PH_ADDSUB, sel_a, reg_a, 2'd0, sel_r, reg_r, 1'b0, 1'b1);
            OP_MSUB:  start_pass(PH_ADDSUB, sel_a, reg_a, 2'd0, sel_r, reg_r, 1'b1, 1'b1);
            OP_CMPGR, OP_CMPEQ, OP_CMPLO:
                      start_pass(PH_CMP, sel_a, reg_a, 2'd0, 1'b0, '0, 1'b1, 1'b0);
            OP_MMUL: begin
              k_cnt <= '0;
              state <= S_MUL_CLR;
            end
            default:  state <= S_DONE;
          endcase
        end
        S_WRITE: state <= S_DONE;
        S_READ:  if (!stall) state <= S_READW;
        S_READW: begin
          rd_data  <= dm_op_a;
          rd_valid <= 1'b1;
          state    <= S_DONE;
        end
        S_CHKB:  if (!stall) state <= S_CHKBW;
        S_CHKBW: begin
          flag  <= dm_op_a[aux_q[LW-1:0]];
          state <= S_DONE;
        end
        // ---------------------------------------------------------- word pass
        S_PASS: if (!stall) begin
          if (i_cnt == nw_m1) state <= S_PASSW;
          else i_cnt <= i_cnt + 1'b1;
        end
        S_PASSW: if (!pend) state <= S_POST;
        S_POST: begin
          unique case (phase)
            PH_MOVE: state <= S_DONE;
            PH_CMP: begin
              unique case (op_q)
                OP_CMPEQ: flag <= !pass_nz;
                OP_CMPLO: flag <= pass_cout;
                default:  flag <= !pass_cout && pass_nz;
              endcase
              state <= S_DONE;
            end
            PH_ADDSUB: begin
              hi    <= p_sub ? -8'(pass_cout) : 8'(pass_cout);
              state <= S_CORR;
            end
            PH_CORR_SUB: begin
              hi    <= hi - 8'(pass_cout);
              state <= S_CORR;
            end
            PH_CORR_ADD: begin
              hi    <= hi + 8'(pass_cout);
              state <= S_CORR;
            end
            PH_TRIAL: begin
              if (pass_cout) state <= S_DONE;    // r < p: reduced
              else start_pass(PH_TRIAL_SUB, sr, rr, 2'd1, sr, rr, 1'b1, 1'b1);
            end
            default: state <= S_CORR;            // PH_TRIAL_SUB: check again
          endcase
        end
        S_CORR: begin
          if (hi > 0) begin
            n_corr_sub <= n_corr_sub + 1'b1;
            start_pass(PH_CORR_SUB, sr, rr, 2'd1, sr, rr, 1'b1, 1'b1);
          end else if (hi < 0) begin
            n_corr_add <= n_corr_add + 1'b1;
            start_pass(PH_CORR_ADD, sr, rr, 2'd1, sr, rr, 1'b0, 1'b1);
          end else begin
            start_pass(PH_TRIAL, sr, rr, 2'd1, 1'b0, '0, 1'b1, 1'b0);
          end
        end
        // ---------------------------------------------------------- product scanning
        S_MUL_CLR: if (!stall) begin
          i_cnt <= '0;
          state <= S_MUL;
        end
        S_MUL: if (!stall) begin
          if (i_cnt == i_hi) state <= S_MUL_EMIT;
          else i_cnt <= i_cnt + 1'b1;
        end
        S_MUL_EMIT: if (!stall) begin
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == 2 * nw_m1) state <= S_MUL_LAST;
          else begin
            state <= S_MUL;
            i_cnt <= (k_cnt + 1'b1 >= nw_q) ? k_cnt + 1'b1 - nw_m1 : '0;
          end
        end
        S_MUL_LAST: if (!stall) state <= S_MUL_W;
        S_MUL_W: if (!pend) begin
          j_cnt <= '0;
          t_cnt <= '0;
          state <= S_RED_CLR;
        end
        // ---------------------------------------------------------- fast reduction
        S_RED_CLR:  if (!stall) state <= S_RED_COMP;
        S_RED_COMP: if (!stall) begin
          t_cnt    <= t_cnt + 1'b1;
          ent_live <= 1'b1;
          state    <= S_RED_TERM;
        end
        S_RED_TERM: begin
          entry    <= cur_entry;
          ent_live <= 1'b0;
          if (!stall) begin
            if (cur_entry[15]) state <= S_RED_EMIT;
            else begin
              t_cnt    <= t_cnt + 1'b1;
              ent_live <= 1'b1;
            end
          end
        end
        S_RED_EMIT: if (!stall) begin
          if (j_cnt == nw_m1) state <= S_RED_HI;
          else begin
            j_cnt <= j_cnt + 1'b1;
            state <= S_RED_COMP;
          end
        end
        S_RED_HI: if (!stall) state <= S_RED_W;
        S_RED_W:  if (!pend) state <= S_CORR;
        S_DONE:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
  // the operand length written to the configuration word must be 1 .. NBITS / W
  a_cfg_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start && op == OP_WRITE && sel_r == CFG_SEL && reg_r == CFG_REG &&
     aux[3:0] == 4'd0) |-> (mc_wdata != '0 && mc_wdata <= W'(NW)));
  // table entry bits 13:6 are reserved and must be zero
  a_entry_rsvd: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RED_TERM) |-> (cur_entry[13:6] == '0));
endmodule
