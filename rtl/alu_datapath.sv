// Word-serial arithmetic datapath of the modular ALU ("16-bit ALU").
//
// One datapath serves the three jobs of the published ALU figures:
//  * integer product by product scanning: DP_MAC adds the two product vectors of the
//    vendor multiplier into a carry-save accumulator of 2W+S bits, and DP_EMIT at the
//    end of each column turns the low W bits of the accumulator into one result word
//    through the carry-select adder and shifts the accumulator right by W;
//  * fast reduction: DP_ACCW adds one W-bit word of the double-size product (or 2^W
//    minus it, for a subtracted term) into the same accumulator, and DP_EMIT again
//    produces the result words;
//  * modular addition / subtraction: DP_ADD adds two words through the carry-select
//    adder with the carry chained from the previous word.  As in the figures, a
//    subtraction complements OP A on the way in and the sum on the way out, since
//    ~(~a + b) = a - b; the carry out is then the borrow.
// S = 4 guard bits keep a column of up to 16 double-width products exact.
//
// Timing: a command and its operands are presented in cycle t.  Operands are
// registered in cycle t (the "D" boxes after the input multiplexers); the accumulator
// is updated at the end of cycle t+1; a DP_EMIT or DP_ADD result is visible on
// result/cout with res_valid during cycle t+2.  Commands complete in issue order, so
// a DP_EMIT may directly follow the DP_MAC/DP_ACCW it depends on.
//
// The two CSA(2W+S) stages, the vendor multiplier, the XOR on OP A and on the adder
// output and the CSLA follow the figures.  The split of the product into two half
// products, the "+1" of a subtracted reduction term being injected into the free
// bit 0 of the CSA carry vector, and separate registers for the adder operands are
// this design's own.
module alu_datapath
  import microecc_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned S = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dp_cmd_t      cmd,
  input  logic [W-1:0] op_a,
  input  logic [W-1:0] op_b,
  output logic         res_valid,
  output logic [W-1:0] result,
  output logic         cout,
  output logic         acc_zero   // accumulator holds 0 (debug / checks)
);
  localparam int unsigned N = 2 * W + S;

  // ---------------------------------------------------------------- stage 1: operand registers
  logic [2*W-1:0] p0, p1;
  vendor_mult #(.W(W)) u_mult (.a(op_a), .b(op_b), .p0(p0), .p1(p1));

  dp_cmd_t      cmd1;
  logic [N-1:0] v0_q, v1_q;
  logic         inj_q;
  logic [W-1:0] xa_q, xb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd1  <= '{op: DP_NOP, sub: 1'b0, first: 1'b0};
      v0_q  <= '0;
      v1_q  <= '0;
      inj_q <= 1'b0;
      xa_q  <= '0;
      xb_q  <= '0;
    end else begin
      cmd1  <= cmd;
      inj_q <= 1'b0;
      v0_q  <= '0;
      v1_q  <= '0;
      unique case (cmd.op)
        DP_MAC: begin
          v0_q <= N'(p0);
          v1_q <= N'(p1);
        end
        DP_ACCW: begin
          v0_q  <= N'(op_a ^ {W{cmd.sub}});
          inj_q <= cmd.sub;
        end
        default: ;
      endcase
      xa_q <= op_a ^ {W{cmd.sub}};
      xb_q <= op_b;
    end
  end

  // ---------------------------------------------------------------- stage 2: accumulator
  logic [N-1:0] acc_s, acc_c;
  logic [N-1:0] s1, c1, s2, c2;

  csa #(.N(N)) u_csa1 (.x(v0_q), .y(v1_q), .z(acc_s), .s(s1), .c(c1));
  csa #(.N(N)) u_csa2 (.x(s1),   .y(c1),   .z(acc_c), .s(s2), .c(c2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0;
      acc_c <= '0;
    end else begin
      unique case (cmd1.op)
        DP_CLR: begin
          acc_s <= '0;
          acc_c <= '0;
        end
        DP_MAC, DP_ACCW: begin
          acc_s <= s2;
          acc_c <= c2 | N'(inj_q);
        end
        DP_EMIT: begin
          acc_s <= {{W{1'b0}}, acc_s[N-1:W]};
          acc_c <= {{W{1'b0}}, acc_c[N-1:W]};
        end
        default: ;
      endcase
    end
  end

  assign acc_zero = (acc_s == '0) && (acc_c == '0);

  // ---------------------------------------------------------------- carry-select adder
  logic         use_add, csla_en, csla_cin, csla_cout, carry_q, sub2;
  logic [W-1:0] csla_a, csla_b, csla_sum;

  assign use_add = (cmd1.op == DP_ADD);
  assign csla_en = use_add || (cmd1.op == DP_EMIT);
  assign csla_a  = use_add ? xa_q : acc_s[W-1:0];
  assign csla_b  = use_add ? xb_q : acc_c[W-1:0];
  // carry of the previous word: live if that word is on the adder output right now
  assign csla_cin = cmd1.first ? 1'b0 : (res_valid ? csla_cout : carry_q);

  csla #(.W(W)) u_csla (.clk(clk), .en(csla_en), .a(csla_a), .b(csla_b), .cin(csla_cin),
                        .sum(csla_sum), .cout(csla_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      sub2      <= 1'b0;
      carry_q   <= 1'b0;
    end else begin
      res_valid <= csla_en;
      if (csla_en) sub2 <= use_add && cmd1.sub;
      if (res_valid) carry_q <= csla_cout;
    end
  end

  assign result = csla_sum ^ {W{sub2}};
  assign cout   = csla_cout;
endmodule
