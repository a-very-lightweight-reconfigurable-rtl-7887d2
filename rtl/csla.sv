// Registered carry-select adder built from four carry-lookahead blocks ("CSLA (4xCLA)").
//
// The W-bit operands are cut into four K-bit slices (K = W/4: 4 for the 16-bit
// datapath, 8 for the 32-bit one).  Each slice is added twice, once assuming a carry
// in of 0 and once of 1, and both (K+1)-bit results are registered together with the
// real carry in.  In the next cycle a chain of four multiplexers picks, slice by
// slice, the result that matches the incoming carry and yields the W-bit sum and the
// carry out.  So a sum presented in cycle t is visible, combinationally, during cycle
// t+1.  The slice structure, the "0"/"1" pairs, the registers after the CLA pairs and
// on Cin and the multiplexer chain follow the published adder figure.  The en input
// (register enable) is this design's addition so the sum is held between uses.
module csla #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned K = W / 4;

  logic [3:0][K:0] r0_d, r1_d, r0_q, r1_q;   // {cout, sum} per slice for carry 0 / 1
  logic            cin_q;

  for (genvar s = 0; s < 4; s++) begin : g_slice
    cla #(.K(K)) u_cla0 (.a(a[s*K +: K]), .b(b[s*K +: K]), .cin(1'b0),
                         .sum(r0_d[s][K-1:0]), .cout(r0_d[s][K]));
    cla #(.K(K)) u_cla1 (.a(a[s*K +: K]), .b(b[s*K +: K]), .cin(1'b1),
                         .sum(r1_d[s][K-1:0]), .cout(r1_d[s][K]));
  end

  always_ff @(posedge clk) begin
    if (en) begin
      r0_q  <= r0_d;
      r1_q  <= r1_d;
      cin_q <= cin;
    end
  end

  always_comb begin
    logic c;
    c = cin_q;
    for (int s = 0; s < 4; s++) begin
      sum[s*K +: K] = c ? r1_q[s][K-1:0] : r0_q[s][K-1:0];
      c             = c ? r1_q[s][K]     : r0_q[s][K];
    end
    cout = c;
  end
endmodule
