// Test of the ALU datapath at W = 16.
//  * DP_ADD chains: 256-bit additions and subtractions fed one word per cycle (and
//    with idle gaps), result words and final carry/borrow against wide arithmetic.
//  * DP_MAC + DP_EMIT: product scanning of two random 256-bit numbers, all 32 words
//    of the product against the wide product; also the all-ones worst case.
//  * DP_ACCW with subtracted terms + DP_EMIT: each subtracted word adds 2^16 - x.
// Every result must appear exactly two cycles after its command.
module tb_alu_datapath;
  import microecc_pkg::*;
  localparam int W = 16, NW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  dp_cmd_t cmd;
  logic [W-1:0] op_a, op_b, result;
  logic res_valid, cout, acc_zero;
  alu_datapath #(.W(W)) dut (.clk, .rst_n, .cmd, .op_a, .op_b, .res_valid, .result, .cout,
                             .acc_zero);
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results are collected with the cycle they appeared in
  logic [W-1:0] res_q[$];
  logic         cout_q[$];
  longint       when_q[$];
  always @(posedge clk) if (res_valid) begin
    res_q.push_back(result); cout_q.push_back(cout); when_q.push_back(cyc);
  end
  longint issue_q[$];

  task automatic issue(input dp_op_e op, input logic sub, input logic first,
                       input logic [W-1:0] a, input logic [W-1:0] b);
    @(negedge clk);
    cmd = '{op: op, sub: sub, first: first};
    op_a = a; op_b = b;
    if (op == DP_ADD || op == DP_EMIT) issue_q.push_back(cyc);
    @(posedge clk);
    #1;
    cmd = '{op: DP_NOP, sub: 1'b0, first: 1'b0};
  endtask

  task automatic drain();
    repeat (4) @(negedge clk);
  endtask

  task automatic check_timing();
    while (when_q.size() > 0 && issue_q.size() > 0) begin
      longint w, i;
      w = when_q.pop_front();
      i = issue_q.pop_front();
      checks++;
      if (w - i != 2) begin failures++; $display("FAIL latency %0d", w - i); end
    end
  endtask

  initial begin
    logic [255:0] a, b;
    logic [511:0] p, e;
    logic [256:0] s;
    cmd = '{op: DP_NOP, sub: 1'b0, first: 1'b0};
    op_a = '0; op_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---------------- add / sub chains
    for (int t = 0; t < 40; t++) begin
      logic sub;
      for (int i = 0; i < 8; i++) begin a[i*32 +: 32] = $urandom; b[i*32 +: 32] = $urandom; end
      if (t == 0) begin a = '1; b = 256'd1; end
      if (t == 1) begin a = '0; b = 256'd1; end
      sub = t[0];
      res_q.delete(); cout_q.delete();
      for (int i = 0; i < NW; i++) begin
        issue(DP_ADD, sub, i == 0, a[i*W +: W], b[i*W +: W]);
        if (t % 4 == 3) @(negedge clk);      // gaps between words
      end
      drain();
      s = sub ? 257'(a) - 257'(b) : 257'(a) + 257'(b);
      for (int i = 0; i < NW; i++) begin
        checks++;
        if (res_q[i] !== s[i*W +: W]) begin
          failures++; $display("FAIL add t%0d word %0d %h exp %h", t, i, res_q[i], s[i*W +: W]);
        end
      end
      checks++;
      if (cout_q[NW-1] !== s[256]) begin failures++; $display("FAIL carry t%0d", t); end
      check_timing();
    end
    // ---------------- product scanning
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < 8; i++) begin a[i*32 +: 32] = $urandom; b[i*32 +: 32] = $urandom; end
      if (t == 0) begin a = '1; b = '1; end
      res_q.delete(); cout_q.delete();
      issue(DP_CLR, 0, 0, '0, '0);
      for (int k = 0; k < 2 * NW - 1; k++) begin
        for (int i = 0; i < NW; i++)
          if (k - i >= 0 && k - i < NW) issue(DP_MAC, 0, 0, a[i*W +: W], b[(k-i)*W +: W]);
        issue(DP_EMIT, 0, k == 0, '0, '0);
      end
      issue(DP_EMIT, 0, 0, '0, '0);
      drain();
      p = 512'(a) * 512'(b);
      for (int k = 0; k < 2 * NW; k++) begin
        checks++;
        if (res_q[k] !== p[k*W +: W]) begin
          failures++; $display("FAIL mul t%0d word %0d %h exp %h", t, k, res_q[k], p[k*W +: W]);
        end
      end
      check_timing();
    end
    // ---------------- signed reduction-style accumulation
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] x;
      logic         sb;
      res_q.delete();
      e = '0;
      issue(DP_CLR, 0, 0, '0, '0);
      for (int j = 0; j < 4; j++) begin
        for (int n = 0; n < 8; n++) begin
          x = 16'($urandom); sb = 1'($urandom);
          issue(DP_ACCW, sb, 0, x, '0);
          e = e + ((sb ? (512'(1) << W) - 512'(x) : 512'(x)) << (W * j));
        end
        issue(DP_EMIT, 0, j == 0, '0, '0);
      end
      issue(DP_EMIT, 0, 0, '0, '0);
      drain();
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (res_q[j] !== e[j*W +: W]) begin
          failures++; $display("FAIL accw t%0d word %0d %h exp %h", t, j, res_q[j], e[j*W +: W]);
        end
      end
      check_timing();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
