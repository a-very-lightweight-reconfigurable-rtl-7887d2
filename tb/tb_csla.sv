// Test of the registered carry-select adder: a sum presented in one cycle must appear
// on sum/cout in the next cycle, for W = 16 (K = 4) and W = 32 (K = 8), and hold
// while en is low.
module tb_csla;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        en = 1'b0;
  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [31:0] a32, b32, s32;  logic ci32, co32;
  csla #(.W(16)) u16 (.clk, .en, .a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  csla #(.W(32)) u32 (.clk, .en, .a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [16:0] e16;
    logic [32:0] e32;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a32 = $urandom; b32 = $urandom; ci32 = 1'($urandom);
      if (i == 0) begin a16 = '1; b16 = 16'd0; ci16 = 1'b1; a32 = '1; b32 = '0; ci32 = 1'b1; end
      e16 = 17'(a16) + 17'(b16) + 17'(ci16);
      e32 = 33'(a32) + 33'(b32) + 33'(ci32);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      a16 = ~a16; a32 = ~a32;            // must not disturb the held sum
      @(negedge clk);
      checks += 2;
      if ({co16, s16} !== e16) begin failures++; $display("FAIL 16: %h exp %h", {co16, s16}, e16); end
      if ({co32, s32} !== e32) begin failures++; $display("FAIL 32: %h exp %h", {co32, s32}, e32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
