// Exhaustive test of the K-bit carry-lookahead adder for K = 4 (all operand and carry
// combinations) and a random test for K = 8, against plain integer addition.
module tb_cla;
  logic [3:0] a4, b4, s4;  logic c4, co4;
  logic [7:0] a8, b8, s8;  logic c8, co8;
  cla #(.K(4)) u4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  cla #(.K(8)) u8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int x = 0; x < 512; x++) begin
      {c4, a4, b4} = 9'(x);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(c4)) begin
        failures++;
        $display("FAIL K=4 %h+%h+%b = %b%h", a4, b4, c4, co4, s4);
      end
    end
    for (int x = 0; x < 2000; x++) begin
      {c8, a8, b8} = 17'($urandom);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(c8)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
