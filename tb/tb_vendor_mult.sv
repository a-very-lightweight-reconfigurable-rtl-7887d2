// Test of the vendor-dependent multiplier: the two output vectors must add up to the
// full 2W-bit product, for corner values and random 16-bit operands.
module tb_vendor_mult;
  localparam int W = 16, PW = 2 * W;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p0, p1;
  vendor_mult #(.W(W)) dut (.a, .b, .p0, .p1);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      {a, b} = $urandom;
      if (i == 0) begin a = '1; b = '1; end
      if (i == 1) begin a = '0; b = '1; end
      #1;
      checks++;
      if (PW'(p0 + p1) !== PW'(a) * PW'(b)) begin
        failures++;
        $display("FAIL %h * %h: %h + %h", a, b, p0, p1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
