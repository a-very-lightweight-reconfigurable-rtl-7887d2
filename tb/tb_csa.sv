// Random test of the carry-save adder: s + c must equal x + y + z modulo 2^N, and
// bit 0 of the carry vector must be 0.
module tb_csa;
  localparam int N = 36;
  logic [N-1:0] x, y, z, s, c;
  csa #(.N(N)) dut (.x, .y, .z, .s, .c);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; z = {$urandom, $urandom};
      if (i < 4) begin x = '1; y = (i > 1) ? '1 : '0; z = '1; end
      #1;
      checks++;
      if (N'(s + c) !== N'(x + y + z) || c[0] !== 1'b0) begin
        failures++;
        $display("FAIL %h %h %h -> %h %h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
