// Test of the program memory: fill all 512 words, read them back with the one-cycle
// read latency, and check that a write does not disturb other words.
module tb_program_memory;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [8:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] model [512];
  program_memory dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = 9'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 1024; i++) begin
      rd_addr = 9'($urandom);
      if (i % 7 == 0) begin
        we = 1'b1; wr_addr = 9'($urandom); wr_data = $urandom;
        if (wr_addr == rd_addr) wr_addr = wr_addr + 1'b1;
      end
      @(negedge clk);
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        $display("FAIL pm[%0d] = %h exp %h", rd_addr, rd_data, model[rd_addr]);
      end
      if (we) model[wr_addr] = wr_data;
      we = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
