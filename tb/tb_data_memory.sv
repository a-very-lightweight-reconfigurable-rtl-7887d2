// Test of the dual-port data memory: random reads and writes on both ports at once,
// one-cycle read latency, old data returned on a port that writes, checked against
// an array model.
module tb_data_memory;
  localparam int W = 16, DEPTH = 1024, AW = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en_a = 0, we_a = 0, en_b = 0, we_b = 0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [W-1:0] wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;
  logic [W-1:0] model [DEPTH];
  data_memory #(.W(W), .DEPTH(DEPTH)) dut (.clk, .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
                                           .en_b, .we_b, .addr_b, .wdata_b, .rdata_b);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] ea, eb;
    // fill through both ports
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = AW'(i);     wdata_a = 16'($urandom); model[i] = wdata_a;
      en_b = 1; we_b = 1; addr_b = AW'(i + 1); wdata_b = 16'($urandom); model[i+1] = wdata_b;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 1'($urandom); addr_a = AW'($urandom); wdata_a = 16'($urandom);
      en_b = 1; we_b = 1'($urandom); addr_b = AW'($urandom); wdata_b = 16'($urandom);
      if (addr_a == addr_b) addr_b = addr_b + 1'b1;
      ea = model[addr_a];
      eb = model[addr_b];
      @(negedge clk);
      checks += 2;
      if (rdata_a !== ea) begin failures++; $display("FAIL A[%0d] %h exp %h", addr_a, rdata_a, ea); end
      if (rdata_b !== eb) begin failures++; $display("FAIL B[%0d] %h exp %h", addr_b, rdata_b, eb); end
      if (we_a) model[addr_a] = wdata_a;
      if (we_b) model[addr_b] = wdata_b;
      en_a = 0; en_b = 0; we_a = 0; we_b = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
