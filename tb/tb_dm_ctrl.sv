// Test of the data memory controller with two behavioural memories: random mixes of
// the four channels (OP A, OP B and p reads, result write) with at most two channels
// per memory, checking that each read returns the addressed word of the selected
// memory one cycle later, that writes land in the selected memory, that ALU and main
// controller write data are chosen by wr_from_mc, and that both ports get used.
module tb_dm_ctrl;
  localparam int W = 16, AW = 10, D = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [3:0]    ch_en = '0, ch_sel = '0;
  logic [AW-1:0] ch_addr [4];
  logic          wr_from_mc = 1'b0;
  logic [W-1:0]  alu_result = '0, mc_wdata = '0, op_a, op_b, op_p;
  logic          mem_en [2][2], mem_we [2][2];
  logic [AW-1:0] mem_addr [2][2];
  logic [W-1:0]  mem_wdata [2][2], mem_rdata [2][2];
  logic [W-1:0]  mem [2][D];
  logic [W-1:0]  model [2][D];

  dm_ctrl #(.W(W), .AW(AW)) dut (.clk, .rst_n, .ch_en, .ch_sel, .ch_addr, .wr_from_mc,
    .alu_result, .mc_wdata, .op_a, .op_b, .op_p,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);

  // two behavioural dual-port memories
  always @(posedge clk)
    for (int m = 0; m < 2; m++)
      for (int p = 0; p < 2; p++)
        if (mem_en[m][p]) begin
          if (mem_we[m][p]) mem[m][mem_addr[m][p]] <= mem_wdata[m][p];
          mem_rdata[m][p] <= mem[m][mem_addr[m][p]];
        end

  int checks = 0, failures = 0, port_b_used = 0;
  always @(posedge clk) if (mem_en[0][1] || mem_en[1][1]) port_b_used++;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp [3];
    logic [W-1:0] wd;
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < D; i++) begin
        mem[m][i] = 16'($urandom);
        model[m][i] = mem[m][i];
      end
    for (int c = 0; c < 4; c++) ch_addr[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      int used [2];
      @(negedge clk);
      used = '{0, 0};
      for (int c = 0; c < 4; c++) begin
        ch_en[c]   = 1'($urandom);
        ch_sel[c]  = 1'($urandom);
        ch_addr[c] = AW'($urandom);
        if (ch_en[c]) begin
          if (used[ch_sel[c]] == 2) ch_sel[c] = ~ch_sel[c];
          if (used[ch_sel[c]] == 2) ch_en[c] = 1'b0;
          else used[ch_sel[c]]++;
        end
      end
      // reads must not hit the address being written in the same memory
      for (int c = 0; c < 3; c++)
        if (ch_en[3] && ch_sel[c] == ch_sel[3] && ch_addr[c] == ch_addr[3])
          ch_addr[c] = ch_addr[c] + 1'b1;
      wr_from_mc = 1'($urandom);
      alu_result = 16'($urandom);
      mc_wdata   = 16'($urandom);
      for (int c = 0; c < 3; c++) exp[c] = model[ch_sel[c]][ch_addr[c]];
      wd = wr_from_mc ? mc_wdata : alu_result;
      @(posedge clk);
      #1;
      if (ch_en[3]) model[ch_sel[3]][ch_addr[3]] = wd;
      if (ch_en[0]) begin checks++; if (op_a !== exp[0]) begin failures++; $display("FAIL op_a"); end end
      if (ch_en[1]) begin checks++; if (op_b !== exp[1]) begin failures++; $display("FAIL op_b"); end end
      if (ch_en[2]) begin checks++; if (op_p !== exp[2]) begin failures++; $display("FAIL op_p"); end end
      ch_en = '0;
    end
    // every word of both memories must match the model
    @(negedge clk);
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < D; i++) begin
        checks++;
        if (mem[m][i] !== model[m][i]) begin
          failures++; $display("FAIL mem %0d[%0d] %h exp %h", m, i, mem[m][i], model[m][i]);
        end
      end
    checks++;
    if (port_b_used == 0) begin failures++; $display("FAIL port B never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
