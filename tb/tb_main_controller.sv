// Test of the main controller with behavioural stand-ins for the FIFOs, the program
// memory and the modular ALU.  The ALU stand-in logs every instruction it receives,
// answers after a few cycles, sets the flag to bit 0 of the OP A register address
// and returns {reg, word} for READ.  Checked: host words reach the ALU with the
// right fields; WRPGM/RDPGM; a program run with EXERTN following CALL (three levels),
// RET, JMP, JMPFT and JMPFF, compared with the expected sequence of ALU instructions.
module tb_main_controller;
  import microecc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] tx_rdata, rx_wdata, pm_wdata, pm_rdata;
  logic tx_empty, tx_pop, rx_push, rx_full, pm_we;
  logic [8:0] pm_waddr, pm_raddr;
  logic alu_start, alu_sel_a, alu_sel_b, alu_sel_r, alu_ready, alu_flag, alu_rd_valid;
  opcode_e alu_op;
  logic [5:0] alu_reg_a, alu_reg_b, alu_reg_r;
  logic [7:0] alu_aux;
  logic [15:0] alu_wdata, alu_rd_data;
  logic idle, prog_mode;
  logic [1:0] stack_ptr;

  main_controller dut (.clk, .rst_n, .tx_rdata, .tx_empty, .tx_pop, .rx_wdata, .rx_push,
    .rx_full, .pm_we, .pm_waddr, .pm_wdata, .pm_raddr, .pm_rdata, .alu_start, .alu_op,
    .alu_sel_a, .alu_reg_a, .alu_sel_b, .alu_reg_b, .alu_sel_r, .alu_reg_r, .alu_aux,
    .alu_wdata, .alu_ready, .alu_flag, .alu_rd_valid, .alu_rd_data, .idle, .prog_mode,
    .stack_ptr);

  // FIFOs as queues
  logic [31:0] txq[$], rxq[$];
  assign tx_empty = txq.size() == 0;
  assign tx_rdata = tx_empty ? '0 : txq[0];
  assign rx_full  = 1'b0;
  always @(posedge clk) begin
    if (rx_push) rxq.push_back(rx_wdata);
    if (tx_pop && !tx_empty) begin
      #1 void'(txq.pop_front());
    end
  end
  // program memory
  logic [31:0] pm [512];
  always @(posedge clk) begin
    if (pm_we) pm[pm_waddr] <= pm_wdata;
    pm_rdata <= pm[pm_raddr];
  end
  // ALU stand-in
  logic [31:0] log_q[$];
  int busy_cnt = 0;
  int max_sp = 0;
  assign alu_ready = busy_cnt == 0;
  always @(posedge clk) begin
    alu_rd_valid <= 1'b0;
    if (int'(stack_ptr) > max_sp) max_sp = int'(stack_ptr);
    if (alu_start) begin
      log_q.push_back({alu_op, alu_sel_r, alu_reg_r, alu_sel_a, alu_reg_a, alu_sel_b,
                       alu_reg_b, 6'd0});
      busy_cnt <= 4;
      if (alu_op inside {OP_CHKB, OP_CMPGR, OP_CMPEQ, OP_CMPLO}) alu_flag <= alu_reg_a[0];
      if (alu_op == OP_READ) alu_rd_data <= {alu_reg_r, 2'b00, alu_aux};
      if (alu_op == OP_WRITE) begin
        checks++;
        if (alu_wdata !== 16'hBEEF || alu_aux !== 8'd5) begin failures++; $display("FAIL write fields"); end
      end
      if (alu_op == OP_CHKB) begin
        checks++;
        if (alu_aux !== 8'd77) begin failures++; $display("FAIL chkb bit"); end
      end
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 2) alu_rd_valid <= 1'b1;
    end
  end

  int checks = 0, failures = 0;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] i3(opcode_e o, logic [5:0] rr, logic [5:0] ra);
    return {o, 1'b0, rr, 1'b0, ra, 1'b1, 6'd9, 6'd0};
  endfunction
  function automatic logic [31:0] fl(opcode_e o, logic [8:0] a);
    return {o, 18'd0, a};
  endfunction

  task automatic wait_idle();
    repeat (3) @(negedge clk);
    while (!tx_empty || !idle) @(negedge clk);
  endtask

  initial begin
    logic [31:0] prog [12];
    logic [31:0] exp_log [$];
    alu_flag = 1'b0;
    alu_rd_valid = 1'b0;
    alu_rd_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // host words straight to the ALU
    txq.push_back(i3(OP_MADD, 6'd3, 6'd4));
    txq.push_back({OP_WRITE, 1'b1, 6'd7, 4'd5, 16'hBEEF});
    txq.push_back({OP_READ, 1'b0, 6'd12, 4'd3, 16'd0});
    txq.push_back({OP_CHKB, 7'd0, 1'b0, 6'd2, 5'd0, 8'd77});
    wait_idle();
    checks++;
    if (log_q.size() != 4 || log_q[0] !== i3(OP_MADD, 6'd3, 6'd4)) begin
      failures++; $display("FAIL host instruction log: %0d entries, first %h", log_q.size(), log_q[0]);
    end
    checks++;
    if (rxq.size() != 1 || rxq[0] !== {16'd0, 6'd12, 2'b00, 8'd3}) begin
      failures++; $display("FAIL READ forwarding");
    end
    log_q.delete(); rxq.delete();
    // program: 50: CALL 60; MMUL r1; RET
    //          60: CMPEQ(a=1 -> flag 1); JMPFT 63; MSUB r9 (skipped); CALL 70; RET
    //          70: CALL 80; RET      80: CMPLO(a=2 -> flag 0); JMPFF 83; MOVE r9; JMP 85;
    //          84: MOVE r9 (skipped)  85: MADD r2; RET
    prog = '{default: 32'd0};
    begin
      logic [31:0] words [int];
      words[50] = fl(OP_CALL, 9'd60);  words[51] = i3(OP_MMUL, 6'd1, 6'd0); words[52] = fl(OP_RET, 0);
      words[60] = i3(OP_CMPEQ, 6'd0, 6'd1); words[61] = fl(OP_JMPFT, 9'd63);
      words[62] = i3(OP_MSUB, 6'd9, 6'd0); words[63] = fl(OP_CALL, 9'd70); words[64] = fl(OP_RET, 0);
      words[70] = fl(OP_CALL, 9'd80);  words[71] = fl(OP_RET, 0);
      words[80] = i3(OP_CMPLO, 6'd0, 6'd2); words[81] = fl(OP_JMPFF, 9'd83);
      words[82] = i3(OP_MOVE, 6'd9, 6'd0); words[83] = fl(OP_JMP, 9'd85);
      words[84] = i3(OP_MOVE, 6'd9, 6'd0); words[85] = i3(OP_MADD, 6'd2, 6'd0);
      words[86] = fl(OP_RET, 0);
      foreach (words[a]) begin
        txq.push_back(fl(OP_WRPGM, 9'(a)));
        txq.push_back(words[a]);
      end
      wait_idle();
      txq.push_back(fl(OP_RDPGM, 9'd85));
      wait_idle();
      checks++;
      if (rxq.size() != 1 || rxq[0] !== words[85]) begin failures++; $display("FAIL RDPGM"); end
    end
    txq.push_back(fl(OP_EXERTN, 9'd50));
    wait_idle();
    exp_log = '{i3(OP_CMPEQ, 6'd0, 6'd1), i3(OP_CMPLO, 6'd0, 6'd2), i3(OP_MADD, 6'd2, 6'd0),
                i3(OP_MMUL, 6'd1, 6'd0)};
    checks++;
    if (log_q.size() != exp_log.size()) begin
      failures++; $display("FAIL program ran %0d ALU instructions, expected %0d", log_q.size(), exp_log.size());
    end else
      for (int i = 0; i < exp_log.size(); i++) begin
        checks++;
        if (log_q[i] !== exp_log[i]) begin failures++; $display("FAIL program step %0d: %h", i, log_q[i]); end
      end
    checks++;
    if (max_sp != 3) begin failures++; $display("FAIL stack depth %0d", max_sp); end
    checks++;
    if (prog_mode || stack_ptr != 0) begin failures++; $display("FAIL not back in host mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
