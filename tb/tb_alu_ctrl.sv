// Test of the ALU controller, run with the real datapath, data memory controller and
// data memories around it.  Operands and the P-256 constants are placed directly
// into the memory arrays; the controller then runs MOVE, MADD, MSUB, MMUL, the three
// comparisons and CHKB, and the results are read back from the arrays and compared
// with wide-integer arithmetic.  It also checks that ready is low for the whole of
// an instruction and reports the cycle count of each instruction kind.
module tb_alu_ctrl;
  import microecc_pkg::*;
  import tb_p256_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, sel_a = 0, sel_b = 0, sel_r = 0;
  opcode_e op = OP_NOP;
  logic [5:0] reg_a = '0, reg_b = '0, reg_r = '0;
  logic [7:0] aux = '0;
  logic ready, flag, rd_valid;
  logic [15:0] rd_data;
  logic [3:0] ch_en, ch_sel;
  logic [9:0] ch_addr [4];
  logic wr_from_mc;
  logic [15:0] op_a, op_b, op_p, dp_b, dp_result;
  dp_cmd_t dp_cmd;
  logic [1:0] dp_bsrc;
  logic dp_valid, dp_cout, acc_zero;
  logic [15:0] n_corr_sub, n_corr_add, n_stall;
  logic mem_en [2][2], mem_we [2][2];
  logic [9:0] mem_addr [2][2];
  logic [15:0] mem_wdata [2][2], mem_rdata [2][2];

  alu_ctrl dut (.clk, .rst_n, .start, .op, .sel_a, .reg_a, .sel_b, .reg_b, .sel_r, .reg_r,
    .aux, .mc_wdata(16'h0), .ready, .flag, .rd_valid, .rd_data, .ch_en, .ch_sel, .ch_addr, .wr_from_mc,
    .dm_op_a(op_a), .dm_op_b(op_b), .dp_cmd, .dp_bsrc, .dp_valid, .dp_result, .dp_cout,
    .n_corr_sub, .n_corr_add, .n_stall);
  assign dp_b = (dp_bsrc == 2'd0) ? op_b : (dp_bsrc == 2'd1) ? op_p : '0;
  alu_datapath u_dp (.clk, .rst_n, .cmd(dp_cmd), .op_a, .op_b(dp_b), .res_valid(dp_valid),
                     .result(dp_result), .cout(dp_cout), .acc_zero);
  dm_ctrl u_dmc (.clk, .rst_n, .ch_en, .ch_sel, .ch_addr, .wr_from_mc, .alu_result(dp_result),
    .mc_wdata(16'h0), .op_a, .op_b, .op_p, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  data_memory u_dm0 (.clk, .en_a(mem_en[0][0]), .we_a(mem_we[0][0]), .addr_a(mem_addr[0][0]),
    .wdata_a(mem_wdata[0][0]), .rdata_a(mem_rdata[0][0]), .en_b(mem_en[0][1]),
    .we_b(mem_we[0][1]), .addr_b(mem_addr[0][1]), .wdata_b(mem_wdata[0][1]),
    .rdata_b(mem_rdata[0][1]));
  data_memory u_dm1 (.clk, .en_a(mem_en[1][0]), .we_a(mem_we[1][0]), .addr_a(mem_addr[1][0]),
    .wdata_a(mem_wdata[1][0]), .rdata_a(mem_rdata[1][0]), .en_b(mem_en[1][1]),
    .we_b(mem_we[1][1]), .addr_b(mem_addr[1][1]), .wdata_b(mem_wdata[1][1]),
    .rdata_b(mem_rdata[1][1]));

  int checks = 0, failures = 0;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic s, input logic [5:0] r, input logic [255:0] v);
    for (int i = 0; i < 16; i++)
      if (s) u_dm1.mem[{r, 4'(i)}] = v[i*16 +: 16];
      else   u_dm0.mem[{r, 4'(i)}] = v[i*16 +: 16];
  endtask
  function automatic logic [255:0] get(logic s, logic [5:0] r);
    logic [255:0] v;
    for (int i = 0; i < 16; i++) v[i*16 +: 16] = s ? u_dm1.mem[{r, 4'(i)}] : u_dm0.mem[{r, 4'(i)}];
    return v;
  endfunction

  task automatic run(input opcode_e o, input logic sr, input logic [5:0] rr, input logic sa,
                     input logic [5:0] ra, input logic sb, input logic [5:0] rb,
                     input logic [7:0] ax, output int cyc);
    @(negedge clk);
    op = o; sel_r = sr; reg_r = rr; sel_a = sa; reg_a = ra; sel_b = sb; reg_b = rb; aux = ax;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!ready) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  task automatic chk(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic chkf(input string what, input logic exp);
    checks++;
    if (flag !== exp) begin failures++; $display("FAIL %s: flag %b exp %b", what, flag, exp); end
  endtask

  // ready must stay low while an instruction runs
  logic running = 1'b0;
  always @(posedge clk) begin
    if (start) running <= 1'b1;
    else if (ready) running <= 1'b0;
  end

  initial begin
    table_t tbl;
    logic [255:0] comp, a, b;
    int n, cyc, c_madd, c_mmul, c_move;
    n = build_table(tbl, comp);
    for (int i = 0; i < 1024; i++) begin u_dm0.mem[i] = '0; u_dm1.mem[i] = '0; end
    put(P_SEL, P_REG, P256);
    put(COMP_SEL, COMP_REG, comp);
    for (int i = 0; i < 128; i++) u_dm0.mem[{TBL_REG, 4'd0} + 10'(i)] = tbl[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      a = rnd_fe(); b = rnd_fe();
      if (t == 0) begin a = P256 - 1; b = P256 - 1; end
      put(1'b0, 6'd1, a); put(1'b1, 6'd2, b);
      run(OP_MOVE, 1'b1, 6'd3, 1'b0, 6'd1, 1'b0, 6'd0, 8'd0, c_move);
      chk("move", get(1'b1, 6'd3), a);
      run(OP_MADD, 1'b0, 6'd4, 1'b0, 6'd1, 1'b1, 6'd2, 8'd0, c_madd);
      chk("madd", get(1'b0, 6'd4), ref_add(a, b));
      run(OP_MSUB, 1'b0, 6'd5, 1'b0, 6'd1, 1'b1, 6'd2, 8'd0, cyc);
      chk("msub", get(1'b0, 6'd5), ref_sub(a, b));
      run(OP_MMUL, 1'b0, 6'd6, 1'b0, 6'd1, 1'b1, 6'd2, 8'd0, c_mmul);
      chk("mmul", get(1'b0, 6'd6), ref_mul(a, b));
      // operands and result all in DM A
      put(1'b0, 6'd2, b);
      run(OP_MMUL, 1'b0, 6'd7, 1'b0, 6'd1, 1'b0, 6'd2, 8'd0, cyc);
      chk("mmul same memory", get(1'b0, 6'd7), ref_mul(a, b));
      run(OP_CMPGR, 1'b0, 6'd0, 1'b0, 6'd1, 1'b1, 6'd2, 8'd0, cyc); chkf("cmpgr", a > b);
      run(OP_CMPLO, 1'b0, 6'd0, 1'b0, 6'd1, 1'b1, 6'd2, 8'd0, cyc); chkf("cmplo", a < b);
      run(OP_CMPEQ, 1'b0, 6'd0, 1'b0, 6'd1, 1'b1, 6'd2, 8'd0, cyc); chkf("cmpeq", a == b);
      run(OP_CMPEQ, 1'b0, 6'd0, 1'b0, 6'd1, 1'b0, 6'd1, 8'd0, cyc); chkf("cmpeq self", 1'b1);
      run(OP_CHKB, 1'b0, 6'd0, 1'b0, 6'd1, 1'b0, 6'd0, 8'(t * 31), cyc);
      chkf("chkb", a[t * 31]);
      run(OP_READ, 1'b0, 6'd1, 1'b0, 6'd0, 1'b0, 6'd0, 8'(t), cyc);
      checks++;
      if (rd_data !== a[t*16 +: 16]) begin failures++; $display("FAIL read"); end
    end
    $display("cycles: MOVE %0d, MADD %0d, MMUL %0d; corrections -p %0d +p %0d",
             c_move, c_madd, c_mmul, n_corr_sub, n_corr_add);
    // a MOVE issues one word per cycle (16) plus start-up and pipeline drain
    checks++;
    if (c_move < 20 || c_move > 26) begin failures++; $display("FAIL MOVE cycles %0d", c_move); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
