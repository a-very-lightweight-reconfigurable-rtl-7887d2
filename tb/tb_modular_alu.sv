// Test of the modular ALU through its instruction interface only: the P-256
// constants and operands are loaded with WRITE, results fetched with READ, and
// MOVE, MADD, MSUB, MMUL, CMPxx and CHKB are checked against wide-integer
// arithmetic, with operands spread over both data memories.
module tb_modular_alu;
  import microecc_pkg::*;
  import tb_p256_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, sel_a = 0, sel_b = 0, sel_r = 0;
  opcode_e op = OP_NOP;
  logic [5:0] reg_a = '0, reg_b = '0, reg_r = '0;
  logic [7:0] aux = '0;
  logic [15:0] mc_wdata = '0, rd_data;
  logic ready, flag, rd_valid;
  logic [15:0] n_corr_sub, n_corr_add, n_stall;

  modular_alu dut (.clk, .rst_n, .start, .op, .sel_a, .reg_a, .sel_b, .reg_b, .sel_r, .reg_r,
    .aux, .mc_wdata, .ready, .flag, .rd_valid, .rd_data, .n_corr_sub, .n_corr_add, .n_stall);

  int checks = 0, failures = 0;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] last_rd;
  always @(posedge clk) if (rd_valid) last_rd <= rd_data;

  task automatic run(input opcode_e o, input logic sr, input logic [5:0] rr, input logic sa,
                     input logic [5:0] ra, input logic sb, input logic [5:0] rb,
                     input logic [7:0] ax, input logic [15:0] d);
    @(negedge clk);
    op = o; sel_r = sr; reg_r = rr; sel_a = sa; reg_a = ra; sel_b = sb; reg_b = rb; aux = ax;
    mc_wdata = d;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!ready) @(negedge clk);
  endtask

  task automatic wr(input logic s, input logic [5:0] r, input logic [255:0] v);
    for (int i = 0; i < 16; i++) run(OP_WRITE, s, r, 0, '0, 0, '0, 8'(i), v[i*16 +: 16]);
  endtask
  task automatic rd(input logic s, input logic [5:0] r, output logic [255:0] v);
    for (int i = 0; i < 16; i++) begin
      run(OP_READ, s, r, 0, '0, 0, '0, 8'(i), '0);
      v[i*16 +: 16] = last_rd;
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

  initial begin
    table_t tbl;
    logic [255:0] comp, a, b, got;
    int n;
    n = build_table(tbl, comp);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wr(P_SEL, P_REG, P256);
    wr(COMP_SEL, COMP_REG, comp);
    for (int i = 0; i < 128; i++)
      run(OP_WRITE, TBL_SEL, 6'(TBL_REG + i / 16), 0, '0, 0, '0, 8'(i % 16), tbl[i]);
    for (int t = 0; t < 6; t++) begin
      logic sa_, sb_, sr_;
      {sa_, sb_, sr_} = 3'(t);
      a = rnd_fe(); b = rnd_fe();
      if (t == 1) b = a;
      wr(sa_, 6'd20, a); wr(sb_, 6'd21, b);
      rd(sa_, 6'd20, got); chk("write/read", got, a);
      run(OP_MOVE, sr_, 6'd22, sa_, 6'd20, 0, '0, '0, '0);
      rd(sr_, 6'd22, got); chk("move", got, a);
      run(OP_MADD, sr_, 6'd23, sa_, 6'd20, sb_, 6'd21, '0, '0);
      rd(sr_, 6'd23, got); chk("madd", got, ref_add(a, b));
      run(OP_MSUB, sr_, 6'd24, sa_, 6'd20, sb_, 6'd21, '0, '0);
      rd(sr_, 6'd24, got); chk("msub", got, ref_sub(a, b));
      run(OP_MMUL, sr_, 6'd25, sa_, 6'd20, sb_, 6'd21, '0, '0);
      rd(sr_, 6'd25, got); chk("mmul", got, ref_mul(a, b));
      run(OP_CMPGR, 0, '0, sa_, 6'd20, sb_, 6'd21, '0, '0); chkf("cmpgr", a > b);
      run(OP_CMPEQ, 0, '0, sa_, 6'd20, sb_, 6'd21, '0, '0); chkf("cmpeq", a == b);
      run(OP_CMPLO, 0, '0, sa_, 6'd20, sb_, 6'd21, '0, '0); chkf("cmplo", a < b);
      for (int k = 0; k < 4; k++) begin
        logic [7:0] bn;
        bn = 8'($urandom);
        run(OP_CHKB, 0, '0, sa_, 6'd20, 0, '0, bn, '0); chkf("chkb", a[bn]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
