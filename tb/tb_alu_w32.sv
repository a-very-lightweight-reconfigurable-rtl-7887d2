// Test of the modular ALU in its 32-bit datapath configuration (W = 32): the P-256
// prime, its reduction table and compensation constant are loaded with WRITE, and
// MOVE, MADD, MSUB, MMUL, the compares and CHKB are checked against wide-integer
// arithmetic on random operands spread over both data memories.  An operand is then
// 8 words of 32 bits.
//
// The reduction table is built here from the P-256 formula in 32-bit words,
//   c = z1 + 2 z2 + 2 z3 + z4 + z5 - z6 - z7 - z8 - z9  (mod p),
// one entry per term and output word ([15] last term of its column, [14] subtract,
// [5:0] 32-bit word index into the product), 63 entries in all.  The compensation
// constant is (-sum_j nsub_j * 2^(32(j+1))) mod p, as on the 16-bit datapath.
// The testbench also reports the cycles each instruction takes, for comparison with
// the 16-bit configuration.
module tb_alu_w32;
  import microecc_pkg::*;
  import tb_p256_pkg::*;
  localparam int WW = 32, NWW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, sel_a = 0, sel_b = 0, sel_r = 0;
  opcode_e op = OP_NOP;
  logic [5:0] reg_a = '0, reg_b = '0, reg_r = '0;
  logic [7:0] aux = '0;
  logic [WW-1:0] mc_wdata = '0, rd_data;
  logic ready, flag, rd_valid;
  logic [15:0] n_corr_sub, n_corr_add, n_stall;

  modular_alu #(.W(WW)) dut (.clk, .rst_n, .start, .op, .sel_a, .reg_a, .sel_b, .reg_b,
    .sel_r, .reg_r, .aux, .mc_wdata, .ready, .flag, .rd_valid, .rd_data,
    .n_corr_sub, .n_corr_add, .n_stall);

  int checks = 0, failures = 0;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles = 0;
  always @(posedge clk) cycles++;

  logic [WW-1:0] last_rd;
  always @(posedge clk) if (rd_valid) last_rd <= rd_data;

  int last_cycles;
  task automatic run(input opcode_e o, input logic sr, input logic [5:0] rr, input logic sa,
                     input logic [5:0] ra, input logic sb, input logic [5:0] rb,
                     input logic [7:0] ax, input logic [WW-1:0] d);
    int t0;
    @(negedge clk);
    op = o; sel_r = sr; reg_r = rr; sel_a = sa; reg_a = ra; sel_b = sb; reg_b = rb; aux = ax;
    mc_wdata = d;
    start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    while (!ready) @(negedge clk);
    last_cycles = cycles - t0;
  endtask

  task automatic wr(input logic s, input logic [5:0] r, input logic [255:0] v);
    for (int i = 0; i < NWW; i++) run(OP_WRITE, s, r, 0, '0, 0, '0, 8'(i), v[i*WW +: WW]);
  endtask
  task automatic rd(input logic s, input logic [5:0] r, output logic [255:0] v);
    for (int i = 0; i < NWW; i++) begin
      run(OP_READ, s, r, 0, '0, 0, '0, 8'(i), '0);
      v[i*WW +: WW] = last_rd;
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

  typedef logic [WW-1:0] table32_t [128];
  function automatic int build_table_w32(ref table32_t tbl, output logic [255:0] comp);
    logic [511:0] e;
    int n;
    n = 0;
    e = '0;
    for (int i = 0; i < 128; i++) tbl[i] = '0;
    for (int j = 0; j < NWW; j++) begin
      int nsub;
      nsub = 0;
      for (int z = 0; z < 9; z++) begin
        if (ZSRC[z][j] >= 0) begin
          for (int r = 0; r < ((ZCOEF[z] < 0) ? 1 : ZCOEF[z]); r++) begin
            tbl[n] = WW'({1'b0, (ZCOEF[z] < 0), 8'd0, 6'(ZSRC[z][j])});
            if (ZCOEF[z] < 0) nsub++;
            n++;
          end
        end
      end
      tbl[n - 1][15] = 1'b1;
      e = e + (512'(nsub) << (WW * (j + 1)));
    end
    comp = 256'((512'(P256) - (e % 512'(P256))) % 512'(P256));
    return n;
  endfunction

  int c_move, c_add, c_sub, c_mul_min = 1 << 30, c_mul_max, n_mul;
  initial begin
    table32_t tbl;
    logic [255:0] comp, a, b, got;
    int n;
    n = build_table_w32(tbl, comp);
    checks++;
    if (n != 63) begin failures++; $display("FAIL table has %0d entries", n); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wr(P_SEL, P_REG, P256);
    wr(COMP_SEL, COMP_REG, comp);
    for (int i = 0; i < n; i++)
      run(OP_WRITE, TBL_SEL, 6'(TBL_REG + i / 16), 0, '0, 0, '0, 8'(i % 16), tbl[i]);
    for (int t = 0; t < 16; t++) begin
      logic sa_, sb_, sr_;
      {sa_, sb_, sr_} = 3'(t);
      a = rnd_fe(); b = rnd_fe();
      if (t == 1) b = a;
      if (t == 2) a = P256 - 1;
      if (t == 3) begin a = P256 - 1; b = P256 - 1; end
      if (t == 4) b = '0;
      wr(sa_, 6'd20, a); wr(sb_, 6'd21, b);
      rd(sa_, 6'd20, got); chk("write/read", got, a);
      run(OP_MOVE, sr_, 6'd22, sa_, 6'd20, 0, '0, '0, '0);
      c_move = last_cycles;
      rd(sr_, 6'd22, got); chk("move", got, a);
      run(OP_MADD, sr_, 6'd23, sa_, 6'd20, sb_, 6'd21, '0, '0);
      c_add = last_cycles;
      rd(sr_, 6'd23, got); chk("madd", got, ref_add(a, b));
      run(OP_MSUB, sr_, 6'd24, sa_, 6'd20, sb_, 6'd21, '0, '0);
      c_sub = last_cycles;
      rd(sr_, 6'd24, got); chk("msub", got, ref_sub(a, b));
      run(OP_MMUL, sr_, 6'd25, sa_, 6'd20, sb_, 6'd21, '0, '0);
      if (last_cycles < c_mul_min) c_mul_min = last_cycles;
      if (last_cycles > c_mul_max) c_mul_max = last_cycles;
      n_mul++;
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
    // every mechanism of the reduction must have been exercised
    checks++;
    if (n_corr_sub == 0) begin failures++; $display("FAIL no correction subtraction seen"); end
    $display("W=32 cycles: MOVE %0d, MADD %0d, MSUB %0d, MMUL %0d..%0d over %0d products",
             c_move, c_add, c_sub, c_mul_min, c_mul_max, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
