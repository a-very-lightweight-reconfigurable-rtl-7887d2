// Curve-switch test of the MicroECC processor: NIST P-256, then P-224, then P-256
// again, on one processor without reset in between.
//
// The processor has no curve-specific hardware: the prime, the fast-reduction term
// table, the compensation constant and the operand length word live in data memory
// and are written by the host.  This test builds both curves' tables here from their
// reduction formulas,
//   P-256: c = z1 + 2 z2 + 2 z3 + z4 + z5 - z6 - z7 - z8 - z9
//   P-224: c = s1 + s2 + s3 - s4 - s5
// loads one curve, checks MADD, MSUB and MMUL against wide-integer arithmetic, loads
// the other and checks again.  For P-224 only the low 14 words of a register take
// part.  Each switch must happen and each curve must see a correction step, else the
// test fails.
module tb_curve_switch;
  import microecc_pkg::*;
  import tb_p256_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        tx_push = 1'b0, tx_full, rx_pop = 1'b0, rx_empty, busy, prog_mode, flag;
  logic [31:0] tx_wdata = '0, rx_rdata;
  logic [1:0]  stack_ptr;
  logic [15:0] n_corr_sub, n_corr_add, n_stall;

  microecc_top dut (
    .clk, .rst_n, .tx_push, .tx_wdata, .tx_full, .rx_pop, .rx_rdata, .rx_empty,
    .busy, .prog_mode, .stack_ptr, .flag, .n_corr_sub, .n_corr_add, .n_stall);

  int checks = 0, failures = 0;

  initial begin
    #(64'd10 * 64'd3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ host helpers
  task automatic send(input logic [31:0] w);
    @(negedge clk);
    while (tx_full) @(negedge clk);
    tx_wdata = w;
    tx_push  = 1'b1;
    @(negedge clk);
    tx_push  = 1'b0;
  endtask

  task automatic recv(output logic [31:0] w);
    @(negedge clk);
    while (rx_empty) @(negedge clk);
    w      = rx_rdata;
    rx_pop = 1'b1;
    @(negedge clk);
    rx_pop = 1'b0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  function automatic logic [31:0] i3(opcode_e op, logic sr, logic [5:0] rr, logic sa,
                                     logic [5:0] ra, logic sb, logic [5:0] rb);
    return {op, sr, rr, sa, ra, sb, rb, 6'd0};
  endfunction

  function automatic logic [31:0] iwr(logic s, logic [5:0] r, logic [3:0] wd, logic [15:0] d);
    return {OP_WRITE, s, r, wd, d};
  endfunction

  task automatic write_reg(input logic s, input logic [5:0] r, input logic [255:0] v);
    for (int i = 0; i < 16; i++) send(iwr(s, r, 4'(i), v[i*16 +: 16]));
  endtask

  task automatic read_reg(input logic s, input logic [5:0] r, output logic [255:0] v);
    logic [31:0] w;
    for (int i = 0; i < 16; i++) begin
      send({OP_READ, s, r, 4'(i), 16'd0});
      recv(w);
      v[i*16 +: 16] = w[15:0];
    end
  endtask

  // ------------------------------------------------------------------ curve state
  logic [255:0] p_cur, mask;
  int           nw_cur;

  int n_switch = 0;

  task automatic load_curve(input bit is224);
    table_t       tbl;
    logic [255:0] comp;
    int           n;
    if (is224) n = build_table_224(tbl, comp);
    else       n = build_table(tbl, comp);
    p_cur  = is224 ? P224 : P256;
    nw_cur = is224 ? 14 : 16;
    mask   = is224 ? (256'd1 << 224) - 1 : '1;
    write_reg(P_SEL, P_REG, p_cur);
    write_reg(COMP_SEL, COMP_REG, comp);
    for (int i = 0; i < 128; i++) send(iwr(TBL_SEL, 6'(TBL_REG + i / 16), 4'(i % 16), tbl[i]));
    send(iwr(CFG_SEL, CFG_REG, 4'd0, 16'(nw_cur)));
    wait_idle();
    n_switch++;
    $display("curve P-%0d loaded: %0d table entries", is224 ? 224 : 256, n);
  endtask

  function automatic logic [255:0] rnd_cur();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return 256'(512'(v) % 512'(p_cur));
  endfunction

  task automatic run_op(input opcode_e op, input logic [255:0] a, input logic [255:0] b,
                        input logic [255:0] exp, input string name);
    logic [255:0] got;
    write_reg(1'b0, 6'd1, a);
    write_reg(1'b1, 6'd2, b);
    send(i3(op, 1'b1, 6'd5, 1'b0, 6'd1, 1'b1, 6'd2));
    wait_idle();
    read_reg(1'b1, 6'd5, got);
    checks++;
    if ((got & mask) !== exp) begin
      failures++;
      $display("FAIL %s (%0d words): got %h expected %h", name, nw_cur, got & mask, exp);
    end
  endtask

  task automatic test_curve(input int n_mul);
    logic [255:0] a, b;
    int corr0;
    corr0 = int'(n_corr_sub) + int'(n_corr_add);
    for (int t = 0; t < 4; t++) begin
      a = (t == 0) ? p_cur - 1 : rnd_cur();
      b = (t == 0) ? p_cur - 1 : rnd_cur();
      run_op(OP_MADD, a, b, 256'((512'(a) + 512'(b)) % 512'(p_cur)), "madd");
      run_op(OP_MSUB, a, b, 256'((512'(a) + 512'(p_cur) - 512'(b)) % 512'(p_cur)), "msub");
    end
    for (int t = 0; t < n_mul; t++) begin
      a = (t == 0) ? p_cur - 1 : rnd_cur();
      b = (t == 0) ? p_cur - 1 : (t == 1) ? 256'd1 : rnd_cur();
      run_op(OP_MMUL, a, b, 256'((512'(a) * 512'(b)) % 512'(p_cur)), "mmul");
    end
    checks++;
    if (int'(n_corr_sub) + int'(n_corr_add) == corr0) begin
      failures++;
      $display("FAIL no correction step on this curve");
    end
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    load_curve(1'b0);
    test_curve(3);
    load_curve(1'b1);
    test_curve(8);
    load_curve(1'b0);
    test_curve(3);
    $display("curve switches %0d, corrections sub %0d add %0d", n_switch, n_corr_sub, n_corr_add);
    checks++;
    if (n_switch != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
