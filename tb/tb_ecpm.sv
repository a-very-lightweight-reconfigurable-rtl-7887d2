// Elliptic-curve point multiplication (ECPM) on NIST P-256 and, after switching the
// curve by software, on NIST P-224, run on the MicroECC processor at its default
// size: Q = k.G for a random full-length scalar k.
//
// The processor executes the point arithmetic from program memory; the test acts as
// the host.  It loads the curve constants, writes four routines with WRPGM and then
// drives the Montgomery ladder one scalar bit at a time: CHKB copies bit k_i into the
// flag, EXERTN runs the ladder step, which branches on the flag (JMPFT):
//   k_i = 1:  Q = Q + S, S = 2S        k_i = 0:  S = Q + S, Q = 2Q
// Points are kept in Jacobian coordinates (X, Y, Z) ~ (X/Z^2, Y/Z^3); addition uses
// 16 multiplications and 7 subtractions, doubling (a = -3) 8 multiplications.  The
// final Z is inverted on the processor too, as Z^(p-2) by square-and-multiply, with
// the exponent bits again tested by CHKB inside a routine.  Before the ladder starts,
// both points are moved to random coordinates (X, Y, Z) -> (l^2 X, l^3 Y, l Z) with a
// random l != 0, the coordinate randomisation that protects against differential
// power analysis; it changes the internal values but not the result.  The affine result is read
// back and compared with a double-and-add computed in the test in affine
// coordinates.  The cycle count of each multiplication is printed.  The same program
// serves both curves: switching writes the other prime, reduction table,
// compensation constant and operand length (16 or 14 words) into data memory.
//
// Program (all routines end with RET at stack level 0, returning to the host):
//   ADD  T = Q + S         DBL  D = 2D
//   STEP one ladder step   SQM  U = U^2, and U = U * Z if the flag is set
//   RND  randomise the coordinates of Q and S with l
module tb_ecpm;
  import microecc_pkg::*;
  import tb_p256_pkg::*;

  // curve constants: base point G, coefficient b (a = -3) and group order n
  localparam logic [255:0] GX256 = 256'h6b17d1f2e12c4247f8bce6e563a440f277037d812deb33a0f4a13945d898c296;
  localparam logic [255:0] GY256 = 256'h4fe342e2fe1a7f9b8ee7eb4a7c0f9e162bce33576b315ececbb6406837bf51f5;
  localparam logic [255:0] B256  = 256'h5ac635d8aa3a93e7b3ebbd55769886bc651d06b0cc53b0f63bce3c3e27d2604b;
  localparam logic [255:0] N256  = 256'hffffffff00000000ffffffffffffffffbce6faada7179e84f3b9cac2fc632551;
  localparam logic [255:0] GX224 = 256'hb70e0cbd6bb4bf7f321390b94a03c1d356c21122343280d6115c1d21;
  localparam logic [255:0] GY224 = 256'hbd376388b5f723fb4c22dfe6cd4375a05a07476444d5819985007e34;
  localparam logic [255:0] B224  = 256'hb4050a850c04b3abf54132565044b0b7d7bfd8ba270b39432355ffb4;
  localparam logic [255:0] N224  = 256'hffffffffffffffffffffffffffff16a2e0b8f03e13dd29455c5c2a3d;

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
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #(64'd10 * 64'd40_000_000);
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

  // a register location: {memory select, register number}
  typedef logic [6:0] loc_t;

  function automatic logic [31:0] i3(opcode_e op, loc_t r, loc_t a, loc_t b);
    return {op, r, a, b, 6'd0};
  endfunction
  function automatic logic [31:0] iflow(opcode_e op, int addr);
    return {op, 18'd0, 9'(addr)};
  endfunction

  task automatic write_reg(input loc_t l, input logic [255:0] v);
    for (int i = 0; i < 16; i++) send({OP_WRITE, l, 4'(i), v[i*16 +: 16]});
  endtask

  task automatic read_reg(input loc_t l, output logic [255:0] v);
    logic [31:0] w;
    for (int i = 0; i < 16; i++) begin
      send({OP_READ, l, 4'(i), 16'd0});
      recv(w);
      v[i*16 +: 16] = w[15:0];
    end
  endtask

  // ------------------------------------------------------------------ register map
  // Q and S (the two ladder points) in DM A, everything else in DM B
  localparam loc_t QX = {1'b0, 6'd1}, QY = {1'b0, 6'd2}, QZ = {1'b0, 6'd3};
  localparam loc_t SX = {1'b0, 6'd4}, SY = {1'b0, 6'd5}, SZ = {1'b0, 6'd6};
  localparam loc_t KR = {1'b0, 6'd10}, ER = {1'b0, 6'd11};   // scalar, p - 2
  localparam loc_t TX = {1'b1, 6'd7},  TY = {1'b1, 6'd8},  TZ = {1'b1, 6'd9};
  localparam loc_t DX = {1'b1, 6'd10}, DY = {1'b1, 6'd11}, DZ = {1'b1, 6'd12};
  localparam loc_t T1 = {1'b1, 6'd13}, T2 = {1'b1, 6'd14}, T3 = {1'b1, 6'd15};
  localparam loc_t T4 = {1'b1, 6'd16}, T5 = {1'b1, 6'd17}, T6 = {1'b1, 6'd18};
  localparam loc_t T7 = {1'b1, 6'd19}, T8 = {1'b1, 6'd20}, T9 = {1'b1, 6'd21};
  localparam loc_t UR = {1'b1, 6'd22}, LR = {1'b1, 6'd23};
  localparam loc_t ZERO = '0;

  // ------------------------------------------------------------------ program
  localparam int A_ADD = 0, A_DBL = 40, A_STEP = 80, A_SQM = 120, A_RND = 130;
  logic [31:0] prog [512];
  int          pc_asm, prog_len;

  function automatic void emit(logic [31:0] w);
    prog[pc_asm] = w;
    pc_asm++;
    if (pc_asm > prog_len) prog_len = pc_asm;
  endfunction
  function automatic void mul(loc_t r, loc_t a, loc_t b); emit(i3(OP_MMUL, r, a, b)); endfunction
  function automatic void add(loc_t r, loc_t a, loc_t b); emit(i3(OP_MADD, r, a, b)); endfunction
  function automatic void sub(loc_t r, loc_t a, loc_t b); emit(i3(OP_MSUB, r, a, b)); endfunction
  function automatic void mov(loc_t r, loc_t a);          emit(i3(OP_MOVE, r, a, ZERO)); endfunction

  function automatic void assemble();
    for (int i = 0; i < 512; i++) prog[i] = '0;
    prog_len = 0;
    // ADD: T = Q + S, general Jacobian addition (Q != +-S)
    pc_asm = A_ADD;
    mul(T1, QZ, QZ);            // Z1^2
    mul(T2, SZ, SZ);            // Z2^2
    mul(T3, QX, T2);            // U1 = X1 Z2^2
    mul(T4, SX, T1);            // U2 = X2 Z1^2
    mul(T5, SZ, T2);            // Z2^3
    mul(T5, QY, T5);            // S1 = Y1 Z2^3
    mul(T6, QZ, T1);            // Z1^3
    mul(T6, SY, T6);            // S2 = Y2 Z1^3
    sub(T4, T4, T3);            // H = U2 - U1
    sub(T6, T6, T5);            // R = S2 - S1
    mul(T7, T4, T4);            // H^2
    mul(T8, T7, T4);            // H^3
    mul(T7, T3, T7);            // U1 H^2
    mul(TX, T6, T6);            // R^2
    sub(TX, TX, T8);
    sub(TX, TX, T7);
    sub(TX, TX, T7);            // X3 = R^2 - H^3 - 2 U1 H^2
    sub(T9, T7, TX);
    mul(TY, T6, T9);
    mul(T9, T5, T8);            // S1 H^3
    sub(TY, TY, T9);            // Y3 = R (U1 H^2 - X3) - S1 H^3
    mul(TZ, QZ, SZ);
    mul(TZ, TZ, T4);            // Z3 = Z1 Z2 H
    emit(iflow(OP_RET, 0));
    // DBL: D = 2D, Jacobian doubling for a = -3
    pc_asm = A_DBL;
    mul(T1, DZ, DZ);            // delta = Z^2
    mul(T2, DY, DY);            // gamma = Y^2
    mul(T3, DX, T2);            // beta = X gamma
    sub(T4, DX, T1);
    add(T5, DX, T1);
    mul(T4, T4, T5);
    add(T5, T4, T4);
    add(T4, T5, T4);            // alpha = 3 (X - delta)(X + delta)
    add(T5, DY, DZ);
    mul(T5, T5, T5);
    sub(T5, T5, T2);
    sub(DZ, T5, T1);            // Z3 = (Y + Z)^2 - gamma - delta
    add(T3, T3, T3);
    add(T3, T3, T3);            // 4 beta
    add(T6, T3, T3);            // 8 beta
    mul(DX, T4, T4);
    sub(DX, DX, T6);            // X3 = alpha^2 - 8 beta
    sub(T3, T3, DX);
    mul(DY, T4, T3);
    mul(T2, T2, T2);
    add(T2, T2, T2);
    add(T2, T2, T2);
    add(T2, T2, T2);            // 8 gamma^2
    sub(DY, DY, T2);            // Y3 = alpha (4 beta - X3) - 8 gamma^2
    emit(iflow(OP_RET, 0));
    // STEP: one Montgomery ladder step on the flag (scalar bit)
    pc_asm = A_STEP;
    emit(iflow(OP_JMPFT, 0));                    // target patched below
    emit(iflow(OP_CALL, A_ADD));                 // bit 0: S = Q + S, Q = 2Q
    mov(DX, QX); mov(DY, QY); mov(DZ, QZ);
    emit(iflow(OP_CALL, A_DBL));
    mov(QX, DX); mov(QY, DY); mov(QZ, DZ);
    mov(SX, TX); mov(SY, TY); mov(SZ, TZ);
    emit(iflow(OP_RET, 0));
    prog[A_STEP] = iflow(OP_JMPFT, pc_asm);      // patch the branch target
    emit(iflow(OP_CALL, A_ADD));                 // bit 1: Q = Q + S, S = 2S
    mov(DX, SX); mov(DY, SY); mov(DZ, SZ);
    emit(iflow(OP_CALL, A_DBL));
    mov(SX, DX); mov(SY, DY); mov(SZ, DZ);
    mov(QX, TX); mov(QY, TY); mov(QZ, TZ);
    emit(iflow(OP_RET, 0));
    // SQM: U = U^2, then U = U * QZ if the flag (exponent bit) is set
    pc_asm = A_SQM;
    mul(UR, UR, UR);
    emit(iflow(OP_JMPFF, A_SQM + 3));
    mul(UR, UR, QZ);
    emit(iflow(OP_RET, 0));
    // RND: (X, Y, Z) -> (l^2 X, l^3 Y, l Z) for Q and S
    pc_asm = A_RND;
    mul(T1, LR, LR);
    mul(T2, T1, LR);
    mul(QX, QX, T1); mul(QY, QY, T2); mul(QZ, QZ, LR);
    mul(SX, SX, T1); mul(SY, SY, T2); mul(SZ, SZ, LR);
    emit(iflow(OP_RET, 0));
  endfunction

  // ------------------------------------------------------------------ reference (affine)
  logic [255:0] pm, bm;         // prime and b of the curve under test

  function automatic logic [255:0] fmul(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) * 512'(b)) % 512'(pm));
  endfunction
  function automatic logic [255:0] fadd(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) + 512'(b)) % 512'(pm));
  endfunction
  function automatic logic [255:0] fsub(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) + 512'(pm) - 512'(b)) % 512'(pm));
  endfunction
  function automatic logic [255:0] finv(logic [255:0] a);
    logic [255:0] r, e;
    r = 256'd1;
    e = pm - 2;
    for (int i = 255; i >= 0; i--) begin
      r = fmul(r, r);
      if (e[i]) r = fmul(r, a);
    end
    return r;
  endfunction

  typedef struct { logic [255:0] x, y; bit inf; } apt_t;

  function automatic apt_t aff_add(apt_t p, apt_t q);
    apt_t r;
    logic [255:0] l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.y == 0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
      // tangent: (3x^2 - 3) / 2y
      l = fmul(fsub(fadd(fadd(fmul(p.x, p.x), fmul(p.x, p.x)), fmul(p.x, p.x)), 256'd3),
               finv(fadd(p.y, p.y)));
    end else begin
      l = fmul(fsub(q.y, p.y), finv(fsub(q.x, p.x)));
    end
    r.inf = 0;
    r.x = fsub(fsub(fmul(l, l), p.x), q.x);
    r.y = fsub(fmul(l, fsub(p.x, r.x)), p.y);
    return r;
  endfunction

  function automatic apt_t aff_mul(logic [255:0] k, apt_t p);
    apt_t r;
    r.inf = 1; r.x = 0; r.y = 0;
    for (int i = 255; i >= 0; i--) begin
      r = aff_add(r, r);
      if (k[i]) r = aff_add(r, p);
    end
    return r;
  endfunction

  function automatic bit on_curve(logic [255:0] x, logic [255:0] y);
    logic [255:0] rhs;
    rhs = fadd(fsub(fmul(fmul(x, x), x), fadd(fadd(x, x), x)), bm);
    return fmul(y, y) == rhs;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------------ one curve
  int n_ones = 0, n_zeros = 0, max_sp = 0, n_curves = 0, n_rnd = 0;
  always @(posedge clk) if (int'(stack_ptr) > max_sp) max_sp = int'(stack_ptr);

  task automatic load_curve(input bit is224);
    table_t       tbl;
    logic [255:0] comp;
    int           nw;
    if (is224) void'(build_table_224(tbl, comp));
    else       void'(build_table(tbl, comp));
    pm = is224 ? P224 : P256;
    bm = is224 ? B224 : B256;
    nw = is224 ? 14 : 16;
    write_reg({P_SEL, P_REG}, pm);
    write_reg({COMP_SEL, COMP_REG}, comp);
    for (int i = 0; i < 128; i++) send({OP_WRITE, TBL_SEL, 6'(TBL_REG + i / 16), 4'(i % 16), tbl[i]});
    send({OP_WRITE, CFG_SEL, CFG_REG, 4'd0, 16'(nw)});
    write_reg(ER, pm - 2);
    wait_idle();
  endtask

  task automatic run_ecpm(input bit is224);
    logic [255:0] k, x, y, gx, gy, n, lambda, zq;
    int           nbits;
    longint       t0, t_ladder, t_inv;
    apt_t         g, expect_pt;
    nbits = is224 ? 224 : 256;
    gx = is224 ? GX224 : GX256;
    gy = is224 ? GY224 : GY256;
    n  = is224 ? N224 : N256;
    load_curve(is224);
    check("base point on curve", on_curve(gx, gy));
    g.x = gx; g.y = gy; g.inf = 0;
    for (int i = 0; i < 8; i++) k[i*32 +: 32] = $urandom;
    k = k & ((256'd1 << nbits) - 1);
    k[nbits - 1] = 1'b1;
    if (k >= n) k[nbits - 3] = 1'b0;
    write_reg(KR, k);
    wait_idle();

    // ladder: Q = G, S = 2G, then bits nbits-2 .. 0
    t0 = cycles;
    write_reg(QX, gx);
    write_reg(QY, gy);
    write_reg(QZ, 256'd1);
    send(i3(OP_MOVE, DX, QX, ZERO));
    send(i3(OP_MOVE, DY, QY, ZERO));
    send(i3(OP_MOVE, DZ, QZ, ZERO));
    send(iflow(OP_EXERTN, A_DBL));
    send(i3(OP_MOVE, SX, DX, ZERO));
    send(i3(OP_MOVE, SY, DY, ZERO));
    send(i3(OP_MOVE, SZ, DZ, ZERO));
    // coordinate randomisation: Q was (Gx, Gy, 1), so its Z becomes l
    for (int i = 0; i < 8; i++) lambda[i*32 +: 32] = $urandom;
    lambda = 256'(512'(lambda) % 512'(pm - 1)) + 256'd1;
    write_reg(LR, lambda);
    send(iflow(OP_EXERTN, A_RND));
    wait_idle();
    read_reg(QZ, zq);
    check("coordinates randomised", zq === lambda && zq != 256'd1);
    n_rnd++;
    t0 = cycles;
    for (int i = nbits - 2; i >= 0; i--) begin
      send({OP_CHKB, 7'd0, KR, 5'd0, 8'(i)});
      send(iflow(OP_EXERTN, A_STEP));
      if (k[i]) n_ones++; else n_zeros++;
    end
    wait_idle();
    t_ladder = cycles - t0;

    // Z^-1 = Z^(p-2): the top bit of p - 2 is 1, so start from U = Z
    t0 = cycles;
    send(i3(OP_MOVE, UR, QZ, ZERO));
    for (int i = nbits - 2; i >= 0; i--) begin
      send({OP_CHKB, 7'd0, ER, 5'd0, 8'(i)});
      send(iflow(OP_EXERTN, A_SQM));
    end
    send(i3(OP_MMUL, T1, UR, UR));          // Z^-2
    send(i3(OP_MMUL, T2, T1, UR));          // Z^-3
    send(i3(OP_MMUL, T3, QX, T1));          // x
    send(i3(OP_MMUL, T4, QY, T2));          // y
    wait_idle();
    t_inv = cycles - t0;
    read_reg(T3, x);
    read_reg(T4, y);
    x = x & ((256'd1 << nbits) - 1);
    y = y & ((256'd1 << nbits) - 1);

    expect_pt = aff_mul(k, g);
    $display("P-%0d: k = %h", nbits, k);
    $display("  kG.x = %h (expected %h)", x, expect_pt.x);
    $display("  kG.y = %h (expected %h)", y, expect_pt.y);
    $display("  ladder %0d cycles, inversion and affine conversion %0d cycles, total %0d",
             t_ladder, t_inv, t_ladder + t_inv);
    check("x of k.G", x === expect_pt.x);
    check("y of k.G", y === expect_pt.y);
    check("result on curve", on_curve(x, y));
    n_curves++;
  endtask

  // ------------------------------------------------------------------ test
  logic [31:0] w;

  initial begin
    assemble();
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < prog_len; i++) begin
      send(iflow(OP_WRPGM, i));
      send(prog[i]);
    end
    send(iflow(OP_RDPGM, A_STEP));
    recv(w);
    check("program read back", w === prog[A_STEP]);

    run_ecpm(1'b0);
    run_ecpm(1'b1);

    $display("ladder steps with bit 1: %0d, with bit 0: %0d; corrections: subtract p %0d, add p %0d;",
             n_ones, n_zeros, n_corr_sub, n_corr_add);
    $display("write-back stalls %0d; max stack depth %0d", n_stall, max_sp);
    check("both ladder branches taken", n_ones > 0 && n_zeros > 0);
    check("routine calls made", max_sp >= 1);
    check("both curves run", n_curves == 2);
    check("coordinate randomisation run", n_rnd == 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
