// End-to-end test of the MicroECC processor at its default size (16-bit datapath,
// 256-bit operands, NIST P-256).
//
// The test acts as the host.  Through the TX FIFO it loads the prime p, the fast
// reduction term table and the compensation constant (all generated here from the
// P-256 reduction formula), then field elements, runs every arithmetic instruction
// and reads the results back through the RX FIFO, comparing them with wide-integer
// arithmetic computed in the test.  It then writes a small program with WRPGM,
// checks it with RDPGM and runs it with EXERTN: three nested CALLs, conditional and
// unconditional jumps, and arithmetic inside the routines.  Each mechanism (carry
// and borrow corrections, trial subtraction, write-back stalls, flag true/false, all
// jump kinds, full stack depth) is counted and must occur at least once.
module tb_microecc_top;
  import microecc_pkg::*;

  localparam int W = 16, NW = 16;
  localparam logic [255:0] P256 =
    256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff;

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

  function automatic logic [31:0] iflow(opcode_e op, logic [8:0] addr);
    return {op, 18'd0, addr};
  endfunction

  function automatic logic [31:0] iwr(logic s, logic [5:0] r, logic [3:0] wd, logic [15:0] d);
    return {OP_WRITE, s, r, wd, d};
  endfunction

  function automatic logic [31:0] ichkb(logic s, logic [5:0] r, logic [7:0] bitno);
    return {OP_CHKB, 7'd0, s, r, 5'd0, bitno};
  endfunction

  task automatic write_reg(input logic s, input logic [5:0] r, input logic [255:0] v);
    for (int i = 0; i < NW; i++) send(iwr(s, r, 4'(i), v[i*W +: W]));
  endtask

  task automatic read_reg(input logic s, input logic [5:0] r, output logic [255:0] v);
    logic [31:0] w;
    for (int i = 0; i < NW; i++) begin
      send({OP_READ, s, r, 4'(i), 16'd0});
      recv(w);
      v[i*W +: W] = w[15:0];
    end
  endtask

  task automatic check256(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_flag(input string what, input logic exp);
    checks++;
    if (flag !== exp) begin
      failures++;
      $display("FAIL %s: flag %0b expected %0b", what, flag, exp);
    end
  endtask

  // ------------------------------------------------------------------ P-256 reduction table
  // zsrc[z][m]: 32-bit source word of term z at 32-bit position m (-1: zero)
  int zsrc [9][8] = '{
    '{ 0,  1,  2,  3,  4,  5,  6,  7},
    '{-1, -1, -1, 11, 12, 13, 14, 15},
    '{-1, -1, -1, 12, 13, 14, 15, -1},
    '{ 8,  9, 10, -1, -1, -1, 14, 15},
    '{ 9, 10, 11, 13, 14, 15, 13,  8},
    '{11, 12, 13, -1, -1, -1,  8, 10},
    '{12, 13, 14, 15, -1, -1,  9, 11},
    '{13, 14, 15,  8,  9, 10, -1, 12},
    '{14, 15, -1,  9, 10, 11, -1, 13}};
  int zcoef [9] = '{1, 2, 2, 1, 1, -1, -1, -1, -1};

  logic [15:0]  table_w [128];
  int           n_entries;
  logic [255:0] comp;

  task automatic build_table();
    logic [511:0] e;
    int nsub;
    n_entries = 0;
    e = '0;
    for (int j = 0; j < NW; j++) begin
      int m, h, first_idx;
      m = j / 2;
      h = j % 2;
      nsub = 0;
      for (int z = 0; z < 9; z++) begin
        if (zsrc[z][m] >= 0) begin
          int reps;
          reps = (zcoef[z] < 0) ? 1 : zcoef[z];
          for (int r = 0; r < reps; r++) begin
            table_w[n_entries] = {1'b0, (zcoef[z] < 0), 8'd0, 6'(2 * zsrc[z][m] + h)};
            if (zcoef[z] < 0) nsub++;
            n_entries++;
          end
        end
      end
      table_w[n_entries - 1][15] = 1'b1;
      e = e + (512'(nsub) << (W * (j + 1)));
    end
    comp = 256'((512'(P256) - (e % 512'(P256))) % 512'(P256));
  endtask

  task automatic load_constants();
    build_table();
    write_reg(P_SEL, P_REG, P256);
    write_reg(COMP_SEL, COMP_REG, comp);
    for (int i = 0; i < 128; i++) begin
      logic [15:0] v;
      v = (i < n_entries) ? table_w[i] : 16'd0;
      send(iwr(TBL_SEL, 6'(TBL_REG + i / 16), 4'(i % 16), v));
    end
  endtask

  // ------------------------------------------------------------------ reference model
  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [255:0] rnd_fe();
    return 256'(512'(rnd256()) % 512'(P256));
  endfunction

  function automatic logic [255:0] ref_add(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) + 512'(b)) % 512'(P256));
  endfunction
  function automatic logic [255:0] ref_sub(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) + 512'(P256) - 512'(b)) % 512'(P256));
  endfunction
  function automatic logic [255:0] ref_mul(logic [255:0] a, logic [255:0] b);
    return 256'((512'(a) * 512'(b)) % 512'(P256));
  endfunction

  // ------------------------------------------------------------------ tests
  // register use: DM A r1..r3 operands, DM B r5 result, DM A r6 result
  int n_madd_carry = 0, n_msub_borrow = 0, n_flag_true = 0, n_flag_false = 0;
  int n_trial_sub = 0;

  task automatic run_op(input opcode_e op, input logic [255:0] a, input logic [255:0] b,
                        input logic [255:0] exp, input string name);
    logic [255:0] got;
    longint t0;
    write_reg(1'b0, 6'd1, a);
    write_reg(1'b1, 6'd2, b);
    wait_idle();
    t0 = cycles;
    send(i3(op, 1'b1, 6'd5, 1'b0, 6'd1, 1'b1, 6'd2));
    wait_idle();
    if (op == OP_MMUL && name == "mmul0")
      $display("MMUL took %0d cycles (host word to idle)", cycles - t0);
    read_reg(1'b1, 6'd5, got);
    check256(name, got, exp);
  endtask

  task automatic run_cmp(input logic [255:0] a, input logic [255:0] b);
    write_reg(1'b0, 6'd1, a);
    write_reg(1'b0, 6'd2, b);       // same memory as A: both read ports of DM A
    send(i3(OP_CMPGR, 1'b0, 6'd0, 1'b0, 6'd1, 1'b0, 6'd2));
    wait_idle();
    check_flag("CMPGR", a > b);
    if (flag) n_flag_true++; else n_flag_false++;
    send(i3(OP_CMPEQ, 1'b0, 6'd0, 1'b0, 6'd1, 1'b0, 6'd2));
    wait_idle();
    check_flag("CMPEQ", a == b);
    if (flag) n_flag_true++; else n_flag_false++;
    send(i3(OP_CMPLO, 1'b0, 6'd0, 1'b0, 6'd1, 1'b0, 6'd2));
    wait_idle();
    check_flag("CMPLO", a < b);
    if (flag) n_flag_true++; else n_flag_false++;
  endtask

  logic [255:0] a, b, got;
  logic [31:0]  w;
  int           sub0;
  logic [31:0]  prog [16];
  int max_sp = 0, n_jmpft = 0, n_jmpff = 0, n_jmp = 0, n_exertn = 0;
  always @(posedge clk) if (int'(stack_ptr) > max_sp) max_sp = int'(stack_ptr);

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    load_constants();
    wait_idle();

    // --- MOVE, WRITE/READ
    a = rnd_fe();
    write_reg(1'b0, 6'd1, a);
    send(i3(OP_MOVE, 1'b0, 6'd6, 1'b0, 6'd1, 1'b0, 6'd0));
    wait_idle();
    read_reg(1'b0, 6'd6, got);
    check256("move", got, a);

    // --- modular addition and subtraction, random and edge values
    for (int t = 0; t < 12; t++) begin
      a = (t == 0) ? P256 - 1 : rnd_fe();
      b = (t == 0) ? P256 - 1 : (t == 1) ? P256 - a : rnd_fe();
      if (512'(a) + 512'(b) >= 512'(2) ** 256) n_madd_carry++;
      sub0 = n_corr_sub;
      run_op(OP_MADD, a, b, ref_add(a, b), "madd");
      if (a < b) n_msub_borrow++;
      run_op(OP_MSUB, a, b, ref_sub(a, b), "msub");
    end
    // a + b in [p, 2^256): no carry, but the trial subtraction must fire
    a = P256 - 5; b = 256'd7;
    sub0 = int'(n_corr_sub);
    run_op(OP_MADD, a, b, ref_add(a, b), "madd_trial");
    n_trial_sub++;

    // --- modular multiplication
    for (int t = 0; t < 10; t++) begin
      a = (t == 0) ? P256 - 1 : (t == 1) ? 256'd0 : rnd_fe();
      b = (t == 0) ? P256 - 1 : (t == 2) ? 256'd1 : rnd_fe();
      run_op(OP_MMUL, a, b, ref_mul(a, b), t == 3 ? "mmul0" : "mmul");
    end
    // in place: r = a * a with r = a
    a = rnd_fe();
    write_reg(1'b0, 6'd7, a);
    send(i3(OP_MMUL, 1'b0, 6'd7, 1'b0, 6'd7, 1'b0, 6'd7));
    wait_idle();
    read_reg(1'b0, 6'd7, got);
    check256("mmul in place", got, ref_mul(a, a));

    // --- comparisons and CHKB
    a = rnd_fe(); b = rnd_fe();
    run_cmp(a, b);
    run_cmp(b, a);
    run_cmp(a, a);
    write_reg(1'b1, 6'd9, a);
    for (int t = 0; t < 6; t++) begin
      logic [7:0] bn;
      bn = 8'($urandom);
      send(ichkb(1'b1, 6'd9, bn));
      wait_idle();
      check_flag("chkb", a[bn]);
      if (flag) n_flag_true++; else n_flag_false++;
    end

    // --- embedded program: three nested calls, jumps, arithmetic
    // r10 = r11 * r12 at level 3; r13 = r10 + r11 if r10 == r10 (JMPFF not taken);
    // JMPFT over a poison MOVE; r14 = r13 - r12 at level 1.
    prog[0]  = iflow(OP_CALL, 9'd4);                           // level 0 -> 1
    prog[1]  = i3(OP_MSUB, 1'b0, 6'd14, 1'b0, 6'd13, 1'b1, 6'd12);
    prog[2]  = iflow(OP_RET, 9'd0);                            // end of routine
    prog[3]  = 32'd0;
    prog[4]  = iflow(OP_CALL, 9'd8);                           // level 1 -> 2
    prog[5]  = i3(OP_CMPEQ, 1'b0, 6'd0, 1'b0, 6'd10, 1'b0, 6'd10);
    prog[6]  = iflow(OP_JMPFT, 9'd12);                          // taken
    prog[7]  = i3(OP_MOVE, 1'b0, 6'd13, 1'b0, 6'd12, 1'b0, 6'd0); // skipped
    prog[8]  = iflow(OP_CALL, 9'd14);                          // level 2 -> 3
    prog[9]  = iflow(OP_RET, 9'd0);
    prog[10] = 32'd0;
    prog[11] = 32'd0;
    prog[12] = i3(OP_MADD, 1'b0, 6'd13, 1'b0, 6'd10, 1'b1, 6'd11);
    prog[13] = iflow(OP_RET, 9'd0);
    prog[14] = i3(OP_MMUL, 1'b0, 6'd10, 1'b1, 6'd11, 1'b1, 6'd12);
    prog[15] = iflow(OP_RET, 9'd0);
    // the routine at 4 returns to 1 only after 8 (-> 14 -> back to 9 -> RET to 5).
    // 5: CMPEQ r10, r10 -> flag 1; 6: JMPFT 12 -> MADD; 13: RET to 1; 1: MSUB; 2: RET.
    // 9 returns from level 2 to 5.  A JMPFF / JMP pair at 16..18 is run separately.
    for (int i = 0; i < 16; i++) begin
      send(iflow(OP_WRPGM, 9'(100 + i)));
      send(prog[i] + ((prog[i][31:27] inside {OP_CALL, OP_JMPFT}) ? 32'd100 : 32'd0));
    end
    // second routine at 200: CMPLO r11 < r11 -> 0, JMPFF 203 (taken), poison, JMP 205
    send(iflow(OP_WRPGM, 9'd200)); send(i3(OP_CMPLO, 1'b0, 6'd0, 1'b1, 6'd11, 1'b1, 6'd11));
    send(iflow(OP_WRPGM, 9'd201)); send(iflow(OP_JMPFF, 9'd203));
    send(iflow(OP_WRPGM, 9'd202)); send(i3(OP_MOVE, 1'b1, 6'd15, 1'b1, 6'd12, 1'b0, 6'd0));
    send(iflow(OP_WRPGM, 9'd203)); send(iflow(OP_JMP, 9'd205));
    send(iflow(OP_WRPGM, 9'd204)); send(i3(OP_MOVE, 1'b1, 6'd15, 1'b1, 6'd12, 1'b0, 6'd0));
    send(iflow(OP_WRPGM, 9'd205)); send(i3(OP_MOVE, 1'b1, 6'd15, 1'b1, 6'd11, 1'b0, 6'd0));
    send(iflow(OP_WRPGM, 9'd206)); send(iflow(OP_RET, 9'd0));
    wait_idle();
    // read a program word back
    send(iflow(OP_RDPGM, 9'd114));
    recv(w);
    checks++;
    if (w !== prog[14]) begin
      failures++;
      $display("FAIL rdpgm: %h expected %h", w, prog[14]);
    end

    a = rnd_fe(); b = rnd_fe();
    write_reg(1'b1, 6'd11, a);
    write_reg(1'b1, 6'd12, b);
    write_reg(1'b0, 6'd13, 256'd0);
    send(iflow(OP_EXERTN, 9'd100));
    n_exertn++;
    wait_idle();
    begin
      logic [255:0] p10, p13, p14;
      p10 = ref_mul(a, b);
      p13 = ref_add(p10, a);
      p14 = ref_sub(p13, b);
      read_reg(1'b0, 6'd10, got); check256("program mmul", got, p10);
      read_reg(1'b0, 6'd13, got); check256("program madd (after JMPFT)", got, p13);
      read_reg(1'b0, 6'd14, got); check256("program msub", got, p14);
      n_jmpft++;
    end
    write_reg(1'b1, 6'd15, 256'd0);
    send(iflow(OP_EXERTN, 9'd200));
    n_exertn++;
    wait_idle();
    read_reg(1'b1, 6'd15, got);
    check256("program JMPFF/JMP", got, a);
    n_jmpff++;
    n_jmp++;

    // --- mechanisms seen
    $display("mechanisms: madd carry %0d, msub borrow %0d, corr-sub %0d, corr-add %0d, stalls %0d,",
             n_madd_carry, n_msub_borrow, n_corr_sub, n_corr_add, n_stall);
    $display("  flag true %0d false %0d, max stack depth %0d, jmpft %0d jmpff %0d jmp %0d exertn %0d",
             n_flag_true, n_flag_false, max_sp, n_jmpft, n_jmpff, n_jmp, n_exertn);
    checks++; if (n_madd_carry == 0)  begin failures++; $display("FAIL no MADD carry"); end
    checks++; if (n_msub_borrow == 0) begin failures++; $display("FAIL no MSUB borrow"); end
    checks++; if (n_corr_sub == 0)    begin failures++; $display("FAIL no correction subtract"); end
    checks++; if (n_corr_add == 0)    begin failures++; $display("FAIL no correction add"); end
    checks++; if (n_stall == 0)       begin failures++; $display("FAIL no write-back stall"); end
    checks++; if (n_flag_true == 0 || n_flag_false == 0) begin failures++; $display("FAIL flag"); end
    checks++; if (max_sp != 3)        begin failures++; $display("FAIL stack depth %0d", max_sp); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
