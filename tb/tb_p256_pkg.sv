// Test support for NIST P-256 (and P-224) on the 16-bit datapath: the primes,
// wide-integer reference arithmetic modulo p-256, random field elements, and the
// fast-reduction term tables with their compensation constants, built from the
// reduction formulas
//   P-256: c = z1 + 2 z2 + 2 z3 + z4 + z5 - z6 - z7 - z8 - z9  (mod p)
//   P-224: c = s1 + s2 + s3 - s4 - s5                          (mod p)
// where each z or s is a selection of 32-bit words of the double-size product.
// Table entry: [15] last term of its 16-bit output column, [14] subtract,
// [5:0] 16-bit word index into the product.  A subtracted term is added by the
// hardware as 2^16 - x, so each column j with nsub_j subtractions leaves an excess
// of nsub_j * 2^(16(j+1)); the compensation constant is minus their sum, mod p.
package tb_p256_pkg;
  localparam int W = 16, NW = 16;
  localparam logic [255:0] P256 =
    256'hffffffff00000001000000000000000000000000ffffffffffffffffffffffff;

  // source 32-bit word of term z at 32-bit position m, -1 for zero
  localparam int ZSRC [9][8] = '{
    '{ 0,  1,  2,  3,  4,  5,  6,  7},
    '{-1, -1, -1, 11, 12, 13, 14, 15},
    '{-1, -1, -1, 12, 13, 14, 15, -1},
    '{ 8,  9, 10, -1, -1, -1, 14, 15},
    '{ 9, 10, 11, 13, 14, 15, 13,  8},
    '{11, 12, 13, -1, -1, -1,  8, 10},
    '{12, 13, 14, 15, -1, -1,  9, 11},
    '{13, 14, 15,  8,  9, 10, -1, 12},
    '{14, 15, -1,  9, 10, 11, -1, 13}};
  localparam int ZCOEF [9] = '{1, 2, 2, 1, 1, -1, -1, -1, -1};

  typedef logic [15:0] table_t [128];

  function automatic int build_table(ref table_t tbl, output logic [255:0] comp);
    logic [511:0] e;
    int n;
    n = 0;
    e = '0;
    for (int i = 0; i < 128; i++) tbl[i] = '0;
    for (int j = 0; j < NW; j++) begin
      int nsub;
      nsub = 0;
      for (int z = 0; z < 9; z++) begin
        if (ZSRC[z][j / 2] >= 0) begin
          for (int r = 0; r < ((ZCOEF[z] < 0) ? 1 : ZCOEF[z]); r++) begin
            tbl[n] = {1'b0, (ZCOEF[z] < 0), 8'd0, 6'(2 * ZSRC[z][j / 2] + j % 2)};
            if (ZCOEF[z] < 0) nsub++;
            n++;
          end
        end
      end
      tbl[n - 1][15] = 1'b1;
      e = e + (512'(nsub) << (W * (j + 1)));
    end
    comp = 256'((512'(P256) - (e % 512'(P256))) % 512'(P256));
    return n;
  endfunction

  localparam logic [255:0] P224 = (256'd1 << 224) - (256'd1 << 96) + 256'd1;

  // P-224 term table: source 32-bit word of term s at position m, -1 for zero
  localparam int S224 [5][7] = '{
    '{ 0,  1,  2,  3,  4,  5,  6},
    '{-1, -1, -1,  7,  8,  9, 10},
    '{-1, -1, -1, 11, 12, 13, -1},
    '{ 7,  8,  9, 10, 11, 12, 13},
    '{11, 12, 13, -1, -1, -1, -1}};
  localparam int C224 [5] = '{1, 1, 1, -1, -1};

  function automatic int build_table_224(ref table_t tbl, output logic [255:0] comp);
    logic [511:0] e;
    int n;
    n = 0;
    e = '0;
    for (int i = 0; i < 128; i++) tbl[i] = '0;
    for (int j = 0; j < 14; j++) begin
      int nsub;
      nsub = 0;
      for (int s = 0; s < 5; s++) begin
        if (S224[s][j / 2] >= 0) begin
          tbl[n] = {1'b0, (C224[s] < 0), 8'd0, 6'(2 * S224[s][j / 2] + j % 2)};
          if (C224[s] < 0) nsub++;
          n++;
        end
      end
      tbl[n - 1][15] = 1'b1;
      e = e + (512'(nsub) << (16 * (j + 1)));
    end
    comp = 256'((512'(P224) - (e % 512'(P224))) % 512'(P224));
    return n;
  endfunction

  function automatic logic [255:0] rnd_fe();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return 256'(512'(v) % 512'(P256));
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
endpackage
