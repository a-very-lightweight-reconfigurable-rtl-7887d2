// Carry-save adder (3:2 compressor) of N bits.
//
// Reduces three N-bit addends x, y, z to a sum vector and a carry vector with
// x + y + z = s + c (mod 2^N).  The carry vector is already shifted left by one, so
// its bit 0 is always 0; the ALU datapath uses that free bit to inject the "+1" of a
// two's-complement subtraction.  Combinational.  The published datapath uses two such
// CSA(2W+S) stages in series; the bit-level form is the textbook full-adder row.
module csa #(
  parameter int unsigned N = 36
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);
  logic [N-2:0] maj;     // the carry out of bit N-1 leaves the word
  assign s   = x ^ y ^ z;
  assign maj = (x[N-2:0] & y[N-2:0]) | (x[N-2:0] & z[N-2:0]) | (y[N-2:0] & z[N-2:0]);
  assign c   = {maj, 1'b0};
endmodule
