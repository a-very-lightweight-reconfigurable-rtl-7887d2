// Carry-lookahead adder of K bits.
//
// Sum = A + B + Cin with a two-level generate/propagate network: every bit carry is
// computed directly from the bit generates and propagates below it, so no carry
// ripples.  Purely combinational.  The carry-select adder (csla) uses two of these
// per block, one with carry-in 0 and one with carry-in 1, as in the published adder
// figure; the lookahead form inside the block is this design's choice.
module cla #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         cin,
  output logic [K-1:0] sum,
  output logic         cout
);
  logic [K-1:0] g, p;
  logic [K:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[0]cin
  always_comb begin
    c[0] = cin;
    for (int i = 0; i < K; i++) begin
      logic term;
      logic prop;
      term = g[i];
      prop = p[i];
      for (int j = i - 1; j >= 0; j--) begin
        term = term | (prop & g[j]);
        prop = prop & p[j];
      end
      c[i+1] = term | (prop & cin);
    end
  end

  assign sum  = p ^ c[K-1:0];
  assign cout = c[K];
endmodule
