// Vendor-dependent W x W multiplier with two output vectors.
//
// The published design hides the multiplier behind a vendor-specific block (a hard
// 16x16 multiplier on one FPGA family, a parallel LUT multiplier on another) whose
// product leaves as two 2W-bit vectors.  Here the two vectors are the two half
// products a*b[W/2-1:0] and (a*b[W-1:W/2]) << W/2, so p0 + p1 = a*b exactly; that
// split, and the plain "*" that lets synthesis map each half onto what the target
// offers, are this design's choice.  Combinational; the datapath registers the two
// vectors (the "D" boxes under the multiplier).
module vendor_mult #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p0,
  output logic [2*W-1:0] p1
);
  localparam int unsigned H = W / 2;
  logic [W+H-1:0] lo, hi;
  assign lo = {{H{1'b0}}, a} * {{W{1'b0}}, b[H-1:0]};
  assign hi = {{H{1'b0}}, a} * {{W{1'b0}}, b[W-1:H]};
  assign p0 = {{(W-H){1'b0}}, lo};
  assign p1 = {hi, {H{1'b0}}};
endmodule
