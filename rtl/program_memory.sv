// Program memory of the software engine.
//
// DEPTH words of 32 bits holding the embedded program (512 words, addressed by the
// 9-bit program counter).  One write port (WrAd, data) used by the WRPGM instruction
// and one read port (RdAd) used for instruction fetch and RDPGM.  The read is
// synchronous: the word at rd_addr in cycle t is on rd_data in cycle t+1.  Sizes
// follow the published architecture; the separate read and write ports are read
// from its two address buses, the read latency is this design's choice.
module program_memory #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
