// True dual-port data memory (DM A and DM B).
//
// DEPTH words of W bits with two independent ports; each port can read or write one
// word per cycle.  Reads are synchronous: the word addressed in cycle t is on rdata
// in cycle t+1 (a block RAM read), and a port that writes returns the old contents.
// The memory holds the curve constants, the reduction table and the working
// registers.  Two such memories give the four data ports of the published
// architecture (1024 x 16 with 10-bit addresses on the 16-bit datapath); the read
// latency and read-during-write behaviour are this design's own choice.
module data_memory #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  // port B
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= wdata_a;
      rdata_a <= mem[addr_a];
    end
  end

  always_ff @(posedge clk) begin
    if (en_b) begin
      if (we_b) mem[addr_b] <= wdata_b;
      rdata_b <= mem[addr_b];
    end
  end

  // both ports writing one word in the same cycle leaves it undefined
  a_no_write_clash: assert property (@(posedge clk)
    !(en_a && we_a && en_b && we_b && addr_a == addr_b));
endmodule
