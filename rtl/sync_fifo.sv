// Synchronous FIFO (TX FIFO and RX FIFO between the application and the processor).
//
// DEPTH entries of W bits in a circular buffer with read and write pointers one bit
// wider than the index, so full and empty are told apart by the extra bit.  A write
// (push while not full) and a read (pop while not empty) can happen in the same
// cycle.  Show-ahead: rdata is the oldest entry whenever empty is low, and pop
// removes it at the clock edge.  The 32-bit width follows the published
// architecture; the depth, show-ahead behaviour and the flag interface are this
// design's own.  Pushing into a full or popping an empty FIFO is ignored and
// flagged by an assertion.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_push, do_pop;

  assign count   = wp - rp;
  assign full    = count == (AW+1)'(DEPTH);
  assign empty   = count == '0;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
