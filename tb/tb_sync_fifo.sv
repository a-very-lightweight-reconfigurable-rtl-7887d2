// Random push/pop test of the synchronous FIFO against a queue model: data order,
// full and empty flags, count, and pushes into a full FIFO being refused.
module tb_sync_fifo;
  localparam int W = 32, DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 1'b0, pop = 1'b0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(DEPTH):0] count;
  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .wdata, .full, .pop, .rdata,
                                          .empty, .count);
  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] q[$];
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || int'(count) != q.size()) begin
        failures++;
        $display("FAIL flags: empty %b full %b count %0d model %0d", empty, full, count, q.size());
      end
      if (!empty) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("FAIL data %h exp %h", rdata, q[0]); end
      end
      if (full) n_full++;
      // bias towards filling in the first half, emptying in the second
      push  = ($urandom % 4) < ((i % 400 < 200) ? 3 : 1) && !full;
      pop   = ($urandom % 4) < ((i % 400 < 200) ? 1 : 3) && !empty;
      wdata = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
      push = 1'b0;
      pop  = 1'b0;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
