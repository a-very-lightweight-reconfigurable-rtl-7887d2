// Data memory controller (DM CTRL).
//
// Connects the four operand channels of the ALU controller (reads of OP A, OP B and
// p, and the write of the result) to the four ports of the two dual-port data
// memories DM A and DM B.  Each channel carries a memory select (DM A / DM B) and a
// 10-bit word address.  Within one memory the active channels are given its ports in
// the fixed order OP A, OP B, p, result: the first gets port A, the second port B.
// At most two channels may use one memory in a cycle; the ALU controller schedules
// its accesses so, and an assertion checks it.  The controller remembers which port
// served each read and returns the data, one cycle later, on op_a / op_b / op_p.
// The write data is the ALU result or, for the WRITE instruction, the data word of
// the main controller (the "ALU / MC" select of the published block diagram).
// The port allocation rule is this design's own; the published text only says that
// the four ports let three operands be read and one result written.
module dm_ctrl #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  // channels: 0 = OP A read, 1 = OP B read, 2 = p read, 3 = result write
  input  logic [3:0]    ch_en,
  input  logic [3:0]    ch_sel,          // 0 = DM A, 1 = DM B
  input  logic [AW-1:0] ch_addr [4],
  input  logic          wr_from_mc,      // result data from the main controller
  input  logic [W-1:0]  alu_result,
  input  logic [W-1:0]  mc_wdata,
  output logic [W-1:0]  op_a,
  output logic [W-1:0]  op_b,
  output logic [W-1:0]  op_p,
  // memory ports: index [memory][port], memory 0 = DM A, port 0 = A
  output logic          mem_en    [2][2],
  output logic          mem_we    [2][2],
  output logic [AW-1:0] mem_addr  [2][2],
  output logic [W-1:0]  mem_wdata [2][2],
  input  logic [W-1:0]  mem_rdata [2][2]
);
  logic [W-1:0] wdata;
  logic [1:0]   port_of [4];     // port given to each channel
  logic [1:0]   used    [2];     // ports used per memory
  logic         clash;

  assign wdata = wr_from_mc ? mc_wdata : alu_result;

  always_comb begin
    clash = 1'b0;
    for (int m = 0; m < 2; m++) begin
      used[m] = '0;
      for (int p = 0; p < 2; p++) begin
        mem_en[m][p]    = 1'b0;
        mem_we[m][p]    = 1'b0;
        mem_addr[m][p]  = '0;
        mem_wdata[m][p] = wdata;
      end
    end
    for (int ch = 0; ch < 4; ch++) begin
      port_of[ch] = '0;
      if (ch_en[ch]) begin
        if (used[ch_sel[ch]] == 2'd2) begin
          clash = 1'b1;
        end else begin
          port_of[ch] = used[ch_sel[ch]];
          mem_en  [ch_sel[ch]][used[ch_sel[ch]][0]] = 1'b1;
          mem_we  [ch_sel[ch]][used[ch_sel[ch]][0]] = (ch == 3);
          mem_addr[ch_sel[ch]][used[ch_sel[ch]][0]] = ch_addr[ch];
          used[ch_sel[ch]] = used[ch_sel[ch]] + 2'd1;
        end
      end
    end
  end

  // read routing, one cycle later
  logic [2:0] rsel_q, rport_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsel_q  <= '0;
      rport_q <= '0;
    end else begin
      for (int ch = 0; ch < 3; ch++) begin
        rsel_q[ch]  <= ch_sel[ch];
        rport_q[ch] <= port_of[ch][0];
      end
    end
  end

  assign op_a = mem_rdata[rsel_q[0]][rport_q[0]];
  assign op_b = mem_rdata[rsel_q[1]][rport_q[1]];
  assign op_p = mem_rdata[rsel_q[2]][rport_q[2]];

  a_no_port_clash: assert property (@(posedge clk) disable iff (!rst_n) !clash);
endmodule
