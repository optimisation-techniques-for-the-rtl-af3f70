// ram_2c: register-file memory with a two-cycle read and a one-cycle write.
//
// The write side writes any of LANES lanes of LANE_W bits at waddr on one
// wclk edge. The read side takes two rclk cycles: raddr is registered at the end of
// the first and the addressed word is read out of the array during the
// second, to be captured by the reader at the end of it, which is the memory timing the source reports for its custom
// block (two cycles to read, one to write, on the doubled memory clock). The
// two clocks may be the same clock or two phase-aligned clocks from one PLL;
// the users of this memory never read a word while it is being written.
module ram_2c #(
  parameter int ADDR_W = 6,
  parameter int LANE_W = 16,
  parameter int LANES  = 1
) (
  input  logic                     wclk,
  input  logic [LANES-1:0]         we,
  input  logic [ADDR_W-1:0]        waddr,
  input  logic [LANES*LANE_W-1:0]  wdata,
  input  logic                     rclk,
  input  logic [ADDR_W-1:0]        raddr,
  output logic [LANES*LANE_W-1:0]  rdata
);
  logic [LANES-1:0][LANE_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] raddr_q;

  always_ff @(posedge wclk) begin
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[waddr][l] <= wdata[l*LANE_W +: LANE_W];
  end

  always_ff @(posedge rclk) raddr_q <= raddr;
  assign rdata = mem[raddr_q];
endmodule
