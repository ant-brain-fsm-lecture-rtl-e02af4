// maze_ram: the virtual maze, 2**ADDR_W words of DATA_W bits.
//
// The lecture stores the 128 x 128 maze in a memory of 16384 8-bit words
// addressed by {Y, X}. Here it is a simple dual-port RAM written as an array:
// one synchronous write port for loading the maze and one synchronous read
// port whose data appears the cycle after the address (like an SRAM). Both
// ports use the same clock. Reading an address in the cycle it is written
// returns the old word. The contents are not reset; the maze must be written
// before the ant runs. Port style and timing are this design's choice.
module maze_ram #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,      // write enable
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata    // mem[raddr] of the previous cycle
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
