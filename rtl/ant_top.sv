// ant_top: an electronic ant that finds its way out of a virtual maze by
// keeping the wall on its right.
//
// The maze is a 128 x 128 grid of cells held in a 16384 x 8-bit memory
// (maze_ram) addressed by {Y, X}; each word flags the cell_word's north, west,
// south and east walls and whether it is the exit. The ant itself is a
// controller (ant_brain_fsm) and a datapath (ant_datapath) holding X, Y, the
// heading and the antennae decoder. Each clock the datapath reports the two
// antenna readings and the exit flag of the current cell_word, the controller
// picks its next state, and that state's action (one step forward, or a
// 90-degree turn left or right) is carried out at the same edge.
//
// Use: hold the ant halted (after reset it is), write the maze through the
// maze_* port, then pulse start for one cycle with the start cell and
// heading. From the next cycle on the ant makes one move per clock; it stops
// (halted = 1) the cycle after it arrives on the exit cell_word, with x/y on that
// cell_word. The memory read is synchronous, and the datapath addresses it one
// cycle ahead, so there are no wait cycles. The memory port and start/halt
// handshake are this design's choices; the rest follows the lecture.
module ant_top
  import ant_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // maze loading
  input  logic               maze_we,
  input  logic [ADDR_W-1:0]  maze_waddr,     // {Y, X}
  input  logic [CELL_W-1:0]  maze_wdata,
  // run control
  input  logic               start,
  input  logic [COORD_W-1:0] start_x,
  input  logic [COORD_W-1:0] start_y,
  input  heading_t           start_heading,  // one-hot N/W/S/E
  // ant status
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output heading_t           heading,
  output ant_state_t         state,
  output logic               fwd,            // F of the current state
  output logic               turn_left,      // TL of the current state
  output logic               turn_right,     // TR of the current state
  output logic               ant_l,
  output logic               ant_r,
  output logic               at_exit,
  output logic               halted
);

  logic [ADDR_W-1:0] maze_raddr;
  logic [CELL_W-1:0] cell_word;
  ant_cmd_t          cmd, step;

  maze_ram #(.ADDR_W(ADDR_W), .DATA_W(CELL_W)) u_maze (
    .clk, .we(maze_we), .waddr(maze_waddr), .wdata(maze_wdata),
    .raddr(maze_raddr), .rdata(cell_word)
  );

  ant_datapath u_dp (
    .clk, .rst_n, .load(start), .start_x, .start_y, .start_heading,
    .step, .cell_word, .maze_addr(maze_raddr),
    .x, .y, .heading, .ant_l, .ant_r, .exit_o(at_exit)
  );

  ant_brain_fsm u_brain (
    .clk, .rst_n, .start, .ant_l, .ant_r, .exit_i(at_exit),
    .state, .cmd, .step, .halted
  );

  assign fwd        = cmd.fwd;
  assign turn_left  = cmd.turn_left;
  assign turn_right = cmd.turn_right;

endmodule
