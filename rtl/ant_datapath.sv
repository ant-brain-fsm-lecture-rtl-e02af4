// ant_datapath: where the ant is, which way it faces, and what it feels.
//
// Two 7-bit up/down counters hold X (horizontal) and Y (vertical); a one-hot
// rotating register holds the heading; the antennae decoder turns the maze
// word of the current cell into L, R and Exit. A forward step moves one cell_word:
// North decrements Y, South increments Y, West decrements X, East increments
// X (row 0 is the northern edge, column 0 the western edge: this design's
// choice). TL/TR rotate the heading. A load preloads X, Y and the heading.
//
// The maze memory is synchronous, so the datapath addresses it with the
// position the counters will hold after the coming edge ({Y, X} of q_next).
// The word `cell_word` returned one cycle later therefore always belongs to the
// cell the ant is standing on. The datapath/control split and the counter and
// shift-register recommendations follow the lecture; the look-ahead
// addressing is this design's choice.
module ant_datapath
  import ant_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,         // preload start position/heading
  input  logic [COORD_W-1:0] start_x,
  input  logic [COORD_W-1:0] start_y,
  input  heading_t           start_heading,
  input  ant_cmd_t           step,         // action applied at this edge
  input  logic [CELL_W-1:0]  cell_word,         // maze word at {y, x}
  output logic [ADDR_W-1:0]  maze_addr,    // {Y, X} after the coming edge
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output heading_t           heading,
  output logic               ant_l,
  output logic               ant_r,
  output logic               exit_o
);

  logic [COORD_W-1:0] x_next, y_next;
  logic               x_inc, x_dec, y_inc, y_dec;

  always_comb begin
    x_inc = step.fwd & heading[3];   // East
    x_dec = step.fwd & heading[1];   // West
    y_inc = step.fwd & heading[2];   // South
    y_dec = step.fwd & heading[0];   // North
  end

  pos_counter #(.W(COORD_W)) u_x (
    .clk, .rst_n, .load, .load_val(start_x),
    .inc(x_inc), .dec(x_dec), .q(x), .q_next(x_next)
  );

  pos_counter #(.W(COORD_W)) u_y (
    .clk, .rst_n, .load, .load_val(start_y),
    .inc(y_inc), .dec(y_dec), .q(y), .q_next(y_next)
  );

  heading_reg u_heading (
    .clk, .rst_n, .load, .load_val(start_heading),
    .rot_r(step.turn_right), .rot_l(step.turn_left),
    .q(heading)
  );

  antennae_logic u_antennae (
    .cell_word, .heading, .ant_l, .ant_r, .exit_o
  );

  assign maze_addr = {y_next, x_next};

endmodule
