// ant_pkg: types and constants shared by the ant-brain design.
//
// The maze is a 128 x 128 grid of 8-bit cell words addressed by {Y, X}, with
// 7 bits for each coordinate. Each cell word carries one flag per wall side
// plus an exit flag: bit 0 no wall, bit 1 north, bit 2 west, bit 3 south,
// bit 4 east, bit 5 exit (bits 6 and 7 unused). The heading is one-hot:
// N = 0001, W = 0010, S = 0100, E = 1000, so a right turn is a rotate right
// and a left turn a rotate left. These encodings follow the lecture.
// The controller state encoding (S0..S3 in two bits, plus a halted state
// entered at the exit) is this design's own choice.
package ant_pkg;

  localparam int unsigned COORD_W = 7;                 // X and Y width
  localparam int unsigned ADDR_W  = 2 * COORD_W;       // {Y, X}
  localparam int unsigned CELL_W  = 8;                 // maze word width
  localparam int unsigned HEADING_W = 4;                 // one-hot heading

  // Bit positions in a maze cell word.
  localparam int unsigned BIT_NO_WALL = 0;
  localparam int unsigned BIT_NORTH   = 1;
  localparam int unsigned BIT_WEST    = 2;
  localparam int unsigned BIT_SOUTH   = 3;
  localparam int unsigned BIT_EAST    = 4;
  localparam int unsigned BIT_EXIT    = 5;

  // One-hot headings, bits E S W N from MSB to LSB.
  typedef logic [HEADING_W-1:0] heading_t;
  localparam heading_t HEAD_N = 4'b0001;
  localparam heading_t HEAD_W = 4'b0010;
  localparam heading_t HEAD_S = 4'b0100;
  localparam heading_t HEAD_E = 4'b1000;

  // Controller states. S0: lost, walk forward. S1: wall on the right, walk
  // forward. S2: wall lost, turn right. S3: wall ahead or on the left, turn
  // left. HALT: idle after reset and after reaching the exit.
  typedef enum logic [2:0] {
    ST_S0   = 3'b000,
    ST_S1   = 3'b001,
    ST_S2   = 3'b010,
    ST_S3   = 3'b011,
    ST_HALT = 3'b100
  } ant_state_t;

  // Actuator commands: at most one is set.
  typedef struct packed {
    logic fwd;         // F: one cell forward
    logic turn_left;   // TL: turn left 90 degrees
    logic turn_right;  // TR: turn right 90 degrees
  } ant_cmd_t;

  localparam ant_cmd_t CMD_NONE = '{fwd: 1'b0, turn_left: 1'b0, turn_right: 1'b0};
  localparam ant_cmd_t CMD_F    = '{fwd: 1'b1, turn_left: 1'b0, turn_right: 1'b0};
  localparam ant_cmd_t CMD_TL   = '{fwd: 1'b0, turn_left: 1'b1, turn_right: 1'b0};
  localparam ant_cmd_t CMD_TR   = '{fwd: 1'b0, turn_left: 1'b0, turn_right: 1'b1};

  // Moore output of each state, as in the state-transition table.
  function automatic ant_cmd_t state_cmd(ant_state_t s);
    case (s)
      ST_S0, ST_S1: return CMD_F;
      ST_S2:        return CMD_TR;
      ST_S3:        return CMD_TL;
      default:      return CMD_NONE;
    endcase
  endfunction

endpackage
