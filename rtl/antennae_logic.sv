// antennae_logic: turns the maze word of the ant's cell into antenna readings.
//
// The ant has two antennae that reach slightly forward and to the side, so
// each touches a wall that is straight ahead or on its own side:
//   R = wall ahead OR wall on the right,  L = wall ahead OR wall on the left.
// In terms of the cell_word's wall flags and the one-hot heading this is
//   R = NW(N+W) + WW(W+S) + SW(S+E) + EW(E+N)
//   L = NW(N+E) + WW(W+N) + SW(S+W) + EW(E+S)
// i.e. four 2-input ORs, eight 2-input ANDs and two 4-input ORs, exactly the
// lecture's antenna equations. LR = 00 means no wall, 01 wall on the right,
// 10 wall on the left, 11 wall in front. exit_o is the cell_word's exit flag.
// Purely combinational; no clock.
module antennae_logic
  import ant_pkg::*;
(
  input  logic [CELL_W-1:0] cell_word,     // maze word of the current cell
  input  heading_t          heading,  // one-hot heading
  output logic              ant_l,    // left antenna touches a wall
  output logic              ant_r,    // right antenna touches a wall
  output logic              exit_o    // current cell is the exit
);

  logic nw, ww, sw, ew;
  logic hn, hw, hs, he;

  always_comb begin
    nw = cell_word[BIT_NORTH];
    ww = cell_word[BIT_WEST];
    sw = cell_word[BIT_SOUTH];
    ew = cell_word[BIT_EAST];
    hn = heading[0];
    hw = heading[1];
    hs = heading[2];
    he = heading[3];

    ant_r  = (nw & (hn | hw)) | (ww & (hw | hs)) | (sw & (hs | he)) | (ew & (he | hn));
    ant_l  = (nw & (hn | he)) | (ww & (hw | hn)) | (sw & (hs | hw)) | (ew & (he | hs));
    exit_o = cell_word[BIT_EXIT];
  end

endmodule
