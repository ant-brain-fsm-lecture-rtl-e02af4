// tb_ant_top: end-to-end runs of the ant in generated mazes, at the design's
// full size (128 x 128 maze memory, 7-bit X and Y).
//
// The testbench builds each maze itself, writes all 16384 words through the
// maze port, pulses start and then compares the ant with a behavioural model
// every clock: state, X, Y and heading. The model works with compass
// directions (0 N, 1 E, 2 S, 3 W), reads the walls ahead / left / right of
// the ant straight from its own copy of the maze, and follows the
// state-transition table, carrying out a state's action as it enters it.
// Each run must reach the exit cell, halt the cycle after arriving, and take
// exactly the number of cycles the model takes (one move per clock).
//
// Mazes:
//  * open field: the whole grid with only the outer boundary walls; the ant
//    starts in the middle or against a side wall and must walk to the
//    boundary and follow it to an exit cell on the edge;
//  * corridor mazes: a random depth-first maze of K x K rooms, each room and
//    passage two cells wide and every wall one cell thick (the ant needs
//    corridors wider than itself), from K = 3 up to K = 42, which fills
//    127 x 127 cells of the grid. Start top-left, exit bottom-right.
// The testbench counts every transition of the table, the moves in each
// direction, the turns and the halts, and fails if one never happened.
module tb_ant_top;
  import ant_pkg::*;

  localparam int G = 128;

  logic               clk = 0, rst_n = 0;
  logic               maze_we = 0;
  logic [ADDR_W-1:0]  maze_waddr = '0;
  logic [CELL_W-1:0]  maze_wdata = '0;
  logic               start = 0;
  logic [COORD_W-1:0] start_x = '0, start_y = '0;
  heading_t           start_heading = HEAD_N;
  logic [COORD_W-1:0] x, y;
  heading_t           heading;
  ant_state_t         state;
  logic               fwd, turn_left, turn_right, ant_l, ant_r, at_exit, halted;

  ant_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // maze image, [y][x]
  logic [7:0] mz [G][G];
  bit         open_c [G][G];

  // coverage
  int trans [5][4];     // [model state][LR] for S0..S3
  int moves [4];        // forward steps per direction
  int n_tl = 0, n_tr = 0, n_halt = 0, n_start = 0;

  heading_t code [4];
  int       dx [4], dy [4];

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Turn the open/blocked map into wall words: an open cell has a wall on
  // every side that faces a blocked cell or the edge of the grid.
  function automatic void walls_from_open();
    for (int yy = 0; yy < G; yy++)
      for (int xx = 0; xx < G; xx++) begin
        logic [7:0] v;
        if (!open_c[yy][xx]) begin
          mz[yy][xx] = 8'b0001_1110;
          continue;
        end
        v = '0;
        if (yy == 0     || !open_c[yy-1][xx]) v[1] = 1'b1;
        if (xx == 0     || !open_c[yy][xx-1]) v[2] = 1'b1;
        if (yy == G - 1 || !open_c[yy+1][xx]) v[3] = 1'b1;
        if (xx == G - 1 || !open_c[yy][xx+1]) v[4] = 1'b1;
        if (v == 0) v[0] = 1'b1;
        mz[yy][xx] = v;
      end
  endfunction

  function automatic void make_field();
    for (int yy = 0; yy < G; yy++)
      for (int xx = 0; xx < G; xx++) open_c[yy][xx] = 1'b1;
    walls_from_open();
  endfunction

  // Depth-first maze of k x k rooms; room (i, j) covers cells 3i+1..3i+2,
  // 3j+1..3j+2; the walls between rooms are the cells at multiples of 3.
  function automatic void make_maze(int k);
    int  sx [], sy [];
    bit  vis [][];
    int  sp, i, j, ni, nj, n, pick;
    int  ci [4], cj [4];
    sx = new[k * k]; sy = new[k * k];
    vis = new[k];
    foreach (vis[a]) vis[a] = new[k];
    for (int yy = 0; yy < G; yy++)
      for (int xx = 0; xx < G; xx++) open_c[yy][xx] = 1'b0;
    sp = 0; sx[0] = 0; sy[0] = 0; vis[0][0] = 1;
    open_room(0, 0);
    while (sp >= 0) begin
      i = sx[sp]; j = sy[sp]; n = 0;
      for (int d = 0; d < 4; d++) begin
        ni = i + dx[d]; nj = j + dy[d];
        if (ni >= 0 && ni < k && nj >= 0 && nj < k && !vis[ni][nj]) begin
          ci[n] = ni; cj[n] = nj; n++;
        end
      end
      if (n == 0) begin sp--; continue; end
      pick = $urandom_range(0, n - 1);
      ni = ci[pick]; nj = cj[pick];
      vis[ni][nj] = 1;
      open_room(ni, nj);
      if (ni != i) begin
        for (int t = 1; t <= 2; t++) open_c[3*j+t][3*((ni > i) ? ni : i)] = 1'b1;
      end else begin
        for (int t = 1; t <= 2; t++) open_c[3*((nj > j) ? nj : j)][3*i+t] = 1'b1;
      end
      sp++; sx[sp] = ni; sy[sp] = nj;
    end
    walls_from_open();
  endfunction

  function automatic void open_room(int i, int j);
    for (int a = 1; a <= 2; a++)
      for (int b = 1; b <= 2; b++) open_c[3*j+a][3*i+b] = 1'b1;
  endfunction

  function automatic void cover_branch(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL transition %s never happened", what);
    end
  endfunction

  task automatic load_maze();
    for (int a = 0; a < G * G; a++) begin
      @(negedge clk);
      maze_we = 1'b1; maze_waddr = ADDR_W'(a); maze_wdata = mz[a / G][a % G];
    end
    @(negedge clk);
    maze_we = 1'b0;
  endtask

  function automatic bit wall_dir(logic [7:0] w, int d);
    case (d & 3)
      0: return w[1];
      1: return w[4];
      2: return w[3];
      default: return w[2];
    endcase
  endfunction

  // Run the ant from (sx, sy) facing sd until it halts; compare every cycle.
  task automatic run(string name, int sx, int sy, int sd, int ex, int ey, int max_cycles);
    int ms, mx, my, md, ns, lr, cyc;
    bit l, r, e;
    logic [7:0] c;
    mz[ey][ex][5] = 1'b1;
    load_maze();
    @(negedge clk);
    start = 1'b1; start_x = COORD_W'(sx); start_y = COORD_W'(sy); start_heading = code[sd];
    @(negedge clk);
    start = 1'b0;
    n_start++;
    ms = 0; mx = sx; my = sy; md = sd; cyc = 0;
    check({name, ": state after start"}, int'(state), 0);
    check({name, ": x after start"}, int'(x), mx);
    check({name, ": y after start"}, int'(y), my);
    while (ms != 4 && cyc < max_cycles) begin
      c = mz[my][mx];
      l = wall_dir(c, md) | wall_dir(c, md + 3);
      r = wall_dir(c, md) | wall_dir(c, md + 1);
      e = c[5];
      lr = {l, r};
      if (e) begin
        ns = 4; n_halt++;
      end else begin
        trans[ms][lr]++;
        case (ms)
          0: ns = l ? 3 : (r ? 1 : 0);
          1: ns = l ? 3 : (r ? 1 : 2);
          2: ns = 0;
          default: ns = l ? 3 : 1;
        endcase
      end
      case (ns)
        0, 1: begin
          moves[md]++;
          mx += dx[md]; my += dy[md];
        end
        2: begin md = (md + 1) % 4; n_tr++; end
        3: begin md = (md + 3) % 4; n_tl++; end
        default: ;
      endcase
      ms = ns;
      @(posedge clk); #1;
      cyc++;
      check({name, ": state"}, int'(state), ms);
      check({name, ": x"}, int'(x), mx);
      check({name, ": y"}, int'(y), my);
      check({name, ": heading"}, int'(heading), int'(code[md]));
      @(negedge clk);
    end
    check({name, ": halted"}, int'(halted), 1);
    check({name, ": exit x"}, int'(x), ex);
    check({name, ": exit y"}, int'(y), ey);
    $display("%s: exit (%0d,%0d) reached in %0d cycles", name, ex, ey, cyc);
  endtask

  initial begin
    string nm;
    int    ks [6] = '{3, 5, 8, 12, 20, 42};
    code[0] = HEAD_N; code[1] = HEAD_E; code[2] = HEAD_S; code[3] = HEAD_W;
    dx = '{0, 1, 0, -1};
    dy = '{-1, 0, 1, 0};
    foreach (trans[a, b]) trans[a][b] = 0;
    moves = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("halted after reset", int'(halted), 1);

    // open field: lost in the middle, then follow the boundary
    make_field();
    run("field centre", 64, 64, 0, 0, 100, 2000);
    make_field();
    run("field west side", 0, 64, 0, 127, 20, 2000);
    make_field();
    run("field east side", 127, 64, 0, 30, 127, 2000);

    // corridor mazes of growing size, the last one filling the grid
    foreach (ks[q]) begin
      make_maze(ks[q]);
      nm = $sformatf("maze %0dx%0d rooms", ks[q], ks[q]);
      run(nm, 1, 1, 2, 3 * ks[q] - 1, 3 * ks[q] - 1, 400000);
    end

    // every branch of the state table and every mechanism must have happened
    cover_branch("S0 LR=00 -> S0", trans[0][0]);
    cover_branch("S0 LR=01 -> S1", trans[0][1]);
    cover_branch("S0 LR=10 -> S3", trans[0][2]);
    cover_branch("S0 LR=11 -> S3", trans[0][3]);
    cover_branch("S1 LR=00 -> S2", trans[1][0]);
    cover_branch("S1 LR=01 -> S1", trans[1][1]);
    cover_branch("S1 LR=1x -> S3", trans[1][2] + trans[1][3]);
    cover_branch("S2 -> S0", trans[2][0] + trans[2][1] + trans[2][2] + trans[2][3]);
    cover_branch("S3 LR=0x -> S1", trans[3][0] + trans[3][1]);
    cover_branch("S3 LR=1x -> S3", trans[3][2] + trans[3][3]);
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (moves[d] == 0) begin failures++; $display("FAIL no step in direction %0d", d); end
    end
    checks++;
    if (n_tl == 0 || n_tr == 0 || n_halt == 0 || n_start == 0) begin
      failures++; $display("FAIL a turn, halt or start never happened");
    end
    $display("coverage: S0 00/01/10/11=%0d/%0d/%0d/%0d S1=%0d/%0d/%0d/%0d S2=%0d/%0d/%0d/%0d S3=%0d/%0d/%0d/%0d",
             trans[0][0], trans[0][1], trans[0][2], trans[0][3],
             trans[1][0], trans[1][1], trans[1][2], trans[1][3],
             trans[2][0], trans[2][1], trans[2][2], trans[2][3],
             trans[3][0], trans[3][1], trans[3][2], trans[3][3]);
    $display("moves N/E/S/W=%0d/%0d/%0d/%0d TL=%0d TR=%0d halts=%0d starts=%0d",
             moves[0], moves[1], moves[2], moves[3], n_tl, n_tr, n_halt, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
