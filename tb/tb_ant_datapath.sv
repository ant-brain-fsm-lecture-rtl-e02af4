// tb_ant_datapath: applies random preloads, steps and turns to the datapath,
// feeds it random cell words, and compares position, heading, the
// look-ahead memory address and the antenna outputs with a compass model
// (N: y-1, S: y+1, W: x-1, E: x+1; right turn = clockwise).
module tb_ant_datapath;
  import ant_pkg::*;
  logic               clk = 0, rst_n = 0, load = 0;
  logic [COORD_W-1:0] start_x = '0, start_y = '0;
  heading_t           start_heading = HEAD_N;
  ant_cmd_t           step = CMD_NONE;
  logic [CELL_W-1:0]  cell_word = '0;
  logic [ADDR_W-1:0]  maze_addr;
  logic [COORD_W-1:0] x, y;
  heading_t           heading;
  logic               ant_l, ant_r, exit_o;
  int                 checks = 0, failures = 0;
  heading_t           code [4];
  int                 dx [4], dy [4];
  int                 mx = 0, my = 0, md = 0;
  int                 moved [4];

  ant_datapath dut (.clk, .rst_n, .load, .start_x, .start_y, .start_heading,
                    .step, .cell_word, .maze_addr, .x, .y, .heading,
                    .ant_l, .ant_r, .exit_o);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
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

  function automatic logic wall_in(logic [CELL_W-1:0] w, int d);
    case (d & 3)
      0: return w[1];
      1: return w[4];
      2: return w[3];
      default: return w[2];
    endcase
  endfunction

  initial begin
    int r, nx, ny, nd;
    code[0] = HEAD_N; code[1] = HEAD_E; code[2] = HEAD_S; code[3] = HEAD_W;
    dx = '{0, 1, 0, -1};
    dy = '{-1, 0, 1, 0};
    moved = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    check("reset x", int'(x), 0);
    check("reset y", int'(y), 0);
    check("reset heading", int'(heading), int'(HEAD_N));
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      r = $urandom_range(0, 19);
      load = (r == 0);
      start_x = COORD_W'($urandom_range(0, 127));
      start_y = COORD_W'($urandom_range(0, 127));
      nd = $urandom_range(0, 3);
      start_heading = code[nd];
      if (r inside {[1:10]})       step = CMD_F;
      else if (r inside {[11:14]}) step = CMD_TL;
      else if (r inside {[15:18]}) step = CMD_TR;
      else                         step = CMD_NONE;
      cell_word = CELL_W'($urandom);
      if (load) begin nx = int'(start_x); ny = int'(start_y); end
      else if (step.fwd) begin
        nx = (mx + dx[md] + 128) % 128; ny = (my + dy[md] + 128) % 128; moved[md]++;
        nd = md;
      end else begin
        nx = mx; ny = my;
        nd = step.turn_right ? (md + 1) % 4 : step.turn_left ? (md + 3) % 4 : md;
      end
      #1;
      check("antenna L", int'(ant_l), int'(wall_in(cell_word, md) | wall_in(cell_word, md + 3)));
      check("antenna R", int'(ant_r), int'(wall_in(cell_word, md) | wall_in(cell_word, md + 1)));
      check("exit", int'(exit_o), int'(cell_word[5]));
      check("look-ahead address", int'(maze_addr), ny * 128 + nx);
      @(posedge clk); #1;
      mx = nx; my = ny; md = nd;
      check("x", int'(x), mx);
      check("y", int'(y), my);
      check("heading", int'(heading), int'(code[md]));
    end
    foreach (moved[d]) begin
      checks++;
      if (moved[d] == 0) begin failures++; $display("FAIL never moved in direction %0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
