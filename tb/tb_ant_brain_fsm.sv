// tb_ant_brain_fsm: drives the controller with random antenna readings, exit
// flags and start pulses and compares it each cycle with the state-transition
// table written out as a lookup table (next state per state and LR, output
// per state). Checks the current-state command, the look-ahead command
// `step`, the HALT behaviour at the exit and that every table row is taken.
module tb_ant_brain_fsm;
  import ant_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       start = 0, ant_l = 0, ant_r = 0, exit_i = 0;
  ant_state_t state;
  ant_cmd_t   cmd, step;
  logic       halted;
  int         checks = 0, failures = 0;

  // model: 0..3 = S0..S3, 4 = halt
  int nxt_tab [4][4];   // [state][{L,R}]
  logic [2:0] out_tab [5];  // {F, TL, TR}
  int hits [4][4];
  int halts = 0, starts = 0;

  ant_brain_fsm dut (.clk, .rst_n, .start, .ant_l, .ant_r, .exit_i,
                     .state, .cmd, .step, .halted);

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


  initial begin
    int m, mn, lr;
    //                LR = 00 01 10 11
    nxt_tab[0] = '{0, 1, 3, 3};
    nxt_tab[1] = '{2, 1, 3, 3};
    nxt_tab[2] = '{0, 0, 0, 0};
    nxt_tab[3] = '{1, 1, 3, 3};
    out_tab[0] = 3'b100; out_tab[1] = 3'b100; out_tab[2] = 3'b001;
    out_tab[3] = 3'b010; out_tab[4] = 3'b000;
    foreach (hits[i, j]) hits[i][j] = 0;

    repeat (2) @(negedge clk);
    check("reset state is HALT", int'(state), int'(ST_HALT));
    rst_n = 1;
    m = 4;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      start  = (m == 4) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 200) == 0);
      exit_i = ($urandom_range(0, 60) == 0);
      ant_l  = $urandom_range(0, 1);
      ant_r  = $urandom_range(0, 1);
      lr     = {ant_l, ant_r};
      if (start)                begin mn = 0; starts++; end
      else if (m != 4 && exit_i) begin mn = 4; halts++; end
      else if (m == 4)          mn = 4;
      else                      begin mn = nxt_tab[m][lr]; hits[m][lr]++; end
      #1;
      check("step", int'(step), start ? 0 : int'(out_tab[mn]));
      @(posedge clk); #1;
      m = mn;
      check("state", int'(state), m);
      check("cmd", int'(cmd), int'(out_tab[m]));
      check("halted", int'(halted), int'(m == 4));
    end
    foreach (hits[i, j]) begin
      checks++;
      if (hits[i][j] == 0) begin failures++; $display("FAIL row S%0d LR=%0d never taken", i, j); end
    end
    checks++;
    if (halts == 0 || starts == 0) begin failures++; $display("FAIL no exit or start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
