// tb_pos_counter: random preload / increment / decrement sequences on the
// default 7-bit counter, compared each cycle with an integer model taken
// modulo 128. Also checks q_next (the value after the coming edge) and the
// wrap-around at 0 and 127.
module tb_pos_counter;
  localparam int W = 7;
  logic         clk = 0, rst_n = 0;
  logic         load = 0, inc = 0, dec = 0;
  logic [W-1:0] load_val = '0, q, q_next;
  int           model = 0;
  int           checks = 0, failures = 0;
  int           wraps_up = 0, wraps_down = 0;

  pos_counter dut (.clk, .rst_n, .load, .load_val, .inc, .dec, .q, .q_next);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    int nxt, r;
    repeat (2) @(negedge clk);
    check("reset value", int'(q), 0);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      r        = $urandom_range(0, 9);
      load     = (r == 0);
      inc      = (r inside {[1:4]}) || r == 9;
      dec      = (r inside {[5:8]}) || r == 9;
      load_val = W'($urandom);
      if (i % 700 == 3)   begin load = 1; load_val = 7'd127; inc = 0; dec = 0; end
      if (i % 700 == 4)   begin load = 0; inc = 1; dec = 0; end
      if (i % 700 == 100) begin load = 1; load_val = 7'd0;   inc = 0; dec = 0; end
      if (i % 700 == 101) begin load = 0; inc = 0; dec = 1; end
      if (load)            nxt = int'(load_val);
      else if (inc && !dec) nxt = (model + 1) % 128;
      else if (dec && !inc) nxt = (model + 127) % 128;
      else                 nxt = model;
      if (!load && inc && !dec && model == 127) wraps_up++;
      if (!load && dec && !inc && model == 0)   wraps_down++;
      #1;
      check("q_next", int'(q_next), nxt);
      @(posedge clk); #1;
      model = nxt;
      check("q", int'(q), model);
    end
    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++;
      $display("FAIL wrap-around not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
