// tb_heading_reg: random turns and preloads of the heading register,
// compared with a compass model (index 0 N, 1 E, 2 S, 3 W; a right turn adds
// one, a left turn subtracts one) mapped to the one-hot code N=0001,
// W=0010, S=0100, E=1000. Checks the reset value (North) too.
module tb_heading_reg;
  import ant_pkg::*;
  logic     clk = 0, rst_n = 0;
  logic     load = 0, rot_r = 0, rot_l = 0;
  heading_t load_val = HEAD_N, q;
  int       dir = 0;
  int       checks = 0, failures = 0;
  heading_t code [4];

  heading_reg dut (.clk, .rst_n, .load, .load_val, .rot_r, .rot_l, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, ld;
    code[0] = 4'b0001; code[1] = 4'b1000; code[2] = 4'b0100; code[3] = 4'b0010;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 4'b0001) begin failures++; $display("FAIL reset heading %b", q); end
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      r     = $urandom_range(0, 9);
      ld    = $urandom_range(0, 3);
      load  = (r == 0);
      rot_r = (r inside {[1:4]}) || r == 9;
      rot_l = (r inside {[5:8]}) || r == 9;
      load_val = code[ld];
      @(posedge clk); #1;
      if (load)                dir = ld;
      else if (rot_r && !rot_l) dir = (dir + 1) % 4;
      else if (rot_l && !rot_r) dir = (dir + 3) % 4;
      checks++;
      if (q !== code[dir]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: heading %b expected %b", i, q, code[dir]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
