// tb_maze_ram: fills the whole 16384 x 8 maze memory with a pattern, reads
// every word back and checks that each read returns its word exactly one
// cycle after the address. Then checks that a read of the address being
// written returns the old word and the next read the new one.
module tb_maze_ram;
  localparam int AW = 14, DW = 8;
  logic          clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int            checks = 0, failures = 0;

  maze_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] pattern(int a);
    return DW'((a * 37) ^ (a >> 7) ^ 8'h5a);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pattern(a);
    end
    @(negedge clk);
    we = 0;
    // read in a scrambled order; data must belong to the previous address
    for (int i = 0; i < 2**AW; i++) begin
      raddr = AW'(i * 97);
      @(posedge clk); #1;
      check("read", int'(rdata), int'(pattern((i * 97) % (2**AW))));
      @(negedge clk);
    end
    // read-during-write of the same address
    @(negedge clk);
    we = 1; waddr = 14'd1234; wdata = 8'hc3; raddr = 14'd1234;
    @(posedge clk); #1;
    check("read during write (old)", int'(rdata), int'(pattern(1234)));
    @(negedge clk);
    we = 0;
    @(posedge clk); #1;
    check("read after write (new)", int'(rdata), 'hc3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
