// tb_antennae_logic: exhaustive check of the antennae decoder.
//
// For every combination of the four wall flags, the exit flag, the unused
// bits and the four headings, the expected readings are worked out from
// directions rather than from the sum-of-products: the wall ahead, the wall
// to the left and the wall to the right of the heading are looked up, and
// L = ahead | left, R = ahead | right. Combinational, so a short delay
// separates stimulus and check.
module tb_antennae_logic;
  import ant_pkg::*;

  logic [CELL_W-1:0] cell_word;
  heading_t          heading;
  logic              ant_l, ant_r, exit_o;
  int                checks = 0, failures = 0;

  antennae_logic dut (.cell_word, .heading, .ant_l, .ant_r, .exit_o);

  // Direction index: 0 N, 1 E, 2 S, 3 W (clockwise).
  function automatic logic wall_in(logic [CELL_W-1:0] w, int d);
    case (d & 3)
      0: return w[1];
      1: return w[4];
      2: return w[3];
      default: return w[2];
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    heading_t hcode [4];
    logic     el, er;
    hcode[0] = 4'b0001; hcode[1] = 4'b1000; hcode[2] = 4'b0100; hcode[3] = 4'b0010;
    for (int v = 0; v < 256; v++) begin
      for (int d = 0; d < 4; d++) begin
        cell_word = v[7:0];
        heading   = hcode[d];
        #1;
        el = wall_in(cell_word, d) | wall_in(cell_word, d + 3);
        er = wall_in(cell_word, d) | wall_in(cell_word, d + 1);
        checks++;
        if (ant_l !== el || ant_r !== er || exit_o !== cell_word[5]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cell=%02h heading=%b: LR=%b%b exit=%b expected %b%b %b",
                     cell_word, heading, ant_l, ant_r, exit_o, el, er, cell_word[5]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
