// heading_reg: the ant's heading as a 4-bit one-hot rotating shift register.
//
// N = 0001, W = 0010, S = 0100, E = 1000 (lecture's encoding). Turning right
// rotates the register right (N -> E -> S -> W -> N); turning left rotates it
// left (N -> W -> S -> E -> N). A synchronous preload sets the start heading
// and has priority; rot_r and rot_l together leave it unchanged. Asynchronous
// active-low reset to North (this design's choice).
module heading_reg
  import ant_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     load,       // preload load_val
  input  heading_t load_val,   // must be one-hot
  input  logic     rot_r,      // turn right
  input  logic     rot_l,      // turn left
  output heading_t q
);

  heading_t q_next;

  always_comb begin
    if (load)                q_next = load_val;
    else if (rot_r & ~rot_l) q_next = {q[0], q[HEADING_W-1:1]};
    else if (rot_l & ~rot_r) q_next = {q[HEADING_W-2:0], q[HEADING_W-1]};
    else                     q_next = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= HEAD_N;
    else        q <= q_next;
  end

  // The register must stay one-hot once it is out of reset.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(q));

endmodule
