// pos_counter: one coordinate of the ant's position (X or Y).
//
// A W-bit up/down counter with synchronous preload, as the lecture asks for:
// "7-bit counters for X, Y ... with preload, increment, decrement". Preload
// has priority over counting; inc and dec together leave the value unchanged.
// The counter wraps modulo 2**W; a maze with a closed outer wall never lets
// the ant reach that point. Besides the register value q it outputs q_next,
// the value q will take at the next clock edge, so that a synchronous memory
// can be addressed one cycle ahead. Asynchronous active-low reset to zero
// (reset value is this design's choice).
module pos_counter #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,       // preload load_val
  input  logic [W-1:0] load_val,
  input  logic         inc,        // count up
  input  logic         dec,        // count down
  output logic [W-1:0] q,          // current value
  output logic [W-1:0] q_next      // value after the next edge
);

  always_comb begin
    if (load)            q_next = load_val;
    else if (inc & ~dec) q_next = q + W'(1);
    else if (dec & ~inc) q_next = q - W'(1);
    else                 q_next = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

endmodule
