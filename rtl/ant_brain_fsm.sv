// ant_brain_fsm: the ant's controller, a Moore machine that keeps the wall
// on the ant's right.
//
// States and outputs follow the lecture's state-transition table:
//   S0 (F)  lost, walk forward:   LR=00 -> S0, 01 -> S1, 1x -> S3
//   S1 (F)  wall on the right:    LR=00 -> S2, 01 -> S1, 1x -> S3
//   S2 (TR) wall lost, turn right:          any -> S0
//   S3 (TL) wall ahead or on left: LR=0x -> S1,         1x -> S3
// Exit = 1 overrides every row and sends the machine to HALT, where it gives
// no command; the lecture's table marks that row "Reset". HALT is also the
// state after reset. A start pulse from any state enters S0 (the datapath
// preloads the start position in the same cycle, so no move is made).
//
// Timing: the ant carries out a state's action as it enters the state. The
// output `step` is the Moore output of the next state and drives the datapath
// at the same clock edge that loads the state register; `cmd` is the Moore
// output of the current state, i.e. the action that has just been done. The
// antennae in a state therefore report the walls after that state's action,
// which keeps the ant from stepping through a wall. This timing, the HALT
// state and the start input are this design's choices.
module ant_brain_fsm
  import ant_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,    // begin a run in S0
  input  logic       ant_l,    // left antenna
  input  logic       ant_r,    // right antenna
  input  logic       exit_i,   // ant stands on the exit cell
  output ant_state_t state,
  output ant_cmd_t   cmd,      // Moore output of the current state
  output ant_cmd_t   step,     // action to apply at the coming edge
  output logic       halted    // state is HALT
);

  ant_state_t state_next;

  always_comb begin
    state_next = state;
    if (start) begin
      state_next = ST_S0;
    end else if (state != ST_HALT && exit_i) begin
      state_next = ST_HALT;
    end else begin
      unique case (state)
        ST_S0: begin
          if (ant_l)      state_next = ST_S3;
          else if (ant_r) state_next = ST_S1;
          else            state_next = ST_S0;
        end
        ST_S1: begin
          if (ant_l)      state_next = ST_S3;
          else if (ant_r) state_next = ST_S1;
          else            state_next = ST_S2;
        end
        ST_S2:            state_next = ST_S0;
        ST_S3: begin
          if (ant_l)      state_next = ST_S3;
          else            state_next = ST_S1;
        end
        ST_HALT:          state_next = ST_HALT;
        default:          state_next = ST_HALT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_HALT;
    else        state <= state_next;
  end

  always_comb begin
    cmd    = state_cmd(state);
    step   = start ? CMD_NONE : state_cmd(state_next);
    halted = (state == ST_HALT);
  end

  // At most one actuator is driven at a time.
  a_one_cmd:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cmd));
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(step));

endmodule
