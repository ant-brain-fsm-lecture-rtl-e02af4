# Ant brain: a wall-following maze walker in SystemVerilog

An electronic ant stands somewhere in a maze and has to find the way out. It
has two antennae, left (L) and right (R), each reading 1 when it touches a
wall. It can do three things: step forward one cell (F), turn left 90 degrees
(TL) or turn right 90 degrees (TR). Its strategy is the classic one: **keep
the wall on your right**. In a maze without islands, following one wall
always leads to the exit.

The hardware is split the usual way into **control** and **datapath**. The
control is a four-state Moore machine, the "ant brain". The datapath holds the
ant's position and heading and turns the maze contents into antenna readings.
The maze itself is a 128 x 128 grid of cells stored in a 16384 x 8-bit memory.
The ant makes one move per clock cycle and stops on the exit cell.

```
             maze_* write port
                    |
             +------v------+  cell word (1 cycle after address)
             |  maze_ram   |------------------------------+
             | 16384 x 8   |                              |
             +------^------+                              v
                    | {Y,X} of the next position   +---------------+
                    +------------------------------| ant_datapath  |
                                                   |  X, Y counters|
   start, start_x/y/heading ---------------------->|  heading reg  |
                                                   |  antennae     |
                               step {F,TL,TR}      +---------------+
                          +----------------------->     | L, R, Exit
                          |                             v
                    +-----+----------------------------------+
                    |            ant_brain_fsm               |
                    +----------------------------------------+
```

## The maze

The maze is a 128 x 128 grid. Each cell is one 8-bit word at address
`{Y, X}`, where X (7 bits) is the column and Y (7 bits) the row. A word
holds one flag per wall, so a cell can have several walls:

| bit | value      | meaning           |
|-----|------------|-------------------|
| 0   | `00000001` | no wall           |
| 1   | `00000010` | north wall (NW)   |
| 2   | `00000100` | west wall (WW)    |
| 3   | `00001000` | south wall (SW)   |
| 4   | `00010000` | east wall (EW)    |
| 5   | `00100000` | exit              |
| 6-7 |            | unused            |

Row 0 is the northern edge and column 0 the western edge. A step north
decrements Y, south increments Y, west decrements X and east increments X.
Walls are properties of cells, so a wall between two cells should be flagged
in both of them (north wall of one, south wall of the other). The ant only
ever reads the cell it stands on.

## What the antennae feel

The heading is one-hot: N = `0001`, W = `0010`, S = `0100`, E = `1000`. Each
antenna reaches forward and to its own side. It touches a wall that is
straight ahead or on its side of the current cell:

```
R = NW(N+W) + WW(W+S) + SW(S+E) + EW(E+N)     wall ahead or on the right
L = NW(N+E) + WW(W+N) + SW(S+W) + EW(E+S)     wall ahead or on the left
```

This takes four 2-input ORs, eight 2-input ANDs and two 4-input ORs
(`antennae_logic`). The pair LR reads as follows:

| LR | meaning           |
|----|-------------------|
| 00 | no wall           |
| 01 | wall on the right |
| 10 | wall on the left  |
| 11 | wall in front     |

The exit flag comes straight from bit 5.

One consequence matters when you build mazes: in a corridor one cell wide,
both antennae touch the side walls and read 11, which means "wall in front".
The ant then turns on the spot forever. **Corridors must be wider than the
ant**, in practice at least two cells.

## The controller

`ant_brain_fsm` is a Moore machine. Its output depends only on the state:

| state | meaning                     | output | LR=00 | LR=01 | LR=10 | LR=11 |
|-------|-----------------------------|--------|-------|-------|-------|-------|
| S0    | lost: walk straight         | F      | S0    | S1    | S3    | S3    |
| S1    | wall on the right: follow it| F      | S2    | S1    | S3    | S3    |
| S2    | wall has ended: turn right  | TR     | S0    | S0    | S0    | S0    |
| S3    | blocked ahead or on the left: turn left | TL | S1 | S1 | S3 | S3 |
| HALT  | stopped                     | none   | HALT  | HALT  | HALT  | HALT  |

No two states are equivalent. S0 and S1 give the same output, but on LR = 00
they go to different states (S0 and S2), so neither can be merged into the
other.

The `Exit` signal overrides the table. When the ant stands on the exit cell,
the machine goes to HALT and stays there. HALT is also the state after
reset. A one-cycle `start` pulse, from any state, enters S0 and preloads the
start cell and heading in the same cycle. The ant makes no move in that
cycle.

Two ideas explain the states. S2 followed by S0 makes the ant round the end of
a wall: it turns right, steps into the gap, and is then "lost" until the
right antenna finds the wall again. S3 keeps turning left while something
touches the left antenna, which handles inside corners and dead ends. It also
turns a lost ant that meets a wall on its left until that wall is on its
right.

## When an action happens (the subtle part)

A Moore table says "in S0 the output is F". It does not say whether the step
happens when the machine enters S0 or when it leaves it. The choice decides
whether the design works.

- **Action on leaving (the naive wiring).** The state register's decoded
  output drives the counters. The row "S0, LR = 11 -> S3, output F" then makes
  the ant step *through* the wall it has just detected in front.
- **Action on entering (what this design does).** The datapath is driven by
  the output of the *next* state (`step` in `ant_brain_fsm`). The step or
  turn happens on the same clock edge that loads the new state. While the
  machine sits in a state, the antennae therefore report the walls as they
  are *after* that state's action, and the next decision is based on them.

With action-on-enter, the table never moves the ant into a wall. F is
entered only from LR = 00 or 01 (nothing ahead), from S3 with L = 0 (nothing
ahead), or from S2. S2 is entered only when the right side was open, and
after its right turn that open side is ahead.

The controller still exposes the plain Moore output of its current state as
`cmd` (on the top: `fwd`, `turn_left`, `turn_right`). That is the action
that took the ant to where it is now.

The maze memory has a synchronous read port, like an SRAM. To avoid a wait
cycle per move, the datapath addresses the memory with the position the
counters *will* hold after the coming edge: `{Y, X}` of their `q_next`
outputs. That includes the preload value on `start`. The word that arrives
in the next cycle is therefore always the word of the cell the ant is on.
Timeline for one run:

```
cycle      0 (start=1)    1                2                ...  n           n+1
state      any            S0               next             ...  S1          HALT
x,y        -              start cell       after action 1        exit cell   exit cell
cell word  -              start cell       current cell          exit cell
decision   preload        table(S0, LR)    table(state, LR)      Exit=1 -> HALT
```

## Datapath

`ant_datapath` holds:

- **Two 7-bit counters** (`pos_counter`), one for X and one for Y, each with
  preload, increment and decrement. Preload wins over counting. The counters
  wrap modulo 128; a maze with a closed outer wall never lets the ant get
  there.
- **The heading register** (`heading_reg`), a 4-bit one-hot rotating shift
  register. A right turn rotates right (N -> E -> S -> W) and a left turn
  rotates left. An assertion checks that it stays one-hot.
- **The antennae decoder** (`antennae_logic`).

A forward step increments or decrements exactly one counter, chosen by the
heading.

## Using the top level

`ant_top` has no parameters; its sizes come from `ant_pkg`.

1. Reset (`rst_n` low). The ant is halted.
2. Write all 16384 maze words: one per clock with `maze_we`, `maze_waddr =
   {Y, X}` and `maze_wdata`. The memory has no reset, so every cell the ant
   can reach must be written.
3. Pulse `start` for one clock, with `start_x`, `start_y` and a one-hot
   `start_heading`.
4. From the next clock on, the ant makes one move per cycle. `x`, `y`,
   `heading`, `state`, the antenna readings and `at_exit` can be watched.
   `halted` rises one cycle after the ant arrives on the exit cell, with `x`
   and `y` still on that cell. A new `start` begins another run.

Do not write the maze while the ant is running: the ant would miss a change
to the cell it is standing on.

## Which mazes it solves

The controller follows the right-hand wall on a grid whose walls are **one
cell thick and whose corridors are at least two cells wide**. The test mazes
are built that way: open rooms of 2 x 2 cells, joined by 2-cell-wide
passages, separated by wall cells. On such mazes it has reached the exit in
every case tried, including a 42 x 42-room maze filling 127 x 127 cells.

It does not solve every maze that is legal in the cell encoding:

- **Corridors one cell wide:** see above; the ant spins in place.
- **Thin walls:** a wall that is just a flag between two open cells. After
  S2 rounds the end of such a wall, the cell around the corner has no wall
  on the right. The ant stays in S0 and walks away from the wall it was
  following, and may wander in a loop.

This is a property of the four-state controller, not of the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/ant_pkg.sv` | widths, cell-word bit positions, heading codes, state enum, command struct, state-to-output function |
| `rtl/ant_top.sv` | top level: memory + datapath + controller |
| `rtl/ant_brain_fsm.sv` | the controller |
| `rtl/ant_datapath.sv` | counters, heading register, antennae, look-ahead address |
| `rtl/pos_counter.sv` | 7-bit up/down counter with preload |
| `rtl/heading_reg.sv` | one-hot heading rotator |
| `rtl/antennae_logic.sv` | cell word + heading -> L, R, Exit |
| `rtl/maze_ram.sv` | 16384 x 8 maze memory, synchronous read and write |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N
failures=M` and stops on its own, with a watchdog as a backstop. With
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ant_pkg.sv tb/tb_ant_top.sv \
          --top-module tb_ant_top -Mdir obj_ant_top
./obj_ant_top/Vtb_ant_top
```

Other modules are found through `-Irtl`; swap in another `tb_*.sv` and its
top name to run a unit test. All testbenches finish in well under a second.

What the testbenches check:

- `tb_antennae_logic`: all 256 cell words times 4 headings. The reference
  works from the wall ahead, left and right of the heading, not from the
  sum-of-products.
- `tb_pos_counter`, `tb_heading_reg`: random preload/count or turn
  sequences against integer and compass models. Covers wrap-around and
  reset values.
- `tb_maze_ram`: the full memory written and read back in scrambled order.
  Checks the one-cycle read latency and read-during-write (old data).
- `tb_ant_brain_fsm`: 20,000 random cycles against the state table as a
  lookup table. Requires every (state, LR) entry, an exit and a start to
  occur.
- `tb_ant_datapath`: random steps, turns, preloads and cell words against a
  compass model, including the look-ahead address.
- `tb_ant_top`: end to end at full size. It generates mazes, writes all
  16384 words through the port, starts the ant and compares state, X, Y and
  heading with a behavioural model every cycle. It also requires the same
  cycle count and a halt on the exit cell. Three runs in an open field start
  the ant lost, or against a wall on its left or right. Six corridor mazes
  go from 3 x 3 to 42 x 42 rooms; the largest takes 7248 moves. The test
  fails if any branch of the state table, a step in any of the four
  directions, a turn, a start or a halt never happens.

## Choices beyond the original lecture design

The state table, the antenna equations, the cell and heading encodings, the
7-bit counters, the rotating heading register and the 16384 x 8 maze come
from the lecture this design is based on. These are this design's own:

- the action-on-enter timing and the `step` output described above;
- the HALT state at the exit, the `start` pulse with a preloaded start cell
  and heading, and asynchronous active-low reset (to HALT, X = Y = 0,
  heading North);
- state encoding (S0..S3 = 000..011, HALT = 100);
- which way is north (Y decreasing);
- the memory: an on-chip two-port array with a synchronous read, a write
  port for loading, and look-ahead addressing.

The crumb-tracking extension, with its SRAM memory controller and display read-out, is not part of this RTL.
