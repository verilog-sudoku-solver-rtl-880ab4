# Camera-to-screen Sudoku solver in SystemVerilog

This design reads a printed Sudoku puzzle from a camera, works out which digit
is in each of the 81 cells, solves the puzzle in hardware, and draws the
solution on a VGA screen. It also has a tutorial mode. In that mode the user
fills in cells and every digit that disagrees with the solution is flagged.
Everything from the pixel stream to the solution is done in logic. There is
no processor and no software.

The solver is the centre of the design. It holds the puzzle as 81 nine-bit
candidate masks. All 81 cells apply the usual Sudoku deductions at the same
time, once per clock. When deduction stops making progress, the solver
guesses. It keeps a stack of earlier states and backtracks when a guess turns
out to be wrong. The 17-clue puzzle often called the "world's hardest Sudoku"
is solved in 3,124 clocks.

## Data flow

```
 camera ──► frame_buffer (640x480x12, 2-clock read) ──► video_playback ──► VGA
                │                                            ▲
                ▼                                            │
           frame_parser ──► rescaled_frame_buffer (144x144x12, 1-clock read)
  (divider, frame_transfer)            │
                                       ▼
                                  char_rec ──► main_fsm board ──► sudoku_solver
                                                  ▲    │                │
 buttons ─► debounce ─► rise ─────────────────────┘    ▼                ▼
 clk_prescale (crosshair speed)                wrong_guess_gen ◄── solution
 pwr_reset                                     display_grid (inside video_playback)
```

`sudoku_top` wires these blocks together. It has one clock for logic and
video, plus the camera's pixel clock on the write side of the frame buffer.
The camera interface itself is not part of this RTL. Its frame-buffer write
port (`cam_clk`, `cam_we`, `cam_addr`, `cam_data`) is a top-level input, and
`capture_frame` tells the camera side when writes are stored.

## The system state machine (`main_fsm`)

The system runs through ten states. The centre button moves it forward through
the early states:

| # | State | What happens | Leaves on |
|---|---|---|---|
| 0 | IDLE | live camera picture; frames are captured | centre press |
| 1 | CHOOSE_XY1 | frame frozen; direction buttons move the top-left crosshair | centre press |
| 2 | CHOOSE_XY2 | the same for the bottom-right crosshair | centre press |
| 3 | RESIZING | the frame parser rescales the selected square to 144x144 | parser done |
| 4 | RECOGNIZING | the recognizer reads 81 cells | recognizer done |
| 5 | CONFIRMING | kept for numbering, never entered | — |
| 6 | FIXING | the user corrects misread digits | long centre press |
| 7 | SOLVING | the solver runs | done → OUTPUT, invalid → FIXING |
| 8 | OUTPUT | the solved board is shown | edit switch |
| 9 | TUTORIAL | the user enters digits; wrong ones are flagged | reset |

Controls:
- `sw[15]` resets to IDLE.
- `sw[14]` is the edit switch. In FIXING it lets the up and down buttons step
  the selected cell's digit. In OUTPUT it enters TUTORIAL. In TUTORIAL, up and
  down choose the digit, centre writes it into the selected cell and left
  clears the cell.
- `sw[1]` shows the thresholded 144x144 image instead of the camera picture.

Crosshairs move one pixel per `clk_prescale` tick while a button is held. The
corners start at (110,24) and (541,455).

A long press is detected by a second debouncer with a delay of 1,000,000
clocks. It ends FIXING. If the puzzle as entered has no solution, the solver
reports invalid and the FSM returns to FIXING, so the user can correct the
board.

## Rescaling (`frame_parser`, `divider`, `frame_transfer`)

The parser maps the square between the two crosshairs onto a 144x144 image,
which is 16x16 pixels per cell. It uses nearest-neighbour sampling without a
multiplier.

1. Two sequential divisions, on one shared `divider`, split the span into a
   whole step and a remainder: span = 144·q + r.
2. The parser then walks the target pixels. On each step it advances the
   source coordinate by q and adds r to an accumulator.
3. When the accumulator reaches 144, it subtracts 144 and the step becomes
   q+1.

This is Bresenham-style stepping. Target pixel i is read from source pixel
x1 + ⌊i·span/144⌋ exactly.

The camera buffer answers two clocks after the address. `frame_transfer`
delays the write address and enable by the same amount, so each returned pixel
lands in the right place in the rescaled buffer.

## Reading digits (`char_rec`)

`char_rec` sweeps the 144x144 image one pixel per clock, cell by cell.

- **Ink test.** A pixel counts as ink when R+G+B > 20, using the 4-bit
  channels.
- **Scores.** For each cell, ten scores are accumulated:
  - For digits 1-9, the score counts the pixels whose ink bit agrees with that
    digit's 16x16 template.
  - For "empty", the score counts bright pixels.
- **Decision.** The highest score wins, and a tie goes to the lower code.

The templates are seven-segment digit shapes computed in logic (`glyph16` in
`sudoku_pkg`), so the printed puzzle must use the same shapes. A real font
needs its own templates and, in practice, some per-digit bias. A full sweep
takes 144·144 clocks plus the buffer latency.

## The solver (`sudoku_solver`, `group_fsm`)

### Representation

Each cell holds a mask in which bit d-1 means "d is still possible". A solved
cell has exactly one bit set. The digits already used in a row, column or
square are therefore just the OR of the one-hot masks in it.

### Deductions applied every clock, in all cells at once

- **Elimination.** A cell drops every digit that is already placed in its row,
  column or square.
- **Single position.** If a digit has only one possible place in a row, column
  or square, the cell at that place takes it.
- **Candidate lines.** If, inside one square, a digit can only be on one row
  (or column), it is removed from that row (or column) in the other two
  squares of the same band.
- **Groups.** Each cell's mask is ANDed with its entry in the group mask
  register.

### Groups (`group_fsm`)

Group detection is too large to copy 81 times, so a separate scanner visits
one cell per clock and writes the group mask register. For the visited cell
with mask M of n candidates, it checks each of the cell's three units:

- **Naked group.** If exactly n cells of the unit hold exactly M, then every
  other cell of the unit loses the digits of M.
- **Hidden group.** If exactly n cells of the unit share a digit with M, then
  those n cells are restricted to M.

### Guessing and backtracking

1. When no cell has changed for 81 clocks (one full sweep of the scanner), the
   solver guesses.
2. The cell with the fewest candidates is fixed to its lowest candidate,
   M & −M.
3. Before that, the whole candidate array is pushed onto a stack of 16
   entries, with the guessed digit removed from that cell.
4. An error pops the stack. An error is a cell with no candidates, or a full
   row, column or square that does not hold all nine digits.
5. After a pop, the restored state goes on with the remaining candidates. The
   same cell is guessed again with its next digit, or deduction now fixes it.

`done` means every unit holds all nine digits. `invalid` means an error
happened with an empty stack, or a guess was needed with the stack full.

### How deep the stack must be

Sixteen entries are enough for the 17-clue hardest puzzle. It is solved
without overflow after about 30 guesses and 24 backtracks.

An empty board needs more. With this guess order it is filled only with
`MAX_GUESSES` of 64. At 16 it stops with `invalid` and the overflow event.
Raise `MAX_GUESSES` if puzzles with very few clues matter. Each entry costs
729 bits.

## Display (`video_playback`, `display_grid`)

The display uses the standard 640x480 timing from an 800x525 raster.
`hsync` is low on pixels 656-751 and `vsync` on lines 490-491, both active
low. The pixel pipeline is two clocks deep, matching the frame buffer.

What is drawn depends on the state:
- **IDLE and the crosshair states.** The camera picture is shown, with the
  lines of the moving corner drawn inverted and the first corner's lines in
  red.
- **`sw[1]`.** The rescaled, thresholded image is shown instead.
- **From FIXING on.** A 9x9 board of 48-pixel cells is drawn, with its corner
  at (104,24). The digits are the 16x16 shapes scaled by three. The selected
  cell gets a green frame.
- **TUTORIAL.** Wrong digits are drawn in red, and a red border runs round the
  screen while any entry is wrong.

## Small blocks

- `debounce` passes the input to the output once it has been stable for
  `DELAY` clocks (250,000 by default, 1,000,000 for the long press).
- `rise` turns a level into a one-clock pulse on its rising edge.
- `clk_prescale` makes an enable pulse every `PERIOD` clocks (120,001).
- `pwr_reset` holds reset high for the first 16 clocks after configuration and
  ORs in the reset switch.
- `wrong_guess_gen` compares the user's board with the solution, cell by cell.
  Empty cells never count as wrong.
- `sudoku_pkg` holds the shared types (`board_t`, `mask_t`, the state enum,
  the solver event struct) and the digit glyph function.

## Where this design departs from the original

- **Digit templates.** The original used 16x16 ROM images of a rescaled
  Consolas font, with per-digit score offsets tuned to that font. Here the
  templates are seven-segment shapes with no offsets. The score counts
  agreeing pixels.
- **Wrong-digit test.** A digit is flagged when it differs from the solution.
  The original code appears to test the opposite, which contradicts its own
  description.
- **Power-on reset.** It is active for the first 16 clocks. The original code,
  read literally, would leave the system in reset after 16 clocks.
- **Rescaling accumulator.** It steps when it reaches the target size, which
  makes the sampling exact. Stepping only when it exceeds the target leaves the
  samples one source pixel behind in places.
- **Countdown.** One board-wide quiet counter replaces the 81 per-cell
  countdown registers. Both trigger after 81 quiet cycles.
- **Divider width.** It is 10 bits, because coordinates reach 639.
- **Blocks not built.** The camera interface, the clock generator (one input
  clock is used), the alternative staff images and the seven-segment debug
  display are not included. The state and status flags go to `led` and
  top-level ports instead.
- **Empty board.** The original claims a 16-entry stack solves every puzzle,
  the empty board included. That does not hold for this design's guess order
  (see above).

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl rtl/sudoku_pkg.sv \
    tb/tb_sudoku_solver.sv --top-module tb_sudoku_solver -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the other blocks.

### Solver tests

`tb_sudoku_solver` covers:
- a puzzle solvable by single placements;
- an easy published puzzle, compared with its known solution;
- the 17-clue hardest puzzle, which must finish within 10,000 clocks;
- a puzzle that plain elimination cannot finish, which the combined rules
  solve in 19 clocks without guessing;
- two contradictory boards, which must end with `invalid`;
- the empty board, which overflows at 16 entries and is filled at 64.

### End-to-end tests

`tb_sudoku_top` drives the whole system through a complete use:
1. It writes a synthetic camera picture of the hardest puzzle, drawn with the
   seven-segment shapes.
2. It moves both crosshairs with the buttons, then rescales and recognizes the
   picture.
3. It introduces a duplicate digit and checks that the solver rejects it.
4. It restores the digit, solves, and checks the solution on the VGA output.
5. It runs the tutorial with a wrong and a right digit.
6. It resets and checks the thresholded-image view.

The testbench counts each of these mechanisms, and one that never happens is a
failure. It shortens the debounce, long-press and crosshair timing and runs in
seconds.

`tb_sudoku_top_full` runs the same sequence with every parameter at its
default, in about a minute. That covers 250,000-clock debouncing, the
1,000,000-clock long press and the 120,001-clock crosshair step.

Not modelled: real camera images, with their lighting, blur and lens
distortion.

## Size

Synthesis of `sudoku_top` maps to about 11,400 generic cells and 2,600
flip-flops. The memories take 3.9 Mbit, almost all of it the 640x480x12
camera frame. The solver's stack is 16 × 729 bits.
