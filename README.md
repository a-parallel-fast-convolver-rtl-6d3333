# Parallel look-up-table convolver

A 2-D convolution of an N x N image with an M x M mask normally costs N²·M²
multiplications. This design needs none at run time. An 8-bit pixel can only
take 256 values, so "multiply the whole image by one mask coefficient" is the
same as "look each pixel up in a 256-entry table of products". The convolution
is then split into M² independent **passes**, one per mask coefficient. A pass
streams the image through that coefficient's product table and adds each
product into an accumulation buffer, at the pixel's address shifted by the
coefficient's position relative to the mask centre.

One pass processes one pixel per clock, so a 256 x 256 image takes 65 536
clocks per pass. The passes do not depend on each other. With K identical
**boards** working at once, each runs M²/K of the passes into its own output
buffer, and a final summation adds the K buffers. With K = M² (the default,
K = 9 for a 3 x 3 mask) the whole convolution takes the time of one pass.

The RTL follows a PC/AT add-on convolver board built from SRAMs, 4-bit adders
and counters. On that board a small microcontroller decoded host commands. Here
that controller is a hardware command decoder, and several boards sit behind
one host port.

## One pass, clock by clock

Each board (`convolver_board`) contains a controller and a datapath
(`convolver_unit`). The datapath has three memories:

| memory | size (default) | role |
|---|---|---|
| input buffer | 256 x 256 x 8 | the image |
| product LUT | 256 x 16 | entry v = v · m for the current coefficient m, two's complement |
| output buffer | 256 x 256 x 16 | running sum of the passes done so far |

All memories read **asynchronously** and write on the rising clock edge, like
the static RAMs of the original board. In every clock of a pass:

1. The input counter (`input_addr_gen`) addresses pixel p = f(r,c).
2. The pixel value indexes the LUT, which returns p · m.
3. The output address generator (`output_addr_gen`) gives (r + row_off, c + col_off) mod N.
   The output buffer is read there.
4. `pp_adder` adds the product to that word, and the sum is written back at the clock edge.

There is no pipeline, and nothing needs forwarding: within one pass every pixel
lands on a different output word. The adder is made of four rippled 4-bit
slices. Sums wrap modulo 2¹⁶.

`pass_timing` sequences a pass:

- On `start` it spends one clock presetting the counters (input to 0, output to the offsets).
- It then runs for exactly N·N clocks.
- It stops on the input counter's terminal count and pulses `done` one clock later.

The output buffer is never cleared explicitly. Instead, the start-pass command
has a **first-pass** flag. With the flag set, the adder ignores the old buffer
contents, so the first pass of a convolution writes its products straight in.

## Offsets and wrap-around

This is the part most easily got wrong when driving the design.

The mask is indexed I, J = 0..M-1 with its centre at M/2. The coefficient at
(I, J) uses these offsets:

    row_off = (M/2 - I) mod N        col_off = (M/2 - J) mod N

For M = 3 the offsets are 1, 0, N-1; for M = 5 they are 2, 1, 0, N-1, N-2.
`offset_gen` computes this with a single LOG2N-bit subtraction, which wraps at
N on its own.

The output address is the input address plus the offsets, **each coordinate
modulo N**, so the image wraps around at all four borders. With N = 128 and
offsets (2,2):

- input (0,0) goes to output (2,2);
- input (127,10) goes to output (1,12);
- input (127,127) goes to output (1,1).

The row and column counters are therefore separate. The column counter wraps at
N without carrying into the row. The row counter steps when the column counter
comes back round to its starting offset. N must be a power of two, N = 2^LOG2N.

With these offsets, after all M² passes the output buffer holds

    g(r, c) = Σ_I Σ_J  m[I][J] · f((r + I - M/2) mod N, (c + J - M/2) mod N)

Strictly, this is a correlation: the mask is laid over the image without being
flipped. For a true convolution, load the mask rotated by 180°. For symmetric
masks (smoothing, Laplacian) the two are the same.

The host can load offsets in two forms:

- directly as two numbers;
- as the mask size and the coefficient's indices, which the board turns into offsets.

## Scheduling passes over boards

`parallel_convolver` holds K boards and a `final_summer`. Its command port
addresses one board (`cmd.board`) or all of them (`cmd.bcast`). A command is
taken only when every board it addresses is ready, and all of them take it in
the same clock. A convolution runs like this:

1. Broadcast the image to every input buffer (N² commands).
2. For each round p = 0 .. M²/K - 1:
   - for every board k, load the LUT for coefficient k·(M²/K) + p (256 commands) and its offsets;
   - broadcast one start-pass, with the first-pass flag set in round 0. All boards run at once.
3. Issue `OP_READ_SUM` for each pixel. All K output buffers are read at that address on a
   second read port, sign-extended and added. The sum (16 + clog2(K) bits, so it cannot
   overflow) appears one clock later.

| scheme | boards | passes per board | pass clocks |
|---|---|---|---|
| serial | 1 | M² | M² · N² |
| K-parallel | K, a factor of M² | M²/K | (M²/K) · N² |
| fully parallel | M² | 1 | N² |

The original board ran at 800 ns per clock. There a 256 x 256 pass takes
65 536 x 800 ns = 52.4 ms, a serial 3 x 3 convolution 9 x 52.4 ms = 471.9 ms, and
the nine-board version 52.4 ms. None of these figures includes loading the
image and the tables. The RTL itself is a single synchronous clock domain and
has no built-in clock rate.

Each board's output word is 16 bits and wraps. So does a single board that
accumulates all M² passes. The wider final sum therefore only protects against
overflow in the addition across boards.

## Host commands

Each board has a valid/ready command port and answers every command with a
one-clock `rsp_valid` pulse, which serves as the board's interrupt to the host.
The multi-board top gives every board its own response lane. The command is
`fc_pkg::host_cmd_t`:

    {opcode[2:0], board[3:0], bcast, addr[15:0], data[15:0]}

| opcode | action | answer |
|---|---|---|
| `OP_LOAD_INPUT` (1) | input[addr] ← data[7:0] | `RC_OK`, next clock |
| `OP_START_PASS` (2) | run one pass; data[0] = first pass | `RC_PASS_DONE`, N·N + 3 clocks after acceptance |
| `OP_LOAD_LUT` (3) | LUT[addr[7:0]] ← data | `RC_OK` |
| `OP_READ_OUTPUT` (4) | read output[addr] | `RC_OK`, value in `rsp_data` |
| `OP_LOAD_OFFSETS` (5) | addr[15]=0: row = data[2L-1:L], col = data[L-1:0] (L = LOG2N); addr[15]=1: data[11:8] = M, data[7:4] = I, data[3:0] = J | `RC_OK` |
| `OP_END_OP` (6) | offsets back to 0 | `RC_END` |
| `OP_READ_SUM` (7) | top only: sum of all boards' output[addr] | `sum_valid`/`sum_data`, next clock |
| other | — | `RC_BAD_OPCODE` |

While a board runs a pass, its `cmd_ready` is low. A command for that board
waits on the bus and must stay unchanged; an assertion checks this. `OP_READ_SUM`
waits until no board is busy. A command addressed to a board number ≥ K is
taken and dropped.

The opcode set matches the original board's command list. The numeric
encodings, the handshake, the broadcast, the read-sum command and the
mask-index form of the offset load belong to this design.

## Module map

    parallel_convolver          K boards + final summation, host command routing
    ├── convolver_board  x K
    │   ├── board_controller    opcode decoder, return codes, offset registers
    │   │   └── offset_gen x 2  (M/2 - I) mod N
    │   └── convolver_unit      one-pixel-per-clock datapath
    │       ├── pass_timing     IDLE → preset → N·N run clocks → done
    │       ├── input_addr_gen  raster counter, terminal count
    │       ├── output_addr_gen row/column counters preset to the offsets, mod N
    │       ├── input_buffer
    │       ├── product_lut
    │       ├── output_buffer   (two read ports)
    │       └── pp_adder        4 x 4-bit rippled slices, first-pass bypass
    └── final_summer            K-input signed adder, registered
    fc_pkg                      opcodes, return codes, command struct

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 9 | number of boards (1..16) |
| `LOG2N` | 8 | image side N = 2^LOG2N (256) |
| `PIX_W` | 8 | pixel width; the LUT has 2^PIX_W entries |
| `ACC_W` | 16 | product and partial-sum width, a multiple of 4 |

At the defaults the top holds 9 x (64 KB + 128 KB + 512 B), about 1.7 MB of memory.

## Where this departs from the original board

- **Strobes.** The original timed the reads and latches inside each clock with monostable
  multivibrators. Here asynchronous-read memories and one state machine keep the same
  one-pixel-per-clock rate.
- **Controller.** The microcontroller and its firmware are replaced by `board_controller`.
  The PC/AT bus interface is not modelled; the top has a plain command port.
- **Output address.** The original description speaks of one 16-bit counter for the output
  address. Such a counter would carry a column wrap into the row. The design uses separate
  row and column counters, which give the modulo-N wrap-around described above.
- **Offset formula.** The original listing of the offset rule gives N - (M - I) for the upper
  half of the mask. That matches the centre-relative rule only for M = 3. The centre-relative rule
  is used.
- **Clearing.** No explicit clear of the output buffer exists; the first-pass flag does that job.
- **Final summation.** Done in hardware (`final_summer`) rather than by the host.
- **Products.** The host computes the 256 products per coefficient and loads them into the LUT.
- **Not built.** The suggested change of the adder stage for erosion and dilation is not part
  of this RTL.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_parallel_convolver \
        -y rtl -y tb +libext+.sv rtl/fc_pkg.sv tb/tb_parallel_convolver.sv
    ./obj_dir/Vtb_parallel_convolver

| testbench | what it shows |
|---|---|
| `tb_parallel_convolver` | three full convolutions through the host port (scenario in `pc_scenario`): 3 x 3 mask on 3 boards of 16 x 16, 5 x 5 on 5 boards of 32 x 32, 11 x 11 on 11 boards of 32 x 32; every read-sum result is checked against a reference; broadcast, first and accumulating passes, both offset forms, wrap-around, a command stalled behind a pass, a bad opcode and end-of-operation each occur and are counted |
| `tb_parallel_convolver_full` | the same at the defaults: 9 boards of 256 x 256, all nine passes at once, all 65 536 sums checked (a few seconds) |
| `tb_serial_convolution` | one 256 x 256 board runs nine sequential passes through host commands; every output pixel is checked, and so is the N·N + 3 clock pass time |
| `tb_partial_products` | two passes, m(-1,-1) = -1 then m(-1,0) = -2, on a small image; output (1,1) must equal p1(0,0) + p2(0,1) |
| `tb_convolver_board`, `tb_convolver_unit` | serial convolution at 16 x 16, through commands and on the bare datapath |
| `tb_output_addr_gen` | the N = 128 wrap-around examples, and every address for several offsets |
| `tb_offset_gen` | every index of every odd M up to 15 |
| others | one per leaf module: memories, adder, counters, pass timing, final summer, controller |

The images and masks are random (`$urandom`); the reference results are
computed in the testbench. The memories are not reset, so the first pass must
carry the first-pass flag.
