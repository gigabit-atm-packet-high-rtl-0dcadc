# Pipelined bank-array memory for a shared-buffer ATM switch

A shared-buffer ATM switch with N ports keeps every cell in one common memory.
With a single-port memory, that memory has to be 2N times faster than one port,
and a large SRAM soon becomes the part that sets the clock. This design avoids
the limit by cutting the buffer into an N x N array of small SRAM banks. It then
runs each request through the array as a systolic pipeline. Every bank, decoder
and output buffer is one pipeline stage. The clock period is therefore the
access time of one small bank, whatever size the array is.

The default configuration is a 4 x 4 array of banks. Each bank holds 64 words of
65 bits (4160 bits), so the array holds 66560 bits. That is 128 ATM cells of
64 bytes, each with an 8-bit next-cell address. A cell takes 8 consecutive
words. Each word holds 64 bits of cell data and one bit of the next-cell address.

Properties seen at the ports:

* One read or write can start every clock cycle, and reads and writes can be
  mixed freely. No dead cycle is needed when the direction changes.
* Read data appears exactly **N + 3 cycles** after the read address (7 for
  4 x 4), whatever the address.
* Operations complete in the order they were issued. A read issued the cycle
  after a write to the same word returns the new data.
* To grow the memory, set `N` to a larger power of two. The cycle time of the
  stages does not change. Only the latency (N + 3) and the address width grow.

## How a request finds its bank

The address is `ADDR = {cell-in-bank, y, x, word-in-cell}`. For N = 4 the bits are:

| bits           | meaning                                            |
|----------------|----------------------------------------------------|
| `ADDR[2:0]`    | word within the 8-word cell                        |
| `ADDR[4:3]`    | `x`, the bank row                                  |
| `ADDR[6:5]`    | `y`, the bank column                               |
| `ADDR[9:7]`    | cell within the bank                               |
| `ADDR[10]`     | reserved, ignored (aliases onto the lower half)    |

`{ADDR[10:7], ADDR[2:0]}` is the 7-bit row address `RA`. Its top bit is the
reserved one, because a bank has only 64 word lines.

The primary decoder does not compute the bank coordinates directly. It computes
three small numbers that steer the request through the array:

* `RBA`, the row branch address. The row decoder chain counts it down, and the
  decoder where it is zero raises the row trigger `RBT`.
* `CBA`, the column branch address. The column decoder chain counts it down,
  and the decoder where it is zero raises the column trigger `CBT`.
* `PD`, the pipeline depth. It counts the banks still to go before the
  addressed one.

They come from one subtraction, `Temp = x - y`:

| case   | RBA     | CBA          | PD  | the path starts at          |
|--------|---------|--------------|-----|-----------------------------|
| x >= y | x - y   | 0            | x   | bank (x-y, 0), left edge    |
| x < y  | 0       | -(x-y) = y-x | y   | bank (0, y-x), top edge     |

Two bundles of signals travel in the array. The **vertical bundle** is `CBT`,
`PD`, `R/W` and `DATA`. It runs along the column decoders and down into the
banks. The **horizontal bundle** is `RBT` and the 64 pre-decoded word lines. It
runs down the row decoders and right into the banks. The trigger bits tell each
bank what to do with them:

| triggers in    | the bank ...                                                   |
|----------------|----------------------------------------------------------------|
| `CBT` only     | passes the vertical bundle down, with `PD - 1`                 |
| `RBT` only     | passes the horizontal bundle right                             |
| `CBT` and `RBT`| passes both bundles diagonally down-right, with `PD - 1`. If `PD` is 0 it also reads or writes its own array. |

Exactly one column decoder raises `CBT` and exactly one row decoder raises
`RBT`. The two bundles meet at the start bank on the top or left edge. From
there they travel together along a diagonal. `PD` reaches zero exactly at bank
(x, y). After the access the bundles keep going to the edge of the array, where
an output buffer puts read data on the output bus.

Two worked examples for N = 4:

* Address 8: x = 1, y = 0, so RBA = 1, CBA = 0, PD = 1. Column decoder 0
  raises CBT. Bank (0,0) sees CBT only and passes the bundle down with PD = 0.
  Row decoder 1 raises RBT, so bank (1,0) sees both triggers with PD = 0 and
  accesses its array. The bundles then pass through (2,1) and (3,2) into the
  output buffer below column 2.
* x = 1, y = 3: RBA = 0, CBA = 2, PD = 3. Column decoder 2 raises CBT and
  passes PD = 1 down. RBT runs right from row decoder 0 through (0,0) and
  (0,1). Bank (0,2) sees both triggers with PD = 1 and sends them on
  diagonally. Bank (1,3) accesses its array with PD = 0. The result leaves
  through the buffer right of row 1.

### Why the latency is constant

A bundle entering bank (i, j) has always taken `max(i, j) + 3` stages:

* the primary decoder;
* one column decoder, or one row decoder;
* one stage per bank on the way.

Along a straight run on an edge, `max(i, j)` grows by one per bank. Along a
diagonal it also grows by one per bank. Every path therefore holds N banks: the
straight run plus the diagonal to the edge. Adding the output buffer gives
N + 3 stages in all. Two consequences follow:

* An operation issued in a given cycle never meets another operation inside the
  array.
* Only one output buffer is valid in any cycle, so the output bus needs no
  arbitration. An assertion in `pipelined_memory` checks this.

Only N of the N² banks are active for any one operation. That is why the banks
gate their data registers. A bank loads its vertical data registers only when
the incoming `CBT` is high, and its horizontal ones only when `RBT` is high.
In silicon this is a gated clock to the latches. In the RTL it is a load enable.

## Timing

```
cycle       t0    t1    ...   t7      t8
addr/rw     R a   R b
odata                         M[a]    M[b]     ovalid_o high in t7 and t8
md/pa/me_o              (N+1 = 5 cycles after issue)
```

All registers are clocked on the rising edge of `clk`. The reset `rst_n` is
asynchronous and active low. It clears only `ME` and the trigger bits, which is
enough to empty the pipeline. A write has no acknowledge. Its data is in the
bank `max(x,y) + 3` cycles after issue, before any later read of the same word
can reach it. `me_i = 0` issues an empty slot.

`md_i` and `pa_i` (mode and port address) are not used by the memory. They are
carried along the column decoders and come out on `md_o`, `pa_o` and `me_o`
N + 1 cycles after issue. They are meant for the switch's address controller,
which uses the port address to choose the output port of the current cell.

## Files

| file                        | contents                                              |
|-----------------------------|-------------------------------------------------------|
| `rtl/pm_pkg.sv`             | sizes (65-bit word, 64 word lines, 7-bit RA, 2-bit PA), the `rw_e` encoding (1 = read), one-hot to index helper |
| `rtl/primary_decoder.sv`    | subtractor and borrow-controlled selection of RBA/CBA/PD, RA extraction |
| `rtl/column_decoder.sv`     | zero detect for CBT, CBA and PD decrementors, pass-through of DATA, R/W, ME, MD, PA |
| `rtl/row_decoder.sv`        | zero detect for RBT, RBA decrementor, RA to 64 word lines |
| `rtl/memory_bank.sv`        | 64 x 65 array, PD decrementor, direction and access control, gated data registers |
| `rtl/output_buffer.sv`      | one exit register onto the AND-OR output bus          |
| `rtl/pipelined_memory.sv`   | the top: decoders, N x N banks, 2N-1 output buffers, bus |
| `tb/tb_*.sv`                | one self-checking testbench per module                |
| `tb/pm_stim.sv`             | stimulus and scoreboard shared by the top-level tests |
| `tb/tb_pipelined_memory.sv` | end-to-end test at the default 4 x 4 size             |
| `tb/tb_pipelined_memory_n8.sv`, `_n2.sv` | the same test at 8 x 8 and 2 x 2     |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_pipelined_memory rtl/pm_pkg.sv tb/tb_pipelined_memory.sv
./obj_dir/Vtb_pipelined_memory
```

Replace the top module and file name to run another test.

The end-to-end test does the following:

1. Replays the example of the timing chart: write 3, write 8, read 3, read 8.
   It checks that both reads return after N + 3 cycles.
2. Writes every word.
3. Runs 20000 random operations, with bubbles, direction changes,
   read-after-write to the same word and addresses with the reserved bit set.

Every cycle it checks the read data and which output buffer fired. It also
checks `md_o`, `pa_o` and `me_o`. It fails if one of these never occurred:

* a path starting on the top edge, on the left edge, or at the corner bank;
* a bubble;
* a direction change;
* a read-after-write;
* an aliased address;
* a read leaving through one of the 2N-1 buffers.

It also counts the cycles in which each bank holds a trigger. It checks that
every operation used exactly N banks, which is the property that makes the
clock gating worthwhile.

The unit testbenches check the decoders exhaustively or at random, and check
all three forwarding cases of the bank, including that gated registers hold.
All tests pass at N = 2, 4 and 8.

## What comes from the published design and what does not

Taken from the published design:

* the array organisation;
* the primary decoding algorithm, including that CBA is the two's complement of `x - y`;
* the trigger rules (`CBT`/`RBT` low when `ME` is low, zero detection of CBA/RBA);
* the access condition (both triggers and `PD = 0`);
* the bit widths (11-bit address, 7-bit RA with one bit reserved, 64 word
  lines, 65-bit data, 2-bit PA and branch addresses for 4 x 4);
* the output buffer condition (both triggers and R/W high = read);
* the per-bank gating of vertical and horizontal data;
* the N + 3 latency.

Choices made here, where the description leaves room:

* **Forwarding rule.** The published description says only that a bank talks
  to neighbours in three directions and that one diagonal path is active per
  operation. The rule "one trigger goes straight, both go diagonally" is this
  design's reading. It is the rule that makes the decoding reach bank (x, y)
  and gives the stated constant latency.
* **Which bit of x - y means what.** x = `ADDR[4:3]` is the bank row and
  y = `ADDR[6:5]` the bank column. The reserved row-address bit is taken to be
  `ADDR[10]`.
* **Latches.** The original uses latch pairs: input latches open while the
  clock is low, output latches open while it is high. Each pair is one
  rising-edge flip-flop here. The gated clock is a load enable.
* **Memory array.** The array is read combinationally inside the bank's cycle
  and written on the clock edge. The full-custom 6T cells, precharge and
  sense amplifiers are not modelled.
* **Output bus.** It is an AND-OR bus in which idle buffers drive zero. The
  original is a shared three-state bus.
* **Reset and idle slots.** The reset and the `ovalid_o` flag are additions.

Not included are the parts of the surrounding switch chip: the address
controller that keeps the per-port queues from PA and the next-cell addresses,
and the input and output cell buffers. The ports they would use are brought
out on the top.

The original circuit's figures are 4 ns per bank at 5 V and an 80 MHz chip
clock in 0.6 µm CMOS. They belong to that implementation. This RTL makes no
timing or power claim of its own.
