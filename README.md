# Pulse-scan select register for a 128 x 128 pixel sensor

A CMOS image sensor must select its pixels one column and one row at a time.
This design does that with no counter or decoder. A single logic-1 pulse
travels down a chain of 128 flip-flops, and each flip-flop drives one select
line. When the column pulse falls off the end of its chain, it makes one clock
edge for a second chain of the same kind, which selects the rows. So the row
pulse moves down by one row for each completed column sweep.

The silicon version is built from a fully static differential (CVSL, cascode
voltage switch logic) flip-flop. "Static" matters here: the row chain is clocked
only once per line, so its flip-flops must hold their state for a long time. The
design also runs at a clock as slow as 1 Hz. The SystemVerilog models the logic
of that chip: each flip-flop keeps its differential pins (D/DB in, Q/QB out) and
an active-low reset. The circuit-level properties (setup/hold times, drive
strength, static hold) are not modelled.

## Structure

```
              +--------------------------- cvsl_scan_chip ----------------------------+
 clk -------->| pulse_shift_register u_col (128)  --col_end--> cvsl_dff u_row_clk ---+ |
 col_rst_n -->|   gen FF -x-> stage0 -> stage1 -> ... -> stage127        (row clock)  | |
              |                                                                      v |
 row_rst_n -->| pulse_shift_register u_row (128), clocked by the row clock            |
              |                                                                        |
 tff1_*, tff2_*, tinv_* --> test_cells (two stand-alone flip-flops, one inverter)      |
              +------------------------------------------------------------------------+
 outputs: col_sel[127:0], row_sel[127:0] to the pixel array; col_end, row_end to pads
```

| File | Module | Role |
|---|---|---|
| `rtl/cvsl_dff.sv` | `cvsl_dff` | the differential flip-flop cell: rising edge, asynchronous active-low reset to Q=0 |
| `rtl/pulse_shift_register.sv` | `pulse_shift_register #(N=128)` | pulse generator plus N-stage select chain |
| `rtl/test_cells.sv` | `test_cells` | stand-alone characterisation structures |
| `rtl/cvsl_scan_chip.sv` | `cvsl_scan_chip #(N_COL=128, N_ROW=128)` | the chip: column chain, row-clock flip-flop, row chain, test cells |

## How one pulse is made

The chain has no data input. Its first element is a pulse-generation flip-flop
with D tied high. Reset clears it, and the first clock edge sets it; after
that it stays high. That flip-flop feeds stage 0 crossed over: its QB goes to
D of stage 0 and its Q to DB. Stage 0 therefore samples the complement of the
generator:

| rising edge after reset | generator Q | stage 0 D (= gen QB) | stage 0 Q after the edge |
|---|---|---|---|
| 1 | 0 -> 1 | 1 | 1 |
| 2 | 1 | 0 | 0 |
| 3, 4, ... | 1 | 0 | 0 |

The single low-to-high step of the generator thus becomes a one-clock pulse in
stage 0. The normal Q->D, QB->DB links of the later stages carry it along:
`sel[k]` is high for exactly the clock period after edge `k+1`. After edge
`N+1` the chain is empty and stays empty. The only way to start a new sweep is
another reset. Hence the end-of-chain outputs: `col_end`/`row_end` tell the
controller that a sweep is done and the register can be reset.

## Row clock and the scan sequence

The row-clock flip-flop samples `col_end` on the pixel clock. Its Q, which is
high for one pixel-clock period, is the clock of the row chain. So the row
chain steps on the pixel-clock edge after the one that put the column pulse in
the last column.

A controller drives the chip like this (this is what `tb/tb_cvsl_scan_chip.sv`
does):

1. Hold `col_rst_n` and `row_rst_n` low, then release both.
2. Clock. After edge k (1..128), column k-1 is selected. `col_end` is high after
   edge 128.
3. One more edge: the row clock rises, and the row chain steps. After the first
   sweep following a row reset, row 0 is selected. Until then no row is
   selected, because the row chain works the same way as the column chain.
4. Pulse `col_rst_n` low (it also clears the row-clock flip-flop). Release it
   and go to step 2.
5. After 128 sweeps, `row_end` is high, which means the last row is selected.
   After one more sweep the row chain is empty. Pulse `row_rst_n` to start a
   new frame.

With a one-clock column reset between sweeps, a line takes 131 clocks, and a
frame takes 128 lines: about 3.4 ms at the 5 MHz maximum clock.

## Choices made in this model

The source design fixes these points: the sizes (128 columns, a 128 x 128
pixel array), the differential cell with reset, the tied generator and the
crossed link to stage 0, the row-clock flip-flop, the active-low resets and the
end-of-chain pads. These points are this model's own choices:

- **Clock edge.** Every flip-flop samples on the rising edge. The transistor
  cell's edge polarity is not pinned down.
- **Asynchronous reset.** Reset acts as soon as it is asserted, and clears Q.
  Testbenches drive a reset edge at time 1, so the reset takes effect before
  the first clock.
- **Two resets.** `col_rst_n` resets the column chain and the row-clock
  flip-flop; `row_rst_n` resets the row chain. This lets a new line start
  without losing the row position.
- **Row chain length** is 128, to match the pixel array.
- **Derived clock.** The row chain is clocked by a flip-flop output, as in
  the silicon. When you put this on an FPGA or into a standard-cell flow,
  replace it with a clock enable. Any change to the timing between the column
  and row chains must then keep the row step on edge N_COL+1.
- **Test cells.** Which signals the three buffered outputs of the first test
  flip-flop carry is not specified; here they are Q, QB and Q. Buffers are
  identities in the logic model. Every test cell has its own pins.
- **Differential inputs.** `cvsl_dff` stores one bit and derives QB from it.
  An assertion flags a clock edge where D and DB are not complementary.
  `pulse_shift_register` asserts that at most one stage is selected at a time.

Not modelled: the transistor-level latches (an n-latch followed by a p-latch,
made static by an added inverter and two pull-down transistors), the inverter
chains that drive long wires and pads, the pads, and the pixel array.
Characterised numbers that have no meaning in RTL: setup 825 ps, hold 1450 ps,
rise 5.8 ns and fall 2.78 ns into 1.3 pF, and buffered outputs that drive
20 pF within 10 ns.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| Testbench | What it checks |
|---|---|
| `tb/tb_cvsl_dff.sv` | random data, reset held across edges, asynchronous reset between edges, state held through a long clock stop |
| `tb/tb_pulse_shift_register.sv` | 128-stage and 5-stage chains against an edge-count model, full and aborted sweeps, one end-of-chain clock per sweep |
| `tb/tb_test_cells.sv` | both test flip-flops on different clocks, separate resets, the inverter |
| `tb/tb_cvsl_scan_chip.sv` | the whole chip at full size: an aborted sweep, 129 line sweeps (a whole frame, then the row pulse leaving the chain) and a frame restart, with column, row and end outputs checked every clock and `col_end` latency checked at 128 edges. Counts each mechanism: column sweeps, row steps, row end, column restarts, aborted sweep, frame restart, test-cell use |
| `tb/tb_clock_rates.sv` | one sweep plus row step at 5 MHz, 1 MHz and 1 Hz |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  tb/tb_cvsl_scan_chip.sv --top-module tb_cvsl_scan_chip
./obj_dir/Vtb_cvsl_scan_chip
```

All of them finish in well under a second. The full-chip test runs with every
parameter at its default. Lint with `verilator --lint-only -Wall -Irtl
rtl/cvsl_scan_chip.sv`. Two `PINCONNECTEMPTY` warnings remain: they mark the
unused QB outputs of the row-clock flip-flop and the row chain.

To change the array size, set `N_COL`/`N_ROW` on `cvsl_scan_chip` (or `N` on
`pulse_shift_register`). The scan sequence above holds for any size.
