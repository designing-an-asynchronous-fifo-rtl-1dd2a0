# Asynchronous FIFO with asynchronous pointer comparison

A FIFO that is written from one clock domain and read from another has to
answer two questions that neither clock can answer alone: *is it full?* and
*is it empty?* The usual approach copies each pointer into the other domain
through synchronisers and compares it there. This design compares the two
pointers **directly and asynchronously**. Doing that takes two tricks:

* The pointers are **Gray-coded**, so each one changes a single bit per step.
  A comparator fed by two pointers that move at unrelated times then only ever
  steps from one valid answer to the next. It never passes through a spurious
  value.
* A one-bit **direction latch** remembers whether the FIFO was last heading
  towards full or towards empty. Equal pointers mean either state, and the
  latch tells which. Because of it, the pointers need no extra wrap bit, and all
  2^ASIZE words of memory are usable.

The resulting "pointers equal" signals are asynchronous. Each flag is **set
immediately** by its own domain's pointer move. Its **release passes two
flip-flops** of the domain that uses the flag.

The default configuration is **64 words of 32 bits**.

The same RTL set also contains two small independent circuits: a 4-bit
parallel-in/parallel-out right shifter in the style of the 74LS395, and a
3-bit universal shift register with parallel load and left/right shift. They
are described at the end.

## Block structure

```
fifo_shift_top
├── fifo2                 asynchronous FIFO wrapper (both clock domains)
│   ├── fifomem           2^ASIZE x DSIZE dual-port array
│   ├── async_cmp         combinational pointer comparison and quadrant decode
│   ├── direction_latch   SR latch: 1 = going full, 0 = going empty
│   ├── rptr_empty        read pointer (binary + Gray) and rempty   [rclk]
│   └── wptr_full         write pointer (binary + Gray) and wfull   [wclk]
├── shreg_pipo            4-bit load / shift-right register, falling edge
└── shreg_lr              3-bit load / shift-left / shift-right register
```

`fifo_pkg` holds the default geometry and the binary/Gray conversion helpers.
The top does not connect the three circuits to each other. Each one's ports are
brought out with the prefix `fifo_`, `pipo_` or `lr_`. If the FIFO is used
inside a larger design, instantiate `fifo2`, or place its sub-blocks into their
clock domains directly.

## Telling full from empty: the quadrant decode

Think of the address space as four quadrants. The two MSBs of a Gray pointer
step through 00, 01, 11, 10, which are quadrants 0, 1, 2 and 3. `async_cmp`
converts these two bits to a binary quadrant number for each pointer:

| condition (mod 4)              | meaning               | action            |
|--------------------------------|-----------------------|-------------------|
| rq − wq = 1 (write one behind) | possibly going full   | `dir_set` → latch = 1 |
| wq − rq = 1 (write one ahead)  | possibly going empty  | `dir_clr` → latch = 0 |
| `wrst_n` low                   | reset                 | `dir_clr` → latch = 0 |

When the write pointer is one quadrant behind the read pointer, the next time
the pointers meet can only be the writer catching up: the FIFO is heading
towards full. When it is one quadrant ahead, the next meeting can only be the
reader catching up: the FIFO is heading towards empty. The two conditions
never hold together.
Once either condition has fired, the latch keeps its value until the other one
fires. How the latch is timed therefore does not matter: it only has to be
settled well before the pointers can meet. Each condition depends on just four
bits, the two MSBs of each pointer.

With the direction known:

* `aempty_n = !(wptr == rptr && direction == 0)`
* `afull_n  = !(wptr == rptr && direction == 1)`

`async_cmp` is purely combinational. The latch has its own block,
`direction_latch`, written with `always_latch`. Clear takes priority over
set. It is the only latch in the design, and it is intentional.

## Turning asynchronous equality into clean flags

`aempty_n` can fall only when the *read* pointer advances. That is already in
step with `rclk`, so `rptr_empty` lets it set `rempty`, and the second
synchroniser stage, at once through an asynchronous set. `aempty_n` rises when
the *write* pointer advances, which is unrelated to `rclk`. So the release
shifts a 0 through two `rclk` flip-flops, and `rempty` falls on the second
`rclk` edge after `aempty_n` goes high.

`wptr_full` does the same for the other domain. `afull_n` sets `wfull` at
once. The release passes two `wclk` flip-flops. `wrst_n` clears the pair
asynchronously and takes priority over the set.

What this gives:

| event                                    | flag reaction                             |
|------------------------------------------|-------------------------------------------|
| read that empties the FIFO               | `rempty` rises right after that rclk edge |
| write into an empty FIFO                 | `rempty` falls on the 2nd (at most 3rd) rclk edge |
| write that fills the last word           | `wfull` rises right after that wclk edge  |
| read from a full FIFO                    | `wfull` falls on the 2nd (at most 3rd) wclk edge  |

The flags are pessimistic in the safe direction. After a release, a flag can
stay high for up to two more clocks, but it is never low while the FIFO really
is full or empty.

## Pointers

Each pointer is a mixed binary/Gray counter. A binary register counts, so the
increment is an ordinary adder. A second register holds `b ^ (b >> 1)` of the
next count, and that Gray value goes to the comparator. The memory is
addressed with the binary count; the Gray value would work equally well, since
it is a permutation of the addresses. Each pointer block asserts that its Gray
register never changes by more than one bit per clock.

## Interface and timing of `fifo2`

| port      | dir | width | domain | description |
|-----------|-----|-------|--------|-------------|
| `wclk`    | in  | 1     | –      | write clock |
| `wrst_n`  | in  | 1     | async  | write reset, active low: clears the write pointer, `wfull` and the direction latch |
| `winc`    | in  | 1     | wclk   | write request; accepted on a rising edge when `wfull` is low |
| `wdata`   | in  | DSIZE | wclk   | write data |
| `wfull`   | out | 1     | wclk   | full |
| `rclk`    | in  | 1     | –      | read clock |
| `rrst_n`  | in  | 1     | async  | read reset, active low: clears the read pointer and sets `rempty` |
| `rinc`    | in  | 1     | rclk   | read request; accepted on a rising edge when `rempty` is low |
| `rdata`   | out | DSIZE | rclk   | oldest word, valid whenever `rempty` is low (first-word fall-through) |
| `rempty`  | out | 1     | rclk   | empty |

* A write request while full, or a read request while empty, is ignored.
* Assert both resets together.
* Data written becomes readable 2–3 `rclk` edges later, and a slot that is read
  becomes writable 2–3 `wclk` edges later.
* With requests held high and no flag in the way, the FIFO takes one word per
  `wclk` and gives one word per `rclk`.

| parameter | default | meaning |
|-----------|---------|---------|
| `DSIZE`   | 32      | bits per word |
| `ASIZE`   | 6       | address bits; depth = 2^ASIZE = 64 words. Must be at least 2 |

The memory writes synchronously on `wclk` and reads combinationally, like FPGA
distributed RAM. A RAM with a registered read port would need one more read
stage in `rptr_empty`.

## Implementation cautions

The RTL simulates correctly in a zero-delay simulator. Some points still depend
on the physical implementation:

* `async_cmp`, `direction_latch` and the asynchronous set and clear inputs of
  the flag flip-flops make up an asynchronous path between the domains. The
  Gray coding keeps the decode glitch-free with respect to pointer *values*.
  The gates that implement it must still not create hazards: map each
  condition to a single LUT or a hazard-free gate, and keep synthesis from
  restructuring it.
* The flag flip-flops have an asynchronous set that can be released close to a
  clock edge. The second flip-flop of each pair exists for that case: it gives
  the first one a full clock to settle.
* Static timing tools see the set and clear paths as unconstrained
  asynchronous paths. Give them explicit constraints.
* `wptr_full`'s flag pair has both an asynchronous clear and an asynchronous
  set. Yosys' generic synthesis does not map such a flip-flop, but Verilator
  and slang accept the RTL. Many ASIC libraries provide a set/reset flip-flop
  for it.
* A two-state simulator cannot show metastability. The testbenches check
  function and cycle counts, not synchroniser behaviour.

## The shift registers

### `shreg_pipo`: 4-bit parallel-in/parallel-out right shifter

This block models a 74LS395-style part. It has four flip-flops, QA…QD
(`q[0]`…`q[3]`), clocked on the **falling** edge of `clk`. A two-way AND-OR
multiplexer in front of each stage is steered by `ld_shn`:

* `ld_shn = 1` loads `d` (DA…DD) in parallel.
* `ld_shn = 0` shifts right: `ser` → QA → QB → QC → QD.

A loaded word has left the register after four shifts. `qd_cas` is QD taken
straight from the last stage; feed it to the `ser` input of a second register
to chain them. The real part's parallel outputs are three-state and enabled by
`OC'` low. Here `q` always carries the register contents, and `q_oe = !oc_n`
is the enable for an external three-state driver. The output control never
affects the flip-flops. There is no clear input.

### `shreg_lr`: 3-bit universal shift register

It has three flip-flops, QA…QC, clocked on the rising edge. Each has a
three-way AND-OR multiplexer:

| `sh_ldn` | `l_nr` | action |
|----------|--------|--------|
| 0        | –      | parallel load from `d` (DA, DB, DC) |
| 1        | 1      | shift right: `sr` → QA → QB → QC → `sr_cas` |
| 1        | 0      | shift left: `sl` → QC → QB → QA → `sl_cas` |

There is no hold mode: every edge loads or shifts. A hold would need a fourth
multiplexer input, as in the 74ALS299. `sr_cas` and `sl_cas` chain into the
`sr` and `sl` inputs of neighbouring registers.

## Where this RTL makes its own choices

The FIFO structure follows the asynchronous-comparison scheme described above.
It has memory, comparator, direction latch, two pointer/flag blocks and a
wrapper, and a 64 × 32 default. The following choices are this implementation's
own:

* The quadrant decode compares quadrant numbers modulo 4, instead of a
  hand-written gate equation. The logic function is the same.
* The direction latch is a separate module, which keeps the comparator purely
  combinational.
* The memory has a combinational read port (first-word fall-through), and it
  is addressed with the binary pointer count.
* `rrst_n` also sets `rempty`, so the FIFO shows empty from reset on, whatever
  the state before.
* The shift registers have no clear input. `shreg_lr` uses a rising clock edge,
  and `shreg_pipo` has an enable output instead of a built-in three-state
  driver.

## Verification

Each block has a self-checking testbench in `tb/`. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_fifomem` | every address written and read back; no write with the enable low |
| `tb_async_cmp` | all 64 × 64 pointer pairs × direction × reset against a quadrant model built from the binary addresses |
| `tb_direction_latch` | set, clear, hold and clear priority |
| `tb_rptr_empty` / `tb_wptr_full` | pointer sequence and wrap, one-bit Gray steps, immediate set, release on exactly the second edge, ignored requests, reset |
| `tb_shreg_pipo` | the DA..DD = 1,0,1,1 word shifted out with SER grounded into a second, cascaded register; falling-edge only; output control; random operation against a model |
| `tb_shreg_lr` | load, right and left shifts against a model, on two registers chained through `sr_cas`/`sl_cas` into one 6-bit shifter |
| `tb_fifo2` | 64 × 32 FIFO with unrelated clocks: exact capacity 64, ordering, flag latencies, random traffic at clock ratios from 1:14 to 14:1, reset with data held |
| `tb_fifo_shift_top` | all three circuits at once at default sizes; counts every mechanism (full, empty, direction set and clear, ignored write and read, pointer wrap, reset with data, shifter load/right/left, cascade, output disable) and fails if one never happened |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -y rtl +libext+.sv rtl/fifo_pkg.sv tb/tb_fifo_shift_top.sv \
  --top-module tb_fifo_shift_top
./obj_dir/Vtb_fifo_shift_top +verilator+rand+reset+2
```

Replace the testbench name to run another one. `+verilator+rand+reset+2`
starts every uninitialised variable at a random value, which checks that reset
and loading really initialise the state. Each testbench runs in well under a
second.

To change the FIFO size, override `DSIZE`/`ASIZE` on `fifo2` or
`fifo_shift_top`. The FIFO testbenches derive their expectations from
`ASIZE`, so they keep working when its localparams are edited.
