# Time-shared hardware accelerators in reconfigurable FPGA slots

A Zynq-class SoC has a processor next to an FPGA fabric. Fabric area is
limited, so this design does not give each task a fixed accelerator. It
reserves a few *slots*: regions of fabric that can be rewritten at run time
by partial reconfiguration. The processor loads whichever accelerator a task
needs into a free slot, runs it, and loads another accelerator into the same
slot when a later task needs one. For this to work, every accelerator has the
same outside shape. An accelerator built for one slot then fits any slot, and
one software driver handles all of them.

This repository holds the fabric side of that system:

- two reconfigurable slots,
- the static logic around them (control interconnect and one decoupler per slot),
- four accelerators that can be loaded into a slot:
  - Sobel edge filter,
  - 5x5 blur,
  - 5x5 sharpen,
  - 512x512 integer matrix multiply.

The processor, the DDR memory and the configuration port are parts of the SoC
itself. Testbench models stand in for them.

## The common accelerator interface

Every accelerator (`hw_accel`) has the same ports:

| Port | Kind | Purpose |
|---|---|---|
| `s_axil_req/rsp` | AXI4-Lite slave | control registers (`acc_ctrl_regs`) |
| `m_axi_req/rsp` | AXI4 master, 32-bit data | reads inputs from and writes results to system memory |
| `irq` | level | raised when the operation completes, cleared by software |
| `state_out[7:0]` | status | controller state, for probing from outside |

Register map of every accelerator (byte offsets):

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | CTRL | write bit0=1: start. Read: bit0 start pending, bit1 done (cleared when read), bit2 idle, bit3 ready |
| 0x04 | GIE | bit0: global interrupt enable |
| 0x08 | IER | bit0: enable the "done" interrupt |
| 0x0C | ISR | bit0: "done" status. Writing 1 toggles it |
| 0x10 | ID | which accelerator this is: 1 Sobel, 2 blur, 3 sharpen, 4 multiply |
| 0x20 + 4k | args[k] | arguments, k = 0..3 |

Arguments are byte addresses in system memory:

- Filters: `args[0]` is the source image and `args[1]` the destination image.
- Multiplier: `args[0]` is A, `args[1]` is B and `args[2]` is C.

A driver does the following:

1. Write the arguments.
2. Optionally set GIE and IER.
3. Write CTRL=1.
4. Wait for `irq`, or poll CTRL bit1.
5. Clear ISR by writing 1 to it.

Reading ID tells software which accelerator a slot currently holds.

The memory master issues INCR bursts of at most 256 beats. A burst never
crosses a 4 KB boundary, and only one burst is outstanding at a time
(`axi_burst_reader`, `axi_burst_writer`).

## Slots, decouplers and reconfiguration

`pl_top` wires things as follows:

```
 GP port ──> axil_decoder ──┬─> decoupler 0 ──> slot 0 (rp_slot) ──> HP port 0 ──> memory
 (control)                  ├─> decoupler 1 ──> slot 1 (rp_slot) ──> HP port 1 ──> memory
                            ├─> decoupler 0 control register
                            └─> decoupler 1 control register
 irq[k] <── decoupler k <── slot k
```

Control address map, with `GP_BASE` = 0x4000_0000:

| Address | Target |
|---|---|
| GP_BASE + k*0x1000 | accelerator registers of slot k |
| GP_BASE + (N_SLOTS+k)*0x1000 | decoupler k. Offset 0, bit0 = 1 isolates the slot. It resets to 1 |

Unmapped addresses return DECERR.

**Why decouplers.** While the configuration port rewrites a slot, the logic
inside the slot is undefined, and its outputs can toggle at random. A stray
`arvalid` or `irq` reaching the static side could start a bogus memory
transfer or a false interrupt. When `pr_decoupler` is set, it forces every
handshake bit and the interrupt to 0 in both directions.

**How a slot is modelled.** Partial reconfiguration cannot be expressed in
RTL, so `rp_slot` stands in for it functionally:

- The slot contains all four accelerators. A register `loaded_rm` names the
  one that is "loaded". The others are held in reset and cut off.
- While input `pr_active` is high, the slot is being rewritten. All of its
  valid/ready outputs and its interrupt are driven to 1, and `state_out` to
  0xFF. This is a deliberately hostile pattern, so tests show that the
  decoupler contains it.
- When `pr_active` falls, `loaded_rm` takes the value of `pr_rm`. The new
  accelerator is held in reset for `RST_CYCLES` (4) more cycles, so it starts
  clean.

This model is not an area model: a real slot holds only one accelerator.

The processor-side sequence to reconfigure slot k is:

1. Write 1 to decoupler k.
2. Let the configuration port load the partial bitstream. In simulation this
   means pulsing `pr_active[k]` with `pr_rm[k]` set.
3. Write 0 to decoupler k.
4. Program and start the new accelerator.

Decoupling is the software's job; nothing in hardware checks it. If the slot
already holds the wanted accelerator, the scheduler skips steps 1–3.

## The accelerators

All image data is 800x600, one pixel per 32-bit word `{8'h00, R, G, B}`,
stored row-major. Every filter works the same way:

1. Read one image line per burst into a circular line buffer.
2. Compute one output pixel per clock.
3. Collect the line in an output buffer.
4. Write it back with one burst.

The windows are causal: output pixel (x, y) uses input pixels
(x-i, y-j) for i, j ≥ 0. Pixels outside the image count as zero.

- **Blur** (`conv5x5_filter`, KIND=OP_BLUR)
  - 5x5 kernel of ones.
  - Each channel's sum is divided by 25.
  - Unit weights mean the datapath is adders only.
- **Sharpen** (`conv5x5_filter`, KIND=OP_SHARP)
  - 5x5 kernel: -1 on the outer ring, 2 on the inner ring, 8 at the centre.
  - The kernel sum is 8.
  - Each channel is divided by 8 and clamped to 0..255.
- **Sobel** (`sobel_filter`)
  - Luma is Y = (66R + 129G + 25B + 128) >> 8.
  - It is computed as each pixel arrives, so the line buffers hold 8 bits, not 24.
  - The magnitude |Gx| + |Gy| is computed on a 3x3 window.
  - It is then inverted to 255 - magnitude, so edges come out dark. The
    difference is kept signed, so a magnitude above 255 gives a negative value.
  - Two thresholds push the result to the rails: above `H_LUMA` (200) it
    becomes 255, below `L_LUMA` (60) it becomes 0.
  - The output is written as a grey pixel.
- **Matrix multiply** (`matrix_mult`)
  - Computes C = A·B for 512x512 32-bit integers with wrap-around arithmetic.
  - A and C are row-major; B is stored column-major.
  - For each row of C:
    1. Buffer the row of A.
    2. Stream the 512 columns of B one burst at a time, with one
       multiply-accumulate per arriving beat.
    3. Write the finished row of C with one burst.

Measured cycles at 100 MHz, with the testbench memory model (3-cycle
latency, random stalls). The filters ran with 10 % stalls, blur and Sobel in
both slots at once. The multiplier ran alone with 5 % stalls. With 20 %
stalls it needs 171 M cycles, because it takes one beat of B per cycle and
so runs at the speed of its memory port.

| Operation | This RTL | Hardware reference |
|---|---|---|
| Blur 800x600 | about 1.56 M cycles (15.6 ms) | 26.4 ms |
| Sobel 800x600 | about 1.56 M cycles (15.6 ms) | 21.5 ms |
| Sharpen 800x600 | about 1.56 M cycles (15.6 ms), Sobel slot idle | 26.4 ms |
| Multiply 512x512 | 144.5 M cycles (1.44 s), 5 % stalls, alone | 1.7 s |

The full-size testbenches require each operation to finish within its reference time.

## Where this design departs from, or adds to, the reference system

- **The decoupler is built here as RTL.** The reference system uses a library
  decoupler core; this one does only the same job.
- **The register map, ID codes, argument order, address map and pixel
  packing** are this design's choices.
- **Edge handling, thresholds and Sobel output format** are this design's
  choices:
  - edges are zero-padded,
  - `H_LUMA`/`L_LUMA` are 200/60,
  - Sobel writes grey in all three channels.
- **The multiplier accumulates while B's column arrives.** It does not copy
  the column to a buffer first. The result is the same, and it needs fewer
  cycles and no column buffer.
- **The AXI subset is reduced.** The bus has 32-bit data and INCR bursts only,
  with one burst in flight. There are no IDs and AxSIZE is not carried. The
  memory side has no interconnect, because each slot owns one HP port.
- **Not built:**
  - the processor, the DDR3 memory and its controller,
  - the PS–PL AXI ports,
  - the configuration port (DevC/PCAP) that moves bitstreams,
  - the video output path (VDMA, VGA controller, resistor-ladder DAC).

  The top brings out `pr_active`/`pr_rm` and the AXI ports where these
  blocks would connect. Bitstream load time (a few milliseconds per slot)
  does not exist in this model; it is only as long as the testbench makes
  `pr_active`.

## Files

`rtl/`:

| File | Contents |
|---|---|
| `pr_pkg.sv` | shared types: AXI structs, operation codes, register offsets, default sizes |
| `pl_top.sv` | top level: `N_SLOTS`, `IMG_WIDTH`, `IMG_HEIGHT`, `MAT_DIM`, `GP_BASE` |
| `axil_decoder.sv` | control interconnect |
| `pr_decoupler.sv` | slot isolation |
| `rp_slot.sv` | reconfigurable slot model |
| `hw_accel.sv` | standard accelerator wrapper: parameter `OP` selects the core |
| `acc_ctrl_regs.sv` | accelerator control registers |
| `conv5x5_filter.sv`, `sobel_filter.sv`, `matrix_mult.sv` | the operation cores |
| `axi_burst_reader.sv`, `axi_burst_writer.sv` | burst engines shared by the cores |

`tb/`:

- one self-checking testbench per block, `tb_<block>.sv`;
- `tb_pl_top_full.sv`: the full-size run of the top;
- `tb_matrix_mult_full.sv`: the 512x512 multiply;
- `axi_mem_model.sv`: memory model with multiple ports, latency, random
  stalls and AXI rule checks;
- `axil_bfm.sv`: AXI4-Lite master tasks;
- `tb_ref_pkg.sv`: reference models of the filters and the multiply.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog.

## Simulating

Each testbench is a top module with no ports. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_pl_top \
  -y rtl -y tb +libext+.sv rtl/pr_pkg.sv tb/tb_ref_pkg.sv tb/tb_pl_top.sv
./obj_dir/Vtb_pl_top
```

Replace `tb_pl_top` with any other `tb_*` name.

**`tb_pl_top`** (24x8 images, 6x6 matrices) takes the whole design end to
end:

- It runs all four accelerators through the two slots, with more jobs than
  slots.
- It counts each mechanism and fails if any count is zero:
  - reconfigurations,
  - reuse of an already-loaded accelerator,
  - waits for a free slot,
  - both slots busy at once,
  - spurious slot outputs blocked by a decoupler,
  - interrupt completions,
  - memory stalls.

**`tb_pl_top_full`** uses every default: 800x600 images and two slots. It
runs two phases:

1. It blurs one image and runs Sobel on another at the same time.
2. It reconfigures slot 0 from blur to sharpen, with the decoupler set, and
   sharpens the first image.

It checks every output pixel and checks each cycle count against the
reference times. It takes about 20 seconds.

**`tb_matrix_mult_full`** multiplies two random 512x512 matrices with the
multiplier core at its default size. It checks all 262144 results and the
run time, and takes about 75 seconds. `tb_matrix_mult` runs the same check
at N = 12 in under a second.
