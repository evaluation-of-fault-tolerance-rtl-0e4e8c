# Dual-core lockstep with run-time fault injection

A processor on an SRAM FPGA in orbit suffers single-event upsets: an ionising
particle flips a bit in a RAM or a flip-flop. This RTL implements two pieces
of hardware that let a soft processor system detect such upsets and be tested
against them without a radiation beam:

1. **Lockstep comparison.** Two identical cores run the same program on the
   same inputs. Their AHB master outputs are compared every clock. Agreeing
   outputs go to the bus. On a disagreement nothing reaches the bus, both
   cores are given the last input that produced agreeing outputs, and a reset
   clears the cores so the work is re-executed.
2. **Fault injection in the memories.** Every RAM of a core (caches, register
   file) is built from one `syncram` wrapper. In this version the wrapper
   holds a second RAM, the *error RAM*, beside the ordinary one. The read data
   the core sees is the XOR of the two. A host writes a bit-mask into a
   general-purpose APB register, and the mask is stored in the error RAM
   alongside the core's own writes. Later reads of those words come back with
   the masked bits flipped, as after an upset, while the ordinary RAM still
   holds the correct data.

The design follows a published study of fault tolerance for the NOEL-V
RISC-V processor on a Microchip PolarFire FPGA. The processor, its bus
controllers and its debug link are not part of this RTL. Their signals are
ports of the top module `ls_fi_top`. Where the study is silent (field
layout, widths, timing, reset), the choices made here are stated below and in
each file's header.

## Block structure

```
                    APB (from the APB bridge)
                          |
                     +---------+  gpreg[31:16]  +------------------+
                     | grgpreg |--------------->| syncram_fi (A)   |<--> core A RAM port
                     | 0xFC003000 gpreg[15:0] ->| syncram_fi (B)   |<--> core B RAM port
                     +---------+                +------------------+
                                                  each: pf_ram + fi_ctrl + pf_ram (error) + XOR

   core A AHB out --+                        +--> AHB bus (master output)
                    +--> ls_compare ---------+
   core B AHB out --+      |   ^
                           |   +-------------- AHB bus (master input)
     core_ahbi[0..1] <-----+--> core_rst
```

| Module | Role |
|---|---|
| `ft_pkg` | AHB master in/out structs, APB request struct, register address and field layout |
| `ls_fi_top` | Top: wires the register, one fault-injecting syncram per core and the compare module |
| `ls_compare` | Lockstep compare, forward/block, saved-input reload, core reset |
| `syncram_fi` | Ordinary RAM + error RAM + controller, read data XORed |
| `fi_ctrl` | Splits the register slice into mask and write signal, drives the error RAM |
| `pf_ram` | Single-port synchronous RAM, used for both RAMs |
| `grgpreg` | 32-bit APB register holding the injection command |

## The lockstep compare (`ls_compare`)

Both cores receive the same AHB master input and drive an `ahb_mst_out_t`
(bus request, transfer type, address, write, size, burst, protection, 64-bit
write data). The module compares the two structs in full, combinationally:

* **Outputs equal.** Core A's output drives the bus. The bus input goes to
  both cores. At the clock edge the bus input is stored in the `saved`
  register.
* **Outputs differ.** `mismatch` and `core_rst` go high in the same cycle.
  The bus sees an idle master (no request, `HTRANS=IDLE`). Both cores receive
  the `saved` input instead of the live bus input. `saved` is not updated.

`core_rst` is combinational and must reach the cores' synchronous reset. The
cores then restart from their reset state, re-execute and, once their outputs
agree again, traffic resumes. The system reset `rst_n` only clears `saved`.
Peripherals, and the injection register in particular, are not reset by
`core_rst`. So a fault that keeps being re-created (see below) makes the pair
loop through resets until the host clears it. This is the behaviour the
original hardware showed.

Things to know before trusting it:

* The comparison sits on the bus interface only. An upset that changes a
  core's internal state without changing its bus output in the same cycle is
  not seen until, and unless, it reaches the bus. Disagreements inside the
  pipeline, caches or register file are not compared.
* An identical fault in both cores (a common-mode error) is not detected.
  The two copies agree and the wrong data goes out.
* The original description calls this logic combinational. Holding the saved
  input needs storage, so here it is a clock-enabled register rather than a
  latch.
* What the bus sees during a mismatch is this design's choice. An early
  version of the original forwarded core A's output and was dropped.
* An assertion checks that the bus only ever sees an output both cores agree
  on, or the idle output during a reset.

## Fault injection (`grgpreg`, `fi_ctrl`, `syncram_fi`, `pf_ram`)

### Register and field layout

`grgpreg` is one 32-bit register at APB address `0xFC003000`. It is written
with an ordinary two-cycle APB transfer: setup, then access with `penable`.
It can be read back. Each core takes a 16-bit slice:

| Bits | Core | Slice bits used |
|---|---|---|
| 31:16 | A (index 0) | 1:0 bit-mask, 2 write signal, 3 reserved |
| 15:0 | B (index 1) | 1:0 bit-mask, 2 write signal, 3 reserved |

Examples: `0x00000007` injects mask `0b11` into core B. `0x00070000` does the
same for core A. `0x00000003` sets the mask without the write signal and
injects nothing. The original experiments used a 4-bit field per core and the
values `0x3`, `0x7` and `0x00030000`; the mapping above is consistent with
the first two. Under this mapping `0x00030000` is core A's mask without its
write signal. Widening the mask is a change of `FI_MASK_W` in `ft_pkg`.

### When the error RAM is written

This is the subtle part. `fi_ctrl` gives the error RAM the same enable and
the same write strobe as the ordinary RAM. The word it writes is the mask ANDed
with the write signal:

* Write signal **set**: every word the core writes also gets the mask in the
  error RAM. Reads of that word return `data ^ mask`.
* Write signal **clear**: every word the core writes gets zero in the error
  RAM. Rewriting a location cleans it.

So a fault is only placed in a location the core writes while injection is
requested. It stays there after the register is cleared, until the core
writes that location again. Faults cannot appear in memory the core never
writes. The error RAM starts at all zeros, so an untouched system behaves
normally. Without the AND (mask written on every write), any stale register
value corrupts every loaded program. The original hardware showed exactly
this before the write signal was added.

### Timing

`pf_ram` is single-port and synchronous. The read data is registered one clock
after the address. A write returns the old contents (read-before-write).
`dataout` holds while `enable` is low. The XOR in `syncram_fi` is after both
output registers, so injection adds no latency. A register write takes effect
at the end of the APB access cycle. From the next RAM write on, the new mask
applies.

## Interface of `ls_fi_top`

Parameters: `ABITS` (syncram address bits, default 8) and `DBITS` (syncram
data bits, default 32, the 32-bit processor configuration). Core-indexed
ports are unpacked arrays of two: index 0 is core A, index 1 is core B.

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low system reset |
| `apbi` / `prdata` | in / out | APB request (`apb_req_t`) and read data for the register |
| `core_ahbo[2]` / `core_ahbi[2]` | in / out | AHB master output of each core, input steered to each core |
| `core_rst` | out | lockstep reset request to both cores |
| `ahbo` / `ahbi` | out / in | lockstep master output to the bus, bus input |
| `ram_en`, `ram_we`, `ram_addr`, `ram_din` [2] | in | each core's syncram port |
| `ram_dout[2]` | out | each core's syncram read data, with faults applied |
| `mismatch`, `inject[1:0]`, `gpreg` | out | status: mismatch, mask written per core, register value |

One fault-injecting syncram per core stands in for all of a core's RAMs. In
a full processor, every syncram instance of a core gets the same `testin`
slice.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ft_pkg.sv tb/ls_fi_top_tb.sv --top-module ls_fi_top_tb -o sim
./obj_dir/sim
```

Replace `ls_fi_top_tb` with `pf_ram_tb`, `fi_ctrl_tb`, `syncram_fi_tb`,
`grgpreg_tb` or `ls_compare_tb` for a single block. `ls_fi_top_tb` runs the
top at its default parameters, with two `core_model` instances
(`tb/core_model.sv`) as stand-in cores. Each core model fills its memory
through its syncram port after reset, then scans it, emitting an AHB write
per word that carries the word and a running sum. The testbench:

1. checks a clean pass and the bus data against the fill pattern;
2. sets core A's mask and write signal and resets the cores. The refill
   plants the fault. The first corrupted read gives a mismatch, a blocked
   bus, the saved input to both cores and a core reset. With the write
   signal held the fault is re-planted on every refill and mismatches
   repeat;
3. clears the register, after which the refill cleans the error RAM and a
   full pass completes without a mismatch;
4. repeats 2-3 for core B through its own slice;
5. checks that a mask without the write signal injects nothing, and that the
   core reset leaves the register unchanged;
6. plants the same mask in both cores. The outputs agree, no mismatch is
   raised, and the corrupted data reaches the bus.

It counts every mechanism and fails if any never occurred. It completes in
a few thousand cycles.

## Not included

* The processor cores, the AHB and APB controllers, the debug unit and JTAG
  link, the console UART and the memory controller. These are external IP;
  only their connections appear here.
* The full triple-modular-redundancy build and on-demand redundancy grouping
  are not included. The study compared against the former and rejected the
  latter. The TMR build was produced by a synthesis-tool attribute, not by
  RTL.
* An early LFSR-based mask generator that the register later replaced.
* ECC in the memories. The injection works on unprotected RAMs.
