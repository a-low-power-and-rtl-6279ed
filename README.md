# LP-SB: a low-power SubBytes accelerator for a hardware/software AES-128 encoder

In software, AES-128 encryption spends most of its time in SubBytes. SubBytes
replaces each of the 16 state bytes with its entry in the 256-entry S-Box
table. This design moves only that step into hardware. A processor keeps the
rest of the cipher in software: key expansion, AddRoundKey, ShiftRows and
MixColumns. In each of the ten rounds it hands the 128-bit state to an
accelerator, which substitutes all 16 bytes in a single clock cycle.

The accelerator waits on the processor almost all the time. Its power
therefore goes mostly into switching it did not need to do. Two techniques
target that:

* **Operand isolation.** Each byte cell ANDs its input with the enable.
  While the processor rewrites the state, the adder and the S-Box read logic
  see a constant zero.
* **Clock gating.** The output registers are clocked only in the one cycle
  when a result is wanted.

This RTL follows the published LP-SB co-design: *A Low-Power and
Performance-Efficient Co-design Implementation of AES Encoder*. That design
used a Nios II soft core on a Cyclone III FPGA. Where the publication leaves
a detail open, this RTL fills it in, and the section "What is this design's
own" lists each such choice.

## Block structure

```
             processor (software AES: ExpKey, AddRoundKey, ShiftRows, MixColumns)
                    |  32-bit memory-mapped bus (avs_*)
   aes_codesign_top |
   +----------------v-----------------------------------------------+
   | sb_bus_slave   BLOCK_IN[4] BLOCK_OUT[4] CTRL STATUS            |
   |        sb_enable | sb_block_in (128)    ^ sb_block_out, sb_done |
   | lp_sb_accel      v                      |                      |
   |   lp_sb[0..15]  (one per byte) ----addr/data---- sbox_rom       |
   |     each: AND isolation, 16*hi + lo, clock_gate, output reg    |
   +----------------------------------------------------------------+
```

| File | Module | Role |
|---|---|---|
| `rtl/aes_pkg.sv` | package | block and byte types, `AES_BLOCK_BYTES = 16`, `SBOX_DEPTH = 256` |
| `rtl/sbox_rom.sv` | `sbox_rom` | the S-Box as a 256 x 8 ROM with `NPORTS` combinational read ports |
| `rtl/clock_gate.sv` | `clock_gate` | latch-based clock gate |
| `rtl/lp_sb.sv` | `lp_sb` | one byte cell: isolation, address computation, gated output register |
| `rtl/lp_sb_accel.sv` | `lp_sb_accel` | `N` = 16 cells sharing one `sbox_rom`, plus the `done` pulse |
| `rtl/sb_bus_slave.sv` | `sb_bus_slave` | memory-mapped registers between processor and accelerator |
| `rtl/aes_codesign_top.sv` | `aes_codesign_top` | top: slave plus accelerator; the bus is its port list |

## The byte cell (`lp_sb`)

The S-Box is stored with contiguous addresses. The entry in row `r` and
column `c` of the usual 16 x 16 table is at address `16*r + c`. The row is
the high nibble of the byte and the column is the low nibble. The cell
computes the address the way a nibble-indexed table lookup does:

```
din_iso  = din & {8{enable}}                 // operand isolation
rom_addr = (din_iso[7:4] << 4) + din_iso[3:0]
dout    <= rom_data   on the rising edge of gclk = gated(clk, enable)
```

Numerically, `rom_addr` equals `din_iso`. The shift and the add are kept
because they are the cell's structure, and a synthesis tool removes them
anyway.

The S-Box is not inside the cell. `rom_addr` leaves the cell and `rom_data`
comes back, so that all 16 cells can share one ROM. The enable drives two
things: the AND gate on all eight input bits, and the clock gate of the
output register. With the enable low, the cell's address is 0 and its
register receives no clock edge. `dout` therefore keeps the last result
however often `din` changes.

Timing of one operation:

```
clk        _/‾\_/‾\_/‾\_/‾\_
enable     ___/‾‾‾\_________      one cycle, din valid
rom_addr   000X din X000000
gclk       _______/‾\_______      only the edge that ends the enable cycle
dout       ======X S(din) ====    held until the next enable
done       _______/‾‾‾\_____      (lp_sb_accel) one cycle after enable
```

The output register has an asynchronous active-low reset to 0.

## The gate (`clock_gate`)

`gclk = clk & en_latched`, where the latch is transparent while `clk` is low.
The enable must therefore be settled before the rising edge. An enable change
during the high phase cannot start a pulse or cut one short. The latch is on
purpose, and lint tools and synthesis will report it as one. On an FPGA the
same function is normally a clock enable on the flip-flops or a clock-control
block, and it is simple to change to that: replace the gated-clock
`always_ff` in `lp_sb` with `if (enable) dout <= rom_data;` on `clk`. The cycle
behaviour stays the same.

## One S-Box for sixteen cells (`sbox_rom`)

All 16 cells read the same table in the same cycle. The single ROM therefore
has one combinational read port per cell (`NPORTS = 16`), and the whole
SubBytes of a block takes one cycle. The table is not stored as data. It is
computed at elaboration from the AES definition:

```
S(a) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63,
b    = a^254 in GF(2^8) mod x^8+x^4+x^3+x+1   (the inverse of a, 0 for a = 0)
```

Synthesis sees a constant 2048-bit vector indexed by the address. It can map
that to ROM or to logic.

## Processor interface (`sb_bus_slave`)

The slave is a 32-bit slave in the Avalon-MM style: `address` (word),
`write`, `writedata`, `read`, and `readdata`. `readdata` is combinational,
so there is no read latency, and the slave adds no wait states. `NW = N/4`
is the number of words in a block.

| word | name | access | content |
|---|---|---|---|
| 0..3 | BLOCK_IN | R/W | state to substitute; word 0 = bits 127:96 (state bytes 0..3) |
| 4..7 | BLOCK_OUT | R | substituted state, same layout |
| 8 | CTRL | W | bit 0 = 1 starts SubBytes; reads 0 |
| 9 | STATUS | R | bit 0 done (cleared by a start), bit 1 busy (enable high) |

The other words read 0. Writes to BLOCK_OUT and STATUS are ignored.

Byte `k` of the AES state (column-major, as in the AES standard) is
`block[127-8k -: 8]`. SubBytes works on each byte alone, so only the
software side depends on this order.

For each round, the processor's driver does this:

1. Write BLOCK_IN words 0 to 3.
2. Write 1 to CTRL.
3. Read STATUS until bit 0 is set.
4. Read BLOCK_OUT words 0 to 3.

The CTRL write at edge `t` raises `sb_enable` for one cycle. The accelerator
stores its result at edge `t+1`. From that point STATUS.done reads 1 and
BLOCK_OUT holds the result. A processor whose next bus access comes one cycle
later therefore finds the result ready on its first poll. The enable is low
in every other cycle, so in those cycles the accelerator is isolated and
gets no clock edges. BLOCK_IN may be rewritten in the enable cycle itself,
because the accelerator samples the old value at the same edge.

In the AES-128 simulations below, the accelerator traffic for one block is
10 calls x 10 bus accesses x 2 cycles = 200 bus cycles.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `N` | `aes_codesign_top`, `lp_sb_accel`, `sb_bus_slave` | 16 | byte cells, i.e. bytes per block. Must be a multiple of 4 for the bus slave. |
| `ADDR_W` | `aes_codesign_top`, `sb_bus_slave` | 4 | bus word-address width, `$clog2(2*N/4 + 2)` |
| `NPORTS` | `sbox_rom` | 16 | read ports, one per cell |

N = 16 and the single shared S-Box come from the published design. The bus
parameters are this design's own.

## What is this design's own

The publication describes the partition, the byte cell and the 16-cell
accelerator. The following choices are this RTL's own:

* **Processor link.** The publication connects the accelerator to the
  processor with a system-integration tool. It says only that an enable
  tells each side when the other has data ready. The bus protocol, the
  register map, the start/done handshake and polling (there is no
  interrupt) are choices made here.
* **Done timing.** `done` is the enable delayed by one clock.
* **ROM porting.** Sixteen simultaneous reads of one ROM need a
  sixteen-port ROM. The publication does not say how one shared ROM serves
  all cells in a single cycle.
* **Clock gate circuit.** A latch-based gate was chosen. The publication
  names clock gating but not the circuit.
* **Resets.** The resets are asynchronous, active low, and clear the
  outputs and status.

The following are left out:

* **The processor and its software.** They are not included. The
  testbenches play that role.
* **The BL-SB baseline.** This is the same accelerator without isolation
  and gating, and the publication uses it only for power comparison.
  Removing the AND and the clock gate from `lp_sb` gives it.
* **Measured results.** The published results came from an FPGA build and
  gate-level simulation and cannot be reproduced by RTL simulation. They
  are a dynamic-power reduction of about 13%, a maximum frequency of
  115 MHz against 100 MHz for the baseline, and an overall speed-up of
  about 44 times over software-only AES.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>`.
`tb/aes_ref_pkg.sv` is the software side. It implements key expansion,
ShiftRows, MixColumns and a full reference encryption. It computes its own
S-Box by a different route: a brute-force search for the inverse and the
bitwise form of the affine map.

| Testbench | What it checks |
|---|---|
| `tb_sbox_rom` | all 256 entries on all 16 ports, plus published S-Box entries |
| `tb_clock_gate` | gated edges exactly in enabled cycles; no pulse started or cut by an enable change while `clk` is high |
| `tb_lp_sb` | every byte value: address, result one cycle after enable, address 0 while idle, output held while idle, reset |
| `tb_lp_sb_accel` | the FIPS-197 round-1 SubBytes example and 200 random blocks; one-cycle latency, `done`, hold while idle |
| `tb_sb_bus_slave` | register map, single-cycle enable pulse, done/busy bits, read-only and unmapped words |
| `tb_aes_codesign_top` | full encryptions of the FIPS-197 vectors and random blocks through the bus, at default parameters. It checks 10 accelerator calls per block, the two-cycle start-to-result timing, the done/busy handshake, and BLOCK_OUT holding while new input sits in BLOCK_IN with the enable low (isolation and gating) |
| `tb_aes_workload` | runs of 1, 1,000 and 10,000 blocks (110,010 accelerator calls), each ciphertext checked against the software-only encryption |

To run one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_codesign_top.sv \
    --top-module tb_aes_codesign_top
./obj_dir/Vtb_aes_codesign_top
```

Replace the testbench file and top module to run another. The 10,000-block
workload takes a few seconds.
