# PCI/MC68000 bus emulation bridge

The bridge is a PCI add-in card. With it a PC can stand in for the processor
of a small MC68000-based controller. The PC sits where the CPU board used to
be and drives the controller's own bus, with its memory, MC68000 peripherals,
slow 6800-style peripherals and interrupt lines. The reference target is a
robot-arm controller with a 64 KB address space and a 16-bit data bus.

The central idea is a block-transfer bus emulator. Software does not touch the
MC68000 bus one cycle at a time. Instead it:

1. loads a list of MC68000 addresses into the bridge;
2. gives the bridge a PC memory buffer and a word count;
3. writes the transfer direction.

The bridge then runs every MC68000 read or write cycle by itself. It also acts
as a PCI bus master and moves the whole block to or from PC memory in burst
transactions. When it is done it raises a PCI interrupt. This is what makes
the bridge faster than a plain programmed-I/O interface. On the PCI side a
word costs a fraction of a bus clock, and the MC68000 cycles run back to back
without any software in between.

```
             PCI (33 MHz, 32 bit)                       MC68000 bus (8 MHz, 16 bit)
  +-----------------------------------------------------------------------------+
  |  pci_decoder ---- config_space           control register (READ)            |
  |       |                                  reset register  --> #RESET68       |
  |       +--> user registers (16-byte I/O)  interrupt control <-- #IPL2..0     |
  |                                                  |                          |
  |   address memory (FIFO) -------------------------+-----> A15..A1            |
  |   data memory (FIFO)  <==== AD[31:0]             |  <==> D15..D0            |
  |   address counter + page register --> PCI address|                          |
  |   access counter, latency counter, parity        |                          |
  |                                                  |                          |
  |   control_unit (PCI master, block sequencing) <--sync--> m68k_bus_machine   |
  +-----------------------------------------------------------------------------+
```

The design is written in SystemVerilog. It has one module per file in `rtl/`
and a self-checking testbench for each module in `tb/`.

## Programming model

The bridge answers PCI configuration cycles (type 0, function 0). It also
decodes a 16-byte I/O window, which is placed by Base Address Register 0.
Byte *n* of the window is register P*n*:

| byte | write | read |
|------|-------|------|
| 0-1  | MC68000 address, first word of a pair | - |
| 2-3  | MC68000 address, second word of a pair | - |
| 4-5  | PC buffer address, bits 15:0 | - |
| 6    | PC buffer address, bits 23:16 (page) | - |
| 7    | bit 0: level of #RESET68 (0 = held in reset) | clears the end-of-block interrupt |
| 8-9  | number of 16-bit words in the block | current count |
| 10   | control register; bit 0 = READ. **Writing starts the transfer** | IRQ status: bit 0 target IRQ, bit 1 end of block |
| 11   | interrupt control: bit 0 = enable target interrupts | bit 0 enable, bits 3:1 current target IPL level |

Writing one double word at offset 0 stores two MC68000 word addresses, one in
each half of a single FIFO entry. After PCI reset the bridge holds #RESET68
low. Software must write 1 to bit 0 of byte 7 before the target can run.

A transfer goes like this:

1. Write the word count to bytes 8-9.
2. Write the PC buffer address to bytes 4-6. The buffer must lie in the first
   16 MB, and each transfer stays inside one 64 KB page.
3. Write the MC68000 addresses to bytes 0-3, two per double word, in transfer
   order.
4. For a PC-to-MC68000 block, no data is written to the bridge. The bridge
   fetches the data from PC memory itself.
5. Write READ to byte 10:
   - READ = 1 means MC68000 to PC: the bridge reads the target, then writes PC
     memory.
   - READ = 0 means PC to MC68000: the bridge reads PC memory, then writes the
     target.
6. Wait for #INTA. Read byte 10 to find the cause. On end of block, read byte
   7 to clear the interrupt.

In PC memory the data of word *k* of the block sits at byte offset 2*k*. A
block that exceeds the FIFO size (`FIFO_DEPTH` double words, 256 words by
default) must be split by software.

## The control unit (`control_unit.sv`)

This is the hardest part of the design. It is a single Moore machine with 18
states. Besides sequencing the block, it is a full PCI burst master that copes
with every way a PCI target or the arbiter can cut a burst short. The state
letters below are the ones used in the code.

**Sequencing.**
- A idles until the control register is written. B reloads the word counter
  from its programmed value.
- READ = 1:
  - C/D loop once per word. C starts an MC68000 cycle (`iow4s`) and waits for
    the bus machine to assert #AS. D waits for `ad0`, the end-of-cycle flag,
    and then decrements the word count.
  - When the count reaches zero, F reloads the counter and the master part
    runs.
- READ = 0:
  - The master part runs first.
  - N2 reloads the counter, and the C/D loop then runs the MC68000 write
    cycles.
- E raises the end-of-block interrupt (IRQB) and clears both FIFOs. It stays
  there until software reads the clear register, and then returns to A.

**PCI master.**
- G requests the bus (#REQ) and loads the latency counter from the Latency
  Timer register.
- The bridge waits for its grant and for an idle bus, meaning FRAME and IRDY
  are both high.
- H is the address phase, using the memory write (0111) or memory read (0110)
  command.
- A read goes through turnaround state I.
- After H (write) or I (read), the machine goes to J if only one double word
  is left, so a one-double-word block is a single data phase with FRAME
  already high. Otherwise it goes to L.
- Data phases then run in one of four states:

| state | FRAME | used when |
|-------|-------|-----------|
| L | low | normal data phases of a burst |
| J | high | the last data phase. Entered when the word counter says one double word (1 or 2 words) is left. |
| O | low | the latency counter has expired but GNT is still ours. The burst goes on until GNT is taken away. |
| P | high | the one extra data phase allowed after time-slice expiry and loss of GNT |

**Terminations.** The decision is made from STOP, DEVSEL and TRDY in each data
state:
- **Normal** (TRDY low, STOP high): one double word moves. The machine stays
  in its data state or goes on to J, O or P.
- **Any STOP in L, O or P**: with TRDY low (disconnect A/B) the current double
  word still moves; with TRDY high (retry, disconnect C) nothing moves. In
  both cases K drops IRDY and Q releases the bus for a clock. G then
  re-requests the bus and starts a new transaction at the current address.
- **In J**: a retry also goes through K, Q and G, since the last double word
  has not moved yet. A disconnect A/B in J has moved it, so M and then N end
  the block as a normal completion would.
- **Target abort** (DEVSEL high with STOP) is not handled. The PC memory is
  assumed never to abort.

When the block ends, N releases FRAME and IRDY. It goes on to E (READ = 1) or
to N2 (READ = 0). Every restart sends the address counter's current value, so
a burst cut anywhere resumes at the right double word.

Two flags from the word counter drive the burst length:
- `zcont`: the block is finished.
- `ultransf`: the next double word is the last.

Both are computed from the counter value *after* the current clock's
decrement. The machine can therefore choose between L and J in the same clock
in which a data phase completes. This look-ahead is a choice of this
implementation. The original state diagram decides on "one or two words left" but does
not say whether the count before or after the decrement is meant.

Outputs are the standard PCI master phase flags:
- `iaddrph`: address phase.
- `idataph`: data phase.
- `itac`: turnaround.
- `ists`: sustained tri-state, the one clock of driving FRAME/IRDY high
  before release.

The top module derives the output enables from them:
- FRAME/IRDY: `m_oe`.
- C/#BE: `cbe_oe`.
- AD: `ad_oe`, which covers the address phase and write data.

`xfer` flags a completed data phase. `m68_step` flags the end of an MC68000
cycle.

## The PCI target decoder (`pci_decoder.sv`)

The decoder is a four-state machine, A to D. It serves configuration and I/O
accesses with one data phase each:

- **A** registers AD, C/#BE and IDSEL in the first clock of FRAME low.
- **Decode** happens in the next clock, from the registered values:
  - A configuration access needs IDSEL, AD[1:0] = 00 (type 0) and
    AD[10:8] = 000 (function 0).
  - An I/O access needs the I/O enable bit and AD[31:4] equal to BAR0.
- **Writes** are answered in A: DEVSEL and TRDY are driven together. The
  register strobe (`io_wr` or `cfg_wr`) fires in the clock in which IRDY and
  TRDY are both low. Only the enabled bytes are written.
- **Reads** take one more clock (B) because of the turnaround. The register
  double word is always returned whole, whatever the byte enables.
- **Bursts**: if the initiator keeps FRAME low for a second data phase, C
  signals disconnect C (STOP and DEVSEL low, TRDY high) until the master ends
  the transaction. Only the first data phase takes effect.
- **D** is the sustained tri-state clock, in which the target signals are
  driven high before release.

## MC68000 bus emulation (`m68k_bus_machine.sv`)

The bus machine runs on its own 8 MHz clock. It starts one cycle on each rising
edge of `iow4s` and reports the end with `ad0`.

- **Asynchronous cycle**:
  - S0 puts the address out. The top drives A15..A1 from the head of the
    address FIFO, which is stable for the whole cycle.
  - In S1 and S2 #AS and #UDS/#LDS are low.
  - S2 waits for #DTACK, accepting any number of wait states. It latches the
    read data when #DTACK arrives.
  - S3 releases the strobes and sets `ad0`.
  - With no wait states #AS is low for 2 clocks and the cycle takes 4 clocks.
- **Synchronous (6800) cycle**: if #VPA comes instead of #DTACK, the machine
  follows the E clock. E is the clock divided by ten: high for 4 clocks, low
  for 6.
  - V1 asserts #VMA and waits for the clock before E rises.
  - V2 holds the cycle to the end of the E high phase and latches data there.
- **Writes** drive R/#W low and the data bus for the whole cycle.
- **Byte cycles**: `word = 0` selects them through `a0`. The top always runs
  word cycles.

**Clock crossing.** The control unit and the bus machine run on unrelated
clocks:
- `iow4s` goes into the 8 MHz domain through two flip-flops.
- #AS and `ad0` come back the same way (`sync2.sv`).

Address, data and direction are all set up before `iow4s` rises. They stay
unchanged until `ad0` has been seen, so only the three handshake lines need
synchronising. The price is a round trip of several clocks between cycles.
Back-to-back MC68000 cycles are therefore slower here than the ideal 4 clocks
per word.

## Data path (`pci_m68k_bridge.sv`)

- **Address memory and data memory** are two instances of `bridge_fifo`: 32
  bits wide, `FIFO_DEPTH` entries, show-ahead (the head is valid without a
  read strobe).
  - The address memory receives one entry per I/O write to offset 0, with
    disabled bytes stored as zero.
  - For the data memory, two MC68000 words make one double word. The first
    word goes in bits 15:0.
  - With READ = 1, the second word of a pair, or the last word of an odd
    block, pushes the double word. PCI data phases pop it.
  - With READ = 0, PCI data phases push and the second MC68000 word pops.
- **Access counter** (`access_counter.sv`): a 16-bit down counter of words
  with a load register.
  - It counts down one per MC68000 cycle and two per PCI double word,
    saturating at zero.
  - It produces `zcont` and `ultransf`.
- **Address counter** (`address_counter.sv`):
  - The 16 low bits of the PC address step by 4 per double word and wrap
    inside their page.
  - The page register supplies bits 23:16. Bits 31:24 are zero.
- **Latency counter** (`latency_counter.sv`): 8 bits. It is loaded from the
  Latency Timer and counts down while the bridge owns the bus.
- **Parity generator** (`parity_generator.sv`): even parity over AD and
  C/#BE, one clock after the bridge drove them. This covers the address
  phases and write data of its own transactions, and read data it returns
  as a target.
- **Byte enables**: all four on memory transactions, except the last double
  word of an odd-length block, which goes out as C/#BE = 1100 (low word
  only).
- **Interrupts** (`interrupt_control.sv`): #INTA is pulled low when either
  source is active:
  - IRQA: the target's #IPL lines show a level other than 0 and bit 0 of the
    interrupt control register is set.
  - IRQB: end of block.

  There is no interrupt-acknowledge cycle on the MC68000 side. The PC reads
  the level and serves the target device in software.
- **Reset**: the reset register (`reset_register.sv`) resets to "asserted".
  Its output, ANDed with PCI #RST, does three things:
  - resets the control register, the interrupt mask and the bus machine;
  - is driven out as #RESET68.

  The FIFOs are reset by PCI #RST and cleared in state E.

## Configuration header (`config_space.sv`)

| field | value |
|-------|-------|
| vendor / device ID | 0001h / 0001h |
| command | bit 2 (bus master) always 1; bit 0 (I/O enable) writable |
| status | 0200h (medium DEVSEL timing) |
| class code | 068000h (other bridge device) |
| revision | 01h |
| header type | 00h |
| Latency Timer | writable, 8 bits |
| BAR0 | 16-byte I/O space, bits 31:4 writable, bit 0 = 1 |
| Interrupt Line | writable |
| Interrupt Pin | 01h (#INTA) |
| Min_Gnt / Max_Lat | FFh / 01h |

All other registers read as zero.

## How far it follows the original design, and where it departs

The following come from the published bridge and are implemented as
described:
- the register map;
- the block structure;
- the decoder and control-unit state diagrams and their branch conditions;
- the configuration values;
- the division of work between the PCI-side and MC68000-side machines.

The bridge's original description gives only the outside of the MC68000 bus
machine, plus the FIFOs and counters by function. Everything else below is
this implementation's own:

- **FIFO depth**: 128 double words, set by the parameter `FIFO_DEPTH`. The
  original leaves the size open.
- **Bit assignments** inside registers 7, 10 and 11.
- **Count read-back**: reading bytes 8-9 returns the live count.
- **Two clock domains with synchronisers**: each MC68000 cycle itself is 4
  clocks, but consecutive cycles start 7 clocks of 8 MHz apart (about 29 PCI
  clocks per word), not 4 as the original's timing analysis assumes. That
  analysis predicts 43 PCI clocks per word for long blocks on a busy PC bus;
  on an idle bus this implementation measures 29-30 PCI clocks per word, so
  the difference shows only when bus latency is small.
- **Decoder**:
  - Register writes take effect in the completing data phase clock.
  - The BAR match also needs the I/O enable bit.
- **Counters**:
  - The access-counter flags are look-ahead.
  - The address counter wraps inside its 64 KB page.
- **Odd-length blocks**: the last double word is sent with only the low byte
  lanes enabled.
- **Left out**:
  - The bus machine's CBA input, whose function is not described.
  - Interrupt-acknowledge cycles.
  - Target abort.
  - Byte-wide MC68000 transfers from the top level.
- **No overflow guard**: nothing stops software from loading more than
  `FIFO_DEPTH` entries. Extra pushes are dropped.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each testbench computes its
expected values independently, counts checks and failures, prints
`TB_RESULT checks=N failures=M`, and has a watchdog.

`tb_pci_m68k_bridge` runs the whole bridge at its default parameters. It
surrounds the bridge with models of:
- the PC's host bridge (configuration and I/O initiator);
- PC memory, which can add wait states, retry at cache-line starts and
  disconnect at cache-line ends;
- an arbiter with a second master that takes the grant away;
- an MC68000 system with random #DTACK delays, 6800-style peripherals at
  F000h-FFFFh and #IPL lines.

It runs blocks of 1 to 256 words in both directions. It checks every data word
and the parity on every clock in which the bridge drives PAR. It also counts
each mechanism and fails if any never happened:
- retry;
- disconnect in mid-burst and on the last phase;
- time-slice end with and without GNT;
- turnaround;
- re-arbitration;
- synchronous cycles;
- MC68000 and PCI wait states;
- odd block ends;
- both interrupt sources;
- disconnect C on a burst to the I/O window;
- parity.

The full run simulates about 0.6 ms and reports 553 checks and 0 failures.

`tb_block_timing` checks cycle counts under ideal conditions: no wait states
and a bus parked on the bridge. It moves blocks of 10 and 256 words from the
MC68000 system to the PC and checks four things:
- every #AS pulse lasts 2 clocks;
- the control unit spends one clock in F;
- the PCI part of the transfer takes exactly 1 + D + 1 clocks for D double
  words;
- each disconnect or retry adds the expected clocks:
  - 4 for a mid-burst disconnect (IRDY hold, release, request, new address
    phase);
  - 5 for a retry;
  - 1 for a disconnect on the last data phase.

A 256-word block with a retry and a disconnect in every 8-double-word cache
line takes 271 PCI clocks of PCI time. The whole transfer takes about 7700 PCI
clocks, because the MC68000 phase dominates.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/bridge_pkg.sv tb/tb_pci_m68k_bridge.sv --top-module tb_pci_m68k_bridge
./obj_dir/Vtb_pci_m68k_bridge
```

Use the same command with another `tb_*` name for a single block. Each
testbench depends only on the files in `rtl/` and `tb/`.
