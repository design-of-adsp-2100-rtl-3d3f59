# A linear array of ADSP-2100 processing elements for a PC-AT host

Fixed-point DSP chips compute fast, but they have no parallel I/O ports for talking to
one another. This array gives each ADSP-2100 memory-mapped FIFO ports instead. Up to
eight processing elements (PEs) sit in a row behind a PC-AT plug-in card, and three
channels join them:

* **Global (broadcast) channel.** The host bus is fanned out to every PE. While the
  processors have granted their buses, the host can write program and data into one
  PE, or into all of them at once, and read results back.
* **X channel.** Raw data flows in one direction. The host writes into the input FIFO of
  the first PE, and each PE passes words on to the next. The last PE's output goes
  nowhere.
* **Y channel.** Partial results flow both ways between neighbours, through a forward
  and a backward FIFO. The channel is closed into a ring from the last PE back to the
  first, so results can go round the array as many times as an algorithm needs.

The key idea is the **single-cycle multiple-destination (SCMD) transfer**. An ADSP-2100
instruction moves one word, so taking an X word, keeping a copy, and passing it on would
cost three cycles. In this design, extra address decoding turns one memory access into
several strobes in the same cycle. A read from a given address range, for example,
fetches the next X word into the processor, writes it into a local memory (DMT), and
pushes it into the next PE's FIFO. The high address bits of each access choose which
combination happens.

This RTL models the whole board set as synchronous logic on one master clock. That covers
the host interface card, the backplane wiring and the PE cards with their memories,
FIFOs, decoders and flow control. The ADSP-2100 processors are not included. Their pins
are ports of the top module (`proc_*`, one array element per PE), to be driven by a
processor model or a real core.

## Module map

| Module | Role |
|---|---|
| `adsp_array` | Top. Host interface plus `N_PE` PE cards, with the X chain, Y ring and daisy chains. |
| `adsp_array_pkg` | Port numbers, control/status bit positions, control words, SCMD slot encodings. |
| `host_interface` | PC-AT card: `io_port_select`, `control_register`, `status_register`, `ffh_irq_latch`, `master_cs`. |
| `reset_gen` | Registered AND of the host reset bit and the power-on reset. |
| `pe_card` | One PE: memories, FIFOs, the decoders and flow control below, plus bus multiplexers. |
| `pe_global_if` | Host-side chip selects of a PE's memories, PE select/broadcast, grant/trap/MEMCS16# chains. |
| `epldx`, `epldy` | SCMD decoders for the DM side (X channel) and the PM data side (Y channel). |
| `xflow_ctrl` | X-channel hardware flow control: DMACK wait states. |
| `yflow_ctrl` | Y-channel flow control: processor interrupts plus a flag word (INTBUF). |
| `fifo` | 1K-word FIFO with empty/full flags and retransmit (the board uses 1K x 9 FIFO chips in pairs). |
| `sram` | Word-wide static RAM with per-byte write enables (DM, DMT, PMDM, PMT, PM). |

## Host interface

The card decodes three I/O ports (SA9..0 with AEN low):

| Port | Use |
|---|---|
| 300H | Write-only. 16-bit write into the X FIFO of PE 0. Selecting it asserts IOCS16#. |
| 301H | Control register (8 bits, write). |
| 302H | Status register (read). |

Control register bits:

| Bit | Name | Meaning |
|---|---|---|
| 0 | HRS# | Reset all processors and FIFOs (low = reset). |
| 1 | HBR# | Bus request to every processor (low = request). |
| 2..4 | PESL, PESM, PESU | Number of the PE the host accesses (0..7). |
| 5 | BC# | Broadcast: low selects every PE, and PES is ignored. |
| 6 | HLT# | HALT# to every processor. |
| 7 | MS | Memory select: picks between the two host memory maps below. |

The usual control words are `61H` (bus request), `62H` (bus request and reset), `63H`
(run) and `23H` (halt). The register resets to `63H`.

Status register bits: bit 0 is BGH# (every PE has granted its bus), bit 1 is TRAPH
(every PE has executed TRAP), and bit 2 is FFH# (PE 0's X FIFO is full). Bits 7..3 read 0.

**Full-flag interrupt.** FFH# is sampled at the rising edge of each host I/O write and
drives `irq` (active high). Once the first FIFO fills, the host's next I/O write raises
the interrupt, so the host can either poll bit 2 or wait in an interrupt routine.

**Memory window.** Two 4-bit comparators match SA19..16 and AEN against DIP switches
(`dip[3:0]` and `dip[4]`). Their result, MCS#, replaces AEN on the broadcast bus. The PEs
therefore answer only inside one 64 KB host segment, of which they use 16 KB. The
testbenches use segment A0000H.

## Host memory map of a PE

Each PE holds four memories:

* PM: 8K x 24, program.
* PMDM: 2K x 16, data on the PM side.
* DM: 2K x 16, data on the DM side.
* PMT and DMT: 2K x 16 each, used only by SCMD transfers.

Together PM, PMDM and DM need 32 KB of host space. The MS bit halves this to 16 KB:

| MS | Offset | Memory | Transfer |
|---|---|---|---|
| 0 | 0000–3FFF | PM upper byte (PMD23..16) at even addresses; middle byte (PMD15..8) at odd addresses, enabled by SBHE#. PM word = offset/2. | 16-bit (MEMCS16#) |
| 1 | 0000–1FFF | PM lower byte (PMD7..0). PM word = offset. | 8-bit, on SD7..0 |
| 1 | 2000–2FFF | PMDM. Low byte at even addresses, high byte at odd (SBHE#). | 16-bit (MEMCS16#) |
| 1 | 3000–3FFF | DM. Same byte layout as PMDM. | 16-bit (MEMCS16#) |

An access reaches a PE only when both of these hold:

* the PE's processor has granted its bus (BG# low);
* BC# is low, or PES equals the PE's number.

MEMCS16# is the AND of every PE's word-wide chip selects. It is passed from the last PE to
the first, like the other chains.

While a processor grants its bus, its memories take their addresses from the host bus,
and its own strobes are ignored.

## SCMD transfers: the processor's view

From the processor side, DM and PMDM occupy the first 2K words of their address spaces. PM
(the instruction part) sits at PMA12..0 with PMDA low. Address bits 13..11 of a data
access choose a *slot*, and each slot is a fixed combination of strobes. In the DMT and
PMT slots, address bits 10..0 address DMT or PMT.

**X channel (DM side, decoded by `epldx`).** Here XF1 is this PE's input FIFO and XF2 is
the next PE's.

| DMA13..11 | Read | Write |
|---|---|---|
| 0 | DM → processor | processor → DM |
| 1 | no operation | processor → XF2 |
| 2 | DMT → processor | processor → DMT |
| 3 | DMT → processor and XF2 | processor → DMT and XF2 |
| 4 | XF1 → processor | no operation |
| 5 | XF1 → processor and XF2 | no operation |
| 6 | XF1 → processor and DMT | no operation |
| 7 | XF1 → processor, DMT and XF2 | retransmit XF1 |

**Y channel (PM data side with PMDA high, decoded by `epldy`).** YF1 is this PE's forward
input FIFO, and YF1D its backward output FIFO. YF2 and YF2D are the matching FIFOs of the
PE to the right. 16-bit Y data travels on PMD23..8.

| PMA13..11 | Read | Write |
|---|---|---|
| 0 | PMDM → processor | processor → PMDM |
| 1 | YF2D → processor | processor → YF2 |
| 2 | PMT → processor | processor → PMT |
| 3 | YF2D → processor and PMT | processor → PMT and YF2 |
| 4 | YF1 → processor | processor → YF1D |
| 5 | no operation | no operation |
| 6 | YF1 → processor and PMT | processor → YF1D and PMT |
| 7 | INTBUF (flag word) → processor | no operation |

Inside `pe_card`, the board's shared DMD and PMD buses are multiplexers. On a read, the
decoder strobe picks the source, and that one value goes to the processor, the
local-memory write port and the next PE's FIFO all at once. That shared value is what
makes "XF1 → processor, DMT and XF2" a single cycle. An input and an output cannot share
one cycle on the same bus, just as on the board.

## Run-time flow control

**X channel: wait states.** The read of XF1 and the write of XF2 are passed through
`xflow_ctrl`. If XF1 is empty (on a read) or XF2 is full (on a write), DMACK goes low,
so the processor stays in its wait state, and both strobes are held back. This holds for
the combined read-and-forward slots as well: if either FIFO is not ready, both strobes
wait. When the flag clears, DMACK returns high and the strobes go out in the same cycle.
The FIFO flags are registered on the clock edge of the last valid access, so the next
access sees them immediately.

**Y channel: interrupts.** A read of an empty YF1 or YF2D, or a write to a full YF1D or
YF2, pulls one of the processor's four interrupt lines low for that cycle. The FIFO
ignores the access.

| Interrupt | Cause |
|---|---|
| IRQ0# | Read of an empty YF1 |
| IRQ1# | Write to a full YF1D |
| IRQ2# | Read of an empty YF2D |
| IRQ3# | Write to a full YF2 |

The interrupt routine reads the flag word from slot 7 (INTBUF). PMD11..8 hold
{FFYF2#, EFYF2D#, FFYF1D#, EFYF1#}. The routine polls until the flag clears, then repeats
the aborted access.

The ADSP-2100 executes two more instructions before it takes an interrupt. Software must
therefore follow each Y access with a NOP, or repeat two instructions in the routine.
This is a software rule; the hardware does not enforce it.

**Retransmit.** A write in X slot 7 returns XF1's read pointer to the first word written
since reset, so a block of input can be read again.

## Daisy chains and reset

Three signals run from the last PE to the first:

* **Bus grant.** BGHO# = own BG# OR BGHI# (the value from the PE to the right). The
  first PE's output is the host's BGH#.
* **Trap.** HTRAPO = own TRAP AND HTRAPI. The first PE's output is TRAPH.
* **MEMCS16#.** Described under the memory map.

RESET# to the processors and FIFOs is HRS# AND `por_n`, registered on the master clock.
HALT# comes straight from HLT#. BR# comes straight from HBR#.

## Operating sequence

This sequence is what `tb_adsp_array` does:

1. Write `61H`. Poll the status register until BGH# is 0.
2. Load the upper and middle PM bytes with MS = 0. Then load the lower PM bytes, PMDM and
   DM with MS = 1. For each load, set BC# for a broadcast or PES for a single PE.
3. Write `62H`, then `63H`. The PEs leave reset and run.
4. Feed raw data into port 300H. Before each write, check FFH#, or rely on the interrupt.
5. Poll TRAPH. Then write `61H` again, wait for BGH#, and read the results from DM and
   PMDM of each PE.
6. Write `23H` to halt all processors.

## Parameters

| Module | Parameter | Default |
|---|---|---|
| `adsp_array` | `N_PE` | 8 |
| `pe_card` | `DM_WORDS` | 2048 (used for DM, DMT, PMDM and PMT) |
| `pe_card` | `PM_WORDS` | 8192 |
| `pe_card` | `FIFO_DEPTH` | 1024 |
| `pe_card` | `PE_ID` | Set by the top from the slot number (0 = nearest the host). |

All defaults are the board's own sizes. At the default size the array synthesizes to
about 3 Mbit of memory and a few hundred flip-flops.

## Where this model departs from the board

* **One clock.** The board latches FIFO flags on CLKOUT edges in separate flip-flops, and
  its strobes are asynchronous. Here everything runs on one clock, and the FIFOs'
  registered flags take the place of the flag latches. Timing is therefore
  cycle-accurate to this model, not to the board's nanosecond waveforms.
* **Processors, host PC, bus buffers, connectors, oscillators and the RC power-on network
  are not modelled.** Tri-state buffers become output enables. Host read data from all
  PEs are ORed together, and only the selected PE drives its share. Each PE card's local
  clock, and the clock ORing, are left out.
* **Byte order of DM and PMDM.** One description of the board puts the high byte at even
  addresses. The chip-select logic of the board enables the low-byte chip at even
  addresses. The model follows the chip-select logic.
* **The MS bit during loading.** One description of the loading sequence says MS returns to
  0 for the second phase. The memory map requires MS = 1 there, and that is what is used.
* **Choices where the board description is silent:**
  * the interrupt-line assignment and the INTBUF bit layout;
  * the reset value of the control register;
  * slot numbering from the host end;
  * interrupt polarity;
  * how the X FIFO write strobe is formed (IO1# AND IOW#).
* **The FIFO** is a behavioural equivalent of a 1K x 9 FIFO chip, not a copy of it.
  Retransmit rewinds to location 0. This gives the start of the stream back only while
  no more than 1024 words have been written since reset.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The unit testbenches mostly sweep
every input combination or use random stimulus, and compare against a model written
independently in the testbench. Three go further:

* `tb_pe_card` drives one PE through every SCMD slot, both flow-control mechanisms,
  retransmit, host loading and the chains.
* `tb_adsp_array` runs the full-size array (eight PEs, all defaults, no overrides). The
  host loads a program word and a constant by broadcast, and one column of a 16 x 8
  matrix B into each PE by PE select. It then streams a 65 x 16 matrix A (1040 words)
  through the X channel. PE 0 starts late, so the host finds the first FIFO full.
* Each PE in `tb_adsp_array` runs a bus-cycle model of its processor:
  1. It takes every element with one slot-7 read, which also stores it in DMT and
     forwards it.
  2. It forms `C[r][i] = scale * (A row r . B column i)` and sends it both ways on the Y
     channel.
  3. It collects its neighbours' results, handling the Y interrupts through INTBUF. The
     first PE receives its forward input over the ring wrap from the last.

  The last PE first rewinds its X FIFO with a retransmit. All PEs then trap, and the host
  reads back and checks all 1560 result words.

  The testbench also counts each mechanism: bus-grant waits, broadcast and selected
  writes, X stalls, FIFO-full polls, host interrupts, Y interrupts, INTBUF polls, ring
  traffic both ways, SCMD reads, retransmit, MEMCS16#, IOCS16#, trap, reset and halt. A
  mechanism that never happens counts as a failure.

* `tb_systolic_fir` runs the array in systolic mode at full size. A 16-tap FIR filter is
  spread over the eight PEs, two taps each:
  * Samples arrive on the X channel. Each PE keeps its own copy in DMT with the same
    slot-7 read that forwards the sample.
  * Partial sums travel forward on the Y channel.
  * After the last PE, the sums go round the ring to the first PE for a second pass.
  * The last PE stores the finished outputs in DM, where the host checks all 256 of
    them against a reference filter.

## Simulating

Use Verilator 5 with timing support. From the project root, for the full-size run:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/adsp_array_pkg.sv tb/tb_adsp_array.sv --top-module tb_adsp_array
./obj_dir/Vtb_adsp_array
```

Any other testbench builds the same way, with its own name in place of `tb_adsp_array`.
The full-size run takes a few seconds. Memories are not reset, so the testbenches
initialize whatever they read. They also pass with Verilator's random initialization
(`+verilator+rand+reset+2`).
