# Microcoded March-SS memory BIST with word-redundancy repair and successive-read protection

This design wraps an on-chip SRAM with three things:

1. A **built-in self-test (BIST)** controller that runs a March test from a small microcode
   store. The default program is **March-SS**, a test aimed at newer SRAM fault models:
   deceptive read-destructive faults, write-disturb faults and some dynamic faults. Older
   BIST sequencers can apply at most two operations per March element. March-SS needs five,
   so this controller spends one microword on each operation. That lets it run elements of
   any length.
2. A **built-in self-repair (BISR)** array of redundant words. Each read that fails during
   the test programs one of these words with the failing address and the correct data. In
   normal operation, the word then serves every access to that address.
3. A **reliability enhancement circuit (REC)**. In normal operation it stops the SRAM from
   reading the same cell twice in a row. A small resistive-open defect in a cell's pull-up
   may flip the cell only after k reads in a row. If no read is ever repeated, the cell
   keeps working correctly for longer as the defect grows with age.

The default size is a 1024 x 1 memory with 32 redundant words. That gives 12-bit
redundancy words: 1 flag bit, 10 address bits and 1 data bit.

## Microword format

Each memory operation of a March test is one 7-bit microword. Bit #1 is the most
significant bit. The type is `mbist_pkg::microword_t`.

| bit | field | meaning |
|-----|-------|---------|
| #1 | Valid | 1 = an operation; 0 = end of test |
| #2 | FO | first operation of a multi-operation element |
| #3 | IO | an in-between operation of a multi-operation element |
| #4 | LO | last operation of a multi-operation element |
| #5 | I/D | 1 = visit addresses in descending order, 0 = ascending |
| #6 | R/W | 1 = write, 0 = read |
| #7 | Data | 1 = all-ones pattern, 0 = all-zeros pattern (written, or expected on a read) |

If FO, IO and LO are all 0, the word is a single-operation element. At most one of the
three may be set. `instr_reg` checks this with an assertion.

### The March-SS program (22 words)

| element | operations | words (hex) |
|---|---|---|
| M0 ⇕ | w0 | 42 |
| M1 ⇑ | r0 r0 w0 r0 w1 | 60 50 52 50 4B |
| M2 ⇑ | r1 r1 w1 r1 w0 | 61 51 53 51 4A |
| M3 ⇓ | r0 r0 w0 r0 w1 | 64 54 56 54 4F |
| M4 ⇓ | r1 r1 w1 r1 w0 | 65 55 57 55 4E |
| M5 ⇕ | r0 | 44 |

After the last word, the store reads as all zeros, which ends the test. For the two
"any order" elements, the I/D bit is coded as 0 for M0 and 1 for M5. The controller follows
the bit. `mbist_pkg::march_ss_word()` builds these words from the element description
instead of storing a table.

### How the instruction pointer walks the program

The pointer is in `instr_ptr`. After each operation, it makes one of three moves:

- **Stay.** A single-operation element with addresses left keeps the same word.
- **Next.** FO and IO words always go to the next word. An element that has reached its
  last address also goes to the next word.
- **Jump back.** An LO word with addresses left returns to the element's first word. When
  the FO word ran, its pointer value was saved; the jump uses that value.

Each move also drives the address generator (`addr_gen`):

- On "stay" and "jump back", it steps one address in the current word's direction.
- When a new element starts, it loads address 0, or the top address if the new word's I/D
  bit is 1. The new word is read straight from the store, so the first address of the new
  element is ready on the first cycle of that element.

The "last address" flag is `addr == 0` when descending and `addr == 2**ADDR_W-1` when
ascending.

Every five-operation element therefore applies all five operations to one address, then
moves on to the next address. March-SS costs 22 operations per address.

## Test timing

```
start rises ─► pulse_gen ─► instr_ptr/instr_rom ─► instr_reg + addr_gen ─► test_collar ─► SRAM ─► fault_diag ─► redundancy_array
   cycle 0                     (pointer = 0)          cycle 1: op 1          cycle 2          cycle 3      cycle 4: fault pulse   programmed at cycle 5
```

- The design applies one operation per clock, with no gaps. This includes the jumps back
  and the changes of element.
- The test runs from the first clock edge that sees `start` high to `test_done`. That takes
  22 · 2^ADDR_W + 1 cycles: 22 529 at the default size. The testbenches check this count.
- The fault pulse for the last read comes 1 cycle after `test_done`, and the array is
  programmed 1 cycle later. Wait a few cycles before you leave test mode.
- `test_collar` registers the memory controls. In the same stage it spreads the Data bit
  across the whole data word, and it marks reads.
- The SRAM reads synchronously: data appears one cycle after the read.
- `fault_diag` delays the read strobe, the address and the expected data by one cycle to
  line up with that data. On a mismatch, it registers a one-cycle `fault` pulse together
  with `fault_addr` and the correct data (`fault_data`).

## Repair: redundancy words

The repair logic is in `redundancy_array`. Each word holds three fields:

- **FA:** the word is in use.
- **address:** the faulty address.
- **data:** the value that stands in for that cell.

The array has one bank of address comparators. In test mode they compare against the fault
address; in normal mode, against the user address.

**Test & repair mode** (`test_mode = 1`). Each fault pulse is handled as follows:

- If the address is already held, the pulse only refreshes that word's data. A bad cell
  fails many times during March-SS but uses only one word. When the test ends, the word
  holds the last expected value, which is 0 for March-SS.
- Otherwise, the address takes the next free word. Words fill in order.
- If no word is free, the sticky `overflow` flag is set: the memory cannot be repaired.
- `rl_full` shows that every word is in use. `rl_used` gives the count.

**Normal mode** (`test_mode = 0`). Every user address is compared with the words:

- **Write to a repaired address:** the data goes into the redundant word. The SRAM write is
  suppressed.
- **Read from a repaired address:** the hit flag and the word's data are registered. In the
  next cycle, the output multiplexer sends them to `mux_out` in place of the SRAM data.
- **Any other access** goes to the SRAM.
- `mem_out` is the raw SRAM output. On a repaired cell, `mem_out` can show the wrong value
  while `mux_out` is correct.

The array is cleared only by reset. A new test after reset starts with all words free.

## Successive-read protection (REC)

`srd` watches the SRAM's active-low CEN and WEN signals and its address. It has three
parts:

- **Address register and flag Y.** Both load on every read (CEN = 0, WEN = 1).
- **Comparator Z.** It compares the current address with the register.
- **SR = Y & WEN & Z.** SR is high when a read targets the same address as the previous
  read.

A write clears Y, because a read after a write is not a repeated read.

`rec` gates the SRAM chip enable:

- `enb = 0` (protection on): `cen_out_n = cen_n | SR`.
- `enb = 1`: `cen_out_n = cen_n`.

When a read is blocked, the SRAM stays idle. Its output still holds the data of the
previous read of the same address, which is correct.

In the top level, the REC sits between the input multiplexer and the SRAM. It is bypassed
in test mode, because March-SS needs back-to-back reads of one address (r0 r0, r1 r1). The
`sr_block` output pulses for every read it suppresses.

Example: reads of A1, A1, A2 with protection on. The SRAM performs the first and the third
read. On the second read it stays idle and keeps driving A1's data.

## Module map

| module | role |
|---|---|
| `mbisr_top` | the whole design |
| `mbist_ctrl` | BIST controller: `pulse_gen`, `instr_ptr`, `instr_rom`, `instr_reg`, `addr_gen`, `test_collar` |
| `pulse_gen` | one-cycle pulse on the rising edge of `start` |
| `instr_rom` | microcode store (March-SS by default) |
| `instr_reg` | instruction register and element-position decode |
| `instr_ptr` | instruction pointer / sequencer |
| `addr_gen` | up/down address counter |
| `test_collar` | R/W control and data control, registered memory operation |
| `input_mux` | memory port from test collar or from the user |
| `rec`, `srd` | reliability enhancement circuit and its successive read detector |
| `sram_sp` | single-port synchronous SRAM model (array), the memory under test |
| `fault_diag` | compares read data, emits fault pulse, address, correct data, count |
| `redundancy_array` | redundancy words and the output multiplexer |
| `mbist_pkg` | microword type, element-position enum, March-SS program |

### `mbisr_top` ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `test_mode` | in | 1 | 1 = test & repair, 0 = normal |
| `start` | in | 1 | rising edge starts the March test (in test mode) |
| `rec_enb` | in | 1 | 0 = successive-read protection on (normal mode) |
| `wr_ena`, `rd_ena` | in | 1 | normal-mode write / read request; a write wins if both are set |
| `addr_in`, `data_in` | in | ADDR_W, DATA_W | normal-mode address and write data |
| `mux_out` | out | DATA_W | repaired read data, one cycle after the read |
| `mem_out` | out | DATA_W | raw SRAM output |
| `test_running`, `test_done` | out | 1 | test status; `test_done` stays high until the next start |
| `fault`, `fault_addr`, `fault_data` | out | 1, ADDR_W, DATA_W | fault pulse with failing address and correct data |
| `fault_count` | out | 16 | mismatches since reset (saturating) |
| `rl_used`, `rl_full`, `overflow` | out | clog2(RL_WORDS+1), 1, 1 | redundancy usage, all used, unrepairable |
| `sr_block` | out | 1 | a read was kept from the SRAM this cycle |

Parameters: `ADDR_W` = 10, `DATA_W` = 1, `RL_WORDS` = 32.

## Choices made in this implementation

The original architecture gives the microword, the March-SS program, the redundancy word
fields and the REC/SRD logic. The following points are this implementation's own choices:

- **Data width.** The data-pattern bit is described as producing "a byte" of ones or zeros.
  The reference memory, however, is 1024 x 1, and its redundancy words are 12 bits wide.
  `DATA_W` defaults to 1, and the pattern bit is copied across `DATA_W`. Set `DATA_W = 8`
  for the byte-wide form; `tb/mbisr_byte_tb.sv` exercises it.
- **Writes to repaired addresses.** They go to the redundant word only, not to the SRAM as
  well. Reads of those addresses still go to the SRAM, but their result is replaced.
- **Overflow.** It is raised when a *new* faulty address finds every word in use, rather
  than as soon as the last word is programmed. `rl_full` gives the other reading.
- **REC enable.** The enable is active low (`enb`), and the REC is inactive in test mode.
  The SRD flag Y is cleared by a write.
- **Mode control.** Test or normal mode is a plain input. There is no mode state machine.
  The clock comes from a port; no clock generator is modelled.
- **Timing.** The design runs one operation per cycle. The collar outputs are registered,
  the SRAM reads synchronously, and the fault outputs are registered. The original gives
  no cycle-level timing.
- **Reset.** Reset is active low and asynchronous. The SRAM array and its output register
  are not reset.
- **Instruction store.** It is a fixed ROM, generated at elaboration. There is no
  microcode load port.
- **Area.** The redundancy array is built from flip-flops (32 x 12 bits), so the default
  build has about 490 flip-flop bits. The original's reported FPGA result is much smaller:
  about 107 flip-flops. That build probably maps the array differently.

## Simulating

Each module has a self-checking testbench in `tb/<module>_tb.sv`, which prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mbist_pkg.sv tb/mbisr_top_tb.sv \
          --top-module mbisr_top_tb -Mdir obj_top -o sim
./obj_top/sim
```

The two end-to-end benches are:

- **`tb/mbisr_top_tb.sv`** runs the design at its default size. The bench holds cell 8 at 1
  and cell 100 at 0 in the SRAM array. It then checks the following:
  - the test length and the 13 fault pulses that March-SS must produce;
  - the two programmed words, and that the last fault reported is address 8 with data 0;
  - about 2000 normal-mode accesses against a fault-free model;
  - one blocked successive read;
  - a second run with 33 faulty cells, which must raise `overflow`.

  It also counts each mechanism: fault pulses, repeated faults on a programmed word,
  descending elements, jumps back, redundant reads and writes, blocked reads and overflow.
  It fails if any of them never happened. A run takes well under a second.
- **`tb/mbisr_byte_tb.sv`** runs the byte-wide variant on a 64-word memory.

`tb/rec_dmrdf_tb.sv` shows what the REC is for. It puts the REC in front of
`tb/sram_dmrdf_model.sv`, a simulation-only SRAM model in which one cell flips on its third
read in a row. Repeated reads of that cell return correct data with protection on. With
protection off, the cell must get corrupted.

`mbist_ctrl_tb` expands the March-SS notation on its own and compares the resulting
operation stream with the controller's, operation by operation.

## Changing it

- **Another March algorithm.** Change `march_ss_word()` in `mbist_pkg` (or write a sibling
  function) and set `IM_DEPTH` to its length. Any number of operations per element works.
  Mark the first word FO, the middle ones IO and the last LO; a one-operation element uses
  none of the three.
- **Memory size.** Set `ADDR_W` and `DATA_W`. The test length scales as (operations per
  address) · 2^ADDR_W.
- **Repair capacity.** Set `RL_WORDS`.
