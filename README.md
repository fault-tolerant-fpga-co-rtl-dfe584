# Fault-tolerant FPGA co-processing support system

An embedded PC sends work to an FPGA co-processor over a PC/104 (ISA) bus. The board has two FPGAs:

- a **support FPGA**, which owns every connection on the board;
- a **co-processing FPGA**, which runs the user's algorithm.

The board is meant for orbit, where radiation flips configuration and user bits (single-event upsets, SEUs). The support system therefore does more than move data:

- it can reconfigure either FPGA from a flash memory or from the host;
- it keeps rewriting ("scrubbing") both FPGAs' configuration from the flash, so upsets are repaired before they pile up;
- it protects its own logic and every off-chip path with the cheapest technique that works there:
  - triple modular redundancy (TMR) inside the FPGA;
  - Hamming codes where there are too few pins to triplicate;
  - a CRC on flash data, which is trusted at rest but not on its way to the FPGA.

This repository holds synthesizable SystemVerilog for the whole support system, for the co-processing end of the link and a demonstration incrementer, and for the generic TMR building blocks. Each block comes with a self-checking testbench.

## Block diagram

```
 ISA bus ──┬── isa_bus_if @0x300 ── flash_ctrl ─────────────┐ req 2
           ├── isa_bus_if @0x302 ── selectmap_if (Virtex) ──┤ req 0 ──► SelectMap pins, support FPGA
           ├── isa_bus_if @0x304 ── selectmap_if (V-II) ────┤ req 1 ──► SelectMap pins, co-processing FPGA
           └── isa_bus_if @0x306 ── interfpga_link ═══pins═══ interfpga_link ── copro_incrementer
                                                            │                   (co-processing FPGA)
                                          flash_arbiter ◄───┘
                                                │
                                          flash_cache (CRC-checked, TMR block RAM)
                                                │
                                          flash_if ──► Intel 2M x 16 flash pins
```

Everything runs on one 50 MHz clock: both FPGAs share the oscillator. `ftcp_top` instantiates all of it. The top also holds a stand-alone `tmr_pin_driver` with its own ports. That block is the output stage for boards that give each signal three pins; the target board does not.

## The host protocol

Each module has its own pair of I/O addresses:

- **data address (base)**: host writes fill the module's input FIFO; host reads empty its output FIFO.
- **control address (base + 1)**:
  - a write clears both FIFOs and resets that module;
  - a read returns `{out_full, out_empty, in_full, in_empty}` in bits 3..0.

With `ECC = 1` (the default), every byte crosses the bus as a 12-bit Hamming word in bits 11..0 of a 16-bit transfer, in both directions. The interface corrects any single-bit error before the byte enters the FIFO, and drops words it cannot correct. Multi-byte arguments are sent low byte first. Flash words travel as two bytes, low byte first.

**Flash control (0x300)**

| byte | arguments | action |
|---|---|---|
| 0x07 | a0 a1 a2 | load the 21-bit flash address (bits 4..0 of a2 used) |
| 0x08 | – | increment the address |
| 0x00 | – | read the word at the address; two bytes are returned |
| 0x01 | n0..n3, then n word pairs | program n words from the address on; the address increments; n = 0 programs one word |
| 0x02 / 0x03 / 0x04 | – | lock / unlock / erase the block at the address (only at a block start) |
| 0x09 | – | return the address as three bytes |

**SelectMap interfaces (0x302 support FPGA, 0x304 co-processing FPGA)**

| byte | arguments | action | acknowledge |
|---|---|---|---|
| 0x0A | a0 a1 a2 | load the stream's start address | |
| 0x01 | a0 a1 a2 | load the stream's last address | |
| 0x02 | – | configure from the flash | 0xBF at start, 0xEF at end |
| 0x03 | n0..n3 | number of bytes for a configuration over the bus | |
| 0x04 | n bytes | configure from the bus | 0xBB at start, 0xEB at end |
| 0x05 | – | scrub: stream start..stop, pause, repeat | 0xB5 |
| 0x0E | – | stop scrubbing after the pass under way (or at once during a pause) | 0xE5 |
| 0x08 | – | abort sequence (first-generation Virtex interface only) | |

**Link (0x306)**: bytes written go to the co-processing FPGA, and its answers come back in the output FIFO. With the incrementer, every byte returns plus one.

## How the fault tolerance works

**TMR of state (`tmr_voter`, `tmr_state_reg`).** The state is held three times. Each copy loads the majority of the three next states, with one voter per copy. An upset in one copy or one voter is outvoted and repaired on the next clock. Every control state machine uses this scheme:

- the flash arbiter's owner register;
- the bus interfaces, flash control, the flash buffer's control, the flash interface and both SelectMap interfaces. In each of these the whole register set of the module is one packed struct, so addresses, counters, synchronisers and pin registers are covered too. The outputs are decoded from a voted copy;
- the CRC register;
- the FIFO pointers. The FIFO memory is also held three times, and the three read words are voted. FIFO entries are short-lived, so they need no refresh;
- both state machines of each link end. Copy *i* of the link state drives strobe pin *i*, so the three strobe pins come from three independent copies;
- the refresh counter of the TMR RAM.

The three copies are identical logic. A synthesis run that flattens the design and merges equivalent cells folds them back into one, which silently removes the redundancy. An implementation must keep the copies apart, for example by keeping the hierarchy of each copy and placing the copies in separate regions of the chip.

Some logic is still a single copy: the output decode after each module's voter, and in the bus interface the event decode between the voted registers. The link's code-word and data synchroniser registers are also single copies, because the Hamming code already covers them. An upset there lasts until the next scrub pass repairs it.

**TMR block RAM with refresh (`tmr_bram`).** There are three RAM copies, and port A reads are voted. Port B walks through the addresses in the background. It reads all three copies, votes, and writes the result back, so stored upsets do not accumulate. The cycle takes eight clocks per word, and each copy has its own voter and counter copy. A user write to the address being refreshed could be overwritten by the stale write-back. A collision flag therefore covers the whole time from the refresh read to the write-back, and cancels the write-back when set.

**CRC-verified flash buffer (`flash_cache`).** The contents of the flash chip cannot be upset, but the pins and routing between it and the FPGA can. The flash is therefore stored in records of 513 words: 512 data words, then a CRC-16/CCITT over them. The CRC has polynomial 0x1021 and starts at 0xFFFF; each word is taken high byte first. The SelectMap interfaces read through the buffer with logical addresses. Logical word L is at physical address `(L / 512) * 513 + (L mod 512)`.

- On a miss, the whole record is read into a TMR block RAM while the CRC is computed.
- If the CRC matches, the record serves every read in its range. A hit takes three clocks.
- If it does not match, the buffer is emptied. After `RETRY_WAIT` clocks the record is read again. The wait is chosen longer than the scrub period, so an upset in the routing has been repaired by then.

Host reads through flash control bypass the buffer and see the raw words, CRC words included. The host programs therefore build and verify the records themselves. Writes and erases invalidate the buffer.

**Hamming codes on narrow paths (`hamming_enc`, `hamming_dec`).** The ISA bus and the FPGA-to-FPGA pins cannot be triplicated, so each byte is sent with 4 check bits. The check bits sit at positions 1, 2, 4 and 8 of a 12-bit word. Any single-bit error is corrected. Syndromes 13 to 15 cannot come from a single error, so those words are flagged and dropped. Other double errors look like single errors and are miscorrected: four check bits cannot detect every double error. The link uses 24 data pins for two directions, where triplication would need 48.

**Triplicated strobes on the link (`interfpga_link`).** Request and acknowledge are single-bit signals, and each one travels on three pins and is voted on arrival. A transfer is a toggle handshake:

1. The sender puts the code word on the pins.
2. One clock later, it toggles its request.
3. The receiver synchronises the request and data through two registers.
4. The receiver waits one more clock for pin skew, corrects the byte, and toggles its acknowledge.

A byte takes about ten clocks. The same module serves both ends.

**Minority pin driver (`tmr_pin_driver`).** On a board with three pins per output, each pin is driven by one logic copy. A pin whose value disagrees with both others turns its driver off, so the board trace carries the majority value.

**Scrubbing (`selectmap_if`).** Scrubbing repeats the configuration stream from the flash, then pauses for `SCRUB_PAUSE` clocks (1 s by default). The stream holds its own configuration commands, which rewrite the configuration memory and so repair upsets. The first-generation Virtex must be released from its previous configuration session first, so its interface (`VIRTEX1 = 1`) runs an abort sequence before every pass:

1. CS# and WRITE# low for two clocks, with CCLK idle.
2. WRITE# released while CS# stays low, and four CCLK periods.
3. CS# raised.

## Flash access and arbitration

Flash control and the two SelectMap interfaces share the flash through `flash_arbiter`. The lowest index wins, and the owner keeps the flash until it drops its request. A SelectMap interface therefore holds the flash for a whole stream, and the flash cannot change under a configuration in progress. It releases the flash during the scrub pause. Flash control takes one grant per word, so a slow host burst does not hold off scrubbing. Flash control has the lowest priority. It can wait while both SelectMap interfaces are busy, but with the default 1 s pause there are long gaps.

All flash users talk to `flash_if` over a small command bus:

- **request** (`flash_req_t`): valid, command, address, data, cached;
- **response** (`flash_rsp_t`): busy, rvalid, rdata.

A module strobes `valid` for one clock while `busy` is low. `busy` rises on the next clock and stays high until the command is done, and `rvalid` comes in the last busy clock. `flash_if` plays the Intel command sequences:

- read: 0xFF, then read the word;
- program: 0x40, then the data, poll status bit 7, then 0xFF;
- erase: 0x20, 0xD0, poll, 0xFF;
- lock: 0x60, 0x01, 0xFF;
- unlock: 0x60, 0xD0, 0xFF.

WE# is low for 3 clocks (60 ns) and high for 2 clocks (40 ns) between cycles. A read holds OE# low for 5 clocks (100 ns) and takes 17 clocks in all.

Block commands are carried out only at a block start:

- main blocks: multiples of 0x8000 words;
- boot blocks: multiples of 0x1000 words from 0x1F8000 up.

Elsewhere a block command is dropped after one busy clock.

## SelectMap timing

Each byte is put on the data pins with CCLK low, and CCLK rises one clock later. CCLK thus runs at 25 MHz at most, under the 50 MHz limit above which the FPGA's BUSY handshake would be needed. CCLK moves only when new data is ready, so the uneven arrival of flash words does no harm.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| ftcp_top, isa_bus_if | FIFO_DEPTH | 512 | bytes per FIFO (one block RAM) |
| ftcp_top, isa_bus_if | ECC | 1 | Hamming-coded bus transfers |
| ftcp_top, selectmap_if | SCRUB_PAUSE | 50,000,000 | clocks between scrub passes (1 s) |
| ftcp_top, flash_cache | RETRY_WAIT | 100,000,000 | clocks before a record that failed its CRC is re-read (2 s) |
| isa_bus_if | BASE_ADDR | 0x300 | data address; control is +1 |
| selectmap_if | VIRTEX1 | 0 | 1 = first-generation Virtex (abort sequence) |
| flash_if | T_WP, T_WPH, T_ACC | 3, 2, 5 | write pulse, write recovery, read access in clocks |
| tmr_bram | DW, AW | 16, 8 | one 256 x 16 block RAM per copy (flash_cache uses 16 x 512) |

## Where this differs from the original description, and what was decided here

- The Hamming code has 8 data and 4 check bits, giving a 12-bit word. It corrects single errors. Its double-error detection is partial, because full detection needs a fifth check bit.
- Block start addresses are described as multiples of 0x7999. They are implemented as multiples of 0x8000, the 32K-word block size of the flash.
- Values that are not given were chosen here:
  - the command codes for lock, unlock and erase;
  - the scrub acknowledge codes;
  - argument byte order;
  - scrub pause and retry wait;
  - FIFO depth and I/O addresses;
  - the CRC polynomial and the record layout;
  - the read access time;
  - the abort sequence's exact clock counts;
  - the link handshake.
- The original triplicates whole modules, each with its own outputs, and votes where the outputs meet. Here each module keeps three copies of its registers and next-state logic with voted feedback. Its outputs are decoded once, from a voted copy.
- The support FPGA's SelectMap pins are brought straight out of the top. On the board they are reached through the co-processing FPGA.
- The host programs, the flash chip, the EEPROM and the FPGAs' internal configuration controllers are outside the RTL. `tb/flash_model.sv` is a behavioural flash model for simulation only. It models Intel commands, status, block locking, program/erase busy time and write-pulse timing checks.
- The partial-reconfiguration bitstreams used for scrubbing are data, not logic. Any stream placed in the flash as records is repeated unchanged.

Capacity check, using Xilinx bitstream sizes rather than figures from the original description:

- a full XC2V6000 bitstream (1,365,594 words) plus the XQRV600 support bitstream (about 225,500 words), with their CRC words, fill 1.59M of the flash's 2.10M words;
- a third, partial scrubbing bitstream fits if it is under about 0.5M words.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog. With plain Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/ftcp_pkg.sv tb/tb_ftcp_top.sv --top-module tb_ftcp_top -o sim
obj_dir/sim
```

| testbench | covers |
|---|---|
| tb_tmr_voter, tb_tmr_state_reg, tb_tmr_pin_driver | exhaustive and random votes; state upsets repaired |
| tb_tmr_bram | random traffic with upsets injected into single copies; refresh write-backs and collision skips counted |
| tb_hamming | all 256 bytes, clean and with every single-bit error; double errors never pass as clean |
| tb_sync_fifo, tb_crc16 | against a queue model; against a bit-serial CRC, itself checked on the standard "123456789" vector |
| tb_isa_bus_if | asynchronous ISA cycles, correction, dropped words, status, control clear, overflow, address decode |
| tb_flash_if, tb_flash_ctrl | against the flash model: every command, write-cycle timing, read duration, block-start rule, locked blocks |
| tb_flash_arbiter | random requests against a reference; holding and priority; upsets in one state copy |
| tb_flash_cache | misses, hits, CRC failure with retry after RETRY_WAIT, pass-through, invalidation |
| tb_selectmap_if | both versions: flash and bus streams byte for byte, CCLK rate, abort sequences, scrub passes and pauses, stop |
| tb_interfpga | two link ends and the incrementer, random bit errors and stuck strobe copies, dropped words |
| tb_ftcp_top | the whole system from the host's side; counts every mechanism and fails on any that never happened |
| tb_ftcp_top_full | the top at default parameters: a configuration from the flash, one scrub pass, the link and a raw read |

The system testbench scales the scrub pause and retry wait down to 30,000 and 20,000 clocks. The full-size testbench does not wait out the 1 s pause: its stop command arrives during the pause. The retry after a CRC failure is exercised only at the reduced wait.

## Lint notes

A few Verilator lint warnings remain on purpose:

- `flash_if` does not use the `cached` bit of the shared request struct. `flash_cache` consumes that bit.
- The Hamming decoder computes a corrected word, and its check-bit positions are not needed after correction.
- In the top, the unused FIFO flags and status outputs (`in_full` of the command FIFOs, `out_empty`, `abort_done` of the Virtex II interface, `buf_valid`, the TMR RAM refresh flags) are left open.
