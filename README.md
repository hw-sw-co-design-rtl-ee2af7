# Application-profiled RAM scrubber

Radiation flips bits in memory (single-event upsets, SEUs). A RAM with
SEC-DED ECC corrects one flipped bit per word when the word is read. It
cannot help once a second bit flips in the same word. A scrubber prevents
that: it keeps reading the RAM and writes corrected words back before upsets
pile up. A classic scrubber walks the whole RAM. That wastes most of its time
on memory the application never uses, and meanwhile the words that matter
wait a long time between checks.

This design scrubs only the memory the application actually uses. The RAM is
cut into equal slices, and a memory-mapped register file holds one bit per
slice. Software sets those bits from a profile of the application's memory
use: its static variables, its start-up allocations and its stack. The
scrubber then reads every word of a marked slice and jumps over an unmarked
slice in a single cycle. With 6.4 % of a 1 MiB RAM in use, a full pass takes
24,436 cycles instead of 262,144.

The scrubber, the ECC RAM and a small access-control block form one IP. It
replaces a processor's data RAM on the data bus. The RAM needs only one port:
the bus always has priority, and the scrubber uses the cycles the bus leaves
free.

```
            data bus (req/we/addr/wdata -> gnt, rvalid/rdata/rerr)
                                   |
                        +----------v-----------+
                        |   mem_access_logic   |  addr <  MEM_BYTES -> RAM
                        |  (decode + arbiter)  |  addr >= MEM_BYTES -> registers
                        +--+----------------+--+
             RAM port      |                | register port
     (bus first, scrubber  |                |
      in the free cycles)  |                |
                 +---------v----+    +------v------------------------+
                 |   ecc_ram    |    | scrubber                      |
                 | 39-bit words |    |  scrub_regfile  slice map,    |
                 | enc on write |    |                 CTRL, counters|
                 | dec on read  |    |  scrub_fsm      address walk  |
                 +------+-------+    |  scrub_correction check and   |
                        |            |                  write-back   |
                        +-- raw read +-------------------------------+
                            codeword
```

## The slice map and the walk

Two numbers are fixed when the design is built: the RAM size (`MEM_BYTES`,
default 1 MiB) and the slice length (`SLICE_WORDS`, default 32 words =
128 bytes). From them:

* `N_SLICES = ceil(MEM_WORDS / SLICE_WORDS)`: 8192 by default.
* The slice map has `N_SLICES` bits, packed into `MAP_REGS = ceil(N_SLICES/32)`
  32-bit registers (256 by default). Slice *k* (words
  `k*SLICE_WORDS ... (k+1)*SLICE_WORDS-1`) is bit `k % 32` of map register
  `k / 32`. So bit 0 of register 0 covers the first slice.

While enabled, `scrub_fsm` keeps a word address and acts once per cycle:

* If the current word's slice bit is 1, it asks for the RAM port to read that
  word. Once granted, it moves to the next word.
* If the bit is 0, it jumps to the first word of the next slice. This takes
  one cycle and does not use the RAM.
* When it passes the end of the RAM, it starts again at word 0 and pulses
  `scrub_pass_done_o`.

On an idle bus, one pass therefore takes exactly

    cycles per pass = (words in used slices) + (number of unused slices)

A scrubber that reads every word takes `MEM_WORDS` cycles. Bus traffic only
delays the walk. Reads stay in order, and no word is skipped or read twice.
Changing the map takes effect at once. If the current slice is switched off,
the walk jumps to the next slice. Setting the enable bit again restarts the
walk at word 0.

The slice length is the trade-off. Shorter slices follow the application's
memory more closely, but need more map bits (one flip-flop each) and a wider
lookup.

## Sharing one RAM port

`mem_access_logic` is purely combinational. It does two jobs:

* **Address decode.** A bus address below `MEM_BYTES` goes to the RAM
  unchanged. Any other address goes to the scrubber's registers at
  `addr - MEM_BYTES`. With the default size, byte address `0x100000` is map
  register 0.
* **Arbitration.** A bus access to the RAM always gets the port. The
  scrubber's request is granted only in cycles the bus leaves free. If it is
  not granted, the scrubber simply asks again in the next cycle. The core
  never waits for the scrubber.

Sharing the port raises a hazard that the bus priority alone does not solve.
The scrubber reads a word in cycle *t* and checks it in *t+1*. If it finds a
single error, it writes the corrected word back in a later free cycle. If the
bus writes that word in the meantime, the write-back would restore old data.
`scrub_correction` therefore drops a write-back when the bus writes its word:

* in the cycle the word is checked, or
* in any cycle while the write-back waits.

Only one correction is ever in flight: the FSM issues no read while a
write-back is pending, nor in the cycle that found the error.

**Watchdog.** CTRL bit 1 turns on the optional watchdog. Every bus access to
the RAM reloads a counter with `WATCHDOG_CYCLES` (default 16). The scrubber
starts no new read until the counter has run down to 0. During bursts of core
traffic the scrubber then steps aside completely, instead of taking every
free cycle.

## ECC

Each word is stored as a 39-bit codeword: 32 data bits and 7 check bits. The
code is an extended Hamming code (SEC-DED):

| codeword bit | content |
|---|---|
| 0 | overall parity of bits 1..38 |
| 1, 2, 4, 8, 16, 32 | Hamming check bits |
| the other 32 positions (3, 5, 6, 7, 9, ..., 38) | data bits 0..31 in order |

To decode, compute the syndrome *s* (the XOR of the positions of all set
bits, 1..38) and the overall parity *p*:

* *s* = 0 and *p* = 0: the word is clean.
* *p* = 1: one bit flipped, at position *s* (position 0 is the parity bit
  itself). It is corrected.
* *s* ≠ 0 and *p* = 0: two bits flipped. This cannot be corrected.
* *p* = 1 with *s* > 38: reported as a double error.

The encoder and the decoder are separate modules (`ecc_encoder`,
`ecc_decoder`), built from functions in `scrub_pkg`. If another code is
used, only these need to change.

Bus reads return corrected data. `bus_rerr_o` flags an uncorrectable word.
The stored word stays wrong until the scrubber or a bus write replaces it.

## Register map

Addresses are byte offsets from `MEM_BYTES`. All registers are 32 bits wide.

| offset | name | access | meaning |
|---|---|---|---|
| `0 .. 4*(MAP_REGS-1)` | MAP[i] | RW | slice bits `32*i .. 32*i+31` |
| `4*MAP_REGS` | CTRL | RW | bit 0: scrubber enable; bit 1: watchdog enable |
| `4*MAP_REGS + 4` | SEC_CNT | R, write clears | single errors found |
| `4*MAP_REGS + 8` | DED_CNT | R, write clears | double errors found |

With the default size, CTRL is at `0x100400`, SEC_CNT at `0x100404` and
DED_CNT at `0x100408`. Reads from any other address return 0.

The counters count errors found by the scrubber and errors found by ordinary
bus reads. A double error is counted every time it is read, so an
uncorrectable word in a used slice adds one to DED_CNT on every pass. A write
of any value clears a counter. If an error is found in that same cycle, it
is kept, and the counter becomes 1. Counters saturate at `2^32-1`. Reset
clears the map, CTRL and both counters. The RAM contents are not reset.

## Bus interface and timing

The top module is `scrub_ip_top`:

* `bus_req_i`, `bus_we_i`, `bus_addr_i[31:0]` (byte address) and
  `bus_wdata_i[31:0]` make a request.
* `bus_gnt_o` equals `bus_req_i`: every access is accepted in the cycle it is
  made.
* A read returns `bus_rdata_o` with `bus_rvalid_o` in the next cycle. For RAM
  reads, `bus_rerr_o` also comes in that cycle.
* Only whole 32-bit words are written. There are no byte enables.

The status pulses `scrub_active_o`, `scrub_skip_o`, `scrub_pass_done_o`,
`scrub_sec_o` and `scrub_ded_o` let a system count scrubber activity without
polling registers.

Inside the IP, the RAM is a synchronous array with one port and a one-cycle
read. Its encoder sits on the write side and its decoder on the registered
read data. Any single-port RAM that holds 39-bit words can replace the array,
such as an SRAM macro or an FPGA block RAM.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MEM_BYTES` | 1048576 | RAM size in bytes (a multiple of 4) |
| `SLICE_WORDS` | 32 | slice length in 32-bit words |
| `WATCHDOG_CYCLES` | 16 | hold-off after bus traffic when the watchdog is on |

To scrub a 2 KiB RAM instead, set `MEM_BYTES = 2048`. It then has 16 slices
and one map register.

## Programming sequence

1. Profile the application: list the RAM ranges of its static data, its
   start-up allocations and its stack.
2. Set bit `floor(addr / (4*SLICE_WORDS))` for every word address in those
   ranges, and write the MAP registers.
3. Write 1 to CTRL, or 3 to CTRL to turn on the watchdog as well.
4. Read SEC_CNT and DED_CNT from time to time. Write them to clear them.

The map can be rewritten at any time, for example when the application
enters a phase with a different memory footprint.

## Files

`rtl/`:

* `scrub_pkg.sv`: types, the codeword layout, and the encode and syndrome
  functions.
* `ecc_encoder.sv`, `ecc_decoder.sv`: the SEC-DED code.
* `ecc_ram.sv`: the single-port RAM of 39-bit codewords.
* `mem_access_logic.sv`: address decode and bus-first arbitration.
* `scrub_regfile.sv`: slice map, CTRL and the error counters.
* `scrub_fsm.sv`: the address walk, port requests and the watchdog.
* `scrub_correction.sv`: checks words, holds write-backs, drops stale ones.
* `scrubber.sv`: groups the register file, FSM and correction unit.
* `scrub_ip_top.sv`: the complete IP.

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus
`scrub_ip_full_tb.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert rtl/scrub_pkg.sv \
    $(ls rtl/*.sv | grep -v scrub_pkg) tb/scrub_ip_top_tb.sv \
    --top-module scrub_ip_top_tb -Mdir obj_top
./obj_top/Vscrub_ip_top_tb
```

Replace the testbench name to run another. All testbenches finish in
seconds. The largest is `scrub_ip_full_tb`, at the full 1 MiB size, which
takes about 20 s including the build.

## What the tests show

* **ECC.** The encoder is compared with an independent reference. The
  decoder is tried with every single-bit flip of 60 words and with random
  double flips.
* **`scrub_fsm`.** For random slice maps:
  * read order and count per pass are checked;
  * a pass takes exactly *used words + unused slices* cycles;
  * under random bus traffic, nothing is lost or repeated;
  * write-backs take priority, stalls are respected, the watchdog holds off,
    and the walk restarts at word 0.
* **`scrubber`, `scrub_ip_top`.** Upsets are planted in used and unused
  slices and a pass is run. Used-slice single upsets are repaired.
  Unused-slice upsets are left alone. Both counters match.
  * Both write-back hazards are forced on purpose, and the newer bus data
    survives.
  * Under random traffic, with and without the watchdog, every word ends
    clean and holds the last data written to it.
  * The top testbench counts each mechanism and fails if any never occurs:
    slice skip, scrub read, correction, double detection, port lost to the
    bus, watchdog hold-off, stale write-back dropped, bus-read correction,
    counter clear, and pass wrap.
* **`scrub_ip_full_tb`** runs at the default size with three application
  profiles. The occupations and upset counts are those reported for the
  reference system. Results:

| profile | RAM in use | slices used | upsets repaired | cycles per pass | full walk | injection to repair, mean / worst |
|---|---|---|---|---|---|---|
| matrix multiplication | 6.40 % | 524 | 31 / 31 | 24,436 | 262,144 | 13,103 / 24,286 |
| CNN | 34.96 % | 2864 | 73 / 73 | 96,976 | 262,144 | 47,795 / 94,512 |
| rover mobility firmware | 25.57 % | 2095 | 94 / 94 | 73,137 | 262,144 | 34,505 / 73,090 |

The used slices are placed half at the bottom of the RAM (data) and half at
the top (stack). Upsets are injected at random times while the scrubber
runs. Each must be repaired within one pass of its injection, plus two
cycles for every other repair in that pass. On average, a repair comes about
half a pass after the upset.

## What is this design's own choice

The following follow the reference architecture:

* slicing, with one map bit per slice and `ceil(length/slice)` map bits;
* skipping unused slices;
* the registers placed right after the RAM;
* the enable register and the optional bus watchdog;
* the two error counters cleared by a write;
* the combinational access logic that gives the bus priority over the
  scrubber on a single-port RAM;
* 7 check bits per 32-bit word;
* 1 MiB of RAM and 32-word slices.

The following are choices made here, where no detail was available:

* the particular SEC-DED code and bit layout;
* the order of the registers, and the CTRL bit assignment;
* counter width and saturation;
* the bus handshake;
* the one-cycle RAM latency;
* the write-back buffer and its stale-data rule;
* the watchdog's fixed hold-off length;
* restarting at word 0 on enable;
* counting bus-read errors in the same counters;
* the `bus_rerr_o` flag.

Known limits:

* No byte enables. A sub-word store to an ECC word would need a
  read-modify-write, which is not built.
* No AXI adapter. The IP has a simple request/grant port.
* The slice lookup is one `N_SLICES`-to-1 multiplexer (8192 inputs by
  default), and the map costs one flip-flop per slice. In a real
  implementation at this size, the timing-critical path would run through
  that multiplexer. Longer slices shrink both.
