# FV-i-MSB-j: a frequent-value codec for low-power off-chip data buses

Every line of an off-chip data bus that changes state charges or discharges a
large wire capacitance, so the energy a bus uses grows with the number of
bit transitions it makes. The words a processor sends to memory are far from
random: a small set of values comes up again and again (zero, small
constants, pointers into the same objects), and many more words share their
upper bits with a recent word even when the lower bits differ.

This codec exploits both. Sender and receiver each keep two small tables
that hold identical contents at all times:

* the **FV table** (frequent values) holds whole 32-bit words;
* the **MSB table** holds the upper `MSB_W` bits (18 by default) of words.

A word found in a table is not sent itself. Instead the sender sends a
*one-hot* code that names the table slot. The bus does not carry that code
directly. It carries the code XORed onto the previous bus value, so a
one-hot code moves exactly one bus line. A hit in the FV table therefore
costs a single transition instead of the roughly 16 of a random word, and a
hit in the MSB table costs one transition in the upper field plus whatever
the unencoded lower bits cost.

"FV-i-MSB-j" names the configuration. `i` and `j` enlarge the FV and MSB
tables beyond what a one-hot code on the data lines alone can address. The
RTL defaults to FV-2-MSB-2 with an 18-bit MSB field.

## How a word crosses the bus

The selection logic on the sending side chooses one of three forms. An FV
hit has priority over an MSB hit:

| FV hit | MSB hit | code word (32 bits)                                  | `enc_mode` |
|--------|---------|------------------------------------------------------|------------|
| 1      | any     | one-hot slot position in bits 31..0                  | 1 (FV)     |
| 0      | 1       | one-hot slot position in bits 31..14, data bits 13..0 | 2 (MSB)    |
| 0      | 0       | the data word itself                                 | 0 (raw)    |

The code word then goes through the **correlator**:
`bus(t) = code(t) XOR bus(t-1)`. On the receiving side the
**de-correlator** computes `code(t) = bus(t) XOR bus(t-1)`. It then reads
`enc_mode` and does one of three things:

* For an FV code it turns the one-hot position back into a slot number and
  reads the word from its own FV table.
* For an MSB code it reads the upper part from its MSB table and appends the
  14 lower bits that came with the code.
* For a raw word it takes the code as the word.

Raw words also pass through the correlator. The receiver always
decorrelates, so it needs no special case for them.

## Encode-signal lines and table banks

A one-hot code on a `k`-line bus can name only `k` slots. That would cap the
FV table at 32 entries and the MSB table at `MSB_W` entries. The FV-i and
MSB-j variants lift the cap by adding control lines beside the data bus.
This design divides each table into banks:

* The FV table has `2**I` banks of 32 slots. Slot `s` goes out as one-hot
  position `s mod 32`, with `s div 32` on the bank lines.
* The MSB table has `2**J` banks of `MSB_W` slots. Slot `s` goes out as
  one-hot position `s mod MSB_W` in the upper field, with `s div MSB_W` on
  the bank lines.

With `I = J = 0` there is one bank per table and the scheme is plain FV-MSB.
With `MSB_EN = 0` there is no MSB table at all, which gives the FV-i codec
(frequent values only) and, with `I = 0` as well, the basic single-table
frequent-value encoder.
The encode signal is therefore two fields:

* `enc_mode`: 2 bits, binary, as in the table above.
* `enc_bank`: `BANK_W = max(I, J)` bits, or 1 bit when both are zero. It is
  shared by the two tables because only one table's code is sent per word.

The transition counts reported below cover the 32 data lines only. The
`enc_mode` and `enc_bank` lines switch as well, and a real design would count
them too.

## Keeping the two ends in step

Decoding is only correct while the receiver's tables equal the sender's.
This is the subtle part of the design. The codec never sends table contents
across the bus. Each end updates its own copy from the words it has already
seen, and both ends follow the same rules in the same order:

1. **FV table, every word.** On a hit the slot is marked most recently used.
   On a miss the word replaces the least recently used (LRU) slot.
2. **MSB table, only when the FV table missed.** On an MSB hit the slot is
   marked most recently used. Otherwise the upper part replaces the LRU
   slot. After an FV hit the MSB table is left alone. The receiver does not
   search its tables, so after an FV code it cannot know whether the MSB
   table would have hit. The sender must not act on information the
   receiver lacks.
3. **Both ends reset together.** Reset empties both tables and sets both the
   bus register and the de-correlator's reference to zero.

The receiver learns everything it needs for these updates from `enc_mode`,
`enc_bank` and the one-hot position:

| Received code | What the receiver knows                         |
|---------------|-------------------------------------------------|
| FV code       | FV hit at the named slot                        |
| MSB code      | FV miss, and MSB hit at the named slot          |
| raw word      | miss in both tables                             |

So its tables need only a read port. The receiver's tables do still have
search ports, but only assertions use them. Those assertions look up every
decoded word and check that the result matches what `enc_mode` claims. In
simulation they catch any loss of step on the first word where it happens.

**Timestamps and LRU.** `cam_lru_table` gives each entry an age of
`$clog2(N)` bits. The ages always form a permutation of `0 .. N-1`, with 0
the newest entry. When an entry of age `a` is used, every entry younger than
`a` ages by one and the used entry becomes 0. The victim is therefore simply
the entry whose age is `N-1`, with no comparator tree, and the order is exact
LRU. Reset gives slot `s` age `N-1-s` and clears every valid bit. Empty slots
are thus the oldest and fill in order 0, 1, 2, ... before any live entry is
evicted. A slot whose valid bit is clear never matches a search, so an empty
table cannot produce a false hit.

## Interface and timing of `fvmsb_codec`

| Port        | Dir | Width    | Meaning                                      |
|-------------|-----|----------|----------------------------------------------|
| `clk`       | in  | 1        | clock, all registers on the rising edge      |
| `rst_n`     | in  | 1        | synchronous, active-low reset                |
| `in_valid`  | in  | 1        | a word is offered this cycle                 |
| `in_data`   | in  | `DATA_W` | word to send                                 |
| `bus_valid` | out | 1        | the bus carries a new word                   |
| `bus_data`  | out | `DATA_W` | the encoded off-chip data lines              |
| `enc_mode`  | out | 2        | encode signal: 0 raw, 1 FV, 2 MSB            |
| `enc_bank`  | out | `BANK_W` | encode signal: table bank                    |
| `out_valid` | out | 1        | a decoded word is ready                      |
| `out_data`  | out | `DATA_W` | decoded word                                 |

The codec accepts one word per clock and never stalls. Timing is as follows:

* A word offered in cycle `t` is on the bus (registered in the encoder) in
  cycle `t+1`.
* The decoded word is on `out_data` (registered in the decoder) in cycle
  `t+2`.
* When `in_valid` is low, the bus holds its value, so an idle cycle costs no
  transitions. `enc_mode` and `enc_bank` also keep their last values.

The bus ports are brought out of `fvmsb_codec` for measurement. In a real
system the encoder sits at the processor pins and the decoder at the memory
side, and they are instantiated separately: `fvmsb_encoder` and
`fvmsb_decoder` have the same parameters and must be given equal values.

Both table searches and the selection logic sit in the path from `in_data`
to the bus register. In the default FV-2-MSB-2 configuration that path holds
a 128-entry 32-bit match and a 72-entry 18-bit match. The original scheme
puts a 32-entry table lookup at 0.2 ns and the selection logic at 0.2 ns, so
a single cycle is realistic for small tables. Larger `I` or `J` lengthen the
path.

## Parameters

| Parameter | Default | Meaning                                             | Origin |
|-----------|---------|-----------------------------------------------------|--------|
| `DATA_W`  | 32      | data-bus width; also the slots per FV bank          | original scheme |
| `MSB_W`   | 18      | width of the MSB field; also the slots per MSB bank | original scheme |
| `I`       | 2       | FV table has `DATA_W * 2**I` entries (128)          | FV-2-MSB-2, one of the evaluated configurations |
| `J`       | 2       | MSB table has `MSB_W * 2**J` entries (72)           | FV-2-MSB-2, one of the evaluated configurations |
| `MSB_EN`  | 1       | 0 leaves out the MSB table: plain FV-i codec        | this design |
| `BANK_W`  | 2       | width of `enc_bank`, derived from `I` and `J`       | this design |

`MSB_W` may be set anywhere from 2 to `DATA_W-1`. Other values stop
elaboration with an error. The original evaluation swept it from 3 to 28
bits, and an 18-bit field was the one drawn for the FV-i-MSB-j codec. The one-hot code uses one line per slot, which is why a
bank of the MSB table has as many slots as the field has bits.

`cam_lru_table` on its own defaults to 32 entries of 32 bits. That is the
basic FV table, with `I = 0`.

## Source files

```
rtl/fvmsb_pkg.sv          enc_mode_e (raw / FV / MSB), bank_width()
rtl/fvmsb_codec.sv        top: encoder -> bus -> decoder
rtl/fvmsb_encoder.sv        FV table, MSB mask, MSB table, selection, correlator
rtl/fvmsb_decoder.sv        de-correlator, selection, FV table, MSB table
rtl/cam_lru_table.sv        CAM table with exact-LRU ages (FV and MSB tables)
rtl/fvmsb_enc_select.sv     sending-side selection logic
rtl/fvmsb_dec_select.sv     receiving-side selection logic
rtl/bus_correlator.sv       bus(t) = code(t) ^ bus(t-1)
rtl/bus_decorrelator.sv     code(t) = bus(t) ^ bus(t-1)

tb/fvmsb_ref_pkg.sv       reference model of the encoder and a synthetic trace generator
tb/codec_probe.sv         codec plus checker, used to compare configurations
tb/tb_*.sv                one self-checking testbench per module, plus tb_fvmsb_configs
```

The MSB mask is a bit selection (`in_data[DATA_W-1 -: MSB_W]`) inside the
encoder and decoder. It has no module of its own.

## Simulating

Every testbench ends with `TB_RESULT checks=N failures=M` and stops with a
failure if its watchdog runs out. To build and run the end-to-end test at
the default sizes with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_fvmsb_codec rtl/fvmsb_pkg.sv tb/fvmsb_ref_pkg.sv tb/tb_fvmsb_codec.sv
./obj_dir/Vtb_fvmsb_codec
```

To run another test, replace `tb_fvmsb_codec` with its name. Assertions
(`--assert`) check three things: that a table never matches twice, that the
receiver gets only well-formed one-hot codes for filled slots, and that the
two ends stay in step. A failing assertion stops the simulation.

## Verification

Each module has a testbench. Each testbench compares against values worked
out independently of the RTL:

* **Tables and the encoder: `tb/fvmsb_ref_pkg.sv`.** This model keeps each
  table as slots plus a recency list. It is written differently from the
  RTL's age permutation.
* **Correlator and de-correlator:** checked against a running XOR.
* **Selection logic:** checked against code words built bit by bit in the
  testbench.
* **Decoder:** driven from the reference encoder model.
* **End to end: `tb_fvmsb_codec`.** Runs 30,000 cycles at the default sizes.
  It checks that every word comes back unchanged in cycle `t+2`, and that
  the bus, mode and bank equal the model's. It checks that an FV code moves
  one bus line and an MSB code moves one line of the upper field. The test
  fails unless every mechanism happens at least once:
  * FV code, MSB code and raw word;
  * an FV bank above 0 and an MSB bank above 0;
  * FV and MSB evictions;
  * an idle cycle.
* **Configurations: `tb_fvmsb_configs`.** Runs one trace through FV-MSB,
  FV-1-MSB-2 and FV-2-MSB-2, through FV-2-MSB-2 with MSB fields of 3, 8,
  12, 16, 20, 24 and 28 bits, and through FV-2 and FV without the MSB table.
  Each must decode every word and switch less than the unencoded stream.

The original evaluation used data-bus traces of SPECINT and embedded
benchmarks from an architectural simulator. Those traces are not included.
The tests use a synthetic trace instead, made of three kinds of word:

* words from a skewed pool of 160 frequent words, so the FV table overflows;
* words from a skewed pool of 100 frequent upper parts, with random lower
  bits, so the MSB table overflows;
* random words.

On that trace the default codec cuts data-line transitions by about 36%.
FV-1-MSB-2 cuts them by about 26%, and FV-MSB with 32-entry FV and 18-entry
MSB tables by about 12%. Without the MSB table, FV-2 reaches about 29% and
the single 32-entry FV table about 10%. Across MSB widths from 3 to 28 bits,
FV-2-MSB-2 ranges from about 29% to 36%, with its best near 16-18 bits. These figures only rank configurations on this one
trace. The original evaluation reports average reductions of roughly 41-53%
on its benchmarks, depending on configuration and MSB width.

## Decisions not fixed by the original scheme

The original description gives the block structure:

* tables, MSB mask and selection logic;
* correlator on the sending side, de-correlator on the receiving side;
* the selection table;
* the 32-bit word and the 18-bit MSB field;
* the rule that a table holds as many entries per code as the code has
  lines.

It also says that the FV-i and MSB-j tables are enlarged with extra control
signals. The following choices are this design's own:

* the encoding of the encode signal: a binary mode plus a shared binary bank
  field;
* the mapping from slot to bank and one-hot position;
* the update rules and exact LRU replacement, read from the scheme's
  "timestamps" component;
* leaving the MSB table untouched after an FV hit;
* synchronous reset to empty tables and a zero bus;
* registering the bus and the decoded word, one word per clock.

## Not included

* **The FV-MSB-LSB variant.** It keeps a third table of lower parts and
  appears only as a point of comparison. Its code format is not described.
* **Transistor-level CAM cell.** Only its function is modelled: a parallel
  equality match with a valid bit.
* **Software-only techniques from the same study.** These are palette
  re-encoding for an LCD frame buffer and Bus-Invert coding in a flash
  driver. They change software on an existing chip and have no hardware.
* **Energy figures.** The RTL is not characterised for energy. The original
  estimates per operation are:
  * selection logic: 3.04 pJ;
  * XOR gates: 0.095 pJ per transition pair;
  * timestamps: 0.07 pJ;
  * 32-entry, 32-bit table: 13.6 pJ.

  The wire load assumed per bus line is 20 pF.
