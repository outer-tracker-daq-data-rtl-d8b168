# LHCb Outer Tracker TELL1 output formatter

This is synthesizable SystemVerilog for the part of the Outer Tracker (OT) readout board (TELL1) that turns front-end data into the LHCb DAQ format. For every L0-accepted event it takes the readout of the board's 24 optical GOL links and produces the OT data banks. Each link carries four OTIS TDC chips with 32 straw channels each. The banks are packed into Multiple Event Packets (MEPs) for the Ethernet output. The output format follows the OT DAQ data format note LHCb-2007-040 (EDMS 833984, issue 1.5.1). The note defines what the board must send. It does not describe how the firmware produces it. The word layouts below are therefore the note's, and the way they are generated is this design's.

## The data hierarchy

```
MEP      = MEP header (3 words) + mep_factor events            (1..32, default 12)
event    = MEP sub-header (1 word) + banks
banks    = processed bank, then optionally RAW bank, then optionally error bank
bank     = bank header (2 words) + bank data
```

In every header word the field written first is the most significant:

| word | bits 31..16 | bits 15..0 |
|---|---|---|
| MEP header 0 | L0 event ID of the first event (32 bits) | |
| MEP header 1 | MEP length in bytes, including the MEP header | number of events |
| MEP header 2 | partition ID (default `0xEDED1D1D`) | |
| sub-header | event length in bytes, excluding the sub-header | L0 event ID [15:0] |
| bank header 0 | bank length in bytes, including the bank header | magic `0xCBCB` |
| bank header 1 | source ID | version [15:8], type [7:0] |

The bank types (`0x0C` processed, `0x20` RAW, `0x21` error), the source ID and the version are configuration inputs.

Which banks an event carries:

- **processed bank**: always.
- **RAW bank**: when `cfg.force_raw` is set or the trigger type is 0x5.
- **error bank**: when `cfg.force_info` is set or any enabled PP FPGA reports an error.

## Processed bank: GOL data blocks

The processed bank has three parts:

1. The bank header.
2. The *OT specific header* `{4'b0, trigger type[2:0], general error, bunch counter[7:0], number of enabled GOLs[15:0]}`.
3. One GOL data block for every enabled link on an enabled PP FPGA.

Every enabled link gets a block, even one without hits. A block starts with the GOL header:

| bits | field |
|---|---|
| 31..24 | number of hits on the link (0..128) |
| 23 | optical transmission ok (here: no TLK error and link clock active) |
| 22 | mode: 1 = zero-suppress, 0 = hitmap |
| 21..10 | 3-bit status (SEU, buffer overflow, truncation) of OTIS 3, 2, 1, 0 |
| 9..0 | GOL ID (station[9:8], layer[7:6], quarter[5:4], module[3:0]) |

The mode is chosen per link (`cfg.zs_mode`). Data follow only when the link has at least one hit:

- **zero-suppress**: one 16-bit word per hit, `{1, OTIS[1:0], channel[4:0], drift time[7:0]}`, packed two per 32-bit word. The first hit of a pair goes in bits 15..0, and hits are sent in ascending straw order. An odd count leaves the upper half of the last word as `0x0000`. This padding is counted in the bank length. A valid hit word always has bit 15 set, so the padding cannot be mistaken for a hit.
- **hitmap**: four words, word k holding the 32 hit flags of OTIS k (bit c = channel c). There are no drift times.

`ot_gol_processor` builds one block. It captures the link in one cycle. It then sends the header, followed by one data word per cycle: in zero-suppress mode it finds the two lowest remaining hit flags each cycle.

## RAW bank: untouched OTIS data

The RAW bank carries each enabled PP FPGA's six links exactly as received. The block for one PP is 233 words (932 bytes):

```
words   0..107  OTIS 0 and 2 of all six links ("even" half)
words 108..215  OTIS 1 and 3 ("odd" half)
words 216..232  event information W1..W17
```

Each OTIS fragment is 36 bytes: a 4-byte header, then 32 channel bytes. In each half, byte k of the fragments fills three consecutive words, one for each link pair (0,1), (2,3), (4,5):

```
bits 31..24 link 2p+1, OTIS 2 (odd half: 3) byte k
bits 23..16 link 2p+1, OTIS 0 (odd half: 1) byte k
bits 15..8  link 2p,   OTIS 2 (odd half: 3) byte k
bits  7..0  link 2p,   OTIS 0 (odd half: 1) byte k
```

`ot_raw_pp_formatter` is a combinational word selector. The bank sequencer steps its index from 0 to 232.

## Event information and the error bank

`ot_event_info` computes the 17 information words of one PP FPGA:

- **W1 EvCTRL**: general error, data generator enabled, ECS trigger, trigger type, bank list `{0, RAW, 111}`, detector ID 3 and a 12-bit bunch counter.
- **W2**: the 32-bit L0 event ID.
- **W3**: the PP's own OT specific header.
- **W4, W5**: 6-bit per-link vectors of receiver flags (buffer full or empty, size error, TLK error, GOL ID mismatch, clock inactive, link disabled, link has hits) and the PP address.
- **W6..W17**: one 16-bit status per OTIS. It holds the header-bit-19 check, "disabled", bunch-counter and event-counter mismatch against the TTC, wrong OTIS ID, the receiver's expected-ID, offline and offline-zero flags, and the hit count.

A PP is *in error* when any of its enabled links shows a receiver flag, a nonzero OTIS header status or an error bit in its OTIS status words. The OR over all PPs is the event's general error flag. This flag appears in the OT specific header and in EvCTRL, and it triggers the error bank.

`ot_error_pp_formatter` builds one PP's section of the error bank. All four PPs send a section, enabled or not, interleaving the W words with fixed E words:

```
W1, W2, E1, W3, E2, [W4..W17], E3, E4, [E5]
E1 = {processed bytes of this PP, 0x0000}      E2 = {0x0038 or 0x0000, 0x8E00}
E3 = {processed bytes of this PP, 0x8E01}      E4 = 0x00008E02
E5 = {0x03A4 if PP enabled else 0, 0x8E03}     (only if the event has a RAW bank)
```

W4..W17 are sent only when the PP is enabled and in error, which E2 announces with `0x0038` (56 bytes). A section is therefore 7, 8, 21 or 22 words long.

## Lengths before data

Every bank header, the sub-header and the MEP header carry lengths. All of them precede the data they count, so nothing can be streamed straight through. This design handles it in two places:

- **Per event**: `ot_event_builder` captures the whole event in registers, about 32 k flip-flops for 24 links × 4 OTIS × (36 bytes + 32 hit flags). `ot_bank_sizer` then computes every length combinationally from the hit counts before the first word leaves:
  - GOL block: 4 bytes, plus 4·⌈hits/2⌉ bytes in zero-suppress mode or 16 bytes in hitmap mode when the link has hits;
  - processed bank: 12 bytes plus the GOL blocks;
  - RAW bank: 8 bytes plus 932 per enabled PP;
  - error bank: 8 bytes plus 4 per section word.
- **Per MEP**: `ot_mep_builder` writes the events into a 16384 × 32-bit buffer behind three reserved words. It writes each sub-header as the event starts; the event's length arrives with its first word. Once the MEP is complete it writes the MEP header into the reserved words and reads the buffer out. The 16-bit byte length caps a MEP at 16383 words. If the next event would not fit, the MEP is closed early with fewer events, and that event opens the next MEP (`mep_early_close` pulses).

## Monitoring histograms

The note says the TELL1 fills hit histograms per channel and drift-time distributions per OTIS for the slow-control (ECS) side. `ot_histogrammer` keeps two counter memories:

- **Hit map.** One counter per channel, 24 × 128 = 3072 counters, at address `link·128 + OTIS·32 + channel`.
- **Drift time.** One 256-bin histogram of the 8-bit drift time per OTIS, 96 × 256 = 24576 bins, at address `4096 + (link·4 + OTIS)·256 + time`.

Counters are 16 bits wide (`CNT_W`) and saturate. The width, address map and read port are this design's choices.

An accepted event is taken only if the histogrammer is idle; otherwise it is counted as skipped. Monitoring therefore samples events and never stalls the data path. Only enabled links on enabled PPs are entered.

- An event's hits are entered one per cycle, so an event takes hits + 24 cycles. At 11.6 % occupancy on 9 links that is about 158 cycles, fewer than the formatter spends per event.
- After reset and on `hist_clear`, both memories are swept to zero. The sweep takes 24576 cycles, and `hist_busy` stays high meanwhile.
- `hist_addr` is read with one cycle of latency.
- `hist_events` and `hist_skipped` count the events taken and skipped.

## Interfaces and timing

The top is `ot_tell1_formatter`, and all record types are in `ot_pkg`.

- `cfg` (`cfg_t`): static configuration. It holds the link and PP enables, per-link mode and GOL ID, the force bits, the data-generator flag, source ID, version, the three bank types, the MEP factor and the partition ID.
- `ev_valid`/`ev_ready`, `ev_links`, `ev_stat`, `ev_ttc`: one event per handshake.
  - `ev_links` holds, per link, four `otis_frag_t`: the 32-bit header, 32 channel bytes and 32 hit flags.
  - `ev_stat` holds the per-link receiver flags.
  - `ev_ttc` holds the L0 event ID, the 12-bit bunch counter, the trigger type and the ECS-trigger flag.
- `m_valid`/`m_data`/`m_last`/`m_ready`: the MEP word stream; `m_last` marks the last word of a MEP.
- `ev_raw_bank`, `ev_err_bank`, `mep_early_close`: monitoring outputs.
- `hist_clear`, `hist_busy`, `hist_addr`/`hist_rdata`, `hist_events`, `hist_skipped`: the histogram clear and read port.

Timing of the event builder:

- one cycle to capture an event and one to evaluate the error flags;
- then one word per cycle, with one extra cycle before each GOL block;
- the next event is accepted after the last word.

An event of W words with G enabled links therefore takes W + G + 2 cycles. The MEP builder writes one word per cycle, needs 3 cycles for the header, then reads one word per cycle. It does not accept events while it drains. At the note's budget of 80 words per event and 1.11 MHz L0 rate, about 200 MHz would be needed. The note specifies no clock.

Reset is asynchronous and active low; one clock domain.

## Inputs that the format leaves open

The note fixes the output, not its sources. These inputs are this design's reading:

- **OTIS header layout.** Only bit 19 (always 1) and the three status flags are given. This design assumes `{reserved[31:22], OTIS ID[21:20], 1, status[18:16], event counter[15:8], bunch counter[7:0]}`. Bytes 0..3 of a RAW fragment are header bits 7..0 … 31..24.
- **Hit flags.** How a channel byte is recognised as a hit is not part of the format. The receiver supplies a hit flag per channel.
- **Receiver flags.** The optical receiver produces these flags, and it is not part of this RTL: buffer full or empty, size error, TLK error, GOL ID mismatch, clock inactive, and per-OTIS expected-ID, offline and offline-zero. They are inputs.
- **Counter comparisons.** The OTIS bunch counter is compared with the low 8 bits of the TTC bunch counter. The OTIS event counter is compared with the low 8 bits of the L0 event ID.
- **PP error rule.** The note does not list which flags make a PP "in error". The rule above is this design's.
- **E1/E3 length.** "Length of the processed bank in this PP FPGA" is read as the bytes of that PP's GOL blocks.
- **Disabled PPs.** Links on a disabled PP are left out of the processed bank as well.

## Where this departs from the note

- The note's error-bank size example counts 8 words for each disabled PP and 60 words in all. Its own field description gives a disabled PP 7 words when no RAW bank is sent: W1, W2, E1, W3, E2, E3, E4. This design follows the field description, so that example gives 58 words.
- The note's zero-suppress size estimate (13.25 + 576 × occupancy words) leaves out the per-GOL padding that its bank-length rule requires. The RTL includes the padding. At 11.6 % occupancy random hits averaged 82.5 words per event instead of 80.
- Not built:
  - the optical receivers and event synchronisation;
  - the Ethernet output;
  - the TTC and ECS interfaces (the histogram read port is where the ECS access would connect).

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against a reference model in `tb/ot_ref_pkg.sv`, which builds the expected words field by field from the format tables:

- `tb_ot_gol_processor`: both modes at 0–100 % occupancy with output back-pressure, and the block length in cycles.
- `tb_ot_raw_pp_formatter`: all 233 words of random blocks.
- `tb_ot_event_info`: random faults; both clean and erroneous PPs occur.
- `tb_ot_error_pp_formatter`: all four section shapes.
- `tb_ot_bank_sizer`: random lengths, plus the note's hitmap example (a 48-word processed bank).
- `tb_ot_event_builder`: random configurations and events. It checks every word, the cycle count and each bank trigger.
- `tb_ot_mep_builder`: MEP factors 1, 3, 12 and 32, with full and early closing and back-pressure.
- `tb_ot_histogrammer`: random events, some offered while busy, then every counter read back. It also checks clearing and saturation, using a 4-bit copy.
- `tb_ot_tell1_formatter`: end to end at the default size, in four phases:
  - hitmap at MEP factor 12: exactly 197 bytes per event, as in the note's estimate;
  - zero-suppress at 11.6 % occupancy;
  - a forced error bank;
  - a random mix that exercises every mechanism: both GOL modes, links without hits, disabled links and PPs, RAW banks forced and by trigger 0x5, error banks forced and automatic, full and early MEP closing, and output stalls.
  - In every phase the histograms are read back and compared with the events the histogrammer took. This covers all hit counters, and in the last phase all drift bins.

Assertions in the event builder check that the GOL processor is idle when a block is started and that no word is sent beyond the precomputed event length. The MEP builder asserts that events start with `sop` and that its buffer never overflows.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ot_pkg.sv tb/ot_ref_pkg.sv tb/tb_ot_tell1_formatter.sv \
    --top-module tb_ot_tell1_formatter -o sim
obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=F`. The end-to-end test takes one to two minutes to compile, because the event record is wide, and a few seconds to run.

## Files

| file | content |
|---|---|
| `rtl/ot_pkg.sv` | sizes, constants, record types, header-word helpers |
| `rtl/ot_tell1_formatter.sv` | top: event builder + MEP builder + histograms |
| `rtl/ot_event_builder.sv` | event capture and bank sequencing |
| `rtl/ot_bank_sizer.sv` | bank and event lengths |
| `rtl/ot_gol_processor.sv` | GOL header + zero-suppressed / hitmap data |
| `rtl/ot_raw_pp_formatter.sv` | RAW block word selector (one PP) |
| `rtl/ot_event_info.sv` | W1..W17 and PP error flag |
| `rtl/ot_error_pp_formatter.sv` | error-bank section word selector (one PP) |
| `rtl/ot_mep_builder.sv` | MEP buffer, sub-headers and MEP header |
| `rtl/ot_histogrammer.sv` | per-channel hit and per-OTIS drift-time histograms |
| `tb/ot_ref_pkg.sv` | reference model and stimulus generators |
| `tb/tb_*.sv` | testbenches |
