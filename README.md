# Skeleton-driven protocol parser and an HDLC reception machine

A link-layer receiver has two kinds of work to do. The first is **syntax**:
finding where each field of a frame starts and stops, and delivering its
bits to whatever handles that field. The second is **semantics**: comparing
an address, decoding a command, checking a CRC, storing data. This design
keeps the two apart. A generic *protocol parser* does only the syntax. It
reads the layout of a frame from a small ROM and produces, for every field,
a serial "this bit belongs to me" signal and a set of parallel "a byte of me
is on the bus now" pulses. Small *real-time processing units*, one per
field, hang off those signals and do the semantics. To support another
frame format you change the ROM contents and the units, not the parser.

The RTL contains the parser itself, and a complete HDLC receiver built
around it. The receiver has flag detection, address and command
recognition, CRC-CCITT end-of-frame detection, data reception, a FIFO, a
DMA engine and a controller. All of it is synthesizable SystemVerilog, and
every block has a self-checking testbench.

## The frame skeleton

Number the bits of a frame from the first bit after the opening flag. Field
*i* ends at a bit position *b_i*. The rising sequence b_1 < b_2 < ... is
called the frame's **skeleton**, and it is the only thing the parser knows
about the protocol.

- **Storage.** The skeleton lives in `skeleton_rom`. The ROM holds
  `NSKEL` stages of `NF` terms each.
- **Selecting a stage.** The `index` input chooses the stage when a frame
  starts, so one parser can serve several frame formats.
- **Changing stage mid-frame.** Often the format is only known from a code
  inside the header. A *skeleton function-code* unit can then pulse
  `reload` with a new `index` once it has read that code. The address
  register moves to the same field of the new stage. The bit counter keeps
  running. The new stage's end for the current field must still lie ahead
  of the bit count.
- **Shorter skeletons.** A stage with fewer fields than `NF` is padded with
  zero terms. A zero term means "skeleton ended".
- **Stepping through the terms.** `field_limits` holds a term address
  register and a frame bit counter. The address register loads `index*NF`
  at start and steps by one at each field end. The counter is compared
  with the current term. The comparator's `match` fires on the bit that
  ends the current field.

Some fields have no fixed length, such as an HDLC information field. For
these, the ROM holds the longest length allowed, and a processing unit
ends the frame early with `stop`. In the HDLC receiver, the CRC unit does
this when it sees a valid remainder.

## Serial and parallel activations

For field *i* the parser drives two kinds of output:

- **Serial.** `sr_act[i]` is high for each bit of the field.
  `sr_data[i] = sr_act[i] & din` is a gated copy of the line, intended for
  units that work bit by bit (CRC, flag checks).
- **Parallel.** The line is also deserialized into `W`-bit words. Word
  boundaries count from the start of the frame, so a field need not be
  aligned to them. When a word closes (a *segment boundary*), every field
  with bits in that word gets one pulse on one of three lines, with its
  bits masked into `pf_data[i]`.

The pulse line depends on how the field sits against the W-bit segments.
There are five cases:

| case | field shape | pulses |
|---|---|---|
| ty1 | shorter than W, starts on a boundary | one, on `PA_FIRST` |
| ty2 | shorter than W, ends on a boundary | one, on `PA_FIRST` |
| ty3 | shorter than W, strictly inside one segment | one, on `PA_FIRST` |
| ty4 | at most 2W, cut by exactly one boundary | `PA_FIRST`, then `PA_NEXT` one segment later |
| ty5 | spans three or more segments | `PA_FIRST`; `PA_NEXT` for every later segment while the field continues; `PA_LAST` for the segment in which it ends |

The pulses use separate wires rather than one shared strobe, because each
one typically loads a different register in the unit. The parallel
controller does not store a field's type. It works the type out as the
frame runs, from three things:

- the count of segments the field has closed so far (0, 1, or 2 or more);
- whether the field has already ended;
- the field's bit mask in the current segment.

A field that is cut off by `stop` never gets its `PA_LAST` pulse. For the
HDLC information field this is intended: the end of that field is
signalled by CRC detection instead. The one exception is a frame with the
largest information field. There, the last FCS bit is also the skeleton's
last term, so `PA_LAST` does fire.

### Timing

- **Input.** One bit per clock with `din_valid`. Idle cycles (gaps) may
  appear anywhere.
- **Serial outputs.** `sr_act` and `sr_data` are combinational. They are
  valid in the same cycle as the bit.
- **Parallel outputs.** The segment that bit *k* completes produces its
  `pr_act` pulse, `pf_data` and the `data_bus` word in the cycle after the
  edge that takes bit *k*. Each pulse is one clock long.
- **Partial segment at the end.** If the skeleton ends, or `stop` arrives,
  with a partial segment still open, that segment is flushed one cycle
  later. Its pulse then carries only the bits received.
- **start.** `start` loads the stage and clears all state. The first
  frame bit may arrive in the next cycle.

## Inside the parser

`protocol_parser` is a netlist of seven blocks:

- `skeleton_rom`: a constant table of `NSKEL*NF` terms with a
  combinational read.
- `field_limits`: the term address register (with load, reload and +1),
  the frame bit counter and the comparator.
- `serial_controller`: tracks the current field and the busy, ended and
  stopped states. It makes `active` (the bit belongs to a field), `advance`,
  `skel_end` and `flush`.
- `serial_field_supply`: decodes the current field into `sr_act`, and
  gates the line into `sr_data`.
- `deserializer`: a W-bit shift register with a bit position counter. It
  makes `seg_close` and the word being assembled, and registers the word
  onto `data_bus`.
- `parallel_controller`: per-field mask and segment count, and the pulse
  rules above.
- `parallel_field_supply`: registers the pulses and the masked field words.

## The HDLC reception machine

`reception_machine` is the top level. It receives frames of the form
flag / address (8) / command (8) / information (0..N bytes) / FCS (16).
Zero removal (bit destuffing) is assumed to have happened before the
design input `line_in`.

The ROM has two stages:

- **stage 0**: {8, 16, 16 + 8·(`MAX_INFO_BYTES`+2)}, which is a data frame
  whose last field holds the information bytes plus the FCS;
- **stage 1**: {8, 16, 32}, which is a frame with no information field.

With the default of 256 bytes, the stage 0 end term is 2080 bits. The ROM
contents are computed from the parameters.

Per frame:

1. **Opening flag.** `som_detector` finds the opening flag 01111110 and
   `general_control` starts the parser.
2. **Repeated flags.** A flag that arrives where the address should be is
   taken as another opening flag, and the frame restarts. This allows
   repeated flags, and a closing flag shared with the next opening flag.
3. **Address.** `address_recognition` compares the address byte (on its
   `PA_FIRST` pulse) with `station_addr`. It also accepts the all-stations
   address 0xFF.
4. **Command.** `command_recognition` decodes the command byte. Bit 1 = 0
   means an I frame, with N(S) and N(R). Bits 2..1 = 01 means an S frame,
   with the supervisory code and N(R). Bits 2..1 = 11 means a U frame,
   with its 5 modifier bits. The P/F bit is also extracted.
5. **Stage choice.** Every frame starts in stage 0. On the command byte's
   pulse, `skeleton_code_recognition` reloads the parser to stage 1 for S
   frames, and for U frames other than UI, FRMR, XID and TEST. Those four
   are the U commands that can carry information; the set is a parameter.
   The chosen stage is shown on the `stage` output.
6. **CRC and end of frame.** `crc_unit` runs CRC-CCITT serially over
   every frame bit, from the first address bit on:
   - reflected polynomial 0x8408, preset 0xFFFF, bits taken LSB first;
   - when the register equals the good-frame remainder 0xF0B8 on a byte
     boundary, at 32 bits or more into the frame, it raises `crc_ok`;
   - `crc_ok` stops the parser and ends the frame.

   The length of the information field is therefore found from the CRC,
   not from a length field.
7. **Data.** `data_receiver` takes the data field byte by byte and holds
   back the two newest bytes. When the frame ends, the two it still holds
   are the FCS and are discarded. Every other byte goes to the FIFO, but
   only if the address matched.
8. **FIFO.** `fifo_buffer` is a 16-word first-word-fall-through FIFO. A
   write into a full FIFO is dropped and flagged.
9. **DMA.** `dma_unit` moves words to consecutive shared-memory addresses
   from `dma_base`, over a `mem_req`/`mem_gnt` handshake. `mem_req`,
   `mem_addr` and `mem_wdata` stay stable until granted.
10. **Report.** If the skeleton runs out with no CRC detection, the frame
   is reported as a length error. A data frame with a bad FCS therefore
   runs on to 2080 bits, while a short frame with a bad FCS stops at 32.
   One cycle after the frame ends, `frame_done` pulses. `frame_status` then holds `crc_ok`, `len_error`,
   `addr_match`, `overflow` and the information byte count until the next
   frame is done.

**Latency.** `frame_done` is high after the second clock edge following
the edge that takes the last FCS bit.

**Line rules** the receiver relies on:

- Between frames the line must carry flags, not idle ones. After bit
  destuffing, a run of ones after a closing flag looks like the start of
  a new frame.
- An address byte of 0x7E cannot be told apart from a flag, because no
  stuffing is done at this level.

## What is this design's own

The following are not fixed by the architecture. They were chosen here:

- The second skeleton stage, the mid-frame reload, and which U commands
  count as carrying information. The architecture treats HDLC as a purely
  static frame with one skeleton. Stage selection from the command is added
  here to exercise the multi-stage ROM. For error-free frames the result
  is the same either way, because the CRC ends the frame. Only a short
  frame with a bad FCS ends sooner.
- The segment-count way of deciding pulse lines, and the flush of a
  partial last segment.
- The bit order of the parallel words: the first bit received becomes
  bit 0.
- The CRC end-detection rule (byte boundary, at least 32 bits).
- The two-byte hold-back, and gating FIFO writes on address match.
- The controller's states (IDLE, RUN, REPORT), the status word, and the
  restart on a flag in the address field.
- The FIFO depth, drop-on-full overflow, the DMA handshake and the memory
  address width.
- Synchronous active-low reset everywhere.

## Not included

These parts are outside this RTL:

- the line interface, clock recovery and zero removal;
- the transmitter;
- the host processor and its memory, for which a testbench model stands
  in;
- dynamic skeletons, whose terms would be computed from the contents of
  earlier fields. Only switching between precomputed stages is built.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 8 | parallel word width |
| `NSKEL` | 2 | skeleton stages in the ROM |
| `MAX_INFO_BYTES` | 256 | longest information field (sets the stage 0 end term) |
| `FIFO_DEPTH` | 16 | FIFO words |
| `MEM_AW` | 16 | shared-memory address width |

`protocol_parser` can be used on its own with any `NF` and any `TERMS`
table. Terms are 16 bits wide (`CNT_W`).

## Files

- `rtl/parser_pkg.sv`: shared constants, pulse line numbers, and the
  command and status structs.
- `rtl/*.sv`: one module per file, named as above.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
  - `tb_protocol_parser` checks against a bit-level reference model. It
    uses a six-field skeleton that contains every field type.
  - `tb_reception_machine` runs the top at its default parameters. It
    sends a hand-checked reference frame (address 0x55, command 0x10,
    information 0xC3 0x3C, FCS bytes 0x27 0xD9), followed by:
    - random I, S and U frames, including one with a 256-byte information
      field and U frames that carry information;
    - frames for other stations and for the broadcast address;
    - corrupted FCSs in a data frame and in an S frame;
    - a FIFO overflow;
    - memory stalls, line gaps and shared flags.

    It counts each of these and fails if one never happened. It checks
    every status word, the latency, the decoded commands and every byte
    written to memory.

## Simulating

With Verilator 5, for any testbench:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/parser_pkg.sv $(ls rtl/*.sv | grep -v parser_pkg) \
    tb/tb_reception_machine.sv --top-module tb_reception_machine -Mdir obj
./obj/Vtb_reception_machine
```

Replace `tb_reception_machine` with any other `tb_<module>` to run that
block's test. The testbenches draw their stimulus from `$urandom`. Runs
are repeatable with Verilator's default seed; add `+verilator+seed+N` at
run time for another stream. No testbench reads any file.
