# Fault-tolerant FPGA memories: TMR, duplication with codes, SEC/DED and scrubbing

In an SRAM-based FPGA a radiation-induced single-event upset (SEU) can flip
two kinds of bits. One is a bit of user memory: a block RAM (BRAM), a LUT used
as RAM (LUTRAM) or a LUT used as a shift register (SRL). The other is a
configuration bit, which can change the logic around that memory.

Both are dangerous, but the second is worse. If an upset corrupts a BRAM's
write enable, the BRAM can overwrite word after word with garbage. When the
configuration bit is later repaired, the garbage stays, because restoring the
bitstream does not restore user data. Such a failure is called **critical**:
only reconfiguring the device and reloading the memory repairs it.

This RTL implements a family of memory protection schemes for 16-bit words.
With them you can build the same memory several ways and trade area against
protection:

| scheme | stored per 16-bit word | what it does with an error |
|---|---|---|
| TMR | 3 x 16 bits | a 2-of-3 vote masks any error in one copy |
| parity + duplication | 18 (encoded) + 16 (plain) | parity detects the error; the other copy is used |
| complement duplicate (CD) + duplication | 32 + 16 | detects; uses the other copy |
| SEC/DED | 22 | corrects single errors, detects double errors |
| SEC/DED + duplication | 22 + 16 | corrects or detects; otherwise uses the other copy |

Each scheme on its own can only *mask* an error. The upset stays in the
memory, and a second upset in the same word defeats the scheme. **Scrubbing**
goes further: it writes the good value back. Scrubbing is also the only thing
that undoes a critical failure in memory contents, provided each copy's write
enable comes from independent logic. That independence means one upset can
spoil at most one copy.

The main design pairs TMR with scrubbing: `tmr_bram_scrubber` for BRAMs and
`tmr_lutram_scrubber` for LUTRAMs. For SRLs, `tmr_srl` is TMR with voted
feedback. The other schemes are built alongside as cheaper alternatives.

## Building blocks

- `ftmem_pkg` holds what the modules share:
  - sizes: `DATA_W` = 16, `BRAM_DEPTH` = 1024, `LUT_DEPTH` = 16;
  - the code enumeration `code_e` and its widths (`cw_width`);
  - the SEC/DED bit map (`secded_pos`);
  - the code word of zero (`cw_of_zero`);
  - the request structs the top uses.
- `bram_dp` is a dual-port block RAM with synchronous, read-first ports.
  - Port A belongs to the user and port B to the scrubber.
  - If both ports write one address in the same clock, port A wins.
- `lutram` has one synchronous write port and an asynchronous read port.
- `srl` is a shift register with a clock enable and a tap address. Its output
  is the stage the address selects.
- `tmr_voter` is a bitwise 2-of-3 majority voter. It also raises `mismatch`
  when the three inputs are not all equal.
- `triple_counter` is three copies of an address counter.
  - Each copy loads the vote of all three copies, plus one when its own voted
    enable is set.
  - One upset counter copy is therefore pulled back into step on the next
    count.
  - The scrubbers use it to walk the address space.
- `edc_encoder` / `edc_decoder` implement the three codes described in the next
  section.

## The codes

All code words are stored with the data bits unchanged in the low bits where
that applies. This keeps plain copies and encoded copies easy to compare.

- **Interlaced parity (18 bits):** `{p1, p0, data}`.
  - `p0` covers the even data bits and `p1` the odd ones.
  - Each parity bit makes its group, including itself, hold an odd number of
    ones.
  - It detects any single-bit error and any error with an odd count in either
    group.
  - Two adjacent flipped bits fall into different groups, so they are detected
    too.
- **Complement duplicate (32 bits):** `{~data, data}`.
  - The word is valid only if the two halves are exact complements.
  - It detects all-zero and all-one words, and any error that does not flip a
    bit and its partner together.
- **SEC/DED (22 bits):** a (22,16) extended Hamming code.
  - `cw[21:1]` is a Hamming code word addressed by position: check bits sit at
    positions 1, 2, 4, 8 and 16, and the 16 data bits fill the remaining
    positions in ascending order.
  - `cw[0]` is the overall parity.
  - Decoding:
    - A non-zero syndrome with the overall parity wrong is a single error. The
      decoder flips that bit and raises `corr`.
    - A non-zero syndrome with the overall parity right is a double error. The
      decoder raises `err`.
    - An error in `cw[0]` alone is also a corrected single error.

The decoders output `err` when the code found an error it cannot repair. For
parity and CD that is every error; for SEC/DED only double errors.

An encoded memory powers up holding the code word of zero. That way, a word
that has never been written still decodes without error.

## Protection without scrubbing

- `tmr_memory` stores three copies of a BRAM (`BRAM=1`, one read-clock latency)
  or a LUTRAM (`BRAM=0`, combinational read).
  - With `TRIPLE_VOTERS=1`, each domain has its own voter and output.
  - With `TRIPLE_VOTERS=0`, one voter drives all three outputs.
- `dup_edc_memory` stores one encoded copy and one plain copy.
  - On a read it decodes the encoded copy.
  - If that copy reports an error, the plain copy's word is output instead.
  - `err` tells the user that the switch happened.
- `ecc_memory` stores one SEC/DED-encoded copy and outputs the corrected word,
  `corr` and `err`.
- `dup_edc_memory_tl` and `ecc_memory_tl` are the same two schemes with
  triplicated logic.
  - Each domain has its own decoder (and, for duplication, its own output
    multiplexer), and drives its own `dout[d]` and flags.
  - The encoders are triplicated too. A voter over their three code words
    drives the memory's single write port.
  - The memories and the inputs stay single. An upset on an input is written
    consistently into every copy, so triplicating the logic cannot remove it.
- `tmr_srl` holds three SRLs, one per domain, each with a voter on its output.
  - With `fb=1`, each SRL is fed its domain's *voted* output. A stage upset in
    one copy is then replaced by the majority the next time it goes round,
    which is the repair an SRL can get.
  - With `fb=0`, the SRLs take new input data and an upset stage simply
    shifts out.
- `edc_srl` applies the codes to an SRL.
  - The input word is encoded and shifted through an SRL of code words, then
    decoded at the tap.
  - With `DUP=1`, a plain SRL shifts alongside. Its word is output when the
    decoder reports an uncorrectable error.
  - In feedback mode the output word is encoded again and fed back. A
    corrected word, or one taken from the plain copy, therefore re-enters both
    SRLs clean.
  - `edc_srl_tl` is the same with triplicated logic: per-domain feedback
    multiplexers, encoders, decoders and outputs, with voters in front of the
    two single SRLs.
  - The top builds four variants: parity + duplication, CD + duplication,
    SEC/DED, and SEC/DED + duplication.

## Scrubbing BRAMs

A BRAM scrubber uses the BRAM's second port. The user keeps port A and so
sees a single-port memory. A triple counter steps through every address, and
the scrub logic reads the word there through port B.

### TMR BRAM scrubber (`tmr_bram_scrubber`)

Every domain `d` (0, 1, 2) has four parts:

- its own BRAM;
- its own voter on the three port-B read words;
- its own scrub FSM (`bram_scrub_fsm`);
- its own output voter on the three port-A read words.

The scrub controller is a two-stage pipeline on port B:

1. **Read:** in every clock without a repair, the counter address goes onto
   port B and the counter moves on. The controller remembers the address as
   the one to check.
2. **Check:** one clock later the three words for that address are back and
   voted.
   - If they agree, nothing else happens, and the read of the next address is
     already under way. A clean address therefore costs **one clock**, and a
     sweep of 1024 words takes **1024 clocks**.
   - If they disagree, this clock becomes a **repair**. Each domain switches
     port B to the checked address and writes *its own* voted word into *its
     own* BRAM. The counter holds, so the address it shows is read in the next
     clock instead. A repaired word costs one extra clock.

Only one domain's logic decides each write enable. An upset in one domain's
FSM or counter copy can therefore damage only that domain's BRAM, and the
other two domains' votes repair it on the next sweep.

A user write to the address being scrubbed wins. If it comes while that
address is being read or checked, the repair is cancelled. The voted word read before the user write is stale, and the user
write has already put the right value in all three copies.

Reset (`rst_n`, synchronous, active low) only affects the scrub logic. While
it is asserted, no scrub write is issued, whatever state the FSM powered up
in.

### Duplication-with-code BRAM scrubber (`dup_edc_bram_scrubber`, `dup_scrub_fsm`)

Here both copies are encoded with the same code (`CODE` parameter). Only the
two memories are single. The encoders, decoders, selection and FSMs are built
once per domain, and each domain has its own outputs `dout[d]` and `err[d]`.
Wherever the three domains drive one input of a copy (its write data), that
copy has its own voter in front of the input.

- **Reads:** port A returns copy 0's decoded word, unless copy 0 reports an
  uncorrectable error. In that case it returns copy 1's. `err` means both
  copies failed.
- **Scrub check:** port B decodes both copies at the scrub address and picks
  the good word by the same rule.

A code cannot see every error. For example, a write enable upset can store a
valid but wrong code word, such as all zeros under SEC/DED. So one detected
error is taken as a sign that others may be hidden. The FSMs switch to
**full-scrub mode** and rewrite *every* address, re-encoding the good word
into both copies. This starts at the address where the error was seen and
continues until the counter comes back to it.

Timing:

- A clean read sweep costs two clocks per address.
- Full-scrub mode costs three clocks per address.
- Each copy's scrub write enable is a majority of three independent FSM
  copies.
- No write is issued when both copies fail, or when a user write hits the
  address.

## Scrubbing LUTRAMs

LUTRAMs are small (16 words). They are scrubbed only when read, which needs
much less logic than a walking counter. Every clock without a user write
counts as a read of `addr`. If the word read there needs repair, it is
rewritten at the next clock edge through a multiplexer in front of the LUTRAM
write port.

- `tmr_lutram_scrubber`: each domain compares its own word with its voted
  word and rewrites its own copy when they differ.
- `dup_edc_lutram_scrubber`: two encoded copies.
  - The output comes from copy 0 unless copy 0 reports an uncorrectable error.
  - A copy that reports any error, including a corrected one, is rewritten
    with the output word encoded again.
  - `dbl_err` means both copies failed; nothing is written then.
- `dup_edc_lutram_scrubber_tl`: the same scheme with all logic triplicated.
  - Each domain has its own encoders, decoders, output selection and repair
    decision, and its own outputs `dout[d]` and `dbl_err[d]`.
  - Each copy's single write port gets voted write data.
  - Its write enable is the user write or the majority of the three domains'
    repair decisions.
- `ecc_lutram_scrubber`: one SEC/DED copy. A corrected single error is written
  back, so that it cannot pair with a later second upset. A double error is
  only flagged.
- `ecc_lutram_scrubber_tl`: the same with triplicated logic.
  - Each domain has its own encoders and decoder, and its own outputs.
  - The single LUTRAM's write port takes voted data.
  - Its write enable is the user write or a majority of the three domains'
    `corr` flags.

## The top module

`ftmem_top` has no parameters. It places the protected memories side by side,
each with its own ports.

| instance | module | size |
|---|---|---|
| `u_bram_scrub` | `tmr_bram_scrubber` | 1024 x 16 |
| `u_lut_scrub` | `tmr_lutram_scrubber` | 16 x 16 |
| `u_srl` | `tmr_srl` | 16 x 16 |
| `u_tmr_bram` | `tmr_memory` without scrubbing | 1024 x 16 |
| `g_code[c].u_dup` | `dup_edc_memory` | 1024 x 16, for parity, CD and SEC/DED |
| `u_ecc` | `ecc_memory` | 1024 x 16 |
| `g_code[c].u_dupx` | `dup_edc_memory_tl` | 1024 x 16, for each code; shares the inputs of `u_dup` |
| `u_eccx` | `ecc_memory_tl` | 1024 x 16; shares the inputs of `u_ecc` |
| `g_code[c].u_dups` | `dup_edc_lutram_scrubber` | 16 x 16, for each code |
| `g_code[c].u_dupb` | `dup_edc_bram_scrubber` | 1024 x 16, for each code |
| `u_eccs` | `ecc_lutram_scrubber` | 16 x 16 |
| `g_code[c].u_dupt` | `dup_edc_lutram_scrubber_tl` | 16 x 16, for each code |
| `u_ecct` | `ecc_lutram_scrubber_tl` | 16 x 16 |
| `g_esrl[v].u_esrl` | `edc_srl` | 16 x 16; the four variants share one set of inputs |
| `g_esrl[v].u_esrlx` | `edc_srl_tl` | 16 x 16; shares the inputs of `u_esrl` |

Requests use the `bram_req_t` and `lut_req_t` structs (`we`, `addr`, `data`).
The triplicated designs return `dout[3]`, one word per domain.

Storage used, in bits:

| design | bits |
|---|---|
| TMR | 49152 |
| parity + duplication | 34816 (36864 when scrubbed) |
| CD + duplication | 49152 (65536 when scrubbed) |
| SEC/DED | 22528 |
| SEC/DED + duplication | 38912 (45056 when scrubbed) |

## Where this design departs or stops

- **Parity and the all-ones word.** The parity is *odd*: each group, including
  its parity bit, holds an odd number of ones. With 8 data bits per group, an
  all-zero stored word is invalid and therefore detected. An all-ones stored
  word, however, has 9 ones per group and is valid. So odd interlaced parity
  over 16 data bits cannot catch an all-ones upset. The RTL keeps odd parity,
  and its testbench expects the all-ones word to pass.
- **Triplicated logic.** All the code-based scrubbers have a
  triplicated-logic form:
  - `dup_edc_bram_scrubber`;
  - `dup_edc_lutram_scrubber_tl`;
  - `ecc_lutram_scrubber_tl`.

  So do the code-based designs without scrubbing: `dup_edc_memory_tl`,
  `ecc_memory_tl` and `edc_srl_tl`. In these, the memory or SRL has a single
  write port, so one voter merges the three domains in front of it. That
  voter, like the single inputs, remains a single point of failure.
- **Not built:**
  - a SEC/DED-only BRAM scrubber (one encoded copy cannot overcome a
    write-enable upset, so it is not a useful design);
  - the unprotected baseline memories;
  - the vendor ECC BRAM primitive.
- **Physical layout.** A 22-bit SEC/DED word is kept as one 22-bit array here.
  In a real device it would be split into two 11-bit halves over two 18-bit
  BRAMs, which synthesis or a wrapper would do.
- **Scrub rate.** The TMR BRAM scrubber sweeps 1024 words in 1024 clocks,
  plus one clock per repair, which keeps repairs within a window of about
  2000 clocks. The duplication scrubbers are slower. They need up to one read
  sweep (2048 clocks) to find an error, then a full rewrite (3072 clocks), so
  a deadline of 2000 clocks is met only when the error is found early in a
  sweep.
- **Per-bit LUTRAM write enables** (which limit a write-enable upset to one bit
  per word) are not modelled; every LUTRAM has one write enable per word.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. A few
exceptions:

- `tb_edc_codec` covers both the encoder and the decoder.
- `tb_dup_edc_bram_scrubber` also covers `dup_scrub_fsm`.
- `tb_ftmem_top` exercises the whole top at full size. It:
  - injects upsets into all memories, by writing into the arrays through
    hierarchical references;
  - mixes in user traffic, including writes aimed at the scrub address;
  - compares every output with a reference model;
  - counts how often each mechanism fired: voter masking, BRAM scrub repair,
    user-write precedence, LUTRAM repair, SRL feedback repair, duplicate
    switch-over, SEC/DED correction and detection, full-scrub writes,
    code-protected SRL switch-over and correction, repair in the
    triplicated LUTRAM scrubbers, and switch-over and correction in the
    triplicated BRAMs and SRLs without scrubbing.

  A mechanism that never fired counts as a failure.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

With Verilator 5:

```sh
verilator --binary --timing -Irtl -y rtl rtl/ftmem_pkg.sv tb/tb_ftmem_top.sv \
          --top-module tb_ftmem_top -Mdir obj_top
./obj_top/Vtb_ftmem_top
```

Replace `tb_ftmem_top` with any other testbench name. The package must be
listed first; the other modules are found through `-y rtl`.

Testbenches drive inputs at the falling clock edge and check just after the
rising edge. Upsets are injected by XOR-ing bits of the memory arrays, for
example `dut.u_bram_scrub.g_dom[1].u_bram.mem[a]`.
