# Hybrid Hamming + CRC error detection and correction

This design protects 32-bit data words on a noisy link with two codes stacked
on top of each other:

* An **inner Hamming code** corrects any single flipped bit at the receiver
  straight away. This is forward error correction, so no round trip is needed.
* An **outer CRC-8** catches what the Hamming code cannot fix. The receiver
  then asks the sender to transmit the word again (automatic repeat request).

Together they form a hybrid ARQ scheme. The common case, one flipped bit, is
repaired locally. Heavier damage still cannot slip through silently, because
it triggers a resend.

```
 datain[31:0] ─► CRC-8 generator ─► {data, crc}[39:0] ─► Hamming encoder ─► 46-bit word
                                                                               │
                                                                      transmission medium
                                                                               │
 received[31:0] ◄─ data part ◄─ {data, crc}[39:0] ◄─ Hamming decoder ◄─────────┘
 retrans[7:0]   ◄─ CRC check ◄──────┘                 └─► sedandc (a bit was corrected)
```

## Word format

**CRC.** The divisor is x^8 + x^2 + x + 1, written as the 9-bit value `0x107`.
This is the CRC used for the ATM cell header check. The 32-bit data word is
multiplied by x^8 and divided modulo 2 by this divisor. The 8-bit remainder is
placed below the data, which gives the 40-bit message `{data[31:0], crc[7:0]}`.
The remainder is plain: there is no initial value and no final inversion.

**Hamming code.** The 40-bit message gets 6 even-parity check bits, which gives
46 bits in total. Six is the smallest r with 2^r ≥ 40 + r + 1. The bits are
numbered by code position, 1 to 46:

* The check bits R1, R2, R4, R8, R16 and R32 sit at positions 1, 2, 4, 8, 16
  and 32.
* The message fills the other positions in order. Message bit 39 (the top data
  bit) goes to position 3, bit 38 to position 5, then positions 6, 7, 9, and so
  on. The last CRC bit lands at position 46.
* Check bit R(2^j) is the XOR of the message bits whose position has bit j set.

On the ports, **position 1 is the most significant bit**: `word[45]` is
position 1 and `word[0]` is position 46. Read as a hex number, the word
therefore starts at position 1.

Examples, with divisor `0x107`:

| data       | CRC  | 46-bit word      |
|------------|------|------------------|
| `87654321` | `D5` | `3C5DCA8661D5`   |
| `AAAAAAAA` | `69` | `1D2AD5556A69`   |
| `FFFFFFFF` | `DE` | `3FBFFFFFBFDE`   |
| `1A2B3C4D` | `B5` | `20A896788DB5`   |
| `F0F0F0F0` | `A5` | `0F83E1E1B0A5`   |
| `198491AD` | `DF` | `20A649236DDF`   |
| `FEDCBA98` | `1E` | `1BBB7975181E`   |
| `13579024` | `72` | `208D2F202472`   |

## What the receiver does with a damaged word

**Syndrome.** The decoder first computes the 6-bit syndrome. Syndrome bit j is
the XOR of every received bit whose position has bit j set, check bits
included. Put another way, the syndrome is the XOR of the positions of all the
1 bits in the word.

**Correction.** If the syndrome is non-zero, the decoder inverts the bit at the
position the syndrome names and raises `sedandc`. It then drops the check bits.
The CRC checker takes the 40-bit message that is left, multiplies it by x^8 and
divides it by the divisor. The remainder comes out on `retrans`: `00` means
the frame is good, and any other value means "send it again".

What happens for each kind of error:

| what the channel did | syndrome | result |
|---|---|---|
| nothing | 0 | data out, `sedandc=0`, `retrans=00` |
| one bit flipped | position of that bit | bit fixed, data out, `sedandc=1`, `retrans=00` |
| two bits flipped | XOR of the two positions, non-zero | a third, wrong bit is inverted; the CRC always catches the result: `sedandc=1`, `retrans≠00` |
| a burst of adjacent flips, up to 6 bits long | usually non-zero | always caught by the CRC (checked exhaustively over all positions and patterns) |
| longer bursts and heavier damage | anything | usually caught; a few patterns escape (for example 1 of the 1280 bursts of length 7, and 7 of the 2496 of length 8) |

Three points are easy to get wrong:

* **`sedandc` means "the syndrome was non-zero"**, not "the word is good".
  With two or more errors the decoder still "corrects" a bit and raises
  `sedandc`. It is `retrans` that tells whether the data can be used.
* **`received` is not blanked** when `retrans≠00`. It carries the data bits of
  the miscorrected message. For example, `1D2AD5556A65` gives
  `received=BAAAAAAA` and `retrans=16`.
* **The checker divides the message extended by 8 zero bits**, just as the
  generator treats the data word. For a good frame this makes no difference:
  `{data, crc}` is a multiple of the divisor, and so is any shifted copy. For a
  bad frame it sets which non-zero value appears on `retrans`. This form gives
  the published request values `16`, `6C`, `A8` and `9E` for the four
  multi-bit examples; dividing the bare 40-bit message does not.

Syndromes 47 to 63 name no position, so no bit is inverted for them.

## Timing

Both ends have one clock and no reset. Inputs are sampled on the rising edge.

* **Transmitter:** the 32-bit data word is registered (32 flip-flops). The CRC
  and the Hamming encoder are combinational behind that register. `outputdata`
  shows the code of the word sampled at the last rising edge. A change on
  `div` shows up immediately.
* **Receiver:** `received` and `retrans` are registered (32 + 8 = 40
  flip-flops), so they show the result for the word that was on `hamin` before
  the last edge. `sedandc` is combinational from `hamin`.
* **Through the top,** with the medium simply passing the word on, a data word
  reaches `received` two rising edges after it is applied to `datain`.

The throughput is one word per clock.

## Modules

| module | file | role |
|---|---|---|
| `edac_pkg` | `rtl/edac_pkg.sv` | sizes (32, 8, 40, 6, 46), the divisor `0x107`, the check-bit count function |
| `crc_generator` | `rtl/crc_generator.sv` | combinational CRC remainder of the data word |
| `hamming_encoder` | `rtl/hamming_encoder.sv` | combinational 40 → 46 bit even-parity Hamming encoder |
| `transmitter` | `rtl/transmitter.sv` | data register + CRC generator + Hamming encoder |
| `hamming_decoder` | `rtl/hamming_decoder.sv` | combinational syndrome, single-bit correction, check-bit removal |
| `crc_checker` | `rtl/crc_checker.sv` | combinational CRC remainder of the corrected message |
| `receiver` | `rtl/receiver.sv` | Hamming decoder + CRC checker + output registers |
| `hybrid_edac_top` | `rtl/hybrid_edac_top.sv` | both ends side by side |

The leaf modules take their sizes as parameters. The defaults are the
configuration above. The Hamming modules check at elaboration time that N is
K plus the number of check bits K needs.

The ports of `transmitter` (`clk`, `div`, `datain`, `outputdata`) and
`receiver` (`clock`, `divisor`, `hamin`, `received`, `retrans`, `sedandc`) keep
the names of the original interface. `divisor` and `div` are 9-bit inputs.
They carry the full polynomial with its x^8 bit set, and both ends must use
the same value. The logic divides by whatever the input carries, but only
`0x107` has been checked against published values.

### What is outside the top

`hybrid_edac_top` does not model the transmission medium. The transmitter
output comes out on `tx_word`, and the receiver input goes in on `rx_word`.
Connect them directly for a clean link, or through an error model.

The repeat request is also not closed inside the design. The transmitter has no
input for it, so whatever drives `datain` must watch `retrans` and present the
same word again while `retrans` is non-zero. The end-to-end testbench does
exactly this.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops. The shared reference models are in `tb/edac_ref_pkg.sv`. They are
written differently from the RTL on purpose:

* a bit-serial CRC shift register instead of long division;
* the "XOR of the positions of the 1 bits" view of the Hamming code.

The package also holds the example words above and sixteen received words:
clean, one bit flipped, and several bits flipped.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_receiver \
    rtl/edac_pkg.sv tb/edac_ref_pkg.sv rtl/*.sv tb/tb_receiver.sv -Mdir obj -o sim
./obj/sim
```

| testbench | what it covers |
|---|---|
| `tb_crc_generator` | example CRCs; random words and random divisors against the serial model |
| `tb_hamming_encoder` | example codes; every one-hot message; random messages; zero syndrome on every output |
| `tb_hamming_decoder` | every single-bit error position on 200 random words; double errors; example received words |
| `tb_crc_checker` | good frames give 0; the example request values; single flips always detected; random divisors |
| `tb_transmitter` | example codes and random words; the output must not change before the clock edge and must be right after it |
| `tb_receiver` | the sixteen example received words; random words with 0, 1 or 2 flips; `sedandc` at once, registered outputs one edge later |
| `tb_hybrid_edac_top` | end to end at the default sizes: 400 frames whose first attempt is clean, has one flip, two flips, or a 3 to 6 bit burst, resent until `retrans=00`; every frame must arrive intact, and each mechanism (clean delivery, single-bit correction, repeat request, resent frame) must occur |

All of them run in well under a second.

## Choices made in this design

The following points are this design's own choices, not part of the method:

* **Which signals are registered.** The transmitter registers the input data
  word and the receiver registers `received` and `retrans`. These were chosen
  to match the reported flip-flop counts of 32 and 40.
* **No reset.** Neither end has one.
* **Tie-off of unused syndromes.** Syndromes above 46 are ignored.
* **Split top.** The top is split at the medium, and the repeat loop is left
  to the user.

Two published example outputs differ from this RTL:

* For the double error on `AAAAAAAA` (`1D2AD5556A65`), one listing gives the
  output data as `AAAAAAAA`, while the simulation trace for the same word shows
  `BAAAAAAA`. The RTL gives `BAAAAAAA`.
* For the double error on `FEDCBA98` (`1BBB79751B1E`), the output is listed as
  `7EDCBA98`. The RTL gives `7EDCBA9B`. This is the word whose CRC remainder is
  the listed request value `A8`.

One published code for `FFFFFFFF` has a 13th hex digit (`3FBFFFFFFBFDE`). The
46-bit code is `3FBFFFFFBFDE`.
