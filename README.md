# PCM1024Z encoder and decoder in SystemVerilog

PCM1024Z is the digital radio-control format of Futaba's PCM transmitters
and receivers. A transmitter sends the positions of eight proportional
channels (10 bits each) and a few switch channels about 35 times a second.
Each frame lasts 28.5 ms and holds 190 line bits of 150 µs each. The format
packs this into very few bits. In each frame a channel gets either its full
10-bit position or a 4-bit "delta" code, and the two alternate from frame to
frame. Failsafe settings have no frames of their own: they are slipped into
normal frames in place of some positions. Every 16-bit datapacket carries an
8-bit CRC. The line code never produces an isolated 0 or 1, and every other
pair of frames is sent inverted to keep the signal free of DC.

This repository holds synthesizable RTL for both ends of the link:

* **Transmitter** (`pcm_transmitter`): channel values and failsafe settings
  in, the unmodulated 190-bit frame stream out. This is the signal a
  transmitter puts on its trainer port and feeds to its FSK modulator.
* **Receiver** (`pcm_receiver`): the demodulated bit stream in; servo
  positions, switch channels, received failsafe settings and failsafe status
  out.

`pcm1024z_top` places the two side by side. The radio in between is not part
of the design: connect `tx_line` to `rx_line` for a loop-back, or put a
channel model between them.

## The full frame

A full frame, first bit on the left:

```
 even: 110000 | 111111111111111111 | 000011   | 4 x 40 coded bits
 odd:  1100   | 111111111111111111 | 00000011 | 4 x 40 coded bits
       preamble   sync (18 ones)    frame code
```

* The **sync** is exactly 18 equal bits. The coded data never contains a run
  of more than 16, so the receiver can find the sync without any other
  framing.
* The **preamble** always ends in `00`. This ends any run of ones left by the
  previous frame, so the sync is exactly 18 long. Its two lengths make up for
  the two frame-code lengths, so both frame types are 190 bits.
* The **frame code** tells the receiver whether the frame is even or odd. It
  has no CRC: the two codes differ in length, not just in value.
* **DC removal**: frames 1 and 2 are sent straight, frames 3 and 4 with every
  bit inverted (preamble and sync included), and so on. An inverted frame
  therefore starts with 18 zeros. The receiver takes the frame's polarity
  from its sync.

### pcm_packet and 6to10 code

A datapacket is 16 bits: `aux[1:0]`, `delta[3:0]` and `pos[9:0]`, in that
order. An 8-bit CRC is appended to it, giving a 24-bit pcm_packet:

```
 23 22 | 21 20 19 18 | 17 ............ 8 | 7 ...... 0
  aux  |    delta    |     position      |    crc
```

The CRC is the XOR of a fixed byte for every datapacket bit that is 1
(`pcm_pkg::CRC_XOR`). This equals a division by x^8+x^6+x^5+x^3+x+1, with
A1 as the lowest-order term of the message. A bit-reversed assignment of the
table (A1 → 4A, A0 → 25, …) has also been reported to work with some
equipment. `pcm_crc8 #(.REVERSED_TABLE(1))` selects it, and
`pcm_frame_rx #(.REVERSED_CRC(1))` checks with it.

The 24 bits are cut into four 6-bit chunks, most significant first. Each
chunk is sent as a 10-bit word from a fixed table of 64 words
(`pcm_pkg::CODE6TO10`). In every word each run of equal bits is at least two
bits long, and so are the first and last runs. The result is 4 × 40 = 160
coded bits per frame. Only 64 of the 1024 possible 10-bit words are code
words, so most line errors show up as an invalid word even before the CRC
check.

## Channel assignment: positions, deltas and aux bits

This is the least obvious part of the format. Packets are numbered
k = {P1,P0} = 0..3 within a frame, and F = 1 for an odd frame. Each packet
carries:

| packet k | position of channel | delta of channel | aux bits |
|---|---|---|---|
| 0 (P=00) | even: 1, odd: 2 | even: 2, odd: 1 | B3 B2 |
| 1 (P=01) | even: 3, odd: 4 | even: 4, odd: 3 | B1 B0; B0 = BFR (even) / ch10 (odd) |
| 2 (P=10) | even: 5, odd: 6 | even: 6, odd: 5 | B3 B2 |
| 3 (P=11) | even: 7, odd: 8 | even: 8, odd: 7 | B1 B0; B0 = ch9 (even) / unused (odd) |

The rule is: position channel = {P1,P0,F}+1, delta channel = {P1,P0,¬F}+1.
Every channel gets a position in one frame and a delta in the next.

**Delta codes.** A delta is a 4-bit code for the change of a channel since
the value the receiver holds. The ranges widen away from zero. The receiver
moves by the smallest step of the range; this design clamps the result to
0..1023.

| code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| difference from | ≤-116 | -115 | -87 | -63 | -43 | -27 | -15 | -7 | -3 | 5 | 9 | 17 | 29 | 45 | 65 | ≥88 |
| receiver jump | -116 | -88 | -64 | -44 | -28 | -16 | -8 | -4 | 0 | 5 | 9 | 17 | 29 | 45 | 65 | 88 |

The transmitter (`pcm_packet_builder`) keeps a copy of what the receiver
holds for each channel. A sent position sets the copy. A sent delta moves it
by the same clamped jump the receiver applies. The next delta is computed
against this copy. As a result, a channel that missed its position slot
(see below) catches up through later deltas.

**Failsafe injection.** In a normal frame the aux bits are B3 = 1 and
B2 = B1 = 0. To send failsafe data, the transmitter sets B3 = 0 in both pairs
of a frame:

* B2 = 0: the position of the *first* packet of each pair is replaced by the
  failsafe position of the channel it would have carried.
* B2 = 1: the position of the *second* packet is replaced instead.
* B1 carries that channel's failsafe mode: 0 = hold the last position,
  1 = go to the preset position.

Four frames (even/B2=0, odd/B2=0, even/B2=1, odd/B2=1) carry failsafe
channels 1&5, 2&6, 3&7 and 4&8. `pcm_nrt_scheduler` sends such a burst:

* 210 frames (about 6 s) after reset;
* every 2105 frames (about one minute) after that;
* after a pulse on `fs_update`.

## Receiver: decoding as address arithmetic

The receiver needs no per-frame tables. It writes every received field into
a 32-entry channel memory at an address computed from P1, P0 and F:

```
position → {FS, 0, P1, P0,  F}      FS = ~B3 & (B2 == P0)
delta    → { 0, 0, P1, P0, ~F}      read, add jump, clamp, write back
B0       → { 0, 1, 0,  F,  P1}      01000 BFR, 01001 ch9, 01010 ch10
FS mode  → mode bit of channel {P1, B2, F}, from B1 of the pair's second packet
```

Entries 0xxxx hold the live channels and 1xxxx their failsafe positions.
B3/B2 arrive in the first packet of a pair and are kept for the second.
Packets whose words or CRC are bad are dropped. If the first packet of a
pair was bad, the second packet's position is dropped too, because the
receiver cannot know whether it was failsafe data (`pcm_channel_decoder`).

The chain is:

1. `pcm_bit_sync` recovers bits by realigning its phase at every line edge
   and sampling mid-bit.
2. `pcm_frame_rx` hunts for an 18-bit run of either polarity, reads the frame
   code, and decodes and CRC-checks each 40-bit group as soon as it is
   complete.
3. `pcm_channel_decoder` and `pcm_channel_mem` update the channel memory
   once per packet.

### Failsafe behaviour (`pcm_failsafe_ctrl`)

* **Radio failsafe.** It starts after 70 bad half frames in a row (a packet
  pair with an error counts as one). A half-frame time (95 bits) with no
  packet pair at all also counts as bad. Channels 1..8 then hold or go to
  their preset, according to their mode. The first good half frame ends it.
* **Battery failsafe.** While `batt_low` is high, the throttle (channel 3)
  is treated the same way. `batt_low` comes from an external comparator that
  detects a receiver battery below 3.8 V.
* **BFR.** When the BFR switch channel goes from 0 to 1, battery failsafe is
  suspended for 30 s.

## Modules

| module | role |
|---|---|
| `pcm_pkg` | widths, `datapacket_t`, header bits, CRC, 6to10 and delta tables |
| `pcm_crc8` | CRC of a datapacket (combinational) |
| `pcm_6to10_enc` / `pcm_6to10_dec` | line code and its inverse with a validity flag |
| `pcm_delta_enc` / `pcm_delta_dec` | difference → code; code → clamped new position |
| `pcm_nrt_scheduler` | when failsafe bursts go out |
| `pcm_packet_builder` | the four datapackets of a frame, delta reference model |
| `pcm_frame_tx` | CRC, 6to10, header, inversion, serializer |
| `pcm_transmitter` | frame counter (parity, inversion) and the three above |
| `pcm_bit_sync` | bit recovery |
| `pcm_frame_rx` | sync hunt, frame code, packet decode and check |
| `pcm_channel_decoder` | address computation, delta application |
| `pcm_channel_mem` | 32 × 10-bit memory + 8 failsafe mode bits |
| `pcm_failsafe_ctrl` | radio and battery failsafe, hold/preset outputs |
| `pcm_receiver` | the receive chain |
| `pcm1024z_top` | transmitter and receiver side by side |

## Timing and parameters

All timing is in clock cycles, assuming a 1 MHz clock:

| parameter | default | meaning |
|---|---|---|
| `BIT_CYCLES` | 150 | clocks per line bit (150 µs) |
| `START_FRAMES` | 210 | frames from reset to the first failsafe burst (≈6 s) |
| `PERIOD_FRAMES` | 2105 | frames between bursts (≈60 s) |
| `BAD_HALF_FRAMES` | 70 | bad half frames before radio failsafe |
| `HALF_FRAME_CYCLES` | 14250 | silence that counts as one bad half frame |
| `BFR_HOLD_CYCLES` | 30 000 000 | battery-failsafe suspension (30 s) |

With another clock frequency, scale the cycle counts. A frame takes
190 × `BIT_CYCLES` clocks.

* The transmitter samples its inputs once per frame, one bit time before the
  frame starts (`tx_frame_start`).
* The receiver samples each bit in its middle, after a two-flop
  synchronizer. It emits a packet one clock after sampling the packet's last
  bit, and the channel memory takes it on the next clock.
* Reset is synchronous and active high. After reset, both ends assume every
  proportional channel is at 512 and every failsafe mode is "hold".

## Design choices and limits

These points are this design's own choices, and so are the points that are
open in the format as known:

* The clock frequency, the reset values and the bit recovery method.
* Which of the four to eight seconds is used for the first burst.
* Counting missing half frames as bad, and how radio failsafe ends.
* Dropping the second packet's position after a bad first packet.
* Clamping delta results.
* The bit order: chunks go most significant first, and the leftmost digit of
  a 10-bit word is sent first.
* Failsafe positions replace a channel's position. Whether real transmitters
  then send a larger delta to catch up is not settled. Here the delta simply
  follows the receiver model.
* B0 of packet 3 in odd frames is sent as 0 and decoded into an unused
  memory entry.
* Radio and battery failsafe use each channel's mode (hold or preset). Some
  receivers may instead always send the throttle to a preset in battery
  failsafe.
* Transmitters differ in detail, and only one style is modelled: the zero
  delta (code 8) is used and bursts always go out in the fixed order above.
  Not modelled are the models that:
  * never send a zero delta;
  * send only even (9-bit) positions;
  * copy BFR onto ch10;
  * change the burst order;
  * tie BFR or ch9 to particular sticks and switches (here they are inputs).
* Some receivers send the throttle to idle or to center in failsafe. That
  behaviour is not modelled.

Not included:

* the FSK modulator and demodulator;
* the trainer-port wiring;
* the battery comparator (it is the `batt_low` input);
* the servo output stage;
* the stick and mixer computation of a transmitter (channel values are
  inputs).

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. They share reference models in
`tb/tb_pcm_ref_pkg.sv`:

* a bit-serial CRC that does not use the XOR table;
* the delta ranges written out as comparisons;
* a complete frame generator.

Example with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pcm_pkg.sv tb/tb_pcm_ref_pkg.sv tb/tb_pcm1024z_top.sv \
    --top-module tb_pcm1024z_top -o sim && ./obj_dir/sim
```

* `tb_pcm1024z_top` runs the loop-back at reduced timing (8 clocks per bit)
  for 46 frames. It covers:
  * small and large deltas;
  * the power-on, requested and periodic failsafe bursts, including channels
    catching up after a missed position;
  * inverted and odd frames;
  * line-bit errors rejected by the CRC;
  * a cut link leading to radio failsafe and recovery;
  * battery failsafe and its suspension by BFR.

  It counts each of these and fails if one never happened. It also checks
  the frame period cycle by cycle.
* `tb_pcm1024z_full` runs the top with its default parameters for 220 frames
  (6.3 s of link time, a few seconds of simulation). It checks every
  received frame exactly, the 28 500-clock frame period, a requested burst
  and the power-on burst.
