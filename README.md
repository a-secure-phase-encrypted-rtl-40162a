# Phase-encrypted IEEE 802.15.4 transceiver (SystemVerilog)

An IEEE 802.15.4 (2.4 GHz, O-QPSK) baseband transceiver that encrypts at the
physical layer. After O-QPSK modulation every complex chip pair `d = I + jQ`
(I, Q in {+1, -1}) is multiplied, rail by rail, by a key-stream pair
`k = a + jb` (a, b in {+1, -1}):

    c = a * Re{d} + j * b * Im{d}

so each chip pair is moved to one of the four QPSK phases chosen by the key.
The key stream comes from an RC4 generator built with a loop-unrolled
datapath that yields two key-stream bytes per loop: one byte feeds the I
rail, the other the Q rail, one bit per rail per chip pair.

Because the preamble is encrypted as well, a receiver without the key cannot
even find the start of a frame: its correlator never sees a peak. A node that
holds the key finds the header, starts its own key stream in step with the
sender and undoes the rotation before demodulation. Frames that do not carry
the right encrypted header (an eavesdropper's view, or bogus frames sent to
drain a node's battery) are dropped at synchronisation, before any data
recovery runs.

## Signal flow

```
 MAC bytes ─► tx_framer ─► bit_to_symbol ─► symbol_to_chip ─► oqpsk_mod ─► phase_rotator ─► half_sine_shaper ─► I/Q to DAC
 250 kb/s     preamble,     62.5 ksym/s      2 Mchip/s          2 x 1 Mb/s   (encryption)      2 x 16 Msample/s
              SFD, length                                                        ▲
                                                                                 │ KS_I, KS_Q (1 Mb/s each)
                               key ─► keystream_gen ──────────────┬─────────────┤
                                        ▲  KSA_en / PRGA_en       │             ▼
                                     trx_ctrl               secure_header_gen   │
                                                                  │ header      │
 chip-rate soft I/Q ─► frame_sync (correlate with the header) ────┘             │
                           │ peak                                               ▼
                           └──► hold ─► phase_rotator ─► oqpsk_demod ─► chip_to_symbol ─► symbol_to_bit ─► rx_deframer ─► MAC
                                        (decryption)     sign decisions  min. Hamming      bytes            SFD, length
```

`pe_transceiver` wires these together around one controller (`trx_ctrl`) and
one key-stream generator, shared by transmitter, receiver and header
generator (the transceiver is half duplex).

Everything runs on one 16 MHz system clock. The "derived clock" of the key
stream, 1 MHz, is a one-cycle tick every 16 cycles (`chip_tick`). One chip pair
per rail is sent or received per tick, which gives the 2 Mchip/s of the
standard.

## The key-stream generator

This is the part with the most structure (`keystream_gen`, `rc4_circuit2`,
`ks_clock_sched`, `ks_serializer`).

### Two RC4 rounds per loop

RC4 keeps a 256-byte permutation S in a register bank, with a second bank K
holding the secret key repeated to 256 bytes. One loop of the datapath performs
two consecutive RC4 rounds:

| task | first round | second round | circuit |
|---|---|---|---|
| i | i1 = i0 + 1 | i2 = i0 + 2 | Circuit1 |
| j | j1 = j0 + S0[i1] (+ K[i1]) | j2 = j1 + S1[i2] (+ K[i2]) | Circuit2 |
| swap | S0[i1] ↔ S0[j1] → S1 | S1[i2] ↔ S1[j2] → S2 | Circuit3 |
| output | Z1 = S1[S0[i1] + S0[j1]] | Z2 = S2[S1[i2] + S1[j2]] | Circuit4 |

The K terms are present during key scheduling (KSA) and forced to zero during
pseudo-random generation (PRGA), so the same hardware does both.

**Circuit2** (`rc4_circuit2`) has to know S1[i2] before the first swap has been
written. Since i2 = i1 + 1 is never i1, S1[i2] is S0[i1] if i2 == j1 (the first
swap moved it there) and S0[i2] otherwise. The circuit computes j1 and both
candidate j2 sums with three 3-input adders and picks one with a comparator
(i2 == j1) and a 2:1 multiplexer.

**Circuit3** writes both swaps into the bank in one step. The values come from
S0 with the same kind of aliasing corrections; where the addresses of the two
swaps coincide, the second write wins.

**Circuit4** runs one CLK1 later than the swap, so the bank already holds S2.
Z2 reads S2 directly. For Z1 it needs S1, which it gets by undoing the second
swap in its address logic: an address equal to i2 reads S2[j2], and an address
equal to j2 reads S2[i2].

### Clocks: selector and scheduler

The original scheme gates two clocks. Here they are clock enables on the
system clock (`ks_clock_sched`):

* **phi** is every system cycle while `KSA_en` is high and the generator is
  not done, and every derived tick while `PRGA_en` is high. `PRGA_en` wins if
  both are high. Otherwise there is no phi.
* **CLK1** (Circuit1, Circuit2, Circuit4 and the serializer) and **CLK3**
  (Circuit3) alternate. During KSA that is every other cycle (phi/2), one loop
  per two cycles. During PRGA, CLK1 is on tick 0 and CLK3 on tick 4 of every
  8 derived ticks (phi/8).

One PRGA loop makes 16 bits (8 per rail) in 8 ticks. That is exactly one bit
per rail per chip pair, 1 Mb/s each. The serializer sends Z1 on KS_I and Z2
on KS_Q, most significant bit first, and raises `ks_stb` one cycle after each
tick.

### Sequence and timing

| phase | what happens | duration at 16 MHz |
|---|---|---|
| both enables low | S = identity, K = key repeated, i0 = 255, j0 = 0 | — |
| `KSA_en` | 128 loops of two KSA rounds | 256 cycles = 16 µs (`ksa_done`) |
| start-up | i = j = 0, then `skip_loops`+1 PRGA loops with no output | 2·(`skip_loops`+1) cycles |
| `PRGA_en` | one loop per 8 ticks, key bits on every tick | as long as needed |

Every frame restarts the generator from the key. This is what lets a receiver
know the encrypted preamble in advance.

## Secure header and synchronisation

The 802.15.4 preamble is 8 zero symbols: 256 chips, or 128 complex chip
pairs. The transmitter encrypts it with the first 128 key-stream pairs of each
frame's fresh RC4 run, like any other chip. After a new key is loaded
(`key_load`), `trx_ctrl` runs the generator once for 128 pairs.
`secure_header_gen` stores the encrypted preamble from that run (256 bits).
Frames are sent or received only after `hdr_valid`.

On `energy_det` the receiver starts `frame_sync` and at once raises `KSA_en`.
`frame_sync` shifts each received soft pair into a 128-pair window and
computes two sums:

    corr   = Σ ±x_i[p] ± x_q[p]     (signs from the encrypted header)
    energy = Σ |x_i[p]| + |x_q[p]|

It declares a peak once the window is full and `corr ≥ THRESH · energy`.
`THRESH` defaults to 0.5. That is the middle of the 0.4–0.6 range where
correlator outputs of a receiver with the right key and one with a wrong key
are well apart. In simulation at 3 dB SNR per rail, this normaliser gives a
mean peak of 0.96 with the right key. With a wrong key, the best value in any
window averages 0.17 (worst 0.20). Without noise the peak is 1.0. If no peak comes within 256 pairs,
both enables drop and the frame is abandoned (`ev_rx_drop`).

The KSA must finish before the peak. It takes about 18 µs of the 128 µs
preamble. The receiver also has to skip the 128 key pairs the header used, so
its start-up phase discards 16 PRGA loops (`skip_loops` = 16, 34 extra
cycles). When the peak comes (two cycles after the tick of the last header
pair), `PRGA_en` rises. The next tick delivers the key pair for the first chip
after the header, together with that chip's sample, which was held at the
same tick. Decryption, sign decisions, de-spreading (minimum Hamming distance
over the 16 sequences, which corrects up to 6 chip errors) and byte assembly
follow. `rx_deframer` checks the SFD, reads the length and hands the PSDU to
the MAC.

### Latency

* Transmit: from `tx_req` to the first sample on air takes 260 cycles (16.25
  µs): the 256-cycle KSA, two priming cycles and two cycles of handshaking.
* Receive: the header is recognised as soon as its last pair is in, 128 µs
  after the preamble starts. The simulated channel's sampling delay brings
  this to 2078 cycles (129.9 µs) from the first sample on air. Decryption adds
  no delay beyond that.

## Top-level interface (`pe_transceiver`)

| group | ports |
|---|---|
| clock | `clk` (16 MHz), `rst_n` (asynchronous, active low), `chip_tick` (out, 1 MHz) |
| key | `secret_key[8*KEY_BYTES-1:0]` (byte 0 in bits 7:0), `key_load`, `hdr_valid`, `ksa_done` |
| transmit | `tx_req`, `tx_len[6:0]`; PSDU bytes over `mac_tx_data/valid/ready`; `tx_i`, `tx_q` (signed, 16 Msample/s), `tx_on` |
| receive | `energy_det`; `rx_i`, `rx_q` (signed soft samples, one per chip pair, sampled on `chip_tick`); `mac_rx_data/valid`, `rx_len`, `rx_chip_dist` |
| status | `busy`, `ev_tx_done`, `ev_rx_ok`, `ev_rx_drop`, `ev_rx_err`, `sync_corr`, `sync_energy` |

Parameters: `KEY_BYTES` (16), `CLK_DIV` (16 system cycles per chip pair), `W`
(8-bit received samples), `SW` (8-bit transmitted samples), `THRESH_Q8` (128 =
0.5).

The receiver expects one matched-filter sample per rail per chip pair, aligned
with `chip_tick`. The design does not contain chip-timing recovery, the
matched filter, the ADC/DAC, the RF front end or the energy detector. The
testbench channel plays their part: it samples the transmitter's half-sine
waveform at the pulse peaks.

## Choices this design makes

These points are not fixed by the architecture description it follows. Each
one is this design's own choice:

* Clock gating is replaced by clock enables on a single clock.
* Key length is 16 bytes (`KEY_BYTES`). A key bit of 1 multiplies by −1. A
  chip of 1 is the level +1. Even chips go on I, odd chips on Q.
* RC4 starts again from the key for every frame. The secure header is built
  once per key with a dedicated run of the generator.
* Start-up loops after the KSA: one primes Circuit4, 16 more align the
  receiver past the header. Because of the priming loop, transmission starts
  258 rather than 256 cycles after `KSA_en`.
* In the receiver `KSA_en` rises when synchronisation starts, not after it.
  That way the KSA is certainly done before the peak.
* The correlation is normalised by the window energy. The first threshold
  crossing with a full window counts as the peak. The search window is 256
  pairs.
* Frame format (four 0x00 bytes of preamble, SFD 0xA7, 7-bit length), chip
  table, nibble order and half-sine pulse all follow IEEE 802.15.4.
* Serializer bit order is MSB first. Sample widths are 8 bits and the pulse
  amplitude is 127.
* Priority when idle is key load, then transmit, then receive.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pe_pkg.sv tb/tb_pe_transceiver.sv \
          --top-module tb_pe_transceiver -o sim && ./obj_dir/sim
```

(replace the testbench and top-module name for other blocks). What the tests
establish:

* `tb_keystream_gen` compares the unrolled generator with a plain software RC4
  over 6 random keys × 500 bytes and more. It also checks the 256-cycle KSA,
  one key bit per rail per tick and the 16-loop skip.
* `tb_rc4_circuit2` compares j1 and j2 with two sequential RC4 rounds,
  including many i2 == j1 cases.
* `tb_symbol_to_chip` and `tb_chip_to_symbol` use the standard's chip table
  written out in full. The de-spreader is tested with up to six chip errors.
* `tb_frame_sync` checks the exact peak position and the sums, and the
  rejection of a burst with a foreign header.
* `tb_pe_transceiver` runs the whole design at its default parameters. Three
  nodes take part: sender A, receiver B with the same key, and adversary C
  with another key. B must recover every byte of clean and noisy frames. C
  must drop every one of them. B must drop a frame C sends with its own key,
  and must also drop a burst of plain noise. The test counts the KSA runs,
  both clock sources, the receiver's header skip, transmissions, receptions
  and each kind of drop, and fails if any of them never happened. It also
  checks the 256-cycle KSA and the 16 µs transmit latency. It runs in about a
  second.
* `tb_pe_workloads` runs the same three nodes at two operating points.
  First, five frames in a row at 3 dB SNR per rail with Gaussian noise: B
  must find each header with a normalised peak of at least 0.6, and C must
  stay below 0.4 and drop every frame. Second, one 127-byte frame (the
  largest the 7-bit length allows): every byte must arrive, every symbol must
  be decided at chip distance 0, and the receive latency must be 128 µs.

## Limits

* The synchroniser takes the first threshold crossing as the peak. At very low
  SNR a neighbouring position could cross first. There is no check for a local
  maximum.
* Frame length is taken from the decrypted length byte. A corrupted length
  ends reception early or late, bounded by 127 bytes.
* Symbol error rate against SNR and the power and area figures of an FPGA or
  ASIC build are not reproduced here. They depend on the channel and on the
  technology.
