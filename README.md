# ANU-PHOTON authenticated encryption: Encrypt-then-MAC and MAC-then-Encrypt datapaths

Small IoT devices need confidentiality and integrity at once, and they
cannot afford AES-GCM. This design gets both from two ultra-lightweight
primitives: the **ANU** block cipher (64-bit block, 128-bit key) and a
**PHOTON** sponge hash built on the 100-bit permutation P100. One datapath
holds one iterative core of each. Three multiplexers route data between the
cores, so the same hardware can run either way of combining encryption
with a MAC:

* **Encrypt-then-MAC (EtM).** Encrypt the 64-bit message block, then hash
  the ciphertext. The outputs are a 64-bit ciphertext and a 100-bit tag.
* **MAC-then-Encrypt (MtE).** Encrypt the message block and hash the
  plaintext. Then encrypt the 100-bit hash as two more 64-bit blocks: bits
  63:0, then bits 99:64 with zeros above them.

The datapath comes with two control schemes:

* **ANU-PH I** is sequenced from outside by mode pins. It is the smaller
  one.
* **ANU-PH II** has its own controller. It hides the plaintext encryption
  under the hash, which brings MtE down from 75 to 62 clocks.

| operation          | ANU-PH I  | ANU-PH II |
|--------------------|-----------|-----------|
| EtM, one block     | 49 clocks | 49 clocks |
| MtE, one block     | 75 clocks | 62 clocks |

The ciphertext of the message is always ready after 13 clocks, and the hash
takes 36 clocks. The top level, `anu_photon_ae_top`, places ANU-PH I,
ANU-PH II and a stand-alone ANU decryption core side by side on one clock.
Each has its own ports.

## The shared datapath (`ae_datapath`)

```
             key ─────────────────────────────┐
 msg[31:0]  ─D0┐                              v
 hash[31:0] ─D1├ Mux-2 ── P_LSB ──┐      ┌─────────┐
 hash[95:64]─D2┘                  ├─────>│  ANU    │── cipher_text (64)
 msg[63:32] ─D0┐                  │      │ 13 clk  │── anu_ready
 hash[63:32]─D1├ Mux-3 ── P_MSB ──┘      └─────────┘
 {28'0,hash[99:96]}─D2┘                        │
                                    cipher ──D0┐
                                    msg    ──D1├ Mux-1 ─┐
                                                        v
                                     {84'0, Mux-1} (148 bits)
                                                        v
                                               ┌──────────────┐
                                               │ PHOTON P100  │── hash (100)
                                               │   36 clk     │── phot_ready
                                               └──────────────┘
```

* **Mux-1** (`ae_mux2`, 64 bits wide) selects the hash input. It takes the
  ciphertext (D0) in EtM and the message (D1) in MtE. Its output gets 84
  zero bits on top to form the 148-bit PHOTON input.
* **Mux-2 and Mux-3** (`ae_mux3`, 32 bits and three inputs each) feed the
  low half (P_LSB) and the high half (P_MSB) of the cipher input. The
  choices are the message (D0), hash bits 63:0 (D1), or the last 36 hash
  bits with 28 zero bits above them (D2).
* All control signals arrive as one packed struct, `ae_pkg::dp_ctrl_t`:
  * `ctr` enables PHOTON and `ctr_anu` enables ANU.
  * `rst1` resets PHOTON and `rst2` resets ANU.
  * `mux1_sel` and `mux23_sel` drive the multiplexers.

  Both resets are synchronous and active high.

Both cores hold their result while they are not enabled. The multiplexers
therefore read stable values, and the ciphertext stays on `cipher_text`
while PHOTON hashes it.

## Sequencing, the hard part

### ANU-PH I (`anu_ph1`): sequenced from outside

The `State` block (`ae_state_logic`) decodes the pins `EtM`, `Sel0` and
`Sel1` into the multiplexer selects and registers them, so they take
effect one clock later. The outside sequencer also drives the enables
(`ctr`, `ctr_anu_ii`) and the resets (`rst`, `rst1`, `rst2`). It walks
these steps:

| step | EtM | Sel0 | Sel1 | core, clocks | result                                    |
|------|-----|------|------|--------------|-------------------------------------------|
| 1    | 1   | 1    | x    | ANU, 13      | ciphertext on `cipher_text`               |
| 2    | 1   | 0    | x    | PHOTON, 36   | tag of the ciphertext on `MACcipher_text` |
| 3    | 0   | 1    | 1    | ANU, 13      | ciphertext of the message                 |
| 4    | 0   | 1    | 0    | PHOTON, 36   | hash of the message                       |
| 5    | 0   | 0    | 1    | ANU, 13      | hash bits 63:0, encrypted                 |
| 6    | 0   | 0    | 0    | ANU, 13      | hash bits 99:64, zero padded, encrypted   |

EtM is steps 1 and 2 (49 enabled clocks). MtE is steps 3 to 6 (75 enabled
clocks).

Each step works the same way:

1. Set the mode pins.
2. Pulse the reset of the core that is about to run, in the same clock.
3. Hold that core's enable for 13 or 36 clocks.

The ready flags are not brought out in ANU-PH I, so the sequencer must
count the clocks. `tb/tb_anu_ph1.sv` is a working example of a sequencer.

### ANU-PH II (`anu_ph2`): its own controller

The only control inputs are `EtM`, `rst` and `rst1`. To run one block:

1. Set the key, the message and `EtM`, and hold `rst` and `rst1` high for
   one clock.
2. Release both resets.
3. Keep the inputs stable until `done` rises.

The controller (`ae_ph2_ctrl`) produces `ctr`, `ctr_anu`, `rst2` and the
selects. Clock 1 is the first clock after the resets are released.

```
EtM:  clocks  1-13  ANU encrypts the message
      clocks 14-49  PHOTON hashes the ciphertext (starts in the clock anu_ready rises)
MtE:  clocks  1-13  ANU encrypts the message     } at the same time,
      clocks  1-36  PHOTON hashes the message    } Mux-1 = message
      clocks 37-49  ANU encrypts hash[63:0]      (starts in the clock phot_ready rises)
      clocks 50-62  ANU encrypts {28'0, hash[99:64]} (starts in the clock anu_ready rises)
```

Two things make 62 clocks possible:

* **The enables are Mealy outputs.** Each step begins in the very clock
  where the previous step's ready flag rises, so no clock is lost between
  steps.
* **The ANU core restarts on its own.** If its enable is still high in the
  clock where `ready_o` is high, it loads a new block from its inputs. No
  `rst2` pulse is needed, which would cost a clock between the two hash
  blocks.

`cipher_text` carries up to three results in turn. `anu_ready` rises each
time a new one is valid:

* after 13 clocks: the ciphertext of the message;
* after 49 clocks (MtE only): hash bits 63:0, encrypted;
* after 62 clocks (MtE only): hash bits 99:64, encrypted.

`phot_ready` marks the final hash. `done` rises one clock after the last
step and stays high until the next reset.

Two assertions in `ae_ph2_ctrl` state the sequencing rules:

* in EtM, PHOTON never runs before the ciphertext is ready;
* nothing is enabled once `done` is high.

## The cores

### ANU encryption (`anu_enc`, `anu_key_schedule`, `anu_pkg`)

ANU is a 25-round Feistel cipher on two 32-bit halves L and R. Each round
does the following:

1. Compute `f = S(L <<< 3) ^ S(L >>> 8) ^ R ^ RK`, with a 4-bit S-box.
2. Apply the 32-bit bit permutation BP to f and to L.
3. Swap the halves: the new state is `{BP(f), BP(L)}`.

The 128-bit key register supplies the round key, its low 32 bits. After
each round the register is updated in three steps:

1. Rotate it left by 13.
2. Pass the two low nibbles through the S-box.
3. XOR the round number into bits 63:59.

The whole cipher must fit in 13 clocks, so the core computes two rounds per
clock and a single round in the 13th clock. The key register
(`anu_key_schedule`) also advances two updates per clock. The first enabled
clock takes the plaintext and the key directly from the inputs, so no
separate load cycle is needed.

### PHOTON hash (`photon_hash`, `photon_pkg`)

P100 is a 5×5 array of 4-bit cells. Each of its 12 rounds applies these
steps in order:

1. **AddConstants.** XOR the round constant and the row constant into
   column 0.
2. **SubCells.** Pass every cell through the PRESENT S-box.
3. **ShiftRows.** Rotate row i left by i cells.
4. **MixColumnsSerial.** Apply the serial matrix with last row 1, 2, 9, 9,
   2 five times, over GF(2^4) modulo x^4+x+1.

The core computes one round per clock.

The sponge works on the 148-bit input as follows:

* **Padding.** Append a single 1, then zeros, to make three 52-bit blocks
  (the rate).
* **Absorbing.** XOR each block into the top 52 state bits, in the same
  clock as the first of its 12 rounds. Three blocks × 12 rounds = 36
  clocks.
* **Output.** The hash value is the whole 100-bit state after the last
  permutation.
* **Initial value.** Zero, except that the low three bytes are 25, 52 and
  52: the hash size divided by 4, then the rate twice, in the style of
  PHOTON's initial values.

### ANU decryption (`anu_dec`)

Decryption needs the round keys in reverse order, so each block has two
phases:

1. **Key preparation, 12 clocks.** The key register runs forward to the key
   of round 25.
2. **Inverse rounds, 13 clocks.** The core undoes two rounds per clock and
   steps the key register backwards with the inverse update. Round 1 is
   undone alone in the last clock.

A block takes 25 clocks in all. The authenticated-encryption datapaths do
not use this core. In the top-level test it decrypts every ciphertext that
ANU-PH II produces.

## How far to trust it, and where it departs from the source description

Taken from the source description:

* The datapath structure, bus widths, multiplexer inputs and bit ranges.
* The zero padding of the hash input (84 bits) and of the second hash
  block (28 bits).
* The step table of ANU-PH I and the port names of both designs. The port
  is spelled `shmessege`, as printed on the design's block symbols.
* The 64-bit block, the 128-bit key, the 100-bit permutation and hash, and
  the 148-bit hash input.
* The clock counts: 13, 36, 49, 75 and 62.

Choices made in this design:

* **Cipher and hash internals.** The ANU round function, S-box, bit
  permutation, round count (25) and key update follow the published ANU
  definition. The P100 permutation follows the published PHOTON
  definition. Neither could be checked against official test vectors. All
  their constants sit in `anu_pkg` and `photon_pkg`, so a correction
  changes only those files. The testbench reference model
  (`tb/ae_ref_pkg.sv`) is written independently of the RTL but from the
  same reading of the two algorithms. A shared misreading of a constant
  would therefore pass unnoticed. Decrypting with `anu_dec` does confirm
  that the cipher is a permutation.
* **Sponge parameters.** The rate (52 bits), padding, initial value and the
  "whole state is the hash" output are this design's choices. They are the
  simplest parameters that hash 148 bits in 36 clocks with a 12-round
  permutation. The hash is therefore a PHOTON-style hash, not one of the
  standard PHOTON variants.
* **Two ANU rounds per clock.** This follows from 25 rounds in 13 clocks.
* **Timing details.** The registered State block, the ANU auto-restart, the
  Mealy controller and the overlap of encryption with hashing in ANU-PH II
  are this design's choices. They are one way to reach the published clock
  counts.
* **Reset style.** All resets are synchronous and active high.
* **Extra outputs of ANU-PH II.** `anu_ready`, `phot_ready` and `done` are
  brought out so that a user knows when to sample the shared `cipher_text`
  port.
* **ANU-PH I clock counts.** 49 and 75 count the enabled clocks of the
  cores. The sequencer's setup clock before each step is not included.
* **Not built.**
  * Receiver-side verification (decrypting and checking a tag) is not
    described as hardware and is not built.
  * FPGA results (maximum frequency, slices, Mbps) are not reproduced.
    Throughput follows from f_max × 64 / latency, and the latencies here
    match.

## Files

| file | contents |
|------|----------|
| `rtl/anu_pkg.sv`, `rtl/photon_pkg.sv` | cipher and permutation constants and round functions |
| `rtl/ae_pkg.sv` | select enums and the datapath control struct |
| `rtl/anu_key_schedule.sv`, `rtl/anu_enc.sv`, `rtl/anu_dec.sv` | ANU cores |
| `rtl/photon_hash.sv` | PHOTON sponge core |
| `rtl/ae_mux2.sv`, `rtl/ae_mux3.sv` | Mux-1, Mux-2/Mux-3 |
| `rtl/ae_state_logic.sv` | ANU-PH I State block |
| `rtl/ae_datapath.sv` | shared datapath |
| `rtl/anu_ph1.sv`, `rtl/ae_ph2_ctrl.sv`, `rtl/anu_ph2.sv` | the two designs and the PH II controller |
| `rtl/anu_photon_ae_top.sv` | top level |
| `tb/ae_ref_pkg.sv` | reference model (cipher, hash, EtM, MtE) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each one also has a watchdog. For example, the end-to-end test of the top
runs both designs and the decryption core at full size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ae_pkg.sv rtl/anu_pkg.sv rtl/photon_pkg.sv tb/ae_ref_pkg.sv \
  tb/tb_anu_photon_ae_top.sv -y rtl --top-module tb_anu_photon_ae_top -Mdir obj
./obj/Vtb_anu_photon_ae_top
```

Replace the testbench name to run another test, such as `tb_anu_ph2`,
`tb_photon_hash` or `tb_anu_enc`. The top-level test also counts how often
each mechanism occurred:

* every row of the ANU-PH I step table;
* PH II encryption running under the hash;
* back-to-back encryption of the two hash blocks;
* encryption of the zero-padded hash block;
* decryption.

If any of these never happens, the test fails. No module has a parameter
that needs reducing for simulation: the full design simulates in well
under a second.
