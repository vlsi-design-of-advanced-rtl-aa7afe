# AES cryptoprocessor with key store, preemption, panic and clock randomization

This is a bus-attached AES accelerator for a security subsystem. One iterative AES core
(one round per clock, AES-128 and AES-256) sits behind a mode engine. The engine runs nine
block-cipher modes: ECB, CBC, OFB, CFB, CTR, CMAC, CCM, GCM and XTS.

What sets it apart from a plain AES peripheral is the protection wrapped around that core:

- six key slots with usage rules, seal tags, locks and usage counters;
- two privilege levels, Supervisor and User, taken from the AXI protection bits;
- a strict operation state machine that refuses out-of-order commands and data read or written twice;
- preemption: a running operation can be halted, its internal state saved and later restored;
- two panic levels that wipe data and keys;
- keys derived inside the device, where the engine output goes straight into a key slot and never reaches software;
- an engine clock whose cycles are randomly masked, to blur power and timing side channels.

All RTL is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

## Block structure

```
aes_cryptoprocessor                 top: two clock domains
 ├─ aes_cp_ctrl                     main clock: AXI4-Lite registers, state machine, data registers
 │   └─ key_slot  x NUM_SLOTS (6)    one key slot each
 ├─ clk_rand                        engine clock: source mux, /1 /2 /4 /8, random cycle masking
 ├─ cdc_handshake x 4               command, input block, output block, completion event
 └─ aes_engine                      engine clock: mode data path
     ├─ aes_core                    one AES round per cycle, round keys on the fly
     │   └─ aes_sbox x 16           merged forward/inverse S-box
     ├─ ghash_engine                GF(2^128) multiply-accumulate for GCM
     ├─ cmac_subkey                 K1, K2 for CMAC
     ├─ ccm_formatter               B0, counter blocks and AAD length prefix for CCM
     └─ xts_tweak                   XTS tweak, multiplied by alpha per block
aes_pkg                             shared types and GF(2^8)/GF(2^128) functions
```

Software reaches the design through a 32-bit AXI4-Lite slave. Data moves over one of two paths:

- a pair of 128-bit AXI-Stream ports, meant for a DMA;
- the DIN/DOUT data registers on the AXI4-Lite port (the "bus_io" path).

A host CPU, DMA, interconnect, memories and the PLL/oscillator are outside this design.

## The AES core (`aes_core`)

- **Rounds.** Only one round of logic exists, and it is reused Nr times: Nr = 10 for AES-128, 14 for AES-256. AES-192 is not supported.
- **S-box.** The sixteen S-boxes are "merged": one GF(2^8) inverter, computed as x^254, serves both directions. Encryption applies the affine map after the inverter; decryption applies the inverse affine map before it.
- **Key schedule.** It is computed on the fly and holds a window of two consecutive round keys, `kp` and `kc`. That is enough for both key sizes: AES-256 needs the two previous words-of-4 to make the next one.
  - Encryption walks the window forward one step per round.
  - Decryption must start from the last round key. The core first runs the schedule forward Nr steps (key expansion), spends one cycle loading the block, and then runs the inverse rounds while walking the window backward.

| operation | latency (cycles) | AES-128 | AES-256 |
|---|---|---|---|
| encrypt | Nr | 10 | 14 |
| decrypt | 2·Nr + 1 | 21 | 29 |

These counts reproduce the published rates at 2.55 GHz: 128 bit × 2.55 GHz / 10 = 32.64 Gbit/s, and / 21 = 15.54 Gbit/s.

Interface: pulse `start` with `din`, `key`, `key256` and `decrypt` while `busy` is low. `valid` pulses for one cycle with `dout`. `clear` aborts.

## The mode engine (`aes_engine`)

The engine keeps the core busy by issuing the next block while the previous result completes. Feedback modes cannot overlap, because the next input depends on the result just produced.

**Operation phases.** Each operation runs through these phases:

- `PREP0` and `PREP1`: preparation cipher calls. They compute the CMAC value L, the GHASH key H, GCM E(J0), CCM B0 and E(Ctr0), or the XTS tweak.
- `AAD`: associated data.
- `MSG`: message blocks.
- `FIN`: the final MAC step.
- `TAG`: the tag goes out.

**Cycles per block in steady state:**

| mode | encrypt | decrypt |
|---|---|---|
| ECB | Nr | 2·Nr+1 |
| CBC | Nr+1 | 2·Nr+1 |
| CFB | Nr+1 | Nr |
| OFB | Nr+1 | Nr+1 |
| CTR, GCM, XTS | Nr | Nr (XTS decrypt 2·Nr+1) |
| CMAC | Nr | – |
| CCM | 2·(Nr+1) | 2·(Nr+1) |

The extra cycle in CBC, CFB and OFB encryption is the XOR of the result into the next input through the feedback register. CMAC instead forwards the core result into the next input in the same cycle, so it runs at Nr.

CCM is slower than the published table, which lists it at the ECB rate:

- CCM needs one CBC-MAC call and one CTR call per block, and there is a single core.

Reaching the published rates would need a second core, or pipelining that the published material does not describe.

**Mode details:**

- **GCM.** IVs are 96 bits only. The tag is the last output block, flagged by `out_tag`.
- **CCM.** Nonces are 7–13 bytes and tags 4–16 bytes. Associated data must be shorter than 65280 bytes.
- **CMAC.** An empty message is allowed.
- **XTS.** Only whole 16-byte blocks are handled. **Ciphertext stealing for a partial last block is not implemented.**
- **Partial last blocks.** In CTR, OFB, CFB and GCM, the output bytes past the message length are zeroed.

**Halting (preemption).** The engine stops only between blocks, once nothing is in flight and the last output has been taken. It then reports its context (`eng_ctx_t`, 587 bits), which holds the phase, block counters, chaining value, MAC accumulator, auxiliary block, hash key and CCM carry bytes. A later `resume` with that context continues where the operation left off.

## Registers, state machine and rules (`aes_cp_ctrl`)

**State machine:**

`IDLE -INIT-> CONFIG -START-> RUN -engine done-> DONE -ACK-> IDLE`

- SUSPEND in RUN passes through HALTING to SUSPENDED.
- RESUME works from SUSPENDED or from CONFIG; in CONFIG, software first writes a saved context back.
- Any violation leads to ERROR, which is left with ERRCLR.

**Ownership and errors:**

- The level that issued INIT owns the operation. Only the owner may configure it, run it, read its results, read its context, or abort it.
- The Supervisor may also abort a User operation; the User's error register then shows *aborted*.
- Errors are recorded separately for each level.

**Register map** (byte offsets; `p` = needs Supervisor, `o` = owner only):

| offset | register | bits |
|---|---|---|
| 0x00 | CTRL (W) | 0 INIT, 1 START, 2 ABORT, 3 SUSPEND, 4 RESUME, 5 ERRCLR, 6 ACK |
| 0x04 | CFG (o) | 3:0 mode (ECB 0, CBC 1, OFB 2, CFB 3, CTR 4, CMAC 5, GCM 6, CCM 7, XTS 8), 4 decrypt, 7:5 key slot, 10:8 second (XTS) slot, 11 bus_io, 12 output-to-key, 15:13 destination slot, 19:16 CCM nonce bytes, 24:20 CCM tag bytes |
| 0x08 / 0x0C | AAD_LEN / MSG_LEN (o) | lengths in bytes |
| 0x10–0x1C | IV (o) | 0x10 holds IV[127:96] |
| 0x20 | STATUS | 2:0 state, 3 owner, 4 DIN full, 5 DOUT full, 6 DOUT is tag, 7 DOUT is last |
| 0x24 / 0x28 | ERR_SUP / ERR_USR | 0 privilege, 1 sequence, 2 key, 3 data accessed twice, 4 aborted, 5 panic |
| 0x2C | SUPCFG (p) | 8:0 enabled modes, 9 User enabled, 15:10 Supervisor-reserved slots |
| 0x30 | PANIC (p) | 0 partial, 1 full |
| 0x34 | CLKCFG (p) | 0 oscillator, 2:1 divider, 3 randomize, 15:8 window length − 1 |
| 0x40–0x4C | DIN (o) | one write per word per block |
| 0x50–0x5C | DOUT (o) | one read per word per block |
| 0x60 / 0x64 | CTX_IDX / CTX_DATA (o) | saved engine context, 32 bits at a time |
| 0x100 + 0x40·s | key slot s | +0 KCFG, +4 SEAL, +8 SEALVAL, +C UNSEAL, +10 KERR (read: 3:0 errors, 4 sealed, 5 populated; write: clear), +14 USAGE, +18 KCLR, +20..+3C key words (+20 = key[255:224]) |

A refused write answers SLVERR and sets a flag in the writer's error register. Reading a DOUT word a second time also answers SLVERR, sets "data accessed twice" and moves the machine to ERROR.

**Key slots (`key_slot`).** The 16-bit KCFG word holds these bits, from the top:

| bit(s) | field | meaning |
|---|---|---|
| 15 | reserved | only the configuring level may use the slot |
| 14 | lock | frozen until reset |
| 13 | panic-sensitive | wiped by a partial panic |
| 12 | AES-256 | the slot holds a 256-bit key |
| 11 | derivation allowed | the engine output may be written into the slot |
| 10 | decryption allowed | |
| 9 | encryption allowed | |
| 8:0 | allowed modes | |

Slot rules:

- Configuration is accepted only while the slot is empty.
- The key is populated by its last word, or by engine output.
- START checks the slot against the mode and the direction, then steps its usage counter.
- Any misuse raises an error bit. While an error bit is set, the slot refuses further use.
- **Sealing.** Writing SEAL stores a tag. From then on, the slot can be reached only while SEALVAL holds the same value. UNSEAL with the right value removes the seal.

**Key derivation.** With output-to-key set, the engine output block goes into the destination slot and never appears on the stream or in DOUT. The first block fills key[255:128] and the second fills key[127:0]. A slot configured for derivation must not be locked.

**Panic.** Both levels return the machine to IDLE and clear the engine.

- A partial panic clears the data registers and IV, and wipes the panic-sensitive slots.
- A full panic also wipes every slot and the saved context.

## Clocks (`clk_rand`, `cdc_handshake`)

The engine runs on its own clock. A multiplexer picks the PLL or the oscillator input. Toggle flip-flops divide it by 1, 2, 4 or 8.

**Random cycle masking.**

- A counter `cc_cnt` runs over a window of `total_cc + 1` cycles.
- A 16-bit LFSR supplies `rnd_num`: its low byte ANDed with `total_cc`.
- When `cc_cnt == rnd_num`, one clock cycle is masked. With a power-of-two window, that is exactly one cycle per window.
- The gate enable is captured on the falling edge, so the gated clock has no glitches.
- The LFSR is reseeded from the `trng_seed`/`trng_valid` input.

**Clock-domain crossing.** Commands, input blocks, output blocks and completion events cross between the clock domains through four toggle handshakes. Each carries one word at a time with two-flop synchronizers. Each crossing costs a few main-clock cycles. At the top level, throughput is therefore bounded by the crossing and not by the core when the two clocks are of similar speed.

## Where this design departs from, or adds to, the source design

- The register map, bit encodings, state names and context layout are this design's own.
- CCM is slower than the published rate (see the engine section). XTS decryption
  uses the inverse cipher and so runs at the decryption rate (2·Nr+1 cycles per block), where
  the published table lists the encryption rate.
- XTS has no ciphertext stealing. GCM IVs are 96 bits only.
- The LFSR polynomial, the divider ratios and the masking of `rnd_num` with the window length are chosen here.
- The seal protocol (SEAL / SEALVAL / UNSEAL) and the 32-bit tag width are chosen here.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_aes_engine \
  rtl/aes_pkg.sv $(ls rtl/*.sv | grep -v aes_pkg) tb/aes_ref_pkg.sv tb/tb_aes_engine.sv
./obj_dir/Vtb_aes_engine
```

| testbench | what it checks |
|---|---|
| `tb_aes_sbox` | all 256 inputs in both directions against an independent table |
| `tb_aes_core` | FIPS-197 vectors, SP 800-38A vector, random blocks against a reference model, latency 10/14/21/29, clear |
| `tb_aes_engine` | published vectors, random operations in every mode at both key sizes, cycles per block, halt/resume with another operation in between, clear |
| `tb_ghash_engine`, `tb_cmac_subkey`, `tb_xts_tweak`, `tb_ccm_formatter` | each against published values and a bit-level model |
| `tb_key_slot` | every slot rule: configuration, use, errors, seal, reservation, lock, derivation, both panics |
| `tb_clk_rand` | divider ratios from both sources, masked-cycle count against a model |
| `tb_cdc_handshake` | 300 words across unrelated clocks with random stalls |
| `tb_aes_cryptoprocessor` | the top at default size through its bus ports (details below) |

`tb_aes_cryptoprocessor` runs these scenarios:

- ECB and GCM (with tag) over the stream;
- CBC by the User through the data registers;
- a double read;
- privilege errors;
- a start with an empty slot;
- preemption of a User CTR operation by a Supervisor operation, with the User's context saved and restored;
- key derivation;
- clock masking with a TRNG reseed;
- a Supervisor abort;
- partial and full panic.

It counts each of these mechanisms and fails if one never happened.

`aes_ref_pkg` holds the reference AES used by the testbenches. It builds its S-box by walking the multiplicative group of GF(2^8), independently of the RTL's inverter.
