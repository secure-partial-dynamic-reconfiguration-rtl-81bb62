# Security co-processor for secure partial reconfiguration of FPGAs

An FPGA that loads partial bitstreams at run time has to trust whatever is
written into its configuration port. The vendor's own bitstream protection uses
one key for every bitstream, checks authenticity only at the end of the stream,
and relies on a frame CRC that an attacker can simply recompute. This design is
a co-processor that sits between the system's DMA and the configuration port
and splits the handling of a partial bitstream into two phases:

* **Phase 1: reception and storage.** A bitstream arrives from the IP
  provider, CBC-encrypted under a key `Ks` shared with that provider. The
  co-processor decrypts it, checks a CBC-MAC over the plaintext against the
  tag the provider sent, and at the same time re-encrypts the plaintext under
  a fresh random key `Ki` that belongs to this bitstream only. The
  re-encrypted stream goes back out to be kept in external memory (DDR). `Ki`
  and the bitstream's reference MAC stay on chip, in a block-RAM key store.
  Phase 1 has no timing constraints.
* **Phase 2: reconfiguration.** When the bitstream is needed, the stored
  ciphertext is streamed back in, decrypted under `Ki` and passed to the
  configuration port word by word as it is produced, while a CBC-MAC under the
  bitstream's own key is computed. That MAC is compared with the stored one at
  the end. Because the frame CRC words travel encrypted, a tampered frame
  cannot be given a matching CRC, so the configuration port's own frame-wise
  CRC check also catches tampering frame by frame.

Replaying an old bitstream fails because each stored bitstream has its own key,
and the shared key `Ks` is used only for transport.

The core of the design is the **cryptographic kernel**, which performs three
AES-CBC operations on the stream: decryption (D), re-encryption (E) and
CBC-MAC (M). There are two kernels. The 3-AES kernel has one AES core per
operation. The 1-AES kernel time-shares a single core, and its throughput is
set by how the core is scheduled.

## Block diagram and data flow

```
             AXI4-Lite (host)                       key store (BRAM, NSLOTS slots)
                   |                                 {Ki, Ki_mac, tag} per slot
              axil_regs ------ ks_we/slot/Ki/Kim/tag ------> key_store
                   | start, phase, mac_en, slot,                 |
                   | nblocks, Ks, Ks_mac, IV, tag                | Ki, Ki_mac, tag
                   v                                             v
              reconfig_ctrl --- keys, init, in_allow ---> crypto kernel
                   ^  mac / done                           (3-AES or 1-AES)
                   |                                       ^            |
 s_axis 32b --> stream_upsizer --128b blocks--------------+             |
                                                                       v
                                          stream_downsizer <-- 128b out blocks
                                               |           \
                                      phase 1: m_axis     phase 2: icap_*
                                      (to DDR via DMA)    (configuration port)
```

| Module | Role |
|---|---|
| `sec_coprocessor` | top; chooses the kernel with `KERNEL` |
| `axil_regs` | AXI4-Lite register file (settings, keys, status, last MAC) |
| `key_store` | per-bitstream keys and reference tags, one-cycle registered read |
| `reconfig_ctrl` | sequences one run: slot read, key load, block count, MAC check |
| `crypto_kernel_3aes` | three AES-CBC cores (D, E, M) |
| `crypto_kernel_1aes` | one shared AES-CBC core plus the D/E/M scheduler |
| `aes_cbc_core` | folded AES-128 with CBC chaining, one round per cycle |
| `aes_key_expand` | computes the 11 round keys into registers when a key is loaded |
| `stream_upsizer`, `stream_downsizer` | 32-bit words <-> 128-bit blocks |
| `block_fifo` | small output FIFO of the kernels |
| `aes_pkg`, `secdr_pkg` | AES functions and tables; shared types and the register map |

The host processor, the DMA, the DDR controller, the TRNG that generates the
keys and the configuration port primitive are not part of this RTL. Their
connections are the top's AXI4-Lite, AXI4-Stream and `icap_*` ports.

## The folded AES-CBC core (`aes_cbc_core`)

The core does one AES-128 round per clock. A block starts with the key
whitening, which is added to the input on the way into the state register.
Rounds 1 to 10 then follow on consecutive cycles. The result is at
`dout_valid` **11 cycles after `start`**. The core raises `ready` in its last
round, so a new block can start on the same cycle the previous one finishes.
Back-to-back blocks therefore start **every 10 cycles**, which is 128 bits per
10 cycles. Encryption and decryption share the state register and the round-key
input. The S-box and inverse S-box are computed in a package function when the
design is elaborated (multiplicative inverse in GF(2^8) plus the affine map).
No table file is read.

The CBC chaining is inside the core:

* **Decryption:** `dout = AES⁻¹(c) xor chain`. The chain register takes the
  ciphertext block when the block starts.
* **Encryption and MAC** (`use_fb = 1`): the input is xored with the previous
  output. If the previous block finishes in the same cycle the next one starts,
  the xor takes the round output directly, not the registered output. That
  combinational path is what keeps encryption at one block per 10 cycles.

The round keys come from `aes_key_expand`. It fills an 11-entry register
schedule in 10 cycles after a key is loaded, once per run. The core reads
`run_rk[run_rk_idx]`. In the 1-AES kernel, the key for each block comes from a
multiplexer over three such schedules.

## The 3-AES kernel (`crypto_kernel_3aes`, default)

```
 in block --> [D core, K_DEC] --> D register --+--> [E core, K_ENC] --> out (phase 1)
                                               +--> [M core, K_MAC] --> MAC
                                               +------------------------> out (phase 2)
```

D decrypts a block every 10 cycles. Each plaintext block is held in the D
register and handed to E (phase 1 only) and M. These start it 11 cycles after D
started, while D is already working on the next block. All three cores
overlap, so both phases run at **one block per 10 cycles**. The output FIFO
(`OUT_DEPTH` blocks) decouples the kernel from the downstream stream.
Decryption of a new block is allowed only if the FIFO can take every block
already in flight (credit counting), so a stalled consumer never loses data.
The MAC register holds the CBC-MAC of all blocks so far. After the last block
it is the tag of the whole stream.

## The 1-AES kernel and its schedule (`crypto_kernel_1aes`)

This is the most involved part of the design. One core must do everything:
decrypt every block, then re-encrypt it (phase 1) and/or MAC it. Two timing
facts drive the schedule:

1. A follow-up operation (E or M) on block *n* needs the plaintext of block
   *n*, which exists only 11 cycles after its decryption started. The core
   can start a new block only every 10 cycles. So if the core decrypts a block
   and nothing else is ready, it has **one idle cycle** before the E/M of that
   block can start.
2. Each operation has its own CBC chain: the previous ciphertext block for D,
   the E register and the M register for the other two. The kernel hands the
   right chain value and key schedule to the core with every block it starts.
   Blocks must therefore pass through each operation in stream order.

The kernel keeps the decrypted blocks in a small ring of **D registers**.
Each entry records which follow-ups it still needs (`need_e`, `need_m`). At
every cycle on which the core can start a block, the scheduler applies one
rule:

> start a **decryption** if an input block is waiting, a D register is free
> and the output FIFO has credit; otherwise start the pending **E, then M**,
> of the oldest D entry whose data already exists; otherwise stay idle.

A D entry is freed when its last follow-up starts. The core has captured its
operand by then.

With `RESCHED = 0` there is **one D register** (option 1). The core runs
`D1, idle, M1, D2, idle, M2, ...`, so phase 2 takes **21 cycles per block**:

| cycles | 1-10 | 11 | 12-21 | 22-31 | 32 | 33-42 |
|---|---|---|---|---|---|---|
| core | D1 | idle | M1 | D2 | idle | M2 |

Phase 1 adds the E: `D, idle, E, M` = **31 cycles per block**.

With `RESCHED = 1` (default) there are **two D registers**, D1 and D2.
The second decryption fills the idle cycle, and from then on a follow-up is
always ready when the core frees up:

| cycles | 1-10 | 11-20 | 21-30 | 31-40 | 41-50 | 51-60 | 61-70 | 71-80 |
|---|---|---|---|---|---|---|---|---|
| core | D1 | D2 | M1 | D3 | M2 | D4 | M3 | M4 |

Phase 2 runs at **20 cycles per block** and phase 1 at **30 cycles per
block** (`D E M` per block with no gaps). The critical path is the same as
with one D register. The extra cost is one 128-bit register.

If phase 2 runs with `mac_en = 0`, no M is needed. Each plaintext block goes
out as soon as it is decrypted, at **10 cycles per block**, the same as the
3-AES kernel. In this mode authenticity rests on the configuration port's
frame CRC, which the attacker cannot forge because the CRC words are
encrypted.

The scheduling rule, the in-order ring and the FIFO credit scheme are this
design's own. The document gives only the resulting cycle tables and rates,
and the testbenches measure exactly those rates (30/20/10 and 31/21/10 cycles
per block).

## Keys, IV and MAC

| | K_DEC | K_ENC | K_MAC | MAC compared with |
|---|---|---|---|---|
| phase 1 | `Ks` (register) | `Ki[slot]` | `Ks_mac` (register) | `TAG` register (provider's tag) |
| phase 2 | `Ki[slot]` | unused | `Ki_mac[slot]` | tag stored in the slot |

**Separate MAC keys (a departure).** The scheme as published uses one key per
phase for both decryption and the MAC. But with the same key and the same IV,
the CBC-MAC of a CBC-decrypted stream is always the stream's last ciphertext
block, for any ciphertext. A MAC under the decryption key therefore accepts
any tampering that leaves the last block alone. The end-to-end test showed
this. Each phase therefore has its own MAC key: `Ks_mac` next to `Ks`, and
`Ki_mac` stored with `Ki` in every slot.

**IV.** One IV register feeds all three chains, and a stored bitstream is read
back with the IV it was received with. The document does not say how IVs are
handled.

**Reference tag for phase 2.** The document stores "the new key and MAC" on
chip but does not say how that MAC is produced. Here the host writes it into
the slot together with `Ki` and `Ki_mac`: write `KI`, `KIM` and `TAG`, then
`CTRL` with bit 3 set. The TRNG that would supply `Ki` is outside this design.
The last computed MAC can always be read from `MAC`.

## Register map (AXI4-Lite, byte addresses)

| Address | Name | Contents |
|---|---|---|
| 0x00 | CTRL | [0] start (pulse), [1] phase (0 = 1, 1 = 2), [2] mac_en, [3] key-store write (pulse), [15:8] slot |
| 0x04 | STATUS | [0] busy, [1] done, [2] mac_ok, [3] mac_err (read only) |
| 0x08 | NBLOCKS | number of 128-bit blocks in the run |
| 0x10-0x1c | KS | shared key (write only) |
| 0x20-0x2c | KI | bitstream key to store (write only) |
| 0x30-0x3c | IV | IV of all chains |
| 0x40-0x4c | TAG | expected MAC of phase 1, and the tag written into the key store |
| 0x50-0x5c | MAC | MAC of the last run (read only) |
| 0x60-0x6c | KSM | shared MAC key (write only) |
| 0x70-0x7c | KIM | bitstream MAC key to store (write only) |

A 128-bit value is four words, and the lowest address holds bits [127:96].
Key registers read as zero. A write is accepted when address and data are both
valid, and answered (OKAY) one cycle later. A read is answered one cycle after
its address.

**A run:** write KS/KSM/IV/TAG (phase 1) and NBLOCKS, then write CTRL with
start = 1, the phase, mac_en and the slot. `reconfig_ctrl` reads the slot,
loads the three key schedules, resets the chains and lets exactly NBLOCKS
blocks into the kernel. When all NBLOCKS blocks have left the kernel and the
output words have drained, it compares the MAC. `irq` (= STATUS.done) then
stays high until the next start. With `mac_en = 0` in phase 2, no MAC is
checked and mac_ok and mac_err both stay low.

## Streams and word order

Both streams use 32-bit valid/ready handshakes (AXI4-Stream `tdata`, `tvalid`,
`tready`, no `tlast`). Four input words make one block, with the **first word
as bits [127:96]**. The output is split in the same order. Phase 1 output goes
to `m_axis_*`, and phase 2 output goes to `icap_*`. The `icap_*` port is a
plain valid/ready word stream. The adaptation to the configuration primitive
(its write enable and busy) is left to the integrating system. The block count
comes from NBLOCKS, so a bitstream must be padded to whole 16-byte blocks.
7-series bitstreams can be padded with NOOP words.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `sec_coprocessor.KERNEL` | 0 | 0 = 3-AES, 1 = 1-AES with two D registers, 2 = 1-AES with one D register |
| `sec_coprocessor.NSLOTS` | 16 | key store slots (bitstreams kept in external memory). The document gives no number |
| `sec_coprocessor.OUT_DEPTH` | 4 | output FIFO depth in blocks |
| `crypto_kernel_1aes.RESCHED` | 1 | set by `KERNEL` at the top |

At the defaults, generic synthesis gives the top about 7,100 flip-flop bits
and 162 Kbit of memory. Most of the flip-flops are the three stored 11-entry
round-key schedules (3 × 11 × 128 bits). The memory is mostly S-box ROM:
64 Kbit per AES core for 16 S-boxes and 16 inverse S-boxes, plus 8 Kbit per
key expander. The key store (16 × 384 bits) is also in it. The published
prototype needs about ten block RAMs per AES core, which is in line with this
design's ROM. The 1-AES kernel needs the S-box ROM of one core instead of
three, but about as many flip-flops as the 3-AES kernel, because it still
keeps three round-key schedules. Storing the round-key
schedules in registers makes this design's register count higher than the
published prototype's.

## Simulating

Any Verilator 5 works. List the two packages first:

```
verilator --binary --timing --assert -Irtl \
  rtl/aes_pkg.sv rtl/secdr_pkg.sv rtl/*.sv tb/aes_ref_pkg.sv \
  tb/tb_sec_coprocessor.sv --top-module tb_sec_coprocessor
./obj_dir/Vtb_sec_coprocessor
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`, and every one
has a watchdog. Replace the testbench name to run another one:

| Testbench | What it checks |
|---|---|
| `tb_aes_cbc_core` | FIPS-197 and SP 800-38A vectors (ECB and CBC, both directions), 11-cycle latency, 10-cycle spacing |
| `tb_crypto_kernel_3aes` | phase 1 and phase 2 streams and MACs against a reference model, with random input gaps and output stalls |
| `tb_crypto_kernel_1aes` | both 1-AES variants side by side: outputs, MACs and cycles per block, then the same runs with random input gaps and output stalls |
| `tb_key_store`, `tb_stream_upsizer`, `tb_stream_downsizer`, `tb_axil_regs`, `tb_reconfig_ctrl` | each block alone, against independently computed values |
| `tb_sec_coprocessor` | whole design at default parameters: key provisioning, phase 1 and phase 2 of a 2-frame, 61-block 7-series partial bitstream, a full-rate phase 2, a wrong provider tag and a flipped stored bit. It counts input gaps, output stalls, key-store writes, accepted and rejected MACs and both phases, and fails if any of them never happens |
| `tb_sec_coprocessor_1aes` | the top with `KERNEL = 1` and `2`, checking 30/20/10 and 31/21/10 cycles per block |

`tb/aes_ref_pkg.sv` is an independent, purely behavioural AES and CBC model
used by the testbenches. It shares no code with `rtl/`.

## How far it can be trusted, and where it departs

* The AES core matches the standard test vectors. All CBC streams and MACs are
  compared block by block with the independent reference model, under random
  back-pressure. The cycle rates the document gives (10, 20/30, 21/31 and 10
  cycles per block) are measured in simulation, not only designed for.
* Timing closure and clock frequency have not been checked on an FPGA. The
  document's Mbps figures imply a clock of about 196 MHz, and nothing here
  shows that this RTL reaches it.
* Only simulation has been done. There is no formal proof and no hardware
  test. The AXI4-Lite slave is minimal. It has no error responses and ignores
  the low address bits.
* Departures from the published design:
  * separate MAC keys `Ks_mac` and `Ki_mac` (see above);
  * the phase-2 reference tag is written by the host, and one IV serves all
    chains;
  * the configuration port output is a plain valid/ready stream;
  * the register map, the run controller, the 1-AES scheduling rule, the output
    FIFO and the number of key-store slots are this design's own.
* The design has no protection against side-channel (DPA) attacks. The
  document names this as a weakness of vendor AES cores but does not design a
  countermeasure.
