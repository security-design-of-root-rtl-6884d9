# A self-protecting RISC-V root of trust

A root of trust (RoT) is the part of a system that everything else relies on
to check integrity and hold keys. If it can be subverted, nothing it vouches
for can be believed. This RTL implements the hardware that lets a small
RISC-V RoT protect *itself*, in two ways:

* **Secure boot chain.** The processor pipeline stays off until the boot ROM
  has been hashed with SM3 and found to match a reference digest. The boot
  flow then authenticates the user program (ITCM) and user data (DTCM)
  against digests that were hashed and AES-CTR encrypted on a host. The AES
  key comes from a key derivation circuit that hashes a ring-oscillator PUF
  ID mixed with a ring-oscillator TRNG word.
* **Run-time stack protection.** Two independent monitors watch the
  processor's instruction stream and stop buffer overflows that would
  overwrite a saved return address (the classic control-flow hijack).
  Mechanism 1 is pure hardware and cannot be bypassed. It keeps a shadow
  copy of the call stack and forbids stores onto the stack slot holding the
  current function's return address. Mechanism 2 uses a custom `Guard`
  instruction that tells the hardware how large a buffer is. It counts the
  bytes that stores write and stops the store that would exceed that size,
  before the store executes.

The processor core itself is not part of this RTL. `rot_top` brings out every
connection to it: boot ROM fetch, TCM port, decode/write-back trace,
`fetch_en`, `core_stall` and `store_kill`.

```
                +-------------------- rot_top --------------------------+
 boot_ref_hash->| boot_rom -> boot_verify (SM3) --pipeline_en--+--> fetch_en
                |                                             |         |
                |   ro_puf --+                                v         |
                |            xor -> SM3 = kdf ---------key----+         |
                |   ro_trng -+                                |         |
                |                                             v         |
 loader ------->| tcm_ram (ITCM) --+                                    |
                | tcm_ram (DTCM) --+-> user_verify (SM3, AES-CTR) -> uv_halt
 host digests ->|                                                       |
                |                                                       |
 core trace --->| mp1_ret_guard (shadow stack, WB store check) -+-> core_stall
                | guard_decode -> siidm -> hbcb (decode check) -+-> store_kill
                +-------------------------------------------------------+
```

## Secure boot chain

### 1. Boot ROM integrity (`boot_verify`, `boot_rom`, `sm3_core`)

Out of reset, `boot_verify` reads the boot ROM one word at a time and streams
the words into an SM3 engine. The last word is flagged with byte-valid code
`2'b11`, meaning all four bytes count. The digest is compared with
`boot_ref_hash`, the value held in the security register. On a match,
`pipeline_en` (and with it `fetch_en`) rises and stays high. On a mismatch,
`boot_fail` rises and the processor never starts. Once the check is over, the
ROM port is handed to the processor (`core_rom_addr`).

`sm3_core` takes big-endian 32-bit words on a valid/ready stream and does the
SM3 padding itself. It fills a 16-word (512-bit) group. It then runs the 64
compression rounds at one round per clock, reusing the group buffer as the
message-expansion window, and only then accepts the next group. A group
therefore costs 16 load cycles, 64 round cycles and 1 finish cycle. The
512-word ROM takes 3155 clocks from reset release to `done`.

The default ROM contents (`rtl/boot_code.hex`) are only an example image so
that there is something to hash. The image is 512 words from the 32-bit LCG
x' = 1664525·x + 1013904223, starting at x = 0x297. Replace it with real boot
code and provision that code's SM3 digest as `boot_ref_hash`.

### 2. Key derivation (`kdf`, `ro_puf`, `ro_trng`, `ring_osc`)

key = SM3(PUF_ID xor TRNG), with a 96-bit PUF ID and a 96-bit random number.
The 12-byte XOR result is hashed as one SM3 message, giving a 256-bit key.
The ID ties the key to the chip; the random term makes every derivation
different. The KDF runs when the pipeline starts and again on each
`kdf_start` pulse. The PUF ID is read once and latched.

* `ro_puf` compares 96 pairs of nominally identical ring oscillators. Each
  pair is enabled for `PUF_WINDOW` clocks, and two counters clocked by the
  two oscillators count edges. The bit is 1 when the first oscillator was
  faster. Pairs are evaluated one after another through one counter pair, so
  an ID takes 96·(WINDOW+3) clocks.
* `ro_trng` XORs three free-running oscillators of different lengths. It
  samples the XOR with the system clock through two flops and keeps one bit
  every `TRNG_DIV` clocks, so 96 bits take 768 clocks.
* `ring_osc` is a **behavioural model**: it toggles after a delay plus random
  jitter, with a per-instance `MISMATCH` delay standing in for manufacturing
  variation. On silicon or an FPGA it is a hand-placed inverter chain. In
  `ro_puf`, the mismatch of each oscillator comes from a hash of
  `DEVICE_SEED`, so different seeds behave like different chips.
  `DEVICE_SEED` has no meaning for synthesis.

SM3 was checked against the standard's vectors. It also reproduces this
design's published measurement: PUF ID 96'h366074446d7514e960ec200d xor
TRNG 96'h6dfaee3931c31ec8700a08d0 = 96'h5b9a9a7d5cb60a2110e628dd, whose key
is 256'h3b7301470d7200892f1b4412c698fd2294e209b6d2f7fa24b8acde3c354a9a8c.

### 3. User image authentication (`user_verify`, `aes_ctr`, `aes256_core`, `tcm_ram`)

The host hashes the user instruction image and the user data image with SM3.
It encrypts the two 256-bit digests with AES-256-CTR. The boot code loads
both images into ITCM/DTCM through port A of each `tcm_ram` and then pulses
`uv_start`. With the pulse it supplies the two ciphertexts, the initial
counter block `uv_ctr0` and the image lengths in words. `user_verify` then:

1. decrypts four 128-bit blocks, in the order ITCM digest high, ITCM digest
   low, DTCM digest high, DTCM digest low, with counters `ctr0` … `ctr0+3`;
2. hashes the first `uv_itcm_words` words of ITCM, then the first
   `uv_dtcm_words` words of DTCM, through the TCMs' second port;
3. compares each computed digest with its decrypted one. `uv_pass` reports
   the result. On any mismatch, `uv_halt` rises and stays high, and
   `fetch_en` falls for good.

**What the host must compute:** `enc_itcm = SM3(itcm) xor {AES_K(ctr0),
AES_K(ctr0+1)}` and `enc_dtcm = SM3(dtcm) xor {AES_K(ctr0+2), AES_K(ctr0+3)}`.
The counter increments over all 128 bits.

The AES core is encrypt-only, because CTR mode never needs the inverse
cipher. It does one round per clock with an on-the-fly key schedule: an
8-word window of the expanded key serves two rounds and then advances. A
block takes 15 cycles in the core and 17 through `aes_ctr`. The S-box is
computed at elaboration time from GF(2^8) exp/log tables rather than typed
in.

*Key distribution caveat.* The KDF key is random for every derivation, so a
host cannot know it unless it is told. `rot_top` therefore brings the key out
as `kdf_key` for a provisioning host. A product would need a proper
key-agreement or provisioning step instead. This RTL does not solve that
problem.

## Mechanism 1: hardware return-address protection (`mp1_ret_guard`)

This is the subtlest block. It rebuilds the program's call structure, the
"program control-flow graph" (PCFG), in real time from the decode-stage
instructions, using an FSM and a RAM shadow stack:

| condition | instruction in decode |
|-----------|-----------------------|
| C1 | `JAL` with rd = x1 (a call) |
| C2 | `SW` with rs2 = x1 (return address saved to the stack) |
| C3 | `JALR` (return of a leaf function that never saved ra) |
| C4 | `LW` with rd = x1 (return address restored) |
| C5 | `JALR` (the return that follows C4) |

```
 IDLE/BODY --C1--> CALL --C2--> PUSH --> BODY --C4--> LOAD --C5--> POP --> BODY/IDLE
                   CALL --C3--> BODY/IDLE          LOAD --C1--> CALL
```

PUSH writes the entry {x1, x2 + imm}: the return address and the stack slot
where it was saved, with x2 = sp and imm = the SW offset. POP removes the top
entry. BODY is used while entries remain, IDLE when the shadow stack is empty.

**Restricted space.** If the top entry's slot address is A, no store may hit
the range (A−4, A], i.e. byte addresses A−3 … A. After a POP, the range comes
from the new top entry, so the caller's slot is protected again.

**Detection.** The address of each store in the write-back stage is compared
with the range. One exception applies: the store that saves the return
address is itself allowed through once. Without that exception every
function prologue would raise an alarm.

**Blocking.** A hit pulses `attack`, and `store_kill` suppresses that store
combinationally in the same cycle. `stall` holds the processor for
`STALL_CYCLES` (2) clocks. From then on, every store of the offending
function is killed until that function returns (its POP). The processor then
continues normally.

Points to be aware of:

* The range (A−4, A] covers the three bytes *below* the slot plus the slot's
  lowest byte. It does not cover the whole slot word A … A+3. The range is
  kept as specified. In practice an overflow that runs upward from a buffer
  below the slot always touches byte A first, so it is caught. But a
  legitimate byte store to the last three bytes under the slot also raises an
  alarm.
* The shadow stack holds `SS_DEPTH` (32) entries. Deeper calls are not
  recorded (`full` is raised) and go unprotected until the depth drops again.
* `reg_x1` / `reg_x2` must be the decode stage's view of ra and sp (after
  forwarding). The pushed slot address uses x2 + imm, not the SW's actual
  base register.

## Mechanism 2: instruction-assisted buffer check (`guard_decode`, `siidm`, `hbcb`)

**Guard instruction** (custom opcode space):

| [31:20] | [19:12] | [11:7] | [6:0] | operation |
|---------|---------|--------|-------|-----------|
| imm12 | 8'h01 | 5'h00 | 7'h77 | s0 ← {20'b0, imm12} |

The compiler or programmer places `Guard <size>` before a call that may
overflow a buffer (`strcpy`, `gets`, …). `guard_decode` writes the size into
the security register s0 (`REF_BS`). This s0 is a dedicated register inside
the RoT, not general-purpose x8. The Guard also arms the checker and clears
the byte count.

**SIIDM** (store instruction information decoding). A decoded store
qualifies when both conditions hold:

* its immediate is ≥ 0;
* its immediate is 0, 1, 2 or 4 more than the immediate of the previous
  store, of any kind, qualifying or not. The first store after a Guard has
  no predecessor and is judged on the sign alone.

A qualifying store adds Y_i bytes to `RT_BS`: 4 for SW, 2 for SH, 1 for SB,
0 otherwise. A byte-copy loop (`sb x, 0(ptr)` with ptr incremented) therefore
adds one per iteration. Stores that do not qualify are ignored.

**HBCB** (hardware boundary check). While armed, it compares REF_BS with
RT_BS, *including the store currently in decode*. An overflow
(REF_BS − RT_BS < 0) is therefore found before the offending store reaches
memory. The response has three steps:

1. `attack` pulses and the pipeline stalls for `STALL_CYCLES`;
2. `store_block` suppresses every store until the segment ends;
3. the pipeline resumes.

The segment ends when the function called after the Guard returns to the
function that issued it (call depth back to 0), or when the issuing function
returns. A new Guard re-arms the check and releases the block. Mechanism 2 is
only as good as the size software passes in, which is why it complements
mechanism 1 rather than replacing it.

## `rot_top` interface

| group | ports |
|-------|-------|
| boot | `boot_ref_hash[255:0]` (security register value), `core_rom_addr`, `core_rom_rdata`, `boot_done`, `boot_fail`, `boot_hash`, `fetch_en` |
| keys | `kdf_start`, `kdf_busy`, `kdf_key_valid`, `kdf_key[255:0]`, `puf_id[95:0]` |
| TCMs | `itcm_{en,we[3:0],addr,wdata,rdata}`, `dtcm_{...}`: synchronous, byte strobes |
| authentication | `uv_start`, `uv_ctr0`, `uv_enc_itcm`, `uv_enc_dtcm`, `uv_itcm_words`, `uv_dtcm_words`, `uv_busy`, `uv_done`, `uv_pass`, `uv_halt` |
| core trace | `id_valid`, `id_instr`, `reg_x1`, `reg_x2`, `wb_store_valid`, `wb_store_addr` |
| protection | `core_stall`, `store_kill`, `mp1_attack`, `mp2_attack`, `guard_ref_bs`, `guard_rt_bs` |

All logic is clocked on `clk`, except the PUF's edge counters, which run on
oscillator clocks and are read only while their oscillators are stopped.
Reset `rst_n` is asynchronous and active low. All memories read one cycle
after the address.

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `ROM_WORDS` | 512 | boot ROM words |
| `ITCM_WORDS`, `DTCM_WORDS` | 8192 | 32 KiB each |
| `NBITS` | 96 | PUF ID and TRNG width |
| `PUF_WINDOW` | 64 | PUF counting window, clocks |
| `TRNG_DIV` | 8 | clocks per TRNG bit |
| `DEVICE_SEED` | 0x12345678 | oscillator-model mismatch seed (simulation only) |
| `SS_DEPTH` | 32 | shadow stack entries |
| `STALL_CYCLES` | 2 | stall length on an alarm |

## How far to trust it, and where it departs from the original description

The following follow the original description closely:

* the boot ROM check (512-bit groups, 64 compressions, last-word code 2'b11,
  comparison with a security register, start signal);
* the KDF structure;
* the five PCFG conditions, PUSH contents, restricted range, write-back check
  and stall/block/resume sequence;
* the Guard encoding;
* the SIIDM rules and formula;
* the HBCB comparison.

The following are this design's own choices:

* SM3 and AES follow their published standards. AES uses a **256-bit key**,
  matching the 256-bit KDF output; the key length is not given in the
  original.
* The stream interfaces, cycle schedules, memory sizes (2 KiB ROM, 32 KiB
  TCMs), shadow-stack depth, stall length and reset values are this design's
  own choices.
* The PCFG FSM's exact state graph between the five conditions is this
  design's reading. So are the one-time exemption of the saving store, the
  "block until return" scope, and Mechanism 2's segment boundaries and
  first-store rule. A store that does not qualify adds nothing but does not
  reset `RT_BS`; the sum runs from one Guard to the next.
* User-image authentication is one hardware sequencer (`user_verify`). The
  original has boot software drive the same steps using the hash and cipher
  hardware. The sequence (decrypt, hash, compare, continue or stop) is the
  same.
* The TRNG and PUF circuits are the simplest that use the stated principle.
  Their statistical quality, and the PUF's reliability and uniqueness, depend
  on silicon and are not demonstrated here. In simulation, two seeds give IDs that differ
  in roughly half their bits, and repeated reads are identical.
* Key distribution to the host is unresolved (see above).

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values come
from independent models in `tb/`:

* `sm3_ref_pkg`: whole-message SM3 with the full 68-word expansion;
* `aes_ref_pkg`: textbook AES-256, with an S-box built by a different method;
* `rv_asm_pkg`: a small RV32I assembler that includes `Guard`;
* published test vectors.

| testbench | what it shows |
|-----------|---------------|
| `tb_sm3_core` | standard vectors and all padding cases; 81 clocks per group |
| `tb_aes256_core`, `tb_aes_ctr` | FIPS-197 / SP 800-38A vectors, counter carry, latency |
| `tb_boot_rom`, `tb_boot_verify` | ROM contents; good and bad reference; 3155-clock check |
| `tb_ring_osc`, `tb_ro_trng`, `tb_ro_puf`, `tb_kdf` | oscillator model, TRNG timing and balance, PUF bits vs. modelled mismatch, reliability, uniqueness, key = SM3(ID xor RNG) |
| `tb_tcm_ram`, `tb_user_verify` | byte writes, dual port; pass, tampered ITCM, wrong DTCM ciphertext |
| `tb_mp1_ret_guard`, `tb_guard_decode`, `tb_siidm`, `tb_hbcb` | PCFG push/pop, range, nesting, leaf calls, stall length; Guard encoding; RT_BS vs. model over random streams; overflow, block and segment end |
| `tb_rot_top` | whole design at default sizes: boot pass and fail, KDF, full 32 KiB ITCM+DTCM authenticated then tampered, both mechanisms; every mechanism is counted |
| `tb_overflow_attack` | the strcpy attack: without protection the saved ra 0x4d0 becomes 0x488; with mechanism 1 alone, or with `Guard 12`, it stays 0x4d0 |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`
(the boot ROM image is read as `rtl/boot_code.hex`):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sm3_pkg.sv rtl/aes_pkg.sv rtl/rv_pkg.sv \
  tb/sm3_ref_pkg.sv tb/aes_ref_pkg.sv tb/rv_asm_pkg.sv \
  rtl/rot_top.sv tb/tb_rot_top.sv --top-module tb_rot_top -o sim
./obj_dir/sim
```

Verilator finds the remaining modules by file name through `-Irtl`.
`tb_rot_top` runs in well under a minute. The testbenches that use the
oscillator models need `--timing`.
