# AES-128 encryption core with interleaved two-cycle rounds

This is an AES-128 encryption engine (128-bit key, encryption only) built
around one idea: split each AES round at the synchronous S-box ROM into two
one-cycle halves, and keep **two blocks in the datapath at once**, one in each
half. No logic is duplicated. A round takes two short cycles, yet the core
finishes one block every 10 cycles on average, the same rate as a core that
does a full round per cycle, with a shorter critical path. Two more choices
save cycles and power:

* **Offline key expansion.** All 11 round keys are computed once per cipher
  key and kept in an 11x128 register file. Encryption then only reads them.
* **Initial round on load.** The first AddRoundKey (plaintext XOR cipher key)
  is done as the block is latched, so the datapath runs rounds 1..10 only.

Encrypting the FIPS-197 Appendix C.1 vector (key `000102...0f`, plaintext
`00112233...ff`) gives `69c4e0d86a7b0430d8cdb78070b4c55a`, and random keys
and blocks match a behavioural AES model.

## Block diagram

```
 key_plaintext ─┬─► aes_input_interface ──key_rd, cipher_key──► aes_key_logic ──round_key──┐
 load_key  ─────┤    (key reg, pt ^ key)                          (expansion,              │
 load_data ─────┘        │ data_rd, input_blk                     11x128 regfile)          │
                         │                                          ▲ 32b   │ key_addr ◄──┤
                         ▼                                          │       ▼             │
              aes_processing_core ◄──────────── from_sbox ──── aes_sbox_rom (8 x dual-port │
               (2-stage round,     ───to_sbox──► mux ─────────►  256x8 ROM, 1 cycle)      │
                2 blocks)           key logic {32b, 96'b0} ─┘  (select = mode)            │
                  │   │ ready{key,data}                                                   │
 ciphertext ◄─────┘   ▼                                                                   │
 ct_valid ◄──── aes_system_control ──mode──► key logic, mux                               │
 ready_for_key, ready_for_data ◄─┘                                                        │
```

| Module | Role |
|---|---|
| `aes128_encrypt_top` | Wires the units, holds the S-box address multiplexer, checks the load protocol with assertions |
| `aes_input_interface` | Key register; latches `plaintext ^ key`; `key_rd`/`data_rd` pulses; 3-bit status bus |
| `aes_key_logic` | Key expansion (2 cycles per round key) and round-key read port |
| `aes_key_regfile` | 11x128 single-port RAM, synchronous read and write |
| `aes_processing_core` | Round datapath, two interleaved blocks, its own slot control |
| `aes_sbox_rom` / `aes_sbox_dp_rom` | 16 S-box lookups per cycle from eight dual-port 256x8 ROMs |
| `aes_system_control` | Three-state FSM: mode select, `ready_for_key`, `ready_for_data` |
| `aes_pkg` | Types, constants, S-box table, ShiftRows, MixColumns, RotWord, Rcon |

Byte order follows FIPS-197 throughout: byte 0 of a block is bits
`[127:120]`, and each 32-bit word is one column of the state.

## The interleaved round datapath

This is the part to understand first. One round is split at the ROM's
input register:

* **Stage 1, SubBytes/ShiftRows.** The 16 state bytes, reordered by
  ShiftRows, go to the 16 ROM lanes as addresses (`to_sbox`). ShiftRows only
  moves bytes, so it is done on the addresses for free. The ROM registers the
  looked-up bytes at the clock edge.
* **Stage 2, MixColumns/AddRoundKey.** `from_sbox` goes through MixColumns
  (two levels of XOR) and is XORed with the round key (one more level). The
  result is written to the state register. In round 10 MixColumns is skipped
  and `from_sbox ^ round_key` goes to the ciphertext register instead.

The ROM output register and the state register form a **two-slot ring**.
Each clock edge the block in the state register moves into the ROM (stage 1),
and the block in the ROM moves through stage 2 back into the state register.
With two blocks, A and B, the stages alternate:

```
cycle      t     t+1    t+2    t+3   ...  t+18   t+19   t+20
stage 1    A.r1  B.r1   A.r2   B.r2  ...  A.r10  B.r10  A'.r1
stage 2    -     A.r1   B.r1   A.r2  ...  B.r9   A.r10  B.r10
ct_valid                                                A
```

The core keeps a valid bit and a round number for each slot. Each cycle:

* If the state register holds a block, that block enters stage 1 with its
  next round number.
* If it does not, a newly loaded block (`input_ready`, round 1) may enter
  instead.
* `key_addr` is the round number of the block in stage 1. The key register
  file returns that key one cycle later, just in time for stage 2.

A new block can only enter when the state register will be empty. That is
the case when the stage-2 slot is empty or is finishing round 10.
`ready.new_data` says exactly this one cycle ahead, which lets a new block be
loaded while the core is still full. It then enters the slot that is freed.
If external logic loads as soon as `ready_for_data` allows, two blocks
finish every 20 cycles.

## Key expansion

The S-box is needed for SubWord, so each round key takes two cycles.

1. **SUB cycle.** RotWord of the last word of the previous round key goes to
   ROM lanes 0..3. The top-level multiplexer pads it with 96 zero bits.
2. **MIX cycle.** The ROM output is XORed with Rcon, then chained through the
   four previous words. The new key is written to the register file.

A `key_rd` pulse first writes the cipher key to entry 0. The unit then steps
only while `mode == MODE_KEY_EXPAND`. The ten round keys take 20 cycles, and
`exp_done` pulses in the last one. The register file has a single port. Its
address comes from the expansion sequencer during writes and from the core's
`key_addr` otherwise.

The S-box ROM holds no stored table. `aes_pkg::sbox_table()` computes it at
elaboration:

* Walk `p = 3^k` for k = 0..254. Since 3 generates GF(2^8)*, this visits every
  nonzero byte once.
* The inverse of `3^k` is `3^(255-k)`.
* Apply the FIPS-197 affine map (constant `0x63`).

## Interface and timing

Ports of `aes128_encrypt_top` (clock rising edge, `rst` synchronous, active
high):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `key_plaintext` | in | 128 | Shared key / plaintext bus |
| `load_key` | in | 1 | Bus holds a cipher key this cycle |
| `load_data` | in | 1 | Bus holds a plaintext block this cycle |
| `ready_for_key` | out | 1 | A `load_key` is allowed this cycle |
| `ready_for_data` | out | 1 | A `load_data` is allowed this cycle |
| `ciphertext` | out | 128 | Result, valid while `ct_valid` |
| `ct_valid` | out | 1 | One-cycle pulse per block, in load order |

Protocol:

* After reset, `ready_for_key` is high and `ready_for_data` is low.
* Pulse `load_key` with the key on the bus. `ready_for_data` rises **22
  cycles** later: 1 cycle latch, 1 cycle mode change, 20 cycles expansion.
* Pulse `load_data` in any cycle where `ready_for_data` is high. The
  ciphertext comes **21 cycles** later: 1 cycle latch, 20 cycles of rounds.
* A new key is accepted only when no block is in flight. Loading it restarts
  expansion.
* The two ready signals are combinational from registered state and may both
  be high at once. Strobe only one of `load_key` and `load_data` per cycle.
  Assertions in the top and in the input interface report violations.

## Where this RTL departs from, or fills in, the description

These points come from the written design description rather than a
reference implementation:

* **RotWord.** The description says RotWord rotates the *first* word of the
  previous key. Standard AES (FIPS-197) rotates the *last* word. The RTL
  follows FIPS-197 and matches the standard test vectors.
* **Throughput.** The reported figure (1940.9 Mbps at 159.2 MHz) works out to
  10.5 cycles per block. This RTL sustains 10 cycles per block: 12.8
  bits/cycle, or 2037.8 Mbps at that clock. The extra half cycle is
  unexplained, and none was added. The clock rate is an FPGA timing result
  that simulation does not check.
* **Ready timing.** The description has the new-data ready signal rise
  "before the last round". Here it rises in the cycle before the entry slot
  frees, which is during the last round's second half. This is the earliest
  point at which a one-cycle load latch still meets the free slot.
* **Status bus.** The description shows a 3-bit control bus between the
  input interface and the system control unit, but gives neither its
  direction nor its meaning. Here it is `{key_rd, data_rd, key_valid}` from
  the interface.
* **Own choices.** The handshake, the FSM states, the expansion start and
  done signals, the reset behaviour and the byte-lane assignment of the ROMs
  were not specified and are this design's own.
* **ROMs.** Each 256x8 dual-port ROM is a memory array with computed initial
  contents. An FPGA tool should map it onto one block RAM (eight in total). On
  an ASIC it becomes a ROM or logic.
* **Register file.** The 11x128 key register file is an ordinary memory array
  with synchronous read.

Not included: decryption, other key sizes and modes of operation. None are
part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The reference is
`tb/aes_ref_pkg.sv`, a behavioural AES model written independently of the
RTL: it finds the S-box by exhaustive inverse search, works on a 4x4 byte
matrix, and uses a generic GF multiply.

| Testbench | What it checks |
|---|---|
| `tb_aes_sbox_rom` | All 256 values on all 16 lanes; one-cycle latency |
| `tb_aes_input_interface` | Key storage; `plaintext ^ key`; pulse widths; status bus |
| `tb_aes_key_regfile` | Random write/read; synchronous read; read data held during writes |
| `tb_aes_key_logic` | FIPS-197 A.1 and random key schedules; `exp_done` 20 cycles after `key_rd` |
| `tb_aes_processing_core` | FIPS-197 C.1; 20-cycle latency; 40 blocks in about 400 cycles; two blocks in flight; `new_key` only when empty |
| `tb_aes_system_control` | 2000 random cycles against a cycle model |
| `tb_aes128_encrypt_top` | End to end at default configuration (see below) |

`tb_aes128_encrypt_top` runs the whole core at its default configuration. It
checks 131 blocks under five different keys, the 22-cycle and 21-cycle
latencies, and 50 full-rate blocks in 502 cycles. It also counts that each
of these happens: key expansion, a key change, two blocks in flight, a load
into a full core, and back-to-back loads.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes128_encrypt_top.sv \
    --top-module tb_aes128_encrypt_top -Mdir obj
./obj/Vtb_aes128_encrypt_top
```

Swap the testbench name to run another one. All testbenches finish in well
under a second. The RTL passes `verilator --lint-only -Wall` with only
unused-signal warnings.
