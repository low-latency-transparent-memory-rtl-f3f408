# LLMEE: a low-latency memory encryption engine built on ASCON

Data kept in external DRAM can be read off a powered-down module (cold boot) or
sniffed on the memory bus. LLMEE sits between a CPU and its memory controller
and encrypts every word the CPU stores in a protected address window. Software
does not change: the CPU reads and writes the window like ordinary memory, and
the engine encrypts on the way out and decrypts on the way in.

The engine is meant for small IoT-class SoCs, so it is built around the
lightweight cipher ASCON. It works on one 32-bit word at a time, without
bursts, and runs only the part of ASCON that it needs: the 12-round
initialization. That part runs on a "fast core" that does one ASCON round per
clock.

The RTL targets an FPGA SoC of the Zynq-7000 kind. The CPU reaches the engine
through a 32-bit AXI4-Lite port, and the engine reaches DDR through a 64-bit
AXI4 port.

## How one word is protected

Each CPU word gets its own keystream, so the engine is used like a tweakable
block cipher in counter mode:

```
N         = { nonce[31:0], dram_addr[31:0], 64'h0 }            128-bit ASCON nonce
S         = IV || K || N                                       320-bit state
S         = p^12(S) ^ (0^192 || K)                             ASCON-128 initialization
keystream = S.x0[63:32]                                        upper half of the rate word
C         = P ^ keystream
```

- **Key.** `K` is a 128-bit key held in a register inside the engine.
- **IV.** `IV` is the ASCON-128 value `80400c0600000000`.
- **Address.** `dram_addr` is the memory address of the word, so equal data at
  different addresses gives different ciphertext.
- **Nonce.** `nonce` is a fresh 32-bit value drawn for every write. Rewriting
  the same value at the same address therefore also gives a new ciphertext.

Decryption needs the nonce again, so the engine stores it next to the
ciphertext. Each protected 32-bit CPU word takes one 64-bit memory word:

```
CPU address            DRAM address                     64-bit memory word
LLMEE_BASE + 4*i   ->  DDR_BASE + 8*i                   [63:32] nonce   [31:0] ciphertext
```

The memory footprint is therefore twice the protected size. The translation
is `DRAM = DDR_BASE + 2*(CPU - LLMEE_BASE)`, modulo 2^32.

- **Write.** Take a new nonce, run the cipher on `{nonce, DRAM address}`, XOR
  the result with the data, then write `{nonce, ciphertext}` to memory.
- **Read.** Read `{nonce, ciphertext}` from memory, run the cipher on
  `{stored nonce, DRAM address}`, XOR, and return the plaintext.

Encryption and decryption are the same XOR, so a single cipher serves both
paths.

What this gives and what it does not:

- **Confidentiality only.** There is no tag and no integrity check. A modified
  memory word decrypts to garbage without being detected.
- **The nonce generator is not a random source.** It is a 32-bit maximal-length
  LFSR (x^32 + x^22 + x^2 + x + 1). It steps once per completed write and
  restarts from `NONCE_SEED` at every reset. After a reset, writes reuse the
  nonces of the previous run. If the same address is written again, its
  keystream repeats.
- **Test mode.** With `RNG_EN = 0` the nonce is the constant `DEFAULT_NONCE`.
  The keystream then depends only on the address, which is useful for
  debugging and weak for security.

## The ASCON fast core (`ascon_fast_core`, `ascon_round`)

The core is a 320-bit state register (words x0..x4, 64 bits each) feeding one
combinational ASCON round, and it applies one round per clock. The round
(`ascon_round`) has three steps:

- **Constant addition.** Adds `c_i = ((15-i) << 4) | i` to the low byte of x2.
  This gives f0, e1, d2, ..., 4b for rounds 0..11.
- **S-box layer.** A 5-bit S-box applied to all 64 bit-slices, written in its
  bitsliced and-not form.
- **Linear layer.** Each word is XORed with two rotations of itself: x0 by
  19/28, x1 by 61/39, x2 by 1/6, x3 by 10/17 and x4 by 7/41.

Around the round sit the XORs that let an outside sequencer run every stage of
ASCON-128 AEAD. The core has no counter of its own.

| control         | where                | effect                                      | used for                           |
|-----------------|----------------------|---------------------------------------------|------------------------------------|
| `load_i`        | state input          | state = IV, K, N                            | start                              |
| `xor_data_i`    | before round         | x0 ^= data (or x0 = data with `dec_i`)      | absorbing AD / PT, decrypting CT   |
| `xor_key_in_i`  | before round         | x1 ^= K_hi, x2 ^= K_lo                      | start of finalization              |
| `dom_sep_i`     | before round         | x4 ^= 1                                     | domain separation after AD         |
| `xor_key_out_i` | after round          | x3 ^= K_hi, x4 ^= K_lo                      | end of initialization and finalization |
| `rc_idx_i`      | inside round         | round index 0..11; p^6 uses 6..11           | every round                        |

`data_o = x0 ^ data_i` gives the ciphertext (or plaintext) block in the cycle
the block is absorbed. After finalization, `{x3, x4}` is the tag. The
testbench drives full AEAD encryptions and decryptions through these controls
and matches the published ASCON-128 test vector. The engine itself uses only
`load_i`, rounds 0..11 and `xor_key_out_i` on round 11.

`cipher_control` wraps the core in a three-state machine: IDLE, ENCRYPTING and
DONE.

- **Start.** `start_i` loads the state.
- **Rounds.** Twelve cycles of rounds follow.
- **Done.** `done_o` pulses 13 cycles after the start cycle.
- **Result.** `data_o = data_i ^ x0[63:32]` then stays valid until the next
  start.

## Transactions (`txn_ctrl`, `control_logic`)

The engine has one cipher and one memory port. A write state machine and a
read state machine share them, and the control logic grants them to one
transaction at a time.

```
write: IDLE -> ASCON_IDLE -granted-> START_ASCON -> ENCRYPTING -done-> WRITE_DATA
            -> CHECK_WRITE -memory B-> RESPONSE -> DONE -CPU takes B-> IDLE
read:  IDLE -> ASCON_IDLE -granted-> READ_DATA -> CHECK_READ -memory R->
            START_ASCON -> DECRYPTING -done-> RESPONSE -> TRANSFER -CPU takes R-> IDLE
both:  ASCON_IDLE -not granted-> HALT -> IDLE   (request stays pending and is retried)
```

- **Read order.** A read must fetch memory before it can decrypt, because the
  nonce is stored in memory.
- **Arbitration.** The grant is a registered owner (none, write or read). When
  a read and a write are both pending, the grant alternates between them. The
  owner frees the path when the CPU takes its response.
- **Concurrency.** The AXI4-Lite slave holds at most one pending write and one
  pending read.

Latency with a memory that has no wait states is 23 clock cycles per CPU write
and 23 per CPU read, from the CPU raising VALID to the response. Of these, 13
are the cipher. The rest are the AXI handshakes on both sides and one cycle
each for the grant and the FSM steps. The engine has no data-dependent timing,
and `llmee_memtest_tb` checks that every transaction takes the same number of
cycles.

For comparison, the reference board measured about 87 CPU cycles per word
written and about 103 per word read, in a bare-metal loop over 1000 words.
Those counts include the processor, the interconnect and the DDR controller,
none of which this RTL models. Only the 23 cycles above belong to the engine.

## Blocks and interfaces

| module            | role |
|-------------------|------|
| `llmee_top`       | the engine: CPU port `s00_axi_*`, memory port `m00_axi_*`, one clock `aclk`, reset `aresetn` (active low, asynchronous) |
| `axi_lite_slave`  | 32-bit AXI4-Lite slave. Takes AW and W in one handshake when both are valid. Holds the request. Raises B/R when the engine answers (SLVERR if memory failed) |
| `control_logic`   | address translation, key register, nonce LFSR, read/write grant and selector control |
| `tweak_select`    | address selector, nonce selector, cipher-input selector, and the `{nonce, ciphertext}` concatenation |
| `cipher_control`  | runs the fast core for the 12-round initialization |
| `ascon_fast_core` | state register plus one round per clock, with stage controls |
| `ascon_round`     | one combinational ASCON round |
| `txn_ctrl`        | write and read FSMs |
| `axi_full_master` | 64-bit AXI4 master. Single beats (AWLEN = 0, 8-byte size, INCR, all strobes), one transaction at a time |
| `llmee_pkg`       | ASCON constants, state type, FSM state enums |

Status outputs of the top:

- `txn_wr_done` and `txn_rd_done` pulse when a CPU write or read completes.
- `error` is high after a memory response that was not OKAY.
- `wr_halt` and `rd_halt` pulse on a halted attempt.
- `wr_fsm_state` and `rd_fsm_state` expose the FSM states for debug probes.

Parameters of `llmee_top`:

| parameter       | default                            | meaning |
|-----------------|------------------------------------|---------|
| `LLMEE_BASE`    | `32'h4000_0000`                    | CPU base address of the protected window |
| `DDR_BASE`      | `32'h1000_0000`                    | memory address of the first stored word |
| `KEY`           | `128'h000102030405060708090A0B0C0D0E0F` | key loaded into the key register at reset; replace it |
| `RNG_EN`        | 1                                  | 0 selects the fixed `DEFAULT_NONCE` |
| `NONCE_SEED`    | `32'hACE1_2468`                    | LFSR start value (must not be 0) |
| `DEFAULT_NONCE` | `32'h0000_0001`                    | nonce used when `RNG_EN = 0` |
| `M_ID_W`, `M_USER_W` | 1                             | widths of the memory port's ID and USER fields |

The reference system mapped a 1 GB window at 0x40000000. Because every word
takes 8 bytes of memory, a full 1 GB window needs 2 GB behind `DDR_BASE`. Take a board with 1 GB of DDR at 0..0x3FFF_FFFF and
the default `DDR_BASE`. Only the first 384 MB of the window then land in real
memory. Size the window, and the memory region it uses, for the memory you
actually have.

The logic is small: about 260 word-level cells and about 700 flip-flops after
generic synthesis. More than half of the flip-flops are the 320-bit ASCON
state. The reference FPGA implementation reported 792 LUTs and 766 registers
at 100 MHz.

## Where this RTL departs from the reference design

- **Read sequence.** The read FSM reads memory first and decrypts second. One
  state diagram of the reference design draws decryption first, but the stored
  nonce is needed before decrypting, and the prose describes it this way.
- **No latches.** The reference implementation replaced some flip-flops with
  latches to line control signals up with delayed data. Here everything is
  flip-flops, and the address, data and nonce stay registered for the whole
  transaction.
- **Nonce generator.** The reference has a "random number generator" of
  unspecified construction. Here it is an LFSR; see the security notes above.
- **Packing of the 128-bit nonce.** `{nonce, address, 64'h0}` is this design's
  choice. The reference says only that address and nonce are concatenated.
- **Arbitration.** The alternating grant, and halted requests being retried
  rather than dropped, are this design's choices.
- **Clocks.** One clock serves both AXI ports. The reference IP had separate
  clock pins for the two ports, driven by the same clock.
- **Write size.** Only whole 32-bit words are supported, and WSTRB is ignored.
  Bursts are not supported on either port.
- **Fast core.** The fast core here is written from the round datapath and
  the ASCON specification. In decryption mode it replaces x0 with the
  ciphertext, for whole blocks only.
- **Omitted template input.** The vendor-template input that started master
  test transactions is not built.

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. Expected values come from models written independently of the RTL.
`tb/ascon_ref_pkg.sv` models ASCON with the S-box as a 32-entry lookup table
and bit-by-bit rotations.

| testbench             | what it checks |
|-----------------------|----------------|
| `ascon_round_tb`      | 200 random states over all 12 round constants against the reference round |
| `ascon_fast_core_tb`  | full ASCON-128 encryption and decryption with 0-2 AD blocks and 1-4 PT blocks; the published test vector (key = nonce = 00..0F, empty AD and PT, tag E355159F292911F794CB1432A0103A8A); cycle count per operation |
| `cipher_control_tb`   | keystream XOR against the reference; done exactly 13 cycles after start; decrypting the result restores the data |
| `control_logic_tb`    | address translation, key, LFSR sequence against a bit-serial model, fixed-nonce mode, grants |
| `tweak_select_tb`     | selectors and memory-word packing for both directions |
| `txn_ctrl_tb`         | order of cipher, memory and response steps for writes and reads; halt and retry |
| `axi_lite_slave_tb`   | AW/W joint handshake, holding of requests, B/R responses with OKAY/SLVERR, back-pressure |
| `axi_full_master_tb`  | 300 random single-beat writes and reads against a memory with random wait states; error flag |
| `llmee_top_tb`        | end to end at default parameters. 1023 writes then reads. Every stored memory word is checked against the reference keystream, and the plaintext must never appear in memory. Rewrites must use new nonces and new ciphertext. Concurrent reads and writes are run, and halted writes and halted reads are counted. SLVERR is checked on both paths |
| `llmee_memtest_tb`    | the memory-test workload: write 1000 (then 16000) consecutive words, read them all back; prints cycles per phase |

`tb/axi_mem_model.sv` is a behavioural AXI4 memory with random wait states and
one error address. It stands in for the DDR controller.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/llmee_pkg.sv tb/ascon_ref_pkg.sv -y rtl -y tb +libext+.sv \
  tb/llmee_top_tb.sv --top-module llmee_top_tb -Mdir obj_top
./obj_top/Vllmee_top_tb
```

Replace `llmee_top_tb` with any other testbench name. To lint the design:
`verilator --lint-only -Wall -Wno-fatal -Irtl rtl/llmee_pkg.sv rtl/llmee_top.sv -y rtl`.
The remaining lint warnings are:

- AXI inputs that the design deliberately ignores: PROT, WSTRB, RLAST, and
  the IDs and USER fields on responses.
- The top bit of the CPU offset, which the doubling in the address
  translation shifts out.
- The unused upper state words in `cipher_control`.
- The reset used both by flip-flops and by the `disable iff` of the
  assertions.
