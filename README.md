# Shared AES-128 encrypt/decrypt engine for RISC-V custom instructions

This design is an AES-128 engine that a small multi-cycle RISC-V core reaches
through four custom instructions. The data it encrypts or decrypts travels
only between the core's register file or data memory and the engine, never
over a system bus. The main idea is **one set of round hardware for both
directions**. There is one S-box bank, one MixColumns bank, one AddRoundKey
XOR and one key-schedule datapath. A single `mode` bit (0 = encrypt,
1 = decrypt) routes data through them in the order the cipher or the inverse
cipher needs.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It comes with a
self-checking testbench for every module. Each testbench checks against an
independent behavioural AES model and the FIPS-197 known-answer vectors.

## Structure

```
aes_riscv_ext                    top: instruction sequencer + AES unit
├── aes_instr_exec               decodes/executes load-AES, readReg-AES, store-AES, writeReg-AES
└── aes_unit                     the AES unit
    ├── aes_unit_ctrl            main controller (handshakes)
    ├── aes_input_buffer         4 x 32-bit words -> 128-bit block
    ├── aes_key_expansion        on-the-fly round keys, forward or inverse
    │   ├── aes_key_exp_ctrl     step counter, continue/valid strobes
    │   └── aes_cipher_word0_key g(w) = SubWord(RotWord(w)) ^ Rcon, registered
    ├── aes_core                 shared round datapath
    │   ├── aes_core_ctrl        round counter, enables, done
    │   ├── aes_sbox             registered 16-byte S-box / inverse S-box
    │   ├── aes_shift_rows (x2)  forward and inverse permutation (wiring only)
    │   └── aes_mix_columns      MixColumns / InvMixColumns
    └── aes_output_buffer        128-bit result -> 4 x 32-bit words
aes_pkg                          types, mode enum, GF(2^8) helpers, S-box tables
```

The processor itself is not part of this RTL: its controller, ALU, register
file, memory adjustment units and memory protection. The top brings out
plain ports for:

- instruction issue;
- one register-file read port and one register-file write port;
- a word-wide data-memory port.

The 128-bit cipher key is also an input port. It must be held stable while a
block is in flight.

## The shared round datapath (`aes_core`)

Each round takes **two clock cycles**, so ten rounds take 20 cycles:

- The *first half* registers the S-box output.
- The *second half* writes the state register.

AddRoundKey is moved to the start of the next first half. Each round key
can then come straight from the key-expansion register. The output is
`state ^ round_key`, valid on the `done` cycle.

| half-round | encrypt (mode 0) | decrypt (mode 1) |
|---|---|---|
| start cycle | `sbox_q <= SubBytes(msg ^ k0)` | `sbox_q <= InvSubBytes(InvShiftRows(msg ^ k10))` |
| second half, rounds 1-9 | `state <= MixColumns(ShiftRows(sbox_q))` | `state <= sbox_q` |
| second half, round 10 | `state <= ShiftRows(sbox_q)` (MixColumns skipped) | `state <= sbox_q` |
| first half, rounds 2-10 | `sbox_q <= SubBytes(state ^ k(n))` | `sbox_q <= InvSubBytes(InvShiftRows(InvMixColumns(state ^ k(10-n))))` |
| output (cycle 20) | `state ^ k10` | `state ^ k0` |

Three things make the sharing work:

- **One MixColumns bank serves both directions.** For encryption it sits
  after ShiftRows. For decryption it sits after AddRoundKey, which is exactly
  where the standard inverse cipher applies InvMixColumns.
- **The S-box bank reads a forward or an inverse table.** Both 256-entry
  tables are computed at elaboration from `S(x) = affine(x^254)` over
  GF(2^8), so no table is typed in.
- **ShiftRows is pure wiring.** It is therefore instantiated once per
  direction instead of behind a multiplexer.

The local controller (`aes_core_ctrl`) counts cycles 1..19 after `start`:

- odd cycles are second halves (`state_en`);
- even cycles are first halves (`sbox_en`);
- cycle 19 raises `last`, which suppresses MixColumns;
- `done` pulses on cycle 20.

## Round keys in lock-step, in both directions (`aes_key_expansion`)

The key is held as four 32-bit words. `aes_cipher_word0_key` registers `g()`
of one word on the "continue" cycles. On the following "valid" cycle, three
chained XORs form the next key:

```
forward  k(n) -> k(n+1):  w0' = w0 ^ g(w3)       w1' = w1 ^ w0'  w2' = w2 ^ w1'  w3' = w3 ^ w2'
inverse  k(n+1) -> k(n):  w0  = w0' ^ g(w3'^w2') w1  = w1' ^ w0' w2  = w2' ^ w1' w3  = w3' ^ w2'
```

A new key appears every two cycles: round key *n* is on `round_key` on cycles
2n and 2n+1 after `start`. This is exactly when the core reads it. The inverse
step uses `Rcon[11 - step]` and reuses the same g() block.

Decryption needs the last round key k10 first. The unit therefore runs the
schedule **forward once (20 cycles)** to reach k10. It then starts the core
and the schedule **in inverse mode** together, with k10 taken straight from
the key register. This pre-pass is this design's own choice. It costs 20
cycles per decrypted block and needs no storage for the 11 round keys.

## The AES unit and its handshakes (`aes_unit`)

The main controller moves through four states:

1. `IDLE`: on `start`, it latches the mode and clears the input buffer.
2. `LOAD`: it waits for four words (`done_bin`). For encryption it then
   starts the core and the key expansion together. For decryption it starts
   the forward key pre-pass.
3. `KEY_PRE` (decryption only): when the pre-pass ends, it starts the core
   and the inverse key expansion.
4. `CORE`: on the core's `done`, the output buffer captures the result,
   `done_encrypt` pulses and the controller returns to `IDLE`.

The result stays in the output buffer until `out_req` is raised. The buffer
then presents four words, most significant first, and steps on `out_ack`.
When `out_ack` is held high, the words go out on four successive clocks.

Latency, counted from the `start` cycle and with one message word per cycle:

| operation | cycles |
|---|---|
| core alone, start to done | 20 |
| unit, encrypt (load 4 + core 20) | 24 |
| unit, decrypt (load 4 + key pre-pass 20 + core 20) | 44 |
| read-out | 4 |

## Custom instructions (`aes_instr_exec`)

| instruction | bits [6:0] | other fields | action |
|---|---|---|---|
| load-AES | `{mode, 001011}` | [7]=0, [12:8]=rs | start the unit; read `mem[x[rs]]`, `+4`, `+8`, `+12` into it |
| readReg-AES | `{mode, 001011}` | [7]=1, [12:8]=rs, [17:13]=rd field | start the unit with `x[rs]`..`x[rs+3]` |
| store-AES | `0101011` | [11:7]=rs, [12]=0 | write the result to `mem[x[rs]]`, `+4`, `+8`, `+12` |
| writeReg-AES | `0101011` | [11:7]=rd, [12]=1 | write the result to `x[rd]`..`x[rd+3]` |

With `mode` in bit 6, an encrypting load uses the RISC-V *custom-0* opcode
(`0001011`), and store-AES uses *custom-1* (`0101011`). A decrypting load
uses `1001011`, which is free in RV32IM.

The sequencer issues and completes instructions as follows:

- It takes an instruction on `instr_valid && instr_ready` and pulses
  `instr_done` when the instruction finishes.
- A load waits while the unit is busy. A store waits until the unit is idle
  and holds a result. A store issued right after a load therefore waits for
  the encryption to finish.
- Unknown opcodes pulse `illegal`.
- The memory port holds `mem_req` until `mem_ack`, so wait states are
  allowed.
- Register numbers wrap modulo 32. Writes to x0 are issued, and the register
  file is expected to drop them.

With a zero-wait memory, one load-AES followed by one store-AES (the store
waiting for the encryption) takes 34 cycles per 16-byte block, measured from
issue of the load to completion of the store.

## Where this design departs from, or goes beyond, its source description

- **Unit latency.** The source reports 65 cycles for the unit and 20 for the
  core, but does not say how the 65 are counted. This RTL meets the 20-cycle
  core figure. The unit needs 24 cycles (encrypt) or 44 (decrypt), plus 4 for
  read-out.
- **Decryption key order.** The source does not say how decryption obtains
  its round keys in reverse order. The forward pre-pass plus inverse schedule
  described above is this design's solution.
- **Two register banks.** The source's key expansion draws two register banks
  (partial key in and partial key out). One bank is used here.
- **writeReg-AES encoding.** The source gives no format for writeReg-AES, so
  bit 12 as its selector is this design's choice.
- **readReg-AES dest field.** The "dest register" field of readReg-AES is
  decoded but not used.
- **Consecutive registers.** The register-to-register instructions use four
  consecutive registers. This is an assumption.
- **Key source.** Where the key lives is not specified, so it is an input port.
- **Handshakes and byte order.** The memory handshake, the word and byte
  order (FIPS-197 order, first word = bits [127:96]) and the reset values are
  this design's choices.
- **Chaining modes.** CBC chaining, the XOR of each plaintext block with the
  previous ciphertext, is left to software. The engine processes single
  blocks (ECB).

## Simulating

Every file has the same name as its module. The packages must be read first.
For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv -y rtl -y tb \
  tb/tb_aes_riscv_ext.sv --top-module tb_aes_riscv_ext
./obj_dir/Vtb_aes_riscv_ext
```

Each testbench prints one line `TB_RESULT checks=N failures=M` and stops.
It also stops with a failure if its watchdog expires. The reference model in
`tb/aes_ref_pkg.sv` is written independently of the RTL:

- It finds each byte's inverse by search.
- It applies the affine map bit by bit.
- It uses byte arrays and the textbook round order.

The testbenches:

| testbench | what it checks |
|---|---|
| `tb_aes_sbox`, `tb_aes_shift_rows`, `tb_aes_mix_columns`, `tb_aes_cipher_word0_key` | each step against the reference, exhaustively or on random data |
| `tb_aes_core_ctrl` | the round enables and the 20-cycle latency |
| `tb_aes_key_expansion` | k1..k10 forward and k9..k0 inverse, each on the exact cycles the core reads them |
| `tb_aes_core` | the core with testbench-supplied keys: FIPS-197 vectors, random blocks, 20-cycle latency |
| `tb_aes_input_buffer`, `tb_aes_output_buffer`, `tb_aes_unit_ctrl` | the buffers and the controller handshakes |
| `tb_aes_unit` | the whole unit: both directions, the 24/44-cycle latencies, the 4-clock read-out |
| `tb_aes_instr_exec` | instruction decoding, addresses, register numbers, stalls, illegal opcodes |
| `tb_aes_riscv_ext` | end to end (details below) |
| `tb_aes_image_workload` | image workload (details below) |

`tb_aes_riscv_ext` is the end-to-end test at default parameters. It issues
all four instructions with and without memory wait states, covering:

- the FIPS-197 vectors;
- an encrypt-then-decrypt round trip;
- loads and stores that stall on a busy unit.

It counts every mechanism and fails if any never happened.

`tb_aes_image_workload` encrypts and decrypts a generated 32x32 8-bit image.
It also times transfers of 16, 128 and 1024 bytes through the instructions:
34, 272 and 2176 cycles with a zero-wait memory (34 cycles per block).

## Changing the design

- **Round count.** `aes_pkg::NUM_ROUNDS` is fixed at 10. The key expansion
  implements the AES-128 schedule only, so AES-192/256 would need a wider key
  path and a different schedule.
- **Timing.** The longest combinational path is in the decryption first
  half: AddRoundKey, InvMixColumns, then the inverse S-box. If timing is
  tight, this is the path to split.
