# Iterative AES-128 encryptor and decryptor with one register per transformation

This design encrypts and decrypts 128-bit blocks with AES-128 (128-bit key, 10
rounds). It has one encryption core and one decryption core. Each core has a
single round datapath that every round reuses. A register follows each of the
four round transformations: SubBytes, ShiftRows, MixColumn and AddRoundKey.
A block therefore takes one clock per transformation:

    1 initial AddRoundKey + 9 rounds x 4 steps + 3 steps in round 10 = 40 clocks

The short paths between these registers are what allow a high clock rate. The
target is 125 MHz (8 ns). At that rate one block per 40 clocks gives
128 bit / 320 ns = 0.4 Gbit/s for encryption.

Decryption needs the round keys in reverse order. So before its first block
the decryptor runs the key schedule forward and stores all eleven keys, which
takes 40 clocks. One decryption with a new key therefore takes 80 clocks:
0.2 Gbit/s at 125 MHz. Further blocks under the same key take 40.

At the system level the two cores are wired for a round trip. The decryptor's
data input is the encryptor's output. A block is encrypted with `encrypt`
high; `encrypt` then goes low and the same block is decrypted back, so
`plain_text` can be compared with the original input.

## The round datapath (`aes_round`, `aes_round_ctrl`)

`aes_round` holds the 128-bit state register. In front of it is a
multiplexer over five sources, selected by a `step_e` code:

| step         | register loads                      |
|--------------|-------------------------------------|
| `STEP_LOAD`  | `data_in ^ round_key` (initial AddRoundKey) |
| `STEP_SUB`   | SubBytes(state): 16 S-boxes in parallel |
| `STEP_SHIFT` | ShiftRows(state)                    |
| `STEP_MIX`   | MixColumn(state)                    |
| `STEP_ARK`   | state ^ round_key                   |
| `STEP_IDLE`  | state (holds)                       |

With `INVERSE = 1` the same unit uses InvSubBytes, InvShiftRows and
InvMixColumn.

`aes_round_ctrl` numbers the clock edges of a block from 0 to 39 and decides
the step for each edge:

    edge  0        LOAD                     (edge that accepts the block)
    edges 1..36    SUB SHIFT MIX ARK  x 9   (rounds 1..9, 4 edges each)
    edges 37..39   SUB SHIFT ARK            (round 10, no MixColumn)

`key_step` is high on every ShiftRows edge. `last` is high on edge 39, the
edge where the core copies `result` (the AddRoundKey output) into its output
register. A new `start` is accepted only when the sequencer is idle. The
design is iterative: one block is in flight per core, so the registers
shorten the clock period but do not overlap blocks.

### Decryption order: the equivalent inverse cipher

The round unit applies its steps in the same order in both directions:
substitute, shift, mix, add key. The textbook inverse cipher does
AddRoundKey before InvMixColumn. This design uses the equivalent inverse
cipher of the AES standard instead, which keeps the forward order. Because
InvMixColumn is linear,

    InvMixColumn(s ^ k) = InvMixColumn(s) ^ InvMixColumn(k)

so the decryptor can mix first if it adds InvMixColumn(k) rather than k. The
decryptor therefore works as follows:

- It enters with round key 10.
- In rounds r = 1..9 it adds InvMixColumn(round key 10-r). A second
  InvMixColumn unit on the key read port computes this.
- In round 10 it adds round key 0, unchanged.

## Key schedule (`aes_key_expansion`)

The key schedule produces one round key per `step` pulse. Round key 0 is the
cipher key, captured on `load`. Each step computes the next key as follows:

1. Rotate the last word by one byte.
2. Pass it through four S-boxes.
3. XOR the round constant into the top byte.
4. Run the chain of word XORs.

- **Encryptor (`STORE_ALL = 0`).** The schedule runs beside the data. It is
  reloaded at every block start and stepped on the ShiftRows edge of each
  round. Round key r is then ready for the AddRoundKey of round r: two edges
  later in rounds 1-9, one edge later in round 10. An assertion checks that
  the key index matches the round at every AddRoundKey.
- **Decryptor (`STORE_ALL = 1`).** The decryptor steps the schedule on edges
  3, 7, ..., 39 after the key is loaded. It writes every key into an 11 x 128
  register array, which the datapath reads combinationally by round index.
  The key phase lasts 40 clocks, edges 0 to 39, so the first block can start
  on edge 40.

## Cores and their handshake (`aes_encrypt`, `aes_decrypt`)

Both cores have the same ports: `clk`, `reset`, `data_valid_in`,
`key_valid_in`, `Data_in`, `key_in`, `valid_out` and `cipher_out`. The
decryptor's `cipher_out` carries plaintext; the port name is kept from the
original schematic. The valid inputs are single-cycle pulses.

- **`aes_encrypt`.** A `key_valid_in` pulse stores `key_in`. A
  `data_valid_in` pulse while idle starts a block if a key is known, stored
  earlier or arriving in the same cycle. `Data_in` is sampled on that edge.
  `cipher_out` is loaded and `valid_out` rises 40 edges after acceptance,
  counting the accepting edge. Both hold until the next block starts. Pulses
  during a block are ignored.
- **`aes_decrypt`.** A `key_valid_in` pulse starts the 40-clock key phase.
  This works at any time except during a block, and also clears `valid_out`.
  A `data_valid_in` pulse may come at any time; it is remembered.
  `Data_in` is sampled on the first edge at which the keys are complete and a
  request is pending. Hold `Data_in` until then. In the system it is the
  encryptor's output, which is ready by then.

`reset` is asynchronous and active high everywhere. It clears every register,
including the outputs.

## System level (`aes_top`, `aes_mode_select`)

| pin             | dir | width | meaning                                   |
|-----------------|-----|-------|-------------------------------------------|
| `clk`           | in  | 1     | clock (125 MHz target)                    |
| `reset`         | in  | 1     | asynchronous reset, active high           |
| `encrypt`       | in  | 1     | 1: requests go to the encryptor, 0: to the decryptor |
| `key_valid_in`  | in  | 1     | encryption request (with `encrypt` = 1)   |
| `key_valid_in1` | in  | 1     | decryption request (with `encrypt` = 0)   |
| `Data_in`       | in  | 128   | plaintext block                           |
| `key_in`        | in  | 128   | key, shared by both cores                 |
| `valid_out_en`  | out | 1     | `cipher_text` valid                       |
| `cipher_text`   | out | 128   | ciphertext                                |
| `valid_out_de`  | out | 1     | `plain_text` valid                        |
| `plain_text`    | out | 128   | decryption of `cipher_text`               |

`aes_mode_select` has four registers, one per core input. Each is fed by a
multiplexer selected by `encrypt`:

| core input     | register input                 |
|----------------|--------------------------------|
| `enc_data`     | `encrypt`                      |
| `enc_key`      | `encrypt & key_valid_in`       |
| `dec_data`     | `!encrypt & key_valid_in1`     |
| `dec_key`      | `!encrypt & key_valid_in1`     |

A core receives a one-cycle pulse in the first cycle its registered request
is high. A request held high for many cycles therefore starts exactly one
operation.

A round trip at the pins goes as follows:

1. Hold `Data_in` and `key_in`. Raise `encrypt` and `key_valid_in`.
2. `valid_out_en` rises 41 edges after the edge that first samples the
   request: one edge for the mode register, 40 for the block.
3. Drop `encrypt` and raise `key_valid_in1`. Keep `key_in` until the
   decryptor has taken it, which happens one edge later.
4. `valid_out_de` rises 81 edges after the edge that samples the request,
   with `plain_text` equal to the original block.

The decryptor's data request is remembered through its key phase. It then
reads `cipher_text`, which by that time holds the encryptor's result.

## Where this RTL departs from, or adds to, the original design

The original design fixes the following:

- the block structure: AddRoundKey, rounds 1-9, round 10 without
  MixColumn, and a key expansion block;
- a register after every transformation;
- separate encryption and decryption cores chosen by `encrypt`;
- the pin names;
- the loop from the encryptor's output to the decryptor's data input;
- the asynchronous active-high reset;
- 40 clocks per encryption and 80 per decryption.

This RTL chose the following:

- **Iterative datapath.** One set of transformation units serves all rounds,
  with round 10 skipping MixColumn. This agrees with the stated throughput,
  which divides 128 bits by the full 40-clock latency.
- **How the 80 decryption clocks arise.** They are read as a 40-clock
  forward key schedule followed by the 40-clock block.
- **Equivalent inverse cipher.** This keeps the forward step order in the
  decryptor (see above).
- **Request handling.** Valid inputs are pulses. `aes_mode_select` turns
  held levels into pulses. The encryptor keeps the last key. The decryptor
  remembers a data request.
- **Which signal feeds which multiplexer in `aes_mode_select`.**
  `key_valid_in1` is treated as active high.
- **Byte order.** Byte 0 is bits 127:120 and the state is filled column by
  column, so AES test-vector hex strings map directly onto 128-bit literals.
- **S-box tables.** They are computed at elaboration by
  `aes_pkg::sbox_table()` rather than typed in. The formula is the
  multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by
  s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. The inverse
  table is the inverse permutation.

Not covered:

- The 125 MHz clock rate and the FPGA resource figure (about 12,000 logic
  elements on a Cyclone IV E) were not reproduced. The RTL is technology
  independent and has not been through FPGA place and route.
- With the top-level wiring taken from the original design, `aes_top` can
  only decrypt what it has just encrypted. The stand-alone `aes_decrypt` core
  decrypts any block.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/aes_ref_pkg.sv`, a behavioural AES-128 model written independently of
the RTL. Its S-box uses x^254 as the inverse and a bitwise affine map. Its
decryption uses the textbook inverse order. Known values from the AES
standard are also checked: its round-1 worked example and key schedule.

The test vectors used throughout are:

| key                                | plaintext                          | ciphertext                         |
|------------------------------------|------------------------------------|------------------------------------|
| 000102030405060708090a0b0c0d0e0f   | 00112233445566778899aabbccddeeff   | 69c4e0d86a7b0430d8cdb78070b4c55a   |
| 2b7e151628aed2a6abf7158809cf4f3c   | 3243f6a8885a308d313198a2e0370734   | 3925841d02dc09fbdc118597196a0b32   |
| 2b7e151628aed2a6abf7158809cf4f3c   | 3925841d02dc09fbdc118597196a0b32   | 7dfdff39cc79c14315baf5ef727cc0cf   |
| 2b7e151628aed2a6abf7158809cf4f3c   | f34481ec3cc627bacd5dc3fb08f273e6   | e42023437f94d94d2a085dfcd40c2cd0   |

Random blocks and keys are also used.

| testbench | checks |
|-----------|--------|
| `tb_aes_sbox` | all 256 inputs, both directions |
| `tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`, `tb_aes_add_round_key` | worked example, random states, inverse(forward(x)) = x |
| `tb_aes_key_expansion` | every round key after every step, stored keys read back, both storage options |
| `tb_aes_round_ctrl` | the step, round, key_step and last codes on each of the 40 edges; starts during a block are ignored |
| `tb_aes_round` | the state after each edge, for both directions, with the steps driven directly |
| `tb_aes_encrypt` | results, 40-edge latency, stored key, ignored pulses, reset |
| `tb_aes_decrypt` | results, 80-edge latency with a new key and 40 without, remembered data request, ignored key pulse, reset |
| `tb_aes_mode_select` | pulses against a model; a held request gives one pulse |
| `tb_aes_top` | end-to-end round trips at the 8 ns clock; latencies 41 and 81; counts mode switches, held requests, remembered requests and a reset that aborts a decryption (each must occur) |

The top has no parameters, so `tb_aes_top` runs the full design. To run a
testbench with Verilator 5:

    verilator --binary --timing --assert --top-module tb_aes_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv
    ./obj_dir/Vtb_aes_top

Replace `tb_aes_top` by any other testbench name. Each run takes a few
seconds.

## Files

- `rtl/aes_pkg.sv`: types (`block_t`, `step_e`), constants, GF(2^8) helpers,
  S-box generator, round constants.
- `rtl/aes_sbox.sv`, `aes_sub_bytes.sv`, `aes_shift_rows.sv`,
  `aes_mix_columns.sv`, `aes_add_round_key.sv`: the transformations
  (combinational, `INVERSE` parameter).
- `rtl/aes_key_expansion.sv`: the key schedule.
- `rtl/aes_round_ctrl.sv`, `rtl/aes_round.sv`: the sequencer and the round
  datapath.
- `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv`: the cores.
- `rtl/aes_mode_select.sv`, `rtl/aes_top.sv`: the system.
- `tb/aes_ref_pkg.sv`: the reference model. `tb/tb_*.sv`: the testbenches.
