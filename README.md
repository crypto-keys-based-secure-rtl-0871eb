# Two-stage secure access to JTAG and Logic BIST

A JTAG port left open lets anyone shift data into a chip's test structures,
read internal state and start self-test. This design puts two locks in front
of it. The first stage sits in the IEEE 1149.1 TAP. Until a secret key is
shifted in, every instruction except UNLOCK is turned into BYPASS. After that,
a security code selects one of four privilege levels. The second stage guards
the Logic BIST (LBIST). It uses a challenge and response: the chip shifts out a
128-bit challenge. The user encrypts the challenge off chip with their own
algorithm and key, then shifts the result back in. The chip compares that
answer with a stored expected value. The chip only stores expected answers, so
it needs no cipher hardware, and the area cost stays small.

The RTL wraps this access scheme around a small circuit under test: the
ISCAS'89 benchmark **s27**. s27 has 4 inputs, 1 output and 3 flip-flops. In the
RTL it has boundary cells and a 3-bit scan chain, and a Logic BIST engine
drives it. All code is synthesizable SystemVerilog (IEEE 1800-2017). The top
module is `secure_jtag_lbist_top`.

## Block structure

```
 TCK/TMS/TDI ──► tap_controller ──► instruction_register ──► instruction_decoder ──► DR select, TDO mux
                                                     ▲                 ▲
                               jtag_secret_key_module ┘ (unlocked, level)
  data registers on TDI→TDO:  bypass_register, idcode_register, boundary_scan_register,
                              private_register (+ size register), key/lock shift register,
                              lbist_auth_module (config / response / storage-write registers),
                              LBIST status register (in the top)
  system clock:               lbist_controller, prpg_lfsr, misr, s27_scan_core
                              (sync_2ff carries start and done across the two clocks)
```

| File | Role |
|---|---|
| `rtl/sjtag_pkg.sv` | TAP states, strobe struct `dr_ctrl_t`, opcodes, levels, algorithm codes, the algorithm/level rule `alg_level_ok` |
| `rtl/tap_controller.sv` | Standard 16-state TAP FSM |
| `rtl/instruction_register.sv` | 4-bit IR, captures `01`, resets to IDCODE |
| `rtl/instruction_decoder.sv` | Opcode plus privilege level to data-register select; disallowed instructions go to BYPASS |
| `rtl/jtag_secret_key_module.sv` | First stage: key/lock shift register, key register, lock register, comparator, level registers X/Y/Z |
| `rtl/bypass_register.sv`, `rtl/idcode_register.sv`, `rtl/boundary_scan_register.sv` | Standard registers; IDCODE is writable at level 3 and above |
| `rtl/private_register.sv` | Private register whose length the architect can set |
| `rtl/lbist_auth_module.sv` | Second stage: challenge register, 128-bit configuration register, response register, comparator |
| `rtl/lbist_sec_decoder.sv` | Decodes the security byte of the configuration register |
| `rtl/crypto_key_storage.sv` | 256 × 128-bit table of expected responses, with valid bits |
| `rtl/lbist_controller.sv`, `rtl/prpg_lfsr.sv`, `rtl/misr.sv` | Logic BIST sequencer, 128-bit pattern generator, 32-bit signature register |
| `rtl/s27_scan_core.sv` | s27 benchmark with a mux-scan chain |
| `rtl/sync_2ff.sv` | Two-flop synchroniser |

## Stage 1: lock, unlock and privilege levels

The device leaves reset **locked** (level 1). The locked state has three
parts:

* the **lock register** (1 = locked);
* a **level register**, which holds one of the four levels below;
* the 32-bit **key/lock shift register**. This is the data register for both
  UNLOCK and SECCODE. Its Capture-DR loads `{level, unlocked}` into the low 3
  bits, so a tester can read the current state.

Going up the levels:

1. Load `UNLOCK` and scan the 32-bit key. On Update-DR a comparator checks the
   shift register against the key register. If they match, the lock register
   clears. The level is still 1, so every other instruction is still BYPASS.
2. Load `SECCODE` and scan a 32-bit security code. The code is compared with
   the three level registers: X grants level 2 (user), Y level 3 (designer)
   and Z level 4 (architect). A later SECCODE can move to another level.
3. A wrong key or a wrong code locks the device again. So do making `LOCK` the
   current instruction, Test-Logic-Reset, and TRST_N.

| Level | Name | Authenticity / secrecy / integrity | Instructions reachable |
|---|---|---|---|
| 1 | locked | no / no / no | UNLOCK; after a good key also SECCODE (everything else is BYPASS) |
| 2 | user | yes / no / no | + EXTEST, SAMPLE/PRELOAD, IDCODE (read), PRIVATE (read), LBIST_CFG, LBIST_RESP, LBIST_RUN |
| 3 | designer | yes / yes / no | + IDCODE and PRIVATE become writable on Update-DR |
| 4 | architect | yes / yes / yes | + PRIVSIZE (private register length), LBIST_STORE (program the key storage) |

A blocked instruction is not refused in any visible way. The decoder simply
connects the 1-bit bypass register, so the scan path looks the same as
BYPASS. Writes are blocked differently. At level 2 the IDCODE and PRIVATE
registers still capture and shift, but their Update-DR does nothing.

### Opcodes (4-bit IR)

| Code | Instruction | Data register (bits) |
|---|---|---|
| 0 | EXTEST | boundary (5) |
| 1 | SAMPLE/PRELOAD | boundary (5) |
| 2 | IDCODE (reset instruction) | IDCODE (32) |
| 3 | LOCK | bypass (1) |
| 4 | UNLOCK | key/lock (32) |
| 5 | SECCODE | key/lock (32) |
| 6 | PRIVATE | private (current length, 1..32) |
| 7 | PRIVSIZE | size (6) |
| 8 | LBIST_CFG | configuration (128) |
| 9 | LBIST_RESP | response (128) |
| A | LBIST_STORE | `{data[127:0], addr[7:0]}` (136) |
| B | LBIST_RUN | status `{signature[31:0], done, auth_pass}` (34) |
| F, others | BYPASS | bypass (1) |

All registers shift LSB first: bit 0 appears on TDO first.

## Stage 2: challenge and response for the Logic BIST

The second stage works only through JTAG instructions, so the device must
first reach level 2 or higher. A session runs like this:

1. **LBIST_CFG.** Capture-DR loads the 128-bit *crypto key security register*,
   which holds the challenge. As the user shifts the new configuration in, the
   challenge comes out on TDO. Update-DR stores the configuration and clears
   any earlier verdict.
2. **Off chip**, the user encrypts the challenge. They use their private key,
   and the algorithm and key length that their configuration names.
3. **LBIST_RESP.** The user shifts in the encrypted value. On Update-DR the
   value is compared with the storage entry that the configuration selects.
   The result is **auth_pass** with a **user id** (the level field) or
   **auth_fail**. For pass, four things must all hold:
   * the entry has been programmed;
   * the value matches the entry;
   * the algorithm is allowed for the requested level (rule below);
   * the requested level is no higher than the current JTAG level.

   Capture-DR of LBIST_RESP loads `{auth_fail, auth_pass}`.
4. **LBIST_STORE** (architect only). Writes one 128-bit expected response at
   an 8-bit address. Entries that have never been written are invalid after
   reset and never match.

The verdict is cleared when stage 1 relocks, and when a new SECCODE lowers the
JTAG level below the user id that passed.

The challenge register also seeds the pattern generator. The challenge is
fixed by the `SEED` parameter, and each expected response is bound to it. If
you change `SEED`, you must program the storage again.

### The security configuration register

Only 9 of the 128 bits mean anything. Bit 8 is the **mode bit**. It chooses
which end of the register holds the security byte:

| Byte bit | Field | LSB mode (bit 8 = 0) | MSB mode (bit 8 = 1) |
|---|---|---|---|
| 7..6 | level (0 = level 1 … 3 = level 4) | cfg[7:6] | cfg[120], cfg[121] |
| 5..3 | algorithm | cfg[5:3] | cfg[122], cfg[123], cfg[124] |
| 2..0 | key length choice | cfg[2:0] | cfg[125], cfg[126], cfg[127] |

In MSB mode, byte bit *k* is register bit 127 − *k*. The whole byte,
`{level, alg, key}`, is the address into the 256-entry storage. So each
combination of level, algorithm and key length has its own expected response.

Algorithm codes and the level rule:

| Code | Algorithm | Text bits | Levels allowed | Key lengths |
|---|---|---|---|---|
| 0 | AES | 128 | all | 128, 192, 256 |
| 1 | RC6 | 128 | all | 128, 192, 256 |
| 2 | Twofish | 128 | all | 128, 192, 256 |
| 3 | Blowfish | 64 | 2 and 3 | 32, 128, 448 |
| 4 | 3DES | 64 | 1 and 2 | 168 |
| 5 | DES | 64 | 1 and 2 | 56 |
| 6 | RC2 | 64 | 1 and 2 | 8, 128 |
| 7 | reserved | | never | |

The chip never encrypts anything. The algorithm and key-length fields do only
two things: they pick a storage entry, and they are checked against the level
rule. The key-length code is not interpreted further; the lengths above are
for reference.

## Logic BIST

Logic BIST starts when `LBIST_RUN` is the current instruction, the second
stage has passed, and the user id is level 2 or higher. The request reaches
the system clock through a two-flop synchroniser. Each run has three parts:

* **LOAD**: 1 cycle. The 128-bit LFSR (x^128+x^126+x^101+x^99+1) loads the
  challenge as its seed, and the MISR clears.
* **Patterns**: `N_PATTERNS` patterns, 256 by default. Each pattern is 3 shift
  cycles plus 1 capture cycle:
  * shift cycles: scan_in takes LFSR bit 127, and the old response shifts out
    into the MISR;
  * capture cycle: the core's 4 inputs take LFSR bits 3..0 and the core
    captures its response.
* **Unload**: 3 final shift cycles.

With the defaults this is 1 + 256·4 + 3 = **1028 system clocks**.

The MISR is 32 bits wide (x^32+x^22+x^2+x+1). On every shift cycle except
those of the first pattern, and on every capture cycle, it takes the word
`{po, scan_out}`. The first pattern's shift cycles are skipped because they
would unload whatever state the core had before the run. The whole signature
is therefore a function of the seed alone.

`done` is synchronised back to TCK. A DR scan under LBIST_RUN then returns
`{signature, done, auth_pass}`. The signature reads as zero until `done`. The
chip stores no golden signature: the tester compares the value it reads.
While the BIST is busy, the core's inputs come from the LFSR. At all other
times they come from the input pins.

## Timing and clocks

* **TCK domain.** The TAP, the IR, all data registers and both security
  stages run on TCK. Each register acts on the rising TCK edge that *ends* the
  Capture, Shift or Update state. Update therefore happens on the rising edge
  that leaves Update-DR/IR, one half cycle later than the standard's falling
  edge. TDO changes on the falling edge, as the standard requires. `tdo_en`
  marks Shift-IR and Shift-DR; there is no tristate.
* **Delays after Update.** A stage-1 result shows on `level`/`unlocked` right
  after the edge that leaves Update-DR. LOCK takes effect one TCK after
  Update-IR. The LBIST verdict clears one TCK after a relock.
* **Resets.** TRST_N resets the test logic asynchronously, and Test-Logic-Reset
  also relocks. RST_N resets the core and the BIST engine.
* **System clock.** The core, the BIST controller, the LFSR and the MISR run
  on `clk`.

## Parameters of `secure_jtag_lbist_top`

| Parameter | Default | Meaning |
|---|---|---|
| `KEY_W` | 32 | width of the unlock key and level codes |
| `KEY`, `CODE_X/Y/Z` | placeholders | unlock key; codes for levels 2/3/4 |
| `CFG_W` | 128 | configuration, challenge and response width |
| `SEED` | placeholder | challenge and LFSR seed (must not be zero) |
| `IDCODE` | 32'h1000_563F | reset identification code |
| `PRIV_MAX` | 32 | maximum private register length |
| `N_PATTERNS` | 256 | BIST patterns per run |
| `MISR_W` | 32 | signature width |

The boundary register and the chain length are fixed by s27: 4 input cells,
1 output cell, and a 3-bit chain.

## Where this RTL follows its source and where it chooses

Taken from the scheme as published:

* the two stages;
* the LOCK and UNLOCK instructions;
* the locked-to-bypass behaviour;
* the parts of the key module: key/lock shift register, key register, lock
  register, comparator, and level registers X, Y, Z;
* the four levels and their rights;
* the 128-bit configuration register and its bit layout, including the
  mirrored MSB mode;
* the storage selected by the 8-bit security byte;
* the challenge shifted out while the configuration is shifted in;
* the comparison of the re-entered encrypted value;
* the algorithm and level table;
* the idea that the 128-bit value seeds the BIST LFSRs;
* s27's pin counts.

This design's own choices:

* the opcodes and the 4-bit IR;
* the SECCODE, PRIVSIZE, LBIST_RESP, LBIST_STORE and LBIST_RUN instructions;
* a key and level-code width of 32;
* the exact split of instructions between levels. Writes of PRIVATE are
  granted at level 3, and resizing is kept for level 4;
* relocking on any wrong entry;
* the status captures;
* the storage valid bits and the write path for the storage;
* the rule that the LBIST level must not exceed the JTAG level;
* the algorithm code values;
* the whole Logic BIST engine: its sequencing, polynomials, widths and
  pattern count;
* the clock crossing;
* the update edge.

Not provided:

* the 1024-bit, 16-level security figure quoted for the scheme, which is not
  broken down into fields. Here the secrets are a 32-bit key, 32-bit level
  codes and 128-bit responses. There are 4 JTAG levels, and 4 levels in the
  LBIST user id;
* a separate "private instruction register". The one 4-bit IR decodes the
  private instructions too;
* any modules other than the Logic BIST that a passed authentication could
  open;
* the other ISCAS'89/'99 circuits the scheme was applied to;
* the ciphers themselves, by design.

Keys and codes come from parameters through reset values. In silicon they
would be one-time programmed. Stage 1 has no retry limit: a wrong entry only
relocks.

## Simulation

Any other testbench runs the same way with its name in place of the top's.
Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_secure_jtag_lbist_top \
  rtl/sjtag_pkg.sv $(ls rtl/*.sv | grep -v sjtag_pkg) \
  tb/tb_secure_jtag_lbist_top.sv -o sim && obj_dir/sim
```

`tb_secure_jtag_lbist_top` drives only the pins, with every parameter at its
default. It goes through these steps:

* it checks that the locked device is all bypass;
* it tries a wrong key and then the right one;
* it steps through levels 2, 3 and 4;
* it checks a refused write and an accepted one;
* it runs SAMPLE/PRELOAD and EXTEST;
* it resizes the private register;
* it reads the challenge and programs the key storage;
* it checks that BIST is refused before authentication;
* it fails and then passes authentication;
* it runs a full 256-pattern BIST and compares the signature with a cycle
  model inside the testbench;
* it relocks the device.

The testbench counts each of these mechanisms and fails if one never happens.
The off-chip encryption is stood in for by a simple keyed mixing function in
the testbench, because the chip only compares against what it stored. The
testbench takes a few seconds.

`tb_s27_boundary_scan_workload` tests the s27 core through boundary scan at
user level. It applies 200 functional vectors and observes each one with
SAMPLE/PRELOAD, about 10 TCK cycles per vector. It then applies 50 EXTEST
vectors and checks that SAMPLE sees only the bypass path once the device is
locked again.

The unit testbenches are:

* the TAP checked against a transition table;
* the s27 core checked against its equations;
* the LFSR and MISR checked against reference recurrences;
* the controller checked by counting cycles;
* each register checked for its capture, shift and update behaviour.
