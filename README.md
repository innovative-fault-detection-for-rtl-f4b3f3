# AES-128 encryption core with whole-datapath fault detection

A fault attack on an AES engine (a voltage glitch, a laser pulse, a clock
spike) flips bits somewhere in the circuit and lets the attacker compare a
faulty ciphertext with a correct one to recover the key. Most detection
schemes only guard the four round transformations. This core also covers the
parts they leave open: the initial key addition, the data multiplexer and
state register, the key register, and the controller FSM.

It does this with cheap redundancy:

* a shadow copy of the data register and a difference table around the S-boxes (flags **E**);
* column parities that carry through ShiftRows, MixColumns and AddRoundKey (flags **F**);
* column parities across the initial round (flags **G**);
* one parity bit per key register byte (flags **kpar**);
* a second, identical one-hot controller that is compared with the first in every cycle (flag **ctrl**).

The datapath is a plain iterative AES-128 encryptor. It computes one full
round per clock and the key schedule on the fly.

## Datapath and timing

```
            plaintext   data_reg XOR key (initial round)   round output
                 \              |                             /
                  +------- multiplexer (data_reg_mux_sel) ---+
                                 | Rin
                 +---------------+----------------+
                 v                                v
           data register                      Detect_Reg
                 | Rout                            | DRout
                 v                                 |
             SubBytes (16 S-boxes)      beta table |
                 | alpha'                  |       |
                 v                         v       v
   ShiftRows -> MixColumns (bypassed in round 10) -> AddRoundKey -> round output
                                                   ^
                          key register -> key expansion (Rcon from controller)
```

The controller is a one-hot FSM with 13 states: INIT, Load Inputs, and Round 0
to Round 10. Each state drives a fixed control word:

| state       | data_reg_mux_sel | key_reg_mux_sel | round_constant | effect                              |
|-------------|------------------|-----------------|----------------|-------------------------------------|
| INIT        | –                | –               | –              | idle, waits for `encrypt`           |
| Load Inputs | 11               | 0               | –              | data reg = plaintext, key reg = key |
| Round 0     | 00               | 1               | 01             | data reg ^= key; key reg = round key 1 |
| Round k (1..9) | 01            | 1               | 02 04 08 10 20 40 80 1b 36 | full round k            |
| Round 10    | 01               | 1               | 00             | last round, no MixColumns           |

Both registers load in every state except INIT.

Timing at the top level, `aes_fd_top`:

* **Start.** Hold `plaintext` and `key` stable and raise `encrypt`. It is sampled in INIT.
* **Done.** `done` pulses 12 cycles after the clock edge that left INIT. `ciphertext` (the data register) then holds the result until the next block loads.
* **Back to back.** With `encrypt` held high, a block completes every 13 cycles, because the FSM passes through INIT between blocks.
* **Reset.** Every register has an asynchronous, active-low reset (`rst_n`).

Byte order follows FIPS-197: byte *n* of a block is bits `[127-8n -: 8]`, and
the state element in row *r*, column *c* is byte `r+4c`. One column is therefore
one 32-bit word.

## How the detection works

### E: SubBytes and the data register (`aes_sb_detect`)

`Detect_Reg` is a second 128-bit register. It loads the same value (`Rin`) with
the same enable as the data register. A separate 256-entry table holds
`beta(x) = x ^ S(x)` and is addressed by the data register output. For every
byte:

    E(r,c) = beta(Rout) ^ DRout ^ S-box output

In a fault-free cycle `Rout = DRout` and the S-box output is `S(Rout)`, so `E`
is zero. Two kinds of fault make it non-zero in the affected byte:

* a bit flip in either register leaves `Rout ^ DRout` in `E`;
* a wrong S-box output leaves its error in `E`.

The check does not care how the S-box is built. The E flags are valid in every
cycle, INIT included, so a fault in the ciphertext register is caught too.

### F: multiplexer and linear layer (`aes_lin_detect`)

Let *P* be the XOR of a column's four bytes.

* MixColumns does not change *P* of a column, because 02 ^ 03 ^ 01 ^ 01 = 01.
* ShiftRows only moves bytes: output column *j* takes row *i* from input column *j+i* (mod 4).
* AddRoundKey adds the key column's parity.

So in rounds 1 to 10 each column of the multiplexer output must satisfy:

    F_j = P(Rin_j) ^ P(Key_j) ^ s(0,j) ^ s(1,j+1) ^ s(2,j+2) ^ s(3,j+3) = 0

Here *s* is the SubBytes output (the ShiftRows input). Any odd number of flips
at one bit position of a column is visible, whether in the linear layer, the
multiplexer or the key seen by it. The flag is gated off outside rounds 1 to 10.

### G: initial round (`aes_init_detect`)

In Round 0 the multiplexer passes `Rout ^ Key` into the registers. The check is:

    G_j = P(DRout_j) ^ P(Key_j) ^ P(Rin_j)

It uses the Detect_Reg copy of the plaintext, so a fault in the data register,
the XOR or the multiplexer shows up. The flag is gated off outside Round 0.

### kpar: key register

Each key byte gets an even-parity bit when it is loaded. The bit is computed
from the register's D value and held in 16 extra flip-flops. The output is
compared with it continuously. This covers the key register only. The
key-expansion logic is not covered; see Limits.

### ctrl: duplicated one-hot controller (`aes_controller`, `aes_fsm`)

A one-hot FSM fails in telling ways:

* **Lost token.** A state bit that drops to 0 leaves the machine all-zero. It is blocked for good and the encryption never finishes.
* **Extra token.** A spurious 1 runs two states at once, so the core skips or repeats rounds and emits an exploitable ciphertext.

`aes_fsm` keeps this behaviour on purpose: every next-state bit is one AND/OR of
current bits.

`aes_controller` runs two copies and compares the state vectors in every cycle.
On a difference:

1. `mismatch` rises.
2. In that same cycle the control word is forced to its idle (INIT) value, so nothing is loaded.
3. On the next edge both FSMs return to INIT.

The encryption is abandoned and `done` never pulses for it.

### Alarm output

The top brings out:

* every individual flag, as the packed struct `flags` of type `aes_pkg::fd_flags_t`;
* `fault_detected`, a sticky OR of all flags, which is cleared when the next block is loaded.

## Fault injection

The `fi` input (`aes_pkg::fault_inj_t`) holds XOR masks for these points:

* the D inputs of the data register, Detect_Reg, key register and both FSM copies;
* the multiplexer output, the S-box outputs and the round output;
* the control word between the controller and the datapath.

The masks model transient pulses arriving at flip-flop inputs. Tie `fi` to
zero in a real design; synthesis then removes the XORs.

`tb/tb_fault_campaign.sv` runs a fault campaign through these masks. For
every fault it encrypts a random block, compares the result with a reference
model, and sorts the fault into one of four classes:

* **silent**: correct output, no flag;
* **positive**: correct output, flag raised;
* **undetected**: wrong or missing output, no flag;
* **detected**: wrong or missing output, flag raised.

Faults go to four groups of critical points in the ratio 1:4:4:1:

* initial round;
* SubBytes and data register;
* multiplexer and linear layer;
* controller: either FSM copy, or one bit of the control word.

One run of 2,000,000 single-bit, single-cycle faults gave:

| group                 | positive | silent | undetected | detected |
|-----------------------|---------:|-------:|-----------:|---------:|
| initial round         | 0.00 %   | 0.00 % | 0 %        | 100.00 % |
| SubBytes / register   | 38.42 %  | 9.17 % | 0 %        | 52.40 %  |
| mux / linear          | 0.25 %   | 20.36 %| 0 %        | 79.39 %  |
| controller            | 16.44 %  | 8.99 % | 18.83 %    | 55.74 %  |
| all                   | 17.12 %  | 12.71 %| 1.88 %     | 68.29 %  |

All of the undetected single faults are control-word faults. Of 66,694 such
faults, 37,662 (56.5 %) went undetected. They hit the key generator's
controls: the load enable, the key multiplexer select and the round constant.
The core then builds a wrong round key and uses it consistently, and no check
sees that. Single faults on the FSM flip-flops and on every datapath point
were always detected or harmless.

Multiple faults (2 to 8 random bits, held 1 to 3 cycles, 2,000,000 runs) gave
8.95 % positive, 7.21 % silent, 0.343 % undetected and 83.50 % detected.
Without the control-word faults, 0.181 % went undetected. The escapes come
from three causes:

* **Parity cancellation.** An even number of flips at the same bit position of one column cancels in F and G.
* **Common-mode controller faults.** The same flip in both FSM copies can leave them agreeing, or blocked together in the all-zero state. This happened 682 times. The testbench then resets the core. In hardware, only a watchdog outside this core would notice.
* **Key-generator controls,** as for single faults.

## Limits and departures

* **Encryption only, AES-128 only.** No decryption or Inv_SubBytes.
* **Throughput.** A block takes 12 cycles from start to `done`, but 13 cycles back to back because of the INIT state between blocks. At a given clock, sustained throughput is 128/13 bit per cycle, not 128/12.
* **Key generator controls are unprotected.** `load_key_reg`, `key_reg_mux_sel` and `round_constant` have no check, and the campaign shows that faults on them mostly escape. A parity or duplicate on these few wires would close the gap; it is not part of this design.
* **Key expansion is unprotected.** The four key-schedule S-boxes and the word XORs have no check. A fault there yields a wrong but consistent round key: the F check uses the same key register on both sides, so it cannot see it.
* **Plaintext path.** A fault on the multiplexer output in the Load Inputs cycle corrupts the plaintext in both the data register and Detect_Reg. No internal redundancy can tell it from a different plaintext, so the campaign does not inject there.
* **Flag gating.** The E flags are always on. F and G are enabled only in the states where their equations hold.
* **State count.** Each FSM copy has 13 one-hot states (INIT, Load Inputs, Round 0 to Round 10). The shadow copy is identical to the main one, so they can be compared bit for bit.
* **Flags per byte or column.** Each 8-bit E, F or G syndrome is reduced to one flag by OR.
* **Own choices.** The `fault_detected` alarm, the `busy` and `done` outputs, and the unused multiplexer code `10` (which selects the round output) are additions of this design.

## Files

| file | content |
|------|---------|
| `rtl/aes_pkg.sv` | types, control word, flag and fault-mask structs, S-box and beta tables computed at elaboration |
| `rtl/aes_fd_top.sv` | top level |
| `rtl/aes_controller.sv` | two FSM copies, comparison, control decode, `done` |
| `rtl/aes_fsm.sv` | one-hot FSM |
| `rtl/aes_key_gen.sv` | key register, key expansion, key byte parity |
| `rtl/aes_state_reg.sv` | data multiplexer, initial-round XOR, data register |
| `rtl/aes_subbytes.sv` | 16 S-boxes |
| `rtl/aes_linear.sv` | ShiftRows, MixColumns bypass, AddRoundKey |
| `rtl/aes_mixcolumns.sv` | MixColumns |
| `rtl/aes_sb_detect.sv` | Detect_Reg, beta table, E flags |
| `rtl/aes_lin_detect.sv` | F flags |
| `rtl/aes_init_detect.sv` | G flags |
| `tb/aes_ref_pkg.sv` | independent AES-128 reference model; its S-box is computed as x^254 plus the affine map |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_aes_fd_top.sv` | end to end: FIPS-197 vectors, random blocks, latency, back-to-back, one fault per detection mechanism |
| `tb/tb_fault_campaign.sv` | fault classification campaign; `N_VEC` sets its size |

The S-box table is built by a constant function rather than typed in. A value
`p` steps through the powers of 03 while `q` steps through the powers of 03⁻¹,
so `q = p⁻¹` at every step. The FIPS-197 affine map (`q ^ rotl(q,1..4) ^ 63`)
then gives `S(p)`, with `S(0) = 63`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and exits. With Verilator 5,
the two packages go first and the library search (`-y`) finds every module:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_fd_top.sv \
  --top-module tb_aes_fd_top -Mdir obj_top
./obj_top/Vtb_aes_fd_top
```

Replace `tb_aes_fd_top` with any other testbench name, for example
`tb_aes_controller` or `tb_fault_campaign`. The campaign (`N_VEC = 2000000`
per campaign, as in the default) takes about 3 minutes; the other testbenches
finish in well under a second.

The testbenches call the reference model's `encrypt()` from a single process.
Verilator inlines a function at every call, and the model is large, so calling
it from many places makes the build very slow.
