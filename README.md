# Rotationally symmetric AES for LUT-based FPGAs

The AES S-box is a field inversion in GF(2^8) followed by an affine map. Each
of its eight output bits is a Boolean function of all eight input bits. On a
6-input-LUT FPGA, each of those functions needs a whole slice, so a
byte-parallel S-box needs eight slices.

This design uses a different representation of the field: a **normal basis**
(beta, beta^2, beta^4, ..., beta^128). In a normal basis, squaring is a cyclic
rotation of the coordinate vector. Inversion, x^254, commutes with squaring.
As a result, all eight output coordinates of the inversion are *the same*
Boolean function S* applied to rotations of the input:

    y_k = S*(rotl(v, 7 - k))      v = p2n(x),   y = n2p(y_7 ... y_0) ^ 0x63

One 8-input function therefore produces the whole S-box in eight clock cycles:

- put the converted input in a rotating register;
- evaluate S* once per cycle;
- collect the bits;
- convert back to the polynomial basis.

The conversions p2n and n2p are linear 8x8 maps. The AES affine matrix is
folded into n2p, and its constant 0x63 is added separately. The S-box shrinks
from one slice per output bit to one slice for S*, plus the two conversions
and two registers. The price is latency.

The repository builds four designs on this idea and places them side by side
in `aes_rs_top`. The byte-parallel S-box appears twice: on its own, and
inside the byte-serial core.

| Design | Module | Latency |
|---|---|---|
| Stand-alone S-box with byte-parallel load | `rs_sbox_par` | 8 cycles |
| Byte-serial AES-128 with RAM-based state and key, using that S-box | `aes_byte_serial` | 5538 cycles per block |
| Fully bit-serial AES-128 encryption core | `aes_bs_core` | 4496 cycles per block |
| First-order masked (2-share) bit-serial AES-128 core | `aes_masked_core` | 6496 cycles per block |

All of it is plain synthesizable SystemVerilog. Every block has a
self-checking testbench that compares it with an independent reference model
(`tb/aes_ref_pkg.sv`). The reference model works in the polynomial basis and
never uses the normal-basis tables.

## The constants: bases, S* and the conversions

`rtl/aes_rs_pkg.sv` holds every constant. Linear maps are stored as eight row
masks: output bit i is `^(ROW[i] & x)`. Each S-box variant uses a different
normal basis, chosen so that its conversions map well onto LUTs:

| beta | Used by | Contents |
|---|---|---|
| 145 | `rs_sbox_par` | p2n, n2p and the ANF of S* |
| 133 | `rs_sbox_ser` and the unmasked core | p2n, n2p and the ANF of S* |
| 205 | the masked S-box | p2n, n2p and the 3-split ANFs of G* and F* |

Some conventions have to be fixed exactly, or nothing matches:

- **Polynomial basis.** The field polynomial is 0x11B and alpha = 0x02.
  Column i of the normal-to-polynomial matrix is beta^(2^i), and p2n is its
  inverse.
- **Which coordinate S* computes.** S* (given as its ANF, a 256-bit vector
  with bit m set when monomial m is present) computes normal-basis
  coordinate 7. Bit i of the monomial index is coordinate i.
- **Rotation and output order.** Because S* computes coordinate 7, the
  register rotates *left* (`{v[6:0], v[7]}`) once per cycle. The result bits
  then come out MSB first: y_7, y_6, ..., y_0.
- **Truth tables.** The truth tables that the LUTs implement are computed at
  elaboration with a binary Moebius transform (`anf_to_tt`).

All constants were checked against the AES S-box for all 256 inputs, for
each of the three bases.

## S-box with byte-parallel loading (`rs_sbox_par`, beta = 145)

How it works:

- **Start.** A `start` pulse writes p2n(x) into the 8-bit register R1.
- **Rotation.** For the next eight cycles R1 rotates and S* reads it.
- **Collecting bits.** The first seven S* outputs shift into a 7-bit register
  R2.
- **Result.** In the eighth cycle, `y = n2p({R2, S*}) ^ 0x63` is formed
  combinationally from R2 and the current S* bit, and `y_valid` is high.

A new `start` may be given in that same cycle. The S-box therefore takes one
byte every 8 cycles.

## Byte-serial AES-128 (`aes_byte_serial`)

This core is a RAM-based byte-serial AES. It trades latency for area: it
calls the 8-cycle rotational S-box again for every MixColumns term instead of
storing S-box results.

**Datapath.**

- **RAMs.** The state and the key live in two 32 × 8-bit RAMs. Each RAM has
  one asynchronous read port and one write port.
- **Alternating halves.** Each RAM is used as two 16-byte halves. A round
  reads the old state and key from half h and writes the new bytes into
  half ~h. At the end of the round the halves swap roles.
- **S-box input.** A 2:1 multiplexer feeds the S-box from either RAM.
- **Accumulation.** An 8-bit register sums the MixColumns terms of one output
  byte.

**MixColumns on the fly.** New state byte (r, c) is computed directly as

    s'(r,c) = 2·S(a_r) ^ 3·S(a_{r+1}) ^ S(a_{r+2}) ^ S(a_{r+3}) ^ k'(r,c)
    a_i     = s(i, c + i mod 4)                  (ShiftRows in the address)

- It takes four S-box calls, back to back. An S-box result is discarded
  after use, so a full round makes 64 state evaluations.
- The last round has no MixColumns and needs one call per byte.

**Interleaved key schedule.** Key byte k'(r,c) is produced just before state
byte (r, c) needs it:

- For c = 0: one S-box call on k(r+1, 3), plus Rcon on row 0.
- For c > 0: k(r,c) ^ k'(r,c−1), read back from the new half.

**Cycle budget.**

| Step | Cycles |
|---|---|
| Key byte, column 0 | 9 |
| Key byte, other columns | 2 |
| State byte, full round | 33 |
| State byte, last round | 9 |
| Half swap, per round | 1 |
| Full round | 589 |
| Last round | 205 |
| Load | 32 |
| **Encryption** | **5538** |

**Table S-box variant.** The parameter `ROT_SBOX = 0` replaces the
rotational S-box with a one-cycle 256 × 8 table. The table is computed at
elaboration by walking the powers of 3 (`aes_sbox_table`). The schedule keeps
its shape but loses the S-box latency:

| Step | Cycles |
|---|---|
| Key byte | 2 |
| State byte, full round | 5 (four reads into the accumulator, then the write) |
| State byte, last round | 1 |
| Round | 113 |
| Last round | 49 |
| **Encryption** | **1098** |

This is the fast, large end of the trade-off. The default is the rotational
S-box.

**Interface.**

1. Pulse `start` while the core is idle.
2. For 32 cycles (`loading` high), give key bytes 0..15 on `key_i`, then
   plaintext bytes 0..15 on `pt_i`. Bytes are in FIPS-197 order, byte 0
   first. The plaintext is xored with the key as it is written.
3. The ciphertext leaves during the last round, one byte per 9 cycles, byte 0
   first, on `ct_o` with `ct_valid`.
4. `done` marks the last busy cycle.

## S-box with bit-serial loading (`rs_sbox_ser`, beta = 133)

This is the S-box of the bit-serial core. It takes commands (`sbox_op_e`),
not a start pulse. One evaluation takes 16 cycles.

| Cycles | Command | What happens |
|---|---|---|
| 1–7 | `SB_LOAD` | Input bits enter R1 serially, MSB first. |
| 8 | `SB_LOAD_LAST` | p2n is applied to the seven stored bits plus the incoming bit. The result is written back into R1. |
| 9–16 | `SB_CALC` | R1 rotates. S* outputs shift into R2. In cycle 16, n2p and the affine constant are applied to R2's seven bits plus the last S* bit. |

After that, the result shifts out of R2 (`y_i`, MSB first) during the next
eight `SB_LOAD` cycles, while the next input shifts in. The S-box counts its
own calculation steps.

## The bit-serial AES-128 datapath

### Arrays of 32-bit shift rows

The state and the round key are each held in four 32-bit shift registers
(`srl32`, the behaviour of an SRL32 LUT primitive). Each row has:

- a clock enable;
- a serial output, the *head* (`mem[31]`);
- a 5-bit addressable read port.

Row r holds bytes r, r+4, r+8 and r+12 of the AES state, each MSB first. The
byte of column 0 sits at the head. All processing is one bit per clock.

**Serial byte order.** When the rows are chained, the block leaves in
row-major order: bytes 0, 4, 8, 12, 1, 5, ..., 15, each MSB first. The
plaintext, key and ciphertext streams use the same order. In the
testbenches, bit n of a stream is byte `(n/8 % 4)*4 + n/32` of the FIPS-197
block, bit `7 - n%8`. The sixteen SubBytes evaluations of a round happen in
this order too.

### Round operations

| Operation | Cycles | How it is done |
|---|---|---|
| AddRoundKey + SubBytes | 16 × (8 + C) + 8 | The heads of state row 0 and key row 0 are xored and shifted into the S-box. The S-box result of the previous byte comes back into state row 3 at the same time. C = 8 compute cycles for the plain S-box and 18 for the masked one. The last 8 cycles drain the final result. |
| ShiftRows | 24 | Row r rotates on itself 8·r times. Each row has its own enable, so rows finish at cycles 8, 16 and 24. |
| MixColumns | 32 | All four rows shift together (`aes_bs_mixcol`, described below). |
| Key schedule | 24 + 4 × (8 + C) + 8 + 24 | Described below. |

**MixColumns.** Each cycle produces one output bit per row. The new bit j of
row r is the matching bit of 2·a_r ^ 3·a_{r+1} ^ a_{r+2} ^ a_{r+3}, where the
a are the four bytes of the column. The doubling needs two extra inputs:

- bit j−1 of the same byte, from the read port at position 30 (the
  next-to-last bit). It is masked to 0 at the LSB (`notLSB`).
- the byte's MSB. Four flip-flops capture it in the first cycle of each byte
  and drive the 0x1B reduction (`Poly`).

**Key schedule.** The key array's read port sits at position 7. While a row
rotates, that port returns the bit of the previous column's byte, which has
just been updated, at the same bit position as the head. The sequence is:

1. Rotate every key row by 24. The last column (bytes 12..15) is now at the
   heads.
2. Shift these four bytes one by one through the shared S-box. Each result
   is xored into column 0 of the row above it (RotWord). Rcon is added on
   row 0. Key row 0 is realigned while the S-box computes.
3. Rotate all rows 24 more times, xoring in the read-port bit:
   w[c] ^= w[c−1] for c = 1, 2, 3.

### Controller (`aes_bs_ctrl`)

The controller is a phase FSM (IDLE, LOAD, SUB, SR, MC, KS) with a cycle
counter, a slot counter and a round counter. It drives a packed control word
(`ctrl_t`) that holds:

- the row enables and multiplexer selects;
- the per-row key operations;
- the S-box command and source;
- the Rcon bit, computed from the round number.

Rounds 1–9 run SUB, SR, MC, KS. Round 10 leaves out MC. The final
AddRoundKey is done while the result leaves: during the next LOAD, `ct_o` is
the xor of the heads of state row 0 and key row 0.

| | LOAD | Rounds 1–9 | Round 10 | Total |
|---|---|---|---|---|
| Unmasked (C = 8) | 128 | 440 each | 408 | **4496** |
| Masked (C = 18) | 128 | 640 each | 608 | **6496** |

### Interface of `aes_bs_core`

1. Pulse `start` for one cycle while the core is idle (`busy` low).
2. In each of the next 128 cycles (`loading` high), present one plaintext bit
   on `pt_i` and one key bit on `key_i`, in the serial order above.
3. Wait for `done`. It pulses when round 10 ends.
4. The ciphertext of a block leaves on `ct_o` during the *next* load, with
   `ct_valid` high. Encrypt a dummy block to retrieve the last one.

`busy` is high for exactly 4496 cycles per block. Reset (`rst_n`) is
active-low and asynchronous. It clears the controller and the S-box. The
shift rows have no reset, like the FPGA primitive they model.

## The masked core

### Decomposition of the inversion

The masked S-box splits the inversion into two cubic power maps:
x^254 = (x^26)^49. Both maps are rotation-symmetric in the normal basis
beta = 205. Call their coordinate-7 functions G* (for x^26) and F* (for
x^49). Each has algebraic degree 3. A cubic function can be masked with only
two shares, if every component sees at most one share of each variable. This
property is called non-completeness.

### Masked G*/F* (`masked_gf`)

**Splitting into parts.** G* and F*^G* are each split into three parts. Each
part comes with a *world*: an assignment of the eight variables to three
domains, such that no monomial of the part has two variables in the same
domain. Every part depends on only seven variables.

**Output shares.** Each part expands into eight output shares z_k, one for
each choice of share (sa, sb, sc) for the three domains:

- Each monomial takes share sa of its domain-0 variable, sb of its domain-1
  variable and sc of its domain-2 variable.
- A monomial that lacks a domain goes only to the shares where that domain's
  index is 0.

So every z_k is a function of seven input bits and sees only one share of
each variable.

**Refresh and compression.**

- The cross terms are refreshed with three fresh bits per part.
  z1, z2, z3 take r0, r1, r2; z6, z5, z4 take the same bits.
- All 48 terms are registered, which stops glitches from propagating.
- An xor tree then compresses them into two output shares: z0..z3 and
  z4..z7.
- `sel` picks G* alone, or G* ^ (F*^G*) = F*.

Fresh randomness: 18 bits per cycle.

The parts are in `PART_WORLD`/`PART_ANF` of the package. They were found with
a world-assignment search that minimises the number of variables per part.
Other valid splits exist. Any split with the non-completeness property works
with this RTL unchanged.

### Masked S-box (`masked_sbox`)

The two shares move side by side through R1/R2, under the same command
interface as `rs_sbox_ser`. One evaluation takes 26 cycles:

| Phase | Cycles |
|---|---|
| Load, with p2n applied per share | 8 |
| G* pass: R1 rotates, registered G* bits fill R2 | 9 |
| Write-back of the G* result into R1 | — |
| F* pass | 9 |
| n2p (affine constant on share 0) | — |

The inputs of G*/F* come from a **pre-charge register**:

- it is cleared while the clock is high;
- it loads R1 on the falling edge.

Between two values the LUT inputs therefore pass through all-zero instead of
through a mix of old and new bits. In the RTL this is a negative-edge
flip-flop with the clock as its asynchronous clear.

### Randomness and core (`lfsr31`, `aes_masked_core`)

**LFSRs.** Eighteen 31-bit LFSRs (x^31 + x^28 + 1), clocked on the falling
edge, supply the 18 fresh bits. Each has its own non-zero seed.

**Core.** `aes_masked_core` duplicates the linear datapath per share: state
rows, key rows and MixColumns. Rcon is added to share 0 only. The core
shares one masked S-box and the controller, which runs with C = 18.

**Ports.** `pt_i`, `key_i` and `ct_o` are 2-bit (share 1, share 0).
`prng_en = 0` switches off the fresh randomness. With `prng_en` low and zero
initial masks, the core behaves as an unprotected AES. Share 1 then stays
zero. This allows the usual "masks off / on" side-channel settings.

**Security limits.** Two shares give first-order protection only. A
second-order attack is expected to succeed, especially as the circuit is
small and quiet while the S-box computes. The RTL has not been evaluated for
side channels.

## Top level (`aes_rs_top`)

`aes_rs_top` instantiates the three AES cores and the stand-alone S-box with
separate ports, prefixed `aes_`, `maes_`, `bss_` and `sb_`. They share only `clk` and `rst_n`.

## Verification and simulation

Each `tb/tb_<module>.sv` is self-checking and ends with a
`TB_RESULT checks=.. failures=..` line. The main checks:

| Testbench | Checks |
|---|---|
| `tb_rs_sbox_par` | All 256 inputs against the S-box, the 8-cycle latency, back-to-back starts. |
| `tb_rs_sbox_ser` | All 256 inputs, streamed back to back. |
| `tb_masked_sbox` | All 256 inputs with random input shares and fresh randomness. |
| `tb_masked_gf` | Recombined shares against G* and F*, worked out from x^26 and x^49 in the reference model. Also that no output share depends on both shares of one variable. |
| `tb_aes_bs_mixcol`, `tb_aes_bs_state`, `tb_aes_bs_key`, `tb_srl32`, `tb_lfsr31` | Each mechanism against the reference model. |
| `tb_aes_bs_core` | FIPS-197 example (`69c4e0d86a7b0430d8cdb78070b4c55a`), random blocks back to back, 4496-cycle latency, S-box evaluation order. |
| `tb_aes_masked_core` | The same, with masked inputs, the four randomness settings and 6496-cycle latency. |
| `tb_aes_byte_serial` | Both S-box variants side by side: FIPS-197 example and random blocks byte by byte, 5538- and 1098-cycle latency, 32 load cycles, 16 output bytes. |
| `tb_aes_rs_top` | All four designs at default parameters. Counts each mechanism (S-box paths, ShiftRows, MixColumns, key schedule, Rcon, streaming output, masking settings, the byte-serial core's key calls, four-call bytes and half swaps) and fails if one never occurs. |

With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/aes_rs_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_rs_top.sv \
        --top-module tb_aes_rs_top -o sim
    ./obj_dir/sim

To run another testbench, replace `tb_aes_rs_top` with its name. Each one
finishes in seconds.

## Departures from the reference design

- **Cycle counts.** The reference reports 128 + 476·9 + 440 = 4852 cycles
  for the unmasked core and 6852 for the masked one. This schedule needs
  4496 and 6496. The key-schedule order and slot layout here are this
  design's own. Only its controller phases and counters, not the reference's
  8-state encoding, are implemented. Both designs spend the same 2000 extra
  cycles on masking: 20 S-box calls per round, each 10 cycles longer.
- **Shares and splits.** The three-part splits of G* and F*^G* are this
  design's own, found by the same kind of search. The refresh pattern and
  register stage follow the reference scheme.
- **Choices not taken from the reference.** These are design decisions of
  this RTL:
  - the MSB-first bit order;
  - the start/done handshake;
  - streaming the ciphertext during the next load;
  - placing the affine constant on share 0;
  - the LFSR seeds;
  - the `prng_en` switch.
- **FPGA mapping.** The RTL describes behaviour, not the hand-packed LUT and
  slice mapping of the reference. Area figures therefore depend on the
  synthesis tool.
- **Byte-serial core.** Its block structure and its cycle budget (32 /
  589 / 205) follow the reference. The order of operations inside a round
  and the FSM are this design's own, chosen to meet that budget. Two
  details also differ:
  - The last S-box result and the round-key byte are added in the same
    write-back cycle.
  - Rcon is computed, not stored in the key RAM.
