# A tagged AES-128 accelerator shared by users of different security levels

Several users, each with its own key and security level, share one deeply pipelined AES
engine. To get full throughput the engine is shared at fine grain: in any cycle its thirty
pipeline registers may hold blocks of different users, encrypted under different keys. What
keeps them apart is information-flow tagging. Every pipeline register, key cell and buffer
entry carries an 8-bit security label. Every path by which data can leave or be overwritten
checks that label at run time. A result leaves the engine only through one release point,
the declassifier, and only if the user who asked for it may use the key involved. Stalls are
restricted so that one user's behaviour cannot change another, less secret user's latency.

The design follows a published case study of information-flow-controlled crypto
accelerators. That study checked its policies statically with a security-typed HDL and also
kept run-time tags. This RTL implements the run-time half: the tags and the checks. The
static verification is not reproduced here (see *Limits* below).

## Labels

A label is `{conf[3:0], integ[3:0]}` (`ifc_pkg::label_t`):

* confidentiality: 0 = public … 15 = secret
* integrity: 0 = untrusted … 15 = trusted

Both dimensions are taken as linear orders. Data may flow from `a` to `b` when
`a.conf <= b.conf` (never towards less secret) and `a.integ >= b.integ` (never towards more
trusted). The *supervisor* is any principal with integrity 15. `nabla` maps an integrity
level to the confidentiality level with the same number: an untrusted principal counts as
public, a fully trusted one as secret. Data computed from two inputs gets the join of their
labels: the higher confidentiality and the lower integrity.

| Asset | Fixed label | Rule enforced (unit) |
|---|---|---|
| Master key | (15, 15) | written only by the supervisor; never readable (`master_key`) |
| Configuration registers | (0, 15) | anyone reads; only the supervisor writes (`config_regs`) |
| Key cells | label given at allocation | write: writer flows to the cell label; read: cell conf ≤ reader conf (`key_scratchpad`) |
| Buffer entries | the owner's label | pop: entry conf ≤ reader conf, and reader integ ≥ owner integ (`tagged_fifo`) |
| Pipeline registers | owner ⊔ key | no read path except the debug port: conf ≤ reader conf and debug enabled (`debug_peripheral`) |
| Results | released label | declassification rule below (`declassifier`) |

When a check fails, nothing happens. A write or pop is dropped, a read returns zero, and the
response has `ok = 0`.

## Path of a block

```
 host ─► arbiter ─► input buffer ─► [entry: data ^ key, tag = owner ⊔ key]
                                     │
             key scratchpad ─┐       ▼
             master key ─────┴──►  10 rounds × 3 registers, key schedule alongside
                                     │
                                     ▼
                               declassifier ─► output buffer ─► host (OP_READ_OUT)
                                     └────► extra buffer ──┘   (when a stall is denied)
```

1. `OP_ENCRYPT`/`OP_DECRYPT` puts the block into the input buffer. The entry carries the
   requester's label and a key selector: scratchpad slot 0–3, or 4 for the master key.
2. Blocks leave the input buffer one per cycle. The selected key and its label are
   fetched in the same cycle. The block is XORed with the key (the initial AddRoundKey) and
   enters round 1. Its tag is then the join of the owner's and the key's labels.
3. Each round has three registers, so the pipeline latency is 30 cycles:

   | Direction | register 1 | register 2 | register 3 |
   |---|---|---|---|
   | encrypt | SubBytes | ShiftRows, MixColumns | AddRoundKey |
   | decrypt | InvShiftRows, InvSubBytes | (pass) | AddRoundKey, InvMixColumns |

   The last round leaves out (Inv)MixColumns. Each of the ten key stages (`aes_key_stage`)
   has three matching registers and derives its round key in the middle one. So each block
   takes its own key schedule with it, and blocks with different keys can follow each
   other cycle by cycle. Each data register keeps its slot's tag, owner, id and direction.
4. After round 10 the declassifier releases the result, or refuses to.
5. The result goes to the output buffer. The owner, or anyone allowed to see it and trusted
   enough to remove it, fetches it with `OP_READ_OUT`.

Timing: a request gets its response one cycle after it is accepted. A block accepted by
the pipeline in cycle *t* comes out of round 10 in cycle *t*+30. An encryption request sent
to an idle accelerator is in the output buffer 31 edges after it was accepted. Throughput is
one 128-bit block per cycle.

**Decryption key convention.** In decryption the key schedule runs backwards. So the key
supplied for `OP_DECRYPT` is the *last round key* (round key 10) of the cipher key, not the
cipher key itself. Software computes it once and stores it in a key slot.

## Release: nonmalleable declassification

The result of round 10 is as secret as the more secret of the plaintext and the key. It may
be lowered to its release label only if the issuing user `p` is trusted enough:

```
C(tag) <= C(release) ⊔ nabla(I(p))        (integrity unchanged)
```

* Ciphertext is released as (0, I(tag)).
* Plaintext from a decryption is released back to the owner's confidentiality,
  (C(owner), I(tag)).

A user whose keys are no more secret than its own integrity level gets its results. A
regular user who selects the master key (15, 15) does not: only the supervisor's integrity
reaches 15. A refused result still takes its place in the output buffer. Its data is zero
and its response has `err = 1`. No intermediate round result leaves the pipeline except
through the checked debug port.

## Stalls without a timing channel

This is the subtle part of the design. A shared pipeline that stalls for one user delays
every other user's blocks in flight. That delay is a covert channel from the stalling user
to the others.

* **When a stall is requested.** A stall is requested when the output buffer is full,
  because its reader is not reading. The request carries the label of the owner of the
  oldest unread result.
* **When it is granted.** `stall_ctrl` takes the lowest confidentiality over all thirty
  pipeline tags (a meet). Empty registers count as 15. The stall is granted only if the
  request's confidentiality is not above that minimum, so a user can stall the pipeline
  only while nothing less secret is in flight. A granted stall freezes all 30 data
  registers and all 30 key registers and blocks the input.
* **When it is denied.** The pipeline keeps running. Results that find the output buffer
  full go into the **extra buffer** (32 entries). It drains into the output buffer, in
  order, as room appears.
* **Admission rule.** So that the extra buffer can never overflow, a block is admitted
  only while the blocks in flight plus the extra buffer's occupancy are fewer than its
  32 entries. In steady state without back-pressure this never limits throughput: at most
  30 blocks are in flight.

What this does not remove is listed under *Limits*.

## Key scratchpad

The key scratchpad is 512 bits: eight 64-bit cells, each with its own tag. Key slot *s*
is cells 2*s* (high half) and 2*s*+1.

| Operation | Allowed when | Effect |
|---|---|---|
| `OP_KEY_ALLOC` | the cell is free (the supervisor may relabel any cell) and the requester flows to the requested key label | sets the label, clears the data |
| `OP_KEY_FREE` | the requester is at least as trusted as the cell | clears the cell |
| `OP_KEY_WRITE` | the cell is allocated and the writer flows to its label | writes the cell |
| `OP_KEY_READ` | the cell is allocated and its confidentiality is not above the reader's | returns the cell |

If one cell of a slot is unallocated, the whole slot counts as (15, 15) when the pipeline
fetches it. A key written past its two cells (an overrun) is dropped at the first foreign
cell. Reads past them return zero.

## Host command port

There is one `valid/ready` request channel (`accel_pkg::cmd_t`: op, label, id, addr,
128-bit wdata) and one response channel (`resp_t`: op, ok, err, id, label, 128-bit rdata).
The label must be supplied by trusted logic on the host side, such as the bus fabric or a
tagged processor; the accelerator trusts it.

| op | addr | wdata | response |
|---|---|---|---|
| 1 KEY_ALLOC | cell | [7:0] key label | ok |
| 2 KEY_FREE | cell | – | ok |
| 3 KEY_WRITE | cell | [63:0] | ok |
| 4 KEY_READ | cell | – | ok, [63:0] |
| 5 MKEY_WRITE | – | key | ok |
| 6 CFG_WRITE | reg | [31:0] | ok |
| 7 CFG_READ | reg | – | [31:0] |
| 8 ENCRYPT / 9 DECRYPT | key select 0–4 | block | ok (refused if disabled, input buffer full, or bad key select) |
| 10 READ_OUT | – | – | ok, err, id of the result, its label, data |
| 11 DEBUG_READ | pipeline register 0–29 | – | ok, tag, state |

Configuration register 0 holds two control bits. Bit 0 enables the accelerator (reset 1).
Bit 1 enables the debug port (reset 0).

## Cache-tag store (separate example)

`cache_tags` is the small example of a module whose port label depends on a signal. It is
instantiated beside the accelerator and shares nothing with it. It has two ways of 256 × 19-bit
tags. Way 0 is trusted, way 1 untrusted. Both share one write and one read port, whose
integrity follows `way` (`port_trusted`). Entries are addressed by `index`.

## Files

| File | Contents |
|---|---|
| `rtl/ifc_pkg.sv` | label type and lattice functions |
| `rtl/aes_pkg.sv` | computed S-box and AES round and key-schedule functions, pipeline slot and buffer entry types |
| `rtl/accel_pkg.sv` | host request/response formats |
| `rtl/aes_round.sv`, `rtl/aes_key_stage.sv` | one round and one key-expansion stage |
| `rtl/stall_ctrl.sv`, `rtl/declassifier.sv` | stall rule; release rule |
| `rtl/aes_ed_pipeline.sv` | the 30-register E/D pipeline |
| `rtl/key_scratchpad.sv`, `rtl/master_key.sv`, `rtl/config_regs.sv`, `rtl/tagged_fifo.sv`, `rtl/debug_peripheral.sv`, `rtl/arbiter.sv` | the units around the pipeline |
| `rtl/aes_accel_top.sv` | top level |
| `rtl/cache_tags.sv` | the cache-tag example |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/aes_ref_pkg.sv` | independent AES-128 reference model (matrix style, table built by search) |
| `tb/tb_check.svh` | the `CHECK` macro |

## Simulating

All RTL is plain SystemVerilog-2017. Packages must come first. For example, the top-level
test:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aes_accel_top \
  rtl/ifc_pkg.sv rtl/aes_pkg.sv rtl/accel_pkg.sv tb/aes_ref_pkg.sv \
  rtl/aes_round.sv rtl/aes_key_stage.sv rtl/stall_ctrl.sv rtl/declassifier.sv \
  rtl/aes_ed_pipeline.sv rtl/key_scratchpad.sv rtl/master_key.sv rtl/config_regs.sv \
  rtl/tagged_fifo.sv rtl/debug_peripheral.sv rtl/arbiter.sv rtl/cache_tags.sv \
  rtl/aes_accel_top.sv tb/tb_aes_accel_top.sv -o sim && obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog. The top-level
test runs at the default sizes in well under a second. It goes through key allocation,
blocked overruns and over-reads, refused configuration and master-key writes, a FIPS-197
known answer with its 31-cycle latency, decryption, master-key use by a user (refused) and
by the supervisor, a mixed two-user stream at one block per cycle, a granted stall, a denied
stall with results passing through the extra buffer, refused pops, and debug reads. It
counts each of these and fails if one never happens. `tb_aes_ed_pipeline` compares
48 random back-to-back blocks in both directions with the reference model. It also checks
every block's latency against 30 cycles plus the stall cycles.

Sizes are parameters of `aes_accel_top`: `IN_DEPTH`, `OUT_DEPTH` and `EXTRA_DEPTH` (16, 16,
32), `KEY_CELLS` (8), `CFG_NUM` (4), and `CT_SETS`/`CT_TAG_W` (256/19). Keep `EXTRA_DEPTH`
above 30, the number of pipeline registers. The round count is fixed at 10 by `aes_pkg::NR`.

## How far it follows the original description

Taken from it:

* the unit structure (arbiter, master key (15,15), configuration (0,15), tagged key
  register, tagged input and output buffers, pipelined E/D module, tagged debug port)
* one block per cycle and the 30-cycle latency
* the 512-bit scratchpad of 64-bit cells with a tag per cell, and the Eve/Alice
  overrun case
* 8-bit tags (4 + 4)
* a tag per pipeline stage that moves with the data
* declassification only after the last round, under the nonmalleable rule
* the stall rule (meet of the stage confidentialities compared with the request's label)
* the extra output buffer
* the two-way cache-tag example and its sizes

Choices made here, where the description is silent:

* the linear order on each 4-bit level
* three registers per round
* the decryption datapath and its last-round-key convention (the description shows only
  the encryption flow)
* release labels for decrypted data, and zeroing of refused results
* the allocate and free rules of the scratchpad
* what raises a stall request and which label it carries
* the admission rule and all buffer depths
* the command set and formats
* the fields of the configuration register
* what the debug port reads and when it answers

## Limits

* **Static verification.** The original work shows its absence of illegal flows with a
  security-typed HDL at design time. Plain SystemVerilog cannot express that, so it has not
  been done here. The testbenches check the run-time rules, not non-interference.
* **Timing effects that remain.** Sharing FIFOs in order still couples users. A result
  another user may not pop blocks the output buffer head. The input buffer serves
  requests in arrival order. The admission rule depends on how full the extra buffer is.
  The stall rule itself is as described.
* **Key sizes.** Only AES-128: ten rounds and 128-bit keys. 192- and 256-bit keys are not
  supported.
* **Host bus.** No AXI or RoCC adapter; the command port is generic.
* **Clock speed.** Nothing has been timed for a real device. The 400 MHz figure of the
  original FPGA prototype does not apply as such to this RTL. Every round has its S-boxes
  computed as GF(2^8) inverses in a single register stage.
