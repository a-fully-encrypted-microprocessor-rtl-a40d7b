# An encrypted-running OpenRISC processor

This processor computes on data it cannot read. In user mode every data
word in the register file, on the buses and in memory is a 64-bit
ciphertext of a 32-bit value. A single datum has many ciphertexts, because
each encryption uses a fresh random pad. The arithmetic is changed so that
it works on ciphertexts: an operation on encrypted operands x' and y'
produces an encryption of the plain result,

    z' = E( D(x') op D(y') )

where D decrypts and E encrypts. An operator or supervisor program on the
machine can see and move user data, but only ever in encrypted form. The
processor is meant to run as a coprocessor: a host hands it code that is to
run encrypted.

A naive build would put a decryptor on every operand and an encryptor on
every result, and pay two codec latencies per instruction. This design
avoids that with three ideas:

* **The codec is a pipeline segment.** The 64-bit Rijndael codec is 10
  stages deep and sits inside a 15-stage instruction pipeline. Every user
  instruction passes through it, so a codec costs latency but no
  throughput: one instruction can still finish per cycle.
* **Decrypted copies of the registers.** A private bank of shadow
  registers holds the plaintext of every user register. A run of
  arithmetic instructions works on plaintext. Only loads, stores and
  immediates meet the codec.
* **A plaintext data cache.** A small on-chip cache keeps the plaintext
  of recent user stores, so most reloads (stack traffic, for example) need
  no decryption.

Supervisor mode is an ordinary unencrypted OpenRISC machine. It runs on a
5-stage pipeline embedded in the first five stages of the long one.

The code is IEEE 1800-2017 SystemVerilog. It is synthesizable apart from
the assertions, and all parameters default to the configuration described
above (10 codec rounds, 15 pipeline stages). A generic yosys synthesis of
`kpu_top` at these defaults gives about 9.4k cells and 22k flip-flop bits,
with the S-boxes mapped to ROMs.

## Where plaintext exists

It helps to know exactly where unencrypted user data can be found:

| place | contents in user mode |
|---|---|
| real register bank (`kpu_regfile`, bank 0) | ciphertext, or the zero-filled form of a program address |
| shadow register bank (bank 1) | plaintext; never readable in supervisor mode |
| user data cache (`kpu_udcache`) | plaintext of user stores; flushed on each entry to user mode |
| pipeline stages between decrypt and encrypt | plaintext |
| data memory, data bus | ciphertext |
| data addresses leaving the core | plaintext address scrambled by a keyed bijection, then remapped by the TLB |
| instruction memory | plain instructions; immediates are ciphertext split over prefix instructions |

Program addresses are never encrypted. The PC advances by a constant step,
which would give an attacker known plaintexts if addresses were
encrypted. Programs must therefore never mix program addresses with data.
Compilers for such a machine must respect this, and this design does not
check it.

## The pipeline and its two user-mode configurations

Every instruction occupies one of NST = ROUNDS + 5 stage registers per
cycle (`st[2..NST]` in `kpu_core`, with stage 1 being the fetch). What an
instruction does in a stage depends on its mode and class:

    stage         1   2   3   4   5 .......... 14   15
    supervisor    F   D   R   X   W   (idle)
    user, A       F   D   R   X   [ A codec: 5..14 ]  W
    user, B       F   D   [ B codec: 3..12 ]  R  X  W
                                              13 14 15

The hardware for stages with two roles is doubled. There are two read
points (stage 3 and stage 13) and two ALUs (stages 4 and 14). There are
two codec chains: the B decryptor runs alongside stages 3–12, and the A
encryptor and A decryptor run alongside stages 5–14.

**Configuration B** is used by user instructions that carry an encrypted
immediate: `l.addi`, `l.andi`, `l.ori`, `l.xori`, `l.muli`, `l.movhi` and
`l.sfXXi`. The 64-bit immediate is assembled in decode (see "Encrypted
immediates" below). The B decryptor then decrypts it while the
instruction travels down to stage 13. There it reads its register operand
from the shadow bank and executes on plaintext in stage 14.

**Configuration A** is used by everything else in user mode:
register-register ALU operations, loads, stores, branches, jumps,
`l.sys`, `l.rfe` and SPR moves. An A instruction executes early, in stage
4, on plaintext from the shadow bank, so its result can be forwarded to
the very next instruction.

* A user store sends its data through the A encryptor. The ciphertext is
  written to memory when the store reaches stage 15.
* A user load first looks in the user data cache. On a hit the plaintext
  is ready in stage 5. On a miss the memory word enters the A decryptor in
  stage 5 and comes out as plaintext at stage 15.

Results are written in order, in the last stage: user results go to the
shadow bank and supervisor results to the real bank in stage 5. The only
thing that decides an instruction's stage is its position, so a younger
instruction can never overtake an older one.

### Forwarding and stalls

Each read point compares its source registers with the destinations of
all the older instructions ahead of it and takes the value from the
nearest producer. The producer
arrays `p_v`, `p_rdy` and `p_val` are built per stage:

* an A result is ready from stage 4 on;
* a cache-hit or supervisor load is ready from stage 5;
* a B result is ready from stage 14;
* a decrypted user load (cache miss) is ready at stage 15.

A reader whose nearest producer is not ready yet stalls. The stages up to
and including its read point hold, and a bubble enters the stage after
it. Stages beyond the read point keep moving. The codec stages have
per-stage enables (`stage_en`) that follow this freeze boundary, so data
inside a codec always stays aligned with its instruction.

The usual wait is a load feeding an arithmetic instruction. A cache hit
costs one cycle. A cache miss costs about ten cycles, because the load must
get through the decryptor. A B instruction behind an A load usually finds
the value ready by the time it reaches stage 13. The flag `SR[F]` is
renamed as register 32 so that compares and conditional branches use the
same forwarding network.

### Branches

Branches and jumps are predicted in fetch by the branch prediction
buffer (`kpu_bpb`). This is direct-mapped with a tag, a target and a
2-bit counter per line, and on a miss it predicts fall-through. Branches
are resolved in stage 4 (A) using the forwarded flag. A misprediction
flushes stages 2–3 and the prefix collector, and refetches. There are no
delay slots, which departs from OpenRISC: `l.jal` links pc+4. The buffer
counts hits and misses, each split into right and wrong.

## Two register banks and the mode switch

`kpu_regfile` holds 32 real and 32 shadow 64-bit registers, with a stale
bit per register and bank.

* A supervisor write to a real register marks its shadow copy stale.
* A user write to a shadow register marks its real copy stale.
* Nothing is re-encrypted or re-decrypted on each write.

The banks are brought into line only when the mode changes. `l.sys`,
`l.rfe` and an illegal instruction are serialising. In stage 4 they wait
until everything ahead has drained. If the mode is about to change, a
small state machine then injects one pseudo-instruction per stale
register into stage 5, through the A codec:

* on leaving user mode, `SYNC_ENC` encrypts the shadow value into the real
  register;
* on entering user mode, `SYNC_DEC` decrypts the real value into the
  shadow register, and the user data cache is flushed.

Fetch is redirected only after the last of these has been written. The
supervisor therefore always sees up-to-date ciphertext. The user program
always sees the plaintext of what the supervisor left in the registers,
including registers written just before the `l.rfe`.

Exceptions save the PC in `EPCR0` and the status in `ESR0`. They then
enter supervisor mode at 0xC00 (system call) or 0x700 (illegal
instruction). `l.rfe` restores both. In user mode `l.mtspr` is ignored and
`l.mfspr` returns zero. The 64-bit `l.ld`/`l.sd` raise the
illegal-instruction exception in user mode.

## Encrypted immediates: prefix instructions

A ciphertext is 64 bits and an instruction is 32, so the immediate does
not fit. Instead, up to three prefix instructions go first, each carrying
16 bits of the ciphertext, high segment first:

    0x1c << 26 | seg[15:0]           (l.prefix, opcode 0x1c)

The immediate instruction itself carries the last 16 bits. `kpu_prefix`
shifts each segment into a 48-bit accumulator in decode. It hands
`{accumulator, imm16}` to the B decryptor with the immediate instruction,
then clears. A flush clears it too.

With fewer than three prefixes the top bits are zero. A prefix-less
immediate is therefore a zero-filled word, which the decryptor treats as
an unencrypted program-address form (next section) and passes through. A
prefix-less user immediate thus acts as a plain 16-bit zero-extended
constant.

Prefixes are ordinary instructions in the pipeline: each costs a cycle and
retires as a no-op.

## Program addresses in user mode

A jump-and-link in user mode writes a program address into a register
that also has a shadow copy. The two forms are told apart by a fixed
convention that both codecs implement:

* "encrypted" form, in the real register and in memory: the 32-bit
  address zero-filled to 64 bits;
* "decrypted" form, in the shadow register: `{16'h7fff, 16'h0000, address}`.

The decryptor turns any word whose top 32 bits are zero into the 0x7fff
form. The encryptor turns any 0x7fff-tagged word back into the zero-filled
form. Neither applies the cipher to such a word.

Real plaintext is padded as `{1'b1, pad[30:0], datum[31:0]}`, with the pad
taken from an LFSR. Bit 63 is set, so a plaintext is never 0x7fff-tagged.
Its ciphertext is a random-looking 64-bit word, which has a 2^-32 chance
of having a zero top half. That case is not excluded.

A stored return address therefore appears in memory as a plain zero-filled
address. A `l.jr` through it works after any number of saves and reloads.

## The user data path

User data addresses are plaintext inside the core. This is only by
convenience: they come from the shadow registers. Before they reach
memory:

1. **Scramble.** `addr_scramble` (in `kpu_pkg`) applies
   `((a ^ K0) * 0x9e3779b1) ^ K1`. This is a keyed bijection on 32 bits,
   so the bare address never appears outside.
2. **Remap.** `kpu_tlb` works at unit granularity, because scattered
   ciphertext-like addresses gain nothing from pages. It is fully
   associative and allocates slots of a pre-set logical range (`UBASE +
   n`) first-come, first-served. Data first touched together therefore
   lands together, and ordinary prefetching still works. The TLB never
   frees slots. When it is full, a new address maps to the last slot and
   sets the sticky `tlb_overflow` output.
3. **User data cache.** `kpu_udcache` is a direct-mapped, write-allocate,
   one-word-per-line cache of plaintext. It is indexed by the top bits of
   the scrambled address, because the low bits of a multiplicative
   scramble depend only on the low address bits, which word alignment
   fixes. Every user store writes it. Every user load looks it up first.

Supervisor loads and stores use the byte address divided by 8 as a
64-bit word index, with no translation. Memory is shared: supervisor code
can read user data, but only as ciphertext.

Memory ordering: a user load that misses the cache while a store to the
same address is still between execute and its memory write waits for
that store. This happens when a later store has evicted the first one's
cache line; the wait lasts until the store's ciphertext is in memory, and
the load then decrypts it.

## The cipher

`kpu_encrypt` and `kpu_decrypt` are pipelined 64-bit-block Rijndael, one
round per stage, ROUNDS = 10 stages. The state is 4 rows × 2 columns of
bytes.

* SubBytes uses the AES S-box. It is computed at elaboration from the
  inverse in GF(2^8) and the affine map, not stored as a table.
* ShiftRows rotates row r by r mod 2 (rows 1 and 3 swap their two bytes).
* MixColumns is the AES column mix.
* The round keys come from the AES-128 key schedule, extended past its
  usual length; consecutive pairs of 32-bit words form the 64-bit round
  keys.

The key is the `KEY` parameter: the processor embeds its key, and how keys
get there is outside this design. `kpu_pkg` holds the round functions;
both codecs and the testbench reference model (written separately, with a
brute-force S-box) must agree on them.

`kpu_alu_enc` is the direct, idealised form of the encrypted ALU: two
decryptors, the ALU and an encryptor. The 1-bit compare output leaves
unencrypted after ROUNDS cycles and the encrypted result after
2×ROUNDS cycles. It stands beside the core in `kpu_top` as a separate
unit with its own ports. The core does not use it, because it spreads the
same parts over its pipeline.

## Instruction set

The user mode runs the 32-bit OpenRISC 1.1 subset below; supervisor mode
runs the same set plus `l.ld`/`l.sd`. Encodings are OpenRISC's, apart from
`l.prefix`.

| group | instructions |
|---|---|
| register ALU (0x38) | add, sub, and, or, xor, mul, sll, srl, sra, ror |
| immediate | addi, andi, ori, xori, muli, movhi, sfXXi (B configuration in user mode) |
| compare (0x39) | sfeq, sfne, sfgtu, sfgeu, sfltu, sfleu, sfgts, sfges, sflts, sfles |
| memory | lwz, sw; ld, sd (supervisor only) |
| control | j, jal, jr, jalr, bf, bnf |
| system | sys, rfe, mtspr/mfspr (SR = 17, EPCR0 = 32, ESR0 = 64), nop (nop 1 halts) |
| new | prefix (0x1c) |

## Departures and limits

What follows a published description of this machine:

* the 15-stage pipeline with a 10-stage codec;
* the A and B configurations, and which instructions take each;
* shadow registers visible only in user mode;
* prefix instructions;
* the program-address convention;
* the plaintext user data cache checked first on loads;
* a unit-granularity first-come TLB;
* a branch prediction buffer;
* an embedded 5-stage supervisor pipeline;
* ignoring user `l.mtspr` and reading zero from user `l.mfspr`.

This design's own choices:

* the 64-bit Rijndael variant and key;
* the pad layout;
* the lazy stale-bit register refresh at mode switches;
* the address scramble;
* all cache, TLB and predictor sizes and organisations;
* the stall mechanism;
* the drain-before-switch rule;
* the prefix encoding.

Not built:

* most of OpenRISC: delay slots, shift-immediates, floating point, the
  other exceptions and SPRs, timers and interrupts, 64-bit instructions
  other than `l.ld`/`l.sd`;
* any multi-issue or out-of-order execution;
* conventional instruction and data caches, and the memories themselves,
  which are external ports;
* the alternative Paillier-encryption arithmetic;
* any check that programs obey the no-mixing rule for program addresses.

For these reasons real compiled OpenRISC binaries do not run unchanged.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. All of them pass. The reference values
come from `tb/tb_cipher_model.sv`, a separate cipher written with byte
arrays and a brute-force S-box, and from plain SystemVerilog arithmetic.

| testbench | what it checks |
|---|---|
| tb_kpu_encrypt / tb_kpu_decrypt | random blocks against the model, 10-cycle latency, program-address pass-through |
| tb_kpu_alu | every operation with random and corner operands |
| tb_kpu_alu_enc | random encrypted operations; the result decrypts right and the latencies are ROUNDS and 2×ROUNDS |
| tb_kpu_prefix | 0–3 prefixes, clearing, flush |
| tb_kpu_regfile | random traffic on both banks against a model, stale bits, r0 |
| tb_kpu_udcache | hits, misses, conflicts, flush, counters |
| tb_kpu_tlb | first-come allocation order, repeats, overflow |
| tb_kpu_bpb | predictions and counters against a model |
| tb_kpu_core | the end-to-end program on the core |
| tb_kpu_top | the same program through `kpu_top` at default parameters, plus an encrypted-ALU stream |
| tb_kpu_addtest | add-test workload at three codec depths |

The end-to-end program (`tb_kpu_prog`, assembled by the helper functions
in `tb_kpu_asm`) does the following:

1. sets up in supervisor mode and enters user mode;
2. computes with encrypted immediates;
3. stores, reloads (cache hit) and loads a pre-encrypted word (cache
   miss, decrypted);
4. loops, calls and returns;
5. stores a return address;
6. makes two stores to addresses that share a cache line, so that a
   reload of the first must wait for its store;
7. makes a system call, whose handler saves the encrypted registers;
8. returns, and ends on an illegal 64-bit instruction.

`tb_kpu_top` decrypts the saved registers and compares them with
independently computed values. It also checks that every mechanism
occurred at least once, and prints how often each did: prefixes, B
instructions, A and B read stalls, execute holds, forwards,
mispredictions, buffer hits and misses, mode switches, codec register
refreshes, exceptions, cache read hits/misses and write hits/misses,
loads that waited for an in-flight store, and a stored program address.
One run takes about 440 cycles.

The core has also been run with `ROUNDS` of 4, 12 and 14, with the
reference model set to the same depth; the program passes in each case.

`tb_kpu_addtest` is a workload in the style of an instruction-set add
test. For each of 40 operand pairs it loads two encrypted constants, adds
them, stores and reloads the sum, and compares it with an encrypted
expected value, branching to a failure routine on a mismatch. Every
fourth pair also checks an add-immediate. It runs the program on
`kpu_top` with 10, 11 and 12 codec rounds, one after the other, and
checks the sums, the pass count, the retired-instruction count and the
cache behaviour. Measured at the default depth: 936 user instructions in
1953 cycles (2.07 cycles per instruction). Each extra codec stage costs
about 4.5% throughput on this program, because almost every instruction
depends on an encrypted immediate decrypted just before it. The reference
model's `NR` variable sets the depth the testbench encrypts for.

To simulate with Verilator 5 (packages first):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      --top-module tb_kpu_top \
      rtl/kpu_pkg.sv tb/tb_cipher_model.sv tb/tb_kpu_asm.sv tb/tb_kpu_prog.sv \
      tb/tb_kpu_top.sv
    ./obj_dir/Vtb_kpu_top

For a block testbench, list `rtl/kpu_pkg.sv`, `tb/tb_cipher_model.sv`
and the testbench. To write new programs, use the assembler functions in
`tb/tb_kpu_asm.sv`: `uaddi` and friends emit the three prefixes and the
immediate instruction for an encrypted constant.

Lint notes: Verilator reports unused fields of the stage records, and
`SYNCASYNCNET` on `rst_n` because the concurrent assertions sample the
asynchronous reset. Neither is a circuit problem.

## Files

| file | contents |
|---|---|
| rtl/kpu_pkg.sv | types, constants, opcodes, S-box generation, key schedule, round functions, address scramble, performance-counter struct |
| rtl/kpu_encrypt.sv, rtl/kpu_decrypt.sv | pipelined codecs with program-address protocol |
| rtl/kpu_alu.sv | 32-bit integer ALU with compare flag |
| rtl/kpu_alu_enc.sv | idealised encrypted ALU, E(D(x) op D(y)) |
| rtl/kpu_prefix.sv | encrypted-immediate collector |
| rtl/kpu_regfile.sv | real and shadow register banks with stale bits |
| rtl/kpu_udcache.sv | user data cache |
| rtl/kpu_tlb.sv | unit-granularity first-come TLB |
| rtl/kpu_bpb.sv | branch prediction buffer |
| rtl/kpu_core.sv | the pipeline |
| rtl/kpu_top.sv | core plus encrypted ALU |
| tb/tb_cipher_model.sv | reference cipher |
| tb/tb_kpu_asm.sv, tb/tb_kpu_prog.sv | assembler helpers and the test program |
| tb/tb_*.sv | testbenches |
