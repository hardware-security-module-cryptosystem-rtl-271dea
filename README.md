# Petri-net key generator and XOR cipher for a secure SoC

This design is a small hardware security module. It never stores its private key. It stores a
*master key* in an on-chip ROM that is locked after setup. At run time a hardware Petri net
*derives* the private key from the master key:

- the master-key bytes become the initial token counts of the net's places;
- the net fires a secret number of steps N;
- the final token counts, concatenated, are the 64-bit private key.

An encrypt/decrypt engine XORs data blocks with that key, so only cipher text crosses the
bus to and from the engine. Around these two parts sit the pieces of a secure SoC:

- the master-key ROM with a setup-and-lock port;
- an internal RAM for secret buffers;
- an MMU that opens those buffers only to privileged accesses, and only once secure boot has
  passed.

The scheme follows Guechi and Redjimi, "Hardware Security Module Cryptosystem Using Petri Net"
(2023). That paper built the net as a schematic simulation. All the SystemVerilog here is new.
It fixes the points the paper leaves open: the firing rule, conflict handling, widths,
handshakes and the access-control details. The sections below say which points those are.

## The key-generating Petri net

### Structure

The net has six places, P1 to P6, and six transitions, T1 to T6. Every arc has weight 1:

| transition | takes one token from | puts one token into |
|---|---|---|
| T1 | P1 | P2, P5 |
| T2 | P2 | P3 |
| T3 | P3 | P4 |
| T4 | P5 | P6 |
| T5 | P2 | P4 |
| T6 | P4 and P6 | P1 |

The net is a loop, P1 → (P2 → P3 or P2 → direct) → P4, with a side branch P1 → P5 → P6 that
meets it again at T6. Two transitions, T2 and T5, compete for the tokens of P2.

Each place is an 8-bit token counter (`pn_place`). The net is not fixed in the logic. It is
described by two incidence matrices, `PN_PRE` and `PN_POST` in `rtl/hsm_pkg.sv`, which are
parameters of `petri_keygen`. A different net, or more places and transitions, is a change of
parameters. That matters because the net's shape is meant to be a manufacturer's secret.

### Loading the master key

Master-key byte S0 becomes the initial count of P1, S1 of P2, and so on. A master key shorter
than six bytes leaves the remaining places at zero. With 8-bit places, the net uses at most 48
bits of master key.

### One firing step

The paper says only "fire the enabled transitions N times". This RTL uses a synchronous
*maximal step*:

1. From the current marking, decide which transitions are enabled. A transition is enabled
   when each of its input places holds a token.
2. Fire all of them at once.
3. Update every place by (tokens added) − (tokens removed) on the same clock edge.

One step takes one clock cycle.

**Conflict on P2.** T2 and T5 both consume from P2. When P2 holds a single token, only T2 fires.
In general, a transition fires only if each of its input places holds more tokens than the
lower-numbered transitions of the same step already take from it. So no count ever goes
negative. The combinational loop in `petri_keygen` applies this rule for any PRE matrix.
`conflict` pulses on each step where a transition with all input places marked was held back.

**Overflow.** A place's count wraps modulo 256, like a plain adder register. This can happen
because T3 and T5 can both add to P4 in one step. `wrapped` pulses when it happens. The paper
does not say what a full place should do.

### The key

After N steps the marking is the key. P1 is the most significant byte of the 48 marking bits,
and the result is zero-extended to 64 bits:

    key = {16'h0000, P1, P2, P3, P4, P5, P6}

### Timing

A `start` loads the master-key bytes and clears the step counter (`fire_counter`). The next N
clock edges each take one step. One edge later, `done` rises. So the key is ready **N+1 cycles**
after the cycle in which `start` was sampled. It stays valid until the next `start`. A `start`
during a run is ignored.

### Worked example, and how it relates to N

| | P1 | P2 | P3 | P4 | P5 | P6 |
|---|---|---|---|---|---|---|
| Master key "Alpha" (ASCII) | 65 | 108 | 112 | 104 | 97 | 0 |
| After 13 steps | 64 | 95 | 112 | 118 | 97 | 1 |

The final marking gives the key `0000_405F_7076_6101`. XORing it into the 96-bit message
"hitthetarget" leaves "hitthe" unchanged and turns "target" into the bytes
`34 3E 02 11 04 75` ("4", ">", STX, DC1, EOT, "u").

This marking, key and cipher text are the ones the paper publishes. But the paper says they
come from N=10. Under the firing rule above, N=10 gives P2=98 and P4=115 instead. Every step
after the first moves exactly one token from P2 to P4, so the published marking is reached at
step 13.

No rule that fires each transition at most once per step reaches that marking in 10 steps. The
paper's exact firing schedule is not known. Treat the value of N as design-specific: the same
(master key, N) pair gives the same key only with the same firing rule.

## Encrypt / decrypt engine

`xor_engine` XORs a `DATA_W`-bit block (96 by default) with the key. The key is aligned to the
least significant end of the block and zero-extended. This alignment is what reproduces the
published cipher text. Decryption is the same operation applied to the cipher block.

The interface uses valid/ready on input and output, with one register stage. Throughput is one
block per cycle and latency is one cycle. `in_ready` stays low until the key generator reports
`done`, so no data can pass before a key exists. An assertion checks that a result is held
stable while `out_ready` is low.

A note on strength: every block is XORed with the same key, and only the low 48 bits change,
so this is a fixed-key XOR. Two cipher blocks XORed together give the XOR of the two plain
blocks. The scheme relies on keeping the net, the master key and N secret. Judge it on that
basis.

## The secure SoC around it

- **`secure_rom`** holds seven bytes: the master-key bytes for P1 to P6 (addresses 0 to 5) and
  N (address 6).
  - It is written during setup through `wr_en`/`wr_addr`/`wr_data`.
  - `lock` closes the setup port for good. Later writes are dropped and `wr_refused` pulses.
  - Power-on reset clears the words and the lock, so it models an unprogrammed part that is
    set up after power-up. A real one-time-programmable macro would keep its contents. That
    macro is process-specific and is not modelled.
  - In `hsm_top`, `gen_start` is honoured only once the ROM is locked.
- **`internal_ram`** is a 256 × 8 single-port synchronous RAM. Read data appears one cycle after
  the request.
- **`hw_mmu`** sits between the processor port and the RAM and keeps one address window
  [base, limit] for privileged requests (`priv`=1).
  - An unprivileged request inside the window is dropped, `fault` pulses one cycle later, and
    the read data of that cycle is forced to zero.
  - Out of reset the window covers the whole RAM.
  - The window can be set only while `boot_verified` is high and until `cfg_lock`. A refused
    configuration write pulses `cfg_refused`.
- **Not built**, each represented by top-level ports:
  - the processor: the `cpu_*` memory port;
  - the secure boot loader that checks the firmware signature: the `boot_verified` input. The
    paper does not specify the signature algorithm;
  - the external RAM and external ROM: outside the chip.

The private key stays in the key generator's place registers. It is not copied into a RAM
buffer.

## Files and hierarchy

    hsm_top
    ├── secure_rom        master key + N, setup port with lock
    ├── petri_keygen      the net: firing rule, FSM, key output
    │   ├── pn_place ×6   token-count registers
    │   └── fire_counter  step counter, compares with N
    ├── xor_engine        encrypt / decrypt
    ├── hw_mmu            privilege window, configured after secure boot
    └── internal_ram      on-chip RAM

`rtl/hsm_pkg.sv` holds the shared constants: 6 places, 6 transitions, 8-bit places, 8-bit N,
64-bit key, the incidence matrices, the ROM map and the FSM state type. The top's parameters
are `DATA_W` (96) and `RAM_DEPTH` (256).

To use wider places (more master-key bits per place), change `PLACE_W` and set `KEY_W` to at
least 6 × `PLACE_W`. A 2048-bit master key over six places would need 342-bit places.

## Testbenches

Each file in `tb/` prints `TB_RESULT checks=<n> failures=<n>` and stops on its own watchdog.

| testbench | what it checks |
|---|---|
| `tb_pn_place` | load, random add/remove steps against a software count, wrap flag |
| `tb_fire_counter` | reaching N for random N, hold, saturation |
| `tb_petri_keygen` | the worked example (13 steps) and N=10; latency N+1 on every run; N=0; start while busy; the T2/T5 conflict; wrap; 60 random markings and N against the reference model in `tb/pn_ref_pkg.sv` |
| `tb_xor_engine` | the published cipher text and its decryption; stall before the key; back-pressure; 300 random blocks; one block per cycle |
| `tb_secure_rom` | setup writes, lock, refused writes |
| `tb_internal_ram` | random reads and writes against a copy |
| `tb_hw_mmu` | protection out of reset, config refused before boot and after lock, faults, masked reads, dropped writes |
| `tb_hsm_top` | the whole chip at default parameters, end to end. Covers the worked example, the MMU, and a second master key that forces conflicts and a wrap. Counts 14 mechanisms and fails if any never occurs |
| `tb_keygen_sweep` | N = 10, 15, ..., 55 for master keys of 1 to 6 bytes through the whole chip; key, N+1 cycles and a round trip for each |

`tb/pn_ref_pkg.sv` is an independent model of the net. It is written transition by transition
and does not use the incidence matrices.

To run one, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/hsm_pkg.sv tb/pn_ref_pkg.sv tb/tb_hsm_top.sv --top-module tb_hsm_top
    ./obj_dir/Vtb_hsm_top

Replace `tb_hsm_top` with any other testbench name. Each one runs in well under a second.

## Choices made here, not in the paper

- The synchronous maximal-step firing rule, lower-numbered-transition priority in conflicts,
  and N+1-cycle latency.
- Wrap-around of a full place.
- A single 8-bit N. The paper's schematic has three separate firing-count inputs whose
  combination is not described.
- Key layout `{16'h0, P1..P6}` and the XOR alignment. Both were inferred from the published
  key and cipher text.
- The 96-bit block width, which is the length of the published example message. A
  message-length-independent stream mode is not provided.
- All handshakes, the ROM lock, power-on clearing of the ROM, and gating key generation on
  the lock.
- The MMU's single window, privilege bit, lock and reset value. The RAM's size.
