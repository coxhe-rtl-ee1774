# coxHE accelerator RTL: low-latency CKKS KeySwitch, Rescale and element-wise operations

CKKS homomorphic encryption computes on encrypted vectors of real numbers. A ciphertext is a pair
of polynomials of degree N with very large coefficients. These coefficients are stored in residue
number system (RNS) form: one "limb" of N small words for each modulus q_0 .. q_{K-1}, kept in
number-theoretic-transform (NTT) form so that multiplication works word by word. Additions and
multiplications are cheap. The expensive operation is **KeySwitch**: it runs inside every
Relinearize (after a ciphertext-ciphertext multiply) and every Rotate (slot shift), and it needs
many NTTs and inverse NTTs across all the moduli plus one extra "special" modulus p.

This RTL implements an accelerator built around a KeySwitch unit with **reordered computation**.
The usual schedule computes all K+1 accumulated products first. Only then can the modulus-down
step, which needs the accumulator of the special modulus, begin. Here the accumulation goes
**modulus by modulus, with p first**. The accumulator for p is final after the first of K+1
iterations. Its inverse NTT then runs on dedicated units while the other K iterations are still
computing, so the modulus-down layer overlaps most of the KeySwitch instead of following it.

The design uses the following default sizes. All of them are parameters.

| parameter | default | meaning |
|---|---|---|
| `N` | 8192 | polynomial degree (coefficients per limb) |
| `W` | 33 | modulus width; every modulus must be a full-width `W`-bit NTT-friendly prime (q = 1 mod 2N, top bit set) |
| `K` | 3 | ciphertext moduli. KeySwitch adds one special modulus, so it works on K+1 moduli. |
| `P_NTT` | 16 | butterflies per cycle in each NTT / INTT unit |
| `P_MULT` | 8 | words per cycle on every streaming path: element-wise lanes, load/unload ports, key stream |

The shared package `he_pkg` holds these defaults, the configuration-word kinds, the element-wise
opcodes and the KeySwitch event struct.

## Arithmetic units

- `barrett_reduce`: reduces a 2W-bit product mod q with the precomputed constant
  mu = floor(2^(2W) / q), followed by one conditional subtraction. The single subtraction is only
  enough when q has its top bit set. This is why all moduli must be full width.
- `mod_mult`: computes a*b followed by `barrett_reduce`. It is combinational.
- `mod_add`: computes a+b or a-b mod q with one correction step. It is combinational.
- `he_ewise`: provides P_MULT lanes of the four element-wise ciphertext operations. Results are
  registered with one cycle of latency.
  - P-C Add: (a0+b0, a1)
  - P-C Mult: (a0*b0, a1*b0)
  - C-C Add: (a0+b0, a1+b1)
  - C-C Mult: the three-part tensor (a0*b0, a0*b1 + a1*b0, a1*b1)

  The unit works on one limb at a time. `ew_limb` selects that limb's modulus in the top level.

## NTT and INTT units

`ntt` and `intt` each transform one limb in place in an N-word buffer:

- `ntt` is a Cooley-Tukey negacyclic transform. Its input is in natural order and its output is
  in bit-reversed order.
- `intt` is the matching Gentleman-Sande inverse. Its input is in bit-reversed order and its
  output in natural order. N^-1 is folded into the last stage.

A unit performs P_NTT butterflies per cycle and runs log2(N) stages back to back. A transform
therefore takes exactly

    L_NTT = log2(N) * N / (2 * P_NTT)  cycles      (3328 at the defaults)

which is the latency figure the performance model is built on.

Each cycle reads 2*P_NTT words and writes them back. Because of this, the buffer is written as a
register array rather than a dual-port RAM. An FPGA implementation would bank it.

Twiddle factors are not stored in the units. Each unit presents P_NTT twiddle addresses, and
`he_const_bank` answers them combinationally. Table word a holds psi^bitrev(a) for the forward
transform and psi^-bitrev(a) for the inverse, where psi is a primitive 2N-th root of unity.
Loading and unloading go through an IOP-word port (IOP = P_MULT), one beat per cycle.

## Constants: `he_const_bank`

Every unit that transforms or reduces needs per-modulus constants. The host writes them once
through a configuration port, one word per cycle, as `(cfg_kind, cfg_mod, cfg_addr, cfg_data)`.

| `cfg_kind` | contents |
|---|---|
| `CFG_Q`, `CFG_MU` | the modulus and its Barrett constant |
| `CFG_NINV` | N^-1 mod q |
| `CFG_INV` | p^-1 mod q_j (KeySwitch bank) or q_{K-1}^-1 mod q_j (Rescale bank) |
| `CFG_TWF`, `CFG_TWI` | forward and inverse twiddle tables, N words each |

The bank has R read groups, one per transform unit. Each group chooses its modulus and table
independently.

## The KeySwitch unit (`keyswitch`)

The unit takes one polynomial c of K limbs (NTT form) and a key stream. It returns two
polynomials of K limbs, computed as follows:

    b_ij     = NTT_j( INTT_i(c_i) mod q_j )        (just c_j when i = j)
    acc_x[j] = sum_i b_ij * ksk_x[i][j]   mod q_j,  for j = 0..K and x = 0, 1
    out_x[j] = (acc_x[j] - NTT_j( INTT_p(acc_x[K]) mod q_j )) * p^-1   mod q_j,  for j < K

Here index K is the special modulus p. The unit is built from 3K+4 transform units in two
layers that run at the same time.

1. **INTT0**: K `intt` units bring all K input limbs to coefficient form in parallel. The
   NTT-form input limbs are kept as well.
2. **Former layer**: this layer makes K+1 iterations over the target modulus, in the order
   j = K, 0, 1, ..., K-1. Each iteration has three phases.
   - *Load.* K `ntt` units load `INTT_i(c_i) mod q_j` through Barrett units, N/P_MULT beats.
     Only the first iteration has a separate load pass. Later iterations are loaded during the
     multiply-accumulate pass before them. In each cycle that pass reads beat b of a transform
     buffer, and beat b of the next input is written to the same address. The read still
     returns the old word.
   - *Transform.* The K units transform in parallel, taking L_NTT cycles. For i = j the stored
     input limb is loaded instead and that transform is skipped. This is the **bypass**.
   - *Multiply-accumulate.* One key beat per cycle arrives on a valid/ready stream. It carries
     P_MULT words of `ksk0[i][j]` and `ksk1[i][j]` for all K values of i. The K products are
     summed mod q_j and written into acc0/acc1[j]. When `key_valid` is low the pass waits.
     This is the **key stall**, because keys come from external memory at their own rate.
   Because each iteration covers every input limb for one modulus, acc[j] is final at the end of
   iteration j.
3. **Modulus-down layer**: the accumulate pass of iteration 0 writes acc[K] directly into two
   INTT1 `intt` units, one for each output part. These start at the end of iteration 0
   (**INTT1 early start**). Then, for each j < K:
   - two `ntt` units load INTT1's result mod q_j and transform it;
   - the output pass waits until the former layer has finished acc[j] (**accumulator wait**);
   - it then streams out `(acc - t) * p^-1` for both parts. During that output pass, the next
     limb is loaded into the same two units by the same read-then-overwrite trick.

The four flagged mechanisms are reported as one-cycle pulses on the `ev` port (`ks_events_t`):
`bypass`, `key_stall`, `acc_wait`, `intt1_early`.

### Using it

- Write the constants for moduli 0..K. `CFG_INV` holds p^-1 mod q_j.
- While the unit is idle, load the K input limbs with `in_en`, giving `(in_limb, in_addr, in_data)`.
- Pulse `start`.
- Supply the keys in modulus order K, 0, ..., K-1, each as N/P_MULT beats.
- Collect `out_valid` beats `(out_limb, out_addr, out0, out1)`. There is no back-pressure.
  `done` pulses with the last beat.

### Latency

The reference latency model for this organisation is

    L_KS = L_INTT + max(L_module) * (K + 4)

where L_module ranges over the NTT/INTT time and the N/P_MULT streaming passes. At the
defaults this gives 3328 + 3328 * 7 = 26624 cycles.

With a key stream that never stalls, the RTL takes **26128 cycles** from `start` to `done`,
just under the model. The schedule is:

- INTT0: L_INTT.
- One load pass of N/P_MULT beats.
- K+1 iterations, each of L_NTT + N/P_MULT.
- The last modulus-down limb, L_NTT + N/P_MULT after the last accumulator.

The end-to-end testbench checks the model bound, allowing a few control cycles per stage. At
N = 32, K = 3 and P = 4 the unit takes 184 cycles, and INTT1 starts at cycle 61. Loading the K
input limbs, N/P_MULT beats each, comes on top of this. The host does it before `start`.

## Rescale (`rescale`)

Rescale drops the last modulus q_{L-1} of a two-part ciphertext with L limbs. This divides the
encrypted value by q_{L-1}:

    out_x[j] = (c_x[j] - NTT_j( INTT_{L-1}(c_x[L-1]) mod q_j )) * q_{L-1}^-1   mod q_j

The unit runs as follows:

1. Two `intt` units transform the last limb of both parts at once.
2. For each j, two `ntt` units load the Barrett-reduced coefficients and transform them. Only
   the first limb has its own load pass. Each later limb is loaded during the output pass of the
   limb before, using the read-then-overwrite trick of the KeySwitch.
3. The output pass subtracts and scales.

The first result beat therefore appears after about L_INTT + L_Barrett + L_NTT, which is the
rescale latency model. The unit's interface works like that of `keyswitch`: load both parts
while idle, pulse start, and collect `out_valid` beats. In the top level L = K.

## Rotation (`automorph`)

Rotating the slots applies the Galois map x -> x^g (g odd) to both ciphertext polynomials. On a
limb held in bit-reversed NTT order, this map is a pure permutation:

    out[i] = in[ bitrev( (g * (2*bitrev(i) + 1) mod 2N - 1) / 2 ) ]

`automorph` buffers one limb and reads it out permuted, P_MULT words per beat. An assertion
checks that g is odd.

## Top level (`coxhe_top`)

The top instantiates `he_ewise`, `rescale` (with L = K), `automorph` and `keyswitch` side by
side. Each has its own port group (`ew_*`, `rs_*`, `ro_*`, `ks_*`) and start/busy/done signals,
so all of them can run concurrently.

- **Configuration.** A single configuration port serves all units. Bit 0 of `cfg_dst` selects
  the KeySwitch bank and bit 1 selects the Rescale bank. A small q/mu table for the element-wise
  unit is also written with every `CFG_Q`/`CFG_MU` word.
- **Routing.** With `ks_src = 1` the KeySwitch input is fed directly from the `automorph` output
  stream, using `ks_in_limb` as the limb. Without this path, a rotated limb would have to leave
  the chip and come back.

The composite operations are sequences that the host drives:

- **Relinearize**: C-C Mult gives (d0, d1, d2). KeySwitch(d2) gives (k0, k1). A C-C Add then
  gives (d0 + k0, d1 + k1).
- **Rotate by g**:
  1. `automorph` is applied to every limb of c0; the host reads the results.
  2. `automorph` is applied to every limb of c1, routed straight into the KeySwitch.
  3. KeySwitch gives (k0, k1).
  4. A C-C Add gives (rot(c0) + k0, k1).
- **Rescale**: a single unit operation.

Key material is streamed in by the host, as it would come from DRAM.

## Departures and limits

- **Transform and accumulate alternate.** Within an iteration, the transform and the
  accumulate pass still run one after the other; only the loads are hidden. The unit
  nonetheless meets the latency model at the default sizes.
- **One KeySwitch at a time.** The unit does not pipeline successive KeySwitch operations
  through its layers. A new operation starts only after `done`, so throughput over a stream of
  operations equals 1 / latency. Reaching the throughput of a fully pipelined design would need
  double-buffered transform units.
- **No rounding term in modulus-down and Rescale.** The result is floor-style, which is a
  standard variant. It differs from a rounded result by at most one unit in the last place of
  the scaled value.
- **Key-switching key format.** This design uses the simplest decomposition: one digit per
  ciphertext modulus.
- **Full-width moduli only.** This is a consequence of the one-step Barrett correction.
- **Register-array storage.**
  - On-chip buffers at the defaults add up to about 11.4 Mbit: constant tables, input and
    accumulator limbs, and transform buffers.
  - Mapping them onto FPGA block RAM needs banking.
  - Synthesis of the full-size top is slow for the same reason.
- **Not included.**
  - The external DRAM and its AXI interface.
  - The host processor that sequences operations.
  - The design-space exploration software that picks P_NTT and P_MULT for a given FPGA.

  A testbench plays the host.
- **Parameter choices.**
  - K = 3 matches the smallest KeySwitch configuration evaluated.
  - Other moduli counts, N and W values are reached through the parameters.
  - W must allow a W-bit prime q = 1 mod 2N.

## Verification

Each unit has a self-checking testbench in `tb/` that compares against independent software
arithmetic in `tb/he_ref_pkg.sv`. That package uses 64-bit integers with 128-bit products, and
evaluates transforms directly at small N or with fast iterative transforms at large N. Every
testbench prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_barrett_reduce`, `tb_mod_mult`, `tb_mod_add` | random and edge operands on several primes |
| `tb_ntt`, `tb_intt` | every output word against direct evaluation; exact cycle count log2(N)*N/(2P) |
| `tb_he_ewise` | the four operations with idle gaps between beats |
| `tb_automorph` | output equals NTT(a(x^g)) for several g |
| `tb_rescale` | two runs against software rescale; first-beat latency bound |
| `tb_keyswitch` | one run with a full key stream and one with a sparse stream; both output polynomials; bypass count; INTT1 early start; stalls and accumulator waits |
| `tb_coxhe_top` | end-to-end kernel at N = 32 (below) |
| `tb_coxhe_full` | the same kernel on `coxhe_top` at its default parameters |
| `tb_coxhe_dot` | an encrypted inner product at N = 32: P-C Mult, log2(16) = 4 rotate-and-sum steps (each with its own Galois key and a routed KeySwitch), then Rescale |

### The end-to-end kernel

The end-to-end kernel in `tb/coxhe_scenario.svh` runs the following chain and checks every
intermediate result:

1. P-C Mult
2. P-C Add
3. C-C Mult
4. Relinearize
5. Rotate (g = 5, with the routed KeySwitch input and a gappy key stream)
6. Sum
7. Rescale

It counts each mechanism and fails any that never happened: the four element-wise operations,
relinearize, rotate, rescale, routed beats, bypasses, early INTT1 starts, key stalls and
accumulator waits.

At the defaults, configuration takes about 131k cycles. The run then measures:

| operation | cycles |
|---|---|
| KeySwitch in Relinearize, start to done | 26128 |
| KeySwitch in Relinearize, with the host loading the input | about 29200 |
| KeySwitch in Rotate, sparse keys (1 beat in 4), start to done | about 35000 (varies with the random gaps) |

The full-size simulation takes about a minute to build and half a minute to run.

### Simulating with Verilator

From the repository root:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_keyswitch \
        rtl/he_pkg.sv $(ls rtl/*.sv | grep -v he_pkg) tb/he_ref_pkg.sv tb/tb_keyswitch.sv
    ./obj_dir/Vtb_keyswitch

Replace `tb_keyswitch` with any other testbench name. `tb_coxhe_top` and `tb_coxhe_full` include
`tb/coxhe_scenario.svh`, which in turn includes the host tasks in `tb/coxhe_env.svh`;
`tb_coxhe_dot` includes `tb/coxhe_env.svh` directly. `-Itb` finds both. The reduced-size testbenches override parameters on the
unit they test. To try another size, change those overrides and keep the size rules:

- N must be a power of two;
- P_MULT must divide N;
- P_NTT must divide N/2;
- the moduli the testbench picks with `find_prime` must exist at the chosen W.
