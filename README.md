# Binomial-tree pricer for American call options (double precision)

This RTL prices American call options on a recombining binomial tree with
1024 leaves and 1023 time steps. All of its arithmetic is IEEE-754 double
precision. An American option can be exercised at any time, so every node of
the tree takes the larger of two values: the value of exercising now, and the
discounted expected value of waiting. The tree therefore has to be walked
backwards, from expiry to today, one time step at a time. One option at the
default size needs about half a million node updates.

The organisation follows the row-parallel OpenCL kernel of *Energy-Efficient
FPGA Implementation for Binomial Option Pricing Using OpenCL* (Mena Morales
et al.), written here as plain SystemVerilog:

- One option is one work-group.
- Every tree row is a work-item. The row's asset price S is private to it.
- The option values V, which neighbouring rows exchange, live in one shared
  on-chip buffer that is updated in place.
- Each time step ends with a barrier.
- The kernel's 4-way vectorisation and 2-way loop unrolling become
  8 node units working side by side.

At the default size one option takes 72,063 clock cycles. At 162.62 MHz, the
clock reported for that kernel on a Stratix IV, this is 2,257 options per
second. That rate meets the target of pricing a 2,000-point volatility curve
in under a second. The RTL itself has not been through place and route.

## The tree and its indexing

There are N = `N_LEAVES` rows, numbered k = 0 (lowest asset price) to N-1.
The time steps run t = T = N-1 (expiry) down to t = 0 (today).

- Row k is inside the tree for t ≥ N-1-k.
- Row N-1 runs from expiry all the way to the root.
- The option price is V(0, N-1).

For three leaves this gives:

```
 k=2   (2,2) S0·u²  ──►  (1,2) S0·u  ──►  (0,2) S0   = price
 k=1   (2,1) S0     ──►  (1,1) S0/u  ─┘
 k=0   (2,0) S0/u²  ─┘
        t=2 (expiry)      t=1           t=0
```

**Leaves** (t = T):

- S(T,k) = S0 · u^(2k-(N-1)), using d = 1/u for negative exponents.
- V(T,k) = max(S − K, 0), the call payoff.

**Interior nodes** (for a call), going backwards:

```
S(t,k) = d · S(t+1,k)
V(t,k) = max( S(t,k) − K ,  rp · V(t+1,k) + rq · V(t+1,k−1) )
```

- rp = r·p and rq = r·q, where r is the one-step discount factor and p, q are
  the up/down probabilities.
- A node takes its own row's previous value (the "up" child) and the previous
  value of the row below (the "down" child).
- This is why row k can be overwritten in place once row k+1 has read the old
  value of row k.

The host supplies S0, K, u, d, r, p and q for each option. The testbenches
build them with the Cox-Ross-Rubinstein parameters:

- u = e^(σ√Δt)
- d = 1/u
- p = (e^((rate−dividend)Δt) − d)/(u − d)
- r = e^(−rate·Δt)

A dividend yield is what makes early exercise of a call happen.

## One option inside `workgroup_engine`

The rows are packed into RAM words of LANES = VEC·UNROLL = 8 values. Row k is
lane k mod 8 of word k/8, so 1024 rows take 128 words. Two simple dual-port
RAMs have this shape:

- the **V memory**, the work-group's shared local buffer;
- the **S memory**, the rows' private prices, kept in RAM because 8 node
  units serve all 1024 rows.

The engine then runs through the following phases.

1. **Setup** (1 cycle): forms rp and rq.
2. **Leaves**: 8 `leaf_unit`s fill one word at a time. Each one raises u or d
   to an integer power with `pow_unit`, scales by S0 and applies the payoff.
   This takes 15 cycles per word.
3. **Backward steps**: for each t from N−2 down to 0:
   - **Word range.** The engine reads the words from the one holding row
     N−2−t (the row just below the lowest live row) up to the last word, one
     word per cycle. Words whose rows have all left the tree are skipped, so
     later steps are shorter.
   - **Node inputs.** Node unit j gets S and V of its own row (lane j) and the
     V of the row below it (lane j−1). Lane 0 takes the row below from a
     carry register, which holds lane 7 of the word read in the previous
     cycle. Because words are read in increasing order, the carry still holds
     the value from before this step.
   - **Write-back.** `node_unit` is a two-stage pipeline. Three cycles after a
     word's read, the word is written back to the same address. Only lanes
     whose row is inside the tree at this step take the new S and V. The
     others write back the values they read.
   - **In-place safety.** Reads always run ahead of writes in address order,
     so a word is never read after it has been overwritten within a step.
   - **Barrier.** After the last word of a step has been issued, the engine
     stops issuing until an in-flight counter shows that every write of the
     step has landed. Only then does the next step start reading. This costs
     4 cycles per step.
4. **Root**: the engine reads word 127 and offers lane 7 as the price.

The cycle count from accepting an option to the first cycle of `res_valid` is
exact:

```
cycles = 4 + WORDS·(EXP_W + 5) + Σ_{t=N−2..0} ( WORDS − ⌊(N−2−t)/LANES⌋ + 4 )
WORDS = ⌈N/LANES⌉, EXP_W = ⌈log2 N⌉
```

At N = 1024 and LANES = 8 this gives 72,063 cycles. Of these, about 66,000
are node-update cycles, 1,920 are leaf initialisation and 4,092 are
barriers. The testbenches check the count for every option they run.

## Arithmetic

- `fp64_mul` and `fp64_add` are combinational binary64 units. They round to
  nearest, ties to even, so they give the same bits as the simulator's
  `real`.
- Subnormal inputs are read as zero and underflow flushes to zero. Overflow
  gives infinity. NaN and infinity inputs get no special handling, since
  prices and rates are finite.
- `pow_unit` computes x^n by square-and-multiply in a fixed `EXP_W` steps.
  It uses one running product and one running square.

The node pipeline registers around the combinational units:

| Stage | Operations |
|-------|------------|
| 1 | three multiplications: d·S, rp·V_up, rq·V_dn |
| 2 | one addition, one subtraction, one compare |

To reach the 160 MHz class clock on an FPGA, the multipliers and adders would
need further pipeline stages. The engine's `inflight` counter and the
`p1..p3` bookkeeping registers must then be lengthened to match. An
assertion ties `node_valid` to `p3_valid`, so a mismatch shows up at once.

## Launching work: `wg_dispatcher` and the global-memory port

The host does three things:

1. writes option records into global memory;
2. pulses `start` with `num_options`, `opt_base` and `res_base`;
3. waits for `done` and reads the prices back.

Each record is 7 consecutive 64-bit words at `opt_base + 7g`, in the order
s0, K, u, d, r, p, q (`binom_pkg::option_t`). The price of option g is
written to `res_base + g`.

The dispatcher fetches records into a one-record buffer. It fetches the next
record while the engine is still pricing the current one.

The global-memory port uses word addresses and 64-bit data:

- **Reads** are requests (`gm_rd_req_valid/ready/addr`), answered in order on
  `gm_rd_resp_valid/data` with any latency.
- **Writes** are `gm_wr_valid/ready/addr/data`.

Any number of stall cycles is allowed on either side. The board's DRAM, its
controller, the PCIe link and the host are not part of this RTL.

## Files

| File | Content |
|------|---------|
| `rtl/binom_pkg.sv` | `fp64_t`, `option_t`, binary64 compare/max functions |
| `rtl/fp64_mul.sv`, `rtl/fp64_add.sv` | binary64 multiplier, adder/subtractor |
| `rtl/pow_unit.sv` | integer power (leaf prices) |
| `rtl/leaf_unit.sv` | one leaf: price and payoff |
| `rtl/node_unit.sv` | one node update, 2-stage pipeline |
| `rtl/sdp_ram.sv` | simple dual-port RAM, registered read, read-old-data |
| `rtl/workgroup_engine.sv` | prices one option (phases above) |
| `rtl/wg_dispatcher.sv` | record loads, result stores, launch control |
| `rtl/binomial_accel_top.sv` | top: dispatcher + engine |
| `tb/binom_ref_pkg.sv` | reference pricer in `real`, option builder, cycle formula |
| `tb/gmem_model.sv` | behavioural global memory with random stalls and latency |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_binomial_accel_full` and `tb_volatility_curve` at full size |

Top parameters:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `N_LEAVES` | 1024 | number of leaves (rows) |
| `VEC` | 4 | vectorisation factor |
| `UNROLL` | 2 | unrolling factor |
| `GADDR_W` | 32 | global-memory address width |

Any `N_LEAVES` ≥ 2 works. It need not be a multiple of `VEC·UNROLL`: the
padding lanes of the last word are never live.

## Simulating

Every testbench is standalone and prints one
`TB_RESULT checks=N failures=M` line. For example:

```
verilator --binary --timing --assert -Wno-fatal -j 8 --top-module tb_binomial_accel_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/binom_pkg.sv tb/tb_binomial_accel_full.sv
./obj_dir/Vtb_binomial_accel_full
```

`tb_binomial_accel_full` runs the top at its defaults. It prices three
options, about 216,000 cycles, in about a second of simulation.

`tb_volatility_curve` prices a 10-point curve (S0 = 100, K = 105,
σ = 10% … 55%, rate 4%, 6 months, no dividend) in one launch at the default
size. Each American call must lie within 0.01 of the Black-Scholes price of
the European call. Without dividends the two are equal, so this is an
independent check of the whole model. The measured throughput is 2,257
options/s at 162.62 MHz, because prefetching hides the record loads.

The testbenches compare results bit for bit with `binom_ref_pkg::price`,
which does the same operations in the same order in double precision.
Some models go further:

- `pow_unit`'s results are also checked against x**n within 1e-12 relative
  error.
- The full-size at-the-money case (S0 = K = 100, σ = 0.2, rate = 5%,
  1 year) prices at 10.4523. That is the expected value for a 1023-step tree
  (Black-Scholes: 10.4506).

The reduced-size top test (16 leaves, 4 lanes) counts each mechanism and
fails if one never happens:

- leaf words;
- barriers;
- steps that skip finished words;
- early exercise;
- read and write stalls;
- prefetch.

## How far to trust it, and where it departs from the kernel it follows

- **Simulation only.** The RTL has not been synthesised for timing. The
  options-per-second figures assume the 162.62 MHz clock of the OpenCL
  kernel. The combinational binary64 units here would not run at that clock
  without extra pipeline stages (see *Arithmetic*).
- **Unrolling.** How the kernel's unrolled loop copies divide the work is not
  known. Here the 8 node units always work on 8 neighbouring rows of the same
  time step.
- **Throughput.** The published kernel was measured at 2,400 options/s, and
  5,150 options/s is also quoted for it. This design computes 2,257 at the
  same clock.
- **Leaf powers.** Leaf prices use an exact-to-rounding power operator. The
  vendor operator in the original kernel had a 1e-3 error, which this design
  does not reproduce.
- **Options per launch.** Only one option is priced at a time. There is no
  replication of the engine.
- **Not included.** The earlier "one kernel per node" organisation with
  host-driven batches and ping-pong buffers is not part of this RTL.
- **Call options only.** The exercise value is S − K. A put would need K − S
  in `node_unit` and `leaf_unit`.
- **Reset.** The reset is asynchronous and active low. RAM contents are not
  reset, since every word is written during leaf initialisation before it is
  read.
