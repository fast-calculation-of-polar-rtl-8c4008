# Polar code bits and frozen-bit locations without a generator matrix

A polar code word of length N = 2^n is normally written as x = u·G_N, with
G_N = B_N·F^{⊗n} (B_N is the bit-reversal permutation and F = [1 0; 1 1]).
Storing G_N costs N² bits: one megabit at N = 1024, and one such matrix per
frame length. This design stores no matrix. Instead, a small binary tree
whose levels are labelled by the bits of an n-bit counter produces code bit
x_k directly from u. The same tree, with arithmetic nodes in place of XOR
nodes, gives the error probability of every split channel u_k. Comparing
those probabilities with a threshold decides which bit positions carry data
and which are frozen.

Both trees exist in a serial form and in a parallel form:

* **Serial:** one tree, with the counter stepping through k = 0 … N-1, one
  result per clock cycle.
* **Parallel:** N trees, each with its counter value tied to a constant, all
  results in one cycle.

The RTL is SystemVerilog-2017 and synthesizable. Its defaults are N = 1024
and 16 fractional bits for the probabilities.

## The labelled tree

Level 0 of the tree is at the top and level n-1 at the bottom. The
information bits u_0 … u_{N-1} enter below the bottom level, pairwise, in
index order. For code bit x_k, each level is labelled with one bit of k.
The **least significant bit labels the top level** and the most significant
bit labels the bottom level. Each node combines a left input and a right
input (the right one has the higher u index):

| label | encoder node (`polar_tree_encoder`) | probability node (`split_channel_tree`) |
|-------|-------------------------------------|-----------------------------------------|
| 0     | sum node: left XOR right            | f(x) = 2x − x²                          |
| 1     | pass node: right input only         | g(x) = x²                               |

The single node at the top gives x_k, or p_e(u_k) in the probability tree.

Example: N = 8, k = 6 = 110₂.

1. The bottom level (label 1) passes the odd inputs u1, u3, u5 and u7.
2. The middle level (label 1) passes u3 and u7.
3. The top level (label 0) adds them: x_6 = u_3 ⊕ u_7.

This agrees with u·B_8·F^{⊗3}. In general, x_k is the XOR of all u_i whose
index i has a 1 in every bit position where bit-reversed k has a 1. The pass
levels explain why the parallel form is cheap. Under a pass level only the
right subtree is used, so for a constant k synthesis keeps only 2^z − 1 XOR
gates, where z is the number of zeros in k. For example, every odd k needs
only the right half of the tree.

### How `polar_tree_encoder` lays out the tree

The tree is evaluated in place on one N-bit vector v, which starts as u.
Take the t-th level from the bottom (t = 0 … n-1). The node that covers
u indices p−2^(t+1)+1 … p is stored at position p, where p has its low
t+1 bits all set. Its right child already sits at position p, and its left
child sits at p − 2^t. So:

* a sum level is `v ^= v << 2^t`;
* a pass level leaves v unchanged.

After n levels the root is in v[N-1]. All other positions are unused and
are removed by synthesis.

## Split-channel error probabilities

Every input at the bottom of the probability tree carries the same channel
parameter α: a Bhattacharyya parameter or an average bit-error probability
of the physical channel. The tree applies f or g from the bottom level
(labelled by the MSB of k) up to the top. This is the polar recursion
Z(2i) ≤ 2Z − Z² and Z(2i+1) = Z², with the first split given by the MSB.

Example: N = 16, k = 13 = 1101₂, α = 0.5 (a binary erasure channel).

* The levels, from the bottom, give 0.25, 0.0625, 0.121 and finally
  p_e ≈ 0.015.
* The RTL returns 961/65536 = 0.01466.

All inputs are equal, so all nodes on one level compute the same value.
`split_channel_tree` therefore builds one node per level: a chain of n
squarers, each followed by a choice between g = x² and f = 2x − x². This
collapse of the tree into a chain is an implementation choice.

The decision rule: u_k is a data bit if p_e < pte, and frozen otherwise. The
threshold pte is an input; `polar_pkg::PTE_DEFAULT_Q16` holds 0.4.

### Number format and accuracy

Probabilities are unsigned fixed point with FRAC fractional bits and one
integer bit. 1.0 is 2^FRAC, so the whole closed range [0, 1] is
representable. Squares are truncated to FRAC bits. f is computed as
2x − trunc(x²), which equals 1 − trunc((1−x)²), so it never goes above 1.0.
The inputs α and pte must lie in [0, 1.0].

Each level can at most double the error it inherits, and truncation adds up
to one LSB per level. The worst-case error at the top is therefore below
2^n LSB, which is 0.0156 for n = 10 and FRAC = 16. The testbenches check the
RTL against floating point within that bound, and bit-exactly against a
fixed-point model.

A decision for a channel whose p_e lies within that error of pte can differ
from the decision exact arithmetic would give. To tighten this, widen FRAC.

## Blocks

| module | what it is |
|--------|------------|
| `polar_pkg` | shared constants (default N, FRAC, pte = 0.4) and the `calc_mode_e` enum |
| `polar_counter` | n-bit label counter: clear, increment, `last` at N-1 |
| `polar_tree_encoder` | combinational encoding tree, (u, k) → x_k |
| `polar_serial_encoder` | counter + one tree; one code bit per cycle |
| `polar_parallel_encoder` | N trees with constant k; whole code word, registered |
| `split_channel_tree` | combinational f/g chain, (α, pte, k) → p_e, is_data |
| `split_channel_serial` | counter + one f/g chain; one channel per cycle, writes the location memory |
| `split_channel_parallel` | N chains with constant k; all p_e and the data mask, registered |
| `frozen_loc_mem` | N-bit location memory (1 = data, 0 = frozen); single-bit and whole-word write ports |
| `polar_top` | the encoders and the locator side by side |

### Timing

All registers use `clk`, and `rst_n` is an asynchronous active-low reset.

* **`polar_serial_encoder`:** `start` is accepted when idle, and u is captured
  on that edge. x_0 comes one cycle later, then one bit per cycle with
  `x_index`. `x_last` marks x_{N-1}. A frame takes N cycles, and `start`
  while `busy` is ignored.
* **`polar_parallel_encoder`:** the code word appears one cycle after
  `in_valid`. It accepts one word per cycle.
* **`split_channel_serial`:** α and pte are captured at `start`. The
  channels follow one per cycle for N cycles. Each decision goes out on
  `wr_en`/`wr_addr`/`wr_data` in the same cycle as its p_e, and `done`
  marks the last channel.
* **`split_channel_parallel`:** all results appear one cycle after `start`,
  with `valid` as a one-cycle pulse. The results hold until the next start.
* **`frozen_loc_mem`:** writes take effect on the clock edge. If both ports
  write in the same cycle, the single-bit write wins for its location.
  Reads are combinational, and the memory resets to all frozen.

### `polar_top`

`polar_top` holds two independent parts:

* **The encoders.** They share the `u_in` input: `enc_start` starts the
  serial encoder and `enc_par_valid` the parallel one.
* **The frozen-bit locator.** `calc_mode` selects which calculator answers
  `calc_start`:
  * `CALC_SERIAL`: N cycles, with `calc_busy` high and the p_e stream on
    `pe*`;
  * `CALC_PARALLEL`: one cycle, with all probabilities on `par_pe`.

  While a serial run is in progress, a parallel request is ignored, so the
  two never write the memory together.

In both modes, `calc_done` marks the final write. The memory
(`frozen_mask`, and `loc_rd_addr`/`loc_rd_data`) holds every decision from
the next cycle on.

## Own choices and limits

The following are this design's choices:

* the node algorithms, the label order and the decision rule follow the
  method;
* the handshakes, latencies, reset and memory organisation;
* the number format;
* the collapse of the probability tree into a chain;
* the serial/parallel mode switch in the top.

Points to note:

* The sum node is a mod-2 sum (XOR). Only XOR reproduces u·G_N.
* The top does not build the information word u from the frozen mask and
  the data. u_in is an input, and the mask is an output for whatever
  assembles u.
* The parallel units are large at N = 1024:
  * the parallel encoder describes 1024 trees, each of them 10 vector
    operations on 1024 bits. Most of those bits are unused and are removed
    only late in synthesis, so synthesizing it at full size needs a lot of
    memory.
  * the parallel locator describes 10,240 17×17 multipliers (10 per chain,
    1024 chains) and 17,408 result flip-flops (1024 × 17). All chains share
    α, so chains whose counter values begin with the same bits compute
    identical stages, and synthesis merges those stages (about a thousand
    multipliers remain).

  Use the `N` parameter to scale the design down.
* The slice-register counts measured for an FPGA implementation of the
  counter-and-tree encoder are not reproduced here. For reference, the
  serial encoder holds N + n + 1 flip-flops: 1035 at N = 1024.

## Verification

Each block has a self-checking testbench in `tb/`. All of them run at the
default N = 1024, except the counter test, which uses N = 16. The tree tests
also run N = 8 and N = 16 for the two worked examples. The references in
`tb/polar_ref_pkg.sv` are independent of the RTL structure:

* **Encoding:** bit-reverse u, then run the butterfly of F^{⊗n}.
* **Probabilities:** the floating-point Bhattacharyya recursion over all N
  channels, plus a bit-exact fixed-point model that uses the 1 − (1−x)²
  form of f.

The testbenches also check cycle counts, ignored starts and the memory
contents. `tb_polar_top` runs the whole design at its defaults, for three
(α, pte) pairs:

1. the serial locator fills the memory;
2. the parallel locator recomputes it, and must match;
3. a frame is built with random data on the data positions and encoded by
   both encoders, and both must match the reference.

`tb_polar_frame_lengths` encodes random words with both encoders at every
frame length from 8 to 512 and checks them against the reference.

`tb_polar_top` counts each mechanism it exercises: both locators, both
encoders, the held-off parallel request, the ignored busy start and the mode
switch.

Run a testbench with plain verilator from the directory that holds `rtl/`
and `tb/`. `-y` lets verilator find the modules by file name. For example:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_polar_top.sv \
  --top tb_polar_top -Mdir obj_top
./obj_top/Vtb_polar_top
```

Each testbench ends with `TB_RESULT checks=<n> failures=<m>`. Building
`tb_polar_top` takes about a minute, and the run takes a few seconds.
