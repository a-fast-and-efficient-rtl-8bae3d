# Bit-vector memory allocator with two-pass free-block search

This is a hardware allocator for a memory divided into N equal chunks (N = 256 by default). It keeps one status bit per chunk: 1 means used, 0 means free. An allocation request for k chunks returns, in 5 or 6 clocks, the starting chunk of a free block that can hold k chunks. The block may lie anywhere in memory. A deallocation request frees a block in 2 clocks.

The search is parallel. A tree of OR gates over the status bits finds every free run of 2^i chunks at once, at every starting address, in one clock. A size that is not a power of two costs a second pass through the same tree. Among all candidates, the block with the highest starting address is taken.

## The or-gate prefix

The status bits form level L0. Node j of level Li is the OR of nodes j and j + 2^(i-1) of level L(i-1). It is therefore the OR of the 2^i status bits j .. j+2^i-1, so node j of Li is 0 exactly when 2^i free chunks start at chunk j.

Node j and node j+1 of a level overlap in all but one chunk. So unlike a buddy tree, which only checks aligned windows, the prefix finds a free run at any starting address. A window that would run past the last chunk counts as used. For N = 2^n there are n+1 levels, L0..Ln. A one-hot level selector S0..Sn picks one level. The inverted outputs of that level form the **V-vector**: v[j] = 1 when a free block of the selected size starts at j.

## Sizes that are not a power of two

Write k = 2^p + r with 0 <= r < 2^p. Let 2^q be the smallest power of two that is at least r.

1. **Step 2** runs the status bits through the prefix at level p. Now v[j] = 1 means chunks j .. j+2^p-1 are free. If r = 0, this V-vector is the answer.
2. Otherwise, m+1 consecutive ones in V, starting at j, mean that 2^p + m chunks starting at j are free. The NAND of neighbouring V bits, V1[j] = NOT(v[j] AND v[j+1]), is 0 where two neighbours are both 1. So V1 has the same form as a status vector: a run of 2^q zeros in V1 starting at j stands for a free block of 2^p + 2^q real chunks starting at j.
3. **Step 3** runs V1 through the same prefix at level q. The new V marks every start of 2^p + 2^q free chunks.

Example: k = 38 = 32 + 6, so p = 5 and 2^q = 8. Step 2 marks the starts of 32 free chunks. Step 3 looks for 8 consecutive zeros in V1, that is, 9 consecutive starts of 32-chunk runs. That is 40 free chunks. In an empty 256-chunk memory the block starts at chunk 216.

The unit then sets exactly k bits from the chosen start. The remaining 2^p + 2^q - k chunks of the window stay free.

A consequence: for a size that is not a power of two, the unit only sees holes of at least 2^p + 2^q chunks. A hole of k chunks that is smaller than that is missed, and the request fails even though it would fit. The surplus is always less than k/2 chunks, at most 2^(p-1) - 1. A buddy allocator rounds k up to 2^(p+1) instead.

## Size decoding

`fema_size_decode` turns k into the two level selectors with encoders, decoders, comparators and a subtractor:

- A priority encoder gives p = floor(log2 k). The decoder forms S1 = 2^p. S1 is already the one-hot selector of level p.
- A comparator tests k == S1, which tells the controller whether Step 3 is needed.
- The subtractor gives r = k - S1. A second encoder/decoder pair forms 2^floor(log2 r), which is loaded into the shift register S2.
- A second comparator tests whether that value equals r. If it does not, S2 shifts left once during Step 2, so it ends as 2^ceil(log2 r).

Rounding the second term up is what makes the searched block at least k chunks long.

## Datapath and timing

```
 req_size -> size decode -> S1 --+
                            S2 --+-> mux -> or-gate prefix -> V reg -> priority enc -> SA reg
 bitvec --------------------------> mux -^                      |                         |
                      V1 = NAND(v[j], v[j+1]) <-----------------+                         v
                                                         bit inverter (mask SA..SA+k-1) -> bitvec
```

The controller (`fema_control`) sequences one request at a time. The table shows one clock per row:

| Clock | Allocation, k a power of two | Allocation, other k | Deallocation |
|---|---|---|---|
| 1 | accept; size decode, load S1/S2 | accept; size decode, load S1/S2 | accept; compute EA = SA+k-1, register mask |
| 2 | Step 2: prefix(bitvec, S1) -> V | Step 2: prefix(bitvec, S1) -> V; S2 shift | clear bits; response |
| 3 | Step 4: highest set bit of V -> SA | Step 3: prefix(V1, S2) -> V | |
| 4 | EA = SA+k-1, register mask | Step 4 -> SA | |
| 5 | set bits; response | EA, register mask | |
| 6 | | set bits; response | |

Counted from the accepting clock to the response clock, both included, an allocation takes 5 clocks (power of two) or 6 (other sizes), and a deallocation takes 2. A new request can be accepted in the clock after the response. Step 4 uses a priority encoder over all N V-bits, so the highest starting address wins.

## Interface (`fema_allocator`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (all chunks free) |
| `req_valid` / `req_ready` | in / out | 1 | request handshake; `req_ready` is high only when idle |
| `req_op` | in | `fema_pkg::op_e` | `OP_ALLOC` or `OP_DEALLOC` |
| `req_size` | in | log2(N)+1 | k, in chunks (1..N) |
| `req_addr` | in | log2(N) | starting chunk of the block to free (deallocation only) |
| `resp_valid` | out | 1 | one-clock response strobe |
| `resp_ok` | out | 1 | allocation found a block; always 1 for a deallocation |
| `resp_addr` | out | log2(N) | starting chunk allocated, or the chunk address that was freed |
| `bitvec` | out | N | current status bits, 1 = used |

The request fields are sampled in the accepting clock only. The caller is trusted on deallocation: the block it names is cleared whether or not it was allocated. If no block is found, the allocation still takes its full 5 or 6 clocks, answers `resp_ok = 0` and leaves the status bits alone. k = 0 and k > N also end that way; k = 0 takes the 5-clock path.

## Modules

| File | Contents |
|---|---|
| `rtl/fema_pkg.sv` | request type, controller states, `ctrl_t` enable bundle |
| `rtl/fema_prio_enc.sv` | highest-set-bit encoder (size encoders and Step 4) |
| `rtl/fema_or_prefix.sv` | or-gate prefix with one-hot level selection |
| `rtl/fema_size_decode.sv` | S1 register, S2 shift register, power-of-two flag |
| `rtl/fema_search.sv` | both multiplexers, prefix, NAND, V register (Steps 2-3) |
| `rtl/fema_high_addr.sv` | highest address detection, SA and found registers (Step 4) |
| `rtl/fema_bit_inverter.sv` | status bits, EA and mask, set/clear (Steps 5-6) |
| `rtl/fema_control.sv` | sequencer |
| `rtl/fema_allocator.sv` | top level |

The only parameter is `N`, the number of chunks. It must be a power of two; the default is 256. Yosys coarse synthesis of the top at N = 256 gives about 5,250 word-level cells and 822 flip-flop bits. The prefix has (log2 N) x N OR gates. The mask comparators and the N-input priority encoder make up most of the rest.

## Design choices beyond the method

The method itself fixes the block structure, the two-pass search, the highest-address rule and the clock counts. The following are choices of this implementation:

- **Selector multiplexer.** The level outputs reach the V lines through an AND-OR multiplexer on the one-hot selector. A tri-state bus would do the same job.
- **Rounding of the second term.** The second term of the searched size is rounded up to 2^ceil(log2 r). This follows the shift-register rule and the 38 -> 40 example. Rounding down would let a 38-chunk request land in a 36-chunk hole.
- **Clock split.** How the clocks divide between stages is inferred from the stated totals (5, 6 and 2). The S2 shift happens during Step 2.
- **Handshake and corner cases.** The handshake, the failure response, the `found` flag, the reset state and the handling of k = 0 and k > N are this design's own.
- **Deallocation request.** A deallocation request carries both the start address and the size. There is no size table inside the unit.
- **Not reproduced.** The FPGA clock rates, slice counts and fragmentation figures published for the method are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`, and each ends by printing `TB_RESULT checks=<n> failures=<n>`:

- `tb_fema_prio_enc`, `tb_fema_or_prefix`: exhaustive levels and random vectors against direct searches.
- `tb_fema_size_decode`: every k from 0 to 2N-1.
- `tb_fema_search` (N = 64): every pair of levels (p, q <= p) on random vectors. After each pass, V is compared with a direct count of free chunks.
- `tb_fema_high_addr`, `tb_fema_bit_inverter`: random vectors and operations against a reference.
- `tb_fema_control`: clock counts and the enable pattern for every kind of request.
- `tb_fema_allocator` (default N = 256) and `tb_fema_allocator_512` (N = 512): these use `tb/fema_alloc_exerciser.sv`, a reference model with random stimulus.
  - The run is a directed 38-chunk request, then 3000 random requests, then a fill to a full memory, then a drain.
  - Checked on every request: the returned address, the status bits and the clock count.
  - The run also counts how often each mechanism occurs: Step 2 only, Step 3 with and without the S2 shift, a failed allocation, a full memory and a deallocation. A mechanism that never occurs is a failure.

`fema_bit_inverter` also asserts that an allocation never sets a bit that is already set.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/fema_pkg.sv \
          tb/tb_fema_allocator.sv --top-module tb_fema_allocator
./obj_dir/Vtb_fema_allocator
```

Replace the testbench name to run another one. To change the memory size, override `N` on `fema_allocator`, as `tb_fema_allocator_512` does.
