# Multirate LDPC-CC decoder with layered normalized min-sum decoding

This is synthesizable SystemVerilog for a decoder of the low-density parity-check
convolutional codes (LDPC-CC) used in IEEE 1901 power-line communication. It handles
rates 1/2, 2/3, 3/4 and 4/5. It decodes a continuous stream. Ten identical processors
form a pipeline, and each one performs one decoding iteration over a sliding window of
the stream. Inside a processor the check nodes are processed as *layers*: the decoder
updates the posterior messages right after each check node, not once per iteration.
Layered decoding converges faster than the usual message-passing schedule. It also means
each processor only needs one stored copy of every posterior message. The extrinsic
messages of a check node are kept in min-sum form, as two minima, an index and signs.
That takes 30 bits per check node.

The architecture is the one Chen, Zhang, Wu, Zhou and Zeng published for IEEE 1901
(IEEE TCAS-II, 2014): ten processors, five 228 x 8 posterior memories per processor,
nine 228 x 30 extrinsic memories, three clock cycles per check node, and a
normalization factor of 0.75. The cycle-level schedule, the hazard handling and the
interface are this implementation's own. They are described below.

**One thing must be replaced before real frames can be decoded.** The numeric delay
factors of the IEEE 1901 check polynomials are not reproduced here. `ldpc_pkg::delay_f`
holds a placeholder code with the right shape, described under "The code".

## The code

A rate b/(b+1) code carries b systematic bits X0..X(b-1) and one parity bit P per
*time step*. Each time step has one check node (one parity check). The code is
time-varying with period 3, so the check polynomial used at time step T depends on
T mod 3 (the *phase*). In every check polynomial each bit type appears with three delay
factors. Check node T therefore involves, for each type j, the bits of time steps
T - d(r, T mod 3, j, g) for g = 0, 1, 2. This gives 6, 9, 12 or 15 bits per check node
for rates 1/2 to 4/5.

This implementation assumes that group 0 of every type is D^0, i.e. the bit of the
current time step itself. The other two delays must be below the window depth of 228.
The placeholder table is:

    d(r,t,j,0) = 0
    d(r,t,j,1) = 3*((17j + 5t + 3r + 40) mod 75) + 4
    d(r,t,j,2) = 3*((7j + 2t + 5r + 3) mod 40) + 2         (X types)
    d(r,t,4,2) = d(r, t-1 mod 3, 4, 1) + 1                  (P)

Here r = 0..3 stands for rates 1/2..4/5. The P row makes consecutive check nodes touch
the same parity bit, so the hazard bypass described below is exercised constantly.
The encoder in the end-to-end testbench shows how parity follows from the table.

## Pipeline of processors

```
 channel LLRs ──► Proc 0 ──► Proc 1 ──► ... ──► Proc 9 ──► decoded LLRs / bits
 zero word    ──►   │  ext_mem 0 ──►│  ext_mem 1 ...  │
```

Each processor holds a window of 228 time steps. When a new time step arrives, the
processor stores it and processes the check node of that time step. It then passes on
the oldest time step, which has now seen every check node this processor will ever
apply to it. Processor i+1 therefore works 228 time steps behind processor i.

A check node is processed once by every processor, so there are ten iterations in all.
The extrinsic messages that processor i computes for check node T are only needed
again when processor i+1 reaches the same check node. That happens exactly 228 time
steps later. They wait in a 228 x 30 memory between the two processors (`ext_mem`).
The word read out travels to processor i+1 together with the posterior messages
leaving processor i. The last processor's extrinsic messages are never needed, so
there are nine such memories. Processor 0 gets the channel LLRs as its posterior
messages and an all-zero extrinsic word.

Total storage: 10 x 5 x 228 x 8 + 9 x 228 x 30 = 152,760 bits.

## One processor: a layer in three cycles

A processor (`ldpc_proc`) keeps each bit type in its own dual-port memory
(`post_mem`, five 228 x 8 `dp_ram`s). Each type can then be addressed at its own delay.
The address of time step T is T mod 228 (counter_a). Per check node, each memory gets
three reads and three writes. A dual-port memory can do them in three cycles, which
sets the rate at one time step per three cycles. At rate 4/5 and 180 MHz that is
300 Mb/s of code bits.

Cycle by cycle, for a time step arriving in cycle 0 (`cur_d` is counter_d):

| cycle | memory read issued | group in the datapath | memory write (previous check node) |
|-------|--------------------|-----------------------|------------------------------------|
| 0 | group 1 (T - d1) | group 0: the arriving messages | group 0 at T |
| 1 | group 2 (T - d2) | group 1 (data of cycle 0) | group 1 |
| 2 | leaving step T-228 and its extrinsic word | group 2 (data of cycle 1) | group 2 |
| 3 = next 0 | ... | ... | this check node's group 0 |

In every datapath cycle, five messages (one group) go through the following steps:

1. **Subtract** (`sub_blk`): S = L_old - Z_old. Z_old is expanded from the extrinsic
   word by `ext_unpack`.
2. **Normalize and compare** (`nms`): each |S| is scaled by 0.75 and clamped (see
   below). The result is merged with the running minimum pair of this layer, which is
   held in a register and fed back. In cycle 0 the feedback is replaced by 31/31/0.
3. **Store**: S goes into a 5 x 3 register array and sign(S) into a 15-bit sign
   vector.

After cycle 2 the finished word (min, sub_min, idx, 15 signs, sign product) is
registered. During the next three cycles the adder block (`add_blk`) writes
L_new = S + Z_new back, one group per cycle. Meanwhile the next check node is already
being read. The write-back takes the groups in the same order as the register array
was filled. Each entry of the array is therefore read by the adder in the same cycle
the next layer overwrites it, and one array suffices. The extrinsic word goes to the
extrinsic memory in the first write cycle.

The extrinsic message from check node c to position p is rebuilt from the word as
follows:

* magnitude: `sub_min` if p is the stored index, `min` otherwise;
* sign: product of all signs XOR sign(S_p), which is the product of the other signs.

Positions are numbered p = 5g + j (group g, type j), which needs 4 bits for 0..14.

## The NMS unit

`pretreat` turns a prior message into a 5-bit magnitude. It computes
|S| - floor(|S|/4), which approximates 0.75 |S|. Any |S| above 41 is clamped to 31,
because 42 x 0.75 no longer fits in 5 bits. The comparison tree has three steps:

* three `cmp2` units on (a,b), (c,d) and (e, running min); the running second minimum
  is folded into the third set;
* a `cmp4` merging the first two sets;
* a `cmp4` merging that result with the third set.

A `cmp4` keeps the smaller of the two minima and its index. Its second minimum is the
smaller of the winner's second minimum and the loser's minimum. Bit types that the
current rate does not use are forced to 31 and left out of the sign product. Their
memories are neither read nor written: each memory has its own read and write enable,
so at the lower rates part of the memory bank is idle.

## Hazards: bypass and legal bits

Two things keep the overlapped read and write phases correct. Both live in the
controller (`proc_ctrl`).

* **Read-after-write bypass.** A read in cycle x can hit an address that the previous
  check node will write in cycle x or later. The memory is read-first, so it would
  return stale data. The controller compares each read address with the pending write
  addresses (groups >= x) of the same memory. On a match, the datapath computes that
  write's value, S + Z_new, on a second set of five adders at issue time. It then uses
  that value instead of the memory data. Only one pending write can match, because the
  three delays of a type are distinct.
* **Legal bits.** There is one bit per window address, set when a time step is stored
  there and cleared at frame start. A read of an address that holds no time step of
  the frame returns +127, which stands for +infinity: bits before the start of the
  stream are known zeros. Such addresses are never written back. The bit of the
  leaving address also drives `data_valid_out`, so a processor only passes on real
  time steps.

The write control is the read control delayed by three cycles. It is recomputed from
the delayed counter_a and counter_t.

## Number formats

* **Posterior and prior messages:** 8-bit two's complement with 3 fraction bits,
  saturated to [-127, +127]. +127 also means "known 0".
* **Extrinsic messages:** sign plus a 5-bit magnitude with 3 fraction bits, |Z| <= 31.
* **Channel LLR input:** same format as posterior messages, positive for bit 0.

## Top-level interface (`ldpc_cc_decoder`)

| port | dir | meaning |
|------|-----|---------|
| `frame_start` | in | latches `code_rate` (0: 1/2, 1: 2/3, 2: 3/4, 3: 4/5) and empties every window |
| `in_valid`, `in_ready`, `in_llr[5]` | in/out/in | one time step (X0..X3, P; unused X slots ignored), taken when both are high; after a time step is taken, `in_ready` stays low for the next two cycles |
| `out_valid`, `out_llr[5]`, `out_bits` | out | final posterior messages and hard decisions (1 = negative) of one time step; unused types read 0 |

Time step v leaves `NPROC*DEPTH` = 2280 time steps after it entered. When the input
runs at full rate, it leaves exactly 30 cycles after time step v+2280 was accepted. To
drain the end of a frame, keep feeding time steps, for example the code's termination
bits. Only one frame is in flight at a time. Reset is synchronous and active high.

Parameters: `NPROC` (10) and `DEPTH` (228). `DEPTH` must exceed the largest delay in
`delay_f`; an assertion in `proc_ctrl` checks this at the start of simulation.

## Departures and open points

* **Delay table:** the placeholder code is not the IEEE 1901 code (see "The code").
  The assumption that group 0 is D^0 for every type is built into the schedule. A code
  without that term would need a fourth memory access per time step.
* **Input is one whole time step per transfer.** The layered algorithm can be
  described as shifting the LLRs in one code bit at a time and starting a check node
  when the parity bit arrives. Here all b+1 LLRs of a time step enter together. Only
  that parallel input sustains the full rate of one time step per three cycles.
  A serial source needs a small buffer in front.
* **Own choices:** the bypass adders, the cycle-level schedule, the frame/handshake
  interface and the saturation range. The published architecture names the conflict
  handling but does not describe it.
* **Combinational path:** the leaving posterior messages go from processor i's memory
  output through the bypass multiplexer into processor i+1's subtractor and NMS tree
  in the same cycle. A timing-driven implementation may want a register there. That
  would add one cycle per processor.
* **Foundry memories:** every memory is a behavioural array (`dp_ram`), which synthesis
  tools map to memory cells. Pads and macros are not modelled.

## Files

| file | contents |
|------|----------|
| `rtl/ldpc_pkg.sv` | widths, `ext_t` word, `rate_t`, `delay_f`, saturation |
| `rtl/ldpc_cc_decoder.sv` | top: processor chain and extrinsic memories |
| `rtl/ldpc_proc.sv` | one processor (datapath) |
| `rtl/proc_ctrl.sv` | counters, legal bits, read/write control, conflict detection |
| `rtl/post_mem.sv`, `rtl/ext_mem.sv`, `rtl/dp_ram.sv` | memories |
| `rtl/sub_blk.sv`, `rtl/add_blk.sv`, `rtl/ext_unpack.sv` | subtract, add, word expansion |
| `rtl/nms.sv`, `rtl/pretreat.sv`, `rtl/cmp2.sv`, `rtl/cmp4.sv` | normalized min-sum unit |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example, the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv tb/tb_ldpc_cc_decoder.sv \
          --top-module tb_ldpc_cc_decoder -Mdir obj
./obj/Vtb_ldpc_cc_decoder
```

`tb_ldpc_cc_decoder` runs the full-size decoder (10 processors, 228-step windows) on
one frame per code rate, then a fifth frame at rate 4/5 with random idle cycles
between input time steps. Each frame has 2520 time steps of noisy BPSK LLRs from a
random encoded stream. The test compares every output LLR bit-exactly with a
behavioural model of the pipelined layered schedule. It also checks the latency and
the three-cycle output interval of the full-rate frames, and that the decoder corrects the channel errors.
Finally it counts bypasses, +infinity reads, overflow clamps and disabled-memory
cycles, and fails if any of them never happened. It runs in well under a second of
simulation time.

`tb_ldpc_proc` checks one processor in the same way, including its extrinsic words.
`tb_proc_ctrl` checks the controller's addresses and conflict flags cycle by cycle.
The leaf blocks have exhaustive or random tests.

What is not verified: decoding performance (BER) on the real IEEE 1901 codes, because
their delay table is not included, and timing closure at 180 MHz.
