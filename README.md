# PRESENCE: a binary correlation matrix memory engine and CMM k-NN classifier

A k-nearest-neighbour classifier is accurate but slow: it has to measure the
distance to every training sample. This design puts a fast binary associative
memory in front of it. A **Correlation Matrix Memory (CMM)** is a binary
matrix. It stores every training sample in one shot and, given a test sample,
returns in a few hundred clocks the small set of stored samples that match it
fully or partly. Only those candidates then go through the k-NN distance
ranking and vote.

The core of the design is **PRESENCE**, a card-level CMM engine. The matrix
sits in ordinary external memory. A controller (SATCON) streams the rows
selected by the input pattern into a bank of 32-bit accumulator/threshold
devices (SATSUM) that work side by side, one 128-bit row per clock. Around it
are two further stages, a **robust uniform (RU) encoder** that turns numerical
features into the sparse binary patterns the CMM needs, and a **k-NN stage**.

```
 features ──► ru_encoder ──► index values ─┐      (host moves the data)
                                            ▼
            ┌───────────────────── presence_top ─────────────────────┐
 host ────► │ bus_interface ─► buffer_memory (2 areas) ◄──► satcon   │
 port, irq  │                                   weight_memory ◄──┤   │
            │                                        │ 128-bit row │   │
            │                                        ▼             ▼   │
            │                            satsum ×4 (32 counters each)  │
            └────────────────────────────────────────────────────────┘
                                            │ separator bits
 matched training samples ──► knn_classifier ──► class
```

`cmm_classifier_top` holds the three stages side by side. The host links
them, as the classifier does in practice: it owns the training set, turns
recalled separator bits back into sample numbers and streams those samples
into the k-NN stage. `presence_top` is the card alone.

## 1. The binary CMM

The matrix `M` has one row per input bit and one column per separator bit.
It starts all zero.

* **Training.** Each training pattern `p_i` (a sparse binary vector) gets a
  unique sparse *separator* `s_i`, here two bits set. Learning is
  `M = M OR s_iᵀ p_i`: every row selected by a set bit of `p_i` is ORed with
  `s_i`.
* **Recall.** For a test pattern `p`, the column sums `v = M pᵀ` count, for
  every separator bit, how many of `p`'s set bits it was trained with.
  Thresholding `v` at `n_p`, the number of set bits in `p`, returns the
  separators of exact matches. A lower threshold also returns partial
  matches: patterns that share some of their components with `p`. Those are
  the candidates handed to k-NN.

The card never sees `p` as a bit vector. The host passes one **index value**
per set bit, and each index value is the number of a matrix row. A recall
therefore costs one row read and one 128-bit accumulation per set bit,
whatever the length of the input vector.

## 2. Card data path: rows, slices and SIMD SATSUMs

A weights-memory row is `R_DEV × 32 = 128` bits wide. Each of the four
`satsum` devices owns one 32-bit lane of every row and holds 32 saturating
16-bit counters, one per separator bit in its lane. All four devices obey one
broadcast command (`satsum_cmd_t`: clear counters, accumulate, zero
write-back, threshold level), so adding a row costs one clock on all 128
columns at once.

A separator wider than 128 bits is handled in **slices**. Slice `j` covers
separator bits `128·j … 128·j+127` and uses its own band of rows. The row of
index value `x` in slice `j` is

```
row = BASE + j·STRIDE + x          (truncated to WM_AW bits)
```

`STRIDE` is normally the input vector length. For every slice the whole list
of index values is streamed again, so a recall costs about `K·N` clocks for
`K` slices and `N` index values.

## 3. SATCON: the controller and its address pipeline

`satcon` runs one operation per start command. It first reads the 8-word
control block of its buffer area (section 5), then runs one of three
operations:

| op | per slice | cost |
|----|-----------|------|
| `OP_RECALL` | clear counters; stream N index values; threshold; write 4 result words | `N + 6 + R` clocks (+16 for L-max) |
| `OP_TRAIN`  | read the separator bit indexes and build this slice's 128-bit mask; stream N index values, read-modify-write each row as `row OR mask` | `N_sep + 2N + ~6` clocks |
| `OP_CLEAR`  | (no slices) write zero to N rows from `BASE` | `N` clocks |

### The five-stage pipeline

Index values go through five stages, one new index value per clock:

| stage | clock | what happens |
|------:|:-----:|--------------|
| 1 | c   | index value count: `icnt` addresses the input block |
| 2 | c   | the buffer memory latches the address (its synchronous read) |
| 3 | c+1 | the index value is added to the slice offset `BASE + j·STRIDE` |
| 4 | c+1 | the row address is latched (`addr_q`) |
| 5 | c+2 | the weights memory is read at `addr_q` (synchronous) |
| – | c+3 | `acc_en`: the SATSUMs add the row at the end of this clock |

In a recall the stream therefore takes `N + 3` clocks plus one to detect
that it is empty. Counting everything, a recall of `N` index values over `K`
slices with a fixed threshold takes

```
12 + K·(N + 6 + R)   clocks from the edge that samples start to done,
13 + K·(N + 6 + R)   until the interrupt is visible to the host.
```

L-max adds 16 clocks per slice. On the original card the time is quoted as
`T = C·[23 + ((S−1)/32R + 1)·(N + 38 + 2R)]`. This design keeps the same
shape, a fixed start-up plus per slice one clock per index value and a fixed
overhead. Its constants are smaller, and it always stays within that bound.
The testbenches check the exact count.

### Training without collisions

The weights memory has a single port. In training each selected row is read
in stage 5 and written back one clock later with `row OR mask`, the OR
formed by each SATSUM on its lane. Index values are issued only every second
clock, so a write-back never meets the next read. Training is thus about
half as fast per index value as recall, the same order of speed. Index
values within one pattern are distinct bits of `p`, so there is no
read-after-write hazard between them.

### Thresholding

* **Fixed:** the level `THVAL` from the control block is broadcast to all
  SATSUMs, and a bit is set when its counter is `>= THVAL`. `THVAL = n_p`
  gives exact match. Smaller values give partial match.
* **L-max:** `THVAL` is `L`. SATCON looks for the largest level `t >= 1` at
  which at least `L` counters of the slice are `>= t`. The output then holds
  the `L` highest sums, plus any ties at the boundary. The search is
  bit-serial, most significant bit first, over the 16-bit counter range.
  Each SATSUM reports `ge_count`, the number of its counters at or above the
  trial level, and SATCON adds the four counts. This takes 16 clocks. L-max
  is applied **per slice**, not over the whole separator.

## 4. SATSUM

`satsum` holds 32 counters that are cleared by `acc_clr` and increment, with
saturation, on the set bits of `rdata` when `acc_en` is high. From the
counters it produces `result` (`counter >= thr`) and `ge_count`, both
combinationally. The training write-back `wdata = rdata | mask` comes out the
same way, and `wr_zero` forces it to zero for the clear operation.

## 5. Buffer memory, host port and the operation protocol

The buffer memory has **two identical areas**, each holding:

| block  | words | contents |
|--------|------:|----------|
| control | 16 | words 0–7 used, see below |
| input   | 8192 | N index values, then (training) the separator bit indexes |
| output  | 1024 | recall result: word `4·j + r` is lane `r` of slice `j` |

While the card works on one area the host owns the other. It can read back
the previous results and prepare the next operation, so bus transfers overlap
with processing. A host access to the area the card is using is refused: the
write is dropped, the read returns 0 and a status flag is set.

Control block words: `0 OP` (0 recall, 1 train, 2 clear), `1 N`, `2 N_SEP`,
`3 K` (slices; 0 = no-op), `4 BASE`, `5 STRIDE`, `6 THMODE` (0 fixed,
1 L-max), `7 THVAL` (level, or L).

Host address (17 bits): `{space, area, region[1:0], offset[12:0]}`. With
`space = 0` it addresses the buffer memory: region 0 is control, 1 input and
2 output. With `space = 1` it addresses the registers:

| reg | access | meaning |
|----:|--------|---------|
| 0 CMD    | W | bit0 start, bit1 area |
| 1 STATUS | R | bit0 busy, bit1 irq pending, bit2 area in use, bit3 start refused, bit4 access refused, [31:16] operations completed |
| 2 IRQACK | W | bit0 clear interrupt, bit1 clear refusal flags |
| 3 IRQEN  | R/W | bit0 interrupt enable (reset 1) |

Accesses are single-clock requests. Read data returns one clock later with
`h_rvalid`. A start written while the card is busy is ignored and flagged.
A typical sequence:

1. write the control and input blocks of area A;
2. write CMD = start, area A;
3. while the card runs, fill area B;
4. on `irq`, read A's output block, write IRQACK, and start B.

## 6. The RU encoder

`ru_encoder` takes a sample of `D` unsigned features and emits `D·CB` index
values, one per clock, with a valid/ready handshake. For feature `d` the bin
is the number of stored right boundaries strictly below `x_d`, so a value
equal to a boundary falls into that boundary's bin. The emitted indexes are
`d·NB·CB + bin·CB + j`. This is the concatenation of `D` codes of `NB·CB`
bits, each with `CB` adjacent bits set (one-hot for `CB = 1`). The boundary
table is written through a config port. The boundaries come from the
**robust quantisation** of the training set, which is done offline on the
host: sort each feature, count identical values, and place boundaries so
that every bin holds about the same number of distinct samples, with runs of
identical values kept in one bin. That step is not in hardware.

## 7. The k-NN stage

`knn_classifier` latches a test sample on `start` and accepts one candidate
per clock: its features and class label. It computes the squared Euclidean
distance in the original feature space and inserts the candidate into a
sorted list of the `K` nearest. A candidate at the same distance as one
already listed goes after it. On `finish` it votes: the class held by most
list entries wins, and a tie goes to the class of the nearer entry. The
result appears one clock later. `out_none` flags that the CMM matched
nothing.

## 8. Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `R_DEV` SATSUM devices | 4 | described VME card (128-bit path) |
| lane width | 32 | described device width |
| `WM_AW` rows | 2^20 (16 MByte) | described 16 MByte static memory |
| clock | 50 ns | described time to accumulate one row |
| counter width `CNT_W` | 16 | own choice (holds 8192 index values) |
| buffer blocks | 16 / 8192 / 1024 words | own choice |
| `D`, `NB`, `CB`, `XW` | 16, 16, 1, 16 | own choice; CB may be 1–3 |
| `K`, `CLS_W` | 5, 5 | own choice |

Memory sizes: "16Mb" in the original material is read as 16 MByte. A robot
example there stores a 104856-bit input vector times a 10240-bit separator
(about 128 MByte) in "128Mb", which only works out in bytes.

## 9. How far this follows the original design, and where it departs

Taken from the original design: the split into bus interface, double buffer
memory with control/input/output blocks per area, control unit (SATCON) and
32-bit accumulate-and-threshold devices (SATSUM) in SIMD. Also taken: index
values, one per set input bit; the five named pipeline stages; separators
processed in 32R-bit passes; fixed and L-max thresholding; interrupts on
completion; 4 devices and 16 MByte on the card; one row per 50 ns.

This design's own choices:

* the control block layout, opcodes, register map and host port;
* the clear operation;
* the separator format for training;
* the refusal rules;
* counter width and saturation;
* the L-max search method and its per-slice scope;
* the read-modify-write training schedule;
* the encoder's code pattern and handshake;
* the k-NN distance measure, K and tie rule;
* all cycle constants.

The VME/PCI bus signalling is not implemented. `bus_interface` exposes the
card side as a simple synchronous port. Not built:

* the PCI variant (DRAM, 4 daisy-chained cards, 512-bit path);
* the Middle-Bit-Index separator decoding;
* the boundary computation.

In the original system the encoder and k-NN stage are host software. Here
they are hardware modules that the host drives.

## 10. Files

`rtl/`: `presence_pkg` (types, constants, control block and register map),
`weight_memory`, `satsum`, `buffer_bank` (one area), `buffer_memory`,
`bus_interface`, `satcon`, `presence_top`, `ru_encoder`, `knn_classifier`,
`cmm_classifier_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. Worth knowing:

* `tb_presence_top` runs clear, double-buffered training, exact, partial and
  L-max recall, and the refusals, at full size. It checks every output block
  against a reference CMM and the cycle counts above.
* `tb_cmm_classifier_top` classifies a synthetic three-class data set end to
  end at full size. The chain is boundaries, encoding, training of 96
  samples, recall (fixed, falling back to L-max) and k-NN. Each step is
  checked against an independent reference.
* `tb_two_spirals` runs the classic two-spirals problem at full size: 2 x 97
  points as features 0 and 1, with the other 14 features held at 0. It
  trains all 194 points with separators spread over four slices. Then it
  classifies the 194 training points and 192 unseen points half-way along
  each arm. Every recall falls back to L-max, because 194 points spread over
  16 x 16 bin cells leave fewer than K = 5 in a cell. The card's matches and
  the k-NN decisions are checked against a reference. The run ends with
  139 of 194 training points and 135 of 192 unseen points correct. For
  comparison, a plain 5-NN search over all points gets 192 of 194 and 132
  of 192. The original system is reported to separate the spirals
  completely, with an encoder set-up that is not known. At these defaults,
  accuracy is limited by two things. First, only two features carry
  information. Second, on the outer turns the opposite arm is nearer than
  the next point on the same arm (about 1.0 against 1.27 units). Expect to
  tune `NB`, `CB`, `K` and the thresholds for a real problem.

## 11. Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/presence_pkg.sv tb/tb_cmm_classifier_top.sv \
    --top-module tb_cmm_classifier_top -o sim
./obj_dir/sim
```

Swap in any other testbench name. The package has to come first on the
command line. Other modules are found through `-Irtl`. The full-size runs
take seconds; the 16 MByte weights array is the largest piece of state. For
lint, use `verilator --lint-only -Wall -Irtl rtl/presence_pkg.sv
rtl/<module>.sv`.
