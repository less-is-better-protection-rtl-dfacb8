# LBP kNN classifier: a k-nearest-neighbour classifier whose labels cannot be corrupted

A k-nearest-neighbour (kNN) classifier keeps its whole training set in memory. Each
element is stored as a row of feature words plus a label word. A soft error in that
memory changes the result in one of two ways. A flip in a feature word moves an
element. This matters only when the flipped bit is high enough to pull the element into,
or push it out of, the neighbourhood of a query. A flip in a label word relabels the
element. That is worse: it acts like moving the element from one class to another, and
every bit of the label counts.

Protecting such a memory with an error-detecting code backfires. A single parity bit, or
the detect-only part of SEC-DED, can do nothing with a detected error except drop the
element. Dropping an element is as disruptive as moving it. It also happens for every
detected error, including flips in low-order bits that would have changed nothing.
Meanwhile the extra check bits make the memory larger, so it collects more errors.

**Less-is-Better Protection (LBP)** turns this around:

* The feature words get **no check bits at all**.
* **No label is stored.** The elements are written grouped by class, class 0 first.
  NC-1 *class pointers* mark where each class starts. The class of an element follows
  from its position in memory, so no memory error can relabel it.
* The pointers are the only class information, and there are few of them. Each is
  stored **three times** and read through a bitwise **majority vote** (TMR), which masks
  any error in one copy.

The memory also gets smaller than the unprotected one: E·f·w + 3(NC-1)·w bits instead of
E·(f+1)·w.

This repository holds synthesizable SystemVerilog for such a classifier. It has the
LBP-organised memory, the triplicated pointers, a distance unit, a k-nearest list and a
majority voter, plus self-checking testbenches. The defaults are the sizes of the Iris
data set: E = 150 elements, f = 4 features, NC = 3 classes, k = 5 and w = 16-bit words.

## Block diagram and data flow

```
            host load ports                                   result_cls / result_tie
   mem_we ──► feature_mem (E*F x W, no ECC) ──rdata──┐              ▲
   ptr_we ──► class_ptr_tmr (3 x (NC-1) x W) ─ptr──┐ │              │
   q_we   ──► query registers (F x W) ──q[fidx]──┐ │ │          knn_vote
                                                 ▼ │ ▼              ▲ nb_cls / nb_valid
   start ──► knn_ctrl ──raddr/re──► mem      dist_unit ──dist,idx──► knn_select
                 │  d_first/d_last/d_fidx/d_tag ─►  │        class_lookup(idx, ptr) ──► cls
                 └─ sel_clear, vote_start ─────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `lbp_pkg` | Default sizes (Iris) and an index-width helper. |
| `feature_mem` | Plain W-bit word memory. Element e, feature j is at address e·F+j. There is no label word and no check bit. It has a synchronous read with one clock of latency. |
| `class_ptr_tmr` | NC-1 pointers in three copies with a bitwise 2-of-3 vote. It also outputs a `disagree` flag. |
| `class_lookup` | Class of element `idx` = number of voted pointers ≤ `idx`. |
| `dist_unit` | Accumulates Σ(x_j − q_j)² over the features of one element, one feature per clock. |
| `knn_select` | Sorted list of the k nearest candidates, updated in one clock per candidate. |
| `knn_vote` | Majority vote with a tie-break by the nearest tied neighbour. |
| `knn_ctrl` | Sequencer: streams the memory and lines the control up with the read data. |
| `lbp_knn_top` | Wires the blocks together and provides the host ports. |

## How classes are encoded

For the default 3 classes there are 2 pointers, P0 and P1:

```
element index:  0 ........ P0-1 | P0 ....... P1-1 | P1 ........ E-1
class:                 0        |        1        |        2
```

Pointer i holds the index of the **first element of class i+1**. The class of element
`idx` is the number of pointers that are ≤ `idx`. An empty class has a pointer equal to
the next one. Pointers must be non-decreasing.

The training set must be written in this order. Sorting it by class and computing the
pointers is the host's job, done once before the data is loaded.

Each pointer copy is written separately: `ptr_copy` selects 0, 1 or 2, and writes to
copy 3 are ignored. The host must write all three copies. After reset all copies are 0,
which makes every element class NC-1 until the pointers are loaded.

While all copies agree, `ptr_disagree` is low. It rises when a single copy is corrupted.
The vote still yields the right pointer in that case. If two copies of the same bit are
corrupted, the vote follows the two; this is the limit of TMR.

## Number format and distance

Every feature is a 16-bit word. The MSB is the sign and the other 15 bits are the
magnitude (sign-magnitude), so values run from −32767 to +32767. Negative zero equals
zero. `dist_unit` converts both operands to two's complement and squares the
difference. Each square is below 2^32, and the sum of F squares is kept in
DW = 2W + ⌈log2 F⌉ bits (34 bits for Iris), so it never wraps.

Only the order of distances matters, so the square root of the Euclidean distance is
not taken.

Sign-magnitude is an interpretation of "the MSB holds the sign". Under this coding, a
flip of bit 15 only mirrors a value, while a flip of bit 14 moves it by 16384. If your
data is two's complement, change `sm2s` in `dist_unit.sv`.

## Neighbour selection and the vote

`knn_select` holds k entries sorted nearest first: distance, class and element index. A
new candidate is compared with all entries at once. Its slot is the number of valid
entries whose distance is **less than or equal to** its own. The entries from that slot
on move down one place, and the last entry drops out. A candidate with a distance equal
to an existing entry therefore goes behind it: among equal distances the element stored
first wins. A candidate farther than the k-th entry is ignored.

`knn_vote` counts the classes of the valid entries and finds the largest count. The
winner is the class of the **nearest entry whose class has that count**. With one
majority class this is simply that class. In a tie, for example a 2-2-1 split with k = 5
and three classes, it is the tied class whose member is closest to the query. `result_tie`
reports that the tie-break decided the result. With two classes and an odd k no tie is
possible.

## Operation and timing

1. Load the training set: one `mem_we` write per word, address `e*F + j`.
2. Load all three copies of the NC-1 pointers.
3. Write the query's F features (`q_we`, `q_idx`, `q_wdata`).
4. Pulse `start` for one clock. `start` is ignored while `busy` is high.
5. `done` pulses E·F + 5 clocks after the clock in which `start` was high: 605 clocks
   for Iris. `result_cls`, `result_tie` and the neighbour list `nn_idx`, `nn_dist`,
   `nn_valid` (nearest first) stay valid until the next start.

One feature word is read per clock. The time breaks down as follows:

* E·F clocks of reads.
* One clock of memory latency.
* One clock in the distance unit.
* One clock in the neighbour list.
* One clock for the vote.
* One clock to register `done`.

Queries do not overlap.

All state resets asynchronously on `rst_n` low. The exception is the feature memory,
which is not reset and must be written before use. The memory write port can be used at
any time. Writing while `busy` changes what the current query sees, which is how the
testbenches inject errors.

## Memory needed

Cells per scheme, using the sizes of the ten evaluated data sets and w = 16:

* Unprotected: E(f+1)w.
* LBP: Efw + 3(NC-1)w.

| Data set | E | f | classes | k | unprotected bits | LBP bits | ratio |
|---|---|---|---|---|---|---|---|
| Pima | 768 | 8 | 2 | 19 | 110592 | 98352 | 0.889 |
| Sonar | 208 | 60 | 2 | 3 | 203008 | 199728 | 0.984 |
| Banknote | 1372 | 4 | 2 | 7 | 109760 | 87856 | 0.800 |
| Phishing | 2456 | 30 | 2 | 5 | 1218176 | 1178928 | 0.968 |
| Iris | 150 | 4 | 3 | 5 | 12000 | 9696 | 0.808 |
| Forest | 325 | 27 | 4 | 9 | 145600 | 140544 | 0.965 |
| Mice | 1080 | 80 | 8 | 3 | 1399680 | 1382736 | 0.988 |
| CNAE-9 | 1080 | 856 | 9 | 7 | 14808960 | 14792064 | 0.999 |
| Cervical | 858 | 36 | 2 | 5 | 507936 | 494256 | 0.973 |
| Nursery | 12960 | 8 | 5 | 17 | 1866240 | 1659072 | 0.889 |

At its defaults the design holds 9600 memory bits plus 96 pointer flip-flops, 9696 bits
in total. This is exactly the Iris figure. The other nine data sets do not fit the
defaults. To run one of them, set `E`, `F`, `NC` and `K` to its numbers.
`tb_lbp_workloads` does this for all ten (see below).

Elements are counted in full: a data set's whole element count is stored. Sizing for a
70 % training split means setting `E` to that count. Element indices and pointers are W
bits wide, so E must be below 2^W.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 16 | Word width of features and pointers |
| `E` | 150 | Number of stored elements |
| `F` | 4 | Features per element |
| `NC` | 3 | Number of classes (≥ 2) |
| `K` | 5 | Number of neighbours |

Derived widths are local parameters of `lbp_knn_top`: address `AW`, feature index `FW`,
pointer index `PW`, class `CW` and distance `DW`.

## Verification

Two assertions are part of the RTL. `knn_select` asserts that its list stays sorted.
`lbp_knn_top` asserts, at each `start`, that the voted pointers are non-decreasing and
at most E. Both are checked whenever a simulation runs with assertions enabled.

Every testbench checks its block against values computed independently in the bench. It
also has a watchdog, and it prints `TB_RESULT checks=N failures=M`.

* `tb_feature_mem`: random fill and read-back, read latency, hold while `re` is low,
  read-during-write, and a planted single-bit error.
* `tb_class_ptr_tmr`: reset value, and a random bit flip in one copy that must be
  outvoted and raise `disagree`. A second, identical corruption must win the vote.
* `tb_class_lookup`: random pointer sets, empty classes included, against a range
  scan.
* `tb_dist_unit`: extreme and random operands, negative zero included, against
  64-bit arithmetic. Also the one-clock latency.
* `tb_knn_select`: thousands of candidates, many with equal distances, against a
  stable-sorted reference list. Also `accepted` and `clear`.
* `tb_knn_vote`: both worked examples of the scheme (3 B vs 2 A → B; a B/C tie decided by
  the nearest tied neighbour), then random and partly filled lists.
* `tb_knn_ctrl`: address order, alignment of the control with the data, one vote per
  query, `start` ignored while busy, and the E·F + 5 latency.
* `tb_lbp_knn_top`: end to end at the **default parameters**. It uses a synthetic
  three-cluster set and 40 queries checked against a reference classifier (class, tie
  flag, all k neighbour indices, latency). It then runs an error-injection experiment:
  * Single, double-adjacent and double-random bit flips in feature words. The design
    must agree with the model of the corrupted memory.
  * One corrupted copy of a pointer. The results must not change.
  * A search for upper-bit flips that do change a result.
  * A forced case in which the query's five nearest elements have classes 2, 1, 2, 1
    and 0. The vote ties and goes to class 2. A flip of bit 14 in the nearest element
    must then turn the result into class 1.

  It counts the vote ties, masked pointer errors and changed classifications, and fails
  if any of them never occurred.
* `tb_lbp_error_position`: the per-bit-position error experiment at the default size.
  For each bit 15..0 it makes 60 random single-bit flips, each in a random feature
  word, and after each flip classifies 12 queries chosen near a class boundary. It
  checks every result against the reference and prints the fraction of results that
  changed. The bench checks that flips in bits 14..11 change more results than flips in
  bits 3..0. With sign-magnitude words, bit 15 only mirrors a value, so it usually
  matters less than bit 14.
* `tb_lbp_workloads`: the classifier at the sizes (E, f, classes, k) of all ten data
  sets, from Iris with 600 words to CNAE-9 with 924,480 words. It uses synthetic
  contents and a reference check of every result. The helper `lbp_workload_run` holds
  one instance per size.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/lbp_pkg.sv tb/tb_lbp_knn_top.sv \
          --top-module tb_lbp_knn_top -Mdir obj -o sim
./obj/sim
```

`-y rtl -y tb` lets Verilator find each module by its file name. The package is named
explicitly. Replace the bench name to run any other one. `tb_lbp_workloads` takes about
15 s to build and under 10 s to simulate; the others take a few seconds.

## What is fixed by the scheme and what is a choice here

These parts follow the scheme:

* Features are stored without any check bits.
* Elements are grouped by class and no label is stored.
* NC-1 class pointers, held in triplicate with a majority vote.
* 16-bit words.
* Euclidean-distance kNN with a majority vote, with ties going to the nearest neighbour
  of a majority class.
* Memory size Efw + 3(NC-1)w.

These are choices of this implementation:

* Sign-magnitude reading of the feature words.
* Squared distance instead of the distance itself.
* The meaning of a pointer as "first index of the next class".
* Pointers held in flip-flops, and the `ptr_disagree` flag.
* Equal distances keep the earlier element.
* The one-word-per-clock schedule and its E·F + 5 latency.
* The host load and query ports.
* The Iris sizes as defaults.

Not included:

* The parity, SEC-DED and selective-MSB protected memories. These are only the schemes
  LBP is measured against.
* The error-rate statistics themselves. These are software experiments over real data
  sets; the testbenches reproduce the mechanism on synthetic data, not the published
  percentages.
