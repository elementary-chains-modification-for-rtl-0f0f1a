# Microprogram control unit with code sharing and class-coded chain exits

This is a microprogrammed control unit for control algorithms that are mostly
straight-line. The control store is addressed without an address field in the
microinstruction. The algorithm is cut into *operational linear chains*: runs
of operator vertices that always execute one after another. Every chain gets a
code, and every vertex in it gets a position code. The control-memory address
is the concatenation `{chain code, position}`. Inside a chain a counter steps
the position. Only at the end of a chain does combinational logic, the *input
addressing block* (BIA), choose the next chain from the logical conditions.

The BIA is the only part whose size depends on how branchy the algorithm is,
so it is the part worth shrinking. Many chains end at the same place: they
feed the same vertex, so their exits follow the same rule. Such chains are
called *pseudoequivalent*, and they form a class. This design gives every
chain one extra word, a *control microinstruction*, after its last vertex.
That word drives no microoperations and holds the class code of its chain in a
dedicated field. The BIA then decodes `{class code, conditions}` instead of
`{chain code, conditions}`. It needs one set of product terms per class
instead of one per chain, and fewer inputs. Area estimates for this scheme put
the saving at up to half of the BIA's PAL macrocells.

There are two costs:

* **Speed.** Every chain transition spends one clock on the control
  microinstruction, and the data-path is idle in that clock.
* **Space.** A chain plus its extra word must still fit in the `2^R2`
  positions of a chain. If a chain already fills them, the position field
  grows by one bit and the control memory doubles.

## Structure

```
            start                       x[L-1:0] (from data-path)
              |                              |
        +-----v------+   addr {RG,CT}   +----v-----+
        | cmcu_addr  |----------------->| cmcu_cm  |---- y[N-1:0] --> data-path
        | RG  (R1)   |                  | 2^R words|
        | CT  (R2)   |<----- y0, yE ----|          |
        | fetch FF   |                  +----+-----+
        +-----^------+                       | z[R3-1:0] (class field)
              |                         +----v-----+
              +--------- psi[R1-1:0] ---| cmcu_bia |<--- x
                                        | AND / OR |
                                        +----------+
```

| Module | Role |
|---|---|
| `cmcu_pkg` | default sizes and the microinstruction field positions |
| `cmcu_addr` | chain register RG, position counter CT, fetch flip-flop |
| `cmcu_cm` | control memory: read-only array, asynchronous read |
| `cmcu_bia` | input addressing block: programmable AND matrix and OR matrix |
| `cmcu_u2` | top level: wires the three together |

The data-path is not part of this design. Its microoperation inputs are the
`y` outputs of the top, and its condition outputs are the `x` inputs.

## Sequencing, cycle by cycle

The address `{RG, CT}` is registered. The control memory is read
asynchronously, so the word at the current address is valid during the
cycle, and it decides the next address at the rising edge:

| Word read | Meaning | Next state |
|---|---|---|
| `yE = 1` | last vertex of the algorithm | fetch flip-flop cleared; `done` pulses next cycle |
| `y0 = 1` | an operator vertex that is not the end | `CT <= CT + 1` |
| `y0 = 0, yE = 0` | control microinstruction (end of chain) | `RG <= BIA(z, x)`, `CT <= 0` |

A one-cycle `start` while idle loads RG with chain code 0, clears CT and sets
the fetch flip-flop. `start` is ignored while the unit is busy. `rst_n` is
synchronous and active low.

A chain of F vertices therefore takes F + 1 clocks: F with microoperations,
then one idle clock. The final chain has no control microinstruction, and its
last vertex carries yE. The conditions `x` are sampled in the clock of the
control microinstruction. The data-path has had at least one full clock
since the chain's last microoperation to settle them.

Outputs of `cmcu_u2`:

| Port | Width | Meaning |
|---|---|---|
| `y` | N | microoperations y1..yN (y1 at bit 0); zero when idle and during control microinstructions |
| `busy` | 1 | fetch flip-flop |
| `ctrl_mi` | 1 | current word is a control microinstruction (idle data-path clock) |
| `done` | 1 | one-clock pulse after the yE word |
| `addr` | R1+R2 | current address `{RG, CT}`, for observation |

## Laying out a microprogram

This is the part a user has to get right. The hardware is generic, and the
algorithm lives in two data files.

**Sizes.** With G chains, at most Q vertices per chain and I classes:

* `R1 = ceil(log2 G)`
* `R2 = ceil(log2 (Q + 1))`, where the `+1` is the control microinstruction
* `R3 = ceil(log2 I)`

The scheme is worth using when `R1 + R2 = ceil(log2 M)` still holds, where M
is the number of operator vertices. Then the control memory is no larger than
it would be without the extra words. If the `+1` pushes R2 up by a bit, the
memory doubles.

**Control memory word** (`N + 2 + R3` bits, `cmcu_cm`):

```
 [N+2+R3-1 : N+2]   [N+1]   [N]    [N-1 : 0]
   class code z      yE     y0     y_N ... y_1
```

* Vertex i (from 0) of chain g sits at address `(g << R2) | i`. It holds the
  vertex's microoperations and `y0 = 1`. The last vertex of the final chain
  holds `yE = 1` instead.
* The control microinstruction of chain g sits at `(g << R2) | F_g`. All its
  bits are zero except the class code of g.
* Unused words should be zero.

**BIA personality** (`cmcu_bia`). There is one line per product term, H lines
in all. Each line is `{out[R1], care[L+R3], value[L+R3]}` in hex. The input
vector is `{z, x}` with x1 at bit 0. A term is true when every input marked in
`care` equals its bit in `value`. The output is the OR of the `out` masks of
all true terms. A transition to chain code 0 needs no term. Unused term lines
should be zero.

Both files are read with `$readmemh` at time zero. The paths are module
parameters (`CM_CONTENTS`, `BIA_PERSONALITY`) and are relative to the
directory the simulator is started in. An empty string skips loading, so a
testbench can write the arrays itself (`tb_gsa_runner` does this).

### The bundled example

`rtl/cmcu_cm_example.hex` and `rtl/cmcu_bia_example.hex` hold the default
algorithm: 21 operator vertices in 8 chains, 4 conditions and 4 classes.

```
chain 0: b1  b2  b3   -> x1 ? chain 1 : chain 2          class 0
chain 1: b4  b5  b6   -> x2 ? chain 3 : chain 4          class 1
chain 2: b7  b8       -> (same exit as chain 1)          class 1
chain 3: b9  b10 b11  -> x3 ? chain 5 : chain 6          class 2
chain 4: b12 b13      -> (same exit as chain 3)          class 2
chain 5: b14 b15 b16  -> x4 ? chain 0 : chain 7          class 3
chain 6: b17 b18      -> (same exit as chain 5)          class 3
chain 7: b19 b20 b21  -> end (yE on b21)
```

Vertex b_q drives the microoperations with indices `7q mod 50`,
`(13q+5) mod 50` and `(3q+11) mod 50`, counting y1 as 0. The sizes are
R1 = 3, R2 = 2, R3 = 2, 28 of 32 words used and 7 product terms. Its BIA
reads 6 inputs, where a chain-coded BIA would read 7. Three of its classes
cover two chains each.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N` | 50 | microoperation count used in the area study behind the method |
| `L` | 4 | example algorithm |
| `R1` | 3 | example algorithm (8 chains) |
| `R2` | 2 | example algorithm (3 vertices + 1 control word per chain) |
| `R3` | 2 | example algorithm (4 classes) |
| `H` | 7 | example algorithm (product terms) |

`R = R1 + R2` is derived. Change the parameters and the two files together.

## How far it follows the published method, and where it is its own

The following come from the method:

* the address as `{chain code, position}`
* consecutive position codes inside a chain
* the y0 and yE signals
* one extra control microinstruction per chain, carrying its class code in a
  field of its own
* a two-level AND/OR input addressing block over the class code and the
  conditions
* the idle data-path clock that each control word costs

The following are this design's own choices, where the method's description
leaves them open:

* the fetch flip-flop, the start/done handshake and the synchronous reset
* starting at chain code 0
* that the final chain has no control word
* the word layout and its bit order
* sampling `x` during the control word
* the personality file format
* using a ROM array instead of a separate address decoder and OR matrix

No encoding optimisation is built in. The chain codes and class codes are
whatever the microprogram author assigns, and the product terms are written
out directly. The method leaves minimising them to a logic minimiser at
design time.

The conventional unit without class codes, the baseline the method is
measured against, is not included.

Synthesis: the control memory and the BIA planes take their contents from
`$readmemh` in an `initial` block. A synthesis flow must honour memory
initialisation files. If it ignores them, it will see an empty ROM and remove
the logic.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it checks |
|---|---|
| `tb_cmcu_bia` | all 64 combinations of class code and conditions, against the example's transition table |
| `tb_cmcu_cm` | all 32 words, against the layout rules applied to the example algorithm |
| `tb_cmcu_addr` | 3000 random cycles of start/y0/yE/psi against a reference model; reset while running |
| `tb_cmcu_u2` | the example algorithm run 60 times at the default sizes with random conditions (see below) |
| `tb_cmcu_u2_sizes` | four random algorithms at sizes from the area study (see below) |

`tb_cmcu_u2` compares y, busy, ctrl_mi, done and the address with a
graph-level interpreter every clock, so cycle counts are checked as well. It
requires each of the following to happen at least once:

* counter steps
* control microinstructions
* exits through every class, and from every chain that has a class
* the loop back to chain 0
* the end of the algorithm
* a start pulse that is ignored

`tb_cmcu_u2_sizes` covers four sizes, taking the condition count as
`L = (1 - p1) K / 1.3`:

| K | p1 | N | Operator vertices | Address bits |
|---|---|---|---|---|
| 100 | 0.75 | 50 | 75 | 7 |
| 1000 | 0.90 | 50 | 900 | 10 |
| 500 | 0.75 | 10 | 375 | 9 |
| 300 | 0.75 | 100 | 225 | 8 |

For each size, `tb_gsa_runner` generates:

* chains that fill every chain code
* classes covering 0.75 of the chains
* two-condition exits

It loads them into the memory and the BIA planes, then checks every clock of
40 runs. `tb_gsa_pkg` holds the example algorithm as a graph for the other
testbenches.

`cmcu_addr` asserts that y0 never asks the counter to step past its last
code. A chain too long for `2^R2` words is reported as soon as it happens.

### Running with Verilator

From the directory that holds `rtl/` and `tb/` (the example files are found
by relative path):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cmcu_pkg.sv tb/tb_gsa_pkg.sv tb/tb_cmcu_u2.sv --top-module tb_cmcu_u2
./obj_dir/Vtb_cmcu_u2
```

Replace `tb_cmcu_u2` with any other testbench name. `tb_cmcu_u2_sizes` does
not need `tb/tb_gsa_pkg.sv`, but the extra file is harmless.
