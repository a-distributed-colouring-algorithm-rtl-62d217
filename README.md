# Distributed colour vectors for control hazards in a decoupled pipeline

When instruction fetch runs ahead of execution and nothing ties the two together in lockstep, a
branch, jump or exception leaves an unknown number of already fetched instructions in the pipeline.
Those instructions must be thrown away, and the instructions of the new stream must be kept. A
well-known answer for a pipeline that redirects control flow in one place only is a single "colour"
bit. Every fetch address carries the current colour. Every redirection toggles it. An instruction
whose colour does not match the current colour is discarded.

A single bit is not enough once several stages can redirect control flow (for example jumps in
decode and conditional branches in execute). The redirections arrive at fetch in any order, and
nobody holds a global view of "the" colour. This RTL implements the distributed alternative
described in *A Distributed Colouring Algorithm for Control Hazards in Asynchronous Pipelines*:

* the colour is a **vector** with one bit per stage, `c = (c1 … cN)`;
* stage `S_k` owns bit `c_k` and is the only one that toggles it;
* a **deeper stage has priority**: a redirection in `S_j` overrides any redirection in a
  shallower stage `S_i` (`i < j`), even if `S_i`'s happened first in time.

The design here is the four-stage pipeline used to evaluate the scheme. It has instruction
memory, an Address Arbitration Unit (AAU), a PC incrementer and stages S1 to S4. The stages do no
computation of their own. They carry instructions and apply the colour rules, so the control
mechanism can be studied and reused on its own.

## Structure

```
           +--------------------- npc ----------------------+
           v                                                 |
       pc_incr --pc--> aau --addr+vector--> imem --ins+vector--> S1 -> S2 -> S3 -> S4 --> out
                        ^                                     |     |     |     |
                        +------------ transfer addresses -----+-----+-----+-----+
```

Every address that reaches memory passes through the AAU, whether it is a sequential address or a
transfer target. Memory returns each word tagged with the colour vector its address carried. The
vector then travels down the pipeline with the instruction.

## The colour rules

Bit `c_k` is bit `k-1` of the `col_t` type, so the vector written `(c1 c2 c3 c4) = 0100` is the
SystemVerilog value `4'b0010`. All vectors reset to zero.

### In a stage S_k (`colour_stage`)

For each instruction it takes in, the stage compares the instruction's vector with its own copy:

| condition | meaning | action |
|---|---|---|
| some bit `c_j`, `j > k`, differs | a deeper stage redirected, and this is the first instruction of its stream | accept |
| else `c_k` differs | prefetched behind a hazard this stage already took | **drop** |
| else | current stream | accept |

Bits below `k` play no part in the decision. An accepted instruction's vector becomes the stage's
vector. If the accepted instruction is a control transfer for this stage, the stage toggles `c_k`
in that vector and sends the target address, tagged with the new vector, to the AAU. The transfer
instruction itself goes no further. Any other accepted instruction moves on to the next stage.

Because `S_k` drops everything behind its own hazard, deeper stages never see that stale stream.
Because it accepts anything whose higher bits changed, a deeper redirection always gets through.

### In the AAU (`aau`)

A transfer address from `S_k` is let through to memory only if all its bits `c_j`, `j > k`, equal
the AAU's vector. Its vector then becomes the AAU's vector. If any of those bits differs, a deeper
stage has already redirected the stream and its target has already gone to memory, so the
shallower target is dropped. A sequential address from the PC is let through only if its vector
equals the AAU's vector. Every address let through is echoed to the PC, which then offers that
address + 4 with the same vector.

### A worked example

Take the program `I1; CH1 (taken in S4); CH2 (taken in S2); …`. CH1 is older, so its target
`I_j…` must win, and nothing fetched after CH1 may retire.

*CH2 redirects first.* S2 accepts CH2 with vector 0000 and toggles c2. Its target goes out with
0100, and the AAU, whose higher bits c3 and c4 match, moves 0000 → 0100. S2 then drops the
sequential instructions behind CH2, which still carry c2 = 0. Later CH1 reaches S4 and toggles
c4. Its target goes out with 0001. The AAU compares nothing above c4, so it lets the target
through and moves 0100 → 0001, which undoes CH2's bit as well. S4 drops the instructions of CH2's
stream, because they carry c4 = 0. The first instruction of `I_j` arrives with 0001. At every
shallower stage its c4 differs, so it is accepted and every stage adopts 0001.

*CH1 redirects first.* The AAU moves 0000 → 0001. CH2 may still be taken in S2, because S2 has
not yet seen the new stream. CH2's target carries 0100, and its c4 disagrees with the AAU's 0001,
so the AAU drops it. When `I_j` (0001) arrives at S2, the differing c4 makes S2 accept it, whatever
S2 did to its own bit.

Either way only `I1, I_j, I_j+1, …` leave S4. The end-to-end testbench forces both orderings and
checks these exact vector sequences.

## Instruction word and channels

Only the colour mechanism is modelled, so an instruction needs to say only where it redirects and
to which address (`colour_pkg`):

* `word[31:28]`: 0 for an ordinary instruction. A value `k` in 1…N means a control transfer that
  takes effect in stage `S_k`; stages before `S_k` treat it as an ordinary instruction.
* `word[15:0]`: absolute byte address of the target.
* Addresses are 32-bit byte addresses, and sequential flow steps by 4.

Each instruction carries `ins_t = {word, addr, col}`. An address carries `iaddr_t = {addr, col}`.

All links are clocked valid/ready channels, and an offered item stays put until it is taken
(checked by assertions). Each stage holds one instruction register and one transfer register. The
stage takes nothing while its transfer address waits for the AAU.

The scheme was conceived for an asynchronous, handshake-based pipeline. Here that is modelled by
a per-stage `stall` input, which holds a stage back as a slow asynchronous stage would, and by
back-pressure on the output. Hazards therefore meet in every possible order.

## Modules

| module | role |
|---|---|
| `colour_pkg` | `N_STAGES = 4`, widths, `col_t`, `iaddr_t`, `ins_t`, field helpers, `higher_mask(k)` |
| `colour_stage #(K)` | stage `S_K`: colour check, vector update, transfer issue |
| `aau` | Address Arbitration Unit, with the colour check on transfers and the PC, and the issue register to memory |
| `rr_arbiter #(N)` | round-robin choice among pending transfer addresses |
| `pc_incr` | sequential PC: the next address is the last issued address + 4, with the same vector |
| `imem #(WORDS=256)` | instruction memory with a load port; the response carries the request's vector |
| `colour_pipeline_top #(MEM_WORDS=256)` | the whole pipeline; exposes vectors and event pulses |

Top-level event outputs (one-cycle pulses, bit `k-1` for stage `S_k`):

* `stage_reject`: a stage dropped an instruction.
* `stage_adopt`: a stage accepted a deeper stage's stream.
* `stage_hazard`: a stage took a hazard.
* `aau_accept`, `aau_reject`: the AAU let a transfer through or dropped it.
* `aau_pc_drop`: the AAU dropped a stale sequential address.

## Where this RTL departs from, or adds to, the published scheme

* **Clocked realisation.** The original is asynchronous. Here every process is a clocked stage
  with valid/ready handshakes. The colour rules are unchanged.
* **Issue register in the AAU.** The AAU takes a transfer from its stage and decides it at once,
  without waiting for memory. An accepted transfer goes into a one-entry register that memory
  reads, and it replaces any address still waiting there. The replaced address can only belong to
  a stream that this transfer overrides. Without this register the design deadlocks: a stage
  waits for the AAU to take its transfer, the AAU waits for memory, memory waits for S1, and S1
  waits for that stage.
* **Arbitration order.** Pending transfers go before the sequential address. Among several
  transfers a round-robin arbiter picks one per cycle, where the original uses a tree of two-way
  arbiters. The scheme does not depend on the order.
* **Stale-PC check.** The check is kept, but it never fires here: the PC is reloaded on the same
  clock edge that a transfer is let through.
* **The instruction format, memory size and latency, reset address and PC step** are this
  design's choices.
* **Not included:** the processor into which the scheme was meant to be built (a five-stage
  asynchronous MIPS, with hazards in decode, execute and write-back). Its datapath is not specified
  in enough detail. For five stages, set `N_STAGES = 5` and use `colour_stage #(K)` for each stage
  that can redirect; the rules generalise to any `N`.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a `TB_RESULT checks=… failures=…`
line:

* `tb_colour_stage` runs stages K = 1…4 side by side with random vectors, operations, stalls and
  back-pressure. Its reference model writes out each stage's acceptance condition bit by bit.
* `tb_aau` checks random transfers, stale and current PC addresses and memory back-pressure
  against a reference vector and issue register. It also checks that no transfer waits more than
  N cycles.
* `tb_rr_arbiter`, `tb_pc_incr` and `tb_imem` are unit checks.
* `tb_colour_pipeline_top` runs the whole design at its default size:
  * it replays both orderings of the worked example and checks the AAU and stage vectors. In
    the first ordering it also checks that S2 drops the instructions behind CH2 and that S4
    drops CH2's stream;
  * it runs 40 random programs under random stalls and back-pressure, and compares the stream
    leaving S4 with an instruction-level model that executes the program in order;
  * it counts drops, adoptions, hazards in each stage, AAU accepts and drops, and replacements in
    the AAU's issue register, and fails if any of them never occurred.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/colour_pkg.sv \
          tb/tb_colour_pipeline_top.sv --top-module tb_colour_pipeline_top
./obj_dir/Vtb_colour_pipeline_top
```

The other testbenches build the same way with their own `--top-module`.
