# A transport triggered processor with a segmented move network

In a transport triggered architecture (TTA) the program does not name
operations, it names data transports ("moves"): copy this register to that
port. Operations happen as a side effect, when a value is moved into a
function unit's trigger port. All moves travel over a set of shared buses that
join every function unit and register file. In the classic form each bus runs
the full length of the chip and every transport charges the whole wire, even
when source and destination sit next to each other.

This design cuts every bus into segments, one at each socket position, with a
small switch (a *bus connector*) between neighbouring segments. For each move
the instruction decoder closes only the connectors that lie between the source
socket and the destination socket. The rest of the bus stays isolated and does
not toggle, so the switched wire length, and with it the bus energy, shrinks.
Programs do not change: routing is worked out in hardware from the ordinary
source/destination fields of each move.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. All files are in
`rtl/`, one module or package per file. The testbenches, all self-checking,
are in `tb/`.

## The machine

```
            FU  FU  FU  FU  FU  FU  FU   RF   RF
            |   |   |   |   |   |   |    |    |      (each unit: 2-3 sockets)
 bus 0  ====o===o===o===o===o===o===o====o====o===== CNTL
 ...          (6 buses, each cut at every socket position)
 bus 5  ====o===o===o===o===o===o===o====o====o===== CNTL
```

| unit | module | sockets | operations (index field of the trigger move) |
|---|---|---|---|
| adder 0, adder 1 | `tta_fu` (`K_ADD`) | O, T, R | add O+T, sub O-T |
| logic | `tta_fu` (`K_LOGIC`) | O, T, R | and, or, xor, and-not O&~T |
| shift/rotate | `tta_fu` (`K_SHIFT`) | O, T, R | shl, shr, sra, rotl, rotr by T[4:0] |
| multiplier | `tta_fu` (`K_MUL`) | O, T, R | low or high word of the unsigned product |
| comparator | `tta_fu` (`K_CMP`) | O, T, R | eq, ne, ltu, lt, geu, ge (result 1/0) |
| load/store | `tta_lsu` | O, T, R | load mem[T] into R, store O to mem[T] |
| register file 0, 1 | `tta_rf` | W, R0, R1 | 16 x 32-bit, index field = register number |
| controller (CNTL) | `tta_cntl` | IN, OUT | IN: jump / jump if flag / jump if not flag; OUT: immediate or pc+1 |

The default configuration has seven function units, two register files, six
buses and a 32-bit data path. Which operations each unit carries, the register
count, the memory sizes and the instruction format are choices of this design.
The operation set was picked for bit manipulation and multiplication, the
dominant work in the hash, block cipher and RSA programs the network is meant
for.

Each function unit is seen by the network as three registers. O is the
operand socket. T is the trigger socket: a move into T starts the operation
that the move's index field names. R is the result socket. The operation uses
the value arriving at T and the current O. If O is written in the same cycle,
it uses the new O. The result is in R at the next clock edge and stays there
until the next trigger.

### Sockets and their numbers

There are 29 sockets, numbered in `tta_pkg`:

* Function unit `f` has sockets `3f` (O), `3f+1` (T) and `3f+2` (R). The
  units are adder 0, logic, shift, multiplier, comparator, load/store and
  adder 1, with `f` = 0 to 6 in that order.
* Register file `r` has sockets `21+3r` (write), `22+3r` (read port 0) and
  `23+3r` (read port 1).
* Socket 27 is the controller input and socket 28 the controller output.

An input socket is a multiplexer: it picks one bus. An output socket is a
demultiplexer: it can drive any bus. Every socket crosses every bus, so the
network is fully connected.

## The segmented bus (`seg_bus`, `bus_connector`)

This is the heart of the design and the part that differs most from an
ordinary TTA.

Every socket has a **position** along the buses, given by the placement
parameter `SOCK_POS` (socket number to position 0..28). A bus with NPOS
positions has NPOS+1 segments. Segment *k* lies just left of position *k*, and
segment *k+1* just right of it. The connector at position *k* joins segments
*k* and *k+1*.

At every crossing of a bus and a socket position, four bits (`cell_t`) set the
state:

| bits | meaning |
|---|---|
| `close` | the connector at this position conducts |
| `tap` | the socket at this position is attached to this bus |
| `side_r` | it is attached to the right segment (else to the left one) |
| `drive` | the attached socket is the bus source in this cycle |

Together they give the four socket states of a segmented bus:

* connected to the left segment: `tap`, `!side_r`, connector open
* connected to the right segment: `tap`, `side_r`, connector open
* transition: `close`, `!tap`. The transport passes by.
* broken: `!close`, `!tap`. The bus is cut here.

A fifth combination, `tap` with `close`, serves a socket in the middle of a
shared route. It is attached to a bus that passes through its position.

The buses are AND/OR buses. They are not tri-state. A transport runs on two
one-way chains. The rightward chain starts at the source's segment, and each
closed connector passes its value to the next segment; the leftward chain does
the same in the other direction. An open connector passes zero, one AND gate
per bit and direction. That is the whole of `bus_connector`. A segment that no
transport reaches stays at zero and does not toggle. A reading socket sees the
OR of both chains on the segment it is attached to, and zero when it is not
tapped.

`seg_bus` also reports, each cycle, which segments carry the transport
(`seg_act`) and which connectors pass it (`conn_act`). Weighted with wire
length and connector energy, these counts are the inputs of the bus energy
estimate

    E = K_L * (active wire length) + K_BC * (active connectors)

A simple unsegmented bus always switches its whole length and has no
connectors.

## Routing (`route_decoder`)

Move slot *j* of an instruction owns bus *j*. For each valid move the decoder:

1. looks up the positions of its source and destination sockets;
2. attaches both sockets to the bus. The end with the lower position attaches
   to its right segment and the higher end to its left segment, so both face
   the span;
3. closes every connector strictly between the two positions;
4. sets `drive` at the source, and points the destination's input socket at
   this bus (`in_sel`, `in_we`). It also passes the move's index field to the
   socket (`sock_idx`).

**Bus sharing.** Two moves in one instruction may read the same source: the
same socket and, for a register file port, the same register. The later move
then rides on the bus of the earliest such move, and its own bus stays idle.
The span of the shared bus covers all its participants, from the leftmost to
the rightmost. A participant in the middle is tapped with its connector
closed. The `shared` output flags merged slots. Slot 0 can never be merged,
so `shared[0]` is always 0.

The decoder is purely combinational. It sits between the instruction memory
and the network, in the same cycle as the transport.

## Instructions and timing

An instruction is six move slots plus one 32-bit long immediate. A move slot
(`move_t`, 19 bits) holds:

* `v`: the slot holds a move;
* `src`: the source socket;
* `sidx`: the source index (register number, or controller source select);
* `dst`: the destination socket;
* `didx`: the destination index (register number, operation, or jump kind).

The controller output socket gives the immediate (`sidx = CN_IMM`) or the
return address pc+1 (`CN_RET`).

Timing rules:

* **One instruction per cycle.** The instruction memory is read
  asynchronously at `pc`. All six moves read their sources, cross the network
  and are written into their destination registers at the same clock edge.
* A triggered result can be read by the next instruction. So can a register
  written by a move.
* A move into the controller input with `CN_JUMP` loads `pc` at the next edge.
  `CN_CJUMP` jumps only when the comparator's result bit 0 is 1, and
  `CN_CJUMPN` only when it is 0. The next instruction is already the jump
  target: there is no delay slot.
* While `run` is low, `pc` is held at 0, no moves are issued, and the host
  ports (`im_*`, `dm_*`) load the instruction memory (1024 entries) and the
  data memory (65536 words, word addressed).

Program rules are checked by assertions in `tta_top`:

* a source must be an output socket and a destination an input socket;
* no two moves of one instruction may write the same destination.

A register file read port reads only one register per cycle. Moves that read
different registers must therefore use different ports.

Example, `h = rotl(h ^ x, 5)` with h in register 0.1 and x in the load unit's
result. It takes two instructions, each a list of moves:

    I0: RF0.R0[1] -> LOGIC.O ;  LSU.R -> LOGIC.T[xor]
    I1: LOGIC.R -> SHIFT.O   ;  CNTL.OUT[imm=5] -> SHIFT.T[rotl]

## Placement

The saving depends on where the sockets sit. Units that exchange many values
should be close together. Choosing the placement is a design-time step and is
not part of the RTL. One way is simulated annealing over the order of the
macro blocks, with the total transport length of the target programs as the
cost. Its result enters the RTL only through `SOCK_POS`. The default places
the sockets evenly spaced in socket-number order, with the controller at the
end of the buses. Changing the placement changes only the connector settings
the decoder produces, never what a program computes.

## Where the model is simpler than a real layout

* **One line of positions.** A real floorplan puts the macro blocks in two
  rows of equal height, each block as wide as its area requires. Here every
  socket is just a position number along the buses. The RTL needs nothing
  more, because routing depends only on the order of the sockets. The wire
  lengths the testbenches report count segments between neighbouring sockets
  as equal. Physical lengths would weight each segment by the width of the
  block it crosses.
* **No network pipelining.** In the source concept the network controller
  also controls pipelining of the transports. Here every move completes in
  the cycle it is issued, so there is nothing to control.
* **No simple-bus twin.** The unsegmented bus is the baseline the design is
  compared with, not part of it. The testbenches compute its active length
  (always the full bus) for comparison; it is not built.
* **Energy and delay** follow from the activity counts: active wire length
  and active connectors per cycle, from `seg_act` and `conn_act`. The RTL
  gives the counts, not the energy.

## Files

| file | contents |
|---|---|
| `rtl/tta_pkg.sv` | sizes, socket numbering, operation codes, `move_t`, `cell_t`, default placement |
| `rtl/bus_connector.sv` | the connector between two segments |
| `rtl/seg_bus.sv` | one segmented bus |
| `rtl/route_decoder.sv` | moves to connector/socket settings, bus sharing |
| `rtl/seg_network.sv` | six buses plus input and output sockets |
| `rtl/tta_fu.sv` | function unit (adder, logic, shift, multiply, compare) |
| `rtl/tta_lsu.sv` | load/store unit with data memory |
| `rtl/tta_rf.sv` | register file |
| `rtl/tta_cntl.sv` | program counter, instruction memory, jumps, immediates |
| `rtl/tta_top.sv` | the processor |

Top parameters:

| parameter | default | meaning |
|---|---|---|
| `NBUS` | 6 | move buses and slots per instruction |
| `W` | 32 | bus width |
| `NREG` | 16 | registers per file |
| `IDEPTH` | 1024 | instruction memory depth |
| `DDEPTH` | 65536 | data memory words |
| `SOCK_POS` | in order | socket positions |

The data memory is sized so that a 1 Mbit input fits together with its
working tables. Besides the host ports, the top brings out `pc` and the
network observation signals `bus_cfg`, `seg_act`, `conn_act` and `shared`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Every one has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_bus_connector` | pass and block, both directions |
| `tb_seg_bus` | random single-source routes: the destination gets the value, tapped sockets outside the span read 0, active segments and connectors exactly match the span, a route opened in the middle does not arrive, a shared route with the source in the middle reaches both sides |
| `tb_route_decoder` | 2000 random instructions with frequent repeated sources on a scrambled placement: connector, tap, drive and side settings, input selects, index fields, sharing |
| `tb_seg_network` | decoder plus network on a scrambled placement: every destination receives its source's value, unused input sockets stay 0, and the active length per bus equals the span |
| `tb_tta_fu` | all five unit kinds against a reference model, one-cycle latency, same-cycle operand forwarding |
| `tb_tta_lsu`, `tb_tta_rf`, `tb_tta_cntl` | memory, register and control behaviour against reference models, including jump kinds and run/stop |
| `tb_tta_top` | a small program at default size, described below |
| `tb_sha256_workload` | SHA-256 compression of one block, described below |
| `tb_sha1_workload`, `tb_md5_workload` | SHA-1 and MD5 compression, in the same way |
| `tb_rc6_workload` | RC6 encryption of 16 blocks |
| `tb_aes_workload` | AES-128 encryption of 16 blocks |
| `tb_des_workload` | DES and triple DES, one program |
| `tb_rsa_workload` | one 1024-bit Montgomery multiplication, the core of RSA |
| `tb_rsa_crt_workload` | a complete RSA signature with the Chinese remainder theorem, 256-bit key |

`tb_tta_top` runs a hash-mixing loop and a tail at the default size. It uses
every unit, both register files, taken and not-taken conditional jumps, the
return address and stores. It checks the results and the exact cycle count.
It also counts how often each network mechanism occurs: bus sharing,
transition, left and right attachment, and interior taps. Each must occur.
Over that run the buses switch 1339 segment units, against 3556 for
unsegmented buses.

`tb_sha256_workload` compiles SHA-256 into moves with a small generator inside
the testbench. The program has 156 instructions: a message-schedule loop and a
64-round loop. It hashes two blocks and checks both digests:

* the padded message "abc", against the published digest;
* a random block, against a reference model in the testbench.

Each block takes 6978 cycles, which the testbench checks. The segmented
network switches 1/1.76 of the wire length that simple buses would. Lengths
are in segments, with the sockets evenly spaced.

The workload testbenches cover the three groups of cryptographic programs the
segmented network is meant for: hashes (MD5, SHA-1, SHA-256), symmetric
ciphers (DES, triple DES, AES, RC6) and RSA signatures. They all work like
the SHA-256 test. Each checks its results against a reference model in the
testbench, and against a published test vector where one fits. All but the
CRT signature also check their exact cycle count. There the count depends on
the key bits and is only reported. Every test runs only a few blocks. Hashing
1 Mbit or encrypting 512 Kbit repeats the same loops thousands of times, and
is not simulated.

The last column is the switched wire length of simple buses divided by that
of the segmented buses. It is counted in segments, in the default placement.
It is not a power ratio: connector energy, and the real block widths, are
left out.

| testbench | program | cycles | result checked | wire length, simple / segmented |
|---|---|---|---|---|
| `tb_md5_workload` | 168 instructions, four 16-step loops | 2417 per block | "abc" digest, random block | 2.12 |
| `tb_sha1_workload` | 169 instructions | 4262 per block | "abc" digest, random block | 2.06 |
| `tb_sha256_workload` | 156 instructions | 6978 per block | "abc" digest, random block | 1.76 |
| `tb_rc6_workload` | 91 instructions, 20-round loop | 906 per block | 16 blocks under a random key; the reference model is checked on the zero-key vector | 2.08 |
| `tb_aes_workload` | 405 instructions, table form, 9-round loop plus last round | 1755 per block | FIPS-197 example as block 0, 15 random blocks | 2.09 |
| `tb_des_workload` | 409 instructions, 1 or 3 passes of 16 rounds | 2475 (DES), 7391 (3DES) per block | published DES example; 3DES with equal keys equals DES; random 3DES keys | 1.84 |
| `tb_rsa_workload` | 171 instructions | about 65 500 | 1024-bit Montgomery product, two operand sets, final subtraction taken and skipped | 2.10 |
| `tb_rsa_crt_workload` | 920 instructions: Montgomery subroutine, exponentiation loops, recombination | about 510 000 per signature | complete CRT signature with a 256-bit key, two keys: s < pq, s = c^dp mod p, s = c^dq mod q | 2.24 |

The testbenches build every table the programs read from its definition.
The only constants written out are the standard DES bit tables and S-boxes.
The tables built are:

* the AES S-box as the GF(2^8) inverse followed by the affine map, and the
  round tables from it;
* the DES permutation tables, one per input byte position, from the bit
  permutation, and the combined S-box/P tables from the S-boxes;
* the round keys, by each cipher's own key schedule.

The MD5 step constants are computed in the testbench as
floor(|sin(i+1)| * 2^32), not stored. The RSA test uses the CIOS form of
Montgomery multiplication: 32 outer passes, each a multiply-accumulate pass
and a reduction pass over 32 words. `tb_rsa_crt_workload` runs a whole
signature with the Chinese remainder theorem: it reduces the message mod p
and q, raises it to dp and dq by square-and-multiply, and recombines the two
halves. It calls the Montgomery routine as a subroutine, and returns by
moving a saved address into the program counter. The key is 256 bits so that
the run stays short. A 1024-bit signature needs about 1550 multiplications of
16 words, some 25 million cycles. That size is not simulated.

To run one testbench with plain Verilator:

    verilator --binary --timing --assert -y rtl +libext+.sv rtl/tta_pkg.sv \
        tb/tb_tta_top.sv --top-module tb_tta_top -Mdir obj && obj/Vtb_tta_top

## What is this design's own

The following follow the segmented-bus TTA concept:

* the segmented buses with a connector at every socket;
* the four socket states;
* routing in the decoder by closing the connectors between source and
  destination;
* bus sharing for moves with a common source;
* the 7-unit, 2-register-file, 6-bus, 32-bit configuration;
* the controller at the end of the buses;
* the program counter as a move source and destination.

The following are choices of this implementation:

* the AND/OR bus style;
* the `cell_t` encoding, and the "tap with closed connector" case for
  interior participants;
* which bus a shared move uses;
* the operation sets;
* the register and memory sizes, with host ports for loading them;
* the instruction format and long immediate;
* the conditional jump on the comparator flag;
* no pipelining, and one-cycle unit latency;
* the default placement.

The analytical energy and delay models, and the placement search, are
design-time tools. They are not hardware here. The RTL provides the activity
counts that feed the energy model.
