# EMIND-II: a toroidal wavefront array of DNP-II neural processors

EMIND-II is a neurocomputer for large neural networks, shown here running a time-delay
neural network (TDNN) for spoken-word recognition. It has no central controller. Each node
is a small stored-program processor (a DNP-II processing element, PE) tuned for
sums of products. The M x M PEs form a mesh whose opposite edges are joined, so the mesh
is a torus. Each PE runs its own program and blocks on its links until its neighbours
deliver or accept a word. Partial sums and input samples therefore move through the
array as data-driven wavefronts. Neurons are time-shared: one PE computes many neurons,
and a layer larger than the array is spread over several passes ("slots") of the same PEs.

This RTL models the array at its published size: 16 x 16 PEs, built from 8 x 8 DNP-II
chips with four PEs each. The memory sizes and datapath widths of each PE also follow the
published chip. The chip's instruction set was never published, so this design defines
one (see *Instruction set*). A complete TDNN recognition pass runs on the full-size array
in simulation and matches a bit-exact reference model.

## Array organisation (`emind2`)

```
 row M-1   PE(M-1,0) ... PE(M-1,M-2) | PE(M-1,M-1)      north edge wraps to row 0
   ...        sum-of-products block   | layer-1 output
 row 1     PE(1,0)   ... PE(1,M-2)   | PE(1,M-1)        column (activation)
 row 0     PE(0,0)   ... PE(0,M-2)   | PE(0,M-1)        east edge wraps to column 0
           input / output line       | serial host port
```

* PE(i,j) is in row i (0 = south) and column j (0 = west). Each PE has four links, N, E,
  S and W. The links on the north and east edges wrap around to the south and west edges.
* The PEs come in DNP-II chips (`dnp2_chip`). Each chip is a 2 x 2 tile, so the chip holds
  PE(2ci..2ci+1, 2cj..2cj+1) and brings two links out on each side.
* The hardware gives no PE a fixed role. The roles in the diagram come from the TDNN
  programs (see *TDNN on the array*).
* One exception to a plain torus: the row-0 wrap link, from PE(0,M-1) east to PE(0,0)
  west, runs through the serial host port (`emind_serial_port`).

## The processing element (`dnp_pe`)

Each PE has three memories, all 16 bits wide:

* 256 words of program memory;
* 128 words of input memory (X), which holds samples received over the links;
* 512 words of weight memory (W), which holds weights, thresholds and tables.

The rest of the datapath:

* 8 general registers;
* a 16-bit ALU (add, subtract, and, or, xor, not, shifts, move);
* a signed 16 x 16 multiplier;
* a 40-bit accumulator;
* four 9-bit address counters. An access can use a counter as is, post-increment it,
  post-decrement it, or add a register to it (indexed mode, used for table look-up).

Control uses a one-word prefetch into the instruction register, so most instructions take
one clock. A taken jump, call, return or DJNZ (decrement and jump if not zero) costs one
bubble. Other timing:

* **MAC**: a three-stage pipeline. Stage 1 reads X[a] and W[b]. Stage 2 multiplies. Stage 3
  adds the product to the accumulator, or replaces the accumulator when the instruction's
  "new sum" bit is set. Under `RPT n` one product enters per clock. An accumulator
  instruction (`ACC`) stalls until the pipeline is empty. Reading the accumulator into a
  register shifts it right arithmetically and saturates it to 16 bits.
* **RPT n**: executes the next instruction n times without fetching it again.
* **SEND / RECV**: take two clocks when the link is ready. They stay in execute for as long
  as the output latch is full (SEND) or the input latch is empty (RECV). This stall is the
  only synchronisation between PEs.
* **CALL / RET**: use a 4-entry return stack.

`start` (a one-cycle pulse) starts the program at address 0. `HALT` stops it and raises
`halted`. The host reaches every memory through a second memory port.

### Instruction set (`dnp_pkg`)

Every instruction is a 16-bit word, with the opcode in bits 15..12. R = register, A = address
counter, and mode is one of plain, increment, decrement or indexed.

| op | mnemonic | effect |
|----|----------|--------|
| 0 | NOP, HALT, RET, SETIOPR Rs, MOVA An,Rs | miscellaneous (sub-op in bits 11..8) |
| 1 | LDI Rd, imm9 | Rd = sign-extended immediate |
| 2 | ALU Rd, Rs, f | Rd = Rd f Rs |
| 3/4 | LDW / STW | Rd = W[ea] / W[ea] = Rs; ea from An and mode |
| 5/6 | LDX / STX | the same for the X memory |
| 7 | MAC Ax,mode, Aw,mode, new | ACC (+)= X[..] * W[..] |
| 8 | LDA An, imm | load an address counter |
| 9 | ACC | Rd = sat16(ACC >>> s), ACC = Rs, or ACC = 0 |
| 10/11 | SEND Rs,pair / RECV Rd,pair | link I/O through an IOPR pair |
| 12 | RPT n | repeat the next instruction n times |
| 13/14/15 | JMP, CALL, DJNZ Rd,addr | control flow |

`tb/tb_asm_pkg.sv` has one encoder function per instruction. It is the easiest way to
write programs.

## Links and IOPR (`dnp_comm`)

A link carries 16 data bits and a request bit one way, and an acknowledge bit back. It
uses a two-phase handshake:

1. The sender puts a word on the data lines and toggles `req`.
2. The receiver stores the word and sets `ack` equal to `req`.
3. The sender holds the data until `ack` comes back.

Both `req` and `ack` pass through two-flop synchronisers before they are used. So
neighbouring PEs could run from unrelated clocks, and the `dnp_comm` test does run its two
sides at 10 ns and 14 ns. Every port has a one-word output latch and a one-word input
latch, so a link buffers up to two words.

Instructions do not name ports directly. They name one of four *pairs* in the IOPR
register. Pair p sits in bits 4p+3..4p: the input port in the upper two bits, the output
port in the lower two. After reset the pairs are:

| pair | input port | output port | used for |
|------|------------|-------------|----------|
| 0 | S | N | northward flow |
| 1 | W | E | eastward flow |
| 2 | N | S | southward flow |
| 3 | E | W | westward flow |

Pairs 0 and 1 are the two flows the TDNN mapping needs. `SETIOPR` rewrites the register.

## Host access

* **Parallel buses (`emind_host_if`)**: M buses of one word each.
  * Column mode: bus k writes or reads PE(sel,k), so one row of PEs per clock.
  * Row mode: bus k reaches PE(k,sel), so one column of PEs per clock.
  * Broadcast: writes word k into every PE of line k. This loads a program or a table into
    many PEs at once.
  * Read data is combinational.

  The host should use the buses only while the PEs are halted. If a PE writes the same
  address in the same clock, the host's write wins.
* **Serial port (`emind_serial_port`)**: a store-and-forward relay in the row-0 wrap link.
  * `serial_en = 0`: it simply closes the torus.
  * `serial_en = 1`: words that PE(0,M-1) sends east go to the `ser_out_*` stream, and
    words from `ser_in_*` go into PE(0,M-1)'s east port.

  The relay ends both links itself, so changing the mode never creates a false handshake.

## TDNN on the array

The recognition pass in `tb/tdnn_bench.sv` places the network as follows.

**Network sizes.** The input is F0 features by T0 frames. Layer 1 uses a W0-frame window
and gives F1 hidden features by T1 = T0-W0+1 frames. Layer 2 uses a W1-frame window and
gives N classes by T2 = T1-W1+1 frames. The score of class m is the sum over t of
x2[m][t]^2. The mapping needs F0 = F1 = M-1. The test uses F0 = F1 = 15, W0 = 8, W1 = 7,
T0 = 20 and N = 20.

**The pass runs in five steps:**

1. **Inputs.** PE(0,j) holds feature j for all T0 frames, loaded by the host. It sends the
   frames north. Every PE in column j keeps a copy and passes it on.
2. **Layer 1, eastward.** PE(i,j) computes `sum_k w1[i-1][j][k] * x[j][t+k]` with one MAC
   and RPT. It adds the partial sum from the west; PE(i,0) starts from the negated
   threshold instead. It then sends the sum east. PE(i,M-1) applies the activation table
   `table[((s >>> 5) + 128) & 255]`.
3. **Hidden outputs.** Once PE(i,M-1) has all T1 outputs, it sends them east. They wrap
   round the torus into PE(i,0) and move along row i, and every PE keeps a copy.

   PE(i,M-1) stores all T1 outputs before it sends any of them. Without this the row
   would deadlock, because PE(i,0) cannot take wrapped-around words while it is still
   sending partial sums.
4. **Layer 2, northward.** Column j serves classes j, j+15, and so on, one slot each, so
   N = 20 needs two slots in columns 0..4. PE(i,j) forms the W1-tap sum for hidden feature
   i-1, adds the partial sum from the south, and sends it north. The top row wraps into
   PE(0,j).
5. **Scores.** PE(0,j) applies the table and stores x2 in both X and W memory. One MAC run
   over those two copies then gives the sum of squares.

Every layer sum is a 16-bit wrap-around addition of per-PE terms. Each term is an exact
product sum, shifted right by 6 and saturated to 16 bits.

**Memory use at full size:**

* W memory: at most 281 of 512 words.
* X memory: at most 86 of 128 words.
* Longest program: 56 of 256 words (108 with the learning step).

**Timing.** A full pass takes 1082 clocks after download, which is about 27 us at 40 MHz.
The download itself takes 2934 host-bus clocks. These figures are for `LEARN=0`; with the
learning step the run takes 1788 clocks and the download 4918.

**Learning.** Only the output-layer step of back-propagation is programmed. It runs
after the recognition pass when `tdnn_bench` has `LEARN=1`:

* PE(0,j) forms e = O - R from the score and the target R. R is loaded by the host.
* For each frame, PE(0,j) computes delta = ((x2 * f'(x2)) >> 8) * e >> 4, with
  f'(x) = x(255 - x) >> 8 worked out with the MAC. It sends the deltas north.
* Each PE(i,j) passes the deltas on and keeps a copy in W memory.
* It then updates its layer-2 weights with a momentum of 1/2:
  dW[k] = (sum over t of x1[t+k] * delta[t]) >> 6 + dW_prev[k] / 2, then w[k] += dW[k].

Three parts are not programmed: the hidden-layer deltas, the layer-1 update and the
threshold updates.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| tb_dnp_alu, tb_dnp_mult, tb_dnp_regfile, tb_dnp_ram, tb_dnp_agu | random operations compared with models |
| tb_dnp_comm | two link ends on different clocks, all ports, IOPR rewrite, busy latch |
| tb_dnp_pe | MAC/RPT, saturation, ALU, DJNZ, CALL/RET, table look-up, link loop-back, RECV stall, IOPR; timing checks (see below) |
| tb_dnp2_chip | all 8 external links relay, internal ring, per-PE host access |
| tb_emind_host_if, tb_emind_serial_port | bus routing in all modes; serial relay in both modes |
| tb_emind2 | TDNN pass and output-layer learning step on a 4 x 4 array (3-3-5 network, two slots) |
| tb_emind2_full | the same on the default 16 x 16 array with the 15/8/15/7/20 network; every updated weight and increment is checked against a model |

The timing checks in tb_dnp_pe:

* 48 extra MACs cost exactly 48 clocks.
* A SEND into a free latch costs the same time as two NOPs.

The two array tests check every hidden output, every layer-2 output and every score
against the reference in `tdnn_bench`. They also count each mechanism and fail if one
never occurs:

* RECV and SEND stalls and accumulator-drain stalls;
* repeats and taken branches;
* traffic over the vertical and horizontal wrap links;
* column, row and broadcast loading;
* both serial-port modes.

To run a testbench with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dnp_pkg.sv tb/tb_asm_pkg.sv tb/tb_emind2.sv --top-module tb_emind2
./obj_dir/Vtb_emind2
```

Replace `tb_emind2` with any other testbench name. The full-size test takes about two
minutes to build and under a second to run.

## Where this design departs from, or goes beyond, the published description

* **Instruction set.** The encoding, the register count (8), the accumulator width (40
  bits), saturation on read-out, the stack depth and the start/HALT control are this
  design's own. The published material gives only the functions: MAC, ALU operations,
  address counters with an adder, repeat counter, prefetch, subroutine call, and I/O
  through IOPR pairs.
* **ICR.** The chip's "ICR" register is read as the repetition counter.
* **Link protocol.** The protocol, the latch depths and the IOPR bit layout are chosen
  here.
* **Chip count.** Two published figures for the chips per board disagree, 8 x 8 and 16.
  This design uses 8 x 8, which matches the stated 16 x 16 PEs.
* **Clock.** The array takes a single clock. The links would tolerate separate per-PE
  clocks.
* **Host interface.** The broadcast option and the serial port's place in the row-0 wrap
  link are this design's choices.
* **Class score.** Two published formulas for the final score disagree: one sums x2 over
  t, the other sums x2^2. The programs here use the sum of squares.
* **Not modelled.** The host computer, its speech front end (segmentation, FFT, feature
  vectors) and the board's driver circuits are outside the RTL. The testbenches play the
  host.
