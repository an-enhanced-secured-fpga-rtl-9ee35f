# Compact iterative DES core, with a pipelined companion engine

DES encrypts a 64-bit block with sixteen identical rounds. A small core can
therefore build one round and run the block through it sixteen times. This
RTL does that. One combinational round sits between two 32-bit half
registers. All eight S-boxes are looked up at the same time, so the longest
path is one S-box read plus a few XORs. The permutations IP, E, P and IP-1
are pure wiring. Subkeys are computed once per key and kept in a small
memory. Decryption reads that memory in reverse order. The iterative core
takes in a new block every 16 clocks.

The same chip also holds a fully pipelined engine: sixteen registered
copies of the round. Its first result comes out 17 clocks after the block
went in, and after that it delivers one result per clock. It shares the key
schedule and the chip enable with the iterative core.

The architecture follows a published compact FPGA implementation of DES
("An Enhanced Secured FPGA based DES"). That work gives the structure:
- the round with REGA/REGB;
- the parallel S-boxes;
- stored pre-computed subkeys;
- an active-low chip enable;
- 16 clocks per block for the iterative design, and 17 clocks, then one block
  per clock, for the pipelined one.

Everything else is this implementation's own choice. That covers the pin
list beyond CE/CLK/IN/OUT, the on-chip key schedule, handshakes, reset and
the pipeline's subkey bank. Those choices are listed under
[Departures and own choices](#departures-and-own-choices).

## How a block moves through the iterative core

```
            din ──► IP ──┬─ LIN ─┐                  ┌──────────────┐
                         └─ RIN ─┼─► mux ─► l_in ───┤              │
   REGB (left)  ─────────────────┘   mux ─► r_in ─┬─► f(R,K) ──► XOR ─► r_new
   REGA (right) ─────────────────────────┘        │   ▲                  │
                                                  │   subkey[key_addr]   │
         REGB ◄── r_in            REGA ◄── r_new ◄┴──────────────────────┘
         dout ◄── IP-1({r_new, r_in})   (only in the round-16 cycle)
```

`des_ctrl` holds a 4-bit round counter. Each clock with `ce_n` low is one round:

| counter | what the cycle does | control |
|---|---|---|
| 0 | round 1 on IP(din): the multiplexers pick the permuted input, `din` and `decrypt` are sampled | `load` (`din_taken`) |
| 1 … 14 | rounds 2 … 15 on REGA/REGB | |
| 15 | round 16; the swapped halves pass IP-1 into the output register | `last` |
| 0 (next block) | `dout_valid` is high; the next block is loaded in this same cycle | `dout_valid`, `load` |

The load cycle also computes round 1, so a block takes exactly 16 clock
edges from the edge that samples it to the edge that registers its result.
Blocks follow back to back, one every 16 cycles. The result stays in `dout`
until the next result replaces it.

The round itself (`des_f` plus one XOR) is the classic Feistel step:
`R(i) = L(i-1) xor P(S(E(R(i-1)) xor K(i)))` and `L(i) = R(i-1)`. After round 16
the output is built from `R16 || L16`, so the halves are swapped once more
before IP-1.

### Subkeys and decryption

`des_key_schedule` works sequentially. On a `key_load` pulse it applies
PC-1, which drops the parity bits. For the next 16 clocks it rotates the two
28-bit halves C and D left by 1 or 2 places, using the standard rotation
amounts. Each clock it writes PC-2 of the rotated pair into `des_subkey_mem`
at address `round - 1`. Loading a key therefore takes 17 clocks, after which
`key_ready` rises.

The memory is 16 × 48 bits. It has one synchronous write port and one
asynchronous read port, the shape of FPGA distributed RAM.

Encryption and decryption use the same round. The only difference is the
order of the subkeys:
- for an encryption the controller reads address `counter`;
- for a decryption it reads address `15 - counter`.

The mode is sampled with the block and held until that block's round 16. A
change of `decrypt` during a block does not affect it.

### Chip enable, hold and key changes

`ce_n` is active low. While it is high, the round counter, REGA/REGB and the
pipelined engine keep their values. When it goes low again, the block in
flight continues where it stopped. The core is also held in three cases:
- in the `key_load` cycle;
- while the schedule runs;
- whenever no complete schedule is in memory.

The subkey memory is shared. Load a new key between blocks: a block that is
in flight across a key change finishes with a mix of old and new subkeys.

## The pipelined engine

`des_pipe_core` unrolls the round:

1. An input register takes IP(din) at edge 1.
2. Sixteen `des_pipe_stage` instances apply rounds 1 … 16 at edges 2 … 17.
3. IP-1 of the last stage's swapped halves drives `pipe_dout`.

All sixteen subkeys are needed at the same time, so this engine keeps its
own 16 × 48-bit register bank. The key schedule writes that bank through the
same write port it uses for `des_subkey_mem`.

Each block carries a valid bit and a mode bit down the pipeline. Each stage
picks `K(i)` or `K(17-i)` from the mode bit, so encryptions and decryptions
can be mixed freely.

`ce_n` high freezes every stage. `pipe_dout_valid` is gated by the enable,
so it gives exactly one strobe per result.

## Interface of `des_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock |
| `rst_n` | in | 1 | asynchronous active-low reset of the control state and valid flags |
| `ce_n` | in | 1 | chip enable, active low; high freezes both engines |
| `key`, `key_load` | in | 64, 1 | key and one-cycle start of its schedule |
| `key_ready` | out | 1 | a complete schedule is loaded |
| `din`, `decrypt` | in | 64, 1 | block and mode for the iterative core |
| `din_taken` | out | 1 | `din`/`decrypt` are sampled at this edge (every 16th enabled cycle) |
| `dout`, `dout_valid` | out | 64, 1 | result, and a one-cycle strobe when it is new |
| `pipe_din`, `pipe_decrypt`, `pipe_din_valid` | in | 64, 1, 1 | block, mode and valid for the pipelined engine |
| `pipe_din_taken` | out | 1 | the block is taken at this edge |
| `pipe_dout`, `pipe_dout_valid` | out | 64, 1 | pipelined result and its strobe |

Bit 63 of every block is DES bit 1, the standard's most significant bit.
Keys include the eight parity bits, which are ignored.

## Modules

| module | role |
|---|---|
| `des_pkg` | types, the standard tables (IP, IP-1, E, P, PC-1, PC-2, rotations, S-boxes) and permutation functions |
| `des_ip`, `des_fp`, `des_expand`, `des_pbox` | IP, IP-1, E and P: wiring only |
| `des_sbox` | one 64 × 4 S-box ROM; parameter `SBOX` = 0 … 7 |
| `des_f` | f(R,K): E, subkey XOR, eight S-boxes in parallel, P |
| `des_datapath` | input IP and multiplexers, round XOR, REGA/REGB, IP-1 and output register |
| `des_ctrl` | round counter, load/last strobes, forward or reverse subkey address, CE and hold |
| `des_subkey_mem` | 16 × 48 subkey RAM; parameters `DEPTH` = 16 and `WIDTH` = 48 |
| `des_key_schedule` | PC-1, rotations, PC-2; writes one subkey per clock |
| `des_pipe_stage` | one registered round with per-block subkey choice; parameter `ROUND` |
| `des_pipe_core` | input register, 16 stages, subkey bank, IP-1 |
| `des_top` | both engines and the shared key schedule |

Size after generic synthesis: the iterative core alone has about 200
flip-flops, plus 2 Kbit of S-box ROM and 768 bits of subkey RAM. The
pipelined engine adds about 1,100 flip-flops and sixteen more sets of
S-boxes.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The checks rest on values
that come from outside the RTL:
- the intermediate values of the well-known DES worked example:
  - key `133457799BBCDFF1`, block `0123456789ABCDEF`;
  - IP output `CC00CCFF F0AAF0AA`, K1 `1B02EFFC7072`;
  - S-box output `5C82B597`, f `234AA9BB`;
  - R2 `CC017709`, K16 `CB3D8B0E17F5`;
  - result `85E813540F0AB405`;
- ten published known-answer triples, including the weak keys `0101…01` and
  `FEFE…FE`, whose subkeys are all zeros or all ones;
- structural properties that do not depend on the tables, such as:
  - every S-box row is a permutation of 0 … 15;
  - the permutations are bijective;
  - IP-1 inverts IP;
  - E follows its overlapping-groups rule;
  - f depends on R only through E(R) xor K.

`tb_des_top` runs the whole chip at its default configuration:
- all ten known answers on both engines, streamed back to back, with
  encryptions and decryptions mixed;
- random keys and blocks with random CE stalls;
- a check that the two engines agree and that every ciphertext decrypts back;
- timing checks: 16 enabled edges per iterative block and one block every
  16 cycles; 17 edges to the first pipelined result, then one result per
  clock.

It counts each mechanism and fails if one never occurred. The mechanisms are
key load, hold during the schedule, CE stall, encryption, decryption, mode
switch, back-to-back blocks, a full-rate pipeline and a frozen pipeline.

The iterative core also carries an assertion: the round counter does not
move while the core is disabled.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/des_pkg.sv tb/tb_des_top.sv \
          --top-module tb_des_top -Mdir obj_top
./obj_top/Vtb_des_top
```

Replace `tb_des_top` with any other testbench name. Each testbench runs in
well under a second.

## Departures and own choices

- **16 clocks per block.** The source gives 16 clocks per block for the
  iterative design. It also describes a first clock edge that only loads the
  halves into REGA/REGB, which would make 17. This core computes round 1 in
  the load cycle, which gives 16.
- **Pins.** The source names four pins: CE, CLK, IN and OUT. All other ports
  are this implementation's own: key input, key start and ready, mode,
  reset, handshake strobes and the pipelined engine's ports.
- **Where subkeys come from.** The source stores pre-computed subkeys in
  memory but does not say who computes them. Here an on-chip sequential key
  schedule fills the memory.
- **Pipelined engine.** It is described only by its timing: 17 clocks for
  the first block, then one per clock. The stage split, the subkey register
  bank, the per-block mode bit and the shared CE are choices made here.
- **Permutation and S-box tables.** These are the DES standard's tables. The
  source does not print them.
- **Performance figures.** The source reports figures for a Virtex-E device:
  165 slices, a throughput of 274 Mbit/s (which implies about 68.5 MHz at 16
  clocks per block), and a table giving 11 cycles per block. These depend on
  the FPGA and its tools, and this RTL makes no claim about them. The
  11-cycle figure conflicts with the 16 cycles used here.
- **Reset.** Only the control state and valid flags are reset. The data
  registers and memories are always written before they are read.
- **Benign lint warning.** Verilator reports `SYNCASYNCNET` on `rst_n`. The
  reason is that the same signal is both the flip-flops' asynchronous reset
  and the `disable iff` of the controller's assertion. It has no effect on
  the circuit.
