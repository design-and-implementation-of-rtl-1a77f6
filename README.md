# Four-master, four-slave shared-bus MPSoC

A small multiprocessor system-on-chip in which four processing elements
share one 32-bit bus to reach four RAM blocks. Each processing element takes
two 16-bit operands, computes a 32-bit result in an ALU, and holds that
result in a register. When it wants to store the result (or read a word
back), it raises a request. An arbiter gives the bus to one requester at a
time, and a tree of multiplexers steers that master's result, address and
read/write line to the RAM named by the address. Every block is plain,
synthesizable SystemVerilog with no vendor primitives.

```
 proc0      proc1      proc2      proc3          (masters)
   | REQ0     | REQ1     | REQ2     | REQ3   ->  arbiter -> GNT0..GNT3
   | POUT     | POUT     | POUT     | POUT
   +--cmux1---+          +--cmux2---+            4:1, selected by a pair of grants
        |                     |
        +------ cmux3 --------+                  2:1, selected by the bus flag
                  |
            2:4 address decoder
       +--------+--------+--------+
     ram0     ram1     ram2     ram3             (slaves) -> DTOUT0..DTOUT3
```

## Files

| file | module | role |
|---|---|---|
| `rtl/mpsoc_pkg.sv` | package | widths, ALU op codes, `proc_sel_t`, `bus_req_t` |
| `rtl/mpsoc_top.sv` | `mpsoc_top` | the whole system |
| `rtl/processor.sv` | `processor` | one master: ALU, control unit, PIPO register |
| `rtl/alu.sv` | `alu` | arithmetic unit (X) and logic unit (Y) |
| `rtl/control_unit.sv` | `control_unit` | 2:1 mux, X or Y |
| `rtl/pipo_reg.sv` | `pipo_reg` | 32-bit parallel-in parallel-out register |
| `rtl/ram.sv` | `ram` | one slave: synchronous single-port RAM |
| `rtl/shared_bus.sv` | `shared_bus` | arbiter, three control multiplexers, decoder |
| `rtl/arbiter.sv` | `arbiter` | fixed-priority (or round-robin) grant |
| `rtl/control_mux.sv` | `control_mux` | 4:1 multiplexer for a pair of masters |
| `rtl/flag_mux.sv` | `flag_mux` | 2:1 multiplexer between the pairs, with its flag |
| `rtl/addr_decoder.sv` | `addr_decoder` | 2:4 slave select |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module.

## The processing element

`processor` is a fixed-function datapath, not an instruction-set processor,
and all four masters are instances of the same module.
Both 16-bit operands are zero-extended to 32 bits. The arithmetic unit and
the logic unit work on them at the same time. The control unit, a 2:1
multiplexer, passes one of the two results to a 32-bit register (`pipo_reg`),
which loads on every rising edge. `p_out` is therefore the result of the
operands and select lines present at the previous edge.

The 6-bit select input is `proc_sel_t = {unit, lop[1:0], aop[2:0]}`:

| field | value | result |
|---|---|---|
| `unit` | 1 | arithmetic result X |
| `unit` | 0 | logic result Y |
| `aop` | 000 / 001 / 010 | a+b / a−b / a×b (full 32-bit product) |
| `aop` | 011 / 100 | a+1 / a−1 |
| `aop` | 101 / 110 | b+1 / b−1 |
| `aop` | 111 | a |
| `lop` | 00 / 01 / 10 / 11 | a AND b / a OR b / a XOR b / NOT a (over 32 bits) |

The structure (operand ports, an ALU with 32-bit arithmetic and logic
halves, a 2:1 control unit, a 32-bit PIPO register) is the original
design's. The operation list, the codes and the 6-bit layout are this
implementation's own; only the 6-bit width of the select lines comes from
the original. Subtraction wraps in two's complement (a−b with b>a gives
`0xFFFFxxxx`).

## The shared bus

This is the part that needs the most care, because the grant, the flag and
the data path are all timed against one another.

**What a master offers.** Besides its `p_out`, each master `m` has a request
line `req[m]`, a 12-bit bus address `addr[m]` and a `rd_wr[m]` line (0 write,
1 read), all inputs of `mpsoc_top`. Inside, they are bundled with `p_out` as
a `bus_req_t`. Address bits `[11:10]` pick the slave and `[9:0]` the word.

**Arbiter.** `arbiter` registers a one-hot grant. At each rising edge it
grants the lowest-numbered active request (`req[0]` highest, `req[3]`
lowest). It decides again at every edge, so a waiting low-priority master is
pre-empted whenever a higher one requests, and can starve under constant
higher-priority traffic. With no request there is no grant. Setting
`ARB_ROUND_ROBIN = 1` on `mpsoc_top` (or `ROUND_ROBIN = 1` on the arbiter)
builds a round-robin arbiter instead: the search starts just after the master
granted last. The original text names both schemes but stresses static,
fixed priorities, so fixed priority is the default.

**Control multiplexers.** `control_mux` instances 1 and 2 each serve a pair
of masters (0/1 and 2/3). Their select is the pair's two grant lines:
`01` passes the first master, `10` the second, and `00` passes an all-zero
(idle) request. `11` also gives zero, though a one-hot arbiter never
produces it. `flag_mux` is the third multiplexer. Its flag is set by GNT0 or
GNT1, cleared by GNT2 or GNT3, and kept when no grant is high. Flag 1 passes
the 0/1 pair and flag 0 the 2/3 pair. The multiplexer is steered by the
flag's *next* value, so it switches in the same cycle as the grant. A
registered flag alone would send the previous owner's request to the slaves
for one cycle after a change of pair.

**Decoder.** `addr_decoder` raises the enable of the slave picked by address
bits `[11:10]`, but only while some grant is high. It puts the bus data on
that slave's data lines alone. The word address and `rd_wr` go to all
slaves.

**Timing of one transfer.**

```
edge t-1   operands/select applied           -> p_out valid after t-1
edge t     req[m] sampled high               -> gnt[m] high for t..t+1,
                                                bus carries master m
edge t+1   write: RAM stores p_out[m]
           read : DTOUT[slave] gets the word -> holds until that slave's next read
```

A master must keep its request fields (address, rd_wr, and the operands
that produce `p_out`) steady until the end of its granted cycle. It should
drop `req` during that cycle, or it will be granted again. The bus moves one
word per cycle at most, whichever master owns it.

## RAM slaves

`ram` is a synchronous single-port memory with enable, `rd_wr`, a 10-bit
address, and 32-bit data in and out. On a rising edge with `en` high, it
writes when `rd_wr = 0` and reads when `rd_wr = 1`. `data_out` is registered
and keeps its value when the RAM is not reading. The RAM has no reset, so
its contents are undefined until written.

The original gives a 10-bit address, "nearly 3 kilobytes" per RAM, and a
depth of 3072. These agree if the 3072 is bytes: 768 words of 32 bits, which
is the default `DEPTH` (`RAM_DEPTH` on the top). Addresses 768–1023 are
outside the array: writes there are dropped and reads return zero. Set
`RAM_DEPTH = 1024` to use the whole 10-bit space instead.

## Departures from the original, and choices made here

- One clock and one synchronous, active-high reset for everything. The
  original mentions separate clocks for the slaves and for the arbiter. Reset
  clears the PIPO registers, the grants and the flag, but not the RAMs.
- The source of the requests, addresses and read/write lines is left open
  in the original. Here they are top-level inputs, one set per master.
- The address travels with the data through the control multiplexers. The
  original shows only the processor outputs going through them.
- The ALU operation set and the select encoding (see above) are invented.
- The "input unit" in front of the ALU is just the operand ports. No input
  register is added.
- The one-master prototype the original used as a stepping stone is not
  included. The four-master system covers it.
- FPGA-specific results (device, resource use, clock rate) are not
  reproduced, and nothing here depends on an FPGA family.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mpsoc_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top -o sim
./obj_dir/sim
```

Replace `tb_mpsoc_top` with any other `tb_<module>` to test one block.

`tb_mpsoc_top` runs the full system at its default sizes. It first replays
a short fixed scenario: all four processors get fixed operand pairs and
select `111000`, master 0 requests alone, the bus goes idle, then master 1
requests. Both results are read back. It then runs 400 random operations per
master: random operands and operations, random slaves and words (a few above
the RAM depth), and random think-time, so that masters contend. Each master
keeps its request steady until granted.

A reference model checks the following:

- every grant against fixed priority;
- the flag;
- every read against a reference copy of the four RAMs, filled with
  independently computed ALU results.

It also counts grants per master, writes and reads per slave, contention,
waiting masters, flag sets and clears, idle cycles, both ALU units and
out-of-range accesses. If any of these never happens, the test fails.

The block testbenches cover more ground. `tb_ram` fills and reads back all
768 words. It also checks read latency and hold, writes with enable low, and
out-of-range addresses. `tb_arbiter` checks all request patterns and
pre-emption in both arbiter modes. `tb_shared_bus` checks 2000 random cycles
of the bus against its reference.

## Changing it

- Bus width, operand width and address split are localparams in
  `mpsoc_pkg`. `bus_req_t` and the decoder follow them.
- New ALU operations go in `arith_op_e`/`logic_op_e` and the two `case`
  statements in `alu.sv`. Widen `proc_sel_t` if more codes are needed.
- The four-master, four-slave shape is built from fixed pairs of grants,
  as in the original. A different number of masters needs a new multiplexer
  tree in `shared_bus.sv`.
