# RIP: a task turned into a chip

This RTL is a small "smart store" that an Internet Protocol module uses for its
initialization parameters. In the original system it was a software task,
`Read_Init_Parameters` (RIP). It had two entries that other tasks call:

- `Go`, called by the outbound datagram task (Inm_Out).
- `Srv_req`, called by the host gateway task (Inm_Srv).

RIP in turn calls one entry of a memory task, `Out_request`. The hardware keeps
that shape. Each entry call becomes a request/acknowledge channel, and the
task's variables become registers. The task's loops are run by a one-hot
control unit that drives a small datapath of registers, counters and equality
comparators.

A `Go` call does one of two things:

| INITNUM on `Go` | mode   | what happens |
|-----------------|--------|--------------|
| 1 .. 15         | NORMAL | Accept INITNUM address chunks from Inm_Srv and pass each one to the memory; together they form the base address of the parameter block. Then read eight parameter octets from the memory, then the type-of-service (TOS) table. |
| 0               | TEST   | Write the eight stored parameters and the stored TOS table back to the memory (a dump of the local store). |

`Go` is answered with `send_ok` (`go_bad = 0`). The exception is a TOS table
larger than the eight words on the chip: then the answer is `bad_srv_command`
(`go_bad = 1`).

## What is stored

| REG.CTR index | register        | bits | meaning |
|---------------|-----------------|------|---------|
| 0 | MAX-PACKET-LO | 8 | largest local-net packet, low octet |
| 1 | MAX-PACKET-HI | 8 | high octet |
| 2 | ADDR-LENGTH   | 8 | local-net address length |
| 3 | TIMEOUT-LO    | 8 | local-net waiting time, low octet |
| 4 | TIMEOUT-HI    | 8 | high octet |
| 5 | ACK-TYPE      | 1 | early/late acknowledge |
| 6 | TOS.COL.REG   | 3 | TOS row size: index of the last column |
| 7 | TOS.ROW.REG   | 3 | number of types of service: index of the last row |
| – | TOS[0..7]     | 8 x 8 | TOS translation table |

The parameters arrive in this order, one octet each. A narrow register keeps the
low bits of its octet and reads back zero-extended, so a TEST dump returns
`ACK-TYPE`, `TOS.COL.REG` and `TOS.ROW.REG` masked to 1, 3 and 3 bits.

## The TOS loops: the subtle part

The table is read in as a nested loop: rows outside, columns inside. Three
details matter.

**Register 6 and 7 hold last indices, not counts.** Each loop counts from 0 and
exits when its counter equals the register. So a table has
`(TOS.ROW.REG + 1)` rows of `(TOS.COL.REG + 1)` entries:

    entries = (TOS.ROW.REG + 1) * (TOS.COL.REG + 1)

**Loops start from -1.** The task writes its loops as "index := -1; loop
index := index + 1; ...". In hardware, a counter's `max` request loads all
ones, which is -1 in three bits. The following `inc` then gives 0. The column
counter is preset this way at the start of every row. The row counter is
preset once per table.

**One counter indexes both banks.** The register counter REG.CTR selects the
parameter register during the parameter loop and the TOS word during the table
loop. The table loop does not re-initialize it. After parameter 7 it holds 111,
and the table loop's first increment wraps it to 000. The `= 111` detector
(REG.CTR.EQ7) therefore does two jobs:

- It ends the parameter loop.
- It marks the last TOS word.

**Overflow.** If the word just moved was TOS[7] and it was not the last entry of
the table (column or row comparator not equal), the operation stops and `Go`
answers `bad_srv_command`. A table of more than eight entries therefore moves
exactly eight words before failing. The same check runs in TEST mode.

The memory traffic of one `Go` is therefore:

    NORMAL: INITNUM x LOAD_ADDRESS, 8 x RECV, min(entries, 8) x RECV
    TEST:   8 x SEND, min(entries, 8) x SEND

## Handshakes

**Inside the chip.** Every register and counter answers each request with
DONE, and the control unit waits for that DONE before it goes on. This keeps
the request/acknowledge structure of the original speed-independent circuit.
In this RTL, DONE comes one clock after the request:

- Write and counter requests are one clock wide, and so is their DONE.
- A read request (`re`) is a level. DONE follows it by one clock and stays high
  while the register drives the bus.

The TOS decoder and the register decoder route a request to the word selected
by REG.CTR. The matching done multiplexer returns that word's DONE.

**The three external channels** are four-phase: request up, acknowledge up,
request down, acknowledge down.

- `Go` (`go_req`/`go_ack`): INITNUM must be valid when `go_req` rises. It is
  loaded into INITNUM.REG at once, so the bus may change afterwards. `go_bad`
  is valid while `go_ack` is high.
- `Srv_req` (`srv_req`/`srv_ack`): the address chunk on `srv_chunk` is not
  latched. It goes straight out on `mem_chunk`. `srv_ack` rises only after the
  memory has acknowledged the chunk, so the server must hold the chunk until
  `srv_ack`.
- Memory (`mem_req`/`mem_ack`, kind on `mem_op`):
  - `MEM_LOAD_ADDRESS`: take `mem_chunk`.
  - `MEM_RECV_DATUM`: the memory drives the octet on the data bus and raises
    `mem_ack`. RIP writes it, then drops `mem_req`.
  - `MEM_SEND_DATUM`: RIP drives the octet and waits until its pads have
    settled. Only then does it raise `mem_req`.

**Pad settling** (`out_pad_sense`). Before RIP asks the memory to take an
octet, the driven value must be stable outside the chip. The chip judges this
by watching its own pad sample. Here, "stable" means `dbus_in` has been
unchanged for `PAD_STABLE_CLKS` clocks (default 2) while RIP drives the bus.

The 8-bit bidirectional data bus is given as three signals:

- `dbus_in`: the value at the pads, from whichever side drives.
- `dbus_out`: the value RIP drives.
- `dbus_oe`: RIP's drive enable.

The board or testbench resolves these into one bus.

## Blocks and files

| file | block |
|------|-------|
| `rtl/rip_pkg.sv`       | sizes, `mem_op_e`, `param_idx_e`, `params_t`, control/status structs |
| `rtl/rip_chip.sv`      | top: control unit + datapath + pad sense |
| `rtl/rip_control.sv`   | one-hot control unit (20 states) |
| `rtl/rip_datapath.sv`  | INITNUM.REG, INITNUM.CTR (4 bits), REG.CTR, TOS.COL.CTR, TOS.ROW.CTR (3 bits), TOS table, parameter registers, four comparators |
| `rtl/tos_table.sv`     | eight 8-bit words, TOS decoder, TOS done mux |
| `rtl/param_regfile.sv` | the eight parameter registers, register decoder, register done mux |
| `rtl/st_register.sv`   | self-timed register: write, read (bus driver), DONE |
| `rtl/st_counter.sv`    | self-timed up-counter: `inc`, `clr`, `max` (all ones), DONE |
| `rtl/eq_comparator.sv` | XNOR-bank equality comparator |
| `rtl/out_pad_sense.sv` | output settling detector |

### Top-level ports (`rip_chip`)

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `go_req`, `initnum` | in | 1, 4 | Go channel |
| `go_ack`, `go_bad` | out | 1, 1 | Go answer |
| `srv_req`, `srv_chunk` | in | 1, 4 | Srv_req channel |
| `srv_ack` | out | 1 | |
| `mem_req`, `mem_op`, `mem_chunk` | out | 1, 2, 4 | memory channel |
| `mem_ack` | in | 1 | |
| `dbus_in` | in | 8 | data bus at the pads |
| `dbus_out`, `dbus_oe` | out | 8, 1 | data bus driver |
| `state_onehot`, `test_mode`, `params`, `tos_words`, `initnum_q`, `reg_idx` | out | 20, 1, 43, 64, 4, 3 | state variables for observation |

The observation ports correspond to the state variables that the original chip
brought out to pads for testing.

## Where this RTL departs from the original chip

- **Clocked, not self-timed.** The original chip was speed-independent: its
  registers and counters had request/DONE circuitry and there was no clock.
  Here everything is synchronous to `clk`, and DONE has a fixed one-clock
  latency. The handshake structure is kept, but no timing behaviour of the
  real circuit is claimed.
- **Control unit.** The original control unit had 12 states and 17
  transitions. It used conditional outputs to avoid states for most rendezvous
  steps. Its state graph is not available, so `rip_control` is a new one-hot
  machine with one state per datapath request (20 states). The order of
  operations follows the task.
- **Overflow test.** The task text compares the index with the table size. The
  hardware has only the `= 111` detector on REG.CTR, so the check is made on
  the last word (index 7). This design reads both as the same rule: overflow
  when TOS[7] has been used and the table is not yet complete.
- **Address chunks.** The chunks arrive on their own 4-bit input, `srv_chunk`,
  separate from `initnum`, and are forwarded unlatched. The original described
  a single 4-bit bus that carried INITNUM first and the chunks after it.
- **The first silicon's fault is not reproduced.** On the first chips, the TOS
  row comparator was wired so that it compared correctly only when the row
  register was zero. Such chips worked only with one-row tables. This RTL
  compares TOS.ROW.CTR with TOS.ROW.REG, which is the intended behaviour.
- **Counter count.** The original was summarized as controlling "three
  counters". Its block diagram shows four: INITNUM.CTR, REG.CTR, TOS.COL.CTR and
  TOS.ROW.CTR. All four are built.
- **Not modelled:**
  - the hysteresis input pads;
  - the microprobe pads;
  - the surrounding tasks (Inm_Out, Inm_Srv, memory);
  - the host-side test system (parallel interface chips, I/O processor, host).

  The testbenches model the surrounding tasks.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a testbench that hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/rip_pkg.sv rtl/*.sv \
        tb/tb_rip_chip.sv --top-module tb_rip_chip
    ./obj_dir/Vtb_rip_chip

For another block, replace the testbench file and top name.

| testbench | what it checks |
|-----------|----------------|
| `tb_rip_chip` | Whole chip at its default parameters, against models of Inm_Out, Inm_Srv and the memory with random delays, and pads that show changing wrong values for a few clocks before settling. 18 load/dump pairs: one-row, multi-row, exactly-full, overflowing and random tables; 1 to 15 chunks. Checks the responses, the chunk values and the moment they are forwarded, the parameters and table stored, the dumped octets, and that no SEND is requested before the pads settle. Counts each mechanism (NORMAL, TEST, chunk forwarding, multi-row, overflow, pad wait) and fails if one never occurs. |
| `tb_rip_control` | Control unit alone, against a behavioural datapath: order and number of memory requests, responses, mode, values moved. |
| `tb_rip_datapath` | Datapath driven request by request: INITNUM compare, REG.CTR preset/wrap/`= 111`, bank selection, bus reads, column/row comparators. |
| `tb_tos_table`, `tb_param_regfile` | Decoding, enables, DONE, widths, read-back. |
| `tb_st_register`, `tb_st_counter`, `tb_eq_comparator`, `tb_out_pad_sense` | Leaf blocks against reference models; the comparator exhaustively. |

The original chip specified no latency or rate, so the testbenches check DONE
timing and ordering, not throughput.

## Changing it

- The sizes are in `rip_pkg`. The TOS table depth and word width are
  parameters of `tos_table`.
- The control unit assumes three-bit indices: the overflow detector is
  REG.CTR `= 111`. A larger table needs a wider REG.CTR and the detector
  compared with the new last index.
- `PAD_STABLE_CLKS` on `rip_chip` sets how long the pad sample must stay
  unchanged.
