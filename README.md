# Command-list controller for FPGAs behind high-latency links

Modern host links (PCIe, Gigabit Ethernet, USB) move blocks of data quickly,
but every single read costs a full round trip: a command packet to the FPGA and
a response packet back. A minimum-size Ethernet frame of 72 bytes at 1 Gb/s
already makes that round trip at least 2 × 72 × 8 ns = 1152 ns. Control
software usually runs handshakes — write a register, poll a status bit until it
is set, then write again — and so pays that round trip over and over.

This design moves the handshakes into the FPGA without building an
application-specific controller there. The host sends a whole **list of simple
commands** in one packet: block writes, block reads, read-modify-write, "read
and test", and "read and test repeatedly until the condition holds". A small
controller executes the list at internal-bus speed. It keeps read results in an
output buffer and returns them in as few packets as possible. If every test
passes, the host gets its data and a "done" word. If a test or a bus access
fails, execution stops, and the host is told which command failed, why, and
with what values. The host software then fixes what it can and sends the
remaining part of the procedure again. The link latency is paid once per list,
not once per handshake. A standard mode, with one response packet per
command, is also available.

```
 host ──link──▶ input_buffer ──▶ cmd_controller ──▶ bus_master ──▶ internal_bus ──▶ block 0
      ◀──link── output_buffer ◀──┘    │  (rmw_alu, test_unit)                  ├─▶ block 1
                                      └─ std_mode                                └─▶ block 2
```

## Files

| file | contents |
|---|---|
| `rtl/ctrl_pkg.sv` | widths, command and response encodings, bus structs |
| `rtl/fpga_ctrl_top.sv` | top: everything below, with the internal-block ports brought out |
| `rtl/input_buffer.sv` | packet FIFO; offers a packet to the controller only once all of it has arrived |
| `rtl/cmd_controller.sv` | the sequencer that executes commands |
| `rtl/rmw_alu.sv` | read-modify-write operations |
| `rtl/test_unit.sv` | test conditions |
| `rtl/bus_master.sv` | one internal-bus access at a time, with a timeout |
| `rtl/internal_bus.sv` | address decoder / answer multiplexer for N internal blocks |
| `rtl/output_buffer.sv` | result buffer and response-packet builder |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_reg_slave.sv`, a register-block model |

## Command format

All words are 32 bits wide, addresses included. Each command begins with a
header word, and its argument words follow in a fixed order:

```
header: [31:28] opcode  [27:24] sub-op  [23:16] 0  [15:0] length
```

| opcode | command | sub-op | words after the header | written to the output buffer |
|---|---|---|---|---|
| 1 | WRITE | address mode | address, data × length | nothing |
| 2 | READ | address mode | address | data × length |
| 3 | RMW | ALU op | address, operand (none for INC/DEC) | original value |
| 4 | TEST | test op | address, value — or mask, required | nothing |
| 5 | MTEST | test op | retries, interval, address, value — or mask, required | address, retries used, final value |
| 6 | SYNC | – | – | sends the buffer contents as a packet now |

* **Address mode**: 0 increment, 1 decrement, 2 keep (for FIFO ports). The
  address counts words.
* **ALU op**: 0 INC, 1 DEC, 2 ADD, 3 SUB, 4 AND, 5 OR, 6 XOR. ADD and SUB
  wrap modulo 2³².
* **Test op**: 0 signed `<`, 1 unsigned `<`, 2 signed `>`, 3 unsigned `>`,
  4 `(v & mask) == required`, 5 `(v | mask) == required`. The comparisons are
  strict. The two mask tests take two argument words; the others take one.
* **MTEST** runs up to `1 + retries` trials. Between trials it waits
  `interval` idle clock cycles. On success it reports how many retries it used
  (0 if the first trial passed).
* A READ or WRITE with length 0 does nothing. No command modifies a register it
  only tests.

The last word of the input packet marks the end of the list. It is flagged by
`in_last` on the input stream.

## Response packets

Every response packet is zero or more result words followed by a **trailer**:

```
trailer: [31:28] kind  [27:24] exception code  [23:0] command index
```

| kind | sent when | index |
|---|---|---|
| 1 FULL | the output buffer holds `OBUF_DEPTH` words; the list goes on | command executing |
| 2 CMD | standard mode, after each command except the last | that command |
| 3 SYNC | a SYNC command | the SYNC command |
| 4 DONE | the list ended without an exception | number of commands executed |
| 5 EXC | a command failed; the rest of the list was discarded | failing command |

Command indices count from 0 within the list. The host knows the list it sent,
so it can split the result words of the packets among its commands in order.
After an exception, the words just before the trailer are the
**exception record**:

| code | cause | record words |
|---|---|---|
| 1 | bus error in WRITE | address, data word |
| 2 | bus error in READ, TEST or MTEST | address |
| 3 | bus error on the read of an RMW | address, 0, 0 |
| 4 | bus error on the write of an RMW | address, original value, new value |
| 5 | TEST condition failed | address, header word, argument 0, argument 1 (0 if unused), value read |
| 6 | MTEST failed on every trial | same as 5, with the value of the last trial |
| 7 | unknown opcode or sub-op | header word |
| 8 | the list ended in the middle of a command | header word |

A record may span two packets: when the buffer fills up, a FULL packet goes out
first. The words a failing block transfer had already read stay in front of
the record. For a WRITE that fails at word k, words 0 … k−1 have been written.

## How the controller works

`cmd_controller` is a single state machine:

1. **Fetch.** It pops the header. It then pops as many argument words as the
   opcode and sub-op call for, one per cycle. WRITE data words are popped later,
   one per bus write.
2. **Execute.** Each bus access goes through `bus_master`, one at a time. RMW
   reads, computes the new value in `rmw_alu`, and writes it back. TEST and MTEST
   read and evaluate `test_unit`. MTEST counts its retries and waits `interval`
   cycles in a delay state between trials.
3. **Report.** Result words go into the output buffer. The controller waits
   whenever the buffer is full or is sending a packet. Status and exception
   records go out the same way. Then the controller asks the buffer for a
   packet with the trailer fields. The buffer acknowledges when it takes the
   request.
4. **Abort.** After an exception packet it pops and drops the remaining words
   of the list, up to the end-of-list word, and then waits for the next list.

Cycle costs, with `L` the extra latency of the addressed block (0 means the
block answers the cycle after the request):

| step | cycles |
|---|---|
| per command: header, decode, setup, completion | 5, plus 1 per argument word |
| each word written | L + 4 |
| each word read | L + 5 |
| RMW | 2L + 9 |
| each (M)TEST trial | L + 6 + interval, between trial starts |
| report / trailer hand-over | 1 per record word, 1–2 for the flush request |

`output_buffer` sends a packet of n stored words in n + 1 cycles when the link
is always ready.

## Internal bus

The bus carries one transfer at a time. The request struct is `lbus_req_t`
(`req`, `we`, `addr`, `wdata`). The master holds `req` and the other fields
until the block raises `ack` or `err` of `lbus_rsp_t` for one cycle, with
`rdata` valid when `ack` is raised.

* `internal_bus` selects block `addr[31:16]` and passes `addr[15:0]` on as the
  local address. Its upper 16 output bits are therefore always 0.
* An address with no block behind it gets `err` in the same cycle.
* `bus_master` turns a block that does not answer within `BUS_TIMEOUT` cycles
  into a bus error. One broken block therefore aborts the list instead of
  hanging it.

## Parameters of `fpga_ctrl_top`

| parameter | default | meaning |
|---|---|---|
| `IBUF_DEPTH` | 1024 | input buffer words; the longest list that can be sent |
| `OBUF_DEPTH` | 256 | result words per response packet, trailer excluded |
| `BUS_TIMEOUT` | 256 | cycles before an unanswered access is a bus error |
| `N_SLV` | 3 | internal blocks |
| `SLV_AW` | 16 | local address bits per block |

A list longer than `IBUF_DEPTH` words can never complete and stalls the link.
Keep host packets within the depth.

## What comes from the concept, and what is this design's own

The concept fixes these parts: the structure (a host link, a controller on an
internal bus, internal blocks), the input and output buffers, and the rule that
a packet is sent when the buffer is full or on an error. It also fixes the five
commands with their arguments, the three address modes, the seven RMW and six
test operations, and what each result and exception must contain. Finally it
gives the abort-and-report behaviour, the SYNC command of the write/read
caching scheme it builds on, and the standard mode.

This design chooses everything else:

* every bit encoding
* the trailer word
* 32-bit words and addresses
* reading "number of retries" as trials after the first
* measuring the retry interval in clock cycles
* the bus protocol and its timeout
* the address map
* the buffer depths
* the two extra exceptions (unknown command, truncated list)
* the rule that a single passing TEST writes nothing

The record of a failed test identifies the operation by the command's header
word. The concept describes the read command's address argument with the same
wording as the write command's. Here it is the address of the first word read.

Not part of the RTL:

* the link itself: the top offers valid/ready packet streams where a PCIe,
  Ethernet or USB core would connect;
* the internal blocks, which depend on the application: their bus ports are the
  `s_req` / `s_rsp` arrays of the top;
* the host software.

## Verification

Each testbench computes its expected values on its own, ends with a
`TB_RESULT checks=N failures=M` line, and has a watchdog.

* `tb_rmw_alu`, `tb_test_unit`: corner cases plus random operands against
  reference functions. The corner cases include wrap-around and values that
  separate signed from unsigned.
* `tb_bus_master`: writes, read-back, errors, and a timeout against
  `tb_reg_slave`. It checks the cycle counts.
* `tb_internal_bus`: routing, local addresses, returned answers, and unmapped
  errors.
* `tb_input_buffer`: a packet is not visible before its last word arrives; the
  buffer queues packets, fills up, and is read with random gaps.
* `tb_output_buffer`: explicit, empty and automatic (full) flushes, trailer
  contents, back-pressure, and drain timing.
* `tb_cmd_controller`: the controller against models of its three neighbours,
  with random stalls. It covers every command and address mode, the ALU and
  test operations, every exception code, SYNC, standard mode, discarding after
  an exception, and MTEST trial spacing.
* `tb_fpga_ctrl_top`: end to end at the default parameters. A host model sends
  lists with random gaps and takes responses with random back-pressure. Three
  register blocks answer with latencies 0, 1 and 3. The lists include:
  * the classic handshake "write 0xa0 to 0x10, wait for bit 7 of 0x11, write
    0x00 to 0x10", run as a single list;
  * a 300-word block write and read-back, which overflows the 256-word buffer;
  * all RMW operations;
  * passing and failing tests;
  * errors from unmapped and silent blocks;
  * unknown and truncated commands;
  * standard mode.

  The testbench counts each mechanism (full flush, SYNC, done, standard-mode
  packets, MTEST success and retries, each exception, packet wait, output
  stall, bus timeout) and fails if any of them never happened.

* `tb_procedure_abc`: the intended way of using the controller, for a
  procedure in three stages A, B and C, each ending with a final test. The
  host keeps a "completed" and a "failed" flag per stage. It puts every stage
  not yet completed into one list, with a recovery step in front of each
  stage that failed last time. It sends the list, and from the index of a
  failed command it learns which stages are done. Stage B's hardware becomes
  ready too late for the first list, so the procedure takes two lists, and
  stage A is not repeated. A second part runs the handshake against a block
  that never becomes ready. The wait is set to about 10 µs, which is 1000
  cycles assuming a 100 MHz clock. The exception arrives after 1042 cycles,
  and the closing write never happens.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_fpga_ctrl_top rtl/ctrl_pkg.sv tb/tb_fpga_ctrl_top.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run another one. The testbenches
make no assumptions about the initial values of uninitialised state.
