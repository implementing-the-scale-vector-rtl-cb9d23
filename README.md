# Scale vector-thread processor: memory system and datapath RTL

Scale is a vector-thread processor for embedded workloads. A scalar control
processor drives a vector-thread unit of four lanes, and each lane holds four
decoupled execution clusters (C0 to C3). Software configures how many
registers each virtual processor (VP) uses. This sets how many VPs fit in the
lanes, and so the vector length. The VPs run either as a vector machine under
vector commands or as independent threads. Every load and store goes to one
shared, nonblocking, four-bank cache of 32 KB. Up to four accesses from 11
requesters proceed in each cycle.

This repository holds synthesizable SystemVerilog for the parts of that chip
whose behaviour is well defined:

- the whole memory system: arbiter, crossbars, tag CAMs, MSHRs, data banks
  and the external memory link;
- the cluster datapaths: register file, ALU and multiply/divide;
- the vector-length logic;
- the vector load/store address generators;
- the two preplaced datapath cells used as examples of the chip's datapath
  style;
- the clock generator, plus a behavioural model of its VCO.

All of these are wired together in the top module, `scale_chip`. The
instruction-level parts are not included: the control processor, the
command-management unit, the AIB caches and the thread-fetch logic. Their
connection points are ports of the top (see "What is not here").

## Memory system (`memory_system`)

The memory system is the most intricate part of the design and the
best-specified part of the RTL.

### Address map

The cache uses 32-byte lines and 128-bit (16-byte) words. A 32-bit byte
address splits up as follows:

| bits    | use                                         |
|---------|---------------------------------------------|
| [3:0]   | byte in the 128-bit word                    |
| [4]     | word in the 32-byte line                    |
| [6:5]   | bank (consecutive lines go to consecutive banks) |
| [9:7]   | set: one of the 8 tag-CAM subbanks of the bank |
| [31:10] | tag, 22 bits                                |

Each bank has 8 sets of 32 ways, so 8 × 32 lines × 32 B = 8 KB. The data
RAM of a bank is 512 words of 128 bits, addressed as `{set, way, word}`.

In **on-chip RAM mode** (`ram_mode=1`), tags and misses are switched off and
every access hits. The RAM word index is then `{addr[14:7], addr[4]}`, with
the bank still taken from `addr[6:5]`. The 32 KB therefore appear as one
contiguous byte range from 0 to 0x7FFF, and higher address bits are
ignored. This mode is the chip's basic test mode.

### Requests and responses

Each of the 11 requesters presents the following and holds it until
`req_ready`:

- `req_valid`
- `req_we`
- a byte address
- 16 byte enables
- a 128-bit write data word

Narrow requesters place their bytes in the matching lanes of the word.

Requester numbers used by `scale_chip`:

| number | requester          |
|--------|--------------------|
| 0      | control processor  |
| 1      | host interface     |
| 2      | AIB fill unit      |
| 3      | VRU                |
| 4      | VLU                |
| 5      | VSU                |
| 6–9    | lanes 0–3          |
| 10     | spare              |

Each bank has its own round-robin pointer in the arbiter (`cache_arbiter`),
which grants one of the requesters that address that bank. A grant requires
the bank to be ready. A bank's readiness never depends on the request
offered to it, so the arbiter/bank loop stays free of combinational paths.

The address and write crossbars (`addr_xbar`, `write_xbar`) are
per-bank multiplexers. The read crossbar (`read_xbar`) sends each bank's
response to the requester named by the 4-bit id carried with it. If two
banks answer the same requester in one cycle, the lower bank wins. The other
bank keeps its response and stalls for that cycle; the crossbar has no
buffer.

Every accepted request gets exactly one response cycle, whether it is a load
or a store. A hit answers in the cycle after it is granted. A miss answers
once its line has been filled. Responses to one requester can therefore come
back out of order. A requester that cares about order must tag or limit its
outstanding requests.

### Hit and miss flow in a bank (`cache_bank`)

1. **Lookup.** In the cycle a request is accepted, the tag CAM of its set
   (`tag_cam`, 32 entries) is searched in parallel.
   - On a hit, the data RAM (`cache_data_bank`) is read or written with byte
     enables. The response follows one cycle later.
2. **Miss.** The line address is compared against all 32 MSHRs (`mshr_file`).
   - *Primary miss*: no MSHR tracks the line. A free MSHR is allocated and the
     request is stored in its replay slot 0. The MSHR index joins a refill
     queue to the memory interface.
   - *Secondary miss*: an MSHR already tracks the line. The request is added
     to that entry's replay queue, which holds up to 4 secondary misses. No
     second refill is sent.

   The bank keeps serving hits and recording misses while refills are
   outstanding; this is what makes the cache nonblocking.
3. **Accept rule.** The bank takes a new request only when all of these hold:
   - a free MSHR exists;
   - every valid MSHR still has a free replay slot;
   - the refill queue has room.

   This is stricter than necessary but keeps `req_ready` independent of the
   address. Otherwise the requester retries.
4. **Fill.** The memory interface delivers the whole 256-bit line as a
   one-cycle pulse tagged with the MSHR index. The bank stops accepting
   requests and picks a victim way with its per-set round-robin pointer.
   - If the victim is valid and dirty, it reads both words of the victim
     line and queues a writeback.
   - It writes both words of the new line and installs the tag, clean.
5. **Replay.** The recorded requests are replayed in arrival order, one per
   cycle, each with a normal response. The MSHR is then freed. Stores set
   the line's dirty bit.

The cache is write-back and write-allocate. A store miss fetches the line and
then performs the store during replay.

### External memory link (`mem_interface`)

The memory interface holds one transaction at a time and serves the four
banks' miss ports in round-robin order. The pins are a 32-bit output port and
a 32-bit input port. `mem_mode` sets how many bits each beat carries:

| `mem_mode` | bits per beat | beats per word |
|------------|---------------|----------------|
| 0          | 8             | 4              |
| 1          | 16            | 2              |
| 2          | 32            | 1              |

A narrow mode uses the low pins, least significant part first.

A transaction is:

- **Command word:** `{is_writeback, 4'b0, line_address[26:0]}`.
- **Writeback:** the command word, then the line's 8 32-bit words, low word
  first, all on the output port.
- **Refill:** the command word on the output port. The memory controller then
  returns 8 words on the input port.

Output beats use a valid/ready handshake (`mem_out_valid`/`mem_out_ready`).
Input beats are qualified by `mem_in_valid` alone, and the controller must
return them in order.

Change `mem_mode` only while the link is idle. Because of the MSHRs, the
cache still serves hits while a transfer is under way. `tb/ext_mem_model.sv`
is a memory controller that speaks this protocol, with configurable latency
and stalls.

## Clusters (`cluster`, `regfile`, `cluster_alu`, `muldiv`)

Each cluster runs one decoded operation per cycle (`cl_op_t` in
`scale_pkg`). An operation names:

- source registers, or an immediate for operand B;
- a destination register;
- an ALU operation or a multiply/divide operation.

Operand B goes through a `dp_mux2`, which chooses between register and
immediate.

**Register file (`regfile`).** 32 × 32-bit, with two read ports and two write
ports. Write port 0 takes the cluster's own results. Write port 1 takes
external writebacks (`cl_wb_*`), for example data from other clusters or
from the load queues. If both ports write the same register in one cycle,
port 1 wins. Reads are combinational and return the old value in a cycle
that writes the same register.

**ALU (`cluster_alu`).** Supports ADD, SUB, AND, OR, XOR, NOR, SLL, SRL, SRA,
SLT and SLTU. The adder, logic unit and shifter each receive operands
through AND gates that are open only when that unit is selected. This is
the data gating that keeps idle units from toggling.

**Multiply/divide (`muldiv`, C3 only).**
- The 16×16 multiply finishes in the cycle after `start`.
- The 32-bit signed and unsigned multiply and divide are iterative,
  one bit per cycle. Each takes 33 cycles from `start` to `done`.
- Divide by zero returns an all-ones quotient and the dividend as
  remainder.
- While an operation is running, `cl_busy` is high. The sequencer must hold
  further operations until it falls: the cluster ignores them, and an
  assertion flags the attempt.

Results appear registered on `cl_res_valid`/`cl_result` one cycle after the
operation. Each result also passes through a `dp_latch_h_en`, clocked by the
inverted core clock, onto the lane transport bus (`xport_data`). This is the
latch-based, clock-gated datapath style of the chip.

## Vector length and vector memory commands

**Vector length (`vlmax_calc`).**
`vlmax = LANES × floor(32 / max(nregs[C0..C3]))`. A count of 0 counts as 1,
so one register per VP gives 128 VPs.

**Address generation (`vec_addr_gen`).** The VLU and the VSU each take a
command (`vcmd_t`): base, stride, element size, elements per segment,
vector length, and a unit-stride flag.

- **Unit-stride commands** become one access per 16-byte cache word that the
  vector touches.
- **Segment-strided commands** become one access per VP at
  `base + vp × stride`. Each access carries the VP's lane (`vp mod 4`) and
  its index. A segment must not cross a 16-byte word.

`done` pulses together with the last accepted access. At the top:

- VLU read data leaves on `vlu_rsp_*`;
- VSU store data enters on `vsu_wdata`/`vsu_be` for the access shown on
  `vsu_acc_*`.

## Clocking (`clock_gen`, `vco`)

The root clock is either the VCO or `ext_clk`, selected by `clk_sel_ext`.
`clock_gen` divides it by `clk_div + 1`, from 1 to 32. For odd divisors the
high phase is the shorter one. The select is a plain multiplexer, so switching
roots can glitch; switch only while in reset.

`vco` is a behavioural model of the analog oscillator, not synthesizable. Its
period is 3846 ps (260 MHz) at 1800 mV on the control input and scales
linearly with the voltage.

The top's core clock is the divider output, brought out as `core_clk`. All
synchronous logic runs on it.

## What is not here

The top exposes ports where these parts would connect. None of them is
modelled:

- **Control processor.** Drive requester 0 through `ext_req_*`, and
  `nregs`.
- **Command-management unit, AIB caches and execute-directive sequencers.**
  The clusters take decoded operations on `cl_op` instead.
- **AIB fill unit, vector-refill unit and host interface.** They are
  requesters 2, 3 and 1 on `ext_req_*`.
- **Cross-VP queues, lane transport/writeback decoupling queues, and the
  store-data cluster.** Cross-cluster data enters through `cl_wb_*`.
- **Per-lane load/store data queues and segment buffers.**
- **DDR transfer mode and forwarded memory clock** of the memory link.
- **Digital phase tuning** of the memory clock.
- **Pads, package and test board.**

## Where the RTL departs from the chip

- **Tag CAMs and register files** use ordinary flip-flops. The chip used
  custom latch and XOR CAM cells and latch-based register files with
  hierarchical bit-lines. The function is the same.
- **`dp_mux2`** is a behavioural two-input mux. The preplaced version is built
  from NAND2 cells.
- **`dp_latch_h_en`** is a latch pair: an enable latch that is transparent
  while the clock is low, and a data latch that is transparent while the
  clock is high and the enable is set.
- **Chosen here, not taken from the chip:**
  - the line size (32 B) and the address-bit assignment;
  - the victim policy, write policy and accept rule;
  - the response ordering;
  - the memory packet format and handshakes;
  - the multiply/divide algorithm and latency;
  - the ALU operation set;
  - the vlmax formula's handling of zero;
  - the requester numbering;
  - the use of the datapath latch on the transport bus.
- **Refills stall the bank.** While a refill is written and replayed, the
  bank refuses new requests, for about 4 + 1 to 5 cycles.
- **No timing tuning.** The RTL makes no attempt to match the chip's timing
  or its preference for the on-chip RAM mode.

## Parameters

Defaults follow the chip:

| name    | default | meaning                                  |
|---------|---------|------------------------------------------|
| `NREQ`  | 11      | requesters                               |
| `NBANK` | 4       | banks                                    |
| `SETS`  | 8       | sets per bank                            |
| `WAYS`  | 32      | ways per set                             |
| `MSHRS` | 32      | MSHRs per bank                           |
| `REPLAYS` | 4     | secondary misses per MSHR                |
| `BANK_WORDS` | 512 | 128-bit words per bank                  |
| `LANES` | 4       | lanes; clusters per lane fixed at 4      |
| `MAXDIV` | 32     | largest clock divisor                    |

The cache geometry constants live in `rtl/scale_pkg.sv`. `LANES` is a
parameter of `scale_chip`.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/scale_pkg.sv tb/tb_cache_bank.sv --top-module tb_cache_bank
./obj_dir/Vtb_cache_bank
```

`tb_scale_chip` runs the whole top at default parameters, in about a minute.
It runs in this order:

1. It starts on the VCO model, then switches to the external clock divided
   by 3, then undivided.
2. In on-chip RAM mode, it does the following:
   - stores a block through the control-processor port;
   - reads the block back with a unit-stride vector load;
   - stores a segment-strided vector with the VSU;
   - runs operations on every cluster, including C3 multiplies and
     divides.
3. After a reset it repeats the memory traffic in caching mode, over the
   16-bit memory link, against the external memory model.

It checks every load and cluster result against reference values. It counts
these mechanisms and fails if any never occurs:

- hits;
- primary and secondary misses;
- replays;
- dirty writebacks;
- refills and writebacks on the link;
- bank conflicts;
- multiply/divide operations;
- transport-latch updates;
- vector loads and stores;
- control-processor port accesses.

`tb_mem_interface` exercises all three link modes.

The testbenches are two-state clean: everything that is read is reset.
