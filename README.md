# Multi-resolution AHB bus tracer with real-time compression

An on-chip bus tracer is a passive observer: it copies what happens on a bus
into an on-chip memory so that it can be read out later and viewed as a
waveform. It runs into a size problem quickly. Recording every signal on every
cycle of an AMBA AHB bus costs about a hundred bits per cycle, so a few
kilobytes of trace memory hold only a few hundred cycles.

This tracer attacks that problem in two ways:

* **Multi-resolution tracing.** The user chooses how much detail to keep, and
  can change that choice while a trace is running. Detail can be dropped in two
  directions. *Signal abstraction* replaces groups of signals with a summary.
  *Timing abstraction* records values only when they change, not on every
  cycle. A trace can be detailed around the interesting moment and coarse
  everywhere else.
* **Real-time compression.** Each recorded field is compressed on the fly by a
  method that suits the field. Addresses are mostly sequential or repeat.
  Data tends to change by small amounts. Control signals take only a few
  combinations.

The top module is `ahb_tracer` (`rtl/ahb_tracer.sv`). It accepts one bus cycle
per clock, writes 32-bit trace words into a 16 KB circular trace memory, and
has five pipeline stages.

## Trace modes

| mode | number | signals recorded | when a record is written |
|------|--------|------------------|--------------------------|
| FC | 1 | address, data, control (HWRITE, HBURST, HSIZE, HPROT, HMASTER = 15 bits), protocol signals (HTRANS, HREADY, HRESP = 5 bits) | every traced cycle |
| FT | 2 | same as FC | only when a field changes |
| BC | 3 | address, data, 4-bit bus state | every traced cycle |
| BT | 4 | same as BC | only when a field changes |
| MT | 5 | address and data only | only when a field changes |

FC is the most detailed mode and MT the smallest. The cycle-level modes (FC
and BC) still leave out a field whose value has not changed.

In the transaction-level modes, every record carries a cycle gap, `delta`: the
number of traced cycles since the previous record. It is coded as a single
bit when it is 1, and as 7 bits otherwise. A quiet bus can produce no
record for a long time. So when `delta` would overflow (63 cycles), an empty
record is written to keep the cycle count exact.

### Bus state

In modes BC and BT, the control and protocol signals are replaced by one 4-bit
state from the bus state machine (`rtl/bsm.sv`). The state summarises what the
current master is doing:

| value | state | meaning |
|-------|-------|---------|
| 0 | ORIGIN | master does not own the bus |
| 1 | START | first transfer after getting the bus or after idling |
| 2 | NORMAL | transfers going through (HREADY high, NONSEQ or SEQ) |
| 3 | WAIT_SLAVE | slave inserts wait states (HREADY low, OKAY) |
| 4 | IDLE | IDLE or BUSY transfers |
| 5 | ERROR | ERROR response |
| 6 | RETRY_SPLIT | RETRY or SPLIT response |
| 7 | RESET | bus in reset |
| 8 | WAIT_MASTER | response finished, waiting for the master to start again |

Transitions, with "grant" meaning the current master's grant:

* RESET → ORIGIN when reset is released.
* ORIGIN → START on grant, HREADY high and a NONSEQ transfer.
* From START, NORMAL and WAIT_SLAVE, the first matching rule wins:
  - HRESP = ERROR → ERROR;
  - HRESP = RETRY or SPLIT → RETRY_SPLIT;
  - HREADY low with OKAY → WAIT_SLAVE;
  - HREADY high with NONSEQ or SEQ → NORMAL;
  - HREADY high with IDLE or BUSY → IDLE.
* IDLE and WAIT_MASTER:
  - → ORIGIN when the grant is lost;
  - → START on HREADY high with NONSEQ or SEQ.
* ERROR → WAIT_MASTER on HREADY high with ERROR, at the second cycle of the
  response.
* RETRY_SPLIT → WAIT_MASTER on HREADY high with RETRY or SPLIT.
* Otherwise the state is held.

A record holds the state that the recorded bus cycle leads to.

The master's grant is taken as `HGRANT[HMASTER]`. WAIT_MASTER has no
customary number, so this design gives it 8.

## Pipeline

```
bus ─► event_gen ─► abstraction ─► compression ─► packer ─► bit_fifo ─► circ_buf_mgr ─► trace_mem
       (stage 1)    (stage 2)      (stage 3)      (stage 4: 512-bit FIFO) (stage 5)       ▲
       event regs   bsm            addr_compressor                                       host read
       trigger_ctrl                data_diff, cam_dict
```

1. **event_gen** holds the configuration registers, two event registers and the
   trigger controller. For each bus cycle it decides whether the cycle is traced
   and in which mode. It then registers the bus sample with flags: `active`,
   `sync` (first cycle of a segment, at start or on a mode change), `stop`
   (end of trace) and `mode`.
2. **abstraction** takes the address from address phases (NONSEQ or SEQ). It
   takes data from completed data phases, picking HWDATA or HRDATA by the
   direction of the matching address phase, which it remembers across the AHB
   pipeline. It chooses the fields of the current mode and keeps only the
   fields that changed.
3. **compression** encodes each field:
   * **Address, in three steps.**
     - An address equal to the previous address + 4 costs only its 2-bit code
       (`A_SEQ`). This filters out the straight runs of an instruction stream.
     - Any other address is looked up in a 16-entry CAM dictionary. A hit costs
       a 4-bit index (`A_HIT`).
     - A miss (`A_MISS`) records only the low bytes of the address, up to the
       highest byte that differs from the previous address ("slicing"). A 2-bit
       byte count goes in front. The missed address is then stored in the
       dictionary, in entries 0, 1, 2, … in turn, starting again at entry 0
       once the dictionary is full.
   * **Data** is stored as its difference from the previously recorded value:
     8 signed bits (`D_D8`), 16 signed bits (`D_D16`), or the full 32-bit value
     (`D_FULL`).
   * **Control**: the 15 control bits are looked up in an 8-entry CAM
     dictionary. A hit costs a 3-bit index (`C_HIT`). A miss costs the 15 bits
     (`C_MISS`), which are stored the same way as addresses.
4. **packer** turns each record into one variable-length packet, up to 128
   bits. It adds segment markers and writes the packet into **bit_fifo**, a
   512-bit FIFO with bit granularity that hands out 32-bit words.
5. **circ_buf_mgr** writes each word into **trace_mem**, a 4096 × 32 array
   with a separate synchronous read port for the host.

Every stage boundary is a register. A bus cycle reaches the trace memory about
four clocks after it appeared on the bus, plus the time the packet waits in the
FIFO for a full word.

## Packet format

All packets go into the word stream least significant bit first: bit 0 of
word 0 comes first. Fields are written LSB first too.

**Marker** (5 bits): `kind=1`, `mode[2:0]`, `overflow`.
- A marker with `mode` 1–5 starts a segment in that mode. One is written at
  trace start and at every mode change.
- `overflow=1` means packets were lost just before it (see below).
- `mode=0` ends the trace. After it, the FIFO is flushed with zero padding.

**Record**: `kind=0`, `a_code[1:0]`, `d_code[1:0]`, `c_code[1:0]`, `s_p`, then:
- the cycle gap, if the mode is transaction-level or the record directly
  follows a marker: a `1` bit for a gap of one cycle, otherwise a `0` bit and
  `delta[5:0]`;
- the address payload:
  - `A_NONE=00`: nothing;
  - `A_SEQ=01`: nothing;
  - `A_HIT=10`: 4-bit index;
  - `A_MISS=11`: 2-bit count−1, then that many bytes;
- the data payload:
  - `D_NONE=00`: nothing;
  - `D_D8=01`: 8 bits;
  - `D_D16=10`: 16 bits;
  - `D_FULL=11`: 32 bits;
- the control payload:
  - `C_NONE=00`: nothing;
  - `C_HIT=10`: 3-bit index;
  - `C_MISS=11`: 15 bits `{HWRITE, HBURST, HSIZE, HPROT, HMASTER}`;
- if `s_p` is set, the status field: 5 bits `{HTRANS, HREADY, HRESP}` in FC/FT,
  or the 4-bit bus state in BC/BT.

The decoder's rules:

* After every marker, clear all history: previous address and data = 0, both
  dictionaries empty, both dictionary write pointers = 0. The compressor does
  the same, so the first record of a segment refers to nothing older.
* A field whose code is `NONE`, or an absent status field, keeps its previous
  value.
* An `A_MISS` address is the previous address with its low bytes replaced. Like
  a `C_MISS` control value, it is then written into the decoder's copy of the
  dictionary at the next pointer position.
* In cycle-level modes, each record is one traced cycle. In transaction-level
  modes, a record is `delta` traced cycles after the previous one.

The reference decoder in `tb/tb_ahb_tracer.sv` (task `decode`) follows exactly
these rules.

## Overflow

The bus produces records faster than 32 bits per cycle in the detailed modes,
and the 512-bit FIFO absorbs the bursts. If a packet does not fit, the packer
does four things:

- it drops the packet and counts it in `drops`;
- it tells the compression stage to restart its history (`resync`) and to force
  every field of the mode into the next record;
- it keeps doing this until a packet fits;
- it puts a marker with `overflow=1` in front of the packet that fits.

The decoder therefore loses the dropped cycles, knows that it lost them, and
resumes with the correct values. The end marker is never dropped. It waits for
room.

## Triggering and trace direction

A run starts when the host writes the arm bit. Two directions are supported:

* **Pre-trigger (pre-T).** Tracing starts at once. The memory is a true
  circular buffer, so it always holds the latest 4096 words. After the trigger,
  `depth` more words are written, then tracing stops. The memory shows what led
  up to the trigger.
* **Post-trigger (post-T).** Tracing starts at the trigger. It stops after
  `depth` words, or when the memory is full; once full, the memory keeps the
  oldest words. The memory shows what followed the trigger.

The trigger is the OR of two things, for both directions:
- any event register set up to trigger;
- the `protocol_violation` input, if enabled, fed by an external AHB protocol
  checker.

An event register compares each accepted address phase (NONSEQ or SEQ with
HREADY) with:
- an address value under a mask;
- optionally HWRITE;
- optionally HMASTER.

When an event with a mode-change action fires, the trace switches to that
event's mode from that bus cycle on. If several fire together, the lowest
numbered event wins.

After the run, the host reads:
- `wptr`, the next write address;
- `wrapped`, set if the buffer went all the way round, in which case the oldest
  word is at `wptr`, otherwise at 0;
- the memory itself, through `rd_addr`/`rd_data` (one cycle of latency).

### Configuration map (`cfg_we`, `cfg_addr[4:0]`, `cfg_wdata[31:0]`)

| address | register | bits |
|---------|----------|------|
| 0 | control | [0] arm (pulse), [1] disarm (pulse), [2] post-T direction, [5:3] start mode, [6] protocol violation triggers |
| 1 | depth | trace words after the trigger (16 bits) |
| 4·(i+1)+0 | event i address value | |
| 4·(i+1)+1 | event i address mask | 1 = bit compared |
| 4·(i+1)+2 | event i flags | [0] enable, [1] trigger, [2] mode change, [5:3] new mode, [6] compare HWRITE, [7] HWRITE value, [8] compare HMASTER, [12:9] HMASTER value |

## Parameters of `ahb_tracer`

| parameter | default | meaning |
|-----------|---------|---------|
| MEM_WORDS | 4096 | trace memory words (16 KB) |
| FIFO_BITS | 512 | packing FIFO size |
| N_EVENTS | 2 | event registers |
| ADDR_DICT_N | 16 | address dictionary entries (index width is log2 of it: 4 bits) |
| CTRL_DICT_N | 8 | control dictionary entries (3-bit index) |
| DEPTH_W | 16 | width of the depth register |

The 32-bit trace word, up to 16 masters, the 6-bit delta and the 128-bit
maximum packet length are constants in `rtl/tracer_pkg.sv`.

## What follows the reference design and what is this design's own

These parts follow the published design:
- the division into event generation, abstraction, compression, and packing
  with a circular trace memory;
- the five modes and what each records;
- the bus state machine: its states, their numbers and the conditions on its
  transitions;
- the three compression methods: sequential filter plus address dictionary,
  data differencing, and a control dictionary with a 3-bit index;
- pre- and post-trigger tracing;
- two event registers, 16 masters, the 512-bit FIFO, 32-bit trace words and
  five pipeline stages.

These are choices made here:
- the number of WAIT_MASTER and the priority between response and transfer
  conditions in the state machine;
- the address-slicing rule;
- the sizes of the address dictionary and the data-difference fields;
- the packet format and markers;
- the delta counter and its keep-alive record;
- the overflow policy;
- the depth unit (trace words);
- the register map;
- the host read port.

Two things the published design has are left out:
- **The AHB protocol checker.** Its rules are not specified, so it is only the
  `protocol_violation` input.
- **The host software**, which decompresses the trace and shows waveforms.
  The testbench decoder covers the format.

## Trace depth and what limits it

Trace depth is how many bus cycles fit in the trace memory.
`tb/tb_trace_depth.sv` measures it for 2, 4, 8 and 16 KB memories in every mode.
The traffic is synthetic and program-like: fetch runs with loops, some loads
and stores, and idle cycles after about half of the instructions. The
comparison point is an uncompressed trace of 91 bits per cycle.

| mode | 16 KB depth | improvement |
|------|-------------|-------------|
| FC | 5388 cycles | 3.7× |
| FT | 5330 cycles | 3.7× |
| BC | 5708 cycles | 4.0× |
| BT | 5879 cycles | 4.1× |
| MT | 6787 cycles | 4.7× |

Depth scales linearly with memory size, and each step of signal abstraction
deepens the trace. Published measurements on real programs show larger gains:
about 4.6× for FC and about 9× for the most abstract mode. This traffic keeps
the bus busy in most cycles, and three properties of the implementation bound
the gain:

* **Record header.** Every record begins with an 8-bit header of field codes.
  In a cycle-level mode, that header is paid even in a cycle where nothing
  changed.
* **Transaction-level modes on a busy bus.** A fetch run still changes the
  address every cycle, even if only by +4. So a transaction-level mode writes
  nearly as many records as a cycle-level one, plus a bit of cycle gap for
  each. That is why FT barely beats FC here. On a quieter bus the difference
  grows.
* **Output rate.** The FIFO drains 32 bits per cycle. When a segment starts,
  the dictionaries are empty and packets run to 80–100 bits, so a dense burst
  can overflow the FIFO. The test allows at most 1% of cycles to be lost; in
  practice none are.

## Simulating

Each block has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`. All use only `$urandom`, so they run on
two-state simulators. With plain Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_ahb_tracer \
    rtl/tracer_pkg.sv rtl/*.sv tb/tb_ahb_tracer.sv -o sim
./obj_dir/sim
```

Put `rtl/tracer_pkg.sv` first, because the other files import it. Listing it
again through `rtl/*.sv` is harmless for Verilator. If your tool objects, list
the files explicitly.

`tb_ahb_tracer` runs the full-size tracer (all defaults) through four runs:

- **A.** Post-T, started by an event register. A second event register
  changes the mode four times, through all five modes. Every traced cycle is
  decoded and checked against the bus.
- **B.** Mode FC on random data, dense enough to overflow the FIFO. It checks
  the overflow markers and the values after each resume.
- **C.** Pre-T, triggered by the protocol-violation input. The memory wraps,
  and tracing stops `depth` words after the trigger.
- **D.** Post-T with a large depth, until the memory is full.

It counts each mechanism (sequential, hit and miss addresses, each slice count,
each data width, control hits and misses, keep-alive records, mode changes,
overflow markers, bus states). A mechanism that never occurred is counted as a
failure. The run takes a few seconds.

`tb_trace_depth` (above) instantiates four tracers that differ only in
`MEM_WORDS` and takes about a second.
