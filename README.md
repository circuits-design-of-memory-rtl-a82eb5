# DDR3 memory access across a parallel FPGA-to-FPGA channel

This RTL lets a processor-side FPGA read and write DDR3 SDRAM that is attached
to a second FPGA. The processor side speaks AXI. Its bursts are packed into
packets, sent over a 64-bit parallel full-duplex channel, and replayed on the
memory FPGA as AXI4 transactions on the DDR3 controller. Read data travel back
the same way.

Between the two AXI ends there are three clock domains (processor `aclk`,
channel `ch_clk`, controller `ui_clk`) with dual-clock FIFOs at every
crossing. The channel has its own small link protocol with flow control and
frame refusal.

```
 packets_sending_side (aclk | ch_clk)                 packets_receiving_side (ch_clk | ui_clk)
 +-------------------------------------------+        +-----------------------------------------+
 | axi_stimulus --AW/W/B--> axi_write_receive|        |                                         |
 |      |        --AR-----> axi_read_receive | req    | channel_interface ---> 3 FIFOs ---> mig_|---> AXI4 to
 |      |          (FIFOs 4096 x 32) ------> |channel | (rx: split by rw bit)   (2048 x 64)  int-|     DDR3
 |      |                 channel_send ======|=======>|                                   erface|     controller
 |      |<--R---- axi_read_back <-- FIFOs <--|<=======|= (tx: header + 4 words) <- 3 FIFOs <---|<--- (not in RTL)
 |                          channel_receive  | return |                                         |
 +-------------------------------------------+        +-----------------------------------------+
```

`mem_access_top` holds both sides and wires the two channel directions
between them. The DDR3 controller's AXI4 slave port is brought out as `m_*`
ports, together with its `init_calib_complete` flag.

## The unit of work: one 32-byte burst

Everything in the system moves in 32-byte bursts.

- **Processor side.** A burst is AXI `LEN=7`, `SIZE=2` (eight 32-bit beats),
  `INCR`.
- **Memory side.** The same burst is AXI4 `LEN=3`, `SIZE=3` (four 64-bit
  beats), with all strobes on.

On the channel a burst becomes a **frame** of 64-bit words. The first word is
a header:

| bits    | 63..32       | 31..5 | 4..1    | 0                   |
|---------|--------------|-------|---------|---------------------|
| header  | byte address | 0     | AXI ID  | rw (1 read, 0 write)|

| frame                      | direction          | words                 |
|----------------------------|--------------------|-----------------------|
| write                      | processor → memory | header + 4 data words |
| read command               | processor → memory | header only           |
| read data                  | memory → processor | header + 4 data words |

On the processor side the same header is stored as two 32-bit FIFO words: the
command word `{27'b0, ID, rw}`, then the address. Pairing two 32-bit words
into one 64-bit word, low half first, therefore gives the header directly. The
32-bit data beats pair up the same way: beat 0 goes in bits [31:0] of data
word 0.

**Label FIFOs.** Each data FIFO has a small companion FIFO of *labels*. A label
is pushed only once a whole burst is stored, so the consumer never starts a
burst that is still arriving. There are four such pairs:

- write labels and read labels on the processor side;
- read-data labels on both sides.

## The channel link (chan_link_tx / chan_link_rx)

This is the part that needs the most care. Each direction has the same
signals. All control signals are active low.

| signal        | driven by   | meaning                                  |
|---------------|-------------|------------------------------------------|
| `DATA[63:0]`  | source      | frame word                               |
| `SOF_N`       | source      | first word of a frame                    |
| `EOF_N`       | source      | last word of a frame                     |
| `SRC_RDY_N`   | source      | `DATA` is valid                          |
| `SRC_DSC_N`   | source      | source abandons the frame in progress    |
| `DST_RDY_N`   | destination | destination can take a word              |
| `DST_DSC_N`   | destination | destination refuses the current frame    |

A word moves on every `ch_clk` edge where `SRC_RDY_N` and `DST_RDY_N` are both
low. The rules below are this design's own. The description names the signals
and their purpose, but not the cycle timing.

- **Refusal (`DST_DSC_N`).** When a SOF word arrives, the receiver checks
  whether the FIFOs behind it have room for a whole frame of that kind. The
  kind comes from the rw bit. If there is no room, the receiver pulses
  `DST_DSC_N` one cycle later and ignores the rest of the frame. The
  transmitter then restarts the frame from its header. So that a one-word
  read frame can still be refused, the transmitter holds every frame for one
  cycle after its EOF word (state `HOLD`) before reporting it delivered.
- **Frame hand-over.** The receiver stages a complete frame (up to five
  words). While the owning module copies the frame into its FIFOs, the
  receiver holds `DST_RDY_N` high. This takes 5 cycles on the memory side and
  11 on the processor side, where each 64-bit word is split into two 32-bit
  FIFO writes.
- **Cancellation (`SRC_DSC_N`).** If the destination stalls inside a frame for
  `TIMEOUT` cycles (64), the transmitter pulses `SRC_DSC_N`. The receiver
  drops the partial frame and the transmitter sends it again. The receiver
  also drops a frame whose length does not match its kind.

In the assembled system the receiver never stalls inside a frame: it only
refuses at SOF or waits between frames. So cancellation is exercised only by
the link's own testbench.

### Delay stages in the channel

`CH_DELAY` (default 0) puts that many registers on every channel signal, in
both directions (`channel_delay_chain`, one instance per direction). It models
a longer or pipelined board link. A word then takes `CH_DELAY` cycles to
arrive, and a `DST_*` answer takes another `CH_DELAY` cycles to come back.

Two link rules change, and the link ends take the same parameter for this:

- **The refusal window grows.** A refusal reaches the transmitter
  `2·CH_DELAY+1` cycles after the SOF word. The transmitter keeps each frame
  until then. At `CH_DELAY = 0` this is exactly the one-cycle `HOLD` above.
- **The receiver stops using `DST_RDY_N` for flow control.** A delayed
  `DST_RDY_N` would stop the source only after words already in flight had
  been lost. So with `CH_DELAY > 0` the receiver keeps `DST_RDY_N` low. A frame
  that arrives while its staging buffer is still full is refused instead.

Each frame therefore occupies the link for at least `2·CH_DELAY+1` cycles.
That is what makes run time grow with delay.

### Why the buffer sizes matter: a deadlock bound

Write-backs and read commands share the request direction, and they are
served round-robin. A read command is refused while the memory side cannot
hold one more burst of read data. That read data, in turn, can only leave
once the processor side has room for it.

If the return path cannot hold every read the stimulus may have outstanding,
a refused read command can block write-backs forever. The condition that
avoids this is:

```
floor(SEND_FIFO_DEPTH / 10) + RECV_FIFO_DEPTH / 4  >=  MAX_OUTSTANDING
```

At the defaults this is 409 + 512 >= 16. Any configuration with smaller FIFOs
must lower `MAX_OUTSTANDING` to keep the condition true. The end-to-end test
does this: 16-entry and 4-entry FIFOs with two outstanding reads.

## Processor side

- **`axi_stimulus`** stands in for the processor and has three phases.
  1. *Fill.* After `init_calib_complete` it fills `0x0000_0000 ..
     0x0000_4000`. The last burst starts at `0x4000`, so 513 bursts are
     written in all. Each 32-bit word holds its byte address divided by 4.
  2. *Kernel.* `fill_done` rises once the last fill write has been
     acknowledged. The stimulus then runs one kernel (`MODE`) and writes the
     results from `0x1000_0000` on. The test area is `AREA_BYTES`.

     | `MODE` | operation          | operands |
     |--------|--------------------|----------|
     | COPY   | `c = a`            | each burst of the area |
     | SCALE  | `c = 3·a`          | each burst of the area |
     | ADD    | `c = a + b`        | a from the lower half, b from the upper half |
     | TRIAD  | `c = a + 3·b`      | a from the lower half, b from the upper half |
     | GUPS   | `c = m·a`          | a burst picked by a 16-bit LFSR; `m` from a second LFSR |

     Reads are issued back to back, at most `MAX_OUTSTANDING` (16) at a time,
     with IDs counting modulo 16.
  3. *Check and stop.* Every returned beat is compared with the fill pattern;
     differences are counted on `rd_mismatch`. `test_stop` rises when all
     results have been acknowledged.
- **`axi_write_receive`** is an AXI write slave. It accepts AW only when the
  write data FIFO has room for the whole burst: ten 32-bit words, namely the
  command word, the address and eight data words. It stores the burst,
  answers B with OKAY, and then pushes a write label.

  Writes are therefore *posted*: B means "buffered", not "in DDR3".
- **`axi_read_receive`** is an AXI read-address slave. It stores the command
  word and the address, then pushes a read label.
- **`channel_send`** alternates between write and read labels, round-robin.
  It pairs the 32-bit words into a frame and hands the frame to
  `chan_link_tx`.
- **`channel_receive`** takes read-data frames from `chan_link_rx`. It splits
  them into ten 32-bit words in the read data FIFO, then pushes a read-data
  label.
- **`axi_read_back`** is the AXI R master back to the stimulus. For each
  label it pops the command word and the address, then returns eight beats
  with the original RID and RLAST on the eighth.
- There are **six `async_fifo`s**, each 32 bits x 4096:
  - write data and write labels;
  - read commands and read labels;
  - read data and read-data labels.

## Memory side

- **`channel_interface`** handles both channel directions.
  - *Request frames in.* The rw bit splits them. A write frame puts four words
    in the write data FIFO, then its header in the write command FIFO. A read
    frame puts its header in the read command FIFO.
  - *Read data out.* When a read-data label is present, it pops the label, the
    kept read header and four data words, and sends them as a read-data frame.
- **`mig_interface`** is the AXI4 master towards the DDR3 controller. It
  serves write and read commands round-robin, one transaction at a time.
  - *Write:* AW, then four W beats, then it waits for B.
  - *Read:* AR, and the header goes into the *keep* FIFO. The four R beats go
    into the read data FIFO. After RLAST the header is pushed as a read-data
    label.

  Any BRESP or RRESP other than OKAY is counted on `resp_err`.
- There are **six `async_fifo`s**, each 64 bits x 2048, between `ch_clk` and
  `ui_clk`:
  - write data, write commands and read commands;
  - read keep, read data and read-data labels.

## Shared pieces

- **`async_fifo`**: a dual-clock FIFO. It has Gray-coded pointers, two-flop
  synchronisers and first-word-fall-through reads.
  - The write side reports `full` and the free word count `wfree`. The read
    side reports `empty` and `rcount`. The counts are conservative, because
    they lag by the synchroniser delay.
  - Assertions flag writes when full and reads when empty.
- **`rst_sync`**: asserts asynchronously and releases synchronously. There is
  one per clock domain, fed by the global `rst_n`.
- **`mas_pkg`**: the burst constants, the header helpers, the channel
  structs `ch_fwd_t` / `ch_bwd_t`, the kernel enum and the LFSR step
  (x^16 + x^14 + x^13 + x^11 + 1).

## Parameters of `mem_access_top`

| parameter         | default        | meaning                                   |
|-------------------|----------------|-------------------------------------------|
| `MODE`            | `MODE_COPY`    | kernel run after the fill                 |
| `SEND_FIFO_DEPTH` | 4096           | depth of the six 32-bit FIFOs             |
| `RECV_FIFO_DEPTH` | 2048           | depth of the six 64-bit FIFOs             |
| `AREA_BYTES`      | `0x4000`       | size of the test area                     |
| `NUM_OPS`         | 0              | kernel operations (0 = one pass)          |
| `MAX_OUTSTANDING` | 16             | read bursts in flight                     |
| `TIMEOUT`         | 64             | mid-frame stall before `SRC_DSC_N`        |
| `CH_DELAY`        | 0              | register stages per channel direction     |

These come from the description:

- the FIFO depths and widths;
- the area bounds and the destination base;
- the burst shape;
- the register-per-cycle delay chain and the swept values of `CH_DELAY`
  (0, 4, 8, 16, 32).

These are this design's choices:

- `SCALAR`, the outstanding-read limit and `TIMEOUT`;
- the LFSR seeds (`0xACE1` for the address LFSR, `0x1D0F` for the multiplier
  LFSR);
- all link timing.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          rtl/mas_pkg.sv tb/tb_top.sv --top-module tb_top
./obj_dir/Vtb_top
```

Substitute any of the testbenches below for `tb_top`.

| testbench              | what it does |
|------------------------|--------------|
| `tb_top_full`          | The whole system at its default sizes, running COPY over the full 16 KiB area (513 fill bursts and 512 copies). It checks every word that reaches the memory model and reports the fill and kernel durations in `aclk` cycles. |
| `tb_top`               | Six systems side by side: one per kernel, plus TRIAD over a channel with 8 delay stages. They use small FIFOs (16 and 4 entries) and two outstanding reads; the COPY and delayed systems get a slow memory clock. Frame refusals (with and without delay), round-robin switches, AXI back-pressure and controller stalls are each counted and must each happen. |
| `tb_perf_sweep`        | The three performance sweeps at the full area with COPY. Each configuration is fully checked and its run time printed, and run time must not drop as delay or channel period grows. |
| `tb_channel_delay_chain` | Checks that both signal groups come out exactly `CH_DELAY` cycles late, and idle during reset. |
| `tb_chan_link`         | One link with a destination that stalls at random and refuses by kind. It covers restart after refusal, cancellation after `TIMEOUT`, and intact delivery of every frame. |
| `tb_async_fifo`        | Fills the FIFO to its exact depth, then streams random traffic between unrelated clocks. |
| `tb_axi_*`, `tb_channel_*`, `tb_mig_interface` | Each block against a scoreboard, including its back-pressure conditions. |

`tb/axi_mig_model.sv` is a behavioural stand-in for the DDR3 controller. It
has:

- sparse memory;
- calibration delay and read latency;
- randomly dropped ready signals.

## What the sweeps show

`tb_perf_sweep` runs one fill plus one COPY pass over 16 KiB, with `aclk` at
10 ns, `ui_clk` at 5 ns and a controller model that never stalls. Times are
in µs until the last write is checked.

| varied                      | values and run time (µs)                               |
|-----------------------------|--------------------------------------------------------|
| channel delay, 7 ns channel | 0: 164, 4: 208, 8: 294, 16: 466, 32: 811               |
| channel clock period        | 5 ns: 164, 7 ns: 164, 10 ns: 215, 15 ns: 323, 20 ns: 431 |
| memory-side buffer          | 0.125, 0.25, 16, 32, 64 KB: 164 each                   |

Delay and a slow channel clock cost time, as in the original measurements. The
buffer size makes no difference here, because the 10 ns processor side limits
this configuration. The original results showed some benefit from larger
buffers when the channel was slow. With this model, a difference shows only
when the memory side is the bottleneck.

## Departures and limits

- **The DDR3 controller is not included.** The vendor memory controller, the
  DDR3 module, the processor and the clock generation are outside this RTL.
  The testbenches use the behavioural model above.
- **Memory-side data width.** The description uses 32 of the controller's
  64-byte access unit and masks the rest with strobes. Here each access is a
  32-byte AXI4 burst of four 64-bit beats. Narrowing it to the controller's
  native access is left to the controller.
- **Flow control under delay.** With delay stages, flow control works by
  refusal only (see above). The description does not say how its link copes
  with the delay.
- **Link and arbitration timing are this design's own.** This covers the
  refusal timing, the staging buffers and the one-transaction-at-a-time
  controller master. They are a simple correct choice, not a reconstruction
  of the original timing. The original throughput numbers, including
  operation at 200 MHz, have not been reproduced.
- **One stimulus module, five kernels.** The original design had a separate
  stimulus module per kernel and instantiated one at a time. Here one module
  selects the kernel with `MODE`. The kernels' exact operand placement,
  scalar (3) and random sources are this design's choices.
- **Posted writes.** A write is acknowledged as soon as it is buffered.
  Software that needs "data is in DDR3" must read it back.
