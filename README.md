# Accelerator-rich device subsystem for a UAV companion computer

A small drone that monitors crops has to turn each camera frame into decisions on board. It
denoises the 1440×900 image, filters the IMU/GPS samples, finds crops with a CNN and segments
the soil with an edge detector. This RTL is the FPGA-side subsystem of such a companion computer.
A host processor (the ARM cores of a Zynq-class device) hands the work to the subsystem through a
mailbox. A small control core inside the cluster (the *proxy core*) then moves the data and
sequences a set of tightly coupled hardware accelerators.

The central idea is **merging accelerators by application schedule**. Kernels that never run at
the same time share one accelerator wrapper, so they share its memory ports, FIFOs and registers.
Kernels that must overlap each get a wrapper of their own. In this configuration:

| wrapper | datapath(s) | inputs / outputs |
|---|---|---|
| HWPE0 | FIR low-pass filter **merged with** 3×3 Gaussian blur | 1 / 1 |
| HWPE1 | CNN convolution-layer engine | 2 / 1 |
| HWPE2 | Sobel-based Canny edge detector | 2 / 1 |

The blur must finish before the CNN and Canny can start, because both read the blurred image.
The FIR only has to finish somewhere in the same window. So the blur and the FIR can share
HWPE0, and CNN and Canny, the two long kernels, run in parallel in their own wrappers. The
merged wrapper changes kernel by one register write, which takes effect on the next clock cycle.

## Block map

```
            host (outside)                        proxy core (outside)
   sbus master |   ^ irq_host_o        ifetch |  periph regs | L1 data | mbox regs  ^ irq_core_o
               v   |                          v              |         |            |
        +--------------------- soc_xbar (3 masters x 2 slaves) ----+  |            |
        |  m0 host   m1 cluster DMA   m2 instruction fetch         |  |            |
        +-------+-----------------------------------+--------------+  |            |
                | s0                                | s1                |            |
          l2_spm (256 KiB, 64-bit, banked)   hw_mailbox (h2d / d2h FIFOs) <-----------+
                                                    ^
   ooc_cluster ------------------------------------ | ---------------------------------
   |  cluster_dma  --sbus-->  (crossbar m1)                                            |
   |  l1_tcdm: 8 banks x 4096 x 32 bit, 11 masters, per-bank round robin               |
   |    m0-1 DMA   m2 proxy core   m3-4 HWPE0   m5-7 HWPE1   m8-10 HWPE2               |
   |  hwpe_wrapper x3 = hwpe_ctrl (regs + FSM) + hwpe_streamer (source/sink + FIFOs)   |
   |                    + engine (fir_conv_dp | cnn_engine | canny_engine)             |
   |  peripheral decode on addr[11:8]: 0 DMA, 1..3 HWPE0..2, 4 event register         |
   -------------------------------------------------------------------------------------
```

`ooc_top` is the whole subsystem. The host, its main memory and the proxy core are not in the
RTL. They connect through ports, and the testbench plays their parts.

The drawing shows the default single-cluster build. The parameter `N_CL` replicates the cluster,
its mailbox and its proxy-core ports. The L2 gains one port per cluster (`N_L2P = N_CL`), so the
clusters reach the shared L2 banks without queuing behind each other at one port. Crossbar
masters are then 0 host, `1+2k` DMA of cluster *k* and `2+2k` its instruction fetch. Slave *k*
is L2 port *k* and slave `N_CL+k` is mailbox *k*. Cluster *k* sees only its own L2 port and mailbox, and the host
sees L2 port 0 and every mailbox. The proxy-core ports and the per-cluster outputs become arrays
indexed by cluster.

## Buses

The package `ooc_pkg` defines three packed-struct buses:

* **System bus** (`sbus_req_t` / `sbus_rsp_t`): 64-bit, single beat, valid/ready. `rvalid`
  comes exactly one cycle after the cycle in which `ready` accepted the request. It carries
  read data and also acknowledges writes. It replaces the AXI4 channels of a full
  implementation. There are no bursts, IDs or outstanding transactions.
* **TCDM port** (`tcdm_req_t` / `tcdm_rsp_t`): 32-bit words with byte enables. `gnt` is given
  in the cycle of the request. `rvalid` and `rdata` follow one cycle later.
* **Register bus** (`reg_req_t`): a single-cycle write and a combinational read. It carries
  the proxy core's configuration writes.

Address map on the system bus:

| base | region |
|---|---|
| `0x1C00_0000` | L2 scratchpad (256 KiB) |
| `0x1A10_0000 + 0x1000·k` | mailbox of cluster *k*, host side |
| `0x1000_0000` | L1 base, used only in DMA descriptors |

An address outside every window is accepted and reads as all ones.

## The HWPE wrapper

This is the part that needs the most care when programming. Each accelerator is wrapped the
same way (`hwpe_wrapper`):

* **Controller** (`hwpe_ctrl`): a register file plus an IDLE → START → RUN → DONE state
  machine.
  * Writing `TRIGGER` while idle starts a job.
  * A one-cycle START clears the engine and the streamer and latches the descriptors.
  * RUN lasts until the streamer's sink has had all its writes acknowledged. DONE then raises
    `evt_o` for one cycle and sets the sticky `done` status bit.
  * Register writes are ignored while busy, and so is a trigger.
* **Streamer** (`hwpe_streamer`): one source per engine input and one sink. Each has its own
  TCDM port and a 4-deep FIFO.
  * A source walks `base, base+stride, ...` for `count` words. It issues a read only when the
    FIFO has room for that word plus every word already in flight, so returned data can
    never be dropped. An assertion checks this.
  * The sink drains engine results to memory the same way.
  * `stall_o` is high while the engine is held up, waiting for a source or for the sink.
* **Engine**: the datapath, chosen by the `ENGINE` parameter.

Register map of each wrapper (offsets on its peripheral window; HWPE*k* is at `0x100·(k+1)`):

| offset | register |
|---|---|
| `0x00` | TRIGGER (write) |
| `0x04` | STATUS `{done, busy}` |
| `0x08` | SEL: kernel select, 0 FIR, 1 Conv (merged wrapper only) |
| `0x10 + 16·i` | stream *i*: base (byte address), `+4` count (words), `+8` stride (bytes) |
| `0x60 + 4·j` | PARAM *j*, j = 0..7 |

Streams are numbered with the inputs first and the sink last: HWPE0 uses 0 = in, 1 = out;
HWPE1 and HWPE2 use 0, 1 = in, 2 = out.

Engine parameters:

| engine | PARAM0 | PARAM1 | PARAM2 |
|---|---|---|---|
| FIR/Conv | bit0 = 128 taps (else 64), bit1 = load coefficients | FIR output shift | image width |
| CNN | products per output *n* | output shift | ReLU enable |
| Canny | — | — | image width |

## The merged FIR + Gaussian datapath

`fir_conv_dp` holds both datapaths behind two switching boxes. A 1→2 box (`sbox_1x2`) steers the
shared input stream and a 2→1 box (`sbox_2x1`) picks the output. A small configuration table,
indexed by the SEL register, gives the setting of every box. Its output is registered, so the
switch takes one cycle. The kernels are not meant to run at the same time. Change SEL only
between jobs, so that a stream does not straddle the switch.

* **FIR** (`fir_systolic`): a transposed-form systolic array of 128 cells. Each sample is
  multiplied by every coefficient in the same cycle, and the partial sums move one cell per
  cycle.
  * In 64-tap mode the upper 64 cells are disabled.
  * With PARAM0 bit1 set, the first 64 or 128 words of the input stream are taken as
    coefficients (`h[0]` first).
  * Samples and coefficients are 16-bit signed. Sums are 48-bit, shifted right arithmetically
    and sent as 32 bits, one output per input sample.
* **Gaussian blur** (`gauss_conv`): a 3×3 window built from two line buffers (`line_window3`,
  up to 1440 pixels wide). The kernel is `[1 2 1; 2 4 2; 1 2 1]/16` with rounding. Only full
  windows produce output, so a W×H tile gives (W−2)×(H−2) pixels. It takes one pixel per cycle.

## CNN and Canny engines

* **`cnn_engine`** reads the activation stream and the weight stream in lockstep. Each output
  is the dot product of *n* pairs (16-bit signed operands, 48-bit sum), then:
  * an arithmetic right shift;
  * an optional ReLU;
  * saturation to signed 32 bits.

  It takes one multiply per cycle. With n = Kh·Kw·Cin and the window gathered by the address
  pattern, one output is one output pixel of a convolution layer.
* **`canny_engine`** first reads one threshold word from its second input (low in [15:0], high
  in [31:16]). It then streams the image through three window stages, each a pair of line
  buffers:
  * Sobel gradients: magnitude |gx|+|gy|, direction quantised to 4 bins using tan 22.5° ≈ 106/256;
  * non-maximum suppression along the gradient, then the double threshold: each pixel becomes
    strong, weak or none;
  * hysteresis in one pass: a strong pixel is an edge, and so is a weak pixel with a strong
    pixel among its 8 neighbours. The output is 255 for an edge and 0 otherwise.

  A W×H tile gives (W−6)×(H−6) pixels.

## Memories, DMA and mailbox

* **`l1_tcdm`**: word-interleaved banks (bank = address bits [4:2] for 8 banks). Each bank has
  its own round-robin arbiter, so any set of masters that hit different banks is served in the
  same cycle. `conflicts_o` counts the losers of each cycle.
* **`l2_spm`**: the same scheme with 64-bit words and system-bus ports. There is one port per
  cluster.
* **`soc_xbar`**: decodes each master's address, arbitrates each slave with a round robin
  that advances on `ready`, and returns each response to the master recorded at the handshake.
  Different slaves serve different masters in the same cycle. An optional mask hides slaves
  from chosen masters. Multi-cluster builds use it; by default every master sees every slave.
* **`cluster_dma`**: the proxy core writes SRC, DST, LEN (bytes, a multiple of 8) and DIR
  (0 = L2→L1, 1 = L1→L2), then CMD.
  * CMD copies the four registers as one job into a queue of `JOBQ` = 4 jobs. Jobs run in
    order, so the core can queue several transfers and return to other work.
  * STATUS is `{queue full, done, busy}`. A CMD to a full queue is refused.
  * `busy` covers running and waiting jobs. `done` is set when the queue drains.
  * Each 64-bit beat is one system-bus access plus two L1 accesses, made in parallel on two
    TCDM ports with the low word at the lower address.
  * A beat takes 4 cycles without contention. `evt_o` pulses after the last beat.
* **`hw_mailbox`**: two 8-entry FIFOs of 32-bit messages.
  * Host side: offset 0 write pushes host→device and read pops device→host; offset 8 reads
    `{d2h count[15:8], h2d count[7:0]}`.
  * Device side: offset 0 read pops and write pushes; offset 4 is the status.
  * `irq_core_o` stays high while host messages wait, and `irq_host_o` while device messages
    wait.

The cluster's event register (peripheral offset `0x400`) gathers the DMA and HWPE completion
pulses. It is sticky, and a write clears it.

## One offload, step by step

This is the sequence `tb_ooc_top` runs, and how software would drive the subsystem.

1. The host writes the input tile and the other inputs into L2 over its system-bus port. It
   then writes a message to the mailbox.
2. The proxy core sees `irq_core_o`, pops the message, and programs the DMA for each input
   buffer (L2→L1), polling the DMA STATUS.
3. HWPE0 with SEL = Conv: stream 0 is the image tile and stream 1 the blurred output. The core
   triggers it and waits for event bit 1.
4. HWPE0 with SEL = FIR (the switch), coefficients loaded from the stream. HWPE1 (CNN) and
   HWPE2 (Canny) are configured to read the blurred tile in L1. All three are triggered, and
   the core waits for event bits 1–3.
5. The DMA copies the results to L2 (L1→L2), and the core pushes a completion message.
6. The host sees `irq_host_o`, pops the message and reads the results.

A full 1440×900 frame does not fit in a 128 KiB L1, so it is processed in tiles of a few rows.
A 10-row tile (1440×10 input, 1438×8 blurred, 1432×2 edges) plus the FIR and CNN buffers
needs about 119 KB of L1. Successive tiles overlap by 6 rows.

## Sizes

| parameter | default | where it comes from |
|---|---|---|
| image width (`IMG_W`, `MAX_W`) | 1440 | 1440×900 camera frames |
| FIR cells (`FIR_TAPS`, `MAX_TAPS`) | 128 | the filter is specified for 64 or 128 coefficients |
| L1 | 8 banks × 4096 × 32 bit = 128 KiB | own choice, near the block-RAM budget reported for L1 |
| L2 | 4 banks × 8192 × 64 bit = 256 KiB | own choice, near the block-RAM budget reported for L2 |
| clusters (`N_CL`) | 1 | single-cluster configuration; 2–16 by parameter |
| L2 ports | `N_CL` | one per cluster |
| mailbox depth | 8 | own choice |
| streamer FIFO depth | 4 | own choice |
| DMA job queue (`JOBQ`) | 4 | own choice |

The reference clock is 100 MHz. At one pixel per cycle, blurring or edge-detecting a whole
frame takes about 13 ms. Moving a frame at 4 bytes per pixel takes about 26 ms through the
8-bytes-per-4-cycles DMA.

## Differences from the reference architecture

* **System bus.** The crossbar uses the simplified single-beat bus
  above instead of AXI4.
* **Not in the RTL.** The proxy core (an RV32 soft core with an instruction cache), the host
  processor and main memory are not included. The proxy core's four connections are top-level
  ports. BBOX annotation and AES encryption run in host software and have no hardware here.
* **Multi-cluster builds.** They keep one mailbox per cluster and give each cluster a fixed L2
  port. They add no L2 banks by themselves; use `L2_BANKS` for that.
* **Canny.** Hysteresis looks only at the 8 direct neighbours in one pass. A weak pixel linked
  to a strong one only through other weak pixels is dropped, where full Canny tracking keeps it.
* **CNN.** The CNN engine is a generic dot-product layer engine, not a particular published
  CNN accelerator.
* **DMA.** The DMA keeps one beat in flight, so it does not overlap bus latencies.
* **Kernel I/O.** The FIR and Gaussian kernels share only their input and output. Their
  internal actors are not merged.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Reference models are in `tb/tb_ref_pkg.sv`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ooc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ooc_top.sv --top-module tb_ooc_top -o sim --Mdir obj
./obj/sim
```

| testbench | what it covers |
|---|---|
| `tb_fir_systolic` | 64- and 128-tap filtering, one output per cycle, latency |
| `tb_gauss_conv`, `tb_canny_engine`, `tb_cnn_engine` | kernels against reference models (the blur also under output back-pressure) |
| `tb_fir_conv_dp` | both kernels and the one-cycle switch between them |
| `tb_l1_tcdm`, `tb_l2_spm`, `tb_soc_xbar` | random traffic from several masters against a memory model, conflicts, parallel service |
| `tb_cluster_dma` | transfers in both directions, beat count and cycle bound, job queue filling up |
| `tb_hw_mailbox` | FIFO order, full/empty, interrupts |
| `tb_hwpe_wrapper` | all three wrappers on a shared L1 |
| `tb_ooc_cluster` | DMA → blur → Canny/CNN → DMA inside one cluster |
| `tb_ooc_top` | the full offload above at default sizes (1440-wide tile, 128 taps) |
| `tb_ooc_scale` | four clusters blurring their own tiles concurrently, with per-cluster mailboxes and L2 ports |

`tb_ooc_top` also counts how often each mechanism occurred and fails if any never did:
mailbox messages in both directions, DMA in both directions, the kernel switch, CNN/Canny
overlap, L1 bank conflicts, crossbar contention, streamer stalls and instruction fetches. It
takes about 110,000 cycles, well under a second.
