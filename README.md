# TSS: a self-synchronising fabric for chains of hardware accelerators

In a usual accelerator-based SoC the host processor stands between every pair
of accelerators. Accelerator A finishes and interrupts the host. The host
reformats A's results in shared memory and programs a DMA to copy them into
B's scratch-pad. Only then does it tell B to start. With many adjacent
accelerators, the host, the bus and the scratch-pads become the bottleneck.

The Transparent Self-Synchronizing (TSS) architecture removes the host from
accelerator-to-accelerator traffic. It was proposed in the paper *Improving
Scalability of CMPs with Dense ACCs Coverage*. This repository is an RTL
rendering of that architecture in SystemVerilog:

* Every accelerator slot has an **Input Control Management** unit (ICM) and an
  **Output Control Management** unit (OCM).
* These units own small double buffers and convert between the accelerator's
  own data format and a common byte stream. They also synchronise with their
  neighbours without any software.
* A **MUX-based interconnect** links any OCM to any ICM, so chains of
  accelerators can be composed.
* A **gateway** connects the fabric to the system bus. To the host, a whole
  chain of any length looks like one accelerator: write a job, start it, take
  an interrupt, read the result.

The paper describes the architecture at block level. Everything below block
level is this implementation's own choice, and each choice is marked as such:
widths, handshakes, formats, register map and sizes.

```
             host / DMA (AHB-Lite)
                    |
   +----------------+-------------------------------------------------+
   | gateway: AHB slave, MMRs + control, irq                          |
   |   in flow f:  input SPM (2 buffers) -> serialiser ---------+     |
   |   out flow f: output SPM (2 buffers) <- collector <---+    |     |
   +-------------------------------------------------------|----|-----+
                                                           |    v
        +--------------------- MUX interconnect (one MUX per consumer) ---+
        |        ^            |         ^            |          ^        |
        v        |            v         |            v          |        |
     [ICM0]->ACC0->[OCM0]  [ICM3]->ACC3->[OCM3]  [ICM6]->ACC6->[OCM6]   ...
```

## The accelerator slot: four handshake signals

The accelerator itself does only the processing. For each job it sees one
input buffer and one output buffer, with exclusive random access to each, and
four signals:

| signal | direction | meaning |
|---|---|---|
| `acc_iready[a]` (IReady) | ICM → ACC | level: a filled input buffer is granted to the accelerator |
| `acc_iread[a]` (IRead) | ACC → ICM | one-cycle pulse: finished with the input buffer |
| `acc_oread[a]` (ORead) | OCM → ACC | level: an empty output buffer is granted |
| `acc_oready[a]` (OReady) | ACC → OCM | one-cycle pulse: output buffer filled, send it |

While a buffer is granted, the accelerator reads and writes it through
`acc_?addr`, `acc_?we` and `acc_?wdata`. Read data (`acc_?rdata`) appears one
cycle after the address. The input buffer may also be written, for example as
scratch space.

The grant drops in the cycle after the pulse. It rises again as soon as the
other buffer is ready, which is immediately if the neighbour has been keeping
up. The paper names these four signals. Level versus pulse, and the one-cycle
read latency, are this implementation's choices.

Each ICM and OCM has two buffers (I0/I1, O0/O1), so the stream side fills or
drains one buffer while the accelerator works on the other. The
synchronisation unit (`tss_sync`) behaves as a two-entry FIFO of buffer
tokens. The producer fills a buffer and commits it. The consumer takes the
oldest full buffer and releases it. Buffers alternate 0, 1, 0, ...

* If the accelerator is slow, both input buffers fill up. The ICM then drops
  `in_ready` and the whole upstream chain stalls through the handshake.
* If the downstream side is slow, ORead stays low and the accelerator waits.

No interrupt and no host action is involved in either case.

## The byte stream, marshalling and granularity

This is the part that needs the most care when configuring a chain.

All links carry a **flat byte stream**: 8 bits with `valid`/`ready`, one byte
per beat. The stream has no framing. A job boundary exists only in the
counters of the unit at each end of a link. The producing OCM and the
consuming ICM can therefore use different job sizes and element formats,
which is how a chain joins accelerators that disagree on both.

Each ICM and OCM is configured by an `mg_cfg_t` (defined in `tss_pkg`):

| field | meaning |
|---|---|
| `elem_bytes` (1..4) | bytes per accelerator element. Elements are words of `ACC_BYTES*8` bits, and the unused high bytes are zero. |
| `swap` | 0: the least significant byte of an element travels first. 1: the most significant byte travels first. |
| `rows`, `cols` | a job is `rows*cols` elements (at most the buffer depth) |
| `transpose` | 0: element *i* of the stream is buffer word *i*. 1: the stream is read as `rows` rows of `cols` elements, and the buffer holds the job column-major, at word `(i mod cols)*rows + i/cols`. |

ICM data path:

1. The **marshalling unit** (`tss_marsh_in`) assembles `elem_bytes` bytes into
   one element.
2. The **granularity counter** (`tss_gran`) gives the element's buffer address
   and flags the job's last element.
3. When the last element is written, the buffer is committed and IReady rises.

The OCM runs the same steps in reverse. Its drain walks the committed buffer in
granularity order, reading one element ahead, and `tss_marsh_out` splits each
element into bytes. For elements of two or more bytes, the stream leaves at
one byte per clock. One-byte elements leave every other clock.

Example: ACC0 produces 16-bit samples in jobs of 8, and ACC3 wants them as a
transposed 2x4 block, high byte first.

* Configure `OCM_CFG[0] = {elem_bytes 2, swap 1, rows 1, cols 8}`.
* Configure `ICM_CFG[3] = {elem_bytes 2, swap 1, transpose 1, rows 2, cols 4}`.

The paper says marshalling "splits/collects and reorders bytes" and that
granularity is "a counter" matching strides and access order. Element size,
byte order and row/column transposition are this implementation's reading of
that.

The formats of the accelerator slots are **design-time parameters** of
`tss_top` (`ICM_CFG`, `OCM_CFG`, one `mg_cfg_t` per slot), because they belong
to the accelerator. The formats of the gateway flows are run-time registers.

Rules for a valid configuration:

* `elem_bytes <= ACC_BYTES`.
* `rows*cols <= ACC_DEPTH`, or `SPM_DEPTH` in the gateway.
* The configuration must not change while a job is in flight.

## Composing chains: the interconnect

`tss_xbar` has one multiplexer per consumer. Producers and consumers are
numbered as follows:

| index | producer (MUX input) | consumer (MUX output, register `MUX_SEL+k`) |
|---|---|---|
| 0..8 | OCM of slot 0..8 | ICM of slot 0..8 |
| 9..11 | gateway input flow 0..2 | gateway output flow 0..2 |

A select value of 12 or more leaves a consumer open. This is the reset state.
Valid and data go forward through the MUX, and ready goes back to the selected
producer.

Links are strictly point to point. A producer must be selected by at most one
consumer, and an assertion checks this. One output feeding two accelerators
is therefore not supported.

The host writes the selects one register at a time. To rewire a running
system, first set every affected select to open. Otherwise two consumers can
briefly name the same producer.

Every MUX can reach every producer, so forward, backward and self-feedback
links are all possible. The paper asks for a sparse MUX network but does not
fix which inputs each MUX has. Pruning inputs would be a local change in
`tss_xbar`.

Example, the three chains used by the testbenches:

```
flow 0: MUX_SEL[0]=9  MUX_SEL[3]=0  MUX_SEL[6]=3  MUX_SEL[9]=6     gw0 -> ACC0 -> ACC3 -> ACC6 -> gw0
flow 1: MUX_SEL[1]=10 MUX_SEL[4]=1  MUX_SEL[7]=4  MUX_SEL[10]=7    gw1 -> ACC1 -> ACC4 -> ACC7 -> gw1
flow 2: MUX_SEL[8]=11 MUX_SEL[2]=8  MUX_SEL[5]=2  MUX_SEL[11]=5    gw2 -> ACC8 -> ACC2 -> ACC5 -> gw2
```

## The gateway and its programming model

Each gateway flow reuses the slot logic:

* An **input flow** is an OCM whose "accelerator side" is the bus. The host
  fills the granted input SPM buffer and commits it, and the OCM streams it
  into the fabric.
* An **output flow** is an ICM read by the bus.

A large outside job is cut into the small internal jobs of the first
accelerator automatically, because the byte stream has no framing. For
example, a 64-word outside job becomes four 16-element accelerator jobs.

The paper labels the units next to the input SPM as ICMs and says that "ICMs
feed ACCs and OCMs collect results". This implementation names them by what
their logic does.

Bus interface (`tss_ahb_if`), an AHB-Lite slave:

* Only 32-bit single transfers are supported. HSIZE and HBURST are ignored,
  and HRESP is always OKAY.
* Reads have zero wait states.
* A read that directly follows a write gets one wait state.

The paper's evaluation platform uses a 32-bit AHB. The slave design is this
implementation's own.

Address map (byte addresses):

| address | contents |
|---|---|
| `0x0000 + 4*r` | register `r` |
| `0x1000*(1+f) + 4*i` | word *i* of the input SPM buffer currently granted to the host, flow *f* |
| `0x1000*(8+f) + 4*i` | word *i* of the output SPM buffer holding a finished job, flow *f* |

Registers (bit *f* refers to flow *f*):

| r | name | contents |
|---|---|---|
| 0x00 | IRQ_STATUS | bit f: output job finished; bit 8+f: input buffer consumed. Write 1 to clear. |
| 0x01 | IRQ_ENABLE | same layout; `irq = |(IRQ_STATUS & IRQ_ENABLE)` |
| 0x02 | STATUS | bit f: output buffer full; bit 8+f: input buffer free (read only) |
| 0x03 | COMMAND | bit f: release output buffer; bit 8+f: commit ("start") input buffer |
| 0x04+f | IN_CFG | `mg_cfg_t` of input flow f (reset: 4-byte elements, 1x16) |
| 0x08+f | OUT_CFG | `mg_cfg_t` of output flow f |
| 0x10+k | MUX_SEL | select of consumer k (reset: open) |

Host sequence:

1. Once at start-up, write the MUX selects, the flow formats and IRQ_ENABLE.
2. Then for each job:
   1. Wait for `STATUS[8+f]`.
   2. Write the words of the job.
   3. Write `COMMAND = 1<<(8+f)`.
3. When the interrupt (or `STATUS[f]`) shows a finished output job:
   1. Read the words of the job.
   2. Clear `IRQ_STATUS`.
   3. Write `COMMAND = 1<<f`.

A write to an input SPM while no buffer is free is dropped. The paper gives
the flow "DMA in, MMR to start, interrupt signalling done, DMA out" and says
the MMRs hold the MUX configuration. The register layout is this
implementation's own.

## Parameters and sizes

| parameter (`tss_top`) | default | origin |
|---|---|---|
| `N_ACC` | 9 | the paper's figures show ACC0..ACC8 with Mux0..Mux8 |
| `N_FLOWS` | 3 | the paper's gateway has three flows / concurrent chains |
| `ACC_BYTES` | 4 | chosen |
| `ACC_DEPTH` | 64 elements per ICM/OCM buffer | chosen; the paper only says the buffer equals the smallest job an accelerator needs |
| `SPM_DEPTH` | 256 words per gateway SPM buffer | chosen |
| `ICM_CFG`, `OCM_CFG` | 4-byte elements, 1x16 job, linear, LSB first | chosen |

At these defaults the design synthesises to about 2.1 k flip-flops and
172 kbit of buffer memory. The memory breaks down as follows:

* 9 slots × 2 units × 2 × 64 × 32 bits.
* 3 flows × 2 SPMs × 2 × 256 × 32 bits.

All memories are plain arrays with synchronous read, to be mapped onto SRAM
macros. The reset is asynchronous and active low. It empties all buffers but
does not clear their contents.

Sizing against the paper's benchmarks:

* Applications with up to nine accelerator nodes fit one instance by slot
  count: H.263 decoder and encoder (4 each), MP3 decoder (8), MP3 playback (2),
  sample-rate converter (5).
* Modem, Satellite (11 each) and the synthetic graph (13) do not. They can
  still run in two passes: first through a chain of all nine slots, back to
  memory, then through a rewired chain of the remaining accelerators. That
  costs a reconfiguration and one extra trip through the gateway.
* Where an application graph needs one accelerator to feed two others, the
  data must go round through the gateway.

`tb/tb_tss_workloads.sv` streams each application's largest per-edge data
volume through a chain with one slot per accelerator node. The three large
graphs use the two-pass scheme above. The volumes are 38016 bytes for
H.263, 576 bytes for the MP3 decoder, 1000 bytes (rounded up to 1024) for
the synthetic graph, and one 64-byte job for the others. Kernels are
behavioural and the graphs are simplified to chains.

Measured cycles, with a bus-master model that polls STATUS and moves every
word with single transfers:

| application | slots | bytes | cycles |
|---|---|---|---|
| H.263 decoder | 4 | 38016 | 48512 |
| H.263 encoder | 4 | 38016 | 48512 |
| MP3 decoder | 8 | 576 | 2148 |
| MP3 playback | 2 | 64 | 358 |
| sample-rate converter | 5 | 64 | 670 |
| modem | 9 + 2 | 64 | 1442 |
| synthetic | 9 + 4 | 1024 | 4716 |
| satellite | 9 + 2 | 64 | 1454 |

For the large volumes the host's bus transfers dominate. The chain itself
moves one byte per cycle per link, four cycles per 32-bit word.

## What is not here

* **Accelerator kernels.** They are application specific and the paper
  specifies none. `tss_top` brings each slot's ICM/OCM ports out.
* **Host, DMA, shared memory, system fabric.** These are standard system
  parts. Testbenches play the host and DMA over the AHB port.
* **Energy or area figures.** The paper's results come from system-level
  simulation and none are reproduced here.

## Files

| file | content |
|---|---|
| `rtl/tss_pkg.sv` | link width, `mg_cfg_t`, register offsets |
| `rtl/tss_dbuf.sv` | two-bank, two-port buffer memory |
| `rtl/tss_sync.sv` | synchronisation unit (two-token FIFO) |
| `rtl/tss_gran.sv` | granularity counter / address walk |
| `rtl/tss_marsh_in.sv`, `rtl/tss_marsh_out.sv` | marshalling (bytes ↔ elements) |
| `rtl/tss_icm.sv`, `rtl/tss_ocm.sv` | input / output control management |
| `rtl/tss_xbar.sv` | MUX interconnect |
| `rtl/tss_ahb_if.sv`, `rtl/tss_ctrl.sv`, `rtl/tss_gateway.sv` | gateway |
| `rtl/tss_top.sv` | one TSS instance |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_tss_top.sv` | end to end, different formats in every slot |
| `tb/tb_tss_top_full.sv` | end to end, all parameters at their defaults |
| `tb/tb_tss_workloads.sv` | the benchmark applications that fit, as accelerator chains |
| `tb/tb_tss_top_body.svh`, `tb/tb_acc_model.sv`, `tb/tb_ahb_bfm.sv` | shared end-to-end harness: reference model, kernel model, bus master |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/tss_pkg.sv tb/tb_tss_top.sv --top-module tb_tss_top -Mdir obj && obj/Vtb_tss_top
```

Replace `tb_tss_top` with any other testbench name.

The end-to-end testbenches run three chains at once, fed by a host model that
polls the gateway. Every output word is checked against a byte-level reference
of every stage: gateway format, each ICM format, an XOR kernel, each OCM
format, and the output format.

They also count each mechanism and fail if one never occurs:

* back-pressure on a link;
* an ICM with both buffers full;
* an accelerator waiting for an output buffer;
* outside jobs split into accelerator jobs;
* all three chains streaming in the same cycle;
* a backward link;
* byte swaps and transposed jobs;
* the interrupt.

The unit testbenches also check throughput:

* the marshalling units and the OCM drain move one byte per clock;
* the bus slave inserts a wait state exactly when a read follows a write.
