# Hydra: a reconfigurable network interface for a coarse-grained tile processor

Hydra sits between a circuit-switched Network-on-Chip (NoC) and a
coarse-grained reconfigurable DSP tile processor (TP) of the MONTIUM kind:
five ALUs, ten 1024 x 16-bit local memories and ten global buses. The tile
processor has no communication controller of its own. Hydra supplies one, and
it does two jobs at once:

* **It controls the tile processor.** A central manager sends short
  messages over the NoC. They configure the TP, load and read back its
  memories, and start, pause and reset its program.
* **It moves stream data.** Four NoC channels come in and four go out, joined
  to the TP's ten buses in each direction by full crossbars. The TP can read
  and write the NoC while it computes.

So the TP can run in two ways:

* **Block mode.** Load the inputs, run, retrieve the outputs. The TP is halted
  while data moves, and Hydra is the master.
* **Streaming mode.** The TP reads and writes the channels as it computes, and
  Hydra is its slave.

Hydra saves energy by stopping the tile clock whenever the TP cannot do
useful work. That happens before Run, after the program signals done, on a
Wait message, and whenever a stream read finds its input buffer empty or a
stream write finds its output buffer full. The tile clock can also be slowed
to f_NoC / 2^n.

This repository holds synthesizable SystemVerilog for the whole interface. It
also has unit testbenches and an end-to-end testbench that includes a
behavioural tile processor.

## Flits

Every NoC word is an 18-bit flit: a 2-bit type and a 16-bit payload
(`hydra_pkg::flit_t`).

| type | code | use |
|------|------|-----|
| H (header)  | `00` | address of what follows |
| T (tail)    | `01` | end of a message |
| D (data)    | `10` | data word or parameter |
| C (command) | `11` | starts a message; payload[2:0] is the command |

The type codes and the position of the command in the payload are this
design's choice.

## The message protocol

Each message begins with a C flit. Messages are executed **flit by flit, as
they arrive**. There is no check of the whole message. A badly formed message
is not rejected: the parts that make sense are carried out. A new C flit
interrupts whatever the previous message on the same channel was still doing.

Each input channel has its own message context (`msg_channel`), with its own
port into the TP memories. Messages on different channels run side by side,
so four DMA loads or retrieves can run at once, one word per tile cycle on
each channel. Run, Wait and Reset act on the one TP, whichever channel they
come from. Configuration writes share one port. When several channels
configure at once, the lowest-numbered one goes first and the others wait.

| code | message | format | effect |
|------|---------|--------|--------|
| 000 | Configuration | `C [H D+]+ T` | H = configuration address; each D is written to the next address |
| 001 | DMA load      | `C [H D+]+ T` | H = memory (payload[15:10]) and offset (payload[9:0]); each D is written to the next word |
| 010 | DMA retrieve  | `C [H D]+ T`  | H as for load; D = number of words; the words return as D flits |
| 011 | Get status    | `C`           | one status word returns as a D flit |
| 100 | Run           | `C`           | starts the TP program |
| 101 | Wait          | `C`           | halts the TP until the next message arrives |
| 110 | Reset         | `C`           | resets the TP for one tile clock |

Replies (retrieved words and status) leave on the output channel with the
same number as the input channel the message came in on.

**Configuration addresses.** The Configuration message writes two spaces,
chosen by address:

* Below `0xF000` the words go to the TP's configuration port.
* At `0xF000` and above they configure Hydra itself:

| address | contents |
|---------|----------|
| `0xF000 + 4*i + ch` | decoder instruction `i`, entry for output channel `ch` (16 instructions) |
| `0xF100 + 4*ch + k` | ROM word `k` of output channel `ch` (4 per channel) |
| `0xF200`            | tile clock divider `n` (0..4) |

So a single Configuration message can set up both the TP and Hydra for a
streaming application, using one H flit for each space. The boundary and the
map are this design's choice.

**Status word**, captured when the Get status command is taken:

| bits | 15 | 14 | 13 | 12 | 11:8 | 7:6 | 5:3 | 2:0 |
|------|----|----|----|----|------|-----|-----|-----|
| field | running | waiting | stalled | in reset | retrieve busy, one bit per channel | 0 | command still open on the asking channel (`111` = none) | n |

## How an input channel is read (`flow_control`)

Control messages and stream data share the same channels, so each channel has
a *message flag*:

* It is set by the C flit of a command that has a body: Configuration, DMA
  load or DMA retrieve.
* It is cleared by that message's T flit.
* A C flit of a command without a body (status, run, wait, reset) leaves the
  flag clear.

The flit at the head of each input buffer is handled by the first rule that
applies:

1. **C flit**: goes to the channel's message context as soon as that context
   has no reply waiting to be sent.
2. **H, D or T flit, flag set**: goes to the channel's context. A context
   takes one flit per tile clock. It takes none while its retrieve is running
   and, for a Configuration, none while another channel holds the shared
   configuration port.
3. **D flit, flag clear**: stream data, offered to the TP through the
   NoC-to-TP crossbar.
4. **H or T flit, flag clear**: dropped.

Rules 3 and 4 never wait for the message contexts, and one channel never
waits for another, except for the shared configuration port.

## Streaming: decoder instructions and ROMs (`flit_formatter`)

**Reading.** For every one of its ten buses, the TP names the input channel
it wants (`tp_rd`, `tp_rd_ch`). It gets that channel's head payload in the
same cycle (`tp_bus_out`). Several buses may read one channel, and the
channel is popped once.

**Writing.** The TP raises `tp_send` and selects one of 16 decoder
instructions (`tp_instr`). An instruction has one 16-bit entry per output
channel (`dec_entry_t`):

```
[15] en   [14] from_rom   [13:12] rom_idx   [11:10] flit type   [9:4] unused   [3:0] bus
```

Every enabled channel receives a flit of the given type. Its payload is one
of:

* the selected TP bus, through the TP-to-NoC crossbar;
* one of the channel's four ROM words, which the TP program can use for
  headers, synchronisation words or commands.

All enabled channels are written together in one tile cycle.

**Replies.** The replies of the message contexts always go out as D flits
and have priority on their channel. A stream write that wants a channel held by a
reply waits one cycle.

**Latency.** A flit written at a tile clock edge is at the NoC output in the
next NoC cycle, and stream data read at a tile clock edge is the buffer head
in that same cycle.

## Tile clock, halting and the TP interface

Everything in Hydra runs on the NoC clock `clk`.

**The tile clock** is f_NoC / 2^n with n = 0..4. It is given to the TP as
enables, not as a separate clock:

* `tp_tick` pulses once per tile cycle.
* `tp_clk_en = tp_tick & ~tp_halt` is the gated tile clock.

`tp_halt` is high in any of these cases:

* the TP is not running (before Run, or after `tp_done`);
* a Wait message is in force;
* the TP asks for a stream read from a channel with no stream data;
* the TP asks for a stream write to a full output buffer, or to a channel
  taken by a reply.

A TP cycle takes place only when *all* of its requested reads and writes can
be done. The TP holds its requests until a `tp_clk_en` pulse.

**Configuration and memory port.** This port is clocked by `tp_tick`, so it
also works while the TP is halted:

* There is one configuration port and one memory port per input channel
  (`tp_mem_*[ch]`). The TP must serve all memory ports in the same tile
  cycle, as its ten memories allow.
* `tp_cfg_we`, `tp_mem_we` and `tp_mem_re` are valid in tick cycles.
* Read data (`tp_mem_rdata[ch]`) is expected at the next tick and must be held
  until the next read on that port.
* A DMA load writes one word per tile cycle.
* A DMA retrieve is pipelined and returns one word per tile cycle while the
  output buffer has room.

`tp_done` is the TP's end-of-program interrupt and is sampled on ticks.
`tp_rst` stays high until the next tick.

**NoC channels** use valid/ready. A flit moves in a cycle where both are high.

## Modules

| file | contents |
|------|----------|
| `rtl/hydra_pkg.sv` | flit and command types, decoder entry, address map |
| `rtl/hydra_top.sv` | the interface: 4+4 buffers, flow control, crossbars, formatter, message executor, clock divider |
| `rtl/flit_fifo.sv` | one channel buffer, 4 flits, first-word fall-through |
| `rtl/flow_control.sv` | channel reading, message/stream separation, TP halt |
| `rtl/msg_exec.sv` | message execution: one context per channel, shared configuration port, program control and status |
| `rtl/msg_channel.sv` | one channel's message context: configuration, DMA load and retrieve, status reply |
| `rtl/flit_formatter.sv` | decoder instructions, ROMs, output flit formation |
| `rtl/xbar_to_tp.sv` | crossbar, input channels to TP buses |
| `rtl/xbar_to_noc.sv` | crossbar, TP buses to output channels |
| `rtl/clock_divider.sv` | f_NoC / 2^n enable and clock gating |

Default sizes: 4 channels each way, 10 buses each way, 4-flit buffers,
16-bit payloads, 10-bit memory offsets, 16 decoder instructions and 4 ROM
words per channel. All are parameters of `hydra_top`, except the ROM depth,
which is fixed by the 2-bit `rom_idx`. The synthesised size is roughly 1,600
flip-flops, plus 576 bits of buffer memory. Most of the flip-flops are the
decoder instructions and ROMs.

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/hydra_pkg.sv tb/tb_hydra_top.sv \
          --top-module tb_hydra_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

Testbenches are provided for every module except `msg_channel`, which is
tested through `tb/tb_msg_exec.sv`. `tb/tb_hydra_top.sv` runs the
full-size interface through a complete block-mode cycle, and then a streaming
run:

* **Block mode:** Configuration, DMA load, Run, done, DMA retrieve, with the
  retrieve rate checked.
* **Messages:** a status reply; a configuration message cut short by a new
  command on its channel; DMA load and retrieve on all four channels in
  parallel, checked to take about as long as one channel's share.
* **Streaming:** the clock divider changed from n = 1 to n = 0; a streaming
  program that reads two channels and writes three through two decoder
  instructions and a ROM word; random gaps on the NoC inputs and back-pressure
  on the outputs; a stray header; a Wait in the middle of the run.
* **Reset.**

Two more testbenches run application kernels on the full-size interface:

* `tb/tb_fft64_block.sv`: a 64-point FFT symbol in block mode at n = 0. It
  loads 128 words over four channels, waits 204 compute cycles of a stand-in
  TP, and retrieves 128 words over four channels. The whole symbol has to fit
  in 400 cycles (4 µs at 100 MHz). It takes about 280: 35 cycles to load,
  206 to compute and 39 to retrieve.
* `tb/tb_rake_stream.sv`: a RAKE-receiver style streaming loop at n = 3
  (f_NoC / 8). Finger samples arrive on channels 0 and 1 and complex codes on
  channels 2 and 3, all streamed at once. Every 16 samples a complex sum goes
  out on channels 0 and 1. The test checks the results and that the TP never
  stalls, at two tile cycles per sample.

The arithmetic in both stand-in TPs is a placeholder. The tests are about the
data movement and the timing.

The testbench counts each mechanism (stall on empty input, stall on full
output, Wait halt, idle halt, input back-pressure, ROM flits, instruction
switch, one-cycle latency). It fails if any of them never happened. The TP in
that testbench is a behavioural model with a block program
(`mem5[i] = mem2[i] + 1`) and a streaming program.

## How far this follows the original design, and where it does not

**Taken from the original design:**

* the flit format and the four flit types;
* the seven messages, their codes and formats, and flit-by-flit execution
  with interruption by a new command;
* auto-incremented addresses after each H flit;
* four channels each way, with a separate four-flit buffer per channel;
* full crossbars in both directions;
* D-flit formatting of retrieved memory;
* decoder instructions chosen by the TP, and four configurable ROM flits per
  output channel;
* one configuration space shared between the TP and the interface;
* a flow control that keeps reading the channels;
* halting the TP on empty or full buffers and on Wait;
* f_NoC / 2^n tile clocks with n = 0..4.

**Choices made here**, where the original design gives no detail:

* the numeric flit-type codes and the command position;
* the Hydra address map, the decoder entry layout, and 16 instructions;
* the split of the DMA header into memory and offset;
* the count parameter of DMA retrieve;
* the status word;
* the reply channel;
* the valid/ready handshakes and the whole TP-side interface;
* the rule that only commands with a body open a message on a channel;
* interruption applying per channel;
* the lowest channel first on the shared configuration port.

**Departures:**

* **One clock domain.** The original buffers also cross between the NoC and
  tile clocks. Here the tile clock is derived from the NoC clock and is
  treated as an enable, so the buffers are single-clock. Putting the TP on a
  truly separate clock would need dual-clock buffers in `flit_fifo` and
  synchronised handshakes on the TP port.
* **Interruption per channel.** The original text says a new command
  interrupts previously received messages. It also counts block-mode
  communication as spread over L parallel channels. Both cannot hold for DMA,
  so here a command interrupts only the message on its own channel, and DMA
  runs on all channels at once.
* **Simplified waiting.** While a channel's DMA retrieve is running, further
  message flits of that channel wait. Stream data and other channels keep
  moving.

**Fit of the application kernels** (cycle counts and sizes are the published
ones):

| kernel | fits |
|--------|------|
| HiperLAN/2 FFT-64, streaming (59 MHz, 4 channels) | yes, at n = 0 |
| HiperLAN/2 FFT-64, block mode, L = 4 | yes: about 70 DMA cycles over four channels plus 204 compute cycles, within 400 |
| HiperLAN/2 FFT-64, block mode, L = 1 | no, it needs 115 MHz |
| DRM FFT-256 | yes |
| Bluetooth 5-tap FIR, 1024 samples | yes |
| UMTS RAKE (4 channels, about 10 MHz) | yes, at n = 3 (12.5 MHz) |
