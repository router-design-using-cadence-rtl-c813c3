# 1x32 packet router with clock-gated output FIFOs

This router has one input port and 32 output channels. A sender pushes
variable-length packets of 32-bit words into the input port. The router reads
each packet's destination from its header and queues the whole packet in that
channel's FIFO, where the receiver collects it. Two properties matter most:

* **No word is ever dropped.** When the destination FIFO is full, or still
  holds an earlier packet, the router raises `suspend_data`. The sender then
  holds the bus until `suspend_data` falls. A word that was already accepted
  when the FIFO filled up is kept in a spare register and written later.
* **Only active FIFOs are clocked.** Each of the 32 FIFOs has its own clock
  gate. A FIFO receives a clock edge only in a cycle in which it is written or
  read. The other FIFOs keep their contents with their clock stopped, which
  saves most of the clock power of the 32 buffers.

A parity word at the end of each packet lets the router flag corrupted
packets on `error`.

## Packet format

All words are `DATA_W` = 32 bits wide.

| word      | contents                                                        |
|-----------|-----------------------------------------------------------------|
| header    | bits [4:0]: destination channel 0..31; bits [31:5]: length      |
| payload   | any number of data words, including none                        |
| parity    | bitwise XOR of the header and every payload word                |

The router does not use the length field. The sender marks the packet with
`pkt_valid`: it is high from the header through the last payload word, and
low while the parity word is on the bus. The receiver can use the length to
find the packet boundaries in its channel's word stream.

## Ports of `router_top`

| port                 | dir | width       | meaning                                    |
|----------------------|-----|-------------|--------------------------------------------|
| `clock`              | in  | 1           | all logic runs on the rising edge          |
| `resetn`             | in  | 1           | asynchronous reset, active low             |
| `data`               | in  | 32          | input word                                 |
| `pkt_valid`          | in  | 1           | header and payload words are on `data`     |
| `suspend_data`       | out | 1           | sender must hold `data` and `pkt_valid`    |
| `error`              | out | 1           | the last packet's parity was wrong         |
| `vld_out[i]`         | out | 32          | FIFO i holds at least one word             |
| `read_enb[i]`        | in  | 32          | read one word from FIFO i                  |
| `data_out[i]`        | out | 32 x 32     | last word read from FIFO i                 |

## Input handshake

The sender should change its signals on the falling edge of the clock. The
router samples them on the rising edge. A word is **taken** at a rising edge
if `suspend_data` was low during the cycle that ends at that edge. The sender
presents each word until it is taken, then moves to the next one:

```
cycle        0     1     2     3     4     5     6     7     8
data        H     H     D0    D1    D2    P     x     x     H'
pkt_valid   1     1     1     1     1     0     0     0     1
state       DA    LFD   LD    LD    LD    LD    LP    CPE   DA
suspend     0     1     0     0     0     0     1     1     0
taken       H     -     D0    D1    D2    P     -     -     H'
```

(DA = DECODE_ADDRESS, LFD = LOAD_FIRST_DATA, LD = LOAD_DATA, LP =
LOAD_PARITY, CPE = CHECK_PARITY_ERROR.) With an empty destination FIFO that
does not fill up, a packet with N payload words occupies the input for N + 5
cycles. The next header can follow directly. `error` is valid 3 cycles after
the parity word was taken, and 1 to 10 cycles after it as long as the FIFO
has room. It stays valid until the next header is taken.

`suspend_data` can stay high for as long as a receiver leaves its FIFO
unread. With receivers that read whenever `vld_out` is high, it never stays
high for more than a few cycles.

## Output side

`vld_out[i]` is simply "FIFO i is not empty". A receiver raises `read_enb[i]`
for one cycle to read a word. The word appears on `data_out[i]` after that
rising edge and stays there until the next read. A read of an empty FIFO is
ignored. Several receivers may read in the same cycle. A FIFO may be read in
the same cycle in which it is written.

## The input controller (`router_fsm`)

The controller is the heart of the design. Its job is to keep the sender, the
input register and the addressed FIFO in step when the FIFO can refuse a
word. It has eight states:

| state              | what happens                                             | next                                                                                                   |
|--------------------|----------------------------------------------------------|--------------------------------------------------------------------------------------------------------|
| DECODE_ADDRESS     | idle. A word with `pkt_valid` is a header: store it and its address | LOAD_FIRST_DATA if that FIFO is empty, else WAIT_TILL_EMPTY                                  |
| WAIT_TILL_EMPTY    | stall until the addressed FIFO has drained               | LOAD_FIRST_DATA when it is empty                                                                      |
| LOAD_FIRST_DATA    | copy the stored header into the output register `dout`   | LOAD_DATA                                                                                              |
| LOAD_DATA          | take one word per cycle and write the previous one       | FIFO_FULL_STATE if full; LOAD_PARITY if `pkt_valid` is low (parity word taken); else stay              |
| FIFO_FULL_STATE    | stall, no write                                          | LOAD_AFTER_FULL when the FIFO has room                                                                 |
| LOAD_AFTER_FULL    | write the word that was refused                          | CHECK_PARITY_ERROR if the parity word is already written out (`parity_done`); LOAD_PARITY if the parity word arrived meanwhile (`low_packet_valid`); else LOAD_DATA |
| LOAD_PARITY        | write the parity word                                    | FIFO_FULL_STATE if full, else CHECK_PARITY_ERROR                                                       |
| CHECK_PARITY_ERROR | compare parities, set `error`                            | DECODE_ADDRESS                                                                                         |

`suspend_data` is low only in DECODE_ADDRESS and LOAD_DATA, the two states
that take a word from the bus. The FIFO is written (`write_enb_reg`) in
LOAD_DATA, LOAD_PARITY and LOAD_AFTER_FULL.

### How a full FIFO is handled

The subtle part is that a word is written into the FIFO one cycle after it
was taken from the bus. In LOAD_DATA the router takes word k from the bus and,
in the same cycle, tries to write word k-1 (held in `dout`). If the FIFO is
full in that cycle:

1. The write of word k-1 fails, and `dout` keeps it.
2. Word k has already been taken (`suspend_data` was low). It is parked in a
   second register, the full-state word `fsb`.
3. FIFO_FULL_STATE stalls the sender until the FIFO has room.
4. LOAD_AFTER_FULL writes word k-1 from `dout` and moves word k from `fsb`
   into `dout`.
5. Back in LOAD_DATA, word k is written while word k+1 is taken.

There are three ways out of LOAD_AFTER_FULL, because the parity word may be
in one of three places when the FIFO fills up:

* **Parked in `fsb`.** The FIFO filled in the cycle the parity word was taken.
  LOAD_AFTER_FULL moves it to `dout` and goes to LOAD_PARITY, which writes it.
* **Already in `dout`.** The FIFO filled during LOAD_PARITY. LOAD_AFTER_FULL
  writes it and goes straight to CHECK_PARITY_ERROR.
* **Not yet sent.** LOAD_AFTER_FULL returns to LOAD_DATA.

The FIFO refuses a write whenever it is full, even if it is read in the same
cycle. That way the register can tell from `full` alone whether its word was
taken.

## Input datapath (`router_reg`)

* `header`: loaded in DECODE_ADDRESS, copied to `dout` in LOAD_FIRST_DATA.
* `dout`: the word offered to the FIFO. It changes only when its previous
  word has been written.
* `fsb`: the parked word described above.
* `int_par`: starts as the header. Every payload word is XORed in when it is
  taken.
* `pkt_par`: the parity word, captured when it is taken (LOAD_DATA with
  `pkt_valid` low). That moment also sets `low_packet_valid`.
* `parity_done`: set once the parity word sits in `dout`.
* `err`: set in CHECK_PARITY_ERROR to `int_par != pkt_par`. The next header
  clears it.

## Address synchronizer (`router_sync`)

This block stores the 5-bit address of the header and decodes
`write_enb_reg` into a one-hot write enable for the addressed FIFO. It also
returns that FIFO's `full` and `empty` flags to the controller.

During DECODE_ADDRESS the address is not stored yet. The empty flag is then
taken from the address on the bus, because the controller decides in that
same cycle whether to wait. A header whose address names no channel is
ignored; with 32 channels and a 5-bit field this cannot happen.

## Output FIFOs and clock gating (`router_fifo`, `clock_gate`)

Each FIFO is a circular buffer of 16 words with a word counter. Its read port
is registered. Its reset is asynchronous, so it clears even while its clock
is stopped.

`clock_gate` is the usual latch-based gate. A latch, transparent while the
clock is low, holds the enable, and the gated clock is the clock ANDed with
the latched enable. An enable that changes while the clock is high therefore
cannot shorten or add a pulse. The enable of FIFO i is
`write_enb[i] | read_enb[i]`. The FIFO logic itself also checks both enables,
so the gate only saves power; it is not needed for correct operation.

The latch in `clock_gate` is intended, and lint tools report it. A
technology library would replace the module with its clock-gating cell.

## Parameters

| parameter    | default | where                              | note                                      |
|--------------|---------|------------------------------------|-------------------------------------------|
| `NUM_CH`     | 32      | `router_top`, `router_sync`, `router_fsm` | output channels; address width is `$clog2(NUM_CH)` |
| `DATA_W`     | 32      | all                                | word width                                |
| `FIFO_DEPTH` | 16      | `router_top` (`DEPTH` in `router_fifo`) | words per channel                    |

The defaults live in `router_pkg`. `DATA_W` must be greater than the
address width.

## What was chosen here

The channel count, word width, header layout, state names and transitions,
the handshake signals and clock gating of the FIFOs are the design as
described. The following points were not specified and are this
implementation's choices:

* FIFO depth of 16 words.
* Parity as the XOR of header and payload words.
* Asynchronous active-low reset.
* Registered FIFO read port, and `vld_out` = not empty.
* The parked-word mechanism and the exact per-state values of `suspend_data`
  and the write enable.
* `error` held until the next header.
* In LOAD_AFTER_FULL, the choice between LOAD_DATA and LOAD_PARITY is made by
  the latched `low_packet_valid` flag. The sender is stalled at that point,
  so the live `pkt_valid` cannot carry that information.

There is no timeout or soft reset for a receiver that never reads its
channel: such a channel blocks the input for as long as packets keep
arriving for it. The router also does not use the header length field.

## Files

* `rtl/router_pkg.sv`: default sizes, controller state type
* `rtl/router_top.sv`: top level
* `rtl/router_fsm.sv`, `rtl/router_reg.sv`, `rtl/router_sync.sv`: input side
* `rtl/router_fifo.sv`, `rtl/clock_gate.sv`: output channels
* `tb/tb_<block>.sv`: one self-checking testbench per block
* `tb/tb_router_workloads.sv`: reference packets, see below

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog stops a hung run.

* `tb_router_top` runs the whole router at its default size. It sends 400
  random packets (0 to 20 payload words, one in five with a corrupted parity
  word) and compares every word each receiver reads against what was sent. In
  a first phase every receiver reads at once. This phase also checks that
  `suspend_data` never stays high for more than 100 cycles. In a second phase
  the receivers read rarely and most packets go to four channels. This phase
  forces every controller path at least once: waiting for an empty FIFO, a
  full FIFO, and all three exits of LOAD_AFTER_FULL. The test also checks
  `error` and its latency after each packet. In every cycle it checks that
  exactly the FIFOs being written or read receive a clock edge.
* `tb_router_workloads` runs four fixed cases at the default size:
  * A packet to channel 20 with payload 16, 10, 28, 15 and parity word 8.
    That parity is wrong (the XOR is 29), so `error` must rise.
  * Packets to channels 21 and 22.
  * A packet read back through channel 0.
  * A FIFO written with 0, 10, ..., 150 while it is being read.
* `tb_router_fsm` compares the controller with a transition list, under
  random inputs. It requires every transition to occur at least once.
* `tb_router_reg` drives the register through legal state sequences: full
  FIFOs at random points, in the parity cycle and in LOAD_PARITY. It checks
  the words written and `err`.
* `tb_router_sync`, `tb_router_fifo` and `tb_clock_gate` test their block
  against a model under random stimulus.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/router_pkg.sv \
    tb/tb_router_top.sv --top-module tb_router_top -o sim
./obj_dir/sim
```

Replace `tb_router_top` with any other testbench name. All testbenches finish
in well under a second.

The design also carries assertions, which `--assert` enables:

* `dout` is stable while the FIFO is full.
* The parity word is in `dout` by LOAD_PARITY.
* A header is only taken when the controller is idle.
