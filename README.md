# RedPitaya acquisition firmware: ping-pong packet buffers and a moving-average trigger

This is the programmable-logic part of a data-acquisition system built on a
RedPitaya board (Zynq Z010, dual 14-bit 125 MS/s ADC). The logic samples both
ADC channels, packs the samples into fixed-size packets and places each packet
in one of two block RAMs. The on-chip ARM processor reads a finished packet
and ships it over Ethernet while the logic fills the other RAM. This is
"ping-pong" buffering. Alongside the data path, a trigger averages the most
recent samples and raises a single output wire whenever the average crosses a
programmable threshold, so that events can be found in the logic rather than
on the host. Several boards can run side by side. One of them is the master:
when acquisition starts it resets the timestamp counter on every board,
through a daisy-chained cable, so that packets from different boards carry
comparable time stamps.

The processing blocks were first written as high-level-synthesis (HLS) C
functions with pipelining pragmas. This RTL implements the same behaviour
directly in SystemVerilog. Where the original leaves something open, the
choice made here is stated below and in each file's header.

```
            adc_a, adc_b (14 bit, 125 MHz)
                  |
          +---------------+   web/a/d (1 word/clk)   +---------------+  port A  +---------+
          |  adc_readout  |------------------------->| bram_pingpong |--------->| BRAM #0 |<-- ps_*_0
          | FIFOs A,B,ts  |<-------------------------|   (manager)   |--------->| BRAM #1 |<-- ps_*_1
          +---------------+   status FREE / FULL     +---------------+  port A  +---------+
                  ^                                      |  samp_data/samp_we
          timestamp|                                     v
          +---------------+                       +------------+   +-----------+   +------------+
start_cmd-|   ts_sync     |-- ts_rst_out          | trig_step0 |-->| sync_fifo |-->| trig_step1 |--> trig_out
ts_rst_in-|               |                       +------------+   +-----------+   +------------+
          +---------------+                                                          ^ threshold
                                                                                     | calculated
         pp_* AXI4-Lite --> hls_axil_ctrl (manager: start, error)   tr_* AXI4-Lite --> hls_axil_ctrl (trigger)
```

Everything runs on one clock, the 125 MHz ADC clock.

## The buffer handshake

The least obvious part of the design is how the readout, the manager and the
processor share the two RAMs without any extra signals. All coordination goes
through **word 0 of each buffer, the status word**:

| value       | meaning                                                  | written by |
|-------------|----------------------------------------------------------|------------|
| `BRAM_FREE` (0) | buffer may be filled                                 | processor, after reading the packet; also the power-up contents |
| `BRAM_FULL` (1) | buffer holds a complete packet, not yet read         | readout, as the last word of a packet |

The readout logic sees a single RAM-like write bus (`web` byte enables,
word address `a`, data `d`). It never knows which RAM it is writing. It also
receives one status word back from the manager:

1. The readout waits until the status is `BRAM_FREE`. It then writes the
   sample words, the header words and, last, `BRAM_FULL` at address 0.
2. The manager (`bram_pingpong`) passes each bus write to the RAM it is
   routing to (states `STATE_BRAM_0` / `STATE_BRAM_1`). When it sees the
   write to address 0, it turns the status to `BRAM_FULL` on the next clock.
   That holds the readout off.
3. The manager waits one cycle (`STATE_BRAM_READ_STATUS_PIPE_x`). It then
   polls the *other* RAM's status word (`STATE_BRAM_WAIT_FREE_y`). The RAM
   port it is not routing is always held at address 0, so its read data is
   the status word.
4. When the other RAM reads `BRAM_FREE`, the manager routes the bus there and
   reports `BRAM_FREE` to the readout again. If the processor is already done
   with the other RAM, the status is `BRAM_FULL` for exactly two clocks: it
   reads `BRAM_FREE` again three clocks after the status write reached the
   manager.
5. The processor watches word 0 of the RAM it expects next (the buffers
   alternate 0, 1, 0, ...). It reads the packet through the RAM's second
   port and writes `BRAM_FREE` to word 0.

While the readout is held off, samples collect in its FIFOs. A sample that
finds the FIFOs full is lost and counted in `ovf_count`. If the readout writes
a status word other than `BRAM_FULL`, the manager still hands the buffer over,
but it latches `ERR_WR_BRAM_0_FULL` (1) or `ERR_WR_BRAM_1_FULL` (2) in its
error register. The processor can read that register over AXI4-Lite.

All manager outputs are registered. A bus write therefore reaches the RAM
one clock after the readout drives it, and the readout has to allow one guard
clock after its status write before it looks at the status again. The
manager accepts one word per clock.

## Packet format

One packet fills one buffer: `BRAM_WORDS` = 1024 words of 32 bits.

| word        | content                                              |
|-------------|------------------------------------------------------|
| 0           | status (`BRAM_FULL` when complete)                   |
| 1           | packet number, counting from 0 after reset           |
| 2, 3        | timestamp of the first sample, low and high 32 bits  |
| 4 .. 1023   | one sample word per sampling instant: `{B[15:0], A[15:0]}` |

Each 16-bit half holds one channel in **offset binary, left aligned**: a
14-bit two's-complement ADC value `s` is stored as `{~s[13], s[12:0], 2'b00}`.
Mid-scale is therefore `0x8000`. A channel disabled with `ch_en` is stored
as `0x0000`.

The readout keeps one sample every `decim` clocks (0 and 1 both mean every
clock). The timestamp counts 125 MHz clock cycles, so the spacing of the
samples in a packet can be checked against the header.

## The trigger

`trig_step0` copies every sample word the manager writes into a packet into
the trigger FIFO. If the FIFO is full the word is dropped and counted.
`trig_step1` then works through the FIFO as follows:

* It takes the low half of the word (channel A), or the high half when the
  low half is zero, i.e. when channel A is off.
* It inverts the value around mid-scale: `val = 0x8000 - half`, a signed
  16-bit value. A negative-going detector pulse becomes a positive `val`.
* It keeps the last `DIM_BUFFER` (16) values in a circular buffer, with a
  running sum. Each new value is added, and the value it overwrites is
  subtracted. Until the buffer has filled once, values are only added.
* It computes `average = sum / DIM_BUFFER`, truncated, with negative averages
  forced to 0. The average is readable as `calculated`.
* `trig_out` is high while `average > threshold` and `average != 0x8000`.

The trigger has an initiation interval of two clocks. A word is popped in
one clock and the sum, average and output are updated in the next. So it
consumes at most 62.5 M words/s, and `trig_out` changes two clocks after a
pop. At `decim = 1` the sample words arrive at 125 MHz, faster than the
trigger can take them. The trigger FIFO then fills and words are dropped
(`trig_drop_count`). From `decim = 2` up, every word is examined.

## Timestamp synchronisation between boards

Boards share the master's sampling clock, so only their counters need
aligning. `ts_sync` on the master turns a rising edge of `start_cmd` into a
one-clock pulse on `ts_rst_out`. A slave forwards `ts_rst_in` to its own
`ts_rst_out` without a register, for the next board in the chain. Every
board registers the pulse once and clears its counter on the registered
pulse. All counters therefore restart on the same clock edge, three clocks
after START is seen on the master (cable delay ignored). Timestamps are
64-bit clock counts. The chain test (`tb_ts_sync`, a master and two slaves) checks that counters
which differed before START are equal afterwards.

## Processor registers (AXI4-Lite)

Each IP has its own AXI4-Lite slave (`hls_axil_ctrl`, 6-bit byte address).
The layout follows the usual HLS-generated register map:

| offset | manager (`pp_*`)            | trigger (`tr_*`)               |
|--------|-----------------------------|--------------------------------|
| 0x00   | control: bit0 `ap_start` (write 1 to start), bit1 `ap_done`, bit2 `ap_idle`, bit3 `ap_ready`, bit7 `auto_restart` | same |
| 0x10   | error register (read only)  | `threshold` (read/write)       |
| 0x18   | -                           | `calculated`, last average (read only) |

Both IPs run an endless loop. Once started they keep running until reset:
`ap_idle` reads 0, and `ap_done` and `ap_ready` are never set. Before the
manager is started, it reports `BRAM_FULL`, so the readout does not write.
Writes complete once address and data have both arrived, with an OKAY
response one clock later. Reads return one clock after the address.
`acq_en`, `ch_en`, `decim`, `is_master` and `start_cmd` are plain top-level
inputs. In a system they would come from processor-written registers whose
map is not defined here.

## Rates and sizes

* The readout and the manager move one 32-bit word per clock. That is both
  channels at the full 125 MS/s, 4 Gbit/s into the buffers.
* The processor's Ethernet path sustains about 400 Mbit/s, i.e. 12.5 M
  words/s. A packet carries 1020 sample words in 1024 words, so continuous
  acquisition needs 125e6/decim x 1024/1020 <= 12.5e6, that is
  `decim >= 11` (11.4 MS/s per channel). At lower settings the readout
  stalls and samples are lost, and both effects are counted.
* `decim = 25` gives 5 MS/s per channel.
* A 2-channel board times 6 boards covers an 11-channel setup.

## Choices made in this implementation

These points are not fixed by the original HLS design and were settled here:

* Status and error encodings (`cali_pkg`), the packet header layout, the
  1024-word buffer size, the FIFO depths (512) and `DIM_BUFFER = 16`.
* How the manager waits after a full buffer: a one-clock pipeline state, then
  polling of the other buffer's status word through the idle RAM port.
* The manager's error check is kept as specified, even though it tests the
  data of the status write rather than the state of the buffer: a status
  word other than `BRAM_FULL` is reported.
* The original running-sum update subtracts the value *after* the one it
  overwrites, which does not give the average of the last `DIM_BUFFER`
  samples that it is meant to compute. Here the overwritten value is
  subtracted, so the average is exact.
* The original converts a floating-point average to an unsigned integer,
  and that conversion is undefined for negative values. Here a negative
  average gives 0.
* The trigger uses one value per FIFO word (low half, else high half), as
  the original code does, even though each word holds two samples.
* Sample words hold channel A and channel B of the same instant. Offset
  binary was chosen so that the trigger's `0x8000 - half` sees mid-scale
  as zero.
* Decimation, channel enables, the three lockstep FIFOs (A, B, timestamp),
  the sample tap from the manager into the trigger, and the drop and
  overflow counters.
* A single clock and synchronous active-low reset everywhere. The vendor
  FIFO is replaced by `sync_fifo`.

Not part of this RTL: the ARM processor and its software, the AXI
interconnect and AXI BRAM controller (the second RAM port is brought out
instead), the ADC and DAC chips, the RedPitaya DAC/PWM cores, the XADC, the
oscillator and the resistor-selected clock source.

## Files

| file | role |
|------|------|
| `rtl/cali_pkg.sv` | status/error codes, header layout, manager state type |
| `rtl/redpitaya_cali_top.sv` | top level, wiring of everything below |
| `rtl/adc_readout.sv` | input formatting, decimation, FIFOs, packet writer |
| `rtl/bram_pingpong.sv` | ping-pong manager FSM |
| `rtl/bram_tdp.sv` | true dual-port 32-bit RAM with byte enables |
| `rtl/sync_fifo.sv` | single-clock FIFO, first-word fall-through |
| `rtl/trig_step0.sv` | sample tap into the trigger FIFO |
| `rtl/trig_step1.sv` | moving average and threshold |
| `rtl/hls_axil_ctrl.sv` | AXI4-Lite control and argument registers |
| `rtl/ts_sync.sv` | timestamp counter and master/slave reset chain |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each one has a watchdog that counts a failure if the test hangs. Example for
the whole design, at its default sizes:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_redpitaya_cali_top \
  -y rtl -y tb +libext+.sv rtl/cali_pkg.sv tb/tb_redpitaya_cali_top.sv
./obj_dir/Vtb_redpitaya_cali_top
```

For another module, replace the testbench name. The package file must come
first on the command line.

`tb_redpitaya_cali_top` drives the ADC inputs as functions of the timestamp.
Channel B is the timestamp itself; channel A is a baseline with a negative
pulse every 4096 clocks. A processor model programs both IPs, sends START,
reads and checks every packet from both buffers, and frees them. The test
then checks:

* the packet number, the header timestamp, the sample format and spacing,
  and the channel A value of each sample;
* the trigger-pulse count and the final average against a reference model.

The test runs in two phases:

* **Phase 1:** `decim = 4` with a quick processor. No sample may be lost.
* **Phase 2:** full rate with a slow processor. The readout is held off, the
  ADC FIFOs overflow and the trigger FIFO drops words.

Each of these mechanisms is counted and must occur. The unit testbenches
compare each block with an independent model, including the timing that
matters:

* three clocks from a status write to the buffer switch;
* one FIFO word every two clocks in the trigger;
* three clocks from START to the counter restart.

Two further testbenches run whole-system scenarios at default sizes:

* `tb_multi_board` chains six boards, one master and five slaves, with 11
  channels in all (channel B is off on the last board). Boards leave reset
  at different times and then receive START. Packet k of every board must
  carry the same timestamp and the same samples.
* `tb_stream_rate` reads packets through a processor model limited to one
  word every 10 clocks (400 Mbit/s). At `decim = 11`, 16 packets must stream
  without a lost sample. At `decim = 8` the FIFOs must overflow.

All of them pass. The design has not been run on hardware in this form.
