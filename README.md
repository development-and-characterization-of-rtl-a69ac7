# MOPS — a CANopen monitoring chip for detector power chains

MOPS (Monitoring of Pixel System) is a small radiation-hard chip that sits next
to a serial powering chain of pixel detector modules. It digitises up to 40
analog levels (module voltages and temperatures) with a 12-bit ADC and answers
requests from a control computer over a shared CAN bus using a subset of
CANopen. Many chips share one bus, so each has a node number set by two
address pins. The chip has no crystal: it runs from an on-chip 10 MHz
relaxation oscillator that trims itself against the bit timing of the bus.

This repository holds SystemVerilog for the digital part of the chip. It also
has behavioural models of the mixed-signal parts that have a logic function
(oscillator, ADC, power-on reset), so the whole chip can be simulated against a
CAN bus model.

## What the chip does on the bus

All traffic is CAN 2.0A base frames at 125 kbit/s. Only the master sends
requests; the chip answers.

| Frame from master | Chip's reaction |
|---|---|
| none (after power-up or reset) | sends **sign-in** `0x700+node`, byte 0 = `0x05`, and repeats it until someone acknowledges it |
| `0x700+node` (node guarding) | answers `0x700+node` with `{toggle, 0x05}`; the toggle bit flips on every request and starts at 1 after a sign-in |
| `0x600+node` SDO upload (`0x40`) | answers `0x580+node` with `0x43`/`0x4B`/`0x4F` (4, 2 or 1 valid bytes), index, sub-index and the value, little endian |
| `0x600+node` SDO download (`0x2F`/`0x2B`/`0x23`) | writes the entry and answers `0x60` |
| SDO to a missing or protected entry | answers with an abort frame `0x80` and a CANopen abort code |
| ID `0` (remote reset) | drops everything, trims the oscillator again and signs in again |
| `0x555` frames of `0xAA` bytes | used only while trimming: the many edges feed the trimming loop |

A read of an ADC-mapped entry starts a conversion. The answer leaves about
1.4 ms after the request: a 12-bit conversion at a 10 kHz ADC clock. That is the
chip's processing time per message.

### Object dictionary

| Index | Sub | Content | Access |
|---|---|---|---|
| 1000h | 0 | device type 191h | read |
| 1001h | 0 | error register 0 | read |
| 1005h | 0 | COB-ID SYNC 80h | read |
| 1014h | 0 | COB-ID EMCY 80h+node | read |
| 1018h | 0, 1 | 1 entry; vendor ID 12345678h | read |
| 1200h | 0–2 | 2 entries; 600h+node, 580h+node | read |
| 1800h, 1801h | 0–6 | TPDO parameters: 180h/280h+node, type FEh, rest 0 | read |
| 1A00h, 1A01h | 0, 1 | mapping 21000020h, 21010030h | read |
| 2001h | 0 | ADC trimming bits (6 bits kept), output `adc_trim_o` | read/write |
| 2100h | 0 | monitoring record, refused for SDO access | abort |
| 2310h | 1–3 | VBANDGAP, VCANSEN, VGNDSEN = ADC channels 0–2 | read (ADC) |
| 2400h | 1–20h | monitoring inputs = ADC channels 3–34 | read (ADC) |

The ADC channel numbering is a choice of this design. Abort codes used:
`05040000` time-out, `05040001` unknown command, `06010000` access refused,
`06010001` write-only, `06010002` read-only, `06020000` no object,
`06060000` hardware error, `06060007` communication time-out, `06090011` no
sub-index, `08000000` general.

## How the digital part is organised

```
 rxcan ─► can_node (can_bit_timing + can_bsp) ─► can_node_if ─► msg_buffer (rx, TMR)
                ▲  phase error                      │ rank (msg_prioritizer)
                │                                   ▼
          auto_trim ◄──── top_fsm ◄──── new message / done pulses
                             │
                             ▼
                      canopen_ctrl ── canopen_decoder, object_dictionary,
                             │         sdo_failure_response, adc_interface ─► ADC
                             ▼
                      msg_buffer (tx, TMR) ─► can_node_if ─► can_node ─► txcan
 watchdog_timer / config_reloader watch the four state machines
```

Four state machines are watched: `top_fsm`, `can_node_if`, `canopen_ctrl` and
`adc_interface`. Each one reports whether it is idle.

### Priorities instead of a queue

The chip keeps no queue; it holds one received frame. Each incoming frame gets a
rank: remote reset 3, SDO request 2, node guarding 1, anything else 0. The
frame goes into the receive buffer only if it outranks the work in progress.
The rank of the work in progress is 0 when idle, 3 while trimming, 2 during
start-up, and otherwise the rank of the request being handled. A frame that
outranks the current one aborts it, so a remote reset always gets through and
a guarding request that arrives during an ADC read is dropped. The master is
expected to repeat requests it gets no answer to.

### Start-up and trimming

After power-up the top state machine first writes the fixed configuration
(`can_config`) into the CAN node: prescaler 5, 16 time quanta per bit, sample
point after quantum 12, SJW 4, every identifier accepted. If the
`auto_trim_en` pad is set it then trims.

While trimming, the CAN node is listen-only. Every resynchronising falling edge
yields a signed phase error in time quanta:
- positive when the edge comes late (before the sample point);
- negative when it comes early (after it).

`auto_trim` is a PI controller:

`code = start_code + (KP·e + KI·Σe) >>> 4`, clamped to 0…63,

with KP = 2 and KI = 1. A larger code means a slower clock. After 15 frames the
code is frozen, `ready_osc` goes high and the chip signs in.

Trimming runs only after power-up and after a remote reset. With trimming
disabled, the code comes from the six trim pads.

The oscillator model has a period of 68 ns + 1 ns × code, so code 32 is 10 MHz.
The chip testbench starts the oscillator 4 % slow; trimming settles on code 28.

### Watchdogs

- **Watchdog timer.** If any of the four machines stays out of Idle for 5 s
  (50 000 000 clocks), it soft-resets them all. The chip then reloads its
  configuration and signs in again without trimming. If the timeout hits
  during trimming, the trim code goes back to 32.
- **Configuration reloader.** If all four machines stay idle for 250 ms
  (2 500 000 clocks), it rewrites the CAN configuration and resets the state
  machines. This repairs a configuration corrupted by an upset, which could
  otherwise keep a node bus-off.

### Radiation hardening

Everything that holds state for long is triplicated with refresh voters
(`tmr_reg`, `msg_buffer`): each copy reloads the majority value every clock,
so a single upset is repaired within one cycle. This covers:
- the receive and transmit buffers;
- the trimming code;
- the ADC trimming bits.

The chip also carries two 3000-bit shift registers for upset-rate tests, one
plain and one triplicated (`seu_shift_register`).

## Interface of the top (`mops_chip`)

| Port | Dir | Meaning |
|---|---|---|
| `vdd_mv_i[15:0]` | in | supply in mV (drives the power-on reset model) |
| `resetd_n_i` | in | external reset, active low |
| `addrcan_i[1:0]` | in | node number 0–3 |
| `auto_trim_en_i` | in | enable automated trimming |
| `trim_pads_i[5:0]` | in | trim code used when automated trimming is off |
| `rxcan_i`, `txcan_o` | in/out | logic side of the CAN transceiver, 0 = dominant |
| `adc_vin_i[40]` | in | the 40 analog inputs as ideal 12-bit codes |
| `clk_out_o`, `reset_out_o` | out | oscillator clock and power-on reset |
| `ready_osc_o`, `osc_trim_o[5:0]` | out | trimming finished; current trim code |
| `adc_trim_o[5:0]` | out | ADC trimming bits from entry 2001h |
| `tec_o[8:0]`, `bus_off_o` | out | CAN transmit error counter, bus-off |
| `sr_shift_i`, `sr_in_i`, `sr_out_o[1:0]` | in/out | SEU test shift registers (plain, triplicated) |

Parameters (defaults are the chip's values):
- `WDT_CYCLES` = 50 000 000
- `RELOAD_CYCLES` = 2 500 000
- `ADC_DIV` = 1000
- `SEU_LEN` = 3000
- `OSC_PROCESS_PPM` = 0, a process offset of the untrimmed oscillator, for testing

## Where this design makes its own choices

- The CAN protocol unit is written from the CAN 2.0A standard. Specifically:
  - The register map and the bit-time split are this design's choices.
  - Extended frames are ignored.
  - Frames the chip sends always have DLC 8, because the message buffer
    stores an identifier and 8 data bytes but no length.
- The PI gains, the shift of 4 and the default code 32 are chosen here.
- The rank order is this design's reading of the priority scheme.
- The ADC interface runs the converter at 10 kHz. Timing details:
  - the channel is selected two ADC clocks ahead;
  - start-of-conversion lasts one ADC period;
  - the result is read serially, MSB first.
- The power-on reset threshold (930 mV) and hold time (1 µs) are model values.
  The same holds for the oscillator's 1 ns per code step.
- Not modelled: the regulator, the bandgap reference, the CAN transceiver and
  the analog front ends. The analog inputs are given as codes.

## Simulating

The testbenches use Verilator 5 with timing support and need no other tools:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl rtl/mops_pkg.sv \
          tb/can_bfm.sv tb/tb_mops_chip.sv --top-module tb_mops_chip
./obj_dir/Vtb_mops_chip
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. Bus-level tests share `tb/can_bfm.sv`, a time-based
CAN node that:
- decodes every frame sent by others;
- acknowledges frames when `ack_en` is set;
- sends frames with `send()`.

- `tb_mops_chip`: the whole chip with the watchdog shortened to 50 ms and the
  reload to 20 ms. It covers:
  - trimming from a 4 % slow oscillator;
  - sign-in repeated without acknowledge;
  - SDO reads of constants and ADC entries, including the ADC latency;
  - an SDO write and read-back of 2001h;
  - five abort codes;
  - node guarding toggling;
  - dropping of a lower-ranked request;
  - remote reset pre-empting a conversion;
  - a watchdog timeout during trimming, and restart through the reset pad;
  - a configuration reload;
  - manual trimming;
  - SEU shift registers with an injected upset.

  It counts each of these and fails if one never happened. It simulates about
  180 ms in a few seconds.
- `tb_mops_chip_full`: the chip with every parameter at its default. It runs
  power-up, trimming, sign-in, an ADC read, a 300 ms pause with one
  configuration reload, and a second read.
- The other `tb_<block>.sv` files test single blocks against reference values
  worked out in the testbench.

Without a crystal the untrimmed clock can be several percent off. That is
beyond what CAN reception tolerates, so after a watchdog timeout with the
default code the chip can still send but not reliably receive. In the chip
testbench, a pulse on the reset pad followed by a new trim recovers it.
