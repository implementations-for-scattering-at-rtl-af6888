# Low-power bit-stream generator for a battery-less back-scattering transponder

A battery-less tag can talk to an unmodified mobile phone by back-scattering a
Bluetooth Low Energy carrier that another phone sends. The tag switches an oscillator
between 4 MHz and 4.5 MHz. A modulator on the antenna then shifts the reflected carrier
up by one of those two frequencies, so it lands on either side of BLE channel 39
(2480 MHz ± 0.25 MHz). To the receiving phone this is a frequency-shift-keyed BLE
packet. The tag's logic only has to produce the packet's bits: a fixed 200-bit message
at 1 Mbit/s, sent once after each power-on reset. All of the tag's power comes from a
capacitor charged by RF harvesting. So what counts is how little energy the logic spends
per message, and the design is shaped around keeping flip-flops and wires from
switching without need.

This repository holds that bit-stream generator as synthesizable SystemVerilog. It is
written for a small CPLD (or a 180 nm ASIC) clocked by a 1 MHz crystal oscillator. It
contains all five development steps that take it from a plain synchronous circuit to the
low-activity version, and the `STEP` parameter selects one.

## Block structure

```
            +-------------------- bitstream_generator ----------------------+
 clk 1 MHz  |  +-----------+  cnt[7:0]   +-------------+     +-----------+  |  tx
 ---------->+->|    SDC    |------------>| ROM / ROM_b |---->|  output   |--+-------> swt of the
 rst (POR)  |  | 199 .. 0  |   = addr    |  200 x 1    |     |  stage    |  |          4/4.5 MHz
 ---------->+->|  + DG     |--done------------------------->|           |  |          oscillator
            |  +-----------+                                 +-----------+  |
            +---------------------------------------------------------------+
```

* **SDC, the stop down counter.** It loads 199 on reset, counts down one step per clock
  and stops at 0. Its value is the ROM address, so the bit at address 199 goes out first.
* **DG, the done generator.** It raises `done` once the count has reached 0 and holds
  it until the next reset.
* **ROM.** 200 × 1 bit. It holds either the message itself or, for the toggle output
  stage, its *toggle code* (ROM_b).
* **Output stage.** It drives `tx`. This is either nothing (the ROM output is `tx`), a
  plain flip-flop, or a clock-gated toggle flip-flop.

The crystal oscillator, the power-on reset circuit, the switchable oscillator, the pad
cells, the harvester and the modulator are analog or bought-in parts. They are not
part of the RTL: `clk`, `rst` and `tx` are where they connect.

## The five development steps (`STEP`)

| `STEP` | counter | done generator | output | effect on activity |
|---|---|---|---|---|
| `STEP_FULL_SYNC` (0) | synchronous, all 8 flip-flops clocked every cycle | (zero decode) | ROM output drives `tx` | baseline |
| `STEP_ASYNC_SDC` (1) | ripple counter | clocked, `done <= (cnt==0) \| done` | ROM output drives `tx` | a counter stage is clocked only when its bit changes |
| `STEP_ASYNC_DG` (2) | ripple counter | self-clocked | ROM output drives `tx` | the done flip-flop is clocked once per message |
| `STEP_SYNC_OUT` (3) | ripple counter | self-clocked | D flip-flop | glitches on the ROM output no longer reach the pin |
| `STEP_TOGGLE_OUT` (4, default) | ripple counter | self-clocked | toggle flip-flop, clock gated by ROM_b | the output flip-flop is clocked only where `tx` changes |

In the measurements these steps are taken from, the CPLD's total power fell from
76.3 µW to 52.6 µW. The largest gains came from the output flip-flop (it stops
glitches from charging the external `tx` line) and from the toggle flip-flop. RTL
simulation cannot show those power figures. The testbenches check that all five steps
send the same bits.

### Ripple counter (`sdc_async`)

Each stage is a toggle flip-flop. Stage 0 is clocked by `clk`. Stage *i* is clocked by
the rising edge of stage *i−1*: when a lower bit goes from 0 to 1 in a down count,
that is a borrow. So over one message, bit *i* is clocked only `199 >> i` times instead
of 199 times. Reset sets or clears each stage to the bits of 199 (`1100_0111`).

The counter stops because `done` blocks the clock enable of stage 0. Only stage 0 is
blocked, so the later stages, which see no more edges, stop as well. With the clocked
done generator (step 1), `done` arrives one clock too late to stop the count at that
edge. In that variant the zero decode of `cnt` also blocks stage 0.

The bits of `cnt` settle one after another, starting from the least significant bit, so
`cnt` is not a synchronous bus. The self-clocked done generator uses `cnt == 0` as a
clock. This is safe for a down count: on the way from any value above 0 to the next
value, the rippling bits never pass through 0.

### Toggle output and ROM_b (`out_toggle`)

The toggle stage stores the changes of the message rather than the message itself:

    ROM_b = (ROM >> 1) ^ ROM        // bit a = ROM[a+1] xor ROM[a], with ROM[200] = 0

The address counts down, so `ROM_b[a]` is 1 exactly when the bit sent at address `a`
differs from the bit sent just before it. `tx` starts at 0. The toggle flip-flop is
clocked only at edges where `ROM_b` of the current address is 1, and it then tracks the
message exactly as the plain output flip-flop does. The clock is `clk AND enable`.

Two details go beyond the plain AND gate and toggle flip-flop of the original circuit:

* **Latched enable.** The ROM address, and with it `enclk`, changes just after each
  rising edge, while `clk` is still high. A bare AND gate would pass a second rising edge
  whenever the enable rose then. `clk_gate` therefore holds the enable in a latch that
  is transparent while `clk` is low, which is the usual integrated clock-gate cell.
  With a bare AND, the toggle testbench fails.
* **Stop flag.** Once the counter has stopped at 0, the address stays at 0 and
  `ROM_b[0]` would keep toggling `tx` on every clock. `done` sets a stop flag at the edge
  that sends the last bit, and the stop flag keeps the gated clock off after that.

## Timing

With a 1 MHz clock, one bit goes out per clock edge:

* Steps 0–2 (no output flip-flop): `tx = ROM[199]` during reset, then `ROM[199−k]`
  after the k-th rising edge.
* Steps 3–4 (with output flip-flop): `tx = 0` during reset, then `ROM[200−k]` after
  edge k, for k = 1…200. The message is delayed by one clock.

In every step the counter reaches 0 after 199 edges, and `tx` then holds `ROM[0]`. One
message lasts 200 µs, far shorter than the roughly 50 ms that a charged storage
capacitor can supply at 1.8 V. Reset (`rst`) is asynchronous and active high. It is
meant to come from a power-on reset circuit, and each reset starts the message over.

## Message contents

The generator sends whatever the `MESSAGE` parameter holds. Bit `MESSAGE[199]` goes out
first. The default, `bitgen_pkg::BLE_MESSAGE`, is an example computed at elaboration
by `bitgen_pkg::ble_adv_message()`. It is a BLE non-connectable advertising packet
(ADV_NONCONN_IND) of exactly 25 bytes:

| field | bytes | value |
|---|---|---|
| preamble | 1 | `0xAA` |
| access address | 4 | `0x8E89BED6` |
| PDU header | 2 | `0x42` (ADV_NONCONN_IND, random TxAdd), length 15 |
| AdvA | 6 | `C0:FF:EE:00:00:01` |
| AdvData | 9 | `08 FF FF FF 54 41 47 30 31` (manufacturer data, "TAG01") |
| CRC | 3 | CRC-24 |

Bytes are sent least significant bit first. The CRC uses the polynomial
x²⁴+x¹⁰+x⁹+x⁶+x⁴+x³+x+1 with preset 0x555555 and is sent from its register position 23
down to 0. Header, payload and CRC are whitened with the LFSR x⁷+x⁴+1, preset from
channel index 39. This packet has been checked against a separate software model of
the same rules, but not against a Bluetooth receiver. For a real tag, replace
`MESSAGE` with the tag's own packet.

## Files

| file | contents |
|---|---|
| `rtl/bitgen_pkg.sv` | constants (200 bits, 8-bit counter), `dev_step_e`, message and ROM_b functions |
| `rtl/bitstream_generator.sv` | top level; `STEP`, `N`, `W`, `MESSAGE` |
| `rtl/sdc_sync.sv`, `rtl/sdc_async.sv` | synchronous and ripple stop down counters |
| `rtl/dg_sync.sv`, `rtl/dg_async.sv` | clocked and self-clocked done generators |
| `rtl/rom200x1.sv` | 200 × 1 ROM, combinational read, contents as a parameter |
| `rtl/out_sync.sv`, `rtl/out_toggle.sv`, `rtl/clk_gate.sv` | output stages and the latched clock gate |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_bitstream_generator.sv` | all five steps side by side, plus the oscillator model |
| `tb/tb_bitstream_full.sv` | the default top level, one full message |
| `tb/swosc_model.sv` | behavioural 4 / 4.5 MHz switchable oscillator (simulation only) |

Synthesized (yosys, generic cells), the default top level has 11 flip-flops: the
8 counter stages, `done`, the stop flag and `tx`. It also has one latch and the 200-bit
ROM.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Use a
1 ns time unit. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/bitgen_pkg.sv tb/tb_bitstream_generator.sv --top-module tb_bitstream_generator -o sim
./obj_dir/sim
```

`tb_bitstream_generator` checks every bit of the message for all five steps, the
counter and `done` at every edge, and a restart after a reset in mid-message. It also
feeds the default step's `tx` into the oscillator model and checks that the oscillator
makes 4 cycles per 0 bit and 4.5 per 1 bit over the message. It counts the counter
stopping, `done` rising, clock edges gated off, toggles and restarts, and it fails if
any of them never happens. The expected message in the testbenches is a constant
produced by a separate model of the packet rules, not by the package function.

## Departures and limits

* The message contents are an example. Only the message length (200 bits), the rate,
  and the channel it is meant for are fixed by the design.
* How `done` stops the ripple counter (a clock enable on stage 0), the latch in the
  clock gate and the stop flag in the toggle stage are this design's additions. They
  are described above.
* The original circuit diagram labels the ripple stage clocked by `clk` as `cnt[7]`.
  Here that stage is `cnt[0]`, because only that order counts down from 199.
* Reset polarity and style (asynchronous, active high) and the `tx` reset value (0)
  are choices made here.
* Power is the point of the steps, but RTL simulation cannot measure it. Whether the
  design fits a 32-macrocell CPLD depends on how the 200-bit ROM decode maps to product
  terms, and has not been checked.
* Simulation is zero-delay. The glitches that the output flip-flop is there to remove
  appear only with real gate delays, so they are not exercised.
