# 8-bit signature firewall

A hardware packet filter with no clock and no software. An 8-bit word arrives
on eight input pins (on the demonstration board these are an 8-position DIP
switch). Every bit of it is compared with a fixed "malicious" signature at the
same time. If the word equals the signature, it is dropped and a red **Block**
LED lights. Any other word is forwarded and a green **Allow** LED lights. The
default signature is `1010_1010` (0xAA), so 1 of the 256 possible words is
blocked and the other 255 pass.

The logic is purely combinational. A decision takes zero clock cycles, and
its delay is only the delay through the gates. The target is a small
flash-based CPLD (Xilinx XC9572, 7.5 ns pin-to-pin). Because that part needs
no configuration load at power-up, the filter works as soon as power is
applied. The RTL itself uses nothing specific to that device.

## Data path

```
                  +-----------------+  match  +-------------+--> out_data[7:0]
in_data[7:0] --+->| pattern_matcher |-------->| routing_mux |--> out_valid
               |  +-----------------+         |             |--> led_allow (green)
               +----------------------------->|             |--> led_block (red)
                                              +-------------+
```

| module            | role |
|-------------------|------|
| `firewall_pkg`    | default width `FW_WIDTH = 8`, default signature `FW_SIGNATURE = 8'b1010_1010`, and the `decision_e` type (`DEC_ALLOW`, `DEC_BLOCK`) |
| `pattern_matcher` | the comparator: `match = &(~(data ^ SIGNATURE))` |
| `routing_mux`     | acts on the decision: forward or drop the word, and drive the two LED pins |
| `firewall_top`    | wires the two together; this is the top |

### The comparator

`pattern_matcher` XNORs each input bit with the matching signature bit and
ANDs all the results. `match` is high only when all bits agree. The signature
is a parameter, so it is fixed when the design is built. Changing the rule
means building and programming the device again. This is deliberate: the
firewall has no writable state that an attacker could change.

### The routing multiplexer

| `match` | `out_data` | `out_valid` | `led_allow` | `led_block` |
|---------|------------|-------------|-------------|-------------|
| 0       | `in_data`  | 1           | 1           | 0           |
| 1       | `0`        | 0           | 0           | 1           |

Exactly one LED pin is high at any time, and an assertion in `routing_mux`
checks this in simulation. Both LED pins are active high. If your board
wires its LEDs to sink current, invert them at the pins.

## Interface of `firewall_top`

| port        | dir | width   | meaning |
|-------------|-----|---------|---------|
| `in_data`   | in  | `WIDTH` | ingress word |
| `out_data`  | out | `WIDTH` | forwarded word; all zeros while a word is dropped |
| `out_valid` | out | 1       | high when `out_data` holds a forwarded word |
| `led_allow` | out | 1       | green Allow LED pin |
| `led_block` | out | 1       | red Block LED pin |

| parameter   | default       | meaning |
|-------------|---------------|---------|
| `WIDTH`     | 8             | word width |
| `SIGNATURE` | `8'b10101010` | word that gets dropped |

There is no clock and no reset. Every output depends only on the current
`in_data`.

## What comes from the original design and what was added

Taken from the original design:
- the 8-bit input;
- the 0xAA signature;
- the exact-match comparator;
- the active-high LED outputs, one high and the other low;
- the forward/drop choice;
- the clockless, zero-cycle behaviour.

The original design has only the two LED outputs. Its forwarding or dropping
of data appears only in its description and flowchart, not as pins.
Added by this implementation:
- **`out_data` / `out_valid`**. These make the forward/drop decision visible
  on pins.
- **Zero on a dropped word**. What a dropped word looks like on the bus was
  never specified. Here the bus shows zero and `out_valid` is low.
  Downstream logic should use `out_valid`, not the data value. Note that a
  forwarded word of 0x00 also shows zero on the bus.
- **Parameterised width and signature**. The original calls the structure
  scalable, and names wider signatures (64 or 128 bits) and matching several
  patterns as future work. The width and the signature are parameters here,
  and the matcher has been tested at 64 bits. Matching several patterns,
  loading rules at run time and framing real network traffic (e.g. Ethernet)
  are **not** implemented.

The board hardware around the logic has no RTL:
- the DIP switches;
- the LEDs and their resistors;
- the CPLD's JTAG programming port;
- the board's regulators.

Each of these meets the design only as a port of `firewall_top`, or not at
all.

## Simulating

Each testbench is self-checking. It prints one line
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. The testbenches give the RTL a clock only as a time base. Each word is
applied on a falling edge. It is checked 1 ns later, which is well inside the
CPLD's 7.5 ns, and checked again at the next rising edge. Both checks passing
shows that the decision takes zero cycles.

| testbench            | what it covers |
|----------------------|----------------|
| `pattern_matcher_tb` | all 256 words at 8 bits (exactly one match). A 64-bit instance with an arbitrary fixed signature: the signature itself, each single-bit corruption of it, and 200 random words |
| `routing_mux_tb`     | all 256 words, each with both decisions |
| `firewall_top_tb`    | the top at its default parameters. All 256 switch settings, then a 2000-word stream mixing the signature, words one bit away from it, and random words. It counts blocked words, forwarded words, allow→block switches and block→allow switches, and fails if any count is zero |

For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/firewall_pkg.sv rtl/pattern_matcher.sv rtl/routing_mux.sv rtl/firewall_top.sv \
  tb/firewall_top_tb.sv --top-module firewall_top_tb -o sim
./obj_dir/sim
```

Each test runs in well under a second.

## Implementation notes

After synthesis the top is a handful of word-level cells:
- an 8-bit XNOR and an AND reduction for the comparator;
- an 8-bit 2:1 multiplexer and three single-bit ones for the outputs.

There are no flip-flops and no memory.
