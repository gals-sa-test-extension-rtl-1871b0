# GALS-SA test infrastructure with a test extension

A GALS-SA chip is a structured ASIC whose synchronous logic blocks each run on
their own local clock and talk to each other over asynchronous 4-phase
handshake channels (globally asynchronous, locally synchronous). Such a chip
needs a way to check, after manufacture, that the asynchronous channels work and
how fast they are, and to trim each block's local oscillator. The intrinsic test
layer does this and is kept small. The fixed part of the chip holds a serial
test chain: a main serial controller, plus a local serial interface and a test
module beside every block.

The point of this design is the **test extension**. The intrinsic test layer
offers only a few tests, and it is fixed at manufacture. Extra tests for
prototype debug are therefore built in the *programmable* logic of a block. The
fixed layer gains only three small things:

* an enable bit;
* a length input on the main controller, so that it can send frames of new,
  longer types;
* a multiplexer in each local serial interface. It lets the extension send its
  own response frame with its own serialiser.

When debug is over, the extension logic can be removed and its logic-block area
given back to the user design.

This repository holds synthesisable SystemVerilog for the test infrastructure.
It covers the serial chain, the intrinsic tests, and an extension with two
extra tests (send a user-chosen pattern, read back the receiver signature). It
also contains a behavioural model of the local clock generator and
self-checking testbenches for every module.

## Structure

```
                 host (e.g. a JTAG TAP)            ext_en
                        |                             |
            +-----------v-----------+   ext_cmd  +----v-------------+
            |   main_serial_ctrl    |----------->| main_serial_ext  |
            |                       |<-----------|  (logic block)   |
            +--+--------------------+   ext_len  +------------------+
   serTxEn/Data|  ^ serRxEn/Data
               v  |
   +-----------+--+----------+    +--------------------------+
   | gals_node 0             |--->| gals_node 1              |---> ... gals_node N-1
   |  local_serial_ctrl      |<---|  ...                     |<---
   |  test_module            |    |                          |
   |  serial_ctrl_ext  (LB)  |    |                          |
   |  test_ext         (LB)  |    |                          |
   |  out_port / in_port     |==ch==> in_port                |
   |  local_clock_gen        |    |                          |
   +-------------------------+    +--------------------------+
   (LB) = built in the programmable logic block, removable after debug
```

`galssa_top` instantiates one `main_serial_ctrl`, one `main_serial_ext` and
`NUM_NODES` (default 4) `gals_node`s. Node *i* has chain address *i*. The
channels form a ring: node *i*'s output port drives node *(i+1) mod N*'s
input port. The user logic of each block is not part of this RTL. Its channel
ports (`usr_*`) and its local clock are brought out of the top.

## The serial test link

The link has six wires. `serClk` and `rst_n` go to every interface.
`serTxEn`/`serTxData` carry a command frame down the chain.
`serRxEn`/`serRxData` carry the response back. Bits go MSB first, and the
enable wire marks which bits are valid. Frames can therefore be of any length,
and a new frame type needs no change to the link.

Command frame: `addr[3:0] | cmd[3:0] | data[n-1:0]`. Response frame:
`status[1:0] | data[m-1:0]`.

| status | meaning |
|---|---|
| 0 `ST_OK` | command executed |
| 1 `ST_BAD_ADDR` | no module has this address |
| 2 `ST_BAD_CMD` | command not implemented (or an extended command while the extension is disabled) |
| 3 `ST_BAD_LEN` | frame length does not fit the command |

| cmd | name | data sent | response data | served by |
|---|---|---|---|---|
| 0 | `CMD_STATUS` | – | – | test module |
| 1 | `CMD_CLK_CFG` | 8: calibration code | – | test module |
| 2 | `CMD_RX_ARM` | 8: seed | – | test module (receiver) |
| 3 | `CMD_FUNC_TX` | 16: seed, count | 8: words completed | test module (sender) |
| 4 | `CMD_RX_CHECK` | – | 9: pass flag, words received | test module (receiver) |
| 5 | `CMD_LAT_TEST` | – | 8: latency in sender clock cycles | test module |
| 8 | `CMD_EXT_PATTERN` | 8: pattern | – | extension |
| 9 | `CMD_EXT_SIGREAD` | – | 24: signature, last word | extension |

Codes with the MSB set are extended commands. All codes, widths and lengths
live in `rtl/galssa_pkg.sv`.

The target answers only once the operation has finished. The main controller
accepts no new command until the response has arrived, so only one operation
is ever on the bus. A response that does not start within `TIMEOUT` serClk
cycles (default 65535) ends the operation with `timeout` set.

### How a frame travels the chain

The chain is not addressed by switching. Every `local_serial_ctrl` re-registers
the command bus towards the next interface, so every interface sees every frame,
one serClk later per hop. Each interface shifts the frame into its own shift
register. When `serTxEn` falls, it compares the address with `my_addr`. On the
way back, each interface re-registers the response bus from the next one. The
exception is while it sends its own response, which then takes the bus.

A frame for a missing module would otherwise get no answer. The last interface
(`is_last`) therefore answers `ST_BAD_ADDR` for any address above its own. This
relies on addresses rising along the chain, which `galssa_top` guarantees.
Frames shorter than the 8-bit header are ignored. The host then sees a timeout.

## Intrinsic tests

### Functional test across a channel

The functional test drives a series of pseudorandom words through one
channel's data wires and handshake. Only one operation may be on the bus at a
time, so the test takes three commands to two blocks:

1. `CMD_RX_ARM(seed)` to the **receiving** block. It clears the word count, the
   error flag and the 16-bit signature, and loads its reference generator with
   `seed`. It then checks every word that arrives.
2. `CMD_FUNC_TX(seed, count)` to the **sending** block. It sends `count` words
   from its own generator, starting with `seed` (a zero seed is replaced by 1).
   It answers once every word's 4-phase cycle has completed.
3. `CMD_RX_CHECK` to the receiving block. It returns `{pass, count}` and
   disarms the receiver.

The generator is an 8-bit Galois LFSR, x^8+x^6+x^5+x^4+1, with period 255. The
signature is a 16-bit MISR. Each step shifts left and XORs in 0x1021 when the
bit shifted out is 1, then XORs the received word into the low byte. Received
words always reach the user logic as well.

### Latency test

`CMD_LAT_TEST` sends the word 0x5A. The result is the number of the sender's
local clock cycles from `req` rising until the synchronised `ack` is seen,
saturating at 255. Because of the synchronisers on both sides, even a
zero-delay channel reads 4 to 7 cycles.

### Clock calibration

`CMD_CLK_CFG(code)` writes the 8-bit calibration code that the test module
holds for its block's clock generator. The reset value is `CAL_RESET`.
`galssa_top` gives node *i* the value 20+3*i, so that the blocks run at
different speeds. In the behavioural model the half period is
`BASE_HALF_T + code*STEP_T` time units.

## The test extension

The extension touches the fixed layer in three places:

* **Main controller.** `ext_en` enables extended commands. For an extended
  command the data length comes from `ext_len`, which `main_serial_ext` looks up
  from the command code. With `ext_en` low an extended command goes out
  header-only, and the block rejects it with `ST_BAD_CMD`.
* **Local serial interface, receive side.** Nothing is added. The shift register
  already holds the frame. For an extended command (with `ext_en` high) the
  interface pulses `ext_start` and passes on the command, the right-aligned data
  and the number of data bits received.
* **Local serial interface, response side.** A multiplexer chooses the
  extension's serial output instead of its own. The select is `ext_en` AND "an
  extended command is in progress", which ends with `ext_done`. Intrinsic
  commands still answer through the intrinsic serialiser while the extension is
  enabled.

Everything else belongs to the extension and can be removed:

* `serial_ctrl_ext` runs on serClk. It checks the extended command and its
  length, hands it to `test_ext` and serialises the full response frame
  (status included).
* `test_ext` runs on the local clock. It implements the two extra tests.
  * `CMD_EXT_PATTERN` pushes a user-chosen word into the output port through
    the test module's injection port. The injection port has priority over user
    traffic but not over a running intrinsic test. If the receiver is armed, the
    word goes into its signature and fails its pseudorandom check.
  * `CMD_EXT_SIGREAD` returns the receiver's signature and the last word it
    received. This lets a failing value be seen directly during debug.

## Clock domains and handshakes

This is the part most likely to need care when the design is changed.

| domain | modules |
|---|---|
| `serClk` | `main_serial_ctrl`, `local_serial_ctrl`, `serial_ctrl_ext` |
| local clock of each node | `test_module`, `test_ext`, `out_port`, `in_port` |

* Commands cross between the domains on a 4-phase level handshake with
  two-flop synchronisers (`sync2`). The pairs are `tm_req`/`tm_ack` and
  `te_req`/`te_ack`. The requester holds the command and data stable while
  `req` is high. The responder raises `ack` with the result stable and drops it
  after `req` falls. An assertion in `local_serial_ctrl` checks that the command
  stays stable.
* The asynchronous channel is 4-phase bundled data. `out_port` puts the word on
  `data_o` one cycle before raising `req_o`, drops `req_o` when `ack` is seen
  high, and is ready again when `ack` is seen low. An assertion checks that
  `req` never falls before `ack`. `in_port` latches the data when `req` is seen
  high, raises `ack`, and drops it when `req` is seen low. It always accepts a
  word; there is no back-pressure.
* Reset: `rst_n` clears the serial side asynchronously. Each node releases its
  local side through a two-flop reset synchroniser clocked by its own local
  clock. Hold `rst_n` low for at least two periods of the slowest local clock.
  The clock generator model takes its period from the calibration register, so
  until that register is reset the period is arbitrary.

## Where this RTL departs from the reference architecture

* **Port controllers.** The reference wrapper uses asynchronous state machines
  and a pausable local clock. Here both ports are synchronous state machines
  with synchronisers, so they can be simulated and synthesised with standard
  tools. This adds about two local cycles per handshake transition, and it
  changes what the latency test measures.
* **Local clock generator.** This is a behavioural model (`local_clock_gen`),
  not synthesisable logic. The real part is an oscillator in the fixed layer.
  In synthesis of `gals_node` or `galssa_top` the local clock is therefore
  undriven.
* **Clocking of the serial interface.** The reference block diagram shows the
  local clock generator connected to the local serial interface. Here the
  serial interface runs on `serClk` and crosses to the local clock only at the
  test module.
* **Chain behaviour.** The following are this design's own choices: re-registered
  forwarding, the rule that the last node answers for unknown addresses, the
  response timeout and the `force_len` override.
* **Your own decisions.** Every width, command code, frame length, polynomial
  and reset value listed above. The reference architecture fixes only the frame
  fields, the three error cases, the two intrinsic tests, the two extension
  tests, the extension enable and length input, and the output multiplexer.
* **Not included.** The JTAG controller in front of the main serial controller
  is not included; its side is the host interface of `galssa_top`. The user
  logic of each block is not included either. The area figures of the reference
  implementation (90 nm) cannot be checked from RTL.

## Files

| file | content |
|---|---|
| `rtl/galssa_pkg.sv` | widths, command and status enums, length tables, LFSR and MISR functions |
| `rtl/galssa_top.sv` | platform top: main controller, main extension, chain of nodes, ring of channels |
| `rtl/main_serial_ctrl.sv` | host command to frame; response capture; timeout |
| `rtl/main_serial_ext.sv` | extended command to frame data length |
| `rtl/gals_node.sv` | one block: wrapper, test resources, extension |
| `rtl/local_serial_ctrl.sv` | chain forwarding, frame decode and checks, intrinsic serialiser, extension multiplexer |
| `rtl/test_module.sv` | functional and latency tests, calibration register, channel transmit arbitration |
| `rtl/serial_ctrl_ext.sv` | extension command check and response serialiser |
| `rtl/test_ext.sv` | user-pattern and signature read-back tests |
| `rtl/out_port.sv`, `rtl/in_port.sv` | 4-phase bundled-data port controllers |
| `rtl/local_clock_gen.sv` | behavioural calibrated clock generator |
| `rtl/sync2.sv` | two-flop synchroniser |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with a
watchdog. With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -Irtl rtl/galssa_pkg.sv tb/tb_galssa_top.sv --top-module tb_galssa_top
./obj_dir/Vtb_galssa_top +verilator+rand+reset+2
```

For any other testbench, replace `tb_galssa_top` with its name. The package
must come first on the command line. `-y rtl` finds the other modules.

`tb_galssa_top` runs the whole platform at its default size, 4 nodes. It
covers:

* status requests to every node;
* calibrating one node's clock, with the period measured before and after;
* functional tests of 20 and 255 words, including the ring channel from the
  last node back to the first, and one with mismatched seeds that must fail;
* signature read-back after each, compared with a reference model in the
  testbench;
* a latency test on every channel;
* each error status;
* user patterns through the extension;
* user traffic.

It counts how often each of these mechanisms occurred and fails if one never
did. It takes well under a second. Each module's own testbench also checks its
protocol timing, for example the cycle count of a 4-phase transfer and the
number of cycles `serTxEn` stays high for a frame.

## Changing it

* **Number of blocks:** `galssa_top #(.NUM_NODES(n))`, up to 16 with 4-bit
  addresses.
* **Field widths and lengths:** change `galssa_pkg`. `DMAX` and `RMAX` bound
  the command and response data. The 6-bit length fields allow frames up to 63
  bits.
* **Adding an extended test:**
  1. Add a code with the MSB set to `cmd_e`.
  2. Give it a length in `ext_dlen` and list it in `ext_known`.
  3. Implement it in `test_ext`.

  The intrinsic modules (`local_serial_ctrl`, `test_module`) do not change.
  `main_serial_ctrl` and `main_serial_ext` pick up the new length from the
  package.
