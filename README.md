# LUT addressing registration circuit

A hardware Trojan in an FPGA design for a safety-critical controller is most
dangerous when it waits for *emergency* input data. Such a system spends most of its
life in normal operation, and the Trojan stays silent there, so testing with
normal-mode data never sets it off. The Trojan still has a weak spot. Its trigger
logic sits in LUTs, and some input combinations of those LUTs are never applied while
the system runs in normal mode.

This circuit records, for every analysed 4-input LUT, which of its 16 input
combinations ("addresses") actually occur. You insert it next to the monitored design
and run the system on normal-mode data. You then read out one bit per LUT address. A
LUT that was only ever driven with one address, or an address that is never used in
normal mode, marks a small area of the chip worth inspecting. In the demonstrations
this method is based on, projects of 196 to 843 LUTs gave 14 to 51 single-address
LUTs, and those LUTs covered the implanted Trojan fully or in part. The circuit only
gathers this information. Deciding what is a Trojan is left to later analysis.

## Structure

```
 LUT 1 inputs a3..a0 ─► [ decoder 4→16 ] ─► [ sticky register 16 b ] ─SO─┐
                                                ▲ SI = 0                  │
 LUT 2 inputs        ─► [ decoder 4→16 ] ─► [ sticky register 16 b ] ◄─SI┘ ─SO─┐
   ...                                                                         ...
 LUT N inputs        ─► [ decoder 4→16 ] ─► [ sticky register 16 b ] ─SO─► result
                CLK, R and Load/Shift are shared by all N fragments
```

| module (`rtl/`)      | role |
|----------------------|------|
| `lut_addr_pkg`       | LUT size (`LUT_K = 4`, `LUT_SIZE = 16`), address and word types, mode encoding |
| `addr_decoder`       | one-hot decoder of the address on a LUT's inputs (weights 1, 2, 4, 8 = a0..a3) |
| `sticky_shift_reg`   | 16-bit register with sticky registration and serial shift |
| `reg_fragment`       | decoder plus register for one LUT unit |
| `addr_reg_circuit`   | top: `N` fragments chained into one `N*16`-bit shift register (default `N = 843`) |

## The sticky register

Each bit is a D flip-flop fed by a 2:1 multiplexer whose select input is the mode line
`L` (`load_shift` at the top level):

* **`L = 1`, registration.** Mux input 1 carries `D[i] | Q[i]`. The decoder drives
  exactly one `D[i]` high, so on each rising clock edge the bit of the current
  address is set. A bit that is already 1 stays 1 whatever the decoder shows. The 16
  flip-flops are independent in this mode. After any number of cycles, the register
  holds the set of all addresses seen since the last reset.
* **`L = 0`, shift.** Mux input 0 carries the previous stage: `Q[0] <= SI` and
  `Q[i] <= Q[i-1]`. Data move toward the MSB, and `SO = Q[15]`.

`SO` comes straight from a flip-flop output. The first bit of the stream is therefore
on `result` as soon as `L` drops, before any shift edge. Bit *n* appears after *n*
shift edges. Reading the whole chain takes `N*16 - 1` shift edges after the first bit
has been read. After `N*16` edges, the chain emits the 0 tied to the first fragment's
`SI`.

`sticky_shift_reg` contains a concurrent assertion of the registration rule: during
registration, no bit may go from 1 to 0. It is disabled while reset is high, so hold
`rst` across at least one rising edge.

## Using it

1. Hold `rst` high over a clock edge to clear all bits. `rst` is an active-high
   asynchronous clear.
2. Set `load_shift = 1` and run the monitored system on normal-mode data. On each rising
   edge of `clk`, every fragment samples its LUT's inputs.
3. Set `load_shift = 0` and collect `N*16` bits from `result`, one per clock. The
   order is LUT N address 15, LUT N address 14, ..., LUT N address 0, LUT N-1 address
   15, ..., LUT 1 address 0. A 1 means that the LUT's inputs had that value at least
   once.
4. Classify the LUTs offline. A LUT with a single 1 in its 16 bits is a "single-address"
   LUT. Bits that are 0 after a normal-mode run are the addresses that belong to
   emergency-mode behaviour only.

`lut_addr` is a packed array, `lut_addr[k]` = inputs of LUT unit *k+1*. The LUT
units themselves are not part of the RTL. In an FPGA flow you connect these ports to
the input nets of the LUTs you analyse. If the device does not have room for one
fragment per LUT, build the circuit with a smaller `N` and analyse the LUTs subset by
subset. A fragment costs 16 flip-flops plus a decoder, so `N = 843` costs 13,488
flip-flops.

## Choices made in this RTL

* **Mode polarity.** `load_shift = 1` is registration and `0` is shift. One
  description of the register states the opposite for `L = 1`. The polarity used here
  matches the rest of the method's description and the 0/1 labels on the register's
  multiplexers.
* **Reset.** The method names a common reset but gives no polarity or timing.
  Active-high asynchronous clear is this design's choice.
* **Head of the chain.** The serial input of the first fragment is tied to 0. The
  method leaves it unconnected.
* **Decoder.** The decoder is a plain one-hot decoder that is always enabled. Its
  insides are not specified beyond its function.
* **Default size.** The method sets `N` to the number of analysed LUTs and does not
  fix it. The default of 843 is the largest project it was demonstrated on, so all
  five demonstration projects (196, 221, 393, 655 and 843 LUTs) fit in one pass.
* `reg_fragment` also outputs its parallel word `seen`, for testing. The top level
  leaves it open and reads everything through `result`, as the method does.

Not included: the LUTs of the monitored design, and the host software that inserts the
circuit into a netlist, runs it and collects the stream. Both lie outside the circuit.

## Testbenches (`tb/`)

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_addr_decoder`     | all 16 addresses give the right one-hot word |
| `tb_sticky_shift_reg` | 2,000+ random cycles against a reference model, sticky hold, MSB-first shift-out, reset |
| `tb_reg_fragment`     | 40 registration runs with random address sets, parallel word and 16-bit serial order |
| `tb_addr_reg_circuit` | end to end, `N = 8`, with `lut_net_model`, a modelled 8-LUT system with a trigger LUT and a payload LUT reachable only by emergency data. A normal-mode run and an emergency-mode run are read out bit by bit. The test checks that the trigger and payload addresses show up only in the emergency run, and counts each mechanism (reset, registration, sticky hold, mode switch, shift, fragment boundary crossing). |
| `tb_table1_workloads` | default size (`N = 843`): five workloads with the LUT counts and the single-address / multi-address statistics of the demonstration projects (196/14/182, 221/15/206, 393/29/364, 655/32/623, 843/51/792), built as synthetic input traffic. Every stream bit is compared, and the statistics are recomputed from the stream alone. |

The original projects' netlists are not available. `tb_table1_workloads` therefore
reproduces their address statistics, not their logic.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends on its own. Each
one has a watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/lut_addr_pkg.sv tb/tb_table1_workloads.sv --top-module tb_table1_workloads
./obj_dir/Vtb_table1_workloads
```

The full-size run takes under a second to simulate, after about ten
seconds of compilation.
