# A 4-bit accumulator processor built around one adder

This is a very small processor: one 4-bit register `w`, a 4-bit literal `L`
from switches, and a 3-bit instruction word `X2 X1 X0` that also comes from
switches. Each press of a push button (the manual clock) executes the
instruction set on the switches. There are six instructions, all
two's-complement arithmetic on `w`:

| Mnemonic | X2 X1 X0 | Operation          |
|----------|----------|--------------------|
| CLRW     | 0 1 0    | `w <- 0`           |
| MOVL     | 0 0 1    | `w <- L`           |
| INCW     | 1 1 0    | `w <- w + 1`       |
| ASHRW    | 0 0 0    | `w <- w >> 1`      |
| SUBLW    | 1 1 1    | `w <- w - L`       |
| ADDLW    | 1 0 1    | `w <- w + L`       |

The main idea is that all six are the same operation, `w <- A + B + cin`,
computed by a single adder. The instruction bits are chosen so that each
bit drives one part of the datapath directly, and no instruction decoder is
needed.

## How the instruction bits steer the adder

```
            X1 X0                X2              X2 X1
              |                   |                 |
 w>>1 --+   +-v-----------+     +-v------------+  +-v-------------+
 L    --+-->| operand_mux |--A  | feedback_gate|  | carry_in_logic|
 0    --+   +-------------+  |  +--------------+  +---------------+
 ~L   --+                    |    w --> B  |            | cin
                             v             v            v
                          +-------------------------------+
                          |            adder4             |
                          +---------------+---------------+
                                          | sum
                             pb1_clk -> w_register -> w
```

* **A operand: `X1 X0` select one of four sources** in `operand_mux`:
  `00` is `w` shifted right by one, `01` is `L`, `10` is zero and `11` is
  the bitwise complement `~L`.
* **B operand: `X2` decides whether the old `w` takes part**
  (`feedback_gate`). `X2 = 0` gives zero, so the instruction replaces `w`.
  `X2 = 1` feeds `w` back, so the instruction accumulates into `w`.
* **Carry in: `X2 AND X1`** (`carry_in_logic`, a NAND followed by an
  inverter). It is 1 only for INCW and SUBLW.

Putting the three together shows how each instruction comes out of one
addition:

| Instr. | A      | B   | cin | A + B + cin            |
|--------|--------|-----|-----|------------------------|
| CLRW   | 0      | 0   | 0   | 0                      |
| MOVL   | L      | 0   | 0   | L                      |
| INCW   | 0      | w   | 1   | w + 1                  |
| ASHRW  | w>>1   | 0   | 0   | w >> 1                 |
| SUBLW  | ~L     | w   | 1   | w + ~L + 1 = w - L     |
| ADDLW  | L      | w   | 0   | w + L                  |

Subtraction uses the usual two's-complement identity `-L = ~L + 1`. The
inverters form `~L`, and the shared carry-in gate supplies the `+1`. The
same carry-in gate also supplies the `+1` for INCW. Both instructions have
`X2 = X1 = 1`, and no other instruction does.

### The two unused codes

The codes `011` and `100` are not instructions. They are not trapped either:
the datapath simply computes what its equations give.

* `011` gives `w <- ~L`.
* `100` gives `w <- w + (w >> 1)`, using the same shift as ASHRW.

Software for this machine should not use them. The testbench checks them
anyway, so that the RTL's behaviour for them is pinned down.

### The right shift

The instruction is called an arithmetic right shift. However, the circuit
this RTL follows feeds a constant 0 into the top bit, so the shift is
logical: `1101` (-3) becomes `0110` (+6), not `1110` (-2). The parameter
`SIGN_FILL` chooses between the two:

* `SIGN_FILL = 0` (default): grounded top bit, as in the original circuit.
* `SIGN_FILL = 1`: the top bit copies `w[3]`, so the shift is a true
  arithmetic shift.

For non-negative values the two settings give the same result.

## Worked program

The machine's reference program computes `(x+1)/2 - y + z` for `x = 2`,
`y = 4`, `z = 2`. It uses every instruction once and must start with CLRW:

| Step | Instruction | L    | w after       |
|------|-------------|------|---------------|
| 1    | CLRW        | 1111 | 0000          |
| 2    | MOVL        | 0010 | 0010 (2)      |
| 3    | INCW        | -    | 0011 (3)      |
| 4    | ASHRW       | -    | 0001 (1)      |
| 5    | SUBLW       | 0100 | 1101 (-3)     |
| 6    | ADDLW       | 0010 | 1111 (-1)     |

All intermediate values fit in 4-bit two's complement. Results outside
-8..7 wrap modulo 16, and there is no carry or overflow flag.

## Clocking, reset and the board interface

`cpu4_top` ports:

| Port      | Dir | Width | Meaning                                          |
|-----------|-----|-------|--------------------------------------------------|
| `pb1_clk` | in  | 1     | manual clock; one instruction per rising edge    |
| `rst_n`   | in  | 1     | active-low asynchronous clear of `w`             |
| `s`       | in  | 4     | literal L (switches S3..S0)                      |
| `x`       | in  | 3     | instruction `{X2,X1,X0}` (switches S7, S6, S5)   |
| `w`       | out | 4     | the register                                     |
| `led`     | out | 8     | LEDs L7..L0 = `{S3..S0, w3..w0}`                 |

`x` and `s` must be stable before the rising edge of `pb1_clk`. The new `w`
appears right after that edge. The datapath is purely combinational between
`w` and the register's input, so an instruction takes exactly one clock.

The push button drives the register clock directly. Bounce filtering is
left to the board: this RTL has no debouncer. If you put the design in an
FPGA, feed `pb1_clk` from a debounced, synchronised single-cycle pulse, or
turn the register's clock into an enable on a system clock.

`rst_n` is an addition of this RTL. The original machine clears `w` only
through software: every program must begin with CLRW. Tie `rst_n` high to
get that behaviour.

## Where this RTL departs from the original circuit

* The original circuit was built from discrete TTL parts: two dual 4-to-1
  multiplexers, a 4-bit adder, a quad D flip-flop, NAND gates and
  inverters. Here each part becomes a small module. The multiplexers, the
  NAND-built feedback gate and the carry-in gate follow the circuit's
  structure. The adder is written as a behavioural `+`.
* The clock edge (rising) and the asynchronous clear are this design's
  choices.
* ASHRW is logical by default, following the circuit; see `SIGN_FILL`
  above.
* The original write-up also contains a delay analysis of the TTL chips:
  53 ns for most instructions and 63 ns for SUBLW, whose path includes an
  inverter. That analysis describes those chips only. The RTL's timing
  depends on whatever technology it is mapped to.
* All widths are parameterised by `WIDTH` (default 4). The instruction
  encoding and the register-level structure do not depend on it.

## Files

| File                     | Contents                                       |
|--------------------------|------------------------------------------------|
| `rtl/cpu4_pkg.sv`        | `opcode_e` instruction codes, `operand_sel_e`  |
| `rtl/operand_mux.sv`     | A-operand multiplexer and the `~L` inverters   |
| `rtl/feedback_gate.sv`   | B-operand gate (`w` or 0, by X2)               |
| `rtl/carry_in_logic.sv`  | carry in = X2 AND X1                           |
| `rtl/adder4.sv`          | adder with carry in                            |
| `rtl/w_register.sv`      | the register `w`                               |
| `rtl/cpu4_top.sv`        | the processor                                  |
| `tb/cpu4_ref_pkg.sv`     | instruction-level reference model              |
| `tb/*_tb.sv`             | self-checking testbenches                      |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A
watchdog ends a stalled run with a failure. For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cpu4_pkg.sv tb/cpu4_ref_pkg.sv tb/cpu4_top_tb.sv --top-module cpu4_top_tb
./obj_dir/Vcpu4_top_tb
```

Use the same command with another `tb/<block>_tb.sv` and top-module name to
run a unit test. The unit tests do not need `cpu4_ref_pkg.sv`.

What the tests cover:

* **Unit tests.** `operand_mux_tb`, `feedback_gate_tb`, `carry_in_logic_tb`
  and `adder4_tb` check every input combination against values built in
  the testbench. `w_register_tb` checks the clear, the loading edge and
  holding with random data.
* **`cpu4_top_tb`** runs at the default parameters and has three parts:
  * the worked program above, step by step, including the LED outputs;
  * the same program for every `x, y, z` in 0..15, compared with the
    expression in modulo-16 arithmetic;
  * 3000 random instructions, unused codes included, with asynchronous
    clears in between, compared with `cpu4_ref_pkg`.

  It also checks that `w` does not change before the clock edge. It counts,
  and requires at least once, each instruction code, a carry in, an
  overflow wrap, a shift of a negative value, an unused code and a clear.
* **`cpu4_top_ashr_tb`** repeats the random test with `SIGN_FILL = 1`.
