# RISC-Modulation Processor (RMP)

A small pipelined processor that puts signal-generation hardware next to the
usual 8-bit arithmetic and logic. Every instruction is one 32-bit word that
holds a 5-bit opcode and its operands as immediates. 32 operations are
available: the ALU operations, a universal shift register, a barrel rotator,
a comparator, and six modulation functions. The modulation functions are
pulse width (PWM), pulse position (PPM), pulse code (PCM), 64-QAM mapping, and
sine and cosine generation. A program can mix computation with waveform
generation. The PWM, PPM and sine/cosine generators keep running between
instructions, so their outputs are continuous waveforms on the processor's
pins, along with a serial PCM bit stream of the sine. An instruction can also
sample them.

The RTL follows a published FPGA design. That design gives the opcode map, the
bit position of every instruction field, the five pipeline stage names, the
five execution units and the modulation principles. It leaves open how results
are stored, how the modulators are clocked and scaled, and all control
handshakes. Those parts are this implementation's own choices, and each one is
listed under "Choices made here" below.

## The instruction word

Every instruction has the same two fixed fields:

* bits `4:0`: opcode
* bit `31`: RW flag. `1` stores the result. `0` reads back an earlier result instead (see "Result words and the result memory")

The rest of the word depends on the operation. The *output field* is a slice
of the word that the hardware overwrites with the result. Fields may overlap,
because each operation uses only its own.

| opcode | operation | inputs (bits) | output field |
|---|---|---|---|
| 00000 | ADD | a `12:5`, b `20:13` | `28:21` (a+b mod 256) |
| 00001 | SUB | a, b | `28:21` (a-b mod 256) |
| 00010 | MUL | a | `27:13` (a*a, 15 bits) |
| 00011 | DIV | a, divisor `25:21` | `28:26` (low 3 bits of a/divisor) |
| 00100-01001 | AND OR NAND NOR XOR XNOR | a, b | `28:21` |
| 01010 / 01011 | NOT A / NOT B | a | `28:21` (~a, for both) |
| 01100 | SISO | serial in `5` | serial out `6` |
| 01101 | SIPO | serial in `5` | parallel out `13:6` |
| 01110 | PISO | parallel in `12:5`, load enable `16` | serial out `15` |
| 01111 | PIPO | parallel in `12:5` | parallel out `22:15` |
| 10000 / 10001 / 10010 | EQUAL / GREATER / LESSER | a, b | `28` |
| 10011-10111 | rotate by 1..5 | a, direction `14` (1 = left) | `28:21` |
| 11000 / 11001 | INCREMENT / DECREMENT | a (its LSB is bit 5) | `7` (LSB of a±1) |
| 11010 | PWM | duty `12:5` | PWM1 `27`, PWM2 `26` |
| 11011 | PCM | sample number `12:5` | code `27:20` |
| 11100 | QAM | symbol `10:5` | real `27:18`, imaginary `17:8` |
| 11101 | PPM | sample `12:5`, enable `20` | pulse `27` |
| 11110 / 11111 | COSINE / SINE | amplitude `9:5` | sample `17:10` |

In several formats the output field is narrower than the result: DIV keeps 3
bits and INC/DEC keep 1 bit. So the processor also reports each result at full
width and right-aligned, on `ret_value`. For QAM, `ret_value` is
`{re, im}`.

## Result words and the result memory

The EX stage builds a *result word*: a copy of the instruction word with the
output field filled in. The result memory has one 32-bit register per opcode:

* With RW = 1, the MA stage writes the result word into the register of its opcode.
* With RW = 0, the instruction still executes, so the shift register, PWM duty and other settings still change. Its result is not stored. The MA stage instead reads the word that the last RW = 1 instruction with the same opcode stored.

A program can therefore compute now and fetch that output later. `ret_rdata`
shows the word written or read. All registers reset to 0.

## Pipeline and timing

Five stages, one clock each, one instruction completing per clock:

| stage | does |
|---|---|
| IF | the control unit sends the PC to the instruction memory (synchronous read), PC += 1 |
| ID | `rmp_decode` splits the fetched word into a `decoded_t`, which is registered |
| EX | the unit for the opcode computes; the result word and full result are registered |
| RW | the RW flag becomes the result-memory request (write or read), registered |
| MA | the result memory is written or read |

An instruction fetched in cycle *t* executes in *t*+2. Its outputs appear on
`ret_*` with `ret_valid` high in cycle *t*+5. The pipeline has no stalls and no
bypasses, and needs none. Every operand is an immediate, and every result goes
to its own register. The only state shared between instructions is the shift
register and the modulator settings, and these change in EX in program order.

Running a program:

1. Load the program through `imem_we` / `imem_waddr` / `imem_wdata`.
2. Set `prog_len` and pulse `start`.
3. Wait for `busy` to fall. This happens after the last instruction leaves MA.

## Execution units

**ALU (`rmp_alu`).** Combinational and 8 bits wide. Additions and subtractions
wrap. MUL squares the first operand, as in the source design, which multiplies
a number only with itself. Only 15 bits of the product are kept, so the top
product bit is lost for operands above 181. DIV divides by a 5-bit divisor; a
zero divisor gives 255. NOT A and NOT B both invert the field at `12:5`.

**Shift unit (`rmp_shift_unit`).** A single 8-bit register serves all four
modes, and each SU instruction is one step. SISO and SIPO shift toward the MSB,
taking the serial input at bit 0. PISO either loads (when the load enable is 1)
or shifts left with 0 fill. Serial output is the MSB after the step, so a
loaded byte leaves MSB first over the load and 7 more PISO steps. In SISO, a
bit appears at the serial output on the 7th SISO step after it entered.

**Rotation unit (`rmp_rotate_unit`).** A three-level (1, 2, 4) barrel. The
opcode gives the distance and bit 14 the direction.

**Comparator (`rmp_comparator`).** Unsigned comparison of a (first input)
against b.

**Modulation unit (`rmp_modulation`).** Each technique keeps its own
settings, and none shares an input with another. An instruction sees its own
setting in the cycle it executes.

* *PWM (`rmp_pwm`).* A 9-bit counter gives a triangle carrier of 0..255..0 with a 512-clock period. `pwm1 = duty > carrier` and `pwm2 = ~pwm1`. Duty *d* gives 2*d* high clocks per period.
* *PPM (`rmp_ppm`).* An 8-bit ramp with a 256-clock frame. When enabled, there is one 1-clock pulse per frame at the clock where the ramp equals the sample.
* *PCM (`rmp_pcm`).* `code = 128 + round(127*sin(2*pi*n/256))` for sample number *n*. Codes are offset binary, 1..255.
* *Serial PCM (`rmp_pcm_stream`).* A continuous transmitter of the sine. Every 8-clock frame it samples the next of 256 sine points and quantizes it with the same code as `rmp_pcm`. It then sends the code MSB first on `pcm_bit`. `pcm_frame` marks the MSB.
* *QAM (`rmp_qam`).* Bits `5:3` of the symbol choose the cosine (real) level and bits `2:0` the sine (imaginary) level. Each is (2k-7)*64, so the levels are -448..448 in 10-bit two's complement. Levels follow natural binary order, not Gray code.
* *Sine/cosine (`rmp_wavegen`, two instances).* A phase counter steps once per clock, 256 steps per period. The cosine instance adds a 64-step (90°) offset. `sample = trunc(table*amp/31)`, where the amplitude is 0..31 and resets to 31. With amplitude 31 the signed output spans -127..127, and the unsigned output is that value + 128. The sine starts at 0 after reset.

The sine table (`rmp_sine_lut`) has 256 entries of
`round(127*sin(2*pi*i/256))`. It is computed at elaboration time by a constant
function, so no data file is needed.

## Files

| file | contents |
|---|---|
| `rtl/rmp_pkg.sv` | opcode enum, unit enum, `decoded_t`, sine-table function |
| `rtl/rmp_top.sv` | the processor: pipeline registers, result-word packing |
| `rtl/rmp_control.sv` | PC, start/stop, per-stage valid bits |
| `rtl/rmp_instr_mem.sv` | 256 x 32 instruction memory |
| `rtl/rmp_decode.sv` | field extraction |
| `rtl/rmp_alu.sv`, `rmp_shift_unit.sv`, `rmp_rotate_unit.sv`, `rmp_comparator.sv` | execution units |
| `rtl/rmp_modulation.sv` | modulation unit wrapper |
| `rtl/rmp_pwm.sv`, `rmp_ppm.sv`, `rmp_pcm.sv`, `rmp_pcm_stream.sv`, `rmp_qam.sv`, `rmp_wavegen.sv`, `rmp_sine_lut.sv` | modulators |
| `rtl/rmp_result_mem.sv` | per-opcode result registers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top parameters: `IMEM_DEPTH` (default 256) and `AW` (derived as
`$clog2(IMEM_DEPTH)`).

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Every
testbench also has a watchdog. Example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rmp_pkg.sv tb/tb_rmp_top.sv \
          --top-module tb_rmp_top -o sim
./obj_dir/sim
```

The same pattern works for any `tb/tb_rmp_<x>.sv`: files are found through
`-Irtl`, and the package must be listed first.

`tb_rmp_top` uses the default parameters and runs three programs:

* 256 random instructions covering every opcode
* a read-back of every opcode's stored result
* PWM/PPM instructions timed so that their sampled outputs take both values

It checks every retired word, value, memory word and retire cycle against a
model in the testbench. It also counts these mechanisms, and fails if any of
them never occurs:

* every opcode
* writes and reads, including a read that returns a non-zero stored word
* PISO load and shift
* rotation left and right
* comparator true and false
* PWM high and low
* a PPM pulse
* a serial PCM frame. The stream is also checked bit by bit on every clock.
* a full five-stage pipeline

The ALU, shift-unit and comparator testbenches also check the operand and
result values that appear in the source design's own simulation waveforms. For
example, operands `0111_0001` and `1000_1000` give sum `1111_1001`, difference
`1110_1001`, XNOR `0000_0110` and NOT `1000_1110`.

## Choices made here

These fill gaps in the source design, or choose between readings of it:

* **Result storage.** The source says results are written to, or read from, a "memory register" chosen by bit 31. Packing the result into the instruction word's output field, and keeping one register per opcode, are this design's reading.
* **Stage timing.** The source both says that IF, ID, EX, RW and MA happen "within one clock cycle" and that different instructions occupy the stages at the same time. The RTL uses one stage per clock with overlapping instructions.
* **Rotation distance.** It comes from the opcode (ROT1..ROT5). The 3-bit field `17:15` in the rotation format is not used.
* **DIV operand.** The DIV first operand is taken as `12:5` (8 bits), like every other operation. One reading of the format shows `13:5`.
* **Made-up details.** The following are invented:
  * instruction memory depth (256)
  * program load port, `start`/`prog_len` handshake and reset behaviour
  * direction encoding
  * shift direction
  * PWM period, and PWM2 as the complement of PWM1
  * PPM ramp carrier, with the modulating sample taken from the instruction
  * PCM read as "sample number in, code out", and the serial PCM frame format
  * QAM level spacing
  * sine/cosine step rate and amplitude formula
* **Not modelled.** The source's FPGA implementation figures (device utilisation, timing, power) describe its own VHDL on vendor devices. Nothing here reproduces them.
