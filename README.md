# Macrocell multiprocessor signal-processing chip

This RTL describes a small multiprocessor DSP chip of the kind a 1980s "silicon
compiler" would produce for one fixed algorithm: an audio equalizer, a modem
equalizer or a vocoder. The compiler built each processor from parameterized
macrocells. Its architecture is described in "Macrocell-based silicon compiler
for multiprocessor signal processing ICs" (Pope, Rabaey, Brodersen). This is an
independent SystemVerilog rendering of the hardware in that description. The
compiler software and the cell layout are not part of it.

The main idea is that a chip dedicated to one algorithm needs no general
control flow. Each processor runs the same microprogram once per sample
interval, straight through with no branches. Decisions are left to a small
programmable-logic state machine that gates memory writes. Every processor is
a lean single-accumulator datapath. Multiplies are done one partial product per
clock, under the control of wide ("horizontal") microcode words. Processors
exchange data only over bit-serial links, which keeps the wiring small.

## Chip organisation (`mc_chip`)

```
            signal data bus (parallel, several channels per sample)
                         |
                    +---------+
   +--------------->|   P1    |<----+
   |   P4 -> P1     +---------+     |  P2 -> P1
   |                  | P1 -> P2    |
   |                +---------+     |
   |                |   P2    |-----+
   |                +---------+
   |                  | P2 -> P3
   |                +---------+        +----------------+
   |                |   P3    |------->| host interface |<==> host data bus
   |                +---------+        +----------------+      + irq
   |                +---------+                |
   +----------------|   P4    |<---------------+
                    +---------+<---- ext_sin (spare serial input)
```

* Only processor 1 sits on the **signal data bus**. The bus carries the
  sampled-data inputs and outputs. A channel number (`sig_chan`) and the
  `sig_rd`/`sig_wr` strobes let several values move per sample.
* The **host interface** (`mc_host_if`) exchanges one block of words with the
  host microprocessor per *frame* of `FRAME` samples. It raises `irq` at each
  frame boundary.
* All processors share the clock, the synchronous active-high `rst` and the
  one-clock `sample` strobe that starts every sample interval.
* `overrun[i]` is sticky. It is set when a strobe arrives while processor *i*
  is still running, which means the sample interval is too short for its
  program.

## One processor (`mc_processor`)

The processor is built from seven macrocells. SPC, AAU and FSM are optional,
selected by parameters.

| macrocell | module | role |
|---|---|---|
| PC  | `mc_pc`  | Starts on the sample strobe and steps through the main program, ROM words 0..MAIN_LEN-1. |
| SPC | `mc_spc` | Then runs the subprogram (the words after the main program) N_ITER times. |
| ROM | `mc_rom` | Microcode. It returns the word addressed by whichever counter is active, or an all-zero NOP when the program has ended. |
| AAU | `mc_aau` | Builds the data address from the word's address field, in one of four modes (see below). |
| FSM | `mc_fsm` | PLA state machine. Its state bits enable conditional memory writes. |
| AUIO | `mc_auio` | The arithmetic datapath with the serial ports, the coefficient inputs and the signal-bus port. |
| RAM | `mc_ram` | Single-port data memory. Read/write variables and read-only constants can be mixed in it. |

**Sequencing.** The strobe comes in clock *t*. Main word 0 executes in clock
*t+1* and the last main word in *t+MAIN_LEN*. The subprogram follows without a
gap. After the last word the processor executes NOPs until the next strobe, so
it needs at least MAIN_LEN + SUB_LEN·N_ITER + 1 clocks per sample. The ROM
image is the `PROGRAM` parameter, a packed array in which word *i* is
`PROGRAM[i]`.

**Address modes** (`amode` field):

| mode | address |
|---|---|
| `AM_DIR` | The address field itself. |
| `AM_IX` | Field + IX. IX is -1 throughout the main program and 0, 1, 2, ... in the subprogram iterations. A subprogram can therefore walk an array, and the main program can reach the word just below the array. |
| `AM_IY` | Field + IY. IY is a sample counter modulo `IY_MOD`, used for circular buffers and for decimated signals processed in turn. |
| `AM_PTR` | Field + P. P is a pointer register that microcode loads with the field (`PTR_LOAD`) or advances by it (`PTR_ADD`). |

All addresses wrap modulo the memory depth.

## The datapath and its arithmetic (`mc_auio`)

```
 RAM --> MOR --+--> [2:1] --> barrel shifter >>> 0..7 --> SOR --+--> complementor --> [0 / value] --> A
               |      ^                                         |                        ^
               |      +--------------- SOR ---------------------+                        | COEF bit
               +--------------------------------------------------> [0 / MOR / MBUS] --> B
                                                                                          |
                          saturating adder (A + B) --> ACC --> MBUS --> MIR --> RAM
                                                          |--> quotient bit (serial)
   MBUS = ACC | MOR | serial-in word | signal-bus input   (to the I/O ports)
```

Every register loads only when its control bit is set in the current word. The
shifter works on MOR or on SOR itself, so shifts longer than 7 bits take
several clocks. The adder computes in W+1 bits and clamps to the most positive
or most negative word. The FSM sees whether the last ACC load saturated.

**Variable coefficient, bit-serial.** A coefficient k arrives MSB first on
`COEF0` or `COEF1`, in two's complement. The product uses

    k·A = -A + (not k[n-1])·A + k[n-2]·A/2 + k[n-3]·A/4 + ...

The microcode first loads A into SOR and sets ACC = -A. Then, for 16 clocks,
the current coefficient bit (inverted for the sign bit) selects SOR or 0 at
adder input A. In the same clocks SOR shifts right by one. The sender's
parallel-serial converter must shift in the same clocks. A 16-bit multiply
takes 3 set-up clocks plus 16 partial-product clocks. Each partial product is
truncated by the arithmetic shift, so the result can differ from the exact
product by up to about 16 LSB.

**Fixed coefficient, signed digits.** A constant is written as a short sum of
±2^-e terms. Each term costs one clock. The shift depth sets the weight and the
complementor the sign. For example, 0.75·y = y - y/4 takes two adds.

**Divide (two-quadrant, non-restoring).** ACC starts with the dividend N and
SOR with D/2 (D > 0, |N| < D). Each step subtracts SOR if ACC ≥ 0 and adds it
otherwise (`COMP_DIV`). SOR halves in the same step. The quotient bit
q = (ACC ≥ 0) leaves on a serial output port. The digits ±1 are turned into a
two's-complement word by sending the first bit inverted and appending a final
1. Fifteen steps plus that final bit give a 16-bit Q15 quotient.

**MIR.** MIR is the memory input register. A write either takes MBUS in the
same clock (`mir_tr`, MIR "transparent") or takes the value MIR captured
earlier (`mir_ld`). With the second form a result can wait for a clock in
which the single-port memory is free. The original MIR was a latch. Here it is
a register with a bypass, which behaves the same at clock edges and keeps the
design latch-free.

**Conditional write.** `MEM_CWR` writes only if the FSM state bit selected by
`cw_bit` is 1. This is the only data-dependent behaviour in the processor.

## Microinstruction (`mc_pkg::ctrl_t`)

The encoding is this design's own. One field exists for each control point
above:

| field | meaning |
|---|---|
| `mem` | Memory cycle: `MEM_NOP`, `MEM_RD` (MOR loads), `MEM_WR`, `MEM_CWR`. |
| `addr` | Address field. Also the signal-bus channel and the pointer constant. |
| `amode`, `ptr` | AAU address mode and pointer operation. |
| `shsrc`, `shift`, `sor_ld` | Shifter input (MOR/SOR), shift depth 0-7, SOR load. |
| `comp` | Complementor: off, on, or by the sign of ACC (divide). |
| `amux`, `coef_inv` | Adder A: 0, SOR path, or gated by COEF0/COEF1 (bit optionally inverted). |
| `bmux`, `acc_ld` | Adder B: 0, MOR, MBUS; ACC load. |
| `quot` | Send a quotient bit (first, normal, final 1) on serial port `port`. |
| `mbus`, `mir_ld`, `mir_tr` | MBUS source; MIR load; write MBUS directly. |
| `port`, `so_ld`, `so_sh`, `si_sh` | Serial port number; parallel-serial load and shift; serial-parallel shift. |
| `sig_rd`, `sig_wr` | Signal data bus read and write strobes. |
| `fsm_step`, `fsm_in`, `cw_bit` | FSM step; two microcode bits given to the PLA; state bit for `MEM_CWR`. |

The all-zero word is a NOP.

One `port` field serves all the serial strobes. So in a given clock only the
serial input and the serial output with that port number can act. The address
field also names the signal-bus channel, so a signal-bus transfer and a memory
access share an address when they fall in the same word.

## Decision making (`mc_fsm`)

The FSM is a two-level PLA. It has NT product terms over the input vector
{`fsm_in`[1:0], main-program flag, saturated, ACC==0, ACC<0, state}. Each term
is given by a care mask and a value. The OR plane sends terms to state bits. A
term whose care mask is all zero is unused. The state changes only in clocks
with `fsm_step`. The default personality is:

* s0 = ACC<0
* s1 = ACC≥0
* s2 = sticky "saturated"
* s3 = ACC==0

The parameters `AND_CARE`, `AND_VAL` and `OR_PLANE` reprogram it.

## Bit-serial links and the host interface

Serial words travel MSB first, one bit per clock, W bits per word. There is no
handshake between processors. Both ends are microcoded and start on the same
strobe, so the program of the sender shifts (`so_sh`) in exactly the clocks in
which the program of the receiver shifts (`si_sh`) or uses the bit as a
coefficient. A parallel-serial port also carries the quotient bits while a
divide runs.

The host interface is not microcoded, so it follows strobes:

* `tx_req`: the processor's serial-parallel converter shifts, and the host
  interface moves to the next bit.
* `rx_vld`: the processor sends a bit, and every W bits become one word.

Its buffers are double. In each frame the processors use one bank and the host
the other. On the strobe that starts a new frame the banks swap, the word
pointers reset and `irq` rises. The host then reads the words the processors
produced in the previous frame and writes the words they will consume in the
next frame.
A word must not be cut by a frame boundary. An assertion in `mc_host_if`
reports a schedule that breaks this rule.

Host register map (`h_addr`, `HAW` bits):

* MSB = 0: buffer word `h_addr[HAW-2:0]`. A read returns an out-buffer word. A
  write goes to an in-buffer word.
* MSB = 1: a read returns the frame count, and a write clears `irq`.

## Default microprograms (`mc_prog_pkg`)

The chip needs a program in every ROM. The default programs exercise every
mechanism, and the end-to-end test checks them. Per sample, in Q15:

1. P4 takes a gain g from the host interface and sends it to P1's coefficient
   input.
2. P1 reads x from signal-bus channel 0 and computes y = g·x bit-serially. It
   writes y to channel 1, stores y through a held MIR and sends y to P2.
3. P2 forms z = y - y/4 (a fixed coefficient) and updates a running peak with
   an FSM-conditioned write. It sends z to P3 and the peak back to P1, which
   writes the peak to channel 2.
4. P3 stores z in an IY-indexed circular buffer of 4 words and sends z/0.75 to
   the host interface as a serial quotient. A 4-iteration, IX-indexed
   subprogram sums the buffer, with saturation. The sum goes to the host
   interface at the start of the next sample.

The longest program is P3, with 96 + 4·3 = 108 clocks, so the strobe period
must be at least 109 clocks. The test uses 128 clocks, which is 39 kHz at a
5 MHz clock. The clock-to-sample ratio of 50-1000 for which the architecture is
intended corresponds to 5-100 kHz at 5 MHz. The comments in `mc_prog_pkg.sv`
give the clock-by-clock schedule of every transfer.

Each processor in `mc_chip` is built with only what its default program uses.
Only P2 has an FSM. Only P3 has an AAU, with IX and IY but no pointer register.
Each processor has serial-parallel and parallel-serial converters only for
its own links: P1 has two inputs and one output, P2 one input and two outputs,
P3 one of each and P4 two of each.
A program passed in through `PROG1`..`PROG4` must stay within those resources.
The pointer mode is tested at block level.

## Parameters

| parameter | default | where | notes |
|---|---|---|---|
| `W` | 16 | all | Word length, configurable in the original; 16 is this design's choice. |
| shift range | 0-7 | `mc_auio` | As in the original datapath. |
| coefficient inputs | 2 | `mc_auio` | As in the original. |
| `N_SIN`, `N_SOUT` | 2, 2 | `mc_auio` | At most 2, because the `port` field is one bit. |
| `ROM_DEPTH` | 256 | `mc_rom` | Own choice. |
| `RAM_DEPTH` | 64 | `mc_ram` | Own choice; at most 64 (the 6-bit address field). |
| `IY_MOD` | 4 | `mc_aau` | Own choice. |
| `NS`, `NT` | 4, 8 | `mc_fsm` | Own choice. |
| `HAS_AAU`, `HAS_FSM`, `N_ITER` = 0 | | `mc_processor` | Leave out the optional AAU, FSM or SPC, as the original allows. |
| `AAU_IX`, `AAU_IY`, `AAU_PTR` | 1, 1, 1 | `mc_processor` | Build only the address modes a program uses (the `USE_*` parameters of `mc_aau`). A mode left out addresses directly. |
| `FRAME` | 8 | `mc_host_if` | Own choice. In-buffer FRAME words, out-buffer 2·FRAME words in `mc_chip`. |
| processors | 4 | `mc_chip` | The four-processor organisation. |

## Where this design goes beyond the original description

The original gives the block structure, the datapath elements, the multiply,
divide and indexing schemes, the conditional write and the chip organisation.
The following are this design's own choices:

* the microinstruction encoding;
* the ROM layout (main program, then subprogram);
* the sample-strobe start and the overrun flag;
* the form of the pointer addressing;
* the FSM inputs and its step command;
* reset clearing of the data memory;
* the MBUS sources;
* the serial framing and the host-interface buffering and register map;
* the word and memory sizes;
* the demonstration programs.

The thin link from the AAU to the FSM in the original processor diagram has no
stated purpose. Here it carries the "main program" (IX = -1) flag. The original
shows one more serial input into processor 4 without a source; here it is the
chip input `ext_sin`.

Not modelled: the compiler itself, the layout and cell library, the bond pads,
and the analog aspects of the 3-micron NMOS implementation.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. Packages must be read first, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/mc_pkg.sv rtl/mc_prog_pkg.sv \
    tb/tb_mc_chip.sv -y rtl --top-module tb_mc_chip
./obj_dir/Vtb_mc_chip
```

`tb_mc_chip` runs the whole chip at its default parameters for five frames, 40
samples. It acts as the host, checks every output word against a reference
model, counts each mechanism and fails if one never occurs. At the end it
provokes an overrun. `tb_mc_processor` runs processor 3's program alone. The
remaining testbenches check one macrocell each. To change an algorithm, write
new word functions in the style of `mc_prog_pkg` and pass the images through
the `PROG1`..`PROG4` parameters of `mc_chip`.

### Application-sized workloads

Three more testbenches run algorithms of the kind the chip was built for. Each
one runs at that application's sample rate with a 5 MHz clock. Their
microprograms are in the testbench files, and each compares every output
against a model that uses the same saturating arithmetic.

- `tb_wl_audio_eq`: a four-section equalizer made of second-order sections,
  on one processor, with 100 clocks per sample (50 kHz). The sections run as a
  22-word subprogram iterated four times, and IX indexes the coefficients and
  state. It uses 91 clocks.
- `tb_wl_dfe`: a decision-feedback equalizer on two processors, with 43 clocks
  per sample (116 kHz). The slicer decision comes from the FSM's conditional
  writes of +0.5 or -0.5 from read-only constants. The processors use 24 and 34
  clocks.
- `tb_wl_lpc`: the synthesis side of an LPC vocoder on three processors, with
  625 clocks per sample (8 kHz). For each 16-sample frame the host interface
  delivers ten reflection coefficients, a gain and a pitch period. A
  coefficient processor stores them in an IY table. It sends the pitch period
  to an excitation processor. It also streams the gain and the coefficients
  bit-serially into the coefficient input of a lattice processor.

  The excitation processor makes the pitch pulses without branches. A
  down-counter, the FSM and two conditional writes reload the counter and
  choose between a pulse and zero. The lattice processor runs a 10-stage
  all-pole lattice as a 43-word subprogram iterated ten times. The coefficient
  and lattice processors have the same program lengths, so their transfers
  stay in step. The three processors use 484, 55 and 484 clocks. Noise
  excitation and the analysis side of a vocoder are not built.
