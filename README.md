# One arithmetic PE, two ways to feed it: BRAM versus AXI-Stream on a Zynq-7000

On a Zynq-style SoC-FPGA the cost of moving data between the ARM processor and an
accelerator in the programmable logic can be larger than the work the accelerator does.
This RTL shows the same small arithmetic processing element (PE) connected in two ways:

* **BRAM-based (memory-mapped).** Software writes operand words into an on-chip dual-port
  block RAM, pulses `start`, polls `ready` and reads results from a second block RAM. A
  small controller in the logic walks through the words. There is no streaming protocol
  and no DMA set-up, so the logic is small and the timing is fixed.
* **AXI-Stream (DMA-fed).** A DMA engine streams operand words from DDR into the PE and
  streams results back. The PE is wrapped with AXI4-Stream slave and master ports and a
  one-word buffer that absorbs backpressure. This version scales to arbitrary stream
  lengths, but it needs a DMA engine and interconnect around it.

Both integrations sit side by side in `soc_pl_top` and share one clock and reset. The
processor, DMA engine, AXI BRAM controllers, AXI GPIOs, AXI interconnects and reset
generator are standard vendor blocks. They are not part of this RTL. Their connections
are the top-level ports.

## The processing element (`pe_core`)

The PE is combinational and 8 bits wide (`WIDTH = 8`, `FRAC_BIT = 0`). All values are
two's complement. A 2-bit `op` selects the operation:

| op  | result `z_out`                         |
|-----|----------------------------------------|
| 00  | `x_in + y`                             |
| 01  | `x_in - y`                             |
| 10  | `(x_in * y) >>> FRAC_BIT`              |
| 11  | `z_in + ((x_in * y) >>> FRAC_BIT)`     |

Results wrap to 8 bits; there is no saturation. `x_in` is also passed unchanged to `x_out`,
so PEs could be chained, but neither integration uses it. Codes 00–10 are the published
operations. Code 11 (multiply-accumulate) is this implementation's way of using the PE's
third operand `z_in`, which the published description names without saying what op uses it.

### Operand word

Both integrations use the same 32-bit operand word (`pe_pkg`):

| bits    | field  | meaning                                   |
|---------|--------|-------------------------------------------|
| 7:0     | `x_in` | operand a                                 |
| 15:8    | `y`    | operand b                                 |
| 23:16   | `z_in` | accumulate input (low byte of a 16-bit field) |
| 31:24   | –      | ignored                                   |

Each result word is the 8-bit result, sign-extended to 32 bits.

## BRAM integration (`bram_pe_top` + two `dp_bram`)

```
 PS (AXI BRAM ctrl) ──port A──► dp_bram u_bram_in ──port B──► pe_input_reg ─► pe_core ─► pe_output_reg ─► sign_extend ──port B──► dp_bram u_bram_out ◄──port A── PS
                                          ▲ addr/en                                                          addr/en/we ▲
 GPIO start ─► start_edge_detect ─► bram_ctrl_fsm ───────────────────────────────────────────────────────────────────────┘
 GPIO op ───► (sampled at start)                 └─► ready ─► GPIO
```

### How a run goes

1. Software writes `NUM_WORDS` (default 100) operand words to byte addresses `0, 4, 8, …` of
   the input memory, using port A.
2. Software sets `bram_op`, then raises `bram_start`. `start_edge_detect` turns the rising
   edge into a one-cycle pulse. A `start` held high starts only one run.
3. On that pulse the controller clears `ready`, samples `op` for the whole run and visits
   each word `i` in four states:

   | state | what happens                                             |
   |-------|----------------------------------------------------------|
   | READ  | port B of the input memory reads address `4*i`           |
   | LATCH | the read word is latched into the input register         |
   | EXEC  | the PE result is captured in the 8-bit output register   |
   | WRITE | the sign-extended result is written to address `4*i` of the output memory |

4. After the last word, `ready` goes high. It stays high until the next start edge. Start
   edges that arrive during a run are ignored.
5. Software reads the results through port A of the output memory.

**Timing:** a run takes exactly `4*NUM_WORDS` clock cycles. That is 400 cycles for 100 words,
counted from the edge that samples the start pulse to the edge that sets `ready`.
Memory reads have one cycle of latency.

The ports of `bram_pe_top` match the accelerator block used in a vendor block design. Each
memory gets a full port-B bundle (`addrb*`, `clkb*`, `dinb*`, `enb*`, `rstb*`, `web*`) plus
`doutb*`. Memory 0 is only read (`web0 = 0`) and memory 1 is only written, so `dinb0` and
`doutb1` are unused.

### Memories (`dp_bram`)

`dp_bram` is a true dual-port RAM with 32-bit words, 4 byte enables per port and byte
addresses (bits 1:0 ignored). Each port has a one-cycle registered read and is read-first.
When both ports write the same word in one cycle, port B wins. The default `DEPTH` is 1024
words, which is one 36 Kb block RAM. Both ports run on one clock.

## AXI-Stream integration (`axis_pe`)

A word is accepted when `s_axis_tvalid && s_axis_tready`. The PE computes the result in the
same cycle. On the next edge the result is stored, with `s_axis_tlast`, in one output
register, which then drives `m_axis_tdata`, `m_axis_tvalid` and `m_axis_tlast`.

```
s_axis_tready = !m_axis_tvalid || m_axis_tready
```

Because of this rule, the output register is never overwritten before it is taken:

* With the sink always ready, one word goes through per cycle with one cycle of latency.
  100 words take 101 cycles.
* Under backpressure the source is stalled instead of losing data.

An assertion checks the AXI-Stream rule that an offered result stays stable until it is
taken. The operation comes from the `op` port (a GPIO in the system) and may change between
words. `tkeep` and `tuser` are not used.

## Top level (`soc_pl_top`)

| group                | ports                                                               |
|----------------------|---------------------------------------------------------------------|
| clock/reset          | `clk`, `rst_n` (active low, synchronous)                            |
| BRAM control (GPIO)  | `bram_start`, `bram_op[1:0]`, `bram_ready`                          |
| input memory port A  | `in_ena`, `in_wea[3:0]`, `in_addra[31:0]`, `in_dina`, `in_douta`    |
| output memory port A | `out_ena`, `out_wea[3:0]`, `out_addra[31:0]`, `out_dina`, `out_douta` |
| stream control       | `axis_op[1:0]`                                                      |
| stream in (MM2S)     | `s_axis_tdata[31:0]`, `s_axis_tvalid`, `s_axis_tready`, `s_axis_tlast` |
| stream out (S2MM)    | `m_axis_tdata[31:0]`, `m_axis_tvalid`, `m_axis_tready`, `m_axis_tlast` |

Parameters: `WIDTH = 8`, `FRAC_BIT = 0`, `NUM_WORDS = 100` and `DEPTH = 1024`.
`NUM_WORDS` must not exceed `DEPTH`.

## Files

| file                        | contents                                               |
|-----------------------------|--------------------------------------------------------|
| `rtl/pe_pkg.sv`             | opcode enum and operand-word field positions           |
| `rtl/pe_core.sv`            | the arithmetic PE                                      |
| `rtl/pe_input_reg.sv`       | operand register and word split                        |
| `rtl/pe_output_reg.sv`      | 8-bit result register                                  |
| `rtl/sign_extend.sv`        | 8 → 32 sign extension                                  |
| `rtl/start_edge_detect.sv`  | start rising-edge pulse                                |
| `rtl/bram_ctrl_fsm.sv`      | run controller: counter, addresses, ready flag         |
| `rtl/dp_bram.sv`            | dual-port block RAM                                    |
| `rtl/bram_pe_top.sv`        | BRAM-side accelerator                                  |
| `rtl/axis_pe.sv`            | AXI-Stream PE                                          |
| `rtl/soc_pl_top.sv`         | both integrations together                             |
| `tb/pe_ref_pkg.sv`          | integer reference model of the PE used by testbenches  |
| `tb/tb_*.sv`                | one self-checking testbench per module                 |

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. Each
also has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_soc_pl_top rtl/pe_pkg.sv tb/pe_ref_pkg.sv tb/tb_soc_pl_top.sv
./obj_dir/Vtb_soc_pl_top
```

For another testbench, replace `tb_soc_pl_top` with its name. `tb_soc_pl_top` runs the top at
its default parameters and plays the processor and the DMA:

* For each of the four operations, it runs 100 words through the BRAM integration and 100
  words as one packet through the stream integration.
* Stream packets run both without and with random backpressure.
* One BRAM run and one stream packet run at the same time.
* It checks every result against `pe_ref_pkg`, the 400-cycle run time and the
  one-word-per-cycle stream rate.
* It counts each mechanism: held start, start while busy, each opcode in both designs,
  8-bit wrap-around, negative results, stream stalls and `tlast`. A mechanism that never
  happens fails the test.

The unit testbenches cover the following:

* `tb_pe_core` tries every opcode and operand pair, also with `FRAC_BIT = 2`.
* `tb_dp_bram` includes write collisions.
* `tb_bram_ctrl_fsm` checks the strobe sequence cycle by cycle.
* `tb_axis_pe` covers full rate and random backpressure.

## How far to trust it, and where it departs from the published design

The published description covers the operations, the 8-bit signed result, the sign
extension to 32 bits, the operand field names and positions and the block structure. It also
gives the port names of both accelerators and the streaming handshake. The following points
are this implementation's own choices:

* **Opcode 11** is multiply-accumulate. Only add, subtract and multiply are specified, but a
  multiply-accumulate capability and a `z_in` operand are also mentioned.
* **`z_in` field.** The operand word reserves bits 16–31 for `z_in`. The 8-bit PE uses bits
  23:16.
* **Where the stream PE gets `op`.** One description places `op` in the stream word, while
  the block design drives it from a GPIO pin. This RTL uses the pin.
* **Which memory holds what.** Memory 0 holds operands and memory 1 holds results. One
  drawing instead shows the two memories as the PE's two operand inputs. The data-flow
  description was followed.
* **Controller.** The run length (100 words, taken from the 100-iteration experiment), the
  four-state sequence, byte addressing, the `ready` behaviour and sampling `op` at start are
  all choices of this design.
* **Memories and streaming.** The 1024-word memory depth, the read-first collision rule, the
  one-register stream buffer and the 32-bit sign-extended stream result are choices of this
  design.
* **Resets.** All resets are synchronous and active-low.
* **Results** wrap around instead of saturating.
* **Clocking.** Everything runs on one clock, and `start` is assumed synchronous to it.

The published latency figures, about 0.1 ms per operation for the BRAM version and 1.19 ms
for the DMA version, are end-to-end software measurements. They are dominated by driver,
cache and DMA set-up time outside this logic. The logic alone needs 400 cycles per
100-word BRAM run and 101 cycles per 100-word stream. At 100 MHz that is 4 µs and 1 µs.
The resource comparison between the two systems comes mostly from the vendor DMA and
interconnect blocks, which are not reproduced here.
