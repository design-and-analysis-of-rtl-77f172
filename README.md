# Digital PID controller with a Wishbone interface

This design is a proportional-integral-derivative (PID) controller built as dedicated hardware
instead of as a program on a processor. The host writes the gains and the set point once. After
that it writes a new measured process value (PV) each sample period. Every PV write starts one
pass of the control law in hardware, and the new controller output u(n) appears a few clock
cycles later. All registers sit behind a Wishbone classic slave port.

## The control law

The controller uses the incremental, discrete form of the PID law:

    e(n)  = SP - PV
    sigma = Ki * e(n) + sigma                               (running integral)
    u(n)  = (Kp + Kd) * e(n) + sigma - Kd * e(n-1)

This is `Kp*e + sigma + Kd*(e(n) - e(n-1))` with the two e(n) terms folded together. So a
calculation needs only one stored sum, Kpd = Kp + Kd. Kpd is recomputed whenever Kp or Kd is
written, not on every sample.

Widths:

| quantity | width |
|---|---|
| Kp, Ki, Kd, SP, PV | 16-bit two's complement |
| Kpd, e(n), e(n-1) | 16 bits |
| products | 32 bits (exact for 16 x 16) |
| sigma, u(n) | 32 bits |

A result that does not fit its register wraps. Each of the five additions also has its own
flag in the overflow register:

| bit | set when |
|---|---|
| 0 | Kp + Kd does not fit 16 bits |
| 1 | SP - PV does not fit 16 bits |
| 2 | the sigma update overflows 32 bits |
| 3 | the first u(n) addition overflows 32 bits |
| 4 | the second u(n) addition overflows 32 bits |

A flag always shows the latest result of its addition. It is not sticky.

Worked example, reproduced by the end-to-end testbench. Take Kp = 128, Ki = 129, Kd = 130 and
SP = PV = 3975, with an integral of 21878529 built up by earlier samples. Then Kpd = 258,
e(n) = e(n-1) = 0, and u(n) = sigma = 21878529.

## Structure

    Wishbone ──► wb_rw_gen ──rd/wr──┐
             └─► pid_addr_check ─hit/idx─┤
                                        ├─► pid_sm1 (register block 1: Kp Ki Kd SP PV)
                                        │      │ upd_kpd / upd_pv        ▲ busy
                                        │      ▼                         │
                                        │   pid_sm2 (register block 2: Kpd e(n) e(n-1) sigma u(n) flags)
                                        │      │ md/mr ▲ product   │ a/b/cin ▲ sum/ovf
                                        │      ▼       │           ▼         │
                                        │   booth_pipe_mult      han_carlson_adder
                                        └─► pid_wb_read ──► ACK_O, DAT_O, o_un, o_valid

| file | role |
|---|---|
| `rtl/pid_pkg.sv` | widths, register index enum, register-block structs, flag positions |
| `rtl/pid_top.sv` | the controller, wiring of the blocks below |
| `rtl/wb_rw_gen.sv` | read strobe `rd` and write strobe `wr` from CYC_I, STB_I, WE_I |
| `rtl/pid_addr_check.sv` | upper-address compare against `BASE_ADDR`, register index decode |
| `rtl/pid_sm1.sv` | state machine 1: register block 1, write acknowledge, holding writes while busy |
| `rtl/pid_sm2.sv` | state machine 2: register block 2, the calculation sequence |
| `rtl/booth_pipe_mult.sv` | 16 x 16 radix-2 Booth multiplier, two pipeline stages |
| `rtl/han_carlson_adder.sv` | 32-bit Han-Carlson parallel-prefix adder with carry in and overflow |
| `rtl/pid_wb_read.sv` | read multiplexer, read acknowledge, registered o_un / o_valid |

There is one multiplier and one adder. State machine 2 time-shares them for every product and
every sum, including Kp + Kd and SP - PV.

## The calculation sequence (state machine 2)

This is the part that takes the most care to follow. The multiplier is pipelined: it has an
input latch, stage 1 (the low eight Booth digits), a second latch, and stage 2 (the high eight
digits). It accepts one operand pair per cycle, and a product comes out two clock edges after
its operands go in. State machine 2 takes advantage of this: it issues the three products back
to back and lets the adder consume them as they come out.

| edge after `upd_pv` | state | multiplier input | adder |
|---|---|---|---|
| 1 | IDLE → ERR | — | — |
| 2 | ERR → CALC | — | SP + ~PV + 1 → e(n); e(n-1) ← old e(n) |
| 3 | CALC | Ki, e(n) | — |
| 4 | CALC | Kpd, e(n) | — |
| 5 | CALC | Kd, e(n-1) | sigma + Ki*e(n) → sigma |
| 6 | CALC | — | sigma + Kpd*e(n) → u(n) |
| 7 | CALC → IDLE | — | u(n) + ~(Kd*e(n-1)) + 1 → u(n), un_valid = 1 |

A product arrives while a later one is still entering the pipeline. State machine 2 therefore
keeps two counters, one for products issued and one for products added. Each addition is
triggered by the multiplier's `out_valid`, not by a fixed cycle number. Changing the
multiplier's depth moves the schedule but does not break it.

A Kp or Kd write takes one cycle in state KPD. The result, Kpd = Kp + Kd, is ready two edges
after `upd_kpd`.

## Bus interface and timing

The ports follow Wishbone classic naming: `i_clk`, `i_rst`, `i_wb_cyc`, `i_wb_stb`, `i_wb_we`,
`i_wb_addr[15:0]`, `i_wb_data`, `o_wb_ack` and `o_wb_data`. The controller output comes out on
`o_un[31:0]` with `o_valid`.

Register map. There is one 32-bit word per register. Byte address = `BASE_ADDR` + 4 × index.
`ADR_I[15:6]` must equal `BASE_ADDR[15:6]`, or the core does not respond.

| index | register | access |
|---|---|---|
| 0 | Kp | read/write |
| 1 | Ki | read/write |
| 2 | Kd | read/write |
| 3 | SP | read/write |
| 4 | PV | read/write; a write starts a calculation |
| 5 | Kpd | read |
| 6 | e(n) | read |
| 7 | e(n-1) | read |
| 8 | u(n) | read |
| 9 | sigma | read |
| 10 | overflow flags [4:0] | read |

Reads sign-extend the 16-bit registers to the bus width. Unused offsets inside the window read
as 0.

Timing:

- **Acknowledge.** Every access is acknowledged one cycle after the strobe is seen. The
  acknowledge lasts one cycle. The master drops its strobe (or starts the next transfer) in the
  cycle after it sees the acknowledge, as in Wishbone classic.
- **Held writes.** A write to Kp, Ki, Kd, SP or PV that arrives while a calculation runs is
  held without acknowledge until the calculation ends. The master just keeps its strobe up. So
  coefficients can be retuned at any time without corrupting a calculation in progress.
- **Read-only registers.** Writes to the read-only offsets are acknowledged and ignored, so
  they cannot hang the bus.
- **Output.** After a PV write, `o_valid` falls. Eight clock edges after the acknowledging edge
  it rises again, with the new u(n) on `o_un`. These are the seven edges of the calculation
  plus one output register.
- **Reset.** `i_rst` is synchronous and active high. It clears every register, the integral
  included.

The usual start-up order is: write Kp, Ki, Kd and SP after reset, then write PV once per sample
period. Either wait for `o_valid` or read u(n) back.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `DW` | 32 | `pid_top`, `pid_sm1`, `pid_wb_read` | Wishbone data width; 32 or wider (64 works) |
| `BASE_ADDR` | 16'h0000 | `pid_top`, `pid_addr_check` | base of the 64-byte register window |
| `W` | 16 | `booth_pipe_mult` | operand width |
| `W` | 32 | `han_carlson_adder` | adder width, a power of two |

The 16-bit bus width that is sometimes quoted for this interface is not supported, because u(n)
and sigma are 32 bits.

## Where this RTL departs from, or goes beyond, the original description

The blocks, the register set, the equations, the update rules (Kpd after Kp/Kd writes, a
calculation after PV writes, writes held during a calculation) and the adder and multiplier
types follow the published design. Everything else differs as follows.

- **Choices of this implementation.** None of these is specified in the original:
  - the register map and address window
  - the bus acknowledge timing
  - the handling of read-only and unused offsets
  - reset values of zero
  - the calculation schedule and its latency
  - wrap-around arithmetic
  - the meaning given to the five overflow flags
- **Adder.** The adder is the standard Han-Carlson adder. A "modified" Han-Carlson adder with
  fewer prefix cells is mentioned but not specified, so it is not built.
- **Multiplier.** The multiplier is radix-2 Booth with a two-stage split. The description also
  mentions a pipeline that carries the operands' most significant bits. That is not specified
  further and is not built.
- **Resource and timing figures.** The original reports 118 flip-flops and 100.34 MHz on an
  FPGA. The registers it lists already need 192 flip-flops, so those figures cannot describe
  this register set. This RTL synthesises to 373 flip-flop bits: the registers plus pipeline
  latches and bus registers. No timing analysis has been done here.
- **Unexplained waveform value.** A published waveform shows a 32-bit read-data value
  (1017606) whose meaning is not explained. It is not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a single line,
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_han_carlson_adder` | corner cases and 5000 random additions against a 33-bit reference |
| `tb_booth_pipe_mult` | 4000 streamed products, including -32768 × -32768, each checked to come out exactly two edges after its operands |
| `tb_wb_rw_gen` | all input combinations |
| `tb_pid_addr_check` | every offset of a non-zero base window, its edges, and random addresses |
| `tb_pid_sm1` | stored values, the one-cycle acknowledge, update pulses, writes held while busy, read-only writes, address misses |
| `tb_pid_sm2` | state machine 2 with the real multiplier and adder against a 64-bit reference model, the 7-edge and 2-edge latencies, every overflow flag |
| `tb_pid_wb_read` | every offset's data and extension, acknowledge timing, the o_un / o_valid delay |
| `tb_pid_top` | the whole controller over the bus, at default parameters |
| `tb_pid_top_dw64` | the controller with a 64-bit bus and a non-zero base address |

`tb_pid_top` runs the worked example first. It then closes a loop around a behavioural
integrating plant, `y += (u - u0) / 1024`, and requires the plant to settle within 16 counts of
the set point, including after a retune and a set-point step. After that it runs held writes,
read-only writes, address misses, directed overflows of all five additions, and random traffic.
It counts each of these mechanisms and fails if any never happened.

To run one testbench with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/pid_pkg.sv tb/tb_pid_top.sv --top-module tb_pid_top -o sim
    ./obj_dir/sim

Use the same command for any other testbench. Each runs in well under a second.
