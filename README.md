# Siwa: a small RISC-V microcontroller that drives high-voltage tissue stimulators

An implanted stimulator pushes precisely controlled current pulses through
tissue. Its supply can reach 15 V or more, and the currents must balance so
that no net charge is left behind. The logic that schedules the pulses,
talks to the outside world and boots from flash should burn as little energy
as possible. Siwa fits all of that on one die: a compact RV32I
microcontroller sits next to HV current sources and HV level shifters, and
the programmer drives them through a few custom control registers.

The microcontroller does one thing at a time. Its main choices are:

* **It trades speed for area and energy.** It is a multicycle core (about
  4 clocks per instruction) and its register file is built from latches.
* **Peripherals sit behind a packet bus with queues.** The core never waits
  on a slow device inside a bus cycle. It sends a request packet, the bus
  executes it and a response comes back.
* **Idle logic can be switched off.** Two custom instructions, `CG.OFF` and
  `CG.ON`, stop and restart the clocks of the bus and each peripheral.
* **It boots from external SPI flash.** A hardware boot engine copies the
  program into the 8 kB SRAM before the core leaves reset.

Everything digital is synthesizable SystemVerilog. The stimulator circuits
(current source, current sink with trim, level shifters) are behavioural
models with `real` ports. They let a simulation check the currents and
voltages the firmware asks for.

## Block map

```
                 siwa_chip
 ┌──────────────────────────────────────────────────────────────────────┐
 │  siwa_soc                                                            │
 │  ┌───────────────┐  mem   ┌──────────┐   ┌──────┐                    │
 │  │  siwa_core    │<──────>│ siwa_mbc │<─>│ SRAM │ 8 kB               │
 │  │ (dec,alu,     │        │ (+ boot) │   └──────┘                    │
 │  │  regfile,     │        └──┬────▲──┘                               │
 │  │  timer, CSRs) │   req FIFO│    │rsp FIFO                          │
 │  │               │        ┌──▼────┴──┐   ┌──────┐                    │
 │  │               │        │siwa_pbus │<─>│ UART │ tx/rx FIFOs        │
 │  │               │        │          │<─>│ SPI  │ tx/rx FIFOs ─> flash
 │  │               │        └──────────┘   └──────┘                    │
 │  │      CSR port ├──> siwa_gpio (8 pins)                             │
 │  │               ├──> siwa_hvstim ──src 8, snk 8, trim 6, ls 4───┐   │
 │  │           irq │<── siwa_irq <── uart, spi, timer, pin, comp   │   │
 │  └───────────────┘                                               │   │
 │                      siwa_clkgate x5 (bus, uart, spi, gpio, hv)  │   │
 └──────────────────────────────────────────────────────────────────┼───┘
      siwa_current_source <── src code                            │
      siwa_current_sink   <── snk code, trim                      │
      siwa_level_shifter  <── ls[3:0], VH ──> hv_port[3:0]        │
```

`siwa_chip` is the top. It joins the microcontroller (`siwa_soc`) with the
three analog models. It also brings out the interrupt input from the
(unmodelled) bandpass amplifier and comparator as `comp_irq`.

## The multicycle core (`siwa_core`)

The core implements RV32I with Zicsr, `MRET`, `WFI` and `FENCE`/`FENCE.I`
(executed as no-ops). It has two extra instructions for clock gating. It
runs in machine mode only.

A four-state controller sequences every instruction:

| state  | cycles | work |
|--------|--------|------|
| FETCH  | 2 from SRAM | request the word at `pc`, wait for `mem_ready`, load `ir` |
| DECODE | 1 | read both register-file ports into `op_a`, `op_b` |
| EXEC   | 1 | ALU, branch decision, CSR read/modify/write, traps; ALU results are written back |
| MEM    | 2 (SRAM) / more (I/O) | loads and stores only |

The cost in clocks:
* ALU, branch, jump and CSR instructions take 4 clocks.
* SRAM loads and stores take 6.
* A load or store to a peripheral takes longer, depending on the packet round trip.

For ordinary code the average is close to 4 clocks per instruction. The
chip-level test program, which polls the UART and touches every peripheral,
averages 4.29, not counting `WFI` sleep.

The write-back register is loaded in EXEC (or MEM for loads) and written into
the register file in the next cycle. The next DECODE is at least two cycles
later, so no bypass is needed.

**Register file (`siwa_regfile`).** There are 31 words of transparent
latches, and x0 reads as zero. The addressed word's latch is open while
`clk` is high. The write enable, address and data all come from flip-flops
that change on the rising edge, so the value settles in the first half of
the cycle and is held through the low phase. Reads are combinational. A
latch file is about half the area of a flip-flop file. The testbench checks
that activity on the write port during the low phase never reaches the
latches.

**Decoder and ALU.** `siwa_decoder` turns an instruction into a `dec_t`
control word. The word holds:
* the instruction class;
* the ALU operation;
* the operand selects;
* the immediate;
* the register fields;
* the CSR, `MRET`, `WFI` and clock-gate flags.

Unknown encodings give an illegal-instruction trap. `siwa_alu` is a plain
combinational RV32I ALU.

**Traps and interrupts.** There is one interrupt line from `siwa_irq`,
enabled by `mstatus.MIE` and `mie.MEIE` (bit 11). An interrupt is taken at
an instruction boundary. On entry the core does the following:
* `mepc` gets the next `pc`;
* `mcause` gets `0x8000_000B`;
* `MIE` is copied to `MPIE` and cleared;
* `pc` gets `mtvec`.

`ECALL` (cause 11), `EBREAK` (3) and illegal instructions (2) trap the same
way, with `mepc` pointing at the instruction itself. `MRET` returns.

`WFI` stalls in EXEC until the interrupt line is high, even while `MIE` is
off. Execution then continues or enters the handler. A write to `mstatus`
or `mie` ends its instruction without checking for interrupts, so the new
enables are in place before the next check.

### Custom instructions

The two clock-gate instructions use the custom-0 major opcode (`0001011`)
with the I-type layout. `rd` and `rs1` are zero.

| instruction   | funct3 | effect |
|---------------|--------|--------|
| `CG.OFF mask` | `000`  | `cg_en &= ~imm[5:0]` |
| `CG.ON mask`  | `001`  | `cg_en \|= imm[5:0]` |

Bits of `cg_en`:

| bit | block |
|-----|-------|
| 0 | packet bus and its FIFOs |
| 1 | UART |
| 2 | SPI |
| 3 | GPIO |
| 4 | HV stimulation interface |
| 5 | timer |

`cg_en` resets to all ones and can be read at CSR `0x7CC`.

The timer is not clock-gated. Its `cg_en` bit is a count enable instead,
because the timer lives inside the core.

Firmware must not gate the bus while a peripheral access is in flight. It
must also not gate a peripheral it is waiting on.

## CSR map

Standard CSRs: `mstatus` (MIE, MPIE), `mie` (MEIE), `mtvec`, `mepc`,
`mcause`, `mip` (MEIP, read only), `mcycle[h]` and `minstret[h]`.

Custom CSRs, all 32 bits wide:

| CSR | name | contents |
|-----|------|----------|
| 0x7C0 | GPIO_OUT  | [7:0] output values |
| 0x7C1 | GPIO_OE   | [7:0] output enables (reset 0 = all inputs) |
| 0x7C2 | GPIO_IN   | [7:0] pin values through a 2-flop synchroniser (read only) |
| 0x7C4 | HV_SRC    | [7:0] current-source stage switches |
| 0x7C5 | HV_SNK    | [7:0] current-sink stage switches |
| 0x7C6 | HV_TRIM   | [5:0] sink reference trim (reset 32 = nominal) |
| 0x7C7 | HV_LS     | [3:0] level-shifter port |
| 0x7C8 | HV_CTRL   | [0] source on, [1] sink on (a code reaches its stimulator only while it is on) |
| 0x7CC | CG_EN     | clock enables (read only; change them with `CG.ON`/`CG.OFF`) |
| 0x7D0 | TMR_CTRL  | [0] timer run |
| 0x7D1 | TMR_CMP   | compare value (reset all ones) |
| 0x7D2 | TMR_CNT   | counter (writable) |
| 0x7E0 | IRQ_PEND  | pending sources, write 1 to clear |
| 0x7E1 | IRQ_EN    | source enables |

Interrupt sources, by bit:

| bit | source |
|-----|--------|
| 0 | UART receive |
| 1 | SPI receive |
| 2 | timer |
| 3 | external pin |
| 4 | comparator |

GPIO and HV registers are read back through the same CSRs. Their storage
is latches, written the same way as the register file:
* flip-flops sample the CSR write (enable, number, data) at the rising edge;
* the addressed latch is open while `clk` is high right after that edge.

The new value therefore appears when a flip-flop's would. Glitches on the
core's combinational CSR bus never reach a latch enable. A write to a
gated block is lost, and a read from one returns the value it held when its
clock stopped.

## Memory, packet bus and queues

The core sees one 32-bit address space:

| address | target |
|---------|--------|
| `0x0000_0000`-`0x0000_1FFF` | SRAM (`siwa_sram`, 2048 x 32, byte enables, one-cycle read) |
| `0x8000_0000` + `dev<<8` + `reg<<2` | packet-bus device register: UART `dev = 0`, SPI `dev = 1` |

The memory and bus controller, `siwa_mbc`, serves SRAM accesses directly.
For an I/O address it pushes a request packet into a FIFO. The packet is
`{dev[1:0], wr, reg[3:0], data[31:0]}`.

`siwa_pbus` takes one packet per cycle from the FIFO head and performs a
single-cycle register access at the device. It then pushes a response
`{dev, err, data}` into the response FIFO. `err` marks an absent device. The MBC waits for the response and completes the core's
access. Every request gets exactly one response, including writes.

When the bus clock is gated, packets simply wait in the request FIFO.

**UART (`siwa_uart`).** 8N1 with 4-deep transmit and receive FIFOs. The
receiver synchronises `rx`, waits for a start bit and samples each bit in
its middle.

| reg | name | contents |
|-----|------|----------|
| 0 | DATA | write to queue a byte |
| 1 | RXDATA | read pops; bit 31 = valid, 0 when empty |
| 2 | STATUS | `{rx_overflow, busy, rx_avail, tx_empty, tx_full}`; reading clears overflow |
| 3 | CTRL | [15:0] clocks per bit, reset 174 (about 115200 Bd at 20 MHz) |

The receive interrupt is high while data is queued.

**SPI (`siwa_spi`).** Mode 0, MSB first, with 4-deep FIFOs. Each byte
written to DATA is exchanged for a received byte, which is queued for
RXDATA. CTRL has two fields:
* bit 0 drives chip select active;
* bits [15:8] set the divider, with `sclk` period = 2·(d+1) clocks.

## Boot from serial flash

After reset the MBC holds the core in reset and runs its boot sequence
through the same packet path the core later uses:

1. It sets the SPI divider and asserts chip select.
2. It sends `0x03` (READ) and a 24-bit address of zero.
3. For each of `BOOT_BYTES` bytes (default 8192):
   * it sends a dummy byte;
   * it polls RXDATA until valid;
   * it packs the byte into a word, little-endian;
   * it writes every fourth byte's word into SRAM.
4. It releases chip select and drops the core's reset. The core starts at
   address 0.

A full 8 kB boot takes 196,710 clocks, about 9.8 ms at 20 MHz. That is
about 24 clocks per byte: 16 for the SPI exchange at `sclk = clk/2`, plus
the packet round trips.

## Interrupt handler (`siwa_irq`)

Each source is captured on its rising edge into a pending bit. The external
pin and comparator inputs pass through 2-flop synchronisers first.

* `irq` to the core = OR of `pending & enable`.
* Software reads `IRQ_PEND`, writes the same value back to clear it, and
  serves the devices.
* UART and SPI receive data stays queued in the device FIFOs while
  interrupts are off, so a critical section can run without losing bytes.

## Stimulator models

All three are behavioural. They model function only, with no settling,
compliance or noise.

* **Current sink (`siwa_current_sink`).** Eight binary-weighted stages.
  Stage k pulls `Vref / R_k`, with `R_k = 2048 Ω / 2^k` (16 Ω for the MSB).
  * `Vref = 200 mV · (1 + (trim − 32) · 0.25 %)`, so a 6-bit trim spans
    about −8 % to +7.75 %.
  * One LSB is 97.66 µA and full scale 24.9 mA, close to the nominal
    100 µA and 25.5 mA. Change `R0_OHM` to 2000 for exact 100 µA steps.
* **Current source (`siwa_current_source`).** The same weights with a fixed
  200 mV reference. `GAIN_ERR` models its mismatch against the sink, which
  the sink's trim then cancels.
* **Level shifter (`siwa_level_shifter`).** Four channels. Each output is
  `VH` when its input is 1 and 0 V otherwise, after `T_PD` time units.
  `VH` is accepted from 0 to 18 V.

`siwa_chip` reports `i_net = i_source − i_sink`, the charge-balance error
the trim is meant to null.

## Departures and choices not fixed by the original design

* **Clock gates and CSRs.** Clock gates are ordinary latch-plus-AND cells.
  The register file and the GPIO and HV-interface CSRs are latches. The
  core's own CSRs (machine CSRs, timer, clock enables) and the interrupt
  handler's bits are flip-flops.
* **Design choices made here.** The following are all this design's own:
  * the instruction count: 51 instructions, against the 53 of the original;
  * the custom opcode;
  * the CSR numbers;
  * the memory map;
  * the packet format;
  * FIFO depths;
  * the UART and SPI register layouts;
  * the boot protocol;
  * the trim law.
* **Parts not modelled.** The bandpass amplifier and comparator, the
  references, and the current-measurement integrator and A/D are not
  modelled. Neither are the HV switches of the source's feedback loop or
  the pads. Only the comparator's interrupt appears, as an input.
* **Timing and power.** Clock frequency (up to 20 MHz) and energy per cycle
  depend on the cell library and cannot be seen in RTL.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_siwa_chip` is the full system at default parameters:
1. it boots a test program from the SPI flash model (`tb/spi_flash_model.sv`);
2. the program (`tb/siwa_prog_pkg.sv`, assembled by `tb/rv_asm_pkg.sv`)
   exercises every mechanism above;
3. the testbench checks the UART output, GPIO pins, stimulator currents,
   level-shifter voltages, and that each mechanism happened.

The mechanisms it counts are the boot, SRAM and packet traffic, UART
transmit-FIFO full, HV clock gating, `WFI`, a trap, and all five interrupt
sources. It also measures the average CPI and checks that it lies
between 4 and 6. `tb_siwa_soc` runs the same test on `siwa_soc` with a
1 kB boot.

```sh
# the whole chip
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/siwa_pkg.sv tb/rv_asm_pkg.sv tb/siwa_prog_pkg.sv tb/tb_siwa_chip.sv \
  --top-module tb_siwa_chip -o sim && obj_dir/sim

# one block, e.g. the UART
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/siwa_pkg.sv tb/tb_siwa_uart.sv --top-module tb_siwa_uart -o sim && obj_dir/sim
```

The core's testbench also needs `tb/rv_asm_pkg.sv`.

Run with `+verilator+rand+reset+2` to start every undriven state at a
random value. All testbenches pass that way.

## Files

| file | contents |
|------|----------|
| `rtl/siwa_pkg.sv` | shared types (`dec_t`, packets), CSR numbers, memory map, bit assignments |
| `rtl/siwa_chip.sv` | top: SoC plus stimulator models |
| `rtl/siwa_soc.sv` | microcontroller |
| `rtl/siwa_core.sv`, `siwa_decoder.sv`, `siwa_alu.sv`, `siwa_regfile.sv`, `siwa_timer.sv` | core |
| `rtl/siwa_mbc.sv`, `siwa_sram.sv`, `siwa_fifo.sv`, `siwa_pbus.sv` | memory, boot, packet bus |
| `rtl/siwa_uart.sv`, `siwa_spi.sv`, `siwa_gpio.sv`, `siwa_hvstim.sv`, `siwa_irq.sv`, `siwa_clkgate.sv` | peripherals and infrastructure |
| `rtl/siwa_current_source.sv`, `siwa_current_sink.sv`, `siwa_level_shifter.sv` | behavioural analog models |
