# State-of-Charge estimation of a lithium-ion cell with the Mix algorithm

This is synthesizable SystemVerilog for a small system on an FPGA that tracks the
state of charge (SoC) of one lithium-ion cell. It uses its measured voltage and current, sampled at 10 Hz.

Plain Coulomb counting integrates the cell current. That works, but any offset in the current
sensor or any error in the starting SoC stays in the result forever. The *Mix* algorithm puts
the integrator inside a feedback loop with a model of the cell. The model predicts the terminal
voltage from the present SoC estimate. The gap between the prediction and the measured voltage,
times a gain *L*, is subtracted from the measured current before integration. A wrong starting
SoC is then pulled back to the true value. With the right gain, a constant current-sensor
offset also stops causing SoC drift.

The system around the estimator has these parts:
- an ADC interface that reads the voltage and current channels of a serial 12-bit converter;
- a ROM that holds the open-circuit-voltage (OCV) curve;
- a parameter block that supplies the cell-model resistances and capacitance;
- a UART for a host PC;
- a memory-mapped interconnect that joins all of these to a processor port and an external-memory port.

All arithmetic in the estimator is IEEE-754 single precision.

## The estimator (`rtl/soc_estimation.sv`)

### Cell model

The cell is modelled as three parts:
- a capacitor *Cn* holds the charge. *Cn* is the capacity in coulombs divided by 1 V, so the
  capacitor voltage *is* the SoC, as a fraction from 0 to 1.
- a series resistor *R0*.
- one relaxation branch *R1 ∥ C1*, with time constant τ1 = R1·C1.

The model's terminal voltage is

    v_M = OCV(SoC) − R0·i_L − v_RC1

Discharge current counts as positive.

### One step, per sample, with Ts = 0.1 s

    v_T   = V_SCALE·vcode + V_OFFSET                 measured voltage
    i_L   = I_SCALE·icode + I_OFFSET                 measured current
    v_M   = LUT[floor(100·SoC)] − R0·i_L − v_RC1     model output (index clamped to 0..99)
    L     = 1/(R0+R1)   or   L_REG                   CTRL[1] selects
    SoC   ← SoC − (Ts/Cn)·(i_L − L·(v_T − v_M))      corrected Coulomb count
    v_RC1 ← v_RC1 + (Ts/C1)·(i_L − v_RC1/R1)         relaxation branch, forward Euler

**Sign of the feedback.** If the estimate is too high, the model voltage is above the measured
one (v_T − v_M < 0). The corrected discharge current is then larger, and the estimate falls.
Linearise the OCV curve as OCV ≈ α1·SoC + α0. The initial-error response then has a single pole
at −L·α1/Cn: any L > 0 removes a wrong initial SoC.

**Errors that remain.** A voltage measurement error V_err leaves a steady SoC error of
V_err/α1. This is largest where the OCV curve is flattest, about 25–50 % SoC for this cell.
A constant current error I_err leaves (L·(R0+R1) − 1)/(L·α1) times I_err. This is zero for
**L_opt = 1/(R0+R1)**. The block computes that gain itself in every step, from the parameters it
has just read, so the gain follows any parameter update.

**Discretisation.** Both integrators use forward Euler. Ts/τ1 is about 7·10⁻⁴, so this is stable
and almost the same as the exact exponential update.

### Schedule

The block is both a bus master and a bus slave. When a sample strobe arrives, a state machine
runs these steps:
1. It reads the two ADC codes, then R0, R1 and C1, over the bus.
2. It converts the codes and forms the LUT index.
3. It reads the OCV word from the ROM.
4. It evaluates the equations above.

The datapath has one adder, one multiplier and one 26-iteration sequential divider, all shared.
Each state uses at most one of each. Three divisions are needed every step: 1/(R0+R1), 1/R1 and
Ts/C1. These dominate the step time.

A step takes **121 cycles** plus any bus wait states. At 50 MHz a sample period is 5,000,000
cycles, so the block is idle more than 99.99 % of the time.

A strobe that arrives while a step is running is dropped, and sets the sticky flag STATUS[1].
The processor can also start a step itself with CTRL[3], and can reload the states with CTRL[2]
(SoC ← SOC_INIT, v_RC1 ← 0).

### Registers

Word offsets from the block's base address 0x000. All values are floats unless marked.

| off | name | access | meaning |
|---|---|---|---|
| 0 | CTRL | rw | [0] run on ADC samples, [1] L = 1/(R0+R1), [2] init (self-clearing), [3] step (self-clearing); reset 0x3 |
| 1 | STATUS | r/w1c | [0] busy, [1] overrun |
| 2 | SOC | r | estimate, 0..1, reset 1.0 |
| 3 | SOC_INIT | rw | value loaded by init, reset 1.0 |
| 4–7 | VM, VT, IL, L_USED | r | last model output, voltage, current, gain |
| 8 | L_REG | rw | gain used when CTRL[1] = 0, reset 23.81 A/V |
| 9–12 | V_SCALE, V_OFFSET, I_SCALE, I_OFFSET | rw | ADC code to volt / ampere |
| 13 | K_SOC | rw | Ts/Cn, reset 0.1/5400 |
| 14 | TS | rw | Ts in seconds, reset 0.1 |
| 15 | COUNT | r | steps done (integer) |
| 16 | VRC | r | v_RC1 |
| 17 | LUT_IDX | r | last LUT index (integer) |

## The system (`rtl/sopc_top.sv`)

```
  processor port ──┐                        ┌── SoC estimation registers  0x0000_0000
                   │                        ├── parameter identification  0x0000_0100
                   ├──  mm_interconnect  ───┼── OCV-SoC ROM               0x0000_0200
SoC estimation ────┘   (2 masters, RR)      ├── ADC interface             0x0000_0400
  (master)                                  ├── UART                      0x0000_0500
                                            └── external memory port      0x0200_0000 (32 MiB)
ADC interface ── sample_valid ──> SoC estimation
```

**Bus.** The bus is a small memory-mapped protocol (`sopc_pkg`). A master holds
`mm_req_t {addr, read, write, wdata}` until `mm_rsp_t.waitreq` is low. The transfer completes in
that cycle, and for a read `rdata` is valid then.

**Interconnect.** `mm_interconnect` arbitrates round robin between the processor (master 0) and
the estimator (master 1). A granted master keeps the grant until its transfer ends. Addresses
outside the map complete at once, read 0 and pulse `bus_decode_err`.

**Assertions.** Concurrent assertions in the interconnect check two bus rules: at most one
master completes per cycle, and a granted master holds its request until the transfer ends. In
the estimator, they check that its reads stay stable while a slave is waiting and that it never
writes. Simulate with assertions enabled (`--assert` in Verilator) to catch a misbehaving
processor port.

**Ports to outside parts.** The processor and the external-memory controller are not part of
this RTL. Their bus ports are ports of the top, and you connect your own processor and memory
controller there.

**Interrupt and status.** `soc_irq` pulses after each step, and `soc_value` holds the latest
estimate.

### Parameter identification (`param_ident`)

The cell model is meant to have its R0, R1 and C1 kept up to date by an online identification
engine. That engine is not designed here. The block holds one constant per parameter: the mean of
the values measured across the SoC range for a 1.5 Ah NMC cell. The values are R0 = 26 mΩ,
R1 = 16 mΩ and C1 = 9062.5 F, which gives τ1 = 145 s. They are registers that the processor may
overwrite, so an identification engine, or software, can take over without touching the estimator.

### OCV-SoC ROM (`ocv_soc_lut`, `rtl/ocv_soc_lut.hex`)

The ROM holds 100 floats, one per 1 % of SoC. Entry *k* is the OCV at SoC = *k* + 0.5 %, so
floor(100·SoC) picks the entry whose 1 % bin contains the SoC. A read has one wait state.

The table is the mean of the charge and discharge OCV curves of the cell. It was built by linear
interpolation between these points, rounded to 1 mV:

| SoC % | 0 | 2 | 5 | 10 | 15 | 20 | 25 | 30 | 35 | 40 | 45 | 50 | 55 | 60 | 65 | 70 | 75 | 80 | 85 | 90 | 95 | 100 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| V | 3.00 | 3.25 | 3.45 | 3.53 | 3.58 | 3.63 | 3.68 | 3.73 | 3.75 | 3.76 | 3.77 | 3.78 | 3.80 | 3.82 | 3.85 | 3.88 | 3.92 | 3.97 | 4.01 | 4.06 | 4.12 | 4.20 |

These points were read off a plotted curve and are approximate. For a real cell, load measured
values: one 8-digit hex word per line.

### ADC interface (`adc_interface`)

A timer of CLK_HZ/SAMPLE_HZ cycles (5,000,000 by default) starts an acquisition while CTRL[0] is
set. Sampling is off after reset.

The converter is an 8-channel 12-bit device with 16-clock serial frames. The channel address goes
out on DIN bits 13..11. The code comes back in the last 12 bits of the *next* frame. One
acquisition is therefore three frames: address voltage, address current, address current again.
With SCLK = 50 MHz/32, an acquisition takes 1584 cycles. After it, `sample_valid` strobes the
estimator.

The channels are voltage on 0 and current on 1. Both can be changed in CHSEL.

Registers: CTRL (0), VCODE (1), ICODE (2), COUNT (3), CHSEL (4).

### UART (`uart_interface`)

The UART is 8N1. The bit time resets to CLK_HZ/115200 and is writable. A write to TXDATA while
the transmitter is idle sends a byte. RXDATA holds the last received byte. STATUS shows
[0] tx busy, [1] rx valid, [2] rx overrun.

Registers: TXDATA (0), RXDATA (1), STATUS (2), BAUD (3).

### Floating point (`fp_add`, `fp_mul`, `fp_div`, `fp_pkg`)

The adder and multiplier are combinational. The divider is sequential: its result comes 28 cycles
after `start`.

All three round to nearest even. Subnormal inputs are read as zero, and subnormal results are
flushed to zero. Overflow gives infinity, and no NaN is produced. None of the estimator's values
come anywhere near these limits.

## Where this departs from, or adds to, the original design

- **Not built:**
  - the soft-core processor and the SDRAM controller (vendor parts);
  - the online parameter identification (future work in the original design);
  - running one estimator in time-multiplexed fashion for several series cells. This was
    suggested as possible, not designed.
- **Read off plots, approximate:** the OCV table above, and R0, R1 and τ1.
- **Own choices:**
  - the bus protocol, the address map and all register maps;
  - the sample strobe from the ADC interface;
  - the three-frame ADC protocol;
  - the ADC scaling defaults: 5 V full scale for voltage, and ±2 A around mid-code for current.
    Set these for your sensor front end.
  - forward-Euler discretisation;
  - no interpolation between LUT entries;
  - the sequential datapath and its 121-cycle step;
  - the overrun behaviour;
  - the reset state: estimate at 100 %, as after a full charge.
- The estimator was originally generated from a block-diagram model. This RTL implements the
  equations directly, so cycle counts and rounding order belong to this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_fp_add`, `tb_fp_mul`, `tb_fp_div`: thousands of random and corner-case operands. The expected
  results are computed in double precision and rounded to single. `tb_fp_div` also checks the latency.
- `tb_ocv_soc_lut`: all 100 entries against the interpolated table, the wait state, ROM write
  protection and out-of-range reads.
- `tb_param_ident`, `tb_adc_interface`, `tb_uart_interface`: reset values and register behaviour.
  The ADC test uses a behavioural model of the converter (`tb/adc_spi_model.sv`) and checks the
  exact sample period and frame count. The UART test uses loopback and checks the bit framing and
  timing.
- `tb_mm_interconnect`: two masters with random traffic, slaves with random wait states, a
  scoreboard, and checks for contention and unmapped accesses.
- `tb_soc_estimation`: more than 200 steps, each compared with a reference model that rounds every
  operation to single precision. It covers both gain modes, parameter changes, init, software step,
  run-enable, overrun and both LUT-index clamps.
- `tb_sopc_top`: the whole system at a 20 kHz clock, so one sample period is 2000 cycles. It runs
  8000 steps, which is 800 s of cell time.
  - A behavioural cell with the same model is discharged in pulses; the estimate starts 8 % high.
    Every step is compared with the reference. The processor model polls while the estimator is
    busy, which forces bus contention. It also logs results to external memory and loops bytes
    through the UART.
  - The test checks that each mechanism occurs: contention, ROM wait states, an unmapped access,
    both gain modes, a parameter update, an overrun, the LUT clamp, UART traffic and a change of
    the current offset.
  - It also checks that the SoC error ends below 1.5 %. It reaches about 0.5 %.
- `tb_workload_offset`: the current-sensor offset experiment. Two copies of the system watch the
  same cell, and one of them reads the current 100 mA high. The cell runs a step-wise profile that
  changes every 30 s, for 1500 s, then rests for 300 s. The offset estimate stays within 0.05 % of
  the offset-free one, and both stay within 0.3 % of the true SoC. Plain Coulomb counting with
  the same offset drifts by 3.3 %.
- `tb_sopc_full`: the top at its default parameters (50 MHz, 10 Hz, 115200 baud), through two full
  sample periods. It checks the 5,000,000-cycle sample spacing, both steps, and a UART byte at the
  default bit time. It takes about 10 s in Verilator.

To run one testbench with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv rtl/sopc_pkg.sv tb/tb_fp_pkg.sv tb/tb_sopc_top.sv --top-module tb_sopc_top
./obj_dir/Vtb_sopc_top
```

The ROM reads `rtl/ocv_soc_lut.hex` by a path relative to the working directory. Run the
simulation from that same folder, or override the `INIT_FILE` parameter.

## Using and changing it

- **Another cell:** replace the hex table and the three parameter defaults, or write the
  registers at run time. Set K_SOC = Ts/(capacity in Ah × 3600). The gain follows R0 and R1 by
  itself.
- **Another sample rate:** set `SAMPLE_HZ` on the top and TS/K_SOC to match.
- **Another converter or sensor:** change `adc_interface` and the four scaling registers.
  The estimator only needs the two 12-bit codes at their register addresses, and the
  `sample_valid` strobe.
