# 10-bit low-power SAR ADC with bandgap reference and SPI output

This is a successive-approximation (SAR) analog-to-digital converter meant for
low-power biomedical sensing. It converts a differential input to 10 bits,
one bit per clock, and streams each result out of the chip MSB first on a
single SPI data line. The digital parts are synthesizable SystemVerilog:

- the SPI output module with its bit counter and parallel-in/serial-out stage,
- the SAR logic,
- the SR latch after the comparator.

The analog parts have behavioural models with real-valued nets, so the whole
converter can be simulated end to end with Verilator:

- the bandgap reference (900 mV from a 1.8 V supply),
- the two bootstrapped sampling switches,
- the differential split capacitor array (the DAC),
- the dynamic comparator.

The serial interface is the most completely specified part of the design.
The SAR sequencing and the analog models are this implementation's own. They
are built to match the interfaces and behaviour the serial interface expects.

## Block diagram

```
            SPI_cs_n ──┬───────────────────────────────┐
            SPI_sck ───┼──┬──────────────┬─────────┐   │
            rst_n ─────┼──┼──────────┐   │         │   │
                       │  │          │   │         │   │
 vinp ─[bootstrap]─vsp─┼──┼─┐      ┌─▼───▼───┐   ┌─▼───▼──────┐
 vinn ─[bootstrap]─vsn─┼──┼─┤      │sar_logic│   │ spi_module │
         ▲ SAR_sw_on   │  │ │      │         ├──►│ SAR_DOUT   ├──► SPI_SDO
         └─────────────┼──┼─┼──────┤SAR_sw_on│   │ sampling   │
                       │  │ ▼      │SAR_Samp ├──►│            │
                 ┌─────┴──┼─────┐  │         │   └────────────┘
                 │cap_array_dac │◄─┤con_p/n  │
  bandgap ─vref─►│ vcm          │  │         ├──► SAR_data_out[9:0]
  (Vref_out)     └──vpos──vneg──┘  │         │
                     │     │       │ SAR_vin │
                 ┌───▼─────▼──┐    └────▲────┘
       SPI_sck ─►│dyn_comparator├─Vcomp/Vcomn─►[latch_sr]─┘
                 └────────────┘
```

`start` of the SAR logic is the inverted chip select, so pulling `SPI_cs_n`
low starts conversions and the serial output together.

## How a conversion works

### Split capacitor array

Each side of the differential DAC (positive and negative) has two
binary-weighted arrays of five capacitors:

| array | bits | capacitors |
|-------|------|------------|
| MSB array (its top node is the comparator input) | b5..b9 | 1, 2, 4, 8, 16 Cu |
| LSB array | b0..b4 | 1, 2, 4, 8, 16 Cu, plus one dummy Cu |

A bridge capacitor joins the two top nodes. Its value is
`CB = (total LSB-array capacitance / total MSB-array capacitance) * Cu`,
which is 32/31 Cu. With that value, switching the bottom plate of bit i by a
step ΔV moves the comparator node by exactly `ΔV * 2^i / 1024`. So the
split array behaves like a 1024 Cu binary array while using only 64 Cu per
side. The model in `cap_array_dac.sv` does not hard-code these weights. It
solves the two-node charge equations, so a non-ideal `CB` shows the
nonlinearity of a mismatched bridge.

### Common-mode switching

Every capacitor has a three-position bottom-plate switch, encoded in two
bits (`sar_adc_pkg::sw_sel_t`):

| code | position |
|------|----------|
| `00` | Vcm |
| `01` | VDD |
| `10` | GND |

Vcm is the bandgap output, 0.9 V, which is half the 1.8 V supply. The
conversion goes like this:

1. While the input is sampled, every plate sits at Vcm. The first comparison
   needs no DAC step, because it tells directly whether vinp > vinn. That
   decides the MSB.
2. After bit i is decided, capacitor i moves on both sides. If the bit is 1,
   the positive array's capacitor goes to GND and the negative one to VDD.
   If the bit is 0, the moves are reversed. Each step halves the
   differential range still being searched.
3. Bit 0 is decided by the tenth comparison. Its capacitor never has to
   move.

The result is an ideal uniform quantizer over `vinp - vinn` in
[-1.8 V, +1.8 V]. Code c starts at `1.8 V * (2c - 1024) / 1024`, so
1 LSB = 3.52 mV of differential input. Inputs beyond the range clip to
code 0 or 1023.

### Clocking a conversion

`SPI_sck` is the only clock in the design. The SAR logic switches the DAC on
rising edges. The comparator resets while the clock is high and decides at
the falling edge. The SR latch holds that decision through the next reset
phase, and the SAR logic reads it at the following rising edge. The DAC
therefore has half a clock to settle before each decision.

The table below counts rising edges after `SPI_cs_n` falls.

| edge | SAR logic | SPI module |
|------|-----------|------------|
| 1 | `SAR_Samp` rises | counter still 0 |
| 2 | phase 0: switches track, all plates at Vcm; MSB decided at the falling edge | counter = 1 |
| 3 | switches hold; bit 9 latched, its capacitors switch | MSB of the current word on `SPI_SDO` |
| 4..11 | bits 8..1 latched | bits 8..1 |
| 12 | bit 0 latched; word to `SAR_data_out`; phase 0 of the next conversion | bit 0; counter back to 1 |

One conversion and one SPI frame both take 10 clocks. `SAR_data_out`
changes exactly on the edge where the bit counter returns to 1, so every
frame carries one whole word. It is the word of the previous conversion. The
first frame after reset carries 0.

The MSB decision is taken while the switches are still tracking, half a
clock before the hold edge. The input therefore has to be steady over that
half clock. That is easily true for biomedical signal bandwidths.

## Serial output (`spi_module`)

The SPI module has three parts:

- **Clock gate.** `int_sck = SPI_cs_n ? 0 : SPI_sck`. With the chip select
  high, the counter and the output stage get no clock and keep their state.
  The gate is a multiplexer, so `SPI_cs_n` should change only while
  `SPI_sck` is low.
- **`spi_counter`.** Holds 0 while `sampling` (the SAR's `SAR_Samp`) is low.
  After that it counts 1, 2, ..., 10, 1, 2, ... with no gap between frames,
  and it clears when `sampling` falls.
- **`piso_master`.** For counter value k in 1..10, it registers bit
  `SAR_DOUT[10-k]` onto `SPI_SDO`, so the word goes out MSB first. It drives
  0 when the counter is idle. Because the output is registered, it lags the
  counter by one clock. As a result the first MSB appears on the third rising
  edge after the chip select falls.

The port only transmits. It has no data input, and the word length is fixed
at 10 bits. While `SPI_cs_n` stays low, the host simply clocks `SPI_sck` continuously
and reads one 10-bit word every 10 clocks. If the chip select goes high in
the middle of a stream:

- conversions stop,
- `SAR_data_out` keeps the last word,
- the first frame after the chip select falls again re-sends that word.

## Behavioural models

These files are simulation models, not synthesizable logic. They use `real`
nets, so Yosys synthesis cannot read them, but Verilator and slang both
accept them.

| model | what it does | what it leaves out |
|-------|--------------|--------------------|
| `bandgap_ref` | 0.9 V while the supply is ≥ 1.62 V; below that, falls in proportion to the supply | temperature and process variation |
| `bootstrap_switch` | ideal track-and-hold (an intentional latch) | on-resistance, charge injection |
| `cap_array_dac` | exact charge redistribution of the split array | parasitics, capacitor mismatch |
| `dyn_comparator` | clocked comparison with an optional `OFFSET` parameter | noise, metastability |

In silicon, the array's top plates and the switch outputs are the same
nodes. In the model, the switches deliver the held input (`vsp`, `vsn`) to
the array, and the array outputs the top-plate voltages (`vpos`, `vneg`) to
the comparator.

## Files

| file | content |
|------|---------|
| `rtl/sar_adc_pkg.sv` | resolution, counter width, switch-position enum |
| `rtl/sar_adc_top.sv` | the whole converter |
| `rtl/spi_module.sv`, `rtl/spi_counter.sv`, `rtl/piso_master.sv` | serial output |
| `rtl/sar_logic.sv` | successive-approximation register |
| `rtl/latch_sr.sv` | comparator output latch |
| `rtl/dyn_comparator.sv`, `rtl/bootstrap_switch.sv`, `rtl/cap_array_dac.sv`, `rtl/bandgap_ref.sv` | behavioural models |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
run the whole converter:

```
verilator --binary --timing --assert --top-module tb_sar_adc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/sar_adc_pkg.sv tb/tb_sar_adc_top.sv
./obj_dir/Vtb_sar_adc_top
```

Replace `tb_sar_adc_top` with any other testbench name to run that one
instead. Verilator runs only with two-state values. For that reason the
testbenches give every register a reset.

### What the testbenches check

**`tb_sar_adc_top`** runs the full-size converter. It does 150 conversions
of random differential inputs, placed at least 0.1 LSB away from a code
boundary, and includes both extremes and an over-range input. It checks:

- every `SAR_data_out` word against the ideal quantizer;
- every `SPI_SDO` bit against the word its frame carries;
- the MSB on the third edge after the chip select falls;
- a chip-select pause (the word is kept and sent again after the restart);
- a reset in the middle of a stream;
- the bandgap output.

It counts each of these events and fails if any of them never happened.

**`tb_spi_module`** sends the ten test words below in back-to-back frames:

```
10_0000_0000  01_0000_0000  11_0111_1111  00_0100_0000  11_1101_1111
11_1110_1111  00_0000_1000  00_0000_0100  11_1111_1101  00_0000_0001
```

It also checks the latency, the clock gate with the chip select high in the
middle of a frame, and the asynchronous reset.

**`tb_sar_logic`** stands in for the analog blocks with an ideal integer
comparator. It checks 300 conversions, the 10-clock word period, and that
the switches track only in phase 0 with all plates at Vcm.

`spi_counter` and `sar_logic` also carry assertions, which Verilator checks
when run with `--assert`. They check that the count stays in 0..10, that the
SAR phase stays in 0..9, and that no plate is off Vcm while the switches
track.

The remaining testbenches check each block against values computed
independently. For example, the capacitor array is checked against the
binary weights `2^i/1024`, not against its own charge equations.

## Where this implementation makes its own choices

- **SAR logic.** The SAR logic is not given at gate or register level in the
  original design. This implementation chose:
  - the common-mode switching order,
  - the two-bit switch encoding,
  - the 10-clock schedule,
  - the extra `SAR_sw_on` output that drives the sampling switches,
  - starting conversions from the inverted chip select.

  A conventional search, which sets each trial bit to 1 and keeps or clears
  it, would give the same codes, but it needs an extra clock per conversion.
  That would break the one-word-per-frame alignment with the 10-bit SPI
  counter.
- **Clock edges.** All logic runs on rising edges. The comparator decides on
  the falling edge.
- **Reset.** `rst_n` is asynchronous and active low in every block.
- **Bandgap level.** The reference is set to the 900 mV target. A
  transistor-level implementation of this reference simulated at about 909.6 mV,
  varying by 230 µV over -40 °C to 85 °C, in the typical corner. The model
  has no temperature or corner input.
- **Clock frequency.** The original design was synthesized with a 4 ns clock
  constraint. The RTL has no timing of its own, and the testbenches use a
  10 ns clock.
