# Self-powered ambient light sensor with a Zero Power Communication bus

This is a light sensor chip that runs on the light it measures. The top tier of
the chip is an array of photovoltaic (PV) cells isolated from each other by deep
trenches. Three cells in series give the chip's 1.2–1.9 V supply, with no charge
pump and no battery. A small photodiode in the same array measures the light.
An 8-bit SAR ADC digitises it 18–36 times a second, and a serial port reads the
result out.

The whole power budget is about 100 nW. That rules out I2C, whose pull-up
resistors leak constantly, and SPI, where the sensor would have to charge its
output wire. So the chip uses a bus built so that **the sensor never spends
energy on the wire**. This is the Zero Power Communication (ZPC) bus. The main
device (a microcontroller) drives the clock and holds the data line high. The
sensor only ever pulls the line low, and only to send a 0. Message fields have
no fixed length. Each message starts with runs of "control bits", and the length
of each run sets the length of one field. Short messages therefore stay short:
one control bit is enough to read the 8-bit light value.

The digital part (the ZPC engine, its registers, the ADC sequencer and the
clock-domain crossing) is synthesizable SystemVerilog. The analogue parts are
behavioural models with `real` signals, so that the whole chip can be simulated
from light in to bits out. These parts are the PV supply, the photodiode, the
references, the oscillator, the DAC and the comparator.

```
 irradiance ──► pv_array_model ──vdd──► reference_model ──vref──► sar_dac_model
     │                 │                                              │ vdac
     │                 └──vdd──► osc_model ──clk_osc──┐               ▼
     └──────► photodetector_model ──vpd──────────► latch_comparator_model
                                                      │               │ cmp
                                                      ▼               ▼
                                                   sar_logic ◄────────┘
                                                      │ code, valid   (on-chip clock)
                                              ────────┼─────────────────────────────
                                                  result_sync         (bus clock)
                                                      │ code
                                 zpc_regfile ◄────► zpc_block ◄──► zpc_clk, data line
```

## The ZPC bus

### Wires and bit timing

The **clock** (`zpc_clk`) is push-pull and always driven by the main device. It
runs only while the main device is talking. The sensor's bus logic has no other
clock, so the bus can run much faster than the sensor's own oscillator.

The **data line** is open drain with an *active* pull-up. An inverter on the
main device holds the line high; its strength can be changed on the fly to trade
speed for power. Either side may pull the line low. The line is the wired AND of
both sides. The chip sees the line level on `sda_i` and pulls the line down with
`sda_pd_o = 1`.

One bit takes one clock period:

```
zpc_clk  ____/‾‾‾‾\____/‾‾‾‾\____
              ^         ^          line sampled by both sides on the rising edge
          ^         ^              sensor changes sda_pd_o on the falling edge
```

The sensor updates its pull-down on the falling edge, so the level is settled
at the rising edge where the main device samples it.

### Control bits

A bit is a **control bit** if the line is low at the rising edge while the
sensor is not sending. The main device makes one by pulling the line low. During
a control bit the sensor cannot send anything back. Control bits come in runs,
and the number of control bits in a run, 1 to 4, is looked up in a
**field-length table**. There is one table per field: payload, device address
and register address.

### Message formats

`C` is a control bit. `1` is a bit left high by both sides. `<field:n>` is n data
bits, most significant bit first.

```
non-addressing:  C^p 1  1  <payload:len_p[p]>                        sensor sends
addressing:      C^p 1  C^d 1  C^r 1  <device:len_d[d]> <register:len_r[r]> <payload:len_p[p]>
                 C^p 1  C^d 1  1      <device:len_d[d]> <payload:len_p[p]>   (empty register run)
```

* The `1` after each run ends the run.
* The bit after the payload run picks the mode. If it is high, the message is
  in **non-addressing mode** and the payload, which is the light code, follows
  at once. If it is a control bit, that bit starts the device-address run and
  the message is in **addressing mode**.
* In addressing mode the main device sends the device-address field, then the
  register-address field. The **last bit of the device-address field is the
  read (1) / write (0) flag**, as in I2C. The bits before it are compared with
  the low bits of `DEV_ADDR`, so a short device field selects a device by its
  low address bits. A one-bit device field carries only the flag and addresses
  every device. On a read the sensor sends the payload; on a write the main
  device does.
* A read sends bits `[len-1:0]` of the zero-extended 8-bit register. A write
  keeps the last 8 bits received; shorter payloads write zeros above.
* A message for another device is followed to its end, with the sensor silent.

With the reset tables, reading the light code takes
`C 1 1 d7 d6 d5 d4 d3 d2 d1 d0`: 11 clocks, of which one is a control bit.

Reset contents of the tables (runs of 1 / 2 / 3 / 4 control bits):

| table            | run 1 | run 2 | run 3 | run 4 |
|------------------|-------|-------|-------|-------|
| payload          | 8     | 4     | 1     | 16    |
| device address   | 4     | 8     | 2     | 1     |
| register address | 2     | 4     | 8     | 1     |

The tables are registers. A system can rewrite them over the bus so that its
most frequent messages use the shortest runs and the fewest wasted bits.

### Errors and resynchronisation

Both sides know every field length before the field starts, so some errors can
be seen at once:

* **Over-long run.** A run of 5 or more control bits has no table entry. The
  sensor counts an error and goes back to waiting for a message. A main device
  can therefore always resynchronise a sensor by sending 5 or more control bits
  and then a high bit.
* **Collision.** The sensor left the line high to send a 1 but found it low.
  The sensor counts an error, stops driving the line and drops the message.

The error counter is register 0x01.

### Registers (`zpc_regfile`)

| address   | access | contents |
|-----------|--------|----------|
| 0x00      | RO     | latest light code |
| 0x01      | RO     | protocol error count, saturates at 255 |
| 0x04–0x07 | RW     | payload length for runs 1–4 (5 bits used) |
| 0x08–0x0B | RW     | device-address length for runs 1–4 |
| 0x0C–0x0F | RW     | register-address length for runs 1–4 |
| other     | –      | read 0, writes ignored |

## Light measurement

* **Supply (`pv_array_model`).** Three cells in series. Each gives 0.413 V at
  the lowest light (0.33 W/m²) and 0.627 V at the brightest (250 W/m²),
  log-linear in between. The supply is therefore 1.239–1.881 V.
* **Photodiode (`photodetector_model`).** The photodiode is forward biased, so
  its voltage is logarithmic in light: `vpd = 0.25 V + 0.035 V · ln(E/0.33)`.
  This gives a wide dynamic range. It is wired straight to the comparator, with
  no buffer and no sample-and-hold.
* **References (`reference_model`).** The supply is too low for a bandgap, so
  the references are taken from the supply: `vref = 0.4 · vdd`. They move with
  the light. The ADC code is therefore not simply proportional to `vpd`, but it
  rises monotonically over the light range. In the models it goes from code 129
  at 0.33 W/m² to code 164 at 250 W/m².
* **Oscillator (`osc_model`).** A deliberately slow on-chip clock. It slows down
  with the supply: 360 Hz at full light, 180 Hz at the lowest light.
* **SAR ADC (`sar_logic`, `sar_dac_model`, `latch_comparator_model`).** Each
  conversion repeats every `CONV_CYCLES` = 10 clocks. One clock sets the trial
  code `1000_0000`. Each of the next 8 clocks keeps or clears one bit and tries
  the next lower one. `valid_o` then pulses with the code. The comparator is a
  dynamic latch that draws power only when strobed, so `cmp_en_o` is high only
  for the 8 decision cycles. The latch resolves on the falling edge. The sample
  rate is `f_clk/10`: 36 samples/s at full light and 18 samples/s at the lowest
  light.

## Crossing from the ADC clock to the bus clock (`result_sync`)

The bus clock is unrelated to the on-chip oscillator and stops between messages.
On the ADC side, each new code goes into a hold register, and a 4-bit
Gray-coded sequence number advances by one.

On the bus side, every rising edge samples both the hold register and the
sequence number. The sample of the hold register taken at edge *e* is kept only
if the sequence number read at edges *e−1* and *e+1* is the same, meaning that
no code changed around edge *e*. This has two consequences:

* A half-written code is never copied. The exception is when a whole multiple
  of 16 codes passed between two bus edges and the last one landed exactly on
  the edge.
* After the bus has been idle over any number of conversions, the newest code
  is picked up. A single toggle bit would miss an even number of updates.

A new code reaches the register file at the **fourth** bus edge after it was
written. While a message is in progress the copy is frozen, so a payload never
mixes two codes. **A main device that wants the freshest code should clock about
four idle bits (line high) before a read**; otherwise it gets the code from
before the idle period.

## Interfaces and timing of the top (`als_top`)

| port         | dir | type      | meaning |
|--------------|-----|-----------|---------|
| `irradiance` | in  | real      | light on the chip, W/m² (harvesting cells and photodiode) |
| `rst_n`      | in  | logic     | power-on reset, active low; also enables the oscillator |
| `zpc_clk`    | in  | logic     | bus clock |
| `sda_i`      | in  | logic     | data-line level |
| `sda_pd_o`   | out | logic     | 1 = pull data line low |
| `dbg_vdd`    | out | real      | supply voltage |
| `dbg_clk`    | out | logic     | on-chip clock |
| `dbg_code`   | out | logic [7:0] | latest ADC code, in the on-chip clock domain |

Parameters: `DEV_ADDR` (default 5) and `CONV_CYCLES` (default 10).

All flip-flops reset asynchronously. The bus logic and the register file use
`zpc_clk`. The ADC uses the oscillator clock. `result_sync` is the only place
where the two clock domains meet.

## What follows the source and what is this design's own

Taken from the design description:

* three series PV cells and their per-cell voltages at the ends of the light range;
* the forward-biased, logarithmic photodiode wired straight to the ADC;
* references derived from the supply;
* a slow on-chip clock;
* an 8-bit SAR ADC with a dynamic latch comparator, at 36 samples/s maximum and
  18 samples/s at minimum light;
* the push-pull clock and the open-drain data line pulled up by the main device;
* the sensor only pulling the line low;
* the control-bit rule (line low at the rising edge);
* three runs of control bits that set the payload, device-address and
  register-address lengths, in that order;
* addressing and non-addressing modes;
* a one-control-bit 8-bit light read;
* re-mappable field lengths;
* a bus clock of 50 kHz.

Chosen here, where the description is silent:

* the high bit that ends each run, and the mode bit;
* the field order device, then register, then payload;
* the read/write flag and the address comparison;
* MSB-first order and falling-edge driving;
* the table depth (runs of 1–4) and the length range (0–31 bits);
* the register map and the table reset values;
* the error rules;
* the clock-domain crossing;
* 10 clocks per conversion, and the oscillator frequencies this implies;
* all constants of the analogue models other than those listed above.

Departures and limits:

* The 20 S/s listed for this ADC in one comparison table disagrees with the 18
  S/s and 36 S/s given elsewhere. The RTL follows 18 and 36.
* The design needs level shifters between the analogue domain and the bus
  logic's lower-voltage domain. They are not modelled; the domains connect
  directly.
* The debug pads of the chip are replaced by three debug ports.
* The analogue models are ideal. They do not model the measured DNL and INL
  (up to 1.05 and 1.37 LSB), noise, power consumption or the load on the
  supply.
* Power figures (about 100 nW in total, 84 nW for the bus block at 50 kHz,
  8.4 pJ/bit) depend on the process and layout and cannot be checked from RTL.

## Simulating

Every testbench checks its own results and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/als_pkg.sv tb/als_top_tb.sv \
          --top-module als_top_tb -Mdir obj_top && obj_top/Vals_top_tb
```

Replace `als_top_tb` with any other `tb/*_tb.sv` to test one block. The modules
are found through `-Irtl -Itb`, by file name. `tb/zpc_main_model.sv` is a
behavioural main device. It has tasks for control runs, idle bits, and
non-addressing and addressing reads and writes, and its bus speed can be
changed between messages (`half_ns`).

`als_top_tb` runs the whole chip at its default parameters and takes a few
seconds of wall time, most of it compiling, for 0.85 s of simulated time. It checks:

* the codes at three light levels against the model equations;
* the 36 and 18 samples/s rates;
* the 11-clock one-control-bit read;
* addressing reads and writes, and a table re-map;
* a message for another device;
* an over-long run and a collision, seen in the error register;
* a slow (170 Hz) message, during which a new code must not change the payload.

It counts each of these events and fails if one never happened.

The block testbenches are `zpc_block_tb`, `zpc_regfile_tb`, `result_sync_tb`,
`sar_logic_tb`, and one testbench per analogue model. `zpc_block_tb` compares
the bus engine against a register array and tables kept in the testbench,
including random register reads.

Two longer runs cover the figures the design was evaluated by:

* `zpc_ber_tb` sends random traffic through the bus block and its register
  file. The traffic mixes both modes, random run lengths, table rewrites,
  messages for another device, and bus speeds between 5 kHz and 1 MHz. The
  test checks 1.1 million payload bits with no error, which shows a bit error
  rate below 1e-6 for the logic. The electrical line is ideal in simulation.
* `adc_linearity_tb` ramps the ADC input in 1/16 LSB steps and reports the DNL,
  the INL and any missing codes. The analogue models are ideal, so the result
  is about 0 LSB. The real circuit was characterised at up to 1.05 LSB DNL and
  1.37 LSB INL.

## Files

* `rtl/als_pkg.sv`: widths, table format, reset tables, register map and bus
  states.
* `rtl/zpc_block.sv`, `rtl/zpc_regfile.sv`, `rtl/result_sync.sv`,
  `rtl/sar_logic.sv`: synthesizable logic.
* `rtl/*_model.sv`: behavioural analogue models, not synthesizable.
* `rtl/als_top.sv`: the chip.
* `tb/`: testbenches and the behavioural main device.

The top contains `real` ports and behavioural models, so synthesis tools only
accept the four synthesizable modules, not the top.
