# On-board data acquisition, telecommand and telemetry for an electric propulsion system

An electric propulsion system on a spacecraft (thruster, propellant feed,
power processing) has to be watched and commanded from the ground. This RTL is
the FPGA side of that job, built around an 8086 processor core:

* a **data acquisition system (DAS)** that sequences an external 16-to-1 analog
  multiplexer and an AD571 10-bit converter, one channel every 200 us, and
  keeps the sixteen results;
* a **telecommand path** that receives an 8-bit command address serially on a
  1 kHz clock, latches it when the sender toggles a trigger bit, and decodes it
  into one-hot command lines;
* a **telemetry path** that uses the same address to pick one 8-bit health
  word and sends it back serially, MSB first, on the 1 kHz clock;
* the **memory of the 8086 core**: 1 MB, byte wide, with a boot ROM whose only
  job is a far jump to the program in RAM at 0000:0400h;
* a **clock divider** producing the 1 kHz bit clock from the 12 MHz system
  clock.

The 8086 core itself, the analog multiplexer and the converter are not part
of the RTL: the top level brings their signals out as ports.

## Block diagram

```
                       12 MHz clk
                           |
                       clk_div ---- bit_en (1 kHz tick) ------------+-----------+
                                                                    |           |
 tc_trigger -> pulse_gen --latch--> spc8 <-- tc_sdata               |           |
                                     | tc_addr (8 bit)              |           |
                        +------------+--------------+               |           |
                        v                           v               v           v
                  tc_decoder                   tm_mux ------> psc8 ------> tm_sout
                  tc_cmd[255:0]                  ^ 256 x 8    ^ load
                                                 |            |
                         das_regfile results ----+     tm_clk_sync (sync = new address)
                                ^  ^ strobe, sel
 das_start -> das_ctrl ---------+--+--> adc_soc, adc_sel, adc_strobe   (to mux + AD571)
 adc_data  -----------------------^

 cpu_* bus  <-> mem_sys (boot ROM + RAM, por flag)
```

Everything runs on one clock. The 1 kHz "clock" of the serial links is a
one-cycle enable (`bit_en`) issued by `clk_div` when its divided clock rises;
the divided clock itself is available on `clk_1k` for the outside world.

## The DAS sequencer (`das_ctrl`)

This is the part with the most behaviour in it. A rising edge on `das_start`
takes the controller out of its idle state and through sixteen identical
channel periods of exactly 200 us (2400 clocks at 12 MHz). Within one channel
period, counted from the moment the channel begins:

| time (us)   | state      | code | what happens                                   |
|-------------|------------|------|------------------------------------------------|
| 0 - 100     | soc_gen1   | 001  | settling; select lines already on this channel |
| 100 - 102   | soc_gen0   | 010  | `adc_soc` high: the converter starts           |
| 102 - 142   | delay      | 011  | conversion time of the AD571 (40 us allowed)   |
| 142 - 144   | strobe1    | 100  | `adc_strobe` high                              |
| 144         | strobe0    | 101  | strobe low again (one clock)                   |
| 144 - 200   | inc_sel    | 110  | select lines step to the next channel, hold-off|

The idle state `data_acq` has code 000; code 111 is unused and returns to
idle. After the sixteenth channel period (3200 us after the start edge) the
controller returns to `data_acq`, resets the select lines to 0 and pulses
`das_done` for one clock. A start edge during an acquisition is ignored.

The result register `das_regfile` writes `adc_data` into the entry addressed
by `adc_sel` when the strobe falls; at that moment the select lines still name
the channel just converted, since they only step one clock later. Every entry
has a valid bit, cleared when a new acquisition starts.

All delays are parameters in microseconds (`T_SETTLE_US`, `T_SOC_US`,
`T_CONV_US`, `T_STROBE_US`, `T_HOLD_US`) and are turned into clock counts
from `CLK_HZ`, so the sequencer can be moved to another clock frequency
without edits (the clock must be a whole number of MHz).

**Departure from the published timing.** The published description gives the
hold-off in the increment state as 58 us, but also puts the start of the next
channel at 200 us and the whole acquisition at 3200 us = 16 x 200 us. Since
144 + 58 = 202, both cannot hold; this RTL keeps the 200 us channel period and
makes the hold-off 56 us (`T_HOLD_US`). Set `T_HOLD_US = 58` for the other
reading (channel period 202 us).

## 8086 memory and boot (`mem_sys`)

The core has a 20-bit address and an 8-bit data bus, so the memory is 1 MB of
bytes. The top 16 bytes (FFFF0h-FFFFFh, where the 8086 starts after reset) are
ROM and hold the far jump `EA 00 04 00 00`, i.e. `JMP 0000:0400h`; the other
ROM bytes read `F4` (HLT). Everything below is RAM.

The output `por` is a boot flag. Reset clears it; while it is 0, every read
except one of the jump target 00400h is answered from the ROM (the low four
address bits pick the byte), so the core always finds the jump. The first
read of 00400h comes from RAM and sets `por`; from then on the address alone
decides between ROM and RAM. Writes into the ROM range are ignored; RAM can be
written at any time, so a loader can place the program before the core jumps.

Bus: `cpu_rd` / `cpu_wr` are active-high strobes for one clock with address
and write data; read data appears on `cpu_rdata` in the following clock. The
8086 bus cycle (ALE, RD/WR timing) must be adapted to this by the core's
wrapper.

## Telecommand path (`pulse_gen`, `spc8`, `tc_decoder`)

The ground sends an address bit per 1 kHz period on `tc_sdata`, MSB first;
`spc8` shifts it in on each rising edge of the 1 kHz clock. After the eighth
bit the sender toggles `tc_trigger`. `pulse_gen` synchronises the trigger
(two flip-flops), sees that it differs from its previous value, in either
direction, and emits a one-clock toggle pulse three clocks after the change.
That pulse latches the shift register into `tc_addr`. One clock later
`tc_decoder` sets command line `tc_cmd[tc_addr]` (one-hot, held until the next
command) and pulses `tc_cmd_stb`; `tc_cmd & {256{tc_cmd_stb}}` gives
single-clock command pulses.

## Telemetry path (`tm_mux`, `tm_clk_sync`, `psc8`)

`tm_mux` selects one of 256 bytes by `tc_addr`. `tm_clk_sync` counts 8-bit
frames on the 1 kHz enable and gives `tm_load` at the first bit of each frame;
`psc8` then takes the multiplexer output and shifts it out on `tm_sout`, MSB
first, one bit per millisecond. A newly latched address restarts the frame,
so the selected byte starts on the next 1 kHz edge. The byte map is:

| address        | byte                                                   |
|----------------|--------------------------------------------------------|
| 2*i (i = 0-15) | bits 7:0 of DAS channel i                              |
| 2*i + 1        | bit 7: channel i valid; bits 1:0: bits 9:8 of result   |
| 32 - 255       | `tm_ext[address - 32]`, external health inputs         |

## What comes from the published design and what is chosen here

Taken from it: the 12 MHz to 1 kHz division by a counter over half the
scaling factor; the 20-bit/8-bit 8086 memory split into ROM and RAM with a
jump to 0000:0400h; the seven DAS states, their order, their 3-bit encoding
and all delays except the hold-off discussed above; 16 channels and an
AD571 converter; the toggle-detecting mono-pulse generator; the 8-bit
serial-to-parallel converter with a latch pulse; the multiplexer, clock
synchronisation block and parallel-to-serial converter of the telemetry
path.

Chosen here, because the published description does not say: a single clock
domain with the 1 kHz clock as an enable; ROM size and position, the exact
meaning of `por`, HLT fill and the bus handshake of the memory; capture of the
ADC result on the falling strobe, valid bits and their clearing; the
synchroniser and one-clock width of the toggle pulse; MSB-first bit order on
both serial links; one-hot held command lines; 256 telemetry words and the
byte map above; the way the frame counter restarts on a new address; the
connection of the telecommand address to the telemetry multiplexer select.
How the 8086 program reaches the DAS (start, reading results) is not
described, so `das_start` and the results are plain top-level ports.

## Files

| file                         | contents                                        |
|------------------------------|-------------------------------------------------|
| `rtl/eps_pkg.sv`             | DAS state type, 8086 address helper             |
| `rtl/eps_das_top.sv`         | top level                                       |
| `rtl/clk_div.sv`             | 12 MHz to 1 kHz divider                         |
| `rtl/mem_sys.sv`             | boot ROM and RAM                                |
| `rtl/das_ctrl.sv`            | DAS sequencer                                   |
| `rtl/das_regfile.sv`         | DAS result register                             |
| `rtl/pulse_gen.sv`           | toggle-to-pulse generator                       |
| `rtl/spc8.sv`                | serial-to-parallel converter                    |
| `rtl/tc_decoder.sv`          | telecommand decoder                             |
| `rtl/tm_mux.sv`              | telemetry multiplexer                           |
| `rtl/tm_clk_sync.sv`         | telemetry frame / load generator                |
| `rtl/psc8.sv`                | parallel-to-serial converter                    |
| `tb/tb_<module>.sv`          | self-checking testbench of each module          |
| `tb/ad571_model.sv`          | behavioural analog mux + AD571 model            |
| `tb/tb_eps_das_top.sv`       | end-to-end test of the top at full size         |

Top-level parameters and their defaults: `CLK_HZ` 12 000 000, `BIT_HZ` 1000,
`ADDR_W` 20, `N_CH` 16, `ADC_W` 10 (the telemetry byte map assumes 10),
`TC_W` 8.

## Verification

Every module has a self-checking testbench that compares it with values
worked out independently (cycle-exact timelines for the divider and the
sequencer, a reference memory model, bit-by-bit serial decoding) and prints
`TB_RESULT checks=N failures=M`. Every testbench has also been run against a
deliberately broken copy of its module and fails there.

`tb_eps_das_top` runs the whole design with all defaults: a bus model of the
8086 reads the reset vector, decodes the far jump and fetches the first
program byte from 00400h; one 16-channel acquisition runs against the AD571
model and must finish in 3200 us with every code in place; five telecommand
addresses are sent (both trigger directions), and the telemetry byte each
selects, both DAS results and external words, is decoded from `tm_sout`. It
also counts that every mechanism (boot jump, SOC, strobe, select wrap, done,
toggles, latches, commands, loads) happened. It simulates 88 ms in a few
seconds.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/eps_pkg.sv tb/tb_eps_das_top.sv --top-module tb_eps_das_top
./obj_dir/Vtb_eps_das_top
```

and likewise `tb/tb_das_ctrl.sv`, `tb/tb_mem_sys.sv` and the others.

## Limits

* Not verified on an FPGA; timing closure at 12 MHz is expected to be
  trivial except for the 1 MB memory, which needs external or block RAM of
  that size.
* The 8086 core, the analog multiplexer and the AD571 are external; the
  testbench models of them are behavioural and cover only what the tests use.
* The telemetry stream has no frame synchronisation word or frame layout
  beyond one addressed byte per 8-bit frame; a ground decoder must know the
  bit phase from the 1 kHz clock.
* The assertions (SOC and strobe never together; one-hot commands) are
  checked in simulation only.
