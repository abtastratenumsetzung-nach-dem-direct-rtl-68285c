# DDC IP core: 80 MS/s ADC to 1.25 MS/s complex baseband in DDR2 memory

This is a digital down converter (DDC) for an FPGA. It takes the 16-bit output of an
80 MS/s ADC and selects one 200 kHz wide channel anywhere in the sampled band. It mixes
that channel to 0 Hz with a numerically controlled oscillator, then low-pass filters
and decimates it by 64. The result is a complex stream of 16-bit I and 16-bit Q samples
at 1.25 MS/s (5 MB/s).

The core writes that stream into a ring buffer in DDR2 memory, with no processor
involvement, through the native port interface (NPI) of a multi-port memory controller.
Every 32 KB it raises an interrupt, so that firmware can forward finished blocks to a
host PC, for example over USB, for offline analysis. A validation mode replaces the
samples with a 32-bit counter, so the whole transfer chain can be checked word by word.

The ADC can undersample. A signal in the FM broadcast band, for example 89.45 MHz,
appears at its alias 9.45 MHz. The oscillator is then programmed to 9.45 MHz.

```
             adc_clk (80 MHz)                               |  sys_clk (NPI clock)
 adc_din -> [reg] -> mixer -> CIC /32 -> CFIR /2 -> FIR --+ |
              DDS ---^  (I and Q channel each)            +-> async FIFO -> NPI writer -> MPMC
 test counter ------------------------------------------->+ |      ^            |  irq
 phase increment <-- handshake <----------------------------+-- freq_to_phase_inc <- slv_regs
```

## Signal path (`ddc_datapath`)

| stage | rate in -> out | module | notes |
|---|---|---|---|
| input register | 80 MS/s | `ddc_datapath` | two's complement; `ADC_OFFSET_BINARY=1` accepts offset binary |
| DDS | 80 MS/s | `dds` | 32-bit phase, 1024 x 16 sine table, 22-bit phase dither, latency 2 |
| mixer | 80 MS/s | `iq_mixer` | I = x*cos, Q = x*sin, product >>> 15, saturated to 16 bits |
| CIC | 80 -> 2.5 MS/s | `cic_decimator` | R=32, N=5, M=2, 46-bit registers, gain 2^30 divided out, then x2 with saturation |
| CFIR | 2.5 -> 1.25 MS/s | `cfir_decim2` | 31 taps, corrects the CIC droop, decimates by 2 |
| channel FIR | 1.25 MS/s | `channel_fir` | 125 taps, pass band 0-200 kHz, stop band from 235 kHz |

The oscillator frequency is f = 80 MHz * inc / 2^32, so one step of the increment is 0.0186 Hz.
Software writes the frequency in Hz. `freq_to_phase_inc` turns it into an increment by
multiplying with the constant K = round(2^66 / F_clk) and shifting right by 34. The
result is within one increment step of the exact value.

A tone of peak amplitude A at the ADC comes out with |I + jQ| = A. The mixer halves the
wanted component, and the CIC stage makes up for it with a gain of 2 (`GAIN_LOG2=1`,
saturating). A full-scale tone therefore just fits the 16-bit output. The output word is `{I[15:0], Q[15:0]}`,
with I in the upper half. A tone at offset +df appears as a complex exponential at -df,
because Q is formed with +sin.

### Why three filters

The CIC filter does most of the decimation without multipliers. However, its pass band
droops like (sin x / x)^5, and it suppresses only the bands that alias onto 0 Hz.

- The CFIR stage flattens the droop over 0-200 kHz and removes 1.0-1.25 MHz before the
  last factor of two.
- The channel FIR runs at the lowest rate, where 125 taps are cheap. It sets the final
  channel edge.

Measured on the quantised coefficients, the cascade has:

- 0.07 dB pass-band ripple (the target was 0.1 dB).
- At least 71 dB stop-band attenuation from 235 kHz (the target was 70 dB).

Both FIRs use one multiplier each (`fir_mac_decimator`), serially, one multiply per clock:

- The channel FIR is linear-phase. It adds the two samples that share a coefficient
  before multiplying (`SYMMETRIC=1`), so its 125 taps take 63 multiplies in the 64
  clocks between outputs.
- The CFIR computes 31 taps, one per clock, in the 32 clocks between its inputs.

The coefficient tables are written in the two wrapper modules. Each table comes from a
design in floating point, quantised as h[k] = round(32768 * h_real[k]).

- CFIR: a least-squares fit to 1/|H_CIC(f)| on 0-200 kHz (weight 1), and to 0 on
  1.0-1.25 MHz (weight 20).
- Channel FIR: an equiripple (Parks-McClellan) low pass with band edges 200 and 235 kHz.

Only the filters' roles and the decimation plan come from the original design. Its
coefficients were not available, so these are this design's own. As a result, the
transition band is 35 kHz, where the original cascade reaches about 22.5 kHz. Reaching
22.5 kHz at 70 dB would take a channel FIR of about 190 taps, which means a second
multiplier per channel at this clock rate.

## Clock domains

- `adc_clk` clocks the data path and the write side of the FIFO.
- `sys_clk` is the memory controller's NPI clock. It also clocks the registers, the
  frequency converter and the NPI writer.

Three things cross between them:

- **ADC enable and test-pattern select:** two-flop synchronisers (`sync_2ff`). The reset
  is re-synchronised the same way.
- **Phase increment:** a toggle request/acknowledge handshake (`cdc_handshake`). The
  32-bit value is held stable until the ADC side has taken it. Completion sets the
  read-only *DDS synced* bit. Any new frequency write clears it again, so firmware can
  poll until the new frequency is active.
- **Samples:** a dual-clock FIFO with Gray-coded pointers (`async_fifo`, 16 words). A
  write into a full FIFO is dropped and sets the sticky `fifo_overflow` output. At
  5 MB/s, 16 words bridge 12.8 µs of memory latency.

## Memory writer (`npi_writer`)

The writer is a state machine that moves one 8-word cacheline per memory request:

| state | what happens | leaves when |
|---|---|---|
| RST | address pointer at the region start; FIFO drained | core enabled and `npi_InitDone` high |
| IDLE | FIFO read strobe high | first word arrives (`IDLE` -> `BUFFER_SAMPLES`) |
| BUFFER_SAMPLES | words 1..7 go into the 8-word sample buffer | eighth word received |
| TX_DATA | pushes buffer words 0..7 into the controller's write FIFO, one per clock | last push |
| TX_ADDR | holds `AddrReq` with `Addr`, `RNW=0` and `Size=0x2` | `AddrAck` |

**Handshake rules:**

- `AddrReq` rises together with the eighth push. If `AddrAck` comes in that same clock,
  TX_ADDR is skipped.
- `AddrReq` and `Addr` stay stable until acknowledged. An assertion checks this.
- Pushes pause while `WrFIFO_AlmostFull` is high.
- Byte enables are always 0xF. `RdModWr` and `WrFIFO_Flush` are 0.
- The FIFO is read with a read strobe and a "valid" flag one clock later. The strobe
  drops once 8 words are received or in flight, so no word is read that cannot be stored.

**Ring buffer and interrupt:**

- Addresses run from `start_addr` in 32-byte steps. They wrap to `start_addr` after
  `fat_sectors * 512` bytes (`npi_addr_gen`).
- A one-clock `irq` pulse marks every transaction that completes a 32 KB block, counted
  from the region start (`npi_irq_gen`). At 5 MB/s that is every 6.5536 ms.
- For a 20 MB ring (40960 sectors) split into four 5 MB transfer blocks, firmware
  counts 160 interrupts per block.

**Disabling the core:**

- The writer finishes a transaction it has started, then returns to RST. Words it had
  buffered but not yet sent are dropped.
- While disabled, it keeps emptying the FIFO, so the next run starts cleanly at the
  start address.
- The data path clears all filter state whenever it is disabled. Every run therefore
  starts from rest, and the test counter starts from 0.

## Registers (`slv_regs`)

A simple strobe bus: a write takes effect on `reg_wr`, and read data is valid the clock
after `reg_rd`.

| index | bits | meaning |
|---|---|---|
| 0 | 15:0 | ring buffer size in 512-byte sectors |
| 0 | 30 | DDS synced (read only) |
| 0 | 31 | ADC enable; also drives the `adc_en_out` pin |
| 1 | 31:0 | ring buffer start address (byte address, 32-byte aligned) |
| 2 | 31:0 | mixer frequency in Hz; a write loads the DDS |

Unused bits read as 0. Index 3 reads 0 and ignores writes.

**Typical bring-up:**

1. Write register 2, then poll bit 30 of register 0 until it is set.
2. Write the start address.
3. Write register 0 with bit 31 set and the sector count.
4. Count interrupts.

`test_pattern_en` is a pin. While it is high, the output words are 0, 1, 2, ... from the
moment of enabling.

## Files

`rtl/`:

- `ddc_ip_core.sv`: the top.
- `ddc_pkg.sv`: shared types, constants and register map.
- One file per module otherwise.

`tb/`:

- One self-checking testbench `tb_<module>.sv` per module.
- `npi_mem_model.sv`: a behavioural memory controller. It acknowledges address requests
  after a random delay, sometimes in the same clock. It raises `WrFIFO_AlmostFull` at
  random. It stores the cachelines in an associative array and checks the NPI rules.

`tb_ddc_ip_core` runs the top with its default parameters through a complete operation:

- Register programming and the DDS-synced handshake.
- A 64 KB ring in counter mode, which wraps and produces two interrupts. Every word in
  memory is compared with the expected counter value.
- A switch to I/Q mode with an 89.5 MHz tone, undersampled, with the oscillator at
  9.45 MHz. Amplitude and frequency of the 50 kHz result are measured from memory.
- A retune to 9.40 MHz while running.
- An enable while the memory controller reports it is not ready. The writer must wait, the
  FIFO overflows, and a reset clears the sticky flag.

It counts each mechanism: handshakes, back-pressure stalls, same-clock acknowledges,
wraps, interrupts, disables, mode switches, retunes and overflows. A mechanism that never occurs
counts as a failure.

`tb_ddc_workloads` repeats the receiver measurements on the data path, with an
89.45 MHz carrier undersampled to 9.45 MHz:

- Single tones at four levels: the output magnitude is within 0.4 % of the input peak.
- AM with a 1 kHz tone at 10, 15, 20 and 30 % modulation: the measured degree is within
  0.1 percentage point.
- FM with modulation index 0.5 to 3: the carrier and sideband amplitudes match the
  Bessel values |J_n(m_f)| to within 0.001.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/ddc_pkg.sv tb/tb_ddc_ip_core.sv --top-module tb_ddc_ip_core -Mdir obj
./obj/Vtb_ddc_ip_core
```

Replace `tb_ddc_ip_core` with any other testbench name. The end-to-end test simulates
about 17 ms of hardware time (1.4 million ADC clocks) and takes a few seconds.

**Changing the design:**

- `FCLK_HZ` on the top must match the ADC clock, because it sets the frequency-to-increment
  constant.
- `FIFO_DEPTH` must be a power of two.
- The filter coefficients are localparam tables in `cfir_decim2.sv` and `channel_fir.sv`.
  A new table keeps working as long as the multiplies per output fit into the clocks
  between outputs. That is the tap count, or half of it for the symmetric channel filter.

## Scope and departures

**Outside this RTL:**

- The ADC board and the clocking (including the run-time clock reconfiguration block of
  the original system).
- The memory controller and DDR2.
- The soft processor with its USB firmware and FAT16 file image.
- The bus attachment.

The top brings out the NPI port, a plain register strobe bus and the interrupt, so the
core can sit behind any bus wrapper.

**This design's own choices:**

- The filter coefficients (see above).
- The dither source.
- The size of the sine table.
- The FIFO depth.
- The back-pressure stall on `WrFIFO_AlmostFull`.
- Draining the FIFO while the core is disabled.
- The I-high/Q-low packing order.
- The symmetric pre-add in the channel FIR.
- The x2 gain in the CIC stage, which restores the input amplitude.
- The register-bus timing.
