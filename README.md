# SDR FPGA cores: FM receiver and Wishbone DSP cores in SystemVerilog

This is a small library of software-defined-radio building blocks for an FPGA, and two designs built
from them:

* a **wideband FM receiver**. An FMC150 ADC card samples the FM band at 122.88 MSPS. A digital down
  converter (DDC) brings one station to baseband and decimates it to 960 kSPS. The I/Q samples are
  gathered into 33-sample payloads and sent to a PC as UDP datagrams over Gigabit Ethernet. The PC
  demodulates the FM in software.
* three **stand-alone DSP cores** on one Wishbone bus: a FIR filter, a cascaded-biquad IIR filter and
  a 1024-point FFT/IFFT. Each core sits behind the same register file and FIFOs.

The two designs share no data path, so `sdr_top` holds them side by side with their own ports. The
cores follow the architecture of the RHINO SDR core library described in "Software-Defined Radio FPGA
Cores: Building towards a Domain-Specific Language" (referred to below as *the paper*). The
SystemVerilog, all fixed-point details and all interface timing are this design's own.

## Block map

```
sdr_top
├── fm_receiver                         adc_clk domain            sys_clk domain (125 MHz)
│   ├── fmc150_core  ADC DDR capture ──► sdf_channel ──► ddc_core ──► double_buffer ──► udp1gbe ──► MAC client stream
│   │                DAC byte mux, SPI                 nco, mixer,      (33 x 32 bit)     udp_tx, udp_rx, arp,
│   │                                                  cic_decimator,                     eth_tx/rx_bridge
│   │                                                  fir_core (C-FIR)
│   └── rst_sync per clock domain
├── wb_fir_ip  = wb_slave_ctrl + fir_core        Wishbone slot 0
├── wb_iir_ip  = wb_slave_ctrl + iir_sos         Wishbone slot 1 (iir_sos = cascade of biquad_df1)
└── wb_fft_ip  = wb_slave_ctrl + fft_r22sdf      Wishbone slot 2 (fft_bf1, fft_bf2, fft_twiddle_mult)
```

`sdr_pkg.sv` holds the shared types: the Wishbone register enum, the status and control structs, the
21 C-FIR coefficients and the constants. Every module begins with a comment. It gives the module's
timing and says what follows the paper and what is a local choice.

## The FFT: radix-2² single-path delay feedback

This is the hardest block to read. `fft_r22sdf` takes one complex sample per enabled clock in natural
order. It returns the spectrum in **bit-reversed order**. The m-th output of a frame is bin
`bitrev_N(m)`.

* Every pair of index bits gets one *full stage*:
  * a type-I butterfly (`fft_bf1`) with an L/2-word feedback delay;
  * a type-II butterfly (`fft_bf2`) with an L/4-word delay and the trivial −j rotation;
  * a complex multiplier (`fft_twiddle_mult`) with an L-entry twiddle table.

  L is the block length of the stage: 2^N, 2^(N−2), and so on.
* An odd N ends with a *half stage*: a single type-I butterfly with a 1-word delay.
* The last full stage needs no multiplier, because all its twiddles are 1.
* Twiddles are computed during elaboration with `$cos`/`$sin` and rounded to `TF_WIDTH` bits (Q1.15 by
  default). No table file is needed.
* **Bit growth:** each butterfly adds one bit, so `DOUT_WIDTH = DIN_WIDTH + N` (26 bits at N = 10).
  Nothing is scaled inside the core. The paper lets the user choose the output width; this design
  fixes it to the exact growth instead.
* **IFFT:** `inv = 1` conjugates every twiddle and turns the −j of the type-II butterflies into +j.
  There is no 1/2^N scaling.
* **Flow control:** the pipeline moves only on valid input samples. Frame k therefore leaves while
  frame k+1, or zero padding, enters. The first output of a frame comes out once 2^N − 1 more samples
  have entered, plus the pipeline registers (6 clocks at N = 5 when samples arrive back to back).

The Wishbone wrapper `wb_fft_ip` packs one complex input per 32-bit word: the real part in [15:0] and
the imaginary part in [31:16]. Each output becomes two sign-extended words, real part first. The
wrapper feeds the FFT at most every other clock. It stops feeding while fewer than 16 places are left
in the output FIFO, so no output is ever lost. To flush the last frame, write a frame of zeros.

## The DDC: gain and word widths through the decimation chain

`ddc_core` is NCO → mixer → CIC1 → compensating FIR → optional CIC2. Each stage after the mixer can be
removed with a `SELECT_*` parameter. All numbers are fractions aligned at the MSB, so full scale stays
full scale from stage to stage.

* **NCO** (`nco`): a 32-bit phase accumulator, so f = FTW·f_clk/2³².
  * The top 10 bits address cosine and sine tables of 1024 entries, computed during elaboration.
  * Phase dither is an LFSR added below the address bits. It is off by default (`PHASE_DITHER_WIDTH = 0`).
* **Mixer:** I = x·cos, Q = −x·sin, with each product scaled by 2⁻¹⁵. A tone at f_NCO + Δ therefore
  comes out as e^{+j2πΔt}, with amplitude A/2.
* **CIC** (`cic_decimator`): Hogenauer integrators, decimation, then combs.
  * The integrators are pipelined. The output at decimation instant n is therefore Σ h[k]·x[n−N−k]:
    the same response, delayed by N input samples.
  * The internal width is `DIN + N·ceil(log2(R·M))`: 16 + 10·7 = 86 bits at R = 128, N = 10.
  * The output is the top `DOUT_WIDTH` bits. The gain (RM)^N = 2^70 is removed by truncation, and
    the result is zero-filled when the output is wider than the register.
  * Because the gain is removed by a shift, a rate that is not a power of two loses gain. For
    example, R = 96 (the 1.28 MSPS configuration) has a gain of (96/128)^10 ≈ 0.056, about −25 dB.
* **C-FIR:** 21 taps in the even-symmetric structure, so 11 multipliers. The coefficients in
  `sdr_pkg` flatten the droop of the R = 128, N = 10 CIC up to about 90 kHz. They are a frequency-sampling design with a Kaiser window (β = 5):
  * the target response is the inverse of the CIC's |sinc|^10 droop up to 90 kHz, and 0 above;
  * the taps are scaled to a DC gain of 1 and rounded to Q1.15.
* **CLKO:** a square wave at the output rate.

The FM receiver samples at 122.88 MSPS, so the 88–108 MHz band folds to 14.88–34.88 MHz. A station at
f_RF is tuned with `ftw = round(f_alias/122.88e6 · 2³²)`.

## Clock domains and the double buffer

The receiver runs in three clock domains:

* the ADC clock: capture, DDC and the write side of the double buffer;
* `sys_clk`: the read side of the double buffer and UDP;
* `clk_fast`: the DAC byte bus.

Each domain has its own reset synchroniser (`rst_sync`), which asserts asynchronously and releases
synchronously.

`double_buffer` is the only data crossing between the domains.

* The writer fills one 33-word bank while the reader empties the other.
* When a bank is full, a toggle crosses to the reader through two flops. The reader then sends the 33
  words as one burst (`out_first` … `out_last`).
* A bank is read only once it is complete, and it is not written again until 33 more samples have
  arrived. The two sides therefore never touch the same words, as long as a 33-clock burst is shorter
  than 33 output samples. At 960 kSPS and a 125 MHz `sys_clk` the margin is about 130×.
* The `overruns` counter shows a violation of this rule.

`udp_tx` takes a payload only when it is idle and its buffer is empty. A payload that starts while
`udp_tx` is busy is dropped whole and counted in `udp_drops` (in words). A payload is never split
between two datagrams.

## UDP/IP and ARP

`udp1gbe` is the part in front of an Ethernet MAC: `udp_tx`, `udp_rx`, `arp` and two byte-stream
bridges. The MAC itself is a separate third-party core and is not included. Its client interface is
brought out as ports: bytes with `valid`/`sop`/`eop`, and `ready` on transmit.

* **ARP:**
  * After reset the core broadcasts a request for `dst_ip_addr`.
  * It repeats the request `ARP_RETRY_CYCLES` clocks after the previous one was sent.
  * A reply from that IP sets `dst_mac_addr` and `mac_init_done`.
  * Requests for `own_ip_addr` are answered.
* **Transmit:**
  * Each datagram is Ethernet II + IPv4 + UDP: 20-byte IPv4 header with no options, DF set, TTL 64 and
    the header checksum computed in the core; UDP checksum 0.
  * The payload is `UDP_TX_DATA_BYTE_LENGTH` bytes: 132 = 33 words of {I, Q}, with I in the upper 16 bits.
  * The addresses and ports are static inputs.
* **Receive:** a datagram addressed to the core's own IP and port is stored. It is then read word by
  word with `udp_rx_pkt_req`.

## Wishbone register map

Each DSP core has the same 8-word register window. The top level uses `wb_adr_i[4:3]` to choose the
core: 0 FIR, 1 IIR, 2 FFT, and 3 unmapped, which reads as 0. `wb_adr_i[2:0]` chooses the register:

| addr | name      | access | meaning |
|------|-----------|--------|---------|
| 0    | SLAVE_SEL | r/w    | free select register |
| 1    | STATUS    | r      | [23:8] words in the output FIFO, 5 core ready, 4 coefficient FIFO full, 3 output FIFO full, 2 output FIFO empty, 1 input FIFO full, 0 input FIFO empty |
| 2    | CONTROL   | r/w    | 0 enable, 1 soft reset, 2 mode (IFFT for the FFT core) |
| 3    | COEFF     | w      | push one coefficient |
| 4    | INPUT     | w      | push one input sample |
| 5    | OUTPUT    | r      | pop one result (0 if empty) |
| 6    | FTW       | r/w    | tuning word register (for a DDC core) |

* **Bus timing:** classic single cycles. ACK comes one clock after CYC and STB rise; there are no wait
  states.
* **FIFOs:** they hold 64 words. A push into a full FIFO is dropped.
* **Back-pressure:** the FIR and IIR wrappers stop taking samples while fewer than 8 places are free
  in the output FIFO. The FFT wrapper stops while fewer than 16 are free. Unread samples wait in the
  input FIFO.

## The filters

* **`fir_core`**, with `LATENCY` selecting the structure:
  * 0: transposed;
  * 1: odd-length symmetric (T/2 coefficients loaded);
  * 2: even-length symmetric ((T+1)/2 loaded);
  * 3: moving average (no coefficients).

  With `INTERNAL_COEFFS = 1` the taps come from the `COEFFS` parameter at reset. Otherwise they are
  loaded one per clock on `loadc`, and `rdy` stays low until the last one is in. The output is
  `acc >>> (COEFF_WIDTH−1)`, saturated, one clock after the input.
* **`iir_sos`:** a cascade of `STAGES` Direct-Form-I biquads.
  * Each biquad computes y = b0x + b1x₁ + b2x₂ − a1y₁ − a2y₂.
  * The coefficients are Q2.14, so 16384 = 1.0. They are loaded as b0 b1 b2 a1 a2 for each section
    in turn.
  * Each section is saturated and adds one clock of delay.

## How far it can be trusted

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=… failures=…`.

* The testbenches compare against models. The models are:
  * a direct convolution for the CIC and the FIR;
  * a floating-point DFT for the FFT;
  * exact table values for the NCO;
  * a reference queue for the FIFOs.
* `tb_sdr_top` runs the whole top level at its default parameters.
  * ARP resolution with an injected reply.
  * SPI loopback.
  * DAC framing.
  * DDC packets checked word for word against the UDP payloads.
  * A transmit stall that must drop whole packets.
  * On the Wishbone slots:
    * FIR impulse responses and back-pressure;
    * a coefficient reload;
    * IIR wait-for-coefficients and an impulse response;
    * a 1024-point forward FFT and IFFT of an impulse;
    * the unmapped slot.
* `tb_fir_core` includes a 95-tap band-pass instance at fs = 10 kHz. A 2.2 kHz tone must pass with
  a gain of 0.8 to 1.2, and a 500 Hz tone must come out below 1 %. `tb_iir_sos` runs 16 sections.
* `tb_ddc_core` tunes a tone 20 kHz away from the NCO. It checks the magnitude (±5 %), the phase step
  per output and the rejection of a tone 1.5 MHz away (below 1 %).

Not verified:

* **Timing closure.** The paper's cores run at up to 130 MHz. The 86-bit CIC adders and the 26-bit
  FFT multipliers are the paths to watch.
* **Pads.** The LVDS DDR pads are modelled by edge-triggered registers, not by vendor primitives.
* **Real Ethernet.** Frames were checked only against the testbench's own parser. No real MAC or PHY
  was used.
* **C-FIR response.** The compensator meets its goal only roughly (the paper asks for 10 dB of stop-band
  attenuation).

## Departures from the paper and local choices

* All register addresses, bit fields, FIFO depths, bus timing, the word packing of the FFT and the
  MAC client stream format are local choices. The paper only names these registers and interfaces.
* The FFT output width is fixed at `DIN_WIDTH + N` rather than being a free parameter.
* `ddc_core` uses a 16-bit mixer and a 32-bit CIC output. The NCO uses a 10-bit table.
* The UDP payload default is 132 bytes (33 samples), as in the receiver description. The paper's
  generated system uses 64 bytes; set `PACKET_SAMPLES = 16` and `UDP_TX_DATA_BYTE_LENGTH = 64` to
  match it.
* Default sizes:
  * The IIR default is 6 sections, the size of the filter the paper verifies. Its benchmark uses
    `STAGES = 16`.
  * The FIR default is 21 taps. The paper's 95-tap band-pass needs `NUM_OF_TAPS = 95`.
  * The paper's DDC benchmark outputs 1.28 MSPS, which needs `SAMPLE_RATE_CHANGE1 = 96`. Its
    gain is then below one, as explained in the DDC section.
* `sdf_channel` implements the rate-annotated FIFO channel of the paper's dataflow flow. The receiver
  uses it 1:1 between the ADC and the DDC. The DDC-to-UDP buffering is done by the double buffer.
* Not included:
  * the Ethernet MAC and PHY;
  * the FPGA clock manager;
  * the chips on the FMC150 card;
  * the analog front end;
  * the board's ARM processor;
  * the FM demodulator, which runs on the PC.

  Their signals are ports of the top level.

## Simulating

Any Verilator 5 simulation works with the same pattern. For a block's testbench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_fft_r22sdf rtl/sdr_pkg.sv tb/tb_fft_r22sdf.sv
./obj_dir/Vtb_fft_r22sdf
```

Replace `tb_fft_r22sdf` with any file in `tb/`. `tb_sdr_top` is the full-size run and takes well under
a second of CPU time. Testbenches that need smaller sizes (for example a CIC with R = 8) set them on
their own instances. To use a core, instantiate it with the parameters shown at the top of its file.
The defaults are the FM receiver's numbers and the paper's benchmark sizes.
