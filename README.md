# Two-dimensional event histogrammer for a position-sensitive X-ray detector

A gas X-ray detector with delay-line readout reports each absorbed photon as
two analog pulses: after time-to-amplitude conversion, the height of one pulse
is the photon's X position and the height of the other is its Y position.
This RTL is the digital core of a PC plug-in card that turns those pulse pairs
into an image. For each photon the card:

1. checks that the two pulses really belong together (time coincidence),
2. starts two 12-bit sampling ADCs at the moment the pulse tops are flat,
3. uses the ten most significant bits of each result as the row and column
   of a pixel, and
4. adds one to that pixel's 16-bit counter in an external 2 MB SRAM.

No processor is involved. One 20 MHz clock drives a small set of state
machines, so the card keeps up with about 10^6 photons per second. The limit
is the ADC conversion time, not the logic. The PC reads and clears the image
over the ISA bus whenever it wants to update the display. Image sizes from
1024 × 1024 down to 128 × 128 pixels are selected by right-shifting the ADC
data.

## Block structure

```
 comparator X ─┐                          ┌─ ADC X (12 bit, ~800 ns)
 comparator Y ─┴► coincidence_logic ──start┴─ ADC Y
                                             │ end of conversion + data
                                             ▼
                                        adc_capture ── ten MSBs of X, Y
                                             │ valid/ready
                                  adc_data_shifter (resolution, address)
                                             ▼
                                       histogram_fsm ──┐
 ISA bus ◄► isa_io_port ◄► host_interface ─────────────┴► mem_access_mux ◄► SRAM
```

| file | role |
|---|---|
| `rtl/tdas_pkg.sv` | sizes, event and SRAM-request structs, register map |
| `rtl/coincidence_logic.sv` | 300 ns coincidence window, 550 ns trigger delay |
| `rtl/adc_capture.sv` | tracks both conversions, latches the ten MSBs, hands the event over |
| `rtl/adc_data_shifter.sv` | resolution shift and pixel address |
| `rtl/histogram_fsm.sv` | read, +1, write in four cycles |
| `rtl/host_interface.sv` | control flip-flops, host memory access, read and clear |
| `rtl/isa_io_port.sv` | ISA I/O slave: decode, strobe synchronisers, data bus drive |
| `rtl/mem_access_mux.sv` | multiplexes all SRAM pins between histogrammer and host |
| `rtl/tdas_top.sv` | the card's logic, wired together |

The comparators, the ADCs and the SRAM are bought parts. They are outside the
RTL, and their pins are ports of `tdas_top`. The testbenches carry
behavioural models of the ADC (`tb/adc_model.sv`) and the SRAM
(`tb/sram_model.sv`).

## Event timing, and why the card reaches 10^6 events per second

This is the part that needs the most care. All times assume the 20 MHz clock
(50 ns per cycle).

**Coincidence.** Both comparator outputs are asynchronous. Each one passes
through a two-flop synchroniser, and the block then looks for rising edges.
The first edge in either channel opens a window of `WINDOW_CYCLES` = 6 cycles
(300 ns). If the other channel's edge arrives inside the window, the pair
counts as a photon. Otherwise the lone edge is dropped.

**Trigger delay.** The TAC output is still rising when the comparator fires.
Sampling it then would give a wrong height, so the trigger is held back until
`DELAY_CYCLES` = 11 cycles after the first edge. The synchroniser latency is
subtracted internally. Measured from the comparator pin, the start pulse
begins 550 to 600 ns after the first edge; the spread comes from the edge's
phase against the clock. The start pulse is `TRIG_CYCLES` = 2 cycles
(100 ns) long and goes to both ADCs.

**Conversion.** The ADCs are single-shot converters, not pipelined ones.
Each needs about 800 ns and then gives an end-of-conversion pulse.
`adc_capture` synchronises both pulses. It latches bits 11..2 of each result
(the two LSBs are dropped to improve differential nonlinearity) and offers
the event to the histogrammer. `adc_busy` stays high from the start pulse
until the event is handed over. If the coincidence stage finds a new photon
whose trigger falls while `adc_busy` is high, it drops that photon. A
conversion that never ends is abandoned after `TIMEOUT_CYCLES` = 40 cycles.

**Overlap.** The 550 ns delay of the next photon runs while the previous
conversion is still going. The only serial part is the conversion plus about
150–200 ns of synchronisation and hand-over. Photons 1.0 µs apart are
therefore all taken. The end-to-end testbench sends 500 photons at exactly
that spacing and checks that every one is stored. A photon that arrives only
~700 ns after the previous one is dropped, because its trigger would come
while the ADCs are busy.

**Histogramming.** `histogram_fsm` spends four cycles (200 ns) per event on
the asynchronous SRAM:

| state | SRAM pins | action |
|---|---|---|
| READ  | CE, OE, address | word captured and incremented at the end of the cycle |
| INC   | CE | OE released so the memory stops driving the bus |
| WRITE | CE, WE, data driven | |
| WEND  | CE, data driven | WE rises; the SRAM stores the word; the next event can be taken |

200 ns is much shorter than a conversion, so the histogrammer never limits
the rate. A pixel that already holds 0xFFFF stays at 0xFFFF instead of
wrapping.

## Image layout and resolution

`CTRL.shift` = s (0..3) shifts both 10-bit coordinates right by s bits. The
pixel word address is

    addr = (y >> s) * (1024 >> s) + (x >> s)

An N × N image (N = 1024, 512, 256 or 128) therefore fills the first N²
words of the memory, row by row. The host reads exactly N² words.

## Host access

The PC uses 16-bit ISA I/O cycles at base address 0x300 (parameter
`ISA_BASE`):

| offset | name | contents |
|---|---|---|
| 0 | CTRL | [0] global enable, [2:1] shift, [3] host memory access, [4] clear on read |
| 1 | STATUS | [0] host memory access in progress, [1] memory granted to host, [2] acquisition busy |
| 2 | ADDR_LO | word address 15:0 |
| 3 | ADDR_HI | word address 19:16 |
| 4 | DATA | read: word at ADDR, then optional clear, ADDR+1; write: store word, ADDR+1 |

To read an image, the PC does the following:

1. It sets CTRL[3], and CTRL[4] if the image should be reset as it is read.
2. The histogrammer finishes the event it holds and pauses, and the memory is
   granted to the host.
3. The PC writes ADDR, which starts a read-ahead of that word.
4. It reads DATA N² times. Each read returns the word fetched ahead. After
   the PC has sampled it, the card writes zero back (when clearing), moves to
   the next address and fetches the next word. This takes at most about
   300 ns, less than the gap to the next ISA cycle.

While the host holds the memory, a finished event waits in `adc_capture`,
and any photon after it is dropped at the coincidence stage. When CTRL[3] is
cleared, the waiting event is stored and acquisition continues.

With the global enable (CTRL[0]) off:

- the comparator inputs are held, so no conversion starts;
- the histogrammer pauses;
- unless the host is using the memory, the SRAM address and control pad
  drivers are switched off (`sram_pins_oe` low, the tristate of the real
  card).

The ISA interface synchronises IOR#/IOW#. A write is executed 100–150 ns
into the cycle. The read strobe (and so the read's side effects) comes only
after IOR# has risen again. An I/O strobe must stay low for at least 200 ns.

## Ports of `tdas_top`

- Comparators: `disc_x`, `disc_y`, both asynchronous.
- ADCs: `adc_start` (to both), plus `adc_{x,y}_data[11:0]` and
  `adc_{x,y}_eoc` for each converter. The end-of-conversion pulse is
  asynchronous and at least one clock long, and the data must be stable from
  it until the next start.
- SRAM: `sram_addr[19:0]`, `sram_dq_out`/`sram_dq_in[15:0]` with
  `sram_dq_oe`, `sram_ce_n`, `sram_oe_n`, `sram_we_n`, and `sram_pins_oe`.
  The tristate buses are split into in/out/enable because the logic has no
  z values.
- ISA: `isa_sa[9:0]`, `isa_aen`, `isa_ior_n`, `isa_iow_n`, the data bus as
  `isa_sd_in`/`isa_sd_out` with `isa_sd_oe`, and `isa_iocs16_n`.

The sizes (12-bit ADC, 10-bit coordinates, 20-bit address, 16-bit words)
are in `tdas_pkg`. The timing parameters of `tdas_top` count cycles of the
20 MHz clock. For another clock, scale them to keep 300 ns, 550 ns and
100 ns.

## What comes from the original design and what was chosen here

These points follow the published description of the card:

- two event-triggered 12-bit ADCs started by one trigger, of which the ten
  MSBs are used;
- the coincidence window of 300 ns and the trigger delay of 550 ± 50 ns;
- one 20 MHz clock;
- the four-cycle read-increment-write state machine, which runs
  continuously and pauses only for the host;
- control flip-flops loaded by I/O instructions (global enable, memory
  access, ADC shift);
- full multiplexing of the SRAM pins between host and histogrammer;
- tristating of the memory control pins by the global enable;
- a right shifter for 1024² to 128² images;
- a 2 MB SRAM;
- an ISA card.

These are this design's own choices, because the description does not cover
them:

- 16-bit pixel words, derived from 2 MB for 1024² pixels;
- the row-packed address layout;
- saturating counters;
- the synchronisers and the 100 ns start pulse;
- dropping photons that arrive while the ADCs are busy;
- the conversion timeout;
- the valid/ready hand-over from ADC capture to histogrammer;
- the whole host register map, with read-ahead, auto-increment and clear on
  read;
- the ISA base address and 16-bit I/O;
- letting the host use the memory while the global enable is off;
- also pausing the histogrammer while the enable is off, so no write is lost
  when the pads float.

These differences from the real card remain:

- The original logic is split over two small CPLDs. The partition is not
  known, so this RTL is one hierarchy.
- The tristate pins are modelled as output-enable signals.
- The analog front end (preamplifiers, constant-fraction discriminators,
  TACs, the leading-edge comparators) and the PC software are not part of
  this RTL.

## Simulating

Each block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/tdas_pkg.sv tb/tb_tdas_top.sv \
    --top-module tb_tdas_top -o sim && obj_dir/sim
```

Replace `tb_tdas_top` with `tb_coincidence_logic`, `tb_adc_capture`,
`tb_adc_data_shifter`, `tb_histogram_fsm`, `tb_host_interface`,
`tb_mem_access_mux` or `tb_isa_io_port` for the unit tests.

`tb_tdas_top` runs the whole card at its default parameters with the full
1024 × 1024 × 16-bit memory. It takes about 20 seconds. It works through
these phases:

1. acquisition disabled;
2. full-resolution acquisition with random photons, lone pulses, photons
   during a busy conversion, a failed conversion and the 1 µs burst, followed
   by read-out and clearing of all 2^20 words over ISA cycles, compared word
   by word with an image computed from the photon codes;
3. host access in the middle of a conversion;
4. a switch to 128 × 128 with a pixel preloaded to 0xFFFE, so that it
   saturates, followed by read-out;
5. a 512 × 512 image of a slit mask (photons on 16 evenly spaced columns),
   followed by read-out.

It counts each mechanism (coincidence, miss, busy drop, timeout, pause,
resolution change, saturation, clear on read) and fails if one never
happens. The unit testbenches check timing as well:

- the trigger starts 550 to 600 ns after the comparator edge, inside 550 ± 50 ns;
- the trigger is 100 ns wide;
- back-to-back events cost exactly four cycles;
- host memory accesses finish within six cycles.

## Limits of what has been verified

Everything has only been simulated, with two-state logic (no X or Z) and
idealised models. The models have zero-delay SRAM reads, an ADC that always
takes exactly 800 ns, and end-of-conversion pulses of 100 ns. Real SRAM
access times, ADC timing margins and ISA bus electrical timing have not been
checked against data sheets. Nothing has been placed into a CPLD, so whether
the logic fits two 108-macrocell devices is not known.
