# Real-time Toeplitz hashing of raw random numbers

A physical noise source sampled by a fast ADC gives bits that are random but
not uniform: they are biased and correlated from sample to sample. A *Toeplitz
hashing extractor* turns such bits into nearly uniform ones. It multiplies a
block of `n` raw bits by a fixed random binary `m x n` Toeplitz matrix over
GF(2) and keeps the `m` result bits, with `m/n` below the measured min-entropy
per raw bit. (For this source the min-entropy is 0.812 bit per bit; the design
uses `m/n = 1024/1520 = 0.674`.)

At gigabit rates a CPU cannot keep up, and a full 1024 x 1520 product per
clock is too large for a mid-sized FPGA. This RTL splits the matrix into 19
slices of 80 columns and handles one slice per clock in a three-stage pipeline.
At 62.5 MHz it takes 80 raw bits per clock (5 Gbit/s) and delivers 1024 bits
every 19 clocks:

    1024 bit * 62.5 MHz / 19 = 3.368 Gbit/s

Around the extractor sits the rest of the FPGA logic of an acquisition board:
- capture of an 8-bit, 1 GS/s ADC;
- selection of the bits that feed the hash;
- an optional raw-data recording path to DDR3 memory;
- output buffering, and streaming to one of three host links (SFP fibre,
  Gigabit Ethernet, USB 2.0);
- a small command decoder.

## The Toeplitz matrix and how it is sliced

A Toeplitz matrix is constant along every diagonal, so `m + n - 1` seed bits
`t_1 .. t_{m+n-1}` define it. Counting rows `i` and columns `j` from 1:

    T(i, j) = t_{m - i + j}        (row 1 = t_m .. t_{m+n-1}, row m = t_1 .. t_n)
    r_i     = XOR over j of  T(i, j) AND d_j          i = 1..m

Cut the columns into `n/k` groups of `k`. Group `s` (0-based) covers columns
`sk+1 .. sk+k`, and every entry in it is a seed bit between `t_{sk+1}` and
`t_{sk+m+k-1}`. So each slice is itself an `m x k` Toeplitz matrix, defined by
a *window* of `m + k - 1` consecutive seed bits. The window moves up by `k`
from one slice to the next. The result is the XOR of the `n/k` partial
products:

    r = T_0 * d[1..k]  xor  T_1 * d[k+1..2k]  xor ... xor  T_{n/k-1} * d[n-k+1..n]

Take the window `w` of slice `s` (`w[0] = t_{sk+1}`) and raw bits
`d[0..k-1]` of that slice. Partial-product bit `i-1` (row `i`) is then

    p[i-1] = XOR over c = 0..k-1 of  w[m - i + c] AND d[c]

i.e. row `i` is window bits `m-i .. m-i+k-1`, ANDed with the raw word.

Bit conventions used throughout:
- Seed bit `t_p` is `seed[p-1]`.
- Raw bit `d_j` of a block is bit `(j-1) mod 80` of raw word `(j-1) / 80`.
- Result bit `r_i` is `out_bits[i-1]`.

### The three pipeline stages

| stage | module | per clock |
|---|---|---|
| I, matrix building | `matrix_builder` | step counter `s` = 0..18; registers `seed[s*k +: m+k-1]` with the raw word; tags the first and last step of a block |
| II, sub-matrix multiplication | `submatrix_mult` | 1024 AND/XOR trees of 80 inputs each, registered (the bulk of the logic) |
| III, vector accumulation | `vector_accum` | `acc <= (first ? 0 : acc) ^ p`; on the last step the result is registered and `out_valid` pulses |

`toeplitz_extractor` connects the three stages. Timing:
- A block's result appears 3 clocks after the clock that accepted its 19th raw
  word.
- With a raw word on every clock, results come exactly 19 clocks apart.
- There is no back-pressure. Idle clocks (`in_valid` low) simply pause the step
  counter.
- The seed must stay constant while a block is in flight.

Stage I uses a 19-way selection of a 1103-bit window out of the 2543-bit seed.
It is cheap next to stage II, which has about 82 k two-input AND gates feeding
1024 XOR trees.

## From ADC samples to raw words

- **Input capture (`iddr_capture`).** The ADC outputs four 8-bit samples on
  each edge of its 125 MHz data clock, 32 bits wide. Rising-edge and
  falling-edge flip-flops capture both words. At the next rising edge they are
  presented as one 64-bit word: eight samples, rising-edge word in the low
  half, sample `i` of a 32-bit word in bits `8i+7..8i`.
- **Router (`input_router`).** Sends each 64-bit word either to
  post-processing or to the DDR3 recording path (command `ROUTE`). The word
  never goes to both.
- **Data select and deserializer (`data_select_deser`).** The input brings
  8 Gbit/s but the extractor takes 80 bits per 62.5 MHz clock (5 Gbit/s). So
  exactly 5 of the 8 bits of every sample are kept: 16 samples x 5 bits = 80
  bits.
  - The kept bits are sample bits `shift .. shift+4`. `shift` defaults to 0,
    the five least significant bits, the most noise-like ones. Command `SHIFT`
    can raise it to 3. The upper bits follow the shape of the signal's amplitude
    distribution and carry most of its bias.
  - Two consecutive 40-bit groups form one raw word, the earlier group in the
    low bits.
  - An 8-word dual-clock FIFO carries the raw word into the 62.5 MHz domain.
    Input and output rates are exactly equal, so the FIFO never fills in
    steady state. `deser_overflow` would flag it if it did.

## Output side

- **Output selector (`output_mux`).** Normally it takes each 1024-bit result
  and writes it to the output FIFO as four 256-bit beats, lowest first. With
  command `SOURCE = 1` it passes 256-bit words read back from DDR3 instead,
  under a valid/ready handshake.
- **Dropping results.** The extractor cannot be stopped, so a result that
  finds the selector still busy is discarded and `ext_drop` pulses for one
  clock. The selector is busy when the FIFO is full, or when DDR3 readback is
  selected.
- **Output FIFO (`async_fifo`).** 16 x 256 bits, which is four results. It
  crosses from 62.5 MHz to the host-link clock. The FIFO uses Gray-coded
  pointers with two-flop synchronisers and first-word-fall-through reads. The
  same module serves as the clock-crossing FIFO inside `data_select_deser` and
  `ddr3_wr_fifo`.
- **Transmission control (`tx_control`).**
  - Takes one 256-bit word at a time and sends it as eight 32-bit beats,
    lowest first, on link 0 (SFP), 1 (Ethernet MAC) or 2 (USB interface). Each
    link has a valid/ready pair, and `tx_data` is shared.
  - The link is fixed when a word is taken, so switching links never splits a
    word.
  - `TX_EN = 0` stops taking words. The FIFO then fills and results start to
    drop.
  - Assertions check that an offered beat stays stable until taken, and that
    at most one link is valid at a time.
  - Command bytes arriving from any link are passed on one per clock, lowest
    link first (`rx_ready` tells each link when its byte was taken).
- **Link rates.** The links measured on the original board reach 3.2 Gbit/s
  (SFP), 968.7 Mbit/s (Ethernet) and 259.5 Mbit/s (USB). All are below the
  3.37 Gbit/s generation rate. In sustained operation the output FIFO
  therefore fills and whole 1024-bit results are dropped. The kept results are
  unaffected: each result is a complete hash of its own 1520 raw bits.

## DDR3 test path

For offline analysis of raw data, `ROUTE = 1` sends the 64-bit ADC words to
`ddr3_wr_fifo`. It packs four of them into a 256-bit word (earliest lowest)
and buffers 16 such words towards the DDR3 controller's clock. The controller
reads it as a first-word-fall-through FIFO (`ddr3_wr_en`, `ddr3_wr_data`,
`ddr3_wr_empty`), and `ddr3_overflow` flags a lost word.

Words read back from memory enter on `ddr3_rd_*` in the 62.5 MHz domain and
leave through the output selector when `SOURCE = 1`. The DDR3 controller
itself, its addressing and the memory are outside this RTL.

## Commands

One byte per command: opcode in bits 7:4, argument in bits 3:0.

| byte | effect | reset value |
|---|---|---|
| `0x10`/`0x11`/`0x12` | output link SFP / Ethernet / USB | SFP |
| `0x20`/`0x21` | output source: extractor / DDR3 readback | extractor |
| `0x30`/`0x31` | raw data route: extractor / DDR3 | extractor |
| `0x40`..`0x43` | lowest ADC sample bit kept by data select | 0 |
| `0x50`/`0x51` | output streaming off / on | on |

Any other opcode, or a link number above 2, changes nothing and pulses
`bad_cmd`. The settings are visible on `cfg_out`.

## Clocks and resets

| domain | clock | contains |
|---|---|---|
| `clk_adc` | 125 MHz ADC data clock | capture, router, write sides of the deserializer and DDR3 FIFOs |
| `clk_sys` | 62.5 MHz, derived from `clk_adc` by a PLL outside this RTL | extractor, output selector, DDR3 readback, `seed` |
| `clk_ddr` | DDR3 controller user clock | read side of the DDR3 write FIFO |
| `clk_tx` | host link clock | transmission control, command decoder |

Settings are quasi-static and cross from `clk_tx` to `clk_adc` and `clk_sys`
through two-flop synchronisers (bit by bit, so a multi-bit field may be mixed
for one clock while it changes). Data crosses through the dual-clock FIFOs.

Every domain has its own synchronous active-low reset. Assert all four
together, for a few cycles of the slowest clock. Only control registers are
reset; datapath registers are read only under a valid flag.

## Where this RTL comes from, and how far to trust it

These parts follow the published design directly:
- the extractor's sizes (1024, 1520, 80), its three-stage organisation, the
  62.5 MHz clock and the resulting rate;
- the data widths on the board diagram: 32-bit DDR, 64-bit SDR, 80 raw bits,
  1024 extracted bits, 256-bit DDR3 words;
- the set of blocks.

The following are this design's own choices, because the source only names or
draws these blocks:
- how the seed window is selected;
- every bit ordering;
- the latency;
- which 5 bits of a sample are kept (the 5-bit count itself follows from the
  two published data rates);
- every FIFO depth and handshake;
- the drop policy;
- the 32-bit link beat;
- the whole command set;
- the clock-crossing scheme.

The seed is a plain input port. The source does not say where it comes from;
tie it to a constant or drive it from a register.

Not included, and left as ports: the ADC and its analog front end, the clock
synthesiser, the PLL, the DDR3 controller/IP and memory, the SFP transceiver
(GTX), the Ethernet MAC and PHY, the USB interface and chip, chip
configuration and the configuration flash. The source gives no logic for these
parts, or they are vendor parts. The source mentions two SFP transceivers; the
board diagram draws one SFP path, and one is provided.

After coarse synthesis the whole design is about 6000 flip-flops and 8.8 kbit
of FIFO memory. Most of the logic is the 1024 80-input XOR trees of stage II.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`. The extractor and the end-to-end tests
compare against `tb_ref_pkg::toeplitz_ref`, a direct full-matrix product that
does not use the slicing. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/toeplitz_pkg.sv rtl/trng_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv \
        tb/tb_trng_postproc_top.sv --top-module tb_trng_postproc_top -o sim
    obj_dir/sim

For a single block, list only its files, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/toeplitz_pkg.sv tb/tb_ref_pkg.sv \
        rtl/matrix_builder.sv rtl/submatrix_mult.sv rtl/vector_accum.sv \
        rtl/toeplitz_extractor.sv tb/tb_toeplitz_extractor.sv --top-module tb_toeplitz_extractor

| testbench | what it shows |
|---|---|
| `tb_trng_postproc_top` | whole design at full size, no parameter overrides. It exercises: ADC capture; selection offsets 0 and 2; all three links with back-pressure; an invalid command; DDR3 recording and playback; stopping the stream until results are dropped. Every link beat is compared with the reference hash, and the extractor's 19-clock result spacing is checked. Runs in about a second. |
| `tb_workload_statistics` | whole design at full size, fed with a strongly correlated Gaussian ADC signal (lag-1 correlation 0.7), for 9766 results (10,000,384 bits). The fraction of ones and the bit autocorrelation at lags 1..16 must lie within 5 standard errors of an ideal source. The measured rate must be 3368 Mbit/s at 62.5 MHz, with nothing dropped. Runs in a few seconds. |
| `tb_toeplitz_extractor` | full size, random seed. Results checked against the full-matrix product; 3-clock latency; 19-clock spacing; also with idle clocks between words. |
| `tb_matrix_builder`, `tb_submatrix_mult`, `tb_vector_accum` | each stage at reduced size. The sub-matrix test builds the slice row by row from the Toeplitz shift property. |
| `tb_iddr_capture`, `tb_input_router`, `tb_data_select_deser`, `tb_ddr3_wr_fifo` | input side, with related and unrelated clocks. |
| `tb_output_mux`, `tb_async_fifo`, `tb_tx_control`, `tb_cmd_decoder` | output side: full and empty FIFO, dropped results, link switching, command arbitration. |

To change the hash size, override `M`, `N`, `K` on `trng_postproc_top` or on
`toeplitz_extractor`. `N` must be a multiple of `K`, and `M` a multiple of 256.
On the top, `K` must also be a multiple of 40 (the selected bits per ADC
word). The seed port grows to `M + N - 1` bits.
