# Telecommand receiver core for the CCSDS short LDPC codes

A spacecraft's telecommand (TC) receiver has a simple job. It takes the demodulated soft symbols of the uplink and finds where a command unit begins. That unit is a CLTU: a 64-symbol start sequence, then codewords, then an optional 128-symbol tail. The receiver decodes every codeword and notices where the unit ends. There are two CCSDS rate-1/2 LDPC codes for this:

* **LDPC(512,256)**, for near-earth links at tens of ksps. It is decoded by iterative normalized min-sum (NMS). An NMS decoder reliably *fails* when it runs past the end of a CLTU, and that failure is used as the end-of-unit marker, so no tail is needed.
* **LDPC(128,64)**, for deep-space links at very low rates. This code is short enough for a *hybrid* decoder. NMS runs first. If it fails, a most-reliable-basis (MRB) search follows, which comes close to maximum-likelihood performance. MRB always returns a codeword, so decoder failure cannot mark the end of the CLTU. A tail sequence is checked after every codeword instead.

This repository holds the hardware part of such a receiver in synthesizable SystemVerilog (IEEE 1800-2017):

```
 samples ─► soft_quantizer ─► slrt_frame_sync ─► cltu_controller ─► nms_decoder ─► cw_bits / cw_ok
                                 (start / tail      (cuts blocks,      (serial NMS,
                                  detection,         sign correction,   both codes)
                                  polarity)          CLTU end)
 software (MRB Part 1) ─► mrb_part2 (TEP generator, pre-encoder, 3 TEUs, best-candidate selector) ─► software
```

Parts that stay outside `tc_receiver_top` are left out on purpose:

* the carrier/subcarrier/symbol tracking loops and the SNR estimators;
* the embedded processor and its bus;
* the first, software half of the MRB decoder.

Their values appear as plain ports on the top.

## Files

| file | contents |
|---|---|
| `rtl/tc_pkg.sv` | Shared constants: soft-symbol format, the quasi-cyclic parity-check table, start and tail sequences |
| `rtl/tc_receiver_top.sv` | Top level: the receive chain plus the MRB accelerator |
| `rtl/soft_quantizer.sv` | Scaling, rounding and saturation to 6-bit (or 3-bit) symbols |
| `rtl/slrt_frame_sync.sv` | S-LRT start/tail sequence detector |
| `rtl/cltu_controller.sv` | CLTU reception and termination |
| `rtl/nms_decoder.sv` | Serial NMS decoder: controller, banks, syndrome |
| `rtl/nms_cpu.sv`, `rtl/nms_vpu.sv` | Check-node unit and variable-node unit |
| `rtl/nms_mem_bank.sv` | 64 x 6 message memory |
| `rtl/mrb_part2.sv` | MRB search controller |
| `rtl/mrb_inputs.sv` | G* memory, FC register, received-word buffer |
| `rtl/tep_generator.sv` | Test-error-pattern counters |
| `rtl/pre_encoder.sv` | Shared pre-encoded candidate |
| `rtl/teu.sv` | TEP evaluation unit |
| `rtl/best_candidate_selector.sv` | Minimum search and quick escape |
| `tb/tb_<module>.sv` | A self-checking testbench for each module |
| `tb/tb_nms_cer.sv` | Error-rate spot checks of the decoder at the specified operating points |
| `tb/tb_hybrid_cer.sv` | The same for the hybrid NMS + MRB decoder of the short code |

## The parity-check matrix and the NMS schedule

Both codes use the same layout of H: 4 x 8 blocks of Q x Q circulants, with Q = 16 for the short code and Q = 64 for the long code. Each block row has seven non-zero blocks. One of them, on the diagonal, is the sum of two permutations. So H has 32 *edge groups*, each a single shifted identity:

* every check has degree 8;
* block columns 0–3 have degree 5 and block columns 4–7 have degree 3.

`tc_pkg::EDGES` lists, for each edge group, its block row, its block column and its shift for each code. `COL_EDGE` lists the edge groups of each block column. The convention is that P^s has a one at (i, (i+s) mod Q). The shift values are the CCSDS TC code values as recalled from the standard. **Check them against the CCSDS recommendation (CCSDS 231.0-B) before using this on a real link.** The decoder and its testbench work for any table of this shape, and the testbench derives its codewords from the same table.

The decoder is fully serial. It has one check-node unit (CPU), one variable-node unit (VPU) and 40 memory banks:

* 32 edge banks, one per edge group, each holding that group's Q messages;
* 8 LLR banks, one per block column.

Edge group e, check row r and variable column c meet where c = (r + s_e) mod Q. So in the horizontal step, check r of block row b reads address r in all eight banks of that row. In the vertical step, variable c of block column j reads address (c − s_e) mod Q in each of its 3 or 5 banks. The conflict-free access needs no permutation network, only an adder per bank address.

Timing, all in clocks:

* **Horizontal step.** 4 per check (address, read, min, write), so 4·4Q = 256 (Q = 16) or 1024 (Q = 64).
* **Vertical step.** 5 per column (address, read, sum, extrinsic, write), so 5·8Q = 640 or 2560.
* **Initial pass.** A first vertical step with zero check messages loads v2c = channel LLR. It also gives the hard decisions of the channel word, so a clean word finishes without iterating.
* **Syndrome check.** The syndrome is XOR-accumulated while the vertical step writes hard decisions. It is tested in one clock after each vertical step, so the decoder stops as soon as it succeeds.

Latency from `start` to `done` is (40Q+1) + iters·(56Q+1) + 2 clocks. At the 50-iteration limit that is:

* 45,493 clocks (0.45 ms at 100 MHz) for LDPC(128,64);
* 181,813 clocks (1.82 ms) for LDPC(512,256).

At 64 ksps a long codeword arrives every 8 ms, so the decoder is idle most of the time.

Arithmetic details:

* messages are 6-bit two's complement, saturated to ±31;
* a positive LLR means bit 0;
* the check node computes min1, min2, the index of min1 and the sign product, then scales by α = 3/4 (`ALPHA_NUM`/`ALPHA_SHIFT`, rounded toward zero).

The LLR banks have two pages, so the next codeword can be written while the current one is decoded (`llr_page`, `start_page`).

## The MRB search (Part 2)

Software does the first half of the decoder:

* sorts the 128 received symbols by reliability;
* finds 64 independent most-reliable positions with Gauss–Jordan elimination;
* builds the systematic generator matrix G* for them;
* encodes their hard decisions into the first candidate FC.

It then writes G* (64 rows of 128 bits), FC and the reordered received word (128 x 6 bits) into `mrb_inputs`.

The hardware then tries test error patterns (TEPs). A TEP of weight w flips w of the 64 most reliable bits. Its candidate codeword is FC ⊕ the w corresponding rows of G*. The candidate's distance to the received word is the sum of |y_j| over all positions where the candidate bit differs from the hard decision of y_j.

A TEP of weight ≤ 4 is written as [a, X, Y, Z], each index being 0 (unused) or 1..64. The indices are kept in canonical order a > X > Y > Z, with zeros last. `tep_generator` is a cascade of counters:

* Z runs over 0..Y−1, Y over 0..X−1, and X over 0..63;
* for each [X, Y, Z], the first index a runs from X+1 to 64 (or from 0 when X = 0, which includes FC itself);
* a is handed out `N_TEU` values at a time, one per TEU.

The pre-encoded word FC ⊕ G*[X] ⊕ G*[Y] ⊕ G*[Z] is shared by all TEUs. It is rebuilt only when [X, Y, Z] changes. Each TEU adds its own row G*[a] and accumulates the distance `C` bits per clock, which takes 128/C clocks. The selector keeps the closest candidate, with ties going to the earlier one. It stops the search early (*quick escape*) when the best distance falls to `qe_thr`. The search also ends after `max_teps` TEPs or after the last pattern of the chosen order.

One group of `N_TEU` TEPs costs 128/C + 1 clocks, plus one clock for each new pre-encoding. With the defaults (3 TEUs, C = 8), a 400,000-TEP order-4 search takes 2,352,727 clocks (23.5 ms at 100 MHz). That is well inside the 27.9 ms available per codeword at 2 kbps. The result is returned in the reordered positions. Software undoes the sort.

## Start and tail detection (S-LRT)

`slrt_frame_sync` computes the sequential likelihood-ratio metric over a window of soft symbols y and the stored ±1 sequence s:

Λ = |Σ y_k s_k| − Σ |y_k|

Λ is never positive. It equals 0 when every symbol agrees with the sequence, or when every symbol is inverted. Taking the absolute value makes the test blind to the sign of the carrier-phase ambiguity, and the sign of Σ y_k s_k then gives the polarity of the stream. That polarity is used later to sign-correct every codeword. A detection is declared when Λ ≥ threshold. The thresholds are ports (≤ 0).

The unit has two modes:

* **Start mode.** The metric is evaluated on every new symbol over the last 64 symbols.
* **Tail mode.** The metric is evaluated once per codeword over the last 128 symbols, when the CLTU controller pulses `tail_eval`.

The window is ignored until 64 symbols have been seen, and while it holds only zeros. `start_det` comes 2 clocks after the symbol. `tail_done` comes 1 clock after `tail_eval`.

The default sequences are:

* start: `034776C7272895B0` (hex);
* tail: `5555_5556_AAAA_AAAA_5555_5555_5555_5555` (hex).

The first symbol is the MSB, and bit 0 is sent as +1. These are the CCSDS values as recalled from the standard. They are parameters, so they can be corrected without touching the logic.

## CLTU flow

`cltu_controller` waits for `start_det`. It then cuts the following symbols into blocks of n symbols (128 or 512) and writes each symbol, multiplied by the detected polarity, straight into the decoder's LLR page. After each block it starts the decoder on that page and switches to the other page.

* **LDPC(128,64) with `tail_en`.** After each block the tail test is run on that same block: n = 128 equals the tail length. A detected tail ends the CLTU (`end_by_tail`). A decoder failure does not end it. The failure is reported by `cw_done` with `cw_ok = 0`, and software then runs the MRB search.
* **Without a tail (the LDPC(512,256) case).** The first decoder failure ends the CLTU.

`overrun` flags a block that completes while the decoder is still busy. Such a block is dropped, and the flag stays set until reset. With the default sizes this cannot happen at the data rates of either link. Input samples must be at least 4 clocks apart (an assertion checks this). At 64 ksps and 100 MHz they are about 1,560 clocks apart.

## Quantizer

`soft_quantizer` scales the demodulator output by 2^−`q_shift`, rounds to nearest and saturates symmetrically. The limit is ±31 for 6-bit symbols or ±3 when `q3` is set, which selects 3-bit quantization. A 3-bit value v is passed on as 8v (levels 0, ±8, ±16, ±24). With v itself, the decoder's integer scaling by 3/4 would turn every message of magnitude 1 into 0, and decoding at 3 bits would collapse.

## Where this design departs from the description it follows

* **Syndrome check.** It is done in 1 clock per iteration, overlapped with the vertical step. It is not a separate pass once per decoding (144 clocks for the short code, 528 for the long code). This adds an early stop.
* **Initial vertical pass and double-buffered LLR banks.** Both are additions.
* **MRB groups.** Each group costs 128/C + 1 clocks, not 128/C, plus one clock per new pre-encoding. At the defaults this is about 11% over the ideal 21 ms.
* **Pre-encoder.** It has a single 128-bit register, loaded in a clock of its own, not a double-buffered pair.
* **Normalization factor.** α = 3/4 is this design's choice.
* **Quick escape.** It uses one threshold.
* **S-LRT guard.** The start-up guard of the S-LRT window is an addition.
* **S-LRT mode.** The start/tail mode of the detector is switched by the CLTU controller, not by software.
* **Fixed iteration count.** The latency budget this design was sized against assumes all 50 iterations and then one syndrome check for every codeword. This decoder stops at the first zero syndrome. Its worst case (45,493 and 181,813 clocks) is about 1.2 % over that budget (44,944 and 179,728), because of the initial pass and one extra clock per iteration. It keeps its syndrome in a 256-bit register rather than in RAM.
* **Not built.** The partially parallel NMS variant (4 check units and 8 variable units) and the other TEU configurations (1 TEU with C from 1 to 32, more TEUs) are not built. `N_TEU` and `C` are parameters, so these can be tried: C must divide 128.
* **Not verified against the standard.** The parity-check shifts and the two sync sequences are recalled values and have not been verified against the standard (see above). Everything else in the testbenches is checked against models written from the same table and sequences. A wrong shift would therefore not show up in simulation.

## Simulating

Each testbench is self-checking. It ends with a line `TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/tc_pkg.sv tb/tb_nms_decoder.sv --top-module tb_nms_decoder -o sim
./obj_dir/sim
```

Replace `tb_nms_decoder` with any other testbench. The ones worth knowing:

* **`tb_tc_receiver_top`.** Runs the whole top at its default parameters. It sends noisy CLTUs for both codes, in both polarities, with and without tails. Short codewords that NMS cannot decode are sent through a behavioural model of MRB Part 1 (sorting, Gauss–Jordan) and the hardware search. The testbench counts each mechanism (start detection in both polarities, end by tail, end by decoder failure, multi-iteration decoding, MRB search and quick escape) and fails if one never occurred. It runs in about 20 s.
* **`tb_nms_decoder`.** Compares the decoder bit for bit and in iteration count with a reference NMS model. It also checks the latency formula above, including the 50-iteration worst case for both codes.
* **`tb_mrb_part2`.** Compares the search with a nested-loop reference (best distance, TEP, codeword, TEP count and exact clock count). It includes the 400,000-TEP sizing case and checks it against the 2 kbps time budget.
* **`tb_nms_cer`.** Sends noisy all-zero codewords over a Gaussian channel at the operating points the receiver is specified for:
  * LDPC(128,64) at Es/N0 = 2.5 dB with 6-bit symbols and at 2.7 dB with 3-bit symbols (1000 words each);
  * LDPC(512,256) at 0.8 dB with 6-bit symbols (200 words).

  No word was decoded wrongly at any of these points. This only bounds the error rate to about 10⁻³, far above the 10⁻⁵ target. A point at −2 dB shows the decoder failing on most words.
* **`tb_hybrid_cer`.** Runs the complete hybrid decoder of the short code: NMS first, then a behavioural MRB Part 1 model and the MRB hardware at order 4 with 400,000 TEPs. It uses random codewords.
  * At 0.7 dB: 150 words, with 1 NMS failure, which the MRB search corrected.
  * At −0.5 dB: 40 words, with 5 NMS failures, all corrected by MRB.

  Each MRB search took 2,352,727 clocks. It runs in about 30 s.
* **`tb_tep_generator`.** Runs with K = 12, so that the complete order-4 enumeration can be checked exhaustively.
