# Parallel-serial LDPC decoder and error-floor emulation platform

An LDPC code's error floor shows up only at bit error rates of 1e-10 and
below. Reaching those rates takes about 1e11 decoded bits, which software
simulation cannot deliver. This design puts the whole experiment in
hardware:

- a noise source generates channel LLRs for the all-zeros codeword;
- a fixed-point decoder for the (2048,1723) Reed-Solomon based LDPC code
  decodes them;
- counters accumulate frame and bit errors;
- when a frame fails, the soft decisions of its last 16 iterations are kept
  in an external memory, so the failure can be analysed (oscillating
  errors, absorbing sets);
- a second decoder with a longer wordlength decodes the same channel values.
  It shows whether each failure comes from the short wordlength or from the
  code itself.

The decoder is the core of the design. It uses a *parallel-serial*
architecture that fits any code whose parity-check matrix is an array of
permutation matrices. It needs one processing unit per column group and only
one global check node.

## The code

The parity-check matrix H is 384 x 2048 and (6,32)-regular: every bit is in
6 checks and every check covers 32 bits. It is a 6 x 32 array of 64 x 64
permutation matrices. In the RTL these are `GAMMA` = 6 row groups, `RHO` = 32
column groups and `DELTA` = 64.

The RS-based construction works over GF(64), with primitive polynomial
x^6 + x + 1. Block (g, j) connects row r of row group g to this column of
column group j:

    c = r XOR alpha^((g + j) mod 63)

Each block is therefore a permutation. Two rows never share more than one
column, so there are no 4-cycles. The resulting H has GF(2) rank 325, which
gives dimension 1723. All of this lives in `ldpc_pkg::h_col`. The address
tables are built from that function at elaboration. To target another member
of the family, change the function and the size parameters.

## Decoder architecture (`ldpc_decoder`)

Unit j (`proc_unit`) owns bits 64j .. 64j+63. It contains:

- **M0 bank.** Bit-to-check messages, 6 per bit (one per row group). Each
  word also carries the bit's current hard decision.
- **M1 bank.** Check-to-bit messages, in the same order.
- **Prior buffer.** The 64 channel LLRs of the unit's bits.
- **Address table (`addr_lut`).** For check (g, r), gives the local bit the
  check touches in this column group.
- **Φ tables, local marginalization, and a serial bit node (`bit_node`).**

Both banks store messages in *bit-node order*: word = bit, lane = row group.
So M1 is read sequentially, and only M0 needs the address table.

**Check-to-bit operation.** This takes 384 cycles, one check per cycle,
row group outer and row inner.

1. Every unit reads the M0 message its address table names.
2. It converts the magnitude to the Φ domain, where Φ(x) = -ln tanh(x/2).
3. It sends the Φ value, the sign and the hard decision to the single
   `check_node`.
4. The check node returns the sum of the 32 Φ values and the XOR of the 32
   signs.
5. Each unit subtracts its own Φ term and removes its own sign. The result
   is the extrinsic message, which it writes to M1.

Only this sum and sign cross the design. All marginalization happens inside
the units.

**Bit-to-check operation.** This also takes 384 cycles, one edge per cycle,
bit outer and lane inner.

1. The unit reads M1 sequentially and applies Φ⁻¹ to each message. Φ is its
   own inverse, so the same table serves.
2. The bit node adds the prior and the 6 messages of a bit. This gives the
   posterior LLR once every 6 cycles.
3. A 6-deep delay line returns each message 6 cycles later. The bit node
   subtracts it from the posterior (marginalization) and writes the result
   back to M0.
4. The sign of the posterior is the hard decision. It goes into M0 with the
   message and is also output as the decoder's result stream.

### Schedule and the stall

`decoder_ctrl` sequences the decoder:

| phase  | cycles | what happens |
|--------|--------|--------------|
| LOAD   | 64     | one prior per unit per cycle, written to all 6 lanes of M0 and to the prior buffer |
| C2B    | 384    | check-to-bit |
| STALL1 | 3      | drain the check-to-bit pipeline so the last M1 writes land |
| B2C    | 384    | bit-to-check |
| STALL2 | 8      | drain the bit-node pipeline so the last M0 writes land |
| DONE   | 1      | `done_o` |

Each operation reads the memory the previous one wrote, and both are
pipelined. The two stalls provide read-before-write consistency: without
them, the first reads of the next operation would see stale messages.

A one-iteration frame takes 843 cycles plus the DONE cycle. That is 2048/844
≈ 2.43 bits per cycle, compared with 2.46 ideal and about 2.41 measured
including overhead. Each further iteration adds 384 + 3 + 384 + 8 = 779
cycles.

### Stopping

A frame runs until the iteration limit (`iter_limit_i`; 0 counts as 1). It
can also end early:

- From the second iteration on, every M0 word carries the hard decision from
  the previous bit-to-check pass.
- During check-to-bit, the check node XORs these decisions. This costs no
  extra pass.
- If all 384 checks are satisfied, the frame ends after that check-to-bit
  phase and reports `converged_o`.

A frame whose decisions form a codeword after iteration k therefore stops
after the check-to-bit phase of iteration k+1. The decision stream of
iteration k is already the decoder output.

### Message formats and timing details

- **Messages** are W-bit sign-magnitude: 1 sign bit and W-1 magnitude bits,
  with FRAC fraction bits. The defaults are W = 6 and FRAC = 2. The sign is
  1 for "more likely a 1".
- **Φ tables.** `phi_lut` computes its table at elaboration as
  round(Φ(i/2^FRAC)·2^FRAC), saturated to the largest magnitude. Entry 0
  uses half an LSB because Φ(0) is infinite.
- **Check-node sum.** This is exact, with W-1+5 bits. The marginalized value
  saturates before it is written to M1.
- **Bit node.** It accumulates in W+3 bits of two's complement, which cannot
  overflow. Bit-to-check messages saturate to W bits.
- **Latency.** Check-to-bit: 3 cycles from issue to the M1 write, one of
  them the check-node register. Bit-to-check: 8 cycles from the M1 read to
  the M0 write.
- **Memories** read synchronously, as block RAM does, and are not reset.
  Control state uses an asynchronous active-low reset.

The interface of the decoder is as follows:

1. Pulse `start_i`.
2. Supply 64 words of 32 LLRs with `llr_valid_i`/`llr_ready_o`. Word k holds
   bits 64j + k.
3. After every bit-to-check pass, the decoder emits 64 strobes
   (`hd_valid_o`). Each strobe carries 32 posteriors and decisions, tagged
   with the iteration number.

## Emulation platform (`emu_top`)

`emu_top` wires these parts together:

- **`awgn_gen`** produces one LLR per unit per cycle. Each lane is a 64-bit
  xorshift generator. The sum of its 8 state bytes, minus 1020, is an
  approximately Gaussian sample with a standard deviation of 209. The SNR is
  set by two host numbers: the mean LLR 2/σ² (8 fraction bits) and the LLR
  spread per noise unit (16 fraction bits).
- **`ldpc_decoder`**, described above.
- **`trace_writer`** counts the hard-decision ones in every iteration. With
  the all-zeros codeword these are the bit errors. It keeps the last 16
  counts in a ring, readable through `err_idx_i`/`err_cnt_o`. It also writes
  every iteration's posteriors to the external SRAM port. Each word is 32
  posteriors of 9 bits. The address is {iteration mod 16, bit}, so the
  memory always holds the final 16 iterations of the current frame.
- **Platform FSM.** States are IDLE, START, RUN, BOOK and HOLD. It runs
  `frame_limit_i` frames, or runs until `host_stop_i`, and counts frames,
  failed frames, bit errors and converged frames. After a failed frame it
  waits in HOLD, with `fail_pending_o` set, until the host has read the
  trace and pulses `ack_i`. The trace is then not overwritten.

- **Post-processing decoder.** This is a second `ldpc_decoder` with
  `W_PP` = 8 and `FRAC_PP` = 3. Its iteration limit is set separately with
  `pp_iter_limit_i`. The noise generator gives it the same noise sample,
  rounded to one more fraction bit (`llr_pp_o`). Both decoders start
  together, and a frame ends when both are done. For each frame the main
  decoder fails, the platform records whether the wide decoder decoded it
  (`pp_frames_o`, `pp_corrected_o`). It also keeps the wide decoder's
  residual error count and iteration count.

  Errors that the extra precision removes (oscillations) are wordlength
  effects. Errors that survive are structures of the code, such as
  absorbing sets. Running the wide decoder on every frame gives the same
  answer as re-decoding only the failures, without having to store or
  replay the channel values.

The embedded processor, its serial terminal link and the SRAM chip are not
part of the RTL. Their connections are the top's ports.

## How this design relates to its source

The following match the published architecture:

- the code and its sizes;
- the column-group split into 32 units;
- the shared check node with local marginalization;
- the serial bit node with its FIFO;
- the two memories accessed alternately, and the address table on M0;
- the load, check-to-bit and bit-to-check schedule, with a stall between
  operations;
- a 16-iteration error trace;
- an on-chip noise source;
- wordlengths of 5, 6 and 9 bits, set by the `W` parameter.

The following are choices made here:

- **Parity-check matrix.** The evaluation points (alpha^j) and coset
  representatives (alpha^g) of the RS construction. Any other choice gives
  an equivalent code.
- **Quantization.** FRAC (2 fraction bits at W = 6) and the rounding of the
  Φ tables. The source states only that quantization is uniform.
- **Early termination.** The syndrome check on the previous iteration's
  decisions. It needs one extra bit per M0 word, so M0 is (W+1) bits wide.
- **Prior buffer.** The priors are kept in a separate buffer, and M0 is
  loaded on all 6 lanes at once. This makes the total memory 172,032 bits,
  against the 2wρM = 147,456 bits of the published formula.
- **Stall lengths.** 3 and 8 cycles, which is what this pipeline needs.
- **Output stream.** Hard decisions come out as a stream rather than a
  stored 2048-bit word.
- **Noise source.** The type of noise generator and the way the SNR is
  encoded.
- **Host protocol.** The host interface, the counters, and the hold-on-
  failure handshake.
- **Post-processing.** Running the wide decoder alongside the main one, and
  its fraction-bit count.

Not built:

- **Run-time table rewriting.** The tables are fixed at elaboration.
- **Enabling and disabling units** for other block lengths. Change `RHO`
  instead.
- **The processor, terminal link and SRAM device.**
- **The floating-point reference decoder** used in the analysis. It is
  software.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. To
build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/emu_top_tb.sv \
        -y rtl -y tb --top-module emu_top_tb -Mdir obj_emu
    ./obj_emu/Vemu_top_tb

| testbench | what it checks |
|-----------|----------------|
| `phi_lut_tb`, `addr_lut_tb`, `msg_bank_tb`, `check_node_tb` | tables against Φ and H recomputed in the bench; memory read/write; sums and parities against random inputs |
| `bit_node_tb` | posteriors, marginalized messages, saturation, flush |
| `proc_unit_tb` | one unit against a message-level model with the check node modelled in the bench |
| `decoder_ctrl_tb` | phase lengths (843-cycle frame), stalls, early stop, iteration limit, abort |
| `ldpc_decoder_tb` | full decoder, bit-exact against a reference decoder in the bench (`decoder_bench`), at W = 6 and also at W = 5, 8 and 9 |
| `awgn_gen_tb`, `trace_writer_tb` | noise mean and spread; error counts and trace-memory writes |
| `emu_top_tb` | whole platform at full size: 20 frames at 4 dB, then σ = 0.8 with 5 iterations, then 4 dB with the main decoder cut to 2 iterations, so that the 8-bit decoder must recover the failures; every failed trace is recounted from a memory model; counts each mechanism (early stop, iteration limit, stall, hold, SNR change, post-processing correction) |
| `emu_trace200_tb` | the error-trace experiment: a 200-iteration failing frame, with the table of bit-error counts for iterations 185–200 rebuilt from the memory; then 5 frames at 5.2 dB |

Both platform benches run the top with its default parameters. Each takes
well under a minute.

## Limits

- Error rates at the floor cannot be reproduced in simulation. The benches
  check correctness, cycle counts and mechanisms, not BER curves.
- Timing closure at a particular clock rate has not been checked.
- The bit-exact reference in `decoder_bench` follows the same fixed-point
  rules as the RTL. It confirms the implementation of those rules, not
  their choice.
