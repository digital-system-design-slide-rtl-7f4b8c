# Iterative DES decryption circuit with an FPGA board testbed

This is a DES (Data Encryption Standard) decryption engine, plus the testbed
that exercises it on an Altera DE2-class board. The design follows the DES lab
of an undergraduate digital-system-design course: "Lab 2, DES decryption
circuit and testbed".

The engine has one DES round function and runs it sixteen times, one round per
clock. This keeps it small. A 64-bit ciphertext block and a 64-bit key go in,
and 16 clocks later the 64-bit plaintext comes out. With a steady supply of
work it returns one block every 16 clocks. For example, at the board's 50 MHz
clock that is 3.125 M blocks/s, or 200 Mbit/s.

The testbed gets test vectors from ROMs and queues them in a FIFO. The engine
decrypts them and puts the results in a second FIFO. A checker then compares
each result with the expected plaintext and shows the outcome on the board's
LEDs.

## DES decryption in one paragraph

DES is a 16-round Feistel cipher:

1. The 64-bit block goes through a fixed bit permutation (IP) and is split into
   two halves, L and R.
2. Each round computes `L' = R` and `R' = L xor f(R, K_i)`, where K_i is that
   round's 48-bit key.
3. After round 16 the two halves are swapped and go through the inverse
   permutation IP^-1.

Decryption is the same circuit with the round keys in reverse order
(K16 first, K1 last). That order is the main difference from an encryption
engine, and it is handled entirely in the key unit.

The round function `f` works in three steps:

- It expands R from 32 to 48 bits (E-box).
- It xors the result with the round key and cuts it into eight 6-bit groups.
  Each group addresses its own 64 x 4-bit ROM (S-boxes 1..8), and the eight
  4-bit results form a 32-bit word.
- It permutes that word (P-box).

A single 2^48-word ROM, or 32 logic functions of 48 inputs each, would be far
too large. The eight small ROMs are the standard way around that.

## Bit numbering

DES numbers bits from 1 at the most significant end. Every permutation table in
`rtl/des_pkg.sv` is kept in the standard's form. Table entry `t` of an N-bit
input selects `din[N-t]`, and entry `i` (counting from 0) drives
`dout[M-1-i]` of an M-bit output. The permutation modules are therefore pure
wiring.

In an S-box address `b1..b6` (`b1` = MSB), the row is `{b1,b6}` and the column
is `b2..b5`. S-box 1 takes the most significant six bits and produces the most
significant nibble.

## The key schedule, run backwards (`des_key_unit`, `des_control`)

This is the part that takes the most thought.

First, permuted choice 1 (`des_key_permute`, PC-1) reduces the key to 56 bits.
It drops the eight parity bits (bits 8, 16, ..., 64), so they have no effect at
all. The 56 bits form two 28-bit halves, C and D. For encryption, C and D are
rotated **left** before each round by 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1 places.
The rotations add up to 28, so after round 16 the halves are back where they
started: C16 = C0 and D16 = D0.

Decryption needs K16 first, and K16 = PC2(C16, D16) = PC2(C0, D0). So:

- Round 1 of decryption uses PC-1 of the key **unrotated**.
- Each later round rotates the halves **right** by the encryption amount of the
  matching round, read backwards:

| decryption round (clock of the block) | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| right rotation before the round        | 0 (load) | 1 | 2 | 2 | 2 | 2 | 2 | 2 | 1 | 2 | 2 | 2 | 2 | 2 | 2 | 1 |
| `loaddata_s1`                          | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| `shifttwo_s1`                          | 0 | 0 | 1 | 1 | 1 | 1 | 1 | 1 | 0 | 1 | 1 | 1 | 1 | 1 | 1 | 0 |

In hardware, a multiplexer selects either PC-1 of the new key (`loaddata_s1`)
or the registered C/D rotated right by one or two places (`shifttwo_s1`). The
multiplexer output feeds PC-2, which produces the round key for *this* clock.
It is also written back into the C/D registers.

The rotation therefore happens in front of the round that uses it. The round
key is ready in the same clock as the round, and no extra clock is needed.

The lab's control table gives the same `loaddata_s1` row. Its `shifttwo_s1`
row has a 1 in clock 2. That would rotate the key 29 places in total, and DES
needs 28. This design puts a 0 there, as the DES key schedule requires. All 16
round keys are checked against the standard's worked example.

## One block through the engine (`des_decrypt`)

```
clock      1          2 .. 16              17
control    loaddata   shifttwo per table   out_valid (DONE)
datapath   IP(ct) -> round 1 -> L/R   rounds 2..16   out = IP^-1({R16, L16})
key unit   PC1(key) -> K16   K15 .. K1
```

- **Clock 1.** The block is accepted in a clock with `in_valid && in_ready`.
  In that clock, `loaddata_s1` steers IP(ciphertext) and PC-1(key) straight
  into the round logic, so round 1 is computed in the accepting clock. The key
  and the ciphertext need to be valid only in that clock.
- **Clocks 2 to 16.** The rounds run from the L/R and C/D registers.
- **Clock 17.** `out_valid` is high, and the output is taken straight from the
  L/R registers through the swap and IP^-1.

The result is held until `out_ready`. The clock in which it is taken can
already be clock 1 of the next block. So the engine is never idle between
blocks unless its input is empty or its consumer is full. Latency is 16 clocks
from acceptance to `out_valid`, and throughput is one block per 16 clocks.

Ports: `clk`, `rst_n` (asynchronous, active low), `in_valid/in_ready/in_key/in_data`
and `out_valid/out_ready/out_data` (all data 64 bits).

### Control state machine

The control state machine has three states:

- `IDLE`: `in_ready` is high.
- `ROUND`: a 4-bit counter steps through rounds 2..16 and indexes
  `SHIFTTWO_SCHEDULE` in `des_pkg`.
- `DONE`: `out_valid` is high, and `in_ready` follows `out_ready` so the next
  block can start in the hand-over clock.

The state machine carries two assertions: an offered result stays offered, and
no rotation happens in a load clock. `des_decrypt` adds a third: the result
does not change while it waits.

## The board testbed (`des_testbed_top`)

```
 input ROM  --> vector loader --> input FIFO --> des_decrypt --> output FIFO --> result checker --> LEDs
 {key, ct}                      (FWFT, depth 4)               (FWFT, depth 4)   ^                  LCD words
                                                                                 expected ROM (pt)
```

- **ROMs** (`des_vector_rom`). These are synchronous-read arrays filled by
  `$readmemh` (one clock of latency, like FPGA block RAM). The input ROM holds
  128-bit words: the key in the upper half, the ciphertext in the lower half.
  The expected ROM holds 64-bit plaintexts. Because every entry has its own
  key, a run also exercises key changes.
- **FIFOs** (`des_fifo`). These are first-word-fall-through FIFOs: the head
  word is visible while `empty` is low, and `rd_en` pops it in the same clock.
  A write while full, or a read while empty, is ignored. Assertions flag both,
  because the users must never do either.
- **Vector loader** (`des_vector_loader`). It reads one ROM word every two
  clocks and writes it to the input FIFO. While the FIFO is full it holds the
  word and raises `full_stall`. The loader is eight times faster than the
  engine, so the input FIFO runs full in every run.
- **Result checker** (`des_result_checker`). It pops each result, compares it
  with the expected ROM word, and counts passes and failures (8-bit counters
  that stop at 255). It keeps the last result and its expected value for the
  LCD. Its `pause` input stops reading. The output FIFO then fills up, and the
  engine has to hold its result, which tests the stall path on hardware.

### Board I/O

| signal | use |
|---|---|
| `CLOCK_50` | 50 MHz clock |
| `KEY[0]` | reset while pressed (asserted at once, released on the clock) |
| `KEY[1]` | press to start a run over all vectors |
| `SW[0]` | pause the checker |
| `SW[3:2]` | which 16-bit slice of the last plaintext LEDR[15:0] shows |
| `SW[4]` | LEDR[15:0] shows `{pass count, fail count}` instead |
| `LEDR[16]`, `LEDR[17]` | loader done; loader stalled on a full FIFO |
| `LEDG[0]`, `LEDG[1]`, `LEDG[2]` | run checked; all passed; a failure was seen |
| `LEDG[3]`, `LEDG[4]`, `LEDG[5]` | run in progress; input FIFO full; output FIFO full |
| `LEDG[6]`, `LEDG[7]` | output FIFO empty; input FIFO empty |
| `lcd_result`, `lcd_expected` | last plaintext and its expected value, for a character-LCD driver |

`KEY[1]` and `SW[0]` pass through two-flop synchronisers, and the reset is
synchronised on release. The buttons are not debounced. A bounce on `KEY[1]`
only restarts the run.

The board's LCD controller is not part of this RTL. The two 64-bit words it
would display are brought out as ports.

### Test vectors

There are eight vectors:

- the standard's worked example (key `133457799BBCDFF1`, plaintext
  `0123456789ABCDEF`, ciphertext `85E813540F0AB405`)
- key `0E329232EA6D0D73` with plaintext `8787878787878787`, whose ciphertext is
  all zeros
- `"Now is t"` under key `0123456789ABCDEF`
- a NIST variable-plaintext vector
- two NIST S-box vectors
- two random vectors

Each line of `rtl/des_input_vectors.hex` is `<key><ciphertext>`, 32 hex
digits. Each line of `rtl/des_expected_vectors.hex` is the 16-digit plaintext.

To use other vectors, change the files and set `NUM_VECTORS` to their line
count. The files are read by paths relative to the directory the simulator or
synthesis tool runs in: the `INPUT_VECTORS` and `EXPECTED` parameters, which
default to `rtl/...`.

## Files

| module | role |
|---|---|
| `des_pkg` | all permutation tables, the eight S-boxes, the rotation schedule, the FIFO word type |
| `des_in_permute`, `des_out_permute` | IP and IP^-1 |
| `des_key_permute`, `des_pc2_box` | PC-1 (64 to 56 bits) and PC-2 (56 to 48 bits) |
| `des_e_box`, `des_p_box` | expansion and permutation of the round function |
| `des_s_box`, `des_sbox_rom` | substitution box: eight 64 x 4 ROMs |
| `des_datapath` | L/R registers, load multiplexer, one round, output swap and IP^-1 |
| `des_key_unit` | C/D registers, right rotator, load multiplexer, PC-2 |
| `des_control` | control-path state machine |
| `des_decrypt` | the engine |
| `des_fifo`, `des_vector_rom`, `des_vector_loader`, `des_result_checker` | testbed parts |
| `des_testbed_top` | board top level |

Each module has a testbench `tb/tb_<module>.sv`.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Run from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/des_pkg.sv \
    tb/tb_des_testbed_top.sv --top-module tb_des_testbed_top -Mdir obj && obj/Vtb_des_testbed_top
```

Swap in any other `tb_*` name for a single block. All testbenches except the
random stress test run in well under a second.

What they establish:

- **Permutations and S-boxes.** Known answers from an independent software DES,
  including the intermediate values of the standard's worked example
  (IP = `CC00CCFFF0AAF0AA`, E(R0) = `7A15557A1555`, S-box output `5C82B597`,
  f = `234AA9BB`). Also IP^-1(IP(x)) = x for random x, and every S-box row is a
  permutation of 0..15.
- **Key unit.** All 16 round keys, in decryption order, for two keys.
- **Datapath.** Full decryptions with externally supplied round keys.
- **Control.** The `loaddata_s1`/`shifttwo_s1` waveform clock by clock, the
  hold, the hand-over and the return to idle.
- **Engine.** 16 vectors with random producer gaps and consumer stalls. It
  checks exact 16-clock latency and one block per 16 clocks back to back.
- **Vector files.** `tb_des_file_vectors` reads the two vector files line by
  line, applies each pair, waits for the result, and prints the output, the
  expected value and their xor difference. This is the classic vector-file
  testbench flow.
- **Random stress.** `tb_des_random_stress` drives the engine with 3000 blocks.
  Each block has its own random key and plaintext, and
  `tb/des_ref_pkg.sv` encrypts it first. That package is a behavioural DES
  model, checked against published answers. The run adds weak keys,
  parity-bit-only key changes, random input gaps and output stalls. It takes
  about 20 seconds.
- **Testbed top.** Two runs at the default size:
  - every plaintext
  - the 16-clock latency and throughput
  - the LED and LCD outputs

  It also checks that each of these happened: input FIFO full, output FIFO
  full with the engine holding its result, back-to-back blocks, the engine
  waiting on an empty FIFO, key changes, and checker pause.

## Where this design departs from, or goes beyond, the lab

- The IP, IP^-1, PC-1 and PC-2 tables and S-box 1 are the ones the lab prints.
- The E and P tables and S-boxes 2 to 8 are the published DES tables, which
  the lab leaves to its longer handout. Together, the tables reproduce
  published DES known answers.
- `shifttwo_s1` is 0 in clock 2 (see the key schedule section).
- The lab's datapath, key-unit and testbed schematics are not reproduced. The
  register and multiplexer arrangement here is one that meets the lab's
  16-clocks-per-block timing and its control signals. The testbed's switch and
  LED assignments, the vector count, the FIFO depth, and the valid/ready
  handshake are this design's choices.
- On the lab board, the FIFOs and ROMs are vendor IP cores initialised from
  `.mif` files. Here they are plain SystemVerilog arrays, and the ROMs read
  hex files.
- The LCD driver is not included.
- The pipelined variant that the lab offers as a bonus is not built. The
  engine is the iterative 16-clock version.
- No area or clock-period figures are claimed. The lab's figure of merit,
  1/area x throughput, needs a synthesis run for a specific FPGA.
