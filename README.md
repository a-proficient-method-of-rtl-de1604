# Majority-logic error detection and correction for an EG-LDPC protected memory

Memory cells can be flipped by radiation (single and multiple bit upsets). This design protects a small memory with a one-step majority-logic decodable Euclidean-geometry LDPC code. It also makes the common case cheap. A full majority-logic decode walks through all 15 bits of a code word, one bit per clock cycle. Most words read from memory have no errors, though, and three decoding cycles are enough to tell that. If the first three cycles find nothing wrong, the word is released at once. Only words that show an error pay for the full decode, which corrects up to two flipped bits.

## The code

The code is the (15,7) cyclic code of the Euclidean geometry EG(2,2^2). Bit *i* of a code word is the coefficient of x^i.

- Generator polynomial: g(x) = 1 + x^4 + x^6 + x^7 + x^8.
- Systematic layout: the 7 data bits are stored in bits 14..8, and the 8 parity bits are in bits 7..0.
- Parity: the parity bits are x^8·m(x) mod g(x).
- Check sums: four check sums B1..B4 are *orthogonal* on bit 14. Each one contains bit 14, and no other bit appears in more than one of them:

| check sum | bits XORed        |
|-----------|-------------------|
| B1        | 0, 2, 6, 14       |
| B2        | 1, 5, 13, 14      |
| B3        | 3, 11, 12, 14     |
| B4        | 7, 8, 10, 14      |

Every code word makes all four sums zero.

Suppose bit 14 is wrong and at most one other bit is wrong. Then at least three of the four sums are 1. Suppose instead bit 14 is right and at most two other bits are wrong. Then at most two sums are 1. So bit 14 is decided by majority: it is flipped when 3 or 4 sums are 1. A 2–2 tie leaves it alone.

The code is cyclic, so every bit can be decoded with the same four sums. After each step the word is rotated by one place. The next bit then sits in position 14.

The code and its parameters are this design's choice. The method only asks for a one-step majority-logic decodable EG-LDPC code. They live in `rtl/eg_ldpc_pkg.sv`. Using a different code means changing `N`, `K`, `GEN_POLY`, `CHECK_MASK` and `J` there. The port widths of the modules follow those constants.

## Decoding with early exit

The decoder (`ml_decoder`) is made of these parts:

1. **Bit arranger** (`bit_arranger`). A serial-in, parallel-out register. It collects the word one bit per cycle, LSB first.
2. **Cyclic shift register** (`cyclic_shift_register`). It holds the word being decoded.
3. **XOR matrix** (`check_sum_xor_matrix`). It forms B1..B4 directly from the register bits. No syndrome is stored.
4. **Majority gate** (`majority_gate`). Its output is 1 when 3 or more of the 4 sums are 1.
5. **Error corrector** (`error_corrector`). It XORs bit 14 with the majority output.
6. **Control unit** (`mld_control_unit`). It counts the cycles and decides when to stop.
7. **Output buffer** (`output_buffer`). It drives the result only when the control unit finishes.

Each decoding cycle does three things. Bit 14 is replaced by its corrected value. The register rotates left by one place: bit 14 goes to bit 0 and bit 13 becomes the new bit 14. The cycle counter advances.

**Detection.** In decoding cycles 0, 1 and 2, the control unit ORs the four sums together (OR1). The result is shifted into a 3-stage detection register. In the next cycle, an OR of the whole detection register (OR2) makes the decision:

- **OR2 = 0.** The word is declared error-free. `finish` and `early` pulse, and decoding stops. The register has been rotated three times. The output buffer rotates it back, so the output always has the stored bit order.
- **OR2 = 1.** This cycle simply becomes decoding cycle 3. Decoding continues until all 15 bits have been processed, which also brings the word back to its original order. In the cycle after the 15th rotation, the check sums of the corrected word are evaluated once more. If any is non-zero, `decode_fail` is reported: the word had more errors than the code can correct.

Three cycles are enough. An exhaustive search over all error patterns of 1 to 4 bits shows that each of them makes at least one check sum non-zero within the first three cycles. Such words are therefore never released uncorrected. Patterns of up to 2 bits are then corrected. Patterns of 3 or 4 bits are flagged, but the data may be wrong, and `decode_fail` catches only some of them. The testbenches check this for random patterns. They also check one known 3-bit pattern, bits {0,1,4}, that must raise `decode_fail`.

`DETECT_CYCLES` (default 3) sets the number of detection cycles. It is a parameter of the control unit, the output buffer, the decoder and the top.

### Decoder timing

Cycles are counted from the edge that accepts the last serial bit to the edge that raises `out_valid`:

| word        | decoding cycles | latency                    |
|-------------|-----------------|----------------------------|
| error-free  | 3               | DETECT_CYCLES + 2 = 5      |
| with errors | 15              | N + 2 = 17                 |

The two extra cycles are spent loading the register and registering the output. `out_valid` lasts one cycle, and the output is zero whenever `out_valid` is low.

The next word is collected while the current one is decoded. It is loaded in the finish cycle at the earliest. If a full word is waiting, `bit_ready` goes low and the sender must hold its bit.

## The memory system (top: `eg_mld_memory_system`)

```
wr_data ─► eg_ldpc_encoder ─► codeword_memory ─► word_serializer ─► ml_decoder ─► out_*
                                   ▲ upset port (bit-flip injection)
```

- **Write.** `wr_en`, `wr_addr` and `wr_data` (7 bits) store the encoded 15-bit word.
- **Upset.** `upset_en`, `upset_addr` and `upset_mask` XOR a mask into a stored word. This models soft errors. Repeated upsets accumulate. A write to the same word in the same cycle wins over the upset.
- **Read.** `rd_en` and `rd_addr` are accepted while `rd_ready` is high. The word is read one cycle later. It is then streamed LSB first into the decoder, one bit per cycle. `rd_ready` is low while a word is in flight in the memory or the serializer.
- **Result.** The result is shown for one cycle on `out_valid`:

| output               | meaning                                              |
|----------------------|------------------------------------------------------|
| `out_data`           | corrected data bits                                  |
| `out_codeword`       | corrected code word                                  |
| `out_error_detected` | OR2 was 1                                            |
| `out_early`          | the word took the early exit                         |
| `out_decode_fail`    | check sums were still non-zero after the full decode |
| `out_cycles`         | decoding cycles used: 3 or 15                        |

Read latency, from the cycle `rd_en` is accepted to the cycle `out_valid` is high:

| word        | latency    |
|-------------|------------|
| error-free  | 22 cycles  |
| with errors | 34 cycles  |

Reads can be issued back to back: a new read is accepted every 17 cycles. A full decode takes 16 cycles from load to load, so the decoder keeps up. As a result, its input stall never happens in this system.

Default sizes:

| parameter       | default | note                                    |
|-----------------|---------|-----------------------------------------|
| `DEPTH`         | 16      | number of words; this design's choice   |
| `DETECT_CYCLES` | 3       | early-exit window                       |

The clock is single and rising-edge. Reset is synchronous and active low (`rst_n`). It clears the memory to all-zero words, which are valid code words.

## Choices made in this design

The method fixes the structure described above: a serial arrangement of the word, check sums orthogonal on the decoded bit, a majority gate, an XOR corrector, a rotating register, and a control unit with a three-cycle detection register and a finish flag. The following points are this design's own:

- **Code.** The (15,7) EG-LDPC code, with its bit layout and the choice of check sums.
- **Serial interface.** The serial read-out path (`word_serializer`), with LSB-first order and valid/ready handshakes.
- **Output buffers.** The method uses tristate output buffers that stay in high impedance until `finish`. Here they are a registered output, held at zero with `out_valid` low when not driven. The word is also rotated back after an early exit.
- **OR2 timing.** OR2 is evaluated in its own cycle, after the third detection cycle. When it finds an error, that cycle doubles as decoding cycle 3, so a full decode is still exactly 15 cycles.
- **`decode_fail`.** The final check-sum test after a full decode.
- **Memory ports.** The memory depth, its one-cycle registered read, and the upset port used for fault injection.
- **Majority threshold.** A strict majority (3 of 4).

The design is synthesizable. The memory is a plain array, with no vendor macro, and there are no analog parts.

## Files

| file                            | contents                                           |
|---------------------------------|----------------------------------------------------|
| `rtl/eg_ldpc_pkg.sv`            | code constants, parity function, types             |
| `rtl/eg_ldpc_encoder.sv`        | systematic encoder                                 |
| `rtl/codeword_memory.sv`        | code word array with write, read and upset ports   |
| `rtl/word_serializer.sv`        | parallel-to-serial read-out                        |
| `rtl/bit_arranger.sv`           | serial-to-parallel input of the decoder            |
| `rtl/cyclic_shift_register.sv`  | rotating word register                             |
| `rtl/check_sum_xor_matrix.sv`   | the four orthogonal check sums                     |
| `rtl/majority_gate.sv`          | majority vote                                      |
| `rtl/error_corrector.sv`        | correcting XOR                                     |
| `rtl/mld_control_unit.sv`       | counter, OR1, detection register, OR2, finish      |
| `rtl/output_buffer.sv`          | output gating and realignment                      |
| `rtl/ml_decoder.sv`             | the complete decoder                               |
| `rtl/eg_mld_memory_system.sv`   | top: encoder + memory + decoder                    |
| `tb/tb_<module>.sv`             | one self-checking testbench per module             |

## Verification

Every module has a self-checking testbench that ends with a line of the form `TB_RESULT checks=N failures=M`. Expected values are worked out in the testbench itself, independently of the RTL:

- **Code words.** Encoded by long division by g(x).
- **Check sums.** Written out bit by bit.
- **Memory and shift register.** Compared with model arrays.
- **Control unit.** Expected timing derived from the detection rule.

The decoder and top-level testbenches also check latency in cycles. They count each mechanism, and each must occur at least once:

- early exit;
- full decode with correction;
- 3- and 4-bit errors detected;
- `decode_fail`;
- back-pressure (`bit_ready` low for the decoder, `rd_ready` low for the system).

The top-level testbench `tb_eg_mld_memory_system` runs the system at its default parameters. In 12 rounds it writes all 16 words, injects 0–4-bit upsets, sometimes as two separate events, and reads the words back both one at a time and back to back.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/eg_ldpc_pkg.sv tb/tb_eg_mld_memory_system.sv --top-module tb_eg_mld_memory_system
./obj_dir/Vtb_eg_mld_memory_system
```

Replace the testbench name to run any other one. Each testbench finishes in well under a second.
