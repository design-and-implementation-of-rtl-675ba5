# Sliced SEC-DED Hamming codec

A link that must carry long data words, with a bus narrower than the word, needs an error-correcting
code whose size follows the word and whose pins follow the bus. This codec does both with three
parameters: the number of information bits `k`, the width of the input bus, and the width of the
output bus. It encodes a `k`-bit information word into an extended Hamming packet (single error
correction, double error detection) and decodes such packets back, correcting one wrong bit and
flagging anything worse. Words go in and come out as a sequence of bus-wide slices, so a 248-bit word
can pass through 8-bit ports, or a 22-bit word through 1-bit serial ports, without touching the
coding logic.

The default configuration is 248 information bits on 8-bit buses. 22, 107 and a 17-bit worked
example are also tested, along with unequal bus widths such as 17 bits in and 23 bits out.

## The packet

Positions in the packet are numbered from 1.

* Every power-of-two position (1, 2, 4, 8, ...) holds a **Hamming check bit**.
* The other positions (3, 5, 6, 7, 9, ...) hold the **information bits** in order: information bit 0
  is at position 3, bit 1 at position 5, and so on.
* One **overall parity bit** follows the last position.

The number of check bits `r` is the smallest value with `2^r >= k + r + 1`. The packet is
`k + r + 1` bits wide. In the vectors, position `p` is bit `p-1`, so the overall parity bit is the
MSB.

| k (information bits) | r (check bits) | packet bits |
|---|---|---|
| 8   | 4 | 13  |
| 17  | 5 | 23  |
| 22  | 5 | 28  |
| 107 | 7 | 115 |
| 248 | 9 | 258 |

Check bit `j`, at position `2^j`, makes the parity even over every position whose index has bit `j`
set. Check 1 covers 1, 3, 5, 7, ...; check 2 covers 2, 3, 6, 7, 10, 11, ...; check 4 covers 4–7,
12–15, ...; and so on. The overall parity bit makes the whole packet have even weight.

Worked example, `k = 17`:

```
information        1AA00        (bits 9, 11, 13, 15, 16 set)
spread (data_encode) 352000     (positions 14, 17, 19, 21, 22)
check bits         ham_code = 0F  (P1 = P2 = P4 = P8 = 1, P16 = 0)
packet             75208B       (overall parity bit = 1: nine ones before it)
```

## Decoding: syndrome and parity

The decoder recomputes every check over the received packet, check bits included. This gives the
**syndrome** `ham_test`. If exactly one bit at position `p < packet width` flipped, the syndrome
equals `p`. `parity_test` is the XOR of all packet bits, which is 1 when an odd number of bits are
wrong. The two values together sort the packet into one of five cases:

| ham_test | parity_test | meaning | error_flag | one_error_bit | information out |
|---|---|---|---|---|---|
| 0 | 0 | clean | 0 | 0 | as received |
| 1 .. packet-1 | 1 | one error, at position `ham_test` | 1 | 1 | corrected |
| ≠ 0 | 0 | two (an even number of) errors | 1 | 0 | as received |
| ≥ packet width | any | uncorrectable | 1 | 0 | as received |
| 0 | 1 | only the parity bit is wrong | 1 | 0 | as received (it is intact) |

If a single error hits a check bit, `one_error_bit` is still 1, but the information needs no change.
Three or more errors can look like a single error. The codec then "corrects" the wrong bit, as
any SEC-DED code does.

Examples at `k = 17`:
* `75008B` (position 14 flipped) gives `ham_test = 0E`, `parity_test = 1`, and `1AA00` after correction.
* `55008B` (positions 14 and 22 flipped) gives `ham_test = 18` and `parity_test = 0`. The packet is flagged and `0A800` goes out uncorrected.

The original description says in one place that the parity check has to be **0** for a single
error. That rule cannot tell one error from two. Its own tables and examples follow the standard
rule above, and so does this design.

## Slicing the buses

Both directions use the same two slicing blocks, one on each side of the coding logic.

`slice_deserializer` collects a word of `T` bits from a `W`-bit bus. A down-counter (`in_count`)
starts at `T`, and a slice index (`location`) starts at 1. Each clock stores `data_in` at bits
`[(location-1)*W +: W]`. The counter then drops by `W`. Once no more than `W` bits are missing,
only the low `in_count` bits of the bus are taken and the high bits are ignored. The counter then
goes to 0 and `info_packet_read` rises. For 17 bits on an 8-bit bus the counter runs 17 → 9 → 1 → 0,
and the three slices are `00`, `AA`, `01`.

`slice_serializer` does the reverse. It only moves while `request_info_packet_out` is high and the
word is ready. It drives slice `location` onto the output register, and the last partial slice
appears in the low bits with zeros above. `info_packet_write` rises together with the last slice.
A low request pauses the transfer, and it continues where it stopped. For the 17-bit example the
packet `75208B` leaves as `8B`, `20`, `75`.

Encoder inputs are `ceil(k/IN)` slices and outputs are `ceil(packet/OUT)` slices. The decoder is the
other way round.

## Control and timing

| pin | role |
|---|---|
| `new_info_packet` | 1 = encode, 0 = decode; selects which side the other controls act on |
| `new_data_flag` | 0 = initialise the selected side on the next clock; 1 = run it |
| `request_info_packet_out` | permission to send result slices, one per clock |
| `data_in` | input slices |
| `data_out_packet` / `data_out_packet_valid` | encoder output slices |
| `data_out_info` / `data_out_info_valid` | decoder output slices |
| `info_packet_read`, `info_packet_write` | input complete / output complete (selected side) |
| `done_encode`, `test_done` | encoder spread stage done / decoder check done |
| `error_flag`, `one_error_bit`, `parity_test`, `ham_test` | decoder result, held while `test_done` is 1 |
| `ham_code` | encoder check bits |

There is no reset pin. An operation is one clock with `new_data_flag = 0`, then `new_data_flag = 1`
for the rest of the operation, with a new slice on `data_in` every clock. With the request held
high, the clock counts after the initialising clock are:

```
encode:  ceil(k/IN) input | 1 spread (data_encode, done_encode) | 1 check bits (data_packet_out) | ceil(packet/OUT) output
decode:  ceil(packet/IN) input | 1 extract + check + correct (test_done) | ceil(k/OUT) output
```

| configuration (buses 8/8) | encode clocks | decode clocks |
|---|---|---|
| k = 17  | 3 + 2 + 3 = 8    | 3 + 1 + 3 = 7   |
| k = 22  | 3 + 2 + 4 = 9    | 4 + 1 + 3 = 8   |
| k = 107 | 14 + 2 + 15 = 31 | 15 + 1 + 14 = 30 |
| k = 248 | 31 + 2 + 33 = 66 | 33 + 1 + 31 = 65 |

Input slices keep being consumed after the word is complete, but they are ignored. Once the input is
complete, the output starts on the first clock where both the result and the request are there. To
start another operation, drop `new_data_flag` for one clock.

The encoder and decoder keep separate state. Running a decode leaves the last encoded packet and
`ham_code` in place, and the reverse also holds.

## Module hierarchy

```
ham_codec_top
├── ham_encoder
│   ├── slice_deserializer   (k bits in)
│   ├── ham_insert           spread information, register data_encode / done_encode
│   ├── ham_calc             check bits + overall parity (registered in ham_encoder)
│   └── slice_serializer     (packet out)
└── ham_decoder
    ├── slice_deserializer   (packet in)
    ├── ham_extract          information, syndrome, parity check
    ├── ham_correct          classify, flip the bad information bit
    │                        (result registered in ham_decoder with test_done)
    └── slice_serializer     (k bits out)
```

`ham_pkg` holds the functions that size and wire everything: `ham_bits_for(k)`,
`packet_bits_for(k)` and `info_pos(i)`, which gives the position of information bit `i`. These are
constant functions. Changing `INFORMATION_BITS` regenerates all the XOR trees and bit placements.

At the default 248-bit configuration the design has about 1,360 flip-flop bits. Most of them are
the 248-bit and 258-bit word registers on each side. The syndrome and check-bit trees are XORs over
roughly half of the packet each.

## Where this design makes its own choices

* **Parity rule for a single error.** The standard extended-Hamming rule is used. See above.
* **Syndrome range.** A syndrome is correctable only if it is *below* the packet width. The last
  position is the parity bit, which the syndrome never covers.
* **Separate encoder and decoder state.** The original description has one shared set of
  counters. Here, each side has its own, so the idle side keeps its result.
* **Valid strobes.** `data_out_packet_valid` and `data_out_info_valid` are additions. Without them,
  a receiver has to count clocks.
* **Initialisation.** `new_data_flag = 0` also clears the collected input word and `data_encode`.
  The wide result registers are not cleared; they are only read after being written.
* **Bus widths** for the 22-, 107- and 248-bit configurations are not known. 8 bits is used, as in
  the worked example.
* An undocumented debug signal of the original (`built_data`) is not reproduced.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M` line. From the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/ham_pkg.sv tb/ham_ref_pkg.sv \
          tb/tb_ham_codec_top.sv --top-module tb_ham_codec_top
./obj_dir/Vtb_ham_codec_top
```

Replace `tb_ham_codec_top` with any other testbench:

* `tb_ham_codec_top` tests the default 248-bit design end to end. It encodes, corrupts the packet,
  decodes, and checks against a reference model. It covers all five error cases (including a
  syndrome of 258, beyond the packet), partial last slices, an output stall, both latencies, and
  the encoder keeping its result across a decode. It counts each of these and fails if any never
  happened.
* `tb_ham_codec_workloads` runs six configurations side by side through `codec_harness`: 22, 107,
  248 and 17 bits on 8-bit buses; 17 bits with a 17-bit input bus and a 23-bit output bus; and 22
  bits over 1-bit serial buses.
* `tb_ham_encoder` and `tb_ham_decoder` test the 17-bit worked example at the exact clock counts,
  plus random 248-bit words.
* `tb_ham_insert`, `tb_ham_calc`, `tb_ham_extract`, `tb_ham_correct`, `tb_slice_deserializer` and
  `tb_slice_serializer` test each block on its own. They include the 8-bit example (information
  `0x11` → packet `0x186`, position 7 flipped → syndrome 7).

`tb/ham_ref_pkg.sv` is the reference model. It walks the packet position by position and counts
ones, so it does not share code with the RTL's XOR trees.

## How far to trust it

* Every module passes lint with `verilator -Wall`, apart from unconnected debug outputs (counters
  and the wide words) that the top leaves open.
* Every testbench passes. For each block, a deliberately broken copy was shown to make its
  testbench fail.
* The worked example reproduces bit-exact: `1AA00 → 352000 → 75208B` with check bits `0F`, and
  `75008B` / `55008B` decode with syndromes `0E` / `18`.
* FPGA resource use and clock speed have not been measured here.
