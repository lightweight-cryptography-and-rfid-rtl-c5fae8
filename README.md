# cryptoGPS tag cores: the full response path in RTL

cryptoGPS (Girault–Poupard–Stern, ISO/IEC 9798-5) lets an RFID tag prove that it holds a
secret `s` without revealing it. In its cheapest form the tag does no elliptic-curve or hash
work. It only answers a reader's challenge `c` with

    y = r + s·c

where `r` is a one-time random number. This RTL implements the complete on-tag side of that
answer. Three design decisions keep it small:

* **`r` is regenerated, not stored.** PRESENT-80 runs in output-feedback (OFB) mode from a
  64-bit IV under a hard-wired, tag-specific key `k`. It produces 17 blocks × 64 bits =
  1088 bits of `r`. The last block goes back out as the IV of the next run, so the
  generator never repeats.
* **`s·c` needs no multiplier.** The challenge is a *low Hamming weight* number with five
  ones. Any two ones are at least 160 bits apart, and `s` has 160 bits. So `s·c` is just five
  copies of `s` that never overlap, each placed at the position of one of the ones.
* **Everything is chunk-serial.** `y` leaves the chip 8 bits (or 4 bits) at a time. Each
  chunk is one chunk of `r` plus one chunk of the shifted `s`, plus a carry kept in a single
  flip-flop.

Three variants are provided. They share the same 20 signal pins. `gps_asic_top` places them
side by side.

| variant | module | PRESENT core | datapath | secret `s` | compute per 64-bit block |
|---|---|---|---|---|---|
| cryptoGPS-64/8-F | `gps_64_8_f` | round-based (`present_rb`) | 8 bit | hard-wired | 32 cycles |
| cryptoGPS-64/8-V | `gps_64_8_v` | round-based (`present_rb`) | 8 bit | loaded each run, 160 flip-flops | 32 cycles |
| cryptoGPS-4/4-F | `gps_4_4_f` | serialized (`present_ser`) | 4 bit | hard-wired | 1 + 527 cycles |

## Parameters of the scheme

| symbol | value | meaning |
|---|---|---|
| σ | 160 | bits of `s` (80-bit security) |
| δ | 848 | bits of the expanded challenge (Hamming weight 5) |
| ρ = σ + δ + 80 | 1088 | bits of `r` and of `y` |
| compact challenge | 5 bytes | what is actually sent to the tag |

All of these are in `rtl/gps_pkg.sv`. The PRG key `KEY` and the secret `S_SECRET` are
module parameters. Their default values are arbitrary placeholders: set your own.

## The compact challenge and where the copies of `s` go

The reader sends five bytes `n0 … n4`. Each byte splits as `n_i = c_i2 (bits 7:5) || c_i1
(bits 4:0)`. The five ones of the 848-bit challenge are at

    P0 = 8·c01 + c02
    Pi = P(i-1) + 160 + 8·ci1 + ci2        (i = 1..4)

Two worked examples:

* all-zero bytes give P = 0, 160, 320, 480, 640;
* `n4..n0 = 44 E3 A2 C1 20` gives P = 1, 175, 356, 547, 741.

Both are checked in `tb_lhw_decoder`. The positions accumulate, so the ones are always at
least 160 bits apart.

The byte-serial arithmetic works like this. Copy `i` of `s` begins in byte `Pi/8` of `y`, at bit
`Pi mod 8` inside that byte. While byte `j` of `y` is produced:

* `lhw_decoder` checks whether `j` falls inside the current copy. If it does, it sets `n_zero`
  and gives the chunk index `sel = j − Pi/8` (0…19) and the bit offset `c2 = Pi mod 8`. At
  the last chunk (`overflow`), it moves to the next copy by adding `160 + 8·ci1 + ci2`.
* The `S_Storage` block selects chunk `sel` of `s` and ANDs it with `n_zero`. It forms the
  16-bit value `{8'h00, chunk} << c2`. The low byte, ORed with the overflow register
  `gReg-8`, is this byte of the shifted `s`. The high byte is loaded into `gReg-8` for the
  next byte. The bits a copy pushes past a byte boundary therefore appear one byte later. The
  OR also lets the tail of one copy and the head of the next share a byte. That happens when
  two ones are exactly 160 + a few bits apart.
* `addwc` adds that byte, the PRESENT output byte and the stored carry.

The encoding can place copies up to bit 1915 + 160. Bits past the 1088-bit response are
dropped, and so is the carry out of bit 1087.

## PRESENT as the pseudo-random generator

`present_rb` performs one full round per cycle: key addition, 16 S-boxes, bit permutation
and key schedule. 31 rounds plus one final key-whitening cycle make 32 cycles per block. The
whitening cycle also reloads the key for the next block. The ciphertext stays in the state
register. `ps_out` is its lowest byte, and each output step rotates the state by one byte. After
eight steps the ciphertext is back in place and serves as the next OFB input.

`present_ser` has a single S-box. The state and the round-key half of the key register both
rotate by one nibble per `PS_SBOX` cycle, so 16 cycles pass through all 16 nibbles. Then one
`PS_PLAYER_KS` cycle applies the permutation (pure wiring) and the key schedule. That gives
31 × 17 = 527 cycles. The last key addition is not a separate pass. Each output step XORs the
round-key nibble into the nibble it returns, and writes that nibble back into the state.

`r = C17 || … || C1`, where `C1 = E_k(IV)` forms the least significant 64 bits.

## Pins and the exchange with the host

Each variant has `clk`, `n_reset` (asynchronous, active low), `rx`, `tx`, `data_in[7:0]` and
`data_out[7:0]`. The host is a microcontroller on its own clock. Every chunk moves with one
four-phase handshake:

1. The host sets `data_in` (for a load) and raises `rx`.
2. The core raises `tx` once it can take or offer the chunk. `rx` first passes a two-flop
   synchronizer, so `tx` rises three core clocks after `rx`, or later if the core is busy.
3. The host reads `data_out` (for an output) and lowers `rx`.
4. The core advances and lowers `tx`.

`data_in` must be stable from before `rx` rises until `tx` rises. One run is:

| variant | host → core | core → host |
|---|---|---|
| 64/8-F | 8 IV bytes, 5 challenge bytes `n0…n4` | 136 bytes of `y`, 8 bytes of next IV |
| 64/8-V | 8 IV bytes, 5 challenge bytes, 20 bytes of `s` | 136 bytes of `y`, 8 bytes of next IV |
| 4/4-F | 16 IV nibbles on `data_in[3:0]`, 5 challenge bytes | 272 nibbles of `y`, 16 nibbles of next IV (on `data_out[3:0]`, upper half 0) |

All multi-chunk values go least significant chunk first. The next run starts right after the
last IV chunk. The host should pass the returned IV back in, so the generator state is managed
outside the chip.

A host that answers at once sees `tx` low for 33 core cycles between the last byte of one
64-bit block and the first byte of the next. That is 32 compute cycles and one handshake
cycle. The serialized core takes 529 cycles (1 key-init + 527 + 1). Handshake time comes on
top of this and depends on the host.

## Controllers

Each controller combines four cooperating parts:

* an I/O FSM, `gps_io_hs`;
* an S_Storage FSM, `lhw_decoder`;
* PRESENT sequencing;
* a central FSM.

`gps_ctrl_rb` serves both round-based variants. Its `VAR_S` parameter adds the 20 load cycles
for `s`. Its states are `LOAD_IV → LOAD_C → (LOAD_S) → PREP → 17 × (ROUND×31, FINAL, OUT×8)
→ FLUSH → IV_OUT`. `PREP` reloads the key, clears the carry and starts the decoder. `FLUSH`
clears the carry and `gReg-8` so that the IV goes out unmodified.

`gps_ctrl_ser` follows the state diagram of the serialized core: `INIT_IV`, `INIT_KEY`,
`SBOX` (16 cycles, counter `serial`), `PLAYER_KS` (back to `SBOX` until round 31), `ADD`
(16 output nibbles) and `IV_OUTPUT` after block 17. It also adds a `LOAD_C`, a `PREP` and a
two-cycle `FLUSH`.

The controller buses have the widths of the original block diagram:

* `control_ps`, 5 bits: a 4-bit operation code and an `add_key` bit;
* `control_s`, 10 bits: `step`, `n_zero`, `c2[2:0]` and `sel[4:0]`.

## Where this RTL departs from, or fills in, the original design

* **Handshake.** The original design used an rx/tx handshake with the microcontroller but
  did not specify it. The four-phase protocol and synchronizer here are this design's own.
  Published I/O cycle totals (1120 and 10,111 cycles per run including handshake, 724 and
  9,319 without) are therefore not reproduced. The compute time per block (32 and 527
  cycles) is.
* **Challenge positions.** Positions accumulate as in the worked examples above. They are
  not each measured from a fixed base.
* **Serialized key initialization.** The serialized key initialization is one cycle, not
  two states.
* **Serialized S_Storage.** The 4-bit storage (`s_storage_fix4`) has the same byte path as
  the 8-bit one, followed by a nibble counter that sends the low nibble first. Its internal
  structure is this design's own.
* **Loadable secret.** `s_storage_var` writes `s` through a separate `s_we` strobe addressed
  by `sel`. The 10-bit `control_s` bus stays as it is.
* **Addwc.** The carry flip-flop of `addwc` has an explicit clear input that drives the
  original 2:1 mux between carry out and `'0'`.
* **`overflow`.** The original design names this S_Storage output. Here it marks the last
  chunk of a copy of `s`.
* **Chip-level parts.** Pads, supplies, package and the board (microcontroller,
  serial-to-USB) are not part of this RTL.
* **Coupons.** The coupons `x_i` of the identification protocol are not held on the chip.

## Files

`rtl/`:

* `gps_pkg.sv`: constants, control types, PRESENT S-box, permutation and key schedule;
* `present_rb.sv`, `present_ser.sv`: the PRESENT-80 cores;
* `addwc.sv`: the adder with a stored carry;
* `s_storage_fix.sv`, `s_storage_var.sv`, `s_storage_fix4.sv`: the S_Storage blocks;
* `lhw_decoder.sv`: the challenge decoder;
* `gps_io_hs.sv`: the handshake FSM;
* `gps_ctrl_rb.sv`, `gps_ctrl_ser.sv`: the controllers;
* `gps_64_8_f.sv`, `gps_64_8_v.sv`, `gps_4_4_f.sv`: the three variants;
* `gps_asic_top.sv`: all three side by side.

`tb/`:

* `gps_ref_pkg.sv`: an independent golden model. It contains PRESENT-80, the challenge
  positions, and `y` and the next IV.
* `gps_uc_model.sv`: a behavioural host for the handshake.
* One self-checking testbench per module, `tb_<module>.sv`.
  * `tb_present_rb` and `tb_present_ser` also check the published PRESENT-80 test vectors.
  * `tb_gps_asic_top` runs all three cores at their default parameters, concurrently, on
    different clocks. It chains the IVs over several runs and counts these events:
    * the host waiting on a busy core;
    * carries between chunks;
    * two copies of `s` sharing a byte;
    * copies at non-byte offsets;
    * truncated copies;
    * `s` reloads.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --top-module tb_gps_asic_top -Irtl -Itb -y rtl -y tb \
        rtl/gps_pkg.sv tb/gps_ref_pkg.sv tb/tb_gps_asic_top.sv
    ./obj_dir/Vtb_gps_asic_top

Every testbench ends with `TB_RESULT checks=N failures=M`. Swap in another `tb_*.sv` to test
one block. All testbenches finish within seconds.

To change the secret or the PRG key, override `S_SECRET` and `KEY` on the variant or on
`gps_asic_top`. The testbenches that check against the golden model must use the same
values.
