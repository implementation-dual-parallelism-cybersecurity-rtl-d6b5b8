# Dual-engine AES-128 image cipher

This design encrypts and decrypts images with AES-128. It uses two kinds of parallelism at once:

- **Spatial.** The image is cut vertically into a left half and a right half. Each half goes to its own engine, and the two engines work at the same time.
- **Temporal.** Inside each engine, the AES cipher is unrolled into an eleven-stage pipeline. It can accept a new 128-bit block on every clock.

After processing, the two halves are joined back into one image. Decryption is the same flow with the engines switched to the inverse cipher. A decrypted ciphertext gives back the original image bit for bit.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It runs on one clock. The image source and sink are plain valid/ready pixel streams. On a board these would come from an SD card or a wireless link.

## Data flow

```
             +-------------+    left half   +----------+
 in_* ------>|   image_    |--------------->| engine 0 |------+
 (row-major  |  splitter   |    right half  +----------+      v
  pixels)    |             |--------------->| engine 1 |--> image_merger --> out_*
             +-------------+                +----------+   (row-major)
```

1. `start` gives the image size (`img_w`, `img_h`) and the direction (`mode`: 0 encrypts, 1 decrypts). The splitter and the merger sample the size. Both engines are told to expect `(img_w/2)*img_h` pixels.
2. `image_splitter` receives the row-major stream. It sends columns `0 .. img_w/2-1` to engine 0 and the other columns to engine 1. Each engine therefore receives its half in row-major order.
3. Each engine stores its half in its pixel buffer. It then runs the half through its AES pipeline and writes the results back in place. Finally it streams the half out.
4. `image_merger` rebuilds each output row from `img_w/2` pixels of engine 0 followed by `img_w/2` pixels of engine 1.

An image is refused if any of these holds:
- `img_w` is odd.
- A half is empty.
- A half is not a multiple of four pixels.
- A half is larger than the buffer.

A refused image pulses `cfg_error` for one clock, and nothing starts.

## Pixels and blocks

Each pixel is a 32-bit word. For a colour image this is, for example, R, G, B and one spare byte. The cipher does not look inside the word.

Four consecutive pixels of one half form one 128-bit AES block:
- Pixel `4i` sits in bits [127:96].
- Pixel `4i+3` sits in bits [31:0].

The byte order inside a block follows FIPS-197: byte 0 is in bits [127:120].

Each block is enciphered on its own, which is ECB mode. Identical groups of four pixels in the same half therefore encrypt to identical ciphertext. Keep this in mind before using the design for real confidentiality. A chaining mode would have to be added in `engine_sync`.

## The engine (`engine.sv`)

Each engine has four parts:

| part | module | role |
|---|---|---|
| pixel buffer | `pixel_mem` | 64K x 32 bits (256 KB) by default. It has one write port and one synchronous read port. |
| cipher | `aes_core` | The pipelined AES-128 unit, which encrypts or decrypts. |
| scheduler | `engine_sync` | Runs the job in three phases (below). |
| timers | `cycle_timer` x2 | `proc_cycles` counts the clocks of the cipher phase. `job_cycles` counts the clocks from start to done. |

### The three phases of `engine_sync`

- **LOAD.** Pixels arrive on the input stream and are written to addresses `0 .. seg_len-1`.
- **PROCESS.** The buffer is read one word per clock. Every four words are packed into a block, and the block is sent to the AES unit with the job's mode. Results come back `AES_LATENCY` (11) clocks later. Each result block is written back to the addresses it came from, one word per clock.

  A block enters the pipeline at most every fourth clock. Writing a result back takes four clocks. So a result never arrives while the previous one is still being written; an assertion checks this.

  A word is always read more than ten clocks before its result overwrites it, so the in-place write is safe. The phase lasts exactly `seg_len + 16` clocks.
- **UNLOAD.** The buffer is read again and the pixels are sent out. A two-entry output buffer and a read-credit rule keep the stream at one pixel per clock when the receiver is ready. It also absorbs back-pressure despite the one-clock read latency.

`done` pulses for one clock when the last pixel has left.

## The AES-128 pipeline (`aes_core.sv`, `aes_round.sv`, `aes_key_expand.sv`, `aes_pkg.sv`)

**Key schedule.** `aes_key_expand` expands the 128-bit key into the 11 round keys in a single clock when `key_load` is high. The ten schedule steps are unrolled, and the result is held in registers. `key_ready` rises one clock later. Change the key only while no block is in flight.

**Stages.** `aes_core` chains eleven `aes_round` register stages:
- Stage 0 is the initial AddRoundKey.
- Stages 1 to 10 are the rounds. Round 10 has no (Inv)MixColumns.

Each stage contains both the forward round and the inverse round. A mode bit travels with every block and selects one of them. Encryption and decryption blocks can therefore be mixed freely in the pipeline.

**Decryption.** Decryption uses the straightforward inverse cipher:
- Stage 0 adds round key 10.
- Round `r` does InvShiftRows, then InvSubBytes, then adds round key `10-r`, then InvMixColumns.

So stage `r` needs round key `r` when encrypting and round key `10-r` when decrypting. `aes_core` wires both keys to each stage.

**S-box.** The S-box and its inverse are not written out as tables. Constant functions in `aes_pkg` compute them at elaboration from their definition: the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine map with 0x63. Synthesis turns each lookup into a 256 x 8 ROM. There are 320 such ROMs in the datapath and 40 in the key schedule.

**Latency and rate.** The latency is 11 clocks and the rate is one block per clock. There is no back-pressure: every block accepted comes out, in order.

## Timing summary

| quantity | clocks |
|---|---|
| AES pipeline latency | 11 |
| AES pipeline rate | 1 block (128 bits) per clock |
| LOAD of a half of n pixels | n, when the input never pauses |
| PROCESS (cipher phase) of n pixels | n + 16 |
| UNLOAD | n, when the output never stalls |
| key expansion | 1 |

The two engines load at the same time, because the splitter interleaves their rows. They also cipher at the same time. The merger drains engine 0's part of each row, then engine 1's part.

At a 600 MHz clock, one AES unit peaks at 128 x 600e6 = 76.8 Gb/s, and the pair peaks at 153.6 Gb/s.

The 32-bit buffer limits each engine's sustained cipher phase to one 32-bit pixel per clock. That is 19.2 Gb/s per engine and 38.4 Gb/s for the pair at 600 MHz. Reaching the pipeline's peak would need a 128-bit-wide buffer port. This design keeps the 64K x 32 organisation.

No timing closure at any frequency has been checked.

## What is not in the RTL

These parts appear only as ports:

- **Image storage and transport.** The SD card interface and the board-to-board wireless link are not included. Their data enters on `in_*` and leaves on `out_*`.
- **Clock generation.** The design assumes a single clock `clk` from a PLL. Running sub-units at different clock rates would need clock-domain crossings that do not exist here.
- **Display.** There is no display or user interface. The results are available on `done`, `proc_cycles` and `job_cycles`.

## Choices and deviations worth knowing

- **ECB on four-pixel blocks.** Described above. No padding is done: a half must be a multiple of four pixels.
- **Reset.** `rst_n` is an asynchronous, active-low reset for all control state and pipeline registers. The buffer contents are not reset.
- **Same key for both engines.** The key is loaded into both engines at once. Each engine has its own key schedule.
- **One 32-bit pixel per word.** Sub-word pixel packing (for example 8-bit grey) is not supported.
- **Size limits.** `img_w` and `img_h` are 16 bits wide, and a half may hold at most `MEM_DEPTH` pixels. With the default 65536, the largest image is 131072 pixels, for example 512 x 256.

## Files

`rtl/`:

| file | contents |
|---|---|
| `aes_pkg.sv` | AES types, S-box generation, round and key-schedule functions |
| `dual_engine_pkg.sv` | pixel type and shared sizes |
| `aes_key_expand.sv`, `aes_round.sv`, `aes_core.sv` | the cipher |
| `pixel_mem.sv`, `cycle_timer.sv`, `engine_sync.sv`, `engine.sv` | one engine |
| `image_splitter.sv`, `image_merger.sv`, `dual_engine_top.sv` | the top level |

`tb/`:

| file | what it checks |
|---|---|
| `aes_ref_pkg.sv` | An independent AES-128 model (byte-matrix state, S-box found by search), used as the reference. |
| `tb_aes_core.sv` | FIPS-197 vectors in both directions, plus random mixed encrypt/decrypt streams, with exact latency checks. |
| `tb_aes_key_expand.sv` | FIPS-197 A.1 round keys and random keys. |
| `tb_pixel_mem.sv` | Full 64K-word write/read, read latency, read-during-write. |
| `tb_cycle_timer.sv` | Start/stop intervals. |
| `tb_image_splitter.sv`, `tb_image_merger.sv` | Random image sizes, random stalls. |
| `tb_engine_sync.sv` | The scheduler with a simple stand-in cipher. Checks the phase lengths and the block spacing. |
| `tb_engine.sv` | One engine against the reference model, encrypting and then decrypting. |
| `tb_dual_engine_top.sv` | End-to-end on three image sizes with 4K-word buffers. Counts every mechanism: routing to each engine, overlapping cipher phases, both modes, merge switches, stalls, input gaps, size rejection. |
| `tb_dual_engine_top_full.sv` | Default parameters, with a 512 x 256 image that fills both buffers. Encrypts and decrypts it. |
| `tb_part_time.sv` | Default parameters, with a 56 x 35 image whose halves of 980 pixels each take 996 clocks in the cipher phase. That is 1.66 us at 600 MHz. |

Every testbench prints `TB_RESULT checks=N failures=M` and fails on a watchdog timeout.

## Simulating

With Verilator 5, list the packages first and let `-y` find the modules:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_dual_engine_top -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/dual_engine_pkg.sv tb/aes_ref_pkg.sv tb/tb_dual_engine_top.sv
./obj_dir/Vtb_dual_engine_top
```

Replace the top module and file for any other testbench. Leave out `tb/aes_ref_pkg.sv` for testbenches that do not import it.

The full-size test builds in well under a minute and runs in a few seconds.

## Changing the design

- **Buffer size.** Set `MEM_DEPTH` on `dual_engine_top`, or `DEPTH` on `engine`. Address and length widths follow from it.
- **Rounds and block layout.** These live in `aes_pkg`. The pixel width is `PIX_W` in `dual_engine_pkg`, but the four-pixels-per-block packing in `engine_sync` assumes 32-bit pixels.
- **Cipher mode of operation.** To add a mode such as CTR or CBC, change how `engine_sync` forms the blocks in PROCESS. The pipeline itself has no state between blocks.
