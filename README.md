# sha512crypt hashing accelerator with parallel cores

Linux systems store password hashes in the sha512crypt format (`$6$salt$hash`).
Checking one guessed password against such an entry means running the whole
sha512crypt computation: four SHA-512 hashes to set up, then 5000 more by
default, each over a message built from the password, the salt and the
previous digest. In a password-recovery setup the search itself is cheap and
the hashing is the bottleneck.

This RTL moves the hashing into FPGA fabric next to a host processor, as in
CPU-plus-FPGA devices like the Zynq-7000. Software on the processor generates
candidate passwords, for example from a password topology such as "one
upper-case letter, five lower-case letters, one digit". It writes the
candidates and the salt into shared memory and calls the kernel. The kernel
hashes one candidate per core, all cores in parallel, and writes the raw
64-byte results back. The host then compares them with the target hash.

The design deliberately stays simple. Each core is a small sequencer
around one iterative SHA-512 unit with a large message buffer. Throughput comes
from adding more cores: `N_CORES` defaults to 2, the number that fitted the
original prototype's Zynq Z-7020.

## The sha512crypt schedule

Everything a core does is a fixed schedule of SHA-512 computations. With
password `P` (0 to 64 bytes, length `p`), salt `S` (0 to 16 bytes, length `s`) and `R` rounds:

| step | message hashed | longest message |
|------|----------------|-----------------|
| B  | `P . S . P` | 144 bytes |
| A  | `P . S .` the first `p` bytes of `B`, then for each bit of `p` from the LSB (while bits remain): `B` if 1, `P` if 0 | 592 bytes |
| DP | `P` repeated `p` times | 4096 bytes |
| DS | `S` repeated `16 + A[0]` times | **4336 bytes** |
| round i (R times, C starts as A) | `(i odd ? Pseq : C) . (i%3 ? Sseq : -) . (i%7 ? Pseq : -) . (i odd ? C : Pseq)` | 208 bytes |

Here `Pseq` is the first `p` bytes of DP, `Sseq` is the first `s` bytes of
DS, and `C` is the previous round's digest. The result is the final `C`.
The usual `$6$` text is this value in the crypt base-64 alphabet, with its
bytes permuted. That encoding is left to the host, which only needs to compare.

The DS step sets the size of the message buffer. `A[0]` can be as large as
255, so the salt may be repeated 271 times: 16 × 271 = 4336 bytes. That is
the buffer each core carries.

## Inside a core

`sha512crypt_core` builds each message in its buffer and then hashes it.

- **Segment sequencer.** A message is described as a short list of
  segments. Each segment names a source register (P, S, B, DP, DS or C) and a
  byte count. The function `seg_decode` yields segment *k* of the current step,
  given the password and salt lengths, `A[0]`, the round's parity and two small
  counters that track `i mod 3` and `i mod 7` without dividing. The
  controller copies one byte per cycle from the selected source into the
  buffer. An empty segment costs one cycle.
- **Message buffer** (`sha512_msg_buffer`). 4336 bytes stored as 64-bit
  words, most significant byte first, so that a word read is already a SHA-512
  message word. It has one byte write port and one word read port with a
  one-cycle read latency.
- **Hasher** (`sha512_hasher`). It never writes padding into the buffer.
  While loading each 1024-bit block (16 reads, 17 cycles), it replaces bytes
  at or past the message length with `0x80` and zeros. It also puts the bit
  length into the last word of the last block. This is why 4336 bytes are
  enough even though the padded DS message is 4352 bytes.
- **Compression engine** (`sha512_compress`). The standard SHA-512 rounds,
  one round per clock. The message schedule is kept as a sliding window of
  16 words. Latency is 82 cycles per block, including capture and
  feed-forward.

Timing per SHA-512 is message bytes + empty segments + 100 × blocks + 4
cycles. A whole hash is the sum over all `4 + R` hashes, plus one cycle.
The core testbenches check this formula cycle-exactly, including a sweep over
every password length at 5000 rounds. For R = 5000 and a 16-byte salt it
gives the figures below. Whole-kernel simulations of 10- and 60-character
jobs agree to within 0.1 %.

| password length | cycles per hash | one core at 70 MHz | two cores at 70 MHz |
|-----------------|-----------------|--------------------|---------------------|
| 1  | 0.91 M | 77 /s | 154 /s |
| 10 | 0.99 M | 70 /s | 141 /s |
| 15 | 1.04 M | 67 /s | 135 /s |
| 16 | 1.34 M | 52 /s | 105 /s |
| 24 | 1.55 M | 45 /s | 90 /s |
| 32 | 1.68 M | 42 /s | 84 /s |
| 60 | 1.96 M | 36 /s | 71 /s |
| 64 | 2.00 M | 35 /s | 70 /s |

The steps at 16 and 24 characters come from the SHA-512 block size. A round
message is `64 + p (+ s) (+ p)` bytes. A single 128-byte block holds
at most 111 message bytes. From 16 characters on, a round message with both
optional parts (64 + 16 + 2 × 16 = 112 bytes) needs two blocks. From 24
characters on, so do the rounds that skip the salt.

For comparison, the original high-level-synthesis prototype, also clocked at
70 MHz, reached 45 and 90 passwords/s (one and two cores) for 10 characters.
For 60 characters it reached 27 and 55. It showed its largest drop in speed
between 15 and 16 characters. Those figures come from hardware and include
host overhead; the figures above count only the kernel. A DS message length
that depends on `A[0]` changes a hash's time by less than 0.3 %; the table
assumes `A[0]` = 128.

## The kernel and the host

`kernel_sha512crypt_dual` is the top. Its ports are the clock `ap_clk`, the
synchronous active-low reset `ap_rst_n`, an AXI4-Lite control slave
`s_axi_control_*`, an AXI4 memory master `m_axi_gmem_*` (32-bit data, INCR
bursts) and `interrupt`. In a Zynq system the control slave sits behind an
AXI interconnect on the processor's M_AXI_GP0 port. The memory master goes
through a second interconnect to the processor's S_AXI_GP0 port and so
reaches DDR. Those interconnects, the processing system and the reset
generator are vendor blocks and are not part of this RTL.

One call proceeds as follows:

1. The host writes one job record per core, and sets `IN_ADDR`, `OUT_ADDR`
   and, if not 5000, `ROUNDS`. It then writes 1 to `AP_CTRL`.
2. The kernel reads each core's record with one 22-beat burst into that
   core's input buffer.
3. All cores start in the same cycle. The kernel waits until every core has
   finished. Cores with shorter jobs finish early and sit idle.
4. Each core's hash is written back with one 16-beat burst.
5. The kernel sets `ap_done` and `ISR[0]`, and raises `interrupt` if enabled.

Register map (32-bit, byte offsets), also listed in `kernel_pkg`:

| offset | name | contents |
|--------|------|----------|
| 0x00 | AP_CTRL | bit0 start (write 1; cleared when taken), bit1 done (clears on read), bit2 idle, bit3 ready |
| 0x04 | GIE | bit0 global interrupt enable |
| 0x08 | IER | bit0 enable the done interrupt |
| 0x0C | ISR | bit0 done interrupt status, write 1 to clear |
| 0x10 | IN_ADDR | job records, 128-byte aligned |
| 0x14 | OUT_ADDR | results, 128-byte aligned |
| 0x18 | ROUNDS | round count, resets to 5000 |
| 0x1C | STATUS | bit0 sticky memory-error flag, write 1 to clear |

Memory layout. Words are 32-bit little-endian, and byte *k* of a field is in
bits `8*(k%4)` of word `k/4`:

- Job record of core *c* at `IN_ADDR + 128*c`: word 0 is the password length,
  word 1 the salt length, words 2–17 the 64 password bytes and words 18–21
  the 16 salt bytes. Lengths above 64 and 16 are clamped.
- Result of core *c* at `OUT_ADDR + 64*c`: the 64 hash bytes in order.

A host loop over many candidates does one call per `N_CORES` candidates.

## How far this follows the original design

Taken from the original design:

- the split of work between host and FPGA: guessing and comparison in
  software, sha512crypt in hardware;
- the copy, start-all, wait-for-all, return sequence of the top-level kernel;
- two cores, and the way they scale to *n* cores;
- the password and salt limits of 64 and 16 bytes;
- one SHA-512 unit called repeatedly per core, with a 4336-byte message buffer;
- the round count as an input, default 5000;
- the names of the kernel ports.

This design's own choices:

- The original was generated from C++ by high-level synthesis, on the glibc
  sha512crypt code and a library SHA-512 routine. Its internal structure is
  not published. The sequencer, the byte-serial message assembly, the
  on-the-fly padding and the one-round-per-cycle SHA-512 are new here. This
  is why the cycle counts above differ from the prototype's speeds.
- The register map, the record layout, the STATUS error bit, the 32-bit bus
  width and the sequential record transfers.
- Results are raw digests, with no `$6$` text encoding.
- glibc enforces a minimum of 1000 rounds when a round count is given. This
  design does not, so tests can run a few rounds.
- There are no vendor blocks, and no clock or FPGA resource figures. The
  original prototype used about 18.6 k LUTs per core on the Z-7020. This RTL
  has not been through FPGA implementation.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `sha512_pkg.sv` | SHA-512 constants, types and round functions |
| `kernel_pkg.sv` | register map, record layout, AXI constants |
| `sha512_compress.sv` | compression engine |
| `sha512_msg_buffer.sv` | 4336-byte message buffer |
| `sha512_hasher.sv` | padding and block sequencing over the buffer |
| `sha512crypt_core.sv` | one sha512crypt core |
| `axil_ctrl_regs.sv` | control registers and interrupt |
| `axi_burst_master.sv` | AXI4 burst master |
| `kernel_sha512crypt_dual.sv` | top: control, memory port, `N_CORES` cores, sequencer |

`tb/`:

| file | contents |
|------|----------|
| `sha512_ref_pkg.sv` | software SHA-512 and sha512crypt reference models |
| `axi_mem_model.sv` | AXI4 memory with random stalls, error injection and protocol checks |
| `axil_host_if.sv` | host-side AXI4-Lite write and read tasks |
| `kernel_tb_env.sv` | kernel, memory and host helpers wired together |
| `tb_<module>.sv` | one self-checking test per module |
| `tb_kernel_full.sv` | full-size run: default parameters, 5000 rounds |
| `tb_kernel_scaling.sv` | the kernel with 8 cores, 5000 rounds |
| `tb_length_sweep.sv` | one core, passwords of 1 to 64 characters, 5000 rounds |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/sha512_pkg.sv rtl/kernel_pkg.sv tb/sha512_ref_pkg.sv \
    tb/tb_kernel_full.sv --top-module tb_kernel_full -o sim
./obj_dir/sim
```

Replace `tb_kernel_full` with any other testbench name. What the tests check:

- `tb_sha512_compress` and `tb_sha512_hasher` compare against the reference
  SHA-512, which is itself checked against the published "abc" digest. They
  cover all padding corner cases and the 4336-byte maximum, and check the
  cycle counts above.
- `tb_sha512crypt_core` compares against the reference sha512crypt and
  against glibc's known result for "Hello world!" with salt "saltstring". It
  also checks the cycle-count formula.
- `tb_kernel_sha512crypt_dual` runs whole kernel calls with a few rounds:
  polled and interrupt completion, clamped lengths, a memory error response
  and back-to-back calls. It checks the burst count of each call.
- `tb_kernel_full` runs the two table workloads and the glibc example at
  5000 rounds, about 5 M cycles and a few seconds of simulation. It requires
  at least the prototype's 90 and 55 passwords/s at 70 MHz.
- `tb_length_sweep` repeats the password-length experiment on one core:
  every length from 1 to 64 with a 16-byte salt at 5000 rounds, about 95 M
  cycles and under a minute of simulation. It checks each hash and each cycle
  count, and prints the speed per length. It also checks that speed never
  rises with length and that the largest drop is at 16 characters.
- `tb_kernel_scaling` builds the kernel with `N_CORES = 8` and hashes eight
  10-character passwords at 5000 rounds. It checks that all eight cores run
  at once and that a call takes no more than the slowest core plus the memory
  transfers (under 3000 cycles). The result is 997,487 cycles per call, about
  561 passwords/s at 70 MHz. Throughput therefore grows linearly with the
  number of cores. The original work's linear projection gave 360
  passwords/s for 8 cores.

## Changing it

- **More cores.** Set `N_CORES`. Records and results keep their 128-byte
  and 64-byte strides, so the host only needs to provide more of them.
  `tb/kernel_tb_env.sv` watches the busy flags of cores 0 and 1 only.
- **Longer passwords or salts.** This is more than a parameter change. The
  message buffer must grow to 16 × (maximum salt length + 255) bytes. `LEN_W` in
  `sha512_pkg` must cover it. The A and DP steps need the "more than 64 bytes"
  repetitions of the full algorithm, which are not in `seg_decode`.
- **Faster cores.** Most of the cycles are the byte-serial message
  assembly and the 17-cycle block load. Writing eight bytes per cycle, or
  loading the next block during compression, would remove most of that
  without touching the SHA-512 engine.
