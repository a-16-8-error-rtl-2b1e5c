# Double-error-correcting (16,8) memory EDAC

Dense SRAM in space picks up bit flips from radiation. A Hamming code
corrects one flipped bit per word. That is not enough when a single
energetic particle flips two bits of a byte, or when a second upset lands
before software has rewritten ("scrubbed") the first. This design protects
every byte of memory with a (16,8) code of minimum distance 5. Each 8-bit
data byte is stored with an 8-bit parity byte. Any one or two flipped bits
in those 16 bits are corrected on the fly as the word is read.

Storage doubles, as it already does when a (12,8) Hamming code is laid out
in two bytes. The whole codec is combinational: no clock, no wait states,
no interrupts and no software help. It sits between the CPU and the
memory, and the CPU sees only a longer combinational path.

## The code

The code is linear and systematic. The data byte `m` is stored as it is,
next to a parity byte

    p = m P    (arithmetic modulo 2)

`P` is an 8x8 circulant matrix: its first row is `0 1 0 0 1 1 0 1`, and
each row below it is the row above rotated one place to the right. The code
is quasi-cyclic because of that circulant structure. Every row and every
column of `P` has four ones, so each parity bit is the XOR of four data
bits. The smallest non-zero code word `[p m]` has weight 5. That is the
distance needed to correct two errors, and `tb_qc_encoder` checks it
exhaustively.

**Bit numbering.** Vectors are numbered from the left. Element `i+1` of the
row vector `m` is `m[i]` in the RTL, and `P[i][j]` is row `i`, column `j`.
So parity bit `p[j]` is the XOR of the `m[i]` for which `P[i][j] = 1`.
`qc16_8_pkg` keeps the first row of `P` as a constant (`P_ROW0`, with bit
`j` = column `j`) and derives every other element from it.

## Decoding: syndrome and look-up table

This is the part that differs from Hamming decoding. There is no simple
algebraic rule for locating two errors in this code, so the decoder looks
them up in a table instead (`qc_decoder`):

1. **Re-encode.** The data byte read back, `m'`, goes through the same
   parity generator, giving `m'P`.
2. **Syndrome.** That result is XOR-ed with the parity byte read back, `p'`:
   `s = m'P xor p'`. If the word is intact, `s = 0`. Otherwise `s`
   depends only on the error pattern `e`: it is the XOR of the columns of
   the parity-check matrix `H = [I | P^T]` at the flipped positions. A
   flipped parity bit `j` contributes the unit vector `j`. A flipped data
   bit `i` contributes row `i` of `P`.
3. **Look-up.** Because the distance is 5, every error pattern of weight 0,
   1 or 2 has its own syndrome. There are 1 + 16 + 120 = 137 such patterns
   among the 256 syndromes. The table (`qc_syndrome_lut`) maps each of
   these 137 syndromes to the data part `e_hat` of its pattern:
   - 8 single data-bit errors,
   - 28 double data-bit errors,
   - 64 errors with one data bit and one parity bit.

   That makes 100 syndromes with a non-zero correction. The 36
   parity-only patterns (8 single, 28 double) map to `e_hat = 0`. Parity
   bits never reach the CPU, so they need no correction.
4. **Correct.** `m_hat = e_hat xor m'`.

The table is not stored as data. `qc16_8_pkg::build_lut()` is a constant
function that enumerates the 137 patterns, computes each syndrome with the
same encoder function, and fills a 256 x 9 array while the design is
elaborated. Bit 8 of an entry says "reachable". Synthesis turns the
constant array into a ROM or into logic. To change the code, change
`P_ROW0`, and the table follows.

**Beyond two errors.** 119 syndromes are produced by no pattern of weight 2
or less. For these the decoder raises `uncorrectable` and passes the data
through with no correction. Three or four flipped bits produce such a
syndrome in about 57 % of cases (320 of the 560 three-bit patterns). In
the other cases they look like a one- or two-bit error, and the data is
miscorrected without a flag. That is the limit of a distance-5 code, not
a fault of the decoder. The `uncorrectable` and `corrected` flags are this
design's own addition for status and scrub software. They are plain
levels: nothing in the design interrupts the CPU.

**Scrubbing.** The codec corrects data on its way to the CPU but never
rewrites memory. A corrected error stays in the SRAM until software reads
the word and writes it back. Until then further upsets in the same byte
add up, and a third one goes beyond what the code can correct. The design has no hardware write-back: the CPU's
two strobes are its only control.

## EDAC device and strobe control

`edac_device` is one EDAC chip: `LANES` byte lanes, each with its own
encoder and decoder. It defaults to 2 lanes, so one device covers 16 data
bits. The CPU controls the whole data flow with two strobes:

| `rd` | `wr` | memory         | CPU read data / flags |
|------|------|----------------|-----------------------|
| 0    | 0    | idle           | zero                  |
| 0    | 1    | `mem_we` high  | zero                  |
| 1    | 0    | `mem_oe` high  | corrected data, flags |
| 1    | 1    | neither enable | zero                  |

On a write, `mem_wdata` is the CPU data unaltered and `mem_wparity` is the
parity of each byte. On a read, the data and parity read back pass through
the decoders to `cpu_rdata`. The strobes are active high. The two-strobe
scheme is the document's. The polarity and the both-high rule are this
design's choices. Buses are split into input and output directions; a
board would use bidirectional buses with tri-state drivers.

## The on-board computer's memory

`obc_edac_top` is the organisation of a small satellite computer: a 32-bit
CPU, two 16-bit EDAC devices, and two SRAM banks of 1M x 32. Each bank
word holds 16 data bits in bits 15:0 and their 16 parity bits in bits
31:16. Device `d` carries CPU data bits `[16d+15:16d]` and drives bank `d`.
Within a device, byte lane `k` uses data bits `[8k+7:8k]` and parity bits
`[16+8k+7:16+8k]` of the bank word. The address and strobes go to every
bank unchanged.

The split into two 16-bit devices and two 1M x 32 banks comes from the
reference board. The bit assignment above is this design's own. The CPU
and the SRAMs are bought parts. Their signals are ports of the top:
`sram_*` are unpacked arrays indexed by device number.

Parameters: `ADDR_W = 20` (1M words per bank), `DEVICES = 2`, `LANES = 2`.

## Timing

The encoder, decoder and device have no clock and no state. The published
implementation was a flow-through codec in an Actel SX-family FPGA. It
reported about 12 ns to encode and 26 ns to decode, against 10 ns and
18 ns for a Hamming codec in the same technology. Both fit within a
typical 100 ns low-power SRAM access. The codec took fewer than 2000
gates, and one 8000-gate A54SX08 held it. These figures belong to that
implementation and have not been reproduced for this RTL.

## How far it is checked

Every testbench is self-checking against `tb/qc_ref_pkg.sv`. That package
holds `P` as the literal printed matrix and computes encodings and
syndromes with its own code.

- `tb_qc_encoder`: all 256 data bytes, and the minimum code-word weight of 5.
- `tb_qc_syndrome_lut`: all 256 syndromes against a table the testbench
  builds from the columns of `H`. It also checks the counts: 137
  reachable, 100 with a data correction.
- `tb_qc_decoder`: every data byte with every error pattern of weight up
  to 2 (35,072 cases), all corrected; 4000 random three- and four-bit
  patterns, each flagged exactly when no pattern of weight up to 2 explains
  its syndrome.
- `tb_edac_device`: the strobe truth table, the stored data and parity,
  and read-back after errors of weight 0 to 3 in both lanes.
- `tb_obc_edac_top`: full size, with two 1M x 32 bank models
  (`tb/sram_model.sv`). It runs 1500 write/upset/read rounds at random
  addresses. Each byte lane sees one of six upset kinds: none, one data
  bit, two data bits, data and parity bit, parity only, or three bits. The
  testbench counts each kind and fails if any never occurs. Every tenth
  round it also writes the corrected word back, as scrub software would,
  and checks that both banks then hold clean code words.

Not checked: timing and gate count on any real technology, and the CPU and
SRAM parts themselves.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/qc16_8_pkg.sv tb/qc_ref_pkg.sv tb/tb_obc_edac_top.sv \
        --top-module tb_obc_edac_top -o sim && obj_dir/sim

Replace the testbench file and the `--top-module` name to run another
testbench. Each testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`.

## Files

| file | contents |
|------|----------|
| `rtl/qc16_8_pkg.sv` | code constants, `P`, encode and syndrome functions, table builder |
| `rtl/qc_encoder.sv` | parity generator `p = mP` |
| `rtl/qc_syndrome_lut.sv` | syndrome to `e_hat` table, uncorrectable flag |
| `rtl/qc_decoder.sv` | re-encode, syndrome, look-up, correction |
| `rtl/edac_device.sv` | one multi-byte EDAC device with strobe control |
| `rtl/obc_edac_top.sv` | 32-bit CPU, two devices, two SRAM banks |
| `tb/qc_ref_pkg.sv` | independent reference model for the testbenches |
| `tb/sram_model.sv` | behavioural SRAM bank with an upset injector |
| `tb/tb_*.sv` | self-checking testbenches |
