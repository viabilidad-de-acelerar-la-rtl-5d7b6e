# PCIe seismic-data decompressor for an FPGA co-processor

Moving seismic data from a host CPU to an FPGA over PCIe is slow compared with
what the FPGA can compute. This design sends the data compressed instead and
expands it on the FPGA. The compression is done ahead of time (for example
during acquisition) by a uniform quantizer followed by a Huffman coder, with no
transform stage. Transferring the compressed data and then decompressing it
only pays off when

    t_transfer(compressed) + t_decompress  <  t_transfer(raw)

so the FPGA side is built to decompress quickly and to overlap decompression
with the next transfer. Four identical decompression cores work in parallel.
Each one has its own slice of the memories, so the host can fill the memory of
core k+1 while core k is still decoding.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). The PCIe endpoint
itself (a vendor hard block with its transaction layer) and the host driver are
not part of it. The endpoint's simple word read/write strobes are the ports of
the top level.

## Structure

```
pcie_decompressor_top
├── communication_module          PCIe strobes -> registers and memories
│   ├── register_bank             32 x 32-bit parameter/status registers
│   └── memory_bank  x3           bank 1: dictionary, bank 2: compressed, bank 3: decompressed
│       └── dp_ram   x4           1024 x 32 simple dual-port block RAM
└── decompression_core x4         core k owns memory k of every bank
    ├── huffman_decoder
    │   ├── huff_control_unit      FSM
    │   ├── huff_address_generator x2 (dictionary address, compressed-word address)
    │   ├── huff_shift_register   x2 (shift_register_c: dictionary word, shift_register_d: 64-bit stream buffer)
    │   ├── huff_dictionary        CODES + SYMBOLS RAMs, 256 entries
    │   └── huff_comparators       16 prefix comparators
    ├── inverse_quantization       out = symbol * K + Minimum, one register between * and +
    └── huff_address_generator     output word address
```

The shared constants, register map, address regions and dictionary-word layout
are in `rtl/pcie_decomp_pkg.sv`.

The following follow the published design: the 32×32 register bank, the three
banks of four 1024×32 dual-port memories, the bank roles, the selection register
choosing a memory inside a bank, hardware priority over the host, four parallel
cores, the decoder's internal blocks, and the multiply/register/add inverse
quantizer. The following are this implementation's own choices: the address and
register maps, the data formats, the decoder's search algorithm and state
machine, the number format, and all handshakes and latencies.

## Host interface

The top has one write strobe and one read strobe, both 32-bit words:

| port | meaning |
|---|---|
| `b_wr_en_i`, `b_wr_a_i[11:0]`, `b_wr_d_i[31:0]` | write one word |
| `a_rd_en_i`, `a_rd_a_i[11:0]` | read one word; data on `a_rd_d_o` **one clock later** |
| `pcie_wr_blocked_o` | a write was refused because its memory belongs to a running core |
| `core_busy_o`, `core_done_o`, `core_error_o` | per-core status (also in `REG_STATUS`) |

Word address = `{region[1:0], word[9:0]}`:

| region | target |
|---|---|
| 0 | register bank, `word[4:0]` |
| 1 | dictionary bank, memory `REG_SEL_MEM` |
| 2 | compressed-data bank, memory `REG_SEL_MEM` |
| 3 | decompressed-data bank, memory `REG_SEL_MEM` |

Registers (word index in region 0):

| # | name | use |
|---|---|---|
| 0 | `REG_CTRL` | bit k: a 0→1 change starts core k |
| 1 | `REG_SEL_MEM` | [1:0] which of the four memories of a bank the host reaches |
| 2 | `REG_DICT_SIZE` | dictionary entries (1..256), shared by all cores |
| 3 | `REG_K` | quantization step K |
| 4 | `REG_MIN` | quantizer minimum |
| 8..11 | `REG_NSYM0+k` | symbols for core k to decode (≤1024) |
| 16 | `REG_STATUS` | [3:0] busy, [7:4] done, [11:8] error; the hardware rewrites it every clock, so host writes to it have no effect |

All registers reset to 0 (synchronous, active-low `rst_n`). Memory contents
are not reset.

### Running a job

1. Write `REG_DICT_SIZE`, `REG_K`, `REG_MIN` and `REG_NSYM0..3`.
2. For k = 0..3, set `REG_SEL_MEM = k` and write the dictionary into region 1.
   Every core needs its own copy.
3. For k = 0..3, set `REG_SEL_MEM = k`, write compressed section k into
   region 2, and then set bit k of `REG_CTRL`, keeping the lower bits set.
   Core k starts at once. The host goes on with section k+1 while core k decodes.
4. Poll `REG_STATUS` until the done bits are all set. Then, for each k, set
   `REG_SEL_MEM = k` and read samples 0..n-1 from region 3.

To start a core again, clear its `REG_CTRL` bit and set it again.

### Hardware priority

Core k owns memory k of all three banks from its start until its last sample
is written. During that time:

- a host write to that memory is dropped, and `pcie_wr_blocked_o` pulses;
- a host read of that memory returns 0;
- the other memories stay fully reachable.

This ownership is what lets transfer and decompression overlap safely. The
published design states only that hardware access has priority, so that a
memory cannot change while it is being decompressed. Holding ownership for the
whole run, rather than arbitrating clock by clock, is this implementation's
reading of that rule. The register bank applies the same rule: an internal write
wins over a host write to the same register in the same clock.

## Data formats

**Dictionary word** (one per entry, in bank 1):

```
 31          16 15    11 10  8 7       0
+--------------+--------+-----+---------+
| code         | length | 000 | symbol  |
+--------------+--------+-----+---------+
  first code bit in bit 31; length 1..16
```

**Compressed stream** (bank 2): the concatenated code words, packed first bit
first, starting at bit 31 of word 0 and running into the following words. No
header is needed, because the symbol count comes from a register.

**Samples** (bank 3): word i holds sample i, `symbol_i * K + Minimum`, in
32-bit two's complement. K, Minimum and the output share one fixed-point
format, chosen by the host. The product keeps its low 32 bits and is not
rescaled. For example, 24.8 fixed point makes K = 0x140 a step of 1.25.

Symbols are 8 bits, giving 256 quantization levels, and code words are at most
16 bits long. Both sizes are this implementation's choice (`SYM_W`, `MAX_LEN` in
the package). The published design gives no widths for them.

## How the Huffman decoder works

The decoder searches a table. It is the part of the design that is hardest to
follow, and it also sets the speed.

1. **Dictionary load.** For each entry i, the control unit requests word i of the
   dictionary memory. It captures the word in `shift_register_c` one clock later,
   then writes it into the decoder's own dictionary RAM: `{code, length}` go into
   CODES and `symbol` into SYMBOLS. The dictionary address generator provides i
   for both the memory read and the RAM write. This takes 3 clocks per entry.
2. **Stream buffer.** `shift_register_d` is 64 bits wide. Bit 63 holds the next
   unread stream bit, and a counter tracks how many bits are valid. Each time 32
   or fewer bits remain, the control unit fetches the next compressed word and
   appends it below the valid bits (2 clocks). The buffer therefore always holds
   more than the 16 bits of the longest code while it is being searched. At the
   start it is filled twice.
3. **Search.** The dictionary RAM is read from entry 0 upward, one entry per
   clock. Comparator L (L = 1..16) tests whether the first L bits of the buffer
   equal the first L bits of the entry's code. The flag that matches the entry's
   own length decides. Huffman codes are prefix-free, so at most one entry can
   match.
4. **Output.** On a match, `data_ready` is raised for that clock with the symbol
   on the SYMBOLS output. The code's length is shifted out of the buffer and the
   search restarts at entry 0.

After `nsym` symbols the decoder pulses `finish`. If the whole dictionary is
searched without a match, it finishes with `error` set.

Timing, in clocks from the clock in which the start is seen up to and including
the clock in which `finish` is high:

    1 + 3·D + 4 + Σ_symbols (i_s + 2) + 2·R

Here D is the number of dictionary entries, i_s is the index of the entry that
decodes symbol s, and R is the number of refills after the start. So the cost
of a symbol depends on where its code sits in the dictionary. Store the entries
most-frequent first, which canonical Huffman order with shortest codes first
already gives. With the skewed test distribution this comes to about 3 clocks
per sample. Huffman decoding is the bottleneck of the whole design, and a
faster decoder would be the first thing to improve.

The inverse quantizer adds one clock (multiply, register, add) and accepts one
symbol per clock. `done` rises one clock after the decoder's `finish`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog.

| testbench | what it checks |
|---|---|
| `tb_dp_ram` | 1024 random words, read latency, hold, read-before-write |
| `tb_register_bank` | host writes/reads of all 32 registers, parallel outputs, internal-write priority |
| `tb_memory_bank` | host access via the selection register, core ports, refused writes and zero reads while owned |
| `tb_huff_address_generator`, `tb_huff_shift_register`, `tb_huff_dictionary`, `tb_huff_comparators` | against software models, clock by clock |
| `tb_huff_control_unit` | a 21-clock hand-written control trace (load, double refill, search, refill, finish) and the no-match error |
| `tb_inverse_quantization` | `symbol*K+Minimum` and one-clock latency, with random K and Minimum |
| `tb_huffman_decoder` | six random streams (up to ~1000 symbols), every symbol, the exact clock count from the formula above, the unknown-code error |
| `tb_decompression_core` | decoded and rebuilt samples in memory, write count, busy/done timing |
| `tb_communication_module` | address decoding of all regions and memories, core-side ports, refused writes, status write |
| `tb_pcie_decompressor_top` | the whole flow at default sizes (see below) |
| `tb_workloads` | six data sets at the compression ratios of the evaluation (see below) |

`tb/tb_huff_pkg.sv` holds the reference used by the Huffman testbenches: a
13-symbol canonical code with lengths 2..16, an encoder and the clock-count
formula.

`tb_pcie_decompressor_top` runs the top level with all parameters at their
defaults. It loads the dictionary into all four memories and sends four
sections of 1024 symbols, starting each core right after its section arrives.
While core 0 runs, it tries to overwrite core 0's compressed memory. It then
polls the status register and reads back all 4096 samples. It also checks that
each mechanism actually happened: dictionary loads, transfers overlapping
decoding, several cores busy at once (all four in practice), a refused write,
buffer refills, and four starts. Each core's busy time is checked against the
formula. The run takes a few seconds.

### Workloads

The design was evaluated on marine seismic data sets compressed to ratios of
11.84, 12.86, 16.82, 18.04, 22.31 and 24.37, all relative to 32-bit samples.
Those traces are not available here. `tb_workloads` therefore builds a synthetic
stand-in for each ratio and sends each one through the top level as a single
load of 4096 samples.

- The quantization indices follow a geometric distribution around level 128.
- The distribution's ratio is bisected until the Huffman-coded size hits the
  target compression ratio within 3 %.
- The testbench builds the Huffman code itself, limited to 16 bits, and makes it
  canonical.

The testbench checks every sample. It also reports the clocks from the first
compressed word to the last core done, next to the clocks the host would need
to write the raw samples at the same rate. The host in the testbench writes one
word every two clocks.

| CR | dictionary entries | compressed words | transfer + decode (clocks) | raw transfer (clocks) |
|---|---|---|---|---|
| 11.84 | 17 | 348 | 4833 | 8192 |
| 12.86 | 15 | 321 | 4362 | 8192 |
| 16.82 | 11 | 245 | 3559 | 8192 |
| 18.04 | 10 | 229 | 3485 | 8192 |
| 22.31 | 7 | 186 | 3004 | 8192 |
| 24.37 | 6 | 170 | 2836 | 8192 |

With this fast host model the decoders dominate the total. On a real PCIe link
each word costs far more than two clocks, so the transfer side dominates, and
the gain grows roughly with the compression ratio. The table shows how the
design behaves; it does not measure a link. A real trace set is larger than one
load, and the host would send it in several passes of at most 4096 samples.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pcie_decompressor_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/pcie_decomp_pkg.sv tb/tb_huff_pkg.sv \
    tb/tb_pcie_decompressor_top.sv -Mdir obj
./obj/Vtb_pcie_decompressor_top
```

The testbenches assume two-state simulation. Everything they read is
initialised first.

## Sizes and how far to trust them

| parameter | default | origin |
|---|---|---|
| cores / memories per bank | 4 | published design |
| memory | 1024 × 32 | published design |
| register bank | 32 × 32 | published design |
| symbol width | 8 bits | this implementation |
| longest code | 16 bits | this implementation |
| dictionary depth | 256 entries | this implementation (one per symbol value) |

The testbenches only exercise the defaults of the package constants (`SYM_W`,
`MAX_LEN`). The dictionary-word layout assumes `MAX_LEN + length field + 3 +
SYM_W = 32`. Change these together.

One load holds 1024 output samples per core, 4096 in total. A larger data set
is processed in several load, decompress and read-back passes. The host would
have to schedule those passes; nothing here does it.

Known departures and gaps:

- The PCIe endpoint and the host driver, which writes at an offset, are
  not included. The top's ports stand in for the endpoint's memory-access
  strobes, with 1-clock read latency.
- The Huffman decoder follows the structure of the published decoder's block
  diagram. That decoder came from earlier work, and its internal algorithm is
  not given there; the table search above is this implementation's.
- The number format of the inverse quantizer is not given in the published
  design. Fixed point was chosen so that it maps onto one multiplier and one
  adder.
- The decoder never checks for a compressed stream that is shorter than the
  symbol count. It keeps reading words, and past the end of the memory the
  address wraps. The host must set `REG_NSYM` correctly.
