# Power-aware data bus codec

Driving an off-chip data bus costs energy every time a line changes level, and
the lines of an external bus are far more heavily loaded than on-chip wires. This
codec cuts the number of line transitions. The sender re-codes each word so that
it differs as little as possible from what the lines already hold. A few extra
lines tell the receiver how to undo the coding.

The main idea is that no single coding trick suits all data. Bus-invert helps
data that changes wildly. XOR/XNOR against the previous value helps data that
changes little. The codec therefore tries several codings on every word and
sends whichever toggles the fewest lines. The choice is made separately for each
bit group, because the upper bits of audio or image samples change much more
slowly than the lower bits.

In the default configuration the bus is 8 bits wide, in two 4-bit groups. Each
group has 2 extra lines, so the bus has 8 + 4 lines in all.

The chip top, `bp_soc_top`, puts the coded bus next to parts of the 32-bit
RISC/DSP host processor:

- the execution units: the register file, a SIMD ALU, a one-cycle MAC and a
  bit-reverse address unit for FFT addressing;
- a low-power phased data cache.

The processor's instruction fetch, decoder, pipeline control and instruction
cache are not built. The datapath controls, the cache requests and the bus
requests are therefore top-level ports (see "Not included" below).

## The four coding functions

For one group, let `x` be the new data and `p` the value the group's lines hold
now. `p` is the previously *sent* word, not the previous data. The candidates
are:

| code on the extra lines | function    | word sent      | lines that toggle     | decode          |
|-------------------------|-------------|----------------|-----------------------|-----------------|
| `00`                    | transparent | `x`            | `H(x,p)`              | `y`             |
| `01`                    | INV         | `~x`           | `W - H(x,p)`          | `~y`            |
| `10`                    | XOR         | `x ^ p`        | `ones(x)`             | `y ^ p`         |
| `11`                    | XNOR        | `~(x ^ p)`     | `W - ones(x)`         | `~(y ^ p)`      |

`H` is the Hamming distance and `W` the group width. The last column but one
explains why the mix works. INV pays off when `x` is far from what the lines
hold. XOR pays off when `x` has few ones, so small values and zero cost little;
a zero word leaves the lines frozen. XNOR pays off when `x` has many ones.

The encoder sends the candidate with the fewest toggles. On a tie it picks the
first in the order transparent, INV, XOR, XNOR. That keeps the extra lines at
`00` whenever coding gains nothing. The comparator counts only the data lines,
not the extra lines. The numeric codes in the table are this design's own
choice.

Each of INV, XOR and XNOR also exists as a stand-alone coder. These follow the
single-function rules: invert when `H(x,p) > W/2`; use XOR (XNOR) when that
toggles strictly fewer lines. They are used inside the group encoder for their
candidates and costs. Their own `y`/flag outputs let them be used or tested as
classic one-function coders.

## Structure

```
bp_soc_top                           chip top: datapath + coded bus side by side
├── dsp_datapath  u_dsp              execute step of the host processor
│   ├── register_file                32 x 32 bit, 2 read / 1 write port
│   ├── simd_alu                     32-bit word, 2 x 16 or 4 x 8 lanes
│   ├── simd_mac                     one-cycle MAC, 32-bit accumulator
│   └── bit_reverse_addr             FFT address reversal
├── phased_dcache  u_dcache          2-way phased data cache
└── pa_bus_codec_top  u_codec        (below)

pa_bus_codec_top                     both ends of the bus + monitor
├── codec_port  u_host_end           processor side: encoder + decoder
│   ├── group_encoder  (per group)   comparator + MUX over the 4 functions
│   │   ├── inv_coder  ─┐
│   │   ├── xor_coder   ├─ hamming_dist
│   │   └── xnor_coder ─┘
│   └── group_decoder  (per group)
├── codec_port  u_mem_end            external memory / I-O side
└── switch_activity_monitor          transition counters
pa_codec_pkg                         function codes (codec_mode_e)
dsp_pkg                              XLEN and the ALU / lane / MAC enums
```

Group 0 is the least significant group. Its function code sits on
`extra[1:0]`, group 1's on `extra[3:2]`, and so on.

## The bus is shared by both directions

Writes go from the host end to the memory end and reads come back over the
same lines. The "previous value" `p` must therefore be what the lines actually
hold, whichever end drove them last. Both ends keep a copy of it (`hist` in
`codec_port`). Each end updates its copy with every word that goes over the
lines, sent or received, so both copies always agree. This is what makes the
decoder correct. If the two copies ever differed, XOR/XNOR words would decode
wrongly.

One case needs care: an end receives a word and sends one in the same cycle.
Its encoder then codes against the word arriving now, because that is what the
lines will hold just before its own word. `codec_port` forwards `bus_in` to the
encoder in that case. The two ends must never send in the same cycle. The top
guarantees this, since `xfer_dir` picks a single direction, and an assertion
checks it.

Between transfers the lines keep their last value, as a bus keeper would. The
top models this by selecting the end that drove last. Idle cycles cause no
transitions.

## Timing

- A transfer is requested with `xfer_valid` and `xfer_dir` (0 = host to memory,
  1 = memory to host), with the word on `host_wdata` or `mem_rdata`.
- The sending end registers the coded word. It is on the lines one cycle later.
- In that cycle the receiving end decodes it combinationally and presents it on
  `mem_wdata`/`mem_wvalid` or `host_rdata`/`host_rvalid`.
- Latency is therefore one cycle, and throughput is one word per cycle in
  either direction. Direction changes need no idle cycle.
- Reset (`rst_n`, asynchronous, active low) sets the lines' previous value to
  zero and the codes to transparent.

There is no back-pressure and no address or command path. The protocol of the
memory interface is left to the surrounding system.

## DSP datapath

`dsp_datapath` is the execute and write-back part of the host processor, in a
single cycle. Both source registers are read, the selected unit computes, and
at the clock edge the result goes to `rd`. The inputs are what an instruction
decoder would drive:

- `unit`: 0 = ALU, 1 = MAC, 2 = address unit. The address unit writes no
  register.
- `use_imm`: a constant `imm` replaces `rs2`. This is the `rd,data` form of
  the instructions. For the address unit, `imm` replaces `rs1`, giving the
  direct form.
- `valid`: nothing is written, and the accumulator holds, unless it is high.

`result` and `rev_addr` are valid in the same cycle; registers and ACC change
at the edge.

| unit | operations |
|------|------------|
| `simd_alu` | ADD, SUB, MUL, AND, OR, XOR on one 32-bit word, two 16-bit lanes or four 8-bit lanes. Carries and products stay in their lane, truncated to its width. INV, 1-bit logical SHR/SHL, MOVB (`y = b`), MOVL/MOVU (load 16 bits into the lower/upper half, keep the other). |
| `simd_mac` | `MAC_WORD`: ACC += a * b (low 32 bits). `MAC_HALF`: ACC += a.lo*b.lo + a.hi*b.hi with signed 16-bit halves (the MACHR instruction). `MAC_CLEAR`: ACC = 0. The new ACC is also the result written to `rd`. |
| `bit_reverse_addr` | reverses the low `span` bits of the address and passes the higher bits through, for example 01101 -> 10110 with span 5. |
| `register_file` | 32 registers: 16 general-purpose plus 16 used for interrupts and configuration. Read is combinational and write is synchronous. A read of the register being written gives the old value. Reset clears all registers. |

The ALU enum codes are internal to this RTL and do not follow the processor's
instruction opcodes.

## Phased data cache

`phased_dcache` is a 2-way set-associative cache of 512 sets. Each line holds
one 32-bit word with an 8-bit tag, so addresses are 17-bit word addresses.
It splits each access over two pipeline stages to save power:

- **ALU stage**, the cycle the request is accepted: the tags of both ways are
  read and compared.
- **WB/MEM stage**, the next cycle: only the way that hit is read or written.
  A parallel lookup would read both data ways.

Timing:

- A load hit returns its data (`resp_valid`, `resp_hit`) one cycle after the
  request.
- A load miss requests main memory (`mem_req`/`mem_ack`). It returns the word
  in the acknowledge cycle and fills the FIFO victim way of the set.
- Stores are write-through and do not allocate on a miss. A store that hits
  also updates the cached word.
- `req_ready` is low while main memory is busy. Requests then wait, since
  misses block.

The counters `tag_reads`, `data_reads`, `accesses` and `misses` show the
array activity. In `tb_phased_dcache`, 8141 random accesses make 6632
data-way accesses where a parallel lookup would make 15036, 56 % fewer. Tag
reads are the same.

In the top, the cache's main-memory side is a port. In `tb_bp_soc_top` the
testbench turns each miss or store into four byte transfers over the coded bus.

## Switch activity monitor

`switch_activity_monitor` counts, for every word on the lines:

- `sa_data`: toggles on the coded data lines;
- `sa_extra`: toggles on the extra lines;
- `sa_raw`: toggles the same words would have caused uncoded.

It also counts the words themselves. The reduction achieved is
`(sa_raw - sa_data - sa_extra) / sa_raw`; the extra lines count as a cost. The
counters are 32 bits wide, wrap around, and restart on `clear`.

## Measured reduction

`tb/tb_sar_workloads.sv` feeds streams of 100,000 words through the codec in
several group configurations. In a "variability a/b" stream, each bit of the
upper half toggles from word to word with probability a %, and each bit of the
lower half with probability b %. Results, including the extra lines:

| stream        | 8 b, 1 group | 8 b, 2 groups (default) | 16 b, 1 group | 16 b, 2 groups | 16 b, 4 groups |
|---------------|-------------:|------------------------:|--------------:|---------------:|---------------:|
| clustered     | 21.3 %       | 26.5 %                  | 17.5 %        | 18.4 %         | 17.6 %         |
| random        | 15.7 %       | 8.7 %                   | 16.0 %        | 15.7 %         | 8.8 %          |
| 25/25         | -12.2 %      | -21.0 %                 | -7.6 %        | -11.8 %        | -20.8 %        |
| 25/75         | 13.2 %       | 25.5 %                  | 15.0 %        | 35.2 %         | 25.3 %         |
| 25/100        | 23.2 %       | 55.7 %                  | 31.5 %        | 67.5 %         | 55.8 %         |
| 75/25         | 13.4 %       | 25.2 %                  | 15.1 %        | 35.2 %         | 25.4 %         |
| 100/100       | 87.5 %       | 75.0 %                  | 93.8 %        | 87.5 %         | 75.0 %         |

Splitting into groups pays off when the halves behave differently (25/75,
25/100). It costs when the data is uniformly noisy, because every group adds two
extra lines. The first ten samples of an 8-bit audio recording, run in
`tb_pa_bus_codec_top`, toggle 36 lines uncoded. With the default codec they
toggle 16 data lines plus 10 extra lines, a reduction of 28 %.

These figures are lower than the published results for the same configurations:
about 18 % for random 8-bit data in two groups, and about 0 % rather than
negative at 25/25. Counted on the data lines alone, the reductions are far
higher: 54.9 % for random data and 31.0 % at 25/25 (8 b, 2 groups). The
testbench prints both figures. The published results lie between the two.
The published evaluation does not say how it counted the extra lines or broke
ties. A comparator that also weighs extra-line toggles, or
that prefers the code already on the extra lines, might narrow that gap. That
has not been tried here, and it would change the selection rule described
above.

### On processor programs

The chip-level testbenches run programs on `bp_soc_top` and move all of their
data over the coded bus. The figures cover that bus traffic only:

| program (testbench)                      | bus words | data lines only | with extra lines | published |
|------------------------------------------|----------:|----------------:|-----------------:|----------:|
| 16-tap FIR, 64 samples (`tb_bp_soc_top`) | 184       | 55.0 %          | 4.1 %            | 46.13 %   |
| 8x8 2-D DCT (`tb_soc_programs`)          | 320       | 63.1 %          | 6.1 %            | 58.92 %   |
| 64x64 Sobel (`tb_soc_programs`)          | 7940      | 59.1 %          | 4.1 %            | -         |

The data and the coefficients are the testbenches' own, because the published
ones are not available. The published program figures lie close to the
data-line reduction. Once the extra lines are counted, almost nothing is left:
with 4 extra lines on 8 data lines, codes that change from word to word cost
nearly as much as they save. For a real bus, weigh the extra lines, since they
are driven too.

## Where this RTL departs from or adds to the source design

- **Extra-line codes and tie order** (`00/01/10/11`; transparent first) are
  choices made here.
- **Two-way history and forwarding** (see above) are this design's own. The
  source design shows an encoder/decoder at each end of one bus, but not how
  they share the previous value.
- **Single-function rules use strict inequality.** The invert rule is
  `H > W/2`, so a tie is not inverted. The XOR/XNOR rules switch only when they
  toggle strictly fewer lines.
- **Decoder is combinational and encoder registered.** This gives the stated
  one-cycle processing penalty.
- **Monitor counters:** their width, wrap-around and `clear` are choices made
  here.
- **Data cache details** are choices made here:
  - write-through with no allocation on a store miss;
  - a blocking miss;
  - the req/ack memory port;
  - valid bits in flip-flops.

  The sizes (2 x 512 x 32 data, 2 x 512 x 8 tags, FIFO replacement) follow
  the chip's memory list. The arrays are register arrays, not SRAM macros.
- **Datapath details** are choices made here, because the source describes the
  units only in outline:
  - the signed 16-bit MAC halves, with A1/B1 as the low halves;
  - logical shifts;
  - the meaning of MOVL/MOVU;
  - the clear operation;
  - pass-through of the address bits above the span;
  - the single-cycle execute step.
- **Not included:** the processor's instruction fetch and branch prediction,
  instruction decoder and 7-stage pipeline control, data forwarding and the
  load/store unit. The source gives no instruction format or pipeline control
  for them. Also left out: the master-slave instruction cache (its algorithm is
  not given), the external memory, the SRAM macros, the pads and the memory
  BIST. The top's `dp_*` ports take the place of the decoder, `dc_req_*` and
  `host_*` that of the load/store path, and `mem_*` and `dc_mem_*` that of the
  external memory. The
  interrupt registers are plain registers; no interrupt logic exists.

## Parameters

| module                    | parameter    | default | meaning                                   |
|---------------------------|--------------|---------|-------------------------------------------|
| `bp_soc_top`              | `NREG`       | 32      | registers in the datapath                 |
|                           | `DC_WAYS`, `DC_SETS`, `DC_TAG_W` | 2, 512, 8 | data cache shape        |
|                           | `DATA_W`, `NUM_GROUPS`, `CNT_W` | 8, 2, 32 | passed to the codec      |
| `pa_bus_codec_top`        | `DATA_W`     | 8       | data lines                                |
|                           | `NUM_GROUPS` | 2       | bit groups (must divide `DATA_W`)         |
|                           | `CNT_W`      | 32      | monitor counter width                     |
| `codec_port`              | `DATA_W`, `NUM_GROUPS` | 8, 2 | as above                           |
| `group_encoder/decoder`   | `W`          | 4       | group width                               |
| `inv/xor/xnor_coder`, `hamming_dist` | `W` | 8     | word width                                |
| `bit_reverse_addr`        | `W`          | 5       | address width (32 in the datapath)        |
| `register_file`           | `NREG`, `XW` | 32, 32  | registers, register width                 |
| `phased_dcache`           | `WAYS`, `SETS`, `TAG_W`, `XW` | 2, 512, 8, 32 | ways, sets, tag and word width |

The extra lines always number `2 * NUM_GROUPS`. The datapath word (`XLEN`) is
fixed at 32 bits in `dsp_pkg`.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pa_codec_pkg.sv rtl/dsp_pkg.sv tb/codec_ref_pkg.sv tb/dsp_ref_pkg.sv \
    tb/tb_bp_soc_top.sv --top-module tb_bp_soc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

- `tb_hamming_dist`, `tb_inv_coder`, `tb_xor_coder`, `tb_xnor_coder`: the
  coding units. The INV and XOR ones include the 10-sample audio example worked
  by hand.
- `tb_group_encoder`, `tb_group_decoder`: exhaustive for 4-bit groups.
- `tb_codec_port`: one end against a reference far end. It covers
  receive-and-send in one cycle and the one-cycle latency.
- `tb_switch_activity_monitor`: the counters.
- `tb_pa_bus_codec_top`: end to end at the default parameters. It runs writes,
  reads, back-to-back direction changes and idle cycles, checks every function
  in every group, and checks the line values and the counters.
- `tb_sar_workloads`: the measurements above, about 6 s. It uses the
  `sar_harness` helper.
- `tb_simd_alu`, `tb_simd_mac`, `tb_bit_reverse_addr`, `tb_register_file`:
  the datapath units against integer models. The MAC test includes a worked
  dual 16-bit step.
- `tb_phased_dcache`: random loads and stores against a reference of the tags
  and FIFO pointers, with a main memory of random latency.
- `tb_dsp_datapath`: an 8-tap FIR with dual MACs, then 20,000 random
  instructions against a register and accumulator model.
- `tb_bp_soc_top`: the whole chip top at its default parameters. The
  testbench plays the decoder, the load/store path and a 256-byte external
  memory. It runs these steps:
  1. It computes bit-reversed addresses with the address unit and stores 64
     audio-like samples over the coded bus in that order.
  2. It reads them back in natural order. It then loads the same buffer as
     words through the data cache, covering misses, hits, FIFO eviction and
     write-through stores. The misses and stores go over the bus.
  3. It removes the 128 offset with 16-bit SIMD subtraction.
  4. It computes 16-tap FIR outputs with dual MACs and a signal energy with
     word MACs.
  5. It writes each result to memory and reads it back.
  6. It ends with random bus traffic.

  It checks every result, every word on the lines and the counters.
- `tb_soc_programs`: two image programs on the chip top.
  - An 8x8 2-D DCT, done as a row pass with dual 16-bit MACs and then a column
    pass with word MACs. The result is also checked against a floating-point
    DCT.
  - Sobel edge detection on a 64x64 image, with the Gx/Gy kernels computed by
    dual 16-bit MACs and Gx²+Gy² by word MACs. The datapath has no square-root
    operation, so the testbench takes the square root.

  The whole image and all results cross the coded bus. This run takes about
  0.2 s.

`tb/codec_ref_pkg.sv` is an independent behavioural model of the coding, and
`tb/dsp_ref_pkg.sv` one of the datapath operations. The testbenches compare
against them.
