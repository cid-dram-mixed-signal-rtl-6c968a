# CID/DRAM mixed-signal vector-matrix multiplier

This design computes large vector-matrix products, `Y(m) = sum_n W(m,n) X(n)`, in a single dense
array. Every matrix bit is stored in its own three-transistor cell. The cell also multiplies that
bit by one input bit, and the products are added by letting charge collect on a shared wire. The
analog array handles only *binary* products. Digital logic at its edges does all the weighting:

* each I-bit matrix element occupies I rows of one-bit cells (bit-parallel);
* the J-bit input vector is fed one bit-plane per compute, least significant plane first
  (bit-serial);
* for every bit-plane, each row yields the number of columns whose matrix bit and input bit are
  both 1. Row-parallel flash ADCs quantize these counts, and a small shift-and-add pipeline
  weights and sums the I x J quantized partials for each output.

A second, identical chip holds an all-zero matrix and runs in lock step with the main one. Its
outputs contain only the offsets that both chips share: input feedthrough and the drift of stored
charge between refreshes. Subtracting them row by row removes those offsets.

The RTL models the 512-column x 128-row array with 128 six-bit gray-code flash ADCs, its
load/readout/refresh/control logic, the reference-chip subtraction and the digital recombination.
The array cells and the ADC comparators are analog. They appear here as behavioural models
(`cid_dram_row`, `cid_dram_array`, `flash_adc`) that are exact at the level of counts and codes.
Everything else is synthesizable.

## The arithmetic

The matrix and input elements are unsigned fractions, with index 0 the most significant bit:

    W(m,n) = sum_{i=0}^{I-1} 2^-(i+1) w_i(m,n)        X(n) = sum_{j=0}^{J-1} 2^-(j+1) x_j(n)
    Y(m)   = sum_i sum_j 2^-(i+j+2) Y_ij(m),          Y_ij(m) = sum_n w_i(m,n) x_j(n)

`Y_ij(m)` is what row `(m,i)` of the array produces while bit-plane `j` is applied. The ADC turns
it into a code `Q_ij(m)`, and the digital side forms

    Q(m) = sum_{k=0}^{K-1} 2^-(k+2) Q'_k(m),   Q'_k(m) = sum_{i+j=k} Q_ij(m),   K = I+J-1

In integers, the output `q` of the design is `Q(m) * 2^(I+J)`:

    q(m) = sum_{i,j} Q_ij(m) * 2^((I-1-i)+(J-1-j))

With the default ADC full scale (the row length, 512 cells), one code step is 8 cells.
`q(m) * 8` therefore estimates the integer product `sum_n W(m,n) X(n)`, where `W` and `X` are
read as 4-bit integers. If the full scale equals 64 cells, one code step is one cell and `q` is
the exact product; the end-to-end test uses this.

## Block map

    vmm_system                      top: two chips, offset subtraction, recombination
    ├── vmm_chip  u_main            matrix in the array
    ├── vmm_chip  u_ref             same inputs, matrix all zeros
    │   ├── refresh_ctrl            one half-row refresh every REFRESH_INTERVAL cycles
    │   ├── chip_ctrl               one array operation per cycle, refresh first
    │   ├── wload_sreg x2           even-column and odd-column load / readout registers
    │   ├── input_sreg              the input bit-plane, loaded serially
    │   ├── cid_dram_array          (behavioural) ROWS cid_dram_row + sense latches
    │   │   └── cid_dram_row x ROWS (behavioural) COLS cells on one summing line
    │   └── flash_adc x ROWS        (behavioural) comparator ladder + therm2gray
    ├── offset_sub                  gray2bin on both chips, main - reference per row
    └── partial_combiner x M        delay-and-add chain + halving accumulator

Rows are ordered by output: row `m*I + i` holds bit `i` of `W(m, ·)`. With the defaults
(ROWS = 128, I = 4) there are M = 32 outputs of 4-bit x 4-bit products over N = 512 columns.
The package `vmm_pkg` holds the default sizes and the `op_e` / `par_e` types.

## The cell array and what the model keeps of it

A cell has three transistors in series. A select transistor writes a charge packet under the
storage gate (the DRAM part). When the cell's input line is active, the packet moves under the
output gate (the CID part), and this happens only if a packet is stored. The move is therefore
the AND of stored bit and input bit. The output line of a row is shared by all its cells and
left floating, so its voltage step is proportional to the number of cells that transferred.
When the input is released, the charge returns, so computing does not disturb the stored bits.

`cid_dram_row` represents the output line by that number of charge packets. Two error terms are
available, both off by default. Their form is this design's choice; no magnitudes are known:

* feedthrough: +1 count per `FT_DIV` active input lines;
* leakage: +1 count per `LEAK_PERIOD` cycles since each half row was last written or restored.

Leakage only adds offset. It never flips a stored bit, because no retention time is known.

Each row has two selects: one for its even-column cells and one for its odd-column cells. The
vertical bit lines of each parity end in their own row of sense amplifiers: even columns at one
edge of the array, odd at the other. A sense operation reads one or both halves of a row into
the sense latches and restores them. A refresh is a one-half sense whose result is unused.

## Driving a chip

All ports are plain signals. Column `n` is bit `n/2` of the even register (n even) or of the odd
register (n odd). Input register bit `n` drives column `n`.

| step | ports | cycles |
|---|---|---|
| load a row | `w_shift` with `w_in_even`/`w_in_odd`, highest column pair first | COLS/2 |
| write it | `op = OP_WRITE`, `op_row`, `op_valid` until `op_ready` | 1 |
| read a row back (test) | `OP_READ`; one cycle later the registers hold it; shift out on `w_out_even/odd` | 1 + 1 + COLS/2 |
| load a bit-plane | `x_shift` with `x_in`, column COLS-1 first; `x_clr` empties the register | COLS |
| compute | `OP_COMPUTE`; all ROWS codes on `adc_gray` while `adc_valid` | 1, result 2 cycles later |

An operation is taken on a rising edge where `op_valid && op_ready`. The array does one thing per
cycle. A pending refresh always wins and drops `op_ready` for that cycle (`ref_busy` is high).
The input lines are never active during a write or a sense.

Pipeline of a compute: in cycle 0 the input lines are driven and every row's level is
registered. In cycle 1 the ADCs sample. In cycle 2 `adc_valid` is high and the gray codes are
ready. Computes can follow each other every cycle. In practice a new bit-plane takes COLS
cycles to shift in, because the input register has one serial lane.

## Recombining the partials (the part to read twice)

`partial_combiner` is the per-output digital back end. It receives, once per bit-plane, the I
signed codes `d[i] = Q_ij` for the current `j`. The planes arrive in the order j = J-1 (least
significant) down to 0. It needs no multipliers:

1. **Diagonal sums by delay.** Row 0 goes through one delay and is added to row 1. That sum goes
   through another delay and is added to row 2, and so on. Row `i` is thus delayed `I-1-i` steps.
   At step `t` the last adder outputs `Q'_k` with `k = K-1-t`: the diagonal `i+j = k`, least
   significant first.
2. **Halving accumulator.** `acc <= acc/2 + Q'_k`, so after K steps the earliest (least
   significant) diagonal has been halved K-1 times. The register is held pre-multiplied by
   `2^(K-1)` (`acc <= (acc >>> 1) + (Q' <<< (K-1))`). Every halving is then exact, and the final
   value is the integer `q`. The first step of each vector clears the feedback.
3. **Drain and output.** After the J-th plane the delays still hold partial diagonals. The block
   runs I-1 more steps on consecutive cycles with zero inputs, raising `busy` while it does. The
   output register (the "switch") takes the accumulator on the K-th step, and `q_valid` pulses
   in the next cycle. It is high I cycles after the cycle of the last `in_valid`.

Timeline for I = J = 4 (the planes may come with gaps, but the drain does not):

| step t | input plane | adder output | accumulator after step (x 2^-6) |
|---|---|---|---|
| 0 | j=3 | Q'_6 = Q_33 | Q'_6 |
| 1 | j=2 | Q'_5 = Q_23+Q_32 | Q'_6/2 + Q'_5 |
| 2 | j=1 | Q'_4 | ... |
| 3 | j=0 | Q'_3 | ... |
| 4-6 | (drain, zeros) | Q'_2, Q'_1, Q'_0 | sum_k Q'_k 2^-k after t=6, then `q_valid` |

A new vector cannot start while the block is draining. `vmm_system` enforces this: after the
J-th compute of a vector it raises `hold`, and computes are refused (`op_ready` low for
`OP_COMPUTE` only) until `q_valid`. Writes and reads are not held. Counting from the cycle in
which the last compute is taken, `q_valid` comes I + 3 cycles later.

The inputs are signed (B+1 bits) because offset-corrected codes can be negative. Note for
anyone editing: an element of a `signed` packed 2-D array is *unsigned* in SystemVerilog, which
is why the code sign-extends `d[i]` explicitly.

## Offset compensation

`u_ref` receives every input of `u_main` except the load data, which are tied to 0. It therefore
holds zeros, is refreshed on the same cycles, and sees the same input planes. `offset_sub`
decodes both gray codes (`gray2bin`) and outputs `main - ref` per row, one cycle later. Because
the recombination is linear, this equals subtracting the two chips' final outputs. The
cancellation is exact only up to quantization: `Q(Y + o) - Q(o)` can differ from `Q(Y)` by one
code step when the code step is larger than one cell. An assertion checks that the two chips stay
in step.

## Flash ADC

`flash_adc` compares the row level with thresholds `c * FULL_SCALE / 64`, `c = 1..63`. This is
truncation, and the code clips at 63 (a full row of 512 reads 63). The comparators' thermometer
code goes straight to gray code in `therm2gray`: gray bit k is the XOR of the comparators at the
odd multiples of `2^k`, so each comparator feeds exactly one output bit. The code is registered
when `sample` is high.

## Refresh

`refresh_ctrl` raises a request every `REFRESH_INTERVAL` (default 64) cycles. It visits
(row 0, even), (row 0, odd), (row 1, even), … so the refresh alternates between the column
halves. Each half row is restored once every `2 * ROWS * REFRESH_INTERVAL` = 16384 cycles. Refresh has
priority, so each request is served in the cycle it appears.

## Parameters

| parameter | default | origin |
|---|---|---|
| `COLS` (N) | 512 | prototype |
| `ROWS` (M x I) | 128 | prototype, one ADC per row |
| `ADC_BITS` | 6 | prototype |
| `I_BITS`, `J_BITS` | 4, 4 | chosen: the prototype's word lengths are not known; 4 x 4 is the worked example |
| `FULL_SCALE` | COLS | chosen |
| `REFRESH_INTERVAL` | 64 | chosen |
| `FT_DIV`, `LEAK_PERIOD` | 0, 0 (off) | chosen, model only |

All sizes are parameters. `ROWS` must be a multiple of `I_BITS`, and `COLS` must be even.

## Where this RTL departs from or adds to the original design

* Interfaces, handshakes, cycle timing, bit orders and reset are this design's own choices. The
  original chip is specified only as "digital outside".
* The original prototype recombined the partials off chip. Here the recombination sits next to
  the two chips in `vmm_system`, following the digital block diagram of the original design.
* One clock drives everything. The on-chip clock generation is not modelled, and neither are
  the pads.
* The matrix and inputs are unsigned (one-quadrant). The four-quadrant signed variant is only
  mentioned as an extension and is not built.
* One compute takes one clock. The analog settling time of the summing lines and the ADCs
  (microseconds in the original circuit) is not modelled, and neither is power.
* The analog behaviour is idealised: no noise, no mismatch, no voltage levels and no
  retention failures. The offset terms have invented magnitudes and are off by default.
* Arrays larger than one chip pair (N or M beyond 512 / 32) would need tiling over several chips.
  That tiling is not described and not built.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and stops on a
watchdog if it hangs. Build one with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl --top-module tb_vmm_system \
        rtl/vmm_pkg.sv tb/tb_vmm_system.sv
    ./obj_dir/Vtb_vmm_system

| testbench | what it shows |
|---|---|
| `tb_vmm_system` | 8 rows x 40 columns with both offset models on and a 64-cell full scale; every `q(m)` equals the exact integer product after the reference subtraction. It also reads a row back serially, and counts refresh stalls, the vector hold, combiner drain, nonzero reference offsets and refresh of both halves, failing if any never happens |
| `tb_vmm_system_full` | the top at its defaults (128 x 512, 32 outputs): three random vector products, one saturating the ADCs, checked against the quantized model `sum min(63, floor(Y_ij*64/512)) 2^(...)` |
| `tb_vmm_linearity` | one chip at full size, all cells 1, ones shifted into the input register 64 at a time: codes 0, 8, …, 56, 63 on all 128 rows |
| `tb_vmm_chip` | load, serial readout, ADC codes for random planes, compute latency, refresh stalls |
| `tb_partial_combiner` | signed random partials, gaps between planes, drain and latency |
| `tb_cid_dram_row`, `tb_cid_dram_array` | AND-and-count, non-destructive compute, half-row writes and senses, offset terms |
| `tb_flash_adc`, `tb_therm2gray`, `tb_gray2bin`, `tb_offset_sub`, `tb_chip_ctrl`, `tb_refresh_ctrl`, `tb_wload_sreg`, `tb_input_sreg` | the block alone, against values computed in the testbench |

The testbenches drive inputs on the falling clock edge and sample `op_ready` there. This avoids
races with the rising edge that takes an operation.
