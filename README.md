# Real-time programmable LDPC encoder for IEEE 802.16e-style codes

This is an encoder for the quasi-cyclic LDPC codes of mobile WiMAX (IEEE 802.16e).
The frame size and the code rate can change from one frame to the next. The encoder
holds no fixed parity-check matrix. The host writes a small *model matrix*, which
gives one shift value per block. From it the encoder builds, in hardware and in a few
thousand cycles, a compact list of where the ones of H are. It then encodes frames
against that list. The parity bits come from the Richardson-Urbanke method:

- two sparse matrix-vector products,
- two forward substitutions through the dual-diagonal part of H,
- two vector additions.

No dense matrix and no inverse is ever stored.

The design started from a description of a software encoder that runs on a
reconfigurable processor. Here the same algorithm is built as dedicated logic. The
software's building blocks become hardware units:

- the H generator,
- the sparse matrix-vector multiplier (MVM),
- forward substitution,
- the vector adder, four bits wide over four memory banks.

## The code family

H has `mb` block rows and 24 block columns of `zf x zf` blocks (`zf` = 24 .. 96 in
steps of 4, so n = 24·zf = 576 .. 2304 bits). A block is either all zero or the
identity matrix rotated right by a shift `s`. In row `r` of such a block, the single
one sits in column `(r + s) mod zf`. The model matrix holds the shifts for zf = 96,
with -1 marking a zero block. For another zf each shift is scaled:

- `floor(s·zf/96)` (`SCALE_FLOOR`, used by all rates except one), or
- `s mod zf` (`SCALE_MOD`, used by rate 2/3A).

| rate | mb | kb = 24 - mb info block columns |
|------|----|-------------------|
| 1/2  | 12 | 12 |
| 2/3  |  8 | 16 |
| 3/4  |  6 | 18 |
| 5/6  |  4 | 20 |

The parity part of the model matrix (block columns kb .. 23) has a fixed shape:

- Column `kb` (the first parity column) holds the same shift `h` in rows 0 and mb-1,
  shift 0 in exactly one row in between, and -1 elsewhere.
- Columns kb+1 .. 23 form a dual diagonal of identities.

The encoder relies on this shape. It does not store that part of H. In general,
Richardson-Urbanke encoding first permutes the rows and columns of H so that T
becomes lower triangular. These codes already have that form, so no permutation is
done.

## Splitting H and computing the parity bits

With k = kb·zf info bits `s`, m = mb·zf checks, and the codeword `[s p1 p2]`
(p1: zf bits, p2: m-zf bits), H splits into

```
        k        zf     m-zf
     [  A        B       T  ]   m-zf rows
     [  C        D       E  ]   zf rows
```

- T is lower block-bidiagonal with identities. T·y = x is solved by forward
  substitution: `y_i = x_i` for i < zf, and `y_i = y_(i-zf) xor x_i` after that.
- E = [0 … 0 I], so E·y is just the last zf bits of y.
- With this shape, phi = E·T⁻¹·B + D is the identity. E·T⁻¹ sums all block rows of
  B, giving P^h + I + P^h = I. So neither D nor phi⁻¹ is needed.

`encode_core` runs six steps one after the other:

| step | unit | computes |
|------|------|----------|
| 1 | MVM | λ = [A;C]·s (m bits). The top m-zf bits are A·s, the last zf are C·s |
| 2 | forward substitution | tmp = T⁻¹·(A·s) |
| 3 | vector add | p1 = (last zf bits of tmp) xor C·s |
| 4 | MVM | tmp = B·p1 |
| 5 | vector add | tmp = tmp xor A·s |
| 6 | forward substitution | p2 = T⁻¹·tmp |

The testbenches check the result against every row of the full H, the dual-diagonal
part included.

## H as a list of indices

A dense H for rate 1/2, n = 2304 takes 1152 × 2304 bits, about 2.5 Mbit. Instead,
`index_mem` keeps one 16-bit entry per one: 8192 entries, 16 Kbyte. Each entry
(`idx_entry_t`) has three fields:

- `col` (14 bits): the column of the one, relative to the vector being multiplied.
- `last`: the entry is the final one of its row.
- `nul`: the row has no one. The entry adds 0, so the row still produces a result bit.

`h_matrix_gen` writes two lists, one after the other:

1. **info list**: rows 0 .. m-1, block columns 0 .. kb-1 (A above C). Row by row,
   the ones in column order. `info_len` entries.
2. **B list**: rows 0 .. m-zf-1 of block column kb, with columns relative to p1.
   Every row has exactly one entry (a one or a null). It starts at `b_base`; `b_len`
   entries.

The generator looks at one base-matrix entry per cycle: it reads the model value,
scales it and writes the entry. A row's last flag cannot be known until its final
block column has been seen. If that block is zero, the generator sets the flag by
rewriting the row's previous entry in that otherwise idle cycle. A run takes
`mb·zf·kb + (mb-1)·zf + 2` cycles, which is 14 882 cycles for rate 1/2, zf = 96. If
a model matrix needs more than 8192 entries, `overflow` is raised and later entries
are dropped. The 802.16e codes need at most about 7 700.

## Vector memory and the datapath units

`vector_mem` holds 4608 bits in four one-bit banks. Bit `b` sits in bank `b mod 4`,
word `b / 4`, so one word access moves four consecutive bits. It has two read ports
and one write port with a write enable per bank. Reads are synchronous and return
the data from before a write in the same cycle. The map, in bit addresses:

| bits | contents |
|------|----------|
| 0 .. n-1 | codeword: s at 0, p1 at k, p2 at k+zf |
| 2304 .. 2304+m-1 | λ |
| 3456 .. 3456+m-zf-1 | tmp |

Because zf is a multiple of 4, every vector starts on a word boundary.

| unit | per cycle | start → done |
|------|-----------|--------------|
| `vector_add` | reads 2 words, writes 1 (4 bits) | nwords + 2 |
| `forward_subst` | reads x and y zf bits back, writes 1 word | nwords + 2 |
| `mvm_unit` | one index entry | nentries + 3 |

- `vector_add` and `forward_subst` have two pipeline stages: read, then combine and
  write.
- `forward_subst` reads the word of y written zf/4 ≥ 6 cycles earlier, so there is
  no hazard.
- `mvm_unit` has three pipeline stages:
  1. read the index entry,
  2. read the vector word that holds the addressed source bit,
  3. XOR the bit into a row accumulator (a register). On a `last` entry, write the
     row's result as one masked bit.

`vector_add` may work in place (d = a or d = b). Otherwise its source and
destination must not overlap.

`vector_add` also has a clear mode (`op_clear`), which writes zeros to
initialise a vector. The encoding sequence does not need it, because the MVM writes
every row of its result.

One encoding takes `info_len + b_len + 3·(m-zf)/4 + zf/4 + 21` cycles. The MVM steps
take most of the time. For 2304-bit codes with the block counts of the 802.16e
matrices (`tb_encoder_throughput`):

| code | index entries | cycles per frame | info bits per cycle | at 100 MHz |
|------|---------------|------------------|---------------------|------------|
| rate 1/2 (76 non-zero blocks) | 5 952 | 6 789 | 0.170 | 17.0 Mbit/s |
| rate 3/4 (88 non-zero blocks) | 7 680 | 8 085 | 0.214 | 21.4 Mbit/s |

Generating H once for a new code costs about two frames' worth of cycles. It is
paid only when the code changes.

## Using the encoder (`ldpc_encoder_top`)

1. **Program the code.** Write all 288 model-matrix entries: `mm_we`, address
   `i·24 + j`, signed 8-bit value, -1 for zero. Unused rows may hold anything.
2. **Generate H.** Set `cfg_zf`, `cfg_mb`, `cfg_kb` and `cfg_mode`. Pulse
   `cmd_valid` with `cmd_encode = 0` while `cmd_ready` is high. The configuration is
   latched, and `gen_done` pulses when the index lists are complete. Check
   `h_overflow`. From the command to `gen_done` takes one cycle more than the generator's own run time.
3. **Load a frame.** While `cmd_ready` is high, write the k info bits to
   vector-memory words 0 .. k/4-1 (`hv_we`, `hv_waddr`, `hv_wdata`; bit `4w+l` is
   `hv_wdata[l]`).
4. **Encode.** Pulse `cmd_valid` with `cmd_encode = 1`. `enc_done` pulses when done.
5. **Read the codeword.** Read words 0 .. n/4-1 (`hv_re`, `hv_raddr`). `hv_rdata`
   is valid one cycle later.

Steps 3 to 5 repeat for every frame of the same code. To change rate or frame size,
repeat steps 1 and 2 between frames. An assertion flags host access to the vector
memory while an encoding is running.

Requirements the hardware does not check:

- `zf` is a multiple of 4 from 24 to 96.
- `mb` ≥ 2 and `mb + kb = 24`.
- The parity part of the model matrix has the shape described above. If it does
  not, the codewords will not satisfy H.

## Files

| file | contents |
|------|----------|
| `rtl/ldpc_pkg.sv` | constants, memory map, entry and port-request types |
| `rtl/model_matrix_mem.sv` | model-matrix store (reset to all -1) |
| `rtl/base_matrix_gen.sv` | shift scaling, combinational |
| `rtl/h_matrix_gen.sv` | index-list generator |
| `rtl/index_mem.sv` | 8192 × 16-bit index memory |
| `rtl/vector_mem.sv` | 4-bank vector memory |
| `rtl/vector_add.sv`, `rtl/forward_subst.sv`, `rtl/mvm_unit.sv` | datapath units |
| `rtl/encode_core.sv` | six-step sequencer and port multiplexing |
| `rtl/ldpc_encoder_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_encoder_throughput.sv` | rate-1/2 and rate-3/4 throughput at full size |
| `tb/tb_vmem_model.sv`, `tb/tb_imem_model.sv` | behavioural memories for the unit testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It also
has a watchdog. For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ldpc_pkg.sv tb/tb_ldpc_encoder_top.sv --top-module tb_ldpc_encoder_top
./obj_dir/Vtb_ldpc_encoder_top +verilator+rand+reset+2
```

Replace the testbench name to run another one. `tb_ldpc_encoder_top` runs at the
default sizes, with nothing overridden. It does the following:

- generates eight codes: rates 1/2 to 5/6, zf from 24 to 96, both scaling modes;
- encodes nine frames, some of them reusing a generated H;
- forces one index-memory overflow;
- checks every codeword against the full H;
- checks generation and encoding times;
- counts each mechanism: rate switch, size switch, modulo scaling, row-end rewrite,
  null B rows, overflow and H reuse. It fails if any of them never happened.

It runs in well under a second.

## How far to trust it, and where it departs from its source

- **Verified.** Every unit testbench compares against its own reference model. The
  encoder testbenches check parity directly, so they do not depend on the encoder's
  own view of H. Deliberately broken copies of each module were confirmed to fail
  their testbenches.
- **Not verified.** The actual IEEE 802.16e model tables are not included. The tests
  use random model matrices with the standard's parity shape. The table capacities
  (about 7 700 list entries at most) are estimates.
- **Dedicated logic, not software.** The source runs C code on a reconfigurable
  instruction-cell processor. It reports 10.4 Mbps at rate 1/2 and 19 Mbps at rate
  3/4, and 26 / 47 Mbps after pipelining. Those numbers belong to that processor and
  are not comparable with the cycle counts here. At an assumed 100 MHz, this design
  gives about 17 Mbps at rate 1/2.
- **Design choices not taken from the source:**
  - the host interface and command protocol;
  - the vector-memory map;
  - the index entry layout, including flags and null entries;
  - the rewrite used to set the row-end flag;
  - the overflow flag;
  - reset values;
  - running the six steps strictly one after another.
- **From IEEE 802.16e rather than the source:**
  - the scaling rules;
  - the shape of the parity part;
  - the reasoning that phi = I.
- **The MVM handles one entry per cycle.** A four-lane gather would need four read
  ports on the vector memory. It would cut the dominant MVM time by about four.
