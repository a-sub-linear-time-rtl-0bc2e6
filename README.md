# BFAST: sub-linear string matching with Bloom filters

This is RTL for a hardware engine that scans a text for any of a large set of
byte patterns (virus signatures, for instance) without reading every byte.
The engine comes from the Wu-Manber family of "skip" algorithms. A search window
slides along the text, and only the last few bytes of the window are read.
If those bytes cannot be part of any pattern at that place, the window jumps
ahead by several bytes at once.

Software versions of such algorithms look up a large shift table, which
does not fit on chip. This design replaces the table with a handful of small
Bloom filters that are all queried at once. Suspicious windows are not checked
in the scanner. They are written as jobs into a buffer, and a separate
verification engine works through the buffer while the scan goes on. With the
default sizes the scanner moves up to 8 bytes per clock cycle.

## The main idea: an implicit shift table

Let the window be `WIN_SIZE = 8` bytes. Let the block (the part of the window
that is read) be `BLOCK_BYTES = 4` bytes, the suffix of the window. Only the
first 8 bytes of each pattern (its *prefix*) take part in scanning.

Split every pattern prefix into groups by position, counting back from the
end of the prefix:

| group | contents (for prefix `p0..p7`) | shift if this is the lowest group hit |
|-------|-------------------------------|---------------------------------------|
| G0 | `p4 p5 p6 p7` | 0: the window may hold a pattern |
| G1 | `p3 p4 p5 p6` | 1 |
| G2 | `p2 p3 p4 p5` | 2 |
| G3 | `p1 p2 p3 p4` | 3 |
| G4 | `p0 p1 p2 p3` | 4 |
| G5 | `p0 p1 p2` (3-byte prefix) | 5 |
| G6 | `p0 p1` | 6 |
| G7 | `p0` | 7 |
| none | | 8 |

Each group is stored in its own Bloom filter. Say the text block hits group
i (and no lower group). Then the block occurs i bytes before the end of some
prefix, so the window can move i bytes before a match is possible. If no group
hits, the window moves the full 8 bytes. For groups 5 to 7 the filter compares
only the last 3, 2 or 1 bytes of the block: those bytes could be the start of
a pattern that begins inside the current block.

Bloom filters give false positives but never false negatives. A false
positive only makes a shift shorter than it could be. No occurrence is ever
skipped.

### Checking before a job is issued

A G0 hit alone is common on real data (long runs of zero bytes, for example).
So the scanner does not issue a job straight away. It walks back one byte at
a time: block B_j, which ends j bytes before the end of the window, must hit
group G_j, for j = 1 .. 4.

- If every block hits, the whole 8-byte window is consistent with the groups.
  The window becomes a job, and the scan moves on by one byte.
- If B_j misses G_j, the window cannot hold a pattern. The scan moves on by
  `i - j` from the stored position, where i is the lowest group above j that
  B_j hits (or 8). This is the bad-character rule of Boyer-Moore: a smaller
  shift would put B_j at a position where it is known not to occur.

## Scanning module

The scanning module has three parts that form a 4-stage loop:

```
 cycle t    text_position_controller issues the block address TP of one segment
 cycle t    text_mem_fetch reads four byte banks              (registered)
 cycle t+1  rotate; bloom_filter_group hashes the block       (registered)
 cycle t+2  bit vectors read, two hashes per dual-port RAM    (registered)
 cycle t+3  AND of the four bits per group -> 8 hit bits;
            the controller computes the segment's next TP
 cycle t+4  the same segment issues again
```

### Four segments in flight (`text_position_controller`)

A query's result decides where the next query goes. A single scan could
therefore issue only one query every four cycles. To keep the loop full, the
text is cut into four segments that are scanned independently and take turns
in the pipeline. The segments overlap by `WIN_SIZE - 1` bytes, so every 8-byte
window lies wholly inside exactly one segment. Each window is checked once and
no match across a boundary is lost. For a text of length L, with
`b_k = floor(k*L/4)`, segment k covers the bytes from
`max(0, b_k - 7)` to `b_(k+1) - 1`.

For example, a 40-byte text gives the segments 0-9, 3-19, 13-29 and 23-39.
Their first block addresses (TP) are 4, 7, 17 and 27. TP is the address of
the first byte of the block, so the first window of a segment starts at the
segment start.

Each segment runs its own state machine:

| state | what the hits of the block at TP lead to |
|-------|---------------------------------------|
| INIT | idle or finished. A start loads TP = segment start + 4 and enters SCAN. |
| SCAN | shift = lowest hit group (8 if none). If the shift is not 0: TP += shift, or INIT once the block would pass the segment end. If it is 0: store STP = TP, TP -= 1, j = 1, enter VERI. |
| VERI | block B_j must hit G_j. Hit: j++, TP -= 1, until j = 4 also hits: potential match, TP = STP + 1, enter VEND with a job pending. Miss: TP = STP + (lowest hit group above j, or 8) - j, enter VEND. |
| VEND | checking has ended. A pending job goes to the dispatcher, or the segment enters HOLD when the job buffer is full. Otherwise this block is handled as in SCAN. |
| HOLD | TP is kept and the block is queried again each turn until the buffer has room. Then the job goes out and the block is handled as in SCAN. |

A job records the first byte of the suspicious window, `STP - 4`, which is
where a pattern would start. The whole scan ends when all four segments are
back in INIT (`done`, `scan_busy` low).

### Text memory (`text_mem_fetch`, `text_bank`)

A block may start at any byte address. Each of the two 8 kB text memories is
therefore four byte-wide banks, and byte address a lives in bank `a[1:0]` at
word `a[12:2]`. For a fetch at byte offset o, the banks below o read word + 1
and the others read the word itself. The four bytes are then rotated so that
block byte k (bits 8k+7:8k) is text byte `a + k`. Fetching at address 1 over
"ABCDEFGH" gives B, C, D, E.

Each bank has a second read port. The verification module reads the text one
byte at a time through it. There are two copies of the text memory, so the
host can load one while the other is scanned.

### Bloom filters (`bloom_filter_query`, `bloom_filter_group`, `h3_hash`, `bit_vector_ram`)

Each of the 8 groups has four hash functions of the H3 class,
`h(x) = XOR over set key bits i of d_i`, where the `d_i` are 14-bit random
values. The four functions (a 4 x 32 x 14 matrix) are the same for all groups
and are loaded by the host.

Each group has two 16 kbit bit vectors with two read ports each. Hashes 0
and 1 look up vector 0, and hashes 2 and 3 look up vector 1. The group hits
when all four bits are set. With n blocks stored per group, the
false-positive rate of a group is about `((1 - e^(-2n/16384))^2)^2`. That is
0.017 % for n = 1000.

Groups 5 to 7 clear the leading 1 to 3 block bytes before hashing. The host
must compute their bits from the same masked key.

## Verification interface

`job_dispatcher` keeps a pointer into the verification job buffer (`vjb_ram`,
512 x 32, true dual port). It reads the entry at the pointer on port A every
cycle:

- If bit 31 (allocation) of that entry is clear, the dispatcher is ready.
- An accepted job is written into the entry, and the pointer moves on,
  wrapping at the end.
- If the entry is still allocated, the buffer is full, and the requesting
  segment waits in HOLD.

The verification module reads entries on port B in the same rotating order.
For each allocated entry it verifies the job, reports the viruses it finds,
and writes 0 to free the entry.

The job descriptor is 32 bits:

| bits | field |
|------|-------|
| 31 | Al: entry allocated |
| 30:29 | Tx No: text copy of the job (bit 29; bit 30 is 0) |
| 28:16 | text position: first byte of the suspicious window |
| 15:13 | reserved, 0 |
| 12:0 | length of the scanned text |

The verification engine itself (anchored Aho-Corasick in the original system)
is not part of this RTL. `bfast_top` brings its connections out as ports:
VJB port B, the text read port `vm_t*`, and a result port `vr_*`.

## Host interface and address map (`host_interface`)

The host uses a plain 32-bit register bus: byte addresses, word accesses, a
one-cycle write, and read data one cycle after `bus_re` together with
`bus_rack`.

| address | content |
|---------|---------|
| 0x0000, 0x0004 | command of text copy 0, 1: [31] enable, [12:0] length (at most 8191) |
| 0x0008, 0x000C | status of copy 0, 1 (read only): [31] scan finished, [10:0] virus count |
| 0x0010, 0x0810 | virus index memory of copy 0, 1: 1024 16-bit identifiers, two per word, low half first |
| 0x1010, 0x3010 | text memory of copy 0, 1, 8 kB each, write only; byte k of a word is text byte 4w+k |
| 0x5010 | hash matrix, 64 words: word w holds `d[w/16][2(w%16)]` in [13:0] and `d[w/16][2(w%16)+1]` in [29:16] |
| 0x5110 | bit vectors, 16 x 512 words, write only: word o is group o/1024, vector (o/512)%2, word o%512; bit i of a vector is bit i%32 of word i/32 |

Writing a command with enable set clears that copy's status. When the
scanner is idle, it starts an enabled, unfinished copy, taking the copy not
scanned last first. At the end of the scan the copy's finish bit is set and
its enable bit is cleared. Each report on `vr_*` appends an identifier to the
copy's virus index memory and increments its count. The count stops at 1024.

Before scanning, the host must load the hash matrix and the bit vectors. For
each pattern and each group g, it sets the four bits `h_k(key)` in group g's
vectors (hash k goes to vector k/2). The key is the pattern block of the
table above. For groups 5 to 7, the prefix bytes sit in the upper bytes of the
key and the other bytes are 0.

## Performance

- Scanning issues one query per clock. At most it advances 8 bytes per query,
  i.e. 64 bits per cycle.
- The average shift depends on the data and the pattern set. At 150 MHz, an
  average shift of 7.7 bytes would give about 9.2 Gb/s.
- In the end-to-end test (random text, 60 patterns), an 8191-byte text is
  scanned in about 1500 cycles, about 5.5 bytes per cycle. That number
  includes the segments that finish early and the checking steps.
- With no group hits at all, the scan takes 1029 cycles for 8191 bytes.
- When every position matches (a text of 'a' against a pattern of 'a's), the
  job buffer fills. The scan then runs at the speed of the verification
  module.
- With 1000 patterns (one block per pattern in every filter, which is the
  sizing of the 16 kbit vectors), a random 8191-byte text scans at about
  5.2 bytes per cycle.
- A text in which half the bytes are zero runs, with 30 pattern prefixes
  ending in a zero block, scans at about 3.8 bytes per cycle. There, about
  750 windows start checking after a group-0 hit, and about 100 of them
  become jobs, so checking filters out more than 80 %. About one job in ten
  is rejected by verification.

Latencies: block fetch, 1 cycle; query, 3 cycles from address to hits; a
segment issues a query every 4 cycles.

## Where this design makes its own choices

These points are not fixed by the algorithm description. They were chosen
here:

- **Window and block sizes** are constants in `bfast_pkg` (8 and 4). The 8
  groups follow from the 8-byte window.
- **Shift after a miss during checking**: `i - j`, as the bad-character
  argument allows. A simpler, more conservative controller would move on by
  one byte.
- **Segment arithmetic** for lengths that are not multiples of four, and
  slots that stay empty once a segment has finished. Finished segments do not
  steal slots, so the last part of a scan runs at a quarter of the full rate.
- **Hash combining** uses exclusive-or, the operator of the H3 class.
- **Short-prefix groups** are handled by clearing leading key bytes.
- **Shift width**: 4 bits, since the shift runs from 0 to 8.
- **Job fields**: Tx No carries the text copy, and the length field carries
  the text length.
- **Host bus** is a generic register bus, not a vendor bus wrapper. The text
  memory cannot be read back over it.
- **Virus identifiers** are 16 bits, with 1024 per copy.
- **Reset**: synchronous and active high. Reset clears the controller,
  dispatcher and registers, but not the memories. The job buffer powers up
  empty, as a block RAM with zero initial contents does. An ASIC version
  would need a clearing sweep after reset.

## Files

| file | content |
|------|---------|
| `rtl/bfast_pkg.sv` | sizes, job descriptor struct, controller states |
| `rtl/bfast_top.sv` | top level |
| `rtl/host_interface.sv` | address map, command/status, scan start |
| `rtl/text_mem_fetch.sv`, `rtl/text_bank.sv` | interleaved text memories and block fetch |
| `rtl/bloom_filter_query.sv`, `rtl/bloom_filter_group.sv`, `rtl/h3_hash.sv`, `rtl/bit_vector_ram.sv` | Bloom filters |
| `rtl/text_position_controller.sv` | segment state machines and pipeline control |
| `rtl/job_dispatcher.sv`, `rtl/vjb_ram.sv` | verification interface |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/bfast_tb_pkg.sv` | software models of the hash and the groups, used by the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. To build
and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/bfast_pkg.sv tb/bfast_tb_pkg.sv tb/tb_bfast_top.sv \
  --top-module tb_bfast_top -o sim
./obj_dir/sim
```

The packages are named first, and `-y` finds the modules by file name.

- `tb_bfast_top` runs the whole engine at its default sizes and takes about
  15 s. It acts as the processor: it computes the groups of 60 patterns in
  software, loads the matrix, the bit vectors and two texts over the bus, and
  starts both scans.
- It also acts as a behavioural verification module, which compares the text
  with every pattern at each job.
- It checks that every pattern occurrence is reported and nothing else, that
  the status registers and index memory agree, and that the scan rate is
  above 4 bytes per cycle.
- It counts each mechanism: shift, checking, checking miss, potential match,
  hold, segment end, buffer wrap, and a job that verification rejects. A
  mechanism that never happens counts as a failure.
- `tb_workload_1000` runs the 1000-pattern case above and checks that every
  occurrence is found.
- `tb_text_position_controller` gives the controller an exact query model
  with no false positives. The jobs must then be exactly the windows whose
  blocks 0-4 lie in groups 0-4. It also checks the 8-bytes-per-cycle rate
  when nothing hits.

## Limits

- There is no verification engine, so the worst-case throughput (every
  window a match) depends on the engine that is attached.
- The 16 kbit bit vectors are sized for about 1000 stored blocks per group
  (0.017 % false positives per group). Larger pattern sets need longer
  vectors: change `HASH_W` in `bfast_pkg` and the host address map with it.
- Patterns must be at least 8 bytes long. Only their first 8 bytes steer the
  scan; the rest is left to verification.
- A text is at most 8191 bytes per transaction. Longer data must be split by
  the host, with a 7-byte overlap between pieces so that no window is lost.
