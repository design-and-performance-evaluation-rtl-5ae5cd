# Expansion buffer cache for VLIW instruction fetch

A VLIW processor fetches I-packets. An I-packet is a group of instructions that the compiler has
found independent and that issue together. Packets vary in length: here one to four 32-bit
instructions. The compiler packs them back to back in memory, so a packet can start in any
instruction slot of a cache block. A packet that starts near the end of a block runs into the
next block. Such a packet is called a **straddle packet**. In a conventional cache it costs two
accesses: the front block, then the successive block. This is a **double access**.

The expansion buffer cache avoids most double accesses. It adds a small direct-mapped buffer next
to an ordinary direct-mapped main cache. Each buffer entry holds the first few instructions of the
block that follows some front block, so it holds the rear part (tail) of the straddle packet that
leaves that block. When a request may straddle, the main cache and the buffer are read in the
same cycle. The packet's front part comes from the main cache and its tail from the buffer.
Because the tail always follows the front in program order, the packet leaves the cache already in
order. No reordering stage is needed, unlike a two-bank cache.

This repository holds synthesizable SystemVerilog for the cache and self-checking testbenches.
The default configuration is:

- a 16 Kbyte main cache of 32-byte blocks (eight instructions per block);
- four-issue packets;
- a buffer of 32 entries, each three instructions wide;
- a 64-bit refill bus to a memory whose first word arrives 15 cycles after the request.

## One fetch, step by step

The request carries the byte address of the packet:

```
 31                      5 4   2 1  0
 |  tag (18) | index (9)  | off | word|     block address = tag & index (27 bits)
```

In the cycle after the request is taken (state `LOOKUP`), these things happen at once:

1. The main cache reads the line at `index`. The line holds eight instructions, plus the tag, the
   valid bit and a **length field** (see below). The tag is compared.
2. The **offset encoder** looks only at `off`. A packet of at most `N_ISSUE` instructions can
   cross the block end only if `off >= W_MAIN - (N_ISSUE-1)`. That means offsets 5, 6 and 7 for
   8-instruction blocks. Only then is the buffer enabled. The test is rough on purpose: it does
   not wait for the packet length. A short packet at offset 6 still enables the buffer. Keeping
   the buffer idle for every other packet saves its read energy.
3. The **expansion buffer**, when enabled, is read at entry `blockaddr mod EXP_ENTRIES` and its tag
   (the rest of the block address) is compared.
4. The **column decoder** uses the length field of the starting slot to find the packet's front
   part. If the packet straddles, the decoder takes the tail from the buffer entry and finds the
   tail's end. It then outputs up to four instructions in program order, with the packet length.
5. The **NPC adder** adds the starting slot's carry bit to tag and index. It puts the next-packet
   offset in the offset field. For a straddling packet it uses the tail length instead.

What happens next depends on where the parts were found:

| case | main cache | packet | buffer | what happens | cycles after request |
|---|---|---|---|---|---|
| 1 | hit | not straddling | any | delivered in `LOOKUP` | 1 |
| 1 | hit | straddling | holds tail | delivered in `LOOKUP`, front + buffer | 1 |
| 2 | hit | straddling | miss | `SECOND`: main cache read again at block+1, packet delivered, block+1's first `W_EXP` instructions written into the buffer entry | 2 |
| 3 | miss | any | any | front block refilled, then `LOOKUP` repeated and continues as above | +1 + L + beats + 1 per refill |

In case 2 the successive block may miss too. It is then refilled and `SECOND` is repeated. With
the default memory (L = 15, four beats), each refill adds 21 cycles. A front miss therefore
delivers in 22 cycles. A front miss that is followed by a successive-block miss delivers in 44.
While a packet is being delivered, the cache accepts the next request. Hits and buffer-assisted
straddles therefore stream at one packet per cycle.

## The length field and the end-of-packet bit

The main cache's tag array keeps two values for every instruction slot:

- `c`, a carry bit. It is set when the next sequential packet does not start in the same block.
- `off`, the block offset at which the next sequential packet starts.

The NPC is then just "block address + c, offset = off". The column decoder gets the front-part
length as `off_next - off` when `c = 0`, and as `W_MAIN - off` when `c = 1`.

The instructions themselves must say where packets end. In this design, **bit 31 of every
instruction marks the last instruction of its packet** (`ebc_pkg::STOP_BIT`). The cache reads
nothing else in an instruction. When a block is refilled, `length_predecode` computes the field
for all eight slots from the block's own end marks:

| packet starting at slot i ends at slot j | c | off |
|---|---|---|
| j + 1 < 8 | 0 | j + 1 |
| j = 7 (exactly at the block end) | 1 | 0 |
| no end mark in the block (straddle) | 1 | 0 |

The last two rows are stored alike. The decoder tells them apart by the end mark of the block's
last instruction, which it reads anyway. For a straddle packet, the next packet's offset equals
the tail length. The decoder finds it in the tail instructions, from the buffer or from the
successive block, and passes it to the NPC adder. Working from the refilled block alone means a
refill never needs a second block.

## The expansion buffer

- It is direct mapped, `EXP_ENTRIES` entries of `W_EXP` instructions, with `0 < W_EXP < N_ISSUE`.
  It is indexed and tagged by the **front** block address. Its contents are the first `W_EXP`
  slots of the **following** block.
- It is filled only by a double access (case 2, including a case 3 that turns into case 2). In
  the same cycle that the packet is delivered, the entry is overwritten with the successive
  block's first slots.
- A tail longer than `W_EXP` (possible only when `W_EXP < N_ISSUE-1`) cannot be served by the
  buffer and costs a double access.
- Code is treated as read-only. Entries are never invalidated, not even when the main cache
  replaces the block they copy.

## Parameters (`exp_buffer_cache`)

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 16384 | main cache size |
| `BLOCK_INSTS` | 8 | instructions per block (8 = 32-byte block, 16 = 64-byte block) |
| `N_ISSUE` | 4 | maximum instructions per I-packet |
| `W_EXP` | 3 | instructions per buffer entry |
| `EXP_ENTRIES` | 32 | buffer entries (16 and 64 are the other sizes of interest) |
| `ADDR_W` | 32 | address width |
| `BUS_W` | 64 | refill bus width; a block is `BLOCK_INSTS*32/BUS_W` beats |

`BLOCK_INSTS`, `EXP_ENTRIES` and the number of lines must be powers of two.

## Interface

- **Fetch:** `req_valid`/`req_ready`/`req_pc` form a valid/ready request. `resp_valid` pulses for
  one cycle with `resp_pc` and `resp_insts` (slot 0 first, unused slots zero). The same cycle
  carries `resp_len`, `resp_npc`, `resp_straddle`, and `resp_double` (the packet took a second
  access). One request is in flight at a time.
- **Refill:** `mem_req_valid`/`mem_req_ready`/`mem_req_addr` (the block's byte address) request a
  block. The memory answers with `BLOCK_INSTS*32/BUS_W` beats on `mem_resp_valid`/`mem_resp_data`,
  lowest address first, instruction 0 in the low bits. Beats may arrive with gaps.
- **Events:** `ev_main_access`, `ev_main_miss`, `ev_double`, `ev_buf_access`, `ev_buf_hit` and
  `ev_buf_fill` are one-cycle pulses. They give the hit, miss, double-access and buffer-access
  counts that an energy model of the arrays needs. A refill's repeated lookup counts as another
  main (and, if enabled, buffer) access.
- The reset `rst_n` is active low and asynchronous. It clears the valid bits of the cache and the
  buffer.

## Files

| file | role |
|---|---|
| `rtl/ebc_pkg.sv` | instruction type, end-of-packet bit, controller states |
| `rtl/exp_buffer_cache.sv` | top: wires the blocks below, holds the front block during a double access |
| `rtl/ebc_controller.sv` | state machine for cases 1–3, refill sequencing, event pulses |
| `rtl/main_tag_array.sv` | valid, tag and length field per line, tag compare |
| `rtl/main_data_array.sv` | instruction lines |
| `rtl/expansion_buffer.sv` | buffer data and tags, tag compare, read enable |
| `rtl/offset_encoder.sv` | buffer enable from the block offset |
| `rtl/column_decoder.sv` | packet extraction across front block and tail |
| `rtl/npc_unit.sv` | next-PC adder |
| `rtl/length_predecode.sv` | length field from end-of-packet marks at refill |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/ebc_env.sv`, `tb/mem_model.sv` | fetch unit with reference model; behavioural memory holding a synthetic program |
| `tb/tb_ebc_example.sv` | the straddle example worked by hand: a three-instruction packet at the last slot of a block, fetched twice |
| `tb/tb_ebc_workloads.sv` | the 32/64-byte block, 16/32/64-entry and 1/2/3-wide configurations side by side |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A watchdog counts a
failure if it hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_exp_buffer_cache \
    -y rtl -y tb +libext+.sv -Irtl rtl/ebc_pkg.sv tb/tb_exp_buffer_cache.sv
./obj_dir/Vtb_exp_buffer_cache
```

`tb_exp_buffer_cache` runs the cache at its default size. It runs 30,000 packets of a synthetic
32 Kbyte program with loops, far jumps, idle cycles and, at the end, a memory that refuses
requests at random. It checks every packet, next PC and response cycle against a reference model.
It also requires each mechanism to occur: buffer-served straddles, double accesses, front and
successive-block misses, buffer enables without a straddle, buffer and line replacement,
back-to-back delivery and memory stalls. It takes well under a second.

`tb_ebc_example` follows one straddle packet by hand. The packet `A1 A2 A3` starts at slot 7, so
`A1` is the last instruction of block 0 and `A2 A3` open block 1. On the first pass block 1 is
absent: the packet costs a double access and a refill (23 cycles), and the buffer entry of block
0 receives block 1's first three instructions. On the second pass the packet comes out in one
cycle, `A1` from the main cache and `A2 A3` from the buffer. The testbench also checks that only
that packet enabled the buffer.

`tb_ebc_workloads` runs eight configurations on the same packet stream. It checks that a larger or
wider buffer never hits less. This holds for direct-mapped buffers that are filled on every
miss. The results for the synthetic stream (uniform packet lengths 1–4, loop bodies up to 272
words, ten passes each):

| block | buffer | straddle packets | buffer hit | double accesses |
|---|---|---|---|---|
| 32 B | 16 × 3 | 18.5 % | 21.9 % | 14.5 % |
| 32 B | 32 × 3 | 18.5 % | 35.6 % | 11.9 % |
| 32 B | 64 × 3 | 18.5 % | 40.6 % | 11.0 % |
| 32 B | 32 × 1 | 18.5 % | 16.8 % | 15.4 % |
| 32 B | 32 × 2 | 18.5 % | 28.0 % | 13.3 % |
| 64 B | 16 × 3 | 9.7 % | 35.9 % | 6.2 % |
| 64 B | 32 × 3 | 9.7 % | 40.3 % | 5.8 % |
| 64 B | 64 × 3 | 9.7 % | 51.2 % | 4.7 % |

These numbers describe the synthetic stream, not real programs. Its many cold misses and long
loop bodies keep buffer hit rates far below what compiled benchmarks with tight inner loops reach.
The straddle rates do match the expected share of straddling packets: about (mean packet length −
1) / instructions per block.

## Choices made here, and what is not included

The block structure, the offset-encoder rule, the length field and NPC computation, and the three
access cases follow the published expansion buffer cache design. This implementation chose the
following:

- **Instructions and address:** 32-bit instructions with an end-of-packet bit in bit 31, and
  32-bit addresses.
- **Length field:** how it is produced (from the refilled block alone) and how ends and straddles
  are told apart (described above).
- **Buffer indexing:** the buffer is indexed by the front block address, and its entries are never
  invalidated.
- **Arrays:** combinational read, so a hit is delivered one cycle after the request. With
  synchronous SRAM macros the lookup would need a registered address one cycle earlier, or one
  more cycle of latency.
- **Control:** the controller's states, the valid/ready handshakes, refilling one block at a time
  with the access repeated afterwards, and one request in flight.
- **Events:** the event pulses are an addition.

The following are not included:

- the processor, its branch predictor and its pipeline;
- the lower memory, which exists only as a testbench model;
- the two-bank cache and the conventional cache that the design is usually compared with;
- the analytical energy and area models used to evaluate it.

A fully associative (CAM) buffer is a possible variant. It is not built: this design uses the
SRAM, direct-mapped buffer.
