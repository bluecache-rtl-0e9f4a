# BlueCache: a key-value cache built in hardware, with flash behind DRAM

A memcached-style cache normally sits in server DRAM. DRAM costs a lot per gigabyte, and a cache that is too small sends misses to the slow database behind it. This design builds the whole key-value daemon in logic instead:

- It parses the memcached binary protocol.
- It keeps an index in DRAM and object data in DRAM or raw NAND flash.
- It talks to other cache nodes over a dedicated network.

The DRAM acts as a cache in front of roughly a terabyte of flash per node. Flash is slower than DRAM but far cheaper. The hardware hides that with deep pipelining and many flash chips working in parallel. Nodes form a linear array, and a client attached to any node reaches every key. The node for a key is `hash(key) mod NUM_NODES`.

All RTL is synthesizable SystemVerilog in `rtl/`. The external parts have ports but no RTL: flash chips and their controller, DDR3 and its controller, the PCIe/DMA endpoint and the serial transceivers. The testbenches in `tb/` model those parts behaviourally.

## One request, end to end

1. The client writes memcached binary requests into a 1 MB request ring in host memory. The ring is split into 128 segments. The client then posts each filled segment to the **DMA read engine**.
2. The **request splitter** hashes each request's key. It routes the request either to the local engine or, through the **request router**, to the node that owns the key.
3. The **request merger** alternates between local and network requests. The merged stream feeds the **KVS protocol engine**.
4. The protocol engine decodes the 24-byte header. It saves the request's metadata and full key in the **completion buffer**, then hands the command to the **hybrid hash table**.
5. The hash table answers. The protocol engine checks the full key and builds the response.
6. The **response splitter** sends the response back to the node whose client sent the request. The **response router** carries it, a separate network so responses never wait behind requests. The **response merger** passes it to the **DMA write engine**.
7. The DMA write engine fills 8 KB segments of a 1 MB response ring, interrupts the host once per segment and waits for the host to release it.

### Packet format

Packets on all internal streams are 64-bit words holding the memcached binary packet unchanged (`bc_pkg`).

- **Word 0:** magic [63:56], opcode [55:48], key length [47:32], extras length [31:24], status [15:0].
- **Word 1:** total body length [63:32], opaque [31:0].
- **Word 2:** CAS (unused).
- **Body:** extras, key and value, padded to a whole word.
- **SET** carries 8 bytes of extras, which are ignored.
- **GET hit:** the response uses the GETK form, whose body is key followed by value.

On the network, each packet also carries a side band with source node, destination node and length in words.

## The hybrid hash table (the hard part)

`hybrid_hash_table` is the core of the design. It combines four structures behind one DRAM port (`dram_arbiter`, round robin) and one flash port.

### Index table (`index_table`)

The index is a set-associative table in DRAM. Each 64-byte DRAM line is one bucket of four 16-byte entries. The bucket is chosen by the low `INDEX_BITS` bits of the key's 32-bit Jenkins one-at-a-time hash. An entry holds:

| field | bits | meaning |
|---|---|---|
| timestamp | 32 | cycle of last access (lookup hit or insert) |
| hashed key | 27 | second, independent hash of the key (FNV-1a, truncated) |
| key length | 8 | bytes |
| value length | 20 | bytes, so up to 1 MB |
| pointer | 41 | bit 40 = object on flash; bits 39:0 = flash byte address or DRAM line |

The full key is not stored, which makes an entry 16 bytes instead of up to 256. A lookup reads one line and compares the 27-bit hashed keys of the four ways. A match is only probable, not certain. The protocol engine later compares the full key read back from storage against the request's key. A mismatch is a *false hit* and is answered as a miss.

An insert does one of three things:
- it overwrites the way holding the same hashed key;
- otherwise it fills an empty way;
- otherwise it evicts the way with the oldest timestamp.

A lookup hit writes the line back with a fresh timestamp.

### DRAM store (`slab_allocator`)

Object data lives in DRAM slabs. Class `c` has slots of `2^(c+1)` lines (128 B to 2 MB with 15 classes), each in its own region of `2^REGION_BITS` lines. A slot holds a one-line header, then the key, then the value, each line-aligned.

The header carries the timestamp and the *back-trace* information: the Jenkins hash, hashed key and lengths of the object in the slot.

A class hands out fresh slots until its region is full. After that it needs a victim. It reads the headers of four pseudo-random slots, using a 16-bit LFSR, and picks the oldest. This is a cheap approximate LRU.

### Eviction to flash and the back-trace

When a SET needs a slot in a full class, the table runs these steps:

1. The allocator reports the victim slot and its header.
2. The log manager assigns the victim a flash byte address and a line range in the open DRAM write buffer.
3. The table copies the victim's lines there.
4. From the header's Jenkins hash, the table finds the victim's bucket and updates that index entry's pointer to the flash address. It does this only if the entry still points at the old slot, because a later SET or DELETE may have replaced it.
5. The new object is written into the freed slot, and its own index entry is inserted.

The header is what makes step 4 possible without searching the index. Only then is the new object written. This ordering guarantees that no index entry points at data that has been overwritten.

### Log-structured flash store (`flash_log_manager`, `bad_block_list`, `read_reorder_buffer`)

Flash is written only as an append-only log of 1 MB chunks.

**Write buffers.** Evicted objects go into one of two 1 MB write buffers in DRAM. When the open buffer cannot fit the next object, or `flush_req` is pulsed, the buffer is sealed as the next chunk and the other buffer opens. The sealed buffer is written as 128 pages of 8 KB, striped over 16 buses × 8 chips: page `p` goes to bus `p mod 16`, chip `(p/16) mod 8`. All chips work on one chunk at once.

**Erase and wrap-around.** Before the first chunk of an erase block (256 pages per chip) is written, that block is erased on every chip. When the chunk counter wraps around, the oldest chunk is simply erased and overwritten. Objects in it are lost. Their index entries then point at newer data whose full key does not match, so they read as misses. That is the whole garbage collection.

**Bad blocks.** A failed erase enters the per-chip `bad_block_list`. The list maps the logical block to one of 64 spare blocks at the top of the chip, and the spare is erased in its place. Every page read or write goes through this remap.

**Reads.** A GET for a flash object first asks whether the object's chunk is still in a DRAM write buffer. If so, the object is read from DRAM. Otherwise the table issues one page read per page the object covers, each with a tag from the `read_reorder_buffer`. Flash returns pages in any order. The reorder buffer stores each page under its tag and releases pages in request order.

### What a command costs

The table runs one command at a time:

- **GET hit from DRAM:** one index read and write-back, then one line read per 64 bytes of object.
- **SET without eviction:** one index read and write, one header write and one line write per 64 bytes.
- **SET with eviction:** additionally reads four candidate headers, copies the victim line by line and updates one index line.

Measured with one node in `tb_workload_kv_sizes`, in clock cycles per operation. These numbers include the host DMA models and the DRAM model's latency and random stalls.

| value size | SET | GET from DRAM | GET after flush to flash |
|---|---|---|---|
| 32 B | 36 | 45 | 44 (still in DRAM) |
| 512 B | 105 | 179 | 179 (still in DRAM) |
| 8 KB | 1884 | 2256 | 1953 (half from flash) |
| 32 KB | 9240 | 8887 | 6000 (7 of 8 from flash) |

Across four nodes, `tb_workload_flash_get` runs 2000 random 8 KB GETs, nearly all served from flash, in about 660 cycles per GET (total time divided by the number of GETs).

## Protocol engine and completion buffer

`kvs_protocol_engine` reads request packets and parses them. It handles GET, SET and DELETE; any other opcode is executed as a GET.

For each request it allocates an entry in `completion_buffer`, 128 entries. The entry stores the opcode, opaque, key length, sender node and the key itself, up to 256 bytes. The engine then issues the command to the hash table and streams it the key and value.

When the answer returns, the engine looks the entry up by index. On a GET hit it compares the stored key with the key bytes read back from storage. A mismatch, or a bad read, becomes a "not found" response and counts as a false hit. The response header is built from the saved metadata. Freed indices go to a free-index FIFO.

## Inter-node network

**Splitters and mergers.** `net_splitter` has two modes:
- In request mode it buffers the header and key, hashes the key with `kv_hash` and sends the packet local or remote by `jhash mod NUM_NODES`. It tags the packet with the sender's node id.
- In response mode it routes by the tag.

`net_merger` interleaves two packet streams a whole packet at a time, taking turns.

**Routers.** `network_router` connects a node to its west and east neighbours. Each hop uses a credit-style handshake:
1. The sender asks for a reservation of `n` words.
2. The receiver acknowledges once `n` words of its 64-word receive buffer are free and not promised to anyone else.
3. The sender sends exactly `n` words, with no back-pressure on the wire.

Longer packets are sent as several reservations. Each output is granted to one input for a whole packet, round robin. Packets move east or west by comparing node ids. Requests and responses use separate router instances.

## Host interface

The host interface is a pair of DMA engines, each working on a 1 MB ring in host memory split into 128 segments of 1024 words.

**DMA read engine.** The host posts a segment index and word count. `dma_read_engine` reads it in 16-word bursts, cuts the stream into packets using the header lengths, and acknowledges the segment when done.

**DMA write engine.** `dma_write_engine` packs response packets into free segments and raises an interrupt with the segment index and word count when a segment is full. It waits for the host to free the segment before reusing it. A partly filled segment is handed over after `FLUSH_IDLE` (256) idle cycles, so a lone response is not held back.

## Nodes and the cluster

`bluecache_node` wires one node together. It brings out the DRAM port, the flash command/data ports, the host DMA ports, the four link bundles (request and response, west and east) and 16 event counters. The event counters are:

| # | event |
|---|---|
| 0, 1 | request splitter: local / remote |
| 2 | request-router reservations |
| 3, 4 | request merger: local / remote |
| 5 | false hits |
| 6 | evictions |
| 7 | flash reads |
| 8 | write-buffer reads |
| 9 | chunks flushed |
| 10 | erase rounds |
| 11, 12 | response splitter: local / remote |
| 13 | response-router reservations |
| 14 | remote responses merged |
| 15 | early DMA flushes |

`bluecache_cluster` is the top. It chains `NUM_NODES` nodes in a linear array, and each node keeps its own host, DRAM and flash ports.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `NUM_NODES` | 4 | nodes in the array (`NODE_W` = 5 allows up to 32) |
| `INDEX_BITS` | 24 | 2^24 buckets × 64 B = 1 GB index, 2^26 entries |
| `NUM_CLASSES` | 15 | slab classes, 128 B … 2 MB slots |
| `REGION_BITS` | 22 | 2^22 lines = 256 MB per class |
| `LOG_BLOCKS` | 4032 | usable erase blocks per chip (4096 minus 64 spares) |
| `ROB_TAGS` | 64 | page slots in the read reorder buffer |
| `FLUSH_IDLE` | 256 | idle cycles before a partial response segment is sent |

**DRAM.** The DRAM address space is 2^27 lines (8 GB). It is laid out as the index at line 0, two 1 MB write buffers at line 2^24 and the slab regions from line 2^25.

**Flash.** Flash is 16 buses × 8 chips × 4032 blocks × 256 pages × 8 KB, about 1 TB, addressed with 40 bits.

## Where this design departs from the original description

- **One command at a time.** The hash table processes commands one at a time, so responses leave in request order. The original pipelines commands and lets responses return out of order; its completion buffer exists for that. Here the completion buffer is still used for metadata and key checks, but throughput is far below the original's.
- **Erase timing.** Blocks are erased just before their first chunk is written, not ahead of time in the background.
- **Node choice.** The node for a key is plain `jhash mod NUM_NODES`. Consistent hashing, which the original suggests for adding nodes, is not built.
- **Hash functions.** The index hash is Jenkins one-at-a-time and the second hash is FNV-1a. The original names only "Jenkins" and "a different hash".
- **Own choices where the original is silent.** These include the slab class sizes, chunk size, write buffer count and size, page size, chips per bus, spare-block count, reorder-buffer depth, router buffer depth, DMA burst length, merger arbitration and the early segment flush.
- **External parts.** The serial links are plain parallel signals with a reserve/ack/data handshake; the transceivers and the transport layer beneath them are not modelled. The 10 Gb Ethernet option is not built.
- **Not built at all:** the host software, the flash controller, the DDR3 controller and the PCIe endpoint.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Each has a watchdog. Build and run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bc_pkg.sv tb/tb_pkg.sv rtl/*.sv tb/dram_model.sv tb/flash_model.sv \
  tb/tb_hybrid_hash_table.sv --top-module tb_hybrid_hash_table
./obj_dir/Vtb_hybrid_hash_table
```

Replace the testbench name for the others. `rtl/bc_pkg.sv` and `tb/tb_pkg.sv` must come first. Add `-Wno-fatal` if your Verilator version promotes a width warning to an error.

**Shared models:**
- `dram_model` is a line-addressed sparse DRAM with random stalls.
- `flash_model` covers flash pages, erase, out-of-order read completion and injected bad blocks.
- `tb_pkg` has reference implementations of both hashes and packet builders.

**Block testbenches.** There is one per block (`tb_kv_hash`, `tb_index_table`, …). Each compares the block against an independent reference model.

**Node and cluster testbenches:**
- `tb_bluecache_node` runs a single node with its links tied off.
- `tb_bluecache_cluster` runs four nodes with small slabs so that every mechanism occurs. Those mechanisms are eviction, write-buffer reads, flush, erase, bad-block remap, flash reads, remote requests and responses, reservations, DRAM and host stalls, and early DMA flush. It counts each one and fails if any never happened.
- `tb_workload_kv_sizes` runs one node with values from 32 B to 32 KB. For each size it stores objects, reads them back, flushes to flash and reads them again, printing cycles per SET and GET. Large sizes end up on flash pages.
- `tb_workload_flash_get` is the multi-node flash workload, scaled down. Four nodes store 96 objects of 8 KB, which all end up on flash. Then 2000 GETs of random keys go to random nodes. It checks every response and prints the cycles per GET.
- `tb_bluecache_cluster_full` runs the cluster at its default sizes. Its objects are too few to fill a 256 MB slab region, so it exercises the DRAM and network paths but not the flash paths.
