// bc_pkg: types and constants shared by the BlueCache key-value store RTL.
//
// The in-memory index entry follows the 128-bit layout of the 4-way index
// table: 32-bit timestamp, 27-bit hashed key, 8-bit key length, 20-bit value
// length and 41-bit key-value pointer (40-bit byte address plus one bit that
// says whether the object is on flash).  DRAM is seen as 64-byte lines, the
// unit of one 8 x 8-byte DDR3 burst.  Requests and responses travel as
// streams of 64-bit words holding memcached binary-protocol packets (24-byte
// header = 3 words), with byte 0 of a packet in bits [63:56] of word 0.
// Widths that the design does not fix (flash geometry below the bus level,
// tags, node id width) are this implementation's choices.
package bc_pkg;

  // ---------------- index table entry (Fig. "4-way in-memory index table")
  localparam int TS_W   = 32;
  localparam int HKEY_W = 27;
  localparam int KLEN_W = 8;
  localparam int VLEN_W = 20;
  localparam int PTR_W  = 41;
  localparam int WAYS   = 4;

  typedef struct packed {
    logic [TS_W-1:0]   timestamp;
    logic [HKEY_W-1:0] hkey;
    logic [KLEN_W-1:0] klen;      // 0 marks an empty entry
    logic [VLEN_W-1:0] vlen;
    logic [PTR_W-1:0]  ptr;       // [40] = object on flash, [39:0] byte address
  } index_entry_t;

  // ---------------- DRAM (one DDR3 SODIMM, 8 GB = 2^27 lines of 64 bytes)
  localparam int LINE_W  = 512;
  localparam int DRAM_AW = 27;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [DRAM_AW-1:0] dram_addr_t;

  typedef struct packed {
    logic       write;
    dram_addr_t addr;
    line_t      wdata;
  } dram_req_t;

  // First line of every slab slot (and of every object copied to flash):
  // the timestamp of the last write and the back-trace information that
  // locates the object's index entry (bucket hash, hashed key, key length).
  typedef struct packed {
    logic [TS_W-1:0]   timestamp;   // bits [511:480]
    logic [31:0]       jhash;
    logic [HKEY_W-1:0] hkey;
    logic [KLEN_W-1:0] klen;
    logic [VLEN_W-1:0] vlen;
    logic [LINE_W-TS_W-32-HKEY_W-KLEN_W-VLEN_W-1:0] pad;
  } slot_hdr_t;

  // ---------------- flash (two cards x 8 buses, 8 KB pages, 1 MB chunks)
  localparam int FLASH_AW        = 40;          // 1 TB byte address
  localparam int NUM_BUS         = 16;
  localparam int CHIPS_PER_BUS   = 8;
  localparam int PAGE_BYTES      = 8192;
  localparam int PAGE_LINES      = PAGE_BYTES / 64;      // 128
  localparam int CHUNK_BYTES     = 1 << 20;
  localparam int CHUNK_LINES     = CHUNK_BYTES / 64;     // 16384
  localparam int PAGES_PER_CHUNK = CHUNK_BYTES / PAGE_BYTES; // 128
  localparam int PAGES_PER_BLOCK = 256;
  localparam int BLOCK_W         = 12;          // 4096 physical blocks per chip
  localparam int FTAG_W          = 6;

  typedef enum logic [1:0] {F_READ = 2'd0, F_WRITE = 2'd1, F_ERASE = 2'd2} flash_op_e;

  typedef struct packed {
    flash_op_e                    op;
    logic [$clog2(NUM_BUS)-1:0]   bus;
    logic [$clog2(CHIPS_PER_BUS)-1:0] chip;
    logic [BLOCK_W-1:0]           block;
    logic [7:0]                   page;
    logic [FTAG_W-1:0]            tag;
  } flash_cmd_t;

  typedef struct packed {
    logic [FTAG_W-1:0] tag;
    line_t             data;
    logic              last;
  } flash_rdata_t;

  typedef struct packed {
    logic [$clog2(NUM_BUS)-1:0]       bus;
    logic [$clog2(CHIPS_PER_BUS)-1:0] chip;
    logic [BLOCK_W-1:0]               block;
    logic                             bad;
  } flash_erase_ack_t;

  // ---------------- memcached binary protocol
  localparam logic [7:0] MAGIC_REQ  = 8'h80;
  localparam logic [7:0] MAGIC_RESP = 8'h81;
  typedef enum logic [7:0] {OP_GET = 8'h00, OP_SET = 8'h01, OP_DELETE = 8'h04} kvs_op_e;
  localparam logic [15:0] ST_OK        = 16'h0000;
  localparam logic [15:0] ST_NOT_FOUND = 16'h0001;
  localparam logic [15:0] ST_NOT_STORED = 16'h0005;
  localparam int MAX_KEY_BYTES = 256;
  localparam int KEY_WORDS     = MAX_KEY_BYTES / 8;

  typedef struct packed {
    logic [63:0] data;
    logic        last;
  } flit_t;

  // ---------------- cluster
  localparam int NODE_W = 5;                   // up to 32 nodes
  localparam int LEN_W  = 18;                  // packet length in words

  typedef struct packed {
    logic [NODE_W-1:0] dest;
    logic [NODE_W-1:0] src;
    logic [LEN_W-1:0]  len;   // words in the whole packet
    logic [63:0]       data;
    logic              last;
  } net_flit_t;

  // ---------------- hash table command / response
  typedef enum logic [1:0] {HT_GET = 2'd0, HT_SET = 2'd1, HT_DEL = 2'd2} ht_op_e;
  localparam int CIDX_W = 7;                   // 128 completion-buffer entries

  typedef struct packed {
    ht_op_e            op;
    logic [KLEN_W-1:0] klen;
    logic [VLEN_W-1:0] vlen;
    logic [31:0]       jhash;
    logic [HKEY_W-1:0] hkey;
    logic [CIDX_W-1:0] cidx;
  } ht_cmd_t;

  typedef struct packed {
    ht_op_e            op;
    logic              hit;     // GET: entry found; SET: stored; DEL: entry removed
    logic [KLEN_W-1:0] klen;
    logic [VLEN_W-1:0] vlen;
    logic [CIDX_W-1:0] cidx;
  } ht_resp_t;

  // in-flight request metadata kept in the completion buffer
  typedef struct packed {
    logic [7:0]        opcode;
    logic [31:0]       opaque;
    logic [KLEN_W-1:0] klen;
    logic [NODE_W-1:0] src;
  } cb_meta_t;

  // words of a packet: 3 header words + ceil(body/8)
  function automatic logic [LEN_W-1:0] pkt_words(input logic [31:0] body);
    logic [31:0] w;
    w = 32'd3 + ((body + 32'd7) >> 3);
    return w[LEN_W-1:0];
  endfunction

endpackage
