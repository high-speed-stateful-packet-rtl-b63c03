// Shared types and sizes of the stateful TSS (Tuple Space Search) packet classifier.
//
// A rule occupies one 64-byte memory line (one cache line, one 512-bit AXI beat). Rules of all
// TSS tables share one hash-addressed memory: the bucket of a rule is the CRC-32 of its table id
// and masked key, truncated to the line-address width (direct hashing, one rule per bucket).
// The 64-byte rule size, the 512-bit bus, the 64-entry queues and the 16 GB rule storage
// (2^28 lines) follow the source design; the field layout of the rule, the key width, the
// number of tables and the tag count are this design's own choices.
package tss_pkg;

  localparam int KEY_W      = 256;              // match key (masked header fields)
  localparam int TID_W      = 8;                // TSS table id
  localparam int NUM_TABLES = 1 << TID_W;
  localparam int ADDR_W     = 28;               // line (bucket) address: 2^28 x 64 B = 16 GB
  localparam int LINE_W     = 512;              // rule / cache line / AXI data width
  localparam int PRIO_W     = 32;               // OpenFlow rule priority
  localparam int ACT_W      = 32;               // action reference returned with a match
  localparam int CNT_W      = 64;               // packet and byte counters
  localparam int TS_W       = 48;               // last-seen timestamp (clock cycles)
  localparam int LEN_W      = 16;               // packet length in bytes
  localparam int NUM_TAGS   = 64;               // sessions in flight (MAE tags)
  localparam int TAG_W      = $clog2(NUM_TAGS);
  localparam int AXI_ID_W   = 6;                // AXI ID: load/store queue entry index
  localparam int AXI_ADDR_W = ADDR_W + 6;       // byte address of a 64-byte line

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [PRIO_W-1:0] prio_t;

  // One rule record, exactly one memory line.
  typedef struct packed {
    key_t              key;      // key already ANDed with the table mask
    logic [6:0]        rsvd;
    logic [TS_W-1:0]   ts;       // time of the last matching packet
    logic [CNT_W-1:0]  bytes;    // byte counter
    logic [CNT_W-1:0]  pkts;     // packet counter
    logic [ACT_W-1:0]  action;
    prio_t             prio;
    tid_t              tid;      // table the rule belongs to (memory is shared by all tables)
    logic              valid;
  } rule_t;

  // Per-table TSS configuration, held on chip.
  typedef struct packed {
    logic  valid;
    logic  has_next;             // another table follows in the TSS chain
    tid_t  next;
    prio_t max_prio;             // highest priority of any rule in this table
    key_t  mask;
  } tbl_cfg_t;

  typedef enum logic [2:0] {
    OP_LOOKUP     = 3'd0,        // classify a packet, update the matching rule's statistics
    OP_INSERT     = 3'd1,        // write a rule into its bucket
    OP_DELETE     = 3'd2,        // invalidate a rule
    OP_READ       = 3'd3,        // read a rule's statistics
    OP_READ_CLEAR = 3'd4,        // read and clear a rule's statistics atomically
    OP_STAT       = 3'd5,        // internal: update statistics of the best match of a lookup
    OP_CFG        = 3'd6         // write one table's configuration (no memory access)
  } op_e;

  // Instruction entering the MAE. For OP_CFG: key = mask, prio = max_prio,
  // action[TID_W-1:0] = next table, action[TID_W] = has_next, action[TID_W+1] = valid.
  typedef struct packed {
    op_e              op;
    tid_t             tid;
    key_t             key;
    logic [LEN_W-1:0] len;
    prio_t            prio;
    logic [ACT_W-1:0] action;
  } instr_t;

  // State of one in-flight operation, kept in the allocated storage under its tag.
  typedef struct packed {
    op_e              op;
    tid_t             tid;       // table whose bucket is being read
    key_t             key;       // unmasked search key
    logic [LEN_W-1:0] len;
    prio_t            prio;      // payload of OP_INSERT
    logic [ACT_W-1:0] action;    // payload of OP_INSERT
    logic             best_valid;
    prio_t            best_prio;
    tid_t             best_tid;
    addr_t            addr;      // bucket being read
  } session_t;

  typedef struct packed {
    tag_t  tag;
    addr_t addr;
  } rd_req_t;

  typedef struct packed {
    tag_t  tag;
    logic  cancelled;            // read was cancelled by a later write: re-execute it
    line_t data;
  } rd_rsp_t;

  typedef struct packed {
    tag_t  tag;
    addr_t addr;
    line_t data;
  } wr_req_t;

  // Result leaving the MAE (classified packet or answer to a service instruction).
  typedef struct packed {
    tag_t             tag;
    op_e              op;
    logic             found;     // lookup: classified; delete/read: rule present
    logic             replaced;  // insert: bucket held a different valid rule
    tid_t             tid;
    prio_t            prio;
    logic [ACT_W-1:0] action;
    logic [CNT_W-1:0] pkts;
    logic [CNT_W-1:0] bytes;
    logic [TS_W-1:0]  ts;
  } result_t;

  // AXI4 channel payloads (one 512-bit beat per transaction, INCR, size 64 B).
  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;
    logic [2:0]            size;
    logic [1:0]            burst;
  } axi_a_t;

  typedef struct packed {
    logic [LINE_W-1:0]   data;
    logic [LINE_W/8-1:0] strb;
    logic                last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [LINE_W-1:0]   data;
    logic [1:0]          resp;
    logic                last;
  } axi_r_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [1:0]          resp;
  } axi_b_t;

  // One-cycle event pulses brought out of the classifier for performance counting.
  typedef struct packed {
    logic cache_hit;      // read hit in the cache
    logic cache_miss;     // read miss passed to the load queue
    logic evict;          // dirty line moved to the store queue
    logic fill;           // line from memory installed in the cache
    logic lq_merge;       // miss merged into a pending load
    logic lq_cancel;      // pending load cancelled by a cache write
    logic lq_bypass;      // miss served from the store queue
    logic sq_merge;       // eviction merged into a pending store
    logic fwd;            // action pipeline took a rule from a younger write
    logic next_table;     // lookup recirculated to the next TSS table
    logic retry;          // cancelled read re-executed
    logic stat;           // statistics re-read of an earlier-table match
    logic no_tag;         // new operation waiting for a free tag
  } events_t;

  // Rule after a packet hit: counters and timestamp updated.
  function automatic rule_t rule_hit(rule_t r, logic [LEN_W-1:0] len, logic [TS_W-1:0] now);
    rule_t u = r;
    u.pkts  = r.pkts + 1;
    u.bytes = r.bytes + CNT_W'(len);
    u.ts    = now;
    return u;
  endfunction

endpackage
