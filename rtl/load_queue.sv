// Load queue: the read side of the memory subsystem, between the cache and the DDR4 read
// channels.
//
// Each entry is one outstanding line read. A cache miss to an address that already has a live
// (not cancelled) entry is merged into it: the entry keeps a bitmap of the MAE tags waiting for
// the line, so one memory read serves them all. A miss to a new address takes the lowest free
// entry (priority encoder); if the store queue holds a newer copy of the line (a dirty line
// evicted and not yet written), the entry takes that data at once and no memory read is made
// (read bypass). Otherwise the entry issues an AXI read whose ID is the entry index, so reads
// may return in any order.
// Read cancellation: every write committed into the cache is broadcast here; each entry for
// that address is marked cancelled and no longer merges new misses. Its waiting tags are still
// answered, flagged "cancelled", so the MAE re-executes them (they then hit the freshly written
// line), and its data is never filled into the cache. A cancelled entry that was not issued
// yet is answered without a memory read.
// When an entry has its data it answers one waiting tag per cycle, lowest tag first; the first
// answer carries the fill request to the cache. The entry is freed after its last answer.
// Following the source design: merging of same-address reads, read bypass from the store
// queue, read cancellation by cache writes, 64 entries and out-of-order completion. This
// design's choices: the tag bitmap, the lowest-index allocation and issue order, and one
// answer per cycle.
//
// Interface: enq_* (misses, valid/ready), cancel_* (cache writes), sq_* (store queue lookup,
// combinational), ar_* / r_* (AXI read, r always accepted), rsp_* (answers, valid/ready),
// ev_* event pulses.
// Timing: an answer can leave two cycles after the AXI read data arrives.
// sq_addr is the incoming miss address itself: the store-queue lookup is combinational.
module load_queue
  import tss_pkg::*;
#(
  parameter int DEPTH = 64,
  parameter int TAGS  = NUM_TAGS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enq_valid,
  output logic  enq_ready,
  input  addr_t enq_addr,
  input  tag_t  enq_tag,
  input  logic  cancel_valid,
  input  addr_t cancel_addr,
  output addr_t sq_addr,
  input  logic  sq_hit,
  input  line_t sq_data,
  output logic  ar_valid,
  input  logic  ar_ready,
  output addr_t ar_addr,
  output logic [AXI_ID_W-1:0] ar_id,
  input  logic  r_valid,
  input  logic [AXI_ID_W-1:0] r_id,
  input  line_t r_data,
  output logic  rsp_valid,
  input  logic  rsp_ready,
  output tag_t  rsp_tag,
  output addr_t rsp_addr,
  output line_t rsp_data,
  output logic  rsp_cancelled,
  output logic  rsp_fill,
  output logic  ev_merge,
  output logic  ev_cancel,
  output logic  ev_bypass
);
  localparam int IW = $clog2(DEPTH);

  logic            e_valid  [DEPTH];
  addr_t           e_addr   [DEPTH];
  logic            e_cancel [DEPTH];
  logic            e_issued [DEPTH];
  logic            e_data_v [DEPTH];
  logic            e_filled [DEPTH];
  logic [TAGS-1:0] e_wait   [DEPTH];
  line_t           e_data   [DEPTH];

  // ---------------- enqueue: merge or allocate
  logic          m_hit, a_hit;
  logic [IW-1:0] m_idx, a_idx;
  always_comb begin
    m_hit = 1'b0; m_idx = '0; a_hit = 1'b0; a_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (e_valid[i] && !e_cancel[i] && e_addr[i] == enq_addr
          && !(cancel_valid && cancel_addr == enq_addr)) begin
        m_hit = 1'b1; m_idx = IW'(i);
      end
      if (!e_valid[i]) begin a_hit = 1'b1; a_idx = IW'(i); end
    end
  end
  assign enq_ready = m_hit || a_hit;
  assign sq_addr   = enq_addr;
  wire do_merge = enq_valid && m_hit;
  wire do_alloc = enq_valid && !m_hit && a_hit;

  // ---------------- AXI read issue
  logic          i_hit;
  logic [IW-1:0] i_idx;
  always_comb begin
    i_hit = 1'b0; i_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (e_valid[i] && !e_issued[i] && !e_data_v[i] && !e_cancel[i]) begin
        i_hit = 1'b1; i_idx = IW'(i);
      end
  end
  assign ar_valid = i_hit;
  assign ar_addr  = e_addr[i_idx];
  assign ar_id    = AXI_ID_W'(i_idx);

  // ---------------- answers
  logic          d_hit;
  logic [IW-1:0] d_idx;
  tag_t          d_tag;
  always_comb begin
    d_hit = 1'b0; d_idx = '0; d_tag = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (e_valid[i] && (e_data_v[i] || (e_cancel[i] && !e_issued[i])) && e_wait[i] != '0) begin
        d_hit = 1'b1; d_idx = IW'(i);
      end
    for (int t = TAGS - 1; t >= 0; t--)
      if (e_wait[d_idx][t]) d_tag = tag_t'(t);
  end
  assign rsp_valid     = d_hit;
  assign rsp_tag       = d_tag;
  assign rsp_addr      = e_addr[d_idx];
  assign rsp_data      = e_data[d_idx];
  assign rsp_cancelled = e_cancel[d_idx];
  assign rsp_fill      = !e_filled[d_idx];
  wire do_rsp = rsp_valid && rsp_ready;

  // ---------------- state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) e_valid[i] <= 1'b0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        logic [TAGS-1:0] w;
        w = e_wait[i];
        if (do_rsp && d_idx == IW'(i)) begin
          w[d_tag] = 1'b0;
          e_filled[i] <= 1'b1;
        end
        if (do_merge && m_idx == IW'(i)) w[enq_tag] = 1'b1;
        if (do_alloc && a_idx == IW'(i)) begin
          e_valid[i]  <= 1'b1;
          e_addr[i]   <= enq_addr;
          e_cancel[i] <= cancel_valid && cancel_addr == enq_addr;
          e_issued[i] <= 1'b0;
          e_data_v[i] <= sq_hit;
          e_filled[i] <= 1'b0;
          e_data[i]   <= sq_data;
          w = '0;
          w[enq_tag] = 1'b1;
        end else if (e_valid[i]) begin
          if (cancel_valid && cancel_addr == e_addr[i]) e_cancel[i] <= 1'b1;
          if (ar_valid && ar_ready && i_idx == IW'(i)) e_issued[i] <= 1'b1;
          if (r_valid && r_id == AXI_ID_W'(i)) begin
            e_data_v[i] <= 1'b1;
            e_data[i]   <= r_data;
          end
          if (w == '0) e_valid[i] <= 1'b0;
        end
        e_wait[i] <= w;
      end
    end
  end

  always_comb begin
    ev_cancel = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (cancel_valid && e_valid[i] && !e_cancel[i] && e_addr[i] == cancel_addr) ev_cancel = 1'b1;
  end
  assign ev_merge  = do_merge;
  assign ev_bypass = do_alloc && sq_hit;

  a_r_known: assert property (@(posedge clk) disable iff (!rst_n)
    r_valid |-> e_valid[r_id[IW-1:0]] && e_issued[r_id[IW-1:0]] && !e_data_v[r_id[IW-1:0]])
    else $error("load_queue: read data for an entry not waiting for it");
endmodule
