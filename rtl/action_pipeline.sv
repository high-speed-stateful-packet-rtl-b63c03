// Action pipeline of the MAE: finishes each operation when its bucket read returns.
//
// Reads return out of order, tagged. Data Prep registers the response together with the
// session stored under its tag. Cmp Update compares the rule read with the session's masked
// key and decides: a lookup that matched updates the rule's packet and byte counters and
// timestamp; a lookup that missed, or whose match may still be beaten by a higher-priority
// rule in the next table (next table's max priority above the best so far), recirculates to
// the next table of the TSS chain; when the chain ends on a match found in an earlier table, a
// statistics update (OP_STAT) re-reads that rule. Insert, delete, read and read-and-clear act
// on the bucket. A cancelled read is recirculated unchanged and re-executed.
// Write/Reinsert sends the new rule to the write channel or the session back to the input
// handler. Write Confirm queues results in order and releases a result whose rule write has
// been confirmed by the cache; the result leaves on the output and the tag is freed.
//
// Write forwarding: the record read may be older than writes still on their way to the cache.
// Cmp Update therefore takes the rule from the Write stage when its address matches, else the
// newest matching entry of a log of the last FWD_DEPTH writes, else the data read. Every write
// that can still be missing from a read's data is in that log when FWD_DEPTH >= TAGS + the
// read-to-compare latency, because at most TAGS writes are unconfirmed at any time and the
// cache commits one write per cycle.
// Following the source design: the four stages, out-of-order processing by tag, counters
// updated and written back through the cache, recirculation to the next table and output of
// unclassified packets, re-execution of cancelled reads, and write forwarding by address.
// This design's choices: the priority rule of the chain end, OP_STAT, the forward log, and
// the result queue that waits for write confirmations.
//
// Interface: rsp_* (tagged read responses, no back-pressure), sess_tag/sess (session read),
// cfg_*, wr_* (to the write channel), wr_ack (one pulse per committed write, in order),
// rc_* (recirculation), res_* (results, valid/ready), free_* (tag release), ev_* (events).
// Timing: response in cycle n -> write or recirculation issued in cycle n+2.
// sess_tag is the response tag and cfg_b_tid the current table's next-table field, both
// passed straight to the storage read ports.
module action_pipeline
  import tss_pkg::*;
#(
  parameter int TAGS      = NUM_TAGS,
  parameter int FWD_DEPTH = NUM_TAGS + 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] now,
  input  logic            rsp_valid,
  input  rd_rsp_t         rsp,
  output tag_t            sess_tag,
  input  session_t        sess,
  output tid_t            cfg_a_tid,
  input  tbl_cfg_t        cfg_a,
  output tid_t            cfg_b_tid,
  input  tbl_cfg_t        cfg_b,
  output logic            wr_valid,
  output wr_req_t         wr_req,
  input  logic            wr_ack,
  output logic            rc_valid,
  output tag_t            rc_tag,
  output session_t        rc_sess,
  output logic            res_valid,
  input  logic            res_ready,
  output result_t         res,
  output logic            free_valid,
  output tag_t            free_tag,
  output logic            ev_fwd,       // rule taken from a younger write
  output logic            ev_next,      // lookup moved on to the next table
  output logic            ev_retry,     // cancelled read re-executed
  output logic            ev_stat       // statistics re-read of an earlier match
);
  localparam int LW = $clog2(FWD_DEPTH);

  // ---------------- Data Prep
  logic     dp_valid;
  rd_rsp_t  dp_rsp;
  session_t dp_sess;
  assign sess_tag = rsp.tag;

  always_ff @(posedge clk) begin
    if (!rst_n) dp_valid <= 1'b0;
    else        dp_valid <= rsp_valid;
    if (rsp_valid) begin
      dp_rsp  <= rsp;
      dp_sess <= sess;
    end
  end

  // ---------------- Write stage registers (declared early for forwarding)
  logic     ws_valid, ws_write, ws_rc, ws_res;
  wr_req_t  ws_wr;
  session_t ws_rc_sess;
  tag_t     ws_tag;
  result_t  ws_result;

  // ---------------- forward log
  logic  log_v    [FWD_DEPTH];
  addr_t log_addr [FWD_DEPTH];
  line_t log_data [FWD_DEPTH];
  logic [LW-1:0] log_wp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      log_wp <= '0;
      for (int i = 0; i < FWD_DEPTH; i++) log_v[i] <= 1'b0;
    end else if (ws_valid && ws_write) begin
      log_v[log_wp]    <= 1'b1;
      log_addr[log_wp] <= ws_wr.addr;
      log_data[log_wp] <= ws_wr.data;
      log_wp <= (log_wp == LW'(FWD_DEPTH - 1)) ? '0 : log_wp + 1'b1;
    end
  end

  // ---------------- Cmp Update
  logic  fwd_hit;
  line_t fwd_data;
  always_comb begin
    fwd_hit  = 1'b0;
    fwd_data = dp_rsp.data;
    // oldest to newest, so the newest match wins
    for (int k = 0; k < FWD_DEPTH; k++) begin
      int idx;
      idx = int'(log_wp) + k;
      if (idx >= FWD_DEPTH) idx -= FWD_DEPTH;
      if (log_v[idx] && log_addr[idx] == dp_sess.addr) begin
        fwd_hit  = 1'b1;
        fwd_data = log_data[idx];
      end
    end
    if (ws_valid && ws_write && ws_wr.addr == dp_sess.addr) begin
      fwd_hit  = 1'b1;
      fwd_data = ws_wr.data;
    end
  end

  rule_t    r;
  key_t     masked;
  logic     match, same, here, nb_valid, cont;
  prio_t    nb_prio;
  tid_t     nb_tid;
  logic     cu_write, cu_rc, cu_res, cu_next, cu_stat;
  rule_t    cu_rule;
  session_t cu_sess;
  result_t  cu_result;

  assign cfg_a_tid = dp_sess.tid;
  assign cfg_b_tid = cfg_a.next;

  always_comb begin
    r        = rule_t'(fwd_data);
    masked   = dp_sess.key & cfg_a.mask;
    same     = r.valid && r.tid == dp_sess.tid && r.key == masked;
    match    = cfg_a.valid && same;
    here     = match && (!dp_sess.best_valid || r.prio > dp_sess.best_prio);
    nb_valid = here || dp_sess.best_valid;
    nb_prio  = here ? r.prio : dp_sess.best_prio;
    nb_tid   = here ? dp_sess.tid : dp_sess.best_tid;
    cont     = cfg_a.valid && cfg_a.has_next && (!nb_valid || cfg_b.max_prio > nb_prio);

    cu_write = 1'b0; cu_rc = 1'b0; cu_res = 1'b0; cu_next = 1'b0; cu_stat = 1'b0;
    cu_rule  = r;
    cu_sess  = dp_sess;
    cu_result         = '0;
    cu_result.tag     = dp_rsp.tag;
    cu_result.op      = dp_sess.op;
    cu_result.found   = match;
    cu_result.tid     = r.tid;
    cu_result.prio    = r.prio;
    cu_result.action  = r.action;
    cu_result.pkts    = r.pkts;
    cu_result.bytes   = r.bytes;
    cu_result.ts      = r.ts;

    if (dp_rsp.cancelled) begin
      cu_rc = 1'b1;
    end else begin
      unique case (dp_sess.op)
        OP_LOOKUP: begin
          cu_sess.best_valid = nb_valid;
          cu_sess.best_prio  = nb_prio;
          cu_sess.best_tid   = nb_tid;
          if (cont) begin
            cu_rc = 1'b1; cu_next = 1'b1;
            cu_sess.tid = cfg_a.next;
          end else if (here) begin
            cu_write = 1'b1; cu_res = 1'b1;
            cu_rule  = rule_hit(r, dp_sess.len, now);
          end else if (nb_valid) begin
            cu_rc = 1'b1; cu_stat = 1'b1;
            cu_sess.op  = OP_STAT;
            cu_sess.tid = nb_tid;
          end else begin
            cu_res = 1'b1;
          end
        end
        OP_STAT: begin
          cu_res = 1'b1;
          cu_result.op = OP_LOOKUP;
          if (match) begin
            cu_write = 1'b1;
            cu_rule  = rule_hit(r, dp_sess.len, now);
          end
        end
        OP_INSERT: begin
          cu_write = 1'b1; cu_res = 1'b1;
          cu_result.replaced = r.valid && !same;
          cu_rule        = '0;
          cu_rule.valid  = 1'b1;
          cu_rule.tid    = dp_sess.tid;
          cu_rule.key    = masked;
          cu_rule.prio   = dp_sess.prio;
          cu_rule.action = dp_sess.action;
          cu_rule.ts     = now;
        end
        OP_DELETE: begin
          cu_res = 1'b1;
          if (match) begin cu_write = 1'b1; cu_rule = '0; end
        end
        OP_READ: cu_res = 1'b1;
        OP_READ_CLEAR: begin
          cu_res = 1'b1;
          if (match) begin
            cu_write = 1'b1;
            cu_rule.pkts  = '0;
            cu_rule.bytes = '0;
          end
        end
        default: cu_res = 1'b1;
      endcase
    end
    if (cu_write && cu_res && dp_sess.op != OP_READ_CLEAR && dp_sess.op != OP_DELETE) begin
      cu_result.pkts  = cu_rule.pkts;
      cu_result.bytes = cu_rule.bytes;
      cu_result.ts    = cu_rule.ts;
      cu_result.tid   = cu_rule.tid;
      cu_result.prio  = cu_rule.prio;
      cu_result.action = cu_rule.action;
    end
  end

  // ---------------- Write / Reinsert
  always_ff @(posedge clk) begin
    if (!rst_n) ws_valid <= 1'b0;
    else        ws_valid <= dp_valid;
    if (dp_valid) begin
      ws_write   <= cu_write;
      ws_rc      <= cu_rc;
      ws_res     <= cu_res;
      ws_wr      <= '{tag: dp_rsp.tag, addr: dp_sess.addr, data: line_t'(cu_rule)};
      ws_rc_sess <= cu_sess;
      ws_tag     <= dp_rsp.tag;
      ws_result  <= cu_result;
    end
  end

  assign ev_fwd   = dp_valid && !dp_rsp.cancelled && fwd_hit;
  assign ev_next  = dp_valid && cu_next;
  assign ev_retry = dp_valid && dp_rsp.cancelled;
  assign ev_stat  = dp_valid && cu_stat;

  assign wr_valid = ws_valid && ws_write;
  assign wr_req   = ws_wr;
  assign rc_valid = ws_valid && ws_rc;
  assign rc_tag   = ws_tag;
  assign rc_sess  = ws_rc_sess;

  // ---------------- Write Confirm
  typedef struct packed {
    logic    need_ack;
    result_t res;
  } wc_t;

  wc_t  wc_head;
  logic wc_valid, wc_pop;
  logic [$clog2(TAGS+1)-1:0] wc_count;
  logic [$clog2(TAGS+1)-1:0] ack_credit;

  sync_fifo #(.T(wc_t), .DEPTH(TAGS)) u_wc (
    .clk, .rst_n,
    .in_valid(ws_valid && ws_res), .in_ready(),
    .in_data('{need_ack: ws_write, res: ws_result}),
    .out_valid(wc_valid), .out_ready(wc_pop), .out_data(wc_head), .count(wc_count));

  wire ack_ok = !wc_head.need_ack || ack_credit != '0;
  assign wc_pop    = wc_valid && ack_ok && res_ready;
  assign res_valid = wc_valid && ack_ok;
  assign res       = wc_head.res;
  assign free_valid = wc_pop;
  assign free_tag   = wc_head.res.tag;

  always_ff @(posedge clk) begin
    if (!rst_n) ack_credit <= '0;
    else ack_credit <= ack_credit + $bits(ack_credit)'(wr_ack)
                       - $bits(ack_credit)'(wc_pop && wc_head.need_ack);
  end
endmodule
