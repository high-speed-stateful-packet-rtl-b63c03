// Input handler of the Match Action Engine (MAE): instruction input and hash engine.
//
// Three sources feed it. Recirculated operations from the action pipeline (a lookup moving on
// to the next TSS table, a statistics update of an earlier match, a read that was cancelled)
// go first; new packets from the traffic interface and instructions from the service interface
// share the rest in round-robin order. A packet always starts as a lookup in table 0, the head
// of the TSS chain. A service OP_CFG instruction writes the on-chip table configuration at
// once and uses no memory; every other instruction becomes a session.
//
// Stage 0 picks an instruction. Stage 1 masks the key with the table's mask, hashes the table
// id and masked key with CRC-32 into a bucket address, takes a tag from the allocated storage
// for a new session (or reuses the tag of a recirculated one) and stores the session. Stage 2
// holds the read request {tag, bucket} until the cache's read channel accepts it.
// Following the source design: the two interfaces, lookups starting at the first table, the
// CRC-32 hash of the selected fields of the selected table, sessions stored at dispatch and
// recirculation back into hashing. This design's choices: the priorities, the round robin,
// table 0 as chain head, and the configuration memory living here with two read ports for the
// action pipeline.
//
// Interface: tr_* (traffic: key, length), sv_* (service: instr_t), rc_* (recirculation:
// tag and session), alloc_*/upd_* to the allocated storage, rd_* read requests (valid/ready),
// cfg_a/cfg_b combinational configuration reads.
// Timing: an accepted instruction issues its read request two cycles later if not stalled;
// one instruction per cycle.
module input_handler
  import tss_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // traffic interface
  input  logic             tr_valid,
  output logic             tr_ready,
  input  key_t             tr_key,
  input  logic [LEN_W-1:0] tr_len,
  // service interface
  input  logic             sv_valid,
  output logic             sv_ready,
  input  instr_t           sv_instr,
  // recirculation from the action pipeline
  input  logic             rc_valid,
  output logic             rc_ready,
  input  tag_t             rc_tag,
  input  session_t         rc_sess,
  // allocated storage
  output logic             alloc_req,
  input  logic             alloc_gnt,
  input  tag_t             alloc_tag,
  output session_t         alloc_sess,
  output logic             upd_valid,
  output tag_t             upd_tag,
  output session_t         upd_sess,
  // read channel
  output logic             rd_valid,
  input  logic             rd_ready,
  output rd_req_t          rd_req,
  // table configuration reads for the action pipeline
  input  tid_t             cfg_a_tid,
  output tbl_cfg_t         cfg_a,
  input  tid_t             cfg_b_tid,
  output tbl_cfg_t         cfg_b
);
  tbl_cfg_t cfg_mem [NUM_TABLES];

  // ---------------- stage 1 / stage 2 registers
  logic     p1_valid, p1_recirc;
  tag_t     p1_tag;
  session_t p1_sess;
  logic     p2_valid;
  rd_req_t  p2_req;

  wire p2_free  = !p2_valid || rd_ready;
  wire p1_go    = p1_valid && p2_free && (p1_recirc || alloc_gnt);
  wire p1_free  = !p1_valid || p1_go;

  // ---------------- stage 0: selection
  logic prefer_sv;                               // round-robin pointer
  logic pick_rc, pick_sv, pick_tr;
  always_comb begin
    pick_rc = rc_valid && p1_free;
    pick_sv = 1'b0;
    pick_tr = 1'b0;
    if (!pick_rc) begin
      if (sv_valid && sv_instr.op == OP_CFG) pick_sv = 1'b1;       // no stage-1 slot needed
      else if (p1_free) begin
        if (sv_valid && (prefer_sv || !tr_valid)) pick_sv = 1'b1;
        else if (tr_valid) pick_tr = 1'b1;
      end
    end
  end
  assign rc_ready = pick_rc;
  assign sv_ready = pick_sv;
  assign tr_ready = pick_tr;

  wire cfg_we = pick_sv && sv_instr.op == OP_CFG;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TABLES; i++) cfg_mem[i] <= '0;
    end else if (cfg_we) begin
      cfg_mem[sv_instr.tid] <= '{valid:    sv_instr.action[TID_W+1],
                                 has_next: sv_instr.action[TID_W],
                                 next:     sv_instr.action[TID_W-1:0],
                                 max_prio: sv_instr.prio,
                                 mask:     sv_instr.key};
    end
  end

  assign cfg_a = cfg_mem[cfg_a_tid];
  assign cfg_b = cfg_mem[cfg_b_tid];

  function automatic session_t new_session(instr_t in);
    session_t s;
    s        = '0;
    s.op     = in.op;
    s.tid    = in.tid;
    s.key    = in.key;
    s.len    = in.len;
    s.prio   = in.prio;
    s.action = in.action;
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p1_valid  <= 1'b0;
      prefer_sv <= 1'b0;
    end else begin
      if (pick_rc || (pick_sv && !cfg_we) || pick_tr) p1_valid <= 1'b1;
      else if (p1_go) p1_valid <= 1'b0;
      if (pick_sv && !cfg_we) prefer_sv <= 1'b0;
      else if (pick_tr)       prefer_sv <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (pick_rc) begin
      p1_recirc <= 1'b1;
      p1_tag    <= rc_tag;
      p1_sess   <= rc_sess;
    end else if (pick_sv && !cfg_we) begin
      p1_recirc <= 1'b0;
      p1_sess   <= new_session(sv_instr);
    end else if (pick_tr) begin
      p1_recirc <= 1'b0;
      p1_sess   <= new_session('{op: OP_LOOKUP, tid: '0, key: tr_key, len: tr_len,
                                 prio: '0, action: '0});
    end
  end

  // ---------------- stage 1: mask, hash, tag, session store
  key_t        p1_masked;
  logic [31:0] p1_crc;
  session_t    p1_sess_addr;
  tbl_cfg_t    p1_cfg;
  assign p1_cfg    = cfg_mem[p1_sess.tid];
  assign p1_masked = p1_sess.key & p1_cfg.mask;

  crc32_hash #(.MSG_W(TID_W + KEY_W)) u_hash (.msg({p1_sess.tid, p1_masked}), .crc(p1_crc));

  always_comb begin
    p1_sess_addr      = p1_sess;
    p1_sess_addr.addr = p1_crc[ADDR_W-1:0];
  end

  assign alloc_req  = p1_valid && !p1_recirc && p2_free;
  assign alloc_sess = p1_sess_addr;
  assign upd_valid  = p1_valid && p1_recirc && p2_free;
  assign upd_tag    = p1_tag;
  assign upd_sess   = p1_sess_addr;

  // ---------------- stage 2: read request
  always_ff @(posedge clk) begin
    if (!rst_n) p2_valid <= 1'b0;
    else if (p1_go) p2_valid <= 1'b1;
    else if (rd_ready) p2_valid <= 1'b0;
  end

  always_ff @(posedge clk)
    if (p1_go) p2_req <= '{tag: p1_recirc ? p1_tag : alloc_tag, addr: p1_crc[ADDR_W-1:0]};

  assign rd_valid = p2_valid;
  assign rd_req   = p2_req;

  a_rd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid && !rd_ready |=> rd_valid && $stable(rd_req)) else $error("input_handler: read request dropped");
endmodule
