// Directed test of the action pipeline. The testbench plays the allocated storage (sessions
// by tag), the table configuration and the cache (read responses, write confirmations).
// Cases: 20 lookups of one rule answered back to back with the same stale line (write
// forwarding must make the counters count 1..20); a lookup missing in a table that has a
// successor (recirculation to the next table); a cancelled response (re-execution); a match
// that the next table may beat, which then does not (statistics re-read, OP_STAT); insert and
// delete (rule written / cleared); results held back until their write is confirmed.
module tb_action_pipeline;
  import tss_pkg::*;
  localparam int TAGS = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [TS_W-1:0] now;
  logic rsp_valid, wr_valid, wr_ack, rc_valid, res_valid, res_ready, free_valid;
  logic ev_fwd, ev_next, ev_retry, ev_stat;
  rd_rsp_t rsp;
  tag_t sess_tag, rc_tag, free_tag;
  session_t sess, rc_sess;
  tid_t cfg_a_tid, cfg_b_tid;
  tbl_cfg_t cfg_a, cfg_b;
  wr_req_t wr_req;
  result_t res;

  action_pipeline #(.TAGS(TAGS), .FWD_DEPTH(TAGS + 16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  session_t sessions [TAGS];
  tbl_cfg_t cfg [4];
  assign sess  = sessions[sess_tag];
  assign cfg_a = cfg[cfg_a_tid[1:0]];
  assign cfg_b = cfg[cfg_b_tid[1:0]];

  wr_req_t wq [$];
  result_t rq [$];
  session_t rcq [$];
  tag_t rctq [$];
  bit ack_en = 1;
  int held = 0;
  int n_free = 0;
  always @(posedge clk) begin
    now <= rst_n ? now + 1 : '0;
    // confirmations: one per write, one per cycle, held back while ack_en is low
    wr_ack <= rst_n && ack_en && (held > 0 || wr_valid);
    held   <= held + (wr_valid ? 1 : 0) - ((ack_en && (held > 0 || wr_valid)) ? 1 : 0);
    if (rst_n) begin
      if (wr_valid) wq.push_back(wr_req);
      if (res_valid && res_ready) rq.push_back(res);
      if (rc_valid) begin rcq.push_back(rc_sess); rctq.push_back(rc_tag); end
      if (free_valid) n_free++;
    end
  end

  function automatic session_t lookup_sess(key_t k, tid_t t, addr_t a);
    session_t s = '0;
    s.op = OP_LOOKUP; s.tid = t; s.key = k; s.len = 100; s.addr = a;
    return s;
  endfunction

  task automatic respond(tag_t t, line_t d, bit canc = 0);
    @(negedge clk); rsp_valid = 1; rsp = '{tag: t, cancelled: canc, data: d};
    @(negedge clk); rsp_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic key_t k = {8{32'hC0FFEE11}};
    automatic rule_t rl = '0;
    rsp_valid = 0; rsp = '0; res_ready = 1; now = '0;
    foreach (cfg[i]) cfg[i] = '0;
    cfg[0] = '{valid: 1, has_next: 0, next: 0, max_prio: 100, mask: '1};
    cfg[1] = '{valid: 1, has_next: 1, next: 2, max_prio: 100, mask: '1};
    cfg[2] = '{valid: 1, has_next: 0, next: 0, max_prio: 50, mask: key_t'({16{1'b1}})};
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);

    // ---- 1: back-to-back hits on one rule with stale data
    rl.valid = 1; rl.tid = 0; rl.key = k; rl.prio = 7; rl.action = 32'hA5;
    for (int t = 0; t < 20; t++) sessions[t] = lookup_sess(k, 0, 28'h123);
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      rsp_valid = 1; rsp = '{tag: tag_t'(t), cancelled: 0, data: line_t'(rl)};
      @(negedge clk);
    end
    rsp_valid = 0;
    repeat (10) @(posedge clk);
    check(wq.size() == 20, "20 writes");
    foreach (wq[i]) begin
      automatic rule_t w = rule_t'(wq[i].data);
      check(wq[i].addr == 28'h123 && w.pkts == 64'(i + 1) && w.bytes == 64'(100 * (i + 1)),
            $sformatf("write %0d counts %0d", i, w.pkts));
    end
    check(rq.size() == 20, "20 results");
    foreach (rq[i]) check(rq[i].found && rq[i].action == 32'hA5 && rq[i].pkts == 64'(i + 1), "result counts");
    check(n_free == 20, "tags freed");
    wq.delete(); rq.delete();

    // ---- 2: miss in table 1, which has a successor -> recirculate to table 2
    sessions[1] = lookup_sess(k ^ 1, 1, 28'h200);
    respond(1, '0);
    repeat (4) @(posedge clk);
    check(rcq.size() == 1 && rcq[0].tid == 2 && rctq[0] == 1 && !rcq[0].best_valid, "recirculated to table 2");
    check(wq.size() == 0 && rq.size() == 0, "nothing written on a miss");
    rcq.delete(); rctq.delete();

    // ---- 3: cancelled response -> same session back
    sessions[2] = lookup_sess(k, 0, 28'h123);
    respond(2, '0, 1);
    repeat (4) @(posedge clk);
    check(rcq.size() == 1 && rcq[0] == sessions[2], "cancelled read re-executed unchanged");
    rcq.delete(); rctq.delete();

    // ---- 4: match prio 30 in table 1; table 2 (max 50) may beat it but does not -> OP_STAT
    rl.tid = 1; rl.prio = 30; rl.pkts = 5; rl.bytes = 500; rl.action = 32'hB6;
    sessions[3] = lookup_sess(k, 1, 28'h300);
    respond(3, line_t'(rl));
    repeat (4) @(posedge clk);
    check(rcq.size() == 1 && rcq[0].tid == 2 && rcq[0].best_valid && rcq[0].best_prio == 30, "continue to table 2");
    sessions[3] = rcq[0]; sessions[3].addr = 28'h301; rcq.delete(); rctq.delete();
    respond(3, '0);                           // nothing in table 2
    repeat (4) @(posedge clk);
    check(rcq.size() == 1 && rcq[0].op == OP_STAT && rcq[0].tid == 1, "statistics re-read of table 1");
    sessions[3] = rcq[0]; sessions[3].addr = 28'h300; rcq.delete(); rctq.delete();
    ack_en = 0;
    respond(3, line_t'(rl));
    repeat (3) @(posedge clk);
    check(rq.size() == 0, "result waits for write confirmation");
    ack_en = 1;
    repeat (6) @(posedge clk);
    check(rq.size() == 1 && rq[0].op == OP_LOOKUP && rq[0].found && rq[0].action == 32'hB6 && rq[0].pkts == 6,
          "statistics updated after the re-read");
    rq.delete(); wq.delete();

    // ---- 5: insert, then delete
    sessions[4] = '0; sessions[4].op = OP_INSERT; sessions[4].tid = 2; sessions[4].key = k;
    sessions[4].prio = 44; sessions[4].action = 32'hC7; sessions[4].addr = 28'h400;
    respond(4, '0);
    repeat (6) @(posedge clk);
    begin
      automatic rule_t w = rule_t'(wq[0].data);
      check(wq.size() == 1 && w.valid && w.tid == 2 && w.key == (k & cfg[2].mask) && w.prio == 44
            && w.action == 32'hC7 && w.pkts == 0, "inserted rule");
      check(rq.size() == 1 && rq[0].op == OP_INSERT && !rq[0].replaced, "insert result");
      sessions[5] = sessions[4]; sessions[5].op = OP_DELETE;
      wq.delete(); rq.delete();
      respond(5, line_t'(w));
    end
    repeat (6) @(posedge clk);
    check(wq.size() == 1 && wq[0].data == '0 && rq.size() == 1 && rq[0].found, "deleted rule");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
