// Self-checking test of the Match Action Engine on its own. Its read and write channels are
// served by a behavioural memory that answers reads out of order after random delays (data
// taken when answered, like a cache lookup), sometimes answers "cancelled", accepts writes
// at random and confirms each one the next cycle. A two-table TSS chain is configured and
// rules are inserted; a stream of packets with many repeated keys is classified, and every
// result and, at the end, every rule's counters are compared with a reference model.
// Recirculation, re-execution of cancelled reads, write forwarding, statistics re-reads and
// waiting for a free tag must all have happened.
module tb_mae;
  import tss_pkg::*;
  localparam int TAGS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tr_valid, tr_ready, sv_valid, sv_ready, res_valid, res_ready;
  key_t tr_key;
  logic [LEN_W-1:0] tr_len;
  instr_t sv_instr;
  result_t res;
  logic rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, wr_ack;
  rd_req_t rd_req;
  rd_rsp_t rsp;
  wr_req_t wr_req;
  logic ev_fwd, ev_next, ev_retry, ev_stat, ev_no_tag;

  mae #(.TAGS(TAGS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- memory model
  line_t mem [addr_t];
  typedef struct { rd_req_t q; int due; } pr_t;
  pr_t pend [$];
  int cyc = 0;
  int n_fwd = 0, n_next = 0, n_retry = 0, n_stat = 0, n_notag = 0;
  always @(negedge clk) begin
    rd_ready = $urandom_range(0, 4) != 0;
    wr_ready = $urandom_range(0, 4) != 0;
    rsp_valid = 0;
    if (pend.size() > 0) begin
      automatic int k = $urandom_range(0, pend.size() - 1);
      if (pend[k].due <= cyc) begin
        rsp_valid = 1;
        rsp.tag = pend[k].q.tag;
        rsp.cancelled = $urandom_range(0, 19) == 0;
        rsp.data = mem.exists(pend[k].q.addr) ? mem[pend[k].q.addr] : '0;
        pend.delete(k);
      end
    end
  end
  always @(posedge clk) begin
    cyc++;
    wr_ack <= rst_n && wr_valid && wr_ready;
    if (rst_n && wr_valid && wr_ready) mem[wr_req.addr] = wr_req.data;
    if (rst_n && rd_valid && rd_ready) pend.push_back('{q: rd_req, due: cyc + $urandom_range(1, 12)});
    if (rst_n) begin
      n_fwd += ev_fwd; n_next += ev_next; n_retry += ev_retry; n_stat += ev_stat; n_notag += ev_no_tag;
    end
  end

  // ---------------- reference model
  key_t  t_mask [2];
  prio_t t_max [2];
  key_t  r_key [$];
  int    r_tid [$];
  prio_t r_prio [$];
  longint r_pkts [$];
  longint r_bytes [$];
  function automatic int find(int t, key_t k);
    foreach (r_key[i]) if (r_tid[i] == t && r_key[i] == (k & t_mask[t])) return i;
    return -1;
  endfunction
  function automatic int model(key_t k);
    automatic int a = find(0, k);
    automatic int b;
    if (a >= 0 && !(t_max[1] > r_prio[a])) return a;
    b = find(1, k);
    if (b >= 0 && (a < 0 || r_prio[b] > r_prio[a])) return b;
    return a;
  endfunction

  task automatic service(instr_t in);
    @(negedge clk); sv_valid = 1; sv_instr = in;
    do @(posedge clk); while (!sv_ready);
    @(negedge clk); sv_valid = 0;
  endtask

  result_t rq [$];
  always @(negedge clk) res_ready = $urandom_range(0, 3) != 0;
  always @(posedge clk) if (rst_n && res_valid && res_ready) rq.push_back(res);
  task automatic wait_results(int n);
    automatic int g = 0;
    while (rq.size() < n && g < 20000) begin @(posedge clk); g++; end
    check(rq.size() >= n, "results arrived");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic key_t pool [$];
    automatic int exp_miss = 0, got_miss = 0;
    automatic int seen [longint];
    tr_valid = 0; sv_valid = 0; tr_key = '0; tr_len = '0; sv_instr = '0;
    repeat (5) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    t_mask[0] = '1; t_max[0] = 100;
    t_mask[1] = key_t'({8{1'b1}}); t_max[1] = 60;
    for (int t = 0; t < 2; t++) begin
      automatic instr_t in = '0;
      in.op = OP_CFG; in.tid = tid_t'(t); in.key = t_mask[t]; in.prio = t_max[t];
      in.action[TID_W+1] = 1; in.action[TID_W] = (t == 0); in.action[TID_W-1:0] = 1;
      service(in);
    end
    for (int i = 0; i < 24; i++) begin
      automatic key_t k;
      automatic instr_t in = '0;
      for (int w = 0; w < 8; w++) k[w*32 +: 32] = $urandom;
      in.op = OP_INSERT;
      if (i % 3 == 2) begin in.tid = 1; k = k & t_mask[1]; in.prio = $urandom_range(1, 60); end
      else begin in.tid = 0; in.prio = $urandom_range(1, 100); end
      in.key = k; in.action = ACT_W'(i);
      r_key.push_back(k); r_tid.push_back(int'(in.tid)); r_prio.push_back(in.prio);
      r_pkts.push_back(0); r_bytes.push_back(0);
      service(in);
    end
    wait_results(24);
    while (rq.size() > 0) begin
      automatic result_t r = rq.pop_front();
      check(r.op == OP_INSERT, "insert answered");
    end
    // packet keys: table-0 keys, some sharing the low byte of a table-1 rule, others random
    foreach (r_key[i]) begin
      automatic key_t k = r_key[i];
      if (r_tid[i] == 0) begin
        if (i % 2 == 0) k[7:0] = r_key[(i / 3) * 3 + 2][7:0];
        pool.push_back(k);
      end else begin
        k[255:8] = {8{$urandom}};
        pool.push_back(k);
      end
    end
    // the table-0 rules were inserted with their original low byte; re-insert them modified
    // so the pool key matches both tables where intended
    foreach (r_key[i]) if (r_tid[i] == 0) r_key[i] = pool[i];
    foreach (r_key[i]) if (r_tid[i] == 0) begin
      automatic instr_t in = '0;
      in.op = OP_INSERT; in.tid = 0; in.key = r_key[i]; in.prio = r_prio[i]; in.action = ACT_W'(i);
      service(in);
    end
    wait_results(16); rq.delete();
    for (int i = 0; i < 4; i++) pool.push_back({8{$urandom}});
    fork
      for (int p = 0; p < 1500; p++) begin
        automatic key_t k = (p % 3 == 0) ? pool[0] : pool[$urandom_range(0, pool.size() - 1)];
        automatic int len = $urandom_range(64, 1500);
        automatic int w = model(k);
        if (w >= 0) begin r_pkts[w]++; r_bytes[w] += len; end else exp_miss++;
        @(negedge clk); tr_valid = 1; tr_key = k; tr_len = LEN_W'(len);
        do @(posedge clk); while (!tr_ready);
        @(negedge clk); tr_valid = 0;
      end
    join
    wait_results(1500);
    while (rq.size() > 0) begin
      automatic result_t r = rq.pop_front();
      if (!r.found) got_miss++;
      else begin
        automatic longint key = longint'(r.action) * 100000 + longint'(r.pkts);
        check(!seen.exists(key), "each counter value returned once");
        seen[key] = 1;
      end
    end
    check(got_miss == exp_miss, $sformatf("unclassified %0d expected %0d", got_miss, exp_miss));
    foreach (r_key[i]) begin
      automatic instr_t in = '0;
      in.op = OP_READ; in.tid = tid_t'(r_tid[i]); in.key = r_key[i];
      service(in);
      wait_results(1);
      begin
        automatic result_t r = rq.pop_front();
        check(r.found && r.pkts == 64'(r_pkts[i]) && r.bytes == 64'(r_bytes[i]),
              $sformatf("stats of rule %0d: %0d expected %0d", i, r.pkts, r_pkts[i]));
      end
    end
    $display("fwd %0d next %0d retry %0d stat %0d no_tag %0d", n_fwd, n_next, n_retry, n_stat, n_notag);
    check(n_fwd > 0 && n_next > 0 && n_retry > 0 && n_stat > 0 && n_notag > 0, "all mechanisms happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
