// End-to-end test of the classifier with a three-table TSS chain, a small cache (so that
// lines are evicted and re-read) and two DDR4 channels modelled behind AXI4.
//
// A reference model in the testbench holds the rules and walks the same chain rule the
// hardware implements: tables in decreasing max-priority order, stop when the next table's max
// priority cannot beat the best match so far; the best match wins and its counters count.
// Phases: configure the tables; insert rules; stream lookups (with heavy key repetition, and
// with new rules inserted in between) and check every result against the model, and that the
// packet counter values returned for one rule are all different (no lost update); read every
// rule's statistics back and compare them; delete and read-and-clear some rules; measure the
// lookup rate on cache hits (one packet per cycle); count how often each mechanism of the
// memory subsystem and the pipeline happened and fail for any that never did.
module tb_tss_classifier_top;
  import tss_pkg::*;
  localparam int NUM_CH = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tr_valid, tr_ready, sv_valid, sv_ready, res_valid, res_ready;
  key_t tr_key;
  logic [LEN_W-1:0] tr_len;
  instr_t sv_instr;
  result_t res;
  logic   m_ar_valid [NUM_CH], m_ar_ready [NUM_CH], m_r_valid [NUM_CH], m_r_ready [NUM_CH];
  logic   m_aw_valid [NUM_CH], m_aw_ready [NUM_CH], m_w_valid [NUM_CH], m_w_ready [NUM_CH];
  logic   m_b_valid [NUM_CH], m_b_ready [NUM_CH];
  axi_a_t m_ar [NUM_CH], m_aw [NUM_CH];
  axi_r_t m_r [NUM_CH];
  axi_w_t m_w [NUM_CH];
  axi_b_t m_b [NUM_CH];
  events_t ev;

  tss_classifier_top #(.CACHE_LINES(64), .NUM_CH(NUM_CH)) dut (.*);
  ddr4_axi_model #(.NUM_CH(NUM_CH), .LAT(80), .STALL_PCT(30)) ddr (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- reference model
  localparam int NT = 3;
  key_t  t_mask [NT];
  prio_t t_max  [NT];
  typedef struct { int tid; key_t key; prio_t prio; bit live; longint pkts; longint bytes; } mrule_t;
  mrule_t rules [$];

  function automatic int model_find(int tid, key_t key);
    for (int i = 0; i < rules.size(); i++)
      if (rules[i].live && rules[i].tid == tid && rules[i].key == (key & t_mask[tid])) return i;
    return -1;
  endfunction

  function automatic int model_lookup(key_t key);
    automatic int best = -1;
    for (int t = 0; t < NT; t++) begin
      automatic int i = model_find(t, key);
      if (i >= 0 && (best < 0 || rules[i].prio > rules[best].prio)) best = i;
      if (t == NT - 1) break;
      if (best >= 0 && !(t_max[t+1] > rules[best].prio)) break;
    end
    return best;
  endfunction

  // ---------------------------------------------------------------- drivers
  task automatic service(instr_t in);
    @(negedge clk);
    sv_valid = 1; sv_instr = in;
    do @(posedge clk); while (!sv_ready);
    @(negedge clk);
    sv_valid = 0;
  endtask

  task automatic packet(key_t k, int len);
    @(negedge clk);
    tr_valid = 1; tr_key = k; tr_len = LEN_W'(len);
    do @(posedge clk); while (!tr_ready);
    @(negedge clk);
    tr_valid = 0;
  endtask

  // results
  result_t rq [$];
  int n_results = 0;
  bit rnd_ready = 0;
  always @(negedge clk) res_ready = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin rq.push_back(res); n_results++; end

  task automatic wait_results(int n);
    automatic int guard = 0;
    while (rq.size() < n && guard < 50000) begin @(posedge clk); guard++; end
    check(rq.size() >= n, $sformatf("waiting for %0d results, got %0d", n, rq.size()));
  endtask

  // event counters
  int c_hit, c_miss, c_evict, c_fill, c_merge, c_cancel, c_bypass, c_sqm, c_fwd, c_next, c_retry, c_stat, c_notag;
  always @(posedge clk) if (rst_n) begin
    c_hit += ev.cache_hit; c_miss += ev.cache_miss; c_evict += ev.evict; c_fill += ev.fill;
    c_merge += ev.lq_merge; c_cancel += ev.lq_cancel; c_bypass += ev.lq_bypass; c_sqm += ev.sq_merge;
    c_fwd += ev.fwd; c_next += ev.next_table; c_retry += ev.retry; c_stat += ev.stat; c_notag += ev.no_tag;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic key_t rkey();
    key_t k;
    for (int w = 0; w < KEY_W / 32; w++) k[w*32 +: 32] = $urandom;
    return k;
  endfunction

  key_t pool [$];
  int   hits_per_rule [int];

  initial begin
    key_t l64 [$];
    key_t l16 [$];
    tr_valid = 0; sv_valid = 0; tr_key = '0; tr_len = '0; sv_instr = '0;
    c_hit = 0; c_miss = 0; c_evict = 0; c_fill = 0; c_merge = 0; c_cancel = 0; c_bypass = 0;
    c_sqm = 0; c_fwd = 0; c_next = 0; c_retry = 0; c_stat = 0; c_notag = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---------------- tables: T0 exact, T1 low 64 bits, T2 low 16 bits
    t_mask[0] = '1;               t_max[0] = 300;
    t_mask[1] = key_t'({64{1'b1}}); t_max[1] = 200;
    t_mask[2] = key_t'({16{1'b1}}); t_max[2] = 100;
    for (int t = 0; t < NT; t++) begin
      automatic instr_t in = '0;
      in.op = OP_CFG; in.tid = tid_t'(t); in.key = t_mask[t]; in.prio = t_max[t];
      in.action[TID_W+1] = 1'b1;
      in.action[TID_W]   = (t < NT - 1);
      in.action[TID_W-1:0] = tid_t'(t + 1);
      service(in);
    end

    // ---------------- rules
    for (int j = 0; j < 20; j++) l16.push_back(key_t'($urandom_range(0, 65535)));
    for (int j = 0; j < 40; j++) l64.push_back(key_t'({$urandom, $urandom}));
    for (int j = 0; j < 10; j++) rules.push_back('{tid: 2, key: l16[j], prio: $urandom_range(1, 100), live: 1, pkts: 0, bytes: 0});
    for (int j = 0; j < 30; j++) begin
      automatic key_t k = l64[j];
      if (j % 3 == 0) k[15:0] = l16[$urandom_range(0, 19)][15:0];
      l64[j] = k;
      rules.push_back('{tid: 1, key: k, prio: $urandom_range(1, 200), live: 1, pkts: 0, bytes: 0});
    end
    for (int j = 0; j < 120; j++) begin
      automatic key_t k = rkey();
      automatic int c = $urandom_range(0, 9);
      if (c < 4) k[63:0] = l64[$urandom_range(0, 39)][63:0];
      else if (c < 6) k[15:0] = l16[$urandom_range(0, 19)][15:0];
      rules.push_back('{tid: 0, key: k, prio: $urandom_range(1, 300), live: 1, pkts: 0, bytes: 0});
      pool.push_back(k);
    end
    for (int j = 0; j < 80; j++) begin
      automatic key_t k = rkey();
      automatic int c = $urandom_range(0, 9);
      if (c < 4) k[63:0] = l64[$urandom_range(0, 39)][63:0];
      else if (c < 7) k[15:0] = l16[$urandom_range(0, 19)][15:0];
      pool.push_back(k);
    end
    rq.delete();
    for (int i = 0; i < rules.size(); i++) begin
      automatic instr_t in = '0;
      in.op = OP_INSERT; in.tid = tid_t'(rules[i].tid); in.key = rules[i].key;
      in.prio = rules[i].prio; in.action = ACT_W'(i);
      service(in);
    end
    wait_results(rules.size());
    while (rq.size() > 0) begin
      automatic result_t r = rq.pop_front();
      check(r.op == OP_INSERT && !r.replaced, "insert into a free bucket");
    end

    // ---------------- lookups with repetition, inserts interleaved
    begin
      automatic int n = 0, ninsert = 0;
      int exp_cnt [int];
      automatic int exp_miss = 0, got_miss = 0;
      bit seen [longint];
      automatic int first_new = rules.size();
      rnd_ready = 1;
      ddr.w_stall_pct = 95;           // slow writes: the store queue backs up
      fork
        begin
          for (int p = 0; p < 3000; p++) begin
            key_t k;
            int w, len;
            if (p % 7 < 3) k = pool[$urandom_range(0, 7)];           // hot keys: hazards
            else k = pool[$urandom_range(0, pool.size() - 1)];
            len = $urandom_range(64, 1500);
            w = model_lookup(k);
            if (w >= 0) begin
              rules[w].pkts++; rules[w].bytes += len;
              exp_cnt[w] = exp_cnt.exists(w) ? exp_cnt[w] + 1 : 1;
            end else exp_miss++;
            packet(k, len);
            n++;
          end
        end
        begin
          for (int j = 0; j < 30; j++) begin
            automatic instr_t in = '0;
            repeat ($urandom_range(20, 120)) @(posedge clk);
            in.op = OP_INSERT; in.tid = 0; in.key = rkey(); in.prio = 5;
            in.action = ACT_W'(rules.size());
            rules.push_back('{tid: 0, key: in.key, prio: 5, live: 1, pkts: 0, bytes: 0});
            service(in);
            ninsert++;
          end
        end
      join
      wait_results(n + ninsert);
      rnd_ready = 0;
      ddr.w_stall_pct = 30;
      while (rq.size() > 0) begin
        automatic result_t r = rq.pop_front();
        if (r.op == OP_INSERT) begin
          check(!r.replaced, "interleaved insert");
          continue;
        end
        check(r.op == OP_LOOKUP, "lookup result op");
        if (!r.found) got_miss++;
        else begin
          automatic int id = int'(r.action);
          hits_per_rule[id] = hits_per_rule.exists(id) ? hits_per_rule[id] + 1 : 1;
          check(id < first_new && r.tid == tid_t'(rules[id].tid) && r.prio == rules[id].prio,
                $sformatf("hit on rule %0d", id));
          check(!seen.exists(longint'(id) * 1000000 + longint'(r.pkts)),
                $sformatf("rule %0d counter value %0d returned twice", id, r.pkts));
          seen[longint'(id) * 1000000 + longint'(r.pkts)] = 1;
        end
      end
      check(got_miss == exp_miss, $sformatf("unclassified %0d expected %0d", got_miss, exp_miss));
      foreach (exp_cnt[w])
        check(hits_per_rule.exists(w) && hits_per_rule[w] == exp_cnt[w],
              $sformatf("rule %0d won %0d times, expected %0d", w, hits_per_rule.exists(w) ? hits_per_rule[w] : 0, exp_cnt[w]));
      foreach (hits_per_rule[w]) check(exp_cnt.exists(w), $sformatf("rule %0d should never win", w));
    end

    // ---------------- statistics read-back of every rule
    for (int i = 0; i < rules.size(); i++) begin
      automatic instr_t in = '0;
      in.op = OP_READ; in.tid = tid_t'(rules[i].tid); in.key = rules[i].key;
      service(in);
      wait_results(1);
      begin
        automatic result_t r = rq.pop_front();
        check(r.found && r.pkts == 64'(rules[i].pkts) && r.bytes == 64'(rules[i].bytes),
              $sformatf("stats of rule %0d: %0d/%0d expected %0d/%0d", i, r.pkts, r.bytes, rules[i].pkts, rules[i].bytes));
      end
    end

    // ---------------- read-and-clear, then delete
    for (int i = 0; i < 10; i++) begin
      automatic instr_t in = '0;
      in.op = OP_READ_CLEAR; in.tid = tid_t'(rules[i].tid); in.key = rules[i].key;
      service(in);
      in.op = OP_READ;
      service(in);
      wait_results(2);
      begin
        automatic result_t r1 = rq.pop_front();
        automatic result_t r2 = rq.pop_front();
        check(r1.found && r1.pkts == 64'(rules[i].pkts), "read-and-clear returns the old counters");
        check(r2.found && r2.pkts == 0 && r2.bytes == 0, "counters cleared");
        rules[i].pkts = 0; rules[i].bytes = 0;
      end
    end
    for (int i = 0; i < 40; i += 4) begin
      automatic instr_t in = '0;
      in.op = OP_DELETE; in.tid = tid_t'(rules[i].tid); in.key = rules[i].key;
      service(in);
      wait_results(1);
      begin
        automatic result_t r = rq.pop_front();
        check(r.found, "delete finds the rule");
      end
      rules[i].live = 0;
    end
    begin
      automatic int exp_m = 0, got_m = 0, n = 0;
      foreach (pool[p]) begin
        automatic int w = model_lookup(pool[p]);
        if (w < 0) exp_m++;
        else begin rules[w].pkts++; rules[w].bytes += 100; end
        packet(pool[p], 100);
        n++;
      end
      wait_results(n);
      while (rq.size() > 0) begin
        automatic result_t r = rq.pop_front();
        if (!r.found) got_m++;
        else begin
          automatic int id = int'(r.action);
          automatic bit lv = rules[id].live;
          check(lv, "deleted rule never matches");
        end
      end
      check(got_m == exp_m, $sformatf("after delete: unclassified %0d expected %0d", got_m, exp_m));
    end

    // ---------------- rate on cache hits: 4 hot keys, 400 back-to-back packets
    begin
      key_t hot [$];
      longint t0, t1;
      automatic int n = 0;
      for (int i = 0; i < rules.size() && hot.size() < 4; i++)
        if (rules[i].live && rules[i].tid == 0 && model_lookup(rules[i].key) == i && rules[i].prio > 200)
          hot.push_back(rules[i].key);
      check(hot.size() > 0, "found keys that finish in the first table");
      foreach (hot[h]) packet(hot[h], 64);
      wait_results(hot.size()); rq.delete();
      repeat (20) @(posedge clk);
      @(negedge clk);
      t0 = $time / 10;
      for (int p = 0; p < 400; p++) begin
        tr_valid = 1; tr_key = hot[p % hot.size()]; tr_len = 64;
        @(posedge clk);
        while (!tr_ready) @(posedge clk);
        @(negedge clk);
      end
      tr_valid = 0;
      wait_results(400);
      t1 = $time / 10;
      $display("400 cache-hit lookups in %0d cycles", t1 - t0);
      check(t1 - t0 <= 400 + 40, $sformatf("one lookup per cycle on hits: %0d cycles", t1 - t0));
      rq.delete();
    end

    // ---------------- mechanisms
    $display("events: hit %0d miss %0d evict %0d fill %0d lq_merge %0d cancel %0d bypass %0d sq_merge %0d fwd %0d next %0d retry %0d stat %0d no_tag %0d",
             c_hit, c_miss, c_evict, c_fill, c_merge, c_cancel, c_bypass, c_sqm, c_fwd, c_next, c_retry, c_stat, c_notag);
    $display("ddr reads: ch0 %0d ch1 %0d, writes %0d", ddr.ch_reads[0], ddr.ch_reads[1], ddr.writes);
    check(c_hit > 0, "cache hit happened");
    check(c_miss > 0, "cache miss happened");
    check(c_evict > 0, "dirty eviction happened");
    check(c_fill > 0, "cache fill happened");
    check(c_merge > 0, "load merge happened");
    check(c_cancel > 0, "read cancellation happened");
    check(c_bypass > 0, "store-queue bypass happened");
    check(c_sqm > 0, "store merge happened");
    check(c_fwd > 0, "write forwarding happened");
    check(c_next > 0, "next-table recirculation happened");
    check(c_retry > 0, "cancelled read re-executed");
    check(c_stat > 0, "statistics re-read happened");
    check(c_notag > 0, "tag exhaustion stall happened");
    check(ddr.ch_reads[0] > 0 && ddr.ch_reads[1] > 0, "both DDR channels used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
