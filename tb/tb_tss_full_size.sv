// Full-size run of the classifier with every parameter at its default (16K-line cache,
// 64 tags, 64-entry queues, two DDR4 channels of 80-cycle latency): configure a two-table TSS
// chain, insert rules, classify a stream of packets (repeated keys, keys matching in either
// table, keys matching nothing), then read back every rule's counters. Results are checked
// against a reference model of the chain; the packet rate on cache hits is measured.
module tb_tss_full_size;
  import tss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tr_valid, tr_ready, sv_valid, sv_ready, res_valid, res_ready;
  key_t tr_key;
  logic [LEN_W-1:0] tr_len;
  instr_t sv_instr;
  result_t res;
  logic   m_ar_valid [2], m_ar_ready [2], m_r_valid [2], m_r_ready [2];
  logic   m_aw_valid [2], m_aw_ready [2], m_w_valid [2], m_w_ready [2];
  logic   m_b_valid [2], m_b_ready [2];
  axi_a_t m_ar [2], m_aw [2];
  axi_r_t m_r [2];
  axi_w_t m_w [2];
  axi_b_t m_b [2];
  events_t ev;

  tss_classifier_top dut (.*);
  ddr4_axi_model #(.NUM_CH(2), .LAT(80), .STALL_PCT(10)) ddr (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

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
  always @(posedge clk) if (rst_n && res_valid && res_ready) rq.push_back(res);
  task automatic wait_results(int n);
    automatic int g = 0;
    while (rq.size() < n && g < 100000) begin @(posedge clk); g++; end
    check(rq.size() >= n, "results arrived");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic key_t pool [$];
    automatic int exp_hit [int];
    automatic int exp_miss = 0, got_miss = 0;
    automatic longint t0, t1;
    tr_valid = 0; sv_valid = 0; tr_key = '0; tr_len = '0; sv_instr = '0; res_ready = 1;
    repeat (5) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    t_mask[0] = '1; t_max[0] = 1000;
    t_mask[1] = key_t'({32{1'b1}}); t_max[1] = 500;
    for (int t = 0; t < 2; t++) begin
      automatic instr_t in = '0;
      in.op = OP_CFG; in.tid = tid_t'(t); in.key = t_mask[t]; in.prio = t_max[t];
      in.action[TID_W+1] = 1; in.action[TID_W] = (t == 0); in.action[TID_W-1:0] = 1;
      service(in);
    end
    for (int i = 0; i < 64; i++) begin
      automatic key_t k;
      automatic instr_t in = '0;
      for (int w = 0; w < 8; w++) k[w*32 +: 32] = $urandom;
      in.op = OP_INSERT;
      if (i % 4 == 3) begin in.tid = 1; k = k & t_mask[1]; in.prio = $urandom_range(1, 500); end
      else begin in.tid = 0; in.prio = $urandom_range(1, 1000); end
      in.key = k; in.action = ACT_W'(i);
      r_key.push_back(k); r_tid.push_back(int'(in.tid)); r_prio.push_back(in.prio);
      r_pkts.push_back(0); r_bytes.push_back(0);
      service(in);
      if (in.tid == 0) pool.push_back(k);
    end
    wait_results(64);
    while (rq.size() > 0) begin
      automatic result_t r = rq.pop_front();
      check(r.op == OP_INSERT && !r.replaced, "insert");
    end
    for (int i = 3; i < 64; i += 4) begin            // keys that match only in table 1
      automatic key_t k = r_key[i];
      k[255:32] = {7{$urandom}};
      pool.push_back(k);
    end
    for (int i = 0; i < 8; i++) pool.push_back({8{$urandom}});   // no match
    // two passes: the first misses in the cache, the second hits
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); t0 = $time / 10;
      foreach (pool[p]) begin
        automatic int w = model(pool[p]);
        if (w >= 0) begin
          r_pkts[w]++; r_bytes[w] += 100;
          exp_hit[w] = exp_hit.exists(w) ? exp_hit[w] + 1 : 1;
        end else exp_miss++;
        tr_valid = 1; tr_key = pool[p]; tr_len = 100;
        do @(posedge clk); while (!tr_ready);
        @(negedge clk); tr_valid = 0;
      end
      wait_results(pool.size());
      t1 = $time / 10;
      $display("pass %0d: %0d packets in %0d cycles", pass, pool.size(), t1 - t0);
      while (rq.size() > 0) begin
        automatic result_t r = rq.pop_front();
        if (!r.found) got_miss++;
        else begin
          automatic int id = int'(r.action);
          exp_hit[id]--;
        end
      end
    end
    check(got_miss == exp_miss, "unclassified packets");
    foreach (exp_hit[w]) check(exp_hit[w] == 0, $sformatf("rule %0d hit count", w));
    foreach (r_key[i]) begin
      automatic instr_t in = '0;
      in.op = OP_READ; in.tid = tid_t'(r_tid[i]); in.key = r_key[i];
      service(in);
      wait_results(1);
      begin
        automatic result_t r = rq.pop_front();
        check(r.found && r.pkts == 64'(r_pkts[i]) && r.bytes == 64'(r_bytes[i]), $sformatf("stats of rule %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
