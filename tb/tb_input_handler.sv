// Self-checking test of the input handler. The testbench plays the allocated storage (grants
// a tag only part of the time) and the cache read channel (random ready). Tables 0 and 3 get
// different masks through OP_CFG. Packets, service reads and recirculated sessions are offered
// at random; the order in which they are accepted is recorded, and every read request must
// come out in that order with the bucket address recomputed here with a byte-wise CRC-32 of
// the table id and masked key, and with the granted tag (or the recirculated session's own
// tag). Recirculation must win over new input whenever both are offered, and the stored
// sessions must carry the bucket address.
module tb_input_handler;
  import tss_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tr_valid, tr_ready, sv_valid, sv_ready, rc_valid, rc_ready;
  logic alloc_req, alloc_gnt, upd_valid, rd_valid, rd_ready;
  key_t tr_key;
  logic [LEN_W-1:0] tr_len;
  instr_t sv_instr;
  tag_t rc_tag, alloc_tag, upd_tag;
  session_t rc_sess, alloc_sess, upd_sess;
  rd_req_t rd_req;
  tid_t cfg_a_tid, cfg_b_tid;
  tbl_cfg_t cfg_a, cfg_b;

  input_handler dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [31:0] tbl [256];
  function automatic addr_t ref_bucket(tid_t t, key_t masked);
    logic [263:0] m = {t, masked};
    logic [31:0] r = 32'hFFFFFFFF;
    for (int b = 0; b < 33; b++) r = tbl[(r ^ 32'(m[8*b +: 8])) & 32'hFF] ^ (r >> 8);
    return addr_t'(~r);
  endfunction

  key_t mask [4];
  addr_t exp_addr [$];
  bit    exp_rc [$];
  tag_t  exp_rctag [$];
  tag_t  granted [$];
  int n_rd = 0, n_rc = 0, n_tr = 0, n_sv = 0;
  tag_t next_tag = 0;

  always @(negedge clk) begin
    rd_ready = $urandom_range(0, 2) != 0;
    alloc_gnt = 0;
    #1 alloc_gnt = alloc_req && ($urandom_range(0, 3) != 0);
  end
  assign alloc_tag = next_tag;

  always @(posedge clk) if (rst_n) begin
    if (rc_valid) check(rc_ready || !(tr_ready || (sv_ready && sv_instr.op != OP_CFG)), "recirculation first");
    if (tr_valid && tr_ready) begin
      exp_addr.push_back(ref_bucket(0, tr_key & mask[0])); exp_rc.push_back(0); exp_rctag.push_back(0); n_tr++;
    end
    if (sv_valid && sv_ready && sv_instr.op != OP_CFG) begin
      exp_addr.push_back(ref_bucket(sv_instr.tid, sv_instr.key & mask[sv_instr.tid[1:0]]));
      exp_rc.push_back(0); exp_rctag.push_back(0); n_sv++;
    end
    if (rc_valid && rc_ready) begin
      exp_addr.push_back(ref_bucket(rc_sess.tid, rc_sess.key & mask[rc_sess.tid[1:0]]));
      exp_rc.push_back(1); exp_rctag.push_back(rc_tag); n_rc++;
    end
    if (alloc_req && alloc_gnt) begin
      granted.push_back(alloc_tag);
      check(alloc_sess.addr == ref_bucket(alloc_sess.tid, alloc_sess.key & mask[alloc_sess.tid[1:0]]), "stored session address");
      next_tag <= next_tag + 1;
    end
    if (upd_valid) check(upd_sess.addr == ref_bucket(upd_sess.tid, upd_sess.key & mask[upd_sess.tid[1:0]]), "updated session address");
    if (rd_valid && rd_ready) begin
      automatic addr_t a = exp_addr.pop_front();
      automatic bit rc = exp_rc.pop_front();
      automatic tag_t rt = exp_rctag.pop_front();
      n_rd++;
      check(rd_req.addr == a, "bucket address");
      if (rc) check(rd_req.tag == rt, "recirculated tag");
      else check(granted.size() > 0 && rd_req.tag == granted.pop_front(), "granted tag");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic key_t rkey();
    key_t k;
    for (int w = 0; w < 8; w++) k[w*32 +: 32] = $urandom;
    return k;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [31:0] v;
      v = 32'(i);
      for (int k = 0; k < 8; k++) v = v[0] ? (v >> 1) ^ 32'hEDB88320 : v >> 1;
      tbl[i] = v;
    end
    tr_valid = 0; sv_valid = 0; rc_valid = 0; tr_key = '0; tr_len = '0; sv_instr = '0;
    rc_tag = '0; rc_sess = '0; cfg_a_tid = 0; cfg_b_tid = 3;
    mask[0] = key_t'({64{1'b1}}); mask[1] = '0; mask[2] = '0; mask[3] = ~key_t'({200{1'b1}});
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int t = 0; t < 4; t += 3) begin
      @(negedge clk);
      sv_valid = 1; sv_instr = '0; sv_instr.op = OP_CFG; sv_instr.tid = tid_t'(t); sv_instr.key = mask[t];
      sv_instr.prio = 32'(t + 10); sv_instr.action = 32'h200 | 32'(t + 1);
      do @(posedge clk); while (!sv_ready);
    end
    @(negedge clk); sv_valid = 0;
    #1;
    check(cfg_a.valid && cfg_a.mask == mask[0] && cfg_a.max_prio == 10 && cfg_a.next == 1, "table 0 configured");
    check(cfg_b.valid && cfg_b.mask == mask[3] && cfg_b.max_prio == 13 && cfg_b.next == 4, "table 3 configured");
    fork
      for (int i = 0; i < 300; i++) begin
        @(negedge clk); tr_valid = 1; tr_key = rkey(); tr_len = 64;
        do @(posedge clk); while (!tr_ready);
        @(negedge clk); tr_valid = 0;
      end
      for (int i = 0; i < 150; i++) begin
        @(negedge clk); sv_valid = 1; sv_instr = '0; sv_instr.op = OP_READ; sv_instr.tid = 3; sv_instr.key = rkey();
        do @(posedge clk); while (!sv_ready);
        @(negedge clk); sv_valid = 0;
      end
      for (int i = 0; i < 150; i++) begin
        @(negedge clk); rc_valid = 1; rc_tag = tag_t'($urandom); rc_sess = '0; rc_sess.tid = ($urandom_range(0, 1)) ? 3 : 0;
        rc_sess.key = rkey(); rc_sess.op = OP_LOOKUP;
        do @(posedge clk); while (!rc_ready);
        @(negedge clk); rc_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    join
    repeat (20) @(posedge clk);
    check(n_rd == 600 && exp_addr.size() == 0, $sformatf("all %0d requests issued", n_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
