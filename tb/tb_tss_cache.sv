// Self-checking test of the cache, 8 lines in 2 sets of 4 ways, with behavioural load and
// store queues around it. The testbench keeps the true content of every line (the last value
// written) and a backing memory fed by the evictions. Random reads and whole-line writes to
// 12 addresses are issued together. Checks: every read is answered once; a hit comes exactly
// RD_LAT cycles after the request was accepted and carries the true line; a miss goes to the
// load queue, whose answer (data from the backing memory, cancelled if the address was
// written meanwhile) is passed through, and an uncancelled answer carries the line as it was
// in the request's lookup cycle;
// every write is acknowledged; an evicted line carries its true content. Hits, misses,
// evictions, fills and cancellations must all have happened.
module tb_tss_cache;
  import tss_pkg::*;
  localparam int RD_LAT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, wr_ack;
  rd_req_t rd_req;
  rd_rsp_t rsp;
  wr_req_t wr_req;
  logic    lq_enq_valid, lq_enq_ready, lq_cancel_valid, lq_rsp_valid, lq_rsp_ready;
  logic    lq_rsp_cancelled, lq_rsp_fill, ev_valid, ev_ready;
  addr_t   lq_enq_addr, lq_cancel_addr, lq_rsp_addr, ev_addr;
  tag_t    lq_enq_tag, lq_rsp_tag;
  line_t   lq_rsp_data, ev_data;
  logic    st_hit, st_miss, st_evict, st_fill;

  tss_cache #(.LINES(8), .WAYS(4), .RD_LAT(RD_LAT)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  line_t truth [int];
  line_t backing [int];
  function automatic line_t tv(int a); return truth.exists(a) ? truth[a] : '0; endfunction
  function automatic line_t bv(int a); return backing.exists(a) ? backing[a] : '0; endfunction

  // outstanding reads by tag
  bit     busy [64];
  longint acc_cyc [64];
  addr_t  t_addr [64];
  bit     t_miss [64];
  bit     t_stall [64];
  line_t  snap [64];
  // behavioural load queue
  typedef struct { tag_t tag; addr_t a; int due; bit cancelled; } lq_t;
  lq_t lq [$];
  longint cyc = 0;
  bit racc = 0, wacc = 0;
  int n_hit = 0, n_miss = 0, n_ev = 0, n_fill = 0, n_canc = 0, n_wr = 0, n_ack = 0;

  always @(negedge clk) begin
    ev_ready = $urandom_range(0, 3) != 0;
    lq_enq_ready = $urandom_range(0, 3) != 0;
    lq_rsp_valid = 0;
    if (lq.size() > 0 && lq[0].due <= cyc) begin
      lq_rsp_valid = 1;
      lq_rsp_tag = lq[0].tag; lq_rsp_addr = lq[0].a;
      lq_rsp_cancelled = lq[0].cancelled;
      lq_rsp_data = bv(int'(lq[0].a));
      lq_rsp_fill = 1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rsp_valid) begin
      automatic int t = int'(rsp.tag);
      check(busy[t], "answer for an outstanding read");
      if (!t_miss[t]) begin
        n_hit++;
        if (t_stall[t]) check(cyc - acc_cyc[t] > RD_LAT, "stalled hit latency");
        else check(cyc - acc_cyc[t] == RD_LAT, $sformatf("hit latency %0d", cyc - acc_cyc[t]));
      end
      if (!rsp.cancelled) check(rsp.data == snap[t], $sformatf("read data of %0d", t_addr[t]));
      else n_canc++;
      busy[t] = 0;
    end
    if (lq_rsp_valid && lq_rsp_ready) void'(lq.pop_front());
    if (lq_cancel_valid) foreach (lq[i]) if (lq[i].a == lq_cancel_addr) lq[i].cancelled = 1;
    if (lq_enq_valid && !lq_enq_ready) t_stall[int'(lq_enq_tag)] = 1;
    if (lq_enq_valid && lq_enq_ready) begin
      n_miss++;
      t_miss[int'(lq_enq_tag)] = 1;
      check(lq_enq_addr == t_addr[int'(lq_enq_tag)], "miss address");
      lq.push_back('{tag: lq_enq_tag, a: lq_enq_addr, due: cyc + $urandom_range(3, 20),
                     cancelled: lq_cancel_valid && lq_cancel_addr == lq_enq_addr});
    end
    if (ev_valid && ev_ready) begin
      n_ev++;
      check(ev_data == tv(int'(ev_addr)), "evicted line holds its newest data");
      backing[int'(ev_addr)] = ev_data;
    end
    if (wr_valid && wr_ready) begin
      n_wr++;
      truth[int'(wr_req.addr)] = wr_req.data;
      check(lq_cancel_valid && lq_cancel_addr == wr_req.addr, "write broadcast as cancellation");
    end
    if (wr_ack) n_ack++;
    // a read returns the line as it was in its lookup cycle, that cycle's write included
    if (dut.r1_valid) snap[int'(dut.r1.tag)] = tv(int'(dut.r1.addr));
    if (rd_valid && rd_ready) begin
      automatic int t = int'(rd_req.tag);
      busy[t] = 1; acc_cyc[t] = cyc; t_addr[t] = rd_req.addr; t_miss[t] = 0; t_stall[t] = 0;
    end
    n_fill += st_fill;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_valid = 0; wr_valid = 0; rd_req = '0; wr_req = '0;
    foreach (busy[t]) begin busy[t] = 0; t_miss[t] = 0; t_stall[t] = 0; end
    lq_rsp_tag = '0; lq_rsp_addr = '0; lq_rsp_data = '0; lq_rsp_cancelled = 0; lq_rsp_fill = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!rd_valid || racc) begin
        automatic int t = $urandom_range(0, 63);
        rd_valid = 0;
        if ($urandom_range(0, 1) && !busy[t]) begin
          rd_valid = 1; rd_req = '{tag: tag_t'(t), addr: addr_t'($urandom_range(0, 11))};
        end
      end
      if (!wr_valid || wacc) begin
        wr_valid = $urandom_range(0, 2) == 0;
        wr_req = '{tag: '0, addr: addr_t'($urandom_range(0, 11)), data: {16{$urandom}}};
      end
      @(posedge clk);
      racc = rd_valid && rd_ready;    // handshakes of this edge
      wacc = wr_valid && wr_ready;
    end
    @(negedge clk); rd_valid = 0; wr_valid = 0;
    repeat (200) @(posedge clk);
    foreach (busy[t]) check(!busy[t], $sformatf("read %0d answered", t));
    check(n_ack == n_wr, "every write acknowledged");
    check(n_hit > 0 && n_miss > 0 && n_ev > 0 && n_fill > 0 && n_canc > 0,
          $sformatf("hit %0d miss %0d evict %0d fill %0d cancelled %0d", n_hit, n_miss, n_ev, n_fill, n_canc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
