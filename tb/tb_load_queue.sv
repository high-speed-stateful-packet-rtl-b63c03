// Self-checking test of the load queue. Misses for a few addresses are enqueued with random
// tags while cancellations, store-queue hits and out-of-order AXI read data arrive at random.
// Expected behaviour worked out in the testbench: every tag is answered exactly once; an
// answer is flagged cancelled exactly when a cancellation of its address came between its
// enqueue and its answer; an uncancelled answer carries the store-queue line if the store
// queue held the address at enqueue time, else the memory line. Merges, bypasses and
// cancellations must all have happened, and fewer AXI reads than misses must have been made.
module tb_load_queue;
  import tss_pkg::*;
  localparam int DEPTH = 8;
  localparam int TAGS  = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  enq_valid, enq_ready, cancel_valid, sq_hit, ar_valid, ar_ready, r_valid;
  logic  rsp_valid, rsp_ready, rsp_cancelled, rsp_fill, ev_merge, ev_cancel, ev_bypass;
  addr_t enq_addr, cancel_addr, sq_addr, ar_addr, rsp_addr;
  tag_t  enq_tag, rsp_tag;
  line_t sq_data, r_data, rsp_data;
  logic [AXI_ID_W-1:0] ar_id, r_id;

  load_queue #(.DEPTH(DEPTH), .TAGS(TAGS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic line_t memline(addr_t a); return {16{32'(a) + 32'h1000}}; endfunction
  function automatic line_t sqline(addr_t a);  return {16{32'(a) + 32'h2000}}; endfunction

  bit    busy [TAGS];
  addr_t t_addr [TAGS];
  bit    t_cancel [TAGS];
  bit    t_sq [TAGS];
  int    ar_lat [int];
  addr_t ar_a [int];
  int n_enq = 0, n_ar = 0, n_rsp = 0, n_merge = 0, n_cancel = 0, n_bypass = 0;
  bit sq_has [8];

  always @(negedge clk) begin
    ar_ready = $urandom_range(0, 1);
    rsp_ready = $urandom_range(0, 3) != 0;
    cancel_valid = $urandom_range(0, 9) == 0;
    cancel_addr = addr_t'($urandom_range(0, 5));
    r_valid = 0;
    foreach (ar_lat[id]) if (ar_lat[id] <= 0 && !r_valid && $urandom_range(0, 1)) begin
      r_valid = 1; r_id = AXI_ID_W'(id); r_data = memline(ar_a[id]);
    end
    // the store queue holds addresses 4 and 5 only
    sq_hit  = sq_addr == 4 || sq_addr == 5;
    sq_data = sqline(sq_addr);
  end

  always @(posedge clk) if (rst_n) begin
    if (rsp_valid && rsp_ready) begin
      automatic int t = int'(rsp_tag);
      n_rsp++;
      check(busy[t], "answer for a waiting tag");
      check(rsp_addr == t_addr[t], "answer address");
      check(rsp_cancelled == t_cancel[t], $sformatf("cancelled flag of tag %0d", t));
      if (!rsp_cancelled)
        check(rsp_data == (t_sq[t] ? sqline(t_addr[t]) : memline(t_addr[t])), "answer data");
      busy[t] = 0;
    end
    if (cancel_valid) foreach (busy[t]) if (busy[t] && t_addr[t] == cancel_addr) t_cancel[t] = 1;
    if (enq_valid && enq_ready) begin
      automatic int t = int'(enq_tag);
      busy[t] = 1; t_addr[t] = enq_addr; t_sq[t] = sq_hit;
      t_cancel[t] = cancel_valid && cancel_addr == enq_addr;
      n_enq++;
    end
    if (ar_valid && ar_ready) begin
      check(!ar_lat.exists(int'(ar_id)), "AXI ID not in use");
      ar_lat[int'(ar_id)] = $urandom_range(2, 30); ar_a[int'(ar_id)] = ar_addr; n_ar++;
    end
    if (r_valid) begin ar_lat.delete(int'(r_id)); ar_a.delete(int'(r_id)); end
    foreach (ar_lat[id]) ar_lat[id]--;
    n_merge += ev_merge; n_cancel += ev_cancel; n_bypass += ev_bypass;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    enq_valid = 0; enq_addr = '0; enq_tag = '0; r_id = '0; r_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      enq_valid = 0;
      if ($urandom_range(0, 1)) begin
        automatic int t = $urandom_range(0, TAGS - 1);
        if (!busy[t]) begin enq_valid = 1; enq_tag = tag_t'(t); enq_addr = addr_t'($urandom_range(0, 5)); end
      end
      @(posedge clk);
    end
    @(negedge clk); enq_valid = 0;
    repeat (500) @(posedge clk);
    foreach (busy[t]) check(!busy[t], $sformatf("tag %0d answered", t));
    check(n_rsp == n_enq, "one answer per miss");
    check(n_merge > 0 && n_bypass > 0 && n_cancel > 0, "merge, bypass and cancellation happened");
    check(n_ar < n_enq, "merging saved memory reads");
    $display("misses %0d, AXI reads %0d, merges %0d, bypasses %0d, cancels %0d", n_enq, n_ar, n_merge, n_bypass, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
