// Self-checking test of the store queue. Evictions to a handful of addresses are pushed at
// random (so merges and same-address hazards are frequent) while a memory model accepts the
// AXI writes slowly and answers them out of order. Checks, every cycle: a lookup hit returns
// the newest data pushed for that address; a lookup miss means memory already holds it; never
// two writes to one address in flight. At the end memory holds the newest data of every
// address and the queue is empty; merges and bypass hits must have happened.
module tb_store_queue;
  import tss_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  push_valid, push_ready, lk_hit, w_valid, w_ready, b_valid, ev_merge;
  addr_t push_addr, lk_addr, w_addr;
  line_t push_data, lk_data, w_data;
  logic [AXI_ID_W-1:0] w_id, b_id;
  logic [$clog2(DEPTH+1)-1:0] count;

  store_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  line_t latest [int];
  line_t mem [int];
  int    inflight_addr [int];   // id -> address
  int    lat [int];             // id -> cycles left
  int n_merge = 0, n_lkhit = 0;

  always @(negedge clk) begin
    w_ready = $urandom_range(0, 3) == 0;
    lk_addr = addr_t'($urandom_range(0, 5));
    b_valid = 0;
    foreach (lat[id]) if (lat[id] <= 0 && !b_valid) begin b_valid = 1; b_id = AXI_ID_W'(id); end
  end

  always @(posedge clk) if (rst_n) begin
    automatic int a = int'(lk_addr);
    // lookup check against the state before this edge
    if (lk_hit) begin
      n_lkhit++;
      check(latest.exists(a) && lk_data == latest[a], "lookup returns newest data");
    end else if (latest.exists(a)) begin
      check(mem.exists(a) && mem[a] == latest[a], "lookup miss only when memory is current");
    end
    if (w_valid && w_ready) begin
      foreach (inflight_addr[id]) check(inflight_addr[id] != int'(w_addr), "one write per address in flight");
      inflight_addr[int'(w_id)] = int'(w_addr);
      mem[int'(w_addr)] = w_data;
      lat[int'(w_id)] = $urandom_range(1, 12);
    end
    if (b_valid) begin inflight_addr.delete(int'(b_id)); lat.delete(int'(b_id)); end
    foreach (lat[id]) lat[id]--;
    if (push_valid && push_ready) latest[int'(push_addr)] = push_data;
    if (ev_merge) n_merge++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push_valid = 0; push_addr = '0; push_data = '0; b_id = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      push_valid = $urandom_range(0, 1);
      push_addr  = addr_t'($urandom_range(0, 5));
      push_data  = {16{$urandom}};
      @(posedge clk);
    end
    @(negedge clk); push_valid = 0;
    repeat (400) @(posedge clk);
    foreach (latest[a]) check(mem.exists(a) && mem[a] == latest[a], $sformatf("memory holds newest data of %0d", a));
    check(count == 0, "queue drained");
    check(n_merge > 0, "merges happened");
    check(n_lkhit > 0, "lookup hits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
