// Self-checking test of the memory interconnect with four channels. Random line reads and
// writes are offered from the queue side; each channel is a small AXI subordinate model with
// random ready and random response delay. Checks: every request reaches the channel given by
// the line address, with the right AXI fields; every read returns to the load queue with its
// ID and data; every write is answered once on the B path.
module tb_mem_interconnect;
  import tss_pkg::*;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  ar_valid, ar_ready, r_valid, w_valid, w_ready, b_valid;
  addr_t ar_addr, w_addr;
  logic [AXI_ID_W-1:0] ar_id, r_id, w_id, b_id;
  line_t r_data, w_data;
  logic   m_ar_valid [NCH], m_ar_ready [NCH], m_r_valid [NCH], m_r_ready [NCH];
  logic   m_aw_valid [NCH], m_aw_ready [NCH], m_w_valid [NCH], m_w_ready [NCH];
  logic   m_b_valid [NCH], m_b_ready [NCH];
  axi_a_t m_ar [NCH], m_aw [NCH];
  axi_r_t m_r [NCH];
  axi_w_t m_w [NCH];
  axi_b_t m_b [NCH];

  mem_interconnect #(.NUM_CH(NCH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic line_t pattern(addr_t a);
    return {16{32'(a) ^ 32'h5A5A0000}};
  endfunction

  // subordinate models
  typedef struct { logic [AXI_ID_W-1:0] id; addr_t a; } pend_t;
  pend_t rpend [NCH][$];
  pend_t bpend [NCH][$];
  int exp_r [int];    // id -> expected line address
  int exp_b [int];
  int n_r = 0, n_b = 0, sent_r = 0, sent_w = 0;

  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      m_ar_ready[c] = $urandom_range(0, 2) != 0;
      m_aw_ready[c] = $urandom_range(0, 2) != 0;
      m_w_ready[c]  = $urandom_range(0, 2) != 0;
      m_r_valid[c]  = rpend[c].size() > 0 && $urandom_range(0, 1);
      if (rpend[c].size() > 0) m_r[c] = '{id: rpend[c][0].id, data: pattern(rpend[c][0].a), resp: 0, last: 1};
      m_b_valid[c]  = bpend[c].size() > 0 && $urandom_range(0, 1);
      if (bpend[c].size() > 0) m_b[c] = '{id: bpend[c][0].id, resp: 0};
    end
  end

  logic [NCH-1:0] aw_seen, w_seen;
  axi_a_t aw_hold [NCH];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      if (m_ar_valid[c] && m_ar_ready[c]) begin
        automatic addr_t a = m_ar[c].addr[AXI_ADDR_W-1:6];
        check(a % NCH == c && m_ar[c].len == 0 && m_ar[c].size == 6 && m_ar[c].burst == 1, "AR routing/fields");
        rpend[c].push_back('{id: m_ar[c].id, a: a});
      end
      if (m_r_valid[c] && m_r_ready[c]) void'(rpend[c].pop_front());
      if (m_aw_valid[c] && m_aw_ready[c]) begin aw_seen[c] = 1; aw_hold[c] = m_aw[c]; end
      if (m_w_valid[c] && m_w_ready[c]) begin
        w_seen[c] = 1;
        check(m_w[c].last && m_w[c].strb == '1, "W fields");
        check(m_w[c].data == pattern(m_aw[c].addr[AXI_ADDR_W-1:6]), "W data belongs to AW");
      end
      if (aw_seen[c] && w_seen[c]) begin
        automatic addr_t a = aw_hold[c].addr[AXI_ADDR_W-1:6];
        check(a % NCH == c, "AW routing");
        bpend[c].push_back('{id: aw_hold[c].id, a: a});
        aw_seen[c] = 0; w_seen[c] = 0;
      end
      if (m_b_valid[c] && m_b_ready[c]) void'(bpend[c].pop_front());
    end
    if (r_valid) begin
      n_r++;
      check(exp_r.exists(int'(r_id)) && r_data == pattern(addr_t'(exp_r[int'(r_id)])), "read data returned with its ID");
      exp_r.delete(int'(r_id));
    end
    if (b_valid) begin
      n_b++;
      check(exp_b.exists(int'(b_id)), "write response with a known ID");
      exp_b.delete(int'(b_id));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin m_r[c] = '0; m_b[c] = '0; end
    aw_seen = '0; w_seen = '0;
    ar_valid = 0; w_valid = 0; ar_addr = '0; w_addr = '0; ar_id = '0; w_id = '0; w_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        ar_valid = 1; ar_id = AXI_ID_W'(i); ar_addr = addr_t'($urandom);
        do @(posedge clk); while (!ar_ready);
        exp_r[i] = int'(ar_addr); sent_r++;
        @(negedge clk); ar_valid = 0;
      end
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        w_valid = 1; w_id = AXI_ID_W'(i); w_addr = addr_t'($urandom); w_data = pattern(w_addr);
        do @(posedge clk); while (!w_ready);
        exp_b[i] = 1; sent_w++;
        @(negedge clk); w_valid = 0;
      end
    join
    repeat (300) @(posedge clk);
    check(n_r == 64 && exp_r.size() == 0, $sformatf("all reads returned (%0d)", n_r));
    check(n_b == 64 && exp_b.size() == 0, $sformatf("all writes answered (%0d)", n_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
