// Throughput under uniform random flows, with 1, 2 and 4 memory channels side by side.
//
// The worst-case workload of this classifier is a stream of packets whose flows are drawn
// uniformly from a set of installed rules: as long as the set fits in the cache every lookup
// hits and one packet is classified per clock; once the set is several times the cache, most
// lookups go to DRAM and the rate falls to what the memory channels deliver, so it grows with
// the number of channels. Three classifiers (NUM_CH = 1, 2, 4) run the same workload in
// parallel: install FEW flows (a quarter of the cache), stream LOOKUPS packets over them;
// then install flows up to MANY (eight times the cache) and stream LOOKUPS packets over all.
// Every result must name the packet's own rule; the packet counters read back at the end must
// add up to the packets sent. Rates are packets per clock from the first packet accepted to
// the last result. Checked: near one packet per clock inside the cache for every channel
// count, a lower rate beyond it, and a rate that rises from 1 to 2 to 4 channels.
// Scaled sizes: a 1024-line cache instead of 16K lines, so that eight times the cache can be
// simulated. Each modelled memory channel carries one 64-byte read or write every 4 cycles
// and answers 80 cycles after an access starts; these numbers are assumptions of this test,
// not DRAM timing.
module tb_tss_flows;
  import tss_pkg::*;
  localparam int LINES   = 1024;
  localparam int FEW     = LINES / 4;
  localparam int MANY    = LINES * 8;
  localparam int LOOKUPS = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic key_t flow_key(int f);
    return key_t'({32'(f) * 32'h9E37_79B9, 32'(f), 32'hF10F_0000 | 32'(f)});
  endfunction

  real rate_in [3];
  real rate_out [3];
  bit  done [3];

  for (genvar g = 0; g < 3; g++) begin : g_ch
    localparam int NUM_CH = 1 << g;
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

    tss_classifier_top #(.CACHE_LINES(LINES), .NUM_CH(NUM_CH)) dut (.*);
    ddr4_axi_model #(.NUM_CH(NUM_CH), .LAT(80), .SVC(4)) ddr (.*);

    assign res_ready = 1'b1;
    int n_res = 0, n_found = 0;
    longint t_last = 0, cyc = 0;
    int sent [MANY];
    result_t last_res;
    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (rst_n && res_valid) begin
        n_res++; t_last = cyc; last_res = res;
        if (res.op == OP_LOOKUP) begin
          check(res.found && res.tid == 0, "packet classified");
        end
      end
    end

    task automatic service(instr_t in);
      @(negedge clk);
      sv_valid = 1; sv_instr = in;
      do @(posedge clk); while (!sv_ready);
      @(negedge clk);
      sv_valid = 0;
    endtask

    task automatic install(int from, int to);
      for (int f = from; f < to; f++) begin
        automatic instr_t in = '0;
        in.op = OP_INSERT; in.tid = 0; in.key = flow_key(f); in.prio = 1; in.action = 32'(f);
        service(in);
      end
    endtask

    // Streams n packets over flows [0, nflows) at one offer per clock; returns packets/clock.
    task automatic stream(int nflows, int n, output real rate);
      automatic longint t0 = -1;
      automatic int base = n_res;
      automatic int guard = 0;
      for (int i = 0; i < n; i++) begin
        automatic int f = $urandom_range(0, nflows - 1);
        @(negedge clk);
        tr_valid = 1; tr_key = flow_key(f); tr_len = 100;
        do begin @(posedge clk); if (t0 < 0 && tr_ready) t0 = cyc; end while (!tr_ready);
        sent[f]++;
      end
      @(negedge clk); tr_valid = 0;
      while (n_res < base + n && guard < 400000) begin @(posedge clk); guard++; end
      check(n_res == base + n, "all packets answered");
      rate = real'(n) / real'(t_last - t0 + 1);
    endtask

    initial begin
      tr_valid = 0; sv_valid = 0; tr_key = '0; tr_len = '0; sv_instr = '0;
      for (int f = 0; f < MANY; f++) sent[f] = 0;
      wait (rst_n);
      begin
        automatic instr_t c = '0;
        c.op = OP_CFG; c.tid = 0; c.key = '1; c.prio = 1; c.action = 32'h200;   // valid, no next
        service(c);
      end
      install(0, FEW);
      while (n_res < FEW) @(posedge clk);
      stream(FEW, LOOKUPS, rate_in[g]);
      install(FEW, MANY);
      while (n_res < MANY + LOOKUPS) @(posedge clk);
      stream(MANY, LOOKUPS, rate_out[g]);
      // statistics of a sample of flows must equal the packets sent to them
      for (int f = 0; f < MANY; f += MANY / 64) begin
        automatic instr_t r = '0;
        automatic int n0 = n_res;
        r.op = OP_READ; r.tid = 0; r.key = flow_key(f);
        service(r);
        while (n_res == n0) @(posedge clk);
        check(last_res.found && last_res.pkts == 64'(sent[f]),
              $sformatf("%0d channels: flow %0d counted %0d of %0d packets", NUM_CH, f, last_res.pkts, sent[f]));
      end
      done[g] = 1;
    end
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 3; g++) done[g] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    for (int g = 0; g < 3; g++) begin
      $display("%0d channel(s): %.3f packets/clock within the cache (%0d flows), %.3f beyond it (%0d flows)",
               1 << g, rate_in[g], FEW, rate_out[g], MANY);
      check(rate_in[g] > 0.9, $sformatf("%0d channel(s): one packet per clock on cache hits", 1 << g));
      check(rate_out[g] < rate_in[g], $sformatf("%0d channel(s): rate falls beyond the cache", 1 << g));
    end
    check(rate_out[1] > rate_out[0] * 1.3, "2 channels faster than 1");
    check(rate_out[2] > rate_out[1] * 1.3, "4 channels faster than 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
