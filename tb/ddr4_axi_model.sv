// Behavioural model of NUM_CH DDR4 memory channels behind AXI4 subordinate ports, for
// simulation only. All channels share one sparse line store keyed by the line address
// (unwritten lines read as zero). Reads are accepted at once and answered LAT cycles later,
// in order per channel; a write is taken when AW and W are both present and answered with B
// LAT/2 cycles later. The read/write acceptance can be throttled at random (STALL_PCT) to
// exercise back-pressure; writes have a separate throttle the testbench may change. SVC sets
// the bandwidth of a channel: every read or write occupies it for SVC cycles, in the order
// accepted, and completes LAT cycles after its turn starts (SVC = 1: no bandwidth limit).
// Not a model of DRAM timing: only of latency, bandwidth and ordering.
module ddr4_axi_model
  import tss_pkg::*;
#(
  parameter int NUM_CH    = 2,
  parameter int LAT       = 80,
  parameter int STALL_PCT = 0,
  parameter int SVC       = 1
) (
  input  logic   clk,
  input  logic   m_ar_valid [NUM_CH],
  output logic   m_ar_ready [NUM_CH],
  input  axi_a_t m_ar       [NUM_CH],
  output logic   m_r_valid  [NUM_CH],
  input  logic   m_r_ready  [NUM_CH],
  output axi_r_t m_r        [NUM_CH],
  input  logic   m_aw_valid [NUM_CH],
  output logic   m_aw_ready [NUM_CH],
  input  axi_a_t m_aw       [NUM_CH],
  input  logic   m_w_valid  [NUM_CH],
  output logic   m_w_ready  [NUM_CH],
  input  axi_w_t m_w        [NUM_CH],
  output logic   m_b_valid  [NUM_CH],
  input  logic   m_b_ready  [NUM_CH],
  output axi_b_t m_b        [NUM_CH]
);
  line_t mem [addr_t];
  typedef struct { longint due; logic [AXI_ID_W-1:0] id; line_t data; } rq_t;
  rq_t rq [NUM_CH][$];
  rq_t bq [NUM_CH][$];
  longint cyc = 0;
  int reads = 0, writes = 0;
  int ch_reads [NUM_CH];
  longint ch_free [NUM_CH];      // first cycle at which the channel is idle again
  int w_stall_pct = STALL_PCT;   // write acceptance throttle, may be changed by the testbench

  function automatic addr_t line_of(logic [AXI_ADDR_W-1:0] a); return a[AXI_ADDR_W-1:6]; endfunction

  function automatic line_t peek(addr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  initial for (int c = 0; c < NUM_CH; c++) begin
    m_ar_ready[c] = 0; m_aw_ready[c] = 0; m_w_ready[c] = 0; m_r_valid[c] = 0; m_b_valid[c] = 0;
    m_r[c] = '0; m_b[c] = '0; ch_reads[c] = 0; ch_free[c] = 0;
  end

  always @(negedge clk) begin
    for (int c = 0; c < NUM_CH; c++) begin
      logic go, wgo;
      go  = ($urandom_range(0, 99) >= STALL_PCT);
      wgo = ($urandom_range(0, 99) >= w_stall_pct);
      m_ar_ready[c] = go;
      m_aw_ready[c] = wgo && m_aw_valid[c] && m_w_valid[c];
      m_w_ready[c]  = wgo && m_aw_valid[c] && m_w_valid[c];
      m_r_valid[c]  = rq[c].size() > 0 && rq[c][0].due <= cyc;
      if (m_r_valid[c]) m_r[c] = '{id: rq[c][0].id, data: rq[c][0].data, resp: 2'b00, last: 1'b1};
      m_b_valid[c]  = bq[c].size() > 0 && bq[c][0].due <= cyc;
      if (m_b_valid[c]) m_b[c] = '{id: bq[c][0].id, resp: 2'b00};
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NUM_CH; c++) begin
      if (m_ar_valid[c] && m_ar_ready[c]) begin
        automatic longint start = (ch_free[c] > cyc) ? ch_free[c] : cyc;
        ch_free[c] = start + SVC;
        rq[c].push_back('{due: start + LAT, id: m_ar[c].id, data: peek(line_of(m_ar[c].addr))});
        reads++; ch_reads[c]++;
      end
      if (m_aw_valid[c] && m_aw_ready[c]) begin
        automatic longint start = (ch_free[c] > cyc) ? ch_free[c] : cyc;
        ch_free[c] = start + SVC;
        mem[line_of(m_aw[c].addr)] = m_w[c].data;
        bq[c].push_back('{due: start + LAT / 2, id: m_aw[c].id, data: '0});
        writes++;
      end
      if (m_r_valid[c] && m_r_ready[c]) void'(rq[c].pop_front());
      if (m_b_valid[c] && m_b_ready[c]) void'(bq[c].pop_front());
    end
  end
endmodule
