// Store queue: the write side of the memory subsystem, holding dirty lines evicted from the
// cache until the DDR4 channel has written them.
//
// Entries form a circular buffer in eviction order. An eviction to an address that already has
// a pending (not yet issued) entry overwrites that entry's data (write merge); otherwise it is
// appended. Pending entries are issued in order as AXI writes whose ID is the entry index; an
// entry waits while an older write to the same address is still in flight, so two writes to
// one address are never outstanding together and memory sees them in order. An entry stays
// until its write response arrives, then retires from the head.
// The load queue searches the store queue for each miss (read bypass / write forwarding): the
// pending entry of that address, else the in-flight one, is the newest copy of the line.
// Following the source design: same-address merging, bypass of reads, 64 entries. This design's
// choices: in-order issue, the same-address hold, and retirement in order at the head.
//
// Interface: push_* (evictions, valid/ready), lk_addr -> lk_hit/lk_data (combinational),
// w_* (line writes towards the interconnect, valid/ready), b_valid/b_id (write responses),
// ev_merge event pulse.
// Timing: an eviction can be issued the cycle after it was pushed.
module store_queue
  import tss_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_valid,
  output logic  push_ready,
  input  addr_t push_addr,
  input  line_t push_data,
  input  addr_t lk_addr,
  output logic  lk_hit,
  output line_t lk_data,
  output logic  w_valid,
  input  logic  w_ready,
  output addr_t w_addr,
  output logic [AXI_ID_W-1:0] w_id,
  output line_t w_data,
  input  logic  b_valid,
  input  logic [AXI_ID_W-1:0] b_id,
  output logic  ev_merge,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int IW = $clog2(DEPTH);
  typedef enum logic [1:0] {S_FREE, S_PEND, S_FLIGHT, S_DONE} st_e;

  st_e           e_st   [DEPTH];
  addr_t         e_addr [DEPTH];
  line_t         e_data [DEPTH];
  logic [IW-1:0] head, tail, ip;      // ip: next entry to issue

  function automatic logic [IW-1:0] nxt(logic [IW-1:0] p);
    return (p == IW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // ---------------- issue
  logic conflict;
  always_comb begin
    conflict = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (e_st[i] == S_FLIGHT && e_addr[i] == e_addr[ip]) conflict = 1'b1;
  end
  assign w_valid = (e_st[ip] == S_PEND) && !conflict;
  assign w_addr  = e_addr[ip];
  assign w_data  = e_data[ip];
  assign w_id    = AXI_ID_W'(ip);
  wire do_issue  = w_valid && w_ready;

  // ---------------- push: merge or append
  logic          m_hit;
  logic [IW-1:0] m_idx;
  always_comb begin
    m_hit = 1'b0; m_idx = '0;
    for (int i = 0; i < DEPTH; i++)
      if (e_st[i] == S_PEND && e_addr[i] == push_addr && !(do_issue && ip == IW'(i))) begin
        m_hit = 1'b1; m_idx = IW'(i);
      end
  end
  assign push_ready = count != ($clog2(DEPTH+1))'(DEPTH);
  wire do_merge  = push_valid && push_ready && m_hit;
  wire do_append = push_valid && push_ready && !m_hit;
  wire do_retire = (count != '0) && e_st[head] == S_DONE;

  // ---------------- lookup for the load queue
  always_comb begin
    logic pend_hit;
    pend_hit = 1'b0;
    lk_hit   = 1'b0;
    lk_data  = '0;
    for (int i = 0; i < DEPTH; i++)
      if (e_st[i] == S_FLIGHT && e_addr[i] == lk_addr && !pend_hit) begin
        lk_hit = 1'b1; lk_data = e_data[i];
      end
    for (int i = 0; i < DEPTH; i++)
      if (e_st[i] == S_PEND && e_addr[i] == lk_addr) begin
        pend_hit = 1'b1; lk_hit = 1'b1; lk_data = e_data[i];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) e_st[i] <= S_FREE;
      head <= '0; tail <= '0; ip <= '0; count <= '0;
    end else begin
      if (do_issue) begin e_st[ip] <= S_FLIGHT; ip <= nxt(ip); end
      if (b_valid) e_st[b_id[IW-1:0]] <= S_DONE;
      if (do_retire) begin e_st[head] <= S_FREE; head <= nxt(head); end
      if (do_append) begin
        e_st[tail] <= S_PEND;
        tail <= nxt(tail);
      end
      count <= count + $bits(count)'(do_append) - $bits(count)'(do_retire);
    end
  end

  always_ff @(posedge clk) begin
    if (do_append) begin e_addr[tail] <= push_addr; e_data[tail] <= push_data; end
    if (do_merge)  e_data[m_idx] <= push_data;
  end

  assign ev_merge = do_merge;

  a_b_known: assert property (@(posedge clk) disable iff (!rst_n)
    b_valid |-> e_st[b_id[IW-1:0]] == S_FLIGHT) else $error("store_queue: unexpected write response");
endmodule
