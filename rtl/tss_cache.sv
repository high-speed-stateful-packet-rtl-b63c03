// Rule cache: set-associative, write-allocate, Tree-PLRU replacement, one read and one write
// per clock, sitting between the MAE and the load/store queues.
//
// Read path: a request is registered, then looked up in all ways of its set. A hit returns the
// line RD_LAT cycles after the request was accepted. A miss is handed to the load queue with
// its tag; the load queue returns the line later and the cache passes it on to the MAE,
// filling it into the cache on the way (hits have priority on the response channel).
// Write path: every MAE write is a whole line (a rule with updated statistics), so a write
// never reads memory: it takes the hit way, else an invalid way, else the Tree-PLRU victim, and
// marks the line dirty. A dirty victim is moved to the store queue, which must accept it.
// Every committed write is also sent to the load queue as a cancellation: any read of that
// address still pending there is answered "cancelled" and re-executed by the MAE, so the cache
// keeps no record of pending misses and never installs stale memory data.
// Reads see every write committed up to and including the lookup cycle (the committing line is
// bypassed to a same-address lookup).
// Following the source design: 4 ways, 16K lines, write-allocate, Tree-PLRU, read
// cancellation through the load queue, 1 read + 1 write per clock, read latency 4. This
// design's choices: write-back of dirty victims, the fill being skipped when the write port is
// busy or the store queue full, and a write latency of 2 cycles (the source reports 5).
// The PLRU bits are not reset: any bit pattern is a legal PLRU state.
//
// Interface: rd_* / rsp_* read channel, wr_* / wr_ack write channel (ack one cycle after the
// commit), lq_* to the load queue, ev_* to the store queue (evictions), st_* event pulses.
module tss_cache
  import tss_pkg::*;
#(
  parameter int LINES  = 16384,
  parameter int WAYS   = 4,
  parameter int RD_LAT = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // read channel
  input  logic    rd_valid,
  output logic    rd_ready,
  input  rd_req_t rd_req,
  output logic    rsp_valid,
  output rd_rsp_t rsp,
  // write channel
  input  logic    wr_valid,
  output logic    wr_ready,
  input  wr_req_t wr_req,
  output logic    wr_ack,
  // load queue
  output logic    lq_enq_valid,
  input  logic    lq_enq_ready,
  output addr_t   lq_enq_addr,
  output tag_t    lq_enq_tag,
  output logic    lq_cancel_valid,
  output addr_t   lq_cancel_addr,
  input  logic    lq_rsp_valid,
  output logic    lq_rsp_ready,
  input  tag_t    lq_rsp_tag,
  input  addr_t   lq_rsp_addr,
  input  line_t   lq_rsp_data,
  input  logic    lq_rsp_cancelled,
  input  logic    lq_rsp_fill,
  // store queue (dirty evictions)
  output logic    ev_valid,
  input  logic    ev_ready,
  output addr_t   ev_addr,
  output line_t   ev_data,
  // events
  output logic    st_hit,
  output logic    st_miss,
  output logic    st_evict,
  output logic    st_fill
);
  localparam int SETS  = LINES / WAYS;
  localparam int SET_W = $clog2(SETS);
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int CT_W  = ADDR_W - SET_W;
  localparam int PL_W  = (WAYS > 1) ? WAYS - 1 : 1;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [CT_W-1:0]  ctag_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [PL_W-1:0]  plru_t;

  ctag_t tag_q   [WAYS][SETS];
  logic [SETS-1:0] valid_q [WAYS];
  logic [SETS-1:0] dirty_q [WAYS];
  line_t data_q  [WAYS][SETS];
  plru_t plru_q  [SETS];

  function automatic set_t  set_of(addr_t a); return a[SET_W-1:0]; endfunction
  function automatic ctag_t tag_of(addr_t a); return a[ADDR_W-1:SET_W]; endfunction

  // Tree-PLRU over a heap of WAYS-1 node bits; a bit of 0 sends the victim search left.
  function automatic way_t plru_victim(plru_t b);
    int n = 0;
    for (int l = 0; l < WAY_W; l++) n = 2 * n + 1 + int'(b[n]);
    return way_t'(n - (WAYS - 1));
  endfunction

  function automatic plru_t plru_touch(plru_t b, way_t w);
    plru_t r = b;
    int n = 0;
    for (int l = WAY_W - 1; l >= 0; l--) begin
      r[n] = ~w[l];                  // point away from the way just used
      n = 2 * n + 1 + int'(w[l]);
    end
    return r;
  endfunction

  logic    dl_valid [RD_LAT-1];
  rd_rsp_t dl       [RD_LAT-1];

  // ------------------------------------------------------------------ commit (write port)
  logic  fill_try, c_is_wr, c_en, c_hit, c_need_ev;
  addr_t c_addr;
  line_t c_data;
  way_t  c_way;
  set_t  c_set;

  assign lq_rsp_ready = !dl_valid[RD_LAT-2];
  assign fill_try = lq_rsp_valid && lq_rsp_ready && lq_rsp_fill && !lq_rsp_cancelled && !wr_valid;

  always_comb begin
    c_is_wr = wr_valid;
    c_addr  = wr_valid ? wr_req.addr : lq_rsp_addr;
    c_data  = wr_valid ? wr_req.data : lq_rsp_data;
    c_set   = set_of(c_addr);
    c_hit   = 1'b0;
    c_way   = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[w][c_set] && tag_q[w][c_set] == tag_of(c_addr)) begin
        c_hit = 1'b1;
        c_way = way_t'(w);
      end
    if (!c_hit) begin
      c_way = plru_victim(plru_q[c_set]);
      for (int w = WAYS - 1; w >= 0; w--)
        if (!valid_q[w][c_set]) c_way = way_t'(w);
    end
    c_need_ev = !c_hit && valid_q[c_way][c_set] && dirty_q[c_way][c_set];
    c_en = c_is_wr ? (wr_valid && (!c_need_ev || ev_ready))
                   : (fill_try && !c_hit && (!c_need_ev || ev_ready));
  end

  assign wr_ready = !c_need_ev || ev_ready;
  assign ev_valid = c_en && c_need_ev;
  assign ev_addr  = {tag_q[c_way][c_set], c_set};
  assign ev_data  = data_q[c_way][c_set];
  assign lq_cancel_valid = c_en && c_is_wr;
  assign lq_cancel_addr  = c_addr;

  // ------------------------------------------------------------------ read lookup
  logic    r1_valid;
  rd_req_t r1;
  logic    r_hit, r_hit_arr;
  way_t    r_way;
  line_t   r_data;
  set_t    r_set;

  always_comb begin
    r_set     = set_of(r1.addr);
    r_hit_arr = 1'b0;
    r_way     = '0;
    r_data    = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[w][r_set] && tag_q[w][r_set] == tag_of(r1.addr)) begin
        r_hit_arr = 1'b1;
        r_way     = way_t'(w);
        r_data    = data_q[w][r_set];
      end
    r_hit = r_hit_arr;
    if (c_en && c_addr == r1.addr) begin       // bypass of the line being committed
      r_hit  = 1'b1;
      r_data = c_data;
    end
  end

  assign lq_enq_valid = r1_valid && !r_hit;
  assign lq_enq_addr  = r1.addr;
  assign lq_enq_tag   = r1.tag;
  wire r1_adv = r1_valid && (r_hit || lq_enq_ready);
  assign rd_ready = !r1_valid || r1_adv;

  always_ff @(posedge clk) begin
    if (!rst_n) r1_valid <= 1'b0;
    else if (rd_ready) r1_valid <= rd_valid;
    if (rd_ready && rd_valid) r1 <= rd_req;
  end

  // hit delay line: response RD_LAT cycles after acceptance
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < RD_LAT - 1; i++) dl_valid[i] <= 1'b0;
    end else begin
      dl_valid[0] <= r1_valid && r_hit;
      for (int i = 1; i < RD_LAT - 1; i++) dl_valid[i] <= dl_valid[i-1];
    end
    dl[0] <= '{tag: r1.tag, cancelled: 1'b0, data: r_data};
    for (int i = 1; i < RD_LAT - 1; i++) dl[i] <= dl[i-1];
  end

  assign rsp_valid = dl_valid[RD_LAT-2] || lq_rsp_valid;
  assign rsp = dl_valid[RD_LAT-2] ? dl[RD_LAT-2]
                                  : '{tag: lq_rsp_tag, cancelled: lq_rsp_cancelled, data: lq_rsp_data};

  // ------------------------------------------------------------------ array update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) begin
        valid_q[w] <= '0;
        dirty_q[w] <= '0;
      end
      wr_ack <= 1'b0;
    end else begin
      wr_ack <= c_en && c_is_wr;
      if (r1_valid && r_hit_arr && !(c_en && c_set == r_set))
        plru_q[r_set] <= plru_touch(plru_q[r_set], r_way);
      if (c_en) begin
        valid_q[c_way][c_set] <= 1'b1;
        dirty_q[c_way][c_set] <= c_is_wr || (c_hit && dirty_q[c_way][c_set]);
        tag_q[c_way][c_set]   <= tag_of(c_addr);
        plru_q[c_set]         <= plru_touch(plru_q[c_set], c_way);
      end
    end
  end

  always_ff @(posedge clk) if (c_en) data_q[c_way][c_set] <= c_data;

  assign st_hit   = r1_valid && r_hit;
  assign st_miss  = lq_enq_valid && lq_enq_ready;
  assign st_evict = ev_valid;
  assign st_fill  = c_en && !c_is_wr;
endmodule
