// Stateful TSS packet classifier with rules and statistics in off-chip DDR4 memory.
//
// Packets (already parsed into a match key and a length) enter the Match Action Engine, which
// walks the Tuple Space Search chain of hash tables, one bucket read per table, and updates the
// packet/byte counters and timestamp of the matching rule in memory. Rule-set changes and
// statistics reads enter through the service interface and use the same pipeline, so they
// interleave with lookups at full rate. Between the engine and the DDR4 channels sit a
// write-allocate cache and the load/store queues, which merge accesses to the same line,
// forward evicted lines to later reads, cancel reads overtaken by writes and let all of it
// complete out of order; the interconnect spreads lines over NUM_CH AXI4 memory channels.
// Following the source design: this block structure, 64-entry queues, a 4-way 16K-line cache,
// a 512-bit bus, two DDR4 channels. The packet parser and deparser around the engine and the
// DDR4 controllers are outside this block: the key comes in ready-made, results go out as
// records, and the AXI4 ports connect to the memory controllers.
//
// Interface: tr_* packets (valid/ready), sv_* service instructions (valid/ready), res_*
// results (valid/ready), m_* one AXI4 manager per DDR4 channel, ev event pulses.
// Timing: one packet per clock while lookups hit the cache; cache read latency RD_LAT.
module tss_classifier_top
  import tss_pkg::*;
#(
  parameter int TAGS        = NUM_TAGS,
  parameter int CACHE_LINES = 16384,
  parameter int CACHE_WAYS  = 4,
  parameter int RD_LAT      = 4,
  parameter int LQ_DEPTH    = 64,
  parameter int SQ_DEPTH    = 64,
  parameter int NUM_CH      = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tr_valid,
  output logic             tr_ready,
  input  key_t             tr_key,
  input  logic [LEN_W-1:0] tr_len,
  input  logic             sv_valid,
  output logic             sv_ready,
  input  instr_t           sv_instr,
  output logic             res_valid,
  input  logic             res_ready,
  output result_t          res,
  output logic             m_ar_valid [NUM_CH],
  input  logic             m_ar_ready [NUM_CH],
  output axi_a_t           m_ar       [NUM_CH],
  input  logic             m_r_valid  [NUM_CH],
  output logic             m_r_ready  [NUM_CH],
  input  axi_r_t           m_r        [NUM_CH],
  output logic             m_aw_valid [NUM_CH],
  input  logic             m_aw_ready [NUM_CH],
  output axi_a_t           m_aw       [NUM_CH],
  output logic             m_w_valid  [NUM_CH],
  input  logic             m_w_ready  [NUM_CH],
  output axi_w_t           m_w        [NUM_CH],
  input  logic             m_b_valid  [NUM_CH],
  output logic             m_b_ready  [NUM_CH],
  input  axi_b_t           m_b        [NUM_CH],
  output events_t          ev
);
  // MAE <-> cache
  logic    rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, wr_ack;
  rd_req_t rd_req;
  rd_rsp_t rsp;
  wr_req_t wr_req;

  mae #(.TAGS(TAGS)) u_mae (
    .clk, .rst_n, .tr_valid, .tr_ready, .tr_key, .tr_len, .sv_valid, .sv_ready, .sv_instr,
    .res_valid, .res_ready, .res, .rd_valid, .rd_ready, .rd_req, .rsp_valid, .rsp,
    .wr_valid, .wr_ready, .wr_req, .wr_ack,
    .ev_fwd(ev.fwd), .ev_next(ev.next_table), .ev_retry(ev.retry), .ev_stat(ev.stat),
    .ev_no_tag(ev.no_tag));

  // cache <-> load queue / store queue
  logic  lq_enq_valid, lq_enq_ready, lq_cancel_valid, lq_rsp_valid, lq_rsp_ready;
  logic  lq_rsp_cancelled, lq_rsp_fill;
  addr_t lq_enq_addr, lq_cancel_addr, lq_rsp_addr;
  tag_t  lq_enq_tag, lq_rsp_tag;
  line_t lq_rsp_data;
  logic  ev_valid, ev_ready;
  addr_t ev_addr;
  line_t ev_data;

  tss_cache #(.LINES(CACHE_LINES), .WAYS(CACHE_WAYS), .RD_LAT(RD_LAT)) u_cache (
    .clk, .rst_n, .rd_valid, .rd_ready, .rd_req, .rsp_valid, .rsp,
    .wr_valid, .wr_ready, .wr_req, .wr_ack,
    .lq_enq_valid, .lq_enq_ready, .lq_enq_addr, .lq_enq_tag, .lq_cancel_valid, .lq_cancel_addr,
    .lq_rsp_valid, .lq_rsp_ready, .lq_rsp_tag, .lq_rsp_addr, .lq_rsp_data, .lq_rsp_cancelled,
    .lq_rsp_fill, .ev_valid, .ev_ready, .ev_addr, .ev_data,
    .st_hit(ev.cache_hit), .st_miss(ev.cache_miss), .st_evict(ev.evict), .st_fill(ev.fill));

  addr_t sq_lk_addr;
  logic  sq_lk_hit;
  line_t sq_lk_data;
  logic  ar_valid, ar_ready, r_valid, sw_valid, sw_ready, b_valid;
  addr_t ar_addr, sw_addr;
  logic [AXI_ID_W-1:0] ar_id, r_id, sw_id, b_id;
  line_t r_data, sw_data;

  load_queue #(.DEPTH(LQ_DEPTH), .TAGS(TAGS)) u_lq (
    .clk, .rst_n, .enq_valid(lq_enq_valid), .enq_ready(lq_enq_ready), .enq_addr(lq_enq_addr),
    .enq_tag(lq_enq_tag), .cancel_valid(lq_cancel_valid), .cancel_addr(lq_cancel_addr),
    .sq_addr(sq_lk_addr), .sq_hit(sq_lk_hit), .sq_data(sq_lk_data),
    .ar_valid, .ar_ready, .ar_addr, .ar_id, .r_valid, .r_id, .r_data,
    .rsp_valid(lq_rsp_valid), .rsp_ready(lq_rsp_ready), .rsp_tag(lq_rsp_tag),
    .rsp_addr(lq_rsp_addr), .rsp_data(lq_rsp_data), .rsp_cancelled(lq_rsp_cancelled),
    .rsp_fill(lq_rsp_fill), .ev_merge(ev.lq_merge), .ev_cancel(ev.lq_cancel),
    .ev_bypass(ev.lq_bypass));

  store_queue #(.DEPTH(SQ_DEPTH)) u_sq (
    .clk, .rst_n, .push_valid(ev_valid), .push_ready(ev_ready), .push_addr(ev_addr),
    .push_data(ev_data), .lk_addr(sq_lk_addr), .lk_hit(sq_lk_hit), .lk_data(sq_lk_data),
    .w_valid(sw_valid), .w_ready(sw_ready), .w_addr(sw_addr), .w_id(sw_id), .w_data(sw_data),
    .b_valid, .b_id, .ev_merge(ev.sq_merge), .count());

  mem_interconnect #(.NUM_CH(NUM_CH)) u_ic (
    .clk, .rst_n, .ar_valid, .ar_ready, .ar_addr, .ar_id, .r_valid, .r_id, .r_data,
    .w_valid(sw_valid), .w_ready(sw_ready), .w_addr(sw_addr), .w_id(sw_id), .w_data(sw_data),
    .b_valid, .b_id,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w,
    .m_b_valid, .m_b_ready, .m_b);
endmodule
