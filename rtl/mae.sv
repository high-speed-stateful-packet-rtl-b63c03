// Match Action Engine (MAE): the out-of-order TSS lookup and rule-statistics engine.
//
// Packets from the traffic interface and instructions from the service interface enter the
// input handler, which hashes the key of the selected table into a bucket address, stores the
// operation as a session under a free tag and issues a tagged read on the read channel. Read
// responses come back in any order; the action pipeline matches the bucket against the key,
// updates the rule statistics and writes the rule back through the write channel, or sends the
// session back to the input handler for the next table (look-up recirculation). A result
// leaves on the output once its write has been confirmed; its tag is then free again.
// Following the source design (datapath figure): instruction input, hash engine, allocated
// storage, action pipeline with write forwarding, write channel with confirmation, output and
// recirculation. This design's choices: the recirculation and write channels are FIFOs with
// one entry per tag, so the action pipeline never stalls; the timestamp is a cycle counter.
//
// Interface: tr_* traffic in, sv_* service in, res_* results out (valid/ready), rd_* / rsp_*
// read channel to the cache, wr_* / wr_ack write channel to the cache, ev_* event pulses.
// Timing: one new operation per cycle while tags are free; a cache hit finishes a lookup in
// about 10 cycles.
module mae
  import tss_pkg::*;
#(
  parameter int TAGS = NUM_TAGS
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
  output logic             rd_valid,
  input  logic             rd_ready,
  output rd_req_t          rd_req,
  input  logic             rsp_valid,
  input  rd_rsp_t          rsp,
  output logic             wr_valid,
  input  logic             wr_ready,
  output wr_req_t          wr_req,
  input  logic             wr_ack,
  output logic             ev_fwd,
  output logic             ev_next,
  output logic             ev_retry,
  output logic             ev_stat,
  output logic             ev_no_tag      // an operation waits for a free tag
);
  typedef struct packed {
    tag_t     tag;
    session_t sess;
  } rc_t;

  logic [TS_W-1:0] now;
  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // allocated storage
  logic     alloc_req, alloc_gnt, upd_valid, free_valid;
  tag_t     alloc_tag, upd_tag, sess_tag, free_tag;
  session_t alloc_sess, upd_sess, sess;
  alloc_storage #(.TAGS(TAGS)) u_store (
    .clk, .rst_n, .alloc_req, .alloc_gnt, .alloc_tag, .alloc_sess,
    .upd_valid, .upd_tag, .upd_sess, .rd_tag(sess_tag), .rd_sess(sess),
    .free_valid, .free_tag, .in_use());
  assign ev_no_tag = alloc_req && !alloc_gnt;

  // recirculation FIFO
  logic     ap_rc_valid, rc_valid, rc_ready;
  tag_t     ap_rc_tag;
  session_t ap_rc_sess;
  rc_t      rc_head;
  sync_fifo #(.T(rc_t), .DEPTH(TAGS)) u_rc (
    .clk, .rst_n, .in_valid(ap_rc_valid), .in_ready(), .in_data('{tag: ap_rc_tag, sess: ap_rc_sess}),
    .out_valid(rc_valid), .out_ready(rc_ready), .out_data(rc_head), .count());

  tid_t     cfg_a_tid, cfg_b_tid;
  tbl_cfg_t cfg_a, cfg_b;

  input_handler u_in (
    .clk, .rst_n, .tr_valid, .tr_ready, .tr_key, .tr_len, .sv_valid, .sv_ready, .sv_instr,
    .rc_valid, .rc_ready, .rc_tag(rc_head.tag), .rc_sess(rc_head.sess),
    .alloc_req, .alloc_gnt, .alloc_tag, .alloc_sess, .upd_valid, .upd_tag, .upd_sess,
    .rd_valid, .rd_ready, .rd_req, .cfg_a_tid, .cfg_a, .cfg_b_tid, .cfg_b);

  // write channel
  logic    ap_wr_valid;
  wr_req_t ap_wr_req;
  sync_fifo #(.T(wr_req_t), .DEPTH(TAGS)) u_wr (
    .clk, .rst_n, .in_valid(ap_wr_valid), .in_ready(), .in_data(ap_wr_req),
    .out_valid(wr_valid), .out_ready(wr_ready), .out_data(wr_req), .count());

  action_pipeline #(.TAGS(TAGS), .FWD_DEPTH(TAGS + 16)) u_ap (
    .clk, .rst_n, .now, .rsp_valid, .rsp, .sess_tag, .sess,
    .cfg_a_tid, .cfg_a, .cfg_b_tid, .cfg_b,
    .wr_valid(ap_wr_valid), .wr_req(ap_wr_req), .wr_ack,
    .rc_valid(ap_rc_valid), .rc_tag(ap_rc_tag), .rc_sess(ap_rc_sess),
    .res_valid, .res_ready, .res, .free_valid, .free_tag,
    .ev_fwd, .ev_next, .ev_retry, .ev_stat);
endmodule
