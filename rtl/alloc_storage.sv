// Allocated storage: per-tag session state of the MAE and allocation of the tags that name
// in-flight operations on the memory bus.
//
// When the input handler dispatches a new operation it takes the lowest free tag (a priority
// encoder over the free bitmap, the leading-one detector the source design mentions) and
// stores the session under it in the same cycle. A read response carries the tag back; the
// action pipeline reads the session by tag, writes back its updated state when the operation
// recirculates, and frees the tag when the result leaves the engine. Holding the state here,
// indexed by tag, is what lets reads complete and be processed out of order.
// Following the source design: the storage of sessions and the allocation of bus tags in one
// block. This design's choices: lowest-free-tag allocation, a combinational read port, and a
// new allocation never colliding with an update because an update names a tag in use.
//
// Interface: alloc_req/alloc_gnt/alloc_tag/alloc_sess (grant = a tag is free), upd_* (write an
// allocated session), rd_tag -> rd_sess (combinational), free_valid/free_tag.
// Timing: a tag freed in cycle n can be allocated again from cycle n+1.
module alloc_storage
  import tss_pkg::*;
#(
  parameter int TAGS = NUM_TAGS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     alloc_req,
  output logic     alloc_gnt,
  output tag_t     alloc_tag,
  input  session_t alloc_sess,
  input  logic     upd_valid,
  input  tag_t     upd_tag,
  input  session_t upd_sess,
  input  tag_t     rd_tag,
  output session_t rd_sess,
  input  logic     free_valid,
  input  tag_t     free_tag,
  output logic [$clog2(TAGS+1)-1:0] in_use
);
  logic [TAGS-1:0] free_map;
  session_t        sess [TAGS];

  always_comb begin
    alloc_gnt = 1'b0;
    alloc_tag = '0;
    for (int i = TAGS - 1; i >= 0; i--)
      if (free_map[i]) begin
        alloc_gnt = alloc_req;
        alloc_tag = tag_t'(i);
      end
  end

  assign rd_sess = sess[rd_tag];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_map <= '1;
      in_use   <= '0;
    end else begin
      if (alloc_gnt) free_map[alloc_tag] <= 1'b0;
      if (free_valid) free_map[free_tag] <= 1'b1;
      in_use <= in_use + $bits(in_use)'(alloc_gnt) - $bits(in_use)'(free_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (alloc_gnt) sess[alloc_tag] <= alloc_sess;
    if (upd_valid) sess[upd_tag]   <= upd_sess;
  end

  a_free_in_use: assert property (@(posedge clk) disable iff (!rst_n)
    free_valid |-> !free_map[free_tag]) else $error("alloc_storage: freeing a free tag");
  a_upd_in_use: assert property (@(posedge clk) disable iff (!rst_n)
    upd_valid |-> !free_map[upd_tag]) else $error("alloc_storage: update of a free tag");
endmodule
