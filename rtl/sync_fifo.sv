// Synchronous first-word-fall-through FIFO of DEPTH entries of type T.
//
// Used by the MAE for its recirculation, write and result queues. Every queue there holds at
// most one entry per session, so with DEPTH = number of tags it can never overflow; in_ready
// still reports fullness and an assertion flags a push into a full FIFO.
// Interface: valid/ready on both sides; out_data shows the head while out_valid is high.
// Timing: a pushed word is visible at the output on the next cycle.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      if (push && !pop) count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) if (push) mem[wr_ptr] <= in_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> in_ready)
    else $error("sync_fifo: push into a full FIFO");
endmodule
