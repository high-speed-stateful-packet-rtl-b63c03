// Interconnect between the load/store queues and NUM_CH DDR4 memory controllers (AXI4).
//
// Lines are interleaved over the channels by the low bits of the line address, so a line
// always lives in the same channel. Reads from the load queue go straight to the AR channel
// of the selected controller. A line write from the store queue is parked in a one-entry
// buffer of its channel, which drives AW and W together and frees itself once both have been
// accepted. Read data and write responses of all channels are merged round-robin into the
// single return path of each queue (the load queue always accepts read data).
// Every transaction is one 512-bit beat (len 0, size 64 bytes, INCR burst); the AXI ID is the
// queue entry index, and the AXI address is the line's byte address.
// Following the source design: AXI4 to the memory controllers, two channels by default, up to
// four. This design's choices: the address interleaving, the per-channel write buffer and the
// round-robin return.
//
// Interface: ar_* / r_* to the load queue, w_* / b_* to the store queue, m_* the AXI4
// manager ports, one per channel (arrays indexed by channel).
// Timing: AR passes through combinationally; a write reaches AW/W one cycle after acceptance.
// The AXI fields len, size, burst, strb, last and the low six address bits are constant
// (single full-line beats), and the AR address and ID are the request's own, by design.
module mem_interconnect
  import tss_pkg::*;
#(
  parameter int NUM_CH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // load queue
  input  logic  ar_valid,
  output logic  ar_ready,
  input  addr_t ar_addr,
  input  logic [AXI_ID_W-1:0] ar_id,
  output logic  r_valid,
  output logic [AXI_ID_W-1:0] r_id,
  output line_t r_data,
  // store queue
  input  logic  w_valid,
  output logic  w_ready,
  input  addr_t w_addr,
  input  logic [AXI_ID_W-1:0] w_id,
  input  line_t w_data,
  output logic  b_valid,
  output logic [AXI_ID_W-1:0] b_id,
  // AXI4 managers
  output logic   m_ar_valid [NUM_CH],
  input  logic   m_ar_ready [NUM_CH],
  output axi_a_t m_ar       [NUM_CH],
  input  logic   m_r_valid  [NUM_CH],
  output logic   m_r_ready  [NUM_CH],
  input  axi_r_t m_r        [NUM_CH],
  output logic   m_aw_valid [NUM_CH],
  input  logic   m_aw_ready [NUM_CH],
  output axi_a_t m_aw       [NUM_CH],
  output logic   m_w_valid  [NUM_CH],
  input  logic   m_w_ready  [NUM_CH],
  output axi_w_t m_w        [NUM_CH],
  input  logic   m_b_valid  [NUM_CH],
  output logic   m_b_ready  [NUM_CH],
  input  axi_b_t m_b        [NUM_CH]
);
  localparam int CW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;
  typedef logic [CW-1:0] ch_t;

  function automatic ch_t ch_of(addr_t a);
    return (NUM_CH > 1) ? ch_t'(a % NUM_CH) : '0;
  endfunction

  function automatic axi_a_t beat(addr_t a, logic [AXI_ID_W-1:0] id);
    return '{id: id, addr: {a, 6'b0}, len: 8'd0, size: 3'd6, burst: 2'b01};
  endfunction

  // ---------------- reads
  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      m_ar_valid[c] = ar_valid && ch_of(ar_addr) == ch_t'(c);
      m_ar[c]       = beat(ar_addr, ar_id);
    end
  end
  assign ar_ready = m_ar_ready[ch_of(ar_addr)];

  ch_t r_ptr, b_ptr;
  ch_t r_sel, b_sel;
  logic r_any, b_any;
  always_comb begin
    int c;
    r_any = 1'b0; r_sel = r_ptr;
    b_any = 1'b0; b_sel = b_ptr;
    for (int k = NUM_CH - 1; k >= 0; k--) begin
      c = (int'(r_ptr) + k) % NUM_CH;
      if (m_r_valid[c]) begin r_any = 1'b1; r_sel = ch_t'(c); end
      c = (int'(b_ptr) + k) % NUM_CH;
      if (m_b_valid[c]) begin b_any = 1'b1; b_sel = ch_t'(c); end
    end
    for (c = 0; c < NUM_CH; c++) begin
      m_r_ready[c] = r_any && r_sel == ch_t'(c);
      m_b_ready[c] = b_any && b_sel == ch_t'(c);
    end
  end
  assign r_valid = r_any;
  assign r_id    = m_r[r_sel].id;
  assign r_data  = m_r[r_sel].data;
  assign b_valid = b_any;
  assign b_id    = m_b[b_sel].id;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_ptr <= '0; b_ptr <= '0;
    end else begin
      if (r_any) r_ptr <= (int'(r_sel) == NUM_CH - 1) ? '0 : r_sel + 1'b1;
      if (b_any) b_ptr <= (int'(b_sel) == NUM_CH - 1) ? '0 : b_sel + 1'b1;
    end
  end

  // ---------------- writes: one-entry buffer per channel
  logic   wb_aw [NUM_CH];     // AW still to be sent
  logic   wb_w  [NUM_CH];     // W still to be sent
  axi_a_t wb_a  [NUM_CH];
  line_t  wb_d  [NUM_CH];

  assign w_ready = !wb_aw[ch_of(w_addr)] && !wb_w[ch_of(w_addr)];

  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      m_aw_valid[c] = wb_aw[c];
      m_aw[c]       = wb_a[c];
      m_w_valid[c]  = wb_w[c];
      m_w[c]        = '{data: wb_d[c], strb: '1, last: 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < NUM_CH; c++) begin
      if (!rst_n) begin
        wb_aw[c] <= 1'b0;
        wb_w[c]  <= 1'b0;
      end else if (w_valid && w_ready && ch_of(w_addr) == ch_t'(c)) begin
        wb_aw[c] <= 1'b1;
        wb_w[c]  <= 1'b1;
        wb_a[c]  <= beat(w_addr, w_id);
        wb_d[c]  <= w_data;
      end else begin
        if (m_aw_ready[c]) wb_aw[c] <= 1'b0;
        if (m_w_ready[c])  wb_w[c]  <= 1'b0;
      end
    end
  end
endmodule
