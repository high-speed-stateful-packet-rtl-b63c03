// Self-checking test of the allocated storage: tags are handed out lowest-free first, none when
// all are in use, freed tags come back, sessions read back by tag as written by allocation and
// by update. A scoreboard of free tags in the testbench gives the expected tag.
module tb_alloc_storage;
  import tss_pkg::*;
  localparam int TAGS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_req, alloc_gnt, upd_valid, free_valid;
  tag_t alloc_tag, upd_tag, rd_tag, free_tag;
  session_t alloc_sess, upd_sess, rd_sess;
  logic [$clog2(TAGS+1)-1:0] in_use;
  bit model_free [TAGS];
  session_t model_sess [TAGS];

  alloc_storage #(.TAGS(TAGS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic session_t rnd_sess();
    session_t s;
    s = '0;
    s.key = {8{$urandom}};
    s.tid = tid_t'($urandom);
    s.addr = addr_t'($urandom);
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alloc_req = 0; upd_valid = 0; free_valid = 0; rd_tag = '0; upd_tag = '0; free_tag = '0;
    alloc_sess = '0; upd_sess = '0;
    foreach (model_free[i]) model_free[i] = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int exp_tag; bit any_free;
      @(negedge clk);
      alloc_req = $urandom_range(0, 1); upd_valid = 0; free_valid = 0;
      alloc_sess = rnd_sess();
      exp_tag = -1;
      for (int i = TAGS - 1; i >= 0; i--) if (model_free[i]) exp_tag = i;
      any_free = (exp_tag >= 0);
      // update or free a random tag in use (not the one being allocated)
      begin
        automatic int t = $urandom_range(0, TAGS - 1);
        if (!model_free[t]) begin
          if ($urandom_range(0, 2) == 0) begin free_valid = 1; free_tag = tag_t'(t); end
          else begin upd_valid = 1; upd_tag = tag_t'(t); upd_sess = rnd_sess(); end
        end
      end
      #1;
      check(alloc_gnt == (alloc_req && any_free), "grant");
      if (alloc_req && any_free) check(alloc_tag == tag_t'(exp_tag), $sformatf("tag %0d exp %0d", alloc_tag, exp_tag));
      @(posedge clk);
      if (alloc_req && any_free) begin model_free[exp_tag] = 0; model_sess[exp_tag] = alloc_sess; end
      if (free_valid) model_free[free_tag] = 1;
      if (upd_valid) model_sess[upd_tag] = upd_sess;
      // read back a random tag in use
      @(negedge clk);
      alloc_req = 0; upd_valid = 0; free_valid = 0;
      for (int t = 0; t < TAGS; t++) if (!model_free[t]) begin
        rd_tag = tag_t'(t); #1;
        check(rd_sess == model_sess[t], $sformatf("session of tag %0d", t));
      end
      begin
        automatic int n = 0;
        foreach (model_free[i]) if (!model_free[i]) n++;
        check(in_use == n, "in_use count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
