// Self-checking test of the CRC-32 hash core. The reference is a byte-wise, table-driven CRC-32
// (a different algorithm from the unrolled bit-serial core), checked first against the standard
// check value CRC32("123456789") = 0xCBF43926, then on random 264-bit messages (table id plus
// a 256-bit key, the size used by the classifier).
module tb_crc32_hash;
  int checks = 0, failures = 0;
  logic [71:0]  m9;  logic [31:0] c9;
  logic [263:0] m;   logic [31:0] c;
  logic [31:0] tbl [256];

  crc32_hash #(.MSG_W(72))  u9 (.msg(m9), .crc(c9));
  crc32_hash #(.MSG_W(264)) u  (.msg(m),  .crc(c));

  function automatic logic [31:0] ref_crc(input logic [263:0] msg, input int nbytes);
    logic [31:0] r = 32'hFFFFFFFF;
    for (int b = 0; b < nbytes; b++) r = tbl[(r ^ 32'(msg[8*b +: 8])) & 32'hFF] ^ (r >> 8);
    return ~r;
  endfunction

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [31:0] v;
      v = 32'(i);
      for (int k = 0; k < 8; k++) v = v[0] ? (v >> 1) ^ 32'hEDB88320 : v >> 1;
      tbl[i] = v;
    end
    m9 = {"9","8","7","6","5","4","3","2","1"};  // byte 0 = '1'
    #1; checks++;
    if (c9 !== 32'hCBF43926) begin failures++; $display("check value: got %h", c9); end
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < 9; w++) m[w*32 +: 32] = (w == 8) ? 32'($urandom) & 32'hFF : $urandom;
      #1; checks++;
      if (c !== ref_crc(m, 33)) begin failures++; $display("msg %h: got %h exp %h", m, c, ref_crc(m, 33)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
