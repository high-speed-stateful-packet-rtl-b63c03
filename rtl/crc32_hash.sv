// Hash engine core: CRC-32 of a MSG_W-bit message, computed in one combinational step.
//
// The classifier uses CRC-32 to spread rules over the shared rule memory (direct hashing); the
// message is the table id concatenated with the key already ANDed with that table's mask, so
// rules of different tables that share a masked key land in different buckets.
// The choice of CRC-32 follows the source design. The exact variant is this design's choice:
// the common IEEE 802.3 form (reflected polynomial 0xEDB88320, initial value 0xFFFFFFFF, final
// inversion), with message bit 0 shifted in first. The bit-serial LFSR is unrolled by the loop
// into a pure XOR network; the caller registers the result.
//
// Interface: msg (MSG_W bits) -> crc (32 bits), no clock.
module crc32_hash #(
  parameter int MSG_W = 264
) (
  input  logic [MSG_W-1:0] msg,
  output logic [31:0]      crc
);
  localparam logic [31:0] POLY = 32'hEDB8_8320;

  always_comb begin
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < MSG_W; i++) begin
      if (c[0] ^ msg[i]) c = (c >> 1) ^ POLY;
      else               c = c >> 1;
    end
    crc = ~c;
  end
endmodule
