// crc8 - combinational 8-bit CRC of a W-bit word.
//
// Every FTCP message is protected by an 8-bit CRC over its data field; the
// slave checks the CRC of each incoming message and attaches one to each
// reply. The protocol names the CRC but not its generator, so this design
// uses CRC-8 with generator x^8 + x^2 + x + 1 (0x07), initial value 0, data
// taken MSB first, no reflection and no final XOR. With a zero initial
// value, leading zero bits do not change the result, so the CRC of a 32-bit
// word equals the CRC of the same word zero-extended to 48 bits.
//
// Interface: data (W bits) in, crc (8 bits) out, no clock; the result is a
// pure function of the input (a tree of XOR gates after synthesis).
module crc8 #(
  parameter int W = ftcp_pkg::READ_W
) (
  input  logic [W-1:0] data,
  output logic [7:0]   crc
);
  import ftcp_pkg::*;

  always_comb begin
    logic [7:0] r;
    logic       fb;
    r = '0;
    for (int i = W - 1; i >= 0; i--) begin
      fb = r[7] ^ data[i];
      r  = {r[6:0], 1'b0};
      if (fb) r = r ^ CRC_POLY;
    end
    crc = r;
  end

endmodule
