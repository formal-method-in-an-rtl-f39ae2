// tb_crc8 - checks crc8 against a long-division reference and the standard
// check value of CRC-8 (generator 0x07, init 0): CRC("123456789") = 0xF4.
module tb_crc8;
  import ftcp_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [71:0] d72;
  logic [47:0] d48;
  logic [31:0] d32;
  logic [7:0]  c72, c48, c32;

  crc8 #(.W(72)) u72 (.data(d72), .crc(c72));
  crc8           u48 (.data(d48), .crc(c48));
  crc8 #(.W(32)) u32 (.data(d32), .crc(c32));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d72 = "123456789"; d48 = '0; d32 = '0;
    #1;
    check(c72, 8'hF4, "check value 123456789");
    check(c48, 8'h00, "zero word");
    for (int i = 0; i < 500; i++) begin
      d72 = {$urandom, $urandom, $urandom};
      d48 = {$urandom, $urandom};
      d32 = $urandom;
      #1;
      check(c72, ref_crc(d72, 72), "random 72");
      check(c48, ref_crc({24'h0, d48}, 48), "random 48");
      check(c32, ref_crc({40'h0, d32}, 32), "random 32");
    end
    // zero-extension property used by the protocol
    d48 = {16'h0, d32};
    #1;
    check(c48, c32, "zero extension");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
