// tb_bus_msg_port - self-checking test of the master 2 bus framing.
//
// Bus words arrive with scan_done; a message must be passed on exactly once
// per change of the sequence bit, be held back while the protocol engine is
// not ready (and taken at a later scan), and the acknowledged sequence bit in
// the reply word must follow the answer of the engine.
module tb_bus_msg_port;
  import ftcp_pkg::*;
  import ftcp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic scan_done = 0, rfm_valid, rfm_ready = 1, rtm_ans = 0;
  logic [RFM_W:0] bus_rx;
  logic [RTM_W:0] bus_tx;
  rfm_t rfm;
  rtm_t rtm;

  bus_msg_port dut (.*);

  int checks = 0, failures = 0, passed = 0, held_back = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic seq;
    rfm_t m;
    seq = 0;
    rtm = '{message: MTM_ACK, data: ACKINI, crc: 8'h00};
    bus_rx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(bus_tx == {1'b0, rtm}, "reply word after reset");
    for (int i = 0; i < 200; i++) begin
      bit newmsg, busy;
      newmsg = ($urandom % 3) != 0;
      busy   = ($urandom % 5) == 0;
      if (newmsg) begin
        seq = ~seq;
        m = mk_msg(mfm_e'($urandom % 7), $urandom, 0);
      end
      bus_rx = {seq, m};
      rfm_ready = !busy;
      scan_done = 1;
      @(negedge clk);
      scan_done = 0;
      rfm_ready = 1;
      if (newmsg && !busy) begin
        chk(rfm_valid && rfm == m, "message passed on");
        passed++;
        // engine answers one cycle later
        @(negedge clk);
        rtm = '{message: MTM_DATA, data: {$urandom, $urandom}, crc: 8'h00};
        rtm_ans = 1;
        chk(bus_tx[RTM_W] == ~seq, "ack bit not yet moved");
        @(negedge clk);
        rtm_ans = 0;
        chk(bus_tx == {seq, rtm}, "reply word carries ack bit");
      end else begin
        chk(!rfm_valid, "no message without a new sequence bit");
        if (newmsg) begin
          held_back++;
          seq = ~seq;              // the PLC keeps the word; treat as not sent
        end
        @(negedge clk);
      end
    end
    chk(passed > 50 && held_back > 5, "both paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
