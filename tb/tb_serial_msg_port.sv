// tb_serial_msg_port - self-checking test of the master 1 serial framing.
//
// A behavioural PC in the testbench sends 6-byte message frames on rxd
// (8N1 characters, CLKS_PER_BIT clocks per bit) and decodes every character
// that appears on txd. Checks: received records equal the frames sent and
// arrive within one bit time of the last stop bit; a character with a bad
// stop bit or a long pause discards the partial frame and the receiver
// recovers; a frame is held while rfm_ready is low; every reply update is
// sent as an 8-byte frame with the answer flag, and an update arriving
// during transmission replaces an older waiting one; a frame takes 80 bit
// times on the line.
module tb_serial_msg_port;
  import ftcp_pkg::*;
  import ftcp_ref_pkg::*;

  localparam int CPB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rxd = 1, txd, rfm_valid, rfm_ready = 1, rtm_valid = 0, rtm_ans = 0, frame_err;
  rfm_t rfm;
  rtm_t rtm;

  serial_msg_port #(.CLKS_PER_BIT(CPB), .GAP_BITS(30)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // PC transmitter
  task automatic pc_byte(input logic [7:0] b, input bit bad_stop = 0);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = !bad_stop; repeat (CPB) @(negedge clk);
    rxd = 1;
  endtask

  task automatic pc_frame(input rfm_t x);
    logic [47:0] f;
    f = {5'b0, x.message, x.data, x.crc};
    for (int i = 5; i >= 0; i--) pc_byte(f[8*i +: 8]);
  endtask

  // PC receiver
  logic [7:0] got_q[$];
  longint first_edge = -1, last_stop = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    wait (rst_n);
    forever begin
      logic [7:0] b;
      @(negedge txd);
      if (first_edge < 0) first_edge = cyc;
      repeat (CPB / 2) @(negedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = txd; end
      repeat (CPB) @(negedge clk);
      chk(txd == 1, "stop bit on txd");
      got_q.push_back(b);
      last_stop = cyc;
    end
  end

  // records seen by the engine
  rfm_t seen_q[$];
  longint seen_cyc;
  always @(posedge clk) if (rst_n && rfm_valid) begin seen_q.push_back(rfm); seen_cyc = cyc; end

  task automatic expect_reply(input rtm_t x, input bit ans);
    logic [63:0] f;
    int w;
    w = 0;
    while (got_q.size() < 8 && w < 200 * CPB) begin @(negedge clk); w++; end
    chk(got_q.size() >= 8, "reply frame received");
    if (got_q.size() >= 8) begin
      for (int i = 0; i < 8; i++) f = {f[55:0], got_q.pop_front()};
      chk(f == {ans, 5'b0, x.message, x.data, x.crc}, $sformatf("reply frame %h", f));
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rfm_t m;
    rtm_t a, b, c;
    rtm = '{message: MTM_ERROR, data: '0, crc: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // plain frames
    for (int i = 0; i < 20; i++) begin
      longint t_end;
      m = mk_msg(mfm_e'($urandom % 7), $urandom, $urandom % 2);
      pc_frame(m);
      t_end = cyc;
      repeat (2 * CPB) @(negedge clk);
      chk(seen_q.size() == 1 && seen_q[0] == m, "frame received");
      chk(seen_cyc <= t_end, "record ready by the end of the stop bit");
      seen_q.delete();
      repeat ($urandom % (3 * CPB)) @(negedge clk);
    end

    // bad stop bit inside a frame: frame dropped, next one received
    m = mk_msg(MFM_DATA, 32'h1234_5678, 0);
    pc_byte({5'b0, MFM_DATA}); pc_byte(8'h12); pc_byte(8'h34, 1);
    chk(frame_err === 1'b0, "frame_err is a pulse");
    pc_frame(m);
    repeat (2 * CPB) @(negedge clk);
    chk(seen_q.size() == 1 && seen_q[0] == m, "recovery after framing error");
    seen_q.delete();

    // lost bytes: pause resynchronises
    pc_byte(8'h05); pc_byte(8'hAA); pc_byte(8'hBB);
    repeat (40 * CPB) @(negedge clk);
    m = mk_msg(MFM_REQ, 32'h0, 0);
    pc_frame(m);
    repeat (2 * CPB) @(negedge clk);
    chk(seen_q.size() == 1 && seen_q[0] == m, "recovery after a pause");
    seen_q.delete();

    // engine not ready: frame held
    rfm_ready = 0;
    m = mk_msg(MFM_TAKE, 32'h0, 0);
    pc_frame(m);
    repeat (5 * CPB) @(negedge clk);
    chk(seen_q.size() == 0, "held while not ready");
    rfm_ready = 1;
    repeat (3) @(negedge clk);
    chk(seen_q.size() == 1 && seen_q[0] == m, "released when ready");
    seen_q.delete();

    // replies
    a = '{message: MTM_ACK,  data: ACKTAKE, crc: 8'h5A};
    b = '{message: MTM_JOIN, data: 48'h0000_0000_0001, crc: 8'h11};
    c = '{message: MTM_DATA, data: 48'hABCD_EF01_2345, crc: 8'h99};
    first_edge = -1;
    @(negedge clk); rtm = a; rtm_valid = 1; rtm_ans = 1;
    @(negedge clk); rtm_valid = 0; rtm_ans = 0;
    repeat (10 * CPB) @(negedge clk);
    @(negedge clk); rtm = b; rtm_valid = 1;     // waits behind a
    @(negedge clk); rtm_valid = 0;
    repeat (5 * CPB) @(negedge clk);
    @(negedge clk); rtm = c; rtm_valid = 1; rtm_ans = 1;   // replaces b
    @(negedge clk); rtm_valid = 0; rtm_ans = 0;
    expect_reply(a, 1);
    chk(last_stop - first_edge >= 80 * CPB - CPB && last_stop - first_edge <= 80 * CPB + 4,
        $sformatf("frame length %0d cycles", last_stop - first_edge));
    expect_reply(c, 1);
    repeat (100 * CPB) @(negedge clk);
    chk(got_q.size() == 0, "replaced reply not sent");
    @(negedge clk); rtm = b; rtm_valid = 1;
    @(negedge clk); rtm_valid = 0;
    expect_reply(b, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
