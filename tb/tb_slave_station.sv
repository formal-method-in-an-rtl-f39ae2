// tb_slave_station - end-to-end test of the slave station.
//
// The testbench plays all three neighbours of the slave station:
//  * master 1 (PC) sends 6-byte frames over the serial line (8N1 characters
//    at the station's default bit time), decodes the 8-byte reply frames and
//    waits for the one flagged as the answer to its message;
//  * master 2 (PLC) writes {seq, message} words on its bus outputs, toggling
//    seq per message, and waits until the reply word read back over the bus
//    carries the same sequence bit;
//  * the railway model presents random sensor words and receives the drive
//    word through the railway SPI/PSI module.
// Every message is also applied to the reference model of ftcp_ref_pkg;
// after the scans have settled, the state, both reply records (master 2's
// as seen on the bus), and the drive outputs are compared with it. Each
// protocol mechanism (take-over, hand-over, joint control with agreeing and
// disagreeing data, STOP, measurement requests over both links, rejected
// access, prohibited messages, bus errors) is counted and must occur.
// The station is used with its default sizes.
module tb_slave_station;
  import ftcp_pkg::*;
  import ftcp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              m1_rxd = 1, m1_txd, m1_frame_err;
  logic [RFM_W:0]    plc_to_slave;
  logic [RTM_W:0]    slave_to_plc;
  logic [READ_W-1:0] rail_sensors;
  logic [DATA_W-1:0] rail_drives;
  iostate_e          st;
  logic              ebm1, ebm2;

  slave_station dut (.*);

  localparam int CPB = 434;          // the station's default bit time

  // ---------------- PC (master 1) serial model ----------------
  task automatic pc_byte(input logic [7:0] b, input bit bad_stop = 0);
    m1_rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin m1_rxd = b[i]; repeat (CPB) @(negedge clk); end
    m1_rxd = !bad_stop; repeat (CPB) @(negedge clk);
    m1_rxd = 1;
  endtask

  task automatic pc_frame(input rfm_t x);
    logic [47:0] f;
    f = {5'b0, x.message, x.data, x.crc};
    for (int i = 5; i >= 0; i--) pc_byte(f[8*i +: 8]);
  endtask

  rtm_t   pc_reply;                  // last reply frame received
  int     pc_answers = 0, pc_notes = 0, pc_bytes = 0, n_ferr = 0;
  longint pc_last_activity = 0;
  always @(posedge clk) if (rst_n && m1_frame_err) n_ferr++;
  always @(posedge clk) if (!m1_txd) pc_last_activity = cycles;  // start or 0 bits
  initial begin
    logic [63:0] f;
    pc_reply = '{message: MTM_ERROR, data: '0, crc: 8'h00};
    wait (rst_n);
    forever begin
      logic [7:0] b;
      @(negedge m1_txd);
      repeat (CPB / 2) @(negedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = m1_txd; end
      repeat (CPB) @(negedge clk);
      f = {f[55:0], b};
      pc_bytes++;
      if (pc_bytes % 8 == 0) begin
        pc_reply = '{message: mtm_e'(f[57:56]), data: f[55:8], crc: f[7:0]};
        if (f[63]) pc_answers++; else pc_notes++;
      end
    end
  end

  int checks = 0, failures = 0;
  ref_t r;
  logic plc_seq = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_take1, n_take2, n_hand, n_joint, n_joint_apply, n_joint_miss, n_stop,
      n_req1, n_req2, n_noaccess, n_prohib, n_buserr, n_drive;
  int max_m2_latency = 0, max_m1_latency = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic settle_and_compare(input string tag);
    rtm_t bus_rtm;
    repeat (2 * 61 + 2 * 50 + 4) @(negedge clk);
    // let any reply frame to master 1 finish
    while (m1_txd == 0 || cycles - pc_last_activity < 12 * CPB) @(negedge clk);
    bus_rtm = rtm_t'(slave_to_plc[RTM_W-1:0]);
    chk(st == r.st, $sformatf("%s state %s exp %s", tag, st.name(), r.st.name()));
    chk(rail_drives == r.action, $sformatf("%s drives %h exp %h", tag, rail_drives, r.action));
    chk(pc_bytes % 8 == 0, "whole reply frames on the serial line");
    chk(pc_reply.message == r.msg[1] && pc_reply.data == r.dat[1] && pc_reply.crc == rtm_crc(r, 1),
        $sformatf("%s reply to M1 %s %h exp %s %h", tag, pc_reply.message.name(), pc_reply.data,
                  r.msg[1].name(), r.dat[1]));
    chk(bus_rtm.message == r.msg[2] && bus_rtm.data == r.dat[2] && bus_rtm.crc == rtm_crc(r, 2),
        $sformatf("%s reply to M2 %s %h exp %s %h", tag, bus_rtm.message.name(), bus_rtm.data,
                  r.msg[2].name(), r.dat[2]));
  endtask

  task automatic count(input ref_t p, input int m, input rfm_t x);
    bit err;
    err = (x.crc != ref_crc({40'h0, x.data}, 32));
    if (!err && x.message == MFM_TAKE && r.st == ST_M1CNTRL && p.st != ST_M1CNTRL) n_take1++;
    if (!err && x.message == MFM_TAKE && r.st == ST_M2CNTRL && p.st != ST_M2CNTRL) n_take2++;
    if (!err && x.message == MFM_TAKE && (p.st == ST_M1M2 || p.st == ST_M2M1) && r.st >= ST_M1CNTRL) n_hand++;
    if (r.st == ST_M1M2CNTRL && p.st != ST_M1M2CNTRL) n_joint++;
    if (!err && p.st == ST_M1M2CNTRL && x.message == MFM_DATA) begin
      if (r.msg[3-m] == MTM_ACK && r.dat[3-m] == ACKDATA && r.action == x.data) n_joint_apply++;
      else n_joint_miss++;
    end
    if (!err && x.message == MFM_STOP && p.st >= ST_M1CNTRL && r.dat[m] == ACKSTOP) n_stop++;
    if (!err && x.message == MFM_REQ && m == 1) n_req1++;
    if (!err && x.message == MFM_REQ && m == 2) n_req2++;
    if (!err && p.st == ((m == 1) ? ST_M2CNTRL : ST_M1CNTRL)) n_noaccess++;
    if (!err && p.st <= ST_M2JOIN && (x.message == MFM_STOP || x.message == MFM_DATA)) n_prohib++;
    if (err) n_buserr++;
    if (r.action != p.action) n_drive++;
  endtask

  task automatic send1(input rfm_t x);
    ref_t p;
    int w;
    int a0;
    p = r;
    a0 = pc_answers;
    pc_frame(x);
    w = 0;
    while (pc_answers == a0 && w < 100 * CPB) begin @(negedge clk); w++; end
    chk(w < 100 * CPB, "master 1 answered over the serial line");
    if (w > max_m1_latency) max_m1_latency = w;
    r = ref_step(r, 1, x, rail_sensors);
    count(p, 1, x);
    settle_and_compare($sformatf("M1 %s", x.message.name()));
  endtask

  task automatic send2(input rfm_t x);
    ref_t p;
    int w;
    p = r;
    plc_seq = ~plc_seq;
    plc_to_slave = {plc_seq, x};
    w = 0;
    while (slave_to_plc[RTM_W] != plc_seq && w < 1000) begin @(negedge clk); w++; end
    chk(w < 1000, "master 2 answered over the bus");
    if (w > max_m2_latency) max_m2_latency = w;
    r = ref_step(r, 2, x, rail_sensors);
    count(p, 2, x);
    settle_and_compare($sformatf("M2 %s", x.message.name()));
  endtask

  task automatic send(input int m, input rfm_t x);
    if (m == 1) send1(x); else send2(x);
  endtask

  task automatic new_sensors();
    rail_sensors = {$urandom, $urandom};
    repeat (2 * 50 + 2) @(negedge clk);   // two railway scans
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {n_take1, n_take2, n_hand, n_joint, n_joint_apply, n_joint_miss, n_stop,
     n_req1, n_req2, n_noaccess, n_prohib, n_buserr, n_drive} = '0;
    plc_to_slave = '0;
    rail_sensors = 48'h0123_4567_89AB;
    r = ref_reset();
    repeat (4) @(negedge clk);
    rst_n = 1;
    settle_and_compare("reset");

    // directed walk through the protocol
    send(1, mk_msg(MFM_REQ, 0, 0));
    chk(pc_reply.data == 48'h0123_4567_89AB, "M1 reads sensors");
    send(2, mk_msg(MFM_DATA, 32'h99, 0));             // prohibited in init
    send(1, mk_msg(MFM_TAKE, 0, 0));
    send(1, mk_msg(MFM_DATA, 32'hA5A5_0001, 0));
    chk(rail_drives == 32'hA5A5_0001, "drives follow M1 DATA");
    send(2, mk_msg(MFM_DATA, 32'h0BAD_0BAD, 0));      // no access
    new_sensors();
    send(2, mk_msg(MFM_REQ, 0, 0));                   // M2 may read during M1 control
    send(1, mk_msg(MFM_STOP, 0, 0));
    chk(rail_drives == 0, "STOP blocks all drives");
    send(1, mk_msg(MFM_DATA, 32'h0000_00FF, 0));
    send(1, mk_msg(MFM_DATA, 32'h0000_0001, 1));      // corrupted
    chk(st == ST_NONE, "bus error returns to initialisation");
    send(1, mk_msg(MFM_HAND, 0, 0));
    send(2, mk_msg(MFM_TAKE, 0, 0));
    chk(st == ST_M2CNTRL, "M2 takes the offered control");
    send(2, mk_msg(MFM_DATA, 32'h1234_0002, 0));
    chk(rail_drives == 32'h1234_0002, "drives follow M2 DATA");
    send(2, mk_msg(MFM_INI, 0, 0));
    send(2, mk_msg(MFM_JOIN, 0, 0));
    send(1, mk_msg(MFM_JOIN, 0, 0));
    chk(st == ST_M1M2CNTRL, "joint control");
    send(1, mk_msg(MFM_DATA, 32'h0000_5555, 0));
    send(2, mk_msg(MFM_DATA, 32'h0000_5555, 0));
    chk(rail_drives == 32'h5555, "joint DATA applied on agreement");
    send(2, mk_msg(MFM_DATA, 32'h0000_6666, 0));
    chk(rail_drives == 32'h5555, "joint DATA held on disagreement");
    send(2, mk_msg(MFM_REQ, 0, 1));                   // corrupted in joint control

    // a character with a bad stop bit on the serial line drops the frame
    begin
      int a0;
      a0 = pc_answers;
      pc_byte({5'b0, MFM_INI}); pc_byte(8'h00, 1);
      repeat (40 * 10 * CPB) @(negedge clk);
      chk(pc_answers == a0 && n_ferr == 1, "broken serial frame ignored");
      settle_and_compare("serial framing error");
    end

    // random traffic over both links
    for (int i = 0; i < 250; i++) begin
      int m;
      if (i % 10 == 0) new_sensors();
      m = 1 + ($urandom % 2);
      send(m, mk_msg(mfm_e'($urandom % 7), ($urandom % 2) ? r.last[3-m] : ($urandom % 4),
                     ($urandom % 20) == 0));
    end

    $display("take M1 %0d, take M2 %0d, hand-over %0d, joint control %0d, joint data applied %0d, joint data refused %0d",
             n_take1, n_take2, n_hand, n_joint, n_joint_apply, n_joint_miss);
    $display("stop %0d, REQ M1 %0d, REQ M2 %0d, no access %0d, prohibited %0d, bus errors %0d, drive changes %0d",
             n_stop, n_req1, n_req2, n_noaccess, n_prohib, n_buserr, n_drive);
    $display("longest round trip: master 1 %0d cycles after its frame, master 2 %0d cycles; %0d cycles in all",
             max_m1_latency, max_m2_latency, cycles);
    $display("serial reply frames: %0d answers, %0d notifications, %0d framing errors", pc_answers, pc_notes, n_ferr);
    chk(pc_notes > 0, "notification frame to master 1 happened");
    chk(n_ferr > 0, "serial framing error happened");
    chk(n_take1 > 0, "take-over by M1 happened");
    chk(n_take2 > 0, "take-over by M2 happened");
    chk(n_hand > 0, "hand-over happened");
    chk(n_joint > 0, "joint control happened");
    chk(n_joint_apply > 0, "joint DATA applied");
    chk(n_joint_miss > 0, "joint DATA refused");
    chk(n_stop > 0, "STOP happened");
    chk(n_req1 > 0 && n_req2 > 0, "REQ over both links");
    chk(n_noaccess > 0, "access refused");
    chk(n_prohib > 0, "prohibited message");
    chk(n_buserr > 0, "bus error");
    chk(n_drive > 0, "drive word changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
