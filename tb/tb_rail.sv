// tb_rail - self-checking test of the FTCP protocol engine.
//
// A directed sequence walks through every negotiation path (TAKE, HAND,
// JOIN, joint control, STOP, bus errors, no-access messages), then random
// messages from both masters follow, mostly with good CRCs. After each
// message the reply records, the ACTION word and the state are compared with
// the reference model of ftcp_ref_pkg, and the answer latency (reply one
// clock edge after the message is taken) is checked. Finally both masters
// send in the same cycle to check that they are served one after the other.
module tb_rail;
  import ftcp_pkg::*;
  import ftcp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rfm_t rfm1, rfm2;
  logic rfm1_valid = 0, rfm2_valid = 0, rfm1_ready, rfm2_ready;
  rtm_t srtm1, srtm2;
  logic srtm1_valid, srtm1_ans, srtm2_valid, srtm2_ans;
  logic [31:0] action;
  logic [47:0] read_data;
  iostate_e st;
  logic ebm1, ebm2;

  rail dut (.*);

  int checks = 0, failures = 0;
  ref_t r;
  int cov_state [8];
  int cov_err_exec = 0, cov_joint_apply = 0, cov_joint_miss = 0, cov_join_ntf = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic compare(input string tag);
    chk(st == r.st, $sformatf("%s state %s exp %s", tag, st.name(), r.st.name()));
    chk(action == r.action, $sformatf("%s action %h exp %h", tag, action, r.action));
    chk(srtm1.message == r.msg[1] && srtm1.data == r.dat[1] && srtm1.crc == rtm_crc(r, 1),
        $sformatf("%s srtm1 %s %h %h exp %s %h", tag, srtm1.message.name(), srtm1.data,
                  srtm1.crc, r.msg[1].name(), r.dat[1]));
    chk(srtm2.message == r.msg[2] && srtm2.data == r.dat[2] && srtm2.crc == rtm_crc(r, 2),
        $sformatf("%s srtm2 %s %h exp %s %h", tag, srtm2.message.name(), srtm2.data,
                  r.msg[2].name(), r.dat[2]));
  endtask

  // Send one message from master m and check the result.
  task automatic send(input int m, input rfm_t x);
    ref_t prev;
    prev = r;
    @(negedge clk);
    if (m == 1) begin rfm1 = x; rfm1_valid = 1; end
    else        begin rfm2 = x; rfm2_valid = 1; end
    @(negedge clk);
    rfm1_valid = 0; rfm2_valid = 0;
    @(negedge clk);
    chk((m == 1) ? srtm1_ans : srtm2_ans, "answer latency");
    chk((m == 1) ? srtm1_valid : srtm2_valid, "reply valid");
    r = ref_step(r, m, x, read_data);
    if (st != r.st || action != r.action) $display("prev state %s msg %s prev act %h data %h crc %h", prev.st.name(), x.message.name(), prev.action, x.data, x.crc);
    compare($sformatf("M%0d %s", m, x.message.name()));
    cov_state[r.st]++;
    if (prev.st >= ST_M1CNTRL && r.st == ST_NONE && x.crc != ref_crc({40'h0, x.data}, 32))
      cov_err_exec++;
    if (prev.st == ST_M1M2CNTRL && x.message == MFM_DATA && x.crc == ref_crc({40'h0, x.data}, 32)) begin
      if (r.action == x.data && r.msg[3-m] == MTM_ACK) cov_joint_apply++;
      else cov_joint_miss++;
    end
    if (r.msg[3-m] == MTM_JOIN && prev.msg[3-m] != MTM_JOIN) begin
      cov_join_ntf++;
      chk((m == 1) ? srtm2_valid : srtm1_valid, "notification valid");
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rfm1 = mk_msg(MFM_STOP, 0, 0);
    rfm2 = mk_msg(MFM_STOP, 0, 0);
    read_data = 48'h1234_5678_9ABC;
    r = ref_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");

    // --- directed ---
    send(1, mk_msg(MFM_REQ, 0, 0));                 // read in init
    chk(srtm1.message == MTM_DATA && srtm1.data == 48'h1234_5678_9ABC, "REQ returns READ");
    send(1, mk_msg(MFM_DATA, 32'h55, 0));           // prohibited in init
    send(1, mk_msg(MFM_TAKE, 0, 0));
    chk(st == ST_M1CNTRL && srtm1.data == ACKTAKE, "M1 takes control");
    send(1, mk_msg(MFM_DATA, 32'hCAFE_0001, 0));
    chk(action == 32'hCAFE_0001, "M1 writes ACTION");
    send(2, mk_msg(MFM_DATA, 32'hDEAD_0002, 0));    // no access
    chk(action == 32'hCAFE_0001, "M2 has no access");
    send(1, mk_msg(MFM_STOP, 0, 0));
    chk(action == 0 && srtm1.data == ACKSTOP, "STOP blocks drives");
    send(1, mk_msg(MFM_DATA, 32'h0000_0F0F, 0));
    send(1, mk_msg(MFM_DATA, 32'h1111_1111, 1));    // bus error
    chk(st == ST_NONE && ebm1, "bus error drops to NONE");
    send(2, mk_msg(MFM_HAND, 0, 0));
    chk(st == ST_M2M1 && srtm2.data == ACKHAND, "M2 hands over");
    send(1, mk_msg(MFM_TAKE, 0, 0));
    chk(st == ST_M1CNTRL, "M1 takes handed control");
    send(1, mk_msg(MFM_INI, 0, 0));
    chk(st == ST_NONE && srtm1.data == ACKINI, "INI restarts init");
    send(1, mk_msg(MFM_HAND, 0, 0));
    send(2, mk_msg(MFM_TAKE, 0, 0));
    chk(st == ST_M2CNTRL, "M2 takes handed control");
    read_data = 48'hAAAA_BBBB_CCCC;
    send(2, mk_msg(MFM_REQ, 0, 0));
    send(2, mk_msg(MFM_DATA, 32'h0000_2222, 0));
    send(2, mk_msg(MFM_JOIN, 0, 0));                // back to init
    send(1, mk_msg(MFM_JOIN, 32'h0, 0));
    chk(st == ST_M1JOIN && srtm2.message == MTM_JOIN, "M1 invites M2");
    send(2, mk_msg(MFM_JOIN, 32'h0, 0));
    chk(st == ST_M1M2CNTRL && srtm2.data == ACKJOIN, "M2 accepts the invitation");
    send(2, mk_msg(MFM_INI, 32'h0, 0));
    send(2, mk_msg(MFM_JOIN, 32'h0, 0));
    send(1, mk_msg(MFM_JOIN, 32'h0, 0));
    chk(st == ST_M1M2CNTRL && srtm1.data == ACKJOIN, "joint control");
    send(1, mk_msg(MFM_DATA, 32'h0000_7777, 0));
    chk(action == 0, "joint data needs agreement");
    send(2, mk_msg(MFM_DATA, 32'h0000_7777, 0));
    chk(action == 32'h7777 && srtm1.data == ACKDATA && srtm2.data == ACKDATA, "joint data applied");
    send(2, mk_msg(MFM_STOP, 32'h0, 0));
    send(1, mk_msg(MFM_TAKE, 32'h0, 0));

    // --- random ---
    for (int i = 0; i < 4000; i++) begin
      int m;
      mfm_e t;
      logic [31:0] d;
      m = 1 + ($urandom % 2);
      t = mfm_e'($urandom % 7);
      if ($urandom % 8 == 0) read_data = {$urandom, $urandom};
      d = ($urandom % 2) ? r.last[3-m] : ($urandom % 4);
      send(m, mk_msg(t, d, ($urandom % 25) == 0));
    end

    // --- simultaneous messages: served one per cycle ---
    begin
      int order [2];
      int n;
      @(negedge clk);
      rfm1 = mk_msg(MFM_REQ, 0, 0); rfm2 = mk_msg(MFM_REQ, 0, 0);
      rfm1_valid = 1; rfm2_valid = 1;
      @(negedge clk);
      rfm1_valid = 0; rfm2_valid = 0;
      n = 0;
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        chk(!(srtm1_ans && srtm2_ans), "one master served per cycle");
        if (srtm1_ans) begin order[n] = 1; n++; end
        if (srtm2_ans) begin order[n] = 2; n++; end
      end
      chk(n == 2, "both simultaneous messages served within two cycles");
      if (n == 2) begin
        r = ref_step(r, order[0], (order[0] == 1) ? rfm1 : rfm2, read_data);
        r = ref_step(r, order[1], (order[1] == 1) ? rfm1 : rfm2, read_data);
        compare("simultaneous");
      end
    end

    for (int s = 0; s < 8; s++) begin
      chk(cov_state[s] > 0, $sformatf("state %0d reached", s));
      $display("state %s reached %0d times", iostate_e'(s), cov_state[s]);
    end
    $display("bus errors in execution %0d, joint data applied %0d, joint mismatch %0d, join invitations %0d",
             cov_err_exec, cov_joint_apply, cov_joint_miss, cov_join_ntf);
    chk(cov_err_exec > 0 && cov_joint_apply > 0 && cov_joint_miss > 0 && cov_join_ntf > 0,
        "mechanism coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
