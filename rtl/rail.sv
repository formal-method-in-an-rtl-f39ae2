// rail - FTCP slave protocol engine of the railway slave station.
//
// The slave station is controlled by two masters (master 1: a PC on a serial
// line, master 2: a PLC on a parallel bus). Operation has two phases. In the
// initialisation phase (states NONE..M2JOIN) the masters negotiate who
// controls the model: one master takes control (TAKE), hands it to the other
// (HAND) or both ask for joint control (JOIN). In the execution phase
// (M1CNTRL, M2CNTRL, M1M2CNTRL) the controlling master(s) write the 32-bit
// ACTION word (DATA), block all drives (STOP) and read the 48-bit
// measurement word (REQ). A message whose CRC does not match its data is a
// bus error; in the execution phase it drops the slave back to NONE.
//
// How it works. The decision table for one message follows the protocol's
// slave behaviour for master 1; master 2 is served by the same table with
// the roles of the masters exchanged (M1M2<->M2M1, M1JOIN<->M2JOIN,
// M1CNTRL<->M2CNTRL). To use one table, the state is mapped into the view of
// the master being served ("me"/"other"), the table is applied, and the
// result is mapped back. Reply records keep their previous content wherever
// the table leaves them alone, and the CRC of a reply is always the CRC of
// its data field.
//
// Choices of this design, where the protocol description is silent or
// describes an event-driven model rather than clocked hardware:
//  * Each master presents a message with a one-cycle valid pulse; the
//    message is held in a register. A message is served one clock later at
//    the earliest. Messages of both masters that are pending together are
//    served one per cycle, alternating priority, so that the shared state is
//    updated by one master at a time.
//  * In joint control (M1M2CNTRL) STOP, INI, TAKE, HAND, JOIN and REQ act as
//    they do in single control, and DATA is applied only when its data equals
//    the data of the other master's last message.
//  * Message header codes outside the enumeration are treated like the
//    prohibited messages: no state change.
//
// Interface (clk rising edge, rst_n active-low synchronous):
//   rfmN, rfmN_valid, rfmN_ready : message from master N; valid must only be
//                                  raised while ready is high.
//   srtmN                        : current reply record to master N.
//   srtmN_valid                  : one-cycle pulse when srtmN has been
//                                  updated (answer or notification).
//   srtmN_ans                    : one-cycle pulse when master N's own
//                                  message has been served.
//   action                       : ACTION word to the model (0 after reset).
//   read_data                    : READ word, measurement values.
//   st, ebm1, ebm2               : slave state, CRC error flags of the held
//                                  messages.
// Latency: a message accepted at edge k is answered at edge k+1 (k+2 if the
// other master's message is served first).
module rail
  import ftcp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  rfm_t                rfm1,
  input  logic                rfm1_valid,
  output logic                rfm1_ready,
  input  rfm_t                rfm2,
  input  logic                rfm2_valid,
  output logic                rfm2_ready,
  output rtm_t                srtm1,
  output logic                srtm1_valid,
  output logic                srtm1_ans,
  output rtm_t                srtm2,
  output logic                srtm2_valid,
  output logic                srtm2_ans,
  output logic [DATA_W-1:0]   action,
  input  logic [READ_W-1:0]   read_data,
  output iostate_e            st,
  output logic                ebm1,
  output logic                ebm2
);

  // ---------------------------------------------------------------------
  // Held messages and arbitration
  // ---------------------------------------------------------------------
  rfm_t rfm1_q, rfm2_q;
  logic pend1, pend2;
  logic prio2;            // 1: master 2 wins when both are pending
  logic serve1, serve2;

  assign serve1 = pend1 && (!pend2 || !prio2);
  assign serve2 = pend2 && (!pend1 ||  prio2);

  assign rfm1_ready = !pend1;
  assign rfm2_ready = !pend2;

  // CRC check of the held messages (bus error flags EBM1 / EBM2).
  logic [7:0] crc_rfm1, crc_rfm2;
  crc8 #(.W(DATA_W)) u_crc_rfm1 (.data(rfm1_q.data), .crc(crc_rfm1));
  crc8 #(.W(DATA_W)) u_crc_rfm2 (.data(rfm2_q.data), .crc(crc_rfm2));
  assign ebm1 = (rfm1_q.crc != crc_rfm1);
  assign ebm2 = (rfm2_q.crc != crc_rfm2);

  // ---------------------------------------------------------------------
  // State
  // ---------------------------------------------------------------------
  iostate_e              state_q;
  logic [DATA_W-1:0]     action_q;
  mtm_e                  msg1_q, msg2_q;
  logic [READ_W-1:0]     dat1_q, dat2_q;

  // Exchange the roles of master 1 and master 2 in a state value.
  function automatic iostate_e swap_roles(input iostate_e s);
    case (s)
      ST_M1M2:    return ST_M2M1;
      ST_M2M1:    return ST_M1M2;
      ST_M1JOIN:  return ST_M2JOIN;
      ST_M2JOIN:  return ST_M1JOIN;
      ST_M1CNTRL: return ST_M2CNTRL;
      ST_M2CNTRL: return ST_M1CNTRL;
      default:    return s;
    endcase
  endfunction

  // Decision table, written in the view of the served master ("me" is
  // master 1 of the state encoding).
  rfm_t              m_me;       // message being served
  logic              m_err;      // its bus error flag
  logic [DATA_W-1:0] m_oth_data; // data of the other master's last message
  iostate_e          s_loc, ns_loc;
  mtm_e              me_msg, oth_msg;
  logic [READ_W-1:0] me_dat, oth_dat;
  logic [DATA_W-1:0] act_n;

  always_comb begin
    m_me       = serve2 ? rfm2_q : rfm1_q;
    m_err      = serve2 ? ebm2   : ebm1;
    m_oth_data = serve2 ? rfm1_q.data : rfm2_q.data;
    s_loc      = serve2 ? swap_roles(state_q) : state_q;
    me_msg     = serve2 ? msg2_q : msg1_q;
    me_dat     = serve2 ? dat2_q : dat1_q;
    oth_msg    = serve2 ? msg1_q : msg2_q;
    oth_dat    = serve2 ? dat1_q : dat2_q;
    ns_loc     = s_loc;
    act_n      = action_q;

    if (s_loc <= ST_M2JOIN) begin
      // Initialisation phase
      me_msg  = MTM_ERROR;
      oth_msg = MTM_ERROR;
      act_n   = '0;
      if (!m_err) begin
        case (m_me.message)
          MFM_INI: begin
            me_msg = MTM_ACK; me_dat = ACKINI;
            ns_loc = ST_NONE;
          end
          MFM_REQ: begin
            me_msg = MTM_DATA; me_dat = read_data;
          end
          MFM_TAKE: begin
            if (s_loc == ST_NONE || s_loc == ST_M2M1) begin
              ns_loc = ST_M1CNTRL;
              me_msg = MTM_ACK; me_dat = ACKTAKE;
            end else begin
              ns_loc = ST_NONE;
            end
          end
          MFM_HAND: begin
            if (s_loc == ST_NONE) begin
              ns_loc = ST_M1M2;
              me_msg = MTM_ACK; me_dat = ACKHAND;
            end else begin
              ns_loc = ST_NONE;
            end
          end
          MFM_JOIN: begin
            if (s_loc == ST_M2JOIN) begin
              ns_loc = ST_M1M2CNTRL;
              me_msg = MTM_ACK; me_dat = ACKJOIN;
            end else begin
              oth_msg = MTM_JOIN;   // invite the other master to join
              ns_loc  = ST_M1JOIN;
            end
          end
          default: ;  // STOP, DATA: prohibited in this phase
        endcase
      end
    end else if (m_err) begin
      // Bus error during execution: back to initialisation.
      ns_loc = ST_NONE;
    end else if (s_loc == ST_M1CNTRL || s_loc == ST_M1M2CNTRL) begin
      case (m_me.message)
        MFM_STOP: begin
          act_n  = '0;
          me_msg = MTM_ACK; me_dat = ACKSTOP;
        end
        MFM_INI: begin
          me_msg = MTM_ACK; me_dat = ACKINI;
          ns_loc = ST_NONE;
        end
        MFM_TAKE, MFM_HAND, MFM_JOIN: ns_loc = ST_NONE;
        MFM_REQ: begin
          me_msg = MTM_DATA; me_dat = read_data;
        end
        MFM_DATA: begin
          if (s_loc == ST_M1CNTRL) begin
            act_n  = m_me.data;
            me_msg = MTM_ACK; me_dat = ACKDATA;
          end else if (m_me.data == m_oth_data) begin
            act_n   = m_me.data;
            me_msg  = MTM_ACK; me_dat  = ACKDATA;
            oth_msg = MTM_ACK; oth_dat = ACKDATA;
          end
        end
        default: ;
      endcase
    end
    // else: the other master controls the model; this master has no access
    // right and nothing changes.
  end

  // Map the result back to master 1 / master 2.
  iostate_e          ns;
  mtm_e              n_msg1, n_msg2;
  logic [READ_W-1:0] n_dat1, n_dat2;
  logic              any_serve;

  assign any_serve = serve1 || serve2;

  always_comb begin
    ns     = state_q;
    n_msg1 = msg1_q;  n_dat1 = dat1_q;
    n_msg2 = msg2_q;  n_dat2 = dat2_q;
    if (any_serve) begin
      ns = serve2 ? swap_roles(ns_loc) : ns_loc;
      if (serve2) begin
        n_msg2 = me_msg;  n_dat2 = me_dat;
        n_msg1 = oth_msg; n_dat1 = oth_dat;
      end else begin
        n_msg1 = me_msg;  n_dat1 = me_dat;
        n_msg2 = oth_msg; n_dat2 = oth_dat;
      end
    end
  end

  logic [7:0] n_crc1, n_crc2;
  crc8 #(.W(READ_W)) u_crc_rtm1 (.data(n_dat1), .crc(n_crc1));
  crc8 #(.W(READ_W)) u_crc_rtm2 (.data(n_dat2), .crc(n_crc2));

  logic [7:0] crc1_q, crc2_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rfm1_q      <= '{message: MFM_STOP, data: '0, crc: '0};
      rfm2_q      <= '{message: MFM_STOP, data: '0, crc: '0};
      pend1       <= 1'b0;
      pend2       <= 1'b0;
      prio2       <= 1'b0;
      state_q     <= ST_NONE;
      action_q    <= '0;
      msg1_q      <= MTM_ERROR;
      msg2_q      <= MTM_ERROR;
      dat1_q      <= '0;
      dat2_q      <= '0;
      crc1_q      <= '0;
      crc2_q      <= '0;
      srtm1_valid <= 1'b0;
      srtm2_valid <= 1'b0;
      srtm1_ans   <= 1'b0;
      srtm2_ans   <= 1'b0;
    end else begin
      // Accept new messages; a served message leaves its pending slot.
      if (rfm1_valid) begin
        rfm1_q <= rfm1;
        pend1  <= 1'b1;
      end else if (serve1) begin
        pend1  <= 1'b0;
      end
      if (rfm2_valid) begin
        rfm2_q <= rfm2;
        pend2  <= 1'b1;
      end else if (serve2) begin
        pend2  <= 1'b0;
      end
      if (any_serve) prio2 <= serve1;  // the other master goes first next time

      state_q  <= ns;
      if (any_serve) action_q <= act_n;
      if (any_serve) begin
        msg1_q <= n_msg1;  dat1_q <= n_dat1;  crc1_q <= n_crc1;
        msg2_q <= n_msg2;  dat2_q <= n_dat2;  crc2_q <= n_crc2;
      end
      srtm1_ans   <= serve1;
      srtm2_ans   <= serve2;
      srtm1_valid <= serve1 || (serve2 && (n_msg1 != msg1_q || n_dat1 != dat1_q));
      srtm2_valid <= serve2 || (serve1 && (n_msg2 != msg2_q || n_dat2 != dat2_q));
    end
  end

  assign action = action_q;
  assign st     = state_q;
  assign srtm1  = '{message: msg1_q, data: dat1_q, crc: crc1_q};
  assign srtm2  = '{message: msg2_q, data: dat2_q, crc: crc2_q};

  // Handshake rules: a master may not overwrite a message still pending.
  a_m1_ready: assert property (@(posedge clk) disable iff (!rst_n)
                               rfm1_valid |-> rfm1_ready);
  a_m2_ready: assert property (@(posedge clk) disable iff (!rst_n)
                               rfm2_valid |-> rfm2_ready);
  a_one_served: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(serve1 && serve2));

endmodule
