// ftcp_ref_pkg - reference model of the FTCP slave for the testbenches.
//
// Written independently of the RTL: the CRC is computed by polynomial long
// division of data * x^8, and the slave's decision table is spelled out per
// master instead of by exchanging roles. ref_step() applies one message of
// master m (1 or 2) to the model state.
package ftcp_ref_pkg;
  import ftcp_pkg::*;

  // Remainder of (d * x^8) divided by x^8 + x^2 + x + 1, d up to 72 bits.
  function automatic logic [7:0] ref_crc(input logic [71:0] d, input int w);
    logic [79:0] v;
    v = {d, 8'h00};
    for (int i = w + 7; i >= 8; i--)
      if (v[i]) v[i -: 9] = v[i -: 9] ^ 9'h107;
    return v[7:0];
  endfunction

  typedef struct {
    iostate_e          st;
    logic [31:0]       action;
    mtm_e              msg  [1:2];
    logic [47:0]       dat  [1:2];
    logic [31:0]       last [1:2];   // data of each master's last message
  } ref_t;

  function automatic ref_t ref_reset();
    ref_t r;
    r.st = ST_NONE;
    r.action = '0;
    for (int i = 1; i <= 2; i++) begin
      r.msg[i] = MTM_ERROR; r.dat[i] = '0; r.last[i] = '0;
    end
    return r;
  endfunction

  function automatic logic [7:0] rtm_crc(input ref_t r, input int i);
    return ref_crc({24'h0, r.dat[i]}, 48);
  endfunction

  function automatic ref_t ref_step(input ref_t r, input int m, input rfm_t x,
                                    input logic [47:0] rd);
    int o;
    logic err;
    iostate_e my_cntrl, ot_cntrl, my_hand, ot_hand, my_join, ot_join;
    o   = 3 - m;
    r.last[m] = x.data;
    err = (x.crc != ref_crc({40'h0, x.data}, 32));
    my_cntrl = (m == 1) ? ST_M1CNTRL : ST_M2CNTRL;
    ot_cntrl = (m == 1) ? ST_M2CNTRL : ST_M1CNTRL;
    my_hand  = (m == 1) ? ST_M1M2    : ST_M2M1;
    ot_hand  = (m == 1) ? ST_M2M1    : ST_M1M2;
    my_join  = (m == 1) ? ST_M1JOIN  : ST_M2JOIN;
    ot_join  = (m == 1) ? ST_M2JOIN  : ST_M1JOIN;

    if (r.st inside {ST_NONE, ST_M1M2, ST_M2M1, ST_M1JOIN, ST_M2JOIN}) begin
      r.msg[1] = MTM_ERROR;
      r.msg[2] = MTM_ERROR;
      r.action = '0;
      if (!err) begin
        if (x.message == MFM_INI) begin
          r.msg[m] = MTM_ACK; r.dat[m] = ACKINI; r.st = ST_NONE;
        end else if (x.message == MFM_REQ) begin
          r.msg[m] = MTM_DATA; r.dat[m] = rd;
        end else if (x.message == MFM_TAKE) begin
          if (r.st == ST_NONE || r.st == ot_hand) begin
            r.st = my_cntrl; r.msg[m] = MTM_ACK; r.dat[m] = ACKTAKE;
          end else r.st = ST_NONE;
        end else if (x.message == MFM_HAND) begin
          if (r.st == ST_NONE) begin
            r.st = my_hand; r.msg[m] = MTM_ACK; r.dat[m] = ACKHAND;
          end else r.st = ST_NONE;
        end else if (x.message == MFM_JOIN) begin
          if (r.st == ot_join) begin
            r.st = ST_M1M2CNTRL; r.msg[m] = MTM_ACK; r.dat[m] = ACKJOIN;
          end else begin
            r.msg[o] = MTM_JOIN; r.st = my_join;
          end
        end
      end
    end else if (err) begin
      r.st = ST_NONE;
    end else if (r.st == ot_cntrl) begin
      // no access right
    end else begin
      unique case (x.message)
        MFM_STOP: begin r.action = '0; r.msg[m] = MTM_ACK; r.dat[m] = ACKSTOP; end
        MFM_INI:  begin r.msg[m] = MTM_ACK; r.dat[m] = ACKINI; r.st = ST_NONE; end
        MFM_TAKE, MFM_HAND, MFM_JOIN: r.st = ST_NONE;
        MFM_REQ:  begin r.msg[m] = MTM_DATA; r.dat[m] = rd; end
        MFM_DATA: begin
          if (r.st == my_cntrl) begin
            r.action = x.data; r.msg[m] = MTM_ACK; r.dat[m] = ACKDATA;
          end else if (x.data == r.last[o]) begin
            r.action = x.data;
            r.msg[1] = MTM_ACK; r.dat[1] = ACKDATA;
            r.msg[2] = MTM_ACK; r.dat[2] = ACKDATA;
          end
        end
        default: ;
      endcase
    end
    return r;
  endfunction

  function automatic rfm_t mk_msg(input mfm_e t, input logic [31:0] d, input bit corrupt);
    rfm_t x;
    x.message = t;
    x.data    = d;
    x.crc     = ref_crc({40'h0, d}, 32) ^ (corrupt ? 8'h01 : 8'h00);
    return x;
  endfunction

endpackage
