// ftcp_pkg - shared types and constants of the Fault Tolerant Control
// Protocol (FTCP) that links the slave station of the railway control
// system with its two master stations.
//
// The message headers, the slave state set, the record layouts and the
// acknowledge words follow the protocol definition: a master-to-slave
// message carries a header, a 32-bit data word and an 8-bit CRC; a
// slave-to-master message carries a header, a 48-bit data word and an
// 8-bit CRC. Enumeration values are numbered in declaration order, as the
// slave state machine relies on that order (every state up to and including
// M2JOIN belongs to the initialisation phase). The numeric encodings, the
// field order inside the packed records and the CRC polynomial are choices
// of this design.
package ftcp_pkg;

  localparam int DATA_W = 32;  // data field of a master-to-slave message / ACTION
  localparam int READ_W = 48;  // data field of a slave-to-master message / READ
  localparam int CRC_W  = 8;

  // CRC-8, generator x^8 + x^2 + x + 1, initial value 0, MSB first.
  localparam logic [CRC_W-1:0] CRC_POLY = 8'h07;

  // Header of a message from a master to the slave (T_MFM).
  typedef enum logic [2:0] {
    MFM_STOP = 3'd0,
    MFM_INI  = 3'd1,
    MFM_TAKE = 3'd2,
    MFM_HAND = 3'd3,
    MFM_JOIN = 3'd4,
    MFM_REQ  = 3'd5,
    MFM_DATA = 3'd6
  } mfm_e;

  // Header of a message from the slave to a master (T_MTM).
  typedef enum logic [1:0] {
    MTM_ERROR = 2'd0,
    MTM_JOIN  = 2'd1,
    MTM_DATA  = 2'd2,
    MTM_ACK   = 2'd3
  } mtm_e;

  // Slave station state (T_IOSTATE). NONE..M2JOIN: initialisation phase,
  // M1CNTRL..M1M2CNTRL: execution phase.
  typedef enum logic [2:0] {
    ST_NONE      = 3'd0,
    ST_M1M2      = 3'd1,  // master 1 has offered control to master 2
    ST_M2M1      = 3'd2,  // master 2 has offered control to master 1
    ST_M1JOIN    = 3'd3,  // master 1 asks for joint control
    ST_M2JOIN    = 3'd4,  // master 2 asks for joint control
    ST_M1CNTRL   = 3'd5,  // master 1 controls the model
    ST_M2CNTRL   = 3'd6,  // master 2 controls the model
    ST_M1M2CNTRL = 3'd7   // both masters control the model jointly
  } iostate_e;

  // Message from a master (T_RFM): 3 + 32 + 8 = 43 bits.
  typedef struct packed {
    mfm_e              message;
    logic [DATA_W-1:0] data;
    logic [CRC_W-1:0]  crc;
  } rfm_t;

  // Message to a master (T_RTM): 2 + 48 + 8 = 58 bits.
  typedef struct packed {
    mtm_e              message;
    logic [READ_W-1:0] data;
    logic [CRC_W-1:0]  crc;
  } rtm_t;

  localparam int RFM_W = $bits(rfm_t);
  localparam int RTM_W = $bits(rtm_t);

  // Acknowledge words returned in the data field of an ACK message.
  localparam logic [READ_W-1:0] ACKINI  = 48'hAA00_0000_0000;
  localparam logic [READ_W-1:0] ACKTAKE = 48'hBB00_0000_0000;
  localparam logic [READ_W-1:0] ACKHAND = 48'hCC00_0000_0000;
  localparam logic [READ_W-1:0] ACKJOIN = 48'hDD00_0000_0000;
  localparam logic [READ_W-1:0] ACKSTOP = 48'hEE00_0000_0000;
  localparam logic [READ_W-1:0] ACKDATA = 48'hFF00_0000_0000;

endpackage
