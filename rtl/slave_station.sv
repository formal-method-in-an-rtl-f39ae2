// slave_station - slave station of a fault-tolerant railway model control
// system.
//
// A model railway (about 70 drive and sensor signals) is controlled through
// one slave station by two master stations that reach it over physically
// different links: master 1, a PC, over an RS-422 serial line, and master 2,
// a PLC, over a conventional parallel data bus. The Fault Tolerant Control
// Protocol (FTCP) decides which master controls the model (one of them or
// both jointly) and keeps the model safe when messages are corrupted.
//
// Structure:
//  * u_rail      - FTCP protocol engine (state machine, CRC checks,
//                  replies, ACTION word).
//  * u_ser_port  - serial (UART) framing of master 1's messages on the
//                  CPU's RxD/TxD lines.
//  * u_rw_sio / u_rw_psi - CPU serial port and SPI/PSI module for the
//                  railway model: ACTION (32 bits) out to the drives,
//                  READ (48 bits) in from the sensors, scanned continuously.
//  * u_bus_sio / u_bus_psi / u_bus_port - CPU serial port, SPI/PSI module
//                  and message framing for the parallel I/O bus to the PLC.
// The RS-422 line driver/receiver sits outside this RTL on m1_rxd/m1_txd,
// and the optical isolation between the bus SPI/PSI module and the parallel
// bus has no logic function; neither is modelled.
//
// Ports: m1_rxd/m1_txd serial line to master 1 (8N1, CLKS_PER_BIT clocks per
// bit, frames as in serial_msg_port), m1_frame_err pulses on a character
// with a bad stop bit; plc_to_slave {seq, message} from the PLC output modules,
// slave_to_plc {ack_seq, reply} to the PLC input modules; rail_sensors and
// rail_drives to the model; st, ebm1, ebm2 for monitoring.
// Timing: the railway scan takes 50 cycles (1 load + 48 shifts + 1 idle), the
// bus scan 61 cycles (1 load + 59 shifts + 1 idle). A new ACTION word reaches
// rail_drives within two railway scans. A master 1 message takes 60 bit
// times on the line and its reply 80.
// The block structure and the word widths follow the system architecture;
// the scan timing, the bit rate and both message framings are choices of
// this design.
module slave_station
  import ftcp_pkg::*;
#(
  parameter int CLKS_PER_BIT = 434   // serial bit time: 50 MHz / 115200 bit/s
) (
  input  logic              clk,
  input  logic              rst_n,
  // master 1 (PC): logic side of the RS-422 receiver and driver
  input  logic              m1_rxd,
  output logic              m1_txd,
  output logic              m1_frame_err,
  // master 2 (PLC, parallel I/O bus)
  input  logic [RFM_W:0]    plc_to_slave,
  output logic [RTM_W:0]    slave_to_plc,
  // railway model
  input  logic [READ_W-1:0] rail_sensors,
  output logic [DATA_W-1:0] rail_drives,
  // monitoring
  output iostate_e          st,
  output logic              ebm1,
  output logic              ebm2
);

  // ---------------- protocol engine ----------------
  rfm_t              rfm1, rfm2;
  logic              rfm1_valid, rfm1_ready;
  rtm_t              srtm1;
  logic              srtm1_valid, srtm1_ans;
  logic              rfm2_valid, rfm2_ready;
  rtm_t              srtm2;
  logic              srtm2_valid, srtm2_ans;
  logic [DATA_W-1:0] action;
  logic [READ_W-1:0] read_data;

  rail u_rail (
    .clk, .rst_n,
    .rfm1, .rfm1_valid, .rfm1_ready,
    .rfm2, .rfm2_valid, .rfm2_ready,
    .srtm1, .srtm1_valid, .srtm1_ans,
    .srtm2, .srtm2_valid, .srtm2_ans,
    .action, .read_data,
    .st, .ebm1, .ebm2
  );

  // ---------------- serial link to master 1 ----------------
  serial_msg_port #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_ser_port (
    .clk, .rst_n,
    .rxd       (m1_rxd),
    .txd       (m1_txd),
    .rfm       (rfm1),
    .rfm_valid (rfm1_valid),
    .rfm_ready (rfm1_ready),
    .rtm       (srtm1),
    .rtm_valid (srtm1_valid),
    .rtm_ans   (srtm1_ans),
    .frame_err (m1_frame_err)
  );

  // ---------------- railway model I/O ----------------
  logic rw_sclk, rw_sh_ld, rw_sdi, rw_sdo;
  logic rw_done, rw_busy;

  sio_master #(.IN_W(READ_W), .OUT_W(DATA_W)) u_rw_sio (
    .clk, .rst_n,
    .start    (1'b1),
    .out_data (action),
    .in_data  (read_data),
    .done     (rw_done),
    .busy     (rw_busy),
    .sclk     (rw_sclk),
    .sh_ld    (rw_sh_ld),
    .sdi      (rw_sdi),
    .sdo      (rw_sdo)
  );

  spi_psi #(.IN_W(READ_W), .OUT_W(DATA_W)) u_rw_psi (
    .clk, .rst_n,
    .sclk    (rw_sclk),
    .sh_ld   (rw_sh_ld),
    .sdi     (rw_sdi),
    .sdo     (rw_sdo),
    .par_in  (rail_sensors),
    .par_out (rail_drives)
  );

  // ---------------- parallel I/O bus to master 2 ----------------
  logic             bus_sclk, bus_sh_ld, bus_sdi, bus_sdo;
  logic             bus_done, bus_busy;
  logic [RFM_W:0]   bus_rx;
  logic [RTM_W:0]   bus_tx;

  sio_master #(.IN_W(RFM_W + 1), .OUT_W(RTM_W + 1)) u_bus_sio (
    .clk, .rst_n,
    .start    (1'b1),
    .out_data (bus_tx),
    .in_data  (bus_rx),
    .done     (bus_done),
    .busy     (bus_busy),
    .sclk     (bus_sclk),
    .sh_ld    (bus_sh_ld),
    .sdi      (bus_sdi),
    .sdo      (bus_sdo)
  );

  spi_psi #(.IN_W(RFM_W + 1), .OUT_W(RTM_W + 1)) u_bus_psi (
    .clk, .rst_n,
    .sclk    (bus_sclk),
    .sh_ld   (bus_sh_ld),
    .sdi     (bus_sdi),
    .sdo     (bus_sdo),
    .par_in  (plc_to_slave),
    .par_out (slave_to_plc)
  );

  bus_msg_port u_bus_port (
    .clk, .rst_n,
    .scan_done (bus_done),
    .bus_rx,
    .bus_tx,
    .rfm       (rfm2),
    .rfm_valid (rfm2_valid),
    .rfm_ready (rfm2_ready),
    .rtm       (srtm2),
    .rtm_ans   (srtm2_ans)
  );

endmodule
