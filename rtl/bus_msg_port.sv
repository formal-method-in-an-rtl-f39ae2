// bus_msg_port - carries master 2 (PLC) messages over the parallel I/O bus.
//
// Master 2 is a PLC connected to the slave station by a conventional
// parallel data bus. The PLC's output modules present one bus word,
// {seq, rfm}: a complete FTCP message plus a sequence bit that the PLC
// toggles for every new message. The slave reads this word with each scan
// of the bus's SPI/PSI module. Its reply is the bus word {ack_seq, rtm}
// read by the PLC's input modules: the current reply record and the
// sequence bit of the last PLC message that has been answered, so the PLC
// knows when the reply belongs to its latest message.
//
// Operation: when a scan completes (scan_done) and the sequence bit differs
// from the last one taken, the message is passed on with a one-cycle
// rfm_valid pulse. When the protocol engine answers it (rtm_ans), the
// stored sequence bit becomes the acknowledged one. After reset both
// sequence bits are 0, so the PLC's first message carries seq = 1.
// The framing and the sequence bit are this design's own; the protocol only
// states that master 2 exchanges its messages over the parallel bus.
module bus_msg_port
  import ftcp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // from the bus SPI/PSI scan
  input  logic             scan_done,
  input  logic [RFM_W:0]   bus_rx,     // {seq, rfm_t}
  output logic [RTM_W:0]   bus_tx,     // {ack_seq, rtm_t}
  // to/from the protocol engine
  output rfm_t             rfm,
  output logic             rfm_valid,
  input  logic             rfm_ready,
  input  rtm_t             rtm,
  input  logic             rtm_ans
);

  logic seq_taken, seq_acked;
  logic rx_seq;

  assign rx_seq = bus_rx[RFM_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seq_taken <= 1'b0;
      seq_acked <= 1'b0;
      rfm       <= '{message: MFM_STOP, data: '0, crc: '0};
      rfm_valid <= 1'b0;
    end else begin
      rfm_valid <= 1'b0;
      if (scan_done && rx_seq != seq_taken && rfm_ready && !rfm_valid) begin
        seq_taken <= rx_seq;
        rfm       <= rfm_t'(bus_rx[RFM_W-1:0]);
        rfm_valid <= 1'b1;
      end
      if (rtm_ans) seq_acked <= seq_taken;
    end
  end

  assign bus_tx = {seq_acked, rtm};

endmodule
