// serial_msg_port - carries master 1 (PC) messages over the serial line.
//
// Master 1 is a PC on a full-duplex RS-422 line to the slave CPU's TxD/RxD
// port. This block frames FTCP records as fixed-length byte sequences,
// most significant byte first:
//   PC -> slave, 6 bytes : {5'b0, header[2:0]}, data[31:0] (4 bytes), crc
//   slave -> PC, 8 bytes : {ans, 5'b0, header[1:0]}, data[47:0] (6 bytes), crc
// where ans = 1 marks the answer to the PC's own message and ans = 0 a reply
// record that changed because of master 2 (for example a JOIN invitation).
//
// Receive: bytes from uart_rx are collected into a frame. A character with a
// bad stop bit discards the partial frame, and so does a pause longer than
// GAP_BITS bit times inside a frame, which lets the receiver fall back into
// step with the PC after a lost byte. A complete frame is handed to the
// protocol engine with a one-cycle rfm_valid pulse (held back while
// rfm_ready is low). Transmit: every reply update (rtm_valid) is framed and
// sent; an update that arrives during a transmission replaces any older one
// still waiting, so the PC always ends with the latest reply.
// The frame format, the resynchronisation rule and the bit rate are choices
// of this design: the protocol defines the records, not their transport.
module serial_msg_port
  import ftcp_pkg::*;
#(
  parameter int CLKS_PER_BIT = 434,  // 50 MHz clock / 115200 bit/s
  parameter int GAP_BITS     = 30    // longest pause inside a frame
) (
  input  logic clk,
  input  logic rst_n,
  // serial line (logic levels of the RS-422 receiver / driver)
  input  logic rxd,
  output logic txd,
  // to/from the protocol engine
  output rfm_t rfm,
  output logic rfm_valid,
  input  logic rfm_ready,
  input  rtm_t rtm,
  input  logic rtm_valid,
  input  logic rtm_ans,
  // received characters with a bad stop bit (diagnostics)
  output logic frame_err
);

  localparam int RX_BYTES = 6;
  localparam int TX_BYTES = 8;
  localparam int GAP_CLKS = GAP_BITS * CLKS_PER_BIT;
  localparam int GW       = $clog2(GAP_CLKS + 1);

  // ---------------- receive ----------------
  logic [7:0] rx_byte;
  logic       rx_valid, rx_ferr;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd,
    .data(rx_byte), .valid(rx_valid), .frame_err(rx_ferr)
  );

  logic [8*RX_BYTES-9:0] rx_sh;   // first five bytes of a frame
  logic [2:0]            rx_cnt;
  logic [GW-1:0]         gap;
  logic                  rx_pend;
  assign frame_err = rx_valid && rx_ferr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sh     <= '0;
      rx_cnt    <= '0;
      gap       <= '0;
      rx_pend   <= 1'b0;
      rfm       <= '{message: MFM_STOP, data: '0, crc: '0};
      rfm_valid <= 1'b0;
    end else begin
      rfm_valid <= 1'b0;
      if (rx_valid) begin
        gap <= '0;
        if (rx_ferr) begin
          rx_cnt <= '0;
        end else if (rx_cnt == 3'(RX_BYTES - 1)) begin
          rx_cnt  <= '0;
          rfm     <= '{message: mfm_e'(rx_sh[34:32]), data: rx_sh[31:0], crc: rx_byte};
          rx_pend <= 1'b1;
        end else begin
          rx_sh  <= {rx_sh[8*RX_BYTES-17:0], rx_byte};
          rx_cnt <= rx_cnt + 1'b1;
        end
      end else if (rx_cnt != 0) begin
        if (gap == GW'(GAP_CLKS)) rx_cnt <= '0;
        else gap <= gap + 1'b1;
      end
      if (rx_pend && rfm_ready && !rfm_valid) begin
        rfm_valid <= 1'b1;
        rx_pend   <= 1'b0;
      end
    end
  end

  // ---------------- transmit ----------------
  logic                  tx_start, tx_ready;
  logic [7:0]            tx_byte;
  logic [8*TX_BYTES-1:0] tx_sh, tx_wait;
  logic [3:0]            tx_left;
  logic                  tx_pend;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(tx_byte), .ready(tx_ready), .txd
  );

  assign tx_byte  = tx_sh[8*TX_BYTES-1 -: 8];
  assign tx_start = (tx_left != 0) && tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_sh   <= '0;
      tx_wait <= '0;
      tx_left <= '0;
      tx_pend <= 1'b0;
    end else begin
      if (tx_start) begin
        tx_sh   <= {tx_sh[8*TX_BYTES-9:0], 8'h00};
        tx_left <= tx_left - 1'b1;
      end else if (tx_left == 0 && tx_pend) begin
        tx_sh   <= tx_wait;
        tx_left <= 4'(TX_BYTES);
        tx_pend <= 1'b0;
      end
      if (rtm_valid) begin
        tx_wait <= {rtm_ans, 5'b0, rtm.message, rtm.data, rtm.crc};
        tx_pend <= 1'b1;
      end
    end
  end

endmodule
