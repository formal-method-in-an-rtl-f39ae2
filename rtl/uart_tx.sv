// uart_tx - asynchronous serial transmitter (8 data bits, no parity, 1 stop).
//
// Drives the TxD line of the slave CPU's serial port (master 1 link, before
// the RS-422 driver). start with ready high takes data; the line then
// carries a start bit (0), the eight data bits LSB first and a stop bit (1),
// each CLKS_PER_BIT clocks long. ready is high while the line is idle;
// txd idles high. Character format and bit rate are choices of this design.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434   // 50 MHz clock / 115200 bit/s
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    sh;     // {stop, data, start}, sent from bit 0
  logic [3:0]    left;   // bits still to send
  logic [CW-1:0] tick;

  assign ready = (left == 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh   <= '1;
      left <= '0;
      tick <= '0;
      txd  <= 1'b1;
    end else if (left == 0) begin
      txd <= 1'b1;
      if (start) begin
        sh   <= {1'b1, data, 1'b0};
        left <= 4'd10;
        tick <= CW'(CLKS_PER_BIT - 1);
        txd  <= 1'b0;
      end
    end else if (tick != 0) begin
      tick <= tick - 1'b1;
    end else begin
      sh   <= {1'b1, sh[9:1]};
      left <= left - 1'b1;
      tick <= CW'(CLKS_PER_BIT - 1);
      txd  <= (left == 1) ? 1'b1 : sh[1];
    end
  end

endmodule
