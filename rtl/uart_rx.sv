// uart_rx - asynchronous serial receiver (8 data bits, no parity, 1 stop).
//
// Receives the RxD line of the slave CPU's serial port (master 1 link, after
// the RS-422 receiver). The line is synchronised by two flip-flops; a falling
// edge starts a character, every bit is sampled in the middle of its bit
// time (CLKS_PER_BIT clocks per bit), data arrive LSB first. At the middle
// of the stop bit, valid pulses for one cycle with the byte in data, and
// frame_err is high with it when the stop bit was 0. The character format
// and the bit rate are choices of this design; the link is only described
// as an RS-422 full-duplex serial line.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434   // 50 MHz clock / 115200 bit/s
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  rx_state_e     state;
  logic [1:0]    sync;
  logic [CW-1:0] tick;
  logic [2:0]    bitn;
  logic [7:0]    sh;
  logic          line;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      tick      <= '0;
      bitn      <= '0;
      sh        <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      case (state)
        R_IDLE: if (!line) begin
          tick  <= CW'(CLKS_PER_BIT / 2 - 1);
          state <= R_START;
        end
        R_START: begin
          if (tick != 0) tick <= tick - 1'b1;
          else if (line) state <= R_IDLE;        // glitch, not a start bit
          else begin
            tick  <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
            state <= R_DATA;
          end
        end
        R_DATA: begin
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            sh   <= {line, sh[7:1]};
            tick <= CW'(CLKS_PER_BIT - 1);
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end
        end
        R_STOP: begin
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            data      <= sh;
            valid     <= 1'b1;
            frame_err <= !line;
            state     <= R_IDLE;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
