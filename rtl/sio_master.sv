// sio_master - CPU side of an SPI/PSI module (CLK, SH/LD, DI/DO lines).
//
// One exchange ("scan") moves a whole word each way between the slave
// station and an SPI/PSI module: one cycle with sh_ld low makes the module
// latch the previously sent output word and sample its parallel inputs, then
// N = max(IN_W, OUT_W) shift cycles (sclk high) send out_data MSB first on
// sdi, preceded by N-OUT_W zero bits, and collect N bits from sdo, of which
// the first IN_W are the input word. A scan therefore takes N+1 cycles after
// start, plus one idle cycle; with start held high the port scans
// continuously. Words sent in one scan reach the module's outputs at the
// load of the next scan.
//
// Interface: start (level, sampled while idle) begins a scan and captures
// out_data; done pulses for one cycle when in_data holds the newly read word
// (in_data holds its value between scans, 0 after reset); busy is high during
// a scan. sclk, sh_ld and sdi are decoded from registers and act on the
// module at the next rising edge, when sdo is sampled too.
// The three line names are those of the system architecture; the scan
// sequence and its timing are choices of this design.
module sio_master #(
  parameter int IN_W  = ftcp_pkg::READ_W,
  parameter int OUT_W = ftcp_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [OUT_W-1:0] out_data,
  output logic [IN_W-1:0]  in_data,
  output logic             done,
  output logic             busy,
  output logic             sclk,
  output logic             sh_ld,
  output logic             sdi,
  input  logic             sdo
);

  localparam int N  = (IN_W > OUT_W) ? IN_W : OUT_W;
  localparam int CW = $clog2(N + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SHIFT} sio_state_e;

  sio_state_e     state;
  logic [N-1:0]   txr, rxr, rx_next;
  logic [CW-1:0]  cnt;

  assign sh_ld   = (state != S_LOAD);
  assign sclk    = (state == S_SHIFT);
  assign sdi     = txr[N-1];
  assign busy    = (state != S_IDLE);
  assign rx_next = {rxr[N-2:0], sdo};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      txr     <= '0;
      rxr     <= '0;
      cnt     <= '0;
      in_data <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          txr   <= N'(out_data);
          state <= S_LOAD;
        end
        S_LOAD: begin
          cnt   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          txr <= {txr[N-2:0], 1'b0};
          rxr <= rx_next;
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) begin
            in_data <= rx_next[N-1 -: IN_W];
            done    <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
