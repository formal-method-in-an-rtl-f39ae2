// spi_psi - serial/parallel I/O module of the slave station.
//
// The slave station's CPU reaches its wide parallel ports (the railway
// model's drives and sensors, and the parallel I/O bus to the PLC) through
// SPI/PSI modules driven by three CPU lines: CLK, SH/LD and DI/DO. The
// module holds two shift registers: a parallel-in/serial-out register for the
// inputs and a serial-in/parallel-out register followed by an output latch.
//
// Operation (all on the rising edge of the system clock clk; sclk is the
// CPU's CLK line, used as a one-cycle shift enable):
//  * sh_ld = 0 (load): the input register takes par_in, and the output latch
//    takes the word shifted in so far (par_out changes only here).
//  * sh_ld = 1 and sclk = 1 (shift): the input register shifts towards its
//    MSB, which is always visible on sdo; the output register shifts sdi in
//    at its LSB.
//  * otherwise the registers hold.
// After a load and N >= max(IN_W, OUT_W) shifts, the CPU has read the input
// word MSB first and the output register holds the last OUT_W bits sent.
// The line names come from the system architecture; the split of the DI/DO
// line into separate sdi and sdo wires, the sh_ld polarity, the shift order
// and the use of sclk as a clock enable are choices of this design. par_out
// resets to 0 so that no drive is energised after reset.
module spi_psi #(
  parameter int IN_W  = ftcp_pkg::READ_W,   // parallel inputs (railway sensors)
  parameter int OUT_W = ftcp_pkg::DATA_W    // parallel outputs (railway drives)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sclk,
  input  logic             sh_ld,
  input  logic             sdi,
  output logic             sdo,
  input  logic [IN_W-1:0]  par_in,
  output logic [OUT_W-1:0] par_out
);

  logic [IN_W-1:0]  in_sh;
  logic [OUT_W-1:0] out_sh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_sh   <= '0;
      out_sh  <= '0;
      par_out <= '0;
    end else if (!sh_ld) begin
      in_sh   <= par_in;
      par_out <= out_sh;
    end else if (sclk) begin
      in_sh   <= {in_sh[IN_W-2:0], 1'b0};
      out_sh  <= {out_sh[OUT_W-2:0], sdi};
    end
  end

  assign sdo = in_sh[IN_W-1];

endmodule
