// tb_spi_psi - self-checking test of the SPI/PSI shift-register module.
//
// The testbench plays the CPU: it pulses sh_ld low to load random parallel
// inputs and latch the outputs, then clocks N shifts, checking every bit that
// appears on sdo against the loaded input word (MSB first) and checking that
// par_out shows the word shifted in during the previous scan, unchanged
// during shifting. Idle cycles (sclk low) must not move the registers.
module tb_spi_psi;
  localparam int IN_W = 48, OUT_W = 32, N = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sclk = 0, sh_ld = 1, sdi = 0, sdo;
  logic [IN_W-1:0]  par_in;
  logic [OUT_W-1:0] par_out;

  spi_psi dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IN_W-1:0]  in_word;
    logic [OUT_W-1:0] out_word, prev_out;
    par_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(par_out == 0, "outputs off after reset");
    prev_out = '0;
    for (int scan = 0; scan < 40; scan++) begin
      in_word  = {$urandom, $urandom};
      out_word = $urandom;
      par_in   = in_word;
      @(negedge clk) sh_ld = 0;
      @(negedge clk) sh_ld = 1;
      chk(par_out == prev_out, "par_out latched at load");
      par_in = ~in_word;           // later changes must not disturb the scan
      for (int b = 0; b < N; b++) begin
        // N-OUT_W leading pad bits, then the output word MSB first
        sdi  = (b < N - OUT_W) ? 1'b0 : out_word[N - 1 - b];
        chk(sdo == in_word[IN_W - 1 - b], $sformatf("sdo bit %0d", b));
        sclk = 1;
        @(negedge clk);
        sclk = 0;
        if (b % 7 == 3) begin      // idle cycle in between
          @(negedge clk);
        end
        chk(par_out == prev_out, "par_out steady while shifting");
      end
      prev_out = out_word;
    end
    @(negedge clk) sh_ld = 0;
    @(negedge clk) sh_ld = 1;
    chk(par_out == prev_out, "final latch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
