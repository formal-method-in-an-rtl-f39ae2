// tb_sio_master - self-checking test of the CPU side of the SPI/PSI link.
//
// A behavioural shift-register board in the testbench answers sclk/sh_ld:
// at each load it presents a fresh random input word, and it records every
// bit received on sdi. Checks: in_data equals the word loaded, the last
// OUT_W bits received equal out_data, exactly one load per scan, N shift
// pulses per scan, and done arrives N+1 cycles after the scan starts.
module tb_sio_master;
  localparam int IN_W = 48, OUT_W = 32, N = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, done, busy, sclk, sh_ld, sdi, sdo;
  logic [OUT_W-1:0] out_data;
  logic [IN_W-1:0]  in_data;

  sio_master dut (.*);

  // behavioural board
  logic [IN_W-1:0] board_in, loaded;
  logic [N-1:0]    got;
  int loads = 0, shifts = 0;
  assign sdo = board_in[IN_W-1];
  always @(posedge clk) begin
    if (!sh_ld) begin
      loaded   = {$urandom, $urandom};
      board_in <= loaded;
      loads++;
    end else if (sclk) begin
      board_in <= board_in << 1;
      got      <= {got[N-2:0], sdi};
      shifts++;
    end
  end

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
    int cyc;
    board_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && sh_ld && !sclk, "idle after reset");
    for (int s = 0; s < 30; s++) begin
      out_data = $urandom;
      loads = 0; shifts = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      out_data = ~out_data;        // captured at start, later changes ignored
      cyc = 0;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      chk(cyc == N + 1, $sformatf("scan length %0d", cyc));
      chk(loads == 1 && shifts == N, $sformatf("loads %0d shifts %0d", loads, shifts));
      chk(in_data == loaded, "input word read");
      chk(got[OUT_W-1:0] == ~out_data, "output word sent");
      chk(got[N-1:OUT_W] == '0, "pad bits");
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
