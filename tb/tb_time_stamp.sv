// tb_time_stamp: checks the nanosecond time stamp counter.
// After reset the rising-edge stamp must read 2k in cycle k and the
// falling-edge stamp, seen after the falling edge of cycle k, 2k+1 (both
// modulo 4096); rollover must be high exactly when 2k is a multiple of
// 1024. Runs past the 12-bit wrap.
`timescale 1ns/1ps
module tb_time_stamp;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [EXT_W-1:0] stamp_rise, stamp_fall;
  logic rollover;
  int checks = 0, failures = 0;

  time_stamp dut (.*);

  always #1 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, nroll;
    nroll = 0;
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    // before rising edge k the stamp reads 2k; after falling edge k, 2k+1
    for (k = 0; k < 2200; k++) begin
      checks++;
      if (stamp_rise != EXT_W'(2 * k)) begin
        failures++;
        $display("k=%0d stamp_rise=%0d", k, stamp_rise);
      end
      checks++;
      if (rollover != ((2 * k) % 1024 == 0)) begin
        failures++;
        $display("k=%0d rollover=%0b", k, rollover);
      end
      if (rollover) nroll++;
      @(posedge clk);
      @(negedge clk);
      #0.2;
      checks++;
      if (stamp_fall != EXT_W'(2 * k + 1)) begin
        failures++;
        $display("k=%0d stamp_fall=%0d", k, stamp_fall);
      end
    end
    checks++;
    if (nroll < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
