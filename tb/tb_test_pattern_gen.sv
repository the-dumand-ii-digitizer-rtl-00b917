// tb_test_pattern_gen: loads random words into the 8K x 26 pattern memory,
// plays out a range twice (a short run, then the whole memory) and checks
// every output word, the two-cycle start latency and the busy flag.
`timescale 1ns/1ps
module tb_test_pattern_gen;
  import dumand_pkg::*;

  localparam int DEPTH = 8192;
  logic tp_clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, start = 1'b0;
  logic [12:0] addr = '0, last_addr = '0;
  logic [N_CH-1:0] wdata = '0, pattern;
  logic busy;
  logic [N_CH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  test_pattern_gen dut (.*);

  always #0.5 tp_clk = ~tp_clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(input int last);
    @(posedge tp_clk);
    #0.1;
    last_addr = 13'(last);
    start = 1'b1;
    @(posedge tp_clk);
    #0.1;
    start = 1'b0;
    checks++;
    if (!busy) failures++;
    @(posedge tp_clk);
    #0.1;
    for (int a = 0; a <= last; a++) begin
      @(posedge tp_clk);
      #0.1;
      checks++;
      if (pattern != ref_mem[a]) begin
        failures++;
        $display("addr %0d: %h expected %h", a, pattern, ref_mem[a]);
      end
    end
    checks++;
    if (busy) failures++;
    repeat (3) @(posedge tp_clk);
    #0.1;
    checks++;
    if (pattern != ref_mem[last]) failures++;
  endtask

  initial begin
    repeat (3) @(posedge tp_clk);
    #0.1 rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = N_CH'($urandom);
      we = 1'b1;
      addr = 13'(a);
      wdata = ref_mem[a];
      @(posedge tp_clk);
      #0.1;
    end
    we = 1'b0;
    checks++;
    if (busy || pattern != '0) failures++;
    play(99);
    play(DEPTH - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
