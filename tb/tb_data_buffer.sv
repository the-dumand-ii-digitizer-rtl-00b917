// tb_data_buffer: captures random 40-bit words with random strobes, reads
// them back, and checks the count, the full flag (capture stops at DEPTH
// words) and that arm starts a fresh capture.
`timescale 1ns/1ps
module tb_data_buffer;
  import dumand_pkg::*;

  localparam int DEPTH = 8192;
  logic clk = 1'b0, rst_n = 1'b0;
  logic arm = 1'b0, strobe = 1'b0;
  logic [OUT_W-1:0] in_word = '0, rd_data;
  logic [13:0] count;
  logic full;
  logic [12:0] rd_addr = '0;
  logic [OUT_W-1:0] ref_q[$];
  int checks = 0, failures = 0;

  data_buffer dut (.*);

  always #1 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(input int n);
    ref_q.delete();
    arm = 1'b1;
    @(posedge clk);
    #0.2 arm = 1'b0;
    while (ref_q.size() < n) begin
      strobe = ($urandom_range(0, 2) == 0);
      in_word = {8'($urandom), 32'($urandom)};
      if (strobe && ref_q.size() < DEPTH) ref_q.push_back(in_word);
      @(posedge clk);
      #0.2;
    end
    strobe = 1'b0;
    // strobes into a full buffer are ignored
    if (n == DEPTH) begin
      strobe = 1'b1;
      repeat (5) @(posedge clk);
      #0.2 strobe = 1'b0;
    end
    checks++;
    if (count != 14'(n) || full != (n == DEPTH)) begin
      failures++;
      $display("count %0d expected %0d full %0b", count, n, full);
    end
    for (int a = 0; a < n; a++) begin
      rd_addr = 13'(a);
      @(posedge clk);
      #0.2;
      checks++;
      if (rd_data != ref_q[a]) begin
        failures++;
        $display("addr %0d: %h expected %h", a, rd_data, ref_q[a]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    // not armed: nothing is stored
    strobe = 1'b1;
    repeat (4) @(posedge clk);
    #0.2 strobe = 1'b0;
    checks++;
    if (count != 0) failures++;
    capture(300);
    capture(DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
