// tb_second_fifo: random traffic against a queue model of the 100-word
// second FIFO. The writer respects full, as the priority encoder does.
// Checks order, count, empty and full, and that the FIFO really holds 100.
`timescale 1ns/1ps
module tb_second_fifo;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  tdc_word_t wr_data = '0, rd_data;
  logic empty, full;
  logic [6:0] count;
  int checks = 0, failures = 0, n_full = 0;
  tdc_word_t q[$];

  second_fifo dut (.*);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    for (int i = 0; i < 8000; i++) begin
      rd_en = ($urandom_range(0, 99) < ((i / 1000) % 2 ? 90 : 20));
      wr_data = tdc_word_t'(16'($urandom));
      #0.5;
      wr_en = !full && ($urandom_range(0, 99) < ((i / 1000) % 2 ? 30 : 90));
      checks++;
      if (count != 7'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 100)) begin
        failures++;
        $display("%t count=%0d size=%0d", $time, count, q.size());
      end
      if (full) n_full++;
      if (q.size() > 0) begin
        checks++;
        if (rd_data != q[0]) begin
          failures++;
          $display("%t head %h expected %h", $time, rd_data, q[0]);
        end
      end
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(posedge clk);
      #0.2;
    end
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
