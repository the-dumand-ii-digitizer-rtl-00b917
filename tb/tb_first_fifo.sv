// tb_first_fifo: random writes and reads against a queue model of the
// ten-entry first FIFO. Checks the head entry, empty/full, that a bin
// written into a full FIFO is dropped with a one-cycle overflow pulse, and
// that a read and a write in the same cycle on a full FIFO keep both.
`timescale 1ns/1ps
module tb_first_fifo;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  hit_entry_t wr_data = '0, rd_data;
  logic empty, full, overflow;
  int checks = 0, failures = 0, n_ovf = 0, n_full_rw = 0;
  hit_entry_t q[$];

  first_fifo dut (.*);

  always #1 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ovf;
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      // phases that favour filling or draining
      wr_en = ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 80));
      rd_en = ($urandom_range(0, 99) < ((i / 500) % 2 ? 80 : 30));
      wr_data = {1'($urandom), EXT_W'($urandom), N_CH'($urandom), N_CH'($urandom)};
      #0.5;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 10)) begin
        failures++;
        $display("%t empty=%0b full=%0b size=%0d", $time, empty, full, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rd_data != q[0]) begin
          failures++;
          $display("%t head mismatch", $time);
        end
      end
      exp_ovf = 1'b0;
      if (q.size() == 10 && wr_en && rd_en) n_full_rw++;
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) begin
        if (q.size() < 10) q.push_back(wr_data);
        else exp_ovf = 1'b1;
      end
      @(posedge clk);
      #0.2;
      checks++;
      if (overflow != exp_ovf) begin
        failures++;
        $display("%t overflow=%0b expected %0b", $time, overflow, exp_ovf);
      end
      if (exp_ovf) n_ovf++;
    end
    checks++;
    if (n_ovf == 0 || n_full_rw == 0) failures++;
    $display("overflows=%0d full_read_write=%0d", n_ovf, n_full_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
