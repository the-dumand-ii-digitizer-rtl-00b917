// tb_hydrophone_port: loads hydrophone samples and takes them as roll-over
// words would, checking the {fresh, data} word and the lost pulse against
// a small model.
`timescale 1ns/1ps
module tb_hydrophone_port;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hyd_valid = 1'b0, take = 1'b0;
  logic [AUX_W-2:0] hyd_data = '0;
  logic [AUX_W-1:0] aux_word;
  logic lost;
  int checks = 0, failures = 0, n_lost = 0, n_fresh_take = 0;

  hydrophone_port dut (.*);

  always #1 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AUX_W-2:0] m_data;
    logic m_fresh, exp_lost;
    m_data = '0;
    m_fresh = 1'b0;
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      hyd_valid = ($urandom_range(0, 3) == 0);
      hyd_data  = (AUX_W-1)'($urandom);
      take      = ($urandom_range(0, 3) == 0);
      #0.5;
      checks++;
      if (aux_word != {m_fresh, m_data}) begin
        failures++;
        $display("%t aux=%h expected %h", $time, aux_word, {m_fresh, m_data});
      end
      if (take && m_fresh) n_fresh_take++;
      exp_lost = hyd_valid && m_fresh && !take;
      if (hyd_valid) begin
        m_data = hyd_data;
        m_fresh = 1'b1;
      end else if (take) begin
        m_fresh = 1'b0;
      end
      @(posedge clk);
      #0.2;
      checks++;
      if (lost != exp_lost) begin
        failures++;
        $display("%t lost=%0b expected %0b", $time, lost, exp_lost);
      end
      if (exp_lost) n_lost++;
    end
    checks++;
    if (n_lost == 0 || n_fresh_take == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
