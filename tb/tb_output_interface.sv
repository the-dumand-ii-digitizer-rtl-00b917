// tb_output_interface: feeds transition words to the output interface from
// a queue model of the second FIFO, adding 0 to 3 words right after each
// link word. Checks that a link word appears every 40 cycles (80 ns at
// 500 MHz), that it carries the next two queued words in order, fill words
// with the C&C data in empty slots, and the error events of its frame in
// the flag byte.
`timescale 1ns/1ps
module tb_output_interface;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tdc_word_t fifo_data;
  logic fifo_empty, fifo_rd;
  logic [FLAG_W-1:0] err_in = '0;
  logic [AUX_W-1:0] cc_data = 11'h5a5;
  logic [OUT_W-1:0] link_word;
  logic link_strobe;
  int checks = 0, failures = 0, n_fill = 0, n_two = 0, n_flag = 0;
  tdc_word_t q[$], sent[$];
  logic [FLAG_W-1:0] flags_acc = '0;

  output_interface dut (.*);

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : q[0];

  always #1 clk = ~clk;

  // The model FIFO pops just after the edge, as a register would.
  always @(posedge clk) begin
    if (fifo_rd) begin
      #0.1;
      void'(q.pop_front());
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_strobe, cyc, frames;
    logic [FLAG_W-1:0] exp_flags;
    tdc_word_t ea, eb, w;
    last_strobe = -1;
    cyc = 0;
    frames = 0;
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    // words present at the start of each frame: the reference list
    while (frames < 300) begin
      err_in = ($urandom_range(0, 30) == 0) ? FLAG_W'(1 << $urandom_range(0, 3)) : '0;
      #0.3;
      flags_acc |= err_in;
      @(posedge clk);
      #0.2;
      cyc++;
      if (link_strobe) begin
        frames++;
        checks++;
        if (last_strobe >= 0 && cyc - last_strobe != 40) begin
          failures++;
          $display("%t frame period %0d", $time, cyc - last_strobe);
        end
        last_strobe = cyc;
        exp_flags = flags_acc;
        flags_acc = '0;
        ea = (sent.size() > 0) ? sent.pop_front() : tdc_word_t'({CH_FILL, cc_data});
        eb = (sent.size() > 0) ? sent.pop_front() : tdc_word_t'({CH_FILL, cc_data});
        checks++;
        if (link_word != {exp_flags, ea, eb}) begin
          failures++;
          $display("%t link %h expected %h", $time, link_word, {exp_flags, ea, eb});
        end
        if (ea.ch == CH_FILL || eb.ch == CH_FILL) n_fill++;
        if (eb.ch != CH_FILL) n_two++;
        if (exp_flags != '0) n_flag++;
        checks++;
        if (sent.size() != 0) failures++;
        // new words for the next frame
        for (int k = $urandom_range(0, 3); k > 0; k--) begin
          w = tdc_word_t'(16'($urandom_range(0, 16'hefff)));
          q.push_back(w);
        end
        // at most two of them leave in the next frame
        for (int k = 0; k < 2 && k < q.size(); k++) sent.push_back(q[k]);
        cc_data = AUX_W'($urandom);
      end
    end
    checks++;
    if (n_fill == 0 || n_two == 0 || n_flag == 0) failures++;
    $display("frames=%0d with fill=%0d full=%0d flagged=%0d", frames, n_fill, n_two, n_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
