// tb_dumand_digitizer: end-to-end test of the digitizer at its full size,
// wired as on the test bench: the test-board pattern generator drives the
// 26 PMT inputs at one word per ns, the 40-bit link words go back into the
// test-board data buffer, and the testbench reads the buffer out.
//
// An independent reference samples the PMT inputs at every clock edge
// (every ns), and lists one word per changed channel in time order, low
// channel first, with a roll-over word at each 1024 ns boundary. Every
// transition word received must match that list in order; words may be
// missing only after a first-FIFO overflow was flagged. The pattern has a
// sparse part, a burst that fills the second FIFO (encoder stall) and a
// long dense burst that overflows the first FIFOs. Hydrophone samples and
// C&C data are checked in roll-over and fill words. Each mechanism is
// counted and must occur at least once.
`timescale 1ns/1ps
module tb_dumand_digitizer;
  import dumand_pkg::*;

  localparam int PDEPTH = 8192;

  logic clk = 1'b0, tp_clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] pmt_in;
  logic hyd_valid = 1'b0;
  logic [AUX_W-2:0] hyd_data = '0;
  logic [AUX_W-1:0] cc_data = 11'h3c5;
  logic [OUT_W-1:0] link_word;
  logic link_strobe;
  logic tp_we = 1'b0, tp_start = 1'b0, tp_busy;
  logic [12:0] tp_addr = '0, tp_last_addr = '0;
  logic [N_CH-1:0] tp_wdata = '0, tp_pattern;
  logic db_arm = 1'b0;
  logic [13:0] db_count;
  logic db_full;
  logic [12:0] db_rd_addr = '0;
  logic [OUT_W-1:0] db_rd_data;

  dumand_digitizer dut (
    .clk, .rst_n, .pmt_in, .hyd_valid, .hyd_data, .cc_data,
    .link_word, .link_strobe,
    .tp_clk, .tp_we, .tp_addr, .tp_wdata, .tp_start, .tp_last_addr,
    .tp_busy, .tp_pattern,
    .db_arm, .db_word(link_word), .db_strobe(link_strobe),
    .db_count, .db_full, .db_rd_addr, .db_rd_data
  );

  // fibres from the test board to the digitizer
  assign pmt_in = tp_pattern;

  // 500 MHz master clock: rising edges at odd ns. Pattern clock 1 GHz,
  // its edges half way between, so inputs never change at a sampling edge.
  always #1 clk = ~clk;
  initial begin
    #0.5;
    forever #0.5 tp_clk = ~tp_clk;
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rise_bin = 0, n_fall_bin = 0, n_multi = 0, n_roll = 0, n_hyd_fresh = 0;
  int n_hyd_lost = 0, n_stall = 0, n_ovf1 = 0, n_ovf2 = 0, n_fill = 0, n_dropped = 0;
  int n_hits = 0, n_links = 0;

  // ---------------- reference model ----------------
  tdc_word_t exp_q[$];
  logic      running = 1'b0;
  int        t_ns;
  logic [N_CH-1:0] prev_lvl = '0;

  task automatic ref_bin(input logic [N_CH-1:0] lvl, input bit rising_edge);
    if (rising_edge && (t_ns % 1024 == 0))
      exp_q.push_back(tdc_word_t'({CH_ROLLOVER, 11'h0}));
    for (int c = 0; c < N_CH; c++)
      if (lvl[c] != prev_lvl[c])
        exp_q.push_back('{ch: CH_W'(c), t: TIME_W'(t_ns), dir: lvl[c]});
    prev_lvl = lvl;
    t_ns++;
  endtask

  always @(negedge clk) if (running) ref_bin(pmt_in, 1'b0);
  always @(posedge clk) if (running) ref_bin(pmt_in, 1'b1);

  // ---------------- stream checker ----------------
  int last_strobe_t = -1;
  logic ovf_seen = 1'b0;
  int   hyd_last_given = 0, hyd_last_seen = 0;
  tdc_word_t prev_hit;
  logic have_prev = 1'b0;
  logic [OUT_W-1:0] link_log[$];

  task automatic check_slot(input tdc_word_t w);
    tdc_word_t e;
    bit found;
    if (w.ch == CH_FILL) begin
      n_fill++;
      checks++;
      if (w[AUX_W-1:0] != cc_data) begin
        failures++;
        $display("%t fill word %h, C&C %h", $time, w, cc_data);
      end
      return;
    end
    found = 1'b0;
    while (exp_q.size() > 0 && !found) begin
      e = exp_q.pop_front();
      if ((w.ch == CH_ROLLOVER && e.ch == CH_ROLLOVER) || (w == e)) found = 1'b1;
      else n_dropped++;
    end
    checks++;
    if (!found) begin
      failures++;
      $display("%t word %h not in the expected stream", $time, w);
      return;
    end
    if (n_dropped > 0 && !ovf_seen) begin
      failures++;
      $display("%t words missing without an overflow flag", $time);
      n_dropped = 0;
    end
    if (w.ch == CH_ROLLOVER) begin
      n_roll++;
      if (w[AUX_W-1]) begin
        n_hyd_fresh++;
        checks++;
        if (int'(w[AUX_W-2:0]) <= hyd_last_seen || int'(w[AUX_W-2:0]) > hyd_last_given) begin
          failures++;
          $display("%t hydrophone sample %0d (last sent %0d, last given %0d)", $time,
                   w[AUX_W-2:0], hyd_last_seen, hyd_last_given);
        end
        hyd_last_seen = int'(w[AUX_W-2:0]);
      end
      have_prev = 1'b0;
    end else begin
      n_hits++;
      if (w.t[0]) n_fall_bin++;
      else        n_rise_bin++;
      if (have_prev && prev_hit.t == w.t) n_multi++;
      prev_hit = w;
      have_prev = 1'b1;
    end
  endtask

  always @(posedge clk) begin
    if (link_strobe && rst_n) begin
      n_links++;
      link_log.push_back(link_word);
      checks++;
      if (last_strobe_t >= 0 && (int'($time) - last_strobe_t) != 80) begin
        failures++;
        $display("%t link word spacing %0d ns", $time, int'($time) - last_strobe_t);
      end
      last_strobe_t = int'($time);
      if (link_word[WORD_W*2 + FLG_FIFO1_FALL]) n_ovf1++;
      if (link_word[WORD_W*2 + FLG_FIFO1_RISE]) n_ovf2++;
      if (link_word[WORD_W*2 + FLG_HYD_LOST])   n_hyd_lost++;
      if (link_word[WORD_W*2 + FLG_FIFO2_FULL]) n_stall++;
      // a flag reports drops of this frame; earlier words were sent before
      check_slot(link_word[2*WORD_W-1:WORD_W]);
      check_slot(link_word[WORD_W-1:0]);
      if (link_word[WORD_W*2 + FLG_FIFO1_FALL] || link_word[WORD_W*2 + FLG_FIFO1_RISE])
        ovf_seen = 1'b1;
      // new C&C status for the next frames' fill words
      cc_data = AUX_W'($urandom);
    end
  end

  // ---------------- stimulus ----------------
  logic [N_CH-1:0] pat [PDEPTH];

  function automatic void make_pattern();
    logic [N_CH-1:0] lvl;
    lvl = '0;
    for (int a = 0; a < PDEPTH; a++) begin
      if (a < 64) begin
        lvl = '0;                                   // quiet start
      end else if (a < 3000) begin                  // sparse hits
        if ($urandom_range(0, 59) == 0) begin
          lvl[$urandom_range(0, N_CH-1)] ^= 1'b1;
          if ($urandom_range(0, 2) == 0) lvl[$urandom_range(0, N_CH-1)] ^= 1'b1;
        end
      end else if (a < 3018) begin                  // 6 full bursts, 3 ns apart
        if ((a - 3000) % 3 == 0) lvl = ~lvl;
      end else if (a >= 5000 && a < 5030) begin     // 30 ns of all channels toggling
        lvl = ~lvl;
      end else if (a >= 6000 && a < 8000) begin     // sparse again
        if ($urandom_range(0, 79) == 0) lvl[$urandom_range(0, N_CH-1)] ^= 1'b1;
      end
      pat[a] = lvl;
    end
  endfunction

  // watchdog
  initial begin
    #400000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hydrophone samples 1, 2, 3 ... every 700 ns
  initial begin
    @(posedge rst_n);
    forever begin
      #700;
      @(negedge clk);
      hyd_data  = (AUX_W-1)'(hyd_last_given + 1);
      hyd_valid = 1'b1;
      @(negedge clk);
      hyd_valid = 1'b0;
      hyd_last_given++;
    end
  end

  initial begin
    make_pattern();
    // the test microprocessor loads the pattern memory during reset
    @(posedge tp_clk);
    for (int a = 0; a < PDEPTH; a++) begin
      #0.1;
      tp_we = 1'b1;
      tp_addr = 13'(a);
      tp_wdata = pat[a];
      @(posedge tp_clk);
    end
    #0.1 tp_we = 1'b0;
    // release reset just after a rising clock edge; the reference starts at
    // the next falling edge, which is ns -1 of the digitizer's time
    @(posedge clk);
    #0.2 rst_n = 1'b1;
    t_ns = -1;
    running = 1'b1;
    @(posedge clk);
    #0.2 db_arm = 1'b1;
    @(posedge clk);
    #0.2 db_arm = 1'b0;
    repeat (20) @(posedge clk);
    @(posedge tp_clk);
    #0.1 tp_last_addr = 13'(PDEPTH - 1);
    tp_start = 1'b1;
    @(posedge tp_clk);
    #0.1 tp_start = 1'b0;
    wait (!tp_busy);
    // let the drain finish: stop when two link words in a row were all fill
    begin
      int idle;
      idle = 0;
      while (idle < 4) begin
        @(posedge link_strobe);
        #0.1;
        if (link_word[2*WORD_W-1 -: CH_W] == CH_FILL && link_word[WORD_W-1 -: CH_W] == CH_FILL)
          idle++;
        else
          idle = 0;
      end
    end
    running = 1'b0;
    // whatever is still expected must be beyond the last received word
    // (only roll-over words of the idle tail may remain)
    checks++;
    foreach (exp_q[i]) if (exp_q[i].ch != CH_ROLLOVER) begin
      failures++;
      $display("expected word %h never arrived", exp_q[i]);
      break;
    end
    // the data buffer must hold exactly the link words seen
    checks++;
    if (int'(db_count) != link_log.size()) begin
      failures++;
      $display("data buffer holds %0d words, %0d were sent", db_count, link_log.size());
    end
    for (int a = 0; a < link_log.size() && a < PDEPTH; a++) begin
      @(negedge clk);
      db_rd_addr = 13'(a);
      @(posedge clk);
      #0.2;
      checks++;
      if (db_rd_data != link_log[a]) begin
        failures++;
        $display("data buffer word %0d: %h expected %h", a, db_rd_data, link_log[a]);
      end
    end
    $display("hits=%0d rise_bin=%0d fall_bin=%0d multi=%0d rollover=%0d hyd_fresh=%0d hyd_lost=%0d",
             n_hits, n_rise_bin, n_fall_bin, n_multi, n_roll, n_hyd_fresh, n_hyd_lost);
    $display("fifo2_full=%0d fifo1_ovf_fall=%0d fifo1_ovf_rise=%0d dropped=%0d fill=%0d links=%0d",
             n_stall, n_ovf1, n_ovf2, n_dropped, n_fill, n_links);
    checks++;
    if (n_rise_bin == 0 || n_fall_bin == 0 || n_multi == 0 || n_roll == 0 ||
        n_hyd_fresh == 0 || n_hyd_lost == 0 || n_stall == 0 || n_ovf1 == 0 ||
        n_ovf2 == 0 || n_dropped == 0 || n_fill == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
