// tb_workloads: runs the digitizer top at its default sizes under the two
// load requirements it was sized for, and expects no loss at all.
//   1. Rate: 24 PMT channels with random pulses at 100 kHz average each
//      (pulse widths 10..200 ns), the two calibration channels at 10 kHz,
//      for 200 us.
//   2. Buffering: all 24 PMTs give two pulses at the same moment
//      (48 pulses = 96 transitions within 60 ns).
// A reference samples the inputs every ns and lists the expected words;
// the link stream must equal that list exactly (fill words aside), with no
// overflow flag. Inputs change half way between clock edges.
`timescale 1ns/1ps
module tb_workloads;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] pmt_in = '0;
  logic hyd_valid = 1'b0;
  logic [AUX_W-2:0] hyd_data = '0;
  logic [AUX_W-1:0] cc_data = '0;
  logic [OUT_W-1:0] link_word;
  logic link_strobe;
  logic tp_busy, db_full;
  logic [N_CH-1:0] tp_pattern;
  logic [13:0] db_count;
  logic [OUT_W-1:0] db_rd_data;

  dumand_digitizer dut (
    .clk, .rst_n, .pmt_in, .hyd_valid, .hyd_data, .cc_data,
    .link_word, .link_strobe,
    .tp_clk(1'b0), .tp_we(1'b0), .tp_addr('0), .tp_wdata('0), .tp_start(1'b0),
    .tp_last_addr('0), .tp_busy, .tp_pattern,
    .db_arm(1'b0), .db_word('0), .db_strobe(1'b0),
    .db_count, .db_full, .db_rd_addr('0), .db_rd_data
  );

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hits = 0, n_roll = 0, n_flags = 0, n_bad = 0, max_fill = 0;
  int n_pulses = 0;
  logic running = 1'b0;
  int t_ns;
  logic [N_CH-1:0] prev_lvl = '0;
  tdc_word_t exp_q[$];

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

  task automatic check_slot(input tdc_word_t w);
    tdc_word_t e;
    if (w.ch == CH_FILL) return;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("%t unexpected word %h", $time, w);
      return;
    end
    e = exp_q.pop_front();
    if (w.ch == CH_ROLLOVER && e.ch == CH_ROLLOVER) begin
      n_roll++;
    end else if (w != e) begin
      failures++;
      n_bad++;
      if (n_bad < 10) $display("%t word %h expected %h", $time, w, e);
    end else begin
      n_hits++;
    end
  endtask

  always @(posedge clk) begin
    if (link_strobe && rst_n) begin
      if (link_word[OUT_W-1 -: FLAG_W] & 8'h07) n_flags++;
      check_slot(link_word[2*WORD_W-1:WORD_W]);
      check_slot(link_word[WORD_W-1:0]);
    end
    if (int'(dut.u_fifo_out.count) > max_fill) max_fill = int'(dut.u_fifo_out.count);
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-channel pulse generator state, in ns
  int next_rise [N_CH];
  int fall_at   [N_CH];

  function automatic int gap(input int c);
    // uniform interval with mean 10 us (PMT) or 100 us (calibration)
    return (c < 24) ? $urandom_range(200, 19800) : $urandom_range(2000, 198000);
  endfunction

  initial begin
    int now, rate_end;
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    t_ns = -1;
    running = 1'b1;
    // inputs change 0.5 ns before each edge: now = ns index of the next bin
    @(negedge clk);
    #0.5;
    now = 0;
    for (int c = 0; c < N_CH; c++) begin
      next_rise[c] = gap(c);
      fall_at[c] = -1;
    end
    rate_end = 200000;
    // ---- workload 1: rate ----
    while (now < rate_end) begin
      for (int c = 0; c < N_CH; c++) begin
        if (now == next_rise[c]) begin
          pmt_in[c] = 1'b1;
          fall_at[c] = now + $urandom_range(10, 200);
          n_pulses++;
        end else if (now == fall_at[c]) begin
          pmt_in[c] = 1'b0;
          next_rise[c] = now + gap(c);
        end
      end
      #1;
      now++;
    end
    pmt_in = '0;
    #20000;
    $display("rate: %0d pulses, words so far %0d, second FIFO peak %0d", n_pulses, n_hits, max_fill);
    checks++;
    if (n_pulses < 400) failures++;
    // ---- workload 2: 48 simultaneous pulses ----
    max_fill = 0;
    pmt_in[23:0] = '1;
    #20 pmt_in[23:0] = '0;
    #20 pmt_in[23:0] = '1;
    #20 pmt_in[23:0] = '0;
    #40000;
    $display("burst: second FIFO peak %0d of 100", max_fill);
    running = 1'b0;
    checks++;
    foreach (exp_q[i]) if (exp_q[i].ch != CH_ROLLOVER) begin
      failures++;
      $display("expected word %h never arrived", exp_q[i]);
      break;
    end
    checks++;
    if (n_flags != 0) begin
      failures++;
      $display("%0d link words carried a loss flag", n_flags);
    end
    $display("hits=%0d rollovers=%0d", n_hits, n_roll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
