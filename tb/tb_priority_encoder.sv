// tb_priority_encoder: feeds the encoder from two queue models of the
// first FIFOs (rising-edge bins at even ns, falling-edge bins at odd ns)
// and compares its words with a list built independently: bins in time
// order (the falling-edge bin at 1023 ns ahead of the roll-over bin at
// 1024 ns), a roll-over word first in each roll-over bin, then one word per
// changed channel from low to high channel. The 12-bit internal time wraps
// during the test. Pass 1 keeps out_ready high and checks the rate of one
// word per 2 ns cycle with no gaps; pass 2 stalls at random.
`timescale 1ns/1ps
module tb_priority_encoder;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  hit_entry_t rise_head, fall_head;
  logic rise_empty, fall_empty, rise_pop, fall_pop;
  logic [AUX_W-1:0] aux_word = '0;
  logic hyd_take, out_valid, out_ready = 1'b1;
  tdc_word_t out_word;
  int checks = 0, failures = 0;
  int n_roll = 0, n_multi = 0, n_stall = 0;

  hit_entry_t qr[$], qf[$];
  tdc_word_t  exp_q[$];

  priority_encoder dut (.*);

  assign rise_empty = (qr.size() == 0);
  assign fall_empty = (qf.size() == 0);
  assign rise_head  = rise_empty ? '0 : qr[0];
  assign fall_head  = fall_empty ? '0 : qf[0];

  always #1 clk = ~clk;

  // The model FIFOs pop just after the edge, as registers would.
  always @(posedge clk) begin
    logic rp, fp;
    rp = rise_pop;
    fp = fall_pop;
    #0.1;
    if (rp) void'(qr.pop_front());
    if (fp) void'(qf.pop_front());
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(input int nbins, input int t0);
    hit_entry_t e;
    for (int b = t0; b < t0 + nbins; b++) begin
      e.t        = EXT_W'(b);
      e.rollover = (b % 2 == 0) && (b % 1024 == 0);
      e.mask     = '0;
      if ($urandom_range(0, 3) == 0) begin
        if ($urandom_range(0, 9) == 0) e.mask = N_CH'($urandom);
        else e.mask[$urandom_range(0, N_CH-1)] = 1'b1;
        if ($urandom_range(0, 4) == 0) e.mask[$urandom_range(0, N_CH-1)] = 1'b1;
      end
      // always a transition in the falling-edge bin just before a roll-over:
      // it has time 1023 and must come out ahead of the roll-over word
      if (b % 1024 == 1023) e.mask[3] = 1'b1;
      e.level = N_CH'($urandom);
      if (!e.rollover && e.mask == '0) continue;
      if (e.rollover) exp_q.push_back(tdc_word_t'({CH_ROLLOVER, 11'h0}));
      for (int c = 0; c < N_CH; c++)
        if (e.mask[c]) exp_q.push_back('{ch: CH_W'(c), t: e.t[TIME_W-1:0], dir: e.level[c]});
      if ($countones(e.mask) > 1) n_multi++;
      if (b % 2 == 0) qr.push_back(e);
      else            qf.push_back(e);
    end
  endtask

  task automatic run(input bit stall, input int max_cycles);
    int cyc;
    tdc_word_t w;
    cyc = 0;
    while ((exp_q.size() > 0) && cyc < max_cycles) begin
      out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;
      aux_word  = AUX_W'($urandom);
      #0.5;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("%t no word although bins are waiting", $time);
      end
      if (out_valid && out_ready) begin
        w = exp_q.pop_front();
        checks++;
        if (w.ch == CH_ROLLOVER) begin
          n_roll++;
          if (out_word != tdc_word_t'({CH_ROLLOVER, aux_word}) || !hyd_take) begin
            failures++;
            $display("%t roll-over word %h aux %h take %0b", $time, out_word, aux_word, hyd_take);
          end
        end else if (out_word != w || hyd_take) begin
          failures++;
          $display("%t word %h expected %h", $time, out_word, w);
        end
      end else if (out_valid) begin
        n_stall++;
      end
      @(posedge clk);
      #0.2;
      cyc++;
    end
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d words missing", exp_q.size());
    end
  endtask

  initial begin
    int nw;
    repeat (3) @(posedge clk);
    #0.2 rst_n = 1'b1;
    // pass 1: full speed, one word per cycle
    build(5000, 0);
    nw = exp_q.size();
    run(1'b0, nw);
    checks++;
    if (qr.size() != 0 || qf.size() != 0) begin
      failures++;
      $display("bins left: %0d %0d", qr.size(), qf.size());
    end
    // pass 2: random stalls, continuing in time across the 12-bit wrap
    build(5000, 5000);
    run(1'b1, 100000);
    #0.5;
    checks++;
    if (out_valid) failures++;
    checks++;
    if (n_roll < 5 || n_multi == 0 || n_stall == 0) failures++;
    $display("words pass1=%0d rollovers=%0d multi-hit bins=%0d stalls=%0d", nw, n_roll, n_multi, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
