// tb_edge_detector: checks the pair of edge detectors (falling and rising
// edge) as they are used together. Inputs change between clock edges at
// random; a reference keeps the input level of every 1 ns bin and expects
// each detector to report exactly the channels that changed since the
// previous bin, the sampled levels, the stamp it was given and the
// zero-suppressing valid bit. Every input transition must be seen by
// exactly one detector.
`timescale 1ns/1ps
module tb_edge_detector;
  import dumand_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] pmt_in = '0;
  logic [N_CH-1:0] samp_f, samp_r;
  logic [EXT_W-1:0] stamp_f = '0, stamp_r = '0;
  logic roll_r = 1'b0;
  hit_entry_t ent_f, ent_r;
  logic val_f, val_r;
  int checks = 0, failures = 0;
  int n_trans = 0, n_seen = 0, n_rise_bins = 0, n_fall_bins = 0, n_empty = 0;

  edge_detector #(.FALLING(1'b1)) dut_f (
    .clk, .rst_n, .pmt_in, .other_sample(samp_r), .stamp(stamp_f),
    .rollover_in(1'b0), .sample(samp_f), .entry(ent_f), .valid(val_f));
  edge_detector #(.FALLING(1'b0)) dut_r (
    .clk, .rst_n, .pmt_in, .other_sample(samp_f), .stamp(stamp_r),
    .rollover_in(roll_r), .sample(samp_r), .entry(ent_r), .valid(val_r));

  always #1 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_entry(input hit_entry_t e, input logic v,
                             input logic [N_CH-1:0] lvl, input logic [N_CH-1:0] prev,
                             input logic [EXT_W-1:0] st, input logic roll);
    logic [N_CH-1:0] m;
    m = lvl ^ prev;
    checks++;
    if (v != (roll || (m != '0))) begin
      failures++;
      $display("%t valid=%0b expected %0b", $time, v, roll || (m != '0));
    end
    if (v) begin
      checks++;
      if (e.mask != m || e.level != lvl || e.t != st || e.rollover != roll) begin
        failures++;
        $display("%t entry mask=%h/%h level=%h/%h t=%0d/%0d", $time,
                 e.mask, m, e.level, lvl, e.t, st);
      end
      n_seen += $countones(e.mask);
    end else begin
      n_empty++;
    end
  endtask

  initial begin
    logic [N_CH-1:0] prev, lvl;
    logic [EXT_W-1:0] st;
    logic rl;
    prev = '0;
    repeat (3) @(posedge clk);
    #0.3 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      // inputs change 0.5 ns before each edge
      #0.2;
      if ($urandom_range(0, 2) == 0) begin
        lvl = pmt_in;
        for (int c = 0; c < N_CH; c++) if ($urandom_range(0, 7) == 0) lvl[c] = ~lvl[c];
        if ($urandom_range(0, 30) == 0) lvl = ~pmt_in;
        n_trans += $countones(lvl ^ pmt_in);
        pmt_in = lvl;
      end
      st = EXT_W'($urandom);
      rl = ($urandom_range(0, 20) == 0);
      if (clk) begin           // next edge is falling
        stamp_f = st;
      end else begin
        stamp_r = st;
        roll_r  = rl;
      end
      lvl = pmt_in;
      @(clk);
      #0.1;
      if (!clk) begin
        check_entry(ent_f, val_f, lvl, prev, st, 1'b0);
        if (val_f && ent_f.mask != '0) n_fall_bins++;
      end else begin
        check_entry(ent_r, val_r, lvl, prev, st, rl);
        if (val_r && ent_r.mask != '0) n_rise_bins++;
      end
      prev = lvl;
      #0.2;
    end
    checks++;
    if (n_seen != n_trans) begin
      failures++;
      $display("transitions %0d, reported %0d", n_trans, n_seen);
    end
    checks++;
    if (n_rise_bins == 0 || n_fall_bins == 0 || n_empty == 0) failures++;
    $display("transitions=%0d rise_bins=%0d fall_bins=%0d empty=%0d",
             n_trans, n_rise_bins, n_fall_bins, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
