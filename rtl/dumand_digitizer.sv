// dumand_digitizer: 26-channel, 1 ns multi-hit TDC with serial-link output,
// plus the test-board pattern generator and capture buffer beside it.
//
// Digitizer path (one 500 MHz clock, both edges used):
//   pmt_in -> edge detector 1 (falling edge) -> first FIFO 1 --+
//          -> edge detector 2 (rising edge)  -> first FIFO 2 --+-> priority
//   encoder (time-ordered merge, roll-over + hydrophone words) -> second
//   FIFO (100 words) -> output interface (40-bit word every 80 ns, with
//   error flags and C&C fill words) -> link_word/link_strobe.
// The time stamp counter gives each 1 ns bin its 10-bit time. The two
// edge detectors compare their sample with the other phase's, so every
// input transition gives exactly one 16-bit word {channel, time, dir}.
// Error flags: bit 0 first FIFO 1 overflow, bit 1 first FIFO 2 overflow,
// bit 2 hydrophone sample lost, bit 3 second FIFO full; bits 7:4 are 0.
//
// Test board (separate clock tp_clk; on the bench its tp_pattern drives
// pmt_in through fibres and the link receiver feeds db_word/db_strobe):
// test_pattern_gen (8K x 26 pattern memory) and data_buffer (capture of
// received 40-bit words).
//
// The block structure and the sizes come from the source; the wiring of
// error events to flags and the test-board interfaces are this design's.
module dumand_digitizer
  import dumand_pkg::*;
(
  // digitizer ASIC
  input  logic              clk,          // 500 MHz master clock
  input  logic              rst_n,        // synchronous, active low
  input  logic [N_CH-1:0]   pmt_in,       // asynchronous PMT levels
  input  logic              hyd_valid,    // new hydrophone sample
  input  logic [AUX_W-2:0]  hyd_data,
  input  logic [AUX_W-1:0]  cc_data,      // command and control status word
  output logic [OUT_W-1:0]  link_word,    // to the serial transmitter
  output logic              link_strobe,
  // test board: pattern generator
  input  logic              tp_clk,
  input  logic              tp_we,
  input  logic [12:0]       tp_addr,
  input  logic [N_CH-1:0]   tp_wdata,
  input  logic              tp_start,
  input  logic [12:0]       tp_last_addr,
  output logic              tp_busy,
  output logic [N_CH-1:0]   tp_pattern,
  // test board: data buffer (clocked by clk)
  input  logic              db_arm,
  input  logic [OUT_W-1:0]  db_word,
  input  logic              db_strobe,
  output logic [13:0]       db_count,
  output logic              db_full,
  input  logic [12:0]       db_rd_addr,
  output logic [OUT_W-1:0]  db_rd_data
);

  // ---------------- time stamp ----------------
  logic [EXT_W-1:0] stamp_rise, stamp_fall;
  logic             rollover;

  time_stamp u_time (
    .clk, .rst_n,
    .stamp_rise, .stamp_fall, .rollover
  );

  // ---------------- edge detectors ----------------
  logic [N_CH-1:0] samp_fall, samp_rise;
  hit_entry_t      ent_fall, ent_rise;
  logic            val_fall, val_rise;

  edge_detector #(.FALLING(1'b1)) u_edge1 (
    .clk, .rst_n, .pmt_in,
    .other_sample(samp_rise), .stamp(stamp_fall), .rollover_in(1'b0),
    .sample(samp_fall), .entry(ent_fall), .valid(val_fall)
  );

  edge_detector #(.FALLING(1'b0)) u_edge2 (
    .clk, .rst_n, .pmt_in,
    .other_sample(samp_fall), .stamp(stamp_rise), .rollover_in(rollover),
    .sample(samp_rise), .entry(ent_rise), .valid(val_rise)
  );

  // ---------------- first FIFOs ----------------
  hit_entry_t head_fall, head_rise;
  logic       empty_fall, empty_rise, pop_fall, pop_rise;
  logic       ovf_fall, ovf_rise;

  first_fifo u_fifo1 (
    .clk, .rst_n,
    .wr_en(val_fall), .wr_data(ent_fall),
    .rd_en(pop_fall), .rd_data(head_fall),
    .empty(empty_fall), .full(), .overflow(ovf_fall)
  );

  first_fifo u_fifo2 (
    .clk, .rst_n,
    .wr_en(val_rise), .wr_data(ent_rise),
    .rd_en(pop_rise), .rd_data(head_rise),
    .empty(empty_rise), .full(), .overflow(ovf_rise)
  );

  // ---------------- hydrophone + priority encoder ----------------
  logic [AUX_W-1:0] aux_word;
  logic             hyd_take, hyd_lost;
  logic             enc_valid, enc_ready;
  tdc_word_t        enc_word;

  hydrophone_port u_hyd (
    .clk, .rst_n, .hyd_valid, .hyd_data,
    .take(hyd_take), .aux_word, .lost(hyd_lost)
  );

  priority_encoder u_enc (
    .clk, .rst_n,
    .rise_head(head_rise), .rise_empty(empty_rise), .rise_pop(pop_rise),
    .fall_head(head_fall), .fall_empty(empty_fall), .fall_pop(pop_fall),
    .aux_word, .hyd_take,
    .out_valid(enc_valid), .out_word(enc_word), .out_ready(enc_ready)
  );

  // ---------------- second FIFO + output ----------------
  tdc_word_t      f2_data;
  logic           f2_empty, f2_full, f2_rd;

  assign enc_ready = !f2_full;

  second_fifo u_fifo_out (
    .clk, .rst_n,
    .wr_en(enc_valid && enc_ready), .wr_data(enc_word),
    .rd_en(f2_rd), .rd_data(f2_data),
    .empty(f2_empty), .full(f2_full), .count()
  );

  logic [FLAG_W-1:0] err;
  always_comb begin
    err                 = '0;
    err[FLG_FIFO1_FALL] = ovf_fall;
    err[FLG_FIFO1_RISE] = ovf_rise;
    err[FLG_HYD_LOST]   = hyd_lost;
    err[FLG_FIFO2_FULL] = enc_valid && f2_full;
  end

  output_interface u_out (
    .clk, .rst_n,
    .fifo_data(f2_data), .fifo_empty(f2_empty), .fifo_rd(f2_rd),
    .err_in(err), .cc_data,
    .link_word, .link_strobe
  );

  // ---------------- test board ----------------
  test_pattern_gen u_tpg (
    .tp_clk, .rst_n,
    .we(tp_we), .addr(tp_addr), .wdata(tp_wdata),
    .start(tp_start), .last_addr(tp_last_addr),
    .busy(tp_busy), .pattern(tp_pattern)
  );

  data_buffer u_dbuf (
    .clk, .rst_n, .arm(db_arm),
    .in_word(db_word), .strobe(db_strobe),
    .count(db_count), .full(db_full),
    .rd_addr(db_rd_addr), .rd_data(db_rd_data)
  );

endmodule
