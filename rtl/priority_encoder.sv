// priority_encoder: turns occupied time bins into one word per transition.
//
// The heads of the two first FIFOs (falling-edge bins at odd ns, rising-edge
// bins at even ns) are merged in time order: the older head is served
// first, so the stream to shore stays chronological although the two clock
// phases are recorded in parallel. Within one bin the channels that changed
// are emitted from the lowest channel number up, one word per 2 ns cycle; a
// find-first-set on the not-yet-sent part of the mask picks the next
// channel directly, so empty channels cost no time. A roll-over bin first
// emits the roll-over word (channel code 31) with the auxiliary hydrophone
// word in its remaining 11 bits, then the bin's own transitions.
//
// Interface: synchronous to the rising edge. The FIFO heads are read
// combinationally; *_pop removes a head in the cycle its last word is
// emitted. out_valid/out_word offer a word; it is taken when out_ready is
// high (out_ready low stalls the encoder). hyd_take marks the cycle a
// roll-over word is taken. Latency: a word leaves in the cycle its bin
// reaches the head of its FIFO, then one more per further transition.
// One word per transition, low-to-high channel order, 2 ns per transition
// and the roll-over word follow the source. Ordering the two phases by an
// internal 12-bit time and the roll-over word layout are this design's.
module priority_encoder
  import dumand_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  hit_entry_t       rise_head,
  input  logic             rise_empty,
  output logic             rise_pop,
  input  hit_entry_t       fall_head,
  input  logic             fall_empty,
  output logic             fall_pop,
  input  logic [AUX_W-1:0] aux_word,
  output logic             hyd_take,
  output logic             out_valid,
  output tdc_word_t        out_word,
  input  logic             out_ready
);

  logic [N_CH-1:0] done_q;    // channels of the current head already sent
  logic            roll_done_q;
  logic            lock_q;    // part of the current head has been sent
  logic            src_q;     // locked source: 1 = falling-edge FIFO

  logic             fall_older, sel_fall, have;
  hit_entry_t       head;
  logic [N_CH-1:0]  pending, pick, rest;
  logic [CH_W-1:0]  idx;
  logic             need_roll, last, fire;
  logic [EXT_W-1:0] tdiff;

  // Falling head is older when (rise - fall) is positive modulo 2^EXT_W.
  assign tdiff      = rise_head.t - fall_head.t;
  assign fall_older = !tdiff[EXT_W-1] && (tdiff != '0);

  always_comb begin
    if (lock_q)          sel_fall = src_q;
    else if (rise_empty) sel_fall = 1'b1;
    else if (fall_empty) sel_fall = 1'b0;
    else                 sel_fall = fall_older;
  end

  assign have      = sel_fall ? !fall_empty : !rise_empty;
  assign head      = sel_fall ? fall_head : rise_head;
  assign pending   = head.mask & ~done_q;
  assign need_roll = head.rollover && !roll_done_q;
  assign pick      = pending & (~pending + 1'b1);   // lowest set bit

  always_comb begin
    idx = '0;
    for (int i = N_CH - 1; i >= 0; i--) begin
      if (pending[i]) idx = CH_W'(i);
    end
  end

  assign rest = need_roll ? pending : (pending & ~pick);
  assign last = (rest == '0);

  always_comb begin
    if (need_roll) begin
      out_word = tdc_word_t'({CH_ROLLOVER, aux_word});
    end else begin
      out_word.ch  = idx;
      out_word.t   = head.t[TIME_W-1:0];
      out_word.dir = head.level[idx];
    end
  end

  assign out_valid = have && (need_roll || (pending != '0));
  assign fire      = out_valid && out_ready;
  assign hyd_take  = fire && need_roll;

  // A head with nothing left to send (cannot normally occur) is dropped.
  logic retire;
  assign retire   = (fire && last) || (have && !out_valid);
  assign fall_pop = retire && sel_fall;
  assign rise_pop = retire && !sel_fall;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done_q      <= '0;
      roll_done_q <= 1'b0;
      lock_q      <= 1'b0;
      src_q       <= 1'b0;
    end else if (retire) begin
      done_q      <= '0;
      roll_done_q <= 1'b0;
      lock_q      <= 1'b0;
    end else if (fire) begin
      if (need_roll) roll_done_q <= 1'b1;
      else           done_q      <= done_q | pick;
      lock_q <= 1'b1;
      src_q  <= sel_fall;
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
    !(rise_pop && rise_empty) && !(fall_pop && fall_empty));

endmodule
