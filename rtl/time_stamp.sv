// time_stamp: the digitizer's nanosecond clock.
//
// A counter advances once per 2 ns cycle of the 500 MHz master clock. The
// rising clock edge that ends count k samples the inputs at time 2k ns and
// the falling edge half a cycle later samples them at 2k+1 ns, so the
// counter supplies the upper bits of the ns time and the clock phase the
// lowest bit. The 10-bit time of a transition word wraps every 1024 ns; the
// rising-edge bin at ns time 0 of each epoch is flagged (rollover) so that a
// roll-over word can be put into the data stream in its proper place.
// Two epoch bits above the 10-bit time are kept for ordering inside the chip.
//
// Interface (all outputs are stable between rising edges):
//   stamp_rise  ns time of the sample taken at the next rising edge
//   stamp_fall  ns time of the sample the falling edge has just taken
//               (valid from the falling edge to the following rising edge)
//   rollover    the next rising-edge sample is ns time 0 of an epoch
// The lowest bit of each stamp is the clock phase and therefore constant
// (0 for stamp_rise, 1 for stamp_fall); it is kept so that both stamps are
// complete ns times.
// The 10-bit time, its wrap at 1024 ns and the roll-over word follow the
// source; counting from zero after reset is this design's choice.
module time_stamp
  import dumand_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output logic [EXT_W-1:0] stamp_rise,
  output logic [EXT_W-1:0] stamp_fall,
  output logic             rollover
);

  logic [EXT_W-2:0] cycle_q;  // 2 ns cycle count, wraps with the epoch bits

  always_ff @(posedge clk) begin
    if (!rst_n) cycle_q <= '0;
    else        cycle_q <= cycle_q + 1'b1;
  end

  // The falling edge that follows rising edge k sees the counter at k+1.
  logic [EXT_W-2:0] prev_cycle;
  assign prev_cycle = cycle_q - 1'b1;

  assign stamp_rise = {cycle_q, 1'b0};
  assign stamp_fall = {prev_cycle, 1'b1};
  assign rollover   = (cycle_q[TIME_W-2:0] == '0);

endmodule
