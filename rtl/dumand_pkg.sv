// dumand_pkg: constants and types shared by the digitizer blocks.
//
// The digitizer time-stamps every transition of 26 PMT inputs with a 1 ns
// least count, using a 500 MHz clock whose two edges each give one 1 ns bin.
// A transition leaves the chip as a 16-bit word (5-bit channel, 10-bit time,
// 1-bit direction); two such words and 8 error flag bits make the 40-bit
// word handed to the serial link every 80 ns. Those widths follow the
// source. The bit order inside the words, the codes of the roll-over and
// fill words, the meaning of each flag bit and the extra epoch bits kept
// internally for time ordering are this design's own choices.
package dumand_pkg;

  localparam int N_CH     = 26;   // PMT inputs (24 PMT + 2 calibration)
  localparam int TIME_W   = 10;   // time field of a transition word, in ns
  localparam int EPOCH_W  = 2;    // extra internal bits above the 10-bit time
  localparam int EXT_W    = TIME_W + EPOCH_W;  // internal ns time width
  localparam int CH_W     = 5;    // channel number field
  localparam int WORD_W   = 16;   // one transition word
  localparam int FLAG_W   = 8;    // error flags in an output word
  localparam int OUT_W    = 2 * WORD_W + FLAG_W;  // 40-bit output word
  localparam int AUX_W    = WORD_W - CH_W;        // payload of a special word

  // Channel codes that never name a PMT input: special words.
  localparam logic [CH_W-1:0] CH_ROLLOVER = 5'd31;  // time roll-over + hydrophone data
  localparam logic [CH_W-1:0] CH_FILL     = 5'd30;  // empty slot, carries C&C data

  // Error flag bit positions in the output word.
  localparam int FLG_FIFO1_FALL = 0;  // first FIFO 1 (falling edge) dropped a bin
  localparam int FLG_FIFO1_RISE = 1;  // first FIFO 2 (rising edge) dropped a bin
  localparam int FLG_HYD_LOST   = 2;  // a hydrophone sample was overwritten unsent
  localparam int FLG_FIFO2_FULL = 3;  // second FIFO was full (encoder stalled)

  // One 16-bit transition word: {channel, time, direction}.
  // dir = 1: input went high (rising transition), 0: went low.
  typedef struct packed {
    logic [CH_W-1:0]   ch;
    logic [TIME_W-1:0] t;
    logic              dir;
  } tdc_word_t;

  // One first-FIFO entry: a 1 ns bin that held at least one transition
  // (or the roll-over bin).
  typedef struct packed {
    logic              rollover;  // bin is time 0 of a new 1024 ns epoch
    logic [EXT_W-1:0]  t;         // ns time of the bin, with epoch bits
    logic [N_CH-1:0]   mask;      // channels that changed in this bin
    logic [N_CH-1:0]   level;     // input levels sampled in this bin
  } hit_entry_t;


endpackage
