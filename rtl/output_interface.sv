// output_interface: packs transition words into 40-bit link words.
//
// The serial link to shore takes one 40-bit word every 80 ns (every FRAME
// = 40 cycles of the 500 MHz clock). During each frame this block takes up
// to two 16-bit words from the second FIFO; at the frame's last cycle it
// presents {flags[7:0], first word, second word} with a one-cycle strobe.
// A slot left empty carries a fill word (channel code 30) whose other 11
// bits are the command-and-control (C&C) data word, so status reaches shore
// even when the detector is quiet. The flags are the error events seen
// during the frame, held until the word that reports them is sent.
//
// Interface: synchronous to the rising edge. fifo_* is the second FIFO's
// read side (first-word fall-through). err_in are one-cycle error events,
// bit i reported as flag bit i. link_word/link_strobe go to the serial
// transmitter; link_word holds its value between strobes.
// The 80 ns word period, two 16-bit words plus 8 flag bits per 40-bit word
// follow the source. The bit order, the fill word and how C&C data travel
// are this design's choices.
module output_interface
  import dumand_pkg::*;
#(
  parameter int FRAME = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tdc_word_t        fifo_data,
  input  logic             fifo_empty,
  output logic             fifo_rd,
  input  logic [FLAG_W-1:0] err_in,
  input  logic [AUX_W-1:0] cc_data,
  output logic [OUT_W-1:0] link_word,
  output logic             link_strobe
);

  localparam int FW = $clog2(FRAME);

  logic [FW-1:0]     cyc_q;
  tdc_word_t         slot_q [2];
  logic [1:0]        nslot_q;
  logic [FLAG_W-1:0] flags_q;
  logic              frame_end;
  tdc_word_t         fill;

  assign frame_end = (cyc_q == FW'(FRAME - 1));
  assign fifo_rd   = !frame_end && (nslot_q != 2'd2) && !fifo_empty;
  assign fill      = tdc_word_t'({CH_FILL, cc_data});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc_q       <= '0;
      nslot_q     <= '0;
      slot_q[0]   <= '0;
      slot_q[1]   <= '0;
      flags_q     <= '0;
      link_word   <= '0;
      link_strobe <= 1'b0;
    end else begin
      link_strobe <= frame_end;
      if (frame_end) begin
        cyc_q     <= '0;
        nslot_q   <= '0;
        flags_q   <= '0;
        link_word <= {flags_q | err_in,
                      (nslot_q >= 2'd1) ? slot_q[0] : fill,
                      (nslot_q == 2'd2) ? slot_q[1] : fill};
      end else begin
        cyc_q   <= cyc_q + 1'b1;
        flags_q <= flags_q | err_in;
        if (fifo_rd) begin
          slot_q[nslot_q[0]] <= fifo_data;
          nslot_q            <= nslot_q + 1'b1;
        end
      end
    end
  end

endmodule
