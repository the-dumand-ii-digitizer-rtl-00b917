// second_fifo: buffer of transition words in front of the output interface.
//
// The priority encoder produces words in bursts of up to one per 2 ns
// cycle; the link to shore drains two words per 80 ns. This FIFO evens out
// the difference. Its 100-word depth follows the source (chosen there by
// Monte Carlo simulation). When it is full the encoder waits (full is its
// back-pressure), so no word is lost here: that policy is this design's
// choice.
//
// Interface: synchronous to the rising edge, first-word fall-through.
// wr_en writes wr_data unless full; rd_data is the oldest word whenever
// empty is low and rd_en removes it. count gives the number of words held.
module second_fifo
  import dumand_pkg::*;
#(
  parameter int DEPTH = 100
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  tdc_word_t             wr_data,
  input  logic                  rd_en,
  output tdc_word_t             rd_data,
  output logic                  empty,
  output logic                  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  tdc_word_t     mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_rd, do_wr;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && !full;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_rd) rd_ptr <= bump(rd_ptr);
      if (do_wr) wr_ptr <= bump(wr_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // A write into a full FIFO would lose a word; the encoder must not try.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && full));

endmodule
