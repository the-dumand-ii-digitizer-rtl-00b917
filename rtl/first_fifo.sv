// first_fifo: queue of occupied 1 ns bins in front of the priority encoder.
//
// The encoder needs one 2 ns cycle per transition, so a burst of
// transitions must wait. Each clock phase has its own first FIFO; each
// entry is one bin from an edge detector (time, changed-channel mask,
// levels). Depth 10 follows the source ("ten words in front of the
// priority encoder"). When a bin arrives while the FIFO is full and no
// entry leaves in the same cycle, the bin is dropped and overflow pulses
// for one cycle: this drop policy is this design's choice.
//
// Interface: synchronous to the rising edge. wr_en/wr_data write one
// entry; rd_data shows the oldest entry whenever empty is low (first-word
// fall-through) and rd_en removes it. A read and a write may happen in the
// same cycle, also when the FIFO is full.
module first_fifo
  import dumand_pkg::*;
#(
  parameter int DEPTH = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  hit_entry_t wr_data,
  input  logic       rd_en,
  output hit_entry_t rd_data,
  output logic       empty,
  output logic       full,
  output logic       overflow
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  hit_entry_t        mem [DEPTH];
  logic [AW-1:0]     rd_ptr, wr_ptr;
  logic [AW:0]       count;
  logic              do_rd, do_wr;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_rd) rd_ptr <= bump(rd_ptr);
      if (do_wr) wr_ptr <= bump(wr_ptr);
      count    <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      overflow <= wr_en && !do_wr;
    end
  end

endmodule
