// data_buffer: test-board capture memory for the digitizer's output words.
//
// Words arriving from the link receiver are written one after the other
// into a DEPTH-word memory, from which the analysis computer reads them
// back. arm empties the buffer and starts a new capture; capture stops
// when the buffer is full. Collecting the output stream for transfer to a
// PC follows the source; the depth (8K, the same as the pattern memory)
// and the arm/read interface are this design's choices.
//
// Interface: synchronous to clk. A word is stored in every cycle with
// strobe high while armed and not full. count is the number stored.
// rd_data returns the word at rd_addr one cycle later.
module data_buffer
  import dumand_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     arm,
  input  logic [OUT_W-1:0]         in_word,
  input  logic                     strobe,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [OUT_W-1:0]         rd_data
);

  localparam int AW = $clog2(DEPTH);

  logic [OUT_W-1:0] mem [DEPTH];
  logic             armed_q;
  logic             do_wr;

  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = armed_q && strobe && !full;

  always_ff @(posedge clk) begin
    if (do_wr) mem[count[AW-1:0]] <= in_word;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed_q <= 1'b0;
      count   <= '0;
    end else if (arm) begin
      armed_q <= 1'b1;
      count   <= '0;
    end else if (do_wr) begin
      count <= count + 1'b1;
    end
  end

endmodule
