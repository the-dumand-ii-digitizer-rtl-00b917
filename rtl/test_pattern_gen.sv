// test_pattern_gen: test-board source of simulated PMT signals.
//
// A DEPTH-word by N_CH-bit pattern memory (8K x 26, as on the test board)
// is loaded by the controlling microprocessor. On a start command the words
// at addresses 0 .. last_addr are clocked out one per tp_clk cycle to the
// 26 optical transmitters that stand in for the PMTs; afterwards the last
// word stays on the outputs. The memory size and "load, then clock out on
// command" follow the source. The load port, the play length register, one
// word per clock and holding the last word are this design's choices.
//
// Interface: synchronous to tp_clk. we/addr/wdata write one word. start
// (ignored while busy) begins play-out at address 0; the first word
// appears on pattern two cycles after start (one for the memory read, one
// for the output register); busy is high while words are still being read.
module test_pattern_gen
  import dumand_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic                     tp_clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [N_CH-1:0]          wdata,
  input  logic                     start,
  input  logic [$clog2(DEPTH)-1:0] last_addr,
  output logic                     busy,
  output logic [N_CH-1:0]          pattern
);

  localparam int AW = $clog2(DEPTH);

  logic [N_CH-1:0] mem [DEPTH];
  logic [AW-1:0]   rd_ptr, stop_q;
  logic [N_CH-1:0] rd_word;
  logic            rd_valid;

  always_ff @(posedge tp_clk) begin
    if (we) mem[addr] <= wdata;
    rd_word <= mem[rd_ptr];
  end

  always_ff @(posedge tp_clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      stop_q   <= '0;
      busy     <= 1'b0;
      rd_valid <= 1'b0;
      pattern  <= '0;
    end else begin
      rd_valid <= busy;
      if (rd_valid) pattern <= rd_word;
      if (!busy && start) begin
        busy   <= 1'b1;
        rd_ptr <= '0;
        stop_q <= last_addr;
      end else if (busy) begin
        if (rd_ptr == stop_q) busy <= 1'b0;
        else                  rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end

endmodule
