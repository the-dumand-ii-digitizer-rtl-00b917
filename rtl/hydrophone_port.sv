// hydrophone_port: holds auxiliary (hydrophone) data for the roll-over words.
//
// Roll-over words, one per 1024 ns, carry auxiliary data to shore, among it
// the hydrophone data used to locate the optical modules by sonar. This
// block keeps the most recent hydrophone sample until a roll-over word has
// taken it. The word it presents is {fresh, data}: fresh is 1 when the
// sample has not been sent yet, so shore can tell a new sample from a
// repeat. A sample that is replaced before it was sent raises lost for one
// cycle. Carrying the data in roll-over words follows the source; the
// sample width, the fresh bit and the lost flag are this design's choices.
//
// Interface: synchronous to the rising edge. hyd_valid loads hyd_data;
// take (from the priority encoder, when it emits a roll-over word) clears
// fresh. A load in the same cycle as take wins and stays fresh.
module hydrophone_port
  import dumand_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hyd_valid,
  input  logic [AUX_W-2:0] hyd_data,
  input  logic             take,
  output logic [AUX_W-1:0] aux_word,
  output logic             lost
);

  logic [AUX_W-2:0] data_q;
  logic             fresh_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_q  <= '0;
      fresh_q <= 1'b0;
      lost    <= 1'b0;
    end else begin
      lost <= hyd_valid && fresh_q && !take;
      if (hyd_valid) begin
        data_q  <= hyd_data;
        fresh_q <= 1'b1;
      end else if (take) begin
        fresh_q <= 1'b0;
      end
    end
  end

  assign aux_word = {fresh_q, data_q};

endmodule
