// edge_detector: assigns asynchronous PMT levels to 1 ns time bins.
//
// On its clock edge (rising, or falling when FALLING = 1) the detector
// samples all N_CH inputs. A channel has a transition in this bin when its
// new sample differs from the sample the other detector took half a clock
// cycle (1 ns) earlier, so the two detectors together see the inputs every
// nanosecond and every transition is caught by exactly one of them. Bins
// with no transition produce nothing (zero suppression), except the
// roll-over bin, which is always passed on so that the roll-over word has a
// place in the stream.
//
// Interface: sample is this detector's latest sample (fed to the other
// detector as other_sample). entry/valid describe the bin sampled at the
// last active edge and hold until the next one: the rising-edge detector's
// output is read one cycle later, the falling-edge detector's half a cycle
// later, both at a rising edge.
// Two detectors, one per clock edge, and zero suppression follow the
// source; comparing against the other phase's sample and a single sampling
// flip-flop per input (no metastability filter) are this design's choices.
module edge_detector
  import dumand_pkg::*;
#(
  parameter bit FALLING = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_CH-1:0]  pmt_in,
  input  logic [N_CH-1:0]  other_sample,
  input  logic [EXT_W-1:0] stamp,
  input  logic             rollover_in,
  output logic [N_CH-1:0]  sample,
  output hit_entry_t       entry,
  output logic             valid
);

  hit_entry_t next_entry;

  always_comb begin
    next_entry.rollover = rollover_in;
    next_entry.t        = stamp;
    next_entry.mask     = pmt_in ^ other_sample;
    next_entry.level    = pmt_in;
  end

  generate
    if (FALLING) begin : g_fall
      always_ff @(negedge clk) begin
        if (!rst_n) begin
          sample <= '0;
          entry  <= '0;
          valid  <= 1'b0;
        end else begin
          sample <= pmt_in;
          entry  <= next_entry;
          valid  <= rollover_in || (next_entry.mask != '0);
        end
      end
    end else begin : g_rise
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          sample <= '0;
          entry  <= '0;
          valid  <= 1'b0;
        end else begin
          sample <= pmt_in;
          entry  <= next_entry;
          valid  <= rollover_in || (next_entry.mask != '0);
        end
      end
    end
  endgenerate

endmodule
