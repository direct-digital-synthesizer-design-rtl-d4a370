// Bank of W master-slave D flip-flops, triggered on the falling clock edge.
//
// Used twice in the DDS ROM: 9 flip-flops latch the multiplexed ROM word, and
// 10 flip-flops latch the DAC code so that the DAC never sees the glitches of
// the combinational ROM-to-DAC conversion.
//
// Interface: clk, d (W bits) in; q (W bits) out.
// Timing: q takes the value of d at each falling edge of clk and holds it for
// one clock period.  There is no reset: q is valid from the first falling
// edge after d is valid.
//
// The falling-edge trigger follows the flip-flop description of the design;
// the absence of a reset is this implementation's choice, matching a plain
// master-slave cell.
module dff_reg #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(negedge clk) q <= d;

endmodule
