// W-bit 2:1 path selector (the "9 mux 2 to 1" macro).
//
// Each bit is a pair of transmission gates driven by the select and its
// complement, so exactly one input reaches the output: z = a.sel + b.sel'.
// In logic this is an AND-OR per bit.
//
// Interface: a, b (W bits), sel in; z (W bits) out.  sel = 1 passes a.
// Timing: purely combinational.
//
// The select polarity and the 9-bit width follow the DDS ROM design.
module mux2to1 #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] z
);

  always_comb z = (a & {W{sel}}) | (b & {W{~sel}});

endmodule
