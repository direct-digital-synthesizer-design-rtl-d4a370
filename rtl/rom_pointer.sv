// ROM pointer: folds a full-period phase onto the quarter-wave ROM.
//
// The two phase MSBs give the quadrant.  The next ROM_ADDR_W bits are the
// position inside the quadrant; in the second and fourth quadrants (phase bit
// PHASE_W-2 set) the sine runs backwards, so those bits are complemented.
// Because the table is sampled half a step off the quadrant edges, the
// complement (255 - n) lands exactly on the mirror image of row n.  The phase
// MSB marks the negative half-period and is passed on to the ROM-to-DAC
// converter.  Phase bits below the ROM address are not used: the ROM has 256
// rows per quadrant, so they only set the fractional phase.
//
// Interface: phase (PHASE_W) in; rom_addr (8), negative out.
// Timing: purely combinational.
//
// The design only names the ROM pointer and its purpose; this quadrant
// folding is the standard quarter-wave scheme chosen here to produce it.
module rom_pointer
  import dds_rom_pkg::*;
#(
  parameter int unsigned PHASE_BITS = PHASE_W
) (
  input  logic [PHASE_BITS-1:0] phase,
  output logic [ROM_ADDR_W-1:0] rom_addr,
  output logic                  negative
);

  logic mirror;

  always_comb begin
    negative = phase[PHASE_BITS-1];
    mirror   = phase[PHASE_BITS-2];
    rom_addr = phase[PHASE_BITS-3 -: ROM_ADDR_W] ^ {ROM_ADDR_W{mirror}};
  end

endmodule
