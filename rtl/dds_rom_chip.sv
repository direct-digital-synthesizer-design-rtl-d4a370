// ROM section of a direct digital synthesizer: accumulator phase in, sine
// sample for a 10-bit DAC out.
//
// Datapath (one sample per clock):
//   phase -> rom_pointer (quadrant folding) -> rom256 (four decoded 64x9 NOR
//   sub-ROMs, 2:1 mux tree, 9-bit falling-edge latch) -> rom_to_dac (sign and
//   offset) -> 10-bit falling-edge latch -> dac_code.
// The sign bit travels beside the ROM word through a 1-bit latch so that it
// stays aligned with it.  The second latch keeps the combinational conversion
// glitches away from the DAC.
//
// Interface: clk, phase (PHASE_W = 12, from the phase accumulator) in;
// dac_code (10, offset binary, to the DAC) out.  The accumulator and the DAC
// are separate blocks of the chip and are not part of this module.
// Timing: dac_code reflects the phase that was stable before the falling edge
// two edges earlier (latency 2 clocks, throughput 1 sample per clock).
//
// The ROM organisation, the latches and the converter position follow the DDS
// ROM design; the use of phase bits [11:10] as quadrant and [9:2] as ROM
// address, and the converter's offset-binary code, are this implementation's
// choices.  Phase bits [1:0] are unused (see rom_pointer).
module dds_rom_chip
  import dds_rom_pkg::*;
#(
  parameter int unsigned PHASE_BITS = PHASE_W
) (
  input  logic                  clk,
  input  logic [PHASE_BITS-1:0] phase,
  output dac_code_t             dac_code
);

  logic [ROM_ADDR_W-1:0] rom_addr;
  logic                  negative, negative_q;
  rom_word_t             magnitude;
  dac_code_t             dac_next;

  rom_pointer #(.PHASE_BITS(PHASE_BITS)) u_pointer (
    .phase    (phase),
    .rom_addr (rom_addr),
    .negative (negative)
  );

  rom256 u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (magnitude)
  );

  // sign latched in the same stage as the ROM word
  dff_reg #(.W(1)) u_sign_latch (
    .clk (clk),
    .d   (negative),
    .q   (negative_q)
  );

  rom_to_dac u_conv (
    .magnitude (magnitude),
    .negative  (negative_q),
    .dac_code  (dac_next)
  );

  dff_reg #(.W(DAC_W)) u_dac_latch (
    .clk (clk),
    .d   (dac_next),
    .q   (dac_code)
  );

endmodule
