// ROM-to-DAC converter: turns the 9-bit quarter-wave magnitude and the sign
// of the half-period into the 10-bit offset-binary DAC code.
//
// Positive half: code = 512 + magnitude (512 .. 1023).
// Negative half: code = 511 - magnitude (511 .. 0), i.e. the bitwise
// complement of the positive code.  The two halves are therefore symmetric
// about mid-scale 511.5, and the full 0..1023 DAC range is used.
//
// Interface: magnitude (9), negative in; dac_code (10) out.
// Timing: purely combinational; the code is latched by a separate register.
//
// The design names this converter and its 9-bit to 10-bit widths; the
// offset-binary mapping is this implementation's choice.
module rom_to_dac
  import dds_rom_pkg::*;
(
  input  rom_word_t magnitude,
  input  logic      negative,
  output dac_code_t dac_code
);

  dac_code_t pos_code;

  always_comb begin
    pos_code = {1'b1, magnitude};                 // 512 + magnitude
    dac_code = negative ? ~pos_code : pos_code;   // 1023 - (512 + m) = 511 - m
  end

endmodule
