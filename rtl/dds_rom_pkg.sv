// Shared constants, types and the sine-table formula of the DDS ROM.
//
// The ROM holds one quarter of a sine period in 256 words of 9 bits.  Word n
// holds round(511 * sin((n + 1/2) * 90/256 degrees)): the first word sits half
// a step (0.1758 deg) past zero, each step is 0.3516 deg, and the amplitude is
// normalised to the 9-bit full scale.  The half-step offset makes the table
// exactly mirror-symmetric about 90 deg, so the other three quadrants can be
// produced by complementing the address and/or the output.
//
// The 256 words are split into four 64-word ROMs, named D, C, B and A from the
// low addresses up; the two address MSBs {M, N} select among them.
//
// sine_word() is a constant function evaluated at elaboration: it computes the
// sine with a Taylor series in Q30 fixed-point integer arithmetic, so the table
// needs no data file and no real-number support in synthesis.
package dds_rom_pkg;

  parameter int unsigned ROM_ADDR_W = 8;                // 256 rows
  parameter int unsigned ROM_DATA_W = 9;                // 9 columns
  parameter int unsigned SEG_ADDR_W = 6;                // 64 rows per sub-ROM
  parameter int unsigned SEG_ROWS   = 1 << SEG_ADDR_W;
  parameter int unsigned NUM_SEGS   = 1 << (ROM_ADDR_W - SEG_ADDR_W);
  parameter int unsigned DAC_W      = ROM_DATA_W + 1;   // 10-bit DAC
  parameter int unsigned PHASE_W    = 12;               // accumulator width

  // Sub-ROM index = {M, N} = the two address MSBs (ROM D holds rows 0..63).
  typedef enum logic [1:0] {
    SEG_D = 2'd0,
    SEG_C = 2'd1,
    SEG_B = 2'd2,
    SEG_A = 2'd3
  } rom_seg_e;

  typedef logic [ROM_DATA_W-1:0] rom_word_t;
  typedef logic [DAC_W-1:0]      dac_code_t;

  // round(2^30 * pi)
  localparam longint unsigned PI_Q30 = 64'd3373259426;

  // Quarter-wave sine table entry n (0 <= n < 2^addr_w), scaled to full_scale.
  function automatic longint unsigned sine_scaled(input int unsigned n,
                                                  input int unsigned addr_w,
                                                  input longint unsigned full_scale);
    longint unsigned x, x2, term, s_pos, s_neg;
    // angle in radians, Q30: (2n + 1) * (pi/2) / 2^(addr_w + 1)
    x = ((2 * longint'(n) + 1) * PI_Q30) >> (addr_w + 2);
    x2 = (x * x) >> 30;
    term  = x;
    s_pos = x;
    s_neg = 0;
    for (int unsigned k = 1; k <= 7; k++) begin
      term = ((term * x2) >> 30) / ((2 * k) * (2 * k + 1));
      if (k % 2 == 1) s_neg += term;
      else            s_pos += term;
    end
    return (full_scale * (s_pos - s_neg) + (64'd1 << 29)) >> 30;
  endfunction

  function automatic rom_word_t sine_word(input int unsigned n);
    return rom_word_t'(sine_scaled(n, ROM_ADDR_W, (64'd1 << ROM_DATA_W) - 1));
  endfunction

endpackage
