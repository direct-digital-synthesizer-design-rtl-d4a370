// 64-word x 9-bit NOR mask ROM: one of the four sub-ROMs (A, B, C or D).
//
// Every bit line is pulled high.  A stored 0 is a pull-down transistor between
// the bit line and ground, gated by the word line of its row; a stored 1 is no
// transistor.  With exactly one word line high, each bit line therefore reads
// the bit stored in the selected row; with no word line high every bit line
// reads 1.  The model computes, for each bit, the set of rows that hold a 0
// (ZERO_ROWS) and forms bit_line[b] = NOR(word_line & ZERO_ROWS[b]).
//
// SEGMENT picks which quarter of the 256-word sine table this array holds:
// row r of segment s holds dds_rom_pkg::sine_word(64*s + r).  SEG_D (rows
// 0..63) is the default.
//
// Interface: word_line (64, one-hot) in, bit_line (9) out.
// Timing: purely combinational.  An assertion flags more than one active
// word line.
//
// The NOR organisation, the 2^6 x 9 size and the table formula follow the DDS
// ROM design; contents are computed at elaboration rather than listed.
module rom64
  import dds_rom_pkg::*;
#(
  parameter rom_seg_e SEGMENT = SEG_D
) (
  input  logic [SEG_ROWS-1:0]   word_line,
  output logic [ROM_DATA_W-1:0] bit_line
);

  typedef logic [ROM_DATA_W-1:0][SEG_ROWS-1:0] zero_map_t;

  // Rows that carry a pull-down transistor, per bit line.
  function automatic zero_map_t zero_rows(input int unsigned seg);
    zero_map_t m;
    rom_word_t w;
    m = '0;
    for (int unsigned r = 0; r < SEG_ROWS; r++) begin
      w = sine_word(seg * SEG_ROWS + r);
      for (int unsigned b = 0; b < ROM_DATA_W; b++)
        m[b][r] = ~w[b];
    end
    return m;
  endfunction

  localparam zero_map_t ZERO_ROWS = zero_rows(int'(SEGMENT));

  always_comb begin
    for (int unsigned b = 0; b < ROM_DATA_W; b++)
      bit_line[b] = ~|(word_line & ZERO_ROWS[b]);
  end

  // A NOR array reads the AND of all active rows: at most one word line may
  // be high.
  always_comb
    assert ($countones(word_line) <= 1)
      else $error("rom64: %0d word lines active", $countones(word_line));

endmodule
