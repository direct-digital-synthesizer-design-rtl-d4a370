// 256-word x 9-bit quarter-sine ROM with latched output.
//
// The 8-bit address is split as {M, N, row[5:0]}.  The six low bits go to four
// tree decoders, one per 64-word NOR sub-ROM, so each sub-ROM only loads its
// own word lines.  All four sub-ROMs are read at once; two 9-bit 2:1 path
// selectors controlled by N choose ROM A or B (mux 1) and ROM C or D (mux 2),
// and a third controlled by M chooses between them (mux 3):
//
//   M N | sub-ROM      rows
//   0 0 |   D          0..63
//   0 1 |   C          64..127
//   1 0 |   B          128..191
//   1 1 |   A          192..255
//
// Nine falling-edge D flip-flops latch the selected word.
//
// Interface: clk, addr (8) in; data (9) out.
// Timing: data = table[addr] one falling edge after addr is applied
// (addr must be stable before the falling edge).
//
// The split into four decoded sub-ROMs, the mux tree, the select table and the
// output register follow the DDS ROM design.  Word contents are given by
// dds_rom_pkg::sine_word().
module rom256
  import dds_rom_pkg::*;
(
  input  logic                  clk,
  input  logic [ROM_ADDR_W-1:0] addr,
  output rom_word_t             data
);

  logic m_sel, n_sel;
  logic [SEG_ADDR_W-1:0] row;
  assign {m_sel, n_sel, row} = addr;

  rom_word_t seg_word [NUM_SEGS];

  for (genvar s = 0; s < NUM_SEGS; s++) begin : g_seg
    logic [SEG_ROWS-1:0] word_line;

    tree_decoder #(.ADDR_W(SEG_ADDR_W)) u_dec (
      .addr      (row),
      .word_line (word_line)
    );

    rom64 #(.SEGMENT(rom_seg_e'(s))) u_rom (
      .word_line (word_line),
      .bit_line  (seg_word[s])
    );
  end

  rom_word_t mux_ab, mux_cd, mux_out;

  // mux 1: ROM A (N = 1) or ROM B (N = 0)
  mux2to1 #(.W(ROM_DATA_W)) u_mux1 (
    .a(seg_word[SEG_A]), .b(seg_word[SEG_B]), .sel(n_sel), .z(mux_ab)
  );
  // mux 2: ROM C (N = 1) or ROM D (N = 0)
  mux2to1 #(.W(ROM_DATA_W)) u_mux2 (
    .a(seg_word[SEG_C]), .b(seg_word[SEG_D]), .sel(n_sel), .z(mux_cd)
  );
  // mux 3: upper half (M = 1) or lower half (M = 0)
  mux2to1 #(.W(ROM_DATA_W)) u_mux3 (
    .a(mux_ab), .b(mux_cd), .sel(m_sel), .z(mux_out)
  );

  dff_reg #(.W(ROM_DATA_W)) u_latch (
    .clk (clk),
    .d   (mux_out),
    .q   (data)
  );

endmodule
