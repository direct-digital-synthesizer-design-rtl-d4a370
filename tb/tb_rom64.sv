// Testbench for rom64: one instance per sub-ROM (D, C, B, A).  Each word line
// is raised in turn and the 9 bit lines are compared with
// round(511 * sin((n + 1/2) * 90/256 deg)) computed here in floating point,
// plus a few words read directly from the published table.  With no word
// line raised every bit line must stay pulled high.
module tb_rom64;
  import dds_rom_pkg::*;

  logic [63:0] word_line;
  logic [8:0]  bl [4];
  int checks = 0, failures = 0;

  rom64 #(.SEGMENT(SEG_D)) u_d (.word_line(word_line), .bit_line(bl[0]));
  rom64 #(.SEGMENT(SEG_C)) u_c (.word_line(word_line), .bit_line(bl[1]));
  rom64 #(.SEGMENT(SEG_B)) u_b (.word_line(word_line), .bit_line(bl[2]));
  rom64 #(.SEGMENT(SEG_A)) u_a (.word_line(word_line), .bit_line(bl[3]));

  function automatic int ref_word(int n);
    real pi = 3.14159265358979323846;
    return int'($floor(511.0 * $sin((real'(n) + 0.5) * pi / 512.0) + 0.5));
  endfunction

  task automatic expect_word(int seg, int row, logic [8:0] value);
    word_line = 64'd1 << row;
    #1;
    checks++;
    if (bl[seg] !== value) begin
      failures++;
      $display("seg %0d row %0d: got %0d expected %0d", seg, row, bl[seg], value);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int r = 0; r < 64; r++)
        expect_word(s, r, 9'(ref_word(64 * s + r)));
    // words from the published table
    expect_word(0, 0, 9'b000000010);
    expect_word(0, 1, 9'b000000101);
    expect_word(0, 63, 9'b011000010);
    expect_word(1, 15, 9'b011101111);   // 239.49998: rounding edge case
    expect_word(2, 10, 9'b110000000);
    expect_word(3, 0, 9'b111011001);
    expect_word(3, 63, 9'b111111111);
    // no row selected: all bit lines stay high
    word_line = '0;
    #1;
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (bl[s] !== 9'h1FF) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
