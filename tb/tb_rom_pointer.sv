// Testbench for rom_pointer: all 4096 phases.  The expected address is the
// position inside the quadrant, run backwards in quadrants 1 and 3; the sign
// is set in quadrants 2 and 3.
module tb_rom_pointer;
  logic [11:0] phase;
  logic [7:0]  rom_addr;
  logic        negative;
  int checks = 0, failures = 0;

  rom_pointer dut (.phase(phase), .rom_addr(rom_addr), .negative(negative));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int quad, pos;
    logic [7:0] exp_addr;
    for (int p = 0; p < 4096; p++) begin
      phase = 12'(p);
      #1;
      quad = p / 1024;
      pos  = (p % 1024) / 4;
      exp_addr = 8'((quad == 1 || quad == 3) ? 255 - pos : pos);
      checks++;
      if (rom_addr !== exp_addr || negative !== (quad >= 2)) begin
        failures++;
        $display("phase %0d: addr %0d neg %b", p, rom_addr, negative);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
