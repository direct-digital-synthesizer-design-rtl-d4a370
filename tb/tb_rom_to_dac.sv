// Testbench for rom_to_dac: every magnitude with both signs.  Positive half
// gives 512 + m, negative half gives 511 - m.
module tb_rom_to_dac;
  logic [8:0] magnitude;
  logic       negative;
  logic [9:0] dac_code;
  int checks = 0, failures = 0;

  rom_to_dac dut (.magnitude(magnitude), .negative(negative), .dac_code(dac_code));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 512; m++) begin
      for (int n = 0; n < 2; n++) begin
        magnitude = 9'(m);
        negative  = n[0];
        #1;
        checks++;
        if (int'(dac_code) != ((n != 0) ? 511 - m : 512 + m)) begin
          failures++;
          $display("m=%0d neg=%0d code=%0d", m, n, dac_code);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
