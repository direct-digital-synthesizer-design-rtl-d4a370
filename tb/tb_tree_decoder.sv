// Testbench for tree_decoder: applies all 64 addresses and checks that the
// word lines are one-hot with the high line at the address index.
module tb_tree_decoder;
  localparam int unsigned AW = 6;

  logic [AW-1:0]      addr;
  logic [(1<<AW)-1:0] word_line;
  int checks = 0, failures = 0;

  tree_decoder #(.ADDR_W(AW)) dut (.addr(addr), .word_line(word_line));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (word_line !== ((64'd1) << a)) begin
        failures++;
        $display("addr %0d: word_line %h", a, word_line);
      end
      checks++;
      if ($countones(word_line) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
