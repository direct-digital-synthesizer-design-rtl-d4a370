// Testbench for rom256: every address, applied on the rising edge.  The word
// must appear after the next falling edge (and not before it), equal to
// round(511 * sin((n + 1/2) * 90/256 deg)).  Counts how often each sub-ROM
// (D, C, B, A) was selected.
module tb_rom256;
  logic       clk;
  logic [7:0] addr;
  logic [8:0] data, prev;
  int checks = 0, failures = 0;
  int seg_hits [4] = '{0, 0, 0, 0};

  rom256 dut (.clk(clk), .addr(addr), .data(data));

  initial clk = 1'b0;
  always #10 clk = ~clk;   // period of 20 time units, i.e. 20 ns at 50 MHz

  function automatic int ref_word(int n);
    real pi = 3.14159265358979323846;
    return int'($floor(511.0 * $sin((real'(n) + 0.5) * pi / 512.0) + 0.5));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 8'd255;
    @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 256; i++) begin
        int n;
        n = (pass != 0) ? (i * 97 + 13) % 256 : i;   // second pass in scrambled order
        @(posedge clk);
        prev = data;
        addr <= 8'(n);
        #2;
        checks++;
        if (data !== prev) begin
          failures++;
          $display("data changed before the falling edge");
        end
        @(negedge clk);
        #1;
        checks++;
        if (int'(data) != ref_word(n)) begin
          failures++;
          $display("addr %0d: got %0d expected %0d", n, data, ref_word(n));
        end
        seg_hits[n / 64]++;
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seg_hits[s] == 0) failures++;
    end
    $display("sub-ROM selections D=%0d C=%0d B=%0d A=%0d",
             seg_hits[0], seg_hits[1], seg_hits[2], seg_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
