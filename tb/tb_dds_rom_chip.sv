// End-to-end testbench for dds_rom_chip at its default parameters.
//
// A phase accumulator (modelled here: phase += fcw on every rising edge of a
// 50 MHz clock) drives the ROM section for several frequency words,
// including a change of frequency word in the middle of a run.  Every output
// code is compared with an independently computed full-period sine sample,
//   s = 511 * sin(2*pi*(floor(phase/4) + 1/2)/1024),
//   code = 512 + round(s) for s >= 0, 511 - round(-s) for s < 0,
// taken from the phase that was present two falling edges earlier (the
// latency of the two output latches).  It also counts each mechanism of the
// datapath: the four quadrants, address mirroring, the negative half, each
// of the four sub-ROMs, and both ends of the DAC range, and checks that the
// number of sine periods seen matches the frequency word.
module tb_dds_rom_chip;
  logic        clk;
  logic [11:0] phase;
  logic [11:0] fcw;
  logic [9:0]  dac_code;
  int checks = 0, failures = 0;

  int quad_hits [4]   = '{0, 0, 0, 0};
  int seg_hits  [4]   = '{0, 0, 0, 0};
  int mirror_hits     = 0;
  int negative_hits   = 0;
  int top_code_hits   = 0;
  int bottom_code_hits = 0;
  int fcw_changes     = 0;

  dds_rom_chip dut (.clk(clk), .phase(phase), .dac_code(dac_code));

  initial clk = 1'b0;
  always #10 clk = ~clk;   // period of 20 time units, i.e. 20 ns at 50 MHz

  // phase accumulator model
  always @(posedge clk) phase <= phase + fcw;

  function automatic int ref_code(logic [11:0] p);
    real pi = 3.14159265358979323846;
    real s;
    s = 511.0 * $sin(2.0 * pi * (real'(p >> 2) + 0.5) / 1024.0);
    if (s >= 0.0) return 512 + int'($floor(s + 0.5));
    else          return 511 - int'($floor(-s + 0.5));
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run `cycles` samples with frequency word f; returns the number of rising
  // mid-scale crossings of the output.
  task automatic run(input logic [11:0] f, input int cycles, output int crossings);
    logic [11:0] hist [$];
    int prev_code;
    int q, idx;
    fcw = f;
    crossings = 0;
    prev_code = -1;
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      hist.push_back(phase);          // phase seen by this falling edge
      #1;
      if (hist.size() >= 2) begin
        logic [11:0] p;
        p = hist.pop_front();         // sample from two edges ago
        checks++;
        if (int'(dac_code) != ref_code(p)) begin
          failures++;
          if (failures < 10)
            $display("phase %0d: code %0d expected %0d", p, dac_code, ref_code(p));
        end
        q   = int'(p[11:10]);
        idx = int'(p[9:2]);
        quad_hits[q]++;
        if (q == 1 || q == 3) mirror_hits++;
        if (q >= 2) negative_hits++;
        seg_hits[((q == 1 || q == 3) ? 255 - idx : idx) / 64]++;
        if (dac_code == 10'd1023) top_code_hits++;
        if (dac_code == 10'd0)    bottom_code_hits++;
        if (prev_code >= 0 && prev_code < 512 && int'(dac_code) >= 512) crossings++;
        prev_code = int'(dac_code);
      end
    end
  endtask

  initial begin
    int cr;
    phase = '0;
    fcw   = 12'd1;
    // Full sweep: every phase value once, two full periods.
    run(12'd1, 8192 + 2, cr);
    checks++;
    if (cr != 2) begin failures++; $display("fcw 1: %0d periods", cr); end
    // Faster tones: periods must follow 4096 / fcw.
    phase = '0;
    run(12'd64, 64 * 5 + 2, cr);     // 5 periods of 64 samples
    checks++;
    if (cr != 5) begin failures++; $display("fcw 64: %0d periods", cr); end
    fcw_changes++;
    run(12'd37, 4096, cr);           // 4096*37/4096 = 37 periods
    checks++;
    if (cr < 36 || cr > 37) begin failures++; $display("fcw 37: %0d periods", cr); end
    fcw_changes++;
    run(12'd1000, 4096, cr);
    fcw_changes++;

    $display("quadrants %0d %0d %0d %0d, mirrored %0d, negative %0d",
             quad_hits[0], quad_hits[1], quad_hits[2], quad_hits[3],
             mirror_hits, negative_hits);
    $display("sub-ROMs D=%0d C=%0d B=%0d A=%0d, code 1023: %0d, code 0: %0d, fcw changes %0d",
             seg_hits[0], seg_hits[1], seg_hits[2], seg_hits[3],
             top_code_hits, bottom_code_hits, fcw_changes);
    for (int k = 0; k < 4; k++) begin
      checks += 2;
      if (quad_hits[k] == 0) failures++;
      if (seg_hits[k] == 0)  failures++;
    end
    checks += 5;
    if (mirror_hits == 0)      failures++;
    if (negative_hits == 0)    failures++;
    if (top_code_hits == 0)    failures++;
    if (bottom_code_hits == 0) failures++;
    if (fcw_changes == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
