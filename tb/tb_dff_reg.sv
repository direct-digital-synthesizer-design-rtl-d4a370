// Testbench for dff_reg: d changes on the rising edge; q must take d at the
// following falling edge and must not change on the rising edge.
module tb_dff_reg;
  localparam int unsigned W = 9;
  logic         clk;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  dff_reg #(.W(W)) dut (.clk(clk), .d(d), .q(q));

  initial clk = 1'b0;
  always #10 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      held = q;
      d <= W'($urandom);
      #1;
      checks++;
      if (q !== held) begin
        failures++;
        $display("q changed on rising edge");
      end
      @(negedge clk);
      #1;
      checks++;
      if (q !== d) begin
        failures++;
        $display("q=%h d=%h after falling edge", q, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
