// Testbench for mux2to1: random inputs with both select values; sel = 1 must
// pass a, sel = 0 must pass b.
module tb_mux2to1;
  localparam int unsigned W = 9;
  logic [W-1:0] a, b, z;
  logic         sel;
  int checks = 0, failures = 0;

  mux2to1 #(.W(W)) dut (.a(a), .b(b), .sel(sel), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      sel = i[0];
      #1;
      checks++;
      if (z !== (sel ? a : b)) begin
        failures++;
        $display("a=%h b=%h sel=%b z=%h", a, b, sel, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
