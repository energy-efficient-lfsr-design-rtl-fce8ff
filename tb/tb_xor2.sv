// tb_xor2: exhaustive check of the two-input feedback XOR against the truth
// table written out below.
module tb_xor2;
  logic a, b, out;
  int checks = 0, failures = 0;
  // Expected outputs for {a,b} = 00, 01, 10, 11.
  localparam logic [3:0] TRUTH = 4'b0110;

  xor2 dut (.a(a), .b(b), .out(out));

  initial begin
    #1000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        #1;
        checks++;
        if (out !== TRUTH[v]) begin
          failures++;
          $display("FAIL a=%0b b=%0b out=%0b", a, b, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
