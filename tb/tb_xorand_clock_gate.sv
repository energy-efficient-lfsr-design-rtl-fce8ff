// tb_xorand_clock_gate: exhaustive check of the XORAND clock gate. For every
// combination of A, B (given with their complements) and both levels of CLK
// it checks the XOR and XNOR outputs and that the gated clock follows CLK
// when A != B and rests high when A == B. It also counts rising edges of the
// gated clock over a run of clock cycles with A and B changed only while
// CLK is high, and compares with the number of cycles in which A != B.
module tb_xorand_clock_gate;
  logic clk = 1'b0, a = 1'b0, b = 1'b0;
  logic x, x_n, clk_gated;
  int checks = 0, failures = 0;
  int edges = 0, expected_edges = 0;

  xorand_clock_gate dut (
    .clk(clk), .a(a), .a_n(~a), .b(b), .b_n(~b),
    .x(x), .x_n(x_n), .clk_gated(clk_gated)
  );

  always @(posedge clk_gated) edges++;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic diff, want_g;
    // Static truth table.
    for (int v = 0; v < 8; v++) begin
      {clk, a, b} = 3'(v);
      #1;
      diff   = (v[1] != v[0]);
      want_g = diff ? v[2] : 1'b1;
      checks++;
      if (x !== diff || x_n !== !diff || clk_gated !== want_g) begin
        failures++;
        $display("FAIL clk=%0b a=%0b b=%0b: x=%0b x_n=%0b g=%0b", clk, a, b, x, x_n, clk_gated);
      end
    end
    // Dynamic run: inputs change only while clk is high, as they do when
    // they come from flip-flops clocked on rising edges.
    clk = 1'b1; a = 1'b0; b = 1'b0; #5;
    edges = 0;
    for (int k = 0; k < 300; k++) begin
      a = 1'($urandom); b = 1'($urandom);
      #5 clk = 1'b0;
      #5;
      if (a != b) expected_edges++;
      clk = 1'b1;
      #1;
      checks++;
      if (clk_gated !== 1'b1) begin
        failures++;
        $display("FAIL gated clock low while clk high");
      end
      #4;
    end
    checks++;
    if (edges != expected_edges) begin
      failures++;
      $display("FAIL gated-clock edges %0d, expected %0d", edges, expected_edges);
    end
    $display("gated edges %0d of 300 cycles", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
