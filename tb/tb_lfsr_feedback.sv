// tb_lfsr_feedback: exhaustive check of the reduced-XOR feedback network for
// three polynomials. For every register state the testbench forms the
// binomials q[i+1] ^ q[i] itself and compares fb with the plain parity of
// the tapped bits. It also checks the number of XOR cells each network
// instantiates against n_t - m_c worked out by hand:
//   x^7 + x^3 + x^2 + x + 1  : n_t = 3, m_c = 2 -> 1 XOR
//   x^10 + x^4 + x^3 + x + 1 : n_t = 3, m_c = 2 -> 1 XOR
//   x^8 + x^6 + x^5 + x^4 + 1: n_t = 3, m_c = 1 -> 2 XORs (taps 0 and 6 alone)
module tb_lfsr_feedback;
  localparam logic [6:0] T7  = 7'b0001111;
  localparam logic [9:0] T10 = 10'b0000011011;
  localparam logic [7:0] T8  = 8'b01110001;

  logic [9:0] q;
  logic fb7, fb10, fb8;
  int checks = 0, failures = 0;

  lfsr_feedback #(.N(7),  .TAPS(T7))  dut7  (.q(q[6:0]), .binom(q[6:1] ^ q[5:0]), .fb(fb7));
  lfsr_feedback #(.N(10), .TAPS(T10)) dut10 (.q(q[9:0]), .binom(q[9:1] ^ q[8:0]), .fb(fb10));
  lfsr_feedback #(.N(8),  .TAPS(T8))  dut8  (.q(q[7:0]), .binom(q[7:1] ^ q[6:0]), .fb(fb8));

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d (q=%b)", what, got, want, q);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_eq("x^7 XOR count",  dut7.N_XOR,  1);
    expect_eq("x^10 XOR count", dut10.N_XOR, 1);
    expect_eq("x^8 XOR count",  dut8.N_XOR,  2);
    for (int v = 0; v < 1024; v++) begin
      q = 10'(v);
      #1;
      expect_eq("x^10 fb", int'(fb10), int'(q[4] ^ q[3] ^ q[1] ^ q[0]));
      if (v < 256) expect_eq("x^8 fb", int'(fb8), int'(q[6] ^ q[5] ^ q[4] ^ q[0]));
      if (v < 128) expect_eq("x^7 fb", int'(fb7), int'(q[3] ^ q[2] ^ q[1] ^ q[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
