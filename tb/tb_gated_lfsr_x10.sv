// tb_gated_lfsr_x10: runs the gated-clock LFSR configured for the second
// example polynomial, x^10 + x^4 + x^3 + x + 1, over two full periods.
// The state is compared after every rising edge with an ungated reference
// LFSR written in the testbench, the period must be exactly 2^10 - 1 = 1023,
// and the feedback must use n_t - m_c = 3 - 2 = 1 XOR. It also reports how
// many flip-flop clock pulses the gating removed.
module tb_gated_lfsr_x10;
  localparam int           N      = 10;
  localparam logic [N-1:0] TAPS   = 10'b0000011011;
  localparam logic [N-1:0] SEED   = 10'b1000000001;
  localparam int           PERIOD = (1 << N) - 1;

  logic clk = 1'b0, rst_n = 1'b1;
  logic out;
  logic [N-1:0] state, clk_en, ref_s;
  int checks = 0, failures = 0, cycle = 0, last_seed = 0, periods = 0;
  longint toggles = 0;

  gated_lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n), .out(out), .state(state), .clk_en(clk_en));

  always #5 clk = ~clk;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #2;
    checks++;
    if (state !== SEED) begin failures++; $display("FAIL reset state %b", state); end
    checks++;
    if (dut.u_fb.N_XOR != 1) begin failures++; $display("FAIL XOR count %0d", dut.u_fb.N_XOR); end
    @(negedge clk) rst_n = 1'b1;
    ref_s = SEED;
    for (cycle = 1; cycle <= 2 * PERIOD; cycle++) begin
      toggles += $countones(clk_en);
      @(posedge clk);
      #2;
      ref_s = {^(ref_s & TAPS), ref_s[N-1:1]};
      checks++;
      if (state !== ref_s || out !== ref_s[0]) begin
        failures++;
        $display("FAIL cycle %0d: state %b expected %b", cycle, state, ref_s);
      end
      if (state == SEED) begin
        checks++;
        if (cycle - last_seed != PERIOD) begin
          failures++;
          $display("FAIL period %0d", cycle - last_seed);
        end else periods++;
        last_seed = cycle;
      end
      @(negedge clk);
    end
    checks++;
    if (periods != 2) begin failures++; $display("FAIL %0d periods seen", periods); end
    $display("clock pulses delivered: %0d of %0d (%0d%%)", toggles, 2 * PERIOD * N,
             100 * toggles / (2 * PERIOD * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
