// tb_gated_lfsr: end-to-end test of the gated-clock LFSR at its default
// size (7 stages, x^7 + x^3 + x^2 + x + 1, no parameter overrides).
//
// A conventional, ungated Fibonacci LFSR written in the testbench is the
// reference: after every rising edge the DUT state must equal it. The test
// also checks that
//   * the sequence has the maximal period 2^7 - 1 = 127 and no shorter one,
//   * each stage gets a rising clock edge exactly in the cycles where its
//     value changes (clock pulses are suppressed otherwise),
//   * clk_en predicts that, and is the binomial x^(i+1) ^ x^i,
//   * the feedback uses n_t - m_c = 1 XOR,
//   * an asynchronous reset in mid-run reloads the seed.
// Each mechanism (enabled pulse, suppressed pulse, reset reload, full
// period) is counted, and one that never happened is a failure.
module tb_gated_lfsr;
  localparam int         N      = 7;
  localparam logic [N-1:0] TAPS = 7'b0001111;
  localparam logic [N-1:0] SEED = 7'b0000001;
  localparam int         PERIOD = (1 << N) - 1;
  localparam int         CYCLES = 3 * PERIOD + 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic out;
  logic [N-1:0] state, clk_en;
  logic [N-1:0] ref_s, prev_s;
  int checks = 0, failures = 0;
  int pulses [N];
  int pulses_at_edge [N];
  int n_enabled = 0, n_suppressed = 0, n_reload = 0, n_period = 0;
  int cycle = 0, last_seed_cycle = 0;

  gated_lfsr dut (.clk(clk), .rst_n(rst_n), .out(out), .state(state), .clk_en(clk_en));

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge dut.gclk[i]) pulses[i]++;
  end

  function automatic logic [N-1:0] ref_next(logic [N-1:0] s);
    return {^(s & TAPS), s[N-1:1]};
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] en_before;
    for (int i = 0; i < N; i++) pulses[i] = 0;
    #12;
    checks++;
    if (state !== SEED) fail("reset state");
    @(negedge clk) rst_n = 1'b1;
    ref_s = SEED;
    checks++;
    if (dut.u_fb.N_XOR != 1) fail($sformatf("XOR count %0d, expected 1", dut.u_fb.N_XOR));

    for (cycle = 1; cycle <= CYCLES; cycle++) begin
      // Before the edge: clk_en is the binomial of D and Q of each stage.
      en_before = clk_en;
      checks++;
      if (en_before !== ({^(ref_s & TAPS), ref_s[N-1:1]} ^ ref_s))
        fail($sformatf("clk_en %b", en_before));
      for (int i = 0; i < N; i++) pulses_at_edge[i] = pulses[i];
      prev_s = ref_s;
      @(posedge clk);
      #2;
      ref_s = ref_next(ref_s);
      checks++;
      if (state !== ref_s) fail($sformatf("state %b, expected %b", state, ref_s));
      checks++;
      if (out !== ref_s[0]) fail("out");
      for (int i = 0; i < N; i++) begin
        int got, want;
        got  = pulses[i] - pulses_at_edge[i];
        want = int'(prev_s[i] != ref_s[i]);
        checks++;
        if (got != want) fail($sformatf("stage %0d got %0d clock pulses, expected %0d", i, got, want));
        if (got == 1) n_enabled++;
        else          n_suppressed++;
      end
      if (state == SEED) begin
        if (cycle - last_seed_cycle == PERIOD) n_period++;
        else fail($sformatf("period %0d", cycle - last_seed_cycle));
        last_seed_cycle = cycle;
      end
      // Mid-run asynchronous reset, away from the period boundary.
      if (cycle == PERIOD + 50) begin
        @(negedge clk);
        #1 rst_n = 1'b0;
        #1;
        checks++;
        if (state !== SEED) fail("async reload");
        else n_reload++;
        @(negedge clk);
        rst_n = 1'b1;
        ref_s = SEED;
        last_seed_cycle = cycle;
        continue;   // already at a falling edge
      end
      @(negedge clk);
    end

    checks++;
    if (n_enabled == 0)    fail("no enabled clock pulse seen");
    checks++;
    if (n_suppressed == 0) fail("no suppressed clock pulse seen");
    checks++;
    if (n_reload == 0)     fail("no reset reload seen");
    checks++;
    if (n_period < 2)      fail("full period not completed twice");
    $display("stage-cycles: %0d clocked, %0d gated off (%0d%% of clock pulses saved)",
             n_enabled, n_suppressed, 100 * n_suppressed / (n_enabled + n_suppressed));
    $display("periods of %0d completed: %0d, reset reloads: %0d", PERIOD, n_period, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
