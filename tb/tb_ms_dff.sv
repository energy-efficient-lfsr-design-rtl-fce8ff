// tb_ms_dff: checks the flip-flop's rising-edge capture, its complementary
// output, and the asynchronous reset to INIT (two instances, INIT = 0 and 1).
// Random data is applied away from the clock edges; the expected Q is
// tracked by the testbench itself.
module tb_ms_dff;
  logic ck = 1'b0, rst_n = 1'b1, d = 1'b0;
  logic q0, q0_n, q1, q1_n;
  logic exp0, exp1;
  int checks = 0, failures = 0;

  ms_dff #(.INIT(1'b0)) dut0 (.ck(ck), .rst_n(rst_n), .d(d), .q(q0), .q_n(q0_n));
  ms_dff #(.INIT(1'b1)) dut1 (.ck(ck), .rst_n(rst_n), .d(d), .q(q1), .q_n(q1_n));

  always #5 ck = ~ck;

  task automatic check(string what);
    checks++;
    if (q0 !== exp0 || q1 !== exp1 || q0_n !== ~exp0 || q1_n !== ~exp1) begin
      failures++;
      $display("FAIL %s: q0=%0b q0_n=%0b q1=%0b q1_n=%0b exp0=%0b exp1=%0b",
               what, q0, q0_n, q1, q1_n, exp0, exp1);
    end
  endtask

  initial begin
    #5000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp0 = 1'b0; exp1 = 1'b1;
    #1 rst_n = 1'b0;
    #1 check("reset held");
    @(negedge ck) rst_n = 1'b1;
    @(posedge ck);
    exp0 = d; exp1 = d;
    #1 check("first capture");
    for (int k = 0; k < 200; k++) begin
      @(negedge ck);
      d = 1'($urandom);
      #2 check("no change before edge");     // D moves, Q must not
      @(posedge ck);
      exp0 = d; exp1 = d;
      #1 check("capture");
      if (k == 100) begin
        // asynchronous reset in the middle of a high clock phase
        #1 rst_n = 1'b0;
        exp0 = 1'b0; exp1 = 1'b1;
        #1 check("async reset");
        @(negedge ck) rst_n = 1'b1;
        #1 check("reset released");
        @(posedge ck);
        exp0 = d; exp1 = d;
        #1 check("capture after reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
