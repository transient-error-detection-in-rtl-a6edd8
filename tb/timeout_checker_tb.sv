// timeout_checker_tb: self-checking test of the time-out timer.
// With a limit of T clocks, kicks spaced T clocks apart (T - 1 idle clocks)
// must never expire it; a gap of exactly T idle clocks must set the error on
// the T-th clock edge after the last kick, and not one edge earlier.
module timeout_checker_tb;
  localparam int unsigned T = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic kick = 1'b0;
  logic error;

  int checks = 0, failures = 0;

  timeout_checker #(.TIMEOUT_CYCLES(T)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic pulse_kick();
    @(negedge clk);
    kick = 1'b1;
    @(negedge clk);  // the kick is taken at the posedge in between
    kick = 1'b0;
  endtask

  initial begin
    for (int run = 0; run < 10; run++) begin
      int n;
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      // kicks with random gaps below the limit
      for (int k = 0; k < 20; k++) begin
        pulse_kick();
        repeat ($urandom % (T - 1)) @(negedge clk);
        check(!error, $sformatf("run %0d kick %0d: early time-out", run, k));
      end
      // longest legal gap: T-1 idle clocks between kicks
      pulse_kick();
      repeat (T - 2) @(negedge clk);
      check(!error, "gap of T-1 clocks must not expire");
      pulse_kick();
      // now stop: error must rise on the T-th edge after the kick edge
      n = 0;  // edges passed since the edge that took the kick
      while (!error && n < 3 * T) begin
        @(negedge clk);
        n++;
      end
      check(n == int'(T), $sformatf("time-out after %0d clocks, expected %0d", n, T));
      repeat (5) @(negedge clk);
      check(error, "time-out must hold");
      pulse_kick();
      check(error, "a kick must not clear the time-out");
    end
    // from reset without any kick
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (T + 2) @(negedge clk);
    check(error, "time-out from reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
