// enter_exit_checker_tb: self-checking test of the enter-exit FSM.
// Random message streams, mostly alternating enter/exit with occasional
// repeated messages, are compared with a reference three-state model.
module enter_exit_checker_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enter = 1'b0, exit_msg = 1'b0;
  logic in_block, error;

  int checks = 0, failures = 0;
  int err_enter = 0, err_exit = 0;

  enter_exit_checker dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int run = 0; run < 60; run++) begin
      int st;  // 0 = between blocks, 1 = inside, 2 = error
      st = 0;
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      check(!error && !in_block, "reset state");
      for (int s = 0; s < 30; s++) begin
        bit want_enter;
        int gap;
        gap = $urandom % 3;
        want_enter = (st == 0);
        if ($urandom % 12 == 0) want_enter = !want_enter;
        repeat (gap) @(negedge clk);
        enter = want_enter;
        exit_msg = !want_enter;
        @(negedge clk);
        enter = 1'b0;
        exit_msg = 1'b0;
        case (st)
          0: if (want_enter) st = 1; else begin st = 2; err_exit++; end
          1: if (!want_enter) st = 0; else begin st = 2; err_enter++; end
          default: ;
        endcase
        check(error == (st == 2), $sformatf("run %0d step %0d: error %0b", run, s, error));
        check(in_block == (st == 1), $sformatf("run %0d step %0d: in_block %0b", run, s, in_block));
      end
    end
    check(err_enter > 0 && err_exit > 0, "both error transitions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
