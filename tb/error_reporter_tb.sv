// error_reporter_tb: self-checking test of the error outputs.
// Raises the four mechanism errors in random order, sometimes several in one
// clock, and checks the sticky flags, the error signal and that err_type
// names the first mechanism (lowest index among those in the same clock).
module error_reporter_tb;
  import cfcsp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NUM_MECH-1:0] mech_err = '0;
  logic error;
  logic [NUM_MECH-1:0] error_flags;
  err_type_e err_type;

  int checks = 0, failures = 0;

  error_reporter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic err_type_e type_of(input logic [NUM_MECH-1:0] m);
    for (int i = 0; i < NUM_MECH; i++)
      if (m[i]) return err_type_e'(i + 1);
    return ERR_NONE;
  endfunction

  initial begin
    for (int run = 0; run < 200; run++) begin
      logic [NUM_MECH-1:0] flags;
      err_type_e first;
      flags = '0;
      first = ERR_NONE;
      rst_n = 1'b0;
      mech_err = '0;
      @(negedge clk);
      rst_n = 1'b1;
      check(!error && err_type == ERR_NONE && error_flags == '0, "reset");
      repeat ($urandom % 4) @(negedge clk);
      for (int s = 0; s < 6; s++) begin
        logic [NUM_MECH-1:0] m;
        m = NUM_MECH'($urandom);
        // checkers hold their errors, so pulses here also test the stickiness
        mech_err = m;
        @(negedge clk);
        mech_err = '0;
        flags |= m;
        if (first == ERR_NONE) first = type_of(m);
        check(error_flags == flags, $sformatf("flags %b expected %b", error_flags, flags));
        check(error == (flags != '0), "error signal");
        check(err_type == first, $sformatf("type %0d expected %0d", err_type, first));
        @(negedge clk);
      end
    end
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
