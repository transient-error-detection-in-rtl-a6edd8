// block_complete_checker_tb: self-checking test of the index compare.
// Streams of index pairs, mostly equal with occasional mismatches, are
// compared with a reference that stores the first index of each pair.
module block_complete_checker_tb;
  import cfcsp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic idx_valid = 1'b0;
  logic [ID_W-1:0] idx = '0;
  logic armed, error;

  int checks = 0, failures = 0;
  int mismatches = 0;

  block_complete_checker dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [ID_W-1:0] v);
    @(negedge clk);
    idx_valid = 1'b1;
    idx = v;
    @(negedge clk);
    idx_valid = 1'b0;
    idx = ID_W'($urandom);  // value ignored when not valid
  endtask

  initial begin
    for (int run = 0; run < 60; run++) begin
      bit err;
      err = 0;
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      for (int b = 0; b < 20; b++) begin
        logic [ID_W-1:0] first, second;
        first = ID_W'($urandom);
        second = first;
        if ($urandom % 15 == 0) second = first ^ ID_W'(1 << ($urandom % ID_W));
        send(first);
        check(armed, "armed after first index");
        repeat ($urandom % 4) @(negedge clk);
        send(second);
        check(!armed, "disarmed after second index");
        if (second != first && !err) begin
          err = 1;
          mismatches++;
        end
        check(error == err, $sformatf("run %0d block %0d: error %0b expected %0b", run, b, error, err));
      end
    end
    check(mismatches > 10, "mismatches exercised");
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
