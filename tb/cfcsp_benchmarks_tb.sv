// cfcsp_benchmarks_tb: the watchdog on three benchmark-like programs.
//
// Bubble sort, linked-list allocation and matrix multiplication are the
// programs the watchdog technique was evaluated on, but their control flow
// graphs are not published with it. The CFGs below are representative
// structures written for this test (loop headers, compare/swap, list
// insertion at head or tail, a multiply-accumulate self-loop), numbered from
// 1 at the entry. Each program runs on its own watchdog with injected control
// flow errors (see cfg_program_runner); every signature is checked against a
// reference model, every program must run to completion without an error
// when no fault is injected, and every mechanism must detect at least once
// over the three programs. The detection counts per mechanism are printed in
// the manner of a coverage table; they depend on these invented CFGs and on
// the fault model of the runner, not on real 8051 code.
module cfcsp_benchmarks_tb;
  import cfcsp_pkg::*;

  // bubble sort: 1 init, 2 outer test, 3 inner init, 4 inner test,
  // 5 compare, 6 swap, 7 outer step, 8 end
  localparam int unsigned NB_BUB = 8;
  localparam logic [NB_BUB:0][NB_BUB:0] SUCC_BUB = {
    9'b000000000,  // 8: end
    9'b000000100,  // 7 -> 2
    9'b000010000,  // 6 -> 4
    9'b001010000,  // 5 -> 4, 6
    9'b010100000,  // 4 -> 5, 7
    9'b000010000,  // 3 -> 4
    9'b100001000,  // 2 -> 3, 8
    9'b000000100,  // 1 -> 2
    9'b000000010   // start -> 1
  };

  // linked-list allocation: 1 init, 2 free-list test, 3 allocate node,
  // 4 list-empty test, 5 set head, 6 append at tail, 7 end
  localparam int unsigned NB_LNK = 7;
  localparam logic [NB_LNK:0][NB_LNK:0] SUCC_LNK = {
    8'b00000000,  // 7: end
    8'b00000100,  // 6 -> 2
    8'b00000100,  // 5 -> 2
    8'b01100000,  // 4 -> 5, 6
    8'b00010000,  // 3 -> 4
    8'b10001000,  // 2 -> 3, 7
    8'b00000100,  // 1 -> 2
    8'b00000010   // start -> 1
  };

  // matrix multiplication: 1 init, 2 row test, 3 column test, 4 sum init,
  // 5 multiply-accumulate (loops on itself), 6 store, 7 column step,
  // 8 row step, 9 end
  localparam int unsigned NB_MAT = 9;
  localparam logic [NB_MAT:0][NB_MAT:0] SUCC_MAT = {
    10'b0000000000,  // 9: end
    10'b0000000100,  // 8 -> 2
    10'b0000001000,  // 7 -> 3
    10'b0010000000,  // 6 -> 7
    10'b0001100000,  // 5 -> 5, 6
    10'b0000100000,  // 4 -> 5
    10'b0100010000,  // 3 -> 4, 8
    10'b1000001000,  // 2 -> 3, 9
    10'b0000000100,  // 1 -> 2
    10'b0000000010   // start -> 1
  };

  localparam int unsigned FAULTS = 200;

  logic done_b, done_l, done_m;
  int ck_b, ck_l, ck_m, fl_b, fl_l, fl_m;
  int det_b [NUM_MECH], det_l [NUM_MECH], det_m [NUM_MECH];
  int und_b, und_l, und_m, cmp_b, cmp_l, cmp_m;

  cfg_program_runner #(.NAME("bubble sort"), .NUM_BLOCKS(NB_BUB), .SUCC(SUCC_BUB), .FAULTS(FAULTS))
    u_bub (.done(done_b), .checks(ck_b), .failures(fl_b), .n_det(det_b), .n_undetected(und_b), .n_completed(cmp_b));
  cfg_program_runner #(.NAME("linked list"), .NUM_BLOCKS(NB_LNK), .SUCC(SUCC_LNK), .FAULTS(FAULTS))
    u_lnk (.done(done_l), .checks(ck_l), .failures(fl_l), .n_det(det_l), .n_undetected(und_l), .n_completed(cmp_l));
  cfg_program_runner #(.NAME("matrix multiply"), .NUM_BLOCKS(NB_MAT), .SUCC(SUCC_MAT), .FAULTS(FAULTS))
    u_mat (.done(done_m), .checks(ck_m), .failures(fl_m), .n_det(det_m), .n_undetected(und_m), .n_completed(cmp_m));

  initial begin
    int checks, failures;
    wait (done_b && done_l && done_m);
    checks = ck_b + ck_l + ck_m;
    failures = fl_b + fl_l + fl_m;
    for (int m = 0; m < NUM_MECH; m++) begin
      checks++;
      if (det_b[m] + det_l[m] + det_m[m] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never detected a fault", m);
      end
    end
    checks++;
    if (cmp_b == 0 || cmp_l == 0 || cmp_m == 0) begin
      failures++;
      $display("FAIL a program never ran to completion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 5,000,000 periods of a 10-unit reference clock
  logic wd_clk = 1'b0;
  always #5 wd_clk = ~wd_clk;
  initial begin
    repeat (5000000) @(posedge wd_clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
