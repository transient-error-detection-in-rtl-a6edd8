// exec_flow_checker_tb: self-checking test of the execution flow FSM.
// Two instances: the default five-block example program and the eight-block
// program left after pruning short blocks 2 and 5 (edges 1->3, 1->4, 1->7,
// 3->7, 4->6, 6->8, 7->8). Random walks, mostly along legal edges with some
// illegal IDs mixed in, are compared with a reference that lists each
// program's edges by hand.
module exec_flow_checker_tb;
  import cfcsp_pkg::*;

  localparam int unsigned NB6 = 8;
  localparam logic [NB6:0][NB6:0] SUCC6 = {
    9'b000000000,  // 8: program end
    9'b100000000,  // 7 -> 8
    9'b100000000,  // 6 -> 8
    9'b000000000,  // 5: pruned
    9'b001000000,  // 4 -> 6
    9'b010000000,  // 3 -> 7
    9'b000000000,  // 2: pruned
    9'b010011000,  // 1 -> 3, 4, 7
    9'b000000010   // start -> 1
  };

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic id_valid = 1'b0;
  logic [ID_W-1:0] id = '0;
  logic [ID_W-1:0] cur2, cur6;
  logic err2, err6;

  int checks = 0, failures = 0;
  int illegal_seen = 0;

  exec_flow_checker dut2 (.clk, .rst_n, .id_valid, .id, .cur_block(cur2), .error(err2));
  exec_flow_checker #(.NUM_BLOCKS(NB6), .SUCC(SUCC6)) dut6
    (.clk, .rst_n, .id_valid, .id, .cur_block(cur6), .error(err6));

  always #5 clk = ~clk;

  function automatic bit legal2(int from, int to);
    case (from)
      0: return to == 1;
      1: return to == 2;
      2: return to == 3 || to == 4;
      3: return to == 5;
      4: return to == 5;
      5: return to == 2;
      default: return 0;
    endcase
  endfunction

  function automatic bit legal6(int from, int to);
    case (from)
      0: return to == 1;
      1: return to == 3 || to == 4 || to == 7;
      3: return to == 7;
      4: return to == 6;
      6: return to == 8;
      7: return to == 8;
      default: return 0;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // which = 2 or 6: walk that program, with illegal IDs at rate 1/bad_rate
  task automatic walk(input int which, input int steps, input int bad_rate);
    int cur = 0;
    bit err = 0;
    int nxt;
    do_reset();
    for (int s = 0; s < steps; s++) begin
      // choose a legal successor by trying random IDs, or an arbitrary one
      nxt = $urandom % 10;
      if (($urandom % bad_rate) != 0) begin
        int cand[$];
        for (int t = 0; t < 10; t++)
          if (which == 2 ? legal2(cur, t) : legal6(cur, t)) cand.push_back(t);
        if (cand.size() > 0) nxt = cand[$urandom % cand.size()];
      end
      @(negedge clk);
      id_valid = 1'b1;
      id = ID_W'(nxt);
      @(negedge clk);
      id_valid = 1'b0;
      if (!err) begin
        if (which == 2 ? legal2(cur, nxt) : legal6(cur, nxt)) cur = nxt;
        else begin
          err = 1;
          illegal_seen++;
        end
      end
      if (which == 2) begin
        check(err2 == err, $sformatf("prog2 step %0d id %0d: error %0b, expected %0b", s, nxt, err2, err));
        check(int'(cur2) == cur, $sformatf("prog2 step %0d: block %0d, expected %0d", s, cur2, cur));
      end else begin
        check(err6 == err, $sformatf("prog6 step %0d id %0d: error %0b, expected %0b", s, nxt, err6, err));
        check(int'(cur6) == cur, $sformatf("prog6 step %0d: block %0d, expected %0d", s, cur6, cur));
      end
      if (which == 6 && cur == 8) break;
    end
  endtask

  initial begin
    // long legal walks on the example program
    walk(2, 300, 1000000);
    check(!err2, "legal walk ended in error");
    // a directed illegal edge: 3 -> 4
    do_reset();
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); id_valid = 1'b1; id = ID_W'(k == 3 ? 4 : k + 1);
      @(negedge clk); id_valid = 1'b0;
    end
    check(err2 && cur2 == 3, "edge 3 -> 4 must be an error");
    // first block must be the entry block
    do_reset();
    @(negedge clk); id_valid = 1'b1; id = ID_W'(2);
    @(negedge clk); id_valid = 1'b0;
    check(err2, "start -> 2 must be an error");
    // an ID beyond the program
    do_reset();
    @(negedge clk); id_valid = 1'b1; id = ID_W'(1);
    @(negedge clk); id_valid = 1'b1; id = ID_W'(63);
    @(negedge clk); id_valid = 1'b0;
    check(err2 && cur2 == 1, "ID 63 must be an error");
    // random walks with faults, both programs
    for (int r = 0; r < 40; r++) begin
      walk(2, 40, 8);
      walk(6, 10, 5);
    end
    // pruned blocks 2 and 5 must be errors in the pruned program
    do_reset();
    @(negedge clk); id_valid = 1'b1; id = ID_W'(1);
    @(negedge clk); id_valid = 1'b1; id = ID_W'(2);
    @(negedge clk); id_valid = 1'b0;
    check(err6, "pruned block 2 must be an error");
    check(illegal_seen > 20, $sformatf("only %0d illegal edges exercised", illegal_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
