// cfcsp_watchdog_tb: end-to-end test of the watchdog at its default
// parameters (five-block example program, time-out of 2048 clocks).
//
// The testbench plays the instrumented target microcontroller: it walks the
// program's control flow graph and, for each basic block, writes the block's
// signatures to the port (block ID, enter, index, body, index, exit) with the
// byte-then-strobe protocol. It also plays the fault injection interface: it
// makes the program jump from a random point to a random point (a control
// flow error) or stop sending altogether, then reads the error outputs.
//
// A reference model of the four mechanisms, written here from their rules,
// predicts the error flags and the first error type after every signature.
// Directed cases make each mechanism detect at least once and check the
// detection latency; a random fault campaign prints per-mechanism detection
// counts in the manner of a coverage table.
module cfcsp_watchdog_tb;
  import cfcsp_pkg::*;

  localparam int unsigned T_OUT = DEFAULT_TIMEOUT_CYCLES;
  localparam int unsigned LAT   = 5;  // strobe edge to error output: 2 sync + edge + checker + reporter

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [SIG_W-1:0] port_data = '0;
  logic port_strobe = 1'b0;
  logic error;
  err_type_e err_type;
  logic [NUM_MECH-1:0] error_flags;
  logic [ID_W-1:0] cur_block;
  logic in_block;

  cfcsp_watchdog dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // how often each mechanism of the design was exercised
  int n_det[NUM_MECH];
  int n_branch3 = 0, n_branch4 = 0, n_loop = 0, n_long_body = 0, n_undetected = 0;
  int n_faults = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference model of the four mechanisms ----------------
  int  r_cur;          // flow FSM state
  int  r_ee;           // 0 = A, 1 = B, 2 = Error
  bit  r_armed;
  int  r_stored;
  logic [NUM_MECH-1:0] r_flags;
  err_type_e r_first;

  function automatic bit cfg_edge(int from, int to);
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

  function automatic int cfg_next(int from);
    case (from)
      0: return 1;
      1: return 2;
      2: return ($urandom % 2 != 0) ? 3 : 4;
      3, 4: return 5;
      default: return 2;
    endcase
  endfunction

  function automatic void ref_reset();
    r_cur = 0; r_ee = 0; r_armed = 0; r_stored = 0; r_flags = '0; r_first = ERR_NONE;
  endfunction

  function automatic void ref_flag(int mech);
    if (r_flags == '0) r_first = err_type_e'(mech + 1);
    r_flags[mech] = 1'b1;
  endfunction

  function automatic void ref_sig(sig_kind_e k, int v);
    case (k)
      SIG_BLOCK: if (!r_flags[MECH_FLOW]) begin
        if (cfg_edge(r_cur, v)) r_cur = v; else ref_flag(MECH_FLOW);
      end
      SIG_ENTER: if (r_ee == 0) r_ee = 1; else if (r_ee == 1) begin r_ee = 2; ref_flag(MECH_ENTEREXIT); end
      SIG_EXIT:  if (r_ee == 1) r_ee = 0; else if (r_ee == 0) begin r_ee = 2; ref_flag(MECH_ENTEREXIT); end
      SIG_INDEX: if (!r_armed) begin r_armed = 1; r_stored = v; end
                 else begin
                   r_armed = 0;
                   if (v != r_stored && !r_flags[MECH_COMPLETE]) ref_flag(MECH_COMPLETE);
                 end
      default: ;
    endcase
  endfunction

  // ---------------- target microcontroller side ----------------
  int last_strobe_cycle;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Write one signature: byte, then strobe high for 3 clocks, low for 3.
  // Afterwards the outputs must match the reference model.
  task automatic send(input sig_kind_e k, input int v);
    sig_t s;
    s.kind = k;
    s.value = ID_W'(v);
    port_data = s;
    @(negedge clk);
    @(negedge clk);
    port_strobe = 1'b1;
    last_strobe_cycle = cycle;
    repeat (3) @(negedge clk);
    port_strobe = 1'b0;
    repeat (3) @(negedge clk);
    ref_sig(k, v);
    check(error_flags == r_flags,
          $sformatf("after %s %0d: flags %b, expected %b", k.name(), v, error_flags, r_flags));
    check(err_type == r_first,
          $sformatf("after %s %0d: type %s, expected %s", k.name(), v, err_type.name(), r_first.name()));
    check(error == (r_flags != '0), "error signal");
  endtask

  // The six signature positions of a block: 0 block ID, 1 enter, 2 index,
  // (body), 3 index, 4 exit, 5 the block's final jump. run_from executes
  // block b from position p to its end.
  task automatic run_range(input int b, input int p0, input int p1, input int body);
    if (p0 <= 0 && p1 > 0) send(SIG_BLOCK, b);
    if (p0 <= 1 && p1 > 1) send(SIG_ENTER, 0);
    if (p0 <= 2 && p1 > 2) send(SIG_INDEX, b);
    if (p0 <= 3 && p1 > 3) begin
      repeat (body) @(negedge clk);
      send(SIG_INDEX, b);
    end
    if (p0 <= 4 && p1 > 4) send(SIG_EXIT, 0);
  endtask

  task automatic run_from(input int b, input int p, input int body);
    run_range(b, p, 5, body);
  endtask

  task automatic do_reset();
    port_strobe = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_reset();
  endtask

  // legal execution of n blocks starting at the entry; returns the last block
  task automatic run_legal(input int n, input int max_body, output int last);
    int b = 0, nb;
    for (int i = 0; i < n; i++) begin
      nb = cfg_next(b);
      if (b == 2 && nb == 3) n_branch3++;
      if (b == 2 && nb == 4) n_branch4++;
      if (b == 5 && nb == 2) n_loop++;
      run_from(nb, 0, $urandom % (max_body + 1));
      check(int'(cur_block) == nb, $sformatf("flow state %0d, expected %0d", cur_block, nb));
      b = nb;
    end
    last = b;
  endtask

  // wait for the error output; returns edges since the last strobe rise
  task automatic wait_error(output int lat);
    int start = last_strobe_cycle;
    while (!error && cycle - start < 3 * int'(T_OUT)) begin
      @(posedge clk);
      #1;
    end
    lat = cycle - start;
  endtask

  int last, lat, b, p, tgt, tp;

  initial begin
    for (int m = 0; m < NUM_MECH; m++) n_det[m] = 0;

    // 1. legal execution: no error, both branches and the loop back taken
    do_reset();
    run_legal(60, 40, last);
    check(!error, "legal run raised an error");

    // 2. long block bodies near the time-out: signatures restart the timer
    do_reset();
    for (int i = 0; i < 3; i++) begin
      run_from(i == 0 ? 1 : (i == 1 ? 2 : 3), 0, T_OUT - 100);
      n_long_body++;
    end
    check(!error, "long bodies below the time-out raised an error");

    // 3. illegal edge between block starts (3 -> 4): execution flow checking
    do_reset();
    run_from(1, 0, 5); run_from(2, 0, 5); run_from(3, 0, 5);
    send(SIG_BLOCK, 4);
    check(err_type == ERR_FLOW && error_flags == 4'b0001, "3 -> 4 detected by flow");
    if (err_type == ERR_FLOW) n_det[MECH_FLOW]++;

    // latency of a flow error
    do_reset();
    fork send(SIG_BLOCK, 2); join_none
    @(posedge port_strobe);
    wait_error(lat);
    check(lat == int'(LAT), $sformatf("flow detection latency %0d clocks, expected %0d", lat, LAT));
    wait fork;

    // 4. jump from a block's end into the middle of another, after its first
    //    index (2 -> middle of 5): enter-exit checking
    do_reset();
    run_from(1, 0, 5); run_from(2, 0, 5);
    run_from(5, 3, 5);
    check(err_type == ERR_ENTEREXIT && error_flags == 4'b0010, "end -> middle detected by enter-exit");
    if (err_type == ERR_ENTEREXIT) n_det[MECH_ENTEREXIT]++;

    // 5. jump from the middle of block 3 into the middle of block 4:
    //    block complete execution checking
    do_reset();
    run_from(1, 0, 5); run_from(2, 0, 5);
    send(SIG_BLOCK, 3); send(SIG_ENTER, 0); send(SIG_INDEX, 3);
    run_from(4, 3, 5);
    check(err_type == ERR_COMPLETE && error_flags == 4'b0100, "middle -> middle detected by block complete");
    if (err_type == ERR_COMPLETE) n_det[MECH_COMPLETE]++;

    // 6. jump out of the program area: no more signatures, time-out
    do_reset();
    run_from(1, 0, 5); run_from(2, 0, 5);
    send(SIG_BLOCK, 4);
    wait_error(lat);
    // the timer restarts on the edge that the checkers take the signature
    // (LAT - 1 edges after the strobe), expires T_OUT edges later, and the
    // reporter adds one
    check(lat == int'(LAT + T_OUT), $sformatf("time-out latency %0d, expected %0d", lat, LAT + T_OUT));
    check(err_type == ERR_TIMEOUT && error_flags == 4'b1000, "hang detected by time-out");
    if (err_type == ERR_TIMEOUT) n_det[MECH_TIMEOUT]++;

    // 6b. jump from inside block 3 back to its own start (a block to
    //     itself): execution flow, then enter-exit on the repeated enter
    do_reset();
    run_from(1, 0, 5); run_from(2, 0, 5);
    send(SIG_BLOCK, 3); send(SIG_ENTER, 0); send(SIG_INDEX, 3);
    run_from(3, 0, 5);
    check(err_type == ERR_FLOW && error_flags[MECH_FLOW] && error_flags[MECH_ENTEREXIT],
          "block to itself detected by flow and enter-exit");
    if (err_type == ERR_FLOW) n_det[MECH_FLOW]++;

    // 6c. jump from inside block 2 into the uninstrumented code in front
    //     of block 5, which then falls through into block 5's start
    do_reset();
    run_from(1, 0, 5);
    send(SIG_BLOCK, 2); send(SIG_ENTER, 0); send(SIG_INDEX, 2);
    run_from(5, 0, 5);
    check(err_type == ERR_FLOW, "block into gap code detected by flow");
    if (err_type == ERR_FLOW) n_det[MECH_FLOW]++;

    // 7. random fault campaign: legal run, then a jump from a random
    //    position to a random position of a random block (or a hang)
    for (int f = 0; f < 150; f++) begin
      do_reset();
      run_legal(1 + $urandom % 6, 10, last);
      b = cfg_next(last);
      p = $urandom % 6;                 // position in b where the fault hits
      run_range(b, 0, p, 3);
      // the jump: continue from position tp of block tgt, then run legally
      n_faults++;
      if ($urandom % 10 == 0) begin
        wait_error(lat);
        check(err_type == ERR_TIMEOUT, "random hang detected by time-out");
        if (err_type == ERR_TIMEOUT) n_det[MECH_TIMEOUT]++;
        continue;
      end
      tgt = 1 + $urandom % 5;
      tp = $urandom % 5;
      run_from(tgt, tp, 3);
      for (int k = 0; k < 4 && !error; k++) begin
        tgt = cfg_next(tgt);
        run_from(tgt, 0, 3);
      end
      for (int m = 0; m < NUM_MECH; m++) if (err_type == err_type_e'(m + 1)) n_det[m]++;
      if (!error) n_undetected++;
    end

    $display("fault campaign: %0d faults; first detected by flow %0d, enter-exit %0d, block complete %0d, time-out %0d; undetected %0d",
             n_faults, n_det[MECH_FLOW], n_det[MECH_ENTEREXIT], n_det[MECH_COMPLETE], n_det[MECH_TIMEOUT], n_undetected);
    $display("mechanisms exercised: branch 2->3 %0d, branch 2->4 %0d, loop 5->2 %0d, long bodies %0d",
             n_branch3, n_branch4, n_loop, n_long_body);
    for (int m = 0; m < NUM_MECH; m++) check(n_det[m] > 0, $sformatf("mechanism %0d never detected", m));
    check(n_branch3 > 0 && n_branch4 > 0 && n_loop > 0 && n_long_body > 0, "legal paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
