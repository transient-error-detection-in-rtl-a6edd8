// cfg_program_runner: testbench helper that runs one program on its own
// watchdog and injects control flow errors into it.
//
// It instantiates cfcsp_watchdog with the program's CFG (NUM_BLOCKS, SUCC),
// plays the instrumented microcontroller (for each block: block ID, enter,
// index, body, index, exit, then a jump to a random CFG successor, until a
// block without successors ends the program) and plays the fault injector:
// in each run it lets the program execute a random number of blocks, then
// makes it jump from a random signature position to a random position of a
// random block, or stop sending. A reference model of the four mechanisms
// predicts the error flags and first error type after every signature.
// At the end it prints how many faults each mechanism detected first and
// how many went undetected, and raises done.
module cfg_program_runner
  import cfcsp_pkg::*;
#(
  parameter string                             NAME       = "program",
  parameter int unsigned                       NUM_BLOCKS = 5,
  parameter logic [NUM_BLOCKS:0][NUM_BLOCKS:0] SUCC       = FIG2_SUCC,
  parameter int unsigned                       FAULTS     = 100,
  parameter int unsigned                       TIMEOUT    = 256
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_det [NUM_MECH],
  output int   n_undetected,
  output int   n_completed  // fault-free program runs completed
);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [SIG_W-1:0] port_data = '0;
  logic port_strobe = 1'b0;
  logic error;
  err_type_e err_type;
  logic [NUM_MECH-1:0] error_flags;
  logic [ID_W-1:0] cur_block;
  logic in_block;

  cfcsp_watchdog #(.NUM_BLOCKS(NUM_BLOCKS), .SUCC(SUCC), .TIMEOUT_CYCLES(TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  // reference model
  int  r_cur, r_ee, r_stored;
  bit  r_armed;
  logic [NUM_MECH-1:0] r_flags;
  err_type_e r_first;

  function automatic bit has_succ(int b);
    return SUCC[b] != '0;
  endfunction

  function automatic int rand_succ(int b);
    int cand[$];
    for (int t = 1; t <= int'(NUM_BLOCKS); t++) if (SUCC[b][t]) cand.push_back(t);
    return cand[$urandom % cand.size()];
  endfunction

  function automatic void ref_flag(int mech);
    if (r_flags == '0) r_first = err_type_e'(mech + 1);
    r_flags[mech] = 1'b1;
  endfunction

  function automatic void ref_sig(sig_kind_e k, int v);
    case (k)
      SIG_BLOCK: if (!r_flags[MECH_FLOW]) begin
        if (v >= 1 && v <= int'(NUM_BLOCKS) && SUCC[r_cur][v]) r_cur = v; else ref_flag(MECH_FLOW);
      end
      SIG_ENTER: if (r_ee == 0) r_ee = 1; else if (r_ee == 1) begin r_ee = 2; ref_flag(MECH_ENTEREXIT); end
      SIG_EXIT:  if (r_ee == 1) r_ee = 0; else if (r_ee == 0) begin r_ee = 2; ref_flag(MECH_ENTEREXIT); end
      default: if (!r_armed) begin r_armed = 1; r_stored = v; end
               else begin
                 r_armed = 0;
                 if (v != r_stored && !r_flags[MECH_COMPLETE]) ref_flag(MECH_COMPLETE);
               end
    endcase
  endfunction

  task automatic send(input sig_kind_e k, input int v);
    sig_t s;
    s.kind = k;
    s.value = ID_W'(v);
    port_data = s;
    @(negedge clk);
    port_strobe = 1'b1;
    repeat (2) @(negedge clk);
    port_strobe = 1'b0;
    repeat (4) @(negedge clk);
    ref_sig(k, v);
    check(error_flags == r_flags && err_type == r_first,
          $sformatf("after %s %0d: flags %b type %s, expected %b %s",
                    k.name(), v, error_flags, err_type.name(), r_flags, r_first.name()));
  endtask

  // signature positions: 0 block ID, 1 enter, 2 index, 3 index, 4 exit
  task automatic run_range(input int b, input int p0, input int p1);
    if (p0 <= 0 && p1 > 0) send(SIG_BLOCK, b);
    if (p0 <= 1 && p1 > 1) send(SIG_ENTER, 0);
    if (p0 <= 2 && p1 > 2) send(SIG_INDEX, b);
    if (p0 <= 3 && p1 > 3) begin
      repeat ($urandom % 20) @(negedge clk);
      send(SIG_INDEX, b);
    end
    if (p0 <= 4 && p1 > 4) send(SIG_EXIT, 0);
  endtask

  task automatic do_reset();
    port_strobe = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    r_cur = 0; r_ee = 0; r_armed = 0; r_stored = 0; r_flags = '0; r_first = ERR_NONE;
  endtask

  initial begin
    int b, p, tgt, tp, steps, waited;
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_undetected = 0;
    n_completed = 0;
    for (int m = 0; m < NUM_MECH; m++) n_det[m] = 0;

    // fault-free runs to program completion
    for (int r = 0; r < 5; r++) begin
      do_reset();
      b = 0;
      steps = 0;
      while (has_succ(b) && steps < 200) begin
        b = rand_succ(b);
        run_range(b, 0, 5);
        steps++;
      end
      check(!error, "fault-free run raised an error");
      if (!has_succ(b)) n_completed++;
    end

    // fault campaign
    for (int f = 0; f < int'(FAULTS); f++) begin
      do_reset();
      b = 0;
      steps = 1 + $urandom % 12;
      for (int s = 0; s < steps && has_succ(b); s++) begin
        b = rand_succ(b);
        run_range(b, 0, 5);
      end
      if (!has_succ(b)) begin
        f--;  // the program ended before the fault; try again
        continue;
      end
      b = rand_succ(b);
      p = $urandom % 6;
      run_range(b, 0, p);
      if ($urandom % 10 == 0) begin
        // jump out of the program: nothing more is sent
        waited = 0;
        while (!error && waited < 4 * int'(TIMEOUT)) begin
          @(negedge clk);
          waited++;
        end
        check(err_type == ERR_TIMEOUT, "hang not detected by time-out");
      end else begin
        tgt = 1 + $urandom % NUM_BLOCKS;
        tp = $urandom % 5;
        run_range(tgt, tp, 5);
        // the program carries on along the CFG from the wrong place
        for (int k = 0; k < 6 && !error && has_succ(tgt); k++) begin
          tgt = rand_succ(tgt);
          run_range(tgt, 0, 5);
        end
      end
      for (int m = 0; m < NUM_MECH; m++) if (err_type == err_type_e'(m + 1)) n_det[m]++;
      if (!error) n_undetected++;
    end
    $display("%s: %0d faults, first detected by flow %0d, enter-exit %0d, block complete %0d, time-out %0d, undetected %0d",
             NAME, FAULTS, n_det[MECH_FLOW], n_det[MECH_ENTEREXIT], n_det[MECH_COMPLETE], n_det[MECH_TIMEOUT], n_undetected);
    done = 1'b1;
  end

endmodule
