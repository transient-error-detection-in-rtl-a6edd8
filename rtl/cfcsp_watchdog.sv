// cfcsp_watchdog: watchdog processor for control flow checking by shadow
// processing (CFCSP).
//
// The target microcontroller runs a program whose basic blocks carry inserted
// signatures: on entry its block ID, an enter message and its index, and
// before its final jump its index again and an exit message. This module
// receives those signatures from the microcontroller's port pins and follows
// the program concurrently with four independent mechanisms:
//   1. exec_flow_checker      - each block ID must be a CFG successor of the last;
//   2. enter_exit_checker     - enter and exit messages must alternate;
//   3. block_complete_checker - a block's two index signatures must be equal;
//   4. timeout_checker        - some signature must arrive within TIMEOUT_CYCLES.
// error_reporter raises the error detection signal and records which
// mechanism detected first. All errors hold until rst_n.
//
// The program's CFG is the NUM_BLOCKS / SUCC parameter pair (default: the
// five-block example program). The mechanisms and their FSMs follow the
// document; the port protocol, the signature byte layout, the error type
// encoding and the default time-out are this design's choices.
//
// Timing: a signature reaches the checkers SYNC_STAGES + 1 clocks after the
// strobe is first sampled high; a checker's error reaches error/err_type one
// clock later.
module cfcsp_watchdog
  import cfcsp_pkg::*;
#(
  parameter int unsigned                       NUM_BLOCKS     = FIG2_NUM_BLOCKS,
  parameter logic [NUM_BLOCKS:0][NUM_BLOCKS:0] SUCC           = FIG2_SUCC,
  parameter int unsigned                       TIMEOUT_CYCLES = DEFAULT_TIMEOUT_CYCLES,
  parameter int unsigned                       SYNC_STAGES    = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SIG_W-1:0]    port_data,    // signature byte from the microcontroller
  input  logic                port_strobe,  // rises once per signature
  output logic                error,        // error detection signal
  output err_type_e           err_type,     // first mechanism that detected
  output logic [NUM_MECH-1:0] error_flags,  // every mechanism that detected
  output logic [ID_W-1:0]     cur_block,    // block the flow checker is in
  output logic                in_block      // enter-exit checker between enter and exit
);

  logic sig_valid;
  sig_t sig;
  logic [NUM_MECH-1:0] mech_err;

  sig_port_rx #(.SYNC_STAGES(SYNC_STAGES)) u_rx (
    .clk, .rst_n, .port_data, .port_strobe, .sig_valid, .sig
  );

  exec_flow_checker #(.NUM_BLOCKS(NUM_BLOCKS), .SUCC(SUCC)) u_flow (
    .clk, .rst_n,
    .id_valid  (sig_valid && sig.kind == SIG_BLOCK),
    .id        (sig.value),
    .cur_block (cur_block),
    .error     (mech_err[MECH_FLOW])
  );

  enter_exit_checker u_enter_exit (
    .clk, .rst_n,
    .enter    (sig_valid && sig.kind == SIG_ENTER),
    .exit_msg (sig_valid && sig.kind == SIG_EXIT),
    .in_block (in_block),
    .error    (mech_err[MECH_ENTEREXIT])
  );

  block_complete_checker u_complete (
    .clk, .rst_n,
    .idx_valid (sig_valid && sig.kind == SIG_INDEX),
    .idx       (sig.value),
    .armed     (),
    .error     (mech_err[MECH_COMPLETE])
  );

  timeout_checker #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_timeout (
    .clk, .rst_n,
    .kick  (sig_valid),
    .error (mech_err[MECH_TIMEOUT])
  );

  error_reporter u_report (
    .clk, .rst_n, .mech_err, .error, .error_flags, .err_type
  );

endmodule
