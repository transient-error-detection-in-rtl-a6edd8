// error_reporter: joins the four mechanisms into the watchdog's error outputs.
//
// error_flags holds, per mechanism, whether it has detected an error since
// reset; error is their OR and is the error detection signal to the result
// logging interface. err_type records the first mechanism to detect one, so
// the interface can log which mechanism caught the fault; if several detect
// in the same clock, the lower index wins (flow, enter-exit, block complete,
// time-out). Everything holds until reset. The document says only that an
// error signal is sent and that the interface reads the detected error type;
// the first-detector rule and the encoding are this design's.
//
// Timing: err_type and error_flags are registered, one clock after mech_err.
module error_reporter
  import cfcsp_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_MECH-1:0] mech_err,     // per-mechanism error, indexed by MECH_*
  output logic                error,        // error detection signal
  output logic [NUM_MECH-1:0] error_flags,  // mechanisms that have detected an error
  output err_type_e           err_type      // first mechanism to detect, ERR_NONE if none
);

  err_type_e first_now;

  always_comb begin
    first_now = ERR_NONE;
    if      (mech_err[MECH_FLOW])      first_now = ERR_FLOW;
    else if (mech_err[MECH_ENTEREXIT]) first_now = ERR_ENTEREXIT;
    else if (mech_err[MECH_COMPLETE])  first_now = ERR_COMPLETE;
    else if (mech_err[MECH_TIMEOUT])   first_now = ERR_TIMEOUT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error_flags <= '0;
      err_type    <= ERR_NONE;
    end else begin
      error_flags <= error_flags | mech_err;
      if (err_type == ERR_NONE) err_type <= first_now;
    end
  end

  assign error = |error_flags;

endmodule
