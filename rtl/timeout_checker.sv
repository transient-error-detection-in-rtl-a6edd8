// timeout_checker: mechanism 4, time-out checking.
//
// A watchdog timer outside the target processor. Every signature, of any
// kind, restarts it; if TIMEOUT_CYCLES clocks pass without one, the error
// flag is set and held until reset. This catches a processor that has
// stopped or jumped out of the program area and sends nothing. The limit
// should be the longest basic block execution time; the document gives no
// number, so the default is this design's choice. The timer runs from reset.
//
// Timing: with the last kick taken at clock edge k, error is high after edge
// k + TIMEOUT_CYCLES; a kick at edge k + TIMEOUT_CYCLES - 1 or earlier keeps
// it low.
module timeout_checker
  import cfcsp_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = DEFAULT_TIMEOUT_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic kick,   // any signature
  output logic error
);

  localparam int unsigned CNT_W = $clog2(TIMEOUT_CYCLES + 1);

  logic [CNT_W-1:0] count;  // clocks since the last kick

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      error <= 1'b0;
    end else if (kick) begin
      count <= '0;
    end else begin
      if (count == CNT_W'(TIMEOUT_CYCLES - 1)) error <= 1'b1;
      if (count != CNT_W'(TIMEOUT_CYCLES))     count <= count + CNT_W'(1);
    end
  end

  initial begin
    assert (TIMEOUT_CYCLES >= 2) else $error("timeout_checker: TIMEOUT_CYCLES must be at least 2");
  end

endmodule
