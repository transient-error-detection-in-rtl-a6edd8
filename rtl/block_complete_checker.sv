// block_complete_checker: mechanism 3, block complete execution checking.
//
// Every basic block sends its unique index twice, after its enter message and
// before its exit message. The first index of a pair is stored in a register;
// the second is compared with it, and if they differ the error flag is set
// and held until reset. A jump from the middle of one block into the middle
// of another pairs two different indices and is caught. The register and the
// comparator are the document's; the pair toggle (which index is "first") and
// the sticky flag are this design's.
//
// Timing: idx_valid is a one-clock pulse; error rises on the clock edge that
// takes a mismatching second index.
module block_complete_checker
  import cfcsp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            idx_valid,  // an index signature arrives
  input  logic [ID_W-1:0] idx,        // its value
  output logic            armed,      // first index of a pair stored
  output logic            error
);

  logic [ID_W-1:0] stored;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored <= '0;
      armed  <= 1'b0;
      error  <= 1'b0;
    end else if (idx_valid) begin
      if (!armed) begin
        stored <= idx;
        armed  <= 1'b1;
      end else begin
        armed <= 1'b0;
        if (idx != stored) error <= 1'b1;
      end
    end
  end

endmodule
