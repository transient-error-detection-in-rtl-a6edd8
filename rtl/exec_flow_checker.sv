// exec_flow_checker: mechanism 1, execution flow checking.
//
// A finite state machine made from the program's control flow graph. Its
// state is the ID of the basic block the program is in (0 before the first
// block). Each block-ID signature is looked up in the successor matrix SUCC:
// if SUCC[current][new] is set the machine moves to the new block, otherwise
// (an illegal edge, or an ID outside 1..NUM_BLOCKS) it enters its Error state
// and stays there until reset. This follows the document's FSM, in which
// every block has one transition per CFG successor and an "else" transition
// to Error.
//
// The document has a tool generate one hand-written FSM per program; here the
// program's CFG is a parameter instead, so one module serves every program.
// The start state 0 and its single edge to the entry block are this design's
// way of checking the first signature.
//
// Timing: one signature per clock at most; error and cur_block change on the
// clock edge that takes id_valid.
module exec_flow_checker
  import cfcsp_pkg::*;
#(
  parameter int unsigned                          NUM_BLOCKS = FIG2_NUM_BLOCKS,
  parameter logic [NUM_BLOCKS:0][NUM_BLOCKS:0]    SUCC       = FIG2_SUCC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            id_valid,   // a block-ID signature arrives
  input  logic [ID_W-1:0] id,         // its block ID
  output logic [ID_W-1:0] cur_block,  // block the program is in, 0 before the first
  output logic            error       // Error state reached
);

  localparam int unsigned IDX_W = $clog2(NUM_BLOCKS + 1);

  logic legal;

  always_comb begin
    legal = 1'b0;
    if (id >= ID_W'(1) && id <= ID_W'(NUM_BLOCKS))
      legal = SUCC[cur_block[IDX_W-1:0]][id[IDX_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_block <= '0;
      error     <= 1'b0;
    end else if (id_valid && !error) begin
      if (legal) cur_block <= id;
      else       error     <= 1'b1;
    end
  end

  initial begin
    assert (NUM_BLOCKS < (1 << ID_W))
      else $error("exec_flow_checker: NUM_BLOCKS does not fit in a block ID");
  end

  a_state_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    cur_block <= ID_W'(NUM_BLOCKS));

endmodule
