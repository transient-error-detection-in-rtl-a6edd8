// enter_exit_checker: mechanism 2, enter-exit checking.
//
// A three-state machine. In state A the program is between blocks and the
// only legal message is Enter, which moves to B; in B the program is inside a
// block and the only legal message is Exit, which moves back to A. Exit in A
// or Enter in B leads to Error, which holds until reset. The states and
// transitions are the document's; starting in A is this design's choice.
// A jump from the end of one block into the middle of another skips that
// block's Enter message and is caught here when its Exit message comes.
//
// Timing: enter and exit are one-clock pulses, never both in one clock;
// state and error change on the clock edge that takes them.
module enter_exit_checker (
  input  logic clk,
  input  logic rst_n,
  input  logic enter,     // block enter signature
  input  logic exit_msg,  // block exit signature
  output logic in_block,  // state B
  output logic error      // state Error
);

  typedef enum logic [1:0] {
    EE_A   = 2'd0,
    EE_B   = 2'd1,
    EE_ERR = 2'd2
  } ee_state_e;

  ee_state_e state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      EE_A: begin
        if (enter)         state_next = EE_B;
        else if (exit_msg) state_next = EE_ERR;
      end
      EE_B: begin
        if (exit_msg)      state_next = EE_A;
        else if (enter)    state_next = EE_ERR;
      end
      default:             state_next = EE_ERR;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= EE_A;
    else        state <= state_next;
  end

  assign in_block = (state == EE_B);
  assign error    = (state == EE_ERR);

  a_one_message: assert property (@(posedge clk) disable iff (!rst_n)
    !(enter && exit_msg));

endmodule
