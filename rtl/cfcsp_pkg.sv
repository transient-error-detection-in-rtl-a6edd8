// cfcsp_pkg: types and constants shared by the CFCSP watchdog processor.
//
// The watchdog checks the control flow of a target microcontroller from the
// signatures that the instrumented program writes to an output port. A
// signature is one byte: the two top bits say what kind it is and the six
// low bits carry a block ID or a block index. The byte layout and the codes
// are this design's choice; the four kinds follow the four signatures placed
// at the start and end of every basic block (block ID, block enter, index,
// index, block exit).
//
// The default control flow graph (CFG) is the five-block example program:
// 1 -> 2, 2 -> 3, 2 -> 4, 3 -> 5, 4 -> 5, 5 -> 2. The CFG is held as a
// successor matrix SUCC[from][to]; row 0 is the start state before any block
// has run, and its only legal successor is the entry block 1.
package cfcsp_pkg;

  // Width of one signature byte on the port and of its value field.
  localparam int unsigned SIG_W = 8;
  localparam int unsigned ID_W  = 6;

  // Kind of a signature, carried in its two top bits.
  typedef enum logic [1:0] {
    SIG_BLOCK = 2'b00,  // unique block ID, sent on entering a block (mechanism 1)
    SIG_ENTER = 2'b01,  // block enter message (mechanism 2)
    SIG_EXIT  = 2'b10,  // block exit message (mechanism 2)
    SIG_INDEX = 2'b11   // unique index, sent at start and end of a block (mechanism 3)
  } sig_kind_e;

  typedef struct packed {
    sig_kind_e         kind;
    logic [ID_W-1:0]   value;
  } sig_t;

  // Positions of the four detection mechanisms in an error vector.
  localparam int unsigned NUM_MECH       = 4;
  localparam int unsigned MECH_FLOW      = 0;  // execution flow checking
  localparam int unsigned MECH_ENTEREXIT = 1;  // enter-exit checking
  localparam int unsigned MECH_COMPLETE  = 2;  // block complete execution checking
  localparam int unsigned MECH_TIMEOUT   = 3;  // time out checking

  // Error type reported to the result-logging interface.
  typedef enum logic [2:0] {
    ERR_NONE      = 3'd0,
    ERR_FLOW      = 3'd1,
    ERR_ENTEREXIT = 3'd2,
    ERR_COMPLETE  = 3'd3,
    ERR_TIMEOUT   = 3'd4
  } err_type_e;

  // Example program of five basic blocks. Rows are listed from block 5 down
  // to the start row 0; bit c of row r is set when r -> c is a CFG edge.
  localparam int unsigned FIG2_NUM_BLOCKS = 5;
  localparam logic [FIG2_NUM_BLOCKS:0][FIG2_NUM_BLOCKS:0] FIG2_SUCC = {
    6'b000100,  // 5 -> 2
    6'b100000,  // 4 -> 5
    6'b100000,  // 3 -> 5
    6'b011000,  // 2 -> 3, 2 -> 4
    6'b000100,  // 1 -> 2
    6'b000010   // start -> 1
  };

  // Signatures are restarted by every message; the limit should be the
  // longest basic block execution time, counted in watchdog clock cycles.
  localparam int unsigned DEFAULT_TIMEOUT_CYCLES = 2048;

endpackage
