// sig_port_rx: receives signatures from the target microcontroller's port.
//
// The instrumented program writes a signature byte to an output port and
// then raises a strobe pin. Both come from the microcontroller's clock
// domain, so the byte and the strobe pass through SYNC_STAGES flip-flops
// each; one more stage on the strobe finds its rising edge. On that edge the
// synchronised byte is decoded into a sig_t and sig_valid is high for one
// clock. The program must set the byte at least one watchdog clock before it
// raises the strobe and hold it until the strobe is low again.
//
// Timing: sig_valid rises SYNC_STAGES + 1 clock edges after the first edge
// that samples the strobe high. One signature per strobe rise.
// The document only says the watchdog's pins are connected to the
// microcontroller's output ports; the strobe, the synchroniser and the byte
// layout are this design's choices.
module sig_port_rx
  import cfcsp_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SIG_W-1:0] port_data,    // signature byte from the port pins
  input  logic             port_strobe,  // rises once per signature
  output logic             sig_valid,    // one-clock pulse per signature
  output sig_t             sig           // decoded signature, held until the next
);

  logic [SYNC_STAGES-1:0]            strobe_sync;
  logic [SYNC_STAGES-1:0][SIG_W-1:0] data_sync;
  logic                              strobe_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_sync <= '0;
      data_sync   <= '0;
      strobe_last <= 1'b0;
      sig_valid   <= 1'b0;
      sig         <= '0;
    end else begin
      strobe_sync <= {strobe_sync[SYNC_STAGES-2:0], port_strobe};
      data_sync   <= {data_sync[SYNC_STAGES-2:0], port_data};
      strobe_last <= strobe_sync[SYNC_STAGES-1];
      sig_valid   <= strobe_sync[SYNC_STAGES-1] && !strobe_last;
      if (strobe_sync[SYNC_STAGES-1] && !strobe_last)
        sig <= sig_t'(data_sync[SYNC_STAGES-1]);
    end
  end

  initial begin
    assert (SYNC_STAGES >= 2) else $error("sig_port_rx: SYNC_STAGES must be at least 2");
  end

endmodule
