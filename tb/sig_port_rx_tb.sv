// sig_port_rx_tb: self-checking test of the signature receiver.
// Sends random signature bytes with the port/strobe protocol (byte set first,
// strobe high for a random number of clocks, then low) and checks that each
// strobe gives exactly one sig_valid pulse, carrying the byte that was sent,
// SYNC_STAGES + 1 clock edges after the strobe was first sampled high.
module sig_port_rx_tb;
  import cfcsp_pkg::*;

  localparam int unsigned SYNC = 2;
  localparam int unsigned N_SIGS = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [SIG_W-1:0] port_data = '0;
  logic port_strobe = 1'b0;
  logic sig_valid;
  sig_t sig;

  int checks = 0, failures = 0;
  int pulses = 0;

  sig_port_rx #(.SYNC_STAGES(SYNC)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && sig_valid) pulses <= pulses + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(input logic [SIG_W-1:0] b, input int hold);
    int edges, seen_at;
    int p0;
    port_data = b;
    @(negedge clk);
    @(negedge clk);
    port_strobe = 1'b1;
    p0 = pulses;
    seen_at = -1;
    // posedge 1 samples the strobe; the pulse must be visible after posedge SYNC+1
    for (edges = 1; edges <= hold + SYNC + 4; edges++) begin
      @(posedge clk); #1;
      if (sig_valid && seen_at < 0) seen_at = edges;
      if (edges == hold) port_strobe = 1'b0;
    end
    port_strobe = 1'b0;
    repeat (SYNC + 3) @(posedge clk);
    #1;
    check(seen_at == int'(SYNC) + 1, $sformatf("latency %0d for byte %02h", seen_at, b));
    check(pulses == p0 + 1, $sformatf("%0d pulses for one strobe", pulses - p0));
    check(sig == sig_t'(b), $sformatf("decoded %02h, sent %02h", sig, b));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!sig_valid, "valid after reset");
    for (int i = 0; i < N_SIGS; i++)
      send(SIG_W'($urandom), 1 + ($urandom % 8));
    // decoding of the kind field
    send({SIG_INDEX, 6'd33}, 3);
    check(sig.kind == SIG_INDEX && sig.value == 6'd33, "kind/value fields");
    send({SIG_EXIT, 6'd0}, 3);
    check(sig.kind == SIG_EXIT, "exit kind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
