// rf_pulse_gen: produces the RF reference pulse when the RF packet arrives.
//
// rf_sync is the packet-received signal of the 2.4 GHz transceiver, asynchronous to the clock.
// It passes through a two-flop synchronizer; its rising edge starts an output pulse of
// PULSE_CYCLES clocks. Edges during a pulse are ignored. rf_pulse rises 3 clocks after the
// rf_sync edge (two synchronizer flops, one edge-detect register), a fixed offset that the
// time-of-flight measurement can subtract.
//
// From the document: an RF pulse generated in step with the arrival of the RF signal, its
// rising edge being the start of the time of flight, the RF propagation delay being neglected
// (Section II.2, Fig. 10(e)). The document does this in software on the second processor
// core. The transceiver signal used, the synchronizer and the pulse width (1 ms at 100 MHz) are
// this design's choice. Reset is synchronous and active high.
module rf_pulse_gen #(
  parameter int unsigned PULSE_CYCLES = 100_000
) (
  input  logic clk,
  input  logic rst,
  input  logic rf_sync,
  output logic rf_pulse
);

  localparam int unsigned CNT_W = $clog2(PULSE_CYCLES + 1);

  if (PULSE_CYCLES < 2) begin : g_check
    $error("rf_pulse_gen: PULSE_CYCLES must be at least 2");
  end

  logic [2:0]       sync_q;     // [0],[1]: synchronizer, [2]: previous value
  logic [CNT_W-1:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q    <= '0;
      remaining <= '0;
      rf_pulse  <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], rf_sync};
      if (remaining != '0) begin
        remaining <= remaining - 1'b1;
        if (remaining == CNT_W'(1)) rf_pulse <= 1'b0;
      end else if (sync_q[1] && !sync_q[2]) begin
        remaining <= CNT_W'(PULSE_CYCLES);
        rf_pulse  <= 1'b1;
      end
    end
  end

endmodule
