// ptem_sample_timer: the time-sampling clock of the metering logic.
//
// Emits a one-cycle `tick` every PERIOD cycles. The tick updates the cumulated
// occupancy counters (time sampling of occupancy), closes the current metering
// interval of the activity counters and starts the per-interval energy
// computation. The 10,000-cycle default is the sampling period the design
// settles on for the LLC; using the same period for the L1 caches and the core
// energy intervals is this implementation's choice.
// Timing: `tick` is registered; it rises at the PERIOD-th clock edge after
// reset is released and then every PERIOD edges.
module ptem_sample_timer #(
  parameter int unsigned PERIOD = 10000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned W = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == W'(PERIOD - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
