// tb_ptem_sample_timer: checks, on every clock edge, that the sampling tick
// is a single-cycle pulse arriving exactly every PERIOD cycles, the first one
// PERIOD cycles after reset, and that a reset in mid-period restarts the
// count. A small PERIOD keeps the run short; the counter logic does not
// depend on its value.
module tb_ptem_sample_timer;
  localparam int unsigned PERIOD = 37;
  logic clk = 1'b0, rst_n = 1'b0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, nticks = 0;

  ptem_sample_timer #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  // cyc counts the edges sampled since reset release; the first tick is seen
  // at edge PERIOD+1 (it is registered at edge PERIOD)
  always @(posedge clk) begin
    if (!rst_n) cyc = 0;
    else begin
      bit exp;
      cyc++;
      exp = (cyc > int'(PERIOD)) && ((cyc - int'(PERIOD) - 1) % int'(PERIOD) == 0);
      checks++;
      if (tick != exp) begin
        failures++;
        if (failures < 10) $display("edge %0d after reset: tick=%0b expected %0b", cyc, tick, exp);
      end
      if (tick) nticks++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // reset again in the middle of the sixth period
    repeat (PERIOD * 5 + PERIOD / 2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (PERIOD * 10 + 2) @(posedge clk);
    checks++;
    if (nticks != 15) begin failures++; $display("saw %0d ticks, expected 15", nticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
