// tb_ptem_event_counters: random events with random increments, a reference
// count per task and action, checks of the snapshot after every tick
// (including events in the tick cycle, which belong to the new interval) and
// of saturation with a narrow counter.
module tb_ptem_event_counters;
  localparam int unsigned NTASKS = 8, NACT = 6, W = 10, INC_W = 2;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic ev_valid = 1'b0;
  logic [2:0] ev_task = '0, ev_act = '0;
  logic [INC_W-1:0] ev_inc = '0;
  logic [NTASKS-1:0][NACT-1:0][W-1:0] snap;
  int checks = 0, failures = 0;
  int model [NTASKS][NACT];
  int smodel [NTASKS][NACT];

  ptem_event_counters #(.NTASKS(NTASKS), .NACT(NACT), .W(W), .INC_W(INC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic interval(input int cycles, input int maxinc);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      tick = (c == cycles - 1);
      ev_valid = 1'($urandom_range(0, 2) != 0);
      ev_task = 3'($urandom_range(0, NTASKS - 1));
      ev_act = 3'($urandom_range(0, NACT - 1));
      ev_inc = INC_W'($urandom_range(0, maxinc));
      @(posedge clk);
      if (tick) begin
        foreach (model[t, a]) begin smodel[t][a] = model[t][a]; model[t][a] = 0; end
      end
      if (ev_valid) begin
        model[ev_task][ev_act] += int'(ev_inc);
        if (model[ev_task][ev_act] > (1 << W) - 1) model[ev_task][ev_act] = (1 << W) - 1;
      end
    end
    @(negedge clk);
    tick = 1'b0; ev_valid = 1'b0;
    foreach (smodel[t, a]) begin
      checks++;
      if (int'(snap[t][a]) != smodel[t][a]) begin
        failures++;
        $display("snap[%0d][%0d]=%0d expected %0d", t, a, snap[t][a], smodel[t][a]);
      end
    end
  endtask

  initial begin
    foreach (model[t, a]) model[t][a] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    interval(50, 3);
    interval(200, 3);
    interval(3000, 3);   // long enough for some counters to saturate
    interval(120, 1);
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
