// ptem_event_counters: per-task, per-action activity counters for one metering
// interval.
//
// Each accepted event adds `ev_inc` to counter [ev_task][ev_act]. On `tick` the
// running counts are copied into the snapshot bank `snap` (read by the energy
// engine during the next interval) and the running counters restart from the
// event, if any, of that same cycle. The design counts every LLC and bus access
// of every task exactly (these accesses are rare enough) and the instructions
// each hardware thread fetches; splitting the counts into per-interval
// snapshots is this implementation's way of feeding the energy engine.
// Counters saturate at their maximum value.
module ptem_event_counters #(
  parameter int unsigned NTASKS = 8,
  parameter int unsigned NACT   = 6,
  parameter int unsigned W      = 32,
  parameter int unsigned INC_W  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic ev_valid,
  input  logic [(NTASKS>1 ? $clog2(NTASKS) : 1)-1:0] ev_task,
  input  logic [(NACT>1 ? $clog2(NACT) : 1)-1:0]     ev_act,
  input  logic [INC_W-1:0] ev_inc,
  output logic [NTASKS-1:0][NACT-1:0][W-1:0] snap
);
  logic [NTASKS-1:0][NACT-1:0][W-1:0] run;

  function automatic logic [W-1:0] sat_add(input logic [W-1:0] a, input logic [INC_W-1:0] b);
    logic [W:0] s;
    s = {1'b0, a} + (W+1)'(b);
    return s[W] ? '1 : s[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= '0;
      snap <= '0;
    end else begin
      for (int t = 0; t < NTASKS; t++) begin
        for (int a = 0; a < NACT; a++) begin
          logic hit;
          hit = ev_valid && (32'(ev_task) == t) && (32'(ev_act) == a);
          if (tick) begin
            snap[t][a] <= run[t][a];
            run[t][a]  <= hit ? W'(ev_inc) : '0;
          end else if (hit) begin
            run[t][a]  <= sat_add(run[t][a], ev_inc);
          end
        end
      end
    end
  end

  a_task_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 ev_valid |-> 32'(ev_task) < NTASKS);
  a_act_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                 ev_valid |-> 32'(ev_act) < NACT);
endmodule
