// ptem_core_slice: metering support attached to one SMT core.
//
// Holds what the core needs for splitting its energy among its hardware
// threads: an owner table with per-thread occupancy counters for the L1
// instruction cache and another for the L1 data cache (both sampled in sets
// and time exactly like the LLC; their occupancy decides how the core's
// leakage is split), per-thread counters of fetched instructions (they decide
// how the core's dynamic energy is split), and a register that captures, at
// every interval tick, the core energy of the interval just ended as reported
// by the core's power proxy.
// Interface: one L1-I fill, one L1-D fill and one fetch group (up to the
// fetch width, from one thread) per cycle. All outputs change at the tick
// edge and are stable for the whole next interval. `init_done` rises once
// both L1 owner tables have been cleared after reset (L1_SETS >> L1_SMP_SHIFT
// cycles); L1 fills before that are not tracked.
module ptem_core_slice
  import ptem_pkg::*;
#(
  parameter int unsigned NTHREADS    = 2,
  parameter int unsigned L1_SETS     = 256,
  parameter int unsigned L1_WAYS     = 4,
  parameter int unsigned L1_SMP_SHIFT = 1,
  parameter int unsigned FETCH_WIDTH = 2,
  localparam int unsigned THR_W  = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int unsigned SET_W  = $clog2(L1_SETS),
  localparam int unsigned WAY_W  = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1,
  localparam int unsigned FW_W   = $clog2(FETCH_WIDTH + 1),
  localparam int unsigned L1_LINES = (L1_SETS >> L1_SMP_SHIFT) * L1_WAYS,
  localparam int unsigned OCC1_W = $clog2(L1_LINES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic             ic_fill_valid,
  input  logic [SET_W-1:0] ic_fill_set,
  input  logic [WAY_W-1:0] ic_fill_way,
  input  logic [THR_W-1:0] ic_fill_thread,
  input  logic             dc_fill_valid,
  input  logic [SET_W-1:0] dc_fill_set,
  input  logic [WAY_W-1:0] dc_fill_way,
  input  logic [THR_W-1:0] dc_fill_thread,
  input  logic             fetch_valid,
  input  logic [THR_W-1:0] fetch_thread,
  input  logic [FW_W-1:0]  fetch_count,
  input  logic [E_W-1:0]   core_energy,
  input  logic             cum_clr,
  input  logic [THR_W-1:0] cum_clr_thread,
  output logic [NTHREADS-1:0][OCC1_W-1:0] occ_il1_smp,
  output logic [NTHREADS-1:0][OCC1_W-1:0] occ_dl1_smp,
  output logic [NTHREADS-1:0][CUM_W-1:0]  occ_il1_cum,
  output logic [NTHREADS-1:0][CUM_W-1:0]  occ_dl1_cum,
  output logic [NTHREADS-1:0][CNT_W-1:0]  fetch_snap,
  output logic [E_W-1:0]                  core_energy_snap,
  output logic                            init_done
);
  logic [NTHREADS-1:0][OCC1_W-1:0] il1_inst, dl1_inst;
  logic [NTHREADS-1:0][0:0][CNT_W-1:0] fetch_snap_a;
  logic il1_init, dl1_init;
  assign init_done = il1_init && dl1_init;

  ptem_occ_tracker #(.NSETS(L1_SETS), .NWAYS(L1_WAYS), .SMP_SHIFT(L1_SMP_SHIFT),
                     .NTASKS(NTHREADS), .CUM_W(CUM_W)) u_il1 (
    .clk, .rst_n, .tick,
    .fill_valid(ic_fill_valid), .fill_set(ic_fill_set), .fill_way(ic_fill_way),
    .fill_task(ic_fill_thread), .cum_clr, .cum_clr_task(cum_clr_thread),
    .occ_inst(il1_inst), .occ_smp(occ_il1_smp), .occ_cum(occ_il1_cum), .init_done(il1_init)
  );

  ptem_occ_tracker #(.NSETS(L1_SETS), .NWAYS(L1_WAYS), .SMP_SHIFT(L1_SMP_SHIFT),
                     .NTASKS(NTHREADS), .CUM_W(CUM_W)) u_dl1 (
    .clk, .rst_n, .tick,
    .fill_valid(dc_fill_valid), .fill_set(dc_fill_set), .fill_way(dc_fill_way),
    .fill_task(dc_fill_thread), .cum_clr, .cum_clr_task(cum_clr_thread),
    .occ_inst(dl1_inst), .occ_smp(occ_dl1_smp), .occ_cum(occ_dl1_cum), .init_done(dl1_init)
  );

  ptem_event_counters #(.NTASKS(NTHREADS), .NACT(1), .W(CNT_W), .INC_W(FW_W)) u_fetch (
    .clk, .rst_n, .tick,
    .ev_valid(fetch_valid), .ev_task(fetch_thread), .ev_act(1'b0), .ev_inc(fetch_count),
    .snap(fetch_snap_a)
  );

  always_comb
    for (int h = 0; h < NTHREADS; h++) fetch_snap[h] = fetch_snap_a[h][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    core_energy_snap <= '0;
    else if (tick) core_energy_snap <= core_energy;
  end

  a_fetch_width: assert property (@(posedge clk) disable iff (!rst_n)
                                  fetch_valid |-> 32'(fetch_count) <= FETCH_WIDTH);
endmodule
