// ptem_cluster: the per-task energy metering logic of one cluster.
//
// A cluster is NCORES SMT cores (NTHREADS hardware contexts each) sharing an
// LLC over an intracluster bus; the intercluster bus connects clusters to
// memory. Hardware context (task) t = core * NTHREADS + thread.
// The cluster observes, without ever stalling them:
//   - every LLC access: it is classified into one of six actions and counted
//     per task; a miss fills a line, which updates the sampled LLC owner table
//     and occupancy counters; cycles without an LLC access count as LLC idle
//     cycles;
//   - every intracluster and intercluster bus transaction (address-only or
//     cache-line), counted per task;
//   - per core, L1 fills and fetched instructions (ptem_core_slice) and the
//     core energy of each interval from the core's power proxy.
// At each interval `tick` all counters are snapshotted; one cycle later the
// energy engine starts and adds each active task's energy for the interval
// to its Energy Metering Register (EMR). The OS reads an EMR by context index
// and clears it on schedule-in; the clear also restarts that context's
// cumulated occupancy counters (this implementation's choice).
// A second register per context, `core_emr`, accumulates the core part of the
// task's energy alone (the per-task core energy total the scheme lists among
// its counters); it is cleared together with the EMR.
// `active` marks the contexts running a task; `ntk_chip` is the number of
// tasks running in the whole chip (the intercluster-bus leakage is shared
// among them). `init_done` rises when all owner tables have been cleared
// after reset (LLC_SETS >> LLC_SMP_SHIFT cycles, 1,024 by default); fills
// before that are counted as accesses but do not change ownership.
module ptem_cluster
  import ptem_pkg::*;
#(
  parameter int unsigned NCORES        = 4,
  parameter int unsigned NTHREADS      = 2,
  parameter int unsigned LLC_SETS      = 2048,
  parameter int unsigned LLC_WAYS      = 16,
  parameter int unsigned LLC_SMP_SHIFT = 1,
  parameter int unsigned L1_SETS       = 256,
  parameter int unsigned L1_WAYS       = 4,
  parameter int unsigned L1_SMP_SHIFT  = 1,
  parameter int unsigned FETCH_WIDTH   = 2,
  parameter int unsigned PERIOD        = 10000,
  parameter int unsigned NCHIP_TASKS   = 64,
  localparam int unsigned NTASKS  = NCORES * NTHREADS,
  localparam int unsigned TID_W   = (NTASKS > 1) ? $clog2(NTASKS) : 1,
  localparam int unsigned THR_W   = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int unsigned LSET_W  = $clog2(LLC_SETS),
  localparam int unsigned LWAY_W  = (LLC_WAYS > 1) ? $clog2(LLC_WAYS) : 1,
  localparam int unsigned SET1_W  = $clog2(L1_SETS),
  localparam int unsigned WAY1_W  = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1,
  localparam int unsigned FW_W    = $clog2(FETCH_WIDTH + 1),
  localparam int unsigned LLC_LINES = (LLC_SETS >> LLC_SMP_SHIFT) * LLC_WAYS,
  localparam int unsigned L1_LINES  = (L1_SETS >> L1_SMP_SHIFT) * L1_WAYS,
  localparam int unsigned OCCL_W  = $clog2(LLC_LINES + 1),
  localparam int unsigned OCC1_W  = $clog2(L1_LINES + 1),
  localparam int unsigned NTK_W   = $clog2(NCHIP_TASKS + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  ptem_cfg_t cfg,
  // LLC accesses
  input  logic              llc_valid,
  input  logic [TID_W-1:0]  llc_task,
  input  logic              llc_write,
  input  logic              llc_hit,
  input  logic              llc_dirty_victim,
  input  logic [LSET_W-1:0] llc_set,
  input  logic [LWAY_W-1:0] llc_way,
  // bus transactions (line = 1: cache-line transfer, 0: address only)
  input  logic              inbus_valid,
  input  logic [TID_W-1:0]  inbus_task,
  input  logic              inbus_line,
  input  logic              outbus_valid,
  input  logic [TID_W-1:0]  outbus_task,
  input  logic              outbus_line,
  // per-core events
  input  logic [NCORES-1:0]              ic_fill_valid,
  input  logic [NCORES-1:0][SET1_W-1:0]  ic_fill_set,
  input  logic [NCORES-1:0][WAY1_W-1:0]  ic_fill_way,
  input  logic [NCORES-1:0][THR_W-1:0]   ic_fill_thread,
  input  logic [NCORES-1:0]              dc_fill_valid,
  input  logic [NCORES-1:0][SET1_W-1:0]  dc_fill_set,
  input  logic [NCORES-1:0][WAY1_W-1:0]  dc_fill_way,
  input  logic [NCORES-1:0][THR_W-1:0]   dc_fill_thread,
  input  logic [NCORES-1:0]              fetch_valid,
  input  logic [NCORES-1:0][THR_W-1:0]   fetch_thread,
  input  logic [NCORES-1:0][FW_W-1:0]    fetch_count,
  input  logic [NCORES-1:0][E_W-1:0]     core_energy,
  // task bookkeeping
  input  logic [NTASKS-1:0] active,
  input  logic [NTK_W-1:0]  ntk_chip,
  // OS interface
  input  logic              emr_clr_valid,
  input  logic [TID_W-1:0]  emr_clr_task,
  input  logic [TID_W-1:0]  emr_rd_task,
  output logic [EMR_W-1:0]  emr_rd_data,
  output logic [NTASKS-1:0][EMR_W-1:0] emr,
  output logic [NTASKS-1:0][EMR_W-1:0] core_emr,
  output logic [NTASKS-1:0][CUM_W-1:0] llc_occ_cum,
  output logic [NTASKS-1:0][CUM_W-1:0] il1_occ_cum,
  output logic [NTASKS-1:0][CUM_W-1:0] dl1_occ_cum,
  output logic engine_busy,
  output logic engine_overrun,
  output logic init_done
);
  // ---------------- LLC ----------------
  llc_action_e llc_act;
  always_comb llc_act = llc_classify(llc_write, llc_hit, llc_dirty_victim);

  logic [NTASKS-1:0][LLC_ACTIONS-1:0][CNT_W-1:0] llc_cnt;
  ptem_event_counters #(.NTASKS(NTASKS), .NACT(LLC_ACTIONS), .W(CNT_W), .INC_W(1)) u_llc_cnt (
    .clk, .rst_n, .tick, .ev_valid(llc_valid), .ev_task(llc_task), .ev_act(llc_act),
    .ev_inc(1'b1), .snap(llc_cnt)
  );

  logic [0:0][0:0][CNT_W-1:0] llc_idle;
  ptem_event_counters #(.NTASKS(1), .NACT(1), .W(CNT_W), .INC_W(1)) u_llc_idle (
    .clk, .rst_n, .tick, .ev_valid(!llc_valid), .ev_task(1'b0), .ev_act(1'b0),
    .ev_inc(1'b1), .snap(llc_idle)
  );

  logic [NTASKS-1:0][OCCL_W-1:0] llc_inst, llc_smp;
  logic llc_init;
  logic [NCORES-1:0] core_init;
  assign init_done = llc_init && (&core_init);
  ptem_occ_tracker #(.NSETS(LLC_SETS), .NWAYS(LLC_WAYS), .SMP_SHIFT(LLC_SMP_SHIFT),
                     .NTASKS(NTASKS), .CUM_W(CUM_W)) u_llc_occ (
    .clk, .rst_n, .tick,
    .fill_valid(llc_valid && !llc_hit), .fill_set(llc_set), .fill_way(llc_way),
    .fill_task(llc_task), .cum_clr(emr_clr_valid), .cum_clr_task(emr_clr_task),
    .occ_inst(llc_inst), .occ_smp(llc_smp), .occ_cum(llc_occ_cum), .init_done(llc_init)
  );

  // ---------------- buses ----------------
  logic [NTASKS-1:0][BUS_ACTIONS-1:0][CNT_W-1:0] inb_cnt, outb_cnt;
  ptem_event_counters #(.NTASKS(NTASKS), .NACT(BUS_ACTIONS), .W(CNT_W), .INC_W(1)) u_inbus (
    .clk, .rst_n, .tick, .ev_valid(inbus_valid), .ev_task(inbus_task), .ev_act(inbus_line),
    .ev_inc(1'b1), .snap(inb_cnt)
  );
  ptem_event_counters #(.NTASKS(NTASKS), .NACT(BUS_ACTIONS), .W(CNT_W), .INC_W(1)) u_outbus (
    .clk, .rst_n, .tick, .ev_valid(outbus_valid), .ev_task(outbus_task), .ev_act(outbus_line),
    .ev_inc(1'b1), .snap(outb_cnt)
  );

  // ---------------- cores ----------------
  logic [NTASKS-1:0][OCC1_W-1:0] occ_il1, occ_dl1;
  logic [NTASKS-1:0][CNT_W-1:0]  fetch;
  logic [NCORES-1:0][E_W-1:0]    core_e_snap;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic clr_here;
    assign clr_here = emr_clr_valid && (32'(emr_clr_task) / NTHREADS == c);
    ptem_core_slice #(.NTHREADS(NTHREADS), .L1_SETS(L1_SETS), .L1_WAYS(L1_WAYS),
                      .L1_SMP_SHIFT(L1_SMP_SHIFT), .FETCH_WIDTH(FETCH_WIDTH)) u_slice (
      .clk, .rst_n, .tick,
      .ic_fill_valid(ic_fill_valid[c]), .ic_fill_set(ic_fill_set[c]),
      .ic_fill_way(ic_fill_way[c]), .ic_fill_thread(ic_fill_thread[c]),
      .dc_fill_valid(dc_fill_valid[c]), .dc_fill_set(dc_fill_set[c]),
      .dc_fill_way(dc_fill_way[c]), .dc_fill_thread(dc_fill_thread[c]),
      .fetch_valid(fetch_valid[c]), .fetch_thread(fetch_thread[c]),
      .fetch_count(fetch_count[c]), .core_energy(core_energy[c]),
      .cum_clr(clr_here), .cum_clr_thread(THR_W'(32'(emr_clr_task) % NTHREADS)),
      .occ_il1_smp(occ_il1[c*NTHREADS +: NTHREADS]),
      .occ_dl1_smp(occ_dl1[c*NTHREADS +: NTHREADS]),
      .occ_il1_cum(il1_occ_cum[c*NTHREADS +: NTHREADS]),
      .occ_dl1_cum(dl1_occ_cum[c*NTHREADS +: NTHREADS]),
      .fetch_snap(fetch[c*NTHREADS +: NTHREADS]),
      .core_energy_snap(core_e_snap[c]),
      .init_done(core_init[c])
    );
  end

  // ---------------- energy engine and EMRs ----------------
  logic tick_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tick_d <= 1'b0; else tick_d <= tick;

  logic             add_valid;
  logic [TID_W-1:0] add_task;
  logic [EMR_W-1:0] add_value, add_core;
  logic [EMR_W-1:0] core_rd_unused;

  ptem_energy_engine #(.NCORES(NCORES), .NTHREADS(NTHREADS), .PERIOD(PERIOD),
                       .LLC_LINES(LLC_LINES), .L1_LINES(L1_LINES),
                       .NCHIP_TASKS(NCHIP_TASKS)) u_engine (
    .clk, .rst_n, .start(tick_d), .cfg, .core_e(core_e_snap), .fetch,
    .llc_cnt, .inb_cnt, .outb_cnt, .llc_idle(llc_idle[0][0]),
    .occ_llc(llc_smp), .occ_il1, .occ_dl1, .active, .ntk_chip,
    .add_valid, .add_task, .add_value, .add_core, .busy(engine_busy), .overrun(engine_overrun)
  );

  ptem_emr #(.NTASKS(NTASKS), .W(EMR_W)) u_emr (
    .clk, .rst_n, .add_valid, .add_task, .add_value,
    .clr_valid(emr_clr_valid), .clr_task(emr_clr_task),
    .rd_task(emr_rd_task), .rd_data(emr_rd_data), .emr
  );

  // per-task core energy, added and cleared together with the EMR
  ptem_emr #(.NTASKS(NTASKS), .W(EMR_W)) u_core_emr (
    .clk, .rst_n, .add_valid, .add_task, .add_value(add_core),
    .clr_valid(emr_clr_valid), .clr_task(emr_clr_task),
    .rd_task(emr_rd_task), .rd_data(core_rd_unused), .emr(core_emr)
  );
endmodule
