// ptem_top: per-task energy metering (PTEM) for a clustered SMT multicore.
//
// The chip is NCLUSTERS clusters of NCORES two-way SMT cores; each cluster has
// its own LLC and intracluster bus, and all clusters reach memory over one
// intercluster bus. The top holds one ptem_cluster per cluster, a single
// sampling timer whose tick closes every cluster's metering interval at the
// same cycle, and the chip-wide count of running tasks (the intercluster-bus
// leakage is split among all of them). Every port is an array indexed by
// cluster; hardware context t of cluster k is core t / NTHREADS, thread
// t % NTHREADS. The vendor energy figures (`cfg`) are shared by all clusters.
// The metering logic only observes the processor: none of its inputs is ever
// back-pressured, and EMR values change once per interval (plus OS clears).
// `emr` holds each context's whole energy; `core_emr` its core part alone.
module ptem_top
  import ptem_pkg::*;
#(
  parameter int unsigned NCLUSTERS     = 8,
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
  localparam int unsigned NTASKS  = NCORES * NTHREADS,
  localparam int unsigned NCHIP_TASKS = NCLUSTERS * NTASKS,
  localparam int unsigned TID_W   = (NTASKS > 1) ? $clog2(NTASKS) : 1,
  localparam int unsigned THR_W   = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int unsigned LSET_W  = $clog2(LLC_SETS),
  localparam int unsigned LWAY_W  = (LLC_WAYS > 1) ? $clog2(LLC_WAYS) : 1,
  localparam int unsigned SET1_W  = $clog2(L1_SETS),
  localparam int unsigned WAY1_W  = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1,
  localparam int unsigned FW_W    = $clog2(FETCH_WIDTH + 1),
  localparam int unsigned NTK_W   = $clog2(NCHIP_TASKS + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  ptem_cfg_t cfg,
  input  logic [NCLUSTERS-1:0]              llc_valid,
  input  logic [NCLUSTERS-1:0][TID_W-1:0]   llc_task,
  input  logic [NCLUSTERS-1:0]              llc_write,
  input  logic [NCLUSTERS-1:0]              llc_hit,
  input  logic [NCLUSTERS-1:0]              llc_dirty_victim,
  input  logic [NCLUSTERS-1:0][LSET_W-1:0]  llc_set,
  input  logic [NCLUSTERS-1:0][LWAY_W-1:0]  llc_way,
  input  logic [NCLUSTERS-1:0]              inbus_valid,
  input  logic [NCLUSTERS-1:0][TID_W-1:0]   inbus_task,
  input  logic [NCLUSTERS-1:0]              inbus_line,
  input  logic [NCLUSTERS-1:0]              outbus_valid,
  input  logic [NCLUSTERS-1:0][TID_W-1:0]   outbus_task,
  input  logic [NCLUSTERS-1:0]              outbus_line,
  input  logic [NCLUSTERS-1:0][NCORES-1:0]              ic_fill_valid,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][SET1_W-1:0]  ic_fill_set,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][WAY1_W-1:0]  ic_fill_way,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][THR_W-1:0]   ic_fill_thread,
  input  logic [NCLUSTERS-1:0][NCORES-1:0]              dc_fill_valid,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][SET1_W-1:0]  dc_fill_set,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][WAY1_W-1:0]  dc_fill_way,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][THR_W-1:0]   dc_fill_thread,
  input  logic [NCLUSTERS-1:0][NCORES-1:0]              fetch_valid,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][THR_W-1:0]   fetch_thread,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][FW_W-1:0]    fetch_count,
  input  logic [NCLUSTERS-1:0][NCORES-1:0][E_W-1:0]     core_energy,
  input  logic [NCLUSTERS-1:0][NTASKS-1:0]              active,
  input  logic [NCLUSTERS-1:0]              emr_clr_valid,
  input  logic [NCLUSTERS-1:0][TID_W-1:0]   emr_clr_task,
  input  logic [NCLUSTERS-1:0][TID_W-1:0]   emr_rd_task,
  output logic [NCLUSTERS-1:0][EMR_W-1:0]   emr_rd_data,
  output logic [NCLUSTERS-1:0][NTASKS-1:0][EMR_W-1:0] emr,
  output logic [NCLUSTERS-1:0][NTASKS-1:0][EMR_W-1:0] core_emr,
  output logic [NCLUSTERS-1:0][NTASKS-1:0][CUM_W-1:0] llc_occ_cum,
  output logic [NCLUSTERS-1:0][NTASKS-1:0][CUM_W-1:0] il1_occ_cum,
  output logic [NCLUSTERS-1:0][NTASKS-1:0][CUM_W-1:0] dl1_occ_cum,
  output logic tick,
  output logic [NCLUSTERS-1:0] engine_busy,
  output logic [NCLUSTERS-1:0] engine_overrun,
  output logic [NCLUSTERS-1:0] init_done
);
  ptem_sample_timer #(.PERIOD(PERIOD)) u_timer (.clk, .rst_n, .tick);

  logic [NTK_W-1:0] ntk_chip;
  always_comb begin
    ntk_chip = '0;
    for (int k = 0; k < NCLUSTERS; k++)
      for (int t = 0; t < NTASKS; t++) ntk_chip = ntk_chip + NTK_W'(active[k][t]);
  end

  for (genvar k = 0; k < NCLUSTERS; k++) begin : g_cluster
    ptem_cluster #(
      .NCORES(NCORES), .NTHREADS(NTHREADS), .LLC_SETS(LLC_SETS), .LLC_WAYS(LLC_WAYS),
      .LLC_SMP_SHIFT(LLC_SMP_SHIFT), .L1_SETS(L1_SETS), .L1_WAYS(L1_WAYS),
      .L1_SMP_SHIFT(L1_SMP_SHIFT), .FETCH_WIDTH(FETCH_WIDTH), .PERIOD(PERIOD),
      .NCHIP_TASKS(NCHIP_TASKS)
    ) u_cluster (
      .clk, .rst_n, .tick, .cfg,
      .llc_valid(llc_valid[k]), .llc_task(llc_task[k]), .llc_write(llc_write[k]),
      .llc_hit(llc_hit[k]), .llc_dirty_victim(llc_dirty_victim[k]),
      .llc_set(llc_set[k]), .llc_way(llc_way[k]),
      .inbus_valid(inbus_valid[k]), .inbus_task(inbus_task[k]), .inbus_line(inbus_line[k]),
      .outbus_valid(outbus_valid[k]), .outbus_task(outbus_task[k]),
      .outbus_line(outbus_line[k]),
      .ic_fill_valid(ic_fill_valid[k]), .ic_fill_set(ic_fill_set[k]),
      .ic_fill_way(ic_fill_way[k]), .ic_fill_thread(ic_fill_thread[k]),
      .dc_fill_valid(dc_fill_valid[k]), .dc_fill_set(dc_fill_set[k]),
      .dc_fill_way(dc_fill_way[k]), .dc_fill_thread(dc_fill_thread[k]),
      .fetch_valid(fetch_valid[k]), .fetch_thread(fetch_thread[k]),
      .fetch_count(fetch_count[k]), .core_energy(core_energy[k]),
      .active(active[k]), .ntk_chip,
      .emr_clr_valid(emr_clr_valid[k]), .emr_clr_task(emr_clr_task[k]),
      .emr_rd_task(emr_rd_task[k]), .emr_rd_data(emr_rd_data[k]), .emr(emr[k]), .core_emr(core_emr[k]),
      .llc_occ_cum(llc_occ_cum[k]), .il1_occ_cum(il1_occ_cum[k]),
      .dl1_occ_cum(dl1_occ_cum[k]),
      .engine_busy(engine_busy[k]), .engine_overrun(engine_overrun[k]),
      .init_done(init_done[k])
    );
  end
endmodule
