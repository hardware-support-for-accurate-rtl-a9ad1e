// ptem_occ_tracker: sampled cache-occupancy tracking for one cache (LLC, IL1 or DL1).
//
// Ownership is tracked only in the sampled sets: those whose SMP_SHIFT lowest
// index bits are zero (one set out of 2**SMP_SHIFT). Every line of a sampled
// set carries an owner id (the hardware-context index of the task that fetched
// it). A per-task instant counter holds how many sampled lines each task owns:
// on a fill into a sampled set the new owner's counter is incremented and the
// evicted line's owner's counter is decremented. Once per sampling period
// (`tick`) every instant counter is added to the task's cumulated counter
// (CUM_W bits) and also copied to `occ_smp`, the occupancy sample the energy
// engine uses for the interval that has just ended. The OS derives the average
// occupancy fraction as occ_cum * period * 2**SMP_SHIFT / (sets * ways * cycles).
//
// Lines always have an owner: after reset every sampled line belongs to
// context 0 (this implementation's choice), and on a context switch nothing is
// retagged, so the incoming task inherits the lines of the outgoing one, as the
// design intends. `cum_clr` clears one task's cumulated counter (OS, on
// schedule-in); a tick in the same cycle restarts it from the instant value.
//
// The owner table is a memory with one row per sampled set holding the owner
// ids of all its ways (asynchronous read, one write per cycle); a fill reads
// the row, replaces one way's id and writes the row back in the same cycle,
// so back-to-back fills to one set are handled. The memory has no reset:
// after reset a sweep writes context 0 into one row per cycle, which takes
// NSETS >> SMP_SHIFT cycles (1,024 for the default LLC, 128 for an L1), and
// `init_done` rises when it ends. Fills during the sweep are not tracked
// (this implementation's choice; the occupancy counters already describe the
// reset state).
module ptem_occ_tracker #(
  parameter int unsigned NSETS     = 2048,
  parameter int unsigned NWAYS     = 16,
  parameter int unsigned SMP_SHIFT = 1,
  parameter int unsigned NTASKS    = 8,
  parameter int unsigned CUM_W     = 48,
  localparam int unsigned SET_W    = $clog2(NSETS),
  localparam int unsigned WAY_W    = (NWAYS > 1) ? $clog2(NWAYS) : 1,
  localparam int unsigned TID_W    = (NTASKS > 1) ? $clog2(NTASKS) : 1,
  localparam int unsigned NLINES   = (NSETS >> SMP_SHIFT) * NWAYS,
  localparam int unsigned OCC_W    = $clog2(NLINES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic fill_valid,
  input  logic [SET_W-1:0] fill_set,
  input  logic [WAY_W-1:0] fill_way,
  input  logic [TID_W-1:0] fill_task,
  input  logic cum_clr,
  input  logic [TID_W-1:0] cum_clr_task,
  output logic [NTASKS-1:0][OCC_W-1:0] occ_inst,
  output logic [NTASKS-1:0][OCC_W-1:0] occ_smp,
  output logic [NTASKS-1:0][CUM_W-1:0] occ_cum,
  output logic init_done
);
  localparam int unsigned NROWS = NSETS >> SMP_SHIFT;
  localparam int unsigned ROW_W = (NROWS > 1) ? $clog2(NROWS) : 1;
  typedef logic [NWAYS-1:0][TID_W-1:0] row_t;

  row_t owner [NROWS];

  logic             sampled;
  logic [ROW_W-1:0] row;
  row_t             rd_row, wr_row;
  logic [TID_W-1:0] old_owner;
  logic             change;
  logic             we;
  logic [ROW_W-1:0] waddr;
  logic [ROW_W-1:0] init_row;

  always_comb begin
    sampled   = (SMP_SHIFT == 0) ? 1'b1 : (fill_set[SMP_SHIFT-1:0] == '0);
    row       = ROW_W'(fill_set >> SMP_SHIFT);
    rd_row    = owner[row];
    old_owner = rd_row[fill_way];
    change    = init_done && fill_valid && sampled && (old_owner != fill_task);
    wr_row    = rd_row;
    wr_row[fill_way] = fill_task;
    we        = !init_done || (fill_valid && sampled);
    waddr     = init_done ? row : init_row;
    if (!init_done) wr_row = '0;
  end

  always_ff @(posedge clk)
    if (we) owner[waddr] <= wr_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_row  <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      init_row  <= init_row + 1'b1;
      init_done <= (32'(init_row) == NROWS - 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ_inst    <= '0;
      occ_inst[0] <= OCC_W'(NLINES);
      occ_smp     <= '0;
      occ_cum     <= '0;
    end else begin
      for (int t = 0; t < NTASKS; t++) begin
        if (change && 32'(fill_task) == t)      occ_inst[t] <= occ_inst[t] + 1'b1;
        else if (change && 32'(old_owner) == t) occ_inst[t] <= occ_inst[t] - 1'b1;
        if (tick) begin
          occ_smp[t] <= occ_inst[t];
          occ_cum[t] <= ((cum_clr && 32'(cum_clr_task) == t) ? '0 : occ_cum[t])
                        + CUM_W'(occ_inst[t]);
        end else if (cum_clr && 32'(cum_clr_task) == t) begin
          occ_cum[t] <= '0;
        end
      end
    end
  end

  a_fill_task: assert property (@(posedge clk) disable iff (!rst_n)
                                fill_valid |-> 32'(fill_task) < NTASKS);
  a_fill_way:  assert property (@(posedge clk) disable iff (!rst_n)
                                fill_valid |-> 32'(fill_way) < NWAYS);
endmodule
