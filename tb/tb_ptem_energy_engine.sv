// tb_ptem_energy_engine: drives the engine with random interval snapshots
// (random counts, occupancies, core energies inside and outside the
// [Emin, Emax] range, cores with no fetched instruction, idle contexts and
// cores with no task) and compares every EMR increment with the reference
// model, and the core part emitted with it. Checks that only active contexts are charged, each once, that a
// cluster's computation ends well inside one 10,000-cycle interval, and that
// a start while busy raises `overrun`.
module tb_ptem_energy_engine;
  import ptem_pkg::*;
  import ptem_ref_pkg::*;
  localparam int unsigned NCORES = 4, NTHREADS = 2, NTASKS = NCORES * NTHREADS;
  localparam int unsigned PERIOD = 10000, LLC_LINES = 64, L1_LINES = 16, NCHIP = 16;
  localparam int unsigned OCCL_W = $clog2(LLC_LINES + 1), OCC1_W = $clog2(L1_LINES + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ptem_cfg_t cfg;
  logic [NCORES-1:0][E_W-1:0] core_e;
  logic [NTASKS-1:0][CNT_W-1:0] fetch;
  logic [NTASKS-1:0][LLC_ACTIONS-1:0][CNT_W-1:0] llc_cnt;
  logic [NTASKS-1:0][BUS_ACTIONS-1:0][CNT_W-1:0] inb_cnt, outb_cnt;
  logic [CNT_W-1:0] llc_idle;
  logic [NTASKS-1:0][OCCL_W-1:0] occ_llc;
  logic [NTASKS-1:0][OCC1_W-1:0] occ_il1, occ_dl1;
  logic [NTASKS-1:0] active;
  logic [$clog2(NCHIP+1)-1:0] ntk_chip;
  logic add_valid, busy, overrun;
  logic [2:0] add_task;
  logic [EMR_W-1:0] add_value, add_core;
  int checks = 0, failures = 0;
  int n_clamp = 0, n_nofetch = 0, n_idlecore = 0;

  ptem_energy_engine #(.NCORES(NCORES), .NTHREADS(NTHREADS), .PERIOD(PERIOD),
                       .LLC_LINES(LLC_LINES), .L1_LINES(L1_LINES),
                       .NCHIP_TASKS(NCHIP)) dut (.*);

  always #5 clk = ~clk;

  cluster_model m;

  task automatic one_interval(input int r);
    bit act[];
    u64 got [NTASKS], got_core [NTASKS];
    bit seen [NTASKS];
    int cyc;
    act = new[NTASKS];
    cfg = random_cfg();
    for (int c = 0; c < NCORES; c++) begin
      case ($urandom_range(0, 5))
        0: begin core_e[c] = cfg.e_core_min - 32'd5; n_clamp++; end
        1: begin core_e[c] = cfg.e_core_max + 32'd77; n_clamp++; end
        default: core_e[c] = 32'($urandom_range(int'(cfg.e_core_min), int'(cfg.e_core_max)));
      endcase
      m.s_core_e[c] = u64'(core_e[c]);
    end
    for (int t = 0; t < NTASKS; t++) begin
      act[t] = (r == 0) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      if (r == 2 && t < NTHREADS) act[t] = 1'b0;     // core 0 runs nothing
      active[t] = act[t];
      fetch[t] = (r == 3 && t / NTHREADS == 1) ? 32'd0 : 32'($urandom_range(0, 20000));
      m.s_fetch[t] = u64'(fetch[t]);
      for (int k = 0; k < 6; k++) begin
        llc_cnt[t][k] = 32'($urandom_range(0, 500)); m.s_llc_cnt[t*6+k] = u64'(llc_cnt[t][k]);
      end
      for (int k = 0; k < 2; k++) begin
        inb_cnt[t][k] = 32'($urandom_range(0, 500));  m.s_inb[t*2+k] = u64'(inb_cnt[t][k]);
        outb_cnt[t][k] = 32'($urandom_range(0, 100)); m.s_outb[t*2+k] = u64'(outb_cnt[t][k]);
      end
      occ_llc[t] = OCCL_W'($urandom_range(0, LLC_LINES / NTASKS));
      occ_il1[t] = OCC1_W'($urandom_range(0, L1_LINES / 2));
      occ_dl1[t] = OCC1_W'($urandom_range(0, L1_LINES / 2));
      m.s_occ_llc[t] = u64'(occ_llc[t]);
      m.s_occ_l1[t] = u64'(occ_il1[t]);
      m.s_occ_l1[NTASKS + t] = u64'(occ_dl1[t]);
    end
    for (int c = 0; c < NCORES; c++) begin
      if (!active[c*2] && !active[c*2+1]) n_idlecore++;
      if (fetch[c*2] == 0 && fetch[c*2+1] == 0) n_nofetch++;
    end
    llc_idle = 32'($urandom_range(0, PERIOD));
    m.s_llc_idle = u64'(llc_idle);
    ntk_chip = 5'($countones(active) + 6);
    m.compute(cfg, act, int'(ntk_chip));
    foreach (seen[t]) seen[t] = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    cyc = 1;
    while (busy) begin
      @(posedge clk);
      if (add_valid) begin
        checks++;
        if (seen[add_task]) begin failures++; $display("task %0d charged twice", add_task); end
        seen[add_task] = 1; got[add_task] = add_value; got_core[add_task] = add_core;
      end
      @(negedge clk);
      cyc++;
    end
    for (int t = 0; t < NTASKS; t++) begin
      checks++;
      if (seen[t] != act[t]) begin failures++; $display("task %0d charged=%0b active=%0b", t, seen[t], act[t]); end
      else if (act[t] && got[t] != m.exp_e[t]) begin
        failures++;
        $display("round %0d task %0d: got %0d expected %0d", r, t, got[t], m.exp_e[t]);
      end
      if (act[t]) begin
        checks++;
        if (got_core[t] != m.exp_core[t]) begin
          failures++;
          $display("round %0d task %0d core part: got %0d expected %0d", r, t, got_core[t], m.exp_core[t]);
        end
      end
    end
    checks++;
    if (cyc >= int'(PERIOD)) begin failures++; $display("computation took %0d cycles", cyc); end
    if (r == 0) $display("full cluster computed in %0d cycles", cyc);
  endtask

  initial begin
    m = new(NCORES, NTHREADS, 16, 8, 1, 8, 4, 1, PERIOD);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) one_interval(r);
    checks++;
    if (overrun) begin failures++; $display("overrun without cause"); end
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (50) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    checks++;
    if (n_clamp == 0 || n_nofetch == 0 || n_idlecore == 0) begin
      failures++; $display("a case was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
