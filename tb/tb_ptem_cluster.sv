// tb_ptem_cluster: end-to-end test of one cluster at a reduced size (64-set
// 4-way LLC, 16-set L1s, 8,000-cycle intervals), with the interval tick and
// the chip-wide task count driven by the testbench (the count includes tasks
// of other clusters). Random LLC accesses of all six kinds, bus
// transactions, L1 fills, fetch groups and core energies; after each interval
// every EMR, core energy register, cumulated occupancy and the EMR read port
// are compared with the reference model. Context switches, idle contexts and
// cores, fetch-less cores and out-of-range core energies are all exercised
// and counted.
module tb_ptem_cluster;
  import ptem_pkg::*;
  import ptem_ref_pkg::*;
  localparam int unsigned NCL = 1, NC = 4, NT = 2, NTASKS = NC * NT;
  localparam int unsigned LSETS = 64, LWAYS = 4, LSH = 1;
  localparam int unsigned S1 = 16, W1 = 2, SH1 = 1, FW = 2, PERIOD = 8000;
  localparam int unsigned NINTERVALS = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  ptem_cfg_t cfg;
  logic [NCL-1:0] llc_valid, llc_write, llc_hit, llc_dirty_victim;
  logic [NCL-1:0][2:0] llc_task;
  logic [NCL-1:0][$clog2(LSETS)-1:0] llc_set;
  logic [NCL-1:0][$clog2(LWAYS)-1:0] llc_way;
  logic [NCL-1:0] inbus_valid, inbus_line, outbus_valid, outbus_line;
  logic [NCL-1:0][2:0] inbus_task, outbus_task;
  logic [NCL-1:0][NC-1:0] ic_fill_valid, dc_fill_valid, fetch_valid;
  logic [NCL-1:0][NC-1:0][$clog2(S1)-1:0] ic_fill_set, dc_fill_set;
  logic [NCL-1:0][NC-1:0][$clog2(W1)-1:0] ic_fill_way, dc_fill_way;
  logic [NCL-1:0][NC-1:0][0:0] ic_fill_thread, dc_fill_thread, fetch_thread;
  logic [NCL-1:0][NC-1:0][1:0] fetch_count;
  logic [NCL-1:0][NC-1:0][E_W-1:0] core_energy;
  logic [NCL-1:0][NTASKS-1:0] active;
  logic [NCL-1:0] emr_clr_valid;
  logic [NCL-1:0][2:0] emr_clr_task, emr_rd_task;
  logic [NCL-1:0][EMR_W-1:0] emr_rd_data;
  logic [NCL-1:0][NTASKS-1:0][EMR_W-1:0] emr, core_emr;
  logic [NCL-1:0][NTASKS-1:0][CUM_W-1:0] llc_occ_cum, il1_occ_cum, dl1_occ_cum;
  logic tick;
  logic [NCL-1:0] engine_busy, engine_overrun, init_done;

  int tcnt = 0;
  int ntk_other = 20;
  logic [6:0] ntk_chip;
  always_ff @(posedge clk) if (rst_n) tcnt <= (tcnt == int'(PERIOD) - 1) ? 0 : tcnt + 1;
  assign tick = rst_n && (tcnt == int'(PERIOD) - 1);
  always_comb ntk_chip = 7'(ntk_chip_now());

  ptem_cluster #(.NCORES(NC), .NTHREADS(NT), .LLC_SETS(LSETS), .LLC_WAYS(LWAYS),
                 .LLC_SMP_SHIFT(LSH), .L1_SETS(S1), .L1_WAYS(W1), .L1_SMP_SHIFT(SH1),
                 .FETCH_WIDTH(FW), .PERIOD(PERIOD), .NCHIP_TASKS(64)) dut (
    .clk, .rst_n, .tick, .cfg,
    .llc_valid(llc_valid[0]), .llc_task(llc_task[0]), .llc_write(llc_write[0]),
    .llc_hit(llc_hit[0]), .llc_dirty_victim(llc_dirty_victim[0]), .llc_set(llc_set[0]),
    .llc_way(llc_way[0]), .inbus_valid(inbus_valid[0]), .inbus_task(inbus_task[0]),
    .inbus_line(inbus_line[0]), .outbus_valid(outbus_valid[0]), .outbus_task(outbus_task[0]),
    .outbus_line(outbus_line[0]),
    .ic_fill_valid(ic_fill_valid[0]), .ic_fill_set(ic_fill_set[0]), .ic_fill_way(ic_fill_way[0]),
    .ic_fill_thread(ic_fill_thread[0]), .dc_fill_valid(dc_fill_valid[0]),
    .dc_fill_set(dc_fill_set[0]), .dc_fill_way(dc_fill_way[0]), .dc_fill_thread(dc_fill_thread[0]),
    .fetch_valid(fetch_valid[0]), .fetch_thread(fetch_thread[0]), .fetch_count(fetch_count[0]),
    .core_energy(core_energy[0]), .active(active[0]), .ntk_chip,
    .emr_clr_valid(emr_clr_valid[0]), .emr_clr_task(emr_clr_task[0]),
    .emr_rd_task(emr_rd_task[0]), .emr_rd_data(emr_rd_data[0]), .emr(emr[0]), .core_emr(core_emr[0]),
    .llc_occ_cum(llc_occ_cum[0]), .il1_occ_cum(il1_occ_cum[0]), .dl1_occ_cum(dl1_occ_cum[0]),
    .engine_busy(engine_busy[0]), .engine_overrun(engine_overrun[0]),
    .init_done(init_done[0])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cluster_model m [NCL];
  bit act [NCL][];
  int silent_core [NCL];
  // mechanism counters
  int n_act [6];
  int n_llc_owner = 0, n_llc_unsampled = 0, n_l1_owner = 0, n_inbus = 0, n_outbus = 0;
  int n_clamp_lo = 0, n_clamp_hi = 0, n_nofetch = 0, n_idle_ctx = 0, n_idle_core = 0;
  int n_clear = 0, n_interval = 0, n_reads = 0;

  task automatic chk(input u64 got, input u64 exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ntk_chip_now();
    int n = ntk_other;
    for (int k = 0; k < NCL; k++) foreach (act[k][t]) n += int'(act[k][t]);
    return n;
  endfunction

  // drive one cycle of random traffic; called at the negative edge
  task automatic drive();
    for (int k = 0; k < NCL; k++) begin
      int t;
      llc_valid[k] = 1'($urandom_range(0, 2) == 0);
      t = $urandom_range(0, NTASKS - 1);
      if (!act[k][t]) t = (t + 1) % NTASKS;
      llc_task[k] = 3'(t);
      llc_write[k] = 1'($urandom);
      llc_hit[k] = 1'($urandom_range(0, 9) < 6);
      llc_dirty_victim[k] = 1'($urandom);
      llc_set[k] = 6'($urandom);
      llc_way[k] = 2'($urandom);
      inbus_valid[k] = 1'($urandom_range(0, 3) == 0);
      inbus_task[k] = 3'($urandom); inbus_line[k] = 1'($urandom);
      outbus_valid[k] = 1'($urandom_range(0, 7) == 0);
      outbus_task[k] = 3'($urandom); outbus_line[k] = 1'($urandom);
      for (int c = 0; c < NC; c++) begin
        ic_fill_valid[k][c] = 1'($urandom_range(0, 7) == 0);
        ic_fill_set[k][c] = 4'($urandom); ic_fill_way[k][c] = 1'($urandom);
        ic_fill_thread[k][c] = 1'($urandom_range(0, 2) == 0);
        dc_fill_valid[k][c] = 1'($urandom_range(0, 4) == 0);
        dc_fill_set[k][c] = 4'($urandom); dc_fill_way[k][c] = 1'($urandom);
        dc_fill_thread[k][c] = 1'($urandom);
        fetch_valid[k][c] = (c != silent_core[k]) && 1'($urandom_range(0, 3) != 0);
        fetch_thread[k][c] = 1'($urandom_range(0, 2) == 0);
        fetch_count[k][c] = 2'($urandom_range(1, 2));
        case ($urandom_range(0, 19))
          0: core_energy[k][c] = cfg.e_core_min - 32'd1000;
          1: core_energy[k][c] = cfg.e_core_max + 32'd1000;
          default: core_energy[k][c] = 32'($urandom_range(int'(cfg.e_core_min), int'(cfg.e_core_max)));
        endcase
      end
    end
    // no fills until the owner tables have been swept after reset
    if (init_done != '1) begin llc_valid = '0; ic_fill_valid = '0; dc_fill_valid = '0; end
  endtask

  // mirror the cycle's events into the models; tick first
  task automatic model_cycle(input bit is_tick);
    for (int k = 0; k < NCL; k++) begin
      if (is_tick) begin
        u64 ce[];
        ce = new[NC];
        for (int c = 0; c < NC; c++) begin
          ce[c] = u64'(core_energy[k][c]);
          if (core_energy[k][c] < cfg.e_core_min) n_clamp_lo++;
          if (core_energy[k][c] > cfg.e_core_max) n_clamp_hi++;
        end
        m[k].tick(ce);
      end
      if (llc_valid[k]) begin
        n_act[llc_act(llc_write[k], llc_hit[k], llc_dirty_victim[k])]++;
        if (m[k].llc_access(int'(llc_task[k]), llc_write[k], llc_hit[k], llc_dirty_victim[k],
                            int'(llc_set[k]), int'(llc_way[k]))) n_llc_owner++;
        else if (!llc_hit[k] && llc_set[k][0]) n_llc_unsampled++;
      end else m[k].idle();
      if (inbus_valid[k]) begin m[k].inbus(int'(inbus_task[k]), inbus_line[k]); n_inbus++; end
      if (outbus_valid[k]) begin m[k].outbus(int'(outbus_task[k]), outbus_line[k]); n_outbus++; end
      for (int c = 0; c < NC; c++) begin
        if (ic_fill_valid[k][c] && m[k].l1_fill(0, c, int'(ic_fill_thread[k][c]),
            int'(ic_fill_set[k][c]), int'(ic_fill_way[k][c]))) n_l1_owner++;
        if (dc_fill_valid[k][c] && m[k].l1_fill(1, c, int'(dc_fill_thread[k][c]),
            int'(dc_fill_set[k][c]), int'(dc_fill_way[k][c]))) n_l1_owner++;
        if (fetch_valid[k][c]) m[k].fetch_ev(c, int'(fetch_thread[k][c]), int'(fetch_count[k][c]));
      end
    end
  endtask

  task automatic compare_all(input int iv);
    for (int k = 0; k < NCL; k++)
      for (int t = 0; t < NTASKS; t++) begin
        chk(u64'(emr[k][t]), m[k].emr[t], $sformatf("interval %0d cluster %0d EMR %0d", iv, k, t));
        chk(u64'(core_emr[k][t]), m[k].core_emr[t], "core energy register");
        chk(u64'(llc_occ_cum[k][t]), m[k].llc_cum[t], "LLC cumulated occupancy");
        chk(u64'(il1_occ_cum[k][t]), m[k].l1_cum[t], "IL1 cumulated occupancy");
        chk(u64'(dl1_occ_cum[k][t]), m[k].l1_cum[NTASKS + t], "DL1 cumulated occupancy");
      end
  endtask

  initial begin
    int iv;
    cfg = random_cfg();
    for (int k = 0; k < NCL; k++) begin
      m[k] = new(NC, NT, LSETS, LWAYS, LSH, S1, W1, SH1, PERIOD);
      act[k] = new[NTASKS];
      foreach (act[k][t]) act[k][t] = 1'b1;
      silent_core[k] = -1;
    end
    foreach (n_act[i]) n_act[i] = 0;
    llc_valid = '0; inbus_valid = '0; outbus_valid = '0;
    ic_fill_valid = '0; dc_fill_valid = '0; fetch_valid = '0; emr_clr_valid = '0;
    emr_clr_task = '0; emr_rd_task = '0; active = '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;     // released away from the clock edge; traffic starts at once
    iv = 0;
    while (iv < int'(NINTERVALS)) begin
      bit is_tick, computing;
      drive();
      is_tick = tick;
      @(posedge clk);
      model_cycle(is_tick);
      @(negedge clk);
      if (is_tick) begin
        for (int k = 0; k < NCL; k++) m[k].compute(cfg, act[k], ntk_chip_now());
        // the engines start one cycle after the tick
        drive(); @(posedge clk); model_cycle(1'b0); @(negedge clk);
        computing = 1'b1;
        while (computing) begin
          drive(); @(posedge clk); model_cycle(1'b0); @(negedge clk);
          computing = (engine_busy != '0);
        end
        for (int k = 0; k < NCL; k++) m[k].apply();
        n_interval++;
        compare_all(iv);
        // EMR read port
        for (int k = 0; k < NCL; k++) emr_rd_task[k] = 3'($urandom);
        #1;
        for (int k = 0; k < NCL; k++) begin
          chk(u64'(emr_rd_data[k]), m[k].emr[emr_rd_task[k]], "EMR read port");
          n_reads++;
        end
        // OS activity between intervals: context switches and new task sets
        for (int k = 0; k < NCL; k++) begin
          emr_clr_valid[k] = 1'($urandom_range(0, 1));
          emr_clr_task[k] = 3'($urandom);
          if (emr_clr_valid[k]) begin m[k].clear(int'(emr_clr_task[k])); n_clear++; end
          foreach (act[k][t]) act[k][t] = (iv == 0) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
          if (iv >= 1 && k == 0) begin act[k][2] = 1'b0; act[k][3] = 1'b0; end
          active[k] = '0;
          foreach (act[k][t]) active[k][t] = act[k][t];
          foreach (act[k][t]) if (!act[k][t]) n_idle_ctx++;
          for (int c = 0; c < NC; c++) if (!act[k][2*c] && !act[k][2*c+1]) n_idle_core++;
          silent_core[k] = (iv % 2 == 1) ? 3 : -1;
          if (silent_core[k] >= 0) n_nofetch++;
        end
        drive(); @(posedge clk); model_cycle(1'b0); @(negedge clk);
        emr_clr_valid = '0;
        iv++;
      end
    end
    checks++;
    if (engine_overrun != '0) begin failures++; $display("energy engine overrun"); end
    foreach (n_act[i]) begin
      checks++;
      if (n_act[i] == 0) begin failures++; $display("LLC action %0d never happened", i); end
    end
    $display("LLC actions: %0d %0d %0d %0d %0d %0d", n_act[0], n_act[1], n_act[2], n_act[3], n_act[4], n_act[5]);
    $display("LLC owner changes %0d, unsampled fills %0d, L1 owner changes %0d",
             n_llc_owner, n_llc_unsampled, n_l1_owner);
    $display("bus transactions in/out %0d/%0d, core energy clamped low/high %0d/%0d",
             n_inbus, n_outbus, n_clamp_lo, n_clamp_hi);
    $display("fetch-less cores %0d, idle contexts %0d, idle cores %0d, EMR clears %0d, reads %0d, intervals %0d",
             n_nofetch, n_idle_ctx, n_idle_core, n_clear, n_reads, n_interval);
    checks++;
    if (n_llc_owner == 0 || n_llc_unsampled == 0 || n_l1_owner == 0 || n_inbus == 0 ||
        n_outbus == 0 || n_clamp_lo == 0 || n_clamp_hi == 0 || n_nofetch == 0 ||
        n_idle_ctx == 0 || n_idle_core == 0 || n_clear == 0 || n_reads == 0 ||
        n_interval != int'(NINTERVALS)) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NINTERVALS + 2) * PERIOD + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
