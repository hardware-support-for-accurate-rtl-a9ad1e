// tb_ptem_workloads: the whole chip at its default size (8 clusters of 4
// two-way SMT cores, 64 hardware contexts, all running a task) under
// cluster workloads of three kinds:
//   I clusters (0-2): every task is compute bound - it fetches nearly two
//                     instructions per cycle and rarely touches the LLC, mostly
//                     hitting;
//   M clusters (3-5): every task is memory bound - it fetches little and
//                     accesses the LLC often, mostly missing, so it also uses
//                     the intercluster bus and fills its L1 data cache often;
//   X clusters (6-7): a mix - on every core thread 0 runs a compute-bound task
//                     and thread 1 a memory-bound one.
// Every LLC access also crosses the intracluster bus; every miss crosses the
// intercluster bus.
//
// Three kinds of check are made after each interval's computation:
//   * every EMR and core energy register against the cluster reference model
//     (bit exact);
//   * conservation, worked out from the traffic alone: with every context
//     active, the energies charged in a cluster must add up to the cluster's
//     whole energy - the clamped core energies, the LLC access energies, the
//     LLC idle-cycle static and leakage energy, both buses' transaction
//     energies, the intracluster bus leakage and the cluster's eighth of the
//     intercluster bus leakage. Each charged share is rounded down, so the sum
//     may fall short by at most a few units per task, never exceed. The same
//     holds for the core energy registers against the cores' own energies;
//   * at the end, in the X clusters, the memory-bound tasks must own more of
//     the LLC (cumulated occupancy) than the compute-bound ones. Context 0 is
//     left out of this comparison: it owns every line after reset.
module tb_ptem_workloads;
  import ptem_pkg::*;
  import ptem_ref_pkg::*;
  localparam int unsigned NCL = 8, NC = 4, NT = 2, NTASKS = NC * NT;
  localparam int unsigned LSETS = 2048, LWAYS = 16, LSH = 1;
  localparam int unsigned S1 = 256, W1 = 4, SH1 = 1, PERIOD = 10000;
  localparam int unsigned NINTERVALS = 3;
  localparam longint unsigned TOL = 8 * NTASKS;   // rounding allowance per cluster

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

  ptem_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cluster_model m [NCL];
  bit act [NCL][];
  // energy of the cluster worked out directly from its traffic
  u64 run_e [NCL], snap_e [NCL], core_e [NCL], prev_sum [NCL], prev_core [NCL];
  // mechanism counters
  int n_miss_m = 0, n_miss_i = 0, n_acc_m = 0, n_acc_i = 0, n_fetch_m = 0, n_fetch_i = 0;
  int n_conserve = 0, n_interval = 0;

  // workload kind of a task: 1 = memory bound, 0 = compute bound
  function automatic bit mem_bound(input int k, input int t);
    if (k < 3) return 1'b0;
    if (k < 6) return 1'b1;
    return 1'(t % 2);
  endfunction

  task automatic chk(input u64 got, input u64 exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic drive();
    for (int k = 0; k < NCL; k++) begin
      int t;
      bit mb;
      t = $urandom_range(0, NTASKS - 1);
      mb = mem_bound(k, t);
      llc_task[k] = 3'(t);
      llc_valid[k] = mb ? 1'($urandom_range(0, 1) == 0) : 1'($urandom_range(0, 15) == 0);
      llc_hit[k] = mb ? 1'($urandom_range(0, 9) < 4) : 1'($urandom_range(0, 9) < 9);
      llc_write[k] = 1'($urandom_range(0, 2) == 0);
      llc_dirty_victim[k] = 1'($urandom);
      llc_set[k] = 11'($urandom);
      llc_way[k] = 4'($urandom);
      inbus_valid[k] = llc_valid[k];
      inbus_task[k] = llc_task[k];
      inbus_line[k] = !llc_write[k] || !llc_hit[k];
      outbus_valid[k] = llc_valid[k] && !llc_hit[k];
      outbus_task[k] = llc_task[k];
      outbus_line[k] = !(llc_write[k] && !llc_dirty_victim[k]);
      for (int c = 0; c < NC; c++) begin
        int th;
        th = $urandom_range(0, 1);
        mb = mem_bound(k, 2 * c + th);
        fetch_thread[k][c] = 1'(th);
        fetch_valid[k][c] = mb ? 1'($urandom_range(0, 3) == 0) : 1'($urandom_range(0, 7) != 0);
        fetch_count[k][c] = mb ? 2'd1 : 2'd2;
        th = $urandom_range(0, 1);
        mb = mem_bound(k, 2 * c + th);
        dc_fill_thread[k][c] = 1'(th);
        dc_fill_valid[k][c] = mb ? 1'($urandom_range(0, 2) == 0) : 1'($urandom_range(0, 11) == 0);
        dc_fill_set[k][c] = 8'($urandom); dc_fill_way[k][c] = 2'($urandom);
        ic_fill_thread[k][c] = 1'($urandom);
        ic_fill_valid[k][c] = 1'($urandom_range(0, 15) == 0);
        ic_fill_set[k][c] = 8'($urandom); ic_fill_way[k][c] = 2'($urandom);
        core_energy[k][c] = 32'($urandom_range(int'(cfg.e_core_min) - 5000, int'(cfg.e_core_max) + 5000));
      end
    end
    if (init_done != '1) begin llc_valid = '0; ic_fill_valid = '0; dc_fill_valid = '0; end
  endtask

  function automatic u64 clamp_core(input logic [E_W-1:0] e);
    if (e < cfg.e_core_min) return u64'(cfg.e_core_min);
    if (e > cfg.e_core_max) return u64'(cfg.e_core_max);
    return u64'(e);
  endfunction

  task automatic model_cycle(input bit is_tick);
    for (int k = 0; k < NCL; k++) begin
      if (is_tick) begin
        u64 ce[];
        ce = new[NC];
        core_e[k] = 0;
        for (int c = 0; c < NC; c++) begin
          ce[c] = u64'(core_energy[k][c]);
          core_e[k] += clamp_core(core_energy[k][c]);
        end
        m[k].tick(ce);
        snap_e[k] = run_e[k];
        run_e[k] = 0;
      end
      if (llc_valid[k]) begin
        int a;
        a = llc_act(llc_write[k], llc_hit[k], llc_dirty_victim[k]);
        void'(m[k].llc_access(int'(llc_task[k]), llc_write[k], llc_hit[k], llc_dirty_victim[k],
                              int'(llc_set[k]), int'(llc_way[k])));
        run_e[k] += u64'(cfg.e_llc_action[a]);
        if (mem_bound(k, int'(llc_task[k]))) begin
          n_acc_m++; if (!llc_hit[k]) n_miss_m++;
        end else begin
          n_acc_i++; if (!llc_hit[k]) n_miss_i++;
        end
      end else begin
        m[k].idle();
        run_e[k] += u64'(cfg.e_llc_st);
      end
      if (inbus_valid[k]) begin
        m[k].inbus(int'(inbus_task[k]), inbus_line[k]);
        run_e[k] += u64'(cfg.e_inbus_action[inbus_line[k]]);
      end
      if (outbus_valid[k]) begin
        m[k].outbus(int'(outbus_task[k]), outbus_line[k]);
        run_e[k] += u64'(cfg.e_outbus_action[outbus_line[k]]);
      end
      for (int c = 0; c < NC; c++) begin
        if (ic_fill_valid[k][c]) void'(m[k].l1_fill(0, c, int'(ic_fill_thread[k][c]),
            int'(ic_fill_set[k][c]), int'(ic_fill_way[k][c])));
        if (dc_fill_valid[k][c]) void'(m[k].l1_fill(1, c, int'(dc_fill_thread[k][c]),
            int'(dc_fill_set[k][c]), int'(dc_fill_way[k][c])));
        if (fetch_valid[k][c]) begin
          m[k].fetch_ev(c, int'(fetch_thread[k][c]), int'(fetch_count[k][c]));
          if (mem_bound(k, 2 * c + int'(fetch_thread[k][c]))) n_fetch_m += int'(fetch_count[k][c]);
          else n_fetch_i += int'(fetch_count[k][c]);
        end
      end
    end
  endtask

  // interval energy of cluster k from its traffic, with every context active
  function automatic u64 cluster_energy(input int k);
    u64 e;
    e = core_e[k] + snap_e[k];
    e += u64'(cfg.e_llc_leak) * PERIOD;                 // LLC leakage (static is in snap_e)
    e += u64'(cfg.e_inbus_leak) * PERIOD;               // whole intracluster bus leakage
    e += u64'(cfg.e_outbus_leak) * PERIOD / NCL;        // this cluster's share of the intercluster bus
    return e;
  endfunction

  initial begin
    int iv;
    cfg = random_cfg();
    for (int k = 0; k < NCL; k++) begin
      m[k] = new(NC, NT, LSETS, LWAYS, LSH, S1, W1, SH1, PERIOD);
      act[k] = new[NTASKS];
      foreach (act[k][t]) act[k][t] = 1'b1;
      run_e[k] = 0; snap_e[k] = 0; core_e[k] = 0; prev_sum[k] = 0; prev_core[k] = 0;
    end
    llc_valid = '0; inbus_valid = '0; outbus_valid = '0;
    ic_fill_valid = '0; dc_fill_valid = '0; fetch_valid = '0; emr_clr_valid = '0;
    emr_clr_task = '0; emr_rd_task = '0; active = '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    iv = 0;
    while (iv < int'(NINTERVALS)) begin
      bit is_tick, computing;
      drive();
      is_tick = tick;
      @(posedge clk);
      model_cycle(is_tick);
      @(negedge clk);
      if (is_tick) begin
        for (int k = 0; k < NCL; k++) m[k].compute(cfg, act[k], NCL * NTASKS);
        drive(); @(posedge clk); model_cycle(1'b0); @(negedge clk);
        computing = 1'b1;
        while (computing) begin
          drive(); @(posedge clk); model_cycle(1'b0); @(negedge clk);
          computing = (engine_busy != '0);
        end
        for (int k = 0; k < NCL; k++) m[k].apply();
        n_interval++;
        for (int k = 0; k < NCL; k++) begin
          u64 sum, exp;
          u64 csum;
          for (int t = 0; t < NTASKS; t++) begin
            chk(u64'(emr[k][t]), m[k].emr[t], $sformatf("interval %0d cluster %0d EMR %0d", iv, k, t));
            chk(u64'(core_emr[k][t]), m[k].core_emr[t], "core energy register");
          end
          // the core parts alone add up to the cores' clamped energies
          csum = 0;
          for (int t = 0; t < NTASKS; t++) csum += u64'(core_emr[k][t]);
          checks++;
          n_conserve++;
          if (csum - prev_core[k] > core_e[k] || csum - prev_core[k] + TOL < core_e[k]) begin
            failures++;
            $display("interval %0d cluster %0d: core energy charged %0d, cores' energy %0d",
                     iv, k, csum - prev_core[k], core_e[k]);
          end
          prev_core[k] = csum;
          sum = 0;
          for (int t = 0; t < NTASKS; t++) sum += u64'(emr[k][t]);
          exp = cluster_energy(k);
          checks++;
          n_conserve++;
          if (sum - prev_sum[k] > exp || sum - prev_sum[k] + TOL < exp) begin
            failures++;
            $display("interval %0d cluster %0d: charged %0d, cluster energy %0d",
                     iv, k, sum - prev_sum[k], exp);
          end
          prev_sum[k] = sum;
        end
        iv++;
      end
    end
    // memory-bound tasks hold more of the LLC than compute-bound ones
    for (int k = 6; k < NCL; k++) begin
      u64 occ_m, occ_i;
      occ_m = 0; occ_i = 0;
      // context 0 owns every line after reset, so it is left out
      for (int t = 1; t < NTASKS; t++)
        if (mem_bound(k, t)) occ_m += u64'(llc_occ_cum[k][t]); else occ_i += u64'(llc_occ_cum[k][t]);
      checks++;
      if (occ_m <= occ_i) begin
        failures++;
        $display("cluster %0d: memory-bound LLC occupancy %0d not above compute-bound %0d", k, occ_m, occ_i);
      end
      $display("X cluster %0d: cumulated LLC occupancy, memory bound %0d, compute bound %0d", k, occ_m, occ_i);
    end
    $display("LLC accesses/misses memory bound %0d/%0d, compute bound %0d/%0d",
             n_acc_m, n_miss_m, n_acc_i, n_miss_i);
    $display("instructions fetched memory bound %0d, compute bound %0d; conservation checks %0d, intervals %0d",
             n_fetch_m, n_fetch_i, n_conserve, n_interval);
    checks++;
    if (engine_overrun != '0) begin failures++; $display("energy engine overrun"); end
    checks++;
    if (n_miss_m <= n_miss_i || n_fetch_i <= n_fetch_m || n_conserve != int'(2 * NCL * NINTERVALS) ||
        n_interval != int'(NINTERVALS)) begin
      failures++;
      $display("workload mix did not behave as intended");
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
