// ptem_ref_pkg: reference model of the metering logic for the testbenches.
//
// cluster_model mirrors one cluster at transaction level: it keeps its own
// owner tables, occupancy and per-interval counts, and at every interval end
// computes each task's expected energy (and its core part) with wide (128-bit) arithmetic straight
// from the metering formulas, truncating each product/quotient term the way
// the hardware does. The testbench calls tick() before the events of the tick
// cycle, since events in that cycle belong to the new interval.
package ptem_ref_pkg;
  import ptem_pkg::*;

  typedef longint unsigned u64;
  typedef logic [127:0] u128;

  function automatic u64 sat64(input u128 v);
    return (v >> 64) != 0 ? 64'hFFFF_FFFF_FFFF_FFFF : v[63:0];
  endfunction

  // one product term, optionally divided; division by zero gives 0
  function automatic u64 term(input u64 a, input u64 b, input u64 d, input bit div);
    u128 p;
    p = u128'(a) * u128'(b);
    if (!div) return sat64(p);
    if (d == 0) return 0;
    return sat64(p / u128'(d));
  endfunction

  function automatic u64 sadd(input u64 x, input u64 y);
    return sat64(u128'(x) + u128'(y));
  endfunction

  function automatic int llc_act(input bit wr, input bit hit, input bit dirty);
    if (hit) return wr ? 1 : 0;
    if (dirty) return wr ? 5 : 3;
    return wr ? 4 : 2;
  endfunction

  class cluster_model;
    int ncores, nthreads, ntasks, period;
    int llc_sets, llc_ways, llc_shift, llc_lines;
    int l1_sets, l1_ways, l1_shift, l1_lines;
    int llc_owner[];
    int l1_owner[];            // [cache*ncores*l1_lines + core*l1_lines + idx]
    u64 llc_inst[], l1_inst[]; // l1_inst[cache*ntasks + task]
    u64 llc_cum[], l1_cum[];
    // running interval counts
    u64 fetch[], llc_cnt[], inb[], outb[], llc_idle;
    // snapshots at the last tick
    u64 s_fetch[], s_llc_cnt[], s_inb[], s_outb[], s_llc_idle;
    u64 s_occ_llc[], s_occ_l1[], s_core_e[];
    u64 exp_e[];   // expected increments of the last interval
    u64 emr[];
    u64 exp_core[], core_emr[];   // core part alone

    function new(int ncores, int nthreads, int llc_sets, int llc_ways, int llc_shift,
                 int l1_sets, int l1_ways, int l1_shift, int period);
      this.ncores = ncores; this.nthreads = nthreads; ntasks = ncores * nthreads;
      this.period = period;
      this.llc_sets = llc_sets; this.llc_ways = llc_ways; this.llc_shift = llc_shift;
      llc_lines = (llc_sets >> llc_shift) * llc_ways;
      this.l1_sets = l1_sets; this.l1_ways = l1_ways; this.l1_shift = l1_shift;
      l1_lines = (l1_sets >> l1_shift) * l1_ways;
      llc_owner = new[llc_lines];
      l1_owner  = new[2 * ncores * l1_lines];
      llc_inst = new[ntasks]; l1_inst = new[2 * ntasks];
      llc_cum = new[ntasks];  l1_cum = new[2 * ntasks];
      fetch = new[ntasks]; llc_cnt = new[ntasks * 6]; inb = new[ntasks * 2];
      outb = new[ntasks * 2];
      s_fetch = new[ntasks]; s_llc_cnt = new[ntasks * 6]; s_inb = new[ntasks * 2];
      s_outb = new[ntasks * 2]; s_occ_llc = new[ntasks]; s_occ_l1 = new[2 * ntasks];
      s_core_e = new[ncores]; exp_e = new[ntasks]; emr = new[ntasks];
      exp_core = new[ntasks]; core_emr = new[ntasks];
      reset();
    endfunction

    function void reset();
      foreach (llc_owner[i]) llc_owner[i] = 0;
      foreach (l1_owner[i])  l1_owner[i] = 0;
      foreach (llc_inst[i]) begin llc_inst[i] = 0; llc_cum[i] = 0; end
      foreach (l1_inst[i])  begin l1_inst[i] = 0; l1_cum[i] = 0; end
      llc_inst[0] = u64'(llc_lines);
      for (int c = 0; c < ncores; c++) begin
        l1_inst[c * nthreads] = u64'(l1_lines);
        l1_inst[ntasks + c * nthreads] = u64'(l1_lines);
      end
      foreach (fetch[i]) fetch[i] = 0;
      foreach (llc_cnt[i]) llc_cnt[i] = 0;
      foreach (inb[i]) begin inb[i] = 0; outb[i] = 0; end
      llc_idle = 0;
      foreach (emr[i]) emr[i] = 0;
      foreach (core_emr[i]) core_emr[i] = 0;
    endfunction

    // returns 1 when the fill changed the owner of a sampled line
    function bit llc_access(int t, bit wr, bit hit, bit dirty, int set, int way);
      int idx, old;
      begin
        int k;
        k = llc_act(wr, hit, dirty);
        llc_cnt[t * 6 + k] = llc_cnt[t * 6 + k] + 1;
      end
      if (hit || (set % (1 << llc_shift)) != 0) return 0;
      idx = (set >> llc_shift) * llc_ways + way;
      old = llc_owner[idx];
      llc_owner[idx] = t;
      if (old == t) return 0;
      llc_inst[old]--; llc_inst[t]++;
      return 1;
    endfunction

    function bit l1_fill(int cache, int core, int thr, int set, int way);
      int idx, old, base;
      if ((set % (1 << l1_shift)) != 0) return 0;
      base = (cache * ncores + core) * l1_lines;
      idx = (set >> l1_shift) * l1_ways + way;
      old = l1_owner[base + idx];
      l1_owner[base + idx] = thr;
      if (old == thr) return 0;
      l1_inst[cache * ntasks + core * nthreads + old]--;
      l1_inst[cache * ntasks + core * nthreads + thr]++;
      return 1;
    endfunction

    function void fetch_ev(int core, int thr, int n); fetch[core * nthreads + thr] += u64'(n); endfunction
    function void inbus(int t, bit line);  int i; i = t * 2 + int'(line); inb[i] = inb[i] + 1;  endfunction
    function void outbus(int t, bit line); int i; i = t * 2 + int'(line); outb[i] = outb[i] + 1; endfunction
    function void idle(); llc_idle = llc_idle + 1; endfunction

    // OS clear of one context: EMR and cumulated occupancies
    function void clear(int t);
      emr[t] = 0; core_emr[t] = 0; llc_cum[t] = 0; l1_cum[t] = 0; l1_cum[ntasks + t] = 0;
    endfunction

    function void tick(u64 core_e[]);
      for (int t = 0; t < ntasks; t++) begin
        s_fetch[t] = fetch[t]; fetch[t] = 0;
        for (int k = 0; k < 6; k++) begin s_llc_cnt[t*6+k] = llc_cnt[t*6+k]; llc_cnt[t*6+k] = 0; end
        for (int k = 0; k < 2; k++) begin
          s_inb[t*2+k] = inb[t*2+k]; inb[t*2+k] = 0;
          s_outb[t*2+k] = outb[t*2+k]; outb[t*2+k] = 0;
        end
        s_occ_llc[t] = llc_inst[t]; llc_cum[t] += llc_inst[t];
        s_occ_l1[t] = l1_inst[t];   l1_cum[t] += l1_inst[t];
        s_occ_l1[ntasks+t] = l1_inst[ntasks+t]; l1_cum[ntasks+t] += l1_inst[ntasks+t];
      end
      s_llc_idle = llc_idle; llc_idle = 0;
      for (int c = 0; c < ncores; c++) s_core_e[c] = core_e[c];
    endfunction

    // expected energy of every task for the interval captured by the last tick
    function void compute(ptem_cfg_t cfg, bit active[], int ntk_chip);
      u64 eocc, lin, lout, ej, emin, emax, lea, dyn, sta, sta_sh, fc, e;
      int ntk_cl, ntk_c;
      ntk_cl = 0;
      for (int t = 0; t < ntasks; t++) ntk_cl += int'(active[t]);
      emin = u64'(cfg.e_core_min); emax = u64'(cfg.e_core_max); lea = u64'(cfg.e_core_leak);
      eocc = sadd(term(cfg.e_llc_st, s_llc_idle, 0, 0), term(cfg.e_llc_leak, period, 0, 0));
      if (eocc > 64'hFFFF_FFFF_FFFF) eocc = 64'hFFFF_FFFF_FFFF;
      lin  = term(cfg.e_inbus_leak, period, ntk_cl, 1);
      lout = term(cfg.e_outbus_leak, period, ntk_chip, 1);
      for (int c = 0; c < ncores; c++) begin
        ntk_c = 0; fc = 0;
        for (int h = 0; h < nthreads; h++) begin
          ntk_c += int'(active[c*nthreads+h]); fc += s_fetch[c*nthreads+h];
        end
        ej = s_core_e[c];
        if (ej < emin) ej = emin;
        if (ej > emax) ej = emax;
        dyn = term(ej - emin, emax - lea, emax - emin, 1);
        sta = (ej >= lea + dyn) ? ej - lea - dyn : 0;
        sta_sh = term(sta, 1, ntk_c, 1);
        for (int h = 0; h < nthreads; h++) begin
          int t;
          u64 cd, cl, ce;
          t = c * nthreads + h;
          exp_e[t] = 0;
          exp_core[t] = 0;
          if (!active[t]) continue;
          cd = (fc != 0) ? term(s_fetch[t], dyn, fc, 1) : term(1, dyn, ntk_c, 1);
          cl = term(s_occ_l1[t] + s_occ_l1[ntasks+t], lea, 2 * l1_lines, 1);
          ce = sadd(sadd(sta_sh, cd), cl);
          exp_core[t] = ce;
          e = sadd(sadd(sta_sh, lin), lout);
          e = sadd(e, cd);
          e = sadd(e, cl);
          e = sadd(e, term(s_occ_llc[t], eocc, llc_lines, 1));
          for (int k = 0; k < 6; k++) e = sadd(e, term(s_llc_cnt[t*6+k], cfg.e_llc_action[k], 0, 0));
          for (int k = 0; k < 2; k++) begin
            e = sadd(e, term(s_inb[t*2+k], cfg.e_inbus_action[k], 0, 0));
            e = sadd(e, term(s_outb[t*2+k], cfg.e_outbus_action[k], 0, 0));
          end
          exp_e[t] = e;
        end
      end
    endfunction

    function void apply();
      foreach (emr[t]) emr[t] = sadd(emr[t], exp_e[t]);
      foreach (core_emr[t]) core_emr[t] = sadd(core_emr[t], exp_core[t]);
    endfunction
  endclass

  // a plausible random set of vendor energy figures
  function automatic ptem_cfg_t random_cfg();
    ptem_cfg_t c;
    for (int k = 0; k < 6; k++) c.e_llc_action[k] = 32'(100 + $urandom_range(0, 900));
    c.e_llc_st   = 32'($urandom_range(1, 50));
    c.e_llc_leak = 32'($urandom_range(1, 50));
    for (int k = 0; k < 2; k++) begin
      c.e_inbus_action[k]  = 32'($urandom_range(10, 200));
      c.e_outbus_action[k] = 32'($urandom_range(50, 500));
    end
    c.e_inbus_leak  = 32'($urandom_range(1, 20));
    c.e_outbus_leak = 32'($urandom_range(1, 40));
    c.e_core_leak = 32'($urandom_range(100000, 200000));
    c.e_core_min  = c.e_core_leak + 32'($urandom_range(100000, 300000));
    c.e_core_max  = c.e_core_min + 32'($urandom_range(500000, 2000000));
    return c;
  endfunction
endpackage
