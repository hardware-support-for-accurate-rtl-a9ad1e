// tb_ptem_core_slice: random L1-I/L1-D fills and fetch groups from both
// threads of one core; checks the per-thread L1 occupancy samples and
// cumulated counters, fetched-instruction snapshots and the captured core
// energy at every tick against the reference model.
module tb_ptem_core_slice;
  import ptem_pkg::*;
  import ptem_ref_pkg::*;
  localparam int unsigned NTHREADS = 2, L1_SETS = 16, L1_WAYS = 4, L1_SMP_SHIFT = 1;
  localparam int unsigned FETCH_WIDTH = 2, PERIOD = 200;
  localparam int unsigned L1_LINES = (L1_SETS >> L1_SMP_SHIFT) * L1_WAYS;
  localparam int unsigned OCC1_W = $clog2(L1_LINES + 1);

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic ic_fill_valid = 0, dc_fill_valid = 0, fetch_valid = 0, cum_clr = 0;
  logic [3:0] ic_fill_set = '0, dc_fill_set = '0;
  logic [1:0] ic_fill_way = '0, dc_fill_way = '0, fetch_count = '0;
  logic ic_fill_thread = 0, dc_fill_thread = 0, fetch_thread = 0, cum_clr_thread = 0;
  logic [E_W-1:0] core_energy = '0;
  logic [NTHREADS-1:0][OCC1_W-1:0] occ_il1_smp, occ_dl1_smp;
  logic [NTHREADS-1:0][CUM_W-1:0] occ_il1_cum, occ_dl1_cum;
  logic [NTHREADS-1:0][CNT_W-1:0] fetch_snap;
  logic [E_W-1:0] core_energy_snap;
  logic init_done;
  int checks = 0, failures = 0;

  ptem_core_slice #(.NTHREADS(NTHREADS), .L1_SETS(L1_SETS), .L1_WAYS(L1_WAYS),
                    .L1_SMP_SHIFT(L1_SMP_SHIFT), .FETCH_WIDTH(FETCH_WIDTH)) dut (.*);

  always #5 clk = ~clk;

  cluster_model m;   // one core, two threads
  u64 ce[];

  task automatic chk(input u64 got, input u64 exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    m = new(1, NTHREADS, 16, 4, 1, L1_SETS, L1_WAYS, L1_SMP_SHIFT, PERIOD);
    ce = new[1];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (!init_done) @(negedge clk);
    for (int c = 0; c < PERIOD * 12; c++) begin
      tick = (c % PERIOD == PERIOD - 1);
      ic_fill_valid = 1'($urandom_range(0, 3) == 0);
      ic_fill_set = 4'($urandom); ic_fill_way = 2'($urandom);
      ic_fill_thread = (c < PERIOD * 6) ? 1'($urandom) : 1'b1;
      dc_fill_valid = 1'($urandom_range(0, 2) == 0);
      dc_fill_set = 4'($urandom); dc_fill_way = 2'($urandom); dc_fill_thread = 1'($urandom);
      fetch_valid = 1'($urandom_range(0, 4) != 0);
      fetch_thread = (c < PERIOD * 3) ? 1'($urandom_range(0, 3) == 0) : 1'($urandom);
      fetch_count = 2'($urandom_range(0, 2));
      core_energy = $urandom;
      cum_clr = (c == PERIOD * 7 + 13);
      cum_clr_thread = 1'b1;
      @(posedge clk);
      if (tick) begin ce[0] = u64'(core_energy); m.tick(ce); end
      if (cum_clr) begin m.l1_cum[1] = 0; m.l1_cum[NTHREADS + 1] = 0; end
      if (ic_fill_valid) void'(m.l1_fill(0, 0, int'(ic_fill_thread), int'(ic_fill_set), int'(ic_fill_way)));
      if (dc_fill_valid) void'(m.l1_fill(1, 0, int'(dc_fill_thread), int'(dc_fill_set), int'(dc_fill_way)));
      if (fetch_valid) m.fetch_ev(0, int'(fetch_thread), int'(fetch_count));
      @(negedge clk);
      // the captured core energy must hold for the whole interval
      chk(u64'(core_energy_snap), m.s_core_e[0], "core energy");
      if (tick) begin
        for (int h = 0; h < NTHREADS; h++) begin
          chk(u64'(fetch_snap[h]), m.s_fetch[h], "fetch");
          chk(u64'(occ_il1_smp[h]), m.s_occ_l1[h], "il1 occupancy");
          chk(u64'(occ_dl1_smp[h]), m.s_occ_l1[NTHREADS + h], "dl1 occupancy");
          chk(u64'(occ_il1_cum[h]), m.l1_cum[h], "il1 cumulated");
          chk(u64'(occ_dl1_cum[h]), m.l1_cum[NTHREADS + h], "dl1 cumulated");
        end
      end
    end
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
