// tb_ptem_occ_tracker: random fills into sampled and unsampled sets against a
// reference owner table; checks the instant occupancy every cycle (and that
// it always sums to the number of sampled lines), the per-tick sample and the
// cumulated counters, and an OS clear of a cumulated counter.
module tb_ptem_occ_tracker;
  localparam int unsigned NSETS = 32, NWAYS = 4, SMP_SHIFT = 2, NTASKS = 4, CUM_W = 20;
  localparam int unsigned NLINES = (NSETS >> SMP_SHIFT) * NWAYS;
  localparam int unsigned OCC_W = $clog2(NLINES + 1);
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic fill_valid = 1'b0, cum_clr = 1'b0;
  logic [4:0] fill_set = '0;
  logic [1:0] fill_way = '0, fill_task = '0, cum_clr_task = '0;
  logic [NTASKS-1:0][OCC_W-1:0] occ_inst, occ_smp;
  logic [NTASKS-1:0][CUM_W-1:0] occ_cum;
  logic init_done;
  int checks = 0, failures = 0;
  int owner [NLINES];
  int inst [NTASKS], smp [NTASKS], cum [NTASKS];
  int owner_changes = 0, unsampled = 0, clears = 0;

  ptem_occ_tracker #(.NSETS(NSETS), .NWAYS(NWAYS), .SMP_SHIFT(SMP_SHIFT),
                     .NTASKS(NTASKS), .CUM_W(CUM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (owner[i]) owner[i] = 0;
    foreach (inst[t]) begin inst[t] = 0; smp[t] = 0; cum[t] = 0; end
    inst[0] = NLINES;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // owner-table sweep: fills are ignored until init_done, NSETS>>SMP_SHIFT cycles
    begin
      int n;
      n = 0;
      while (!init_done) begin
        fill_valid = 1'b1; fill_set = 5'($urandom_range(0, 3) * 4); fill_way = 2'($urandom);
        fill_task = 2'($urandom_range(1, 3));
        @(posedge clk); @(negedge clk);
        n++;
        if (n > 1000) break;
      end
      fill_valid = 1'b0;
      checks++;
      if (n != int'(NSETS >> SMP_SHIFT) - 1) begin failures++; $display("sweep took %0d cycles", n); end
    end
    for (int c = 0; c < 3000; c++) begin
      tick = (c % 97 == 96);
      fill_valid = 1'($urandom_range(0, 3) != 0);
      fill_set = 5'($urandom);
      fill_way = 2'($urandom);
      fill_task = (c < 1500) ? 2'($urandom_range(0, 3)) : 2'($urandom_range(2, 3));
      cum_clr = (c % 500 == 250) || (c % 970 == 96 + 97 * 9);
      cum_clr_task = 2'($urandom);
      @(posedge clk);
      if (tick) foreach (inst[t]) smp[t] = inst[t];
      foreach (cum[t]) begin
        if (cum_clr && cum_clr_task == 2'(t)) cum[t] = 0;
        if (tick) cum[t] += inst[t];
      end
      if (cum_clr) clears++;
      if (fill_valid) begin
        if (fill_set[SMP_SHIFT-1:0] != 0) unsampled++;
        else begin
          int idx;
          idx = int'(fill_set >> SMP_SHIFT) * NWAYS + int'(fill_way);
          if (owner[idx] != int'(fill_task)) begin
            inst[owner[idx]]--; inst[fill_task]++; owner_changes++;
          end
          owner[idx] = int'(fill_task);
        end
      end
      @(negedge clk);
      begin
        int sum;
        sum = 0;
        foreach (inst[t]) begin
          sum += int'(occ_inst[t]);
          checks += 3;
          if (int'(occ_inst[t]) != inst[t]) begin failures++; $display("inst[%0d] %0d/%0d", t, occ_inst[t], inst[t]); end
          if (int'(occ_smp[t]) != smp[t]) begin failures++; $display("smp[%0d] mismatch", t); end
          if (int'(occ_cum[t]) != cum[t]) begin failures++; $display("cum[%0d] %0d/%0d", t, occ_cum[t], cum[t]); end
        end
        checks++;
        if (sum != NLINES) begin failures++; $display("occupancy sum %0d", sum); end
      end
    end
    checks++;
    if (owner_changes == 0 || unsampled == 0 || clears == 0) begin
      failures++; $display("a case was not exercised");
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
