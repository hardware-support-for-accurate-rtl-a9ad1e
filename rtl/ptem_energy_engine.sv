// ptem_energy_engine: per-interval, per-task energy computation of one cluster.
//
// At the end of every metering interval (`start`, one cycle after the interval
// tick, when all snapshots are stable) a microsequencer drives one iterative
// multiply/divide unit through a fixed list of steps and adds each active
// task's energy for the interval to its Energy Metering Register.
//
// Per interval (T = PERIOD cycles):
//   LLC occupancy energy   Eocc  = E_st_llc * idle_cycles + E_leak_llc * T
//   intracluster bus leak  Lin   = E_leak_inbus  * T / tasks_in_cluster
//   intercluster bus leak  Lout  = E_leak_outbus * T / tasks_in_chip
// Per core c, with its measured interval energy Ej clamped to [Emin, Emax]:
//   Ej = Lea + Dyn + (MaxDyn - Dyn) * MaxSta / MaxDyn, MaxDyn = Emax - Lea,
//   MaxSta = Emin - Lea, solved for the dynamic part:
//   Dyn = (Ej - Emin) * (Emax - Lea) / (Emax - Emin);  Sta = Ej - Lea - Dyn
// Per active task t on core c:
//   Dyn * fetch_t / fetch_c               (dynamic energy by fetched instructions;
//                                          split evenly if the core fetched nothing)
//   + Sta / tasks_on_core                 (static energy split evenly)
//   + Lea * (occ_il1_t + occ_dl1_t) / (2 * L1_LINES)   (leakage by L1 occupancy)
//   + Eocc * occ_llc_t / LLC_LINES        (LLC static and leakage by occupancy)
//   + sum_k llc_cnt_t,k * E_llc_k         (LLC dynamic energy, six actions)
//   + sum_k inbus/outbus cnt * E_k + Lin + Lout  (bus dynamic and leakage)
// The formulas are the design's; the integer arithmetic (each product/quotient
// truncated, results saturated to 64 bits), the closed form for Dyn and the
// step order are this implementation's. Occupancies are the sampled instant
// counts at the interval end (one occupancy sample per interval).
//
// Alongside the total, the core part alone (dynamic, static and leakage
// shares) is emitted as `add_core`, so that a task's core energy can be kept
// in a register of its own as well.
//
// Timing: a product takes 33 cycles, a product plus division 33+80 cycles;
// a full cluster (4 global, 2 per core and 13 per task steps) takes about
// 6,700 cycles, well inside a 10,000-cycle interval. A `start` while busy is
// dropped and sets the sticky `overrun` flag.
module ptem_energy_engine
  import ptem_pkg::*;
#(
  parameter int unsigned NCORES    = 4,
  parameter int unsigned NTHREADS  = 2,
  parameter int unsigned PERIOD    = 10000,
  parameter int unsigned LLC_LINES = 16384,
  parameter int unsigned L1_LINES  = 512,
  parameter int unsigned NCHIP_TASKS = 64,
  localparam int unsigned NTASKS   = NCORES * NTHREADS,
  localparam int unsigned TID_W    = (NTASKS > 1) ? $clog2(NTASKS) : 1,
  localparam int unsigned OCCL_W   = $clog2(LLC_LINES + 1),
  localparam int unsigned OCC1_W   = $clog2(L1_LINES + 1),
  localparam int unsigned NTK_W    = $clog2(NCHIP_TASKS + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  ptem_cfg_t cfg,
  input  logic [NCORES-1:0][E_W-1:0] core_e,
  input  logic [NTASKS-1:0][CNT_W-1:0] fetch,
  input  logic [NTASKS-1:0][LLC_ACTIONS-1:0][CNT_W-1:0] llc_cnt,
  input  logic [NTASKS-1:0][BUS_ACTIONS-1:0][CNT_W-1:0] inb_cnt,
  input  logic [NTASKS-1:0][BUS_ACTIONS-1:0][CNT_W-1:0] outb_cnt,
  input  logic [CNT_W-1:0] llc_idle,
  input  logic [NTASKS-1:0][OCCL_W-1:0] occ_llc,
  input  logic [NTASKS-1:0][OCC1_W-1:0] occ_il1,
  input  logic [NTASKS-1:0][OCC1_W-1:0] occ_dl1,
  input  logic [NTASKS-1:0] active,
  input  logic [NTK_W-1:0] ntk_chip,
  output logic add_valid,
  output logic [TID_W-1:0] add_task,
  output logic [EMR_W-1:0] add_value,
  output logic [EMR_W-1:0] add_core,
  output logic busy,
  output logic overrun
);
  localparam int unsigned A_W = 32, B_W = 48, D_W = 32;
  localparam int unsigned NGLOB = 4, NCSTEP = 2, NTSTEP = 13;

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_WAIT, S_CORE, S_TASK, S_EMIT} state_e;
  typedef enum logic [1:0] {PH_GLOB, PH_CORE, PH_TASK} phase_e;

  state_e state;
  phase_e phase;
  logic [$clog2(NCORES+1)-1:0]   core;
  logic [$clog2(NTHREADS+1)-1:0] thr;
  logic [3:0] step;

  logic [EMR_W-1:0] t_llcocc, t_inleak, t_outleak, t_dyn, t_sta, acc, acc_core;

  // operand selection for the current step
  logic           op_div;
  logic [A_W-1:0] op_a;
  logic [B_W-1:0] op_b;
  logic [D_W-1:0] op_d;
  logic           last_step;

  logic             mu_start, mu_busy, mu_done;
  logic [EMR_W-1:0] mu_res;

  ptem_iter_muldiv #(.A_W(A_W), .B_W(B_W), .D_W(D_W), .R_W(EMR_W)) u_muldiv (
    .clk, .rst_n, .start(mu_start), .div(op_div), .a(op_a), .b(op_b), .d(op_d),
    .busy(mu_busy), .done(mu_done), .result(mu_res)
  );

  function automatic logic [B_W-1:0] satb(input logic [EMR_W-1:0] v);
    return ((v >> B_W) != '0) ? '1 : B_W'(v);
  endfunction

  logic [TID_W-1:0] task_id;
  logic [E_W-1:0]   ej, sta_core;
  logic [$clog2(NTHREADS+1)-1:0] ntk_core;
  logic [TID_W:0]   ntk_cl;
  logic [CNT_W:0]   fetch_core;

  always_comb begin
    task_id = TID_W'(((32'(core) < NCORES) ? 32'(core) : 0) * NTHREADS
                      + ((32'(thr) < NTHREADS) ? 32'(thr) : 0));
    // clamp the measured core energy into [Emin, Emax]
    ej = (32'(core) < NCORES) ? core_e[core] : '0;
    if (ej < cfg.e_core_min) ej = cfg.e_core_min;
    if (ej > cfg.e_core_max) ej = cfg.e_core_max;
    sta_core = (EMR_W'(ej) >= EMR_W'(cfg.e_core_leak) + t_dyn)
             ? E_W'(EMR_W'(ej) - EMR_W'(cfg.e_core_leak) - t_dyn) : '0;
    ntk_core   = '0;
    fetch_core = '0;
    for (int h = 0; h < NTHREADS; h++) begin
      if (32'(core) < NCORES) begin
        ntk_core   = ntk_core + $bits(ntk_core)'(active[32'(core) * NTHREADS + h]);
        fetch_core = fetch_core + (CNT_W+1)'(fetch[32'(core) * NTHREADS + h]);
      end
    end
    ntk_cl = '0;
    for (int t = 0; t < NTASKS; t++) ntk_cl = ntk_cl + (TID_W+1)'(active[t]);

    op_div = 1'b0; op_a = '0; op_b = '0; op_d = '0; last_step = 1'b0;
    unique case (phase)
      PH_GLOB: begin
        last_step = (32'(step) == NGLOB - 1);
        case (step)
          4'd0: begin op_a = cfg.e_llc_st;  op_b = B_W'(llc_idle); end
          4'd1: begin op_a = cfg.e_llc_leak; op_b = B_W'(PERIOD); end
          4'd2: begin op_div = 1'b1; op_a = cfg.e_inbus_leak; op_b = B_W'(PERIOD);
                      op_d = D_W'(ntk_cl); end
          default: begin op_div = 1'b1; op_a = cfg.e_outbus_leak; op_b = B_W'(PERIOD);
                      op_d = D_W'(ntk_chip); end
        endcase
      end
      PH_CORE: begin
        last_step = (32'(step) == NCSTEP - 1);
        op_div = 1'b1;
        if (step == 4'd0) begin
          op_a = ej - cfg.e_core_min;
          op_b = B_W'(cfg.e_core_max - cfg.e_core_leak);
          op_d = cfg.e_core_max - cfg.e_core_min;
        end else begin
          op_a = sta_core;
          op_b = B_W'(1);
          op_d = D_W'(ntk_core);
        end
      end
      default: begin
        last_step = (32'(step) == NTSTEP - 1);
        case (step)
          4'd0: begin
            op_div = 1'b1; op_b = satb(t_dyn);
            if (fetch_core != '0) begin
              op_a = fetch[task_id];
              op_d = D_W'(fetch_core > (CNT_W+1)'({D_W{1'b1}}) ? {D_W{1'b1}} : fetch_core);
            end else begin
              op_a = A_W'(1);
              op_d = D_W'(ntk_core);
            end
          end
          4'd1: begin
            op_div = 1'b1;
            op_a = A_W'(occ_il1[task_id]) + A_W'(occ_dl1[task_id]);
            op_b = B_W'(cfg.e_core_leak);
            op_d = D_W'(2 * L1_LINES);
          end
          4'd2: begin
            op_div = 1'b1; op_a = A_W'(occ_llc[task_id]); op_b = satb(t_llcocc);
            op_d = D_W'(LLC_LINES);
          end
          4'd3, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8: begin
            op_a = llc_cnt[task_id][step - 4'd3];
            op_b = B_W'(cfg.e_llc_action[step - 4'd3]);
          end
          4'd9, 4'd10: begin
            op_a = inb_cnt[task_id][step - 4'd9];
            op_b = B_W'(cfg.e_inbus_action[step - 4'd9]);
          end
          default: begin
            op_a = outb_cnt[task_id][step[0] ? 1 : 0];
            op_b = B_W'(cfg.e_outbus_action[step[0] ? 1 : 0]);
          end
        endcase
      end
    endcase
  end

  function automatic logic [EMR_W-1:0] sadd(input logic [EMR_W-1:0] x, input logic [EMR_W-1:0] y);
    logic [EMR_W:0] s;
    s = {1'b0, x} + {1'b0, y};
    return s[EMR_W] ? '1 : s[EMR_W-1:0];
  endfunction

  assign mu_start = (state == S_ISSUE);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; phase <= PH_GLOB; core <= '0; thr <= '0; step <= '0;
      t_llcocc <= '0; t_inleak <= '0; t_outleak <= '0; t_dyn <= '0; t_sta <= '0;
      acc <= '0; acc_core <= '0; add_valid <= 1'b0; add_task <= '0; add_value <= '0;
      add_core <= '0; overrun <= 1'b0;
    end else begin
      add_valid <= 1'b0;
      if (start && state != S_IDLE) overrun <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          phase <= PH_GLOB; core <= '0; thr <= '0; step <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (mu_done) begin
          unique case (phase)
            PH_GLOB: case (step)
              4'd0:    t_llcocc  <= mu_res;
              4'd1:    t_llcocc  <= sadd(t_llcocc, mu_res);
              4'd2:    t_inleak  <= mu_res;
              default: t_outleak <= mu_res;
            endcase
            PH_CORE: if (step == 4'd0) t_dyn <= mu_res; else t_sta <= mu_res;
            default: begin
              acc <= sadd(acc, mu_res);
              // the first two task steps are the core's dynamic and leakage shares
              if (step < 4'd2) acc_core <= sadd(acc_core, mu_res);
            end
          endcase
          if (!last_step) begin
            step  <= step + 1'b1;
            state <= S_ISSUE;
          end else begin
            step <= '0;
            unique case (phase)
              PH_GLOB: begin phase <= PH_CORE; core <= '0; state <= S_CORE; end
              PH_CORE: begin phase <= PH_TASK; thr <= '0; state <= S_TASK; end
              default: state <= S_EMIT;
            endcase
          end
        end
        S_CORE: begin
          // open the next core that has at least one active task
          if (32'(core) == NCORES)  state <= S_IDLE;
          else if (ntk_core == '0)  core  <= core + 1'b1;
          else begin
            phase <= PH_CORE; step <= '0; state <= S_ISSUE;
          end
        end
        S_TASK: begin
          // open the next active thread of the current core
          if (32'(thr) == NTHREADS) begin
            core <= core + 1'b1; state <= S_CORE;
          end else if (!active[task_id]) begin
            thr <= thr + 1'b1;
          end else begin
            acc      <= sadd(sadd(t_sta, t_inleak), t_outleak);
            acc_core <= t_sta;
            phase <= PH_TASK; step <= '0; state <= S_ISSUE;
          end
        end
        S_EMIT: begin
          add_valid <= 1'b1;
          add_task  <= task_id;
          add_value <= acc;
          add_core  <= acc_core;
          thr       <= thr + 1'b1;
          state     <= S_TASK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_issue_idle: assert property (@(posedge clk) disable iff (!rst_n) mu_start |-> !mu_busy);
endmodule
