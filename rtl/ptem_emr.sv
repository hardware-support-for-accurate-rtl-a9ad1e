// ptem_emr: the Energy Metering Registers, one per hardware context.
//
// The energy engine adds each task's per-interval energy to the register of
// the context the task runs on (`add_valid`, `add_task`, `add_value`). The OS
// reads a register by hardware-context index (`rd_task` -> `rd_data`,
// combinational) when a task is scheduled out and resets it (`clr_valid`,
// `clr_task`) when a task is scheduled in. If an add and a clear hit the same
// register in one cycle the register takes the added value alone (this
// implementation's choice: the interval's energy goes to the incoming task).
// Registers saturate instead of wrapping.
module ptem_emr #(
  parameter int unsigned NTASKS = 8,
  parameter int unsigned W      = 64,
  localparam int unsigned TID_W = (NTASKS > 1) ? $clog2(NTASKS) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic add_valid,
  input  logic [TID_W-1:0] add_task,
  input  logic [W-1:0] add_value,
  input  logic clr_valid,
  input  logic [TID_W-1:0] clr_task,
  input  logic [TID_W-1:0] rd_task,
  output logic [W-1:0] rd_data,
  output logic [NTASKS-1:0][W-1:0] emr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emr <= '0;
    end else begin
      for (int t = 0; t < NTASKS; t++) begin
        logic [W:0]   sum;
        logic [W-1:0] base;
        base = (clr_valid && 32'(clr_task) == t) ? '0 : emr[t];
        sum  = {1'b0, base} + {1'b0, add_value};
        if (add_valid && 32'(add_task) == t) emr[t] <= sum[W] ? '1 : sum[W-1:0];
        else                                 emr[t] <= base;
      end
    end
  end

  assign rd_data = emr[rd_task];
endmodule
