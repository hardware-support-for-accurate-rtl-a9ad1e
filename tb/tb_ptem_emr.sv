// tb_ptem_emr: random engine additions and OS clears (including a clear and an
// add to the same register in one cycle) against a reference register file,
// with the read port checked every cycle and saturation checked at the top.
module tb_ptem_emr;
  localparam int unsigned NTASKS = 8, W = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic add_valid = 1'b0, clr_valid = 1'b0;
  logic [2:0] add_task = '0, clr_task = '0, rd_task = '0;
  logic [W-1:0] add_value = '0;
  logic [W-1:0] rd_data;
  logic [NTASKS-1:0][W-1:0] emr;
  longint unsigned model [NTASKS];
  int checks = 0, failures = 0, collisions = 0;

  ptem_emr #(.NTASKS(NTASKS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      add_valid = 1'($urandom_range(0, 1));
      add_task  = 3'($urandom);
      add_value = (i > 1900) ? 64'hF000_0000_0000_0000 : 64'($urandom_range(0, 100000));
      clr_valid = 1'($urandom_range(0, 9) == 0);
      clr_task  = (i % 50 == 0) ? add_task : 3'($urandom);
      rd_task   = 3'($urandom);
      #1;
      checks++;
      if (rd_data != model[rd_task]) begin
        failures++;
        $display("read %0d: %0d expected %0d", rd_task, rd_data, model[rd_task]);
      end
      @(posedge clk);
      if (clr_valid) model[clr_task] = 0;
      if (clr_valid && add_valid && clr_task == add_task) collisions++;
      if (add_valid) begin
        logic [64:0] s;
        s = 65'(model[add_task]) + 65'(add_value);
        model[add_task] = s[64] ? '1 : s[63:0];
      end
    end
    @(negedge clk);
    add_valid = 1'b0; clr_valid = 1'b0;
    foreach (model[t]) begin
      checks++;
      if (emr[t] != model[t]) begin failures++; $display("emr[%0d] mismatch", t); end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("no clear/add collision exercised"); end
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
