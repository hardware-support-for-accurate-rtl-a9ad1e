// tb_ptem_iter_muldiv: random products and product-quotients against a wide
// reference, including division by zero, saturation and the exact latency
// (A_W+1 cycles for a product, A_W+P_W+1 with the division).
module tb_ptem_iter_muldiv;
  localparam int unsigned A_W = 32, B_W = 48, D_W = 32, R_W = 64, P_W = A_W + B_W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, div = 1'b0;
  logic [A_W-1:0] a = '0;
  logic [B_W-1:0] b = '0;
  logic [D_W-1:0] d = '0;
  logic busy, done;
  logic [R_W-1:0] result;
  int checks = 0, failures = 0;

  ptem_iter_muldiv #(.A_W(A_W), .B_W(B_W), .D_W(D_W), .R_W(R_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [A_W-1:0] ta, input logic [B_W-1:0] tb_,
                     input logic [D_W-1:0] td, input logic tdiv);
    logic [127:0] p, e;
    int lat;
    p = 128'(ta) * 128'(tb_);
    e = tdiv ? ((td == 0) ? 128'd0 : p / 128'(td)) : p;
    if ((e >> R_W) != 0) e = {R_W{1'b1}};
    @(negedge clk);
    a = ta; b = tb_; d = td; div = tdiv; start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); @(negedge clk); lat++; end
    checks += 2;
    if (result != e[R_W-1:0]) begin
      failures++;
      $display("a=%0d b=%0d d=%0d div=%0b: got %0d expected %0d", ta, tb_, td, tdiv, result, e);
    end
    if (lat != (tdiv ? int'(A_W + P_W + 1) : int'(A_W + 1))) begin
      failures++;
      $display("latency %0d", lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(32'd7, 48'd6, 32'd0, 1'b0);
    run(32'd7, 48'd6, 32'd4, 1'b1);
    run(32'd5, 48'd9, 32'd0, 1'b1);
    run('1, '1, 32'd1, 1'b1);          // saturates
    run('1, '1, '1, 1'b1);
    run('1, '1, 32'd0, 1'b0);          // product saturates
    for (int i = 0; i < 300; i++)
      run($urandom, {16'($urandom), $urandom}, (i % 3 == 0) ? 32'($urandom_range(1, 50)) : $urandom,
          1'(i % 4 != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
