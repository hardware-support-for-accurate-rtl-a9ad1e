// ptem_iter_muldiv: low-cost iterative arithmetic for the energy computations.
//
// Computes p = a * b with a radix-2 shift-and-add multiplier (one bit of `a`
// per cycle, A_W cycles), then, when `div` is set, q = p / d with a restoring
// divider (one quotient bit per cycle, P_W cycles). The result is the quotient
// (or the product when `div` is clear), saturated to R_W bits. Division by
// zero returns 0. Latency from `start` to `done`: A_W+1 cycles for a product,
// A_W+P_W+1 cycles for a product followed by a division. `start` is ignored
// while `busy`. Iterative units are what the design calls for here: the
// energy computations are rare and off every critical path, so area matters
// more than latency.
module ptem_iter_muldiv #(
  parameter int unsigned A_W = 32,
  parameter int unsigned B_W = 48,
  parameter int unsigned D_W = 32,
  parameter int unsigned R_W = 64,
  localparam int unsigned P_W = A_W + B_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic div,
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  input  logic [D_W-1:0] d,
  output logic busy,
  output logic done,
  output logic [R_W-1:0] result
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV} state_e;
  state_e state;

  logic [A_W-1:0] mplier;
  logic [P_W-1:0] mcand;
  logic [P_W-1:0] acc;     // product, then the dividend being shifted out
  logic [P_W-1:0] quo;
  logic [D_W:0]   rem;
  logic [D_W-1:0] dreg;
  logic           dodiv;
  logic [$clog2(P_W+1)-1:0] n;

  function automatic logic [R_W-1:0] sat(input logic [P_W-1:0] v);
    if (P_W > R_W && (v >> R_W) != '0) return '1;
    return R_W'(v);
  endfunction

  logic [D_W:0] rem_sh;
  always_comb rem_sh = {rem[D_W-1:0], acc[P_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      result <= '0;
      mplier <= '0;
      mcand  <= '0;
      acc    <= '0;
      quo    <= '0;
      rem    <= '0;
      dreg   <= '0;
      dodiv  <= 1'b0;
      n      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mplier <= a;
          mcand  <= P_W'(b);
          acc    <= '0;
          dreg   <= d;
          dodiv  <= div;
          n      <= '0;
          state  <= S_MUL;
        end
        S_MUL: begin
          if (mplier[0]) acc <= acc + mcand;
          mplier <= mplier >> 1;
          mcand  <= mcand << 1;
          if (32'(n) == A_W - 1) begin
            n <= '0;
            if (dodiv) begin
              state <= S_DIV;
              rem   <= '0;
              quo   <= '0;
            end else begin
              state  <= S_IDLE;
              done   <= 1'b1;
              result <= sat(mplier[0] ? acc + mcand : acc);
            end
          end else begin
            n <= n + 1'b1;
          end
        end
        S_DIV: begin
          acc <= acc << 1;
          if (rem_sh >= {1'b0, dreg}) begin
            rem <= rem_sh - {1'b0, dreg};
            quo <= {quo[P_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[P_W-2:0], 1'b0};
          end
          if (32'(n) == P_W - 1) begin
            state  <= S_IDLE;
            done   <= 1'b1;
            result <= (dreg == '0) ? '0
                    : sat({quo[P_W-2:0], (rem_sh >= {1'b0, dreg})});
          end else begin
            n <= n + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
