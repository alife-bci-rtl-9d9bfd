// aqfe_intu: Integrator Unit of one lane, a pair of trapezoidal integrators
// computing the first and second antiderivatives of the input signal
// (Algorithm 1, step 1):
//   X1[0] = 0, X1[n] = X1[n-1] + (x[n-1] + x[n]) / 2
//   X2[0] = 0, X2[n] = X2[n-1] + (X1[n-1] + X1[n]) / 2
//
// To stay exact, the unit keeps x1h = 2*X1 and acc4 = 4*X2 as integers:
//   x1h[n]  = x1h[n-1] + x[n-1] + x[n]
//   acc4[n] = acc4[n-1] + x1h[n-1] + x1h[n]
// x1h goes on to the SpSMU (its scale of 2 is absorbed by the SpSMU shift).
// The word stored in the 24-bit Integ RAM is x2_word = sat(acc4 >>> X2_SHIFT),
// i.e. 2*X2 for the default X2_SHIFT = 1. The halving by keeping the scale
// factors and the value of X2_SHIFT are choices of this design; the 24-bit
// word is the architecture's.
//
// Timing: with en=1 the sample x is taken; x1h and x2_word show the results
// for that sample from the next cycle on and hold until the next en. first=1
// with en marks sample n=0 and restarts both integrators.
module aqfe_intu
  import aqfe_pkg::*;
#(
  parameter int unsigned N        = 59,
  parameter int unsigned X2_SHIFT = 1,
  localparam int unsigned X1_W  = $clog2(3 * N) + IN_W + 1,
  localparam int unsigned ACC_W = X1_W + $clog2(3 * N) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   first,
  input  logic signed [IN_W-1:0] x,
  output logic signed [X1_W-1:0] x1h,
  output logic signed [X2_W-1:0] x2_word
);

  logic signed [IN_W-1:0]  x_prev;
  logic signed [ACC_W-1:0] acc4;
  logic signed [X1_W-1:0]  x1h_next;

  assign x1h_next = x1h + X1_W'(x_prev) + X1_W'(x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev <= '0;
      x1h    <= '0;
      acc4   <= '0;
    end else if (en) begin
      x_prev <= x;
      if (first) begin
        x1h  <= '0;
        acc4 <= '0;
      end else begin
        x1h  <= x1h_next;
        acc4 <= acc4 + ACC_W'(x1h) + ACC_W'(x1h_next);
      end
    end
  end

  assign x2_word = sat_x2(40'(acc4 >>> X2_SHIFT));

endmodule
