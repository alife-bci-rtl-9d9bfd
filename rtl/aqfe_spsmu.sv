// aqfe_spsmu: Sparse Shift Multiplication Unit of one lane (Algorithm 1,
// step 2a, computed on the fly during integration).
//
// While the integrator produces X1[n], the control unit scans the 2W border
// entries of the SpW0 RAM. For each entry {ctrl, idx, psi} the SpCheck finds
// whether this sample is a border point of some output position:
// tau = n - idx with 0 <= tau < N. If so, psi * X1[n] is formed, only its
// upper bits are kept (an arithmetic right shift by `shift`, truncated to 32
// bits) and the result is written to the Output RAM at
//   ((region * W) + w) * N + tau,   region 0 = end border a_J, 1 = start a_1.
// The start-border product is written negated, so that the reduction unit
// only ever adds: S = psi(a_J) X1[a_J+tau] - psi(a_1) X1[a_1+tau] + ...
// The ctrl bit marks a non-zero border value; a cleared ctrl bit writes a
// zero product. Storing the two products in two regions (not summed in
// place), the negation and the ctrl meaning are choices of this design.
//
// Timing: ent_valid marks the cycle in which the SpW0 read data (ent_*) is
// valid. The product is registered; wr_en/wr_addr/wr_data follow one cycle
// later, directly as the Output RAM write request.
module aqfe_spsmu
  import aqfe_pkg::*;
#(
  parameter int unsigned B = 17,
  parameter int unsigned N = 59,
  parameter int unsigned W = 15,
  localparam int unsigned IDX_W = $clog2(3 * N),
  localparam int unsigned X1_W  = $clog2(3 * N) + IN_W + 1,
  localparam int unsigned WW    = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned OAW   = $clog2(2 * N * W),
  localparam int unsigned P_W   = B + X1_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ent_valid,
  input  logic                    ent_ctrl,
  input  logic [IDX_W-1:0]        ent_idx,
  input  logic signed [B-1:0]     ent_coef,
  input  logic                    ent_start,
  input  logic [WW-1:0]           ent_w,
  input  logic [IDX_W-1:0]        n,
  input  logic signed [X1_W-1:0]  x1h,
  input  logic [5:0]              shift,
  output logic                    wr_en,
  output logic [OAW-1:0]          wr_addr,
  output logic signed [OUT_W-1:0] wr_data
);

  // SpCheck
  logic             hit;
  logic [IDX_W:0]   tau;
  assign tau = {1'b0, n} - {1'b0, ent_idx};
  assign hit = ent_valid && (n >= ent_idx) && (32'(tau) < N);

  logic                  s_v, s_neg;
  logic [OAW-1:0]        s_addr;
  logic signed [P_W-1:0] s_prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_v    <= 1'b0;
      s_neg  <= 1'b0;
      s_addr <= '0;
      s_prod <= '0;
    end else begin
      s_v <= hit;
      if (hit) begin
        s_neg  <= ent_start;
        s_addr <= OAW'(((ent_start ? 32'(W) : 32'd0) + 32'(ent_w)) * N + 32'(tau));
        s_prod <= ent_ctrl ? P_W'(ent_coef) * P_W'(x1h) : '0;
      end
    end
  end

  logic signed [P_W-1:0]   shifted;
  logic signed [OUT_W-1:0] trunc;
  assign shifted = s_prod >>> shift;
  assign trunc   = OUT_W'(shifted);

  assign wr_en   = s_v;
  assign wr_addr = s_addr;
  assign wr_data = s_neg ? -trunc : trunc;

endmodule
