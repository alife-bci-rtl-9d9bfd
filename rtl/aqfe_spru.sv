// aqfe_spru: Sparse Reduction Unit of one lane (Algorithm 1, step 2b).
//
// For one output position tau of one wavelet, the accumulator is first
// loaded with the two border products the SpSMU left in the Output RAM; then,
// for every coefficient b_i read from the SpW1 RAM, two X2 words are read
// from the Integ RAM, X2[a_i+tau] and X2[mirror(a_i)+tau], summed or
// subtracted (wavelet symmetry: one multiplication serves two subdivision
// points), multiplied by b_i, right-shifted by `shift` (upper bits kept,
// truncated to 32 bits) and added to the accumulator:
//   S = border products + sum_i trunc32((b_i * (X2a +/- X2b)) >>> shift)
// The first X2 word is held in a register while the second is read, as the
// Integ RAM has one port. The accumulator wraps modulo 2^32.
//
// Interface: op/coef/sub are given in the cycle the matching RAM read is
// issued (see ru_op_e); the unit applies them one cycle later, when
// out_rdata / integ_rdata carry the data. A product is accumulated one cycle
// after its RU_INTB data. acc is the running result, written back by the
// control unit. The pipeline split is this design's own.
module aqfe_spru
  import aqfe_pkg::*;
#(
  parameter int unsigned B = 17,
  localparam int unsigned P_W = B + X2_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ru_op_e                  op,
  input  logic signed [B-1:0]     coef,
  input  logic                    sub,
  input  logic [5:0]              shift,
  input  logic signed [OUT_W-1:0] out_rdata,
  input  logic signed [X2_W-1:0]  integ_rdata,
  output logic signed [OUT_W-1:0] acc
);

  ru_op_e                 op_d;
  logic signed [B-1:0]    coef_d, coef_a;
  logic                   sub_d, sub_a;
  logic signed [X2_W-1:0] reg_a;
  logic signed [P_W-1:0]  prod;
  logic                   prod_v;
  logic signed [X2_W:0]   pair;

  assign pair = sub_a ? (X2_W+1)'(reg_a) - (X2_W+1)'(integ_rdata)
                      : (X2_W+1)'(reg_a) + (X2_W+1)'(integ_rdata);

  logic signed [P_W-1:0] prod_sh;
  assign prod_sh = prod >>> shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_d   <= RU_NONE;
      coef_d <= '0;
      sub_d  <= 1'b0;
      coef_a <= '0;
      sub_a  <= 1'b0;
      reg_a  <= '0;
      prod   <= '0;
      prod_v <= 1'b0;
      acc    <= '0;
    end else begin
      op_d   <= op;
      coef_d <= coef;
      sub_d  <= sub;
      prod_v <= 1'b0;
      case (op_d)
        RU_INTA: begin
          reg_a  <= integ_rdata;
          coef_a <= coef_d;
          sub_a  <= sub_d;
        end
        RU_INTB: begin
          prod   <= P_W'(pair) * P_W'(coef_a);
          prod_v <= 1'b1;
        end
        default: ;
      endcase
      if (op_d == RU_LOAD)
        acc <= out_rdata;
      else if (op_d == RU_ADDB)
        acc <= acc + out_rdata;
      else if (prod_v)
        acc <= acc + OUT_W'(prod_sh);
    end
  end

endmodule
