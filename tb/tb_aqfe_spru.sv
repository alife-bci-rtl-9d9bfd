// tb_aqfe_spru: plays the reduction of one output position through the SpRU
// with the control unit's timing (op issued with the RAM read, data one cycle
// later): RU_LOAD and RU_ADDB with two border products, then K pairs of X2
// words with random coefficients, add/subtract choice and shift. The
// accumulator must equal border0 + border1 + sum trunc32(b*(a +/- b2) >>> s)
// modulo 2^32, for K from 0 to 16.
`timescale 1ns/1ps
module tb_aqfe_spru;
  import aqfe_pkg::*;
  localparam int B = 17;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ru_op_e op;
  logic signed [B-1:0] coef;
  logic sub;
  logic [5:0] shift;
  logic signed [31:0] out_rdata, acc;
  logic signed [23:0] integ_rdata;
  int checks = 0, failures = 0;

  aqfe_spru #(.B(B)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle: issue op (+ data of the previous cycle's read)
  task automatic cyc(ru_op_e o, int cf, bit sb, int odata, int idata);
    @(negedge clk);
    op = o; coef = B'(cf); sub = sb;
    out_rdata = odata; integ_rdata = 24'(idata);
  endtask

  initial begin
    op = RU_NONE; coef = '0; sub = 0; shift = '0; out_rdata = '0; integ_rdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int k_n, b0, b1, expv, sh;
      int cf[], av[], bv[];
      bit sb[];
      k_n = t % 17;
      sh = int'($urandom_range(0, 16));
      shift = 6'(sh);
      b0 = int'($urandom); b1 = int'($urandom);
      cf = new[k_n]; av = new[k_n]; bv = new[k_n]; sb = new[k_n];
      expv = b0 + b1;
      foreach (cf[k]) begin
        longint p;
        cf[k] = int'($urandom_range(0, (1 << B) - 1)) - (1 << (B - 1));
        av[k] = int'($urandom_range(0, (1 << 24) - 1)) - (1 << 23);
        bv[k] = int'($urandom_range(0, (1 << 24) - 1)) - (1 << 23);
        sb[k] = $urandom_range(0, 1);
        p = (sb[k] ? longint'(av[k]) - bv[k] : longint'(av[k]) + bv[k]) * cf[k];
        expv += int'(p >>> sh);
      end
      // c0: LOAD issued; c1: ADDB issued, border0 data; c2..: pairs
      cyc(RU_LOAD, 0, 0, 0, 0);
      cyc(RU_ADDB, 0, 0, b0, 0);
      cyc(RU_NONE, 0, 0, b1, 0);
      for (int k = 0; k < k_n; k++) begin
        if (k == 0) begin
          @(negedge clk);
          op = RU_INTA; coef = B'(cf[0]); sub = sb[0];
        end
        @(negedge clk);
        op = RU_INTB; integ_rdata = 24'(av[k]);
        @(negedge clk);
        integ_rdata = 24'(bv[k]);
        if (k + 1 < k_n) begin
          op = RU_INTA; coef = B'(cf[k+1]); sub = sb[k+1];
        end else op = RU_NONE;
      end
      cyc(RU_NONE, 0, 0, 0, 0);
      cyc(RU_NONE, 0, 0, 0, 0);
      @(negedge clk);
      checks++;
      if (acc != expv) begin
        failures++;
        $display("FAIL t=%0d K=%0d acc %0d exp %0d", t, k_n, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
