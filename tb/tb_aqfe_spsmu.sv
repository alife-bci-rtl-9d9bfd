// tb_aqfe_spsmu: presents random SpW0 entries, sample indices, X1 values and
// shifts to the SpSMU and checks the Output RAM write request one cycle
// later: write only when 0 <= n - idx < N, address (region*W + w)*N + tau
// with region 1 for a start border, data trunc32(psi*x1h >>> shift),
// negated for a start border, zero when the entry's ctrl bit is clear.
`timescale 1ns/1ps
module tb_aqfe_spsmu;
  localparam int B = 17, N = 59, W = 15;
  localparam int IDX_W = $clog2(3 * N);
  localparam int X1_W = $clog2(3 * N) + 8 + 1;
  localparam int WW = $clog2(W);
  localparam int OAW = $clog2(2 * N * W);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ent_valid, ent_ctrl, ent_start;
  logic [IDX_W-1:0] ent_idx, n;
  logic signed [B-1:0] ent_coef;
  logic [WW-1:0] ent_w;
  logic signed [X1_W-1:0] x1h;
  logic [5:0] shift;
  logic wr_en;
  logic [OAW-1:0] wr_addr;
  logic signed [31:0] wr_data;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  aqfe_spsmu #(.B(B), .N(N), .W(W)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ent_valid = 0; ent_ctrl = 0; ent_start = 0; ent_idx = '0; n = '0; ent_coef = '0;
    ent_w = '0; x1h = '0; shift = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int idx, nn, w, c, xv, sh;
      bit v, ctl, st, exp_en;
      longint p;
      int exp_addr, exp_data;
      idx = int'($urandom_range(0, 2 * N));
      nn  = int'($urandom_range(0, 3 * N - 1));
      w   = int'($urandom_range(0, W - 1));
      c   = int'($urandom_range(0, (1 << B) - 1)) - (1 << (B - 1));
      xv  = int'($urandom_range(0, (1 << X1_W) - 1)) - (1 << (X1_W - 1));
      sh  = int'($urandom_range(0, 20));
      v   = ($urandom_range(0, 4) != 0);
      ctl = ($urandom_range(0, 5) != 0);
      st  = $urandom_range(0, 1);
      @(negedge clk);
      ent_valid = v; ent_ctrl = ctl; ent_start = st; ent_idx = IDX_W'(idx); n = IDX_W'(nn);
      ent_w = WW'(w); ent_coef = B'(c); x1h = X1_W'(xv); shift = 6'(sh);
      exp_en = v && nn >= idx && nn - idx < N;
      exp_addr = ((st ? W : 0) + w) * N + (nn - idx);
      p = ctl ? longint'(c) * xv : 0;
      exp_data = int'(p >>> sh);
      if (st) exp_data = -exp_data;
      @(negedge clk);
      ent_valid = 0;
      checks++;
      if (wr_en != exp_en) begin
        failures++;
        $display("FAIL wr_en %0d exp %0d (n=%0d idx=%0d)", wr_en, exp_en, nn, idx);
      end else if (exp_en) begin
        hits++;
        checks++;
        if (wr_addr != OAW'(exp_addr) || wr_data != exp_data) begin
          failures++;
          $display("FAIL addr %0d/%0d data %0d/%0d", wr_addr, exp_addr, wr_data, exp_data);
        end
      end else misses++;
    end
    checks++;
    if (hits == 0 || misses == 0) begin failures++; $display("FAIL coverage"); end
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
