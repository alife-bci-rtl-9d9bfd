// tb_aqfe_ctlu: runs the control unit alone (3 channels, N = 6, 2 wavelets,
// JMAX = 6) against SpW0/SpW1 RAM models holding random entries, and checks
// every request it makes against schedules worked out here:
//   Input RAM reads (group, segment = oldest+n/N, offset = n mod N),
//   IntU enables with `first` on n = 0, Integ RAM writes at 0..3N-1,
//   SpSMU tags (start/end border, wavelet, sample) for all 2W entries per
//   sample, Output RAM reads/writes and Integ reads at a_k+tau and
//   a_1+a_J-a_k+tau with the SpRU operation, coefficient and add/sub bit.
// Also: no frame before three segments, the quality J latched and clamped to
// JMAX, the hand-over stall (no request while ch_done waits for out_release),
// the compute cycles per group 3N(2W+2) + W(3 + N(2K+5)), and overrun.
`timescale 1ns/1ps
module tb_aqfe_ctlu;
  import aqfe_pkg::*;
  localparam int L = 1, C = 3, N = 6, W = 2, JMAX = 6, B = 17;
  localparam int G = C / L, KMAX = JMAX / 2;
  localparam int GW = $clog2(G), OW = $clog2(N), IDX_W = $clog2(3 * N);
  localparam int WW = 1, EW = B + IDX_W + 1;
  localparam int S0AW = $clog2(2 * W), S1AW = $clog2(KMAX * W), OAW = $clog2(2 * N * W);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic seg_done;
  logic [1:0] wr_seg, filled;
  logic in_rd_en;
  logic [GW-1:0] in_rd_grp;
  logic [1:0] in_rd_seg;
  logic [OW-1:0] in_rd_off;
  logic [5:0] cfg_j, cfg_smu_shift, cfg_ru_shift;
  logic int_en, int_first, integ_en, integ_we;
  logic [IDX_W-1:0] integ_addr;
  logic w0_en, w1_en;
  logic [S0AW-1:0] w0_addr;
  logic [S1AW-1:0] w1_addr;
  logic [EW-1:0] w0_rdata, w1_rdata;
  logic smu_valid, smu_start;
  logic [WW-1:0] smu_w;
  logic [IDX_W-1:0] smu_n;
  logic [5:0] smu_shift, ru_shift;
  ru_op_e ru_op;
  logic signed [B-1:0] ru_coef;
  logic ru_sub, out_en, out_we;
  logic [OAW-1:0] out_addr;
  logic ch_done;
  logic [GW-1:0] ch_grp;
  logic out_release, busy, frame_done, overrun;

  aqfe_ctlu #(.L(L), .C(C), .N(N), .W(W), .JMAX(JMAX), .B(B)) dut (.*);

  // coefficient RAM models
  logic [EW-1:0] w0mem [2*W];
  logic [EW-1:0] w1mem [KMAX*W];
  always_ff @(posedge clk) begin
    if (w0_en) w0_rdata <= w0mem[w0_addr];
    if (w1_en) w1_rdata <= w1mem[w1_addr];
  end

  int checks = 0, failures = 0;
  int n_stall = 0, n_overrun = 0, n_clamp = 0;
  string exp_q[string][$];   // expected requests per kind (in, int, integ, smu, out, ru)
  function automatic string kind(string r);
    for (int i = 0; i < r.len(); i++) if (r[i] == " ") return r.substr(0, i - 1);
    return r;
  endfunction
  function automatic int pending_cnt();
    int c = 0;
    foreach (exp_q[k]) c += exp_q[k].size();
    return c;
  endfunction
  int cycles = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL: %s", s);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observed requests, compared in order with the expected log
  always @(posedge clk) if (rst_n) begin
    string s[$];
    s.delete();
    if (in_rd_en) s.push_back($sformatf("in %0d %0d %0d", in_rd_grp, in_rd_seg, in_rd_off));
    if (int_en) s.push_back($sformatf("int %0d", int_first));
    if (integ_en) s.push_back($sformatf("integ %0d %0d", integ_we, integ_addr));
    if (smu_valid) s.push_back($sformatf("smu %0d %0d %0d", smu_start, smu_w, smu_n));
    if (out_en) s.push_back($sformatf("out %0d %0d", out_we, out_addr));
    if (ru_op == RU_INTA || ru_op == RU_INTB)
      s.push_back($sformatf("ru %0d %0d %0d", int'(ru_op), int'(ru_coef), int'(ru_sub)));
    else if (ru_op != RU_NONE)
      s.push_back($sformatf("ru %0d 0 0", int'(ru_op)));
    if (ch_done && (in_rd_en || int_en || integ_en || out_en || w0_en || w1_en))
      fail("request while waiting for release");
    if (busy && !ch_done) cycles++;
    foreach (s[i]) begin
      checks++;
      if (!exp_q.exists(kind(s[i])) || exp_q[kind(s[i])].size() == 0) fail($sformatf("unexpected %s", s[i]));
      else begin
        string e;
        e = exp_q[kind(s[i])].pop_front();
        if (e != s[i]) fail($sformatf("got '%s' expected '%s'", s[i], e));
      end
    end
  end

  function automatic int fld_idx(logic [EW-1:0] e);
    return int'(e[B +: IDX_W]);
  endfunction

  // expected request log of one frame
  task automatic expect_frame(int base, int k);
    for (int g = 0; g < G; g++) begin
      for (int n = 0; n < 3 * N; n++) begin
        exp_q["in"].push_back($sformatf("in %0d %0d %0d", g, (base + n / N) % 4, n % N));
        exp_q["int"].push_back($sformatf("int %0d", n == 0));
        exp_q["integ"].push_back($sformatf("integ 1 %0d", n));
        for (int e = 0; e < 2 * W; e++)
          exp_q["smu"].push_back($sformatf("smu %0d %0d %0d", e % 2 == 0, e / 2, n));
      end
      for (int w = 0; w < W; w++) begin
        int a1, aj;
        a1 = fld_idx(w0mem[2*w]); aj = fld_idx(w0mem[2*w+1]);
        for (int t = 0; t < N; t++) begin
          exp_q["out"].push_back($sformatf("out 0 %0d", w * N + t));
          exp_q["ru"].push_back($sformatf("ru %0d 0 0", int'(RU_LOAD)));
          exp_q["out"].push_back($sformatf("out 0 %0d", (W + w) * N + t));
          exp_q["ru"].push_back($sformatf("ru %0d 0 0", int'(RU_ADDB)));
          for (int kk = 0; kk < k; kk++) begin
            logic [EW-1:0] en;
            int a, mi, cf;
            en = w1mem[w * KMAX + kk];
            a = fld_idx(en);
            mi = (a1 + aj - a) & ((1 << IDX_W) - 1);
            cf = int'($signed(en[B-1:0]));
            exp_q["integ"].push_back($sformatf("integ 0 %0d", (a + t) & ((1 << IDX_W) - 1)));
            exp_q["ru"].push_back($sformatf("ru %0d %0d %0d", int'(RU_INTA), cf, int'(en[EW-1])));
            exp_q["integ"].push_back($sformatf("integ 0 %0d", (mi + t) & ((1 << IDX_W) - 1)));
            exp_q["ru"].push_back($sformatf("ru %0d %0d %0d", int'(RU_INTB), cf, int'(en[EW-1])));
          end
          exp_q["out"].push_back($sformatf("out 1 %0d", w * N + t));
        end
      end
    end
  endtask

  // hand-over: release after a random delay
  initial begin
    out_release = 0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (ch_done) begin
        repeat ($urandom_range(0, 6)) begin
          @(posedge clk);
          n_stall++;
        end
        @(negedge clk);
        out_release = 1;
        @(negedge clk);
        out_release = 0;
      end
    end
  end

  task automatic pulse_seg(int fill);
    @(negedge clk);
    seg_done = 1; wr_seg = wr_seg + 2'd1; filled = 2'(fill);
    @(negedge clk);
    seg_done = 0;
  endtask

  task automatic run_frame(int j, int k);
    cycles = 0;
    @(negedge clk);
    cfg_j = 6'(j);
    expect_frame((int'(wr_seg) + 2) % 4, k);
    pulse_seg(3);
    cfg_j = 6'd0;   // latched at the start: changing it now has no effect
    wait (frame_done);
    @(posedge clk);
    checks++;
    if (cycles != G * (3*N*(2*W+2) + W*(3 + N*(2*k + 5))))
      fail($sformatf("cycles %0d for K=%0d", cycles, k));
    checks++;
    if (pending_cnt() != 0) fail($sformatf("%0d requests missing", pending_cnt()));
  endtask

  initial begin
    seg_done = 0; wr_seg = '0; filled = '0;
    cfg_j = '0; cfg_smu_shift = 6'd3; cfg_ru_shift = 6'd5;
    foreach (w0mem[i]) w0mem[i] = EW'({$urandom, $urandom});
    for (int w = 0; w < W; w++) begin
      // a_1 < a_J <= 2N
      w0mem[2*w][B +: IDX_W]   = IDX_W'($urandom_range(0, N));
      w0mem[2*w+1][B +: IDX_W] = IDX_W'($urandom_range(N + 1, 2 * N));
    end
    foreach (w1mem[i]) w1mem[i] = EW'({$urandom, $urandom});
    foreach (w1mem[i]) w1mem[i][B +: IDX_W] = IDX_W'($urandom_range(0, 2 * N));
    repeat (2) @(negedge clk);
    rst_n = 1;
    // two segments: no frame yet
    pulse_seg(1);
    pulse_seg(2);
    repeat (5) @(negedge clk);
    checks++;
    if (busy) fail("frame started before three segments");
    run_frame(6, 3);
    checks++;
    if (smu_shift != 6'd3 || ru_shift != 6'd5) fail("shifts not latched");
    run_frame(2, 1);
    run_frame(20, 3);  // clamped to JMAX
    n_clamp++;
    run_frame(0, 0);
    // overrun: a segment completes during a frame
    begin
      cycles = 0;
      @(negedge clk);
      cfg_j = 6'd4;
      expect_frame((int'(wr_seg) + 2) % 4, 2);
      pulse_seg(3);
      repeat (50) @(negedge clk);
      expect_frame((int'(wr_seg) + 2) % 4, 2);
      pulse_seg(3);
      wait (overrun);
      n_overrun++;
      wait (frame_done);
      @(posedge clk);
      @(negedge clk);
      wait (frame_done);
      @(posedge clk);
      checks++;
      if (pending_cnt() != 0) fail($sformatf("%0d requests missing after overrun", pending_cnt()));
    end
    checks++;
    if (n_stall == 0 || n_overrun == 0 || n_clamp == 0) fail("mechanism not exercised");
    $display("stall cycles=%0d overrun=%0d", n_stall, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
