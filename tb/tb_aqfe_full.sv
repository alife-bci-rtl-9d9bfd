// tb_aqfe_full: the AQFE at its default size (1 lane, 64 channels, N = 59,
// 15 wavelets, JMAX = 32, 17-bit coefficients) running the feature
// extraction of the BCI use case: 64 channels at 590 Hz, 15 Morlet wavelets
// from 10 to 150 Hz, one frame per 100 ms decision.
//
// Three frames are run, at high, medium and low quality (J = 32, 18, 4), the
// coefficient bank being rebuilt and reloaded for each J. Every feature of
// every channel is compared with the bit-exact reference model; the Pearson
// correlation of the hardware features with two floating-point references
// is printed per quality: the same piecewise-linear transform (what the
// fixed point costs; must exceed 0.95 at every J), and the exact convolution
// with the unapproximated wavelet (what the approximation costs; must exceed
// 0.95 at J = 32). The compute cycles of each frame must match
// C * (3N(2W+2) + W(3 + N(J+5))) and, at J = 32, fit in the 5,000,000 cycles
// a 50 MHz clock gives per 100 ms.
`timescale 1ns/1ps
module tb_aqfe_full;
  import aqfe_tb_pkg::*;

  localparam int L = 1, C = 64, N = 59, W = 15, JMAX = 32, B = 17;
  localparam int G = C / L;
  localparam int IDX_W = $clog2(3 * N);
  localparam int EW = B + IDX_W + 1;
  localparam int S0AW = $clog2(2 * W);
  localparam int S1AW = $clog2(JMAX / 2 * W);
  localparam int CAW = (S0AW > S1AW) ? S0AW : S1AW;
  localparam int OAW = $clog2(2 * N * W);
  localparam int GW = $clog2(G);
  localparam real FS = 590.0;
  localparam int FB_P = 15, FB_B = 14, S1 = 8, S2 = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            in_valid, in_ready;
  logic [L*8-1:0]  in_data;
  logic            cfg_we, cfg_sel;
  logic [CAW-1:0]  cfg_addr;
  logic [EW-1:0]   cfg_wdata;
  logic [5:0]      cfg_j, cfg_smu_shift, cfg_ru_shift;
  logic            ch_done;
  logic [GW-1:0]   ch_grp;
  logic            out_rd_en;
  logic [OAW-1:0]  out_rd_addr;
  logic [L*32-1:0] out_rd_data;
  logic            out_release;
  logic            busy, frame_done, overrun;

  aqfe_top dut (.*);

  int checks = 0, failures = 0;
  int hist[C][$];
  real amp1[C], amp2[C], ph1[C], ph2[C];
  real freqs[];
  plcwt_model m;
  int j_of_frame[3] = '{32, 18, 4};
  int frame_rd = 0, n_frames = 0;
  int compute_cycles = 0;
  real hw_feat[], ex_feat[], pl_feat[];
  int mism = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && busy && !ch_done) compute_cycles++;

  // synthetic ECoG: two oscillations (20 Hz, 80 Hz) of channel-dependent
  // amplitude and phase plus uniform noise
  task automatic write_segment();
    for (int t = 0; t < N; t++) begin
      for (int ch = 0; ch < C; ch++) begin
        int v, tg;
        real tt;
        tg = hist[ch].size();
        tt = real'(tg) / FS;
        v = int'(amp1[ch] * $sin(6.283185307179586 * 20.0 * tt + ph1[ch]) +
                 amp2[ch] * $sin(6.283185307179586 * 80.0 * tt + ph2[ch])) +
            int'($urandom_range(0, 60)) - 30;
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        hist[ch].push_back(v);
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = 8'(v);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic load_bank();
    for (int w = 0; w < W; w++)
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        cfg_we = 1; cfg_sel = 0; cfg_addr = CAW'(2*w + s);
        cfg_wdata = EW'(m.entry0(w, s));
      end
    for (int w = 0; w < W; w++)
      for (int k = 0; k < JMAX/2; k++) begin
        @(negedge clk);
        cfg_we = 1; cfg_sel = 1; cfg_addr = CAW'(w*(JMAX/2) + k);
        cfg_wdata = EW'(m.entry1(w, k));
      end
    @(negedge clk);
    cfg_we = 0;
  endtask

  // reader
  initial begin : reader
    out_rd_en = 0; out_rd_addr = '0; out_release = 0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (ch_done) begin
        int ch, x[], exp_s[];
        real ex_s[], pl_s[];
        ch = int'(ch_grp);
        x = new[3 * N];
        foreach (x[i]) x[i] = hist[ch][frame_rd * N + i];
        m.compute(x, j_of_frame[frame_rd] / 2, exp_s);
        m.exact(x, ex_s);
        m.plcwt_real(x, j_of_frame[frame_rd] / 2, pl_s);
        for (int a = 0; a < W * N; a++) begin
          @(negedge clk);
          out_rd_en = 1; out_rd_addr = OAW'(a);
          @(negedge clk);
          out_rd_en = 0;
          checks++;
          if ($signed(out_rd_data) != exp_s[a]) begin
            mism++;
            fail($sformatf("frame %0d ch %0d addr %0d got %0d exp %0d", frame_rd, ch, a,
                           $signed(out_rd_data), exp_s[a]));
          end
          hw_feat[(a / N) * C * N + ch * N + (a % N)] = real'($signed(out_rd_data));
          ex_feat[(a / N) * C * N + ch * N + (a % N)] = ex_s[a];
          pl_feat[(a / N) * C * N + ch * N + (a % N)] = pl_s[a];
        end
        @(negedge clk);
        out_release = 1;
        @(negedge clk);
        out_release = 0;
        if (ch == G - 1) frame_rd++;
      end
    end
  end

  initial begin
    real fmin, fmax;
    m = new(N, W, JMAX, B);
    m.s1 = S1; m.s2 = S2;
    freqs = new[W];
    fmin = 10.0; fmax = 150.0;
    foreach (freqs[w]) freqs[w] = fmin * $pow(fmax / fmin, real'(w) / real'(W - 1));
    foreach (amp1[ch]) begin
      amp1[ch] = 20.0 + real'($urandom_range(0, 40));
      amp2[ch] = 10.0 + real'($urandom_range(0, 30));
      ph1[ch]  = real'($urandom_range(0, 628)) / 100.0;
      ph2[ch]  = real'($urandom_range(0, 628)) / 100.0;
    end
    hw_feat = new[W * C * N];
    ex_feat = new[W * C * N];
    pl_feat = new[W * C * N];
    in_valid = 0; in_data = '0; cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_wdata = '0;
    cfg_smu_shift = 6'(S1); cfg_ru_shift = 6'(S2);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      real cc_sum, cc_pl;
      int fr;
      fr = f;
      m.morlet_bank(FS, freqs, j_of_frame[f], FB_P, FB_B);
      wait (!busy);
      load_bank();
      @(negedge clk);
      cfg_j = 6'(j_of_frame[f]);
      if (f == 0) begin
        write_segment();
        write_segment();
      end
      write_segment();
      wait (frame_done);
      @(posedge clk);
      begin
        int expct;
        expct = G * (3*N*(2*W+2) + W*(3 + N*(j_of_frame[f] + 5)));
        checks++;
        if (compute_cycles != expct)
          fail($sformatf("J=%0d compute cycles %0d expected %0d", j_of_frame[f], compute_cycles, expct));
        if (j_of_frame[f] == JMAX) begin
          checks++;
          if (compute_cycles > 5000000) fail("HQ frame exceeds 5M cycles (50 MHz, 10 Hz)");
        end
        $display("J=%0d: %0d compute cycles per frame (%0.2f MHz needed for 10 frames/s)",
                 j_of_frame[f], compute_cycles, real'(compute_cycles) * 10.0 / 1.0e6);
        compute_cycles = 0;
      end
      wait (frame_rd == fr + 1);
      cc_sum = 0.0; cc_pl = 0.0;
      for (int w = 0; w < W; w++) begin
        real a[], b[], p[];
        a = new[C * N]; b = new[C * N]; p = new[C * N];
        foreach (a[i]) begin
          a[i] = hw_feat[w * C * N + i]; b[i] = ex_feat[w * C * N + i]; p[i] = pl_feat[w * C * N + i];
        end
        cc_sum += pearson(a, b);
        cc_pl  += pearson(a, p);
      end
      $display("J=%0d: mean correlation with the floating-point PLCWT over %0d wavelets = %0.4f",
               j_of_frame[f], W, cc_pl / W);
      checks++;
      if (cc_pl / W < 0.95) fail("correlation with the floating-point PLCWT below 0.95");
      $display("J=%0d: mean correlation with the exact CWT over %0d wavelets = %0.4f",
               j_of_frame[f], W, cc_sum / W);
      if (j_of_frame[f] == JMAX) begin
        checks++;
        if (cc_sum / W < 0.95) fail("HQ correlation below 0.95");
      end
      n_frames++;
    end
    checks++;
    if (overrun) fail("unexpected overrun");
    $display("bit-exact mismatches: %0d", mism);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
