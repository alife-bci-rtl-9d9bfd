// aqfe_top_env: one end-to-end test of the AQFE at a reduced size
// (C/L channel groups of L lanes, N = 8, 3 wavelets, JMAX = 8), instantiated
// by tb_aqfe_top once per lane count.
//
// A writer streams random samples into the Input RAM at a set pace; after
// the third segment every completed segment starts a frame. A reader waits a
// random number of cycles after ch_done (stalling the control unit), reads
// every feature of every lane and compares it with the bit-exact reference
// model of aqfe_tb_pkg. Frames are run at J = 8, 4, 0 and an over-range J
// (clamped to 8), with the coefficient banks reloaded between frames; the
// compute cycles of every frame (busy, not waiting for the reader) must be
// C/L * (3N(2W+2) + W(3 + N(J+5))). Finally a segment is written faster than
// a frame takes, which must raise overrun. Each mechanism is counted and must
// occur at least once. Interface: checks_o/failures_o count continuously;
// done rises when the sequence has finished.
`timescale 1ns/1ps
module aqfe_top_env #(
  parameter int L = 2,
  parameter int C = 4
) (
  output int   checks_o,
  output int   failures_o,
  output logic done
);
  import aqfe_tb_pkg::*;

  localparam int N = 8, W = 3, JMAX = 8, B = 17;
  localparam int G = C / L;
  localparam int IDX_W = $clog2(3 * N);
  localparam int EW = B + IDX_W + 1;
  localparam int S0AW = $clog2(2 * W);
  localparam int S1AW = $clog2(JMAX / 2 * W);
  localparam int CAW = (S0AW > S1AW) ? S0AW : S1AW;
  localparam int OAW = $clog2(2 * N * W);
  localparam int GW = (G > 1) ? $clog2(G) : 1;

  logic clk = 0, rst_n = 0;
  initial done = 1'b0;
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

  aqfe_top #(.L(L), .C(C), .N(N), .W(W), .JMAX(JMAX), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  assign checks_o = checks;
  assign failures_o = failures;
  int n_fe_stall = 0, n_rd_stall = 0, n_qswitch = 0, n_overrun = 0, n_clamp = 0,
      n_reload = 0, n_frames = 0, n_lane1 = 0;

  // sample history per channel
  int hist[C][$];
  plcwt_model m;
  int k_of_frame[$];
  bit check_frame[$];
  int pace = 60;

  task automatic fail(string msg);
    failures++;
    $display("FAIL (L=%0d): %s", L, msg);
  endtask


  // front-end stall counter
  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_fe_stall++;

  // inputs are driven at the falling edge, away from the sampling edge
  task automatic write_segment(int gap);
    for (int t = 0; t < N; t++) begin
      for (int g = 0; g < G; g++) begin
        logic [L*8-1:0] d;
        for (int l = 0; l < L; l++) begin
          int v;
          v = int'($urandom_range(0, 255)) - 128;
          d[l*8 +: 8] = 8'(v);
          hist[g*L + l].push_back(v);
        end
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = d;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic load_bank();
    for (int w = 0; w < W; w++)
      for (int s = 0; s < 2; s++) begin
        cfg_we <= 1; cfg_sel <= 0; cfg_addr <= CAW'(2*w + s);
        cfg_wdata <= EW'(m.entry0(w, s));
        @(posedge clk);
      end
    for (int w = 0; w < W; w++)
      for (int k = 0; k < JMAX/2; k++) begin
        cfg_we <= 1; cfg_sel <= 1; cfg_addr <= CAW'(w*(JMAX/2) + k);
        cfg_wdata <= EW'(m.entry1(w, k));
        @(posedge clk);
      end
    cfg_we <= 0;
  endtask

  // reader: compares every channel group of every frame
  int frame_rd = 0;
  int compute_cycles = 0;
  always @(posedge clk) if (rst_n && busy && !ch_done) compute_cycles++;

  initial begin : reader
    out_rd_en = 0; out_rd_addr = '0; out_release = 0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (ch_done) begin
        int delay, exp_s[];
        int grp;
        grp = int'(ch_grp);
        delay = int'($urandom_range(1, 20));
        repeat (delay) begin
          @(posedge clk);
          if (!ch_done) fail("ch_done dropped before release");
          n_rd_stall++;
        end
        for (int l = 0; l < L; l++) begin
          int ch, x[];
          ch = grp * L + l;
          x = new[3 * N];
          foreach (x[i]) x[i] = hist[ch][frame_rd * N + i];
          m.compute(x, k_of_frame[frame_rd], exp_s);
          if (check_frame[frame_rd]) begin
            for (int a = 0; a < W * N; a++) begin
              out_rd_en <= 1; out_rd_addr <= OAW'(a);
              @(posedge clk);
              out_rd_en <= 0;
              @(posedge clk);
              checks++;
              if ($signed(out_rd_data[l*32 +: 32]) != exp_s[a])
                fail($sformatf("frame %0d ch %0d addr %0d got %0d exp %0d", frame_rd, ch, a,
                               $signed(out_rd_data[l*32 +: 32]), exp_s[a]));
              else if (l == 1) n_lane1++;
            end
          end
        end
        out_release <= 1;
        @(posedge clk);
        out_release <= 0;
        if (grp == G - 1) frame_rd++;
      end
    end
  end

  // frame cycle count check
  int frame_k;
  initial begin : cyc_check
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (frame_done) begin
        int expct;
        expct = G * (3*N*(2*W+2) + W*(3 + N*(2*k_of_frame[n_frames] + 5)));
        checks++;
        if (compute_cycles != expct)
          fail($sformatf("frame %0d compute cycles %0d expected %0d", n_frames, compute_cycles, expct));
        compute_cycles = 0;
        n_frames++;
      end
    end
  end

  initial begin
    m = new(N, W, JMAX, B);
    m.s1 = 6; m.s2 = 9;
    in_valid = 0; in_data = '0; cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_wdata = '0;
    cfg_j = 6'd8; cfg_smu_shift = 6'd6; cfg_ru_shift = 6'd9;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    m.random_bank();
    load_bank();
    // J per frame: 8, 4, 0, 40 (clamped)
    k_of_frame = '{4, 2, 0, 4, 4};
    check_frame = '{1, 1, 1, 1, 0};
    write_segment(pace);
    write_segment(pace);
    write_segment(pace);          // frame 0 starts
    repeat (3) @(posedge clk);
    if (!busy) fail("frame 0 did not start");
    checks++;
    wait (!busy); @(posedge clk);
    cfg_j <= 6'd4; n_qswitch++;
    write_segment(pace);          // frame 1 (J=4)
    wait (!busy); @(posedge clk);
    cfg_j <= 6'd0; n_qswitch++;
    m.random_bank(); load_bank(); n_reload++;
    write_segment(pace);          // frame 2 (J=0, borders only)
    wait (!busy); @(posedge clk);
    cfg_j <= 6'd40; n_clamp++;
    m.random_bank(); load_bank(); n_reload++;
    write_segment(pace);          // frame 3 (clamped to J=8)
    // overrun: a whole segment while frame 3 is still running
    write_segment(0);
    wait (overrun);
    n_overrun++;
    wait (!busy); @(posedge clk);
    wait (n_frames == 5);
    repeat (5) @(posedge clk);
    checks++;
    if (!overrun) fail("overrun not held");
    if (n_fe_stall == 0) fail("no front-end stall");
    if (n_rd_stall == 0) fail("no reader stall");
    if (n_qswitch == 0)  fail("no quality switch");
    if (n_overrun == 0)  fail("no overrun");
    if (n_clamp == 0)    fail("no J clamp");
    if (n_reload == 0)   fail("no coefficient reload");
    if (n_lane1 == 0)    fail("second lane never checked");
    if (frame_rd != 5)   fail($sformatf("frames read %0d", frame_rd));
    $display("L=%0d mechanisms: fe_stall=%0d reader_stall=%0d quality_switch=%0d clamp=%0d reload=%0d overrun=%0d frames=%0d lane1_checks=%0d",
             L, n_fe_stall, n_rd_stall, n_qswitch, n_clamp, n_reload, n_overrun, n_frames, n_lane1);
    done = 1'b1;
  end
endmodule
