// tb_aqfe_input_buffer: streams samples into the Input RAM (2 lanes,
// 6 channels, N = 5) while a reader keeps reading random earlier samples.
// Checks: every sample read back equals the one written to (group, segment,
// offset); in_ready is low exactly in cycles with rd_en and a refused write
// is not lost; seg_done pulses once per N x C/L accepted writes; wr_seg
// advances mod 4; filled counts to 3 and stays there.
`timescale 1ns/1ps
module tb_aqfe_input_buffer;
  localparam int L = 2, C = 6, N = 5, G = C / L;
  localparam int GW = $clog2(G), OW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, rd_en, seg_done;
  logic [L*8-1:0] in_data, rd_data;
  logic [GW-1:0] rd_grp;
  logic [1:0] rd_seg, wr_seg, filled;
  logic [OW-1:0] rd_off;
  int checks = 0, failures = 0, refused = 0, segs = 0;
  logic [L*8-1:0] img [G][4][N];
  bit valid_img [G][4][N];

  aqfe_input_buffer #(.L(L), .C(C), .N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the write pointer
  int m_grp = 0, m_off = 0, m_seg = 0, m_filled = 0, pend_seg = 0;

  always @(posedge clk) if (rst_n) begin
    // seg_done/filled/wr_seg are registered: compare with the model state
    checks++;
    if (seg_done != (pend_seg != 0) || int'(wr_seg) != m_seg || int'(filled) != m_filled) begin
      failures++;
      $display("FAIL status seg_done=%0d/%0d wr_seg=%0d/%0d filled=%0d/%0d", seg_done, pend_seg,
               wr_seg, m_seg, filled, m_filled);
    end
    if (seg_done) segs++;
    pend_seg = 0;
    if (in_ready == rd_en) begin failures++; $display("FAIL in_ready"); end
    if (in_valid && !in_ready) refused++;
    if (in_valid && in_ready) begin
      img[m_grp][m_seg][m_off] = in_data;
      valid_img[m_grp][m_seg][m_off] = 1;
      if (m_grp == G - 1) begin
        m_grp = 0;
        if (m_off == N - 1) begin
          m_off = 0; m_seg = (m_seg + 1) % 4; pend_seg = 1;
          if (m_filled < 3) m_filled++;
        end else m_off++;
      end else m_grp++;
    end
  end

  // reader
  initial begin
    rd_en = 0; rd_grp = '0; rd_seg = '0; rd_off = '0;
    wait (rst_n);
    repeat (400) begin
      int g, s, o;
      g = int'($urandom_range(0, G - 1)); s = int'($urandom_range(0, 3));
      o = int'($urandom_range(0, N - 1));
      @(negedge clk);
      rd_en = ($urandom_range(0, 2) == 0);
      rd_grp = GW'(g); rd_seg = 2'(s); rd_off = OW'(o);
      if (rd_en && valid_img[g][s][o]) begin
        logic [L*8-1:0] e;
        e = img[g][s][o];
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data != e) begin failures++; $display("FAIL read g%0d s%0d o%0d", g, s, o); end
      end
    end
    @(negedge clk);
    rd_en = 0;
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 7 * N * G; i++) begin
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      in_valid = 1;
      in_data = L*8'($urandom);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (1000) @(negedge clk);
    checks++;
    if (segs != 7 || refused == 0) begin
      failures++;
      $display("FAIL segs=%0d refused=%0d", segs, refused);
    end
    $display("segments=%0d refused writes=%0d", segs, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
