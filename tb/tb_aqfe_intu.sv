// tb_aqfe_intu: drives random 8-bit samples, with idle cycles and restarts,
// into the integrator pair and compares 2*X1 and the Integ RAM word
// sat24(4*X2 >>> 1) after every sample with the trapezoid recurrences
// computed here. Also checks that full-scale input over 3N samples stays
// exact and that the outputs hold while en is low.
`timescale 1ns/1ps
module tb_aqfe_intu;
  localparam int N = 59;
  localparam int X1_W = $clog2(3 * N) + 8 + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, first;
  logic signed [7:0] x;
  logic signed [X1_W-1:0] x1h;
  logic signed [23:0] x2_word;
  int checks = 0, failures = 0;

  aqfe_intu #(.N(N)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_x1h, m_acc4;
  int m_xprev;

  function automatic int sat24(longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return int'(v);
  endfunction

  task automatic run(int len, int mode);
    for (int n = 0; n < len; n++) begin
      int v;
      longint nx;
      case (mode)
        0: v = int'($urandom_range(0, 255)) - 128;
        1: v = 127;
        default: v = -128;
      endcase
      @(negedge clk);
      en = 1; first = (n == 0); x = 8'(v);
      if (n == 0) begin
        m_x1h = 0; m_acc4 = 0;
      end else begin
        nx = m_x1h + m_xprev + v;
        m_acc4 = m_acc4 + m_x1h + nx;
        m_x1h = nx;
      end
      m_xprev = v;
      @(negedge clk);
      en = 0;
      checks++;
      if (x1h != m_x1h || x2_word != sat24(m_acc4 >>> 1)) begin
        failures++;
        $display("FAIL n=%0d x1h %0d/%0d x2 %0d/%0d", n, x1h, m_x1h, x2_word, sat24(m_acc4 >>> 1));
      end
      if ($urandom_range(0, 3) == 0) begin
        repeat (2) @(negedge clk);
        checks++;
        if (x1h != m_x1h) begin failures++; $display("FAIL hold"); end
      end
    end
  endtask

  initial begin
    en = 0; first = 0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (x1h != 0) begin failures++; $display("FAIL reset"); end
    for (int r = 0; r < 5; r++) run(3 * N, 0);
    run(3 * N, 1);
    run(3 * N, 2);
    run(20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
