// tb_aqfe_top: end-to-end test of the AQFE top at reduced sizes, run twice
// side by side: two lanes over 4 channels and four lanes over 8 channels
// (the 2- and 4-lane variants of the architecture). Each run (aqfe_top_env)
// streams samples in, runs frames at several qualities with coefficient
// reloads, J clamping, reader stalls, front-end stalls and an overrun, checks
// every feature bit-exactly and the compute cycle count of every frame, and
// counts each mechanism. This module adds the results and a watchdog.
`timescale 1ns/1ps
module tb_aqfe_top;
  int c2, f2, c4, f4;
  logic d2, d4;

  aqfe_top_env #(.L(2), .C(4)) u_l2 (.checks_o(c2), .failures_o(f2), .done(d2));
  aqfe_top_env #(.L(4), .C(8)) u_l4 (.checks_o(c4), .failures_o(f4), .done(d4));

  initial begin : watchdog
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4, f2 + f4 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d2 && d4);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4, f2 + f4);
    $finish;
  end
endmodule
