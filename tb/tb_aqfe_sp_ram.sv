// tb_aqfe_sp_ram: checks the single-port RAM model against a shadow array:
// random writes and reads, one-cycle read latency, rdata held while idle,
// and zero returned for an address past the last word.
`timescale 1ns/1ps
module tb_aqfe_sp_ram;
  localparam int WIDTH = 24, DEPTH = 177, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [AW-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  aqfe_sp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    // fill everything once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); wdata = WIDTH'($urandom);
      shadow[a] = wdata; written[a] = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      we = $urandom_range(0, 1);
      addr = AW'(a); wdata = WIDTH'($urandom);
      if (en && we) shadow[a] = wdata;
      if (en && !we) begin
        logic [WIDTH-1:0] expv;
        expv = shadow[a];
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== expv) begin
          failures++;
          $display("FAIL read %0d got %h exp %h", a, rdata, expv);
        end
        // held while idle
        @(negedge clk);
        checks++;
        if (rdata !== expv) begin failures++; $display("FAIL hold"); end
      end
    end
    // past the end
    @(negedge clk);
    en = 1; we = 0; addr = AW'(DEPTH + 3);
    @(negedge clk);
    en = 0;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL out of range read %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
