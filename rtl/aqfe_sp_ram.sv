// aqfe_sp_ram: single-port synchronous RAM, the model of every memory cut of
// the AQFE (Input, Integ, Output, SpW0 and SpW1 RAM). All memories of the
// design are single-port, as data dependencies leave no use for a second port.
//
// One access per cycle: with en=1 and we=1 the word at addr is written, with
// en=1 and we=0 it is read and appears on rdata one cycle later. rdata holds
// its value while en=0, so an idle cut costs no read energy and can be clock
// gated from en. The memory contents are not reset.
module aqfe_sp_ram #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 177,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (32'(addr) < DEPTH) mem[addr] <= wdata;
      end else begin
        rdata <= (32'(addr) < DEPTH) ? mem[addr] : '0;
      end
    end
  end

endmodule
