// aqfe_input_buffer: the Input RAM of the AQFE with its write addressing.
//
// The RAM holds, for every group of L channels, four segments of N samples:
// the three most recent complete segments form the 3N-sample window the
// feature extraction reads, and the fourth receives the N samples arriving
// from the acquisition front end meanwhile. The size (3+1) x N x (C/L) words
// of L x 8 bits and the packing of L consecutive channels into one word are
// those of the architecture; the segment rotation and the write order are
// choices of this design.
//
// Front-end port (valid/ready): samples arrive one time step at a time, all
// channel groups 0..C/L-1 of a time step before the next time step. After the
// N-th time step of a segment, seg_done pulses for one cycle, wr_seg advances
// to the next segment (mod 4) and filled counts complete segments up to 3.
// The window then starts at segment wr_seg+1 (the oldest).
//
// Read port: rd_en with (rd_grp, rd_seg, rd_off) returns rd_data one cycle
// later. The RAM has a single port; reads have priority, in_ready is low in a
// cycle with rd_en, so a front-end write then waits.
module aqfe_input_buffer
  import aqfe_pkg::*;
#(
  parameter int unsigned L = 1,
  parameter int unsigned C = 64,
  parameter int unsigned N = 59,
  localparam int unsigned G     = C / L,
  localparam int unsigned GW    = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned OW    = $clog2(N),
  localparam int unsigned DEPTH = 4 * N * G,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // front end
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [L*IN_W-1:0] in_data,
  // control-unit read port
  input  logic              rd_en,
  input  logic [GW-1:0]     rd_grp,
  input  logic [1:0]        rd_seg,
  input  logic [OW-1:0]     rd_off,
  output logic [L*IN_W-1:0] rd_data,
  // segment status
  output logic              seg_done,
  output logic [1:0]        wr_seg,
  output logic [1:0]        filled
);

  logic [GW-1:0] wr_grp;
  logic [OW-1:0] wr_off;
  logic          wr_fire;
  logic [AW-1:0] ram_addr;

  assign in_ready = !rd_en;
  assign wr_fire  = in_valid && in_ready;

  always_comb begin
    if (rd_en)
      ram_addr = AW'(32'(rd_grp) * 4 * N + 32'(rd_seg) * N + 32'(rd_off));
    else
      ram_addr = AW'(32'(wr_grp) * 4 * N + 32'(wr_seg) * N + 32'(wr_off));
  end

  aqfe_sp_ram #(.WIDTH(L*IN_W), .DEPTH(DEPTH)) u_ram (
    .clk   (clk),
    .en    (rd_en || wr_fire),
    .we    (!rd_en),
    .addr  (ram_addr),
    .wdata (in_data),
    .rdata (rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_grp   <= '0;
      wr_off   <= '0;
      wr_seg   <= '0;
      filled   <= '0;
      seg_done <= 1'b0;
    end else begin
      seg_done <= 1'b0;
      if (wr_fire) begin
        if (32'(wr_grp) == G - 1) begin
          wr_grp <= '0;
          if (32'(wr_off) == N - 1) begin
            wr_off   <= '0;
            wr_seg   <= wr_seg + 2'd1;
            seg_done <= 1'b1;
            if (filled != 2'd3) filled <= filled + 2'd1;
          end else begin
            wr_off <= wr_off + 1'b1;
          end
        end else begin
          wr_grp <= wr_grp + 1'b1;
        end
      end
    end
  end

endmodule
