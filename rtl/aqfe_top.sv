// aqfe_top: AQFE, an adaptive-quality feature extractor for brain-computer
// interfaces. It computes, for every channel and every wavelet, the N points
// of a continuous wavelet transform with the wavelet replaced by a piecewise
// linear approximation over J subdivision points (PLCWT):
//   S[tau] = psi(a_J) X1[a_J+tau] - psi(a_1) X1[a_1+tau] + sum_i b_i X2[a_i+tau]
// where X1 and X2 are the first and second antiderivatives of the signal.
// J (the quality) is set at run time: fewer points mean fewer cycles and
// less energy per frame.
//
// Structure (one instance per lane of IntU, SpSMU, SpRU; all RAMs shared,
// a word holds L channels):
//   Input RAM  (3+1)N(C/L) x 8L   window of 3N samples + segment being filled
//   Integ RAM  3N x 24L           X2 of the channel group being processed
//   Output RAM 2NW x 32L          border products, then features S[tau]
//   SpW0 RAM   2W x (B+log2(3N)+1) border values psi(a_1), psi(a_J)
//   SpW1 RAM   (JMAX/2)W x (B+log2(3N)+1) reduction coefficients b_i
// The integrator feeds X1 straight to the SpSMU, so X1 is never stored; the
// SpRU later adds its reduction to the border products and writes the result
// over them. The Output RAM therefore holds one channel group's features:
// ch_done announces them, the reader fetches them through out_rd_* and gives
// the RAM back with out_release.
//
// Ports:
//   in_valid/in_ready/in_data   samples, time step by time step, channel
//                               groups 0..C/L-1 within a step, L channels
//                               per word (lane l in bits 8l+7..8l)
//   cfg_we/cfg_sel/cfg_addr/cfg_wdata  coefficient load (sel 0: SpW0,
//                               1: SpW1), taken only while busy = 0; entry
//                               = {ctrl, index, coefficient}
//   cfg_j, cfg_smu_shift, cfg_ru_shift  quality J and the two output shifts,
//                               latched when a frame starts
//   ch_done/ch_grp, out_rd_en/out_rd_addr/out_rd_data, out_release
//                               feature read-out; word w*N+tau holds S[tau]
//                               of wavelet w, one cycle read latency;
//                               out_release only while ch_done is high
//                               (asserted)
//   busy, frame_done, overrun   status
// Sizes (L, C, W, J, B = 17, RAM shapes) follow the architecture; N = 59 is
// the number of samples per 100 ms decision at 590 Hz. Port protocols, the
// coefficient word layout and the schedule are this design's choices.
module aqfe_top
  import aqfe_pkg::*;
#(
  parameter int unsigned L    = 1,
  parameter int unsigned C    = 64,
  parameter int unsigned N    = 59,
  parameter int unsigned W    = 15,
  parameter int unsigned JMAX = 32,
  parameter int unsigned B    = 17,
  localparam int unsigned G     = C / L,
  localparam int unsigned GW    = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned OW    = $clog2(N),
  localparam int unsigned IDX_W = $clog2(3 * N),
  localparam int unsigned X1_W  = $clog2(3 * N) + IN_W + 1,
  localparam int unsigned WW    = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned EW    = B + IDX_W + 1,
  localparam int unsigned KMAX  = JMAX / 2,
  localparam int unsigned S0AW  = $clog2(2 * W),
  localparam int unsigned S1AW  = (KMAX * W > 1) ? $clog2(KMAX * W) : 1,
  localparam int unsigned CAW   = (S0AW > S1AW) ? S0AW : S1AW,
  localparam int unsigned OAW   = $clog2(2 * N * W)
) (
  input  logic               clk,
  input  logic               rst_n,
  // acquisition front end
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [L*IN_W-1:0]  in_data,
  // coefficient load
  input  logic               cfg_we,
  input  logic               cfg_sel,
  input  logic [CAW-1:0]     cfg_addr,
  input  logic [EW-1:0]      cfg_wdata,
  // run-time quality and precision
  input  logic [5:0]         cfg_j,
  input  logic [5:0]         cfg_smu_shift,
  input  logic [5:0]         cfg_ru_shift,
  // feature read-out
  output logic               ch_done,
  output logic [GW-1:0]      ch_grp,
  input  logic               out_rd_en,
  input  logic [OAW-1:0]     out_rd_addr,
  output logic [L*OUT_W-1:0] out_rd_data,
  input  logic               out_release,
  // status
  output logic               busy,
  output logic               frame_done,
  output logic               overrun
);

  // ---------------- Input RAM ----------------
  logic              seg_done;
  logic [1:0]        wr_seg, filled;
  logic              in_rd_en;
  logic [GW-1:0]     in_rd_grp;
  logic [1:0]        in_rd_seg;
  logic [OW-1:0]     in_rd_off;
  logic [L*IN_W-1:0] in_rd_data;

  aqfe_input_buffer #(.L(L), .C(C), .N(N)) u_input_ram (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .rd_en(in_rd_en), .rd_grp(in_rd_grp), .rd_seg(in_rd_seg), .rd_off(in_rd_off),
    .rd_data(in_rd_data),
    .seg_done, .wr_seg, .filled
  );

  // ---------------- CtlU ----------------
  logic                int_en, int_first;
  logic                integ_en, integ_we;
  logic [IDX_W-1:0]    integ_addr;
  logic                w0_en, w1_en;
  logic [S0AW-1:0]     w0_addr;
  logic [S1AW-1:0]     w1_addr;
  logic [EW-1:0]       w0_rdata, w1_rdata;
  logic                smu_valid, smu_start;
  logic [WW-1:0]       smu_w;
  logic [IDX_W-1:0]    smu_n;
  logic [5:0]          smu_shift, ru_shift;
  ru_op_e              ru_op;
  logic signed [B-1:0] ru_coef;
  logic                ru_sub;
  logic                ctl_out_en, ctl_out_we;
  logic [OAW-1:0]      ctl_out_addr;

  aqfe_ctlu #(.L(L), .C(C), .N(N), .W(W), .JMAX(JMAX), .B(B)) u_ctlu (
    .clk, .rst_n,
    .seg_done, .wr_seg, .filled,
    .in_rd_en, .in_rd_grp, .in_rd_seg, .in_rd_off,
    .cfg_j, .cfg_smu_shift, .cfg_ru_shift,
    .int_en, .int_first,
    .integ_en, .integ_we, .integ_addr,
    .w0_en, .w0_addr, .w0_rdata,
    .w1_en, .w1_addr, .w1_rdata,
    .smu_valid, .smu_start, .smu_w, .smu_n, .smu_shift,
    .ru_op, .ru_coef, .ru_sub, .ru_shift,
    .out_en(ctl_out_en), .out_we(ctl_out_we), .out_addr(ctl_out_addr),
    .ch_done, .ch_grp, .out_release,
    .busy, .frame_done, .overrun
  );

  // ---------------- lanes ----------------
  logic [L*X2_W-1:0]   integ_wdata, integ_rdata;
  logic [L*OUT_W-1:0]  out_rdata, smu_wdata, ru_acc;
  logic [L-1:0]        smu_wr_en;
  logic [OAW-1:0]      smu_wr_addr [L];

  for (genvar l = 0; l < L; l++) begin : g_lane
    logic signed [X1_W-1:0] x1h;

    aqfe_intu #(.N(N)) u_intu (
      .clk, .rst_n,
      .en(int_en), .first(int_first),
      .x(in_rd_data[l*IN_W +: IN_W]),
      .x1h(x1h), .x2_word(integ_wdata[l*X2_W +: X2_W])
    );

    aqfe_spsmu #(.B(B), .N(N), .W(W)) u_spsmu (
      .clk, .rst_n,
      .ent_valid(smu_valid),
      .ent_ctrl(w0_rdata[EW-1]),
      .ent_idx(w0_rdata[B +: IDX_W]),
      .ent_coef(w0_rdata[B-1:0]),
      .ent_start(smu_start), .ent_w(smu_w),
      .n(smu_n), .x1h(x1h), .shift(smu_shift),
      .wr_en(smu_wr_en[l]), .wr_addr(smu_wr_addr[l]),
      .wr_data(smu_wdata[l*OUT_W +: OUT_W])
    );

    aqfe_spru #(.B(B)) u_spru (
      .clk, .rst_n,
      .op(ru_op), .coef(ru_coef), .sub(ru_sub), .shift(ru_shift),
      .out_rdata(out_rdata[l*OUT_W +: OUT_W]),
      .integ_rdata(integ_rdata[l*X2_W +: X2_W]),
      .acc(ru_acc[l*OUT_W +: OUT_W])
    );
  end

  // ---------------- Integ RAM ----------------
  aqfe_sp_ram #(.WIDTH(L*X2_W), .DEPTH(3*N)) u_integ_ram (
    .clk, .en(integ_en), .we(integ_we), .addr(integ_addr),
    .wdata(integ_wdata), .rdata(integ_rdata)
  );

  // ---------------- SpW0 / SpW1 RAMs (CtlU while busy, loader otherwise) --
  logic            host_w0, host_w1;
  assign host_w0 = cfg_we && !busy && !cfg_sel;
  assign host_w1 = cfg_we && !busy &&  cfg_sel;

  aqfe_sp_ram #(.WIDTH(EW), .DEPTH(2*W)) u_spw0_ram (
    .clk, .en(w0_en || host_w0), .we(host_w0),
    .addr(host_w0 ? S0AW'(cfg_addr) : w0_addr),
    .wdata(cfg_wdata), .rdata(w0_rdata)
  );

  aqfe_sp_ram #(.WIDTH(EW), .DEPTH(KMAX*W)) u_spw1_ram (
    .clk, .en(w1_en || host_w1), .we(host_w1),
    .addr(host_w1 ? S1AW'(cfg_addr) : w1_addr),
    .wdata(cfg_wdata), .rdata(w1_rdata)
  );

  // ---------------- Output RAM (SpSMU | SpRU | reader) ----------------
  logic           o_en, o_we;
  logic [OAW-1:0] o_addr;
  logic [L*OUT_W-1:0] o_wdata;

  always_comb begin
    if (smu_wr_en[0]) begin
      o_en = 1'b1;  o_we = 1'b1;  o_addr = smu_wr_addr[0];  o_wdata = smu_wdata;
    end else if (ctl_out_en) begin
      o_en = 1'b1;  o_we = ctl_out_we;  o_addr = ctl_out_addr;  o_wdata = ru_acc;
    end else begin
      o_en = out_rd_en && (ch_done || !busy);
      o_we = 1'b0;  o_addr = out_rd_addr;  o_wdata = ru_acc;
    end
  end

  aqfe_sp_ram #(.WIDTH(L*OUT_W), .DEPTH(2*N*W)) u_output_ram (
    .clk, .en(o_en), .we(o_we), .addr(o_addr),
    .wdata(o_wdata), .rdata(out_rdata)
  );

  assign out_rd_data = out_rdata;

  // The schedule never lets the SpSMU and the CtlU use the Output RAM in the
  // same cycle; the priority above only makes the multiplexer complete.
  a_out_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(smu_wr_en[0] && ctl_out_en))
    else $error("SpSMU and CtlU access the Output RAM in the same cycle");

endmodule
