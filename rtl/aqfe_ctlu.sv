// aqfe_ctlu: Control Unit of the AQFE. It coordinates the compute units and
// the single-port RAMs; lanes share every request it makes.
//
// A frame starts when the Input RAM has three complete segments and a new one
// has just completed (seg_done with filled = 3). The quality J and the two
// shift amounts are latched at that moment, so they can be changed between
// frames. The channel groups 0..C/L-1 are then processed one after another:
//
//  Step 1 (integration, 2W+2 cycles per sample n = 0..3N-1):
//    RD    read x[n] of the group from the Input RAM
//    INT   IntU takes x[n]
//    SCAN  2W cycles: X2[n] is written to the Integ RAM in the first; the
//          2W border entries of the SpW0 RAM are read one per cycle and
//          handed to the SpSMU one cycle later (SpW0 read latency).
//  Step 2 (reduction), per wavelet w: 3 cycles read the SpW0 entries 2w and
//    2w+1 (a_1 and a_J; the mirror of a subdivision point a is a_1+a_J-a),
//    then, per output position tau = 0..N-1, 2K+5 cycles (K = J/2):
//      c=0      read end-border product (region 0), RU_LOAD; read SpW1 k=0
//      c=1      read start-border product (region 1), RU_ADDB
//      c=2+2k   read X2[a_k+tau] (RU_INTA); read SpW1 entry k+1
//      c=3+2k   read X2[mirror(a_k)+tau] (RU_INTB)
//      c=2K+4   write the SpRU result over the region-0 border product
//  Hand-over: ch_done stays high until out_release; meanwhile the Output
//    RAM belongs to the downstream reader, which may stall the unit this way.
//
// A segment completing while a frame is being processed means the front end
// overwrites the oldest segment of the window in use: overrun is then set and
// held until reset, and the new frame is run after the current one. The
// whole schedule is this design's own; the architecture only names the unit.
module aqfe_ctlu
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
  localparam int unsigned WW    = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned EW    = B + IDX_W + 1,
  localparam int unsigned KMAX  = JMAX / 2,
  localparam int unsigned KW    = $clog2(KMAX + 1),
  localparam int unsigned S0AW  = $clog2(2 * W),
  localparam int unsigned S1AW  = (KMAX * W > 1) ? $clog2(KMAX * W) : 1,
  localparam int unsigned OAW   = $clog2(2 * N * W),
  localparam int unsigned CW    = $clog2(2 * KMAX + 6)
) (
  input  logic               clk,
  input  logic               rst_n,
  // Input RAM status and read port
  input  logic               seg_done,
  input  logic [1:0]         wr_seg,
  input  logic [1:0]         filled,
  output logic               in_rd_en,
  output logic [GW-1:0]      in_rd_grp,
  output logic [1:0]         in_rd_seg,
  output logic [OW-1:0]      in_rd_off,
  // run-time configuration
  input  logic [5:0]         cfg_j,
  input  logic [5:0]         cfg_smu_shift,
  input  logic [5:0]         cfg_ru_shift,
  // IntU
  output logic               int_en,
  output logic               int_first,
  // Integ RAM
  output logic               integ_en,
  output logic               integ_we,
  output logic [IDX_W-1:0]   integ_addr,
  // SpW0 / SpW1 RAM
  output logic               w0_en,
  output logic [S0AW-1:0]    w0_addr,
  input  logic [EW-1:0]      w0_rdata,
  output logic               w1_en,
  output logic [S1AW-1:0]    w1_addr,
  input  logic [EW-1:0]      w1_rdata,
  // SpSMU
  output logic               smu_valid,
  output logic               smu_start,
  output logic [WW-1:0]      smu_w,
  output logic [IDX_W-1:0]   smu_n,
  output logic [5:0]         smu_shift,
  // SpRU
  output ru_op_e             ru_op,
  output logic signed [B-1:0] ru_coef,
  output logic               ru_sub,
  output logic [5:0]         ru_shift,
  // Output RAM (SpRU side; SpSMU writes are requested by the SpSMU itself)
  output logic               out_en,
  output logic               out_we,
  output logic [OAW-1:0]     out_addr,
  // hand-over to the downstream reader
  output logic               ch_done,
  output logic [GW-1:0]      ch_grp,
  input  logic               out_release,
  // status
  output logic               busy,
  output logic               frame_done,
  output logic               overrun
);

  typedef enum logic [3:0] {
    S_IDLE, S1_RD, S1_INT, S1_SCAN, S2_W0A, S2_W0B, S2_W0C, S2_TAU, S_DONE
  } state_e;

  typedef struct packed {
    logic                sub;
    logic [IDX_W-1:0]    idx;
    logic [IDX_W-1:0]    mirror;
    logic signed [B-1:0] b;
  } coef_t;

  state_e             state;
  logic [GW-1:0]      grp;
  logic [1:0]         base_seg, seg_i;
  logic [OW-1:0]      off;
  logic [IDX_W-1:0]   n;
  logic [S0AW-1:0]    e;
  logic [WW-1:0]      w;
  logic [OW-1:0]      tau;
  logic [CW-1:0]      cyc;
  logic [KW-1:0]      k_num;
  logic [IDX_W-1:0]   a1;
  logic [IDX_W:0]     idx_sum;
  coef_t              coef;
  logic               pending;
  logic               frame_req;
  // SpW0 read tag, delayed to the data cycle
  logic               tag_v;
  logic               tag_start;
  logic [WW-1:0]      tag_w;

  assign frame_req = seg_done && (filled == 2'd3);
  assign busy      = (state != S_IDLE);
  assign ch_done   = (state == S_DONE);
  assign ch_grp    = grp;

  assign smu_valid = tag_v;
  assign smu_start = tag_start;
  assign smu_w     = tag_w;

  // entry fields {ctrl, idx, coef}
  logic [IDX_W-1:0] w0_idx, w1_idx;
  assign w0_idx = w0_rdata[B +: IDX_W];
  assign w1_idx = w1_rdata[B +: IDX_W];

  // per-tau schedule decode
  logic [CW-1:0] c_last;
  logic          c_even;
  logic [CW-1:0] c_half;      // c/2 for even c, (c-1)/2 for odd c
  logic [KW:0]   k_a;         // coefficient index of slot c = 2+2k / 3+2k
  assign c_last = CW'(2 * 32'(k_num) + 4);
  assign c_even = !cyc[0];
  assign c_half = cyc >> 1;
  assign k_a    = (KW+1)'(c_half) - (KW+1)'(1);

  always_comb begin
    in_rd_en   = 1'b0;
    in_rd_grp  = grp;
    in_rd_seg  = base_seg + seg_i;
    in_rd_off  = off;
    int_en     = 1'b0;
    int_first  = (n == '0);
    integ_en   = 1'b0;
    integ_we   = 1'b0;
    integ_addr = n;
    w0_en      = 1'b0;
    w0_addr    = e;
    w1_en      = 1'b0;
    w1_addr    = S1AW'(32'(w) * KMAX + 32'(c_half));
    ru_op      = RU_NONE;
    ru_coef    = coef.b;
    ru_sub     = coef.sub;
    out_en     = 1'b0;
    out_we     = 1'b0;
    out_addr   = OAW'(32'(w) * N + 32'(tau));
    unique case (state)
      S1_RD:  in_rd_en = 1'b1;
      S1_INT: int_en   = 1'b1;
      S1_SCAN: begin
        w0_en = 1'b1;
        if (e == '0) begin
          integ_en = 1'b1;
          integ_we = 1'b1;
        end
      end
      S2_W0A: begin
        w0_en   = 1'b1;
        w0_addr = S0AW'(2 * 32'(w));
      end
      S2_W0B: begin
        w0_en   = 1'b1;
        w0_addr = S0AW'(2 * 32'(w) + 1);
      end
      S2_TAU: begin
        if (c_even && 32'(c_half) < 32'(k_num)) w1_en = 1'b1;
        if (cyc == '0) begin
          out_en = 1'b1;
          ru_op  = RU_LOAD;
        end else if (cyc == CW'(1)) begin
          out_en   = 1'b1;
          out_addr = OAW'((32'(W) + 32'(w)) * N + 32'(tau));
          ru_op    = RU_ADDB;
        end else if (cyc == c_last) begin
          out_en = 1'b1;
          out_we = 1'b1;
        end else if (32'(k_a) < 32'(k_num)) begin
          integ_en = 1'b1;
          if (c_even) begin
            integ_addr = IDX_W'(coef.idx + IDX_W'(tau));
            ru_op      = RU_INTA;
          end else begin
            integ_addr = IDX_W'(coef.mirror + IDX_W'(tau));
            ru_op      = RU_INTB;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      grp        <= '0;
      base_seg   <= '0;
      seg_i      <= '0;
      off        <= '0;
      n          <= '0;
      e          <= '0;
      w          <= '0;
      tau        <= '0;
      cyc        <= '0;
      k_num      <= '0;
      a1         <= '0;
      idx_sum    <= '0;
      coef       <= '0;
      pending    <= 1'b0;
      frame_done <= 1'b0;
      overrun    <= 1'b0;
      smu_n      <= '0;
      smu_shift  <= '0;
      ru_shift   <= '0;
      tag_v      <= 1'b0;
      tag_start  <= 1'b0;
      tag_w      <= '0;
    end else begin
      frame_done <= 1'b0;
      tag_v      <= (state == S1_SCAN);
      tag_start  <= !e[0];
      tag_w      <= WW'(e >> 1);
      if (frame_req) begin
        pending <= 1'b1;
        if (state != S_IDLE) overrun <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (frame_req || pending) begin
            pending   <= 1'b0;
            base_seg  <= wr_seg + 2'd1;
            k_num     <= ((cfg_j >> 1) > 6'(KMAX)) ? KW'(KMAX) : KW'(cfg_j >> 1);
            smu_shift <= cfg_smu_shift;
            ru_shift  <= cfg_ru_shift;
            grp       <= '0;
            n         <= '0;
            seg_i     <= '0;
            off       <= '0;
            state     <= S1_RD;
          end
        end
        S1_RD:  state <= S1_INT;
        S1_INT: begin
          smu_n <= n;
          e     <= '0;
          state <= S1_SCAN;
        end
        S1_SCAN: begin
          if (32'(e) == 2 * W - 1) begin
            if (32'(n) == 3 * N - 1) begin
              w     <= '0;
              state <= S2_W0A;
            end else begin
              n <= n + 1'b1;
              if (32'(off) == N - 1) begin
                off   <= '0;
                seg_i <= seg_i + 2'd1;
              end else begin
                off <= off + 1'b1;
              end
              state <= S1_RD;
            end
          end else begin
            e <= e + 1'b1;
          end
        end
        S2_W0A: state <= S2_W0B;
        S2_W0B: begin
          a1    <= w0_idx;
          state <= S2_W0C;
        end
        S2_W0C: begin
          idx_sum <= {1'b0, a1} + {1'b0, w0_idx};
          tau     <= '0;
          cyc     <= '0;
          state   <= S2_TAU;
        end
        S2_TAU: begin
          // load the coefficient read in the previous (even) cycle
          if (!c_even && 32'(c_half) < 32'(k_num)) begin
            coef.sub    <= w1_rdata[EW-1];
            coef.idx    <= w1_idx;
            coef.mirror <= IDX_W'(idx_sum - (IDX_W+1)'(w1_idx));
            coef.b      <= w1_rdata[B-1:0];
          end
          if (cyc == c_last) begin
            cyc <= '0;
            if (32'(tau) == N - 1) begin
              tau <= '0;
              if (32'(w) == W - 1) begin
                state <= S_DONE;
              end else begin
                w     <= w + 1'b1;
                state <= S2_W0A;
              end
            end else begin
              tau <= tau + 1'b1;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        S_DONE: begin
          if (out_release) begin
            n     <= '0;
            seg_i <= '0;
            off   <= '0;
            if (32'(grp) == G - 1) begin
              grp        <= '0;
              frame_done <= 1'b1;
              state      <= S_IDLE;
            end else begin
              grp   <= grp + 1'b1;
              state <= S1_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Hand-over rule: the reader gives the Output RAM back only while it
  // holds it.
  a_release_in_done: assert property (@(posedge clk) disable iff (!rst_n)
    out_release |-> ch_done)
    else $error("out_release without ch_done");

endmodule
