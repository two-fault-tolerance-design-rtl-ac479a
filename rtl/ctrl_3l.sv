// ctrl_3l: block access controller of the three-level hierarchical scheme.
// An access runs through the three levels of configuration:
//  1. CMOS: read the block's word {valid, record head / K_ALIGN, record code,
//     s} (second-level configuration).
//  2. Nanodevice record: decode the first-level record. The record is a
//     shortened codeword: the decoder is first fed the L_U - (UW+TW+s) zero
//     bits that were dropped when it was written, then the UW+TW+s+r stored
//     bits. The result gives the user segment's head unit, its code t and the
//     usability vector of the s units it spans.
//  3. User segment: the L_U + r(t) code bits live in the usable units only,
//     in order from the head unit; an address walker steps through the cells
//     of a usable unit and jumps over unusable ones in the same cycle. A
//     write encodes and stores the block, a read fetches and decodes it.
// A record that fails to decode ends the access with `rfail`.
//
// Interface and timing: as ctrl_2l (pulse `req` while idle, `ack` at the
// end, one cell per cycle). With L_rec = L_U + r(t_rec) and L = L_U + r(t),
// a read takes 2(L_rec + t_rec) + 2(L + t) + 9 cycles from `req` to `ack`
// and a write 2(L_rec + t_rec) + L + t + 8: the record is always decoded
// first, then the user block is decoded (read) or encoded and stored (write).
//
// The access sequence is the document's; the record layout (head unit, code,
// vector with the head unit in its most significant position) matches
// seg_alloc_3l and is this design's choice.
//
// The assertions at the end are switched off during reset with
// `disable iff (!rst_n)`; lint reports rst_n as used both as an asynchronous
// reset and as a sampled signal because of this. It adds no logic.
module ctrl_3l
  import bch_pkg::*;
#(
  parameter int unsigned M       = 11,
  parameter int unsigned L_U     = 1024,
  parameter int unsigned T_MAX   = 106,
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned K_ALIGN = 64,
  parameter int unsigned L_C     = 64,
  parameter int unsigned S_MAX   = 128,
  localparam int unsigned R_MAX  = bch_redundancy(T_MAX, M),
  localparam int unsigned TW     = clog2u(T_MAX + 1),
  localparam int unsigned AW     = clog2u(N_CELLS + 1),
  localparam int unsigned KW     = clog2u(K_ALIGN),
  localparam int unsigned CLW    = clog2u(L_C),
  localparam int unsigned HW     = clog2u(N_CELLS / K_ALIGN),
  localparam int unsigned NU     = N_CELLS / L_C,
  localparam int unsigned UW     = clog2u(NU),
  localparam int unsigned SCW    = clog2u(S_MAX + 1),
  localparam int unsigned NSEG   = N_CELLS / L_U,
  localparam int unsigned SW     = clog2u(NSEG),
  localparam int unsigned CW     = 1 + HW + TW + SCW,
  localparam int unsigned LW     = clog2u(L_U + R_MAX + 1),
  localparam int unsigned SIW    = clog2u(S_MAX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req,
  input  logic           we,
  input  logic [SW-1:0]  laddr,
  input  logic [L_U-1:0] wdata,
  output logic           busy,
  output logic           ack,
  output logic [L_U-1:0] rdata,
  output logic           rfail,
  output logic [TW-1:0]  rcorr,
  output logic [SW-1:0]  cfg_raddr,
  input  logic [CW-1:0]  cfg_rdata,
  output logic           enc_start,
  output logic [TW-1:0]  enc_t,
  output logic [L_U-1:0] enc_data,
  input  logic           enc_valid,
  input  logic           enc_bit,
  input  logic           enc_last,
  output logic           dec_start,
  output logic [TW-1:0]  dec_t,
  output logic           dec_valid,
  output logic           dec_bit,
  input  logic           dec_done,
  input  logic [L_U-1:0] dec_data,
  input  logic           dec_fail,
  input  logic [TW-1:0]  dec_corr,
  output logic [AW-1:0]  nm_addr,
  output logic           nm_we,
  output logic           nm_wbit,
  input  logic           nm_rbit
);

  localparam int unsigned L1_FIX = UW + TW;

  logic [LW-1:0] r_rom [T_MAX+1];
  for (genvar t = 0; t <= T_MAX; t++) begin : g_r
    localparam int unsigned RT = bch_redundancy(t, M);
    assign r_rom[t] = LW'(RT);
  end

  typedef enum logic [3:0] {
    S_IDLE, S_CFG, S_DISPATCH, S_CSTART, S_CZERO, S_CREAD, S_CWAIT,
    S_UWSTART, S_UWRITE, S_URSTART, S_UREAD, S_UWAIT
  } state_e;
  state_e state;

  logic           op_we;
  logic [SW-1:0]  laddr_q;
  logic [L_U-1:0] wdata_q;
  logic [AW-1:0]  ch;          // record head cell
  logic [TW-1:0]  ct, ut;      // record code, user code
  logic [SCW-1:0] s;
  logic [LW-1:0]  cnt, lim;
  logic [LW-1:0]  zl, rl;      // dropped zeros and stored bits of the record
  logic [UW-1:0]  hu;
  logic [S_MAX-1:0] uvec;      // uvec[j]: unit hu+j is usable
  logic [SIW-1:0] urel;        // current unit, relative to hu
  logic [CLW-1:0] off;         // cell within the unit

  // next usable unit after urel
  logic [SIW-1:0] nxt;
  always_comb begin
    nxt = urel;
    for (int j = int'(S_MAX) - 1; j >= 0; j--)
      if (j > int'(urel) && uvec[j]) nxt = SIW'(j);
  end

  // record fields from the decoded data
  logic [S_MAX-1:0] uvec_dec;
  logic [TW-1:0]    ut_dec;
  logic [UW-1:0]    hu_dec;
  always_comb begin
    for (int j = 0; j < int'(S_MAX); j++)
      uvec_dec[j] = (j < int'(s)) ? dec_data[int'(s) - 1 - j] : 1'b0;
    ut_dec = TW'(dec_data >> s);
    hu_dec = UW'(dec_data >> (TW + int'(s)));
  end

  logic walk_step;
  assign walk_step = ((state == S_UWRITE) && enc_valid) || (state == S_UREAD);

  assign busy      = (state != S_IDLE);
  assign cfg_raddr = laddr_q;
  assign enc_t     = ut;
  assign enc_data  = wdata_q;
  assign dec_t     = (state == S_URSTART || state == S_UREAD || state == S_UWAIT) ? ut : ct;
  assign dec_valid = (state == S_CZERO) || (state == S_CREAD) || (state == S_UREAD);
  assign dec_bit   = (state == S_CZERO) ? 1'b0 : nm_rbit;
  assign nm_addr   = (state == S_CREAD) ? ch + AW'(cnt)
                                        : ((AW'(hu) + AW'(urel)) << CLW) + AW'(off);
  assign nm_we     = (state == S_UWRITE) && enc_valid;
  assign nm_wbit   = enc_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      op_we     <= 1'b0;
      laddr_q   <= '0;
      wdata_q   <= '0;
      ch        <= '0;
      ct        <= '0;
      ut        <= '0;
      s         <= '0;
      cnt       <= '0;
      lim       <= '0;
      zl        <= '0;
      rl        <= '0;
      hu        <= '0;
      uvec      <= '0;
      urel      <= '0;
      off       <= '0;
      ack       <= 1'b0;
      rdata     <= '0;
      rfail     <= 1'b0;
      rcorr     <= '0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
    end else begin
      ack       <= 1'b0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      if (walk_step) begin
        if (off == CLW'(L_C - 1)) begin
          off  <= '0;
          urel <= nxt;
        end else begin
          off <= off + 1'b1;
        end
      end
      case (state)
        S_IDLE: if (req) begin
          op_we   <= we;
          laddr_q <= laddr;
          wdata_q <= wdata;
          state   <= S_CFG;
        end
        S_CFG: state <= S_DISPATCH;
        S_DISPATCH: begin
          ch  <= AW'(cfg_rdata[CW-2 -: HW]) << KW;
          ct  <= cfg_rdata[SCW +: TW];
          s   <= cfg_rdata[SCW-1:0];
          cnt <= '0;
          zl  <= LW'(L_U - L1_FIX) - LW'(cfg_rdata[SCW-1:0]);
          rl  <= LW'(L1_FIX) + LW'(cfg_rdata[SCW-1:0]) + r_rom[cfg_rdata[SCW +: TW]];
          if (!cfg_rdata[CW-1]) begin
            ack   <= 1'b1;
            rfail <= 1'b1;
            rcorr <= '0;
            state <= S_IDLE;
          end else begin
            dec_start <= 1'b1;
            state     <= S_CSTART;
          end
        end
        S_CSTART: state <= (zl == '0) ? S_CREAD : S_CZERO;   // decoder takes start
        // dropped leading zeros of the shortened record codeword
        S_CZERO: begin
          if (cnt == zl - 1) begin
            cnt   <= '0;
            state <= S_CREAD;
          end else cnt <= cnt + 1'b1;
        end
        S_CREAD: begin
          if (cnt == rl - 1) state <= S_CWAIT;
          cnt <= cnt + 1'b1;
        end
        S_CWAIT: if (dec_done) begin
          if (dec_fail) begin
            ack   <= 1'b1;
            rfail <= 1'b1;
            rcorr <= '0;
            state <= S_IDLE;
          end else begin
            hu    <= hu_dec;
            ut    <= ut_dec;
            uvec  <= uvec_dec;
            urel  <= '0;
            off   <= '0;
            cnt   <= '0;
            lim   <= LW'(L_U) + r_rom[ut_dec];
            dec_start <= !op_we;
            state <= op_we ? S_UWSTART : S_URSTART;
          end
        end
        S_UWSTART: begin
          enc_start <= 1'b1;
          state     <= S_UWRITE;
        end
        S_UWRITE: if (enc_valid && enc_last) begin
          ack   <= 1'b1;
          rfail <= 1'b0;
          state <= S_IDLE;
        end
        S_URSTART: state <= S_UREAD;   // decoder takes the start pulse
        S_UREAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == lim - 1) state <= S_UWAIT;
        end
        S_UWAIT: if (dec_done) begin
          ack   <= 1'b1;
          rdata <= dec_data;
          rfail <= dec_fail;
          rcorr <= dec_corr;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> !busy)
    else $error("ctrl_3l: request while busy");

endmodule
