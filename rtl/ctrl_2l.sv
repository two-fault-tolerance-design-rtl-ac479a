// ctrl_2l: block access controller of the two-level hierarchical scheme.
// Every access to a logical block first reads the block's CMOS word
// {valid, head / K_ALIGN, t} and then touches the block's segment in the
// nanodevice array: a write encodes the L_U user bits with the code of
// capability t and stores the L_U + r(t) code bits in consecutive cells from
// the head; a read fetches those cells, has them decoded, and returns the
// corrected user bits.
//
// Interface and timing. Pulse `req` (with `we`, `laddr`, `wdata`) while
// `busy` is low. `ack` pulses when the access ends; for a read `rdata`,
// `rfail` (uncorrectable block or unallocated address) and `rcorr` (errors
// corrected) are then valid. An access to an unallocated address ends with
// `ack` and `rfail` after 3 cycles and touches nothing. A write takes
// t + L + 4 cycles, a read 2t + 2L + 6 (L = L_U + r(t)), one cell per cycle.
// The nanodevice port is one bit wide with a combinational read. The
// encoder and decoder are outside, so that other controllers can share them.
//
// The two-step access (CMOS first, then nanodevice) follows the document;
// the bit-serial cell port and the handshake are this design's choices.
//
// The assertions at the end are switched off during reset with
// `disable iff (!rst_n)`; lint reports rst_n as used both as an asynchronous
// reset and as a sampled signal because of this. It adds no logic.
module ctrl_2l
  import bch_pkg::*;
#(
  parameter int unsigned M       = 11,
  parameter int unsigned L_U     = 1024,
  parameter int unsigned T_MAX   = 106,
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned K_ALIGN = 64,
  localparam int unsigned R_MAX  = bch_redundancy(T_MAX, M),
  localparam int unsigned TW     = clog2u(T_MAX + 1),
  localparam int unsigned AW     = clog2u(N_CELLS + 1),
  localparam int unsigned KW     = clog2u(K_ALIGN),
  localparam int unsigned HW     = clog2u(N_CELLS / K_ALIGN),
  localparam int unsigned NSEG   = N_CELLS / L_U,
  localparam int unsigned SW     = clog2u(NSEG),
  localparam int unsigned CW     = 1 + HW + TW,
  localparam int unsigned LW     = clog2u(L_U + R_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host port
  input  logic           req,
  input  logic           we,
  input  logic [SW-1:0]  laddr,
  input  logic [L_U-1:0] wdata,
  output logic           busy,
  output logic           ack,
  output logic [L_U-1:0] rdata,
  output logic           rfail,
  output logic [TW-1:0]  rcorr,
  // CMOS configuration memory read port (one cycle latency)
  output logic [SW-1:0]  cfg_raddr,
  input  logic [CW-1:0]  cfg_rdata,
  // shared encoder
  output logic           enc_start,
  output logic [TW-1:0]  enc_t,
  output logic [L_U-1:0] enc_data,
  input  logic           enc_valid,
  input  logic           enc_bit,
  input  logic           enc_last,
  // shared decoder
  output logic           dec_start,
  output logic [TW-1:0]  dec_t,
  output logic           dec_valid,
  output logic           dec_bit,
  input  logic           dec_done,
  input  logic [L_U-1:0] dec_data,
  input  logic           dec_fail,
  input  logic [TW-1:0]  dec_corr,
  // nanodevice cell port
  output logic [AW-1:0]  nm_addr,
  output logic           nm_we,
  output logic           nm_wbit,
  input  logic           nm_rbit
);

  logic [LW-1:0] len_rom [T_MAX+1];
  for (genvar t = 0; t <= T_MAX; t++) begin : g_len
    localparam int unsigned RT = bch_redundancy(t, M);
    assign len_rom[t] = LW'(L_U + RT);
  end

  typedef enum logic [2:0] {S_IDLE, S_CFG, S_DISPATCH, S_WRITE, S_RSTART, S_READ, S_RWAIT} state_e;
  state_e state;

  logic           op_we;
  logic [AW-1:0]  base;
  logic [TW-1:0]  tsel;
  logic [LW-1:0]  cnt;
  logic [LW-1:0]  len;
  logic [L_U-1:0] wdata_q;
  logic [SW-1:0]  laddr_q;

  assign busy      = (state != S_IDLE);
  assign enc_t     = tsel;
  assign dec_t     = tsel;
  assign enc_data  = wdata_q;
  assign nm_addr   = base + AW'(cnt);
  assign nm_we     = (state == S_WRITE) && enc_valid;
  assign nm_wbit   = enc_bit;
  assign dec_valid = (state == S_READ);
  assign dec_bit   = nm_rbit;

  assign cfg_raddr = laddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      op_we     <= 1'b0;
      base      <= '0;
      tsel      <= '0;
      cnt       <= '0;
      len       <= '0;
      wdata_q   <= '0;
      laddr_q   <= '0;
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
      case (state)
        S_IDLE: if (req) begin
          op_we   <= we;
          laddr_q <= laddr;
          wdata_q <= wdata;
          state   <= S_CFG;
        end
        S_CFG: state <= S_DISPATCH;   // CMOS read in flight
        S_DISPATCH: begin
          base <= AW'(cfg_rdata[CW-2:TW]) << KW;
          tsel <= cfg_rdata[TW-1:0];
          len  <= len_rom[cfg_rdata[TW-1:0]];
          cnt  <= '0;
          if (!cfg_rdata[CW-1]) begin
            ack   <= 1'b1;
            rfail <= 1'b1;
            rcorr <= '0;
            state <= S_IDLE;
          end else if (op_we) begin
            enc_start <= 1'b1;
            state     <= S_WRITE;
          end else begin
            dec_start <= 1'b1;
            state     <= S_RSTART;
          end
        end
        S_WRITE: if (enc_valid) begin
          cnt <= cnt + 1'b1;
          if (enc_last) begin
            ack   <= 1'b1;
            rfail <= 1'b0;
            state <= S_IDLE;
          end
        end
        S_RSTART: state <= S_READ;    // decoder takes the start pulse
        S_READ: begin
          cnt <= cnt + 1'b1;
          if (cnt == len - 1) state <= S_RWAIT;
        end
        S_RWAIT: if (dec_done) begin
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

  // A request is only taken while idle.
  a_req_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> !busy)
    else $error("ctrl_2l: request while busy");

endmodule
