// hybrid_ft_mem: fault tolerant controller for a hybrid CMOS/nanodevice
// memory, with the two-level and the three-level hierarchical schemes.
//
// The nanodevice cell array has far more defective cells than spare rows or
// columns could repair, so defects and transient faults are both handled by
// error correction: each logical block of L_U user bits is stored as one
// codeword of a group of BCH codes over GF(2^M) that share one encoder and
// one decoder, with a code just strong enough for the defects the codeword
// covers plus the expected transient faults.
//  mode 0, two-level: a block occupies consecutive cells; its head and code
//   are kept in CMOS memory (seg_alloc_2l, ctrl_2l).
//  mode 1, three-level: a block occupies the usable 64-cell units from its
//   head; the description of the block is a small coded record in the
//   nanodevice array, and CMOS memory only locates that record
//   (seg_alloc_3l, ctrl_3l).
// The nanodevice array itself (and its interface, which removes defective
// nanowires from the address space) is outside: its one-bit cell port and its
// defect-map port are ports of this module.
//
// Use: choose `mode`, give `n_cells` (usable cells of the array) and the
// transient-fault table `ttrans_tab` (entry b: errors to allow for transient
// faults in a block of up to (b+1)*2^TT_SHIFT - 1 bits), pulse `alloc_start`
// and wait for `alloc_done`; `n_seg` blocks, logical addresses 0 .. n_seg-1,
// are then served by the host port (pulse `req` while `busy` is low, wait
// for `ack`). `mode` must not change between allocation and use, and no
// request may be made while `alloc_busy` is high.
//
// Defaults are the document's: 512 x 512 cells, l_u = 1024, code group II
// on GF(2^11) with t_max = 106 (r_max = 1023), heads aligned to 64 cells,
// units of l_c = 64 cells.
//
// The assertions at the end are switched off during reset with
// `disable iff (!rst_n)`; lint reports rst_n as used both as an asynchronous
// reset and as a sampled signal because of this. It adds no logic.
module hybrid_ft_mem
  import bch_pkg::*;
#(
  parameter int unsigned M        = 11,
  parameter int unsigned L_U      = 1024,
  parameter int unsigned T_MAX    = 106,
  parameter int unsigned N_CELLS  = 262144,
  parameter int unsigned K_ALIGN  = 64,
  parameter int unsigned TT_SHIFT = 6,
  parameter int unsigned L_C      = 64,
  parameter int unsigned S_MAX    = 128,
  localparam int unsigned R_MAX   = bch_redundancy(T_MAX, M),
  localparam int unsigned TW      = clog2u(T_MAX + 1),
  localparam int unsigned AW      = clog2u(N_CELLS + 1),
  localparam int unsigned HW      = clog2u(N_CELLS / K_ALIGN),
  localparam int unsigned NSEG    = N_CELLS / L_U,
  localparam int unsigned SW      = clog2u(NSEG),
  localparam int unsigned NW      = clog2u(NSEG + 1),
  localparam int unsigned TT_BINS = ((L_U + R_MAX) >> TT_SHIFT) + 1,
  localparam int unsigned SCW     = clog2u(S_MAX + 1),
  localparam int unsigned CW      = 1 + HW + TW,
  localparam int unsigned CW3     = 1 + HW + TW + SCW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mode,
  // segment allocation
  input  logic           alloc_start,
  input  logic [AW-1:0]  n_cells,
  input  logic [9:0]     ttrans_tab [TT_BINS],
  output logic           alloc_busy,
  output logic           alloc_done,
  output logic [NW-1:0]  n_seg,
  // host block port
  input  logic           req,
  input  logic           we,
  input  logic [SW-1:0]  laddr,
  input  logic [L_U-1:0] wdata,
  output logic           busy,
  output logic           ack,
  output logic [L_U-1:0] rdata,
  output logic           rfail,
  output logic [TW-1:0]  rcorr,
  // nanodevice array: cell port and defect map
  output logic [AW-1:0]  nm_addr,
  output logic           nm_we,
  output logic           nm_wbit,
  input  logic           nm_rbit,
  output logic [AW-1:0]  dq_addr,
  input  logic           dq_defect
);

  // CMOS configuration memory (one word per logical block)
  logic            cfg_we;
  logic [SW-1:0]   cfg_waddr, cfg_raddr;
  logic [CW3-1:0]  cfg_wdata, cfg_rdata;

  // shared codec
  logic            enc_start, enc_busy, enc_valid, enc_bit, enc_last;
  logic [TW-1:0]   enc_t, dec_t;
  logic [$clog2(R_MAX+1)-1:0] enc_r;
  logic [L_U-1:0]  enc_data, dec_data;
  logic            dec_start, dec_valid, dec_bit, dec_busy, dec_done, dec_fail;
  logic [TW-1:0]   dec_corr;

  // two-level side
  logic            a2_busy, a2_done, a2_cfg_we;
  logic [NW-1:0]   a2_nseg;
  logic [AW-1:0]   a2_dq;
  logic [SW-1:0]   a2_cfg_waddr;
  logic [CW-1:0]   a2_cfg_wdata;
  logic            c2_busy, c2_ack, c2_rfail;
  logic [L_U-1:0]  c2_rdata;
  logic [TW-1:0]   c2_rcorr;
  logic [SW-1:0]   c2_cfg_raddr;
  logic            c2_enc_start, c2_dec_start, c2_dec_valid, c2_dec_bit;
  logic [TW-1:0]   c2_enc_t, c2_dec_t;
  logic [L_U-1:0]  c2_enc_data;
  logic [AW-1:0]   c2_nm_addr;
  logic            c2_nm_we, c2_nm_wbit;

  // three-level side
  logic            a3_busy, a3_done, a3_cfg_we;
  logic [NW-1:0]   a3_nseg;
  logic [AW-1:0]   a3_dq;
  logic [SW-1:0]   a3_cfg_waddr;
  logic [CW3-1:0]  a3_cfg_wdata;
  logic            a3_enc_start;
  logic [TW-1:0]   a3_enc_t;
  logic [L_U-1:0]  a3_enc_data;
  logic [AW-1:0]   a3_nm_addr;
  logic            a3_nm_we, a3_nm_wbit;
  logic            c3_busy, c3_ack, c3_rfail;
  logic [L_U-1:0]  c3_rdata;
  logic [TW-1:0]   c3_rcorr;
  logic [SW-1:0]   c3_cfg_raddr;
  logic            c3_enc_start, c3_dec_start, c3_dec_valid, c3_dec_bit;
  logic [TW-1:0]   c3_enc_t, c3_dec_t;
  logic [L_U-1:0]  c3_enc_data;
  logic [AW-1:0]   c3_nm_addr;
  logic            c3_nm_we, c3_nm_wbit;

  seg_alloc_2l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS),
                 .K_ALIGN(K_ALIGN), .TT_SHIFT(TT_SHIFT)) u_alloc (
    .clk, .rst_n, .start(alloc_start && !mode), .n_cells, .ttrans_tab,
    .busy(a2_busy), .done(a2_done), .n_seg(a2_nseg),
    .dq_addr(a2_dq), .dq_defect,
    .cfg_we(a2_cfg_we), .cfg_waddr(a2_cfg_waddr), .cfg_wdata(a2_cfg_wdata));

  seg_alloc_3l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN),
                 .L_C(L_C), .S_MAX(S_MAX), .TT_SHIFT(TT_SHIFT)) u_alloc3 (
    .clk, .rst_n, .start(alloc_start && mode), .n_cells, .ttrans_tab,
    .busy(a3_busy), .done(a3_done), .n_seg(a3_nseg),
    .dq_addr(a3_dq), .dq_defect,
    .enc_start(a3_enc_start), .enc_t(a3_enc_t), .enc_data(a3_enc_data),
    .enc_valid, .enc_bit, .enc_last,
    .nm_addr(a3_nm_addr), .nm_we(a3_nm_we), .nm_wbit(a3_nm_wbit),
    .cfg_we(a3_cfg_we), .cfg_waddr(a3_cfg_waddr), .cfg_wdata(a3_cfg_wdata));

  // a two-level word sits in the upper bits of the wider CMOS word
  assign cfg_we    = mode ? a3_cfg_we : a2_cfg_we;
  assign cfg_waddr = mode ? a3_cfg_waddr : a2_cfg_waddr;
  assign cfg_wdata = mode ? a3_cfg_wdata : {a2_cfg_wdata, {SCW{1'b0}}};
  assign cfg_raddr = mode ? c3_cfg_raddr : c2_cfg_raddr;

  cmos_config_mem #(.DEPTH(NSEG), .WIDTH(CW3)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .raddr(cfg_raddr), .rdata(cfg_rdata));

  ctrl_2l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN)) u_ctrl (
    .clk, .rst_n, .req(req && !mode), .we, .laddr, .wdata,
    .busy(c2_busy), .ack(c2_ack), .rdata(c2_rdata), .rfail(c2_rfail), .rcorr(c2_rcorr),
    .cfg_raddr(c2_cfg_raddr), .cfg_rdata(cfg_rdata[CW3-1:SCW]),
    .enc_start(c2_enc_start), .enc_t(c2_enc_t), .enc_data(c2_enc_data),
    .enc_valid, .enc_bit, .enc_last,
    .dec_start(c2_dec_start), .dec_t(c2_dec_t), .dec_valid(c2_dec_valid), .dec_bit(c2_dec_bit),
    .dec_done, .dec_data, .dec_fail, .dec_corr,
    .nm_addr(c2_nm_addr), .nm_we(c2_nm_we), .nm_wbit(c2_nm_wbit), .nm_rbit);

  ctrl_3l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN),
            .L_C(L_C), .S_MAX(S_MAX)) u_ctrl3 (
    .clk, .rst_n, .req(req && mode), .we, .laddr, .wdata,
    .busy(c3_busy), .ack(c3_ack), .rdata(c3_rdata), .rfail(c3_rfail), .rcorr(c3_rcorr),
    .cfg_raddr(c3_cfg_raddr), .cfg_rdata,
    .enc_start(c3_enc_start), .enc_t(c3_enc_t), .enc_data(c3_enc_data),
    .enc_valid, .enc_bit, .enc_last,
    .dec_start(c3_dec_start), .dec_t(c3_dec_t), .dec_valid(c3_dec_valid), .dec_bit(c3_dec_bit),
    .dec_done, .dec_data, .dec_fail, .dec_corr,
    .nm_addr(c3_nm_addr), .nm_we(c3_nm_we), .nm_wbit(c3_nm_wbit), .nm_rbit);

  // shared encoder: the three-level allocator writes records while allocating
  always_comb begin
    if (a3_busy) begin
      enc_start = a3_enc_start;
      enc_t     = a3_enc_t;
      enc_data  = a3_enc_data;
    end else if (mode) begin
      enc_start = c3_enc_start;
      enc_t     = c3_enc_t;
      enc_data  = c3_enc_data;
    end else begin
      enc_start = c2_enc_start;
      enc_t     = c2_enc_t;
      enc_data  = c2_enc_data;
    end
  end

  assign dec_start = mode ? c3_dec_start : c2_dec_start;
  assign dec_t     = mode ? c3_dec_t     : c2_dec_t;
  assign dec_valid = mode ? c3_dec_valid : c2_dec_valid;
  assign dec_bit   = mode ? c3_dec_bit   : c2_dec_bit;

  // nanodevice ports
  assign nm_addr = a3_busy ? a3_nm_addr : (mode ? c3_nm_addr : c2_nm_addr);
  assign nm_we   = a3_busy ? a3_nm_we   : (mode ? c3_nm_we   : c2_nm_we);
  assign nm_wbit = a3_busy ? a3_nm_wbit : (mode ? c3_nm_wbit : c2_nm_wbit);
  assign dq_addr = mode ? a3_dq : a2_dq;

  // status and host outputs
  assign alloc_busy = a2_busy || a3_busy;
  assign alloc_done = a2_done || a3_done;
  assign n_seg      = mode ? a3_nseg : a2_nseg;
  assign busy       = c2_busy || c3_busy;
  assign ack        = c2_ack || c3_ack;
  assign rdata      = mode ? c3_rdata : c2_rdata;
  assign rfail      = mode ? c3_rfail : c2_rfail;
  assign rcorr      = mode ? c3_rcorr : c2_rcorr;

  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) u_enc (
    .clk, .rst_n, .start(enc_start), .t_sel(enc_t), .data(enc_data),
    .busy(enc_busy), .out_valid(enc_valid), .out_bit(enc_bit), .out_last(enc_last),
    .r_len(enc_r));

  bch_decoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) u_dec (
    .clk, .rst_n, .start(dec_start), .t_sel(dec_t), .in_valid(dec_valid), .in_bit(dec_bit),
    .busy(dec_busy), .done(dec_done), .data_out(dec_data), .fail(dec_fail), .n_corr(dec_corr));

  // Block accesses and allocation never overlap.
  a_no_access_during_alloc: assert property (@(posedge clk) disable iff (!rst_n) req |-> !alloc_busy)
    else $error("hybrid_ft_mem: host request during segment allocation");
  // the shared codec is started only when it is free, and never asked for
  // more parity than the largest code has
  a_enc_free: assert property (@(posedge clk) disable iff (!rst_n) enc_start |-> !enc_busy)
    else $error("encoder started while busy");
  a_dec_free: assert property (@(posedge clk) disable iff (!rst_n) dec_start |-> !dec_busy)
    else $error("decoder started while busy");
  a_enc_r: assert property (@(posedge clk) disable iff (!rst_n) enc_valid |-> (int'(enc_r) <= int'(R_MAX)))
    else $error("parity length out of range");

endmodule
