// bch_encoder: one systematic encoder shared by a whole group of shortened
// binary BCH codes over GF(2^M). Every code of the group carries L_U
// information bits; the code is chosen per block by its correction
// capability t_sel (0 means "store uncoded").
//
// How it works. The generator g_t(x) is not stored: a table of T_MAX minimal
// polynomials (of alpha^1, alpha^3, ...; 1 for a non-leader of its coset) is
// computed at elaboration, and on `start` the encoder multiplies them
// together, one per cycle, to build g_t(x) for the requested t. It then
// streams the codeword most significant degree first: the L_U data bits
// (data[L_U-1] first) while a division LFSR forms the remainder
// u(x)x^r mod g_t(x), followed by the r = deg g_t parity bits.
//
// Interface and timing. `start` with `t_sel` and `data` is accepted when
// `busy` is low. t_sel cycles later the first code bit appears on
// `out_bit` with `out_valid`; one bit per cycle follows, L_U + r in all, and
// `out_last` marks the final bit. `r_len` holds r for the block.
//
// The document gives the code group (least redundancy code for each t,
// codes shortened to L_U information bits, one encoder for the group) and the
// default sizes of its code group II (GF(2^11), t_max = 106, r_max = 1023,
// l_u = 1024). Building g_t at run time from minimal polynomials and the bit
// serial datapath are this design's choices.
module bch_encoder
  import bch_pkg::*;
#(
  parameter int unsigned M     = 11,
  parameter int unsigned L_U   = 1024,
  parameter int unsigned T_MAX = 106,
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M),
  localparam int unsigned TW    = clog2u(T_MAX + 1),
  localparam int unsigned RW    = clog2u(R_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [TW-1:0]  t_sel,
  input  logic [L_U-1:0] data,
  output logic           busy,
  output logic           out_valid,
  output logic           out_bit,
  output logic           out_last,
  output logic [RW-1:0]  r_len
);

  // Minimal polynomial table, entry q belongs to alpha^(2q+1).
  logic [M:0] mp_rom [T_MAX];
  for (genvar q = 0; q < T_MAX; q++) begin : g_mp
    localparam logic [GF_MAXW:0] MP = is_leader(2*q + 1, M) ? min_poly(2*q + 1, M) : 17'd1;
    assign mp_rom[q] = MP[M:0];
  end

  // Redundancy of each code, index t.
  logic [RW-1:0] r_rom [T_MAX+1];
  for (genvar t = 0; t <= T_MAX; t++) begin : g_r
    localparam int unsigned RT = bch_redundancy(t, M);
    assign r_rom[t] = RW'(RT);
  end

  typedef enum logic [1:0] {S_IDLE, S_BUILD, S_DATA, S_PAR} state_e;
  state_e          state;
  logic [R_MAX:0]  gen;       // g_t(x), bit i = coefficient of x^i
  logic [R_MAX-1:0] par;      // remainder register
  logic [R_MAX-1:0] mask;     // ones in bits r-1..0
  logic [L_U-1:0]  dsh;       // data, shifted out MSB first
  logic [TW-1:0]   tq;        // minimal polynomials still to multiply in
  logic [TW-1:0]   q;         // next minimal polynomial index
  logic [RW-1:0]   r;
  logic [$clog2(L_U+R_MAX+1)-1:0] cnt;

  // g(x) * mp(x) over GF(2): sum of shifted copies.
  function automatic logic [R_MAX:0] poly_mul(input logic [R_MAX:0] g, input logic [M:0] mp);
    logic [R_MAX:0] acc;
    acc = '0;
    for (int k = 0; k <= int'(M); k++)
      if (mp[k]) acc = acc ^ (g << k);
    return acc;
  endfunction

  logic fb;
  logic par_top;
  always_comb begin
    par_top = (r == 0) ? 1'b0 : par[r - 1];
    fb      = dsh[L_U-1] ^ par_top;
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_DATA) || (state == S_PAR);
  assign out_bit   = (state == S_DATA) ? dsh[L_U-1] : par_top;
  assign out_last  = ((state == S_DATA) && (r == 0) && (int'(cnt) == int'(L_U) - 1)) ||
                     ((state == S_PAR) && (cnt == r - 1));
  assign r_len     = r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      gen   <= '0;
      par   <= '0;
      mask  <= '0;
      dsh   <= '0;
      tq    <= '0;
      q     <= '0;
      r     <= '0;
      cnt   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          gen   <= (R_MAX+1)'(1);
          par   <= '0;
          dsh   <= data;
          tq    <= t_sel;
          q     <= '0;
          r     <= r_rom[t_sel];
          mask  <= (R_MAX)'((({{R_MAX{1'b0}}, 1'b1}) << r_rom[t_sel]) - 1);
          cnt   <= '0;
          state <= (t_sel == 0) ? S_DATA : S_BUILD;
        end
        S_BUILD: begin
          gen <= poly_mul(gen, mp_rom[q]);
          q   <= q + 1'b1;
          if (q + 1'b1 == tq) state <= S_DATA;
        end
        S_DATA: begin
          dsh <= dsh << 1;
          par <= ((par << 1) ^ (fb ? gen[R_MAX-1:0] : '0)) & mask;
          if (int'(cnt) == int'(L_U) - 1) begin
            cnt   <= '0;
            state <= (r == 0) ? S_IDLE : S_PAR;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_PAR: begin
          par <= (par << 1) & mask;
          if (cnt == r - 1) state <= S_IDLE;
          else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
