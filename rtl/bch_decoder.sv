// bch_decoder: one decoder shared by the whole BCH code group of
// bch_encoder (same M, L_U, T_MAX). It corrects up to t_sel errors in a
// shortened codeword of L = L_U + r(t_sel) bits and returns the L_U
// information bits.
//
// How it works. Three phases run one after the other:
//  1. Load, L cycles: the code bits arrive most significant degree first.
//     Each is shifted into a codeword buffer and folded into the 2*T_MAX
//     syndromes by Horner's rule, S_j <= S_j * alpha^j + bit.
//  2. Key equation, 2 cycles per iteration, t_sel iterations: the
//     inversionless Berlekamp-Massey algorithm in its binary form (one
//     iteration per odd syndrome) finds the error locator Lambda(x). The
//     first cycle forms the discrepancy, the second updates Lambda and B.
//  3. Chien search, L cycles: Lambda(alpha^-p) is evaluated for every code
//     bit position p = 0 .. L-1; a zero flips buffer bit p.
// A block is reported as failed when deg Lambda > t_sel or the number of
// roots found differs from deg Lambda (more errors than the code corrects).
//
// Interface and timing. Pulse `start` with `t_sel` while `busy` is low,
// then give L bits on `in_bit` with `in_valid` (gaps allowed). `done`
// pulses for one cycle 2*t_sel + L + 1 cycles after the last bit; with it
// `data_out`, `fail` and `n_corr` are valid and stay until the next start.
//
// The document asks for one decoder shared by the group and sized for its
// largest code; the algorithms (syndromes, Berlekamp-Massey, Chien) are the
// standard ones and the parallelism chosen here is this design's own.
module bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned M     = 11,
  parameter int unsigned L_U   = 1024,
  parameter int unsigned T_MAX = 106,
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M),
  localparam int unsigned L_MAX = L_U + R_MAX,
  localparam int unsigned TW    = clog2u(T_MAX + 1),
  localparam int unsigned LW    = clog2u(L_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [TW-1:0]  t_sel,
  input  logic           in_valid,
  input  logic           in_bit,
  output logic           busy,
  output logic           done,
  output logic [L_U-1:0] data_out,
  output logic           fail,
  output logic [TW-1:0]  n_corr
);

  typedef logic [M-1:0] el_t;

  function automatic el_t mul(input el_t a, input el_t b);
    return el_t'(gf_mul(gf_t'(a), gf_t'(b), M));
  endfunction

  // Code length of each code, index t.
  logic [LW-1:0] len_rom [T_MAX+1];
  logic [LW-1:0] r_rom   [T_MAX+1];
  for (genvar t = 0; t <= T_MAX; t++) begin : g_len
    localparam int unsigned RT = bch_redundancy(t, M);
    assign len_rom[t] = LW'(L_U + RT);
    assign r_rom[t]   = LW'(RT);
  end

  // Constant multipliers alpha^j (syndromes) and alpha^-i (Chien).
  el_t a_pos [1:2*T_MAX];
  el_t a_neg [0:T_MAX];
  for (genvar j = 1; j <= 2*T_MAX; j++) begin : g_apos
    localparam gf_t AJ = gf_alpha_pow(j, M);
    assign a_pos[j] = AJ[M-1:0];
  end
  for (genvar i = 0; i <= T_MAX; i++) begin : g_aneg
    localparam gf_t AI = gf_alpha_pow((64'd1 << M) - 1 - ((64'd1 * i) % ((64'd1 << M) - 1)), M);
    assign a_neg[i] = AI[M-1:0];
  end

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_DISC, S_UPD, S_CHIEN, S_DONE} state_e;
  state_e state;

  logic [L_MAX-1:0] cw;               // codeword, bit p = coefficient of x^p
  el_t  syn  [2*T_MAX];               // S_1 .. S_2T, consumed two per iteration
  el_t  win  [T_MAX+1];               // win[i] = S_(2k+1-i) at iteration k
  el_t  lam  [T_MAX+1];
  el_t  bpol [T_MAX+1];
  el_t  gam;
  el_t  delta;
  int   kreg;
  logic [TW-1:0] tq;
  logic [TW-1:0] it;
  logic [LW-1:0] len;
  logic [LW-1:0] cnt;
  logic [TW:0]   roots;
  logic [TW:0]   deg;

  // Discrepancy: sum over i of Lambda_i * S_(2k+1-i).
  el_t disc;
  always_comb begin
    disc = '0;
    for (int i = 0; i <= int'(T_MAX); i++) disc = disc ^ mul(lam[i], win[i]);
  end

  // Chien sum and degree of Lambda.
  el_t chien_sum;
  logic [TW:0] lam_deg;
  always_comb begin
    chien_sum = '0;
    lam_deg   = '0;
    for (int i = 0; i <= int'(T_MAX); i++) begin
      chien_sum = chien_sum ^ lam[i];
      if (lam[i] != '0) lam_deg = (TW+1)'(i);
    end
  end

  logic [TW:0] roots_fin;
  assign roots_fin = (chien_sum == '0) ? roots + 1'b1 : roots;

  assign busy     = (state != S_IDLE) && (state != S_DONE);
  assign data_out = L_U'(cw >> r_rom[tq]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cw     <= '0;
      gam    <= '0;
      delta  <= '0;
      kreg   <= 0;
      tq     <= '0;
      it     <= '0;
      len    <= '0;
      cnt    <= '0;
      roots  <= '0;
      deg    <= '0;
      done   <= 1'b0;
      fail   <= 1'b0;
      n_corr <= '0;
      for (int j = 0; j < int'(2*T_MAX); j++) syn[j] <= '0;
      for (int i = 0; i <= int'(T_MAX); i++) begin
        win[i]  <= '0;
        lam[i]  <= '0;
        bpol[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE, S_DONE: if (start) begin
          tq    <= t_sel;
          len   <= len_rom[t_sel];
          cnt   <= '0;
          cw    <= '0;
          for (int j = 0; j < int'(2*T_MAX); j++) syn[j] <= '0;
          state <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          cw <= {cw[L_MAX-2:0], in_bit};
          for (int j = 0; j < int'(2*T_MAX); j++) syn[j] <= mul(syn[j], a_pos[j+1]) ^ el_t'(in_bit);
          if (cnt == len - 1) state <= S_INIT;
          cnt <= cnt + 1'b1;
        end
        S_INIT: begin
          // Lambda = B = 1, window holds S_1.
          for (int i = 0; i <= int'(T_MAX); i++) begin
            win[i]  <= (i == 0) ? syn[0] : '0;
            lam[i]  <= (i == 0) ? el_t'(1) : '0;
            bpol[i] <= (i == 0) ? el_t'(1) : '0;
          end
          gam   <= el_t'(1);
          kreg  <= 0;
          it    <= '0;
          cnt   <= '0;
          roots <= '0;
          state <= (tq == 0) ? S_CHIEN : S_DISC;
        end
        S_DISC: begin
          delta <= disc;
          state <= S_UPD;
        end
        S_UPD: begin
          // Lambda <= gamma*Lambda + delta*x*B
          for (int i = 0; i <= int'(T_MAX); i++)
            lam[i] <= mul(gam, lam[i]) ^ ((i == 0) ? '0 : mul(delta, bpol[i-1]));
          if (delta != '0 && kreg >= 0) begin
            for (int i = 0; i <= int'(T_MAX); i++) bpol[i] <= (i == 0) ? '0 : lam[i-1];
            gam  <= delta;
            kreg <= -kreg;
          end else begin
            for (int i = 0; i <= int'(T_MAX); i++) bpol[i] <= (i < 2) ? '0 : bpol[i-2];
            kreg <= kreg + 2;
          end
          // Next window: shift by two syndromes.
          for (int i = 2; i <= int'(T_MAX); i++) win[i] <= win[i-2];
          win[1] <= syn[1];
          win[0] <= syn[2];
          for (int j = 0; j < int'(2*T_MAX) - 2; j++) syn[j] <= syn[j+2];
          syn[2*T_MAX-2] <= '0;
          syn[2*T_MAX-1] <= '0;
          it <= it + 1'b1;
          if (it + 1'b1 == tq) begin
            state <= S_CHIEN;
            cnt   <= '0;
            roots <= '0;
          end else begin
            state <= S_DISC;
          end
        end
        S_CHIEN: begin
          if (cnt == 0) deg <= lam_deg;
          if (chien_sum == '0) begin
            cw[cnt] <= ~cw[cnt];
            roots   <= roots + 1'b1;
          end
          for (int i = 0; i <= int'(T_MAX); i++) lam[i] <= mul(lam[i], a_neg[i]);
          if (cnt == len - 1) begin
            state <= S_DONE;
            done  <= 1'b1;
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (state == S_CHIEN && cnt == len - 1) begin
        // final root count includes the root (if any) of this last position
        fail   <= (roots_fin != deg) || (deg > (TW+1)'(tq));
        n_corr <= TW'(roots_fin);
      end
    end
  end

endmodule
