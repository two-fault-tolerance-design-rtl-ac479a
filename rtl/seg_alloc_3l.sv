// seg_alloc_3l: segment locator of the three-level hierarchical scheme.
//
// Idea. A segment no longer has to be a run of consecutive cells: the array
// is cut into indivisible units of L_C cells, and a unit with more than
// floor(L_C / M) defective cells is declared unusable and skipped (fixing one
// more error costs about M parity bits, so such a unit is cheaper to skip than
// to correct). A user segment is the first L usable cells from its head unit.
// What describes it (its head unit, its code, and one usability bit per unit
// it spans: the first-level configuration) is itself stored, BCH coded, in a
// run of consecutive cells placed by the two-level procedure; only the
// location, code and size of that small record (the second-level
// configuration) go to CMOS memory.
//
// How it works.
//  Classify: one pass over the defect map marks each unit usable or not.
//  User segment (steps 1-5): from the head unit, walk cells counting usable
//   cells and their defects until L = L_U (+ r of the chosen code) usable
//   cells are covered; raise the code until t_c >= defects + t_trans(L); if
//   that needs more than T_MAX (or the segment would span more than S_MAX
//   units), move the head to the next usable unit and start again. While
//   walking, the usability bit of each unit entered is shifted into a vector.
//  Record (step 6): the first-level record {head unit, t_c, vector of s bits}
//   (UW + TW + s bits, right-aligned) is placed from the next multiple of
//   K_ALIGN after the segment with the two-level steps 1-5 (t_trans from the
//   same table), encoded by the shared encoder, the leading L_U - (UW+TW+s)
//   zero bits of the codeword dropped (on-the-fly shortening), and written
//   to the nanodevice cells. The CMOS word {valid, record head / K_ALIGN,
//   record code, s} is written, and the next user head is the first usable
//   unit after the record.
//  It stops at the end of the array (n_cells) or when every logical address
//  is used, then writes "invalid" to the remaining CMOS words.
//
// Interface and timing. Pulse `start`; `done` pulses at the end and `n_seg`
// holds the number of blocks. Defect map port as in seg_alloc_2l
// (combinational); one cell per cycle is walked, unusable units are skipped
// in one cycle. The encoder and the nanodevice write port are used only while
// `busy` is high.
//
// From the document: units and the floor(L_C / M) rule, steps 1-6, the
// record contents, the two-level placement of the record with shortened
// codes, CMOS holding the shortening information, and the sizes (L_C = 64 for
// l_u = 1024). This design's choices: the record layout, S_MAX, placing the
// record right after its user segment, and storing s as the shortening data.
module seg_alloc_3l
  import bch_pkg::*;
#(
  parameter int unsigned M        = 11,
  parameter int unsigned L_U      = 1024,
  parameter int unsigned T_MAX    = 106,
  parameter int unsigned N_CELLS  = 262144,
  parameter int unsigned K_ALIGN  = 64,
  parameter int unsigned L_C      = 64,
  parameter int unsigned S_MAX    = 128,
  parameter int unsigned TT_SHIFT = 6,
  localparam int unsigned R_MAX   = bch_redundancy(T_MAX, M),
  localparam int unsigned TW      = clog2u(T_MAX + 1),
  localparam int unsigned AW      = clog2u(N_CELLS + 1),
  localparam int unsigned KW      = clog2u(K_ALIGN),
  localparam int unsigned CLW     = clog2u(L_C),
  localparam int unsigned HW      = clog2u(N_CELLS / K_ALIGN),
  localparam int unsigned NU      = N_CELLS / L_C,
  localparam int unsigned UW      = clog2u(NU),
  localparam int unsigned SCW     = clog2u(S_MAX + 1),
  localparam int unsigned NSEG    = N_CELLS / L_U,
  localparam int unsigned SW      = clog2u(NSEG),
  localparam int unsigned NW      = clog2u(NSEG + 1),
  localparam int unsigned TT_BINS = ((L_U + R_MAX) >> TT_SHIFT) + 1,
  localparam int unsigned CW      = 1 + HW + TW + SCW,
  localparam int unsigned DMAX    = L_C / M   // defects allowed in a usable unit
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [AW-1:0]  n_cells,
  input  logic [9:0]     ttrans_tab [TT_BINS],
  output logic           busy,
  output logic           done,
  output logic [NW-1:0]  n_seg,
  // defect map
  output logic [AW-1:0]  dq_addr,
  input  logic           dq_defect,
  // shared encoder
  output logic           enc_start,
  output logic [TW-1:0]  enc_t,
  output logic [L_U-1:0] enc_data,
  input  logic           enc_valid,
  input  logic           enc_bit,
  input  logic           enc_last,
  // nanodevice write port
  output logic [AW-1:0]  nm_addr,
  output logic           nm_we,
  output logic           nm_wbit,
  // CMOS configuration memory write port
  output logic           cfg_we,
  output logic [SW-1:0]  cfg_waddr,
  output logic [CW-1:0]  cfg_wdata
);

  logic [TW-1:0] cap_rom [T_MAX+1];
  logic [AW-1:0] r_rom   [T_MAX+1];
  for (genvar t = 0; t <= T_MAX; t++) begin : g_rom
    localparam int unsigned CAP = (bch_capability(t, M) > T_MAX) ? T_MAX : bch_capability(t, M);
    localparam int unsigned RT  = bch_redundancy(CAP, M);
    assign cap_rom[t] = TW'(CAP);
    assign r_rom[t]   = AW'(RT);
  end

  typedef enum logic [3:0] {
    S_IDLE, S_CLS, S_NEXTU, S_USTART, S_UWALK, S_UEVAL,
    S_CSTART, S_CSCAN, S_CEVAL, S_CFIND, S_CENC, S_CWRITE, S_FILL
  } state_e;
  state_e state;

  logic [NU-1:0]   usable;
  logic [CLW:0]    ucnt_def;     // defects in the unit being classified
  logic [AW-1:0]   p;            // walking cell pointer
  logic [UW:0]     hu;           // head unit of the user segment
  logic [AW-1:0]   ucells;       // usable cells covered
  logic [AW-1:0]   tdef;
  logic [AW-1:0]   l;
  logic [TW-1:0]   tc;
  logic [SCW:0]    s;            // units entered
  logic [S_MAX-1:0] vec;         // usability bits, first unit in the MSB end
  logic [AW-1:0]   ch, ctail, cl, ctdef;
  logic [TW-1:0]   ctc;
  logic [AW-1:0]   cnt;
  logic [AW-1:0]   drop;
  logic [L_U-1:0]  rec;
  logic [NW-1:0]   idx, fp;

  localparam int unsigned L1_FIX = UW + TW;   // record bits besides the vector

  function automatic logic [AW:0] align_k(input logic [AW:0] a);
    return ((a + (AW+1)'(K_ALIGN - 1)) >> KW) << KW;
  endfunction

  // transient requirement for a length
  function automatic logic [AW-1:0] tt(input logic [AW-1:0] len);
    logic [AW-1:0] b;
    b = len >> TT_SHIFT;
    if (b > AW'(TT_BINS - 1)) b = AW'(TT_BINS - 1);
    return AW'(ttrans_tab[clog2u(TT_BINS)'(b)]);
  endfunction

  logic [AW-1:0] need, cneed;
  logic [TW-1:0] need_t, cneed_t;
  logic [UW-1:0] cur_unit;
  logic          at_unit_start;
  logic [AW:0]   hu_cell;
  always_comb begin
    hu_cell  = (AW+1)'(hu) << CLW;
    need     = tdef + tt(l);
    cneed    = ctdef + tt(cl);
    need_t   = (need > AW'(T_MAX)) ? TW'(T_MAX) : TW'(need);
    cneed_t  = (cneed > AW'(T_MAX)) ? TW'(T_MAX) : TW'(cneed);
    cur_unit = UW'(p >> CLW);
    at_unit_start = (p[CLW-1:0] == '0);
  end

  // first-level record, right-aligned: {hu, tc, vec[s-1:0]}
  logic [L_U-1:0] rec_next;
  always_comb begin
    logic [L_U-1:0] v;
    v = L_U'(vec) & ((L_U'(1) << s) - 1'b1);
    rec_next = (L_U'(hu[UW-1:0]) << (TW + int'(s))) | (L_U'(tc) << s) | v;
  end

  assign busy    = (state != S_IDLE);
  assign n_seg   = idx;
  assign dq_addr = (state == S_CSCAN || state == S_CFIND) ? ch + cnt : p;
  assign enc_t   = ctc;
  assign enc_data = rec;
  assign nm_addr = ch + cnt;
  assign nm_we   = (state == S_CWRITE) && enc_valid && (drop == '0);
  assign nm_wbit = enc_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      usable    <= '0;
      ucnt_def  <= '0;
      p         <= '0;
      hu        <= '0;
      ucells    <= '0;
      tdef      <= '0;
      l         <= '0;
      tc        <= '0;
      s         <= '0;
      vec       <= '0;
      ch        <= '0;
      ctail     <= '0;
      cl        <= '0;
      ctdef     <= '0;
      ctc       <= '0;
      cnt       <= '0;
      drop      <= '0;
      rec       <= '0;
      idx       <= '0;
      fp        <= '0;
      done      <= 1'b0;
      enc_start <= 1'b0;
      cfg_we    <= 1'b0;
      cfg_waddr <= '0;
      cfg_wdata <= '0;
    end else begin
      done      <= 1'b0;
      cfg_we    <= 1'b0;
      enc_start <= 1'b0;
      if (state != S_FILL) fp <= idx;
      case (state)
        S_IDLE: if (start) begin
          p        <= '0;
          ucnt_def <= '0;
          idx      <= '0;
          state    <= S_CLS;
        end
        // classify units: more than DMAX defects, or past the array, is unusable
        S_CLS: begin
          if (p[CLW-1:0] == CLW'(L_C - 1)) begin
            usable[cur_unit] <= ((ucnt_def + (CLW+1)'(dq_defect)) <= (CLW+1)'(DMAX)) &&
                                (p < n_cells);
            ucnt_def <= '0;
          end else begin
            ucnt_def <= ucnt_def + (CLW+1)'(dq_defect);
          end
          p <= p + 1'b1;
          if (p == AW'(N_CELLS - 1)) begin
            hu    <= '0;
            state <= S_NEXTU;
          end
        end
        // find the first usable unit at or after hu
        S_NEXTU: begin
          if (hu >= (UW+1)'(NU) || hu_cell >= {1'b0, n_cells})
            state <= S_FILL;
          else if (usable[hu[UW-1:0]]) state <= S_USTART;
          else hu <= hu + 1'b1;
        end
        // step 1
        S_USTART: begin
          if (idx == NW'(NSEG)) state <= S_FILL;
          else begin
            p      <= AW'(hu) << CLW;
            ucells <= '0;
            tdef   <= '0;
            tc     <= '0;
            l      <= AW'(L_U);
            s      <= '0;
            vec    <= '0;
            state  <= S_UWALK;
          end
        end
        // walk: count usable cells and their defects, skip unusable units
        S_UWALK: begin
          if (p >= n_cells) state <= S_FILL;
          else if (s > (SCW+1)'(S_MAX)) state <= S_UEVAL;
          else if (!usable[cur_unit]) begin
            vec <= {vec[S_MAX-2:0], 1'b0};
            s   <= s + 1'b1;
            p   <= p + AW'(L_C);
          end else begin
            if (at_unit_start) begin
              vec <= {vec[S_MAX-2:0], 1'b1};
              s   <= s + 1'b1;
            end
            if (dq_defect) tdef <= tdef + 1'b1;
            ucells <= ucells + 1'b1;
            p      <= p + 1'b1;
            if (ucells + 1'b1 == l) state <= S_UEVAL;
          end
        end
        // steps 2-5 (tail = p)
        S_UEVAL: begin
          if (s > (SCW+1)'(S_MAX)) begin
            hu    <= hu + 1'b1;
            state <= S_NEXTU;
          end else if (need <= AW'(tc)) begin
            rec   <= rec_next;
            state <= S_CSTART;
          end else if (need <= AW'(T_MAX)) begin
            tc    <= cap_rom[need_t];
            l     <= AW'(L_U) + r_rom[need_t];
            state <= S_UWALK;
          end else begin
            hu    <= hu + 1'b1;
            state <= S_NEXTU;
          end
        end
        // step 6: place the record with the two-level procedure
        S_CSTART: begin
          if (align_k({1'b0, p}) + (AW+1)'(L1_FIX) + (AW+1)'(s) > {1'b0, n_cells}) state <= S_FILL;
          else begin
            ch    <= AW'(align_k({1'b0, p}));
            cl    <= AW'(L1_FIX) + AW'(s);
            ctail <= AW'(L1_FIX) + AW'(s);
            ctc   <= '0;
            ctdef <= '0;
            cnt   <= '0;
            state <= S_CSCAN;
          end
        end
        S_CSCAN: begin
          if (dq_defect) ctdef <= ctdef + 1'b1;
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 == ctail) state <= S_CEVAL;
        end
        S_CEVAL: begin
          if (cneed <= AW'(ctc)) begin
            enc_start <= 1'b1;
            cnt       <= '0;
            drop      <= AW'(L_U) - AW'(L1_FIX) - AW'(s);
            state     <= S_CENC;
          end else if (cneed <= AW'(T_MAX)) begin
            if ({1'b0, ch} + (AW+1)'(L1_FIX) + (AW+1)'(s) + (AW+1)'(r_rom[cneed_t]) > {1'b0, n_cells})
              state <= S_FILL;
            else begin
              ctc   <= cap_rom[cneed_t];
              cl    <= AW'(L1_FIX) + AW'(s) + r_rom[cneed_t];
              ctail <= AW'(L1_FIX) + AW'(s) + r_rom[cneed_t];
              state <= S_CSCAN;
            end
          end else if (ctdef == '0) begin
            state <= S_FILL;
          end else begin
            cnt   <= '0;
            state <= S_CFIND;
          end
        end
        // record step 5: move its head past the first defective cell
        S_CFIND: begin
          if (dq_defect) begin
            if (align_k({1'b0, ch + cnt} + 1'b1) + (AW+1)'(L1_FIX) + (AW+1)'(s) > {1'b0, n_cells})
              state <= S_FILL;
            else begin
              ch    <= AW'(align_k({1'b0, ch + cnt} + 1'b1));
              cl    <= AW'(L1_FIX) + AW'(s);
              ctail <= AW'(L1_FIX) + AW'(s);
              ctc   <= '0;
              ctdef <= '0;
              cnt   <= '0;
              state <= S_CSCAN;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_CENC: state <= S_CWRITE;    // encoder takes the start pulse
        S_CWRITE: if (enc_valid) begin
          if (drop != '0) drop <= drop - 1'b1;
          else cnt <= cnt + 1'b1;
          if (enc_last) begin
            cfg_we    <= 1'b1;
            cfg_waddr <= SW'(idx);
            cfg_wdata <= {1'b1, HW'(ch >> KW), ctc, SCW'(s)};
            idx       <= idx + 1'b1;
            fp        <= idx + 1'b1;
            hu        <= (UW+1)'((ch + cnt + 1'b1 + AW'(L_C - 1)) >> CLW);
            state     <= S_NEXTU;
          end
        end
        S_FILL: begin
          if (fp == NW'(NSEG)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cfg_we    <= 1'b1;
            cfg_waddr <= SW'(fp);
            cfg_wdata <= '0;
            fp        <= fp + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
