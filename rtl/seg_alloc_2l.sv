// seg_alloc_2l: segment locator of the two-level hierarchical scheme.
// Given the defect map of a nanodevice cell array (after defective nanowires
// are removed from its address space) it cuts the array into segments, one per
// logical block, each holding one BCH codeword with just enough redundancy to
// cover the defective cells inside it plus the transient faults expected at
// the target block error rate. For each segment it writes the segment head
// (in units of K_ALIGN cells) and the code designation into CMOS memory.
//
// How it works: two pointers, head and tail, walk the array.
//  1. tail = head + L_U; t_c = 0; l = L_U.
//  2. t_def = defective cells in [head, tail) (counted one cell per cycle
//     through the defect-map port; only newly covered cells are counted);
//     need = t_def + t_trans(l).
//  3. need <= t_c: the segment is located; record it; head = tail rounded up
//     to a multiple of K_ALIGN; go to 1.
//  4. t_c < need <= T_MAX: choose the least-redundancy code correcting need
//     errors (t_c = its full capability, r = its redundancy), extend tail to
//     head + L_U + r, go to 2.
//  5. need > T_MAX: move head just past the first defective cell at or after
//     head, round up to K_ALIGN, go to 1.
// It stops when the tail would pass n_cells or every logical address is used,
// and then writes "invalid" into the remaining CMOS words.
// t_trans(l), the least t with P(more than t transient errors in l bits) <=
// E_target (Eq. (1) of the scheme), depends on the fault rate, which only the
// user knows; it is supplied as a table `ttrans_tab`, entry b holding the
// requirement for lengths up to (b+1)*2^TT_SHIFT - 1.
//
// Interface and timing. Pulse `start`; `busy` stays high until the one-cycle
// `done`, after which `n_seg` holds the number of located segments. The
// defect-map port is combinational: `dq_defect` must answer `dq_addr` in the
// same cycle. A CMOS word is {valid, head / K_ALIGN, t_c}.
//
// The procedure, the alignment of heads to a multiple of K_ALIGN = 64 and the
// sizes (512 x 512 cells, l_u = 1024, code group on GF(2^11)) follow the
// document; the table form of t_trans, cell-serial defect counting and the
// end-of-array rules are this design's choices.
module seg_alloc_2l
  import bch_pkg::*;
#(
  parameter int unsigned M        = 11,
  parameter int unsigned L_U      = 1024,
  parameter int unsigned T_MAX    = 106,
  parameter int unsigned N_CELLS  = 262144,
  parameter int unsigned K_ALIGN  = 64,
  parameter int unsigned TT_SHIFT = 6,
  localparam int unsigned R_MAX   = bch_redundancy(T_MAX, M),
  localparam int unsigned TW      = clog2u(T_MAX + 1),
  localparam int unsigned AW      = clog2u(N_CELLS + 1),
  localparam int unsigned KW      = clog2u(K_ALIGN),
  localparam int unsigned HW      = clog2u(N_CELLS / K_ALIGN),
  localparam int unsigned NSEG    = N_CELLS / L_U,
  localparam int unsigned SW      = clog2u(NSEG),
  localparam int unsigned NW      = clog2u(NSEG + 1),
  localparam int unsigned TT_BINS = ((L_U + R_MAX) >> TT_SHIFT) + 1,
  localparam int unsigned CW      = 1 + HW + TW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [AW-1:0]   n_cells,
  input  logic [9:0]      ttrans_tab [TT_BINS],
  output logic            busy,
  output logic            done,
  output logic [NW-1:0]   n_seg,
  // defect map
  output logic [AW-1:0]   dq_addr,
  input  logic            dq_defect,
  // CMOS configuration memory write port
  output logic            cfg_we,
  output logic [SW-1:0]   cfg_waddr,
  output logic [CW-1:0]   cfg_wdata
);

  // Code tables, index = requested t.
  logic [TW-1:0]   cap_rom [T_MAX+1];
  logic [AW-1:0]   r_rom   [T_MAX+1];
  for (genvar t = 0; t <= T_MAX; t++) begin : g_rom
    localparam int unsigned CAP = (bch_capability(t, M) > T_MAX) ? T_MAX : bch_capability(t, M);
    localparam int unsigned RT  = bch_redundancy(CAP, M);
    assign cap_rom[t] = TW'(CAP);
    assign r_rom[t]   = AW'(RT);
  end

  typedef enum logic [2:0] {S_IDLE, S_STEP1, S_SCAN, S_EVAL, S_FINDDEF, S_FILL} state_e;
  state_e state;

  logic [AW-1:0] head, tail, sp, l;
  logic [AW-1:0] tdef;
  logic [TW-1:0] tc;
  logic [NW-1:0] idx;
  logic [NW-1:0] fp;         // fill pointer for the unused CMOS words

  function automatic logic [AW:0] align_up(input logic [AW:0] a);
    return ((a + (AW+1)'(K_ALIGN - 1)) >> KW) << KW;
  endfunction

  // Step 2: requirement for the current length.
  logic [AW-1:0] need;
  logic [AW-1:0] bin;
  always_comb begin
    bin  = l >> TT_SHIFT;
    if (bin > AW'(TT_BINS - 1)) bin = AW'(TT_BINS - 1);
    need = tdef + AW'(ttrans_tab[clog2u(TT_BINS)'(bin)]);
  end

  logic [AW:0] ext_end;      // head + L_U + r(cap(need)), step 4
  logic [AW:0] head_l1;      // head + L_U, step 1
  logic [AW:0] next_head;    // step 3
  logic [AW:0] skip_head;    // step 5
  logic [TW-1:0] need_t;
  always_comb begin
    need_t    = (need > AW'(T_MAX)) ? TW'(T_MAX) : TW'(need);
    ext_end   = {1'b0, head} + (AW+1)'(L_U) + {1'b0, r_rom[need_t]};
    head_l1   = {1'b0, head} + (AW+1)'(L_U);
    next_head = align_up({1'b0, tail});
    skip_head = align_up({1'b0, sp} + 1'b1);
  end

  assign busy    = (state != S_IDLE);
  assign n_seg   = idx;
  assign dq_addr = sp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      head      <= '0;
      tail      <= '0;
      sp        <= '0;
      l         <= '0;
      tdef      <= '0;
      tc        <= '0;
      idx       <= '0;
      fp        <= '0;
      done      <= 1'b0;
      cfg_we    <= 1'b0;
      cfg_waddr <= '0;
      cfg_wdata <= '0;
    end else begin
      done   <= 1'b0;
      cfg_we <= 1'b0;
      if (state != S_FILL) fp <= idx;
      case (state)
        S_IDLE: if (start) begin
          head  <= '0;
          idx   <= '0;
          state <= S_STEP1;
        end
        S_STEP1: begin
          if (head_l1 > {1'b0, n_cells} || idx == NW'(NSEG)) begin
            state <= S_FILL;
          end else begin
            sp    <= head;
            tail  <= head_l1[AW-1:0];
            tdef  <= '0;
            tc    <= '0;
            l     <= AW'(L_U);
            state <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (dq_defect) tdef <= tdef + 1'b1;
          sp <= sp + 1'b1;
          if (sp + 1'b1 == tail) state <= S_EVAL;
        end
        S_EVAL: begin
          if (need <= AW'(tc)) begin
            // step 3: record segment
            cfg_we    <= 1'b1;
            cfg_waddr <= SW'(idx);
            cfg_wdata <= {1'b1, HW'(head >> KW), tc};
            idx       <= idx + 1'b1;
            fp        <= idx + 1'b1;
            if (next_head >= {1'b0, n_cells}) state <= S_FILL;
            else begin
              head  <= next_head[AW-1:0];
              state <= S_STEP1;
            end
          end else if (need <= AW'(T_MAX)) begin
            // step 4: stronger code, longer segment
            if (ext_end > {1'b0, n_cells}) state <= S_FILL;
            else begin
              tc    <= cap_rom[need_t];
              l     <= AW'(L_U) + r_rom[need_t];
              sp    <= tail;
              tail  <= ext_end[AW-1:0];
              state <= S_SCAN;
            end
          end else if (tdef == '0) begin
            // transient requirement alone exceeds the code group
            state <= S_FILL;
          end else begin
            // step 5
            sp    <= head;
            state <= S_FINDDEF;
          end
        end
        S_FINDDEF: begin
          if (dq_defect) begin
            if (skip_head >= {1'b0, n_cells}) state <= S_FILL;
            else begin
              head  <= skip_head[AW-1:0];
              state <= S_STEP1;
            end
          end else begin
            sp <= sp + 1'b1;
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
