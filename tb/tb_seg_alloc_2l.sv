// tb_seg_alloc_2l: checks the two-level segment locator at its default size
// (512 x 512 cells, l_u = 1024, code group on GF(2^11), heads aligned to 64).
// The testbench draws a random defect map, computes the transient-fault
// table from the binomial tail bound, runs the allocator, and compares every
// CMOS word it writes with a reference run of the same procedure written
// here in plain behavioural code. Several scenarios are run (bit defect
// probabilities 1 %, 3 %, 6 %, transient fault rates 0 and 1 %, fewer
// usable cells), so that step 3 (segment located), step 4 (stronger code)
// and step 5 (head moved past a defect) all occur; each is counted and must
// have happened.
module tb_seg_alloc_2l;
  import bch_pkg::*;
  import ft_tb_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106, N_CELLS = 262144, K_ALIGN = 64, TT_SHIFT = 6;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), AW = clog2u(N_CELLS + 1), HW = clog2u(N_CELLS / K_ALIGN);
  localparam int unsigned NSEG = N_CELLS / L_U, SW = clog2u(NSEG), NW = clog2u(NSEG + 1);
  localparam int unsigned TT_BINS = ((L_U + R_MAX) >> TT_SHIFT) + 1, CW = 1 + HW + TW;
  localparam real E_TARGET = 1.0e-15;

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] n_cells;
  logic [9:0] ttrans_tab [TT_BINS];
  logic busy, done;
  logic [NW-1:0] n_seg;
  logic [AW-1:0] dq_addr;
  logic dq_defect;
  logic cfg_we;
  logic [SW-1:0] cfg_waddr;
  logic [CW-1:0] cfg_wdata;
  int checks = 0, failures = 0;

  bit defect [N_CELLS];
  assign dq_defect = (dq_addr < AW'(N_CELLS)) ? defect[dq_addr] : 1'b0;

  seg_alloc_2l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN), .TT_SHIFT(TT_SHIFT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference procedure.
  int ref_head [$];
  int ref_t [$];
  int n_step3, n_step4, n_step5;

  function automatic int tt_of(input int l);
    int b;
    b = l >> TT_SHIFT;
    if (b > int'(TT_BINS) - 1) b = int'(TT_BINS) - 1;
    return int'(ttrans_tab[b]);
  endfunction

  function automatic int alignk(input int a);
    return ((a + int'(K_ALIGN) - 1) / int'(K_ALIGN)) * int'(K_ALIGN);
  endfunction

  task automatic reference(input int n);
    int head, tail, tdef, tc, need, l, p, cap;
    ref_head.delete();
    ref_t.delete();
    head = 0;
    while (head + int'(L_U) <= n && ref_head.size() < int'(NSEG)) begin
      tail = head + int'(L_U);
      tc = 0;
      l = int'(L_U);
      forever begin
        tdef = 0;
        for (int i = head; i < tail; i++) tdef += int'(defect[i]);
        need = tdef + tt_of(l);
        if (need <= tc) begin
          ref_head.push_back(head);
          ref_t.push_back(tc);
          n_step3++;
          head = alignk(tail);
          break;
        end else if (need <= int'(T_MAX)) begin
          n_step4++;
          cap = int'(bch_capability(need, M));
          if (cap > int'(T_MAX)) cap = int'(T_MAX);
          tc = cap;
          l = int'(L_U) + int'(bch_redundancy(cap, M));
          tail = head + l;
          if (tail > n) return;
        end else begin
          if (tdef == 0) return;
          n_step5++;
          p = head;
          while (!defect[p]) p++;
          head = alignk(p + 1);
          break;
        end
      end
    end
  endtask

  int wr_head [$];
  int wr_t [$];
  int wr_valid [$];
  always @(posedge clk) if (cfg_we) begin
    wr_valid.push_back(int'(cfg_wdata[CW-1]));
    wr_head.push_back(int'(cfg_wdata[CW-2:TW]) * int'(K_ALIGN));
    wr_t.push_back(int'(cfg_wdata[TW-1:0]));
  end

  task automatic scenario(input int bit_ppm, input real p_tf, input int n);
    int cyc;
    for (int i = 0; i < int'(N_CELLS); i++) defect[i] = ($urandom_range(0, 999999) < bit_ppm);
    for (int b = 0; b < int'(TT_BINS); b++) ttrans_tab[b] = 10'(ttrans_entry(TT_SHIFT, b, p_tf, E_TARGET));
    n_cells = AW'(n);
    reference(n);
    wr_head.delete(); wr_t.delete(); wr_valid.delete();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    $display("p_bit=%0d ppm p_tf=%f n=%0d: %0d segments (reference %0d), %0d cycles",
             bit_ppm, p_tf, n, n_seg, ref_head.size(), cyc);
    check(int'(n_seg) == ref_head.size(), "segment count");
    check(wr_head.size() == int'(NSEG), "every CMOS word written");
    for (int i = 0; i < ref_head.size() && i < wr_head.size(); i++) begin
      check(wr_valid[i] == 1 && wr_head[i] == ref_head[i] && wr_t[i] == ref_t[i],
            $sformatf("segment %0d: dut head %0d t %0d, ref head %0d t %0d",
                      i, wr_head[i], wr_t[i], ref_head[i], ref_t[i]));
    end
    for (int i = ref_head.size(); i < wr_head.size(); i++)
      check(wr_valid[i] == 0, $sformatf("word %0d should be invalid", i));
  endtask

  initial begin
    n_step3 = 0; n_step4 = 0; n_step5 = 0;
    for (int b = 0; b < int'(TT_BINS); b++) ttrans_tab[b] = '0;
    n_cells = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    scenario(0, 0.0, 183184);         // no defects, no transients: uncoded blocks
    scenario(10000, 0.01, 131044);    // p_bit 1 %, p_tf 1 %, (1-0.3)^2 of the array
    scenario(30000, 0.0, 131044);
    scenario(60000, 0.01, 262144);
    $display("steps: 3 -> %0d, 4 -> %0d, 5 -> %0d", n_step3, n_step4, n_step5);
    check(n_step3 > 0, "step 3 happened");
    check(n_step4 > 0, "step 4 happened");
    check(n_step5 > 0, "step 5 happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
