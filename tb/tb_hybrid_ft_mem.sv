// tb_hybrid_ft_mem: end-to-end test of the fault tolerant hybrid memory at
// its default size (no parameter overrides): a 512 x 512 nanodevice array of
// which 358 x 358 cells survive nanowire exclusion (about (1-0.3)^2 of it),
// bit defect probability 1 %, transient fault rate 1 %, target block error
// rate 1e-15, l_u = 1024, code group on GF(2^11).
//  1. Allocates segments and checks every CMOS word: heads aligned to 64,
//     increasing, segments inside the array and no overlap, and each segment
//     holding at most t - t_trans(l) defective cells.
//  2. Writes random data to every allocated block and reads it all back
//     through the faulty array; every block must return its data.
//  3. Reads an unallocated address (must fail) and a block corrupted far
//     beyond its code (must be flagged as failed).
//  4. Checks the write and read latencies of every access.
// Steps 1 and 2 run twice, at bit defect probabilities of 1 % and 2.5 %.
// A third pass runs the three-level scheme (bit defect probability 3 %,
// transient fault rate 0.1 %): it checks each block's record against the
// defect map (usability bits, unit count, defects covered by both codes,
// placement), writes and reads every block (data and latency) and damages
// one record beyond repair, which must fail the access.
// Mechanisms counted, each must occur: allocation steps 3, 4 and 5, uncoded
// or coded segments, corrected reads, transient flips, unallocated-address
// reads and uncorrectable-block detection.
module tb_hybrid_ft_mem;
  import bch_pkg::*;
  import ft_tb_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106, N_CELLS = 262144, K_ALIGN = 64, TT_SHIFT = 6;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), AW = clog2u(N_CELLS + 1), HW = clog2u(N_CELLS / K_ALIGN);
  localparam int unsigned NSEG = N_CELLS / L_U, SW = clog2u(NSEG), NW = clog2u(NSEG + 1);
  localparam int unsigned TT_BINS = ((L_U + R_MAX) >> TT_SHIFT) + 1, CW = 1 + HW + TW;
  localparam int N_USABLE = 358 * 358;
  localparam real P_TF = 0.01;
  localparam real P_TF3 = 0.001;   // transient fault rate of the three-level pass

  logic clk = 0, rst_n = 0, mode = 0;
  logic alloc_start = 0, alloc_busy, alloc_done;
  logic [AW-1:0] n_cells;
  logic [9:0] ttrans_tab [TT_BINS];
  logic [NW-1:0] n_seg;
  logic req = 0, we = 0, busy, ack, rfail;
  logic [SW-1:0] laddr = '0;
  logic [L_U-1:0] wdata = '0, rdata;
  logic [TW-1:0] rcorr;
  logic [AW-1:0] nm_addr, dq_addr;
  logic nm_we, nm_wbit, nm_rbit, dq_defect;
  logic model_init = 0;
  int unsigned bit_ppm = 10000, tf_ppm = 0;
  int checks = 0, failures = 0;

  hybrid_ft_mem dut (.*);

  nano_array_model #(.N_CELLS(N_CELLS), .AW(AW)) nano (
    .clk, .init(model_init), .bit_ppm, .tf_ppm,
    .nm_addr, .nm_we, .nm_wbit, .nm_rbit, .dq_addr, .dq_defect);

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
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

  // Mechanism counters.
  int n_step3 = 0, n_step4 = 0, n_step5 = 0, n_uncoded = 0, n_coded = 0;
  int n_corrected = 0, n_unalloc = 0, n_uncorrectable = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_alloc.state.name() == "S_EVAL") begin
      if (dut.u_alloc.need <= AW'(dut.u_alloc.tc)) n_step3++;
      else if (dut.u_alloc.need <= AW'(T_MAX)) n_step4++;
    end
    if (dut.u_alloc.state.name() == "S_FINDDEF" && dq_defect) n_step5++;
  end

  // CMOS words as written by the allocator.
  int seg_head [$];
  int seg_t [$];
  always @(posedge clk) if (dut.a2_cfg_we && dut.a2_cfg_wdata[CW-1]) begin
    seg_head.push_back(int'(dut.a2_cfg_wdata[CW-2:TW]) * int'(K_ALIGN));
    seg_t.push_back(int'(dut.a2_cfg_wdata[TW-1:0]));
  end

  function automatic int seg_len(input int t);
    return int'(L_U) + int'(bch_redundancy(t, M));
  endfunction

  task automatic access(input bit w, input int a, input logic [L_U-1:0] d, output int cyc);
    @(negedge clk);
    req = 1; we = w; laddr = SW'(a); wdata = d;
    @(negedge clk);
    req = 0;
    cyc = 1;
    while (!ack) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  logic [L_U-1:0] golden [NSEG];

  // ---------------------------------------------------------------- three-level
  localparam int unsigned L_C = 64, S_MAX = 128, UW = clog2u(N_CELLS / L_C), SCW = clog2u(S_MAX + 1);
  localparam int unsigned CW3 = CW + SCW;
  int n3_skipped = 0, n3_coded_rec = 0, n3_corrected = 0, n3_rec_fail = 0;
  int rec_head [$];
  int rec_t [$];
  int rec_s [$];
  always @(posedge clk) if (dut.a3_cfg_we && dut.a3_cfg_wdata[CW3-1]) begin
    rec_head.push_back(int'(dut.a3_cfg_wdata[CW3-2 -: HW]) * int'(K_ALIGN));
    rec_t.push_back(int'(dut.a3_cfg_wdata[SCW +: TW]));
    rec_s.push_back(int'(dut.a3_cfg_wdata[SCW-1:0]));
  end

  function automatic bit unit_ok(input int u);
    int nd = 0;
    if ((u + 1) * int'(L_C) > N_USABLE) return 0;
    for (int c = u * int'(L_C); c < (u + 1) * int'(L_C); c++) nd += int'(nano.dfct[c]);
    return nd <= int'(L_C) / int'(M);
  endfunction

  task automatic three_level();
    int cyc, hu, ut, s, l1, lrec, lusr, nd, c, cnt, units, prev_end, exp_cyc;
    int user_cells [$];
    int seg_cells [NSEG][$];
    int seg_ut [NSEG];
    mode = 1;
    bit_ppm = 30000;
    tf_ppm = 0;
    for (int b = 0; b < int'(TT_BINS); b++) ttrans_tab[b] = 10'(ttrans_entry(TT_SHIFT, b, P_TF3, 1.0e-15));
    rec_head.delete(); rec_t.delete(); rec_s.delete();
    @(negedge clk) model_init = 1;
    @(negedge clk) model_init = 0;
    $display("three-level: array with %0d defective cells", nano.n_defects);
    @(negedge clk) alloc_start = 1;
    @(negedge clk) alloc_start = 0;
    cyc = 1;
    while (!alloc_done) begin
      @(negedge clk);
      cyc++;
    end
    $display("three-level allocation: %0d blocks (%0d user bits) in %0d cycles", n_seg, int'(n_seg) * int'(L_U), cyc);
    check(n_seg > 0 && int'(n_seg) == rec_head.size(), "three-level block count");
    prev_end = 0;
    for (int i = 0; i < rec_head.size(); i++) begin
      s = rec_s[i];
      l1 = int'(UW) + int'(TW) + s;
      lrec = l1 + int'(bch_redundancy(rec_t[i], M));
      if (rec_t[i] > 0) n3_coded_rec++;
      // the record as written: {head unit, t, vector}, most significant first
      hu = 0; ut = 0;
      for (int b = 0; b < int'(UW); b++) hu = (hu << 1) | int'(nano.store[rec_head[i] + b]);
      for (int b = 0; b < int'(TW); b++) ut = (ut << 1) | int'(nano.store[rec_head[i] + int'(UW) + b]);
      seg_ut[i] = ut;
      check(hu * int'(L_C) >= prev_end, $sformatf("block %0d overlaps earlier data", i));
      for (int k = 0; k < s; k++) begin
        check(nano.store[rec_head[i] + int'(UW) + int'(TW) + k] == unit_ok(hu + k),
              $sformatf("block %0d: usability bit of unit %0d", i, hu + k));
        if (!unit_ok(hu + k)) n3_skipped++;
      end
      // walk the usable cells of the user segment
      lusr = int'(L_U) + int'(bch_redundancy(ut, M));
      nd = 0; cnt = 0; c = hu * int'(L_C);
      seg_cells[i].delete();
      while (cnt < lusr) begin
        if (unit_ok(c / int'(L_C))) begin
          nd += int'(nano.dfct[c]);
          seg_cells[i].push_back(c);
          cnt++;
          c++;
        end else c += int'(L_C);
      end
      units = (c + int'(L_C) - 1) / int'(L_C) - hu;
      check(units == s, $sformatf("block %0d spans %0d units, record says %0d", i, units, s));
      check(nd + t_trans_req(lusr, P_TF3, 1.0e-15) <= ut, $sformatf("block %0d: %0d defects for t=%0d", i, nd, ut));
      check(rec_head[i] >= c && rec_head[i] % int'(K_ALIGN) == 0, $sformatf("record %0d placement", i));
      nd = 0;
      for (int k = 0; k < lrec; k++) nd += int'(nano.dfct[rec_head[i] + k]);
      check(nd + t_trans_req(lrec, P_TF3, 1.0e-15) <= rec_t[i], $sformatf("record %0d: %0d defects for t=%0d", i, nd, rec_t[i]));
      prev_end = rec_head[i] + lrec;
    end
    // write all, read all with transient faults
    for (int a = 0; a < int'(n_seg); a++) begin
      for (int w = 0; w < int'(L_U); w += 32) golden[a][w +: 32] = $urandom;
      access(1, a, golden[a], cyc);
      check(!rfail, $sformatf("three-level write %0d failed", a));
      // systematic code: the first L_U usable cells carry the data
      for (int k = 0; k < int'(L_U); k++)
        if (!nano.dfct[seg_cells[a][k]] && nano.store[seg_cells[a][k]] != golden[a][L_U-1-k]) begin
          check(0, $sformatf("three-level write %0d: cell %0d", a, seg_cells[a][k]));
          break;
        end
    end
    tf_ppm = 1000;
    for (int a = 0; a < int'(n_seg); a++) begin
      access(0, a, '0, cyc);
      check(rdata == golden[a] && !rfail, $sformatf("three-level read %0d: data %s fail %0d", a,
            (rdata == golden[a]) ? "ok" : "wrong", rfail));
      lrec = int'(L_U) + int'(bch_redundancy(rec_t[a], M));
      lusr = int'(L_U) + int'(bch_redundancy(seg_ut[a], M));
      exp_cyc = 2 * lrec + 2 * rec_t[a] + 2 * lusr + 2 * seg_ut[a] + 9;
      check(cyc == exp_cyc, $sformatf("three-level read %0d took %0d cycles, expected %0d", a, cyc, exp_cyc));
      if (rcorr > 0) n3_corrected++;
    end
    // damage the record of block 0 beyond its code
    tf_ppm = 0;
    for (int k = 0; k < 3 * rec_t[0] + 20; k++) nano.store[rec_head[0] + 2 * k] = ~nano.store[rec_head[0] + 2 * k];
    access(0, 0, '0, cyc);
    check(rfail, "damaged record must fail the access");
    if (rfail) n3_rec_fail++;
  endtask
  // bit defect probabilities of the two passes, in parts per million
  localparam int unsigned RATES [2] = '{10000, 25000};

  initial begin
    int cyc, t, l, nd, prev_end, exp_cyc;
    n_cells = AW'(N_USABLE);
    for (int b = 0; b < int'(TT_BINS); b++) ttrans_tab[b] = 10'(ttrans_entry(TT_SHIFT, b, P_TF, 1.0e-15));
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (RATES[ri]) begin
    bit_ppm = RATES[ri];
    tf_ppm = 0;
    seg_head.delete();
    seg_t.delete();
    @(negedge clk) model_init = 1;
    @(negedge clk) model_init = 0;
    $display("array: %0d defective cells of %0d", nano.n_defects, N_CELLS);

    // 1. allocation
    @(negedge clk) alloc_start = 1;
    @(negedge clk) alloc_start = 0;
    cyc = 1;
    while (!alloc_done) begin
      @(negedge clk);
      cyc++;
    end
    $display("allocation: %0d segments (%0d user bits) in %0d cycles", n_seg, int'(n_seg) * int'(L_U), cyc);
    check(n_seg > 0 && int'(n_seg) == seg_head.size(), "segment count");
    prev_end = 0;
    for (int i = 0; i < seg_head.size(); i++) begin
      t = seg_t[i];
      l = seg_len(t);
      nd = 0;
      for (int c = seg_head[i]; c < seg_head[i] + l; c++) nd += int'(nano.dfct[c]);
      if (t == 0) n_uncoded++; else n_coded++;
      check(seg_head[i] % int'(K_ALIGN) == 0, $sformatf("segment %0d head not aligned", i));
      check(seg_head[i] >= prev_end, $sformatf("segment %0d overlaps its predecessor", i));
      check(seg_head[i] + l <= N_USABLE, $sformatf("segment %0d beyond the array", i));
      check(nd + t_trans_req(l, P_TF, 1.0e-15) <= t,
            $sformatf("segment %0d: %0d defects, t=%0d, l=%0d", i, nd, t, l));
      prev_end = seg_head[i] + l;
    end

    // 2. write every block, then read every block back with transients on
    for (int a = 0; a < int'(n_seg); a++) begin
      for (int w = 0; w < int'(L_U); w += 32) golden[a][w +: 32] = $urandom;
      access(1, a, golden[a], cyc);
      exp_cyc = seg_t[a] + seg_len(seg_t[a]) + 4;
      check(cyc == exp_cyc, $sformatf("write %0d took %0d cycles, expected %0d", a, cyc, exp_cyc));
    end
    tf_ppm = 10000;
    for (int a = 0; a < int'(n_seg); a++) begin
      access(0, a, '0, cyc);
      exp_cyc = 2 * seg_t[a] + 2 * seg_len(seg_t[a]) + 6;
      check(rdata == golden[a] && !rfail, $sformatf("read %0d: data %s, fail %0d", a,
            (rdata == golden[a]) ? "ok" : "wrong", rfail));
      check(cyc == exp_cyc, $sformatf("read %0d took %0d cycles, expected %0d", a, cyc, exp_cyc));
      if (rcorr > 0) n_corrected++;
    end
    $display("transient flips drawn: %0d", nano.n_flips);
    end

    // 3. unallocated address and an uncorrectable block
    if (int'(n_seg) < int'(NSEG)) begin
      access(0, int'(n_seg), '0, cyc);
      check(rfail == 1, "unallocated address must fail");
      if (rfail) n_unalloc++;
    end
    tf_ppm = 0;
    t = seg_t[0];
    for (int k = 0; k < 3 * t + 20; k++) nano.store[seg_head[0] + 7 * k] = ~nano.store[seg_head[0] + 7 * k];
    access(0, 0, '0, cyc);
    check(rfail == 1, "block corrupted beyond its code must be flagged");
    if (rfail) n_uncorrectable++;

    // 5. three-level scheme on a denser defect map
    three_level();

    $display("three-level: skipped units=%0d coded records=%0d corrected reads=%0d damaged records=%0d", n3_skipped, n3_coded_rec, n3_corrected, n3_rec_fail);
    $display("mechanisms: step3=%0d step4=%0d step5=%0d uncoded=%0d coded=%0d corrected=%0d flips=%0d unalloc=%0d uncorrectable=%0d",
             n_step3, n_step4, n_step5, n_uncoded, n_coded, n_corrected, nano.n_flips, n_unalloc, n_uncorrectable);
    check(n_step3 > 0, "allocation step 3 occurred");
    check(n_step4 > 0, "allocation step 4 (stronger code) occurred");
    check(n_step5 > 0, "allocation step 5 (head moved past a defect) occurred");
    check(n_coded > 0, "coded segments occurred");
    check(n_corrected > 0, "corrected reads occurred");
    check(nano.n_flips > 0, "transient faults occurred");
    check(n_unalloc > 0, "unallocated-address read occurred");
    check(n_uncorrectable > 0, "uncorrectable block detected");
    check(n3_skipped > 0, "three-level: unusable units skipped inside segments");
    check(n3_coded_rec > 0, "three-level: coded first-level records");
    check(n3_corrected > 0, "three-level: corrected reads");
    check(n3_rec_fail > 0, "three-level: damaged record detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
