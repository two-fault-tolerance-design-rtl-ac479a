// tb_seg_alloc_3l: checks the three-level segment locator at its default
// size with the shared encoder and a faulty array model. After allocation
// every CMOS word is checked against the defect map, independently of the
// allocator's own bookkeeping:
//  - the record it points to starts on a multiple of 64 after the previous
//    block and covers no more defects than its code allows (t_trans included),
//  - the record, read from the cells, names a usable head unit and carries
//    the right usability bit for each of the s units the segment spans,
//  - walking L_U + r(t) usable cells from the head unit spans exactly s units
//    and meets no more defects than t - t_trans allows,
//  - the stored record bits plus its parity form a codeword: its syndromes
//    S_1 .. S_2t of the full (unshortened by zeros) word vanish.
// Three runs: bit defect probability 3 % with 0.1 % transients, 5 % with no
// transients, and 3 % with 1 % transients (where most heads must move).
// Skipped units, coded records and moved heads must all occur.
module tb_seg_alloc_3l;
  import bch_pkg::*;
  import ft_tb_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106, N_CELLS = 262144, K_ALIGN = 64;
  localparam int unsigned L_C = 64, S_MAX = 128, TT_SHIFT = 6;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), AW = clog2u(N_CELLS + 1), HW = clog2u(N_CELLS / K_ALIGN);
  localparam int unsigned UW = clog2u(N_CELLS / L_C), SCW = clog2u(S_MAX + 1);
  localparam int unsigned NSEG = N_CELLS / L_U, SW = clog2u(NSEG), NW = clog2u(NSEG + 1);
  localparam int unsigned TT_BINS = ((L_U + R_MAX) >> TT_SHIFT) + 1, CW = 1 + HW + TW + SCW;
  localparam int N_USABLE = 358 * 358;

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] n_cells;
  logic [9:0] ttrans_tab [TT_BINS];
  logic busy, done;
  logic [NW-1:0] n_seg;
  logic [AW-1:0] dq_addr, nm_addr;
  logic dq_defect, nm_we, nm_wbit, nm_rbit;
  logic enc_start, enc_valid, enc_bit, enc_last, enc_busy;
  logic [TW-1:0] enc_t;
  logic [L_U-1:0] enc_data;
  logic [clog2u(R_MAX + 1)-1:0] enc_r;
  logic cfg_we;
  logic [SW-1:0] cfg_waddr;
  logic [CW-1:0] cfg_wdata;
  logic model_init = 0;
  int unsigned bit_ppm = 0, tf_ppm = 0;
  int checks = 0, failures = 0;

  seg_alloc_3l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN),
                 .L_C(L_C), .S_MAX(S_MAX), .TT_SHIFT(TT_SHIFT)) dut (.*);
  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) enc (
    .clk, .rst_n, .start(enc_start), .t_sel(enc_t), .data(enc_data), .busy(enc_busy),
    .out_valid(enc_valid), .out_bit(enc_bit), .out_last(enc_last), .r_len(enc_r));
  nano_array_model #(.N_CELLS(N_CELLS), .AW(AW)) nano (
    .clk, .init(model_init), .bit_ppm, .tf_ppm,
    .nm_addr, .nm_we, .nm_wbit, .nm_rbit, .dq_addr, .dq_defect);

  always #5 clk = ~clk;

  initial begin
    repeat (30000000) @(posedge clk);
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

  int rec_head [$];
  int rec_t [$];
  int rec_s [$];
  int n_words = 0;
  always @(posedge clk) if (cfg_we) begin
    n_words++;
    if (cfg_wdata[CW-1]) begin
      rec_head.push_back(int'(cfg_wdata[CW-2 -: HW]) * int'(K_ALIGN));
      rec_t.push_back(int'(cfg_wdata[SCW +: TW]));
      rec_s.push_back(int'(cfg_wdata[SCW-1:0]));
    end
  end

  function automatic bit unit_ok(input int u);
    int nd = 0;
    if ((u + 1) * int'(L_C) > N_USABLE) return 0;
    for (int c = u * int'(L_C); c < (u + 1) * int'(L_C); c++) nd += int'(nano.dfct[c]);
    return nd <= int'(L_C) / int'(M);
  endfunction

  int n_skipped = 0, n_coded_rec = 0, n_moved = 0;

  task automatic run(input int ppm, input real p_tf);
    int cyc, hu, ut, s, l1, lrec, lusr, nd, c, cnt, units, prev_end, expect_hu;
    gf_t syn, a;
    bit_ppm = ppm;
    for (int b = 0; b < int'(TT_BINS); b++) ttrans_tab[b] = 10'(ttrans_entry(TT_SHIFT, b, p_tf, 1.0e-15));
    rec_head.delete(); rec_t.delete(); rec_s.delete();
    n_words = 0;
    @(negedge clk) model_init = 1;
    @(negedge clk) model_init = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    $display("p_bit %0d ppm: %0d blocks in %0d cycles", ppm, n_seg, cyc);
    check(n_seg > 0 && int'(n_seg) == rec_head.size(), "block count");
    check(n_words == int'(NSEG), "every CMOS word written");
    prev_end = 0;
    expect_hu = 0;
    for (int i = 0; i < rec_head.size(); i++) begin
      s = rec_s[i];
      l1 = int'(UW) + int'(TW) + s;
      lrec = l1 + int'(bch_redundancy(rec_t[i], M));
      if (rec_t[i] > 0) n_coded_rec++;
      hu = 0; ut = 0;
      for (int b = 0; b < int'(UW); b++) hu = (hu << 1) | int'(nano.store[rec_head[i] + b]);
      for (int b = 0; b < int'(TW); b++) ut = (ut << 1) | int'(nano.store[rec_head[i] + int'(UW) + b]);
      while (!unit_ok(expect_hu)) expect_hu++;
      if (hu != expect_hu) n_moved++;
      check(hu * int'(L_C) >= prev_end && unit_ok(hu), $sformatf("block %0d head unit %0d", i, hu));
      for (int k = 0; k < s; k++) begin
        check(nano.store[rec_head[i] + l1 - s + k] == unit_ok(hu + k),
              $sformatf("block %0d: usability bit of unit %0d", i, hu + k));
        if (!unit_ok(hu + k)) n_skipped++;
      end
      lusr = int'(L_U) + int'(bch_redundancy(ut, M));
      nd = 0; cnt = 0; c = hu * int'(L_C);
      while (cnt < lusr) begin
        if (unit_ok(c / int'(L_C))) begin
          nd += int'(nano.dfct[c]);
          cnt++;
          c++;
        end else c += int'(L_C);
      end
      units = (c + int'(L_C) - 1) / int'(L_C) - hu;
      check(units == s, $sformatf("block %0d spans %0d units, record says %0d", i, units, s));
      check(nd + t_trans_req(lusr, p_tf, 1.0e-15) <= ut, $sformatf("block %0d: %0d defects for t=%0d", i, nd, ut));
      check(rec_head[i] >= c && rec_head[i] % int'(K_ALIGN) == 0, $sformatf("record %0d placement", i));
      nd = 0;
      for (int k = 0; k < lrec; k++) nd += int'(nano.dfct[rec_head[i] + k]);
      check(nd + t_trans_req(lrec, p_tf, 1.0e-15) <= rec_t[i], $sformatf("record %0d: %0d defects for t=%0d", i, nd, rec_t[i]));
      for (int j = 1; j <= 2 * rec_t[i]; j++) begin
        a = gf_alpha_pow(j, M);
        syn = '0;
        for (int k = 0; k < lrec; k++) syn = gf_mul(syn, a, M) ^ gf_t'(nano.store[rec_head[i] + k]);
        check(syn == 0, $sformatf("record %0d: syndrome %0d", i, j));
      end
      prev_end = rec_head[i] + lrec;
      expect_hu = (prev_end + int'(L_C) - 1) / int'(L_C);
    end
  endtask

  initial begin
    n_cells = AW'(N_USABLE);
    for (int b = 0; b < int'(TT_BINS); b++) ttrans_tab[b] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(30000, 0.001);
    run(50000, 0.0);
    run(30000, 0.01);
    $display("skipped units %0d, coded records %0d, moved heads %0d", n_skipped, n_coded_rec, n_moved);
    check(n_skipped > 0, "unusable units skipped");
    check(n_coded_rec > 0, "coded records");
    check(n_moved > 0, "head moved past an unfit region (step 5)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
