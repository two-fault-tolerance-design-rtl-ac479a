// tb_ctrl_3l: tests the three-level access controller with the shared codec
// and a faulty array model (2 % stuck cells). The testbench lays out four
// blocks itself: it picks a usable head unit, walks L_U + r(t) usable cells
// to find the units the segment spans, builds the record {head unit, t,
// usability vector}, encodes it with a separate encoder, drops the leading
// zeros and writes the bits straight into the array, and fills the CMOS
// words {valid, record head / 64, record code, s}. One record is uncoded.
// The controller must then write each block into exactly the usable cells
// (checked cell by cell on the data part), read it back under 0.2 %
// transient faults with the expected latency, fail an unallocated address,
// and fail an access whose record is damaged beyond its code.
module tb_ctrl_3l;
  import bch_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106, N_CELLS = 262144, K_ALIGN = 64;
  localparam int unsigned L_C = 64, S_MAX = 128;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), AW = clog2u(N_CELLS + 1), HW = clog2u(N_CELLS / K_ALIGN);
  localparam int unsigned UW = clog2u(N_CELLS / L_C), SCW = clog2u(S_MAX + 1);
  localparam int unsigned NSEG = N_CELLS / L_U, SW = clog2u(NSEG), CW = 1 + HW + TW + SCW;

  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0, busy, ack, rfail;
  logic [SW-1:0] laddr = '0;
  logic [L_U-1:0] wdata = '0, rdata;
  logic [TW-1:0] rcorr;
  logic [SW-1:0] cfg_raddr;
  logic [CW-1:0] cfg_rdata;
  logic enc_start, enc_valid, enc_bit, enc_last, enc_busy;
  logic [TW-1:0] enc_t, dec_t, dec_corr;
  logic [L_U-1:0] enc_data, dec_data;
  logic [clog2u(R_MAX + 1)-1:0] enc_r, tenc_r;
  logic dec_start, dec_valid, dec_bit, dec_done, dec_fail, dec_busy;
  logic [AW-1:0] nm_addr, dq_addr = '0;
  logic nm_we, nm_wbit, nm_rbit, dq_defect;
  logic model_init = 0;
  int unsigned bit_ppm = 20000, tf_ppm = 0;
  int checks = 0, failures = 0;
  // testbench-side encoder for the records
  logic tenc_start = 0, tenc_busy, tenc_valid, tenc_bit, tenc_last;
  logic [TW-1:0] tenc_t = '0;
  logic [L_U-1:0] tenc_data = '0;

  logic [CW-1:0] cfg [NSEG];
  always_ff @(posedge clk) cfg_rdata <= cfg[cfg_raddr];

  ctrl_3l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN),
            .L_C(L_C), .S_MAX(S_MAX)) dut (.*);
  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) enc (
    .clk, .rst_n, .start(enc_start), .t_sel(enc_t), .data(enc_data), .busy(enc_busy),
    .out_valid(enc_valid), .out_bit(enc_bit), .out_last(enc_last), .r_len(enc_r));
  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) tenc (
    .clk, .rst_n, .start(tenc_start), .t_sel(tenc_t), .data(tenc_data), .busy(tenc_busy),
    .out_valid(tenc_valid), .out_bit(tenc_bit), .out_last(tenc_last), .r_len(tenc_r));
  bch_decoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) dec (
    .clk, .rst_n, .start(dec_start), .t_sel(dec_t), .in_valid(dec_valid), .in_bit(dec_bit),
    .busy(dec_busy), .done(dec_done), .data_out(dec_data), .fail(dec_fail), .n_corr(dec_corr));
  nano_array_model #(.N_CELLS(N_CELLS), .AW(AW)) nano (
    .clk, .init(model_init), .bit_ppm, .tf_ppm,
    .nm_addr, .nm_we, .nm_wbit, .nm_rbit, .dq_addr, .dq_defect);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
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

  function automatic bit unit_ok(input int u);
    int nd = 0;
    for (int c = u * int'(L_C); c < (u + 1) * int'(L_C); c++) nd += int'(nano.dfct[c]);
    return nd <= int'(L_C) / int'(M);
  endfunction

  localparam int NB = 4;
  int start_unit [NB] = '{3, 300, 1700, 4000};
  int ut   [NB] = '{70, 90, 106, 80};
  int rt   [NB] = '{0, 12, 25, 40};
  int rh   [NB];
  int ss   [NB];
  int cells [NB][$];
  logic [L_U-1:0] golden [NB];

  // lay out block i, write its record into the array
  task automatic layout(input int i);
    int hu, c, cnt, lusr, s, l1, k, drop;
    logic [L_U-1:0] rec;
    hu = start_unit[i];
    while (!unit_ok(hu)) hu++;
    lusr = int'(L_U) + int'(bch_redundancy(ut[i], M));
    c = hu * int'(L_C); cnt = 0;
    cells[i].delete();
    rec = '0;
    s = 0;
    while (cnt < lusr) begin
      if (c % int'(L_C) == 0) begin
        rec = (rec << 1) | L_U'(unit_ok(c / int'(L_C)));
        s++;
      end
      if (unit_ok(c / int'(L_C))) begin
        cells[i].push_back(c);
        cnt++;
        c++;
      end else c += int'(L_C);
    end
    ss[i] = s;
    rec = rec | (L_U'(ut[i]) << s) | (L_U'(hu) << (s + int'(TW)));
    l1 = int'(UW) + int'(TW) + s;
    rh[i] = ((c + int'(K_ALIGN) - 1) / int'(K_ALIGN)) * int'(K_ALIGN);
    if (rt[i] == 0)
      for (int q = 0; q < l1; q++) nano.dfct[rh[i] + q] = 0;   // uncoded record needs clean cells
    tenc_t = TW'(rt[i]);
    tenc_data = rec;
    @(negedge clk) tenc_start = 1;
    @(negedge clk) tenc_start = 0;
    drop = int'(L_U) - l1;
    k = 0;
    forever begin
      @(posedge clk);
      if (tenc_valid) begin
        if (drop > 0) drop--;
        else begin
          nano.store[rh[i] + k] = tenc_bit;
          k++;
        end
      end
      if (tenc_valid && tenc_last) break;
    end
    cfg[i] = {1'b1, HW'(rh[i] / int'(K_ALIGN)), TW'(rt[i]), SCW'(s)};
  endtask

  initial begin
    int cyc, bad, skipped, lrec, lusr, exp_cyc;
    for (int i = 0; i < int'(NSEG); i++) cfg[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) model_init = 1;
    @(negedge clk) model_init = 0;
    // make unit start_unit[1]+2 unusable so that a segment skips a unit
    for (int q = 0; q < 8; q++) nano.dfct[(start_unit[1] + 2) * int'(L_C) + 3 * q] = 1;
    skipped = 0;
    for (int i = 0; i < NB; i++) begin
      layout(i);
      for (int k = 1; k < cells[i].size(); k++)
        if (cells[i][k] - cells[i][k-1] > 1) skipped++;
    end
    for (int i = 0; i < NB; i++) begin
      for (int w = 0; w < int'(L_U); w += 32) golden[i][w +: 32] = $urandom;
      access(1, i, golden[i], cyc);
      check(!rfail, $sformatf("write %0d failed", i));
      lrec = int'(L_U) + int'(bch_redundancy(rt[i], M));
      lusr = int'(L_U) + int'(bch_redundancy(ut[i], M));
      exp_cyc = 2 * lrec + 2 * rt[i] + lusr + ut[i] + 8;
      check(cyc == exp_cyc, $sformatf("write %0d took %0d cycles, expected %0d", i, cyc, exp_cyc));
      bad = 0;
      for (int k = 0; k < int'(L_U); k++)
        if (!nano.dfct[cells[i][k]] && nano.store[cells[i][k]] != golden[i][L_U-1-k]) bad++;
      check(bad == 0, $sformatf("write %0d: %0d usable cells differ from the data", i, bad));
    end
    tf_ppm = 2000;
    for (int i = 0; i < NB; i++) begin
      access(0, i, '0, cyc);
      check(rdata == golden[i] && !rfail, $sformatf("read %0d: fail=%0d corr=%0d", i, rfail, rcorr));
      lrec = int'(L_U) + int'(bch_redundancy(rt[i], M));
      lusr = int'(L_U) + int'(bch_redundancy(ut[i], M));
      exp_cyc = 2 * lrec + 2 * rt[i] + 2 * lusr + 2 * ut[i] + 9;
      check(cyc == exp_cyc, $sformatf("read %0d took %0d cycles, expected %0d", i, cyc, exp_cyc));
    end
    tf_ppm = 0;
    access(0, NB, '0, cyc);
    check(rfail && cyc == 3, "unallocated address fails in 3 cycles");
    for (int k = 0; k < 3 * rt[2] + 10; k++) nano.store[rh[2] + 3 * k] = ~nano.store[rh[2] + 3 * k];
    access(0, 2, '0, cyc);
    check(rfail, "damaged record must fail");
    check(skipped > 0, "at least one segment skips an unusable unit");
    $display("record codes 0/12/25/40, units skipped inside segments: %0d", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
