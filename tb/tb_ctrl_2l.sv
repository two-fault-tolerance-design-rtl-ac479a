// tb_ctrl_2l: tests the two-level access controller with the shared codec,
// a faulty nanodevice array model and a CMOS configuration array held here.
// Segments are placed by hand (different codes, one uncoded block, one
// unallocated address). Each block is written and read back with 0.5 %
// transient faults and 1 % stuck cells; data, failure flag and the access
// latencies (write t + L + 4, read 2t + 2L + 6 cycles) are checked, and the
// written cells are compared with the data bits at head .. head + L_U - 1
// (the code is systematic) for every cell that is not stuck.
module tb_ctrl_2l;
  import bch_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106, N_CELLS = 262144, K_ALIGN = 64;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), AW = clog2u(N_CELLS + 1), HW = clog2u(N_CELLS / K_ALIGN);
  localparam int unsigned NSEG = N_CELLS / L_U, SW = clog2u(NSEG), CW = 1 + HW + TW;

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
  logic [clog2u(R_MAX + 1)-1:0] enc_r;
  logic dec_start, dec_valid, dec_bit, dec_done, dec_fail, dec_busy;
  logic [AW-1:0] nm_addr, dq_addr = '0;
  logic nm_we, nm_wbit, nm_rbit, dq_defect;
  logic model_init = 0;
  int unsigned bit_ppm = 10000, tf_ppm = 0;
  int checks = 0, failures = 0;

  logic [CW-1:0] cfg [NSEG];
  always_ff @(posedge clk) cfg_rdata <= cfg[cfg_raddr];

  ctrl_2l #(.M(M), .L_U(L_U), .T_MAX(T_MAX), .N_CELLS(N_CELLS), .K_ALIGN(K_ALIGN)) dut (.*);
  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) enc (
    .clk, .rst_n, .start(enc_start), .t_sel(enc_t), .data(enc_data), .busy(enc_busy),
    .out_valid(enc_valid), .out_bit(enc_bit), .out_last(enc_last), .r_len(enc_r));
  bch_decoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) dec (
    .clk, .rst_n, .start(dec_start), .t_sel(dec_t), .in_valid(dec_valid), .in_bit(dec_bit),
    .busy(dec_busy), .done(dec_done), .data_out(dec_data), .fail(dec_fail), .n_corr(dec_corr));
  nano_array_model #(.N_CELLS(N_CELLS), .AW(AW)) nano (
    .clk, .init(model_init), .bit_ppm, .tf_ppm,
    .nm_addr, .nm_we, .nm_wbit, .nm_rbit, .dq_addr, .dq_defect);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  localparam int NB = 6;
  int heads [NB] = '{0, 2048, 8192, 20480, 65536, 262144 - 2048};
  int ts    [NB] = '{0, 40, 106, 60, 25, 80};
  logic [L_U-1:0] golden [NB];

  initial begin
    int cyc, l, bad;
    for (int i = 0; i < int'(NSEG); i++) cfg[i] = '0;
    for (int i = 0; i < NB; i++) cfg[i] = {1'b1, HW'(heads[i] / int'(K_ALIGN)), TW'(ts[i])};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) model_init = 1;
    @(negedge clk) model_init = 0;
    // block 0 is uncoded: clear the stuck cells it covers
    for (int c = 0; c < int'(L_U); c++) nano.dfct[c] = 0;
    for (int i = 0; i < NB; i++) begin
      for (int w = 0; w < int'(L_U); w += 32) golden[i][w +: 32] = $urandom;
      access(1, i, golden[i], cyc);
      l = int'(L_U) + int'(bch_redundancy(ts[i], M));
      check(cyc == ts[i] + l + 4, $sformatf("write %0d: %0d cycles, expected %0d", i, cyc, ts[i] + l + 4));
      bad = 0;
      for (int c = 0; c < int'(L_U); c++)
        if (!nano.dfct[heads[i] + c] && nano.store[heads[i] + c] != golden[i][L_U-1-c]) bad++;
      check(bad == 0, $sformatf("write %0d: %0d cells differ from the data bits", i, bad));
    end
    for (int i = 0; i < NB; i++) begin
      tf_ppm = (ts[i] == 0) ? 0 : 5000;
      access(0, i, '0, cyc);
      l = int'(L_U) + int'(bch_redundancy(ts[i], M));
      check(rdata == golden[i] && !rfail, $sformatf("read %0d: data or fail flag wrong (fail=%0d corr=%0d)", i, rfail, rcorr));
      check(cyc == 2 * ts[i] + 2 * l + 6, $sformatf("read %0d: %0d cycles, expected %0d", i, cyc, 2 * ts[i] + 2 * l + 6));
    end
    access(0, NB, '0, cyc);
    check(rfail, "unallocated address must fail");
    check(cyc == 3, $sformatf("unallocated access %0d cycles, expected 3", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
