// tb_bch_decoder: self-checking test of the shared BCH decoder at its
// default size (GF(2^11), 1024 information bits, t up to 106).
// Codewords come from bch_encoder; the test flips a random set of e <= t
// code bits and checks that the decoder returns the original data, reports
// e corrections and no failure, and finishes 2t + L + 1 cycles after the
// last code bit. Blocks with far more than t errors must be reported as
// failed or at least must not come back as the original data.
module tb_bch_decoder;
  import bch_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), RW = clog2u(R_MAX + 1);

  logic clk = 0, rst_n = 0;
  logic enc_start = 0, dec_start = 0;
  logic [TW-1:0] t_sel;
  logic [L_U-1:0] data;
  logic enc_busy, out_valid, out_bit, out_last;
  logic [RW-1:0] r_len;
  logic in_valid, in_bit, dec_busy, done, fail;
  logic [L_U-1:0] data_out;
  logic [TW-1:0] n_corr;
  int checks = 0, failures = 0;

  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) enc (
    .clk, .rst_n, .start(enc_start), .t_sel, .data, .busy(enc_busy),
    .out_valid, .out_bit, .out_last, .r_len);
  bch_decoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) dut (
    .clk, .rst_n, .start(dec_start), .t_sel, .in_valid, .in_bit,
    .busy(dec_busy), .done, .data_out, .fail, .n_corr);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  logic cw [$];

  task automatic encode(input int t);
    for (int w = 0; w < int'(L_U); w += 32) data[w +: 32] = $urandom;
    t_sel = TW'(t);
    cw.delete();
    @(negedge clk) enc_start = 1;
    @(negedge clk) enc_start = 0;
    forever begin
      @(posedge clk);
      if (out_valid) cw.push_back(out_bit);
      if (out_valid && out_last) break;
    end
  endtask

  // Flip ne distinct random positions, decode, return result via checks.
  task automatic decode(input int t, input int ne, input bit expect_ok);
    int n, cyc, p;
    bit flip [];
    n = cw.size();
    flip = new[n];
    for (int k = 0; k < ne; k++) begin
      do p = int'($urandom_range(0, n - 1)); while (flip[p]);
      flip[p] = 1;
    end
    @(negedge clk) dec_start = 1;
    @(negedge clk) dec_start = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = 1;
      in_bit = cw[i] ^ flip[i];
      // a gap now and then
      if (i % 97 == 5) begin
        @(negedge clk) in_valid = 0;
      end
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    if (expect_ok) begin
      check(data_out == data, $sformatf("t=%0d e=%0d data not recovered", t, ne));
      check(!fail, $sformatf("t=%0d e=%0d reported failure", t, ne));
      check(int'(n_corr) == ne, $sformatf("t=%0d e=%0d n_corr=%0d", t, ne, n_corr));
      check(cyc == 2*t + n + 1, $sformatf("t=%0d latency %0d expected %0d", t, cyc, 2*t + n + 1));
    end else begin
      check(fail || data_out != data, $sformatf("t=%0d e=%0d silently accepted", t, ne));
    end
  endtask

  initial begin
    in_valid = 0;
    in_bit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    encode(0);   decode(0, 0, 1);
    encode(1);   decode(1, 1, 1);
    encode(1);   decode(1, 0, 1);
    encode(4);   decode(4, 4, 1);
    encode(4);   decode(4, 3, 1);
    encode(17);  decode(17, 17, 1);
    encode(40);  decode(40, 25, 1);
    encode(106); decode(106, 106, 1);
    encode(106); decode(106, 60, 1);
    for (int k = 0; k < 6; k++) begin
      int t;
      t = int'($urandom_range(1, T_MAX));
      encode(t);
      decode(t, int'($urandom_range(0, t)), 1);
    end
    encode(8);   decode(8, 40, 0);
    encode(2);   decode(2, 9, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
