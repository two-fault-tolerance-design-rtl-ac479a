// tb_bch_encoder: self-checking test of the shared BCH encoder at its
// default size (GF(2^11), 1024 information bits, t up to 106).
// For several codes of the group it encodes random data and checks that
//  - the stream is L_U + r(t) bits long and starts with the data bits,
//  - the codeword polynomial vanishes at alpha^1 .. alpha^(2t) (evaluated
//    here with plain field arithmetic, independent of the encoder's LFSR),
//  - the block takes exactly t + L_U + r(t) cycles.
// It also checks the redundancy of the largest code of each of the four code
// groups of the reference design: 510, 1023, 2038 and 4095 bits.
module tb_bch_encoder;
  import bch_pkg::*;
  localparam int unsigned M = 11, L_U = 1024, T_MAX = 106;
  localparam int unsigned R_MAX = bch_redundancy(T_MAX, M);
  localparam int unsigned TW = clog2u(T_MAX + 1), RW = clog2u(R_MAX + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [TW-1:0] t_sel;
  logic [L_U-1:0] data;
  logic busy, out_valid, out_bit, out_last;
  logic [RW-1:0] r_len;
  int checks = 0, failures = 0;

  bch_encoder #(.M(M), .L_U(L_U), .T_MAX(T_MAX)) dut (.*);

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

  task automatic run(input int t);
    int cyc, r, n;
    gf_t s, a;
    for (int w = 0; w < int'(L_U); w += 32) data[w +: 32] = $urandom;
    t_sel = TW'(t);
    r = int'(bch_redundancy(t, M));
    cw.delete();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    forever begin
      @(posedge clk);
      if (out_valid) cw.push_back(out_bit);
      if (out_valid && out_last) break;
      cyc++;
    end
    n = cw.size();
    check(n == int'(L_U) + r, $sformatf("t=%0d length %0d expected %0d", t, n, int'(L_U) + r));
    check(cyc == t + int'(L_U) + r, $sformatf("t=%0d took %0d cycles expected %0d", t, cyc, t + int'(L_U) + r));
    for (int i = 0; i < int'(L_U); i++)
      if (cw[i] != data[L_U-1-i]) begin
        check(0, $sformatf("t=%0d data bit %0d not systematic", t, i));
        break;
      end
    // Horner evaluation of c(alpha^j), first bit = highest degree
    for (int j = 1; j <= 2*t; j++) begin
      a = gf_alpha_pow(j, M);
      s = '0;
      for (int i = 0; i < n; i++) s = gf_mul(s, a, M) ^ gf_t'(cw[i]);
      check(s == 0, $sformatf("t=%0d c(alpha^%0d) = %0h", t, j, s));
    end
    @(posedge clk);
    check(!busy, "encoder idle after block");
  endtask

  initial begin
    check(bch_redundancy(57, 10) == 510, "group I r_max");
    check(bch_redundancy(106, 11) == 1023, "group II r_max");
    check(bch_redundancy(198, 12) == 2038, "group III r_max");
    check(bch_redundancy(366, 13) == 4095, "group IV r_max");
    check(R_MAX == 1023, "encoder R_MAX");
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(2);
    run(7);
    run(33);
    run(106);
    run(int'($urandom_range(3, 105)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
