// tb_cmos_config_mem: writes random words to random addresses of the
// configuration memory, keeps a reference copy, and checks every read
// (one cycle latency) against it, including never-written words, which
// must read as zero after reset.
module tb_cmos_config_mem;
  localparam int unsigned DEPTH = 256, WIDTH = 20;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  cmos_config_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (k > 0) begin
        checks++;
        if (rdata !== ref_mem[raddr]) begin
          failures++;
          $display("FAIL addr %0d read %h expected %h", raddr, rdata, ref_mem[raddr]);
        end
      end
      // apply the write of this cycle to the reference after the compare
      if (we) ref_mem[waddr] = wdata;
      we    = ($urandom_range(0, 2) == 0) && (k < 1500);
      waddr = 8'($urandom);
      wdata = WIDTH'($urandom);
      raddr = (k % 3 == 0) ? waddr : 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
