// cmos_config_mem: the CMOS-side configuration memory of the hybrid memory.
// One word per logical block address. In the two-level scheme a word holds
// the location of the block's segment in the nanodevice array and the
// designation of its BCH code; in the three-level scheme it holds the same
// kind of record for the block's coded configuration segment.
//
// A plain register-array RAM: one synchronous write port and one read port
// with a registered output (data one cycle after the address). Contents are
// cleared by reset, so an unallocated address reads as an invalid (all
// zero) word. The document places this information in CMOS memory; the
// organisation (one word per logical address, one write and one read port)
// is this design's choice.
module cmos_config_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 20,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end

endmodule
