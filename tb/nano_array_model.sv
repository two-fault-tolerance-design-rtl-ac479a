// nano_array_model: behavioural model of a nanodevice crossbar cell array
// as seen after defective nanowires have been removed from its address space
// (a linear space of N_CELLS cells). Testbench only, not synthesizable.
//
// Fault model: on `init` every cell becomes an open (stuck) defect with
// probability bit_ppm / 10^6; a defective cell ignores writes and always
// reads a fixed random value. Every read of any cell is flipped with
// probability tf_ppm / 10^6 (transient fault). The defect-map port
// (dq_addr / dq_defect) reports the stuck cells, as a test of the array
// would. Both read ports are combinational; writes happen at the clock edge.
// The transient flip of a read is drawn once per clock cycle.
module nano_array_model #(
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic          init,
  input  int unsigned   bit_ppm,
  input  int unsigned   tf_ppm,
  input  logic [AW-1:0] nm_addr,
  input  logic          nm_we,
  input  logic          nm_wbit,
  output logic          nm_rbit,
  input  logic [AW-1:0] dq_addr,
  output logic          dq_defect
);
  bit store [N_CELLS];
  bit dfct  [N_CELLS];
  bit stuck [N_CELLS];
  bit flip;
  int unsigned n_defects;
  int unsigned n_flips;

  initial begin
    flip = 0;
    n_flips = 0;
    n_defects = 0;
    for (int i = 0; i < int'(N_CELLS); i++) begin
      store[i] = 0;
      dfct[i] = 0;
      stuck[i] = 0;
    end
  end

  always @(posedge clk) begin
    if (init) begin
      n_defects = 0;
      for (int i = 0; i < int'(N_CELLS); i++) begin
        dfct[i]  = ($urandom_range(0, 999999) < bit_ppm);
        stuck[i] = 1'($urandom);
        store[i]  = 1'($urandom);
        n_defects += dfct[i];
      end
    end else if (nm_we && nm_addr < AW'(N_CELLS)) begin
      store[nm_addr] = nm_wbit;
    end
    flip = ($urandom_range(0, 999999) < tf_ppm);
    if (flip) n_flips++;
  end

  always_comb begin
    if (nm_addr >= AW'(N_CELLS)) nm_rbit = 1'b0;
    else nm_rbit = (dfct[nm_addr] ? stuck[nm_addr] : store[nm_addr]) ^ flip;
    dq_defect = (dq_addr < AW'(N_CELLS)) ? dfct[dq_addr] : 1'b0;
  end
endmodule
