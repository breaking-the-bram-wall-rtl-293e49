// grid_bram: one node's partition of the pre-computed energy grids, held in
// on-chip block RAM.
//
// A simple dual-port RAM of DEPTH 18-bit words: one write port, used by the
// processing system to load the partition at initialisation, and one read port
// with a registered output (data appears the cycle after the address), the
// behaviour of an FPGA block RAM.  Each PEC unit owns one of these, so PEC
// units never contend for a read port.  Contents are undefined until loaded.
module grid_bram
  import vina_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int AW    = 10
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fix_t          wdata,
  input  logic [AW-1:0] raddr,
  output fix_t          rdata
);
  fix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
  end
endmodule
