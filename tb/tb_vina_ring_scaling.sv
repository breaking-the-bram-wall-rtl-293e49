// tb_vina_ring_scaling: the same kind of task batch on rings of 1, 2, 3, 4
// and 6 nodes (16^3-point, 4-type grids, default unit counts per node), the
// node counts over which the architecture's scaling is evaluated.  Each ring
// must return every task's result bit-exact, from the node where the
// task's last trial ends.  The testbench prints, per ring size, the grid
// words each PEC copy holds and the cycles the batch took.
module tb_vina_ring_scaling;
  import vina_pkg::*;

  localparam int NR = 5;
  localparam int SIZES [NR] = '{1, 2, 3, 4, 6};
  localparam int G = 16, NT = 4, NTASK = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fin [NR];
  int   chk [NR];
  int   fl  [NR];
  int   cyc [NR];

  for (genvar r = 0; r < NR; r++) begin : g_ring
    ring_harness #(.N_NODES(SIZES[r]), .G(G), .NT(NT), .NTASK(NTASK), .MAXOUT(12), .NATOM(12)) h (
      .clk, .rst_n, .finished(fin[r]), .checks(chk[r]), .failures(fl[r]), .cycles(cyc[r])
    );
  end

  int checks, failures;

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  initial begin
    logic all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int r = 0; r < NR; r++) all &= fin[r];
    end while (!all);
    checks = 0; failures = 0;
    for (int r = 0; r < NR; r++) begin
      int px;
      px = (G - 1 + SIZES[r] - 1) / SIZES[r] + 1;  // planes in the largest slab
      $display("ring of %0d nodes: %0d grid words per PEC copy, %0d tasks in %0d cycles, %0d checks, %0d failures",
               SIZES[r], NT * px * G * G, NTASK, cyc[r], chk[r], fl[r]);
      checks += chk[r];
      failures += fl[r];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
