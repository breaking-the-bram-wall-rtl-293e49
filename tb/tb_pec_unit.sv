// tb_pec_unit: loads node 1's slab of a 10x10x10, 2-type grid (3-node ring),
// sends random ligands whose atoms fall inside, outside and on other nodes'
// slabs, and checks the added energy and gradient against trilinear
// interpolation done from the grid formula, the counter increment, and the
// latency n_atoms + 10*owned + 1.
module tb_pec_unit;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  localparam int NODE = 1, N = 3, G = 10, NT = 2;
  localparam int X_LO = (NODE * (G - 1)) / N, X_HI = ((NODE + 1) * (G - 1)) / N;
  localparam int PX = X_HI - X_LO + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  task_pkt_t in_pkt, out_pkt;
  logic ld_en = 0;
  logic [GADDR_W-1:0] ld_addr = '0;
  fix_t ld_data = '0;

  pec_unit #(.NODE_ID(NODE), .N_NODES(N), .GX(G), .GY(G), .GZ(G), .NTYPES(NT)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++)
      for (int lx = 0; lx < PX; lx++)
        for (int y = 0; y < G; y++)
          for (int z = 0; z < G; z++) begin
            @(negedge clk);
            ld_en = 1;
            ld_addr = GADDR_W'(((t * PX + lx) * G + y) * G + z);
            ld_data = fix_t'(grid_val(t, X_LO + lx, y, z, G, G, G));
          end
    @(negedge clk);
    ld_en = 0;
    for (int n = 0; n < 150; n++) begin
      int lat, na, owned;
      longint e, g[3];
      na = int'($urandom_range(1, 12));
      in_pkt = rand_task(n, na, G, G, G, NT);
      in_pkt.counter = CNT_W'(n % 3);
      in_pkt.energy  = acc_t'(int'($urandom_range(0, 2000)) - 1000);
      for (int d = 0; d < 3; d++) in_pkt.grad[d] = acc_t'(int'($urandom_range(0, 2000)) - 1000);
      owned = 0;
      for (int a = 0; a < na; a++) begin
        for (int d = 0; d < 3; d++)
          in_pkt.coord[a][d] = fix_t'(int'($urandom_range(0, (G + 1) * 1024)) - 512);
        if (a == 0) in_pkt.coord[a][0] = fix_t'(X_LO * 1024 + int'($urandom_range(0, (X_HI - X_LO) * 1024 - 1)));
        if (a == 0) in_pkt.coord[a][1] = fix_t'(int'($urandom_range(0, (G - 1) * 1024 - 1)));
        if (a == 0) in_pkt.coord[a][2] = fix_t'(int'($urandom_range(0, (G - 1) * 1024 - 1)));
        if (owner(longint'(in_pkt.coord[a][0]), longint'(in_pkt.coord[a][1]),
                  longint'(in_pkt.coord[a][2]), G, G, G, N) == NODE) owned++;
      end
      ref_partial(in_pkt, NODE, N, G, G, G, NT, e, g);
      @(negedge clk);
      check(in_ready, "idle");
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin
        check(!in_ready, "busy");
        @(negedge clk);
        lat++;
      end
      check(lat == na + 10 * owned + 1, $sformatf("latency %0d, %0d atoms %0d owned", lat, na, owned));
      check(out_pkt.energy == acc_t'(longint'(in_pkt.energy) + e),
            $sformatf("task %0d energy %0d exp %0d", n, out_pkt.energy, longint'(in_pkt.energy) + e));
      for (int d = 0; d < 3; d++)
        check(out_pkt.grad[d] == acc_t'(longint'(in_pkt.grad[d]) + g[d]),
              $sformatf("task %0d grad[%0d] %0d exp %0d", n, d, out_pkt.grad[d], longint'(in_pkt.grad[d]) + g[d]));
      check(out_pkt.counter == in_pkt.counter + 1'b1, "counter incremented");
      check(out_pkt.coord == in_pkt.coord && out_pkt.task_id == in_pkt.task_id, "payload kept");
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
