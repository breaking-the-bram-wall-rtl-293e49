// tb_p2c_unit: checks coord[i] = x + offs[i] for every atom, that atoms past
// n_atoms are untouched, and the latency of max(n_atoms,1) cycles.
module tb_p2c_unit;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  task_pkt_t in_pkt, out_pkt, exp_pkt;

  p2c_unit dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      int lat, na;
      na = (n == 0) ? 1 : int'($urandom_range(1, MAX_ATOMS));
      in_pkt = rand_task(n, na, 64, 64, 64, 4);
      for (int d = 0; d < 3; d++) in_pkt.x[d] = fix_t'(int'($urandom_range(0, 131071)) - 65536);
      in_pkt.coord = {MAX_ATOMS{{3{fix_t'(18'h15555)}}}};
      exp_pkt = in_pkt;
      for (int a = 0; a < na; a++)
        for (int d = 0; d < 3; d++)
          exp_pkt.coord[a][d] = fix_t'(clamp18(longint'(in_pkt.x[d]) + longint'(in_pkt.offs[a][d])));
      @(negedge clk);
      check(in_ready, "idle");
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin
        @(negedge clk);
        lat++;
      end
      check(lat == na, $sformatf("latency %0d for %0d atoms", lat, na));
      for (int a = 0; a < MAX_ATOMS; a++)
        check(out_pkt.coord[a] == exp_pkt.coord[a], $sformatf("task %0d atom %0d", n, a));
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
