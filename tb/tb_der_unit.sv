// tb_der_unit: random complete packets; checks the Armijo decision, the
// directional derivative, the result fields, the retry packet (alpha halved,
// trial+1, tag and sums cleared, origin = this node), the give-up after
// MAX_TRIALS and the one-cycle compute latency.
module tb_der_unit;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  localparam int NODE = 2, MT = 10, C1S = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rty = 0, n_last = 0;

  logic in_valid = 0, in_ready, res_valid, res_ready = 0, rty_valid, rty_ready = 0;
  task_pkt_t in_pkt, rty_pkt;
  ag_result_t res;

  der_unit #(.NODE_ID(NODE), .MAX_TRIALS(MT), .C1_SHIFT(C1S)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int lat;
      longint bound, gp;
      logic acc, last;
      in_pkt = rand_task(n, 2, 64, 64, 64, 4);
      in_pkt.alpha   = fix_t'(int'($urandom_range(1, 2048)));
      in_pkt.trial   = TRIAL_W'($urandom_range(0, MT - 1));
      in_pkt.counter = CNT_W'(3);
      in_pkt.origin  = NODE_W'(0);
      in_pkt.energy  = acc_t'(longint'(in_pkt.e0) + int'($urandom_range(0, 400)) - 300);
      for (int d = 0; d < 3; d++) in_pkt.grad[d] = acc_t'(int'($urandom_range(0, 200000)) - 100000);
      for (int d = 0; d < 3; d++) in_pkt.x[d] = fix_t'($urandom);
      bound = longint'(in_pkt.e0) + ((longint'(in_pkt.alpha) * longint'(in_pkt.g0p)) >>> (10 + C1S));
      gp = 0;
      for (int d = 0; d < 3; d++) gp += (longint'(in_pkt.grad[d]) * longint'(in_pkt.p[d])) >>> 10;
      acc  = longint'(in_pkt.energy) <= bound;
      last = int'(in_pkt.trial) == MT - 1;
      @(negedge clk);
      check(in_ready, "idle");
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!res_valid && !rty_valid) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 1, $sformatf("latency %0d", lat));
      if (acc || last) begin
        if (acc) n_acc++; else n_last++;
        check(res_valid && !rty_valid, $sformatf("task %0d expected a result", n));
        check(res.accepted == acc, "accepted flag");
        check(res.task_id == in_pkt.task_id && res.trial == in_pkt.trial && res.alpha == in_pkt.alpha,
              "result ids");
        check(res.node == NODE_W'(NODE), "result node");
        check(res.x == in_pkt.x && res.energy == in_pkt.energy && res.grad == in_pkt.grad, "result data");
        check(res.gp == acc_t'(gp), $sformatf("gp %0d exp %0d", res.gp, gp));
        res_ready = 1;
        @(negedge clk);
        res_ready = 0;
      end else begin
        n_rty++;
        check(rty_valid && !res_valid, $sformatf("task %0d expected a retry", n));
        check(rty_pkt.alpha == (in_pkt.alpha >>> 1), "alpha halved");
        check(rty_pkt.trial == in_pkt.trial + 1'b1, "trial incremented");
        check(rty_pkt.counter == '0 && rty_pkt.origin == NODE_W'(NODE), "tag restarted here");
        check(rty_pkt.energy == '0 && rty_pkt.grad == '0, "sums cleared");
        check(rty_pkt.x0 == in_pkt.x0 && rty_pkt.p == in_pkt.p && rty_pkt.offs == in_pkt.offs, "state kept");
        rty_ready = 1;
        @(negedge clk);
        rty_ready = 0;
      end
      @(negedge clk);
      check(in_ready, "idle after hand-off");
    end
    check(n_acc > 0 && n_rty > 0 && n_last > 0, $sformatf("cases acc %0d rty %0d last %0d", n_acc, n_rty, n_last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
