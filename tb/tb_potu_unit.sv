// tb_potu_unit: checks x = x0 + alpha*p (saturating) against the reference,
// the 3-cycle latency, the idle report while busy and holding the result
// under back-pressure.
module tb_potu_unit;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  task_pkt_t in_pkt, out_pkt, exp_pkt;

  potu_unit dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int lat;
      in_pkt = rand_task(n, 4, 64, 64, 64, 4);
      in_pkt.alpha = fix_t'(int'($urandom_range(0, 4096)));
      if (n % 10 == 0) begin  // large operands to reach saturation
        in_pkt.p[0] = fix_t'(131071);
        in_pkt.x0[0] = fix_t'(130000);
        in_pkt.p[1] = fix_t'(-131072);
        in_pkt.x0[1] = fix_t'(-130000);
      end
      exp_pkt = ref_move(in_pkt);
      @(negedge clk);
      check(in_ready, "idle before task");
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin
        check(!in_ready, "busy while computing");
        @(negedge clk);
        lat++;
      end
      check(lat == 3, $sformatf("latency %0d", lat));
      out_ready = 0;
      repeat (2) @(negedge clk);
      check(out_valid && !in_ready, "result held");
      for (int d = 0; d < 3; d++)
        check(out_pkt.x[d] == exp_pkt.x[d],
              $sformatf("task %0d x[%0d] %0d exp %0d", n, d, out_pkt.x[d], exp_pkt.x[d]));
      check(out_pkt.x0 == in_pkt.x0 && out_pkt.offs == in_pkt.offs, "other fields kept");
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
