// tb_tasks_buffer: random PS pushes, retry pushes and pops against a queue
// model; checks order, that a retry is always taken before a PS task in the
// same cycle, the count and the full condition.
module tb_tasks_buffer;
  import vina_pkg::*;

  localparam int DEPTH = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  logic ps_valid = 0, ps_ready, rty_valid = 0, rty_ready, head_valid, head_pop = 0;
  task_pkt_t ps_pkt, rty_pkt, head_pkt;
  logic [$clog2(DEPTH+1)-1:0] count;
  task_pkt_t model [$];
  int next_id = 0;

  tasks_buffer #(.DEPTH(DEPTH)) dut (.*);

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
    ps_pkt = '0; rty_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      ps_valid  = ($urandom_range(0, 2) == 0);
      rty_valid = ($urandom_range(0, 3) == 0);
      head_pop  = head_valid && ($urandom_range(0, 3) == 0);
      ps_pkt  = '0; ps_pkt.task_id  = TASK_ID_W'(next_id);     ps_pkt.trial  = '0;
      rty_pkt = '0; rty_pkt.task_id = TASK_ID_W'(next_id + 1); rty_pkt.trial = 4'd1;
      #1;
      check(int'(count) == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_pkt == model[0], "head order");
      check(rty_ready == (model.size() < DEPTH), "retry ready unless full");
      check(ps_ready == (model.size() < DEPTH && !rty_valid), "ps ready rule");
      if (model.size() == DEPTH) n_full++;
      if (ps_valid && rty_valid) n_both++;
      @(posedge clk);
      if (head_pop) void'(model.pop_front());
      if (rty_valid && rty_ready) begin model.push_back(rty_pkt); next_id += 2; end
      else if (ps_valid && ps_ready) begin model.push_back(ps_pkt); next_id += 2; end
    end
    check(n_full > 0 && n_both > 0, "full and contention reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
