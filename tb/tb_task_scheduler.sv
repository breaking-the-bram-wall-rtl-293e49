// tb_task_scheduler: directed checks of every dispatch and routing rule of
// the Task Scheduler of node 1 in a 3-node ring, with the unit status lines
// driven directly: local task to an idle POT-U, stall when none is idle,
// POT-U result to P2C with round-robin between finished units, ring task
// before a local task at the PEC stage, energy tag reset for a local task,
// PEC result forwarded (counter < 3) or retained for a DER (counter = 3),
// bypass of a ring packet not meant for this node, and DER results and
// retries returned.
module tb_task_scheduler;
  import vina_pkg::*;

  localparam int NODE = 1, N = 3, CPU = 2, CPC = 2, CPE = 3, CD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tb_valid, tb_pop, ring_valid, ring_need, ring_pop;
  task_pkt_t tb_pkt, ring_pkt;
  logic [CPU-1:0] potu_idle, potu_go, potu_done, potu_take;
  logic [CPC-1:0] p2c_idle, p2c_go, p2c_done, p2c_take;
  logic [CPE-1:0] pec_idle, pec_go, pec_done, pec_take;
  logic [CD-1:0]  der_idle, der_go, der_res_valid, der_res_take, der_rty_valid, der_rty_take;
  task_pkt_t potu_in, p2c_in, pec_in, der_in;
  task_pkt_t potu_out [CPU];
  task_pkt_t p2c_out [CPC];
  task_pkt_t pec_out [CPE];
  ag_result_t der_res [CD];
  task_pkt_t der_rty [CD];
  logic tx_valid, tx_ready, res_valid, res_ready, rty_valid, rty_ready;
  task_pkt_t tx_pkt, rty_pkt;
  ag_result_t res;
  node_events_t ev;

  task_scheduler #(.NODE_ID(NODE), .N_NODES(N), .C_POTU(CPU), .C_P2C(CPC), .C_PEC(CPE), .C_DER(CD)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic task_pkt_t mk(input int id, input int cnt);
    task_pkt_t p;
    p = '0;
    p.task_id = TASK_ID_W'(id);
    p.counter = CNT_W'(cnt);
    p.origin  = NODE_W'(2);
    p.energy  = acc_t'(1000 + id);
    p.grad[0] = acc_t'(7);
    return p;
  endfunction

  task automatic quiet();
    tb_valid = 0; ring_valid = 0; ring_need = 0;
    potu_idle = '0; potu_done = '0; p2c_idle = '0; p2c_done = '0;
    pec_idle = '0; pec_done = '0; der_idle = '0; der_res_valid = '0; der_rty_valid = '0;
    tx_ready = 0; res_ready = 0; rty_ready = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tb_pkt = mk(1, 0); ring_pkt = mk(2, 1);
    for (int k = 0; k < CPU; k++) potu_out[k] = mk(10 + k, 0);
    for (int k = 0; k < CPC; k++) p2c_out[k]  = mk(20 + k, 2);
    for (int k = 0; k < CPE; k++) pec_out[k]  = mk(30 + k, 1);
    for (int k = 0; k < CD; k++) begin
      der_res[k] = '0; der_res[k].task_id = TASK_ID_W'(40 + k);
      der_rty[k] = mk(50 + k, 0);
    end
    quiet();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. local task to the lowest idle POT-U
    @(negedge clk); quiet();
    tb_valid = 1; potu_idle = 2'b10; #1;
    check(potu_go == 2'b10 && tb_pop && potu_in == tb_pkt && ev.local_dispatch, "local task to idle POT-U");
    // 2. no idle POT-U: stall
    potu_idle = 2'b00; #1;
    check(potu_go == 0 && !tb_pop && ev.stall_local, "local stall");

    // 3. POT-U results to P2C, round robin
    @(negedge clk); quiet();
    potu_done = 2'b11; p2c_idle = 2'b01; #1;
    check(p2c_go == 2'b01 && $onehot(potu_take), "one POT-U result to P2C");
    begin
      logic [CPU-1:0] first;
      first = potu_take;
      check(p2c_in == potu_out[first[1]], "P2C gets the taken result");
      @(negedge clk); #1;
      check(p2c_go == 2'b01 && $onehot(potu_take) && potu_take != first, "round robin to the other POT-U");
    end

    // 4. ring task beats local task at the PEC stage
    @(negedge clk); quiet();
    ring_valid = 1; ring_need = 1; p2c_done = 2'b01; pec_idle = 3'b110; #1;
    check(pec_go == 3'b010 && ring_pop && pec_in == ring_pkt && p2c_take == 0 && ev.ring_dispatch,
          "ring task first");
    // 5. local task to a PEC with a fresh energy tag
    ring_valid = 0; ring_need = 0; pec_idle = 3'b100; #1;
    check(pec_go == 3'b100 && p2c_take == 2'b01 && !ring_pop && ev.local_pec, "local task to PEC");
    check(pec_in.origin == NODE_W'(NODE) && pec_in.counter == 0 && pec_in.energy == 0 &&
          pec_in.grad == '0 && pec_in.task_id == p2c_out[0].task_id, "energy tag reset");
    // 6. ring task, no PEC idle: stall
    ring_valid = 1; ring_need = 1; pec_idle = 0; #1;
    check(pec_go == 0 && !ring_pop && ev.stall_ring, "ring stall");

    // 7. PEC results: counter < N forward, counter = N retain
    @(negedge clk); quiet();
    pec_out[0] = mk(30, 1); pec_out[1] = mk(31, N); pec_out[2] = mk(32, N);
    pec_done = 3'b011; tx_ready = 1; der_idle = 2'b10; #1;
    check(tx_valid && tx_pkt == pec_out[0] && pec_take == 3'b011, "forward and retain together");
    check(der_go == 2'b10 && der_in == pec_out[1] && ev.forward && ev.retain, "retained to DER");
    // 8. link busy: forward waits, retain needs an idle DER
    tx_ready = 0; der_idle = 0; #1;
    check(tx_valid && pec_take == 0 && der_go == 0 && !ev.forward && !ev.retain, "hold when busy");
    // a complete result never goes to the link, even when the link is free
    pec_done = 3'b010; tx_ready = 1; #1;
    check(!tx_valid && pec_take == 0 && !ev.forward, "complete result not forwarded");

    // 9. bypass of a packet not for this node, only when no PEC result waits
    @(negedge clk); quiet();
    ring_valid = 1; ring_need = 0; tx_ready = 1; #1;
    check(tx_valid && tx_pkt == ring_pkt && ring_pop && ev.bypass, "bypass");
    pec_done = 3'b100; pec_out[2] = mk(32, 2); #1;
    check(tx_valid && tx_pkt == pec_out[2] && !ring_pop && !ev.bypass, "PEC result before bypass");

    // 10. DER results and retries
    @(negedge clk); quiet();
    der_res_valid = 2'b10; der_rty_valid = 2'b01; res_ready = 1; rty_ready = 1; #1;
    check(res_valid && res == der_res[1] && der_res_take == 2'b10 && ev.result, "result returned");
    check(rty_valid && rty_pkt == der_rty[0] && der_rty_take == 2'b01 && ev.retry, "retry queued");
    res_ready = 0; rty_ready = 0; #1;
    check(res_valid && der_res_take == 0 && der_rty_take == 0, "result held");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
