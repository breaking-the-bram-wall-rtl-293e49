// tb_vina_ring_cluster: end-to-end run of a 3-node ring on a 16^3-point,
// 4-type grid.  Each node's processing-system port issues AG tasks (random
// ligands of 12 atoms near the box centre, some atoms outside the box); the
// testbench keeps at most MAXOUT tasks in flight in the whole cluster, takes
// results with random back-pressure, and checks every result field against a
// reference AG computation done from the grid formula, including the node
// that finishes the task: a trial started on node i ends on node
// (i+N-1) mod N, and a rejected trial restarts there.  It also counts how
// often each mechanism occurred (local and ring dispatch, forward, retain,
// retry, result, stalls at POT-U and PEC) and fails if one never did.
module tb_vina_ring_cluster;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 3, G = 16, NT = 4, MT = 10;
  localparam int NTASK = 60, MAXOUT = 12, NATOM = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               ps_valid  [N];
  logic               ps_ready  [N];
  task_pkt_t          ps_pkt    [N];
  logic               res_valid [N];
  logic               res_ready [N];
  ag_result_t         res       [N];
  logic               ld_en     [N];
  logic [GADDR_W-1:0] ld_addr   [N];
  fix_t               ld_data   [N];
  node_events_t       ev        [N];

  vina_ring_cluster #(.N_NODES(N), .GX(G), .GY(G), .GZ(G), .NTYPES(NT), .MAX_TRIALS(MT)) dut (.*);

  task_pkt_t  tasks [NTASK];
  ag_result_t expr  [NTASK];
  logic       got   [NTASK];
  int outstanding = 0, done = 0;
  longint cnt_local = 0, cnt_ring = 0, cnt_lpec = 0, cnt_fwd = 0, cnt_ret = 0, cnt_byp = 0;
  longint cnt_rty = 0, cnt_res = 0, cnt_sl = 0, cnt_sr = 0, n_acc = 0, n_fail = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired, %0d of %0d results", done, NTASK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results and event counters
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      if (res_valid[k] && res_ready[k]) begin
        int id;
        id = int'(res[k].task_id);
        check(id < NTASK && !got[id], $sformatf("unexpected result id %0d", id));
        if (id < NTASK) begin
          got[id] = 1'b1;
          check(res[k] == expr[id],
                $sformatf("task %0d: node %0d acc %0b trial %0d E %0d | exp node %0d acc %0b trial %0d E %0d",
                          id, res[k].node, res[k].accepted, res[k].trial, res[k].energy,
                          expr[id].node, expr[id].accepted, expr[id].trial, expr[id].energy));
          check(k == int'(expr[id].node), "result on the finishing node's port");
          if (res[k].accepted) n_acc++; else n_fail++;
        end
        outstanding--;
        done++;
      end
      cnt_local += ev[k].local_dispatch; cnt_ring += ev[k].ring_dispatch;
      cnt_lpec  += ev[k].local_pec;      cnt_fwd  += ev[k].forward;
      cnt_ret   += ev[k].retain;         cnt_byp  += ev[k].bypass;
      cnt_rty   += ev[k].retry;          cnt_res  += ev[k].result;
      cnt_sl    += ev[k].stall_local;    cnt_sr   += ev[k].stall_ring;
    end
  end

  always @(negedge clk)
    for (int k = 0; k < N; k++) res_ready[k] = ($urandom_range(0, 3) != 0);

  // load node k's slab of every map
  task automatic load_node(input int k);
    int lo, hi, px;
    lo = (k * (G - 1)) / N;
    hi = ((k + 1) * (G - 1)) / N;
    px = hi - lo + 1;
    for (int t = 0; t < NT; t++)
      for (int lx = 0; lx < px; lx++)
        for (int y = 0; y < G; y++)
          for (int z = 0; z < G; z++) begin
            @(negedge clk);
            ld_en[k]   = 1'b1;
            ld_addr[k] = GADDR_W'(((t * px + lx) * G + y) * G + z);
            ld_data[k] = fix_t'(grid_val(t, lo + lx, y, z, G, G, G));
          end
    @(negedge clk);
    ld_en[k] = 1'b0;
  endtask

  // processing-system side of node k
  task automatic issue(input int k);
    for (int i = k; i < NTASK; i += N) begin
      @(negedge clk);
      while (outstanding >= MAXOUT) @(negedge clk);
      outstanding++;
      ps_pkt[k]   = tasks[i];
      ps_valid[k] = 1'b1;
      @(posedge clk);
      while (!ps_ready[k]) @(posedge clk);
      @(negedge clk);
      ps_valid[k] = 1'b0;
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      ps_valid[k] = 0; ps_pkt[k] = '0; ld_en[k] = 0; ld_addr[k] = '0; ld_data[k] = '0;
      res_ready[k] = 1;
    end
    for (int i = 0; i < NTASK; i++) begin
      tasks[i] = rand_task(i, NATOM, G, G, G, NT);
      expr[i]  = ref_task(tasks[i], i % N, N, G, G, G, NT, MT, 13);
      got[i]   = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      load_node(0);
      load_node(1);
      load_node(2);
    join
    fork
      issue(0);
      issue(1);
      issue(2);
    join
    while (done < NTASK) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("events: local %0d ring %0d local_pec %0d forward %0d retain %0d bypass %0d retry %0d result %0d stall_local %0d stall_ring %0d",
             cnt_local, cnt_ring, cnt_lpec, cnt_fwd, cnt_ret, cnt_byp, cnt_rty, cnt_res, cnt_sl, cnt_sr);
    $display("accepted %0d, gave up %0d", n_acc, n_fail);
    check(cnt_local > 0, "local dispatch happened");
    check(cnt_ring > 0, "ring dispatch happened");
    check(cnt_lpec > 0, "local PEC start happened");
    check(cnt_fwd > 0, "forward to next node happened");
    check(cnt_ret > 0, "retain for DER happened");
    check(cnt_rty > 0, "AG retry happened");
    check(cnt_res == NTASK, "one result per task");
    check(cnt_sl > 0, "POT-U stall happened");
    check(cnt_sr > 0, "PEC stall happened");
    check(cnt_ring == cnt_fwd, "every forwarded packet computed on the next node");
    check(cnt_local == cnt_lpec, "every local start reached a PEC");
    check(cnt_lpec * (N - 1) == cnt_ring, "each trial visits N-1 remote PECs");
    check(cnt_byp == 0, "in ring order no packet passes a node without computing");
    check(n_acc > 0, "some tasks accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
