// ring_harness: drives one vina_ring_cluster of N_NODES nodes through a
// batch of AG tasks and checks every result against the reference.  Used by
// tb_vina_ring_scaling to run the same kind of batch on rings of different
// sizes.  It loads each node's grid slab, issues NTASK tasks spread over the
// nodes' processing-system ports with at most MAXOUT in flight, checks every
// result (fields and finishing node), and reports its check count, failure
// count and the cycles from the first task issued to the last result.
module ring_harness
  import vina_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int N_NODES = 3,
  parameter int G       = 16,
  parameter int NT      = 4,
  parameter int NTASK   = 24,
  parameter int MAXOUT  = 12,
  parameter int NATOM   = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int N = N_NODES, MT = 10;

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

  vina_ring_cluster #(.N_NODES(N), .GX(G), .GY(G), .GZ(G), .NTYPES(NT), .MAX_TRIALS(MT)) dut (
    .clk, .rst_n, .ps_valid, .ps_ready, .ps_pkt, .res_valid, .res_ready, .res,
    .ld_en, .ld_addr, .ld_data, .ev
  );

  task_pkt_t  tasks [NTASK];
  ag_result_t expr  [NTASK];
  logic       got   [NTASK];
  int outstanding = 0, done = 0;
  logic running = 1'b0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [N=%0d] %s", N, what); end
  endtask

  always @(posedge clk) if (running) cycles++;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      if (res_valid[k] && res_ready[k]) begin
        int id;
        id = int'(res[k].task_id);
        check(id < NTASK && !got[id], $sformatf("unexpected result id %0d", id));
        if (id < NTASK) begin
          got[id] = 1'b1;
          check(res[k] == expr[id], $sformatf("task %0d result", id));
          check(k == int'(expr[id].node), $sformatf("task %0d finishing node", id));
        end
        outstanding--;
        done++;
      end
    end
  end

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
    finished = 1'b0; checks = 0; failures = 0; cycles = 0;
    for (int k = 0; k < N; k++) begin
      ps_valid[k] = 0; ps_pkt[k] = '0; ld_en[k] = 0; ld_addr[k] = '0; ld_data[k] = '0;
      res_ready[k] = 1;
    end
    for (int i = 0; i < NTASK; i++) begin
      tasks[i] = rand_task(i, NATOM, G, G, G, NT);
      expr[i]  = ref_task(tasks[i], i % N, N, G, G, G, NT, MT, 13);
      got[i]   = 1'b0;
    end
    @(posedge rst_n);
    for (int k = 0; k < N; k++)
      fork
        automatic int kk = k;
        load_node(kk);
      join_none
    wait fork;
    running = 1'b1;
    for (int k = 0; k < N; k++)
      fork
        automatic int kk = k;
        issue(kk);
      join_none
    wait fork;
    while (done < NTASK) @(posedge clk);
    running = 1'b0;
    for (int i = 0; i < NTASK; i++) check(got[i], $sformatf("result %0d missing", i));
    finished = 1'b1;
  end
endmodule
