// tb_fpga_node: one node alone (a ring of one, 10^3-point 2-type grid) with
// the testbench standing in for the ring links.  It loads the grid, issues
// local AG tasks on the processing-system port, injects ring packets on the
// SFP input (ones that need this node's partition and ones that do not) and
// checks: every AG result against the reference computation, that packets
// not meant for the node leave on the SFP output unchanged, and that local
// dispatch, ring dispatch, retain, bypass, retry and result all occurred.
module tb_fpga_node;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1, G = 10, NT = 2, MT = 10;
  localparam int NLOCAL = 10, NRING = 6, NBYP = 3, NATOM = 8;
  localparam int NWORDS = ($bits(task_pkt_t) + LINK_W - 1) / LINK_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ps_valid = 0, ps_ready, res_valid, res_ready = 1;
  task_pkt_t ps_pkt;
  ag_result_t res;
  logic ld_en = 0;
  logic [GADDR_W-1:0] ld_addr = '0;
  fix_t ld_data = '0;
  logic rx_valid = 0, rx_ready, rx_sof = 0;
  logic [LINK_W-1:0] rx_data = '0;
  logic tx_valid, tx_ready = 1, tx_sof;
  logic [LINK_W-1:0] tx_data;
  node_events_t ev;

  fpga_node #(.NODE_ID(0), .N_NODES(N), .GX(G), .GY(G), .GZ(G), .NTYPES(NT), .MAX_TRIALS(MT)) dut (.*);

  ag_result_t expr [256];
  logic       want [256];
  task_pkt_t  byp [NBYP];
  int n_res = 0, n_byp_seen = 0;
  longint c_local = 0, c_ring = 0, c_ret = 0, c_byp = 0, c_rty = 0, c_res = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results
  always @(posedge clk) if (rst_n) begin
    if (res_valid && res_ready) begin
      int id;
      id = int'(res.task_id);
      check(want[id], $sformatf("unexpected result %0d", id));
      check(res == expr[id], $sformatf("task %0d: E %0d acc %0b trial %0d | exp E %0d acc %0b trial %0d",
            id, res.energy, res.accepted, res.trial, expr[id].energy, expr[id].accepted, expr[id].trial));
      want[id] = 1'b0;
      n_res++;
    end
    c_local += ev.local_dispatch; c_ring += ev.ring_dispatch; c_ret += ev.retain;
    c_byp += ev.bypass; c_rty += ev.retry; c_res += ev.result;
  end

  // SFP output: reassemble packets
  logic [NWORDS*LINK_W-1:0] txbuf;
  int txw = 0;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (tx_sof) txw = 0;
    txbuf[txw*LINK_W +: LINK_W] = tx_data;
    txw++;
    if (txw == NWORDS) begin
      task_pkt_t p;
      p = task_pkt_t'(txbuf[$bits(task_pkt_t)-1:0]);
      check(n_byp_seen < NBYP && p == byp[n_byp_seen], $sformatf("bypassed packet %0d intact", n_byp_seen));
      n_byp_seen++;
    end
  end

  task automatic send_ring(input task_pkt_t p);
    logic [NWORDS*LINK_W-1:0] w;
    w = (NWORDS*LINK_W)'(p);
    for (int i = 0; i < NWORDS; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_sof = (i == 0); rx_data = w[i*LINK_W +: LINK_W];
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
    end
    @(negedge clk);
    rx_valid = 0; rx_sof = 0;
  endtask

  initial begin
    ps_pkt = '0;
    for (int i = 0; i < 256; i++) want[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++)
      for (int x = 0; x < G; x++)
        for (int y = 0; y < G; y++)
          for (int z = 0; z < G; z++) begin
            @(negedge clk);
            ld_en = 1;
            ld_addr = GADDR_W'(((t * G + x) * G + y) * G + z);
            ld_data = fix_t'(grid_val(t, x, y, z, G, G, G));
          end
    @(negedge clk);
    ld_en = 0;
    fork
      // local tasks from the processing system
      for (int i = 0; i < NLOCAL; i++) begin
        task_pkt_t p;
        p = rand_task(i, NATOM, G, G, G, NT);
        expr[i] = ref_task(p, 0, N, G, G, G, NT, MT, 13);
        want[i] = 1'b1;
        @(negedge clk);
        ps_pkt = p; ps_valid = 1;
        @(posedge clk);
        while (!ps_ready) @(posedge clk);
        @(negedge clk);
        ps_valid = 0;
      end
      // ring traffic: packets needing this partition, and packets to pass on
      for (int i = 0; i < NRING + NBYP; i++) begin
        task_pkt_t p;
        p = ref_move(rand_task(100 + i, NATOM, G, G, G, NT));
        p.origin = '0;
        if (i % 3 == 2) begin
          p.counter = CNT_W'(1 + i % 2);      // already complete: not for this node
          p.task_id = TASK_ID_W'(200 + i);
          byp[i / 3] = p;
        end else begin
          p.counter = '0;
          expr[100 + i] = ref_task(p, 0, N, G, G, G, NT, MT, 13);
          want[100 + i] = 1'b1;
        end
        send_ring(p);
      end
    join
    while (n_res < NLOCAL + NRING) @(posedge clk);
    repeat (200) @(posedge clk);
    $display("events: local %0d ring %0d retain %0d bypass %0d retry %0d result %0d",
             c_local, c_ring, c_ret, c_byp, c_rty, c_res);
    check(n_byp_seen == NBYP, $sformatf("bypassed packets seen %0d", n_byp_seen));
    check(c_local > 0 && c_ring > 0 && c_ret > 0 && c_byp == NBYP && c_rty > 0, "mechanisms occurred");
    check(c_res == NLOCAL + NRING, "one result per task");
    for (int i = 0; i < 256; i++) check(!want[i], $sformatf("result %0d missing", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
