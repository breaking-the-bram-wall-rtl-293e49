// tb_energy_tag_check: node 2 of a 5-node ring.  Streams random packets with
// random back-pressure and checks order, payload and the need flag, which a
// packet must carry exactly when its counter < 5 and the ring distance from
// its origin to this node equals the counter.
module tb_energy_tag_check;
  import vina_pkg::*;

  localparam int NODE = 2, N = 5, NPKT = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_need = 0, n_pass = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_need;
  task_pkt_t in_pkt, out_pkt;
  task_pkt_t sent [NPKT];

  energy_tag_check #(.NODE_ID(NODE), .N_NODES(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPKT; i++) begin
      sent[i] = '0;
      sent[i].task_id = TASK_ID_W'(i);
      sent[i].origin  = NODE_W'($urandom_range(0, N - 1));
      sent[i].counter = CNT_W'($urandom_range(0, N + 1));
      sent[i].energy  = acc_t'($urandom);
    end
  end

  // driver
  initial begin
    int i;
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    i = 0;
    while (i < NPKT) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_pkt = sent[i];
      @(posedge clk);
      if (in_valid && in_ready) i++;
    end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  initial begin
    int j;
    j = 0;
    @(posedge rst_n);
    while (j < NPKT) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        logic exp_need;
        exp_need = (int'(sent[j].counter) < N) &&
                   (((NODE - int'(sent[j].origin) + N) % N) == int'(sent[j].counter));
        if (exp_need) n_need++; else n_pass++;
        checks++;
        if (out_pkt !== sent[j] || out_need !== exp_need) begin
          failures++;
          $display("FAIL packet %0d need %0b exp %0b", j, out_need, exp_need);
        end
        j++;
      end
    end
    checks++;
    if (n_need == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
