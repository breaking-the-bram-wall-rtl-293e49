// tb_sfp_link: an sfp_tx feeding an sfp_rx, as on one ring link.  Sends
// random packets with random stalls on both ends and checks that each
// arrives whole and in order, the start-of-packet flag, and that an
// unstalled packet occupies the link for exactly NWORDS cycles.
module tb_sfp_link;
  import vina_pkg::*;
  import tb_ref_pkg::*;

  localparam int NPKT = 60;
  localparam int NWORDS = ($bits(task_pkt_t) + LINK_W - 1) / LINK_W;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  task_pkt_t in_pkt, out_pkt;
  logic link_valid, link_ready, link_sof;
  logic [LINK_W-1:0] link_data;
  task_pkt_t sent [NPKT];
  int words = 0, sofs = 0;

  sfp_tx u_tx (.clk, .rst_n, .in_valid, .in_ready, .in_pkt,
               .link_valid, .link_ready, .link_sof, .link_data);
  sfp_rx u_rx (.clk, .rst_n, .link_valid, .link_ready, .link_sof, .link_data,
               .out_valid, .out_ready, .out_pkt);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && link_valid && link_ready) begin
    words++;
    if (link_sof) sofs++;
  end

  initial begin
    for (int i = 0; i < NPKT; i++) begin
      sent[i] = rand_task(i, int'($urandom_range(1, MAX_ATOMS)), 64, 64, 64, 4);
      sent[i].coord  = {MAX_ATOMS{{3{fix_t'($urandom)}}}};
      sent[i].energy = acc_t'($urandom);
    end
  end

  initial begin
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first packet alone, receiver always ready: timing check
    @(negedge clk);
    in_pkt = sent[0]; in_valid = 1; out_ready = 0;
    @(negedge clk);
    in_valid = 0;
    begin
      int cyc;
      cyc = 0;
      while (!out_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NWORDS) begin failures++; $display("FAIL packet took %0d cycles, %0d words", cyc, NWORDS); end
    end
    checks++;
    if (out_pkt !== sent[0]) begin failures++; $display("FAIL packet 0"); end
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    fork
      begin
        int i;
        i = 1;
        while (i < NPKT) begin
          @(negedge clk);
          in_valid = ($urandom_range(0, 1) != 0);
          in_pkt = sent[i];
          @(posedge clk);
          if (in_valid && in_ready) i++;
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        int j;
        j = 1;
        while (j < NPKT) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 3) == 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            checks++;
            if (out_pkt !== sent[j]) begin failures++; $display("FAIL packet %0d", j); end
            j++;
          end
        end
      end
    join
    checks++;
    if (words != NPKT * NWORDS || sofs != NPKT) begin
      failures++;
      $display("FAIL words %0d sofs %0d", words, sofs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
