// tb_grid_bram: writes random words, reads them back and checks the one-cycle
// registered read latency against a reference array.
module tb_grid_bram;
  import vina_pkg::*;

  localparam int DEPTH = 1000, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  fix_t wdata = '0, rdata;
  fix_t model [DEPTH];

  grid_bram #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = fix_t'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      raddr = AW'(a);
      // a concurrent write elsewhere must not disturb the read
      we = 1; waddr = AW'((a + 1) % DEPTH); wdata = fix_t'($urandom);
      @(posedge clk);
      model[(a + 1) % DEPTH] = wdata;
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %0d exp %0d", a, rdata, model[a]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
