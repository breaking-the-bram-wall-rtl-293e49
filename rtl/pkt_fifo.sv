// pkt_fifo: synchronous first-in first-out queue of task packets.
//
// Used as the receive queue behind the SFP input and inside the Tasks Buffer.
// A register array of DEPTH entries with read and write pointers; push and pop
// may happen in the same cycle.  Valid/ready on both sides: in_ready is low
// when full, out_valid is high when not empty and out_pkt is the head entry
// (first-word-fall-through).  Reset (synchronous, active low) empties it.  The structure is this
// design's own choice.
module pkt_fifo
  import vina_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  task_pkt_t in_pkt,
  output logic      out_valid,
  input  logic      out_ready,
  output task_pkt_t out_pkt,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  task_pkt_t mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_pkt   = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_pkt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= nxt(wr_ptr);
      if (pop)  rd_ptr <= nxt(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    count <= CW'(DEPTH));
endmodule
