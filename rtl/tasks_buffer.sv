// tasks_buffer: the node's Tasks Buffer, the queue of AG tasks waiting for a
// POT-U unit.
//
// It has two writers.  The processing system pushes new local AG tasks on the
// ps_* port; a DER unit pushes a retry (the next AG trial of a task whose AG
// condition failed on this node) on the rty_* port.  Retries take precedence:
// while rty_valid is high the PS port is not ready, so a task already in the
// ring is never held up by new work.  One write per cycle.  The read side is a
// valid/ready head that the Task Scheduler pops when it hands the task to an
// idle POT-U.  Storage is a pkt_fifo of DEPTH entries.  The queue and the
// retry input follow the node structure described for the design; the depth
// and the retry priority are this design's choices.
module tasks_buffer
  import vina_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ps_valid,
  output logic      ps_ready,
  input  task_pkt_t ps_pkt,
  input  logic      rty_valid,
  output logic      rty_ready,
  input  task_pkt_t rty_pkt,
  output logic      head_valid,
  input  logic      head_pop,
  output task_pkt_t head_pkt,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  logic      wr_valid, wr_ready;
  task_pkt_t wr_pkt;

  always_comb begin
    wr_valid  = rty_valid || ps_valid;
    wr_pkt    = rty_valid ? rty_pkt : ps_pkt;
    rty_ready = wr_ready;
    ps_ready  = wr_ready && !rty_valid;
  end

  pkt_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (wr_valid), .in_ready (wr_ready), .in_pkt (wr_pkt),
    .out_valid(head_valid), .out_ready(head_pop), .out_pkt(head_pkt),
    .count
  );
endmodule
