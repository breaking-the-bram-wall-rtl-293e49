// energy_tag_check: vets task packets arriving from the ring.
//
// Every packet carries an energy tag: `origin`, the node whose grid partition
// was summed first, and `counter`, the number of partitions summed so far.
// Partitions are summed in ring order, so a packet needs this node's partition
// next exactly when counter < N_NODES and (NODE_ID - origin) mod N_NODES ==
// counter.  Such a packet is presented with need = 1 and the scheduler sends
// it to a PEC; any other packet (need = 0) is passed on to the SFP output
// unchanged.  The check is one register stage with valid/ready on both sides
// (a new packet is taken when the register is empty or is being emptied); a
// packet is on the output from the clock edge that accepts it.  The counter
// test follows the description of the tag check; the origin comparison and
// the bypass of packets that do not need this node are this design's choices.
module energy_tag_check
  import vina_pkg::*;
#(
  parameter int NODE_ID = 0,
  parameter int N_NODES = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  task_pkt_t in_pkt,
  output logic      out_valid,
  input  logic      out_ready,
  output task_pkt_t out_pkt,
  output logic      out_need
);
  logic need_c;
  int unsigned hop;

  always_comb begin
    hop    = (NODE_ID + N_NODES - int'(in_pkt.origin)) % N_NODES;
    need_c = (int'(in_pkt.counter) < N_NODES) && (hop == int'(in_pkt.counter));
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_need  <= 1'b0;
      out_pkt   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pkt  <= in_pkt;
        out_need <= need_c;
      end
    end
  end
endmodule
