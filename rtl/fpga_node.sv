// fpga_node: the programmable-logic part of one ring node.
//
// Structure (left to right):
//   PS task port --> Tasks Buffer --+
//                                   +--> Task Scheduler <--> pool of units
//   SFP in --> RX queue --> Energy Tag Check --+        |
//                                                       +--> SFP out
//                                                       +--> result port
// The pool holds C_POTU POT-U, C_P2C P2C, C_PEC PEC and C_DER DER units.  Each
// PEC unit has its own copy of this node's grid partition; the grid-load port
// (ld_*) writes all copies at once.  A task from the processing system flows
// POT-U -> P2C -> PEC here, then around the ring through one PEC on every
// other node, and is finished by a DER on the node where its energy becomes
// complete, which either returns a result or queues the next trial in its
// own Tasks Buffer.
//
// The RX queue must be able to hold every task in flight in the cluster (the
// processing system keeps the number of outstanding tasks at or below
// RX_DEPTH and TB_DEPTH); with that bound a packet leaving a PEC always finds
// room downstream and the ring cannot lock up.  Interfaces are valid/ready;
// link ports carry LINK_W-bit words with a start-of-packet flag (see sfp_tx).
// Node structure, unit kinds and routing follow the described design; unit
// counts are parameters (defaults: 2 POT-U, 2 P2C, 3 PEC, 2 DER); queue depths
// and link framing are this design's choices.
module fpga_node
  import vina_pkg::*;
#(
  parameter int NODE_ID    = 0,
  parameter int N_NODES    = 3,
  parameter int C_POTU     = 2,
  parameter int C_P2C      = 2,
  parameter int C_PEC      = 3,
  parameter int C_DER      = 2,
  parameter int GX         = 64,
  parameter int GY         = 64,
  parameter int GZ         = 64,
  parameter int NTYPES     = 4,
  parameter int TB_DEPTH   = 16,
  parameter int RX_DEPTH   = 16,
  parameter int MAX_TRIALS = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  // processing system: AG tasks in, AG results out, grid load
  input  logic               ps_valid,
  output logic               ps_ready,
  input  task_pkt_t          ps_pkt,
  output logic               res_valid,
  input  logic               res_ready,
  output ag_result_t         res,
  input  logic               ld_en,
  input  logic [GADDR_W-1:0] ld_addr,
  input  fix_t               ld_data,
  // link from the previous node
  input  logic               rx_valid,
  output logic               rx_ready,
  input  logic               rx_sof,
  input  logic [LINK_W-1:0]  rx_data,
  // link to the next node
  output logic               tx_valid,
  input  logic               tx_ready,
  output logic               tx_sof,
  output logic [LINK_W-1:0]  tx_data,
  output node_events_t       ev
);
  // Tasks Buffer
  logic      tb_valid, tb_pop, rty_valid, rty_ready;
  task_pkt_t tb_pkt, rty_pkt;
  logic [$clog2(TB_DEPTH+1)-1:0] tb_count;

  tasks_buffer #(.DEPTH(TB_DEPTH)) u_tasks (
    .clk, .rst_n,
    .ps_valid, .ps_ready, .ps_pkt,
    .rty_valid, .rty_ready, .rty_pkt,
    .head_valid(tb_valid), .head_pop(tb_pop), .head_pkt(tb_pkt),
    .count(tb_count)
  );

  // ring input: SFP in, RX queue, Energy Tag Check
  logic      rxp_valid, rxp_ready, rq_valid, rq_ready, ring_valid, ring_pop, ring_need;
  task_pkt_t rxp_pkt, rq_pkt, ring_pkt;
  logic [$clog2(RX_DEPTH+1)-1:0] rq_count;

  sfp_rx u_sfp_rx (
    .clk, .rst_n,
    .link_valid(rx_valid), .link_ready(rx_ready), .link_sof(rx_sof), .link_data(rx_data),
    .out_valid(rxp_valid), .out_ready(rxp_ready), .out_pkt(rxp_pkt)
  );

  pkt_fifo #(.DEPTH(RX_DEPTH)) u_rx_queue (
    .clk, .rst_n,
    .in_valid(rxp_valid), .in_ready(rxp_ready), .in_pkt(rxp_pkt),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_pkt(rq_pkt),
    .count(rq_count)
  );

  energy_tag_check #(.NODE_ID(NODE_ID), .N_NODES(N_NODES)) u_tag (
    .clk, .rst_n,
    .in_valid(rq_valid), .in_ready(rq_ready), .in_pkt(rq_pkt),
    .out_valid(ring_valid), .out_ready(ring_pop), .out_pkt(ring_pkt), .out_need(ring_need)
  );

  // computation pool
  logic [C_POTU-1:0] potu_idle, potu_go, potu_done, potu_take;
  logic [C_P2C-1:0]  p2c_idle,  p2c_go,  p2c_done,  p2c_take;
  logic [C_PEC-1:0]  pec_idle,  pec_go,  pec_done,  pec_take;
  logic [C_DER-1:0]  der_idle,  der_go,  der_res_valid, der_res_take, der_rty_valid, der_rty_take;
  task_pkt_t  potu_in, p2c_in, pec_in, der_in;
  task_pkt_t  potu_out [C_POTU];
  task_pkt_t  p2c_out  [C_P2C];
  task_pkt_t  pec_out  [C_PEC];
  ag_result_t der_res  [C_DER];
  task_pkt_t  der_rty  [C_DER];

  for (genvar k = 0; k < C_POTU; k++) begin : g_potu
    potu_unit u_potu (
      .clk, .rst_n,
      .in_valid(potu_go[k]), .in_ready(potu_idle[k]), .in_pkt(potu_in),
      .out_valid(potu_done[k]), .out_ready(potu_take[k]), .out_pkt(potu_out[k])
    );
  end

  for (genvar k = 0; k < C_P2C; k++) begin : g_p2c
    p2c_unit u_p2c (
      .clk, .rst_n,
      .in_valid(p2c_go[k]), .in_ready(p2c_idle[k]), .in_pkt(p2c_in),
      .out_valid(p2c_done[k]), .out_ready(p2c_take[k]), .out_pkt(p2c_out[k])
    );
  end

  for (genvar k = 0; k < C_PEC; k++) begin : g_pec
    pec_unit #(
      .NODE_ID(NODE_ID), .N_NODES(N_NODES),
      .GX(GX), .GY(GY), .GZ(GZ), .NTYPES(NTYPES)
    ) u_pec (
      .clk, .rst_n,
      .in_valid(pec_go[k]), .in_ready(pec_idle[k]), .in_pkt(pec_in),
      .out_valid(pec_done[k]), .out_ready(pec_take[k]), .out_pkt(pec_out[k]),
      .ld_en, .ld_addr, .ld_data
    );
  end

  for (genvar k = 0; k < C_DER; k++) begin : g_der
    der_unit #(.NODE_ID(NODE_ID), .MAX_TRIALS(MAX_TRIALS)) u_der (
      .clk, .rst_n,
      .in_valid(der_go[k]), .in_ready(der_idle[k]), .in_pkt(der_in),
      .res_valid(der_res_valid[k]), .res_ready(der_res_take[k]), .res(der_res[k]),
      .rty_valid(der_rty_valid[k]), .rty_ready(der_rty_take[k]), .rty_pkt(der_rty[k])
    );
  end

  // Task Scheduler
  logic      sched_tx_valid, sched_tx_ready;
  task_pkt_t sched_tx_pkt;

  task_scheduler #(
    .NODE_ID(NODE_ID), .N_NODES(N_NODES),
    .C_POTU(C_POTU), .C_P2C(C_P2C), .C_PEC(C_PEC), .C_DER(C_DER)
  ) u_sched (
    .clk, .rst_n,
    .tb_valid, .tb_pkt, .tb_pop,
    .ring_valid, .ring_need, .ring_pkt, .ring_pop,
    .potu_idle, .potu_go, .potu_in, .potu_done, .potu_out, .potu_take,
    .p2c_idle, .p2c_go, .p2c_in, .p2c_done, .p2c_out, .p2c_take,
    .pec_idle, .pec_go, .pec_in, .pec_done, .pec_out, .pec_take,
    .der_idle, .der_go, .der_in,
    .der_res_valid, .der_res, .der_res_take,
    .der_rty_valid, .der_rty, .der_rty_take,
    .tx_valid(sched_tx_valid), .tx_ready(sched_tx_ready), .tx_pkt(sched_tx_pkt),
    .res_valid, .res_ready, .res,
    .rty_valid, .rty_ready, .rty_pkt,
    .ev
  );

  // SFP out
  sfp_tx u_sfp_tx (
    .clk, .rst_n,
    .in_valid(sched_tx_valid), .in_ready(sched_tx_ready), .in_pkt(sched_tx_pkt),
    .link_valid(tx_valid), .link_ready(tx_ready), .link_sof(tx_sof), .link_data(tx_data)
  );
endmodule
