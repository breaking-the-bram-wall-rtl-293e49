// task_scheduler: the node's Task Scheduler, the control hub between the task
// sources and the reusable pool of POT-U, P2C, PEC and DER units.
//
// Every unit reports idle (ready for a task) and done (result waiting).  Each
// cycle the scheduler makes at most one dispatch into each stage:
//   * POT-U: the head of the Tasks Buffer (a new local task or a retry) goes
//     to the lowest-numbered idle POT-U.
//   * P2C:   a finished POT-U result goes to an idle P2C.
//   * PEC:   a ring task that the Energy Tag Check found to need this node has
//     priority; otherwise a finished P2C result (a locally started task) goes
//     to an idle PEC, with its energy tag set to (origin = NODE_ID,
//     counter = 0) and energy and gradient cleared.
// and it routes the results leaving the pool:
//   * PEC result with counter < N_NODES: the energy is incomplete, so the
//     packet goes to the SFP output towards the next node (forward).
//   * PEC result with counter = N_NODES: complete, kept for an idle DER
//     (retain).  Forward and retain can both happen in one cycle.
//   * A ring packet that does not need this node uses the SFP output when no
//     PEC result is waiting for it (bypass).
//   * DER results go to the processing system, DER retries to the Tasks
//     Buffer.
// Where several units of a stage have results waiting, a round-robin pointer
// per stage picks one.  Idle units are taken lowest index first.
// Interface: plain valid/ready or take strobes towards every unit; packets of
// a stage's inputs are broadcast (the go strobe selects the unit).  All
// decisions are combinational in the cycle the strobes are issued; only the
// round-robin pointers are registers.  `ev` pulses one bit per mechanism.
// The dispatch rules (local tasks to POT-U, validated ring tasks to PEC,
// counter test after PEC, idle/busy monitoring) follow the described design;
// the ring-first priority, one dispatch per stage per cycle and round-robin
// selection are this design's choices.
module task_scheduler
  import vina_pkg::*;
#(
  parameter int NODE_ID = 0,
  parameter int N_NODES = 3,
  parameter int C_POTU  = 2,
  parameter int C_P2C   = 2,
  parameter int C_PEC   = 3,
  parameter int C_DER   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // Tasks Buffer head
  input  logic              tb_valid,
  input  task_pkt_t         tb_pkt,
  output logic              tb_pop,
  // ring packets after the Energy Tag Check
  input  logic              ring_valid,
  input  logic              ring_need,
  input  task_pkt_t         ring_pkt,
  output logic              ring_pop,
  // POT-U pool
  input  logic [C_POTU-1:0] potu_idle,
  output logic [C_POTU-1:0] potu_go,
  output task_pkt_t         potu_in,
  input  logic [C_POTU-1:0] potu_done,
  input  task_pkt_t         potu_out [C_POTU],
  output logic [C_POTU-1:0] potu_take,
  // P2C pool
  input  logic [C_P2C-1:0]  p2c_idle,
  output logic [C_P2C-1:0]  p2c_go,
  output task_pkt_t         p2c_in,
  input  logic [C_P2C-1:0]  p2c_done,
  input  task_pkt_t         p2c_out [C_P2C],
  output logic [C_P2C-1:0]  p2c_take,
  // PEC pool
  input  logic [C_PEC-1:0]  pec_idle,
  output logic [C_PEC-1:0]  pec_go,
  output task_pkt_t         pec_in,
  input  logic [C_PEC-1:0]  pec_done,
  input  task_pkt_t         pec_out [C_PEC],
  output logic [C_PEC-1:0]  pec_take,
  // DER pool
  input  logic [C_DER-1:0]  der_idle,
  output logic [C_DER-1:0]  der_go,
  output task_pkt_t         der_in,
  input  logic [C_DER-1:0]  der_res_valid,
  input  ag_result_t        der_res [C_DER],
  output logic [C_DER-1:0]  der_res_take,
  input  logic [C_DER-1:0]  der_rty_valid,
  input  task_pkt_t         der_rty [C_DER],
  output logic [C_DER-1:0]  der_rty_take,
  // SFP output
  output logic              tx_valid,
  input  logic              tx_ready,
  output task_pkt_t         tx_pkt,
  // results to the processing system
  output logic              res_valid,
  input  logic              res_ready,
  output ag_result_t        res,
  // retries to the Tasks Buffer
  output logic              rty_valid,
  input  logic              rty_ready,
  output task_pkt_t         rty_pkt,
  output node_events_t      ev
);
  localparam int MAXC = 16;
  typedef logic [MAXC-1:0] mask_t;
  typedef logic [3:0]      idx_t;

  // lowest set bit of m
  function automatic logic first_one(input mask_t m, input int n, output idx_t k);
    k = '0;
    for (int i = n - 1; i >= 0; i--)
      if (m[i]) k = idx_t'(i);
    return |m;
  endfunction

  // first set bit of m at or after ptr, wrapping around
  function automatic logic rr_pick(input mask_t m, input int n, input idx_t ptr, output idx_t k);
    logic found;
    found = 1'b0;
    k = '0;
    for (int j = 0; j < 2 * MAXC; j++) begin
      int i;
      i = (int'(ptr) + j) % n;
      if (j < n && !found && m[i]) begin
        found = 1'b1;
        k = idx_t'(i);
      end
    end
    return found;
  endfunction

  idx_t ptr_pu, ptr_pc, ptr_fw, ptr_rt, ptr_res, ptr_rty;

  // decisions of this cycle
  logic pu_ok, pc_dst_ok, pc_src_ok, pe_dst_ok, p2c_src_ok;
  logic fw_ok, rt_ok, dr_ok, res_ok, rty_ok;
  idx_t pu_dst, pc_dst, pc_src, pe_dst, p2c_src, fw_src, rt_src, dr_dst, res_src, rty_src;
  mask_t fw_mask, rt_mask;
  logic ring_to_pec, local_to_pec, bypass;

  always_comb begin
    tb_pop = 1'b0; ring_pop = 1'b0;
    potu_go = '0; potu_take = '0; potu_in = tb_pkt;
    p2c_go = '0;  p2c_take = '0;  p2c_in = '0;
    pec_go = '0;  pec_take = '0;  pec_in = '0;
    der_go = '0;  der_in = '0;
    der_res_take = '0; der_rty_take = '0;
    tx_valid = 1'b0; tx_pkt = '0;
    ring_to_pec = 1'b0; local_to_pec = 1'b0; bypass = 1'b0;

    // POT-U: Tasks Buffer head to an idle POT-U
    pu_ok = first_one(mask_t'(potu_idle), C_POTU, pu_dst);
    if (tb_valid && pu_ok) begin
      potu_go[pu_dst] = 1'b1;
      tb_pop = 1'b1;
    end

    // P2C: finished POT-U to an idle P2C
    pc_dst_ok = first_one(mask_t'(p2c_idle), C_P2C, pc_dst);
    pc_src_ok = rr_pick(mask_t'(potu_done), C_POTU, ptr_pu, pc_src);
    if (pc_dst_ok && pc_src_ok) begin
      p2c_go[pc_dst]    = 1'b1;
      p2c_in            = potu_out[pc_src];
      potu_take[pc_src] = 1'b1;
    end

    // PEC: ring task first, then a locally started task
    pe_dst_ok  = first_one(mask_t'(pec_idle), C_PEC, pe_dst);
    p2c_src_ok = rr_pick(mask_t'(p2c_done), C_P2C, ptr_pc, p2c_src);
    if (pe_dst_ok) begin
      if (ring_valid && ring_need) begin
        pec_go[pe_dst] = 1'b1;
        pec_in         = ring_pkt;
        ring_pop       = 1'b1;
        ring_to_pec    = 1'b1;
      end else if (p2c_src_ok) begin
        pec_go[pe_dst]     = 1'b1;
        pec_in             = p2c_out[p2c_src];
        pec_in.origin      = NODE_ID[NODE_W-1:0];
        pec_in.counter     = '0;
        pec_in.energy      = '0;
        pec_in.grad        = '0;
        p2c_take[p2c_src]  = 1'b1;
        local_to_pec       = 1'b1;
      end
    end

    // PEC results: incomplete ones forward, complete ones to a DER
    fw_mask = '0; rt_mask = '0;
    for (int k = 0; k < C_PEC; k++) begin
      fw_mask[k] = pec_done[k] && (int'(pec_out[k].counter) <  N_NODES);
      rt_mask[k] = pec_done[k] && (int'(pec_out[k].counter) >= N_NODES);
    end
    fw_ok = rr_pick(fw_mask, C_PEC, ptr_fw, fw_src);
    rt_ok = rr_pick(rt_mask, C_PEC, ptr_rt, rt_src);
    dr_ok = first_one(mask_t'(der_idle), C_DER, dr_dst);

    if (fw_ok) begin
      tx_valid         = 1'b1;
      tx_pkt           = pec_out[fw_src];
      pec_take[fw_src] = tx_ready;
    end else if (ring_valid && !ring_need) begin
      tx_valid = 1'b1;
      tx_pkt   = ring_pkt;
      ring_pop = tx_ready;
      bypass   = tx_ready;
    end

    if (rt_ok && dr_ok) begin
      der_go[dr_dst]   = 1'b1;
      der_in           = pec_out[rt_src];
      pec_take[rt_src] = 1'b1;
    end

    // DER outputs
    res_ok = rr_pick(mask_t'(der_res_valid), C_DER, ptr_res, res_src);
    rty_ok = rr_pick(mask_t'(der_rty_valid), C_DER, ptr_rty, rty_src);
    res_valid = res_ok;
    res       = der_res[res_src];
    if (res_ok) der_res_take[res_src] = res_ready;
    rty_valid = rty_ok;
    rty_pkt   = der_rty[rty_src];
    if (rty_ok) der_rty_take[rty_src] = rty_ready;
  end

  always_comb begin
    ev = '0;
    ev.local_dispatch = tb_pop;
    ev.ring_dispatch  = ring_to_pec;
    ev.local_pec      = local_to_pec;
    ev.forward        = fw_ok && tx_ready;
    ev.retain         = rt_ok && dr_ok;
    ev.bypass         = bypass;
    ev.retry          = rty_valid && rty_ready;
    ev.result         = res_valid && res_ready;
    ev.stall_local    = tb_valid && !pu_ok;
    ev.stall_ring     = ring_valid && ring_need && !pe_dst_ok;
  end

  function automatic idx_t inc(input idx_t k, input int n);
    return (int'(k) + 1 >= n) ? '0 : k + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr_pu <= '0; ptr_pc <= '0; ptr_fw <= '0;
      ptr_rt <= '0; ptr_res <= '0; ptr_rty <= '0;
    end else begin
      if (|potu_take)                ptr_pu  <= inc(pc_src, C_POTU);
      if (local_to_pec)              ptr_pc  <= inc(p2c_src, C_P2C);
      if (fw_ok && tx_ready)         ptr_fw  <= inc(fw_src, C_PEC);
      if (rt_ok && dr_ok)            ptr_rt  <= inc(rt_src, C_PEC);
      if (res_valid && res_ready)    ptr_res <= inc(res_src, C_DER);
      if (rty_valid && rty_ready)    ptr_rty <= inc(rty_src, C_DER);
    end
  end

  // a unit is never sent a task unless it reported idle
  a_potu_go_idle: assert property (@(posedge clk) disable iff (!rst_n) (potu_go & ~potu_idle) == '0);
  a_pec_go_idle:  assert property (@(posedge clk) disable iff (!rst_n) (pec_go & ~pec_idle) == '0);
  a_der_go_idle:  assert property (@(posedge clk) disable iff (!rst_n) (der_go & ~der_idle) == '0);
endmodule
