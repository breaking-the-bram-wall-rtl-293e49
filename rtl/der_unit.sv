// der_unit: Derivation and AG-condition check, the last stage of an AG trial.
//
// It receives a packet whose energy is complete (all N partitions summed).
// In one cycle it forms the directional derivative at the trial point,
// gp = grad . p, and the Armijo bound e0 + c1 * alpha * g0p, with
// c1 = 2^-C1_SHIFT; the trial is accepted when energy <= bound.
//  * Accepted, or MAX_TRIALS trials used: an ag_result_t (new position,
//    energy, gradient, gp, alpha, trial number, this node's id) is presented
//    on res_valid/res_ready for the processing system.
//  * Otherwise the next trial is prepared on this same node: alpha is halved,
//    the trial number incremented, energy, gradient and the energy tag
//    cleared, and the packet is presented on rty_valid/rty_ready for the
//    node's Tasks Buffer, so the next AG iteration starts here.
// Interface: in_ready is the idle report.  Timing: the result or retry is
// valid from the clock edge after the one that accepts the packet (one
// cycle of compute) and held until taken.
// Restarting the next iteration on the finishing node follows the described
// design.  The Armijo form of the test, c1 = 2^-13 (close to the 1e-4 that
// Vina uses), the halving of alpha and the limit of 10 trials are taken from
// the Vina line search, which the description names but does not detail; the
// gradient is the translational one, the sum of the atom gradients.
module der_unit
  import vina_pkg::*;
#(
  parameter int NODE_ID    = 0,
  parameter int MAX_TRIALS = 10,
  parameter int C1_SHIFT   = 13
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  task_pkt_t  in_pkt,
  output logic       res_valid,
  input  logic       res_ready,
  output ag_result_t res,
  output logic       rty_valid,
  input  logic       rty_ready,
  output task_pkt_t  rty_pkt
);
  typedef enum logic [1:0] {IDLE, CALC, DONE} state_t;
  state_t    state;
  task_pkt_t pkt;
  acc_t      gp;
  logic      accept, last;

  logic signed [63:0] gp_c, bound_c;
  always_comb begin
    gp_c = 0;
    for (int a = 0; a < 3; a++)
      gp_c += (64'(pkt.grad[a]) * 64'(pkt.p[a])) >>> FRAC;
    bound_c = 64'(pkt.e0) + ((64'(pkt.alpha) * 64'(pkt.g0p)) >>> (FRAC + C1_SHIFT));
  end

  assign in_ready  = (state == IDLE);
  assign res_valid = (state == DONE) && (accept || last);
  assign rty_valid = (state == DONE) && !(accept || last);

  always_comb begin
    res          = '0;
    res.task_id  = pkt.task_id;
    res.accepted = accept;
    res.trial    = pkt.trial;
    res.node     = NODE_ID[NODE_W-1:0];
    res.alpha    = pkt.alpha;
    res.x        = pkt.x;
    res.energy   = pkt.energy;
    res.grad     = pkt.grad;
    res.gp       = gp;

    rty_pkt         = pkt;
    rty_pkt.alpha   = pkt.alpha >>> 1;
    rty_pkt.trial   = pkt.trial + 1'b1;
    rty_pkt.counter = '0;
    rty_pkt.origin  = NODE_ID[NODE_W-1:0];
    rty_pkt.energy  = '0;
    rty_pkt.grad    = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      pkt    <= '0;
      gp     <= '0;
      accept <= 1'b0;
      last   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          pkt   <= in_pkt;
          state <= CALC;
        end
        CALC: begin
          gp     <= acc_t'(gp_c);
          accept <= (64'(pkt.energy) <= bound_c);
          last   <= (int'(pkt.trial) + 1 >= MAX_TRIALS);
          state  <= DONE;
        end
        DONE: if ((res_valid && res_ready) || (rty_valid && rty_ready)) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
