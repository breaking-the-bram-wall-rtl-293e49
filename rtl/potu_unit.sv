// potu_unit: POT Update, the first stage of an AG line-search trial.
//
// Computes the trial ligand position x = x0 + alpha * p, one axis per cycle
// through a single 18x18 multiplier, with saturation to 18 bits.  Only the
// position part of the conformation (the translation of the ligand) is
// modelled; orientation and torsions are not represented in this design.
// Interface: in_valid/in_ready, where in_ready means idle (the idle report the
// scheduler watches); the unit is busy from acceptance until its result is
// taken on out_valid/out_ready.  Timing: out_valid rises 3 cycles after the
// task is accepted.  The function follows the description of the POT Update
// stage; the serial one-multiplier datapath is this design's choice.
module potu_unit
  import vina_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  task_pkt_t in_pkt,
  output logic      out_valid,
  input  logic      out_ready,
  output task_pkt_t out_pkt
);
  typedef enum logic [1:0] {IDLE, CALC, DONE} state_t;
  state_t     state;
  logic [1:0] axis;
  task_pkt_t  pkt;

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign out_pkt   = pkt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      axis  <= '0;
      pkt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          pkt   <= in_pkt;
          axis  <= '0;
          state <= CALC;
        end
        CALC: begin
          pkt.x[axis] <= fix_add(pkt.x0[axis], fix_mul(pkt.alpha, pkt.p[axis]));
          if (axis == 2'd2) state <= DONE;
          axis <= axis + 1'b1;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
