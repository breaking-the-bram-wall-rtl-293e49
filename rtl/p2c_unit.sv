// p2c_unit: POT to Coordinates, the second stage of an AG trial.
//
// Turns the ligand position x written by POT-U into Cartesian coordinates of
// every atom: coord[i] = x + offs[i] (saturating), one atom per cycle, for
// i = 0 .. n_atoms-1.  offs[] is the ligand's atom layout relative to its
// reference point, carried in the packet.  Because only the translation part
// of the conformation is modelled, no rotation or torsion is applied.
// Interface as the other pool units: in_ready is the idle report; busy until
// the result is taken on out_valid/out_ready.  Timing: out_valid rises
// max(n_atoms,1) cycles after acceptance.  Function as described for the P2C
// stage; the rigid-translation conversion is this design's simplification.
module p2c_unit
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
  state_t             state;
  logic [NATOM_W-1:0] idx;
  task_pkt_t          pkt;

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign out_pkt   = pkt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
      pkt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          pkt   <= in_pkt;
          idx   <= '0;
          state <= CALC;
        end
        CALC: begin
          if (int'(idx) < MAX_ATOMS && idx < pkt.n_atoms)
            for (int a = 0; a < 3; a++)
              pkt.coord[idx[$clog2(MAX_ATOMS)-1:0]][a] <=
                fix_add(pkt.x[a], pkt.offs[idx[$clog2(MAX_ATOMS)-1:0]][a]);
          if (idx + 1'b1 >= pkt.n_atoms) state <= DONE;
          idx <= idx + 1'b1;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
