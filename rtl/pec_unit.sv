// pec_unit: Partial Energy Calculation against this node's grid partition.
//
// The energy grids (one 3-D map per ligand atom type, GX x GY x GZ points) are
// cut along x into N_NODES slabs of grid cells; node NODE_ID owns cells
// X_LO <= ix < X_HI and stores the grid planes X_LO .. X_HI (the last plane is
// shared with the next slab so that every owned cell has all eight corners
// locally).  Every PEC unit has its own copy of the slab in a grid_bram.
//
// For each atom of the packet the unit takes the integer part of the
// coordinate as the cell index and the fraction bits as the interpolation
// weights.  An atom whose cell is not owned by this node costs one cycle and
// adds nothing.  For an owned atom it reads the eight cell corners of the
// atom type's map (one read per cycle), then in one cycle interpolates
// trilinearly, E = lerp_z(lerp_y(lerp_x(V))), and forms the analytic gradient
// of the interpolant (differences of corner values, interpolated over the
// other two axes), and adds E and the gradient into the packet's running
// energy and grad.  When all atoms are done it increments the packet's
// counter (the energy tag) and presents the packet.
//
// Interface: in_valid/in_ready (in_ready is the idle report), out_valid/
// out_ready; ld_* writes the grid copy (address = ((type*PX + x-X_LO)*GY + y)
// *GZ + z).  Timing: 1 cycle per atom checked, 10 more per owned atom, and 1
// cycle to finish, so out_valid rises n_atoms + 10*owned + 1 cycles after
// acceptance.  Trilinear interpolation of pre-computed grids and the partition
// of the grid over the nodes follow the described design; the slicing along
// x, the corner-by-corner read schedule and the treatment of atoms outside the
// grid (they add nothing) are this design's choices.
module pec_unit
  import vina_pkg::*;
#(
  parameter int NODE_ID = 0,
  parameter int N_NODES = 3,
  parameter int GX      = 64,
  parameter int GY      = 64,
  parameter int GZ      = 64,
  parameter int NTYPES  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  task_pkt_t          in_pkt,
  output logic               out_valid,
  input  logic               out_ready,
  output task_pkt_t          out_pkt,
  input  logic               ld_en,
  input  logic [GADDR_W-1:0] ld_addr,
  input  fix_t               ld_data
);
  localparam int CELLS = GX - 1;
  localparam int X_LO  = (NODE_ID * CELLS) / N_NODES;
  localparam int X_HI  = ((NODE_ID + 1) * CELLS) / N_NODES;
  localparam int PX    = X_HI - X_LO + 1;
  localparam int DEPTH = NTYPES * PX * GY * GZ;
  localparam int AW    = $clog2(DEPTH);
  localparam int IW    = FIX_W - FRAC;          // integer bits of a coordinate
  localparam int AIW   = $clog2(MAX_ATOMS);

  typedef enum logic [2:0] {IDLE, CHECK, READ, INTERP, DONE} state_t;
  state_t              state;
  task_pkt_t           pkt;
  logic [NATOM_W-1:0]  idx;
  logic [3:0]          rk;
  fix_t                v [8];
  logic [ATYPE_W-1:0]  ctype;
  int                  cx, cy, cz;              // owned cell (cx relative to X_LO)
  logic [FRAC-1:0]     fx, fy, fz;

  // current atom
  vec_t                      c_coord;
  logic signed [IW-1:0]      ix, iy, iz;
  logic                      owned;
  always_comb begin
    c_coord = pkt.coord[idx[AIW-1:0]];
    ix = c_coord[0][FIX_W-1:FRAC];
    iy = c_coord[1][FIX_W-1:FRAC];
    iz = c_coord[2][FIX_W-1:FRAC];
    owned = (int'(ix) >= X_LO) && (int'(ix) < X_HI) &&
            (int'(iy) >= 0) && (int'(iy) < GY - 1) &&
            (int'(iz) >= 0) && (int'(iz) < GZ - 1) &&
            (int'(pkt.atype[idx[AIW-1:0]]) < NTYPES);
  end

  // grid copy
  logic [AW-1:0] raddr;
  fix_t          rdata;
  always_comb begin
    int a;
    a = ((int'(ctype) * PX + cx + int'(rk[0])) * GY + cy + int'(rk[1])) * GZ
        + cz + int'(rk[2]);
    raddr = AW'(a);
  end

  grid_bram #(.DEPTH(DEPTH), .AW(AW)) u_grid (
    .clk, .we(ld_en), .waddr(ld_addr[AW-1:0]), .wdata(ld_data),
    .raddr, .rdata
  );

  // trilinear interpolation and its gradient
  function automatic longint lerp(input longint a, input longint b, input logic [FRAC-1:0] f);
    return a + (((b - a) * longint'({1'b0, f})) >>> FRAC);
  endfunction

  longint e_at, gx_at, gy_at, gz_at;
  always_comb begin
    longint c00, c10, c01, c11, c0, c1;
    c00   = lerp(longint'(v[0]), longint'(v[1]), fx);
    c10   = lerp(longint'(v[2]), longint'(v[3]), fx);
    c01   = lerp(longint'(v[4]), longint'(v[5]), fx);
    c11   = lerp(longint'(v[6]), longint'(v[7]), fx);
    c0    = lerp(c00, c10, fy);
    c1    = lerp(c01, c11, fy);
    e_at  = lerp(c0, c1, fz);
    gz_at = c1 - c0;
    gy_at = lerp(c10 - c00, c11 - c01, fz);
    gx_at = lerp(lerp(longint'(v[1]) - longint'(v[0]), longint'(v[3]) - longint'(v[2]), fy),
                 lerp(longint'(v[5]) - longint'(v[4]), longint'(v[7]) - longint'(v[6]), fy), fz);
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign out_pkt   = pkt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      pkt   <= '0;
      idx   <= '0;
      rk    <= '0;
      ctype <= '0;
      cx <= 0; cy <= 0; cz <= 0;
      fx <= '0; fy <= '0; fz <= '0;
      for (int k = 0; k < 8; k++) v[k] <= '0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          pkt   <= in_pkt;
          idx   <= '0;
          state <= CHECK;
        end
        CHECK: begin
          if (idx >= pkt.n_atoms || int'(idx) >= MAX_ATOMS) begin
            pkt.counter <= pkt.counter + 1'b1;
            state       <= DONE;
          end else if (owned) begin
            ctype <= pkt.atype[idx[AIW-1:0]];
            cx    <= int'(ix) - X_LO;
            cy    <= int'(iy);
            cz    <= int'(iz);
            fx    <= c_coord[0][FRAC-1:0];
            fy    <= c_coord[1][FRAC-1:0];
            fz    <= c_coord[2][FRAC-1:0];
            rk    <= '0;
            state <= READ;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        READ: begin
          if (rk != 0) v[rk[2:0] - 3'd1] <= rdata;
          if (rk == 4'd8) state <= INTERP;
          rk <= rk + 1'b1;
        end
        INTERP: begin
          pkt.energy  <= pkt.energy  + acc_t'(e_at);
          pkt.grad[0] <= pkt.grad[0] + acc_t'(gx_at);
          pkt.grad[1] <= pkt.grad[1] + acc_t'(gy_at);
          pkt.grad[2] <= pkt.grad[2] + acc_t'(gz_at);
          idx   <= idx + 1'b1;
          state <= CHECK;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
