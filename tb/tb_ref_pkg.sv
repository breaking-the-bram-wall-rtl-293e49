// tb_ref_pkg: reference arithmetic for the testbenches, written apart from
// the RTL.
//
// grid_val() defines the content of the energy grids used in simulation: a
// bowl centred in the box plus a small pseudo-random ripple, so line-search
// trials are sometimes accepted and sometimes rejected:
//   V(t,x,y,z) = K * ((x-GX/2)^2 + (y-GY/2)^2 + (z-GZ/2)^2)
//                + 9 * ((7x + 13y + 5z + 29t) mod 61) - 270
// with K = max(1, 24000 / (3 (GX/2)^2)), in units of 2^-10.
// ref_atom() is trilinear interpolation and its gradient done from the grid
// formula, ref_trial() one whole AG trial (position update, coordinates,
// energy over every slab, Armijo test) for checking results end to end.
package tb_ref_pkg;
  import vina_pkg::*;

  localparam int F = 10;

  function automatic longint clamp18(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  function automatic longint grid_val(input int t, input int x, input int y, input int z,
                                      input int gx, input int gy, input int gz);
    longint k, dx, dy, dz;
    k = 24000 / (3 * (gx / 2) * (gx / 2));
    if (k < 1) k = 1;
    dx = x - gx / 2; dy = y - gy / 2; dz = z - gz / 2;
    return k * (dx * dx + dy * dy + dz * dz) + 9 * ((7 * x + 13 * y + 5 * z + 29 * t) % 61) - 270;
  endfunction

  // owner node of the cell under coordinate c, or -1 when outside the grid
  function automatic int owner(input longint cx, input longint cy, input longint cz,
                               input int gx, input int gy, input int gz, input int n);
    longint ix, iy, iz;
    ix = cx >>> F; iy = cy >>> F; iz = cz >>> F;
    if (ix < 0 || ix >= gx - 1 || iy < 0 || iy >= gy - 1 || iz < 0 || iz >= gz - 1) return -1;
    for (int j = 0; j < n; j++)
      if (ix >= (j * (gx - 1)) / n && ix < ((j + 1) * (gx - 1)) / n) return j;
    return -1;
  endfunction

  function automatic longint mix(input longint a, input longint b, input longint f);
    return a + (((b - a) * f) >>> F);
  endfunction

  // energy and gradient of one atom of type t at (cx,cy,cz)
  function automatic void ref_atom(input int t, input longint cx, input longint cy, input longint cz,
                                   input int gx, input int gy, input int gz,
                                   output longint e, output longint g[3]);
    longint v[2][2][2];
    longint ix, iy, iz, fx, fy, fz;
    longint a0, a1, b0, b1, c0, c1, d0, d1;
    ix = cx >>> F; iy = cy >>> F; iz = cz >>> F;
    fx = cx & 1023; fy = cy & 1023; fz = cz & 1023;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        for (int k = 0; k < 2; k++)
          v[i][j][k] = grid_val(t, int'(ix) + i, int'(iy) + j, int'(iz) + k, gx, gy, gz);
    // along x at the four (y,z) edges
    a0 = mix(v[0][0][0], v[1][0][0], fx);   // y0 z0
    a1 = mix(v[0][1][0], v[1][1][0], fx);   // y1 z0
    b0 = mix(v[0][0][1], v[1][0][1], fx);   // y0 z1
    b1 = mix(v[0][1][1], v[1][1][1], fx);   // y1 z1
    c0 = mix(a0, a1, fy);
    c1 = mix(b0, b1, fy);
    e  = mix(c0, c1, fz);
    g[2] = c1 - c0;
    g[1] = mix(a1 - a0, b1 - b0, fz);
    d0 = mix(v[1][0][0] - v[0][0][0], v[1][1][0] - v[0][1][0], fy);
    d1 = mix(v[1][0][1] - v[0][0][1], v[1][1][1] - v[0][1][1], fy);
    g[0] = mix(d0, d1, fz);
  endfunction

  // partial energy of the atoms owned by node `node` (node < 0: all nodes)
  function automatic void ref_partial(input task_pkt_t p, input int node, input int n,
                                      input int gx, input int gy, input int gz, input int ntypes,
                                      output longint e, output longint g[3]);
    longint ea, ga[3];
    e = 0; g[0] = 0; g[1] = 0; g[2] = 0;
    for (int a = 0; a < int'(p.n_atoms) && a < MAX_ATOMS; a++) begin
      int o;
      o = owner(longint'(p.coord[a][0]), longint'(p.coord[a][1]), longint'(p.coord[a][2]), gx, gy, gz, n);
      if (o >= 0 && (node < 0 || o == node) && int'(p.atype[a]) < ntypes) begin
        ref_atom(int'(p.atype[a]), longint'(p.coord[a][0]), longint'(p.coord[a][1]),
                 longint'(p.coord[a][2]), gx, gy, gz, ea, ga);
        e += ea;
        for (int d = 0; d < 3; d++) g[d] += ga[d];
      end
    end
  endfunction

  // trial position and coordinates for a given alpha
  function automatic task_pkt_t ref_move(input task_pkt_t p);
    task_pkt_t q;
    q = p;
    for (int d = 0; d < 3; d++)
      q.x[d] = fix_t'(clamp18(longint'(p.x0[d]) + clamp18((longint'(p.alpha) * longint'(p.p[d])) >>> F)));
    for (int a = 0; a < int'(p.n_atoms) && a < MAX_ATOMS; a++)
      for (int d = 0; d < 3; d++)
        q.coord[a][d] = fix_t'(clamp18(longint'(q.x[d]) + longint'(p.offs[a][d])));
    return q;
  endfunction

  // expected AG result of a task started on node `start`
  function automatic ag_result_t ref_task(input task_pkt_t p, input int start, input int n,
                                          input int gx, input int gy, input int gz, input int ntypes,
                                          input int max_trials, input int c1_shift);
    ag_result_t r;
    task_pkt_t  q;
    longint     e, g[3], bound, gp;
    int         node;
    q = p;
    node = start;
    r = '0;
    for (int t = 0; t < max_trials; t++) begin
      q.trial = TRIAL_W'(t);
      q = ref_move(q);
      ref_partial(q, -1, n, gx, gy, gz, ntypes, e, g);
      node  = (node + n - 1) % n;
      bound = longint'(q.e0) + ((longint'(q.alpha) * longint'(q.g0p)) >>> (F + c1_shift));
      gp = 0;
      for (int d = 0; d < 3; d++) gp += (g[d] * longint'(q.p[d])) >>> F;
      r.task_id  = q.task_id;
      r.accepted = (e <= bound);
      r.trial    = q.trial;
      r.node     = NODE_W'(node);
      r.alpha    = q.alpha;
      r.x        = q.x;
      r.energy   = acc_t'(e);
      for (int d = 0; d < 3; d++) r.grad[d] = acc_t'(g[d]);
      r.gp       = acc_t'(gp);
      if (r.accepted) break;
      q.alpha = q.alpha >>> 1;
    end
    return r;
  endfunction

  // a random ligand task near the grid centre, atoms spread over +-gx/4 points
  function automatic task_pkt_t rand_task(input int id, input int natoms, input int gx, input int gy,
                                          input int gz, input int ntypes);
    task_pkt_t p;
    p = '0;
    p.task_id = TASK_ID_W'(id);
    p.n_atoms = NATOM_W'(natoms);
    p.alpha   = fix_t'(int'($urandom_range(1024, 6144)));
    p.x0[0] = fix_t'((gx / 2) * 1024 + int'($urandom_range(0, 4095)) - 2048);
    p.x0[1] = fix_t'((gy / 2) * 1024 + int'($urandom_range(0, 4095)) - 2048);
    p.x0[2] = fix_t'((gz / 2) * 1024 + int'($urandom_range(0, 4095)) - 2048);
    for (int a = 0; a < natoms; a++) begin
      p.atype[a] = ATYPE_W'($urandom_range(0, ntypes - 1));
      for (int d = 0; d < 3; d++)
        p.offs[a][d] = fix_t'(int'($urandom_range(0, (gx / 2) * 1024)) - (gx / 4) * 1024);
    end
    // one atom sits outside the box
    if (natoms > 2) p.offs[1][0] = fix_t'(-(gx + 4) * 1024);
    // start energy, gradient and a descent direction from the grid itself
    begin
      task_pkt_t q;
      longint e, g[3], s, gp;
      q = p;
      q.alpha = '0;
      q = ref_move(q);
      ref_partial(q, -1, 1, gx, gy, gz, ntypes, e, g);
      s = 1;
      for (int d = 0; d < 3; d++) if ((g[d] < 0 ? -g[d] : g[d]) > s) s = (g[d] < 0 ? -g[d] : g[d]);
      gp = 0;
      for (int d = 0; d < 3; d++) begin
        p.p[d] = fix_t'(-(g[d] * 1024) / s);
        gp += (g[d] * longint'(p.p[d])) >>> F;
      end
      p.e0  = acc_t'(e);
      p.g0p = acc_t'(gp);
    end
    return p;
  endfunction
endpackage
