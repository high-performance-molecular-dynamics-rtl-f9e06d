// md_ref_pkg: bit-accurate software reference of the short-range force
// computation for the testbenches: table decode, Horner evaluation with the
// semi floating point alignments, parameter products, cut-off and masking,
// and the final vector product, written from the number format definitions.
// It also holds the reference copies of the tables and fills them randomly.
package md_ref_pkg;
  import md_pkg::*;
  localparam int TDEPTH = NSEC * (1 << IVL_W);

  coef_t       tab [3][TDEPTH];
  pair_param_t prm [1 << (2*TYPE_W)];

  function automatic int shift_of(input logic [SSEL_W-1:0] s);
    int sh [8] = '{0, 1, 2, 3, 4, 6, 8, 12};
    return sh[s];
  endfunction

  function automatic void fill_tables();
    for (int k = 0; k < 3; k++)
      for (int a = 0; a < TDEPTH; a++) begin
        tab[k][a].c3 = data_t'(signed'($urandom) >>> 4);
        tab[k][a].c2 = data_t'(signed'($urandom) >>> 3);
        tab[k][a].c1 = data_t'(signed'($urandom) >>> 2);
        tab[k][a].c0 = data_t'(signed'($urandom) >>> 1);
        tab[k][a].fmt.sel1 = SSEL_W'($urandom);
        tab[k][a].fmt.sel2 = SSEL_W'($urandom);
        tab[k][a].fmt.sel3 = SSEL_W'($urandom);
        tab[k][a].fmt.osh  = OSH_W'($urandom_range(20, 40));
      end
    for (int a = 0; a < (1 << (2*TYPE_W)); a++) begin
      prm[a].a  = data_t'($urandom_range(0, 1 << 22));
      prm[a].b  = data_t'($urandom_range(0, 1 << 22));
      prm[a].qq = data_t'(signed'($urandom) >>> 10);
    end
  endfunction

  // one table: returns under; y and osh through outputs
  function automatic logic interp(input int k, input logic [X_W-1:0] x,
                                  output data_t y, output logic [OSH_W-1:0] osh);
    longint v, off, tt, a;
    int lead, ob, addr;
    coef_t c;
    v = longint'(x);
    lead = -1;
    for (int i = X_W - 1; i >= 0; i--) if (lead < 0 && v >= (64'sd1 <<< i)) lead = i;
    if (lead < int'(X_W - NSEC)) begin
      lead = int'(X_W - NSEC);            // the hardware still reads section 0
      v = v | (64'sd1 <<< lead);
      addr = 0;
    end
    ob   = lead - int'(IVL_W);
    addr = (lead - int'(X_W - NSEC)) * (1 << IVL_W) + int'(((v - (64'sd1 <<< lead)) >>> ob) & ((1 << IVL_W) - 1));
    off  = (v - (64'sd1 <<< lead)) & ((64'sd1 <<< ob) - 1);
    tt   = (ob <= int'(T_W)) ? off <<< (int'(T_W) - ob) : off >>> (ob - int'(T_W));
    c = tab[k][addr];
    a = longint'(c.c3);
    a = longint'(data_t'(longint'(c.c2) + (((a * tt) >>> T_W) >>> shift_of(c.fmt.sel1))));
    a = longint'(data_t'(longint'(c.c1) + (longint'(data_t'((a * tt) >>> T_W)) >>> shift_of(c.fmt.sel2))));
    a = longint'(data_t'(longint'(c.c0) + (longint'(data_t'((a * tt) >>> T_W)) >>> shift_of(c.fmt.sel3))));
    y   = data_t'(a);
    osh = c.fmt.osh;
    return (longint'(x) < (64'sd1 <<< (X_W - NSEC)));
  endfunction

  // force on i from j; returns 1 if the pair is inside the cut-off and used
  function automatic logic pair_force(input particle_t pi, input particle_t pj, input logic mask,
                                      input logic [70:0] rc2, input int r2_sh, input int f_sh,
                                      output vec_t f);
    logic signed [POS_W-1:0] d [3];
    logic [70:0] r2;
    logic [X_W-1:0] x;
    logic cut, und, u;
    data_t y [3], t [3], fr;
    logic [OSH_W-1:0] osh [3];
    pair_param_t p;
    data_t pv [3];
    d[0] = POS_W'(pi.x - pj.x); d[1] = POS_W'(pi.y - pj.y); d[2] = POS_W'(pi.z - pj.z);
    r2 = '0;
    for (int i = 0; i < 3; i++) r2 += 71'($signed(d[i]) * $signed(d[i]));
    cut = (r2 >= rc2);
    x = cut ? '0 : X_W'(r2 >> r2_sh);
    p = prm[{pi.t, pj.t}];
    pv[0] = p.a; pv[1] = p.b; pv[2] = p.qq;
    und = 1'b0;
    for (int k = 0; k < 3; k++) begin
      logic signed [2*DATA_W-1:0] pr;
      u = interp(k, x, y[k], osh[k]);
      und |= u;
      pr = pv[k] * y[k];
      t[k] = data_t'(pr >>> osh[k]);
    end
    fr = (mask && !cut && !und) ? data_t'(t[0] - t[1] + t[2]) : '0;
    begin
      logic signed [DATA_W+POS_W-1:0] q;
      q = fr * d[0]; f.x = data_t'(q >>> f_sh);
      q = fr * d[1]; f.y = data_t'(q >>> f_sh);
      q = fr * d[2]; f.z = data_t'(q >>> f_sh);
    end
    return mask && !cut && !und;
  endfunction
endpackage
