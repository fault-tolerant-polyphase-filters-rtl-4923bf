// ppf_ref_pkg: reference models shared by the decimator testbenches.
//
// The models follow the equations of the fault-tolerant decimator written
// with plain integers, independently of the RTL structure:
//   prot_ref    one Sum & PPFs Protection copy: z' = sum y_m, c_m = (M*y_m > z'),
//               C = sum c_m, single deviating phase when C = 1 or C = M-1,
//               substitute y^S from the neighbours, z = z' + y^S_m - y_m
//               (wrapped to zw bits);
//               (optionally with an upset z' or z, as a soft error would leave);
//   sel_ref     Compare & Select rules (a), (b), (c) and the copy-1 fall-back.
package ppf_ref_pkg;

  function automatic longint wrap(longint v, int w);
    longint m = longint'(1) << w;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction

  function automatic longint floor_half(longint v);
    if (v >= 0) return v / 2;
    return -((-v + 1) / 2);
  endfunction

  // Optional upsets of one copy: zp_bad replaces the registered sum z'
  // (force_zp), z_bad replaces the registered corrected output z (force_z).
  function automatic void prot_ref(input longint y[], input int zw,
                                   output longint z, output longint zp,
                                   output int c_cnt, output bit det, output int idx,
                                   input bit force_zp = 0, input longint zp_bad = 0,
                                   input bit force_z = 0, input longint z_bad = 0);
    int mm = y.size();
    bit c[];
    int ones = 0;
    longint ys;
    c = new[mm];
    zp = 0;
    foreach (y[i]) zp += y[i];
    zp = wrap(zp, zw);
    if (force_zp) zp = wrap(zp_bad, zw);
    foreach (y[i]) begin
      c[i] = (y[i] * mm > zp);
      ones += int'(c[i]);
    end
    c_cnt = ones;
    det = (ones == 1) || (ones == mm - 1);
    idx = 0;
    z = zp;
    if (det) begin
      for (int i = 0; i < mm; i++)
        if (c[i] == (ones == 1)) idx = i;
      if (idx == 0) ys = y[1];
      else if (idx == mm - 1) ys = y[mm-2];
      else ys = floor_half(y[idx-1] + y[idx+1]);
      z = wrap(zp + ys - y[idx], zw);
    end
    if (force_z) z = wrap(z_bad, zw);
  endfunction

  function automatic void sel_ref(input longint z1, zp1, input int c1,
                                  input longint z2, zp2, input int c2, input int mm,
                                  output bit pick2, output int rule);
    int d1 = (c1 > mm / 2) ? c1 - mm / 2 : mm / 2 - c1;
    int d2 = (c2 > mm / 2) ? c2 - mm / 2 : mm / 2 - c2;
    pick2 = 0;
    rule = 0;
    if (z1 == z2) return;
    if (d1 != d2) begin
      rule = 1; pick2 = (d2 < d1); return;
    end
    if ((z1 == zp1) && (z2 != zp2)) begin rule = 2; pick2 = 0; return; end
    if ((z2 == zp2) && (z1 != zp1)) begin rule = 2; pick2 = 1; return; end
    rule = 3;
  endfunction

endpackage
