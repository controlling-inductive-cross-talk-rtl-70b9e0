// tb_xtalk_ref_pkg: reference model for the testbenches, written apart from
// the RTL. It works on a whole segment pin array (VDD, signals, VSS padded
// by the neighbouring segments' supply pins), so that distance arithmetic
// is explicit, and uses the same electrical numbers as the design:
// k1 = 50, k2 = 25, k3 = 12, z = 100 permille of VDD, bounds 50 (aggressive) or 125
// (non-aggressive) permille.
package tb_xtalk_ref_pkg;

  // Rule mask of the transition prev -> next on a segment with ns signal
  // pins and coupling reach p = 2; bit r-1 = rule r.
  function automatic longint unsigned ref_viol(int ns, int thr, int ppower,
                                               int prev, int next);
    return ref_viol_p(ns, thr, ppower, prev, next, 2);
  endfunction

  // Same for reach 1..3. The three segments j-1, j, j+1 are laid out in a
  // row of 3n positions; supply pins are static, signal pins of j-1 and j+1
  // are unknown and taken at their worst (k3 = 12 permille).
  function automatic longint unsigned ref_viol_p(int ns, int thr, int ppower,
                                                 int prev, int next, int reach);
    int n;
    int tr  [0:35];           // transition of each position (segment j only)
    bit unk [0:35];           // position is a signal pin of j-1 or j+1
    int kq  [1:3];
    int nr, rise, fall, c, u, x, base;
    longint unsigned mask;
    kq[1] = 50; kq[2] = 25; kq[3] = 12;
    n = ns + 2;
    base = n;                 // position of segment j's VDD pin
    mask = 0;
    for (int a = 0; a < 3 * n; a++) begin
      tr[a]  = 0;
      unk[a] = (a % n != 0) && (a % n != n - 1) && (a < n || a >= 2 * n);
    end
    rise = 0; fall = 0;
    for (int i = 1; i <= ns; i++) begin
      tr[base+i] = int'(next[i-1]) - int'(prev[i-1]);
      if (tr[base+i] == 1)  rise++;
      if (tr[base+i] == -1) fall++;
    end
    nr = 3 * n - 3;
    if (50 * rise > thr)      mask |= 64'd1 << 0;
    if (50 * fall > thr)      mask |= 64'd1 << (nr - 2);
    if (rise + fall > ppower) mask |= 64'd1 << (nr - 1);
    for (int i = 1; i <= ns; i++) begin
      c = 0; u = 0;
      for (int q = 1; q <= reach; q++) begin
        x = base + i - q;
        c += kq[q] * tr[x];
        if (unk[x]) u += kq[q];
        x = base + i + q;
        c += kq[q] * tr[x];
        if (unk[x]) u += kq[q];
      end
      case (tr[base+i])
        1:  if (c - u < -thr)                  mask |= 64'd1 << (3*i - 2);
        -1: if (c + u > thr)                   mask |= 64'd1 << (3*i - 1);
        default: if (c + u > thr || c - u < -thr) mask |= 64'd1 << (3*i);
      endcase
    end
    return mask;
  endfunction

  function automatic int popcount(int x);
    int n;
    n = 0;
    for (int i = 0; i < 32; i++) n += (x >> i) & 1;
    return n;
  endfunction

endpackage
