// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. Words are 16-bit signed with 8 fraction bits.
//
// tm_ref models the truncated multiplier from its definition: the exact
// product of the magnitudes, minus every partial-product bit a_i*b_j whose
// weight 2^(i+j) lies below 2^DROP, plus 2^(DROP-1), shifted down by F,
// limited to 2^15-1 and given the XOR of the signs.
package tb_ref_pkg;
  localparam int F = 8;
  localparam int DROP = 6;

  function automatic int sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int tm_ref(input int a, input int b);
    longint ma, mb, full, dropped, kept, mag;
    ma = (a < 0) ? -a : a;
    mb = (b < 0) ? -b : b;
    full = ma * mb;
    dropped = 0;
    for (int i = 0; i < DROP; i++)
      for (int j = 0; j <= DROP - 1 - i; j++)
        if (ma[i] && mb[j]) dropped += longint'(1) << (i + j);
    kept = full - dropped + (longint'(1) << (DROP - 1));
    mag = kept >>> F;
    if (mag > 32767) mag = 32767;
    return ((a < 0) != (b < 0)) ? -int'(mag) : int'(mag);
  endfunction

  function automatic int addsat(input int a, input int b);
    return sat16(longint'(a) + longint'(b));
  endfunction

  function automatic int ysign(input int v, input bit y);
    return y ? sat16(-longint'(v)) : v;
  endfunction

  // ---- SMO reference (one processing-unit step), same word arithmetic ----
  localparam int RM = 64, RN = 3;

  function automatic int divref(input int n, input int d);
    longint an, ad, q;
    if (d == 0) return 32767;
    an = (n < 0) ? -n : n;
    ad = (d < 0) ? -d : d;
    q = (an * 256) / ad;
    if (q > 32767) q = 32767;
    return ((n < 0) != (d < 0)) ? -int'(q) : int'(q);
  endfunction

  function automatic int kref(ref int x [RM*RN], input int p, input int q);
    int k;
    k = 0;
    for (int d = 0; d < RN; d++) k = addsat(k, tm_ref(x[p * RN + d], x[q * RN + d]));
    return k;
  endfunction

  function automatic int eref(ref int x [RM*RN], ref int a [RM], ref int y [RM],
                              input int n, input int t, input int b);
    int f;
    f = 0;
    for (int k = 0; k < n; k++)
      if (a[k] != 0) f = addsat(f, ysign(tm_ref(a[k], kref(x, k, t)), y[k][0]));
    return sat16(longint'(sat16(longint'(f) - b)) - (y[t] ? -256 : 256));
  endfunction

  // returns 0 unchanged, 1 updated, 2 rejected by eta or limits
  function automatic int smo_step_ref(ref int x [RM*RN], ref int a [RM], ref int y [RM],
                                      input int n, input int c, input int i, input int j,
                                      ref int b);
    int kii, kjj, kij, ei, ej, eta, lo, hi, quo, ajn, ain, daj, b1, b2, dai, dajs;
    kii = kref(x, i, i); kjj = kref(x, j, j); kij = kref(x, i, j);
    ei = eref(x, a, y, n, i, b);
    ej = eref(x, a, y, n, j, b);
    if (y[i] != y[j]) begin
      lo = (a[j] - a[i] > 0) ? a[j] - a[i] : 0;
      hi = (c + a[j] - a[i] < c) ? c + a[j] - a[i] : c;
    end else begin
      lo = (a[j] + a[i] - c > 0) ? a[j] + a[i] - c : 0;
      hi = (a[j] + a[i] < c) ? a[j] + a[i] : c;
    end
    eta = sat16(longint'(sat16(longint'(addsat(kij, kij)) - kii)) - kjj);
    if (eta >= 0 || lo >= hi) return 2;
    quo = divref(sat16(longint'(ei) - ej), eta);
    ajn = sat16(longint'(a[j]) - ysign(quo, y[j][0]));
    if (ajn > hi) ajn = hi;
    if (ajn < lo) ajn = lo;
    ain = addsat(a[i], ysign(sat16(longint'(a[j]) - ajn), y[i][0] ^ y[j][0]));
    if (ain < 0) ain = 0;
    if (ain > c) ain = c;
    daj = sat16(longint'(ajn) - a[j]);
    if (daj < 0) daj = sat16(-longint'(daj));
    if (daj <= 0) return 0;
    dai = sat16(longint'(ain) - a[i]);
    dajs = sat16(longint'(ajn) - a[j]);
    b1 = addsat(addsat(addsat(ei, ysign(tm_ref(dai, kii), y[i][0])), ysign(tm_ref(dajs, kij), y[j][0])), b);
    b2 = addsat(addsat(addsat(ej, ysign(tm_ref(dai, kij), y[i][0])), ysign(tm_ref(dajs, kjj), y[j][0])), b);
    if (ain > 0 && ain < c) b = b1;
    else if (ajn > 0 && ajn < c) b = b2;
    else b = (b1 + b2) >>> 1;
    a[i] = ain;
    a[j] = ajn;
    return 1;
  endfunction
endpackage
