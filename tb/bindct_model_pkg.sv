// bindct_model_pkg: word-level reference model of the binDCT used by the
// testbenches. It computes with whole integers what the bit-serial circuits
// compute bit by bit: every lifting step is floor(Q +/- k*P/2^m) or
// floor(k*P/2^m - Q), every sum wraps at 16 bits, and the coefficient set is
// CB (u1 = 1/2, d1 = 3/8, u2 = 5/8, d2 = 1/2, u3 = 1/4, d3 = 1/4, u4 = 1/2,
// d4 = 3/4, u5 = 1/2). The forward flow is Chen's factorisation with
// lifting; the inverse undoes each step in reverse order, with butterflies
// that double their outputs. The functions ending in w are the same model
// for any word length w, on longint values.
package bindct_model_pkg;

  typedef logic signed [15:0] w16_t;
  typedef w16_t vec8_t [8];

  function automatic w16_t wrap(longint v);
    return w16_t'(v[15:0]);
  endfunction

  // mode: 0 Q + s, 1 Q - s, 2 s - Q, with s = k*P/2^m (exact, then floor)
  function automatic w16_t lift(w16_t q, w16_t p, int k, int m, int mode);
    longint kp, qq;
    kp = longint'(k) * longint'(p);
    qq = longint'(q) <<< m;
    case (mode)
      0:       return wrap((qq + kp) >>> m);
      1:       return wrap((qq - kp) >>> m);
      default: return wrap((kp - qq) >>> m);
    endcase
  endfunction

  function automatic w16_t add(w16_t a, w16_t b); return wrap(longint'(a) + longint'(b)); endfunction
  function automatic w16_t sub(w16_t a, w16_t b); return wrap(longint'(a) - longint'(b)); endfunction

  function automatic vec8_t fwd8(vec8_t x);
    vec8_t X;
    w16_t a0, a1, a2, a3, a4, a5, a6, a7, c5, c6, b0, b1, b2, b3, d4, d5, d6, d7, t;
    a0 = add(x[0], x[7]); a7 = sub(x[0], x[7]);
    a1 = add(x[1], x[6]); a6 = sub(x[1], x[6]);
    a2 = add(x[2], x[5]); a5 = sub(x[2], x[5]);
    a3 = add(x[3], x[4]); a4 = sub(x[3], x[4]);
    c5 = lift(a5, a6, 1, 1, 1);          // u4
    c6 = lift(a6, c5, 3, 2, 0);          // d4
    c5 = lift(c5, c6, 1, 1, 2);          // u5
    b0 = add(a0, a3); b3 = sub(a0, a3);
    b1 = add(a1, a2); b2 = sub(a1, a2);
    d4 = add(a4, c5); d5 = sub(a4, c5);
    d7 = add(a7, c6); d6 = sub(a7, c6);
    X[0] = add(b0, b1);
    X[4] = lift(b1, X[0], 1, 1, 2);
    X[6] = lift(b2, b3, 1, 1, 2);        // u1
    X[2] = lift(b3, X[6], 3, 3, 1);      // d1
    X[7] = lift(d4, d7, 1, 2, 2);        // u3
    X[1] = lift(d7, X[7], 1, 2, 1);      // d3
    X[5] = lift(d5, d6, 5, 3, 0);        // u2
    X[3] = lift(d6, X[5], 1, 1, 1);      // d2
    return X;
  endfunction

  function automatic vec8_t inv8(vec8_t X);
    vec8_t x;
    w16_t b0, b1, b2, b3, d4, d5, d6, d7, a0, a1, a2, a3, a4, a5, a6, a7, c5, c6;
    b1 = lift(X[4], X[0], 1, 1, 2);
    b0 = sub(X[0], b1);
    b3 = lift(X[2], X[6], 3, 3, 0);      // d1 undone
    b2 = lift(X[6], b3, 1, 1, 2);        // u1 undone
    d7 = lift(X[1], X[7], 1, 2, 0);      // d3 undone
    d4 = lift(X[7], d7, 1, 2, 2);        // u3 undone
    d6 = lift(X[3], X[5], 1, 1, 0);      // d2 undone
    d5 = lift(X[5], d6, 5, 3, 1);        // u2 undone
    a0 = add(b0, b3); a3 = sub(b0, b3);
    a1 = add(b1, b2); a2 = sub(b1, b2);
    a4 = add(d4, d5); c5 = sub(d4, d5);
    a7 = add(d7, d6); c6 = sub(d7, d6);
    c5 = lift(c5, c6, 1, 1, 2);          // u5 undone
    a6 = lift(c6, c5, 3, 2, 1);          // d4 undone
    a5 = lift(c5, a6, 1, 1, 0);          // u4 undone
    x[0] = add(a0, a7); x[7] = sub(a0, a7);
    x[1] = add(a1, a6); x[6] = sub(a1, a6);
    x[2] = add(a2, a5); x[5] = sub(a2, a5);
    x[3] = add(a3, a4); x[4] = sub(a3, a4);
    return x;
  endfunction

  // ---- the same model for any word length w (2..63 bits), on longint
  typedef longint lvec8_t [8];

  function automatic longint wrapw(longint v, int w);
    longint r;
    r = v & ((longint'(1) << w) - 1);
    if (r[w-1]) r = r - (longint'(1) << w);
    return r;
  endfunction

  function automatic longint liftw(longint q, longint p, int k, int m, int mode, int w);
    longint kp, qq;
    kp = longint'(k) * p;
    qq = q <<< m;
    case (mode)
      0:       return wrapw((qq + kp) >>> m, w);
      1:       return wrapw((qq - kp) >>> m, w);
      default: return wrapw((kp - qq) >>> m, w);
    endcase
  endfunction

  function automatic longint addw(longint a, longint b, int w); return wrapw(a + b, w); endfunction
  function automatic longint subw(longint a, longint b, int w); return wrapw(a - b, w); endfunction

  function automatic lvec8_t fwd8w(lvec8_t x, int w);
    lvec8_t X;
    longint a0, a1, a2, a3, a4, a5, a6, a7, c5, c6, b0, b1, b2, b3, d4, d5, d6, d7, t;
    a0 = addw(x[0], x[7], w); a7 = subw(x[0], x[7], w);
    a1 = addw(x[1], x[6], w); a6 = subw(x[1], x[6], w);
    a2 = addw(x[2], x[5], w); a5 = subw(x[2], x[5], w);
    a3 = addw(x[3], x[4], w); a4 = subw(x[3], x[4], w);
    c5 = liftw(a5, a6, 1, 1, 1, w);          // u4
    c6 = liftw(a6, c5, 3, 2, 0, w);          // d4
    c5 = liftw(c5, c6, 1, 1, 2, w);          // u5
    b0 = addw(a0, a3, w); b3 = subw(a0, a3, w);
    b1 = addw(a1, a2, w); b2 = subw(a1, a2, w);
    d4 = addw(a4, c5, w); d5 = subw(a4, c5, w);
    d7 = addw(a7, c6, w); d6 = subw(a7, c6, w);
    X[0] = addw(b0, b1, w);
    X[4] = liftw(b1, X[0], 1, 1, 2, w);
    X[6] = liftw(b2, b3, 1, 1, 2, w);        // u1
    X[2] = liftw(b3, X[6], 3, 3, 1, w);      // d1
    X[7] = liftw(d4, d7, 1, 2, 2, w);        // u3
    X[1] = liftw(d7, X[7], 1, 2, 1, w);      // d3
    X[5] = liftw(d5, d6, 5, 3, 0, w);        // u2
    X[3] = liftw(d6, X[5], 1, 1, 1, w);      // d2
    return X;
  endfunction

  function automatic lvec8_t inv8w(lvec8_t X, int w);
    lvec8_t x;
    longint b0, b1, b2, b3, d4, d5, d6, d7, a0, a1, a2, a3, a4, a5, a6, a7, c5, c6;
    b1 = liftw(X[4], X[0], 1, 1, 2, w);
    b0 = subw(X[0], b1, w);
    b3 = liftw(X[2], X[6], 3, 3, 0, w);      // d1 undone
    b2 = liftw(X[6], b3, 1, 1, 2, w);        // u1 undone
    d7 = liftw(X[1], X[7], 1, 2, 0, w);      // d3 undone
    d4 = liftw(X[7], d7, 1, 2, 2, w);        // u3 undone
    d6 = liftw(X[3], X[5], 1, 1, 0, w);      // d2 undone
    d5 = liftw(X[5], d6, 5, 3, 1, w);        // u2 undone
    a0 = addw(b0, b3, w); a3 = subw(b0, b3, w);
    a1 = addw(b1, b2, w); a2 = subw(b1, b2, w);
    a4 = addw(d4, d5, w); c5 = subw(d4, d5, w);
    a7 = addw(d7, d6, w); c6 = subw(d7, d6, w);
    c5 = liftw(c5, c6, 1, 1, 2, w);          // u5 undone
    a6 = liftw(c6, c5, 3, 2, 1, w);          // d4 undone
    a5 = liftw(c5, a6, 1, 1, 0, w);          // u4 undone
    x[0] = addw(a0, a7, w); x[7] = subw(a0, a7, w);
    x[1] = addw(a1, a6, w); x[6] = subw(a1, a6, w);
    x[2] = addw(a2, a5, w); x[5] = subw(a2, a5, w);
    x[3] = addw(a3, a4, w); x[4] = subw(a3, a4, w);
    return x;
  endfunction

endpackage
