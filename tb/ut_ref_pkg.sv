// ut_ref_pkg: reference models shared by the multiplier testbenches.
//
// ut_or_ref models, arithmetically, the UT multiplier recursion with the two
// adder carries merged by a single OR gate (the OR_CARRY_MERGE = 1 variant):
// at each level p = q0_lo + 2^h*s2 + 2^(w+h)*(q3_hi + (c1|c2)), truncated to
// 2w bits. The exact variant is checked against the '*' operator instead.
package ut_ref_pkg;
  function automatic longint unsigned ut_or_ref(longint unsigned a, longint unsigned b, int w);
    longint unsigned m, mw, q0, q1, q2, q3, t, s1, s2, hi;
    logic c1, c2;
    int h;
    if (w == 2) return a * b;
    h  = w / 2;
    m  = (64'd1 << h) - 1;
    mw = (w == 64) ? '1 : (64'd1 << w) - 1;
    q0 = ut_or_ref(a & m, b & m, h);
    q1 = ut_or_ref(a >> h, b & m, h);
    q2 = ut_or_ref(a & m, b >> h, h);
    q3 = ut_or_ref(a >> h, b >> h, h);
    t  = q1 + q2;                        c1 = ((t >> w) & 1) != 0; s1 = t & mw;
    t  = s1 + (q0 >> h) + ((q3 & m) << h); c2 = ((t >> w) & 1) != 0; s2 = t & mw;
    hi = ((q3 >> h) + longint'(c1 | c2)) & m;
    return (q0 & m) | (s2 << h) | (hi << (w + h));
  endfunction
endpackage
