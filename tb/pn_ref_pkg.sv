// pn_ref_pkg: reference model of the key-generating Petri net for the
// testbenches, written transition by transition from the net (not from the
// incidence matrices the RTL uses):
//   T1: P1 -> P2, P5   T2: P2 -> P3   T3: P3 -> P4
//   T4: P5 -> P6       T5: P2 -> P4   T6: P4, P6 -> P1
// One step fires every enabled transition once, all from the same marking;
// T2 is served before T5 when P2 holds a single token. Counts wrap at 256.
// m[0] is P1 ... m[5] is P6.
package pn_ref_pkg;

  typedef logic [5:0][7:0] marking_t;

  function automatic marking_t ref_step(input marking_t m, output logic t5_held);
    marking_t r;
    int f1, f2, f3, f4, f5, f6;
    f1 = (m[0] >= 1) ? 1 : 0;
    f2 = (m[1] >= 1) ? 1 : 0;
    f5 = (int'(m[1]) >= 1 + f2) ? 1 : 0;
    f3 = (m[2] >= 1) ? 1 : 0;
    f4 = (m[4] >= 1) ? 1 : 0;
    f6 = (m[3] >= 1 && m[5] >= 1) ? 1 : 0;
    t5_held = (m[1] >= 1) && (f5 == 0);
    r[0] = 8'(int'(m[0]) - f1 + f6);
    r[1] = 8'(int'(m[1]) + f1 - f2 - f5);
    r[2] = 8'(int'(m[2]) + f2 - f3);
    r[3] = 8'(int'(m[3]) + f3 + f5 - f6);
    r[4] = 8'(int'(m[4]) + f1 - f4);
    r[5] = 8'(int'(m[5]) + f4 - f6);
    return r;
  endfunction

  function automatic marking_t ref_run(input marking_t m0, input int n);
    marking_t m;
    logic     held;
    m = m0;
    for (int i = 0; i < n; i++) m = ref_step(m, held);
    return m;
  endfunction

  // Private key: P1 in the top byte of the 48 marking bits, zero-extended.
  function automatic logic [63:0] ref_key(input marking_t m);
    return {16'h0000, m[0], m[1], m[2], m[3], m[4], m[5]};
  endfunction

endpackage
