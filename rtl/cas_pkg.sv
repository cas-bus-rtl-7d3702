// cas_pkg: constants and elaboration-time helper functions shared by the
// Core Access Switch (CAS) modules and the CAS-BUS top level.
//
// A CAS on an N-wire test bus serving a core with P test pins needs one
// instruction per way of routing the core pins to bus wires, plus BYPASS and
// CONFIGURATION. Routing core pin j to bus wire w_j is an ordered choice of P
// distinct wires out of N, so the number of instructions is
//     m = N! / (N-P)! + 2
// and the instruction register holds k = ceil(log2(m)) bits. These two
// formulas reproduce every (N, P, m, k) row of the published synthesis table
// (for example N=6, P=3: m = 120 + 2 = 122, k = 7).
//
// Instruction encoding used throughout this design (the encoding itself is a
// choice of this implementation; only "all zeros = BYPASS" and "all ones
// while configuring" come from the architecture description):
//     0                       BYPASS: every bus wire passes e_i -> s_i
//     1 .. N!/(N-P)!          TEST: routing number (code-1), decoded as a
//                             mixed-radix (Lehmer) index, see cas_switch
//     2**k - 1                CONFIGURATION: core side isolated, wires pass
//     anything else           unused, treated like BYPASS
package cas_pkg;

  // Operating mode of a CAS as seen by its switcher.
  typedef enum logic [1:0] {
    CAS_BYPASS = 2'd0,  // all wires e_i -> s_i, core disconnected
    CAS_TEST   = 2'd1,  // P wires routed through the core, N-P wires pass
    CAS_CONFIG = 2'd2   // instruction shifting, core side isolated
  } cas_mode_e;

  // Number of ordered selections of P wires out of N: N * (N-1) * ... * (N-P+1).
  function automatic int unsigned perm_count(input int unsigned n, input int unsigned p);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < p; i++) r = r * (n - i);
    return r;
  endfunction

  // Number of CAS instructions m (routings + BYPASS + CONFIGURATION).
  function automatic int unsigned cas_m(input int unsigned n, input int unsigned p);
    return perm_count(n, p) + 2;
  endfunction

  // Instruction register width k = ceil(log2(m)).
  function automatic int unsigned cas_k(input int unsigned n, input int unsigned p);
    return $clog2(cas_m(n, p));
  endfunction

endpackage
