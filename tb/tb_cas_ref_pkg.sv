// tb_cas_ref_pkg: reference model of the CAS instruction numbering, used by
// the testbenches to work out expected routings independently of the RTL.
//
// A TEST instruction for an N-wire bus and P core pins names an ordered list
// of P distinct wires w_0..w_{P-1} (core pin j uses wire w_j). Its code is
//     code = 1 + sum_j d_j * prod_{i<j} (N - i)
// where d_j is the position of w_j in the ascending list of wires not used by
// pins 0..j-1. Code 0 is BYPASS and the all-ones code is CONFIGURATION.
package tb_cas_ref_pkg;

  typedef int unsigned wires_t[$];

  // Encode an ordered wire list into an instruction code.
  function automatic int unsigned encode_route(input int unsigned n, input wires_t w);
    int unsigned avail[$];
    int unsigned code;
    int unsigned weight;
    for (int unsigned x = 0; x < n; x++) avail.push_back(x);
    code   = 0;
    weight = 1;
    foreach (w[j]) begin
      int idx[$];
      idx = avail.find_first_index(v) with (v == w[j]);
      code   += weight * int'(idx[0]);
      weight *= (n - j);
      avail.delete(idx[0]);
    end
    return code + 1;
  endfunction

  // Decode a TEST instruction code into its ordered wire list.
  function automatic wires_t decode_route(input int unsigned n, input int unsigned p,
                                          input int unsigned code);
    int unsigned avail[$];
    wires_t      w;
    int unsigned r;
    for (int unsigned x = 0; x < n; x++) avail.push_back(x);
    r = code - 1;
    for (int unsigned j = 0; j < p; j++) begin
      int unsigned d;
      d = r % (n - j);
      r = r / (n - j);
      w.push_back(avail[d]);
      avail.delete(d);
    end
    return w;
  endfunction

  // Number of TEST routings: N!/(N-P)!.
  function automatic int unsigned n_routes(input int unsigned n, input int unsigned p);
    int unsigned r = 1;
    for (int unsigned j = 0; j < p; j++) r *= (n - j);
    return r;
  endfunction

endpackage
