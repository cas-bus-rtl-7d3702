// cas_switch: the N/P configurable switcher of a Core Access Switch (CAS).
//
// The switcher sits between the N wires of the test bus (inputs e, outputs s)
// and the P test pins of one core (outputs o towards the core's test inputs,
// inputs i from the core's test outputs). A K-bit control word selects one
// switching scheme:
//   * BYPASS (code 0) and unused codes: s = e, no wire reaches the core.
//   * CONFIGURATION (code all ones): like BYPASS, with the core side isolated.
//   * TEST (codes 1 .. N!/(N-P)!): core pin j is fed from bus wire w_j, and
//     the core's output pin j is returned on the same wire, s[w_j] = i[j]
//     (the pairing rule "e_i switched to o_j implies i_j switched to s_i").
//     The N-P wires that are not selected pass straight through.
// The routing number r = code-1 is read as a mixed-radix number: digit j is
// r mod (N-j) (then r is divided by N-j), and w_j is the digit-th wire,
// counted from wire 0, among the wires not yet taken by pins 0..j-1. Every
// ordered choice of P distinct wires therefore has exactly one code. The
// decoding is done once, at elaboration, into a constant table indexed by
// the control word, so the hardware is a small ROM (2**K entries of P wire
// numbers) followed by the multiplexers, with no arithmetic.
//
// The core-side pins are tri-state in the architecture; here o_en = 1 marks
// that o is driven (TEST mode) and o is held at 0 otherwise, and i is ignored
// unless o_en = 1.
//
// Purely combinational; no clock.
//
// From the architecture description: the set of schemes (every ordered
// choice of P of N wires, plus BYPASS and CONFIGURATION), the pairing rule,
// BYPASS = all zeros, isolation while configuring. Own choices: the numbering
// of the routings, the handling of unused codes, o_en in place of tri-states.
module cas_switch
  import cas_pkg::*;
#(
  parameter int unsigned N = 6,   // test bus width
  parameter int unsigned P = 3,   // core test pins, 1 <= P <= N
  localparam int unsigned K  = cas_k(N, P),
  localparam int unsigned WW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [K-1:0] c,        // control word from the instruction register
  input  logic [N-1:0] e,        // test bus in
  output logic [N-1:0] s,        // test bus out
  output logic [P-1:0] o,        // towards core test inputs
  input  logic [P-1:0] i,        // from core test outputs
  output logic         o_en,     // 1: o is driven and i is used (TEST mode)
  output cas_mode_e    mode,     // decoded mode
  output logic [P-1:0][WW-1:0] sel  // bus wire used by each core pin (valid in TEST)
);

  localparam int unsigned NROUTE = perm_count(N, P);

  typedef logic [P-1:0][WW-1:0] route_t;

  // Routing table, one entry per control word, computed at elaboration.
  // Entry c (1 <= c <= NROUTE) holds the wires of routing number c-1.
  function automatic route_t [2**K-1:0] build_routes();
    route_t [2**K-1:0] tbl;
    int unsigned       r;
    int unsigned       d;
    int unsigned       cnt;
    logic [N-1:0]      used;
    for (int unsigned code = 0; code < 2**K; code++) tbl[code] = '0;
    for (int unsigned code = 1; code <= NROUTE; code++) begin
      r    = code - 1;
      used = '0;
      for (int unsigned j = 0; j < P; j++) begin
        d   = r % (N - j);
        r   = r / (N - j);
        cnt = 0;
        for (int unsigned w = 0; w < N; w++) begin
          if (!used[w]) begin
            if (cnt == d) begin
              tbl[code][j] = WW'(w);
              used[w]      = 1'b1;
            end
            cnt = cnt + 1;
          end
        end
      end
    end
    return tbl;
  endfunction

  localparam route_t [2**K-1:0] ROUTES = build_routes();

  // Decode the control word into a mode and a wire per core pin.
  always_comb begin
    if (c == '0)                          mode = CAS_BYPASS;
    else if (c == '1)                     mode = CAS_CONFIG;
    else if (int'(c) <= int'(NROUTE))     mode = CAS_TEST;
    else                                  mode = CAS_BYPASS;
    sel = ROUTES[c];
  end

  // Route the wires.
  always_comb begin
    s    = e;
    o    = '0;
    o_en = 1'b0;
    if (mode == CAS_TEST) begin
      o_en = 1'b1;
      for (int unsigned j = 0; j < P; j++) begin
        o[j]      = e[sel[j]];
        s[sel[j]] = i[j];
      end
    end
  end

endmodule
