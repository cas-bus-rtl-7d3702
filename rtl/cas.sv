// cas: Core Access Switch, the per-core node of the CAS-BUS test access
// mechanism.
//
// A CAS connects P of the N test bus wires to the P test pins of one wrapped
// core and lets the other wires pass. It is built from an instruction
// register with its update stage (cas_instr_reg) and the N/P switcher
// (cas_switch), plus the two multiplexers on the first bus wire that turn
// wire 0 into the serial configuration chain:
//   * cfg = 1 (CONFIGURATION): e[0] feeds the instruction register instead of
//     the switcher, and s[0] is driven by the end of the configuration chain.
//     The switcher's control word is all ones, so the core side is isolated
//     and wires 1..N-1 pass straight through.
//   * cfg = 0: e[0] and s[0] belong to the switcher; the update register
//     selects BYPASS (instruction 0) or one TEST routing.
// Optional wrapper chaining: with chain_wir = 1 the configuration chain runs
// from the CAS instruction register out on wir_si into the instruction
// register of the core's wrapper and back in on wir_so before reaching s[0],
// so CAS and wrapper are configured in the same shift operation. With
// chain_wir = 0 the CAS register drives s[0] directly and wir_si is held at 0
// (stands for the tri-stated connection).
//
// Timing: the test data path e -> s and e -> o, i -> s is combinational; the
// configuration chain adds K flip-flops (plus the wrapper's register when
// chained) between e[0] and s[0], clocked on tck. Instructions are shifted in
// most significant bit first and take effect on the tck edge where upd = 1.
//
// From the architecture description: the structure (instruction register,
// update stage, forcing of the control bits while configuring, switcher, the
// e0/s0 multiplexers, the optional chaining through the wrapper register).
// Own choices: see cas_instr_reg and cas_switch, and the 0 driven in place of
// high impedance.
module cas
  import cas_pkg::*;
#(
  parameter int unsigned N = 6,   // test bus width
  parameter int unsigned P = 3,   // core test pins
  localparam int unsigned K  = cas_k(N, P),
  localparam int unsigned WW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         cfg,        // CONFIGURATION mode
  input  logic         upd,        // load the shifted instruction
  input  logic         chain_wir,  // route the configuration chain through the wrapper IR
  input  logic [N-1:0] e,          // test bus in
  output logic [N-1:0] s,          // test bus out
  output logic [P-1:0] o,          // to core / wrapper test inputs
  input  logic [P-1:0] i,          // from core / wrapper test outputs
  output logic         o_en,       // core side connected (TEST mode)
  output logic         wir_si,     // serial data to the wrapper instruction register
  input  logic         wir_so,     // serial data from the wrapper instruction register
  output cas_mode_e    mode,       // current mode, for observation
  output logic [K-1:0] instr       // current control word, for observation
);

  logic         ir_out;
  logic [N-1:0] sw_e;
  logic [N-1:0] sw_s;
  logic [P-1:0][WW-1:0] sel_unused;

  // e0 demultiplexer: configuration data goes to the register only.
  always_comb begin
    sw_e    = e;
    sw_e[0] = cfg ? 1'b0 : e[0];
  end

  cas_instr_reg #(.K(K)) u_ir (
    .tck       (tck),
    .rst_n     (rst_n),
    .cfg       (cfg),
    .upd       (upd),
    .shift_in  (e[0]),
    .shift_out (ir_out),
    .c         (instr)
  );

  cas_switch #(.N(N), .P(P)) u_sw (
    .c    (instr),
    .e    (sw_e),
    .s    (sw_s),
    .o    (o),
    .i    (i),
    .o_en (o_en),
    .mode (mode),
    .sel  (sel_unused)
  );

  // Wrapper instruction register in or out of the chain.
  assign wir_si = chain_wir ? ir_out : 1'b0;

  // s0 multiplexer.
  always_comb begin
    s = sw_s;
    if (cfg) s[0] = chain_wir ? wir_so : ir_out;
  end

endmodule
