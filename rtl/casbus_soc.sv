// casbus_soc: the CAS-BUS test access mechanism of a system on a chip.
//
// An N-wire test bus leaves the SoC test controller, passes through one Core
// Access Switch (CAS) per testable core, and returns to the controller. The
// default arrangement has seven CASes, in ring order:
//   index 0..2  CAS 1..3 for cores 1..3,
//   index 3     the CAS of the wrapped system bus,
//   index 4..6  CAS 4..6 for cores 4..6,
// with N = 6 and P (core test pins) per CAS given by P_LIST. Each CAS routes
// P bus wires through its core (scan chains, BIST control, a source/sink
// pair or the internal test bus of a hierarchical core) and lets the others
// pass, so several cores can be tested in parallel on disjoint wires, or
// chained on a wire, and the arrangement can be changed between tests.
//
// The core of CAS SS_IDX (default: CAS 3) is tested from an external source
// and sink: pin 0 of that CAS seeds an LFSR pattern source (lfsr_source)
// whose patterns leave on src_pattern towards the core, and the core's
// responses (snk_resp) are compacted by a MISR (misr_sink) whose signature is
// shifted back onto the same bus wire; core_i[SS_IDX][0] is not used. The
// source and sink are controlled by src_load, ss_run and snk_unload, which
// in a complete SoC come from the test controller like the wrapper controls.
//
// The cores and their wrappers are outside this module: each CAS exposes its
// core-side pins on core_o / core_i (pin j of CAS c at [c][j], pins at
// j >= P_LIST[c] unused and driven 0), core_o_en, and the serial link to the
// wrapper instruction register (wir_si / wir_so) used when chain_wir[c] = 1.
//
// Configuration: the controller shifts one word through the instruction
// registers of all CASes on wire 0 and then updates them together; see
// soc_test_controller for the packing (CAS index 0 in the low bits, each
// instruction K_c = cas_k(N, P_LIST[c]) bits wide, plus the wrapper register
// length of every CAS that has chain_wir set). All CASes of the ring share
// the group-0 cfg and upd. A hierarchical core's inner CASes take their cfg
// and upd from another group (grp_cfg / grp_upd ports) and are configured
// through the outer wire cfg_wire, which the ring must route into that core.
//
// Timing: the test data path from tdi through the ring to tdo is
// combinational (the cores' scan cells are the only registers on it); the
// configuration takes chain length + 1 cycles of tck.
//
// From the architecture description: the ring topology, one CAS per core and
// one for the system bus, the shared controller and configuration chain.
// Own choices: N, the P of each CAS, the controller's external interface,
// which CAS has the source and sink and their control inputs, and the
// separate control groups for inner buses of hierarchical cores.
module casbus_soc
  import cas_pkg::*;
#(
  parameter int unsigned N       = 6,
  parameter int unsigned NCAS    = 7,
  parameter int unsigned P_LIST [NCAS] = '{3, 1, 1, 2, 5, 2, 3},
  parameter int unsigned CFG_MAX = 64,
  parameter int unsigned NGRP    = 2,    // CAS control groups: 0 = this ring, 1.. = inner buses
  parameter int unsigned SS_IDX  = 2,    // CAS whose core is tested from a source and a sink
  parameter int unsigned SS_W    = 8,    // width of that source and sink
  localparam int unsigned LW = $clog2(CFG_MAX + 1),
  localparam int unsigned GW = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned WW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                      tck,
  input  logic                      rst_n,
  // controller: configuration
  input  logic                      cfg_start,
  input  logic [GW-1:0]             cfg_grp,
  input  logic [WW-1:0]             cfg_wire,
  input  logic [LW-1:0]             cfg_len,
  input  logic [CFG_MAX-1:0]        cfg_data,
  output logic [CFG_MAX-1:0]        cfg_readback,
  output logic                      cfg_busy,
  output logic                      cfg_done,
  // controller: external test data
  input  logic [N-1:0]              tdi,
  output logic [N-1:0]              tdo,
  // core side of every CAS
  output logic [NCAS-1:0][N-1:0]    core_o,
  input  logic [NCAS-1:0][N-1:0]    core_i,
  output logic [NCAS-1:0]           core_o_en,
  input  logic [NCAS-1:0]           chain_wir,
  output logic [NCAS-1:0]           wir_si,
  input  logic [NCAS-1:0]           wir_so,
  // source / sink pair of CAS SS_IDX (its pin 0)
  input  logic                      src_load,     // seed the source from the bus
  input  logic                      ss_run,       // apply patterns and compact responses
  input  logic                      snk_unload,   // shift the signature onto the bus
  output logic [SS_W-1:0]           src_pattern,  // to the core inputs
  input  logic [SS_W-1:0]           snk_resp,     // from the core outputs
  // CAS control per group: group 0 drives the CASes of this ring and is
  // brought out for the wrappers; groups 1.. go to the inner CASes of
  // hierarchical cores
  output logic [NGRP-1:0]           grp_cfg,
  output logic [NGRP-1:0]           grp_upd,
  output cas_mode_e [NCAS-1:0]      cas_mode
);

  // bus[c] enters CAS c; bus[NCAS] returns to the controller.
  logic [NCAS:0][N-1:0] bus;
  logic                 cas_cfg;
  logic                 cas_upd;

  assign cas_cfg = grp_cfg[0];
  assign cas_upd = grp_upd[0];

  soc_test_controller #(.N(N), .CFG_MAX(CFG_MAX), .NGRP(NGRP)) u_ctrl (
    .tck          (tck),
    .rst_n        (rst_n),
    .cfg_start    (cfg_start),
    .cfg_grp      (cfg_grp),
    .cfg_wire     (cfg_wire),
    .cfg_len      (cfg_len),
    .cfg_data     (cfg_data),
    .cfg_readback (cfg_readback),
    .cfg_busy     (cfg_busy),
    .cfg_done     (cfg_done),
    .cfg          (grp_cfg),
    .upd          (grp_upd),
    .bus_out      (bus[0]),
    .bus_in       (bus[NCAS]),
    .tdi          (tdi),
    .tdo          (tdo)
  );

  for (genvar g = 0; g < NCAS; g++) begin : g_cas
    localparam int unsigned PC = P_LIST[g];
    localparam int unsigned KC = cas_k(N, PC);

    logic [PC-1:0] o;
    logic [PC-1:0] i;
    logic [KC-1:0] instr;

    if (g == SS_IDX) begin : g_ss
      // Pin 0 of this CAS feeds the source and is fed by the sink.
      logic snk_out;

      lfsr_source #(.W(SS_W)) u_src (
        .tck     (tck),
        .rst_n   (rst_n),
        .load    (src_load),
        .run     (ss_run),
        .sin     (o[0]),
        .pattern (src_pattern)
      );

      misr_sink #(.W(SS_W)) u_snk (
        .tck    (tck),
        .rst_n  (rst_n),
        .run    (ss_run),
        .unload (snk_unload),
        .resp   (snk_resp),
        .sout   (snk_out)
      );

      always_comb begin
        i    = core_i[g][PC-1:0];
        i[0] = snk_out;
      end
    end else begin : g_pins
      assign i = core_i[g][PC-1:0];
    end

    cas #(.N(N), .P(PC)) u_cas (
      .tck       (tck),
      .rst_n     (rst_n),
      .cfg       (cas_cfg),
      .upd       (cas_upd),
      .chain_wir (chain_wir[g]),
      .e         (bus[g]),
      .s         (bus[g+1]),
      .o         (o),
      .i         (i),
      .o_en      (core_o_en[g]),
      .wir_si    (wir_si[g]),
      .wir_so    (wir_so[g]),
      .mode      (cas_mode[g]),
      .instr     (instr)
    );

    assign core_o[g] = N'(o);

    // While configuring, every CAS must present the all-ones control word,
    // which keeps its core isolated.
    a_isolated_in_cfg : assert property (@(posedge tck)
      cas_cfg |-> (instr == '1 && !core_o_en[g]));
  end

endmodule
