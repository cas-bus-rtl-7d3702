// soc_test_controller: central SoC test controller of the CAS-BUS.
//
// The controller sits at both ends of the test bus ring and drives the
// control signals of every CAS. It sequences the two phases of a test
// session:
//   * Configuration: on cfg_start it raises cfg[grp] for cfg_len tck cycles
//     and drives the configuration word serially on one bus wire, bit
//     cfg_len-1 first (a cfg_len above CFG_MAX is treated as CFG_MAX). Group
//     0 is the CASes of the top-level ring: their instruction registers (and
//     any wrapper instruction registers chained into them) form one shift
//     chain on wire 0, so with the CASes numbered from the controller's
//     output the word is packed as {.., instruction of CAS 1, instruction of
//     CAS 0}, CAS 0 in the low bits. Groups 1..NGRP-1 are the CASes of inner
//     test buses of hierarchical cores: their chain is the inner wire 0,
//     reached through the outer wire cfg_wire, which the top-level CASes must
//     already route into that core; the outer CASes keep their routing while
//     an inner group is configured. The bits that fall out of the end of the
//     chain (its previous contents) are captured in cfg_readback with the
//     same packing. One more cycle with cfg[grp] and upd[grp] both high
//     copies every shifted instruction into its update register, after which
//     cfg[grp] drops and the new switching scheme is live. cfg_done pulses
//     in that last cycle.
//   * Test: outside the shift cycles the controller passes test data
//     between the external pins and the ring: bus_out = tdi, tdo = bus_in.
//     The wires not used for shifting keep passing tdi during configuration.
// A new configuration can be started whenever the controller is idle, so the
// bus can be reconfigured between tests of one session.
//
// Timing: configuration of L chain bits takes L + 1 tck cycles from the
// cycle after cfg_start. rst_n is asynchronous, active low.
//
// From the architecture description: a single controller that drives all
// CAS control signals and the test data, configuration through the first
// bus wire, reconfiguration between tests. Own choices: the parallel
// configuration word, the readback, the cycle-level sequence, and the
// control groups for inner buses of hierarchical cores.
module soc_test_controller #(
  parameter int unsigned N       = 6,   // test bus width
  parameter int unsigned CFG_MAX = 64,  // longest configuration chain supported
  parameter int unsigned NGRP    = 2,   // control groups: 0 = top-level ring, others inner buses
  localparam int unsigned LW = $clog2(CFG_MAX + 1),
  localparam int unsigned GW = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned WW = (N > 1) ? $clog2(N) : 1
) (
  input  logic               tck,
  input  logic               rst_n,
  // configuration request
  input  logic               cfg_start,
  input  logic [GW-1:0]      cfg_grp,      // which CAS group to configure
  input  logic [WW-1:0]      cfg_wire,     // outer wire for groups > 0 (group 0 uses wire 0)
  input  logic [LW-1:0]      cfg_len,
  input  logic [CFG_MAX-1:0] cfg_data,
  output logic [CFG_MAX-1:0] cfg_readback,
  output logic               cfg_busy,
  output logic               cfg_done,
  // CAS control, one pair per group
  output logic [NGRP-1:0]    cfg,
  output logic [NGRP-1:0]    upd,
  // test bus ring
  output logic [N-1:0]       bus_out,
  input  logic [N-1:0]       bus_in,
  // external test data
  input  logic [N-1:0]       tdi,
  output logic [N-1:0]       tdo
);

  typedef enum logic [1:0] {
    ST_IDLE,
    ST_SHIFT,
    ST_UPDATE
  } state_e;

  state_e               state_q;
  logic [LW-1:0]        cnt_q;    // bits still to shift
  logic [CFG_MAX-1:0]   data_q;   // word being shifted, next bit at the MSB
  logic [GW-1:0]        grp_q;    // group being configured
  logic [WW-1:0]        wire_q;   // wire carrying the chain
  logic [LW-1:0]        len;      // cfg_len limited to CFG_MAX
  logic [GW-1:0]        grp;      // cfg_grp limited to NGRP-1

  assign len = (int'(cfg_len) > int'(CFG_MAX)) ? LW'(CFG_MAX) : cfg_len;
  assign grp = (int'(cfg_grp) > int'(NGRP - 1)) ? GW'(NGRP - 1) : cfg_grp;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_IDLE;
      cnt_q        <= '0;
      data_q       <= '0;
      grp_q        <= '0;
      wire_q       <= '0;
      cfg_readback <= '0;
    end else begin
      unique case (state_q)
        ST_IDLE: begin
          if (cfg_start) begin
            data_q       <= cfg_data << (LW'(CFG_MAX) - len);
            cnt_q        <= len;
            grp_q        <= grp;
            wire_q       <= (grp == '0 || int'(cfg_wire) >= int'(N)) ? '0 : cfg_wire;
            cfg_readback <= '0;
            state_q      <= (len == '0) ? ST_UPDATE : ST_SHIFT;
          end
        end
        ST_SHIFT: begin
          cfg_readback <= {cfg_readback[CFG_MAX-2:0], bus_in[wire_q]};
          data_q       <= data_q << 1;
          cnt_q        <= cnt_q - 1'b1;
          if (cnt_q == LW'(1)) state_q <= ST_UPDATE;
        end
        ST_UPDATE: state_q <= ST_IDLE;
        default:   state_q <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    cfg = '0;
    upd = '0;
    if (state_q != ST_IDLE)   cfg[grp_q] = 1'b1;
    if (state_q == ST_UPDATE) upd[grp_q] = 1'b1;
  end

  assign cfg_busy = (state_q != ST_IDLE);
  assign cfg_done = (state_q == ST_UPDATE);

  always_comb begin
    bus_out = tdi;
    if (state_q == ST_SHIFT) bus_out[wire_q] = data_q[CFG_MAX-1];
  end

  assign tdo = bus_in;

endmodule
