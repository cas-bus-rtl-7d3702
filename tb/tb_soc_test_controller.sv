// tb_soc_test_controller: self-checking testbench of the SoC test controller.
// The ring is modelled as two configuration shift chains of random length:
// group 0 on wire 0 and group 1 (an inner bus) on a randomly chosen wire,
// each shifting while its cfg is high and its upd low, and an inverting path
// on the other wires. Checks: after a configuration the addressed chain
// holds the requested word and the other is untouched, the readback holds
// the previous contents, cfg of the addressed group stays high for exactly
// length + 1 cycles with upd in the last of them and the other group's
// controls stay low, and outside configuration tdi reaches the ring and the
// ring reaches tdo.
module tb_soc_test_controller;
  localparam int unsigned N       = 6;
  localparam int unsigned CFG_MAX = 64;
  localparam int unsigned LW      = $clog2(CFG_MAX + 1);
  localparam int unsigned NGRP    = 2;

  logic               tck = 0, rst_n = 0;
  logic               cfg_start = 0;
  logic               cfg_grp = 0;
  logic [2:0]         cfg_wire = '0;
  logic [LW-1:0]      cfg_len = '0;
  logic [CFG_MAX-1:0] cfg_data = '0;
  logic [CFG_MAX-1:0] cfg_readback;
  logic               cfg_busy, cfg_done;
  logic [NGRP-1:0]    cfg, upd;
  logic [N-1:0]       bus_out, bus_in, tdi = '0, tdo;

  int checks = 0, failures = 0;
  int cfg_cycles, upd_cycles, other_cycles;

  soc_test_controller #(.N(N), .CFG_MAX(CFG_MAX), .NGRP(NGRP)) dut (.*);

  // ring model: chain of group g on wire wsel[g]
  logic [NGRP-1:0][CFG_MAX-1:0] chain_q;
  int unsigned        chain_len [NGRP];
  int unsigned        wsel [NGRP];
  always_ff @(posedge tck or negedge rst_n)
    if (!rst_n) chain_q <= '0;
    else
      for (int g = 0; g < NGRP; g++)
        if (cfg[g] && !upd[g]) chain_q[g] <= {chain_q[g][CFG_MAX-2:0], bus_out[wsel[g]]};
  always_comb begin
    bus_in = ~bus_out;
    for (int g = 0; g < NGRP; g++)
      if (cfg[g] && chain_len[g] > 0) bus_in[wsel[g]] = chain_q[g][chain_len[g]-1];
  end

  always #5 tck = ~tck;

  always @(posedge tck) begin
    if (cfg[cfg_grp]) cfg_cycles++;
    if (upd[cfg_grp]) upd_cycles++;
    if (cfg[!cfg_grp] || upd[!cfg_grp]) other_cycles++;
  end

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [CFG_MAX-1:0] low_bits(input logic [CFG_MAX-1:0] v, input int unsigned n);
    logic [CFG_MAX-1:0] m;
    m = (n >= CFG_MAX) ? '1 : ((CFG_MAX'(1) << n) - 1);
    return v & m;
  endfunction

  initial begin
    logic [CFG_MAX-1:0] prev, word, other;
    int unsigned g, len;
    wsel[0] = 0;
    wsel[1] = 3;
    chain_len[0] = 1;
    chain_len[1] = 1;
    #12 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      @(negedge tck);
      g   = (t < 3) ? 0 : $urandom % NGRP;
      len = (t == 0) ? 1 : 1 + ($urandom % CFG_MAX);
      if (t == 5) len = CFG_MAX;
      chain_len[g] = len;
      if (g == 1) wsel[1] = 1 + $urandom % (N - 1);
      prev  = low_bits(chain_q[g], len);
      other = chain_q[1 - g];
      word  = low_bits({$urandom, $urandom}, len);
      // test phase data path
      tdi = N'($urandom);
      #1;
      check(bus_out == tdi, "tdi drives the ring outside configuration");
      check(tdo == ~tdi, "ring drives tdo outside configuration");
      check(cfg == '0 && upd == '0, "no configuration control while idle");
      cfg_cycles   = 0;
      upd_cycles   = 0;
      other_cycles = 0;
      cfg_start = 1;
      cfg_grp   = g[0];
      cfg_wire  = (g == 0) ? 3'($urandom % N) : 3'(wsel[1]);  // ignored for group 0
      cfg_len   = LW'(len);
      cfg_data  = word | (t[0] ? ~low_bits('1, len) : '0);  // bits above len are ignored
      @(negedge tck);
      cfg_start = 0;
      check(cfg_busy, "busy after start");
      wait (cfg_done);
      @(posedge tck);
      @(negedge tck);
      check(!cfg_busy, "idle after update");
      check(cfg_cycles == len + 1, $sformatf("cfg high %0d cycles, expected %0d", cfg_cycles, len + 1));
      check(upd_cycles == 1, "one update pulse");
      check(other_cycles == 0, "other group's controls stay low");
      check(low_bits(chain_q[g], len) == word, $sformatf("group %0d chain holds the configuration word", g));
      check(chain_q[1 - g] == other, "other group's chain untouched");
      check(low_bits(cfg_readback, len) == prev, "readback holds the previous chain contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
