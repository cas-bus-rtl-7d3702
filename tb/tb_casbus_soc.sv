// tb_casbus_soc: end-to-end testbench of the CAS-BUS top level at its default
// size (N = 6 wires, seven CASes with P = 3, 1, 1, 2, 5, 2, 3).
//
// Models behind the CASes:
//   * CAS 0, 1, 3, 5, 6: wrapped cores whose test pins are scan chains of
//     fixed, different lengths (they shift while the CAS connects them), and
//     a wrapper instruction register of 2 to 4 bits that joins the
//     configuration chain when chain_wir is set (this for every CAS).
//   * CAS 2 (P = 1): a core with 8 inputs and 8 outputs tested from the
//     top level's LFSR source and MISR sink; the core is a fixed
//     combinational function.
//   * CAS 4 (P = 5): a hierarchical core whose 5 test pins are the wires of
//     an inner 5-wire CAS-BUS with two inner CASes (P = 2 and P = 1) in
//     front of inner scan chains. The inner CASes take cfg / upd from
//     control group 1 of the top level and are configured by the controller
//     through an outer wire.
//
// Phases:
//   1. Scan sessions: several configurations, each packed by the testbench's
//      own encoder, shifted in by the controller, then random data on tdi.
//      For every wire the testbench works out which scan chains it passes and
//      hence its delay D, and checks tdo(t) = tdi(t - D). CAS modes, wrapper
//      register contents, the readback of the previous chain contents and the
//      configuration time (chain length + 1 cycles) are checked as well.
//   2. Source/sink test: seed, run, unload; the signature on tdo is compared
//      with a reference LFSR/MISR computation.
//   3. Hierarchical test: the inner bus is configured through one outer wire
//      (with readback), then phase-1 style data checks run through inner and
//      outer scan chains together.
// Every mechanism is counted and must occur at least once.
module tb_casbus_soc;
  import cas_pkg::*;
  import tb_cas_ref_pkg::*;

  localparam int unsigned N       = 6;
  localparam int unsigned NCAS    = 7;
  localparam int unsigned P_LIST [NCAS] = '{3, 1, 1, 2, 5, 2, 3};
  localparam int unsigned CFG_MAX = 64;
  localparam int unsigned LW      = $clog2(CFG_MAX + 1);
  localparam int unsigned SS      = 2;     // CAS with the source and sink
  localparam int unsigned W       = 8;     // source / sink width
  localparam int unsigned HC      = 4;     // CAS of the hierarchical core
  localparam int unsigned NI      = 5;     // inner bus width (= P of CAS HC)
  localparam int unsigned PIA     = 2;     // inner CAS A pins
  localparam int unsigned PIB     = 1;     // inner CAS B pins
  localparam int unsigned NCFG    = 8;     // scan configurations
  localparam int unsigned TCYC    = 80;    // test cycles per configuration

  logic                   tck = 0, rst_n = 0;
  logic                   cfg_start = 0;
  logic                   cfg_grp = 0;
  logic [2:0]             cfg_wire = '0;
  logic [LW-1:0]          cfg_len = '0;
  logic [CFG_MAX-1:0]     cfg_data = '0;
  logic [CFG_MAX-1:0]     cfg_readback;
  logic                   cfg_busy, cfg_done;
  logic [N-1:0]           tdi = '0, tdo;
  logic [NCAS-1:0][N-1:0] core_o, core_i;
  logic [NCAS-1:0]        core_o_en;
  logic [NCAS-1:0]        chain_wir = '0;
  logic [NCAS-1:0]        wir_si, wir_so;
  logic                   src_load = 0, ss_run = 0, snk_unload = 0;
  logic [W-1:0]           src_pattern, snk_resp;
  logic [1:0]             grp_cfg, grp_upd;
  logic                   cas_cfg, cas_upd, hier_cfg, hier_upd;
  cas_mode_e [NCAS-1:0]   cas_mode;

  casbus_soc dut (.*);

  assign cas_cfg  = grp_cfg[0];
  assign cas_upd  = grp_upd[0];
  assign hier_cfg = grp_cfg[1];
  assign hier_upd = grp_upd[1];

  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  initial begin
    repeat (30000) @(posedge tck);
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

  // ---------------- outer core and wrapper models ----------------
  function automatic int unsigned scan_len(input int unsigned c, input int unsigned j);
    return 1 + (c * 3 + j * 2) % 7;
  endfunction
  function automatic int unsigned wir_len(input int unsigned c);
    return 2 + c % 3;
  endfunction

  logic [NCAS-1:0][N-1:0][7:0] scan_q;
  logic [NCAS-1:0][3:0]        wir_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      scan_q <= '0;
      wir_q  <= '0;
    end else begin
      for (int c = 0; c < NCAS; c++) begin
        if (core_o_en[c])
          for (int j = 0; j < N; j++) scan_q[c][j] <= {scan_q[c][j][6:0], core_o[c][j]};
        if (cas_cfg && !cas_upd && chain_wir[c])
          wir_q[c] <= {wir_q[c][2:0], wir_si[c]};
      end
    end
  end

  // core behind the source and sink: fixed combinational function
  function automatic logic [W-1:0] ss_core(input logic [W-1:0] a);
    return {a[3:0], a[7:4]} ^ (a + 8'd37);
  endfunction
  assign snk_resp = ss_core(src_pattern);

  // ---------------- hierarchical core: inner CAS-BUS ----------------
  logic [NI-1:0] ibus0, ibus1, ibus2;
  logic [PIA-1:0] ia_o, ia_i;
  logic [PIB-1:0] ib_o, ib_i;
  logic          ia_en, ib_en;
  logic          ia_wsi, ib_wsi;
  cas_mode_e     ia_mode, ib_mode;
  logic [cas_k(NI, PIA)-1:0] ia_instr;
  logic [cas_k(NI, PIB)-1:0] ib_instr;
  logic [PIA-1:0][7:0] ia_scan;
  logic [PIB-1:0][7:0] ib_scan;

  function automatic int unsigned ia_len(input int unsigned j); return 2 + j; endfunction
  function automatic int unsigned ib_len(input int unsigned j); return 4 + j; endfunction

  assign ibus0 = core_o[HC][NI-1:0];

  cas #(.N(NI), .P(PIA)) u_inner_a (
    .tck(tck), .rst_n(rst_n), .cfg(hier_cfg), .upd(hier_upd), .chain_wir(1'b0),
    .e(ibus0), .s(ibus1), .o(ia_o), .i(ia_i), .o_en(ia_en),
    .wir_si(ia_wsi), .wir_so(1'b0), .mode(ia_mode), .instr(ia_instr));
  cas #(.N(NI), .P(PIB)) u_inner_b (
    .tck(tck), .rst_n(rst_n), .cfg(hier_cfg), .upd(hier_upd), .chain_wir(1'b0),
    .e(ibus1), .s(ibus2), .o(ib_o), .i(ib_i), .o_en(ib_en),
    .wir_si(ib_wsi), .wir_so(1'b0), .mode(ib_mode), .instr(ib_instr));

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      ia_scan <= '0;
      ib_scan <= '0;
    end else begin
      if (ia_en) for (int j = 0; j < PIA; j++) ia_scan[j] <= {ia_scan[j][6:0], ia_o[j]};
      if (ib_en) for (int j = 0; j < PIB; j++) ib_scan[j] <= {ib_scan[j][6:0], ib_o[j]};
    end
  end

  always_comb begin
    for (int j = 0; j < PIA; j++) ia_i[j] = ia_scan[j][ia_len(j) - 1];
    for (int j = 0; j < PIB; j++) ib_i[j] = ib_scan[j][ib_len(j) - 1];
    for (int c = 0; c < NCAS; c++) begin
      for (int j = 0; j < N; j++) core_i[c][j] = scan_q[c][j][scan_len(c, j) - 1];
      wir_so[c] = wir_q[c][wir_len(c) - 1];
    end
    core_i[HC] = N'(ibus2);
  end

  // ---------------- mechanism counters ----------------
  int n_config, n_reconfig, n_bypass, n_test, n_wir, n_parallel, n_serial, n_passwire, n_readback;
  int n_cfgmode, n_srcsink, n_hier;

  always @(posedge tck) if (cas_cfg && cas_mode[0] == CAS_CONFIG) n_cfgmode++;

  // ---------------- configuration helpers ----------------
  int unsigned code_q [NCAS];   // instruction now in each CAS
  wires_t      route  [NCAS];
  wires_t      iroute_a, iroute_b;

  function automatic int unsigned kof(input int unsigned c);
    return cas_k(N, P_LIST[c]);
  endfunction

  // Pack, shift and check one configuration of the outer bus.
  task automatic configure(input int unsigned code [NCAS], input logic [NCAS-1:0] chw, input int unsigned t);
    logic [CFG_MAX-1:0] word, expect_rb;
    int unsigned        len, pos, cyc;
    word = '0; expect_rb = '0; pos = 0;
    for (int c = 0; c < NCAS; c++) begin
      for (int unsigned b = 0; b < kof(c); b++) begin
        word[pos]      = code[c][b];
        expect_rb[pos] = code_q[c][b];
        pos++;
      end
      if (chw[c]) begin
        for (int unsigned b = 0; b < wir_len(c); b++) begin
          word[pos]      = 1'b1 ^ b[0] ^ t[0];
          expect_rb[pos] = wir_q[c][b];
          pos++;
        end
      end
    end
    len = pos;

    @(negedge tck);
    chain_wir = chw;
    cfg_grp   = 0;
    cfg_wire  = 3'($urandom % N);   // ignored for group 0
    cfg_start = 1;
    cfg_len   = LW'(len);
    cfg_data  = word;
    @(negedge tck);
    cfg_start = 0;
    cyc = 0;
    while (!cfg_done) begin
      @(negedge tck);
      cyc++;
    end
    @(negedge tck);
    check(cyc + 1 == len + 1, $sformatf("configuration took %0d cycles, expected %0d", cyc + 1, len + 1));
    check(!cfg_busy, "controller idle after configuration");
    n_config++;
    if (n_config > 1) n_reconfig++;
    if (chw != '0) n_wir++;
    check((cfg_readback & ((CFG_MAX'(1) << len) - 1)) == expect_rb, "readback of the previous chain contents");
    n_readback++;

    pos = 0;
    for (int c = 0; c < NCAS; c++) begin
      cas_mode_e exp_mode;
      exp_mode = (code[c] == 0) ? CAS_BYPASS : CAS_TEST;
      check(cas_mode[c] == exp_mode, $sformatf("CAS %0d mode", c));
      if (exp_mode == CAS_BYPASS) n_bypass++; else n_test++;
      pos += kof(c);
      if (chw[c]) begin
        for (int unsigned b = 0; b < wir_len(c); b++)
          check(wir_q[c][b] == word[pos + b], $sformatf("wrapper %0d register bit %0d", c, b));
        pos += wir_len(c);
      end
      code_q[c] = code[c];
      route[c]  = (code[c] == 0) ? wires_t'{} : decode_route(N, P_LIST[c], code[c]);
    end
  endtask

  // Delay from outer pin j of the hierarchical core back to its output pin j.
  function automatic int unsigned hier_delay(input int unsigned j);
    int unsigned d = 0;
    foreach (iroute_a[k]) if (iroute_a[k] == j) d += ia_len(k);
    foreach (iroute_b[k]) if (iroute_b[k] == j) d += ib_len(k);
    return d;
  endfunction

  // Random data on tdi; every wire must show tdi delayed by its scan chains.
  task automatic data_phase(input int unsigned t);
    int unsigned  delay [N];
    int unsigned  ncores [N];
    int           used_wires;
    logic [N-1:0] hist [$];
    for (int w = 0; w < N; w++) begin
      delay[w] = 0; ncores[w] = 0;
      for (int c = 0; c < NCAS; c++)
        foreach (route[c][j]) if (route[c][j] == w) begin
          delay[w] += (c == HC) ? hier_delay(j) : scan_len(c, j);
          ncores[w]++;
        end
    end
    used_wires = 0;
    for (int w = 0; w < N; w++) begin
      if (ncores[w] > 0) used_wires++;
      if (ncores[w] > 1) n_serial++;
      if (ncores[w] == 0) n_passwire++;
    end
    if (used_wires > 1) n_parallel++;

    for (int unsigned k = 0; k < TCYC; k++) begin
      tdi = N'($urandom);
      hist.push_back(tdi);
      #1;
      for (int w = 0; w < N; w++)
        if (k >= delay[w])
          check(tdo[w] == hist[k - delay[w]][w],
                $sformatf("phase %0d wire %0d cycle %0d: delay %0d", t, w, k, delay[w]));
      @(negedge tck);
    end
  endtask

  // ---------------- session ----------------
  initial begin
    int unsigned     code [NCAS];
    logic [NCAS-1:0] chw;

    foreach (code_q[c]) code_q[c] = 0;
    #12 rst_n = 1;

    // 1. scan sessions (the source/sink core stays bypassed here)
    for (int unsigned t = 0; t < NCFG; t++) begin
      foreach (code[c]) begin
        wires_t w;
        int unsigned avail[$];
        w.delete();
        if (t == 0 || (t > 1 && ($urandom % 4 != 0))) begin
          for (int x = 0; x < N; x++) avail.push_back(x);
          if (t == 0) begin
            for (int unsigned j = 0; j < P_LIST[c]; j++) w.push_back((c + j) % N);
          end else begin
            avail.shuffle();
            for (int unsigned j = 0; j < P_LIST[c]; j++) w.push_back(avail[j]);
          end
          code[c] = encode_route(N, w);
        end else begin
          code[c] = (t == 1 && c % 2 == 1) ? 1 + ($urandom % n_routes(N, P_LIST[c])) : 0;
        end
      end
      code[SS] = 0;
      chw = (t < 2) ? '0 : NCAS'($urandom);
      configure(code, chw, t);
      data_phase(t);
    end

    // 2. source / sink test of the core behind CAS SS, on wire 4
    begin
      logic [W-1:0] seed, pat, sig, got;
      foreach (code[c]) code[c] = 0;
      code[SS] = encode_route(N, wires_t'{4});
      code[1]  = encode_route(N, wires_t'{0});   // another core on another wire
      configure(code, '0, 100);
      seed = 8'h5A;
      src_load = 1;
      for (int b = W - 1; b >= 0; b--) begin
        tdi = '0; tdi[4] = seed[b];
        @(negedge tck);
      end
      src_load = 0;
      check(src_pattern == seed, "source seeded through the bus");
      pat = seed; sig = '0;
      ss_run = 1;
      for (int k = 0; k < 40; k++) begin
        sig = {sig[6:0], sig[7] ^ sig[5] ^ sig[4] ^ sig[3]} ^ ss_core(pat);
        pat = {pat[6:0], pat[7] ^ pat[5] ^ pat[4] ^ pat[3]};
        @(negedge tck);
        check(src_pattern == pat, "source pattern sequence");
      end
      ss_run = 0;
      snk_unload = 1;
      for (int b = W - 1; b >= 0; b--) begin
        #1;
        got[b] = tdo[4];
        @(negedge tck);
      end
      snk_unload = 0;
      check(got == sig, $sformatf("signature on the bus %h expected %h", got, sig));
      n_srcsink++;
    end

    // 3. hierarchical core: configure the inner bus through outer wire 2
    begin
      int unsigned        ca, cb;
      logic [7:0]         iword, iprev, iback;
      wires_t             wa, wb;
      foreach (code[c]) code[c] = 0;
      code[HC] = encode_route(N, wires_t'{2, 0, 5, 1, 3});  // inner wire 0 on outer wire 2
      configure(code, '0, 101);
      wa = wires_t'{3, 1};
      wb = wires_t'{3};                                    // chained with inner A pin 0
      ca = encode_route(NI, wa);
      cb = encode_route(NI, wb);
      // chain: inner A register (5 bits) then inner B register (3 bits)
      iword = {3'(cb), 5'(ca)};
      iprev = {ib_instr, ia_instr};
      cfg_grp   = 1;
      cfg_wire  = 3'd2;
      cfg_len   = LW'(8);
      cfg_data  = CFG_MAX'(iword);
      cfg_start = 1;
      @(negedge tck);
      cfg_start = 0;
      check(hier_cfg && !cas_cfg, "only the inner group is configuring");
      wait (cfg_done);
      @(posedge tck);
      @(negedge tck);
      iback = cfg_readback[7:0];
      check(cas_mode[HC] == CAS_TEST, "outer CAS kept its routing");
      check(iback == iprev, "inner chain readback through the outer bus");
      check(ia_mode == CAS_TEST && ib_mode == CAS_TEST, "inner CASes in TEST");
      iroute_a = wa;
      iroute_b = wb;
      data_phase(200);
      // a second outer routing with another core on the bus
      code[0] = encode_route(N, wires_t'{2, 4, 1});
      configure(code, '0, 102);
      data_phase(201);
      n_hier++;
    end

    check(n_config > 0,   "configuration happened");
    check(n_reconfig > 0, "reconfiguration happened");
    check(n_cfgmode > 0,  "CONFIGURATION mode seen");
    check(n_bypass > 0,   "BYPASS happened");
    check(n_test > 0,     "TEST happened");
    check(n_wir > 0,      "wrapper register chained");
    check(n_parallel > 0, "parallel test on several wires");
    check(n_serial > 0,   "several cores chained on one wire");
    check(n_passwire > 0, "wire bypassing every core");
    check(n_readback > 0, "readback checked");
    check(n_srcsink > 0,  "source/sink test");
    check(n_hier > 0,     "hierarchical core test");
    $display("mechanisms: config=%0d reconfig=%0d cfgmode_cycles=%0d bypass=%0d test=%0d wir=%0d parallel=%0d serial=%0d passwire=%0d readback=%0d srcsink=%0d hier=%0d",
             n_config, n_reconfig, n_cfgmode, n_bypass, n_test, n_wir, n_parallel, n_serial,
             n_passwire, n_readback, n_srcsink, n_hier);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
