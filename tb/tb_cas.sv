// tb_cas: self-checking testbench of one Core Access Switch (N=6, P=3).
// A small model of a wrapper instruction register (4 bits, shifting with the
// CAS while cfg is high and upd low) hangs on wir_si / wir_so. The testbench
// loads instructions serially on e[0], with and without the wrapper register
// in the chain, and checks: the chain latency and the data that falls out on
// s[0]; that wires 1..N-1 pass and the core is isolated while configuring;
// the wrapper register contents; BYPASS; and every sampled TEST routing
// against the reference numbering with random bus and core data.
module tb_cas;
  import cas_pkg::*;
  import tb_cas_ref_pkg::*;

  localparam int unsigned N  = 6;
  localparam int unsigned P  = 3;
  localparam int unsigned K  = cas_k(N, P);
  localparam int unsigned WL = 4;

  logic         tck = 0, rst_n = 0;
  logic         cfg = 0, upd = 0, chain_wir = 0;
  logic [N-1:0] e = '0, s;
  logic [P-1:0] o, i = '0;
  logic         o_en, wir_si, wir_so;
  cas_mode_e    mode;
  logic [K-1:0] instr;
  logic [WL-1:0] wir_q;

  int checks = 0, failures = 0;

  cas #(.N(N), .P(P)) dut (.*);

  // wrapper instruction register model
  always_ff @(posedge tck or negedge rst_n)
    if (!rst_n)            wir_q <= '0;
    else if (cfg && !upd)  wir_q <= {wir_q[WL-2:0], wir_si};
  assign wir_so = wir_q[WL-1];

  always #5 tck = ~tck;

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

  // Shift len bits of v (bit len-1 first) and update; return what left on s[0].
  task automatic configure(input logic [63:0] v, input int len, output logic [63:0] out);
    out = '0;
    @(negedge tck);
    cfg = 1;
    for (int b = len - 1; b >= 0; b--) begin
      e    = N'($urandom);
      e[0] = v[b];
      #1;
      out[b] = s[0];
      check(s[N-1:1] == e[N-1:1], "wires 1..N-1 pass while configuring");
      check(o_en == 1'b0 && o == '0, "core isolated while configuring");
      check(mode == CAS_CONFIG, "CONFIGURATION mode while cfg is high");
      @(negedge tck);
    end
    upd = 1;
    @(negedge tck);
    upd = 0;
    cfg = 0;
    #1;
  endtask

  task automatic check_data(input int unsigned code, input int reps);
    wires_t       w;
    logic [N-1:0] exp_s;
    logic [P-1:0] exp_o;
    for (int r = 0; r < reps; r++) begin
      e = N'($urandom);
      i = P'($urandom);
      #1;
      exp_s = e;
      exp_o = '0;
      if (code >= 1 && code <= n_routes(N, P)) begin
        w = decode_route(N, P, code);
        foreach (w[j]) begin
          exp_o[j]    = e[w[j]];
          exp_s[w[j]] = i[j];
        end
      end
      check(s == exp_s, $sformatf("instr %0d: s=%b expected %b", code, s, exp_s));
      check(o == exp_o, $sformatf("instr %0d: o=%b expected %b", code, o, exp_o));
    end
  endtask

  initial begin
    logic [63:0] out;
    logic [K-1:0] prev;
    int unsigned code;

    #12 rst_n = 1;
    #1;
    check(mode == CAS_BYPASS, "BYPASS after reset");
    check_data(0, 8);

    // CAS register alone in the chain
    prev = '0;
    for (int t = 0; t < 30; t++) begin
      code = 1 + ($urandom % n_routes(N, P));
      if (t % 7 == 3) code = 0;
      configure(64'(code), K, out);
      check(out[K-1:0] == prev, $sformatf("chain returns previous instruction %0d", prev));
      check(instr == K'(code), "instruction updated");
      check(mode == (code == 0 ? CAS_BYPASS : CAS_TEST), "mode after update");
      check(o_en == (code != 0), "core side enabled only in TEST");
      check_data(code, 6);
      prev = K'(code);
    end

    // CAS and wrapper instruction registers chained: wrapper bits go first
    chain_wir = 1;
    for (int t = 0; t < 10; t++) begin
      logic [WL-1:0] wv;
      logic [WL-1:0] wprev;
      wprev = wir_q;
      wv    = WL'($urandom);
      code  = 1 + ($urandom % n_routes(N, P));
      configure(64'({wv, K'(code)}), K + WL, out);
      check(out[K+WL-1:0] == {wprev, prev}, "chained register returns previous contents");
      check(wir_q == wv, "wrapper register loaded through the CAS");
      check(instr == K'(code), "CAS instruction loaded with wrapper chained");
      check_data(code, 4);
      prev = K'(code);
    end
    chain_wir = 0;
    #1;
    check(wir_si == 1'b0, "wrapper link idle when not chained");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
