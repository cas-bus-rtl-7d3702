// tb_cas_switch: self-checking testbench of the N/P switcher.
// Every control word of an N=6, P=3 switcher is applied with random bus and
// core data. Expected outputs come from the reference numbering in
// tb_cas_ref_pkg: BYPASS and unused codes pass all wires, the all-ones code
// passes all wires with the core isolated, and each TEST code routes wire
// w_j to core pin j and core pin j back onto wire w_j. The testbench also
// checks that the TEST codes cover all N!/(N-P)! distinct routings, and that
// the instruction count m and width k match the published table rows.
module tb_cas_switch;
  import cas_pkg::*;
  import tb_cas_ref_pkg::*;

  localparam int unsigned N  = 6;
  localparam int unsigned P  = 3;
  localparam int unsigned K  = cas_k(N, P);
  localparam int unsigned WW = $clog2(N);

  logic [K-1:0] c;
  logic [N-1:0] e, s;
  logic [P-1:0] o, i;
  logic         o_en;
  cas_mode_e    mode;
  logic [P-1:0][WW-1:0] sel;

  int checks = 0, failures = 0;

  cas_switch #(.N(N), .P(P)) dut (.*);

  initial begin
    #100000;
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

  // (N, P, m, k) rows of the published CAS synthesis table.
  int unsigned table_rows [12][4] = '{
    '{3,1,5,3}, '{4,1,6,3}, '{4,2,14,4}, '{4,3,26,5}, '{5,1,7,3}, '{5,2,22,5},
    '{5,3,62,6}, '{6,1,8,3}, '{6,2,32,5}, '{6,3,122,7}, '{6,5,722,10}, '{8,4,1682,11}};

  bit seen [int unsigned];

  initial begin
    wires_t       w;
    logic [N-1:0] exp_s;
    logic [P-1:0] exp_o;
    int unsigned  nroute;

    foreach (table_rows[r]) begin
      check(cas_m(table_rows[r][0], table_rows[r][1]) == table_rows[r][2],
            $sformatf("m for N=%0d P=%0d", table_rows[r][0], table_rows[r][1]));
      check(cas_k(table_rows[r][0], table_rows[r][1]) == table_rows[r][3],
            $sformatf("k for N=%0d P=%0d", table_rows[r][0], table_rows[r][1]));
    end

    nroute = n_routes(N, P);
    for (int unsigned code = 0; code < 2**K; code++) begin
      for (int rep = 0; rep < 4; rep++) begin
        c = K'(code);
        e = N'($urandom);
        i = P'($urandom);
        #1;
        exp_s = e;
        exp_o = '0;
        if (code >= 1 && code <= nroute) begin
          w = decode_route(N, P, code);
          foreach (w[j]) begin
            exp_o[j]    = e[w[j]];
            exp_s[w[j]] = i[j];
          end
          check(mode == CAS_TEST, "TEST mode decoded");
          check(o_en == 1'b1, "core side enabled in TEST");
          if (rep == 0) begin
            check(encode_route(N, w) == code, "numbering is one to one");
            seen[code] = 1'b1;
          end
        end else if (code == 2**K - 1) begin
          check(mode == CAS_CONFIG, "CONFIGURATION decoded from all ones");
          check(o_en == 1'b0, "core side isolated while configuring");
        end else begin
          check(mode == CAS_BYPASS, "BYPASS for code 0 and unused codes");
          check(o_en == 1'b0, "core side off in BYPASS");
        end
        check(s == exp_s, $sformatf("code %0d: s=%b expected %b", code, s, exp_s));
        check(o == exp_o, $sformatf("code %0d: o=%b expected %b", code, o, exp_o));
      end
    end
    check(seen.num() == nroute, "all routings reachable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
