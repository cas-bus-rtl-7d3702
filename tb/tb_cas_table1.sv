// tb_cas_table1: runs a Core Access Switch at every (N, P) size of the
// published synthesis table: (3,1) (4,1) (4,2) (4,3) (5,1) (5,2) (5,3)
// (6,1) (6,2) (6,3) (6,5) (8,4).
//
// For each size it checks that the instruction register width is the
// table's k, then loads instructions serially through e[0] (all of them
// for the small sizes, a random sample of 150 otherwise), and checks the
// configuration chain (previous instruction out on s[0] after k cycles)
// and the routing of random data against the reference numbering.
module tb_cas_table1;
  import cas_pkg::*;
  import tb_cas_ref_pkg::*;

  localparam int NROWS = 12;
  // Table rows (N, P, k), packed 8 bits per field.
  localparam logic [NROWS-1:0][23:0] ROWS = {
    24'h08040B, 24'h06050A, 24'h060307, 24'h060205, 24'h060103, 24'h050306,
    24'h050205, 24'h050103, 24'h040305, 24'h040204, 24'h040103, 24'h030103};

  logic tck = 0, rst_n = 0;
  int checks = 0, failures = 0, rows_done = 0;

  always #5 tck = ~tck;

  initial begin
    repeat (200000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial #12 rst_n = 1;

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    localparam int unsigned N = int'(ROWS[r][23:16]);
    localparam int unsigned P = int'(ROWS[r][15:8]);
    localparam int unsigned K = cas_k(N, P);

    logic         cfg = 0, upd = 0;
    logic [N-1:0] e = '0, s;
    logic [P-1:0] o, i = '0;
    logic         o_en, wir_si;
    cas_mode_e    mode;
    logic [K-1:0] instr;

    cas #(.N(N), .P(P)) u_cas (
      .tck(tck), .rst_n(rst_n), .cfg(cfg), .upd(upd), .chain_wir(1'b0),
      .e(e), .s(s), .o(o), .i(i), .o_en(o_en), .wir_si(wir_si), .wir_so(1'b0),
      .mode(mode), .instr(instr));

    task automatic chk(input logic cond, input string what);
      checks++;
      if (!cond) begin
        failures++;
        $display("FAIL N=%0d P=%0d: %s", N, P, what);
      end
    endtask

    initial begin
      int unsigned  nroute, ncodes, code, prev;
      logic [K-1:0] back;
      logic [N-1:0] exp_s;
      logic [P-1:0] exp_o;
      wires_t       w;

      chk(K == int'(ROWS[r][7:0]), $sformatf("k = %0d, table gives %0d", K, ROWS[r][7:0]));
      nroute = n_routes(N, P);
      ncodes = (nroute <= 130) ? nroute + 1 : 150;
      prev   = 0;
      @(posedge rst_n);
      for (int unsigned t = 0; t < ncodes; t++) begin
        code = (nroute <= 130) ? t : 1 + ($urandom % nroute);
        @(negedge tck);
        cfg = 1;
        for (int b = K - 1; b >= 0; b--) begin
          e[0] = code[b];
          #1;
          back[b] = s[0];
          @(negedge tck);
        end
        upd = 1;
        @(negedge tck);
        upd = 0;
        cfg = 0;
        chk(back == K'(prev), "chain returns previous instruction");
        for (int rep = 0; rep < 3; rep++) begin
          e = N'($urandom);
          i = P'($urandom);
          #1;
          exp_s = e;
          exp_o = '0;
          if (code != 0) begin
            w = decode_route(N, P, code);
            foreach (w[j]) begin
              exp_o[j]    = e[w[j]];
              exp_s[w[j]] = i[j];
            end
          end
          chk(s == exp_s && o == exp_o && o_en == (code != 0),
              $sformatf("routing of instruction %0d", code));
        end
        prev = code;
      end
      rows_done++;
      $display("row N=%0d P=%0d done at %0t, %0d instructions", N, P, $time, ncodes);
    end
  end

  initial begin
    wait (rows_done == NROWS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
