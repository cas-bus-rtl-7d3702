// tb_lfsr_source: self-checking testbench of the LFSR pattern source (W = 8).
// Checks serial seeding (MSB first), every generated pattern against a
// reference step written from the polynomial x^8 + x^6 + x^5 + x^4 + 1, the
// maximal period of 255, the hold when idle, the priority of run over load
// and that an all-zero seed stays zero.
module tb_lfsr_source;
  localparam int unsigned W = 8;

  logic         tck = 0, rst_n = 0, load = 0, run = 0, sin = 0;
  logic [W-1:0] pattern;
  int checks = 0, failures = 0;

  lfsr_source #(.W(W)) dut (.*);

  always #5 tck = ~tck;

  initial begin
    repeat (5000) @(posedge tck);
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

  function automatic logic [7:0] ref_step(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  task automatic seed(input logic [W-1:0] v);
    load = 1;
    for (int b = W - 1; b >= 0; b--) begin
      sin = v[b];
      @(negedge tck);
    end
    load = 0;
  endtask

  initial begin
    logic [W-1:0] s0, exp_p;
    int period;
    #12 rst_n = 1;
    @(negedge tck);
    check(pattern == '0, "reset clears");
    for (int t = 0; t < 4; t++) begin
      s0 = W'($urandom) | W'(1);
      seed(s0);
      check(pattern == s0, $sformatf("seed %h loaded, got %h", s0, pattern));
      repeat (3) @(negedge tck);
      check(pattern == s0, "holds while idle");
      exp_p  = s0;
      period = 0;
      run = 1;
      do begin
        @(negedge tck);
        exp_p = ref_step(exp_p);
        period++;
        check(pattern == exp_p, "pattern sequence");
        load = period[0];    // load is ignored while running
        sin  = 1'b1;
      end while (pattern != s0 && period < 300);
      run  = 0;
      load = 0;
      check(period == 255, $sformatf("period %0d", period));
    end
    seed('0);
    run = 1;
    repeat (10) @(negedge tck);
    run = 0;
    check(pattern == '0, "all-zero seed stays zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
