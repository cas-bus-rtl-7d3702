// tb_cas_instr_reg: self-checking testbench of the CAS instruction register.
// Checks reset to BYPASS, forcing of all control bits during configuration,
// MSB-first serial loading, the serial output (previous contents, K cycles
// of latency), that the update register alone drives the control word, and
// that nothing shifts outside configuration.
module tb_cas_instr_reg;
  localparam int unsigned K = 7;

  logic         tck = 0;
  logic         rst_n = 0;
  logic         cfg = 0, upd = 0, shift_in = 0;
  logic         shift_out;
  logic [K-1:0] c;
  int checks = 0, failures = 0;

  cas_instr_reg #(.K(K)) dut (.*);

  always #5 tck = ~tck;

  initial begin
    repeat (2000) @(posedge tck);
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

  // Shift one word, MSB first, and return what came out of shift_out.
  task automatic shift_word(input logic [K-1:0] v, output logic [K-1:0] out);
    for (int b = K - 1; b >= 0; b--) begin
      shift_in = v[b];
      cfg      = 1;
      #1;
      out[b] = shift_out;
      check(c == '1, "control word all ones while configuring");
      @(posedge tck); #1;
    end
  endtask

  logic [K-1:0] prev, cur, got;

  initial begin
    #12 rst_n = 1;
    @(negedge tck);
    check(c == '0, "reset gives BYPASS");
    check(shift_out == 1'b0, "reset clears shift register");
    prev = '0;
    for (int t = 0; t < 40; t++) begin
      cur = K'($urandom);
      @(negedge tck);
      shift_word(cur, got);
      check(got == prev, $sformatf("serial output returns previous word %h got %h", prev, got));
      // update cycle, cfg still high
      upd = 1;
      @(posedge tck); #1;
      upd = 0;
      cfg = 0;
      #1;
      check(c == cur, $sformatf("update loads %h got %h", cur, c));
      // no shifting while cfg is low
      shift_in = ~shift_in;
      repeat (3) @(posedge tck);
      #1;
      check(c == cur, "control word holds in TEST/BYPASS");
      check(shift_out == cur[K-1], "shift register holds while cfg is low");
      prev = cur;
    end
    // shifting without update leaves the old control word behind the forcing
    @(negedge tck);
    shift_word(~prev, got);
    cfg = 0; #1;
    check(c == prev, "shift without update does not change the control word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
