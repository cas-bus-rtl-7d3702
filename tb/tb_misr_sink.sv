// tb_misr_sink: self-checking testbench of the MISR signature sink (W = 8).
// Random responses are compacted and the signature is compared after every
// step with a reference written from x^8 + x^6 + x^5 + x^4 + 1; the signature
// is then unloaded serially (MSB first) and checked bit by bit, and the
// register must be clear afterwards. Unload has priority over run.
module tb_misr_sink;
  localparam int unsigned W = 8;

  logic         tck = 0, rst_n = 0, run = 0, unload = 0;
  logic [W-1:0] resp = '0;
  logic         sout;
  int checks = 0, failures = 0;

  misr_sink #(.W(W)) dut (.*);

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

  function automatic logic [7:0] ref_step(input logic [7:0] s, input logic [7:0] d);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]} ^ d;
  endfunction

  initial begin
    logic [W-1:0] sig, got;
    #12 rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      sig = '0;
      @(negedge tck);
      run = 1;
      for (int k = 0; k < 20 + t * 7; k++) begin
        resp = W'($urandom);
        @(negedge tck);
        sig = ref_step(sig, resp);
        check(sout == sig[W-1], "signature MSB after each step");
      end
      run = 1;           // unload wins over run
      unload = 1;
      for (int b = W - 1; b >= 0; b--) begin
        #1;
        got[b] = sout;
        @(negedge tck);
      end
      unload = 0;
      run = 0;
      check(got == sig, $sformatf("signature %h expected %h", got, sig));
      #1;
      check(sout == 1'b0, "cleared after unload");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
