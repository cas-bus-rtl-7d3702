// misr_sink: signature analyser for a core tested from an external source
// and sink through one CAS-BUS wire (P = 1).
//
// The sink is a W-bit multiple-input signature register. While run = 1 it
// compacts one parallel core response per tck cycle: the register shifts
// towards the MSB, bit 0 receives the XOR of the state bits selected by TAPS
// (the same feedback as lfsr_source), and the response word is XOR-ed into
// the shifted state. While unload = 1 the signature leaves serially on sout,
// most significant bit first, with zeros shifted in behind it, so a complete
// unload of W cycles also clears the register for the next test.
//
// Interface and timing: sout is the current MSB; state changes on the rising
// edge of tck; unload has priority over run. rst_n is asynchronous, active
// low, and clears the signature.
//
// The architecture only calls for "a simple MISR" as the sink; the width,
// the polynomial and the control inputs are choices of this design.
module misr_sink #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(8'hB8)
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         run,      // compact one response per cycle
  input  logic         unload,   // shift the signature out on sout
  input  logic [W-1:0] resp,     // parallel response from the core outputs
  output logic         sout      // serial signature to the test bus
);

  logic [W-1:0] sig_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)      sig_q <= '0;
    else if (unload) sig_q <= {sig_q[W-2:0], 1'b0};
    else if (run)    sig_q <= {sig_q[W-2:0], ^(sig_q & TAPS)} ^ resp;
  end

  assign sout = sig_q[W-1];

endmodule
