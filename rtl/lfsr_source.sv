// lfsr_source: pseudo-random test pattern source for a core tested from an
// external source and sink through one CAS-BUS wire (P = 1).
//
// The source is a W-bit linear feedback shift register. Its seed arrives
// serially on the test bus wire the CAS routes to the core (sin), most
// significant bit first, while load = 1. While run = 1 it steps once per tck
// cycle and its state is applied in parallel to the core's inputs (pattern).
// The register is of Fibonacci type: it shifts towards the MSB and the new
// bit 0 is the XOR of the state bits selected by TAPS. The default taps
// (bits 7, 5, 4, 3 of an 8-bit register, i.e. x^8 + x^6 + x^5 + x^4 + 1) give
// the maximal period of 255; an all-zero seed stays zero.
//
// Interface and timing: everything changes on the rising edge of tck; run
// has priority over load. rst_n is asynchronous, active low, and clears the
// state.
//
// The architecture only calls for "a simple LFSR" as the source; the width,
// the polynomial, the serial seeding and the control inputs are choices of
// this design.
module lfsr_source #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(8'hB8)
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         load,     // shift the seed in from sin
  input  logic         run,      // generate one pattern per cycle
  input  logic         sin,      // serial seed from the test bus
  output logic [W-1:0] pattern   // parallel pattern to the core inputs
);

  logic [W-1:0] state_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)     state_q <= '0;
    else if (run)   state_q <= {state_q[W-2:0], ^(state_q & TAPS)};
    else if (load)  state_q <= {state_q[W-2:0], sin};
  end

  assign pattern = state_q;

endmodule
